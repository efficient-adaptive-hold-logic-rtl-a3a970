// Self-checking testbench for razor_ff (W = 8).
// clk has a period of 10 time units; clk_del is clk delayed by 3. The
// testbench plays the role of the combinational logic in front of the
// register and changes d with explicit delays:
//  * on time: d settles before the clk edge -> no error, q = d, valid in
//    the next cycle;
//  * late: at the clk edge d still holds a stale value and the right value
//    arrives 1 unit after the edge (before clk_del) -> error in the next
//    cycle, q restored at the following edge, valid one cycle later;
//  * en = 0: nothing is captured and valid stays 0.
// The number of error and valid cycles is counted and checked.
module tb_razor_ff;

  int checks = 0, failures = 0;

  logic       clk = 0, clk_del = 0, rst_n = 0, en = 0;
  logic [7:0] d = 0, q;
  logic       valid, error;
  int n_err = 0, n_valid = 0;

  razor_ff #(.W(8)) dut (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n), .en(en), .d(d),
    .q(q), .valid(valid), .error(error)
  );

  always #5 clk = ~clk;
  always @(clk) clk_del <= #3 clk;

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample the status just before every rising clk edge
  always @(posedge clk) if (rst_n) begin
    n_err   += int'(error);
    n_valid += int'(valid);
  end

  task automatic expect_eq(input logic [7:0] got, input logic [7:0] exp, input string tag);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h at %0t", tag, got, exp, $time);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    // --- on time capture of 8'h3c at the edge at t=20
    @(posedge clk); #2 d = 8'h3c; en = 1;
    @(posedge clk); #1 en = 0;
    #5;  // after clk_del, before the next edge
    expect_eq({7'b0, error}, 0, "on time: no error");
    expect_eq({7'b0, valid}, 1, "on time: valid");
    expect_eq(q, 8'h3c, "on time: q");
    @(posedge clk); #5;
    expect_eq({7'b0, valid}, 0, "idle after on-time op");
    // --- late arrival: stale 8'h11 at the edge, 8'ha5 one unit after it
    @(negedge clk); d = 8'h11; en = 1;
    @(posedge clk); #1 d = 8'ha5; en = 0;
    #5;
    expect_eq({7'b0, error}, 1, "late: error raised");
    expect_eq({7'b0, valid}, 0, "late: not valid in the error cycle");
    expect_eq(q, 8'h11, "late: main flip-flop caught the stale value");
    d = 8'h5a;                     // next operation's result before the restore edge
    @(posedge clk); #1 d = 8'h00;
    #5;
    expect_eq({7'b0, error}, 0, "late: error cleared after restore");
    expect_eq({7'b0, valid}, 1, "late: valid after restore");
    expect_eq(q, 8'ha5, "late: q restored from the shadow element");
    // --- en = 0: no capture
    @(posedge clk); #5;
    expect_eq({7'b0, valid}, 0, "disabled: no valid");
    expect_eq(q, 8'ha5, "disabled: q held");
    @(posedge clk); #1;
    checks += 2;
    if (n_err != 1)   begin failures++; $display("FAIL error cycles %0d, expected 1", n_err); end
    if (n_valid != 2) begin failures++; $display("FAIL valid cycles %0d, expected 2", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
