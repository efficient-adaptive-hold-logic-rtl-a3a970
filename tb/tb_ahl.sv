// Self-checking testbench for ahl (M = 8, N_ZEROS = 3, WINDOW = 16,
// ERR_LIMIT = 2).
// The testbench models the multiplier's input register: at every rising
// edge where not_gating is 1 it loads the next random operand, and it
// measures how many cycles each operand stayed. Expected: 1 cycle when the
// operand has more than 3 zeros (young) or more than 4 zeros (aged), else
// 2 cycles. Every finished operand pulses op_done; during the middle part
// of the run each also pulses error, until the aging indicator fires. The
// run must show one-cycle and two-cycle patterns, the aging switch, and at
// least one operand with exactly 4 zeros judged by the stricter block.
module tb_ahl;

  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, op_done = 0, error = 0;
  logic [7:0] opnd = 8'hff;
  logic       not_gating, aged;
  int n_one = 0, n_two = 0, n_strict = 0, n_ops = 0;
  int cyc = 0;
  bit have_op = 0, running = 0, inject = 0, aged_first = 0;

  ahl #(.M(8), .N_ZEROS(3), .WINDOW(16), .ERR_LIMIT(2)) dut (
    .clk(clk), .rst_n(rst_n), .opnd(opnd), .op_done(op_done), .error(error),
    .not_gating(not_gating), .aged(aged)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the aging state the judging mux sees in an operand's first cycle
  always @(negedge clk) if (cyc == 0) aged_first = aged;

  always @(posedge clk) if (running) begin
    cyc++;
    if (not_gating) begin
      if (have_op) begin
        int z, exp_cycles;
        z = $countones(~opnd);
        exp_cycles = (z > (aged_first ? 4 : 3)) ? 1 : 2;
        checks++;
        if (cyc != exp_cycles) begin
          failures++;
          $display("FAIL opnd %b (%0d zeros, aged=%0b): %0d cycles, expected %0d",
                   opnd, z, aged_first, cyc, exp_cycles);
        end
        if (cyc == 1) n_one++; else n_two++;
        if (aged_first && z == 4) n_strict++;
        n_ops++;
      end
      op_done <= have_op;
      error   <= have_op & inject;
      opnd    <= 8'($urandom);
      have_op  = 1;
      cyc      = 0;
    end else begin
      op_done <= 0;
      error   <= 0;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 running = 1;
    wait (n_ops >= 200);
    checks++;
    if (aged) begin failures++; $display("FAIL aged without errors"); end
    inject = 1;
    wait (n_ops >= 204);
    inject = 0;
    @(posedge clk); #1;
    checks++;
    if (!aged) begin failures++; $display("FAIL aged not set after repeated errors"); end
    wait (n_ops >= 500);
    checks += 3;
    if (n_one == 0)    begin failures++; $display("FAIL no one-cycle pattern seen"); end
    if (n_two == 0)    begin failures++; $display("FAIL no two-cycle pattern seen"); end
    if (n_strict == 0) begin failures++; $display("FAIL stricter block never decided"); end
    $display("one-cycle %0d, two-cycle %0d, 4-zero patterns after aging %0d", n_one, n_two, n_strict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
