// Self-checking testbench for aging_indicator (WINDOW = 16, ERR_LIMIT = 3).
//  1. Three errors in each of several windows: aged must stay 0, showing
//     that the error count returns to zero at the end of every window.
//  2. Errors spread over a window boundary (3 + 3): aged stays 0.
//  3. Four errors inside one window: aged rises one cycle after the fourth
//     error and stays 1 through further windows without errors.
module tb_aging_indicator;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, op_done = 0, error = 0, aged;

  aging_indicator #(.WINDOW(16), .ERR_LIMIT(3)) dut (
    .clk(clk), .rst_n(rst_n), .op_done(op_done), .error(error), .aged(aged)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run n operations; every err_every-th one raises error, at most n_err times
  task automatic run_ops(input int n, input int n_err, input int err_every);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      op_done = 1;
      error = (err_every > 0) && (i % err_every == 0) && (i / err_every < n_err);
    end
    @(negedge clk);
    op_done = 0;
    error = 0;
  endtask

  task automatic expect_aged(input logic exp, input string tag);
    checks++;
    if (aged !== exp) begin
      failures++;
      $display("FAIL %s: aged=%0b expected %0b at %0t", tag, aged, exp, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. three errors per window of 16 operations, for four windows
    for (int w = 0; w < 4; w++) begin
      run_ops(16, 3, 5);
      expect_aged(0, "three errors per window");
    end
    // 2. two ops into a window, then 3 errors at the end and 3 at the start
    run_ops(13, 0, 0);
    run_ops(3, 3, 1);    // errors on the last three ops of a window
    run_ops(3, 3, 1);    // errors on the first three ops of the next one
    expect_aged(0, "errors split over a window boundary");
    run_ops(13, 0, 0);   // finish that window
    // 3. four errors in one window
    run_ops(3, 3, 1);
    expect_aged(0, "three errors so far");
    @(negedge clk); error = 1; op_done = 1;
    @(negedge clk); error = 0; op_done = 0;
    expect_aged(1, "fourth error in the window");
    run_ops(40, 0, 0);
    expect_aged(1, "aged is kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
