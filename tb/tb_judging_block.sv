// Self-checking testbench for judging_block.
// Exhaustive over 8-bit operands for thresholds 3 and 4, random over 16 bits
// for threshold 7, comparing one_cycle with a zero count done in the
// testbench ($countones of the inverted operand).
module tb_judging_block;

  int checks = 0, failures = 0;

  logic [7:0]  o8;
  logic [15:0] o16;
  logic        j3, j4, j7;

  judging_block #(.M(8),  .THRESH(3)) u3 (.opnd(o8),  .one_cycle(j3));
  judging_block #(.M(8),  .THRESH(4)) u4 (.opnd(o8),  .one_cycle(j4));
  judging_block #(.M(16), .THRESH(7)) u7 (.opnd(o16), .one_cycle(j7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      o8 = 8'(v);
      o16 = (v < 4) ? 16'(v * 16'h5555) : 16'($urandom);
      #1;
      checks += 3;
      if (j3 != ($countones(~o8) > 3)) begin failures++; $display("FAIL T3 %b", o8); end
      if (j4 != ($countones(~o8) > 4)) begin failures++; $display("FAIL T4 %b", o8); end
      if (j7 != ($countones(~o16) > 7)) begin failures++; $display("FAIL T7 %b", o16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
