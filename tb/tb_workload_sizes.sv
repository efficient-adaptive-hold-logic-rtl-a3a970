// Random-operand workloads at the four operand widths of the evaluation:
// 4, 8, 16 and 32 bits, 13000 operand pairs each (the largest input count
// of the error-count experiments). Judging thresholds n are taken from the
// zero counts those experiments use: 1 (4-bit), 3 (8-bit), 7 (16-bit),
// 15 (32-bit). Each width runs in its own ahl_mult_workload harness; every
// product and every operand's cycle count is checked there. The summary
// prints, per width, the one-cycle / two-cycle split, the Razor errors and
// the average cycles per operation.
module tb_workload_sizes;

  localparam int N_OPS = 13000;

  bit d4, d8, d16, d32;
  int c4, c8, c16, c32, f4, f8, f16, f32;
  int o4, o8, o16, o32, t4, t8, t16, t32;
  int e4, e8, e16, e32, i4, i8, i16, i32;
  int y4, y8, y16, y32;
  bit a4, a8, a16, a32;

  ahl_mult_workload #(.M(4),  .N_ZEROS(1),  .N_OPS(N_OPS)) w4  (d4,  c4,  f4,  o4,  t4,  e4,  i4,  y4,  a4);
  ahl_mult_workload #(.M(8),  .N_ZEROS(3),  .N_OPS(N_OPS)) w8  (d8,  c8,  f8,  o8,  t8,  e8,  i8,  y8,  a8);
  ahl_mult_workload #(.M(16), .N_ZEROS(7),  .N_OPS(N_OPS)) w16 (d16, c16, f16, o16, t16, e16, i16, y16, a16);
  ahl_mult_workload #(.M(32), .N_ZEROS(15), .N_OPS(N_OPS)) w32 (d32, c32, f32, o32, t32, e32, i32, y32, a32);

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + c16 + c32, f4 + f8 + f16 + f32 + 1);
    $finish;
  end

  initial begin
    wait (d4 && d8 && d16 && d32);
    $display(" width  one-cycle  two-cycle  Razor errors  cycles/op");
    $display("  4     %6d     %6d     %6d        %0.3f", o4,  t4,  e4,  real'(y4)  / N_OPS);
    $display("  8     %6d     %6d     %6d        %0.3f", o8,  t8,  e8,  real'(y8)  / N_OPS);
    $display(" 16     %6d     %6d     %6d        %0.3f", o16, t16, e16, real'(y16) / N_OPS);
    $display(" 32     %6d     %6d     %6d        %0.3f", o32, t32, e32, real'(y32) / N_OPS);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8 + c16 + c32, f4 + f8 + f16 + f32);
    $finish;
  end
endmodule
