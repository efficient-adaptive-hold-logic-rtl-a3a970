// Random-operand workloads for the design choices the architecture leaves
// open, at the 16-bit size: either NR4SD flavour in the multiplier, and the
// zero count taken from either the multiplicand or the multiplier. Three
// configurations besides the default one (NR4SD-, multiplicand judged),
// which tb_aging_aware_multiplier covers:
//   NR4SD+ / multiplicand, NR4SD- / multiplier, NR4SD+ / multiplier.
// Each runs 13000 pairs in an ahl_mult_workload harness with n = 7, which
// checks every product, every operand's cycle count, the error count
// against the injected late arrivals, and that the aging indicator fires.
module tb_workload_variants;
  import ahl_mult_pkg::*;

  localparam int N_OPS = 13000;

  bit d0, d1, d2;
  int c0, c1, c2, f0, f1, f2;
  int o0, o1, o2, t0, t1, t2;
  int e0, e1, e2, i0, i1, i2;
  int y0, y1, y2;
  bit a0, a1, a2;

  ahl_mult_workload #(.M(16), .KIND(NR4SD_PLUS),  .JUDGE_MR(1'b0), .N_ZEROS(7), .N_OPS(N_OPS))
    w_plus_md  (d0, c0, f0, o0, t0, e0, i0, y0, a0);
  ahl_mult_workload #(.M(16), .KIND(NR4SD_MINUS), .JUDGE_MR(1'b1), .N_ZEROS(7), .N_OPS(N_OPS))
    w_minus_mr (d1, c1, f1, o1, t1, e1, i1, y1, a1);
  ahl_mult_workload #(.M(16), .KIND(NR4SD_PLUS),  .JUDGE_MR(1'b1), .N_ZEROS(7), .N_OPS(N_OPS))
    w_plus_mr  (d2, c2, f2, o2, t2, e2, i2, y2, a2);

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display(" configuration     one-cycle  two-cycle  Razor errors  cycles/op");
    $display(" NR4SD+, md        %6d     %6d     %6d        %0.3f", o0, t0, e0, real'(y0) / N_OPS);
    $display(" NR4SD-, mr        %6d     %6d     %6d        %0.3f", o1, t1, e1, real'(y1) / N_OPS);
    $display(" NR4SD+, mr        %6d     %6d     %6d        %0.3f", o2, t2, e2, real'(y2) / N_OPS);
    // every configuration must have seen errors (second half of its run)
    checks += 3;
    if (e0 == 0) failures++;
    if (e1 == 0) failures++;
    if (e2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
