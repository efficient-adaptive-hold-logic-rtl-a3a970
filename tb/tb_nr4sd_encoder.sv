// Self-checking testbench for nr4sd_encoder.
// Applies all four stored digit codes in both NR4SD flavours and checks the
// one-hot outputs against the digit each code stands for:
// NR4SD- digit = -2*hi + lo (one+, one-, two- for +1, -1, -2),
// NR4SD+ digit = 2*hi - lo (one+, one-, two+ for +1, -1, +2).
module tb_nr4sd_encoder;
  import ahl_mult_pkg::*;

  int checks = 0, failures = 0;
  nr_digit_t d;
  nr_enc_t em, ep;

  nr4sd_encoder #(.KIND(NR4SD_MINUS)) um (.d(d), .enc(em));
  nr4sd_encoder #(.KIND(NR4SD_PLUS))  up (.d(d), .enc(ep));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      int dm, dp;
      nr_enc_t xm, xp;
      d = nr_digit_t'(c);
      #1;
      dm = -2 * int'(d.hi) + int'(d.lo);
      dp =  2 * int'(d.hi) - int'(d.lo);
      xm = '{one_p: dm == 1, one_m: dm == -1, two: dm == -2};
      xp = '{one_p: dp == 1, one_m: dp == -1, two: dp == 2};
      checks += 2;
      if (em != xm) begin failures++; $display("FAIL NR4SD- code %0d: got %b exp %b", c, em, xm); end
      if (ep != xp) begin failures++; $display("FAIL NR4SD+ code %0d: got %b exp %b", c, ep, xp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
