// Self-checking testbench for mb_ppg.
// For every 8-bit multiplicand and every Modified Booth code (digits -2..+2
// and the negative zero s=1, one=two=0) it checks that the (N+1)-bit two's
// complement partial product plus cin equals digit * A; a 16-bit instance is
// checked with random multiplicands.
module tb_mb_ppg;
  import ahl_mult_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a8;
  logic [15:0] a16;
  mb_enc_t     e;
  logic [8:0]  p8;
  logic [16:0] p16;
  logic        c8, c16;

  mb_ppg #(.N(8))  u8  (.a(a8),  .enc(e), .pp(p8),  .cin(c8));
  mb_ppg #(.N(16)) u16 (.a(a16), .enc(e), .pp(p16), .cin(c16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int code = 0; code < 8; code++) begin
        int d;
        e = mb_enc_t'(code);
        if (e.one && e.two) continue;  // not a legal code
        d = int'(e.one) + 2 * int'(e.two);
        if (e.s) d = -d;
        a8 = 8'(v);
        a16 = 16'($urandom);
        #1;
        checks += 2;
        if (longint'($signed(p8)) + longint'(c8) != d * longint'($signed(a8))) begin
          failures++;
          if (failures < 10) $display("FAIL N8 a=%0d code=%b", $signed(a8), code);
        end
        if (longint'($signed(p16)) + longint'(c16) != d * longint'($signed(a16))) begin
          failures++;
          if (failures < 10) $display("FAIL N16 a=%0d code=%b", $signed(a16), code);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
