// Self-checking testbench for nr4sd_ppg.
// For every 8-bit multiplicand and every digit of both NR4SD flavours it
// checks that the partial product, read as an (N+1)-bit two's complement
// number, plus cin equals digit * A. A 16-bit instance is checked with
// random operands.
module tb_nr4sd_ppg;
  import ahl_mult_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a8;
  logic [15:0] a16;
  nr_enc_t     em, ep;
  logic [8:0]  pm8, pp8;
  logic [16:0] pm16, pp16;
  logic        cm8, cp8, cm16, cp16;

  nr4sd_ppg #(.N(8),  .KIND(NR4SD_MINUS)) um8  (.a(a8),  .enc(em), .pp(pm8),  .cin(cm8));
  nr4sd_ppg #(.N(8),  .KIND(NR4SD_PLUS))  up8  (.a(a8),  .enc(ep), .pp(pp8),  .cin(cp8));
  nr4sd_ppg #(.N(16), .KIND(NR4SD_MINUS)) um16 (.a(a16), .enc(em), .pp(pm16), .cin(cm16));
  nr4sd_ppg #(.N(16), .KIND(NR4SD_PLUS))  up16 (.a(a16), .enc(ep), .pp(pp16), .cin(cp16));

  function automatic nr_enc_t enc_of(input int d, input bit plus);
    nr_enc_t e;
    e.one_p = (d == 1);
    e.one_m = (d == -1);
    e.two   = plus ? (d == 2) : (d == -2);
    return e;
  endfunction

  task automatic chk(input longint got, input longint expv, input string tag);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d exp %0d", tag, got, expv);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dm [4] = '{-2, -1, 0, 1};
    int dp [4] = '{-1, 0, 1, 2};
    for (int v = 0; v < 256; v++) begin
      for (int k = 0; k < 4; k++) begin
        a8 = 8'(v);
        a16 = 16'($urandom);
        em = enc_of(dm[k], 0);
        ep = enc_of(dp[k], 1);
        #1;
        chk(longint'($signed(pm8)) + longint'(cm8), dm[k] * longint'($signed(a8)), "N8 NR4SD-");
        chk(longint'($signed(pp8)) + longint'(cp8), dp[k] * longint'($signed(a8)), "N8 NR4SD+");
        chk(longint'($signed(pm16)) + longint'(cm16), dm[k] * longint'($signed(a16)), "N16 NR4SD-");
        chk(longint'($signed(pp16)) + longint'(cp16), dp[k] * longint'($signed(a16)), "N16 NR4SD+");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
