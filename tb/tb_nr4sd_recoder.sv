// Self-checking testbench for nr4sd_recoder.
// Recodes every 8-bit value and random 16- and 32-bit values in both NR4SD
// flavours and checks, from the meaning of the stored bits alone, that
//  * every lower digit lies in its flavour's digit set and the value the
//    digits represent equals the two's complement operand;
//  * the top digit is a legal Modified Booth code.
// Digit values: NR4SD- digit = -2*hi + lo, NR4SD+ digit = 2*hi - lo, top digit
// = (-1)^s * (one + 2*two). A few rows of the encoding tables are also
// checked bit by bit.
module tb_nr4sd_recoder;
  import ahl_mult_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  b8;
  logic [8:0]  p8m, p8p;
  logic [15:0] b16;
  logic [16:0] p16m, p16p;
  logic [31:0] b32;
  logic [32:0] p32m, p32p;

  nr4sd_recoder #(.N(8),  .KIND(NR4SD_MINUS)) u8m  (.b(b8),  .pre(p8m));
  nr4sd_recoder #(.N(8),  .KIND(NR4SD_PLUS))  u8p  (.b(b8),  .pre(p8p));
  nr4sd_recoder #(.N(16), .KIND(NR4SD_MINUS)) u16m (.b(b16), .pre(p16m));
  nr4sd_recoder #(.N(16), .KIND(NR4SD_PLUS))  u16p (.b(b16), .pre(p16p));
  nr4sd_recoder #(.N(32), .KIND(NR4SD_MINUS)) u32m (.b(b32), .pre(p32m));
  nr4sd_recoder #(.N(32), .KIND(NR4SD_PLUS))  u32p (.b(b32), .pre(p32p));

  // value of a pre-encoded operand of n bits (pre has n+1 bits, LSB aligned)
  function automatic longint decode(input logic [32:0] pre, input int n, input bit plus,
                                    output bit legal);
    longint v = 0;
    longint w = 1;
    int k = n / 2;
    legal = 1;
    for (int j = 0; j < k - 1; j++) begin
      int d;
      if (!plus) d = -2 * int'(pre[2*j+1]) + int'(pre[2*j]);
      else       d =  2 * int'(pre[2*j+1]) - int'(pre[2*j]);
      v += longint'(d) * w;
      w *= 4;
    end
    begin
      logic s, one, two;
      int d;
      {s, one, two} = {pre[n], pre[n-1], pre[n-2]};
      if (one && two) legal = 0;
      d = int'(one) + 2 * int'(two);
      if (s) d = -d;
      v += longint'(d) * w;
    end
    return v;
  endfunction

  task automatic check(input logic [32:0] pre, input int n, input bit plus, input longint expv,
                       input string tag);
    bit legal;
    longint got;
    got = decode(pre, n, plus, legal);
    checks++;
    if (got != expv || !legal) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: operand %0d decoded as %0d (legal=%0b) pre=%h", tag, expv, got, legal, pre);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      b8 = 8'(v);
      #1;
      check(33'(p8m), 8, 0, longint'($signed(b8)), "8m");
      check(33'(p8p), 8, 1, longint'($signed(b8)), "8p");
    end
    // encoding-table rows for digit 0 of an 8-bit operand (c_0 = 0):
    // b1b0=10 -> NR4SD- n-=1, n+=0 (digit -2, carry 1); NR4SD+ n+=1, n-=0 (+2)
    b8 = 8'b0000_0010; #1;
    checks++; if (p8m[1:0] != 2'b10 || p8m[3:2] != 2'b01) begin failures++; $display("FAIL table row NR4SD- 100"); end
    checks++; if (p8p[1:0] != 2'b10) begin failures++; $display("FAIL table row NR4SD+ 100"); end
    // b1b0=01 -> +1: NR4SD- n-=0,n+=1 ; NR4SD+ n+=1,n-=1 (digit 0 row 010)
    b8 = 8'b0000_0001; #1;
    checks++; if (p8m[1:0] != 2'b01) begin failures++; $display("FAIL table row NR4SD- 001"); end
    checks++; if (p8p[1:0] != 2'b11) begin failures++; $display("FAIL table row NR4SD+ 001"); end
    for (int t = 0; t < 4000; t++) begin
      b16 = 16'($urandom);
      b32 = $urandom;
      if (t == 0) begin b16 = 16'h8000; b32 = 32'h8000_0000; end
      if (t == 1) begin b16 = 16'h7fff; b32 = 32'h7fff_ffff; end
      if (t == 2) begin b16 = 16'hffff; b32 = 32'hffff_ffff; end
      #1;
      check(33'(p16m), 16, 0, longint'($signed(b16)), "16m");
      check(33'(p16p), 16, 1, longint'($signed(b16)), "16p");
      check(p32m, 32, 0, longint'($signed(b32)), "32m");
      check(p32p, 32, 1, longint'($signed(b32)), "32p");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
