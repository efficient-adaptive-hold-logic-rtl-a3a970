// Self-checking testbench for nr4sd_multiplier.
// The multiplier operand is pre-encoded with nr4sd_recoder. Products are
// compared with the signed integer product:
//  * exhaustively for 4x4 and 8x8 in both NR4SD flavours,
//  * with random and corner operands for 16x16 and 32x32.
module tb_nr4sd_multiplier;
  import ahl_mult_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  a8, b8;
  logic [15:0] a16, b16;
  logic [31:0] a32, b32;
  logic [4:0]  e4m, e4p;
  logic [8:0]  e8m, e8p;
  logic [16:0] e16m, e16p;
  logic [32:0] e32m, e32p;
  logic [7:0]  p4m, p4p;
  logic [15:0] p8m, p8p;
  logic [31:0] p16m, p16p;
  logic [63:0] p32m, p32p;

  nr4sd_recoder #(.N(4),  .KIND(NR4SD_MINUS)) r4m  (.b(b4),  .pre(e4m));
  nr4sd_recoder #(.N(4),  .KIND(NR4SD_PLUS))  r4p  (.b(b4),  .pre(e4p));
  nr4sd_recoder #(.N(8),  .KIND(NR4SD_MINUS)) r8m  (.b(b8),  .pre(e8m));
  nr4sd_recoder #(.N(8),  .KIND(NR4SD_PLUS))  r8p  (.b(b8),  .pre(e8p));
  nr4sd_recoder #(.N(16), .KIND(NR4SD_MINUS)) r16m (.b(b16), .pre(e16m));
  nr4sd_recoder #(.N(16), .KIND(NR4SD_PLUS))  r16p (.b(b16), .pre(e16p));
  nr4sd_recoder #(.N(32), .KIND(NR4SD_MINUS)) r32m (.b(b32), .pre(e32m));
  nr4sd_recoder #(.N(32), .KIND(NR4SD_PLUS))  r32p (.b(b32), .pre(e32p));

  nr4sd_multiplier #(.N(4),  .KIND(NR4SD_MINUS)) m4m  (.a(a4),  .b_pre(e4m),  .p(p4m));
  nr4sd_multiplier #(.N(4),  .KIND(NR4SD_PLUS))  m4p  (.a(a4),  .b_pre(e4p),  .p(p4p));
  nr4sd_multiplier #(.N(8),  .KIND(NR4SD_MINUS)) m8m  (.a(a8),  .b_pre(e8m),  .p(p8m));
  nr4sd_multiplier #(.N(8),  .KIND(NR4SD_PLUS))  m8p  (.a(a8),  .b_pre(e8p),  .p(p8p));
  nr4sd_multiplier #(.N(16), .KIND(NR4SD_MINUS)) m16m (.a(a16), .b_pre(e16m), .p(p16m));
  nr4sd_multiplier #(.N(16), .KIND(NR4SD_PLUS))  m16p (.a(a16), .b_pre(e16p), .p(p16p));
  nr4sd_multiplier #(.N(32), .KIND(NR4SD_MINUS)) m32m (.a(a32), .b_pre(e32m), .p(p32m));
  nr4sd_multiplier #(.N(32), .KIND(NR4SD_PLUS))  m32p (.a(a32), .b_pre(e32p), .p(p32p));

  task automatic chk(input logic [63:0] got, input logic [63:0] expv, input string tag);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", tag, got, expv);
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
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      {a4, b4} = 8'(v);
      a16 = 16'($urandom); b16 = 16'($urandom);
      a32 = $urandom; b32 = $urandom;
      case (v)
        0: begin a16 = 16'h8000; b16 = 16'h8000; a32 = 32'h8000_0000; b32 = 32'h8000_0000; end
        1: begin a16 = 16'h7fff; b16 = 16'h8000; a32 = 32'h7fff_ffff; b32 = 32'h8000_0000; end
        2: begin a16 = 16'hffff; b16 = 16'hffff; a32 = 32'hffff_ffff; b32 = 32'h7fff_ffff; end
        default: ;
      endcase
      #1;
      if (v < 256) begin
        chk(64'(p4m), 64'($unsigned(8'(int'($signed(a4)) * int'($signed(b4))))), "4x4 NR4SD-");
        chk(64'(p4p), 64'($unsigned(8'(int'($signed(a4)) * int'($signed(b4))))), "4x4 NR4SD+");
      end
      chk(64'(p8m), 64'($unsigned(16'(int'($signed(a8)) * int'($signed(b8))))), "8x8 NR4SD-");
      chk(64'(p8p), 64'($unsigned(16'(int'($signed(a8)) * int'($signed(b8))))), "8x8 NR4SD+");
      if (v < 20000) begin
        chk(64'(p16m), 64'($unsigned(32'(longint'($signed(a16)) * longint'($signed(b16))))), "16x16 NR4SD-");
        chk(64'(p16p), 64'($unsigned(32'(longint'($signed(a16)) * longint'($signed(b16))))), "16x16 NR4SD+");
        chk(p32m, 64'(longint'($signed(a32)) * longint'($signed(b32))), "32x32 NR4SD-");
        chk(p32p, 64'(longint'($signed(a32)) * longint'($signed(b32))), "32x32 NR4SD+");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
