// Self-checking testbench for cla_adder.
// Exhaustive over 8-bit operands and carry in, random over 32 and 64 bits,
// comparing {co, s} with the integer sum x + y + ci.
module tb_cla_adder;

  int checks = 0, failures = 0;

  logic [7:0]  x8, y8, s8;
  logic [31:0] x32, y32, s32;
  logic [63:0] x64, y64, s64;
  logic        ci, co8, co32, co64;

  cla_adder #(.W(8))  u8  (.x(x8),  .y(y8),  .ci(ci), .s(s8),  .co(co8));
  cla_adder #(.W(32)) u32 (.x(x32), .y(y32), .ci(ci), .s(s32), .co(co32));
  cla_adder #(.W(64)) u64 (.x(x64), .y(y64), .ci(ci), .s(s64), .co(co64));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2 * 65536; v++) begin
      {ci, x8, y8} = 17'(v);
      x32 = $urandom; y32 = $urandom;
      x64 = {$urandom, $urandom}; y64 = {$urandom, $urandom};
      if (v < 4) begin x32 = '1; y32 = 32'(v & 1); x64 = '1; y64 = 64'(v & 1); end
      #1;
      checks += 3;
      if ({co8, s8} != 9'(x8) + 9'(y8) + 9'(ci)) begin
        failures++; if (failures < 10) $display("FAIL W8 %h+%h+%0d", x8, y8, ci);
      end
      if ({co32, s32} != 33'(x32) + 33'(y32) + 33'(ci)) begin
        failures++; if (failures < 10) $display("FAIL W32 %h+%h+%0d", x32, y32, ci);
      end
      if ({co64, s64} != 65'(x64) + 65'(y64) + 65'(ci)) begin
        failures++; if (failures < 10) $display("FAIL W64 %h+%h+%0d", x64, y64, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
