// Two's complement to pre-encoded NR4SD recoder.
//
// Converts an N-bit two's complement operand B into the N+1 bits a
// pre-encoded NR4SD multiplier stores: K-1 = N/2-1 NR4SD digits of two bits
// and the most significant digit in Modified Booth form (three bits).
//
// How it works: a chain of half adders runs from the least significant bit
// with an incoming carry c_0 = 0. For each digit j the pair (b_2j, c_2j)
// enters a half adder and (b_2j+1, carry) a second one, producing the digit
// bits and the carry c_2j+2 into the next digit, exactly as in the
// description's NR4SD recoding circuit and encoding tables:
//   NR4SD-: n+_2j = b_2j ^ c_2j,  c_2j+1 = b_2j & c_2j,
//           n-_2j+1 = b_2j+1 ^ c_2j+1, c_2j+2 = b_2j+1 | c_2j+1
//           (the upper cell is the modified half adder HA*, whose sum has
//           negative weight, so its carry is an OR).
//   NR4SD+: n-_2j = b_2j ^ c_2j,  c_2j+1 = b_2j | c_2j,
//           n+_2j+1 = b_2j+1 ^ c_2j+1, c_2j+2 = b_2j+1 & c_2j+1.
// The top digit is -2*b_N-1 + b_N-2 + c_N-2, Booth-encoded with the chain
// carry taking the place of b_2j-1: s = b_N-1, one = b_N-2 ^ c_N-2,
// two = (b_N-1 ^ b_N-2) & ~one.
// The NR4SD+ half-adder equations are derived here from the NR4SD+ table;
// the description draws only the NR4SD- chain.
// Because c_0 = 0, the low bit of digit 0 equals b_0 (and for NR4SD- its
// high bit equals b_1), and s equals b_N-1: these outputs are plain copies
// of input bits by construction.
//
// Interface: b (N bits) in, pre (N+1 bits) out. pre[2j+1:2j] holds digit j
// as {hi, lo} (see ahl_mult_pkg::nr_digit_t), pre[N:N-2] holds {s, one, two}
// of the top digit. Purely combinational.
module nr4sd_recoder
  import ahl_mult_pkg::*;
#(
  parameter int unsigned N    = 16,           // operand width, even, >= 4
  parameter nr4sd_kind_e KIND = NR4SD_MINUS
) (
  input  logic [N-1:0] b,
  output logic [N:0]   pre
);

  localparam int unsigned K = N / 2;

  logic [K-1:0] c;  // c[j] is the carry c_2j into digit j

  always_comb begin
    logic c_mid;
    mb_enc_t msd;
    pre = '0;
    c   = '0;
    for (int unsigned j = 0; j < K - 1; j++) begin
      if (KIND == NR4SD_MINUS) begin
        pre[2*j]   = b[2*j] ^ c[j];
        c_mid      = b[2*j] & c[j];
        pre[2*j+1] = b[2*j+1] ^ c_mid;
        c[j+1]     = b[2*j+1] | c_mid;
      end else begin
        pre[2*j]   = b[2*j] ^ c[j];
        c_mid      = b[2*j] | c[j];
        pre[2*j+1] = b[2*j+1] ^ c_mid;
        c[j+1]     = b[2*j+1] & c_mid;
      end
    end
    msd.s   = b[N-1];
    msd.one = b[N-2] ^ c[K-1];
    msd.two = (b[N-1] ^ b[N-2]) & ~msd.one;
    pre[N:N-2] = msd;
  end

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $fatal(1, "nr4sd_recoder: N must be even and at least 4");
  end

endmodule
