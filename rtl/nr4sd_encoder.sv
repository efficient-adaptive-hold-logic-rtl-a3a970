// NR4SD digit encoder: the extra gates a pre-encoded NR4SD multiplier needs
// to turn one stored digit (two bits) into the one-hot signals that select
// the partial product.
//
// Three AND gates per digit, each with one inverted input where the
// description's encoder drawing shows one:
//   NR4SD- (hi = n-_2j+1, lo = n+_2j):
//     one+ = ~hi & lo,  one- = hi & lo,  two- = hi & ~lo
//   NR4SD+ (hi = n+_2j+1, lo = n-_2j):
//     one+ = hi & lo,   one- = ~hi & lo, two+ = hi & ~lo
// These match the NR4SD- and NR4SD+ encoding tables row by row.
//
// Interface: d (stored digit) in, enc (one_p, one_m, two) out; combinational.
module nr4sd_encoder
  import ahl_mult_pkg::*;
#(
  parameter nr4sd_kind_e KIND = NR4SD_MINUS
) (
  input  nr_digit_t d,
  output nr_enc_t   enc
);

  always_comb begin
    if (KIND == NR4SD_MINUS) begin
      enc.one_p = ~d.hi & d.lo;
      enc.one_m =  d.hi & d.lo;
    end else begin
      enc.one_p =  d.hi & d.lo;
      enc.one_m = ~d.hi & d.lo;
    end
    enc.two = d.hi & ~d.lo;
  end

endmodule
