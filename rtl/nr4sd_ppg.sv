// Partial product generator for one NR4SD digit of a pre-encoded NR4SD
// multiplier.
//
// Produces the N+1 bits p_j,i (i = 0..N) of PP_j = digit * A, where A is
// sign-extended by one bit (a_N = a_N-1) and a_-1 = 0. Each bit is an
// AND-OR of three terms, as in the description's bit-cell drawings:
//   NR4SD-: p = (a_i & one+) | (~a_i-1 & two-) | (~a_i & one-)
//   NR4SD+: p = (a_i & one+) | ( a_i-1 & two+) | (~a_i & one-)
// A negative digit therefore yields the one's complement of |digit|*A; the
// missing +1 is returned as cin, to be added at weight 2^2j in the
// correction term: cin = one- | two- for NR4SD- and cin = one- for NR4SD+.
// (The description writes the NR4SD- carry with an AND of one- and two-;
// those two signals are never both 1, so the OR is used, which is what the
// arithmetic requires.)
//
// Interface: a (N bits), enc (one_p, one_m, two) in; pp (N+1 bits, two's
// complement value minus cin) and cin out. Combinational.
module nr4sd_ppg
  import ahl_mult_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter nr4sd_kind_e KIND = NR4SD_MINUS
) (
  input  logic [N-1:0] a,
  input  nr_enc_t      enc,
  output logic [N:0]   pp,
  output logic         cin
);

  logic [N+1:0] ax;  // ax[i+1] = a_i for i = -1..N
  assign ax = {a[N-1], a, 1'b0};

  always_comb begin
    for (int unsigned i = 0; i <= N; i++) begin
      if (KIND == NR4SD_MINUS)
        pp[i] = (ax[i+1] & enc.one_p) | (~ax[i] & enc.two) | (~ax[i+1] & enc.one_m);
      else
        pp[i] = (ax[i+1] & enc.one_p) | ( ax[i] & enc.two) | (~ax[i+1] & enc.one_m);
    end
    cin = (KIND == NR4SD_MINUS) ? (enc.one_m | enc.two) : enc.one_m;
  end

endmodule
