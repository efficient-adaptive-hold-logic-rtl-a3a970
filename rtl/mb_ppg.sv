// Partial product generator for the Modified Booth (MB) encoded most
// significant digit of a pre-encoded NR4SD multiplier.
//
// Each of the N+1 bits is p_j,i = ((a_i & one) | (a_i-1 & two)) ^ s, with A
// sign-extended by one bit and a_-1 = 0, following the description's MB
// bit cell. For a negative digit this is the one's complement of
// |digit|*A; the +1 is returned as cin = s and added in the correction term.
// cin is the sign bit itself, passed through.
//
// Interface: a (N bits), enc (s, one, two) in; pp (N+1 bits) and cin out.
// Combinational.
module mb_ppg
  import ahl_mult_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  mb_enc_t      enc,
  output logic [N:0]   pp,
  output logic         cin
);

  logic [N+1:0] ax;  // ax[i+1] = a_i for i = -1..N
  assign ax = {a[N-1], a, 1'b0};

  always_comb begin
    for (int unsigned i = 0; i <= N; i++)
      pp[i] = ((ax[i+1] & enc.one) | (ax[i] & enc.two)) ^ enc.s;
    cin = enc.s;
  end

endmodule
