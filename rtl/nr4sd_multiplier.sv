// Pre-encoded NR4SD multiplier: P = A * B for N-bit two's complement A and
// a multiplier B supplied in pre-encoded NR4SD form (N+1 bits, produced by
// nr4sd_recoder or read from a coefficient ROM).
//
// Structure (after the description's system architecture):
//  * K-1 = N/2-1 nr4sd_encoder blocks turn the stored digit pairs into
//    one-hot digit signals; nr4sd_ppg builds PP_j (N+1 bits) for each.
//  * The most significant digit is already MB-encoded; mb_ppg builds PP_K-1.
//  * Each PP_j has its top bit inverted and is weighted by 2^2j. A single
//    correction row COR = sum_j cin_j 2^2j + 2^N (1 + sum_j 2^(2j+1)) adds
//    the +1 of every negative digit and undoes the inverted sign bits
//    (the constant is the pattern 1010...1011 shifted to bit N).
//  * csa_tree reduces the K+1 rows to two; cla_adder adds them.
// The product is exact modulo 2^2N, which holds every signed N x N product.
//
// Interface: a (N bits), b_pre (N+1 bits) in, p (2N bits) out.
// Purely combinational: one multiplication per evaluation.
module nr4sd_multiplier
  import ahl_mult_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter nr4sd_kind_e KIND = NR4SD_MINUS
) (
  input  logic [N-1:0]   a,
  input  logic [N:0]     b_pre,
  output logic [2*N-1:0] p
);

  localparam int unsigned K = N / 2;
  localparam int unsigned W = 2 * N;

  logic [N:0]   pp  [K];
  logic [K-1:0] cin;
  logic [W-1:0] rows [K+1];
  logic [W-1:0] cs_sum, cs_carry;

  for (genvar j = 0; j < K - 1; j++) begin : g_nr
    nr_enc_t enc;
    nr4sd_encoder #(.KIND(KIND)) u_enc (
      .d   (b_pre[2*j+1:2*j]),
      .enc (enc)
    );
    nr4sd_ppg #(.N(N), .KIND(KIND)) u_ppg (
      .a   (a),
      .enc (enc),
      .pp  (pp[j]),
      .cin (cin[j])
    );
  end

  mb_ppg #(.N(N)) u_msd_ppg (
    .a   (a),
    .enc (b_pre[N:N-2]),
    .pp  (pp[K-1]),
    .cin (cin[K-1])
  );

  // correction constant 2^N * (1 + sum_{j<K} 2^(2j+1)), modulo 2^2N
  function automatic logic [W-1:0] cor_const();
    logic [W-1:0] c;
    c = '0;
    c[N] = 1'b1;
    for (int unsigned j = 0; j < K; j++)
      if (N + 2 * j + 1 < W) c[N+2*j+1] = 1'b1;
    return c;
  endfunction

  always_comb begin
    logic [W-1:0] cor;
    for (int unsigned j = 0; j < K; j++)
      rows[j] = W'({~pp[j][N], pp[j][N-1:0]}) << (2 * j);
    cor = cor_const();
    for (int unsigned j = 0; j < K; j++) cor[2*j] = cin[j];
    rows[K] = cor;
  end

  csa_tree #(.R(K + 1), .W(W)) u_csa (
    .rows  (rows),
    .sum   (cs_sum),
    .carry (cs_carry)
  );

  cla_adder #(.W(W)) u_cla (
    .x  (cs_sum),
    .y  (cs_carry),
    .ci (1'b0),
    .s  (p),
    .co ()
  );

endmodule
