// Fast carry-lookahead adder.
//
// Computes s = x + y + ci over W bits and the carry out. Bit generate and
// propagate signals are combined by a parallel-prefix (Kogge-Stone)
// lookahead network of ceil(log2 W) levels, so every carry is formed in
// logarithmic depth. The description asks only for a fast CLA adder; the
// prefix form of the lookahead is this design's choice.
//
// Interface: x, y (W bits), ci in; s (W bits), co out. Combinational.
module cla_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  localparam int unsigned LV = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p0;
  logic [W-1:0] gp [LV+1];  // group generate from bit 0 (with ci)
  logic [W-1:0] pp [LV+1];  // group propagate

  always_comb begin
    p0 = x ^ y;
    // fold ci into bit 0 generate so that gp[LV][i] is the carry out of bit i
    gp[0] = x & y;
    gp[0][0] = (x[0] & y[0]) | (p0[0] & ci);
    pp[0] = p0;
    for (int unsigned l = 0; l < LV; l++) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          gp[l+1][i] = gp[l][i] | (pp[l][i] & gp[l][i-(1<<l)]);
          pp[l+1][i] = pp[l][i] & pp[l][i-(1<<l)];
        end else begin
          gp[l+1][i] = gp[l][i];
          pp[l+1][i] = pp[l][i];
        end
      end
    end
    s  = p0 ^ {gp[LV][W-2:0], ci};
    co = gp[LV][W-1];
  end

endmodule
