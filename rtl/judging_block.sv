// Judging block of the adaptive hold logic.
//
// Counts the zero bits of an M-bit operand and outputs 1 when the count is
// greater than THRESH. Operands with many zeros produce few non-zero
// partial products and short carry chains, so they are judged to finish in
// one cycle. The comparison "number of zeros > THRESH" is the description's;
// the counter is a plain adder chain, which is this design's choice.
//
// Interface: opnd (M bits) in, one_cycle out. Combinational.
module judging_block #(
  parameter int unsigned M      = 16,
  parameter int unsigned THRESH = 7
) (
  input  logic [M-1:0] opnd,
  output logic         one_cycle
);

  localparam int unsigned CW = $clog2(M + 1);

  logic [CW-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int unsigned i = 0; i < M; i++)
      zeros = zeros + CW'(~opnd[i]);
  end

  assign one_cycle = (32'(zeros) > THRESH);

endmodule
