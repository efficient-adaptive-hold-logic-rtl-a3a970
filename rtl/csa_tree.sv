// Carry-save adder tree (Wallace style).
//
// Reduces R rows of W bits to a sum row and a carry row whose sum equals
// the sum of all rows modulo 2^W. At every level the rows are taken three
// at a time through a row of full adders (3:2 counters); one or two rows
// left over pass to the next level unchanged. A tree of R rows thus has
// about log_1.5(R/2) levels. The description names a CSA tree without
// giving its arrangement; this regular 3:2 grouping is this design's
// choice.
// Bit 0 of the carry row is always 0, since carries are shifted up one
// place; it is kept so that both rows have the same width.
//
// Interface: rows (R x W) in; sum and carry (W bits each) out.
// Combinational.
module csa_tree #(
  parameter int unsigned R = 9,   // number of input rows, >= 2
  parameter int unsigned W = 32   // row width
) (
  input  logic [W-1:0] rows [R],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  function automatic int unsigned next_rows(int unsigned r);
    return (r / 3) * 2 + r % 3;
  endfunction

  function automatic int unsigned num_levels(int unsigned r);
    int unsigned l = 0;
    while (r > 2) begin
      r = next_rows(r);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels(R);

  logic [W-1:0] lvl [LEVELS+1][R];

  always_comb begin
    int unsigned r;
    int unsigned g;
    lvl = '{default: '0};
    for (int unsigned i = 0; i < R; i++) lvl[0][i] = rows[i];
    r = R;
    for (int unsigned l = 0; l < LEVELS; l++) begin
      g = r / 3;
      for (int unsigned t = 0; t < R / 3; t++) begin
        if (t < g) begin
          lvl[l+1][2*t]   = lvl[l][3*t] ^ lvl[l][3*t+1] ^ lvl[l][3*t+2];
          lvl[l+1][2*t+1] = ((lvl[l][3*t] & lvl[l][3*t+1]) |
                             (lvl[l][3*t] & lvl[l][3*t+2]) |
                             (lvl[l][3*t+1] & lvl[l][3*t+2])) << 1;
        end
      end
      for (int unsigned t = 0; t < 2; t++)
        if (t < r % 3) lvl[l+1][2*g+t] = lvl[l][3*g+t];
      r = next_rows(r);
    end
  end

  assign sum   = lvl[LEVELS][0];
  assign carry = (R > 1) ? lvl[LEVELS][1] : '0;

endmodule
