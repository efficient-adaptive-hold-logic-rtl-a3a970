// Bank of W Razor flip-flops on the multiplier output.
//
// Each bit has a main flip-flop clocked by clk, a shadow element clocked by
// clk_del (a copy of clk delayed by less than half a period), an XOR
// comparator and a mux in front of the main flip-flop; the comparator
// outputs of all bits are OR-ed into one error signal, following the
// description's Razor flip-flop drawing.
//
// Operation:
//  * At a clk edge with en = 1 the main flip-flops capture d. This is a
//    "capture" edge; cap_q marks it for the following cycle.
//  * At the next clk_del edge the shadow element samples d again. A path
//    that missed the clk edge but settles before clk_del leaves the main
//    and shadow values different, and error rises for the rest of that
//    cycle. The shadow element only samples after a capture edge, so it
//    keeps the value the main flip-flop should have taken.
//  * At the clk edge that ends an error cycle the mux loads the shadow
//    value into the main flip-flops (restore edge), whatever en is.
// valid is 1 in the cycle after a capture edge without error and in the
// cycle after a restore edge, so every operation is reported exactly once:
// one cycle after its capture, or two cycles after it when it was restored.
// The shadow element is written as an edge-triggered register sampling at
// the rising clk_del edge (the drawing calls it a latch); the enable, the
// restore priority and the valid output are this design's choices.
// Timing: like any Razor register it needs the shortest path into d to be
// longer than the clk to clk_del skew, so that the next operation's result
// cannot reach the shadow element early. error is meaningful from the
// clk_del edge to the end of the cycle; it is only used at clk edges.
//
// Interface: clk, clk_del, rst_n (async, active low), en, d (W bits) in;
// q (W bits), valid, error out.
module razor_ff #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         clk_del,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         valid,
  output logic         error
);

  logic [W-1:0] shadow_q;
  logic [W-1:0] mismatch;
  logic         cap_q;   // last clk edge captured d
  logic         rec_q;   // last clk edge restored from the shadow element

  // main flip-flops with the restore mux in front
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      cap_q <= 1'b0;
      rec_q <= 1'b0;
    end else if (error) begin
      q     <= shadow_q;
      cap_q <= 1'b0;
      rec_q <= 1'b1;
    end else begin
      if (en) q <= d;
      cap_q <= en;
      rec_q <= 1'b0;
    end
  end

  // shadow elements on the delayed clock
  always_ff @(posedge clk_del or negedge rst_n) begin
    if (!rst_n)     shadow_q <= '0;
    else if (cap_q) shadow_q <= d;
  end

  assign mismatch = q ^ shadow_q;          // per-bit comparators
  assign error    = cap_q & (|mismatch);   // OR of the bit errors
  assign valid    = (cap_q & ~error) | rec_q;

endmodule
