// Adaptive hold logic (AHL).
//
// Decides for every input pattern whether the multiplier gets one or two
// cycles, and adapts that decision to aging:
//  * judging block 1 outputs 1 when the operand has more than N_ZEROS
//    zeros, judging block 2 when it has more than N_ZEROS+1 zeros;
//  * the aging indicator selects block 1 while the circuit is young and
//    block 2, which lets fewer patterns through as one-cycle patterns, once
//    Razor errors exceed its limit;
//  * the mux output is OR-ed with Q-bar of a D flip-flop clocked on the
//    falling clock edge; Q is !(gating).
// If the selected block says "one cycle", D = 1 and !(gating) stays 1. If it
// says "two cycles", Q falls at the falling edge and the input registers
// skip the next rising edge; because D = mux | Q-bar, Q returns to 1 at the
// following falling edge, so at most one input edge is ever skipped. This
// structure is the description's. The operand is the registered multiplicand
// (or multiplier) of the current operation.
//
// Interface: clk, rst_n (async, active low), opnd (M bits), op_done,
// error in; not_gating (Q), aged out. not_gating is valid from the falling
// clock edge to the next rising edge, where it enables the input registers.
module ahl #(
  parameter int unsigned M         = 16,
  parameter int unsigned N_ZEROS   = 7,
  parameter int unsigned WINDOW    = 128,
  parameter int unsigned ERR_LIMIT = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] opnd,
  input  logic         op_done,
  input  logic         error,
  output logic         not_gating,
  output logic         aged
);

  logic jb1, jb2, sel_one_cycle;

  judging_block #(.M(M), .THRESH(N_ZEROS)) u_jb1 (
    .opnd      (opnd),
    .one_cycle (jb1)
  );

  judging_block #(.M(M), .THRESH(N_ZEROS + 1)) u_jb2 (
    .opnd      (opnd),
    .one_cycle (jb2)
  );

  aging_indicator #(.WINDOW(WINDOW), .ERR_LIMIT(ERR_LIMIT)) u_aging (
    .clk     (clk),
    .rst_n   (rst_n),
    .op_done (op_done),
    .error   (error),
    .aged    (aged)
  );

  assign sel_one_cycle = aged ? jb2 : jb1;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) not_gating <= 1'b1;
    else        not_gating <= sel_one_cycle | ~not_gating;
  end

endmodule
