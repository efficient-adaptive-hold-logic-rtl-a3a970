// Aging-aware variable-latency NR4SD multiplier with adaptive hold logic.
//
// A signed M x M multiplier whose clock period is shorter than its worst
// path. Most operand patterns finish in one cycle; the adaptive hold logic
// (AHL) predicts from the number of zeros in the multiplicand (or the
// multiplier, JUDGE_MR = 1) which patterns need two, and stretches those by
// holding the input registers for one edge. Razor flip-flops on the
// product catch the patterns the prediction got wrong: the late result is
// restored from the shadow elements one cycle later and the next operation
// is held for one extra cycle (`reexecute`). Errors are also counted by the
// AHL's aging indicator; when they become frequent the AHL switches to a
// stricter judging block (one more zero required), so an aged circuit keeps
// working with fewer one-cycle patterns instead of failing.
//
// Datapath (as in the description's proposed architecture): md and mr input
// registers -> nr4sd_recoder (mr into pre-encoded NR4SD form) ->
// nr4sd_multiplier -> razor_ff (2M bits) -> product. The description gates
// the input registers' clock with an AND of CLK and !(gating); here the same
// signal is used as a synchronous load enable, which has the same effect on
// the registers and keeps a single clock net. The input/output handshake
// (in_valid, in_ready, product_valid) is this design's choice.
//
// Timing:
//  * an operand pair is taken at a rising clk edge with in_ready = 1
//    (in_valid marks it as a real operation, 0 loads a bubble);
//  * a one-cycle pattern is captured by the Razor register at the next
//    edge, a two-cycle pattern at the edge after that;
//  * product_valid is 1 for one cycle, the cycle after the capture edge, or
//    one cycle later when the Razor register had to restore it;
//  * in_ready is !(gating) and not a Razor error: it falls for the second
//    cycle of a two-cycle pattern and for the cycle after an error.
// clk_del is clk delayed by less than half a period (the Razor shadow
// clock); the AHL flip-flop works on the falling clk edge.
module aging_aware_multiplier
  import ahl_mult_pkg::*;
#(
  parameter int unsigned M         = 16,           // operand width
  parameter nr4sd_kind_e KIND      = NR4SD_MINUS,  // NR4SD flavour
  parameter int unsigned N_ZEROS   = 7,            // n of the judging blocks
  parameter bit          JUDGE_MR  = 1'b0,         // 0: judge md, 1: judge mr
  parameter int unsigned WINDOW    = 128,          // aging indicator window
  parameter int unsigned ERR_LIMIT = 8             // errors per window
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [M-1:0]   md,
  input  logic [M-1:0]   mr,
  output logic           in_ready,
  output logic [2*M-1:0] product,
  output logic           product_valid,
  output logic           reexecute,
  output logic           aged
);

  logic [M-1:0]   md_q, mr_q;
  logic           v_q;
  logic [M:0]     mr_pre;
  logic [2*M-1:0] mult_p;
  logic           not_gating;

  // input flip-flops, loaded when not gated and no Razor error is pending
  assign in_ready = not_gating & ~reexecute;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      md_q <= '0;
      mr_q <= '0;
      v_q  <= 1'b0;
    end else if (in_ready) begin
      md_q <= md;
      mr_q <= mr;
      v_q  <= in_valid;
    end
  end

  nr4sd_recoder #(.N(M), .KIND(KIND)) u_recoder (
    .b   (mr_q),
    .pre (mr_pre)
  );

  nr4sd_multiplier #(.N(M), .KIND(KIND)) u_mult (
    .a     (md_q),
    .b_pre (mr_pre),
    .p     (mult_p)
  );

  razor_ff #(.W(2 * M)) u_razor (
    .clk     (clk),
    .clk_del (clk_del),
    .rst_n   (rst_n),
    .en      (not_gating & v_q),
    .d       (mult_p),
    .q       (product),
    .valid   (product_valid),
    .error   (reexecute)
  );

  ahl #(
    .M         (M),
    .N_ZEROS   (N_ZEROS),
    .WINDOW    (WINDOW),
    .ERR_LIMIT (ERR_LIMIT)
  ) u_ahl (
    .clk        (clk),
    .rst_n      (rst_n),
    .opnd       (JUDGE_MR ? mr_q : md_q),
    .op_done    (product_valid),
    .error      (reexecute),
    .not_gating (not_gating),
    .aged       (aged)
  );

endmodule
