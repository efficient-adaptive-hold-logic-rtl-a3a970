// Aging indicator of the adaptive hold logic.
//
// A counter of Razor errors observed over a window of WINDOW completed
// operations. The error count and the operation count return to zero at
// the end of each window. When the errors within one window exceed
// ERR_LIMIT the circuit is taken to have aged significantly and `aged`
// goes to 1. The description gives this counting scheme but no window
// length or threshold; both are parameters here with assumed defaults.
// `aged` is kept at 1 until reset, because transistor aging does not
// reverse and a circuit that switched to the stricter judging block sees
// fewer errors, which must not switch it back (this design's choice).
//
// Interface: clk, rst_n (async, active low), op_done (one pulse per
// completed operation), error (one pulse per Razor error) in; aged out.
// aged rises in the cycle after the error that exceeds the limit.
module aging_indicator #(
  parameter int unsigned WINDOW    = 128,
  parameter int unsigned ERR_LIMIT = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_done,
  input  logic error,
  output logic aged
);

  localparam int unsigned OW = $clog2(WINDOW + 1);
  localparam int unsigned EW = $clog2(ERR_LIMIT + 2);

  logic [OW-1:0] ops_q;
  logic [EW-1:0] errs_q;
  logic          end_of_window;

  assign end_of_window = op_done && (32'(ops_q) == WINDOW - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ops_q  <= '0;
      errs_q <= '0;
      aged   <= 1'b0;
    end else begin
      if (error && 32'(errs_q) <= ERR_LIMIT) errs_q <= errs_q + 1'b1;
      if (error && 32'(errs_q) >= ERR_LIMIT) aged <= 1'b1;
      if (op_done) ops_q <= ops_q + 1'b1;
      if (end_of_window) begin
        ops_q  <= '0;
        errs_q <= '0;
      end
    end
  end

endmodule
