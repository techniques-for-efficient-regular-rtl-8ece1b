// ste: state transition element, the one-hot state bit of the matching engine.
//
// Each automaton state owns one flip-flop. The symbols a state accepts are
// attached to the state itself: on a symbol cycle the STE fires (match_o) when
// it is enabled and the current symbol's class is in its symbol set. The
// flip-flop then holds "this STE fired on the previous symbol" (active_o),
// which is what enables its successors on the next symbol.
//
// Enabling: enable_i is the OR of the successors' sources (predecessor STEs,
// counters, boolean elements), built by the enclosing network. A start STE is
// enabled by itself: START_OF_DATA only on the first symbol of a stream
// (init_i high), START_ALL_INPUT on every symbol, so its pattern may begin
// anywhere. On the first symbol of a stream enable_i is ignored, which drops
// whatever the previous stream left behind. A LATCH STE keeps active_o high
// from the symbol it first fires until the next stream starts.
//
// Interface: clk_i, rst_ni (asynchronous, active low, clears the state),
// valid_i (a symbol is present; the state holds otherwise), init_i (first
// symbol of a stream), classes_i (one-hot class of the symbol).
// A symbol set that holds more than half of the classes is written as the
// negation of the classes it rejects (fewer class lines into the gate); with a
// one-hot class input both forms give the same result. This complement form is
// the "multiple outputs" mapping optimisation of one-hot NFA generators.
// Timing: match_o is combinational in the symbol cycle; active_o follows one
// clock later. Start modes, latching and the AND of state with symbol lines
// follow the element definitions; the asynchronous reset and valid qualifier
// are this design's own additions.
module ste
  import anfa_pkg::*;
#(
  parameter int                     N_CLASSES  = 8,
  parameter logic [N_CLASSES-1:0]   SYMBOL_SET = '1,
  parameter ste_start_e             START      = START_NONE,
  parameter bit                     LATCH      = 1'b0
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 valid_i,
  input  logic                 init_i,
  input  logic                 enable_i,
  input  logic [N_CLASSES-1:0] classes_i,
  output logic                 match_o,
  output logic                 active_o
);

  // More than half of the classes in the set: use the complement form.
  localparam bit NEGATED = $countones(SYMBOL_SET) > N_CLASSES / 2;

  logic enabled;
  logic sym_hit;
  logic active_q;

  always_comb begin
    enabled = (enable_i && !init_i)
            || (START == START_ALL_INPUT)
            || (START == START_OF_DATA && init_i);
    sym_hit = NEGATED ? !(|(classes_i & ~SYMBOL_SET))
                      :   |(classes_i &  SYMBOL_SET);
    match_o = valid_i && enabled && sym_hit;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      active_q <= 1'b0;
    end else if (valid_i) begin
      active_q <= match_o || (LATCH && active_q && !init_i);
    end
  end

  assign active_o = active_q;

endmodule
