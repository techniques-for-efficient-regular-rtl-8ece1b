// ca1d_cell: one cell of a rule-110 one-dimensional cellular automaton built
// from Automata Network elements.
//
// The cell is alive or dead and exchanges its state with both neighbours in
// dual-rail form (an alive line and a dead line). Its next state is the
// rule-110 table
//     left,self,right : 111 110 101 100 011 010 001 000
//     next            :  0   1   1   0   1   1   1   0
// written as a three-term sum-of-products element over the dual-rail lines:
//     next = (self & right_dead) | (self_dead & right_alive) | (left_dead & self)
// The dead line is produced from the state bit by an inverter element.
//
// Interface: clk_i, rst_ni (asynchronous, active low), init_i (first symbol:
// load seed_i), step_i (one input symbol = one generation), left_alive_i,
// left_dead_i, right_alive_i, right_dead_i, alive_o, dead_o.
// Timing: the state is registered; a step in cycle t shows the next
// generation on alive_o/dead_o in cycle t+1. The alive/dead port set, the
// sum-of-products next-state element and the inverter follow the cell macro;
// loading the initial state from a seed port, rather than from start
// elements, and one generation per symbol are this design's choices.
module ca1d_cell
  import anfa_pkg::*;
(
  input  logic clk_i,
  input  logic rst_ni,
  input  logic init_i,
  input  logic seed_i,
  input  logic step_i,
  input  logic left_alive_i,
  input  logic left_dead_i,
  input  logic right_alive_i,
  input  logic right_dead_i,
  output logic alive_o,
  output logic dead_o
);

  logic alive_q;
  logic next_alive;

  // Inputs of the SoP element: {right_dead, right_alive, self_dead, self_alive,
  // left_dead, left_alive} = bits 5..0.
  logic [5:0] sop_in;
  assign sop_in = {right_dead_i, right_alive_i, dead_o, alive_q, left_dead_i, left_alive_i};

  anml_boolean #(
    .TYPE     (BOOL_SOP),
    .N_IN     (6),
    .N_TERMS  (3),
    // term0: self & right_dead, term1: self_dead & right_alive,
    // term2: left_dead & self
    .TERM_MASK({6'b000110, 6'b011000, 6'b100100})
  ) u_rule (
    .in_i (sop_in),
    .out_o(next_alive)
  );

  anml_boolean #(
    .TYPE     (BOOL_INV),
    .N_IN     (1),
    .N_TERMS  (1),
    .TERM_MASK(1'b1)
  ) u_inv (
    .in_i (alive_q),
    .out_o(dead_o)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      alive_q <= 1'b0;
    else if (init_i)  alive_q <= seed_i;
    else if (step_i)  alive_q <= next_alive;
  end

  assign alive_o = alive_q;

endmodule
