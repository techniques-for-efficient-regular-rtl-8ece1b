// ca2d_cell: one cell of a Game-of-Life two-dimensional cellular automaton
// built from Automata Network elements.
//
// A counter element adds at most one per symbol, so the eight neighbours are
// not counted at once. A generation takes GEN_LEN = 9 symbols instead:
// in count phase k (0..7) every alive cell sends its state out in direction k
// only (dir_o[k]), so each cell receives exactly one neighbour per phase on
// nbr_i, and three latch counters accumulate the alive neighbours:
//     ge2 (target 2, "survive"), ge3 (target 3, "resurrect"),
//     ge4 (target 4, "death").
// In the update phase (phase 8) the next state follows the rule table
//     alive: <2 dead, 2 alive, 3 alive, >3 dead;  dead: 3 alive, else dead
// as a sum-of-products element with an inverter on ge4:
//     next = (ge3 & !ge4) | (alive & ge2 & !ge4)
// and the counters are reset for the next generation.
//
// Interface: clk_i, rst_ni (asynchronous, active low), valid_i (symbol
// present), init_i with seed_i (load the initial state, clear the counters),
// phase_i (0..7 count, 8 update, driven by the grid's sequencer), nbr_i
// (neighbour state arriving this phase), alive_o, dir_o[8] (alive_o routed to
// direction k in phase k; 0 N, 1 NE, 2 E, 3 SE, 4 S, 5 SW, 6 W, 7 NW).
// Timing: counter outputs are registered, so the count of phase 7 is seen in
// the update phase; the new state is on alive_o after the update clock. The
// three counters with targets 2, 3 and 4, the per-direction outputs and the
// counter-based rule follow the cell macro; the phase order, the direction
// numbering and the 9-symbol generation are this design's choices.
module ca2d_cell
  import anfa_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       valid_i,
  input  logic       init_i,
  input  logic       seed_i,
  input  logic [3:0] phase_i,
  input  logic       nbr_i,
  output logic       alive_o,
  output logic [7:0] dir_o
);

  logic alive_q;
  logic counting, updating;
  logic ge2, ge3, ge4, lt4, next_alive;

  assign counting = valid_i && !init_i && (phase_i < 4'd8);
  assign updating = valid_i && !init_i && (phase_i == 4'd8);

  anml_counter #(.TARGET(2), .TYPE(CNT_LATCH)) u_survive (
    .clk_i(clk_i), .rst_ni(rst_ni), .valid_i(valid_i), .init_i(init_i),
    .count_i(counting && nbr_i), .reset_i(updating),
    .out_o(ge2), .count_o()
  );
  anml_counter #(.TARGET(3), .TYPE(CNT_LATCH)) u_resurrect (
    .clk_i(clk_i), .rst_ni(rst_ni), .valid_i(valid_i), .init_i(init_i),
    .count_i(counting && nbr_i), .reset_i(updating),
    .out_o(ge3), .count_o()
  );
  anml_counter #(.TARGET(4), .TYPE(CNT_LATCH)) u_death (
    .clk_i(clk_i), .rst_ni(rst_ni), .valid_i(valid_i), .init_i(init_i),
    .count_i(counting && nbr_i), .reset_i(updating),
    .out_o(ge4), .count_o()
  );

  anml_boolean #(.TYPE(BOOL_INV), .N_IN(1), .N_TERMS(1), .TERM_MASK(1'b1)) u_inv (
    .in_i(ge4), .out_o(lt4)
  );

  // SoP inputs {lt4, ge3, ge2, alive} = bits 3..0;
  // term0: ge3 & lt4, term1: alive & ge2 & lt4.
  anml_boolean #(.TYPE(BOOL_SOP), .N_IN(4), .N_TERMS(2),
                 .TERM_MASK({4'b1011, 4'b1100})) u_rule (
    .in_i({lt4, ge3, ge2, alive_q}), .out_o(next_alive)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)        alive_q <= 1'b0;
    else if (valid_i) begin
      if (init_i)        alive_q <= seed_i;
      else if (updating) alive_q <= next_alive;
    end
  end

  always_comb begin
    for (int k = 0; k < 8; k++) dir_o[k] = alive_q && (phase_i == 4'(k));
  end

  assign alive_o = alive_q;

endmodule
