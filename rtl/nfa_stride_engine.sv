// nfa_stride_engine: one-hot classical NFA that consumes K symbols per clock
// (hardware stride multiplication).
//
// The state flip-flops are the same as in the one-symbol engine; what changes
// is the logic in front of them. The transition logic is repeated K times in
// a combinational chain: level j takes the state vector left by level j-1
// (level 0 takes the flip-flops), enables each STE from its predecessors,
// ANDs with symbol j's class lines, and hands the result on. Only the result
// of the last level is stored, so the number of flip-flops does not grow
// with K while the symbol rate per clock grows K-fold (at the cost of K
// levels of logic in the clock path).
//
// Parameters describe an STE-only network (no counters or booleans, which do
// not take part in stride multiplication): STE_CLASS (N_CLASSES bits per STE),
// STE_START (2-bit ste_start_e per STE), STE_FROM_STE (row i: predecessors of
// STE i), STE_REPORT.
// Interface: clk_i, rst_ni (asynchronous, active low), valid_i (a group of K
// symbols is present), init_i (symbol 0 of the group is the first of a
// stream), classes_i (K one-hot class vectors, symbol 0 in the low bits and
// processed first), state_o, match_o[K] (bit j: a reporting STE became
// active on symbol j of the group).
// Timing: match_o and state_o are registered and appear the clock after the
// group. The defaults are the reduced-alphabet example NFA .*a[a-z][b-z]*A[B-Z]
// in STE form with K = 2 (stride doubling): STE0 'a' (all-input start),
// STE1 [a-z], STE2 [b-z] with a self loop, STE3 'A', STE4 [B-Z] reporting.
// Splitting state 2 of the labelled-transition NFA into STE1 and STE2 is the
// usual conversion to symbol-on-state form; K = 2 is this design's choice
// of stride.
module nfa_stride_engine
  import anfa_pkg::*;
#(
  parameter int K         = 2,
  parameter int N_CLASSES = 5,
  parameter int N_STE     = 5,
  parameter logic [N_STE*N_CLASSES-1:0] STE_CLASS =
      {5'b01000, 5'b00100, 5'b00010, 5'b00011, 5'b00001},
  parameter logic [N_STE*2-1:0]         STE_START =
      {2'd0, 2'd0, 2'd0, 2'd0, 2'd2},
  parameter logic [N_STE*N_STE-1:0]     STE_FROM_STE =
      {5'b01000, 5'b00110, 5'b00110, 5'b00001, 5'b00000},
  parameter logic [N_STE-1:0]           STE_REPORT = 5'b10000
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   valid_i,
  input  logic                   init_i,
  input  logic [K*N_CLASSES-1:0] classes_i,
  output logic [N_STE-1:0]       state_o,
  output logic [K-1:0]           match_o
);

  logic [N_STE-1:0] state_q;
  logic [N_STE-1:0] lvl [K+1];
  logic [K-1:0]     match_d, match_q;

  always_comb begin
    lvl[0] = state_q;
    for (int j = 0; j < K; j++) begin
      for (int i = 0; i < N_STE; i++) begin
        logic en;
        en = (|(lvl[j] & STE_FROM_STE[i*N_STE +: N_STE]) && !(j == 0 && init_i))
          || (ste_start_e'(STE_START[i*2 +: 2]) == START_ALL_INPUT)
          || (ste_start_e'(STE_START[i*2 +: 2]) == START_OF_DATA && j == 0 && init_i);
        lvl[j+1][i] = en && |(classes_i[j*N_CLASSES +: N_CLASSES]
                              & STE_CLASS[i*N_CLASSES +: N_CLASSES]);
      end
      match_d[j] = |(lvl[j+1] & STE_REPORT);
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= '0;
      match_q <= '0;
    end else if (valid_i) begin
      state_q <= lvl[K];
      match_q <= match_d;
    end
  end

  assign state_o = state_q;
  assign match_o = match_q;

endmodule
