// automata_network: one-hot implementation of an Automata Network (an NFA
// extended with counters and boolean elements), one input symbol per clock.
//
// Every STE is a flip-flop; its enable is the OR of the elements wired to it.
// The whole network is described by parameters, the way a generator would
// emit it for one pattern set:
//   STE_CLASS      - N_STE masks of N_CLASSES bits: the classes STE i accepts
//                    (STE i at bits [i*N_CLASSES +: N_CLASSES])
//   STE_START      - 2 bits per STE, an ste_start_e code
//   STE_LATCH      - 1 bit per STE
//   STE_REPORT     - STEs whose activity is a match
//   STE_FROM_STE   - row i (N_STE bits): STEs whose activity enables STE i
//   STE_FROM_CNT   - row i (NCNT bits): counters whose output enables STE i
//   STE_FROM_BOOL  - row i (NBOOL bits): booleans whose output enables STE i
//   CNT_TARGET/TYPE/REPORT - per counter (16-bit target, cnt_type_e code)
//   CNT_COUNT_FROM/CNT_RESET_FROM - row c (N_STE bits): STEs whose firing on
//                    the current symbol drives the count / reset port
//   BOOL_TYPE/REPORT - per boolean (4-bit bool_type_e code)
//   BOOL_TERM_MASK - per boolean, BOOL_TERMS masks over the N_STE + NCNT
//                    sources {counter outputs, STE activity}
// NCNT and NBOOL are N_CNT and N_BOOL but at least 1, so that a network
// without counters or booleans still has legal vector widths; cnt_out_o or
// bool_out_o is then tied low, and the STE firing vector, which only counters
// use, is left unread (the default network has no counter).
//
// Timing, symbol t in cycle t: STE i fires when it is enabled and the symbol
// is in its set, and its flip-flop shows that from cycle t+1. Counters count
// the firing of their source STEs in cycle t and show their output from t+1.
// Booleans combine flip-flop outputs combinationally, so their output also
// stands for symbol t and enables successors for symbol t+1. match_o is high
// in cycle t+1 when a reporting element became active on symbol t.
//
// The defaults build the example network of the one-hot mapping: a+ (all
// input start, self loop) followed by b, and f (all input start) followed by
// g, both into an OR element that enables [cd], followed by the reporting STE
// e; symbols a..g are classes 0..6. Booleans take only STE and counter
// outputs (no boolean chains) and counters count only STE firings: both are
// restrictions of this design.
module automata_network
  import anfa_pkg::*;
#(
  parameter int N_CLASSES  = 8,
  parameter int N_STE      = 6,
  parameter int N_CNT      = 0,
  parameter int N_BOOL     = 1,
  parameter int BOOL_TERMS = 1,
  parameter int NCNT       = (N_CNT  > 0) ? N_CNT  : 1,
  parameter int NBOOL      = (N_BOOL > 0) ? N_BOOL : 1,
  parameter logic [N_STE*N_CLASSES-1:0] STE_CLASS =
      {8'h10, 8'h0C, 8'h40, 8'h20, 8'h02, 8'h01},
  parameter logic [N_STE*2-1:0]         STE_START =
      {2'd0, 2'd0, 2'd0, 2'd2, 2'd0, 2'd2},
  parameter logic [N_STE-1:0]           STE_LATCH  = '0,
  parameter logic [N_STE-1:0]           STE_REPORT = 6'b100000,
  parameter logic [N_STE*N_STE-1:0]     STE_FROM_STE =
      {6'b010000, 6'b000000, 6'b000100, 6'b000000, 6'b000001, 6'b000001},
  parameter logic [N_STE*NCNT-1:0]      STE_FROM_CNT  = '0,
  parameter logic [N_STE*NBOOL-1:0]     STE_FROM_BOOL = 6'b010000,
  parameter logic [NCNT*16-1:0]         CNT_TARGET     = {NCNT{16'd1}},
  parameter logic [NCNT*2-1:0]          CNT_TYPE       = '0,
  parameter logic [NCNT-1:0]            CNT_REPORT     = '0,
  parameter logic [NCNT*N_STE-1:0]      CNT_COUNT_FROM = '0,
  parameter logic [NCNT*N_STE-1:0]      CNT_RESET_FROM = '0,
  parameter logic [NBOOL*4-1:0]         BOOL_TYPE      = 4'd3,
  parameter logic [NBOOL-1:0]           BOOL_REPORT    = '0,
  parameter logic [NBOOL*BOOL_TERMS*(N_STE+NCNT)-1:0] BOOL_TERM_MASK = 7'b0001010
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 valid_i,
  input  logic                 init_i,
  input  logic [N_CLASSES-1:0] classes_i,
  output logic [N_STE-1:0]     ste_active_o,
  output logic [NCNT-1:0]      cnt_out_o,
  output logic [NBOOL-1:0]     bool_out_o,
  output logic                 match_o
);

  localparam int N_SRC = N_STE + NCNT;

  logic [N_STE-1:0] ste_en, ste_fire, ste_act;
  logic [NCNT-1:0]  cnt_out;
  logic [NBOOL-1:0] bool_out;
  logic [N_SRC-1:0] bool_src;

  // ---------------------------------------------------------------- STEs
  for (genvar i = 0; i < N_STE; i++) begin : g_ste
    always_comb begin
      ste_en[i] = |(ste_act  & STE_FROM_STE [i*N_STE +: N_STE])
               || |(cnt_out  & STE_FROM_CNT [i*NCNT  +: NCNT])
               || |(bool_out & STE_FROM_BOOL[i*NBOOL +: NBOOL]);
    end
    ste #(
      .N_CLASSES (N_CLASSES),
      .SYMBOL_SET(STE_CLASS[i*N_CLASSES +: N_CLASSES]),
      .START     (ste_start_e'(STE_START[i*2 +: 2])),
      .LATCH     (STE_LATCH[i])
    ) u_ste (
      .clk_i    (clk_i),
      .rst_ni   (rst_ni),
      .valid_i  (valid_i),
      .init_i   (init_i),
      .enable_i (ste_en[i]),
      .classes_i(classes_i),
      .match_o  (ste_fire[i]),
      .active_o (ste_act[i])
    );
  end

  // ------------------------------------------------------------ counters
  if (N_CNT > 0) begin : g_cnt
    for (genvar c = 0; c < N_CNT; c++) begin : g_c
      localparam int TGT = int'(CNT_TARGET[c*16 +: 16]);
      anml_counter #(
        .TARGET(TGT),
        .TYPE  (cnt_type_e'(CNT_TYPE[c*2 +: 2]))
      ) u_cnt (
        .clk_i  (clk_i),
        .rst_ni (rst_ni),
        .valid_i(valid_i),
        .init_i (init_i),
        .count_i(|(ste_fire & CNT_COUNT_FROM[c*N_STE +: N_STE])),
        .reset_i(|(ste_fire & CNT_RESET_FROM[c*N_STE +: N_STE])),
        .out_o  (cnt_out[c]),
        .count_o()
      );
    end
  end else begin : g_no_cnt
    assign cnt_out = '0;
  end

  // ------------------------------------------------------------ booleans
  assign bool_src = {cnt_out, ste_act};

  if (N_BOOL > 0) begin : g_bool
    for (genvar b = 0; b < N_BOOL; b++) begin : g_b
      anml_boolean #(
        .TYPE     (bool_type_e'(BOOL_TYPE[b*4 +: 4])),
        .N_IN     (N_SRC),
        .N_TERMS  (BOOL_TERMS),
        .TERM_MASK(BOOL_TERM_MASK[b*BOOL_TERMS*N_SRC +: BOOL_TERMS*N_SRC])
      ) u_bool (
        .in_i (bool_src),
        .out_o(bool_out[b])
      );
    end
  end else begin : g_no_bool
    assign bool_out = '0;
  end

  // -------------------------------------------------------------- reports
  always_comb begin
    match_o = |(ste_act  & STE_REPORT)
           || |(cnt_out  & CNT_REPORT)
           || |(bool_out & BOOL_REPORT);
  end

  assign ste_active_o = ste_act;
  assign cnt_out_o    = cnt_out;
  assign bool_out_o   = bool_out;

endmodule
