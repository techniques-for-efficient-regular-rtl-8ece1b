// anfa_fpga_top: logic-based regular-expression and Automata Network engine.
//
// The top holds four independent engines, each with its own ports:
//
// 1. Automata Network path (one symbol per clock):
//      an_sym_i -> alphabet_tx -> alphabet_decoder -> automata_network
//    The translator reduces the byte to a class index, the decoder turns the
//    index into one-hot class lines, and the one-hot network (STEs, counters,
//    booleans) reports on an_match_o. an_init_i marks the first symbol of a
//    stream. Default network: (a+b | fg) -> OR -> [cd] -> e.
// 2. Classical NFA path with stride NFA_K: NFA_K translators and decoders
//    feed nfa_stride_engine, which takes NFA_K symbols per clock
//    (nfa_sym_i, symbol 0 in the low byte is the earliest). Default NFA:
//    .*a[a-z][b-z]*A[B-Z] over its reduced alphabet; nfa_match_o[j] reports
//    a match ending on symbol j of a group.
// 3. Rule-110 1D cellular automaton of CA1_CELLS cells (ca1d_array), one
//    generation per ca1_step_i.
// 4. Game-of-Life 2D cellular automaton of CA2_ROWS x CA2_COLS cells
//    (ca2d_grid), one generation per 9 valid symbols.
//
// Timing: every output is registered; a match on the symbol(s) of cycle t is
// reported in cycle t+1. Reset: rst_ni, asynchronous and active low.
// The translator -> decoder -> network chain with INIT and MATCH follows the
// FPGA mapping; bringing the four engines out side by side, and the valid
// qualifiers, are this design's choices.
module anfa_fpga_top
  import anfa_pkg::*;
#(
  parameter int NFA_K     = 2,
  parameter int CA1_CELLS = 256,
  parameter int CA2_ROWS  = 16,
  parameter int CA2_COLS  = 18
) (
  input  logic                         clk_i,
  input  logic                         rst_ni,
  // Automata Network path
  input  logic                         an_valid_i,
  input  logic                         an_init_i,
  input  symbol_t                      an_sym_i,
  output logic                         an_match_o,
  output logic [5:0]                   an_ste_active_o,
  // classical NFA path, NFA_K symbols per clock
  input  logic                         nfa_valid_i,
  input  logic                         nfa_init_i,
  input  logic [NFA_K*SYM_W-1:0]       nfa_sym_i,
  output logic [NFA_K-1:0]             nfa_match_o,
  // 1D cellular automaton
  input  logic                         ca1_init_i,
  input  logic [CA1_CELLS-1:0]         ca1_seed_i,
  input  logic                         ca1_step_i,
  output logic [CA1_CELLS-1:0]         ca1_alive_o,
  // 2D cellular automaton
  input  logic                         ca2_valid_i,
  input  logic                         ca2_init_i,
  input  logic [CA2_ROWS*CA2_COLS-1:0] ca2_seed_i,
  output logic [CA2_ROWS*CA2_COLS-1:0] ca2_alive_o,
  output logic                         ca2_gen_done_o
);

  // ------------------------------------------------ Automata Network path
  localparam int AN_CLASSES = EXAMPLE_NET_CLASSES;
  localparam int AN_CW      = $clog2(AN_CLASSES);

  logic [AN_CW-1:0]      an_class;
  logic [AN_CLASSES-1:0] an_lines;

  alphabet_tx #(
    .NUM_CLASSES(AN_CLASSES),
    .CLASS_MAP  (example_net_class_map())
  ) u_an_tx (
    .sym_i  (an_sym_i),
    .class_o(an_class)
  );

  alphabet_decoder #(.NUM_CLASSES(AN_CLASSES)) u_an_dec (
    .class_i (an_class),
    .onehot_o(an_lines)
  );

  automata_network #(.N_CLASSES(AN_CLASSES)) u_an (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .valid_i     (an_valid_i),
    .init_i      (an_init_i),
    .classes_i   (an_lines),
    .ste_active_o(an_ste_active_o),
    .cnt_out_o   (),
    .bool_out_o  (),
    .match_o     (an_match_o)
  );

  // ------------------------------------------------ classical NFA, stride K
  localparam int NF_CLASSES = STRIDE_NFA_CLASSES;
  localparam int NF_CW      = $clog2(NF_CLASSES);

  logic [NFA_K*NF_CLASSES-1:0] nf_lines;

  for (genvar j = 0; j < NFA_K; j++) begin : g_lane
    logic [NF_CW-1:0] cls;
    alphabet_tx #(
      .NUM_CLASSES(NF_CLASSES),
      .CLASS_MAP  (stride_nfa_class_map())
    ) u_tx (
      .sym_i  (nfa_sym_i[j*SYM_W +: SYM_W]),
      .class_o(cls)
    );
    alphabet_decoder #(.NUM_CLASSES(NF_CLASSES)) u_dec (
      .class_i (cls),
      .onehot_o(nf_lines[j*NF_CLASSES +: NF_CLASSES])
    );
  end

  nfa_stride_engine #(
    .K        (NFA_K),
    .N_CLASSES(NF_CLASSES)
  ) u_nfa (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .valid_i  (nfa_valid_i),
    .init_i   (nfa_init_i),
    .classes_i(nf_lines),
    .state_o  (),
    .match_o  (nfa_match_o)
  );

  // ------------------------------------------------ cellular automata
  ca1d_array #(.N_CELLS(CA1_CELLS)) u_ca1 (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .init_i (ca1_init_i),
    .seed_i (ca1_seed_i),
    .step_i (ca1_step_i),
    .alive_o(ca1_alive_o)
  );

  ca2d_grid #(.ROWS(CA2_ROWS), .COLS(CA2_COLS)) u_ca2 (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .valid_i   (ca2_valid_i),
    .init_i    (ca2_init_i),
    .seed_i    (ca2_seed_i),
    .alive_o   (ca2_alive_o),
    .gen_done_o(ca2_gen_done_o),
    .phase_o   ()
  );

endmodule
