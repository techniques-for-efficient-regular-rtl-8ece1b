// anml_boolean: boolean element of an Automata Network.
//
// A purely combinational gate over the outputs of other elements. TYPE uses
// the element type numbers of the network format:
//   BOOL_INV (2)  - NOT in_i[0]
//   BOOL_OR  (3), BOOL_AND (4), BOOL_NAND (5), BOOL_NOR (6) - over every input
//                   whose bit is set in term 0 of TERM_MASK
//   BOOL_SOP (7)  - OR over terms of (AND of the term's inputs)
//   BOOL_POS (8)  - AND over terms of (OR of the term's inputs)
//   BOOL_NSOP (9), BOOL_NPOS (10) - their complements
// TERM_MASK holds N_TERMS masks of N_IN bits (term t at bits
// [t*N_IN +: N_IN]) saying which inputs feed which product or sum term; a
// term with no input set is left out. The default is the sum-of-products of
// the generated-code sample: three 2-input AND terms into one OR.
//
// Interface: in_i (N_IN element outputs), out_o. No clock: the output is
// valid in the same cycle as its inputs, which are registered STE and counter
// outputs, so a boolean adds no symbol of latency. The gate semantics follow
// the element list; the mask encoding is this design's choice.
module anml_boolean
  import anfa_pkg::*;
#(
  parameter bool_type_e                 TYPE      = BOOL_SOP,
  parameter int                         N_IN      = 6,
  parameter int                         N_TERMS   = 3,
  parameter logic [N_TERMS*N_IN-1:0]    TERM_MASK = 18'b110000_001100_000011
) (
  input  logic [N_IN-1:0] in_i,
  output logic            out_o
);

  logic [N_TERMS-1:0] prod;   // AND of each term
  logic [N_TERMS-1:0] sum;    // OR of each term
  logic [N_TERMS-1:0] used;   // term has at least one input
  logic [N_IN-1:0]    m0;
  logic               sop, pos;

  always_comb begin
    for (int t = 0; t < N_TERMS; t++) begin
      used[t] = |TERM_MASK[t*N_IN +: N_IN];
      prod[t] = used[t] && &(in_i | ~TERM_MASK[t*N_IN +: N_IN]);
      sum[t]  = |(in_i & TERM_MASK[t*N_IN +: N_IN]);
    end
    m0  = TERM_MASK[0 +: N_IN];
    sop = |prod;
    pos = &(sum | ~used);
    unique case (TYPE)
      BOOL_INV:  out_o = !in_i[0];
      BOOL_OR:   out_o = |(in_i & m0);
      BOOL_AND:  out_o = &(in_i | ~m0);
      BOOL_NAND: out_o = !(&(in_i | ~m0));
      BOOL_NOR:  out_o = !(|(in_i & m0));
      BOOL_SOP:  out_o = sop;
      BOOL_POS:  out_o = pos;
      BOOL_NSOP: out_o = !sop;
      default:   out_o = !pos;  // BOOL_NPOS
    endcase
  end

endmodule
