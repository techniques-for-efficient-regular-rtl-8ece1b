// alphabet_tx: alphabet translator of the one-hot matching engine.
//
// Alphabet reduction groups input bytes that every state of the automaton
// treats alike into one class, so the automaton only sees NUM_CLASSES
// distinct symbols instead of 256. This block is the 256-entry symbol-to-class
// table that performs the translation. It is pure combinational logic (a
// constant look-up that synthesis turns into LUTs), as the FPGA mapping calls
// for; the class index is valid in the same cycle as the symbol.
//
// Interface:
//   sym_i   - input byte
//   class_o - class index, CLASS_W = clog2(NUM_CLASSES) bits
// CLASS_MAP holds one byte per symbol (symbol s at bits [8s+7:8s]); only the
// low CLASS_W bits of each entry are used. Its default is the table of the
// reference network ('a'..'g' -> 0..6, other bytes -> 7), a choice of this
// design; any table produced by alphabet reduction can be passed instead.
module alphabet_tx
  import anfa_pkg::*;
#(
  parameter int NUM_CLASSES = EXAMPLE_NET_CLASSES,
  parameter int CLASS_W     = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1,
  parameter logic [ALPHABET*8-1:0] CLASS_MAP = example_net_class_map()
) (
  input  symbol_t            sym_i,
  output logic [CLASS_W-1:0] class_o
);

  always_comb begin
    class_o = CLASS_MAP[sym_i*8 +: CLASS_W];
  end

  initial begin
    assert (CLASS_W <= 8) else $error("alphabet_tx: at most 256 classes");
  end

endmodule
