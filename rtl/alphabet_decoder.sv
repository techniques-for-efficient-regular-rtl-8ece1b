// alphabet_decoder: turns the binary class index from the alphabet translator
// into one line per class, exactly one of which is high. The one-hot lines
// are what the STEs of the automaton AND with their state bits: an STE that
// accepts a set of classes simply ORs the lines of that set.
//
// Interface:
//   class_i  - class index (CLASS_W bits)
//   onehot_o - NUM_CLASSES lines, bit k high when class_i == k; all low when
//              class_i is not below NUM_CLASSES
// Combinational, no latency. The block follows the translator -> decoder ->
// automaton chain of the FPGA engine; the out-of-range behaviour is this
// design's choice.
module alphabet_decoder #(
  parameter int NUM_CLASSES = 8,
  parameter int CLASS_W     = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1
) (
  input  logic [CLASS_W-1:0]     class_i,
  output logic [NUM_CLASSES-1:0] onehot_o
);

  always_comb begin
    for (int k = 0; k < NUM_CLASSES; k++) begin
      onehot_o[k] = (class_i == CLASS_W'(k));
    end
  end

endmodule
