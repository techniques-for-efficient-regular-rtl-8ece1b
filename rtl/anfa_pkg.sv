// anfa_pkg: shared types and constants of the one-hot Automata Network engine.
//
// An Automata Network extends a classical NFA with two element kinds besides
// the state transition element (STE): counters and boolean gates. This package
// holds the encodings used by every block:
//   * ste_start_e   - how an STE is started: never (normal), only on the first
//                     symbol of a stream (start-of-data), or on every symbol
//                     (all-input).
//   * cnt_type_e    - the three counter behaviours at the target count: roll,
//                     pulse and latch.
//   * bool_type_e   - boolean element kinds. Their numeric codes are the type
//                     numbers the network description format assigns to them
//                     (2 = inverter ... 10 = not product of sums).
//   * SYM_W         - width of an input symbol (8-bit ASCII).
//   * example_net_class_map - alphabet translation table of the reference
//                     Automata Network: symbols 'a'..'g' map to classes 0..6,
//                     every other byte to class 7.
//   * stride_nfa_class_map - alphabet translation table of the reference
//                     classical NFA .*a[a-z][b-z]*A[B-Z]: 'a' -> 0,
//                     'b'..'z' -> 1, 'A' -> 2, 'B'..'Z' -> 3, any other
//                     byte -> 4.
// The type numbers follow the element type table of the network format. The
// classes 0..3 of stride_nfa_class_map are the reduction of that example NFA;
// the extra class 4 for the remaining bytes and the whole of example_net_class_map
// are this design's own.
package anfa_pkg;

  localparam int SYM_W = 8;
  localparam int ALPHABET = 1 << SYM_W;

  typedef enum logic [1:0] {
    START_NONE        = 2'd0,
    START_OF_DATA     = 2'd1,
    START_ALL_INPUT   = 2'd2
  } ste_start_e;

  typedef enum logic [1:0] {
    CNT_ROLL  = 2'd0,
    CNT_PULSE = 2'd1,
    CNT_LATCH = 2'd2
  } cnt_type_e;

  typedef enum logic [3:0] {
    BOOL_INV  = 4'd2,
    BOOL_OR   = 4'd3,
    BOOL_AND  = 4'd4,
    BOOL_NAND = 4'd5,
    BOOL_NOR  = 4'd6,
    BOOL_SOP  = 4'd7,
    BOOL_POS  = 4'd8,
    BOOL_NSOP = 4'd9,
    BOOL_NPOS = 4'd10
  } bool_type_e;

  typedef logic [SYM_W-1:0] symbol_t;

  // Number of classes of the default table and their index width.
  localparam int EXAMPLE_NET_CLASSES = 8;

  // Default symbol-to-class table: 'a'..'g' -> 0..6, anything else -> 7.
  function automatic logic [ALPHABET*8-1:0] example_net_class_map();
    logic [ALPHABET*8-1:0] m;
    for (int s = 0; s < ALPHABET; s++) begin
      if (s >= 97 && s <= 103) m[s*8 +: 8] = 8'(s - 97);
      else                     m[s*8 +: 8] = 8'd7;
    end
    return m;
  endfunction

  localparam int STRIDE_NFA_CLASSES = 5;

  // Reduced alphabet of .*a[a-z][b-z]*A[B-Z].
  function automatic logic [ALPHABET*8-1:0] stride_nfa_class_map();
    logic [ALPHABET*8-1:0] m;
    for (int s = 0; s < ALPHABET; s++) begin
      if (s == 97)                 m[s*8 +: 8] = 8'd0;  // a
      else if (s >= 98 && s <= 122) m[s*8 +: 8] = 8'd1;  // b..z
      else if (s == 65)            m[s*8 +: 8] = 8'd2;  // A
      else if (s >= 66 && s <= 90) m[s*8 +: 8] = 8'd3;  // B..Z
      else                         m[s*8 +: 8] = 8'd4;
    end
    return m;
  endfunction

endpackage
