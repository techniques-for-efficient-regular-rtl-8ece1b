// tb_alphabet_tx: checks the alphabet translator against both reference
// tables, for all 256 byte values. The expected class of every byte is worked
// out here from the character ranges, not from the table functions.
module tb_alphabet_tx;
  import anfa_pkg::*;

  int checks = 0, failures = 0;
  symbol_t    sym;
  logic [2:0] cls_a, cls_b;

  alphabet_tx #(.NUM_CLASSES(8), .CLASS_MAP(example_net_class_map())) dut_a (
    .sym_i(sym), .class_o(cls_a));
  alphabet_tx #(.NUM_CLASSES(5), .CLASS_MAP(stride_nfa_class_map())) dut_b (
    .sym_i(sym), .class_o(cls_b));

  function automatic logic [2:0] exp_a(int s);
    if (s >= "a" && s <= "g") return 3'(s - "a");
    return 3'd7;
  endfunction

  function automatic logic [2:0] exp_b(int s);
    if (s == "a")              return 3'd0;
    if (s >= "b" && s <= "z")  return 3'd1;
    if (s == "A")              return 3'd2;
    if (s >= "B" && s <= "Z")  return 3'd3;
    return 3'd4;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 256; s++) begin
      sym = 8'(s);
      #1;
      checks += 2;
      if (cls_a !== exp_a(s)) begin
        failures++;
        $display("FAIL table A sym %0d: got %0d exp %0d", s, cls_a, exp_a(s));
      end
      if (cls_b !== exp_b(s)) begin
        failures++;
        $display("FAIL table B sym %0d: got %0d exp %0d", s, cls_b, exp_b(s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
