// tb_alphabet_decoder: drives every index of a 5-class and an 8-class decoder
// and checks that exactly the addressed line is high (and none for indices of
// the 5-class decoder that are out of range).
module tb_alphabet_decoder;
  int checks = 0, failures = 0;
  logic [2:0] idx;
  logic [7:0] oh8;
  logic [4:0] oh5;

  alphabet_decoder #(.NUM_CLASSES(8)) dut8 (.class_i(idx), .onehot_o(oh8));
  alphabet_decoder #(.NUM_CLASSES(5)) dut5 (.class_i(idx), .onehot_o(oh5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [7:0] e8;
      logic [4:0] e5;
      idx = 3'(i);
      e8 = '0; e5 = '0;
      e8[i] = 1'b1;
      if (i < 5) e5[i] = 1'b1;
      #1;
      checks += 2;
      if (oh8 !== e8) begin failures++; $display("FAIL 8-class idx %0d: %b", i, oh8); end
      if (oh5 !== e5) begin failures++; $display("FAIL 5-class idx %0d: %b", i, oh5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
