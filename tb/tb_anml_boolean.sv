// tb_anml_boolean: exhaustive check of every boolean element type over four
// inputs, with two product/sum terms (term0 = inputs 0,1; term1 = inputs
// 2,3). Expected values are computed here from the gate definitions.
module tb_anml_boolean;
  import anfa_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0] in;
  logic [8:0] out;   // one bit per type 2..10
  // term1 = bits 3:2, term0 = bits 1:0
  localparam logic [7:0] MASK = 8'b1100_0011;

  for (genvar t = 2; t <= 10; t++) begin : g_t
    anml_boolean #(.TYPE(bool_type_e'(t)), .N_IN(4), .N_TERMS(2), .TERM_MASK(MASK))
      dut (.in_i(in), .out_o(out[t-2]));
  end

  function automatic logic expect_out(int t, logic [3:0] x);
    logic sop, pos;
    sop = (x[0] & x[1]) | (x[2] & x[3]);
    pos = (x[0] | x[1]) & (x[2] | x[3]);
    case (t)
      2:  return ~x[0];
      3:  return x[0] | x[1];      // simple gates use term 0
      4:  return x[0] & x[1];
      5:  return ~(x[0] & x[1]);
      6:  return ~(x[0] | x[1]);
      7:  return sop;
      8:  return pos;
      9:  return ~sop;
      default: return ~pos;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      in = 4'(v);
      #1;
      for (int t = 2; t <= 10; t++) begin
        checks++;
        if (out[t-2] !== expect_out(t, in)) begin
          failures++;
          $display("FAIL type %0d in %b: got %b", t, in, out[t-2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
