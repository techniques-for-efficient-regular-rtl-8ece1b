// tb_nfa_stride_engine: the default stride-2 engine (.*a[a-z][b-z]*A[B-Z])
// takes two symbols per clock from a random stream over {a,b,c,A,B,C,1}.
// For every symbol the expected match is worked out here by scanning the
// stream backwards for the pattern as a suffix; it must appear on
// match_o[lane] the clock after its group, which also checks the rate of two
// symbols per clock. A second instance with K = 3 runs its own stream.
module tb_nfa_stride_engine;
  import anfa_pkg::*;

  int checks = 0, failures = 0, n_match = 0, n_lane1 = 0;
  logic clk = 0, rst_n = 0;
  logic valid, init;
  logic [9:0]  cls2;
  logic [14:0] cls3;
  logic [1:0]  m2;
  logic [2:0]  m3;

  always #5 clk = ~clk;

  nfa_stride_engine dut2 (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init),
    .classes_i(cls2), .state_o(), .match_o(m2));
  nfa_stride_engine #(.K(3)) dut3 (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init),
    .classes_i(cls3), .state_o(), .match_o(m3));

  byte h2 [$];
  byte h3 [$];
  localparam byte ALPH [7] = '{"a", "b", "c", "A", "B", "C", "1"};

  function automatic int cls_of(byte s);
    if (s == "a") return 0;
    if (s >= "b" && s <= "z") return 1;
    if (s == "A") return 2;
    if (s >= "B" && s <= "Z") return 3;
    return 4;
  endfunction

  function automatic bit az(byte s); return s >= "a" && s <= "z"; endfunction
  function automatic bit bz(byte s); return s >= "b" && s <= "z"; endfunction

  // does the stream h[0..t] end with a match of a[a-z][b-z]*A[B-Z]?
  function automatic bit suffix_match(ref byte h [$], input int t);
    if (t < 3) return 0;
    if (!(h[t] >= "B" && h[t] <= "Z") || h[t-1] != "A") return 0;
    for (int i = t - 3; i >= 0; i--) begin
      if (i < t - 3 && !bz(h[i+2])) return 0;
      if (h[i] == "a" && az(h[i+1])) return 1;
    end
    return 0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e2 [2];
    bit e3 [3];
    valid = 0; init = 0; cls2 = '0; cls3 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 7) != 0);
      init  = (n == 0) || ($urandom_range(0, 149) == 0);
      if (valid && init) begin h2.delete(); h3.delete(); end
      for (int j = 0; j < 2; j++) begin
        byte s;
        s = ALPH[$urandom_range(0, 6)];
        cls2[j*5 +: 5] = 5'(1 << cls_of(s));
        if (valid) begin h2.push_back(s); e2[j] = suffix_match(h2, h2.size() - 1); end
      end
      for (int j = 0; j < 3; j++) begin
        byte s;
        s = ALPH[$urandom_range(0, 6)];
        cls3[j*5 +: 5] = 5'(1 << cls_of(s));
        if (valid) begin h3.push_back(s); e3[j] = suffix_match(h3, h3.size() - 1); end
      end
      if (valid) begin
        @(posedge clk); #1;
        for (int j = 0; j < 2; j++) begin
          checks++;
          if (m2[j] !== e2[j]) begin failures++; $display("FAIL K=2 lane %0d got %b exp %b @%0t", j, m2[j], e2[j], $time); end
          if (e2[j]) n_match++;
          if (e2[j] && j == 1) n_lane1++;
        end
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (m3[j] !== e3[j]) begin failures++; $display("FAIL K=3 lane %0d got %b exp %b @%0t", j, m3[j], e3[j], $time); end
        end
      end
    end
    checks++;
    if (n_match == 0 || n_lane1 == 0) begin failures++; $display("FAIL coverage: matches %0d lane1 %0d", n_match, n_lane1); end
    $display("matches K=2: %0d", n_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
