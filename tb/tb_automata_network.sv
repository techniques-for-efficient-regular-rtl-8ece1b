// tb_automata_network: three networks driven by random symbol streams.
//  * default network (a+b | fg) -> OR -> [cd] -> e, classes a..g = 0..6,
//    7 = other: compared with a direct suffix check of the stream
//    ("...a b [cd] e" or "...f g [cd] e" since the last init);
//  * 'a' counted by a roll counter (target 3, reset by 'b'), counter output
//    enabling a reporting 'c': match on a 'c' right after every third 'a';
//  * the same with a latch counter: match on any 'c' once three 'a' were
//    seen since the last 'b'.
// Expected matches are computed here from the stream; a match on symbol t
// must appear on match_o in the following cycle.
module tb_automata_network;
  import anfa_pkg::*;

  int checks = 0, failures = 0;
  int n_match_a = 0, n_match_r = 0, n_match_l = 0, n_bool = 0;
  logic clk = 0, rst_n = 0;
  logic valid, init;
  logic [7:0] cls8;
  logic [3:0] cls4;
  logic m_a, m_r, m_l;
  logic [5:0] act_a;
  logic [0:0] bool_a;

  always #5 clk = ~clk;

  automata_network dut_a (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .classes_i(cls8),
    .ste_active_o(act_a), .cnt_out_o(), .bool_out_o(bool_a), .match_o(m_a));

  // classes: a=0, b=1, c=2, other=3; STE0 'a' all-input, STE1 'b' all-input,
  // STE2 'c' enabled by counter 0, reporting.
  automata_network #(
    .N_CLASSES(4), .N_STE(3), .N_CNT(1), .N_BOOL(0),
    .STE_CLASS({4'b0100, 4'b0010, 4'b0001}),
    .STE_START({2'd0, 2'd2, 2'd2}),
    .STE_REPORT(3'b100),
    .STE_FROM_STE('0),
    .STE_FROM_CNT(3'b100),
    .STE_FROM_BOOL('0),
    .CNT_TARGET(16'd3), .CNT_TYPE(2'd0),
    .CNT_COUNT_FROM(3'b001), .CNT_RESET_FROM(3'b010),
    .BOOL_TYPE(4'd3), .BOOL_TERM_MASK('0)
  ) dut_r (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .classes_i(cls4),
    .ste_active_o(), .cnt_out_o(), .bool_out_o(), .match_o(m_r));

  automata_network #(
    .N_CLASSES(4), .N_STE(3), .N_CNT(1), .N_BOOL(0),
    .STE_CLASS({4'b0100, 4'b0010, 4'b0001}),
    .STE_START({2'd0, 2'd2, 2'd2}),
    .STE_REPORT(3'b100),
    .STE_FROM_STE('0),
    .STE_FROM_CNT(3'b100),
    .STE_FROM_BOOL('0),
    .CNT_TARGET(16'd3), .CNT_TYPE(2'd2),
    .CNT_COUNT_FROM(3'b001), .CNT_RESET_FROM(3'b010),
    .BOOL_TYPE(4'd3), .BOOL_TERM_MASK('0)
  ) dut_l (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .classes_i(cls4),
    .ste_active_o(), .cnt_out_o(), .bool_out_o(), .match_o(m_l));

  // stream history since init, for the suffix check of network A
  int hist [$];
  // counter models
  int r_cnt, l_cnt;
  bit r_out, l_out;
  bit e_a, e_r, e_l;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sym_a, sym4, n;
    valid = 0; init = 0; cls8 = 8'h80; cls4 = 4'b1000;
    r_cnt = 0; l_cnt = 0; r_out = 0; l_out = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (n = 0; n < 6000; n++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 9) != 0);
      init  = (n == 0) || ($urandom_range(0, 99) == 0);
      // network A symbol, biased toward the pattern letters
      case ($urandom_range(0, 5))
        0: sym_a = 0;
        1: sym_a = $urandom_range(1, 3);
        2: sym_a = 4;
        3: sym_a = $urandom_range(5, 6);
        4: sym_a = $urandom_range(2, 3);
        default: sym_a = $urandom_range(0, 7);
      endcase
      sym4 = ($urandom_range(0, 3) != 0) ? 0 : $urandom_range(1, 3);
      cls8 = 8'(1 << sym_a);
      cls4 = 4'(1 << sym4);
      if (valid) begin
        if (init) begin
          hist.delete();
          r_cnt = 0; l_cnt = 0; r_out = 0; l_out = 0;
        end
        hist.push_back(sym_a);
        // A: (a b | f g) [cd] e as a suffix
        e_a = 0;
        if (hist.size() >= 4) begin
          int k;
          k = hist.size();
          e_a = (hist[k-1] == 4) && (hist[k-2] == 2 || hist[k-2] == 3) &&
                ((hist[k-3] == 1 && hist[k-4] == 0) || (hist[k-3] == 6 && hist[k-4] == 5));
        end
        // counters: report on 'c' if the counter output stood for the previous symbol
        e_r = (sym4 == 2) && r_out;
        e_l = (sym4 == 2) && l_out;
        if (sym4 == 1) begin
          r_cnt = 0; r_out = 0; l_cnt = 0; l_out = 0;
        end else if (sym4 == 0) begin
          if (r_cnt + 1 == 3) begin r_cnt = 0; r_out = 1; end
          else begin r_cnt++; r_out = 0; end
          if (l_cnt < 3) l_cnt++;
          l_out = (l_cnt == 3);
        end else begin
          r_out = 0;
          l_out = (l_cnt == 3);
        end
        @(posedge clk); #1;
        checks += 3;
        if (m_a !== e_a) begin failures++; $display("FAIL net A match %b exp %b @%0t", m_a, e_a, $time); end
        if (m_r !== e_r) begin failures++; $display("FAIL roll match %b exp %b @%0t", m_r, e_r, $time); end
        if (m_l !== e_l) begin failures++; $display("FAIL latch match %b exp %b @%0t", m_l, e_l, $time); end
        if (e_a) n_match_a++;
        if (e_r) n_match_r++;
        if (e_l) n_match_l++;
        if (bool_a[0]) n_bool++;
      end
    end
    checks++;
    if (n_match_a == 0 || n_match_r == 0 || n_match_l == 0 || n_bool == 0) begin
      failures++;
      $display("FAIL coverage: A=%0d roll=%0d latch=%0d or=%0d", n_match_a, n_match_r, n_match_l, n_bool);
    end
    $display("matches A=%0d roll=%0d latch=%0d", n_match_a, n_match_r, n_match_l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
