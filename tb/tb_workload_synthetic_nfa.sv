// tb_workload_synthetic_nfa: synthetic-NFA workload. A random NFA of N STEs,
// each with OUTDEG successors on average, is generated at elaboration by a
// constant function (linear congruential generator, fixed seed) and mapped
// onto automata_network through its parameter tables: every STE accepts a
// one of 8 classes (one STE in four a second class as well), about one STE in
// 64 is an all-input start and one in 32 reports. The network is then driven with a random
// class stream and compared every symbol with a set-based NFA simulation
// done here: next = {i : (i is a start or a predecessor of i was active) and
// the class is in i's set}. Two networks run: 1000 states with out-degree 2
// and with out-degree 6, the extremes of the synthetic evaluation.
module tb_workload_synthetic_nfa;
  import anfa_pkg::*;

  localparam int N   = 1000;
  localparam int NCL = 8;

  typedef struct packed {
    logic [N*NCL-1:0] cls;
    logic [N*2-1:0]   start;
    logic [N-1:0]     report;
    logic [N*N-1:0]   adj;    // row i: predecessors of STE i
  } nfa_t;

  // next value of the linear congruential generator
  function automatic int unsigned lcg_next(int unsigned s);
    return s * 32'd1664525 + 32'd1013904223;
  endfunction

  function automatic nfa_t gen_nfa(int outdeg, int unsigned seed);
    nfa_t g;
    int unsigned s;
    s = seed;
    g = '0;
    for (int i = 0; i < N; i++) begin
      logic [NCL-1:0] m;
      s = lcg_next(s); m = NCL'(1 << ((s >> 8) % NCL));
      s = lcg_next(s);
      if ((s >> 8) % 4 == 0) m |= NCL'(1 << ((s >> 12) % NCL));
      g.cls[i*NCL +: NCL] = m;
      s = lcg_next(s); g.start[i*2 +: 2] = ((s >> 8) % 64 == 0) ? 2'd2 : 2'd0;
      s = lcg_next(s); g.report[i]       = ((s >> 8) % 32 == 0);
      for (int e = 0; e < outdeg; e++) begin
        int t;
        s = lcg_next(s); t = int'((s >> 8) % N);
        g.adj[t*N + i] = 1'b1;   // edge i -> t
      end
    end
    return g;
  endfunction

  localparam nfa_t G2 = gen_nfa(2, 32'd12345);
  localparam nfa_t G6 = gen_nfa(6, 32'd54321);

  int checks = 0, failures = 0, n_match2 = 0, n_match6 = 0, max_active = 0;
  logic clk = 0, rst_n = 0;
  logic valid, init;
  logic [NCL-1:0] cls;
  logic [N-1:0] act2, act6;
  logic m2, m6;

  always #5 clk = ~clk;

  automata_network #(
    .N_CLASSES(NCL), .N_STE(N), .N_CNT(0), .N_BOOL(0),
    .STE_CLASS(G2.cls), .STE_START(G2.start), .STE_LATCH('0), .STE_REPORT(G2.report),
    .STE_FROM_STE(G2.adj), .STE_FROM_CNT('0), .STE_FROM_BOOL('0),
    .BOOL_TERM_MASK('0)
  ) dut2 (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .classes_i(cls),
          .ste_active_o(act2), .cnt_out_o(), .bool_out_o(), .match_o(m2));

  automata_network #(
    .N_CLASSES(NCL), .N_STE(N), .N_CNT(0), .N_BOOL(0),
    .STE_CLASS(G6.cls), .STE_START(G6.start), .STE_LATCH('0), .STE_REPORT(G6.report),
    .STE_FROM_STE(G6.adj), .STE_FROM_CNT('0), .STE_FROM_BOOL('0),
    .BOOL_TERM_MASK('0)
  ) dut6 (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .classes_i(cls),
          .ste_active_o(act6), .cnt_out_o(), .bool_out_o(), .match_o(m6));

  function automatic logic [N-1:0] nfa_step(nfa_t g, logic [N-1:0] cur, int c, bit first);
    logic [N-1:0] nx;
    nx = '0;
    for (int i = 0; i < N; i++) begin
      bit en;
      en = (g.start[i*2 +: 2] == 2'd2);
      if (!en && !first) en = |(cur & g.adj[i*N +: N]);
      nx[i] = en && g.cls[i*NCL + c];
    end
    return nx;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] s2, s6;
    valid = 0; init = 0; cls = 8'h01;
    s2 = '0; s6 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int c;
      @(negedge clk);
      valid = 1;
      init  = (n == 0) || (n == 500);
      c = $urandom_range(0, NCL - 1);
      cls = NCL'(1 << c);
      s2 = nfa_step(G2, s2, c, init);
      s6 = nfa_step(G6, s6, c, init);
      @(posedge clk); #1;
      checks += 4;
      if (act2 !== s2) begin failures++; $display("FAIL deg-2 state @%0d", n); end
      if (act6 !== s6) begin failures++; $display("FAIL deg-6 state @%0d", n); end
      if (m2 !== |(s2 & G2.report)) begin failures++; $display("FAIL deg-2 match @%0d", n); end
      if (m6 !== |(s6 & G6.report)) begin failures++; $display("FAIL deg-6 match @%0d", n); end
      if (|(s2 & G2.report)) n_match2++;
      if (|(s6 & G6.report)) n_match6++;
      if ($countones(s6) > max_active) max_active = $countones(s6);
    end
    checks++;
    if (n_match2 == 0 || n_match6 == 0) begin failures++; $display("FAIL no matches"); end
    $display("matches deg2=%0d deg6=%0d, most active states at once %0d", n_match2, n_match6, max_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
