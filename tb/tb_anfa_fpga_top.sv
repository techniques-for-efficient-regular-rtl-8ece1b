// tb_anfa_fpga_top: end-to-end test of the whole engine at its default sizes.
// All four engines run at the same time, each on its own random stimulus:
//  * Automata Network path: ASCII text over "abcdefgxy" with planted "aab?e"
//    and "fg?e" fragments; expected matches of (a+b|fg)[cd]e from a suffix
//    check of the text since the last init;
//  * stride-2 NFA path: two ASCII characters per clock over "abcABCz1";
//    expected matches of a[a-z][b-z]*A[B-Z] per character position;
//  * rule-110 array of 256 cells, one generation per step;
//  * 16x18 Game of Life, one generation per nine symbols.
// Counted mechanisms (each must occur at least once): network match through
// the a+b branch and through the f-g branch (the OR element), a match lost to
// a stream restart, stride matches on either lane, idle cycles, 1D
// generations, 2D births, survivals and deaths.
module tb_anfa_fpga_top;
  import anfa_pkg::*;

  int checks = 0, failures = 0;
  int n_ab = 0, n_fg = 0, n_restart = 0, n_lane0 = 0, n_lane1 = 0, n_idle = 0;
  int n_gen1 = 0, n_birth = 0, n_surv = 0, n_death = 0;

  logic clk = 0, rst_n = 0;
  logic an_valid, an_init, an_match;
  symbol_t an_sym;
  logic [5:0] an_act;
  logic nfa_valid, nfa_init;
  logic [15:0] nfa_sym;
  logic [1:0] nfa_match;
  logic ca1_init, ca1_step;
  logic [255:0] ca1_seed, ca1_alive;
  logic ca2_valid, ca2_init, ca2_done;
  logic [287:0] ca2_seed, ca2_alive;

  always #5 clk = ~clk;

  anfa_fpga_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .an_valid_i(an_valid), .an_init_i(an_init), .an_sym_i(an_sym),
    .an_match_o(an_match), .an_ste_active_o(an_act),
    .nfa_valid_i(nfa_valid), .nfa_init_i(nfa_init), .nfa_sym_i(nfa_sym),
    .nfa_match_o(nfa_match),
    .ca1_init_i(ca1_init), .ca1_seed_i(ca1_seed), .ca1_step_i(ca1_step),
    .ca1_alive_o(ca1_alive),
    .ca2_valid_i(ca2_valid), .ca2_init_i(ca2_init), .ca2_seed_i(ca2_seed),
    .ca2_alive_o(ca2_alive), .ca2_gen_done_o(ca2_done));

  // ------------------------------------------------------------- models
  byte an_h [$];
  byte nf_h [$];
  string plant;
  int plant_pos;

  function automatic bit an_suffix(ref byte h [$], output bit via_fg);
    int k;
    k = h.size();
    via_fg = 0;
    if (k < 4) return 0;
    if (h[k-1] != "e" || !(h[k-2] == "c" || h[k-2] == "d")) return 0;
    if (h[k-3] == "b" && h[k-4] == "a") return 1;
    if (h[k-3] == "g" && h[k-4] == "f") begin via_fg = 1; return 1; end
    return 0;
  endfunction

  function automatic bit nf_suffix(ref byte h [$]);
    int t;
    t = h.size() - 1;
    if (t < 3) return 0;
    if (!(h[t] >= "B" && h[t] <= "Z") || h[t-1] != "A") return 0;
    for (int i = t - 3; i >= 0; i--) begin
      if (i < t - 3 && !(h[i+2] >= "b" && h[i+2] <= "z")) return 0;
      if (h[i] == "a" && h[i+1] >= "a" && h[i+1] <= "z") return 1;
    end
    return 0;
  endfunction

  function automatic logic [255:0] rule110(logic [255:0] cur);
    logic [255:0] nx;
    localparam logic [7:0] RULE = 8'd110;
    for (int i = 0; i < 256; i++) begin
      logic lt, rt;
      lt = (i > 0) ? cur[i-1] : 1'b0;
      rt = (i < 255) ? cur[i+1] : 1'b0;
      nx[i] = RULE[{lt, cur[i], rt}];
    end
    return nx;
  endfunction

  function automatic logic [287:0] life(logic [287:0] cur);
    logic [287:0] nx;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 18; c++) begin
        int cnt;
        cnt = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if ((dr != 0 || dc != 0) && r+dr >= 0 && r+dr < 16 && c+dc >= 0 && c+dc < 18)
              cnt += int'(cur[(r+dr)*18 + c+dc]);
        nx[r*18+c] = cur[r*18+c] ? (cnt == 2 || cnt == 3) : (cnt == 3);
      end
    return nx;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam string AN_ALPH = "abcdefgxy";
  localparam string NF_ALPH = "abcABCz1";

  initial begin
    logic [255:0] m1;
    logic [287:0] m2;
    bit e_an, fg, e_nf [2];
    int ca2_phase;
    an_valid = 0; an_init = 0; an_sym = "x";
    nfa_valid = 0; nfa_init = 0; nfa_sym = '0;
    ca1_init = 0; ca1_step = 0; ca1_seed = '0;
    ca2_valid = 0; ca2_init = 0; ca2_seed = '0;
    plant = ""; plant_pos = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // ---- Automata Network path
      an_valid = ($urandom_range(0, 9) != 0);
      if (!an_valid) n_idle++;
      an_init  = (n == 0) || ($urandom_range(0, 59) == 0);
      if (plant_pos >= plant.len()) begin
        plant_pos = 0;
        case ($urandom_range(0, 5))
          0: plant = "aabce";
          1: plant = "fgde";
          2: plant = "abde";
          3: plant = "fgc";   // a restart often lands here
          default: plant = "";
        endcase
      end
      if (plant_pos < plant.len()) an_sym = plant[plant_pos];
      else an_sym = AN_ALPH[$urandom_range(0, AN_ALPH.len() - 1)];
      // ---- stride-2 NFA path
      nfa_valid = ($urandom_range(0, 7) != 0);
      nfa_init  = (n == 0) || ($urandom_range(0, 99) == 0);
      for (int j = 0; j < 2; j++) nfa_sym[j*8 +: 8] = NF_ALPH[$urandom_range(0, NF_ALPH.len() - 1)];
      // ---- 1D CA
      ca1_init = (n == 0) || (n % 500 == 0);
      if (ca1_init) begin
        for (int w = 0; w < 8; w++) ca1_seed[w*32 +: 32] = $urandom;
        m1 = ca1_seed;
      end
      ca1_step = !ca1_init && ($urandom_range(0, 2) != 0);
      // ---- 2D CA
      ca2_init  = (n == 0) || (n % 1000 == 0);
      ca2_valid = ca2_init || ($urandom_range(0, 4) != 0);
      if (ca2_init) begin
        for (int w = 0; w < 9; w++) ca2_seed[w*32 +: 32] = $urandom & $urandom;
        m2 = ca2_seed;
        ca2_phase = 0;
      end

      // ---- expected values for the symbols of this cycle
      if (an_valid) begin
        if (an_init) begin
          bit dummy;
          an_h.push_back(an_sym);
          if (an_suffix(an_h, dummy)) n_restart++;   // would have matched without the restart
          an_h.delete();
        end
        if (plant_pos < plant.len()) plant_pos++;
        an_h.push_back(an_sym);
        e_an = an_suffix(an_h, fg);
      end
      if (nfa_valid) begin
        if (nfa_init) nf_h.delete();
        for (int j = 0; j < 2; j++) begin
          nf_h.push_back(nfa_sym[j*8 +: 8]);
          e_nf[j] = nf_suffix(nf_h);
        end
      end

      @(posedge clk); #1;
      if (an_valid) begin
        checks++;
        if (an_match !== e_an) begin failures++; $display("FAIL network match %b exp %b @%0t", an_match, e_an, $time); end
        if (e_an && !fg) n_ab++;
        if (e_an && fg)  n_fg++;
      end
      if (nfa_valid) begin
        for (int j = 0; j < 2; j++) begin
          checks++;
          if (nfa_match[j] !== e_nf[j]) begin failures++; $display("FAIL stride lane %0d %b exp %b @%0t", j, nfa_match[j], e_nf[j], $time); end
        end
        if (e_nf[0]) n_lane0++;
        if (e_nf[1]) n_lane1++;
      end
      if (ca1_step) begin
        m1 = rule110(m1);
        n_gen1++;
      end
      checks++;
      if (ca1_alive !== m1) begin failures++; $display("FAIL 1D CA @%0t", $time); end
      if (ca2_valid && !ca2_init) begin
        if (ca2_phase == 8) begin
          logic [287:0] nx;
          nx = life(m2);
          n_birth += $countones(nx & ~m2);
          n_death += $countones(~nx & m2);
          n_surv  += $countones(nx & m2);
          m2 = nx;
          ca2_phase = 0;
        end else ca2_phase++;
      end
      checks++;
      if (ca2_alive !== m2) begin failures++; $display("FAIL 2D CA @%0t", $time); end
    end

    $display("mechanisms: ab=%0d fg=%0d restart=%0d lane0=%0d lane1=%0d idle=%0d gen1=%0d birth=%0d survive=%0d death=%0d",
             n_ab, n_fg, n_restart, n_lane0, n_lane1, n_idle, n_gen1, n_birth, n_surv, n_death);
    checks++; if (n_ab == 0)      begin failures++; $display("FAIL never: a+b branch match"); end
    checks++; if (n_fg == 0)      begin failures++; $display("FAIL never: f-g branch (OR element) match"); end
    checks++; if (n_restart == 0) begin failures++; $display("FAIL never: match lost to a restart"); end
    checks++; if (n_lane0 == 0)   begin failures++; $display("FAIL never: stride lane 0 match"); end
    checks++; if (n_lane1 == 0)   begin failures++; $display("FAIL never: stride lane 1 match"); end
    checks++; if (n_idle == 0)    begin failures++; $display("FAIL never: idle cycle"); end
    checks++; if (n_gen1 == 0)    begin failures++; $display("FAIL never: 1D generation"); end
    checks++; if (n_birth == 0 || n_surv == 0 || n_death == 0) begin failures++; $display("FAIL never: 2D birth/survival/death"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
