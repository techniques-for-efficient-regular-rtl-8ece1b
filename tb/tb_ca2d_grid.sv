// tb_ca2d_grid: a 3x3 grid (the smallest size evaluated), a 5x6 grid and the
// default 16x18 grid are seeded at random (plus a glider and a blinker) and run for many generations with idle cycles mixed in.
// After each generation - nine valid symbols, marked by gen_done_o on the
// ninth - all grids are compared with a software Game-of-Life model with a
// dead border. gen_done_o must come on exactly every ninth valid symbol.
module tb_ca2d_grid;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid, init;
  logic [8:0]   seed_t, alive_t;
  logic [29:0]  seed_s, alive_s;
  logic [287:0] seed_l, alive_l;
  logic done_t, done_s, done_l;

  always #5 clk = ~clk;

  ca2d_grid #(.ROWS(3), .COLS(3)) dut_t (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init),
    .seed_i(seed_t), .alive_o(alive_t), .gen_done_o(done_t), .phase_o());
  ca2d_grid #(.ROWS(5), .COLS(6)) dut_s (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init),
    .seed_i(seed_s), .alive_o(alive_s), .gen_done_o(done_s), .phase_o());
  ca2d_grid dut_l (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init),
    .seed_i(seed_l), .alive_o(alive_l), .gen_done_o(done_l), .phase_o());

  function automatic logic [287:0] life(logic [287:0] cur, int rows, int cols);
    logic [287:0] nx;
    nx = '0;
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int cnt;
        cnt = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if ((dr != 0 || dc != 0) && r+dr >= 0 && r+dr < rows && c+dc >= 0 && c+dc < cols)
              cnt += int'(cur[(r+dr)*cols + c+dc]);
        if (cur[r*cols+c]) nx[r*cols+c] = (cnt == 2 || cnt == 3);
        else               nx[r*cols+c] = (cnt == 3);
      end
    return nx;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [287:0] mt, ms, ml;
    valid = 0; init = 0; seed_t = '0; seed_s = '0; seed_l = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      seed_t = (run == 0) ? 9'b000_111_000 : 9'($urandom);  // blinker first
      seed_s = 30'($urandom);
      for (int w = 0; w < 9; w++) seed_l[w*32 +: 32] = $urandom;
      if (run == 0) begin
        // glider in the top-left corner of the large grid
        seed_l = '0;
        seed_l[0*18+1] = 1; seed_l[1*18+2] = 1;
        seed_l[2*18+0] = 1; seed_l[2*18+1] = 1; seed_l[2*18+2] = 1;
      end
      valid = 1; init = 1;
      mt = {279'b0, seed_t}; ms = {258'b0, seed_s}; ml = seed_l;
      @(negedge clk); init = 0;
      for (int g = 0; g < 40; g++) begin
        for (int p = 0; p < 9; p++) begin
          while ($urandom_range(0, 5) == 0) begin valid = 0; @(negedge clk); end
          valid = 1;
          #1;
          checks++;
          if (done_t !== (p == 8) || done_s !== (p == 8) || done_l !== (p == 8)) begin
            failures++; $display("FAIL gen_done at phase %0d: %b %b %b", p, done_t, done_s, done_l);
          end
          @(negedge clk);
        end
        mt = life(mt, 3, 3);
        ms = life(ms, 5, 6);
        ml = life(ml, 16, 18);
        checks += 3;
        if (alive_t !== mt[8:0]) begin failures++; $display("FAIL 3x3 run %0d gen %0d", run, g); end
        if (alive_s !== ms[29:0]) begin failures++; $display("FAIL 5x6 run %0d gen %0d", run, g); end
        if (alive_l !== ml) begin failures++; $display("FAIL 16x18 run %0d gen %0d", run, g); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
