// tb_ca2d_cell: for an alive and a dead cell and every neighbour count 0..8,
// the neighbours are fed one per count phase in random phases, then the
// update phase is applied; the new state must follow the Game-of-Life table
// (alive stays alive with 2 or 3, dead becomes alive with exactly 3). The
// directional outputs must carry the state in their own phase only.
module tb_ca2d_cell;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid, init, seed, nbr;
  logic [3:0] phase;
  logic alive;
  logic [7:0] dir;

  always #5 clk = ~clk;

  ca2d_cell dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .seed_i(seed),
    .phase_i(phase), .nbr_i(nbr), .alive_o(alive), .dir_o(dir));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; init = 0; seed = 0; nbr = 0; phase = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int a = 0; a < 2; a++) begin
        for (int n = 0; n <= 8; n++) begin
          logic [7:0] which;
          bit exp;
          // choose n of the 8 phases at random
          which = '0;
          while ($countones(which) < n) which[$urandom_range(0, 7)] = 1'b1;
          @(negedge clk); valid = 1; init = 1; seed = a[0]; phase = 0; nbr = 0;
          @(negedge clk); init = 0;
          for (int k = 0; k < 8; k++) begin
            phase = 4'(k); nbr = which[k];
            #1;
            checks++;
            if (dir !== (a[0] ? 8'(1 << k) : 8'h00)) begin failures++; $display("FAIL dir phase %0d: %b", k, dir); end
            @(negedge clk);
            if ($urandom_range(0, 4) == 0) begin valid = 0; @(negedge clk); valid = 1; end
          end
          phase = 4'd8; nbr = 0;
          @(negedge clk);
          exp = (n == 3) || (a == 1 && n == 2);
          checks++;
          if (alive !== exp) begin failures++; $display("FAIL alive=%0d n=%0d: got %b exp %b", a, n, alive, exp); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
