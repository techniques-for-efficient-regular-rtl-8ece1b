// tb_ca1d_cell: exhaustive check of the rule-110 cell. For each of the eight
// (left, self, right) patterns the cell is seeded with self, neighbours are
// driven in dual-rail form, one step is taken, and the new state must equal
// bit (4*left + 2*self + right) of the rule number 110, with dead_o its
// complement. A step with step_i low must leave the state alone.
module tb_ca1d_cell;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic init, seed, step, l, r;
  logic alive, dead;
  localparam logic [7:0] RULE = 8'd110;

  always #5 clk = ~clk;

  ca1d_cell dut (.clk_i(clk), .rst_ni(rst_n), .init_i(init), .seed_i(seed), .step_i(step),
    .left_alive_i(l), .left_dead_i(!l), .right_alive_i(r), .right_dead_i(!r),
    .alive_o(alive), .dead_o(dead));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 0; seed = 0; step = 0; l = 0; r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 8; p++) begin
      @(negedge clk); init = 1; seed = p[1]; step = 0;
      @(negedge clk); init = 0; l = p[2]; r = p[0];
      // hold: no step
      @(negedge clk);
      checks++;
      if (alive !== p[1] || dead !== !p[1]) begin failures++; $display("FAIL hold pattern %03b", p[2:0]); end
      step = 1;
      @(negedge clk); step = 0;
      checks += 2;
      if (alive !== RULE[p]) begin failures++; $display("FAIL pattern %03b: got %b exp %b", p[2:0], alive, RULE[p]); end
      if (dead !== !RULE[p]) begin failures++; $display("FAIL dead line pattern %03b", p[2:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
