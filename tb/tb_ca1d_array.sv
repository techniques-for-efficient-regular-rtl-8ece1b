// tb_ca1d_array: a 24-cell and the default 256-cell rule-110 array are seeded
// at random and stepped for many generations (with idle cycles between
// steps); after every step the whole array is compared with a software
// rule-110 model with dead cells beyond both ends. One new generation per
// step is required.
module tb_ca1d_array;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic init, step;
  logic [23:0]  seed_s, alive_s;
  logic [255:0] seed_l, alive_l;
  localparam logic [7:0] RULE = 8'd110;

  always #5 clk = ~clk;

  ca1d_array #(.N_CELLS(24)) dut_s (.clk_i(clk), .rst_ni(rst_n), .init_i(init), .seed_i(seed_s), .step_i(step), .alive_o(alive_s));
  ca1d_array dut_l (.clk_i(clk), .rst_ni(rst_n), .init_i(init), .seed_i(seed_l), .step_i(step), .alive_o(alive_l));

  function automatic logic [255:0] next_gen(logic [255:0] cur, int n);
    logic [255:0] nx;
    nx = '0;
    for (int i = 0; i < n; i++) begin
      logic lt, c, rt;
      lt = (i > 0) ? cur[i-1] : 1'b0;
      c  = cur[i];
      rt = (i < n - 1) ? cur[i+1] : 1'b0;
      nx[i] = RULE[{lt, c, rt}];
    end
    return nx;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] ms, ml;
    init = 0; step = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      @(negedge clk);
      seed_s = 24'($urandom);
      for (int w = 0; w < 8; w++) seed_l[w*32 +: 32] = $urandom;
      if (run == 0) begin seed_s = 24'h1; seed_l = 256'h1; end  // single live cell
      init = 1; ms = {232'b0, seed_s}; ml = seed_l;
      @(negedge clk); init = 0;
      for (int g = 0; g < 120; g++) begin
        step = 1;
        @(negedge clk); step = 0;
        ms = next_gen(ms, 24);
        ml = next_gen(ml, 256);
        checks += 2;
        if (alive_s !== ms[23:0]) begin failures++; $display("FAIL 24-cell run %0d gen %0d", run, g); end
        if (alive_l !== ml) begin failures++; $display("FAIL 256-cell run %0d gen %0d", run, g); end
        if ($urandom_range(0, 3) == 0) @(negedge clk);  // idle cycle
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
