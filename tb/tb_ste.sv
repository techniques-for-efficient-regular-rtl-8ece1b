// tb_ste: four STEs accepting classes {1,2} of a 4-class alphabet - normal,
// start-of-data, all-input, and normal with latch - plus a normal STE that
// accepts {0,2,3} (more than half the classes, so it takes the complement
// form), driven by a random stream of classes, enables, init and valid. Each is compared every cycle
// with a model of the STE written here (fire = enabled & symbol in set;
// state follows one clock later; latch holds until the next stream).
module tb_ste;
  import anfa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid, init;
  logic [4:0] en, fire, act;
  logic [3:0] cls;

  always #5 clk = ~clk;

  ste #(.N_CLASSES(4), .SYMBOL_SET(4'b0110), .START(START_NONE),      .LATCH(0)) d0 (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .enable_i(en[0]), .classes_i(cls), .match_o(fire[0]), .active_o(act[0]));
  ste #(.N_CLASSES(4), .SYMBOL_SET(4'b0110), .START(START_OF_DATA),   .LATCH(0)) d1 (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .enable_i(en[1]), .classes_i(cls), .match_o(fire[1]), .active_o(act[1]));
  ste #(.N_CLASSES(4), .SYMBOL_SET(4'b0110), .START(START_ALL_INPUT), .LATCH(0)) d2 (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .enable_i(en[2]), .classes_i(cls), .match_o(fire[2]), .active_o(act[2]));
  ste #(.N_CLASSES(4), .SYMBOL_SET(4'b0110), .START(START_NONE),      .LATCH(1)) d3 (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .enable_i(en[3]), .classes_i(cls), .match_o(fire[3]), .active_o(act[3]));
  ste #(.N_CLASSES(4), .SYMBOL_SET(4'b1101), .START(START_NONE),      .LATCH(0)) d4 (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .enable_i(en[4]), .classes_i(cls), .match_o(fire[4]), .active_o(act[4]));

  bit m_act [5];
  int n_fire_sod = 0, n_fire_all = 0, n_latch_hold = 0, n_fire_neg = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; init = 0; en = 0; cls = 4'b0001;
    for (int i = 0; i < 5; i++) m_act[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 7) != 0);
      init  = ($urandom_range(0, 19) == 0);
      en    = 5'($urandom);
      cls   = 4'(1 << $urandom_range(0, 3));
      #1;
      for (int i = 0; i < 5; i++) begin
        bit hit, enab, f;
        hit  = (i == 4) ? !cls[1] : (cls[1] || cls[2]);
        enab = (en[i] && !init) || (i == 2) || (i == 1 && init);
        f    = valid && enab && hit;
        checks++;
        if (fire[i] !== f) begin
          failures++; $display("FAIL fire ste%0d got %b exp %b @%0t", i, fire[i], f, $time);
        end
        if (f && i == 1) n_fire_sod++;
        if (f && i == 4) n_fire_neg++;
        if (f && i == 2 && !en[2]) n_fire_all++;
        if (valid) begin
          if (i == 3 && m_act[3] && !init && !f) n_latch_hold++;
          m_act[i] = f || (i == 3 && m_act[3] && !init);
        end
      end
      @(posedge clk); #1;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (act[i] !== m_act[i]) begin
          failures++; $display("FAIL state ste%0d got %b exp %b @%0t", i, act[i], m_act[i], $time);
        end
      end
    end
    checks++;
    if (n_fire_sod == 0 || n_fire_all == 0 || n_latch_hold == 0 || n_fire_neg == 0) begin
      failures++; $display("FAIL coverage sod=%0d all=%0d latch=%0d", n_fire_sod, n_fire_all, n_latch_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
