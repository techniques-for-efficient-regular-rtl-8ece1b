// tb_anml_counter: drives a roll, a pulse and a latch counter (target 3) with
// the same random count / reset / init / valid stream and compares output
// and count every cycle with a behavioural model of the three counter types
// written here. Also runs a directed sequence: three counts must raise the
// output on the following cycle for every type.
module tb_anml_counter;
  import anfa_pkg::*;

  localparam int TGT = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid, init, cnt_in, rst_in;
  logic [2:0] out;
  logic [1:0] cnt [3];

  always #5 clk = ~clk;

  anml_counter #(.TARGET(TGT), .TYPE(CNT_ROLL))  d_roll  (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .count_i(cnt_in), .reset_i(rst_in), .out_o(out[0]), .count_o(cnt[0]));
  anml_counter #(.TARGET(TGT), .TYPE(CNT_PULSE)) d_pulse (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .count_i(cnt_in), .reset_i(rst_in), .out_o(out[1]), .count_o(cnt[1]));
  anml_counter #(.TARGET(TGT), .TYPE(CNT_LATCH)) d_latch (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .init_i(init), .count_i(cnt_in), .reset_i(rst_in), .out_o(out[2]), .count_o(cnt[2]));

  // model state
  int m_cnt [3];
  bit m_out [3];

  task automatic model_step();
    for (int t = 0; t < 3; t++) begin
      int c;
      bit o;
      if (!valid) continue;
      c = init ? 0 : m_cnt[t];
      o = 0;
      if (rst_in) begin
        c = 0; o = 0;
      end else if (cnt_in) begin
        if (t == 0) begin            // roll
          if (c + 1 == TGT) begin c = 0; o = 1; end
          else c = c + 1;
        end else if (c < TGT) begin  // pulse, latch
          c = c + 1;
          o = (c == TGT);
        end else begin
          o = (t == 2);              // latch stays on at target
        end
      end else begin
        o = (t == 2) && (c == TGT);
      end
      m_cnt[t] = c;
      m_out[t] = o;
    end
  endtask

  task automatic compare(string tag);
    for (int t = 0; t < 3; t++) begin
      checks += 2;
      if (out[t] !== m_out[t]) begin
        failures++; $display("FAIL %s type %0d out %b exp %b @%0t", tag, t, out[t], m_out[t], $time);
      end
      if (int'(cnt[t]) != m_cnt[t]) begin
        failures++; $display("FAIL %s type %0d cnt %0d exp %0d @%0t", tag, t, cnt[t], m_cnt[t], $time);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 0; init = 0; cnt_in = 0; rst_in = 0;
    for (int t = 0; t < 3; t++) begin m_cnt[t] = 0; m_out[t] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: init symbol then three counts
    @(negedge clk); valid = 1; init = 1; cnt_in = 1; model_step();
    @(negedge clk); compare("dir"); init = 0; model_step();
    @(negedge clk); compare("dir"); model_step();
    @(negedge clk); compare("dir");
    checks++;
    if (out !== 3'b111) begin failures++; $display("FAIL directed: all types should fire, got %b", out); end
    cnt_in = 0; model_step();
    @(negedge clk); compare("dir");
    checks++;
    if (out !== 3'b100) begin failures++; $display("FAIL directed: only latch stays on, got %b", out); end
    // random
    for (int n = 0; n < 2000; n++) begin
      valid  = ($urandom_range(0, 9) != 0);
      init   = ($urandom_range(0, 29) == 0);
      cnt_in = ($urandom_range(0, 2) != 0);
      rst_in = ($urandom_range(0, 14) == 0);
      model_step();
      @(negedge clk);
      compare("rnd");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
