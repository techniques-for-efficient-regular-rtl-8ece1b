// anml_counter: counter element of an Automata Network.
//
// The counter has a count port and a reset port. On every symbol cycle in
// which count_i is high it advances by one; when the count reaches TARGET its
// output activates the elements it drives. TYPE selects what happens then:
//   CNT_ROLL  - output high for one symbol, count returns to zero, ready to
//               count to TARGET again;
//   CNT_PULSE - output high for one symbol, count holds at TARGET and the
//               output stays low afterwards;
//   CNT_LATCH - count holds at TARGET and the output stays high.
// reset_i clears the count and the output and wins over count_i in the same
// cycle. init_i (first symbol of a stream) starts from zero, but a count on
// that symbol is taken.
//
// Interface: clk_i, rst_ni (asynchronous, active low), valid_i (symbol
// present; otherwise everything holds), init_i, count_i, reset_i (usually
// driven by the firing of STEs on the current symbol), out_o, count_o.
// Timing: out_o is registered, so a count on symbol t shows on out_o for
// symbol t+1 - the same one-symbol step an STE takes - and it enables the
// successors' match on symbol t+1. The three behaviours follow the element
// definitions; the reset priority and the counter width are this design's
// choices. The default TARGET of 3 and latch type are the values of the
// counter in the generated-code sample of the FPGA flow.
module anml_counter
  import anfa_pkg::*;
#(
  parameter int        TARGET = 3,
  parameter cnt_type_e TYPE   = CNT_LATCH,
  parameter int        CNT_W  = $clog2(TARGET + 1)
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             valid_i,
  input  logic             init_i,
  input  logic             count_i,
  input  logic             reset_i,
  output logic             out_o,
  output logic [CNT_W-1:0] count_o
);

  logic [CNT_W-1:0] cnt_q, cnt_d, base_cnt;
  logic             out_q, out_d;
  logic             reached;

  always_comb begin
    base_cnt = init_i ? '0 : cnt_q;
    reached  = count_i && (base_cnt == CNT_W'(TARGET - 1));
    cnt_d    = base_cnt;
    out_d    = 1'b0;
    unique case (TYPE)
      CNT_ROLL: begin
        if (reached)      cnt_d = '0;
        else if (count_i) cnt_d = base_cnt + 1'b1;
        out_d = reached;
      end
      CNT_PULSE: begin
        if (count_i && base_cnt != CNT_W'(TARGET)) cnt_d = base_cnt + 1'b1;
        out_d = reached;
      end
      default: begin  // CNT_LATCH
        if (count_i && base_cnt != CNT_W'(TARGET)) cnt_d = base_cnt + 1'b1;
        out_d = (cnt_d == CNT_W'(TARGET));
      end
    endcase
    if (reset_i) begin
      cnt_d = '0;
      out_d = 1'b0;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q <= '0;
      out_q <= 1'b0;
    end else if (valid_i) begin
      cnt_q <= cnt_d;
      out_q <= out_d;
    end
  end

  assign out_o   = out_q;
  assign count_o = cnt_q;

  initial begin
    assert (TARGET >= 1) else $error("anml_counter: TARGET must be at least 1");
  end

endmodule
