// ca1d_array: rule-110 one-dimensional cellular automaton of N_CELLS cells.
//
// Cells are chained left to right; each passes its alive and dead lines to
// both neighbours. The two ends see a permanently dead neighbour (alive line
// low, dead line high), the role played by an always-active start element
// wired into the outer dead inputs. All cells advance together, one
// generation per step_i.
//
// Interface: clk_i, rst_ni, init_i with seed_i[N_CELLS] (initial pattern,
// cell 0 leftmost), step_i, alive_o[N_CELLS].
// Timing: one generation per clock with step_i high; the new pattern is on
// alive_o in the next cycle. The default of 256 cells is the largest array of
// the FPGA evaluation (8 to 256 cells); the dead boundary is this design's
// reading of the end elements.
module ca1d_array #(
  parameter int N_CELLS = 256
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               init_i,
  input  logic [N_CELLS-1:0] seed_i,
  input  logic               step_i,
  output logic [N_CELLS-1:0] alive_o
);

  logic [N_CELLS-1:0] alive, dead;

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    logic la, ld, ra, rd;
    if (i == 0) begin : g_left_edge
      assign la = 1'b0;
      assign ld = 1'b1;
    end else begin : g_left
      assign la = alive[i-1];
      assign ld = dead[i-1];
    end
    if (i == N_CELLS - 1) begin : g_right_edge
      assign ra = 1'b0;
      assign rd = 1'b1;
    end else begin : g_right
      assign ra = alive[i+1];
      assign rd = dead[i+1];
    end
    ca1d_cell u_cell (
      .clk_i        (clk_i),
      .rst_ni       (rst_ni),
      .init_i       (init_i),
      .seed_i       (seed_i[i]),
      .step_i       (step_i),
      .left_alive_i (la),
      .left_dead_i  (ld),
      .right_alive_i(ra),
      .right_dead_i (rd),
      .alive_o      (alive[i]),
      .dead_o       (dead[i])
    );
  end

  assign alive_o = alive;

endmodule
