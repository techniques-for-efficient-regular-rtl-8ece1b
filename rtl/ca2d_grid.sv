// ca2d_grid: Game-of-Life cellular automaton of ROWS x COLS cells, each cell
// wired to its eight neighbours, plus the sequencer that steps the cells
// through the nine symbols of a generation.
//
// Each cell sends its state in one direction per count phase (see ca2d_cell);
// the grid routes the output for direction k of the cell at (r,c) to the
// neighbour at (r+dr_k, c+dc_k), so a cell's nbr_i in phase k is the state of
// the neighbour lying opposite to direction k. Cells beyond the border are
// dead. The sequencer is a 0..8 phase counter advanced by every valid symbol
// and cleared by init_i; gen_done_o marks the clock in which the cells take
// their next state.
//
// Interface: clk_i, rst_ni, valid_i, init_i, seed_i[ROWS*COLS] (cell (r,c) at
// bit r*COLS+c; loaded on the init symbol, which does not count as a phase:
// count phase 0 is the next valid symbol), alive_o[ROWS*COLS], gen_done_o,
// phase_o.
// Timing: a generation takes 9 valid symbols after init; the new pattern is
// on alive_o the cycle after gen_done_o. The default 16x18 grid is the largest
// of the FPGA evaluation (3x3 to 16x18); the dead border and the sequencer are
// this design's choices.
module ca2d_grid #(
  parameter int ROWS = 16,
  parameter int COLS = 18
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 valid_i,
  input  logic                 init_i,
  input  logic [ROWS*COLS-1:0] seed_i,
  output logic [ROWS*COLS-1:0] alive_o,
  output logic                 gen_done_o,
  output logic [3:0]           phase_o
);

  localparam int N = ROWS * COLS;
  // Direction offsets: 0 N, 1 NE, 2 E, 3 SE, 4 S, 5 SW, 6 W, 7 NW.
  localparam int DR [8] = '{-1, -1, 0, 1, 1, 1, 0, -1};
  localparam int DC [8] = '{ 0,  1, 1, 1, 0, -1, -1, -1};

  logic [3:0]     phase_q;
  logic [N-1:0]   nbr;
  logic [7:0]     dir [N];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                phase_q <= 4'd0;
    else if (valid_i) begin
      if (init_i)                phase_q <= 4'd0;
      else if (phase_q == 4'd8)  phase_q <= 4'd0;
      else                       phase_q <= phase_q + 4'd1;
    end
  end

  assign phase_o    = phase_q;
  assign gen_done_o = valid_i && !init_i && (phase_q == 4'd8);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // Neighbour input: OR over directions of the sender opposite to k.
      logic [7:0] rx;
      for (genvar k = 0; k < 8; k++) begin : g_dir
        localparam int SR = r - DR[k];
        localparam int SC = c - DC[k];
        if (SR >= 0 && SR < ROWS && SC >= 0 && SC < COLS) begin : g_in
          assign rx[k] = dir[SR*COLS+SC][k];
        end else begin : g_border
          assign rx[k] = 1'b0;
        end
      end
      assign nbr[r*COLS+c] = |rx;

      ca2d_cell u_cell (
        .clk_i  (clk_i),
        .rst_ni (rst_ni),
        .valid_i(valid_i),
        .init_i (init_i),
        .seed_i (seed_i[r*COLS+c]),
        .phase_i(phase_q),
        .nbr_i  (nbr[r*COLS+c]),
        .alive_o(alive_o[r*COLS+c]),
        .dir_o  (dir[r*COLS+c])
      );
    end
  end

endmodule
