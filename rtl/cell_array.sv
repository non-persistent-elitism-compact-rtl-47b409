// cell_array: the 8 x 5 evolvable cell array (a virtual reconfigurable circuit).
//
// Forty evo_cell instances are arranged in 5 columns of 8. Each column offers
// its cells 16 signals:
//   column 0 : the 8 external inputs (index 0..7) and their inversions (8..15)
//   column 1 : the 8 external inputs (0..7) and the outputs of column 0 (8..15)
//   column k>=2 : outputs of column k-2 (0..7) and of column k-1 (8..15)
// The outputs of the last column are the array's 8 outputs. The column
// sources follow the published array; the index order inside each group of
// 16 is this design's choice. The array has no feedback, so it is
// combinational from din to dout once configured.
//
// Interface: cfg_load loads the whole 800-bit chromosome cfg_in into the 40
// cell configuration registers in one clock; cell (column c, row r) takes
// bits [(c*ROWS + r)*CELL_CFG_W +: CELL_CFG_W]. dout is valid combinationally
// in the cycle after the load.
module cell_array
  import evo_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cfg_load,
  input  chrom_t cfg_in,
  input  word_t  din,
  output word_t  dout
);
  word_t col_out [COLS];

  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic [N_CELL_IN-1:0] col_in;
    if (c == 0) begin : g_first
      assign col_in = {~din, din};
    end else if (c == 1) begin : g_second
      assign col_in = {col_out[0], din};
    end else begin : g_rest
      assign col_in = {col_out[c-1], col_out[c-2]};
    end

    for (genvar r = 0; r < ROWS; r++) begin : g_row
      evo_cell u_cell (
        .clk      (clk),
        .rst_n    (rst_n),
        .cfg_load (cfg_load),
        .cfg_in   (cfg_in[(c*ROWS + r)*CELL_CFG_W +: CELL_CFG_W]),
        .din      (col_in),
        .dout     (col_out[c][r])
      );
    end
  end

  assign dout = col_out[COLS-1];
endmodule
