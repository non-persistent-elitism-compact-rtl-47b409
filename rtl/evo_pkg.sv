// evo_pkg: sizes shared by the evolvable cell array, its fitness unit and the
// ne-TCGA engine.
//
// The array is 8 rows by 5 columns of cells. Every cell chooses three of 16
// candidate signals with three 4-bit selects and feeds them to an 8x1-bit
// look-up table, so one cell takes 3*4 + 8 = 20 configuration bits and the
// whole array 40*20 = 800 bits; those 800 bits are the chromosome the genetic
// algorithm evolves. These numbers are the ones of the published array.
//
// Bit layout of one cell's 20-bit configuration (a choice of this design):
//   [3:0]   select of LUT address bit 0
//   [7:4]   select of LUT address bit 1
//   [11:8]  select of LUT address bit 2
//   [19:12] LUT contents, bit k is the output for address k
// Cell (column c, row r) takes chromosome bits [(c*ROWS + r)*CELL_CFG_W +: CELL_CFG_W].
package evo_pkg;
  localparam int unsigned ROWS       = 8;   // cells per column, external inputs/outputs
  localparam int unsigned COLS       = 5;   // columns
  localparam int unsigned N_CELL_IN  = 16;  // candidate inputs of one cell
  localparam int unsigned SEL_W      = 4;   // width of one 16-to-1 select
  localparam int unsigned LUT_AW     = 3;   // LUT address bits = selectors per cell
  localparam int unsigned LUT_W      = 8;   // LUT size, 2**LUT_AW
  localparam int unsigned CELL_CFG_W = LUT_AW * SEL_W + LUT_W;   // 20
  localparam int unsigned N_CELLS    = ROWS * COLS;              // 40
  localparam int unsigned CHROM_L    = N_CELLS * CELL_CFG_W;     // 800
  localparam int unsigned NUM_VEC    = 8;   // test vectors: all values of the low three inputs
  localparam int unsigned FIT_W      = 7;   // fitness 0..NUM_VEC*ROWS = 0..64

  typedef logic [ROWS-1:0]    word_t;     // one word of array inputs or outputs
  typedef logic [CHROM_L-1:0] chrom_t;    // one chromosome (array configuration)
  typedef logic [FIT_W-1:0]   fitness_t;
endpackage
