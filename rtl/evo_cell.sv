// evo_cell: one reconfigurable logic cell of the evolvable array.
//
// Three 16-to-1 selectors each pick one of the 16 signals offered to the
// cell's column; the three picked bits form the address of an 8x1-bit
// look-up table whose addressed bit is the cell output. The selects and the
// table contents come from the cell's 20-bit configuration register, so the
// structure (three 4-bit selects plus 8 table bits) is that of the published
// cell. Which select feeds which address bit, and the bit order inside the
// register, are this design's choice (see evo_pkg).
//
// Interface: cfg_load writes cfg_in into the configuration register on the
// rising clock edge; rst_n (active low, asynchronous) clears it. The path from
// din to dout is combinational.
module evo_cell
  import evo_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_load,
  input  logic [CELL_CFG_W-1:0] cfg_in,
  input  logic [N_CELL_IN-1:0]  din,
  output logic                  dout
);
  logic [CELL_CFG_W-1:0] cfg_q;
  logic [LUT_AW-1:0]     addr;
  logic [LUT_W-1:0]      lut;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cfg_q <= '0;
    else if (cfg_load) cfg_q <= cfg_in;
  end

  // three 16-to-1 selectors
  always_comb begin
    for (int k = 0; k < LUT_AW; k++)
      addr[k] = din[cfg_q[k*SEL_W +: SEL_W]];
  end

  assign lut  = cfg_q[LUT_AW*SEL_W +: LUT_W];
  assign dout = lut[addr];
endmodule
