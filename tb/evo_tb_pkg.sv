// evo_tb_pkg: reference models shared by the testbenches.
//
// ref_array   evaluates the 8 x 5 cell array for one configuration and input
//             word, written independently of the RTL as plain loops.
// ref_fitness scores a chromosome the way the fitness unit must: for the 8
//             values v of the low three inputs, count the ones of
//             ~(out ^ target[v]) & mask and add them up.
// fa_chrom    a hand-built full adder: column 0 row 0 is a 3-input XOR of
//             inputs 0..2 (sum), row 1 their majority (carry); rows 0 and 1
//             of columns 1..4 pass those signals on, all other cells are zero.
// fa_target   the full adder truth table: output bit 0 sum, bit 1 carry.
package evo_tb_pkg;
  import evo_pkg::*;

  typedef word_t table_t [NUM_VEC];

  function automatic logic [CELL_CFG_W-1:0] cell_cfg(input logic [7:0] lut,
      input logic [3:0] s2, input logic [3:0] s1, input logic [3:0] s0);
    return {lut, s2, s1, s0};
  endfunction

  function automatic word_t ref_array(input chrom_t chrom, input word_t din);
    logic [15:0] cin;
    word_t outs [COLS];
    for (int c = 0; c < COLS; c++) begin
      if (c == 0)      cin = {~din, din};
      else if (c == 1) cin = {outs[0], din};
      else             cin = {outs[c-1], outs[c-2]};
      for (int r = 0; r < ROWS; r++) begin
        logic [CELL_CFG_W-1:0] cfg;
        int addr;
        cfg  = chrom[(c*ROWS + r)*CELL_CFG_W +: CELL_CFG_W];
        addr = int'(cin[cfg[3:0]]) + 2*int'(cin[cfg[7:4]]) + 4*int'(cin[cfg[11:8]]);
        outs[c][r] = cfg[12 + addr];
      end
    end
    return outs[COLS-1];
  endfunction

  function automatic int ref_fitness(input chrom_t chrom, input table_t target,
                                     input word_t mask);
    int f;
    f = 0;
    for (int v = 0; v < NUM_VEC; v++)
      f += $countones(~(ref_array(chrom, word_t'(v)) ^ target[v]) & mask);
    return f;
  endfunction

  function automatic chrom_t fa_chrom();
    chrom_t ch;
    ch = '0;
    ch[0*CELL_CFG_W +: CELL_CFG_W] = cell_cfg(8'h96, 4'd2, 4'd1, 4'd0);  // sum
    ch[1*CELL_CFG_W +: CELL_CFG_W] = cell_cfg(8'hE8, 4'd2, 4'd1, 4'd0);  // carry
    for (int c = 1; c < COLS; c++)
      for (int r = 0; r < 2; r++)
        ch[(c*ROWS + r)*CELL_CFG_W +: CELL_CFG_W] =
          cell_cfg(8'h80, 4'(8 + r), 4'(8 + r), 4'(8 + r));
    return ch;
  endfunction

  function automatic table_t fa_target();
    table_t t;
    for (int v = 0; v < NUM_VEC; v++) begin
      int s;
      s = int'(v[0]) + int'(v[1]) + int'(v[2]);
      t[v] = word_t'(s);          // bit 0 = sum, bit 1 = carry
    end
    return t;
  endfunction

  function automatic chrom_t rand_chrom();
    chrom_t ch;
    for (int k = 0; k < CHROM_L; k += 32) ch[k +: 32] = $urandom;
    return ch;
  endfunction
endpackage
