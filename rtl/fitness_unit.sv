// fitness_unit: scores one chromosome on the cell array against a truth table.
//
// On start the unit loads the chromosome into the cell array and captures the
// target truth table and the MASK word. It then drives the array inputs with
// the 8 values of the low three input bits (upper five inputs held at 0), one
// value per clock. For each value v it forms
//     match = ~(dout ^ target[v]) & mask
// and adds the number of ones in match to the fitness. The sum over the 8
// vectors is the fitness, 0..64; for a full adder (mask 0x03) the maximum is 16.
// The XNOR / MASK / ones-count scoring and the 8 test vectors follow the
// published system, where a host processor did this in software; doing it in a
// small sequencer with one vector per clock is this design's choice.
//
// Interface and timing: pulse start for one clock with chrom valid. The load
// happens on that edge, vectors 0..7 are applied in the next 8 clocks, and
// done is high for one clock, 9 clocks after start, with fitness valid from
// then until the next start. busy is high from the clock after start until
// done. start while busy is ignored.
module fitness_unit
  import evo_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  chrom_t   chrom,
  input  word_t    target [NUM_VEC],   // expected array output for input v
  input  word_t    mask,               // MASK register value, 0x03 for a full adder
  output logic     busy,
  output logic     done,
  output fitness_t fitness,
  // cell array side
  output logic     arr_cfg_load,
  output chrom_t   arr_cfg_in,
  output word_t    arr_din,
  input  word_t    arr_dout
);
  localparam int unsigned VW = $clog2(NUM_VEC);

  logic [VW-1:0] vec_q;
  word_t         target_q [NUM_VEC];
  word_t         mask_q;
  fitness_t      acc_q;
  word_t         match;
  fitness_t      ones;

  assign arr_cfg_load = start && !busy;
  assign arr_cfg_in   = chrom;
  assign arr_din      = word_t'(vec_q);

  assign match = ~(arr_dout ^ target_q[vec_q]) & mask_q;

  always_comb begin
    ones = '0;
    for (int k = 0; k < ROWS; k++) ones += fitness_t'(match[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      vec_q   <= '0;
      acc_q   <= '0;
      fitness <= '0;
      mask_q  <= '0;
      for (int v = 0; v < NUM_VEC; v++) target_q[v] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          vec_q    <= '0;
          acc_q    <= '0;
          mask_q   <= mask;
          target_q <= target;
        end
      end else begin
        acc_q <= acc_q + ones;
        vec_q <= vec_q + 1'b1;
        if (vec_q == VW'(NUM_VEC - 1)) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          fitness <= acc_q + ones;
        end
      end
    end
  end
endmodule
