// evo_system: self-evolving circuit built from an ne-TCGA engine, a fitness
// unit and the 8 x 5 evolvable cell array.
//
// The engine proposes 800-bit chromosomes; the fitness unit loads each one
// into the cell array, runs the 8 test vectors and scores the outputs against
// the target truth table under the MASK word; the engine updates its
// probability vector from the scores until it converges, and the converged
// chromosome is the evolved circuit. To evolve a full adder, drive inputs 0..2
// with a, b, carry-in, expect sum on output 0 and carry-out on output 1, and
// set mask to 8'h03 (maximum fitness 16). In the published system the
// algorithm and the scoring ran as software on a soft processor beside the
// array; here they are hardware, which is this design's choice.
//
// Interface: target and mask must be held while busy. Pulse start; done rises
// when the run has converged and stays high until the next start. result is
// the evolved configuration, result_fitness its score. After done the array
// holds result, so arr_din / arr_dout can be used to exercise the evolved
// circuit (arr_din is only applied when the fitness unit is idle).
module evo_system
  import evo_pkg::*;
#(
  parameter int unsigned N     = 10,
  parameter int unsigned ALPHA = 3,
  parameter logic [31:0] SEED  = 32'h2545_F491
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  word_t    target [NUM_VEC],
  input  word_t    mask,
  output logic     busy,
  output logic     done,
  output chrom_t   result,
  output fitness_t result_fitness,
  output logic [31:0] gen_count,
  output logic [31:0] eval_count,
  output logic     ev_elite,
  output logic     ev_regen,
  output logic     ev_mutate,
  output logic     ev_p_up,
  output logic     ev_p_down,
  input  word_t    arr_din,
  output word_t    arr_dout
);
  logic     fit_start, fit_done, fit_busy;
  chrom_t   fit_chrom;
  fitness_t fit_value;
  logic     cfg_load;
  chrom_t   cfg_in;
  word_t    fu_din, din_mux;

  ne_tcga_engine #(.L(CHROM_L), .N(N), .ALPHA(ALPHA), .SEED(SEED)) u_engine (
    .clk, .rst_n, .start, .busy, .done, .result, .result_fitness,
    .gen_count, .eval_count, .ev_elite, .ev_regen, .ev_mutate, .ev_p_up, .ev_p_down,
    .fit_start, .fit_chrom, .fit_done, .fit_value
  );

  fitness_unit u_fitness (
    .clk, .rst_n,
    .start        (fit_start),
    .chrom        (fit_chrom),
    .target       (target),
    .mask         (mask),
    .busy         (fit_busy),
    .done         (fit_done),
    .fitness      (fit_value),
    .arr_cfg_load (cfg_load),
    .arr_cfg_in   (cfg_in),
    .arr_din      (fu_din),
    .arr_dout     (arr_dout)
  );

  assign din_mux = fit_busy ? fu_din : arr_din;

  cell_array u_array (
    .clk, .rst_n,
    .cfg_load (cfg_load),
    .cfg_in   (cfg_in),
    .din      (din_mux),
    .dout     (arr_dout)
  );
endmodule
