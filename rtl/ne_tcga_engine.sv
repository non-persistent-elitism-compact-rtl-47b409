// ne_tcga_engine: compact genetic algorithm with tendency and non-persistent
// elitism (ne-TCGA), as a sequential hardware controller.
//
// The population is a probability vector P of L entries; P[i] is held as an
// integer 0..N meaning probability P[i]/N that bit i of a sampled chromosome
// is 1 (step 1/N, N being the population size). One generation:
//   1. (first generation) P[i] = N/2 and two chromosomes a, b are sampled.
//   2. a and b are scored; the fitter is the winner (a tie makes b the winner),
//      its score is fwn.
//   3. Tendency: for every bit where winner and loser differ, the winner with
//      that one bit inverted is scored (fw). If the inverted bit is 1 and fw > fwn,
//      or the inverted bit is 0 and fw <= fwn, P[i] goes up by one step,
//      otherwise it goes down by one step (kept within 0..N).
//   4. If every P[i] is 0 or N the run ends.
//   5. Mutation: c[i] = (P[i] > N/2), i.e. each winner bit is set to 1 where
//      P is above one half and to 0 elsewhere. If c scores more than the
//      winner, c becomes the winner.
//   6. Non-persistent elitism: while the elitism counter z < ALPHA the winner
//      is kept as a and only b is sampled anew (z++); otherwise both are
//      sampled anew and z = 0. Back to 2.
// These steps are the published algorithm. This design's own choices: each
// single-bit test starts from the unmodified winner; sampling draws a 16-bit
// random r and sets the bit when (r*N)>>16 < P[i]; the ALPHA and N defaults;
// and, at the end, the converged vector (c) is scored once more and returned.
//
// Implementation: P, a, b and c are held in registers and visited one index
// per clock (sampling, tendency scan, convergence/mutation scan), so P maps to
// a single-port memory. Scoring is done by an external fitness unit through
// fit_start / fit_done; the engine waits for it, however long it takes, so
// any scorer with that handshake and an FW-bit unsigned score can be used.
//
// Interface: pulse start to begin a run (rst_n also clears it). busy is high
// while running; done goes high when P has converged and stays high until the
// next start, with result (the converged chromosome) and result_fitness.
// gen_count counts generations, eval_count fitness evaluations. ev_elite,
// ev_regen and ev_mutate are one-clock pulses when step 6 keeps the elite,
// step 6 samples both chromosomes, and step 5 accepts the mutant; ev_p_up and
// ev_p_down pulse when a tendency test steps a P entry up or down (also when
// the entry is already at its limit).
module ne_tcga_engine
  import evo_pkg::*;
#(
  parameter int unsigned L     = CHROM_L,   // chromosome length
  parameter int unsigned N     = 10,        // population size, step of P is 1/N
  parameter int unsigned ALPHA = 3,         // maximum generations of elitism
  parameter logic [31:0] SEED  = 32'h2545_F491,
  parameter int unsigned FW    = FIT_W      // width of a fitness value
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [L-1:0]   result,
  output logic [FW-1:0]  result_fitness,
  output logic [31:0]    gen_count,
  output logic [31:0]    eval_count,
  output logic           ev_elite,
  output logic           ev_regen,
  output logic           ev_mutate,
  output logic           ev_p_up,
  output logic           ev_p_down,
  // fitness unit side
  output logic           fit_start,
  output logic [L-1:0]   fit_chrom,
  input  logic           fit_done,
  input  logic [FW-1:0]  fit_value
);
  localparam int unsigned PW = $clog2(N + 1);
  localparam int unsigned IW = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned ZW = $clog2(ALPHA + 1);
  localparam logic [PW-1:0] P_MAX  = PW'(N);
  localparam logic [PW-1:0] P_HALF = PW'(N / 2);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_GEN, S_EVAL_A, S_EVAL_B, S_TEND, S_TEND_WAIT,
    S_SCAN, S_EVAL_C, S_ELITE, S_FINAL, S_DONE
  } state_t;

  state_t          state;
  logic [PW-1:0]   p_q [L];
  logic [L-1:0]    a_q, b_q, c_q;
  logic [IW-1:0]   idx;
  logic            w_is_a;         // winner is a
  logic [FW-1:0]   fa_q, fwn_q;
  logic [ZW-1:0]   z_q;
  logic            gen_a, gen_b;   // which chromosomes the next S_GEN samples
  logic            conv_q;         // all entries seen so far in S_SCAN converged
  logic            waiting;        // a fitness evaluation is outstanding

  logic [31:0]     rnd;
  logic [PW-1:0]   p_rd;
  logic            samp0, samp1;
  logic [L-1:0]    winner;
  logic            last_idx;

  evo_rng #(.SEED(SEED)) u_rng (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .rnd(rnd)
  );

  assign p_rd     = p_q[idx];
  assign winner   = w_is_a ? a_q : b_q;
  assign last_idx = (idx == IW'(L - 1));

  // Bernoulli samples with probability p/N from the two 16-bit halves of rnd
  function automatic logic sample(input logic [15:0] r, input logic [PW-1:0] p);
    logic [31:0] scaled;
    scaled = (32'(r) * 32'(N)) >> 16;
    return scaled < 32'(p);
  endfunction

  assign samp0 = sample(rnd[15:0],  (state == S_INIT) ? P_HALF : p_rd);
  assign samp1 = sample(rnd[31:16], (state == S_INIT) ? P_HALF : p_rd);

  // chromosome presented to the fitness unit
  always_comb begin
    unique case (state)
      S_EVAL_A:           fit_chrom = a_q;
      S_EVAL_B:           fit_chrom = b_q;
      S_TEND, S_TEND_WAIT: fit_chrom = winner ^ (L'(1) << idx);
      default:            fit_chrom = c_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      idx            <= '0;
      a_q            <= '0;
      b_q            <= '0;
      c_q            <= '0;
      w_is_a         <= 1'b0;
      fa_q           <= '0;
      fwn_q          <= '0;
      z_q            <= '0;
      gen_a          <= 1'b0;
      gen_b          <= 1'b0;
      conv_q         <= 1'b1;
      waiting        <= 1'b0;
      fit_start      <= 1'b0;
      result_fitness <= '0;
      gen_count      <= '0;
      eval_count     <= '0;
      ev_elite       <= 1'b0;
      ev_regen       <= 1'b0;
      ev_mutate      <= 1'b0;
      ev_p_up        <= 1'b0;
      ev_p_down      <= 1'b0;
      for (int i = 0; i < L; i++) p_q[i] <= '0;
    end else begin
      fit_start <= 1'b0;
      ev_elite  <= 1'b0;
      ev_regen  <= 1'b0;
      ev_mutate <= 1'b0;
      ev_p_up   <= 1'b0;
      ev_p_down <= 1'b0;

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_INIT;
            idx        <= '0;
            z_q        <= '0;
            gen_count  <= '0;
            eval_count <= '0;
          end
        end

        // step 1: P = 1/2 everywhere, sample a and b
        S_INIT: begin
          p_q[idx] <= P_HALF;
          a_q[idx] <= samp0;
          b_q[idx] <= samp1;
          idx      <= idx + 1'b1;
          if (last_idx) begin
            idx   <= '0;
            state <= S_EVAL_A;
          end
        end

        // step 6 (second half): sample the chromosomes that are not kept
        S_GEN: begin
          if (gen_a) a_q[idx] <= samp0;
          if (gen_b) b_q[idx] <= samp1;
          idx <= idx + 1'b1;
          if (last_idx) begin
            idx   <= '0;
            state <= S_EVAL_A;
          end
        end

        // step 2: score a, then b, pick the winner
        S_EVAL_A: begin
          if (!waiting) begin
            fit_start <= 1'b1;
            waiting   <= 1'b1;
          end else if (fit_done) begin
            waiting    <= 1'b0;
            fa_q       <= fit_value;
            eval_count <= eval_count + 1;
            state      <= S_EVAL_B;
          end
        end

        S_EVAL_B: begin
          if (!waiting) begin
            fit_start <= 1'b1;
            waiting   <= 1'b1;
          end else if (fit_done) begin
            waiting    <= 1'b0;
            eval_count <= eval_count + 1;
            if (fa_q > fit_value) begin
              w_is_a <= 1'b1;
              fwn_q  <= fa_q;
            end else begin
              w_is_a <= 1'b0;
              fwn_q  <= fit_value;
            end
            idx   <= '0;
            state <= S_TEND;
          end
        end

        // step 3: tendency test on every bit where winner and loser differ
        S_TEND: begin
          if (a_q[idx] != b_q[idx]) begin
            fit_start <= 1'b1;
            state     <= S_TEND_WAIT;
          end else begin
            idx <= idx + 1'b1;
            if (last_idx) begin
              idx    <= '0;
              conv_q <= 1'b1;
              state  <= S_SCAN;
            end
          end
        end

        S_TEND_WAIT: begin
          if (fit_done) begin
            eval_count <= eval_count + 1;
            // the inverted bit is ~winner[idx]; move P towards it if that
            // improved the score, away from it otherwise
            if ((!winner[idx]) ^ (fit_value > fwn_q)) begin
              if (p_rd != '0) p_q[idx] <= p_rd - 1'b1;
              ev_p_down <= 1'b1;
            end else begin
              if (p_rd != P_MAX) p_q[idx] <= p_rd + 1'b1;
              ev_p_up <= 1'b1;
            end
            idx   <= idx + 1'b1;
            state <= S_TEND;
            if (last_idx) begin
              idx    <= '0;
              conv_q <= 1'b1;
              state  <= S_SCAN;
            end
          end
        end

        // step 4 and step 5 (first half): convergence test, build mutant c
        S_SCAN: begin
          c_q[idx] <= (p_rd > P_HALF);   // P[i]/N > 1/2
          if (!((p_rd == '0) || (p_rd == P_MAX))) conv_q <= 1'b0;
          idx <= idx + 1'b1;
          if (last_idx) begin
            idx <= '0;
            if (conv_q && ((p_rd == '0) || (p_rd == P_MAX))) state <= S_FINAL;
            else                                             state <= S_EVAL_C;
          end
        end

        // step 5 (second half): keep the mutant if it beats the winner
        S_EVAL_C: begin
          if (!waiting) begin
            fit_start <= 1'b1;
            waiting   <= 1'b1;
          end else if (fit_done) begin
            waiting    <= 1'b0;
            eval_count <= eval_count + 1;
            if (fit_value > fwn_q) begin
              if (w_is_a) a_q <= c_q;
              else        b_q <= c_q;
              fwn_q     <= fit_value;
              ev_mutate <= 1'b1;
            end
            state <= S_ELITE;
          end
        end

        // step 6: non-persistent elitism
        S_ELITE: begin
          gen_count <= gen_count + 1;
          idx       <= '0;
          state     <= S_GEN;
          if (32'(z_q) < 32'(ALPHA)) begin
            if (!w_is_a) a_q <= b_q;
            gen_a    <= 1'b0;
            gen_b    <= 1'b1;
            z_q      <= z_q + 1'b1;
            ev_elite <= 1'b1;
          end else begin
            gen_a    <= 1'b1;
            gen_b    <= 1'b1;
            z_q      <= '0;
            ev_regen <= 1'b1;
          end
        end

        // converged: score the converged chromosome once and report it
        S_FINAL: begin
          if (!waiting) begin
            fit_start <= 1'b1;
            waiting   <= 1'b1;
          end else if (fit_done) begin
            waiting        <= 1'b0;
            eval_count     <= eval_count + 1;
            result_fitness <= fit_value;
            state          <= S_DONE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy   = (state != S_IDLE) && (state != S_DONE);
  assign done   = (state == S_DONE);
  assign result = c_q;

  // P never leaves 0..N
  a_p_range: assert property (@(posedge clk) disable iff (!rst_n || !busy) p_rd <= P_MAX);
endmodule
