// tb_ne_tcga_engine: self-checking test of the ne-TCGA engine against a
// step-by-step model of the algorithm.
//
// The engine (32-bit chromosomes, N = 10, ALPHA = 3) is connected to a
// behavioural fitness source that returns, after a random delay of 0..10
// clocks, the number of chromosome bits that match a hidden pattern, counted
// only over 'care' bits (in later runs about a quarter of the bits do not
// count, so inverting them leaves the score equal). The
// testbench follows every scoring request and keeps its own copy of the
// probability vector: it checks that each generation scores a and b, then
// exactly the winner with one inverted bit for each differing bit, in
// ascending order, then the mutant c = (P > N/2); it applies the tendency
// rule to its copy of P; it checks that an elite a is the previous winner
// for ALPHA generations and then not; and at convergence it checks the
// result, its score, the generation and evaluation counters and the
// elite / regenerate / mutate / P-step event counts. Several runs with different
// hidden patterns are made; each must converge to the pattern itself.
module tb_ne_tcga_engine;
  import evo_pkg::*;

  localparam int L = 32, N = 10, ALPHA = 3, RUNS = 6;

  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic           busy, done;
  logic [L-1:0]   result;
  fitness_t       result_fitness;
  logic [31:0]    gen_count, eval_count;
  logic           ev_elite, ev_regen, ev_mutate, ev_p_up, ev_p_down;
  logic           fit_start, fit_done = 1'b0;
  logic [L-1:0]   fit_chrom;
  fitness_t       fit_value = '0;
  int checks = 0, failures = 0;

  logic [L-1:0] hidden, care;

  ne_tcga_engine #(.L(L), .N(N), .ALPHA(ALPHA), .SEED(32'hC0FF_EE11)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fit(input logic [L-1:0] x);
    return $countones(~(x ^ hidden) & care);
  endfunction

  task automatic expect_eq(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model state
  int           pm [L];
  logic [L-1:0] a_m, b_m, w_m, c_m;
  int           fwn, z_m, phase, pend_idx, evals, gens;
  bit           elite_next;
  int           n_elite_m, n_regen_m, n_mut_m, n_elite, n_regen, n_mut;
  int           n_up_m, n_down_m, n_up, n_down;
  bit           final_seen;

  function automatic int next_diff(input int from);
    for (int i = from; i < L; i++) if (a_m[i] != b_m[i]) return i;
    return L;
  endfunction

  // event pulse counters
  always @(negedge clk) begin
    if (ev_elite)  n_elite++;
    if (ev_regen)  n_regen++;
    if (ev_mutate) n_mut++;
    if (ev_p_up)   n_up++;
    if (ev_p_down) n_down++;
  end

  // fitness source and algorithm model
  initial begin
    forever begin
      @(negedge clk);
      if (fit_start) begin
        logic [L-1:0] x;
        int f, d;
        x = fit_chrom;
        f = fit(x);
        evals++;
        case (phase)
          0: begin
            if (elite_next) expect_eq(x == w_m, "elite a is the previous winner");
            a_m = x; phase = 1;
          end
          1: begin
            int fa;
            b_m = x;
            fa  = fit(a_m);
            if (fa > f) begin w_m = a_m; fwn = fa; end
            else        begin w_m = b_m; fwn = f;  end
            pend_idx = next_diff(0);
            phase = (pend_idx < L) ? 2 : 3;
          end
          2: begin
            logic up;
            expect_eq(x == (w_m ^ (L'(1) << pend_idx)), "tendency request flips the next differing bit");
            // inverted bit 1 and better, or inverted bit 0 and not better: P up
            up = (!w_m[pend_idx]) ~^ (f > fwn);
            if (up) begin if (pm[pend_idx] < N) pm[pend_idx]++; n_up_m++;   end
            else    begin if (pm[pend_idx] > 0) pm[pend_idx]--; n_down_m++; end
            pend_idx = next_diff(pend_idx + 1);
            if (pend_idx == L) phase = 3;
          end
          3: begin
            bit conv;
            conv = 1'b1;
            for (int i = 0; i < L; i++) begin
              c_m[i] = (2 * pm[i] > N);
              if (pm[i] != 0 && pm[i] != N) conv = 1'b0;
            end
            expect_eq(x == c_m, "mutant/result follows P > N/2");
            gens++;
            if (conv) begin
              final_seen = 1'b1;
              phase = 4;
            end else begin
              if (f > fwn) begin w_m = c_m; fwn = f; n_mut_m++; end
              if (z_m < ALPHA) begin elite_next = 1'b1; z_m++; n_elite_m++; end
              else             begin elite_next = 1'b0; z_m = 0; n_regen_m++; end
              phase = 0;
            end
          end
          default: expect_eq(1'b0, "request after convergence");
        endcase
        d = $urandom_range(0, 10);
        repeat (d) @(negedge clk);
        fit_done  = 1'b1;
        fit_value = fitness_t'(f);
        @(negedge clk);
        fit_done  = 1'b0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int run = 0; run < RUNS; run++) begin
      hidden = (run == 0) ? '1 : (run == 1) ? '0 : L'($urandom);
      care   = (run < 2) ? '1 : L'($urandom) | L'($urandom);
      for (int i = 0; i < L; i++) pm[i] = N / 2;
      phase = 0; z_m = 0; elite_next = 1'b0; evals = 0; gens = 0;
      n_elite_m = 0; n_regen_m = 0; n_mut_m = 0; n_elite = 0; n_regen = 0; n_mut = 0;
      n_up_m = 0; n_down_m = 0; n_up = 0; n_down = 0;
      final_seen = 1'b0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      expect_eq(busy, "busy after start");
      wait (done);
      @(negedge clk);
      expect_eq(final_seen, "engine stopped when the model converged");
      expect_eq(result == c_m, "result is the converged vector");
      expect_eq(((result ^ hidden) & care) == '0, "converged to the hidden pattern");
      expect_eq(result_fitness == fitness_t'(fit(result)), "result fitness");
      expect_eq(eval_count == 32'(evals), "evaluation count");
      expect_eq(gen_count == 32'(gens - 1), "generation count");
      expect_eq(n_elite == n_elite_m && n_regen == n_regen_m && n_mut == n_mut_m,
                "elite/regen/mutate events");
      expect_eq(n_up == n_up_m && n_down == n_down_m, "P up/down events");
      expect_eq(!busy, "idle after done");
      $display("run %0d: pattern %h care %h, %0d generations, %0d evaluations, elite %0d regen %0d mutate %0d",
               run, hidden, care, gen_count, eval_count, n_elite, n_regen, n_mut);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
