// tb_evo_system: end-to-end run of the self-evolving system at its default
// sizes (800-bit chromosome, 8 x 5 array, N = 10, ALPHA = 3), evolving a full
// adder.
//
// The target is the full adder truth table (inputs 0..2 = a, b, carry-in;
// output 0 = sum, output 1 = carry-out) with MASK 0x03, so the best score is
// 16. The run must converge. The testbench then checks the reported score
// against an independent model of array and scoring applied to the returned
// configuration, drives the evolved circuit through the external array port
// and compares every output with the model, and checks that elitism,
// regeneration of both chromosomes, mutant acceptance and tendency steps of P
// in both directions each happened at least once. Three runs are made back to back (the system restarts from a
// start pulse); at least one must reach the full score, a working full adder.
module tb_evo_system;
  import evo_pkg::*;
  import evo_tb_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  word_t    target [NUM_VEC];
  word_t    mask = 8'h03;
  logic     busy, done;
  chrom_t   result;
  fitness_t result_fitness;
  logic [31:0] gen_count, eval_count;
  logic     ev_elite, ev_regen, ev_mutate, ev_p_up, ev_p_down;
  word_t    arr_din = '0, arr_dout;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_elite = 0, n_regen = 0, n_mutate = 0, n_converged = 0, n_solved = 0;

  evo_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (ev_elite)  n_elite++;
    if (ev_regen)  n_regen++;
    if (ev_mutate) n_mutate++;
    if (ev_p_up)   n_up++;
    if (ev_p_down) n_down++;
  end

  task automatic expect_eq(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic one_run(input int run);
    int ref_f;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    expect_eq(busy, "busy after start");
    wait (done);
    @(negedge clk);
    n_converged++;
    if (result_fitness == 16) n_solved++;
    ref_f = ref_fitness(result, fa_target(), mask);
    expect_eq(result_fitness == fitness_t'(ref_f), "reported fitness matches model");
    expect_eq(result_fitness <= 16, "fitness within the full adder maximum");
    // exercise the evolved circuit through the array port
    for (int v = 0; v < 256; v++) begin
      arr_din = word_t'(v);
      #1 expect_eq(arr_dout == ref_array(result, arr_din), "evolved array output");
      @(negedge clk);
    end
    $display("run %0d: fitness %0d of 16 after %0d generations, %0d evaluations (%0t)",
             run, result_fitness, gen_count, eval_count, $time);
  endtask

  initial begin
    target = fa_target();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    one_run(0);
    one_run(1);
    one_run(2);
    expect_eq(n_converged == 3, "all runs converged");
    expect_eq(n_solved > 0, "a full adder was evolved");
    expect_eq(n_elite  > 0, "elitism used");
    expect_eq(n_regen  > 0, "both chromosomes regenerated");
    expect_eq(n_mutate > 0, "mutant accepted");
    expect_eq(n_up > 0 && n_down > 0, "tendency steps in both directions");
    $display("events: P up %0d, P down %0d", n_up, n_down);
    $display("events: elite %0d, regenerate %0d, mutate %0d, converged %0d, full adder %0d",
             n_elite, n_regen, n_mutate, n_converged, n_solved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
