// tb_ne_tcga_functions: the engine maximising the two real-valued test
// functions used to compare ne-TCGA with the plain and tendency-only compact
// GAs, for population sizes N = 10, 20, ..., 100.
//
//   Eq.(1)  y = sin(pi*x/180) - 5x^2 + 60x + 800,  x in [0, 20], max ~980 at x ~6
//   Eq.(2)  y = x*sin(10*pi*x) + 2,                 x in [0, 2],  max ~3.85 at x ~1.85
//
// x is a 16-bit unsigned chromosome k mapped linearly onto the interval,
// x = lo + k*(hi - lo)/(2^16 - 1). The score returned to the engine is the
// function value scaled to a 16-bit integer (y*64 for Eq.(1), y*10000 for
// Eq.(2)), answered one clock after each request. One engine instance runs per
// (function, N) pair, twenty in parallel. Checks: every run converges; the
// reported score is the score of the returned chromosome; every run ends
// above 80% of the function's maximum (the mean of Eq.(2) over its interval is
// about 2, half its maximum); and for each function at least one N ends within
// 0.5% of the maximum. The result, generation and evaluation counts are
// printed for each N. With this 16-bit encoding Eq.(1) usually reaches its
// maximum, while Eq.(2) often settles on its next-highest peak (3.65 at x ~1.65).
module tb_ne_tcga_functions;
  localparam int L = 16, FW = 16, NN = 10;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  int checks = 0, failures = 0;
  int near [2];
  real ymax [2];

  always #5 clk = ~clk;

  function automatic real xval(input int fn, input logic [L-1:0] k);
    real hi;
    hi = (fn == 0) ? 20.0 : 2.0;
    return hi * real'(k) / real'((1 << L) - 1);
  endfunction

  function automatic real yval(input int fn, input logic [L-1:0] k);
    real x, pi;
    pi = 3.14159265358979;
    x  = xval(fn, k);
    if (fn == 0) return $sin(pi * x / 180.0) - 5.0 * x * x + 60.0 * x + 800.0;
    else         return x * $sin(10.0 * pi * x) + 2.0;
  endfunction

  function automatic logic [FW-1:0] score(input int fn, input logic [L-1:0] k);
    real y;
    y = yval(fn, k) * ((fn == 0) ? 64.0 : 10000.0);
    if (y < 0.0) y = 0.0;
    return FW'($rtoi(y));
  endfunction

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic all_done;
  logic [2*NN-1:0] done_v;
  assign all_done = &done_v;

  for (genvar fn = 0; fn < 2; fn++) begin : g_fn
    for (genvar ni = 0; ni < NN; ni++) begin : g_n
      logic           busy, done;
      logic [L-1:0]   result;
      logic [FW-1:0]  result_fitness;
      logic [31:0]    gen_count, eval_count;
      logic           ev_elite, ev_regen, ev_mutate, ev_p_up, ev_p_down;
      logic           fit_start, fit_done = 1'b0;
      logic [L-1:0]   fit_chrom;
      logic [FW-1:0]  fit_value = '0;

      ne_tcga_engine #(.L(L), .N(10 * (ni + 1)), .ALPHA(3), .FW(FW),
                       .SEED(32'h9E37_79B9 + 32'(fn * 101 + ni * 7))) u_eng (
        .clk, .rst_n, .start, .busy, .done, .result, .result_fitness,
        .gen_count, .eval_count, .ev_elite, .ev_regen, .ev_mutate, .ev_p_up, .ev_p_down,
        .fit_start, .fit_chrom, .fit_done, .fit_value
      );

      assign done_v[fn*NN + ni] = done;

      always @(negedge clk) begin
        fit_done <= 1'b0;
        if (fit_start) begin
          fit_done  <= 1'b1;
          fit_value <= score(fn, fit_chrom);
        end
      end
    end
  end

  task automatic report(input int fn, input int n, input logic [L-1:0] r,
                        input logic [FW-1:0] rf, input logic [31:0] g,
                        input logic [31:0] e);
    real y;
    y = yval(fn, r);
    checks += 2;
    if (rf != score(fn, r)) begin
      failures++;
      $display("FAIL Eq.(%0d) N=%0d: reported score %0d, score of result %0d", fn + 1, n, rf, score(fn, r));
    end
    if (y < 0.8 * ymax[fn]) begin
      failures++;
      $display("FAIL Eq.(%0d) N=%0d: y=%f is more than 20%% below the maximum", fn + 1, n, y);
    end
    if (y >= 0.995 * ymax[fn]) near[fn]++;
    $display("Eq.(%0d) N=%3d: x=%f y=%f, %0d generations, %0d evaluations",
             fn + 1, n, xval(fn, r), y, g, e);
  endtask

  initial begin
    // true maxima by exhaustive search over the 16-bit encoding
    for (int fn = 0; fn < 2; fn++) begin
      ymax[fn] = -1.0e9;
      for (int k = 0; k < (1 << L); k++)
        if (yval(fn, L'(k)) > ymax[fn]) ymax[fn] = yval(fn, L'(k));
      near[fn] = 0;
    end
    $display("maxima over the encoding: Eq.(1) %f, Eq.(2) %f", ymax[0], ymax[1]);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (all_done);
    @(negedge clk);
`define REPORT(F, I) report(F, 10 * (I + 1), g_fn[F].g_n[I].result, g_fn[F].g_n[I].result_fitness, \
                            g_fn[F].g_n[I].gen_count, g_fn[F].g_n[I].eval_count);
    `REPORT(0, 0) `REPORT(0, 1) `REPORT(0, 2) `REPORT(0, 3) `REPORT(0, 4)
    `REPORT(0, 5) `REPORT(0, 6) `REPORT(0, 7) `REPORT(0, 8) `REPORT(0, 9)
    `REPORT(1, 0) `REPORT(1, 1) `REPORT(1, 2) `REPORT(1, 3) `REPORT(1, 4)
    `REPORT(1, 5) `REPORT(1, 6) `REPORT(1, 7) `REPORT(1, 8) `REPORT(1, 9)
`undef REPORT
    for (int fn = 0; fn < 2; fn++) begin
      checks++;
      $display("Eq.(%0d): %0d of %0d runs within 0.5%% of the maximum", fn + 1, near[fn], NN);
      if (near[fn] == 0) begin
        failures++;
        $display("FAIL Eq.(%0d): no run reached the maximum", fn + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
