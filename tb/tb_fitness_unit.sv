// tb_fitness_unit: self-checking test of the fitness unit driving a real
// cell array.
//
// Scores random chromosomes against random truth tables and masks and
// compares with the reference score of evo_tb_pkg; scores the hand-built
// full adder against the full adder table with mask 0x03 (must be 16, the
// maximum) and with one table entry spoiled (must be 15); and checks that
// done comes exactly 9 clocks after start and that start while busy is
// ignored.
module tb_fitness_unit;
  import evo_pkg::*;
  import evo_tb_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  chrom_t   chrom = '0;
  word_t    target [NUM_VEC];
  word_t    mask = '0;
  logic     busy, done;
  fitness_t fitness;
  logic     arr_cfg_load;
  chrom_t   arr_cfg_in;
  word_t    arr_din, arr_dout;
  int checks = 0, failures = 0;

  fitness_unit dut (.*);
  cell_array u_arr (.clk, .rst_n, .cfg_load(arr_cfg_load), .cfg_in(arr_cfg_in),
                    .din(arr_din), .dout(arr_dout));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic score(input chrom_t ch, input table_t tt, input word_t m,
                       input int exp, input string what);
    int lat;
    @(negedge clk) begin start = 1'b1; chrom = ch; target = tt; mask = m; end
    @(negedge clk) begin start = 1'b1; chrom = rand_chrom(); target = fa_target(); mask = ~m; end
    @(negedge clk) start = 1'b0;    // a start while busy must be ignored
    lat = 2;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (fitness !== fitness_t'(exp)) begin
      failures++;
      $display("FAIL %s: fitness=%0d exp=%0d", what, fitness, exp);
    end
    if (lat != 9) begin
      failures++;
      $display("FAIL %s: latency=%0d exp=9", what, lat);
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL %s: done/busy not cleared", what);
    end
  endtask

  initial begin
    table_t tt;
    chrom_t ch;
    word_t  m;
    foreach (target[v]) target[v] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      ch = rand_chrom();
      foreach (tt[v]) tt[v] = word_t'($urandom);
      m = (t % 4 == 0) ? 8'hFF : word_t'($urandom);
      score(ch, tt, m, ref_fitness(ch, tt, m), "random");
    end
    score(fa_chrom(), fa_target(), 8'h03, 16, "full adder");
    tt = fa_target();
    tt[5][1] = ~tt[5][1];
    score(fa_chrom(), tt, 8'h03, 15, "full adder, one wrong bit");
    score('0, fa_target(), 8'h03, ref_fitness('0, fa_target(), 8'h03), "all-zero chromosome");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
