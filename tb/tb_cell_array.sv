// tb_cell_array: self-checking test of the 8 x 5 cell array.
//
// Loads random 800-bit configurations and compares the outputs for random
// inputs with an independent loop model of the array (evo_tb_pkg). Then loads
// a hand-built full adder and checks sum and carry on outputs 0 and 1 for all
// 8 input combinations, and checks that a configuration is not taken while
// cfg_load is low.
module tb_cell_array;
  import evo_pkg::*;
  import evo_tb_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, cfg_load = 1'b0;
  chrom_t cfg_in = '0;
  word_t  din = '0;
  word_t  dout;
  int checks = 0, failures = 0;

  cell_array dut (.*);

  always #5 clk = ~clk;

  task automatic check(input word_t exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: din=%h dout=%h exp=%h", what, din, dout, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chrom_t ch;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      ch = rand_chrom();
      @(negedge clk) begin cfg_load = 1'b1; cfg_in = ch; end
      @(negedge clk) begin cfg_load = 1'b0; cfg_in = rand_chrom(); end
      for (int j = 0; j < 8; j++) begin
        din = word_t'($urandom);
        #1 check(ref_array(ch, din), "random");
        @(negedge clk);
      end
    end
    ch = fa_chrom();
    @(negedge clk) begin cfg_load = 1'b1; cfg_in = ch; end
    @(negedge clk) cfg_load = 1'b0;
    for (int v = 0; v < 8; v++) begin
      din = word_t'(v) | word_t'($urandom_range(0, 31) << 3);
      #1;
      checks++;
      if (dout[1:0] !== 2'(v[0] + v[1] + v[2])) begin
        failures++;
        $display("FAIL full adder: v=%0d dout=%h", v, dout);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
