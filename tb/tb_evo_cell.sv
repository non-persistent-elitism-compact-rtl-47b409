// tb_evo_cell: self-checking test of one reconfigurable cell.
//
// Loads random 20-bit configurations, applies random 16-bit inputs and
// compares dout with a reference: address bit k is din[select k], where
// select k is configuration bits [4k+3:4k], and the output is LUT bit
// [12 + address]. Also checks that the configuration register holds its
// value while cfg_load is low and is cleared by reset.
module tb_evo_cell;
  import evo_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, cfg_load = 1'b0;
  logic [CELL_CFG_W-1:0] cfg_in = '0;
  logic [N_CELL_IN-1:0]  din = '0;
  logic dout;
  int checks = 0, failures = 0;

  evo_cell dut (.*);

  always #5 clk = ~clk;

  function automatic logic ref_out(input logic [CELL_CFG_W-1:0] cfg,
                                   input logic [N_CELL_IN-1:0] d);
    int a;
    a = 0;
    for (int k = 0; k < 3; k++) a += int'(d[cfg[4*k +: 4]]) << k;
    return cfg[12 + a];
  endfunction

  task automatic check(input logic exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: din=%h dout=%b exp=%b", what, din, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CELL_CFG_W-1:0] cfg;
    repeat (2) @(posedge clk);
    // reset: configuration all zero -> output 0 whatever the input
    din = 16'hFFFF; #1;
    check(1'b0, "reset");
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      cfg = CELL_CFG_W'($urandom);
      @(negedge clk) begin cfg_load = 1'b1; cfg_in = cfg; end
      @(negedge clk) begin cfg_load = 1'b0; cfg_in = ~cfg; end
      for (int j = 0; j < 8; j++) begin
        din = 16'($urandom);
        #1 check(ref_out(cfg, din), "random");
        @(negedge clk);
      end
    end
    // every LUT address through a directed configuration:
    // selects 0,1,2 -> address = din[2:0]; LUT = 8'b1001_0110 (3-input XOR)
    cfg = {8'b1001_0110, 4'd2, 4'd1, 4'd0};
    @(negedge clk) begin cfg_load = 1'b1; cfg_in = cfg; end
    @(negedge clk) cfg_load = 1'b0;
    for (int v = 0; v < 8; v++) begin
      din = 16'(v);
      #1 check(^v[2:0], "xor3");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
