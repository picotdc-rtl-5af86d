// tb_bx_counter: wrap at a programmed maximum and BX reset.
`include "tb/tb_util.svh"
module tb_bx_counter;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ce_40, bx_rst;
  logic [11:0] bx_max, bx_id;
  int model;
  bx_counter dut (.*);
  always #390.625 clk = ~clk;
  initial begin
    rst = 1; ce_40 = 0; bx_rst = 0; bx_max = 12'd9; model = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ce_40 = (i % 3 == 0); bx_rst = (i == 150);
      @(posedge clk); #1;
      if (bx_rst) model = 0;
      else if (ce_40) model = (model >= 9) ? 0 : model + 1;
      `CHECK(bx_id == 12'(model), "bx id")
    end
    `FINISH
  end
  initial begin #(781.25 * 5000); failures++; $display("watchdog"); `FINISH end
endmodule
