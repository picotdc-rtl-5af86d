// tb_time_counter: checks the counter value, its wrap and both clock enables.
`include "tb/tb_util.svh"
module tb_time_counter;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  cnt_t cnt;
  logic ce_320, ce_40;
  int n320, n40;
  cnt_t base;
  time_counter dut (.*);
  always #390.625 clk = ~clk;
  initial begin
    rst = 1; repeat (2) @(posedge clk); rst = 0;
    n320 = 0; n40 = 0;
    @(negedge clk); base = cnt;
    for (int i = 0; i < (1 << CNT_W) + 10; i++) begin
      if (ce_320) n320++;
      if (ce_40) n40++;
      if (i < 64 || i > (1 << CNT_W)) `CHECK(cnt == cnt_t'(base + i), "count value")
      `CHECK(ce_320 == (cnt[1:0] == 3), "ce_320 phase")
      @(negedge clk);
    end
    `CHECK(n320 == ((1 << CNT_W) + 10) / 4, "320 MHz enable rate 1/4")
    `CHECK(n40 == ((1 << CNT_W) + 10) / 32, "40 MHz enable rate 1/32")
    `FINISH
  end
  initial begin #(781.25 * 400000); failures++; $display("watchdog"); `FINISH end
endmodule
