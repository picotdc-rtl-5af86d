// tb_pulse_gen: pulse period and width.
`include "tb/tb_util.svh"
module tb_pulse_gen;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst, enable, pulse;
  logic [15:0] period, width;
  int rises, highs, last_rise, gap;
  logic pq;
  pulse_gen dut (.*);
  always #390.625 clk = ~clk;
  initial begin
    rst = 1; enable = 0; period = 16'd10; width = 16'd3;
    repeat (2) @(posedge clk); rst <= 0; enable <= 1;
    rises = 0; highs = 0; pq = 0; last_rise = -1;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      if (pulse) highs++;
      if (pulse && !pq) begin
        if (last_rise >= 0) `CHECK(i - last_rise == 10, "period 10 cycles")
        last_rise = i; rises++;
      end
      pq = pulse;
    end
    `CHECK(rises >= 19, "pulses produced")
    `CHECK(highs >= 57 && highs <= 60, "width 3 cycles")
    `FINISH
  end
  initial begin #(781.25 * 5000); failures++; $display("watchdog"); `FINISH end
endmodule
