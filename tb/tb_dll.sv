// tb_dll: tap spacing of the locked delay line (781.25 ps / 64 = 12.2 ps).
`include "tb/tb_util.svh"
module tb_dll;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [63:0] tap;
  realtime rise [64];
  realtime t0;
  dll dut (.clk, .tap);
  always #390.625 clk = ~clk;
  for (genvar i = 0; i < 64; i++) begin : g
    always @(posedge tap[i]) rise[i] = $realtime;
  end
  initial begin
    repeat (3) @(posedge clk);
    t0 = $realtime;
    #780;
    for (int i = 0; i < 64; i++) begin
      automatic realtime d = rise[i] - t0;
      `CHECK(d > 1.5 + i * (781.25 / 64) - 0.01 && d < 1.5 + i * (781.25 / 64) + 0.01, "tap delay")
    end
    repeat (2) @(posedge clk);
    `FINISH
  end
  initial begin #(781.25 * 100); failures++; $display("watchdog"); `FINISH end
endmodule
