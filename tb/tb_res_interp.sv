// tb_res_interp: 4 interpolated phases per tap, 3.05 ps apart, driven by the
// DLL model; also checks the phase ordering over a whole clock period.
`include "tb/tb_util.svh"
module tb_res_interp;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [63:0] tap;
  logic [255:0] phase;
  realtime rise [256];
  realtime t0;
  dll u_dll (.clk, .tap);
  res_interp dut (.tap, .phase);
  always #390.625 clk = ~clk;
  for (genvar i = 0; i < 256; i++) begin : g
    always @(posedge phase[i]) rise[i] = $realtime;
  end
  initial begin
    repeat (3) @(posedge clk);
    t0 = $realtime;
    #780;
    for (int i = 0; i < 256; i++) begin
      automatic realtime d = rise[i] - t0;
      `CHECK(d > 1.5 + i * (781.25 / 256) - 0.01 && d < 1.5 + i * (781.25 / 256) + 0.01, "phase delay")
    end
    `CHECK(rise[255] - t0 < 781.25, "all phases inside one period")
    `FINISH
  end
  initial begin #(781.25 * 100); failures++; $display("watchdog"); `FINISH end
endmodule
