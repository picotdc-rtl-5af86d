// tb_capture_ffs: a hit edge placed at a known time inside a clock period
// shows up as a thermometer code in `sample` two clk cycles later, with the
// edge at the phase index that matches the time.
`include "tb/tb_util.svh"
module tb_capture_ffs;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, hit = 0;
  logic [63:0] tap;
  logic [255:0] phase, sample;
  dll u_dll (.clk, .tap);
  res_interp u_ri (.tap, .phase);
  capture_ffs dut (.clk, .phase, .hit, .sample);
  always #390.625 clk = ~clk;
  initial begin
    repeat (4) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      automatic int p = $urandom_range(1, 254);
      automatic int n = 0;
      // edge between phase p-1 and phase p
      @(posedge clk);
      #(1.5 + (p - 0.5) * (781.25 / 256)) hit = ~hit;
      @(posedge clk); @(posedge clk); #1;
      for (int i = 0; i < 256; i++) n += (sample[i] != hit);
      `CHECK(n == p, "edge position in samples")
      `CHECK(sample[255] == hit && sample[0] == ~hit, "thermometer ends")
      repeat (2) @(posedge clk);
    end
    `FINISH
  end
  initial begin #(781.25 * 1000); failures++; $display("watchdog"); `FINISH end
endmodule
