// tb_hit_decoder: edge type, fine time from thermometer samples (also with a
// bubble), 12 ps mode, counter time and latency correction.
`include "tb/tb_util.svh"
module tb_hit_decoder;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, fine_mode, hit_valid;
  logic [255:0] sample;
  cnt_t now;
  hit_t hit_o;
  hit_decoder dut (.*);
  always #390.625 clk = ~clk;
  // samples of a cycle in which the hit goes from old to new level after p phases
  function automatic logic [255:0] therm(logic oldl, int p);
    logic [255:0] s;
    for (int i = 0; i < 256; i++) s[i] = (i < p) ? oldl : ~oldl;
    return s;
  endfunction
  logic lvl;
  initial begin
    rst = 1; sample = '0; now = 18'd1000; fine_mode = 1; lvl = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int k = 0; k < 200; k++) begin
      automatic int p = $urandom_range(255);
      automatic logic bub = (k % 5 == 0) && p > 2 && p < 250;
      @(negedge clk);
      fine_mode = (k % 3 != 0);
      sample = therm(lvl, p);
      if (bub) begin sample[p] = lvl; sample[p-1] = ~lvl; end   // swapped pair
      now = now + 18'd7;
      @(posedge clk); #1;
      `CHECK(hit_valid, "edge detected")
      `CHECK(hit_o.edge_t == lvl, "edge type (0 leading)")
      `CHECK(hit_o.t[25:8] == now - 18'd2, "counter time minus latency")
      if (fine_mode) `CHECK(hit_o.t[7:0] == 8'(p), "3 ps fine time")
      else if (!bub) `CHECK(hit_o.t[7:0] == 8'(4 * ((p + 3) / 4)), "12 ps fine time")
      lvl = ~lvl;
      @(negedge clk); sample = {256{lvl}};       // quiet cycle
      @(posedge clk); #1;
      `CHECK(!hit_valid, "no edge in a quiet cycle")
    end
    `FINISH
  end
  initial begin #(781.25 * 5000); failures++; $display("watchdog"); `FINISH end
endmodule
