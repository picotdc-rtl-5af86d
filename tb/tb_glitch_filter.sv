// tb_glitch_filter: pulses shorter than the filter time disappear, longer
// ones pass delayed by the filter time.
`include "tb/tb_util.svh"
module tb_glitch_filter;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic hit_in = 0, hit_out;
  logic [3:0] filt_code;
  int rises;
  realtime t_in, t_out;
  glitch_filter dut (.*);
  always @(posedge hit_out) begin rises++; t_out = $realtime; end
  initial begin
    rises = 0;
    filt_code = 4'd0;                               // 781.25 ps
    #1000 hit_in = 1; #500 hit_in = 0;              // too short
    #3000;
    `CHECK(rises == 0, "short pulse removed (code 0)")
    t_in = $realtime; hit_in = 1; #1000 hit_in = 0; // long enough
    #3000;
    `CHECK(rises == 1, "long pulse passes (code 0)")
    `CHECK(t_out - t_in > 781.0 && t_out - t_in < 781.5, "delay equals filter time")
    filt_code = 4'd12;                              // 10.16 ns
    #1000 hit_in = 1; #8000 hit_in = 0;
    #20000;
    `CHECK(rises == 1, "8 ns pulse removed (code 12)")
    hit_in = 1; #12000 hit_in = 0;
    #20000;
    `CHECK(rises == 2, "12 ns pulse passes (code 12)")
    `CHECK(hit_out == 0, "output back low")
    `FINISH
  end
  initial begin #1000000; failures++; $display("watchdog"); `FINISH end
endmodule
