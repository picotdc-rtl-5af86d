// tb_picotdc_full: the end-to-end test of tb_picotdc_top with the design at
// its default size: 64 channels, 64 DLL taps x 4 interpolation steps = 256
// phases (3.05 ps), 64-entry channel buffers. See tb_picotdc_body.svh for the
// phases of the test and the mechanisms it counts.
`include "tb/tb_util.svh"
module tb_picotdc_full;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  localparam int NPH_TB = 256;
`include "tb/tb_picotdc_body.svh"
  picotdc_top dut (
    .clk, .rst, .hit, .trigger, .event_rst, .bx_rst, .scl, .sda_in(sda), .sda_oe,
    .port_data, .port_byte_en, .port_frame_start);
endmodule
