// tb_picotdc_top: end-to-end test of the whole TDC with 64 channels and 64
// phases per clock period (12 ps steps; the default is 256) to keep the run short. Hits are analog-timed pulses; the chip is
// configured over I2C and its four byte ports are decoded back into frames.
// Each phase exercises one mechanism and is counted:
//   untriggered format A (leading and trailing edges, 3 ps bins), glitch
//   filter, 12 ps bins, triggered readout with two headers, relative times
//   and overlapping windows, single-port readout with group separators and
//   leading+TOT frames triggered by channel 0, pulse generator, derandomizer
//   overflow seen in the status bytes, slower port byte rate.
// Times are checked against the true pulse times: every measured time must
// sit at one constant offset from the true time (in 3.05 ps bins), within a
// small tolerance, and widths must match the pulse widths.
`include "tb/tb_util.svh"
module tb_picotdc_top;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  localparam int NPH_TB = 64;
`include "tb/tb_picotdc_body.svh"
  picotdc_top #(.NPH(NPH_TB)) dut (
    .clk, .rst, .hit, .trigger, .event_rst, .bx_rst, .scl, .sda_in(sda), .sda_oe,
    .port_data, .port_byte_en, .port_frame_start);
endmodule
