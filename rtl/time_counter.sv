// time_counter: the naturally overflowing time counter.
//
// An 18-bit counter on the 1.28 GHz clock: the low 5 bits are the medium
// count (32 cycles = one 25 ns period of the 40 MHz reference), the upper 13
// bits the coarse count (8192 x 25 ns = 204.8 us). It wraps without any
// special case; trigger matching and TOT use differences modulo 2^18. The
// synchronous reset aligns it with the reference.
//
// It also gives the clock enables of the slower parts of the chip: ce_320 is
// high in one of every four cycles (the 320 MHz buffering, triggering and
// readout logic) and ce_40 in one of every 32 (the 40 MHz BX-ID counter).
// Clock enables in place of divided clocks are this design's choice.
module time_counter
  import tdc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  output cnt_t cnt,
  output logic ce_320,
  output logic ce_40
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign ce_320 = (cnt[1:0] == 2'b11);
  assign ce_40  = (cnt[MED_W-1:0] == '1);
endmodule
