// pulse_gen: configurable test pulse generator.
//
// Produces pulses of `width` 1.28 GHz cycles every `period` cycles while
// enabled; the top feeds them into the hit inputs of the channels selected in
// the configuration, in place of the external hits. The document only names
// the generator; period/width programming in clock cycles is this design's
// choice (a width of 0 or a width not below the period gives no pulses).
module pulse_gen (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [15:0] period,
  input  logic [15:0] width,
  output logic        pulse
);
  timeunit 1ps; timeprecision 1fs;

  logic [15:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      cnt   <= '0;
      pulse <= 1'b0;
    end else begin
      cnt   <= (cnt + 1'b1 >= period) ? '0 : cnt + 1'b1;
      pulse <= (cnt < width) && (width < period);
    end
  end
endmodule
