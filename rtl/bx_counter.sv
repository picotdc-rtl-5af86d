// bx_counter: bunch-crossing identifier for event headers.
//
// Counts 40 MHz periods (ce_40) from 0 to a programmable maximum and wraps,
// so its period can match any machine cycle (3564 bunches at the LHC, for
// instance). The BX reset input sets it back to 0 at the start of a machine
// cycle. Its width is this design's choice.
module bx_counter #(
  parameter int W = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce_40,
  input  logic         bx_rst,
  input  logic [W-1:0] bx_max,
  output logic [W-1:0] bx_id
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk) begin
    if (rst || bx_rst)  bx_id <= '0;
    else if (ce_40)     bx_id <= (bx_id >= bx_max) ? '0 : bx_id + 1'b1;
  end
endmodule
