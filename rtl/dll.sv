// dll: behavioural model of the 64-tap delay-locked line (not synthesizable).
//
// The analog DLL delays the 1.28 GHz clock through 64 delay buffers and locks
// the total delay to one clock period, so neighbouring taps are 12.2 ps apart
// (781.25 ps / 64). This model shows the locked state only: tap i rises and
// falls OFFSET_PS + i * CLK_PERIOD_PS / NTAPS after the clock. The offset
// stands for the clock distribution delay; it keeps every phase strictly
// inside one clock period. Calibration and the per-tap delay adjustment of
// the real line are not modelled.
module dll #(
  parameter int  NTAPS         = 64,
  parameter real CLK_PERIOD_PS = 781.25,
  parameter real OFFSET_PS     = 1.5
) (
  input  logic             clk,
  output logic [NTAPS-1:0] tap
);
  timeunit 1ps; timeprecision 1fs;

  localparam real TAP_PS = CLK_PERIOD_PS / NTAPS;

  for (genvar i = 0; i < NTAPS; i++) begin : g_tap
    localparam real D = OFFSET_PS + i * TAP_PS;
    initial begin
      tap[i] = 1'b0;
      forever begin @(posedge clk); #(D) tap[i] = 1'b1; end
    end
    initial forever begin @(negedge clk); #(D) tap[i] = 1'b0; end
  end
endmodule
