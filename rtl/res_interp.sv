// res_interp: behavioural model of the resistive interpolation stage (not
// synthesizable).
//
// Resistive voltage dividers between neighbouring DLL taps give NINT phases
// per tap, so 64 taps x 4 = 256 phases 3.05 ps apart. Phase NINT*i+j follows
// tap i by j * TAP_PS / NINT. Mismatch and RC loading of the real divider are
// not modelled.
module res_interp #(
  parameter int  NTAPS  = 64,
  parameter int  NINT   = 4,
  parameter real TAP_PS = 781.25 / 64
) (
  input  logic                  [NTAPS-1:0] tap,
  output logic [NTAPS*NINT-1:0]             phase
);
  timeunit 1ps; timeprecision 1fs;

  for (genvar i = 0; i < NTAPS; i++) begin : g_tap
    for (genvar j = 0; j < NINT; j++) begin : g_int
      localparam real D = j * TAP_PS / NINT;
      initial begin
        phase[NINT*i+j] = 1'b0;
        forever begin @(posedge tap[i]); #(D) phase[NINT*i+j] = 1'b1; end
      end
      initial forever begin @(negedge tap[i]); #(D) phase[NINT*i+j] = 1'b0; end
    end
  end
endmodule
