// glitch_filter: behavioural model of the programmable hit glitch filter (not
// synthesizable).
//
// The filter sits after the hit receiver. A level change reaches the output
// only if the input then stays at that level for the filter time, so pulses
// and gaps shorter than it are removed and the output follows the input with
// a fixed delay equal to the filter time. This is the inertial delay of a
// continuous assignment: one delayed copy of the input exists per filter
// setting and filt_code selects one. The filter time is
// (filt_code + 1) * STEP_PS: code 0 gives one 1.28 GHz period (781 ps, so
// that at most one edge reaches the capture flip-flops per cycle), code 12
// gives 10.2 ns for filtering e.g. oscillations. The step size and the code
// are this design's choice; the circuit of the real filter is not modelled.
module glitch_filter #(
  parameter real STEP_PS = 781.25
) (
  input  logic       hit_in,
  input  logic [3:0] filt_code,
  output logic       hit_out
);
  timeunit 1ps; timeprecision 1fs;

  wire [15:0] dly;

  for (genvar k = 0; k < 16; k++) begin : g_dly
    assign #((k + 1) * STEP_PS) dly[k] = hit_in;
  end

  assign hit_out = dly[filt_code];
endmodule
