// capture_ffs: the hit capture flip-flops of one channel.
//
// Each of the NPH clock phases samples the (asynchronous) hit with a fast
// master/slave flip-flop, followed by a standard-cell flip-flop on the same
// phase that gives the first sample a full period to resolve metastability.
// A third register on the 1.28 GHz clock brings all NPH second-stage values
// into the digitizer clock domain, so `sample` holds one cycle's snapshot of
// the hit taken at NPH instants 3.05 ps apart (the "asynchronous" capture
// scheme: the event is data, the delayed references are clocks).
//
// Timing: all phases must rise strictly after the clk edge and before the
// next one. The samples taken in the phase edges following clk edge k appear
// on `sample` after clk edge k+2.
//
// The two flip-flops per phase follow the document; the retiming register is
// this design's choice.
module capture_ffs #(
  parameter int NPH = 256
) (
  input  logic           clk,     // 1.28 GHz digitizer clock
  input  logic [NPH-1:0] phase,   // interpolated DLL phases
  input  logic           hit,     // filtered hit
  output logic [NPH-1:0] sample   // phase samples, clk domain
);
  timeunit 1ps; timeprecision 1fs;

  logic [NPH-1:0] sc_q;    // standard-cell flip-flop outputs

  for (genvar i = 0; i < NPH; i++) begin : g_ph
    logic ms_q;            // master/slave capture flip-flop
    logic sc;              // standard-cell metastability flip-flop
    always_ff @(posedge phase[i]) begin
      ms_q <= hit;
      sc   <= ms_q;
    end
    assign sc_q[i] = sc;
  end

  always_ff @(posedge clk) sample <= sc_q;
endmodule
