// hit_decoder: turns one cycle of phase samples into a time-stamped edge.
//
// The hit may change at most once per 1.28 GHz cycle (the glitch filter
// ensures it). An edge occurred in a cycle when its last sample differs from
// the last sample of the cycle before; the new level gives the edge type
// (0->1 leading, 1->0 trailing). The fine time is the number of samples in
// the cycle still at the old level, which equals the edge position in a clean
// thermometer code and tolerates bubbles. In 12 ps mode only every NINT-th
// sample (the DLL taps themselves) is counted and the interpolation bits are
// zero. The fine time is appended to the time counter, corrected for the
// capture latency CAPT_LAT, to give the 26-bit time.
//
// Output: `hit_valid` for one cycle with `hit_o`, one clk after the samples.
// Counting samples is this design's choice of decoder.
module hit_decoder
  import tdc_pkg::*;
#(
  parameter int NPH      = 256,
  parameter int NINT     = 4,
  parameter int CAPT_LAT = 2
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [NPH-1:0] sample,
  input  cnt_t           now,
  input  logic           fine_mode,
  output logic           hit_valid,
  output hit_t           hit_o
);
  timeunit 1ps; timeprecision 1fs;

  // with fewer than 256 phases the fine count is scaled to 8 bits
  localparam int SCALE = FINE_W - $clog2(NPH);

  logic                 last_q;
  logic                 is_edge;
  logic                 new_lvl;
  logic [FINE_W:0]      n_old;
  logic [FINE_W-1:0]    fine;

  assign new_lvl = sample[NPH-1];
  assign is_edge = (new_lvl != last_q);

  always_comb begin
    n_old = '0;
    for (int i = 0; i < NPH; i++) begin
      if (fine_mode || (i % NINT == 0))
        n_old = n_old + (FINE_W+1)'(sample[i] != new_lvl);
    end
    fine = fine_mode ? FINE_W'(n_old << SCALE) : FINE_W'((n_old * NINT) << SCALE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last_q    <= 1'b0;
      hit_valid <= 1'b0;
      hit_o     <= '0;
    end else begin
      last_q    <= new_lvl;
      hit_valid <= is_edge;
      hit_o     <= '{edge_t: ~new_lvl, t: {now - cnt_t'(CAPT_LAT), fine}};
    end
  end
endmodule
