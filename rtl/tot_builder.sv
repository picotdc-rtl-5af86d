// tot_builder: chooses which edges of a channel are recorded.
//
// Format A (tot_mode=0): leading and/or trailing edges are passed on as they
// are, each with its own time (lead_en, trail_en).
// Format B (tot_mode=1): a leading edge is held until the next trailing edge;
// then one entry with the leading time and the time over threshold
// (trailing - leading, modulo 2^26) is written. A second leading edge before
// a trailing edge replaces the first; a trailing edge with no leading edge is
// ignored (both this design's choice).
//
// Runs in the 320 MHz cycles (ce): takes at most one hit from the
// derandomizer and writes at most one entry to the channel buffer. An entry
// that finds the buffer full is dropped and counted in `lost`.
module tot_builder
  import tdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  cfg_t        cfg,
  input  logic        in_valid,
  input  hit_t        in_hit,
  output logic        in_rd,
  output logic        out_push,
  output chan_word_t  out_word,
  input  logic        out_full,
  output logic [15:0] lost
);
  timeunit 1ps; timeprecision 1fs;

  logic      have_lead;
  tdc_time_t lead_t;

  assign in_rd = in_valid;   // never stalls: one hit per 320 MHz cycle

  always_comb begin
    out_push = 1'b0;
    out_word = '0;
    if (in_valid) begin
      if (!cfg.tot_mode) begin
        out_push = in_hit.edge_t ? cfg.trail_en : cfg.lead_en;
        out_word = '{edge_t: in_hit.edge_t, t: in_hit.t, tot: '0};
      end else if (in_hit.edge_t && have_lead) begin
        out_push = 1'b1;
        out_word = '{edge_t: 1'b0, t: lead_t, tot: in_hit.t - lead_t};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      have_lead <= 1'b0;
      lead_t    <= '0;
      lost      <= '0;
    end else if (ce) begin
      if (in_valid && cfg.tot_mode) begin
        if (!in_hit.edge_t) begin
          have_lead <= 1'b1;
          lead_t    <= in_hit.t;
        end else begin
          have_lead <= 1'b0;
        end
      end
      if (out_push && out_full && lost != '1) lost <= lost + 1'b1;
    end
  end
endmodule
