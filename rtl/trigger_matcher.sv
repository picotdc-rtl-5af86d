// trigger_matcher: per-channel trigger matching and frame formatting (320 MHz).
//
// Triggered mode: each trigger has a time T (18-bit counter value). Its
// window starts at S = T - latency and lasts `window` 1.28 GHz cycles.
// Triggers wait in a small per-channel queue and are served in order. For the
// oldest trigger the matcher scans the channel buffer from its oldest entry:
// entries before S are dropped for good (every later window starts later),
// entries inside the window are sent and kept (an overlapping later window
// may need them again), and the first entry after the window ends the event.
// When the buffer runs out, the event ends once the time counter is MARGIN
// cycles past the window end, so that every hit inside it has had time to
// arrive. Each channel's part of an event closes with an eoe item. Without a
// pending trigger, entries older than latency + SLACK cycles are dropped.
// All comparisons are differences modulo 2^18 (naturally overflowing
// counter), valid while they stay below 2^17 cycles (102 us).
//
// Untriggered mode: every entry is sent as it comes, with absolute time.
//
// Frames: format A {0, channel[3:0], edge, time[25:0]}; format B
// {0, channel[3:0], leading[15:0], tot[10:0]} or {.., leading[18:0],
// tot[7:0]}, where leading and TOT are the full values shifted right by a
// programmable amount, the leading field truncated and the TOT field
// saturated (saturation is this design's choice). With `relative`, times are
// counted from the window start S.
//
// Handshake: out_valid/out_ready, transfers in cycles with ce high.
module trigger_matcher
  import tdc_pkg::*;
#(
  parameter int BUF_DEPTH = 64,
  parameter int TQ_DEPTH  = 8,
  parameter int MARGIN    = 48,
  parameter int SLACK     = 16
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         ce,
  input  cfg_t                         cfg,
  input  logic [3:0]                   ch_id,
  input  cnt_t                         now,
  // trigger broadcast
  input  logic                         trig_push,
  input  cnt_t                         trig_time,
  output logic                         trig_full,
  // channel buffer
  input  logic [$clog2(BUF_DEPTH):0]   buf_count,
  input  chan_word_t                   buf_data,
  output logic [$clog2(BUF_DEPTH)-1:0] buf_off,
  output logic                         buf_pop,
  // frames
  output logic                         out_valid,
  output item_t                        out_item,
  input  logic                         out_ready
);
  timeunit 1ps; timeprecision 1fs;

  localparam int BW = $clog2(BUF_DEPTH);
  localparam int QW = $clog2(TQ_DEPTH);

  // ---- trigger queue ----
  cnt_t          tq [TQ_DEPTH];
  logic [QW-1:0] tq_rp, tq_wp;
  logic [QW:0]   tq_cnt;
  logic          tq_pop;

  assign trig_full = (tq_cnt == (QW+1)'(TQ_DEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      tq_rp  <= '0;
      tq_wp  <= '0;
      tq_cnt <= '0;
    end else if (ce) begin
      if (trig_push && !trig_full) begin
        tq[tq_wp] <= trig_time;
        tq_wp     <= (tq_wp == QW'(TQ_DEPTH-1)) ? '0 : tq_wp + 1'b1;
      end
      if (tq_pop) tq_rp <= (tq_rp == QW'(TQ_DEPTH-1)) ? '0 : tq_rp + 1'b1;
      tq_cnt <= tq_cnt + (QW+1)'(trig_push && !trig_full) - (QW+1)'(tq_pop);
    end
  end

  // ---- matching ----
  logic [BW:0] scan;
  logic        slot_free;
  logic        have_trig;
  cnt_t        win_start;
  cnt_t        d_hit, d_now, age;
  logic        have_hit;
  logic        emit_data, emit_eoe, do_pop, scan_inc;
  tdc_time_t   tv;
  logic [31:0] word;

  assign slot_free = !out_valid || out_ready;
  assign have_trig = (tq_cnt != '0);
  assign win_start = tq[tq_rp] - cfg.latency;
  assign have_hit  = (scan < buf_count);
  assign buf_off   = scan[BW-1:0];
  assign d_hit     = buf_data.t[TIME_W-1 -: CNT_W] - win_start;
  assign d_now     = now - win_start;
  assign age       = now - buf_data.t[TIME_W-1 -: CNT_W];

  always_comb begin
    emit_data = 1'b0;
    emit_eoe  = 1'b0;
    do_pop    = 1'b0;
    scan_inc  = 1'b0;
    tq_pop    = 1'b0;
    if (ce && slot_free) begin
      if (!cfg.triggered) begin
        if (buf_count != '0) begin
          emit_data = 1'b1;
          do_pop    = 1'b1;
        end
      end else if (have_trig) begin
        if (have_hit) begin
          if (d_hit[CNT_W-1]) begin            // before the window
            if (scan == '0) do_pop = 1'b1;
            else            scan_inc = 1'b1;
          end else if (d_hit < cfg.window) begin
            emit_data = 1'b1;
            scan_inc  = 1'b1;
          end else begin                       // after the window
            emit_eoe = 1'b1;
            tq_pop   = 1'b1;
          end
        end else if (d_now >= cfg.window + cnt_t'(MARGIN)) begin
          emit_eoe = 1'b1;
          tq_pop   = 1'b1;
        end
      end else if (buf_count != '0 && !age[CNT_W-1] &&
                   age >= cfg.latency + cnt_t'(SLACK)) begin
        do_pop = 1'b1;                         // too old for any trigger
      end
    end
  end

  assign buf_pop = do_pop;

  // TOT shifted right by sh and saturated to w bits
  function automatic logic [31:0] sat_shift(tdc_time_t v, logic [2:0] sh, int w);
    tdc_time_t   s;
    logic [31:0] m;
    s = v >> sh;
    m = (32'd1 << w) - 1;
    return (32'(s) > m) ? m : 32'(s);
  endfunction

  logic [31:0] tot8, tot11;
  tdc_time_t   lead;

  always_comb begin
    lead  = '0;
    tot8  = sat_shift(buf_data.tot, cfg.tot_shift, 8);
    tot11 = sat_shift(buf_data.tot, cfg.tot_shift, 11);
    tv = (cfg.triggered && cfg.relative) ? buf_data.t - {win_start, FINE_W'(0)} : buf_data.t;
    lead = tv >> cfg.lead_shift;
    if (!cfg.tot_mode) begin
      word = {1'b0, ch_id, buf_data.edge_t, tv};
    end else begin
      if (cfg.tot_fmt19) word = {1'b0, ch_id, lead[18:0], tot8[7:0]};
      else               word = {1'b0, ch_id, lead[15:0], tot11[10:0]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      scan      <= '0;
      out_valid <= 1'b0;
      out_item  <= '0;
    end else if (ce) begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (emit_data) begin
        out_valid <= 1'b1;
        out_item  <= '{eoe: 1'b0, word: word};
      end else if (emit_eoe) begin
        out_valid <= 1'b1;
        out_item  <= '{eoe: 1'b1, word: '0};
      end
      if (tq_pop)        scan <= '0;
      else if (scan_inc) scan <= scan + 1'b1;
    end
  end
endmodule
