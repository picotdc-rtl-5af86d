// trigger_ctrl: accepts triggers and hands them to the channels and ports.
//
// A trigger is the rising edge of the synchronous trigger input or, when
// configured, a leading edge on TDC channel 0; it is time-stamped with the
// 18-bit time counter (channel 0 triggers with the hit's own counter time).
// The trigger is held until the next 320 MHz cycle and then broadcast to all
// channel matchers and readout ports with its event ID (counted per accepted
// trigger, cleared by the event reset) and BX ID. If any queue is full, or a
// second trigger comes before the first is broadcast, the trigger is lost and
// counted; the event ID then does not advance. These rules are this design's
// choice.
module trigger_ctrl
  import tdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  cfg_t        cfg,
  input  cnt_t        now,
  input  logic        trigger,
  input  logic        event_rst,
  input  logic        ch0_valid,
  input  hit_t        ch0_hit,
  input  logic [11:0] bx_id,
  input  logic        busy,        // some trigger or event queue is full
  output logic        trig_push,   // one ce cycle
  output event_t      trig_event,
  output logic [15:0] lost
);
  timeunit 1ps; timeprecision 1fs;

  logic   trig_q;
  logic   pend;
  cnt_t   pend_time;
  logic   new_trig;
  cnt_t   new_time;
  logic [15:0] event_id;

  always_comb begin
    new_trig = 1'b0;
    new_time = now;
    if (cfg.triggered) begin
      if (trigger && !trig_q) new_trig = 1'b1;
      if (cfg.trig_ch0 && ch0_valid && !ch0_hit.edge_t) begin
        new_trig = 1'b1;
        new_time = ch0_hit.t[TIME_W-1 -: CNT_W];
      end
    end
  end

  assign trig_push  = ce && pend && !busy;
  assign trig_event = '{event_id: event_id, bx_id: bx_id, trig_time: pend_time};

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_q    <= 1'b0;
      pend      <= 1'b0;
      pend_time <= '0;
      event_id  <= '0;
      lost      <= '0;
    end else begin
      trig_q <= trigger;
      if (ce && pend) begin
        pend <= 1'b0;
        if (!busy) event_id <= event_id + 1'b1;
        else if (lost != '1) lost <= lost + 1'b1;
      end
      if (new_trig) begin
        if (pend && !ce) begin
          if (lost != '1) lost <= lost + 1'b1;
        end else begin
          pend      <= 1'b1;
          pend_time <= new_time;
        end
      end
      if (event_rst) event_id <= '0;
    end
  end
endmodule
