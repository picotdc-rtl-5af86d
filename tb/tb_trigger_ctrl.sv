// tb_trigger_ctrl: external and channel-0 triggers, time stamps, event ID
// and event reset, and losses when busy or when triggers come too close.
`include "tb/tb_util.svh"
module tb_trigger_ctrl;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ce, trigger, event_rst, ch0_valid, busy, trig_push;
  cfg_t cfg;
  cnt_t now;
  hit_t ch0_hit;
  logic [11:0] bx_id;
  event_t trig_event;
  logic [15:0] lost;
  int unsigned cyc;
  event_t ev[$];
  trigger_ctrl dut (.*);
  always #390.625 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign now = cnt_t'(cyc);
  assign ce  = (cyc % 4 == 3);
  assign bx_id = 12'(cyc / 32);
  always @(posedge clk) if (!rst && trig_push) ev.push_back(trig_event);
  task automatic pulse_trig(output cnt_t t);
    @(negedge clk); trigger = 1; t = now; @(negedge clk); trigger = 0;
  endtask
  cnt_t t1, t2, t3;
  initial begin
    rst = 1; trigger = 0; event_rst = 0; ch0_valid = 0; ch0_hit = '0; busy = 0;
    cfg = '0; cfg.triggered = 1;
    repeat (4) @(posedge clk); rst = 0;
    pulse_trig(t1); repeat (10) @(posedge clk);
    pulse_trig(t2); repeat (10) @(posedge clk);
    `CHECK(ev.size() == 2, "two triggers broadcast")
    `CHECK(ev[0].trig_time == t1 && ev[1].trig_time == t2, "trigger time stamps")
    `CHECK(ev[0].event_id == 0 && ev[1].event_id == 1, "event IDs count up")
    // trigger from channel 0 leading edge carries the hit's own time
    cfg.trig_ch0 = 1;
    @(negedge clk); ch0_valid = 1; ch0_hit = '{edge_t: 0, t: {18'd12345, 8'd77}};
    @(negedge clk); ch0_valid = 0;
    @(negedge clk); ch0_valid = 1; ch0_hit = '{edge_t: 1, t: {18'd20000, 8'd1}};  // trailing: no trigger
    @(negedge clk); ch0_valid = 0;
    repeat (10) @(posedge clk);
    `CHECK(ev.size() == 3 && ev[2].trig_time == 18'd12345, "channel 0 trigger")
    // busy: trigger lost, event ID unchanged
    busy = 1; pulse_trig(t3); repeat (10) @(posedge clk); busy = 0;
    `CHECK(ev.size() == 3 && lost == 1, "trigger lost while busy")
    pulse_trig(t3); repeat (10) @(posedge clk);
    `CHECK(ev.size() == 4 && ev[3].event_id == 3, "event ID skips lost trigger")
    // event reset
    @(negedge clk); event_rst = 1; @(negedge clk); event_rst = 0;
    pulse_trig(t3); repeat (10) @(posedge clk);
    `CHECK(ev.size() == 5 && ev[4].event_id == 0, "event reset")
    `CHECK(ev[4].bx_id >= 12'(t3 / 32) && ev[4].bx_id <= 12'((t3 + 6) / 32), "bx id attached")
    // untriggered: no triggers
    cfg.triggered = 0; pulse_trig(t3); repeat (10) @(posedge clk);
    `CHECK(ev.size() == 5, "no triggers when untriggered")
    `FINISH
  end
  initial begin #(781.25 * 5000); failures++; $display("watchdog"); `FINISH end
endmodule
