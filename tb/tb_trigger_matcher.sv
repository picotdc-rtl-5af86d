// tb_trigger_matcher: random hits and triggers (with overlapping windows)
// through a channel buffer and the matcher; the frame sequence is compared
// with a reference built from the full hit list. Three runs: triggered with
// absolute format A times, triggered relative format B, untriggered.
`include "tb/tb_util.svh"
module tb_trigger_matcher;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ce;
  cfg_t cfg;
  cnt_t now;
  logic trig_push, trig_full;
  cnt_t trig_time;
  logic push, buf_pop, buf_full;
  chan_word_t wdata, buf_data;
  logic [6:0] buf_count;
  logic [5:0] buf_off;
  logic out_valid, out_ready;
  item_t out_item;
  int unsigned cyc;

  channel_buffer #(.DEPTH(64)) u_buf (
    .clk, .rst, .ce, .push, .wdata, .pop(buf_pop), .rd_off(buf_off),
    .rd_data(buf_data), .count(buf_count), .full(buf_full));
  trigger_matcher dut (
    .clk, .rst, .ce, .cfg, .ch_id(4'd9), .now, .trig_push, .trig_time, .trig_full,
    .buf_count, .buf_data, .buf_off, .buf_pop, .out_valid, .out_item, .out_ready);

  always #390.625 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign now = cnt_t'(cyc);
  assign ce  = (cyc % 4 == 3);

  chan_word_t hits[$];
  cnt_t       trigs[$];
  item_t      got[$], exp_q[$];
  int         n_overlap;

  function automatic logic [31:0] fmt(chan_word_t h, cnt_t s);
    tdc_time_t tv;
    logic [31:0] tot;
    tv = (cfg.triggered && cfg.relative) ? h.t - {s, 8'h00} : h.t;
    if (!cfg.tot_mode) return {1'b0, 4'd9, h.edge_t, tv};
    tot = 32'(h.tot >> cfg.tot_shift);
    if (tot > 2047) tot = 2047;
    tv = tv >> cfg.lead_shift;
    return {1'b0, 4'd9, tv[15:0], tot[10:0]};
  endfunction

  always @(posedge clk) if (!rst && ce && out_valid && out_ready) got.push_back(out_item);

  task automatic run(int ncyc);
    got.delete(); hits.delete(); trigs.delete(); exp_q.delete();
    rst = 1; push = 0; trig_push = 0; wdata = '0; trig_time = '0;
    repeat (4) @(posedge clk); rst = 0;
    for (int i = 0; i < ncyc; i++) begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      push = 0; trig_push = 0;
      if (ce && i < ncyc - 600) begin
        if ($urandom_range(3) == 0) begin
          push  = 1;
          wdata = '{edge_t: 1'($urandom), t: {now - 18'd3, 8'($urandom)},
                    tot: tdc_time_t'($urandom_range(5000))};
          hits.push_back(wdata);
        end
        if (cfg.triggered && $urandom_range(40) == 0 && !trig_full) begin
          trig_push = 1; trig_time = now;
          trigs.push_back(now);
        end
      end
    end
    @(negedge clk); push = 0; trig_push = 0; out_ready = 1;
    repeat (400) @(posedge clk);
    // reference
    if (cfg.triggered) begin
      foreach (trigs[k]) begin
        automatic cnt_t s = trigs[k] - cfg.latency;
        if (k > 0 && trigs[k] - trigs[k-1] < cfg.window) n_overlap++;
        foreach (hits[j]) begin
          automatic cnt_t d = hits[j].t[25:8] - s;
          if (d < cfg.window) exp_q.push_back('{eoe: 1'b0, word: fmt(hits[j], s)});
        end
        exp_q.push_back('{eoe: 1'b1, word: '0});
      end
    end else begin
      foreach (hits[j]) exp_q.push_back('{eoe: 1'b0, word: fmt(hits[j], '0)});
    end
    `CHECK(got.size() == exp_q.size(), "number of output items")
    for (int k = 0; k < exp_q.size() && k < got.size(); k++)
      `CHECK(got[k] == exp_q[k], "output item")
    `CHECK(buf_count == '0 || !cfg.triggered, "old hits discarded")
  endtask

  initial begin
    n_overlap = 0;
    cfg = '0; cfg.triggered = 1; cfg.latency = 18'd120; cfg.window = 18'd60;
    run(12000);
    cfg.relative = 1; cfg.tot_mode = 1; cfg.lead_shift = 3'd1; cfg.tot_shift = 3'd1;
    cfg.window = 18'd200;
    run(12000);
    cfg = '0;
    run(6000);
    `CHECK(n_overlap > 0, "overlapping trigger windows exercised")
    `FINISH
  end
  initial begin #(781.25 * 60000); failures++; $display("watchdog"); `FINISH end
endmodule
