// tb_readout_ctrl: frame sequence of one port. Triggered: headers, group
// separators (single-port), group data, trailer with the data frame count.
// Untriggered: data with a separator at each group change. A port serving no
// group drops its events.
`include "tb/tb_util.svh"
module tb_readout_ctrl;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ce, evt_push, evt_full, out_valid, out_ready;
  cfg_t cfg;
  logic [3:0] group_mask, g_valid, g_ready, show;
  event_t evt_in;
  item_t g_item [4];
  logic [31:0] out_word;
  int unsigned cyc;
  item_t src [4][$];
  logic [31:0] got[$], exp_q[$];
  readout_ctrl dut (.*);
  always #390.625 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign ce = (cyc % 4 == 3);
  always_comb for (int g = 0; g < 4; g++) begin
    g_valid[g] = show[g] && (src[g].size() > 0);
    g_item[g]  = (src[g].size() > 0) ? src[g][0] : '0;
  end
  always @(posedge clk) if (!rst && ce) begin
    for (int g = 0; g < 4; g++) if (g_valid[g] && g_ready[g]) void'(src[g].pop_front());
    if (out_valid && out_ready) got.push_back(out_word);
  end
  task automatic push_evt(event_t e);
    @(negedge clk); while (!ce) begin @(posedge clk); #1; end
    evt_in = e; evt_push = 1; @(posedge clk); #1; evt_push = 0;
  endtask
  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); show = 4'($urandom); out_ready = ($urandom_range(3) != 0);
    end
  endtask
  initial begin
    rst = 1; evt_push = 0; evt_in = '0; out_ready = 0; show = 0;
    cfg = '0; cfg.triggered = 1; cfg.two_headers = 1; group_mask = 4'b0001;
    repeat (4) @(posedge clk); rst = 0;
    // port of group 0 in four-port mode, two events
    for (int e = 0; e < 2; e++) begin
      automatic event_t ev = '{event_id: 16'(100 + e), bx_id: 12'(7 * e), trig_time: 18'(1000 * e)};
      exp_q.push_back({T_HEADER1, ev.event_id, ev.bx_id});
      exp_q.push_back({T_HEADER2, 10'b0, ev.trig_time});
      for (int k = 0; k < e + 2; k++) begin
        src[0].push_back('{eoe: 1'b0, word: 32'(e * 16 + k)});
        exp_q.push_back(32'(e * 16 + k));
      end
      src[0].push_back('{eoe: 1'b1, word: '0});
      exp_q.push_back({T_TRAILER, ev.event_id[11:0], 16'(e + 2)});
      push_evt(ev);
    end
    run(600);
    `CHECK(got == exp_q, "four-port triggered frames")
    // single-port: all groups, separators, one header
    got.delete(); exp_q.delete();
    cfg.two_headers = 0; cfg.single_port = 1; group_mask = 4'b1111;
    begin
      automatic event_t ev = '{event_id: 16'd5, bx_id: 12'd9, trig_time: 18'd3};
      automatic int nd = 0;
      exp_q.push_back({T_HEADER1, ev.event_id, ev.bx_id});
      for (int g = 0; g < 4; g++) begin
        exp_q.push_back({T_SEPARATOR, 26'b0, 2'(g)});
        for (int k = 0; k < g; k++) begin
          src[g].push_back('{eoe: 1'b0, word: 32'(g * 100 + k)});
          exp_q.push_back(32'(g * 100 + k)); nd++;
        end
        src[g].push_back('{eoe: 1'b1, word: '0});
      end
      exp_q.push_back({T_TRAILER, ev.event_id[11:0], 16'(nd)});
      push_evt(ev);
    end
    run(600);
    `CHECK(got == exp_q, "single-port triggered frames")
    // a port with no groups drops events
    got.delete(); group_mask = 4'b0000;
    push_evt('{event_id: 16'd1, bx_id: 12'd1, trig_time: 18'd1});
    run(100);
    `CHECK(got.size() == 0 && !evt_full && dut.eq_cnt == 0, "unused port drops events")
    // untriggered single-port
    got.delete(); cfg.triggered = 0; group_mask = 4'b1111;
    for (int g = 0; g < 4; g++)
      for (int k = 0; k < 3; k++) src[g].push_back('{eoe: 1'b0, word: {16'(g), 16'(k)}});
    run(800);
    begin
      automatic int nsep = 0, ndata = 0;
      automatic int cur = -1;
      foreach (got[j]) begin
        if (got[j][31:28] == T_SEPARATOR) begin nsep++; cur = int'(got[j][1:0]); end
        else begin
          ndata++;
          `CHECK(cur == int'(got[j][31:16]), "data follows its group separator")
        end
      end
      `CHECK(ndata == 12 && nsep >= 4, "untriggered frames and separators")
    end
    `FINISH
  end
  initial begin #(781.25 * 20000); failures++; $display("watchdog"); `FINISH end
endmodule
