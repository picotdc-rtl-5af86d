// tb_group_merge: triggered mode keeps channel order within an event and
// sends one group end marker; untriggered mode passes every frame.
`include "tb/tb_util.svh"
module tb_group_merge;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ce, triggered, out_valid, out_ready;
  logic [15:0] in_valid, in_ready;
  item_t in_item [16];
  item_t out_item;
  int unsigned cyc;
  item_t src [16][$];
  item_t got[$], exp_q[$];
  group_merge dut (.*);
  always #390.625 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign ce = (cyc % 4 == 3);
  // channel sources: present the head of each queue at random
  logic [15:0] show;
  always_comb for (int c = 0; c < 16; c++) begin
    in_valid[c] = show[c] && (src[c].size() > 0);
    in_item[c]  = (src[c].size() > 0) ? src[c][0] : '0;
  end
  always @(posedge clk) if (!rst && ce) begin
    for (int c = 0; c < 16; c++) if (in_valid[c] && in_ready[c]) void'(src[c].pop_front());
    if (out_valid && out_ready) got.push_back(out_item);
  end
  initial begin
    rst = 1; triggered = 1; out_ready = 0; show = '0;
    repeat (4) @(posedge clk); rst = 0;
    // three events
    for (int e = 0; e < 3; e++) begin
      for (int c = 0; c < 16; c++) begin
        automatic int n = $urandom_range(3);
        for (int k = 0; k < n; k++) begin
          automatic item_t it = '{eoe: 1'b0, word: {8'(e), 8'(c), 16'(k)}};
          src[c].push_back(it); exp_q.push_back(it);
        end
        src[c].push_back('{eoe: 1'b1, word: '0});
      end
      exp_q.push_back('{eoe: 1'b1, word: '0});
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk); show = 16'($urandom); out_ready = ($urandom_range(3) != 0);
    end
    `CHECK(got.size() == exp_q.size(), "triggered item count")
    foreach (exp_q[k]) if (k < got.size()) `CHECK(got[k] == exp_q[k], "triggered order")
    // untriggered
    triggered = 0; got.delete();
    for (int c = 0; c < 16; c++)
      for (int k = 0; k < 3; k++) src[c].push_back('{eoe: 1'b0, word: {16'(c), 16'(k)}});
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk); show = 16'($urandom); out_ready = ($urandom_range(3) != 0);
    end
    `CHECK(got.size() == 48, "untriggered: all frames passed")
    for (int c = 0; c < 16; c++) begin
      automatic int k = 0;
      foreach (got[j]) if (got[j].word[31:16] == 16'(c)) begin
        `CHECK(got[j].word[15:0] == 16'(k), "untriggered per-channel order")
        k++;
      end
    end
    `FINISH
  end
  initial begin #(781.25 * 20000); failures++; $display("watchdog"); `FINISH end
endmodule
