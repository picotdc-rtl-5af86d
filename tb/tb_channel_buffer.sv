// tb_channel_buffer: FIFO order, look-ahead reads, full flag, wrap-around.
`include "tb/tb_util.svh"
module tb_channel_buffer;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ce, push, pop, full;
  chan_word_t wdata, rd_data;
  logic [3:0] rd_off;
  logic [4:0] count;
  chan_word_t q[$];
  channel_buffer #(.DEPTH(16)) dut (.*);
  always #390.625 clk = ~clk;
  initial begin
    rst = 1; ce = 1; push = 0; pop = 0; wdata = '0; rd_off = '0;
    repeat (2) @(posedge clk); rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      // check look-ahead read at a random offset
      if (q.size() > 0) begin
        rd_off = 4'($urandom_range(q.size() - 1)); #1;
        `CHECK(rd_data == q[rd_off], "look-ahead read")
      end
      `CHECK(count == 5'(q.size()), "count")
      `CHECK(full == (q.size() == 16), "full flag")
      push  = ($urandom_range(2) != 0);
      pop   = ($urandom_range(2) == 0) || (i > 300);
      wdata = '{edge_t: 1'($urandom), t: tdc_time_t'($urandom), tot: tdc_time_t'($urandom)};
      @(posedge clk);
      begin
        automatic int pre = q.size();
        if (pop && pre > 0) void'(q.pop_front());
        if (push && pre < 16) q.push_back(wdata);
      end
    end
    `FINISH
  end
  initial begin #(781.25 * 2000); failures++; $display("watchdog"); `FINISH end
endmodule
