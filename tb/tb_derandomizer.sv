// tb_derandomizer: order, 4-hit depth, overflow loss, one read per 320 MHz
// cycle. A queue model decides which hits must be kept.
`include "tb/tb_util.svh"
module tb_derandomizer;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ce, wr, rd, valid;
  hit_t wdata, rdata;
  logic [15:0] lost;
  hit_t q[$];
  int mlost = 0, nread = 0, cyc = 0;
  derandomizer dut (.*);
  always #390.625 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign ce = (cyc % 4 == 3);
  always @(posedge clk) if (!rst) begin
    automatic logic r = ce && rd && (q.size() > 0);
    if (r) begin
      `CHECK(valid && rdata == q[0], "read order")
      void'(q.pop_front());
      nread++;
    end
    if (wr) begin
      if (q.size() < 4) q.push_back(wdata);
      else mlost++;
    end
  end
  initial begin
    rst = 1; wr = 0; rd = 0; wdata = '0;
    repeat (2) @(posedge clk); rst <= 0;
    rd <= 1;
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 7; i++) begin
        @(negedge clk);
        wr = 1; wdata = '{edge_t: i[0], t: tdc_time_t'($urandom)};
      end
      @(negedge clk); wr = 0;
      repeat (30) @(posedge clk);
    end
    `CHECK(lost == 16'(mlost), "lost count")
    `CHECK(mlost > 0, "overflow happened")
    `CHECK(nread == 21 - mlost, "all kept hits read")
    `FINISH
  end
  initial begin #(781.25 * 2000); failures++; $display("watchdog"); `FINISH end
endmodule
