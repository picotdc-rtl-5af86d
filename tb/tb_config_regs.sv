// tb_config_regs: write/read of configuration and delay-adjust bytes, read of
// status, read-only status, reset values, unmapped addresses.
`include "tb/tb_util.svh"
module tb_config_regs;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst, wr_en;
  logic [15:0] addr;
  logic [7:0] wdata, rd_data;
  logic [8*348-1:0] cfg;
  logic [8*322-1:0] dly;
  logic [8*300-1:0] status;
  logic [7:0] m_cfg [348], m_dly [322];
  config_regs #(.CFG_INIT((8*348)'(16'hBEEF))) dut (.*);
  always #390.625 clk = ~clk;
  task automatic wr(logic [15:0] a, logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr_en = 1; @(negedge clk); wr_en = 0;
  endtask
  initial begin
    rst = 1; wr_en = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 300; i++) status[8*i +: 8] = 8'(i * 7 + 1);
    repeat (3) @(posedge clk); rst = 0;
    `CHECK(cfg[15:0] == 16'hBEEF && cfg[8*348-1:16] == '0 && dly == '0, "reset values")
    for (int i = 0; i < 348; i++) begin m_cfg[i] = 8'($urandom); wr(16'(i), m_cfg[i]); end
    for (int i = 0; i < 322; i++) begin m_dly[i] = 8'($urandom); wr(16'h200 + 16'(i), m_dly[i]); end
    wr(16'h0400, 8'h00);              // status is read-only
    wr(16'h0180, 8'h55);              // unmapped
    for (int i = 0; i < 348; i++) begin
      @(negedge clk); addr = 16'(i); #1;
      `CHECK(rd_data == m_cfg[i] && cfg[8*i +: 8] == m_cfg[i], "config byte")
    end
    for (int i = 0; i < 322; i++) begin
      @(negedge clk); addr = 16'h200 + 16'(i); #1;
      `CHECK(rd_data == m_dly[i] && dly[8*i +: 8] == m_dly[i], "delay byte")
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); addr = 16'h400 + 16'(i); #1;
      `CHECK(rd_data == 8'(i * 7 + 1), "status byte")
    end
    @(negedge clk); addr = 16'h0180; #1; `CHECK(rd_data == 8'h00, "unmapped reads 0")
    `FINISH
  end
  initial begin #(781.25 * 20000); failures++; $display("watchdog"); `FINISH end
endmodule
