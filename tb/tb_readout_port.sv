// tb_readout_port: words go out MSB byte first, idle frames fill gaps, and
// the byte rate follows the rate setting (one byte per 1, 2, 4, 8 x 320 MHz).
`include "tb/tb_util.svh"
module tb_readout_port;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ce, in_valid, in_ready, byte_en, frame_start;
  logic [1:0] rate;
  logic [31:0] in_word;
  logic [7:0] data;
  int unsigned cyc;
  logic [31:0] sent[$], rx[$];
  logic [31:0] cur;
  int nb, nbytes, nidle;
  readout_port dut (.*);
  always #390.625 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign ce = (cyc % 4 == 3);
  always @(posedge clk) if (!rst && byte_en) begin
    nbytes++;
    if (frame_start) nb = 0;
    cur = {cur[23:0], data}; nb++;
    if (nb == 4) begin
      if (cur == 32'hD0D0D0D0) nidle++; else rx.push_back(cur);
    end
  end
  always @(posedge clk) if (!rst && in_valid && in_ready) sent.push_back(in_word);
  initial begin
    for (int r = 0; r < 4; r++) begin
      rst = 1; in_valid = 0; in_word = '0; rate = 2'(r);
      sent.delete(); rx.delete(); nbytes = 0; nidle = 0; nb = 0;
      repeat (4) @(posedge clk); rst = 0;
      for (int i = 0; i < 4000; i++) begin
        @(negedge clk);
        if (!in_valid || in_ready) begin
          in_valid = ($urandom_range(2) != 0);
          in_word  = {1'b0, 31'($urandom)};
        end
        @(posedge clk); #1;
        if (in_valid && in_ready) in_valid = 0;
      end
      in_valid = 0;
      repeat (200) @(posedge clk);
      `CHECK(rx.size() > 10 && nidle > 0, "data and idle frames sent")
      for (int k = 0; k < rx.size(); k++) `CHECK(rx[k] == sent[k], "word bytes in order")
      `CHECK(nbytes >= (4200 / 4) / (1 << r) - 2 && nbytes <= (4200 / 4) / (1 << r) + 2, "byte rate")
    end
    `FINISH
  end
  initial begin #(781.25 * 40000); failures++; $display("watchdog"); `FINISH end
endmodule
