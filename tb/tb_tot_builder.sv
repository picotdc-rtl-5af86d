// tb_tot_builder: format A edge selection and format B leading/TOT pairing.
`include "tb/tb_util.svh"
module tb_tot_builder;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ce, in_valid, in_rd, out_push, out_full;
  cfg_t cfg;
  hit_t in_hit;
  chan_word_t out_word;
  logic [15:0] lost;
  tot_builder dut (.*);
  always #390.625 clk = ~clk;
  task automatic send(logic e, int t, logic exp_push, chan_word_t exp);
    @(negedge clk);
    in_valid = 1; in_hit = '{edge_t: e, t: tdc_time_t'(t)}; #1;
    `CHECK(out_push == exp_push, "push decision")
    if (exp_push) `CHECK(out_word == exp, "output word")
    @(posedge clk); #1; in_valid = 0;
  endtask
  initial begin
    rst = 1; ce = 1; in_valid = 0; in_hit = '0; out_full = 0; cfg = '0;
    repeat (2) @(posedge clk); rst = 0;
    cfg.lead_en = 1; cfg.trail_en = 0;
    send(0, 100, 1, '{edge_t: 0, t: 100, tot: 0});
    send(1, 150, 0, '0);
    cfg.trail_en = 1; cfg.lead_en = 0;
    send(0, 200, 0, '0);
    send(1, 250, 1, '{edge_t: 1, t: 250, tot: 0});
    cfg.tot_mode = 1;
    send(1, 260, 0, '0);                                  // trailing without leading
    send(0, 300, 0, '0);
    send(1, 345, 1, '{edge_t: 0, t: 300, tot: 45});
    send(0, 26'h3FF_FFF0, 0, '0);                         // TOT across the wrap
    send(1, 26'h10, 1, '{edge_t: 0, t: 26'h3FF_FFF0, tot: 26'h20});
    out_full = 1;
    send(0, 500, 0, '0);
    send(1, 600, 1, '{edge_t: 0, t: 500, tot: 100});
    `CHECK(lost == 1, "loss counted when buffer full")
    `FINISH
  end
  initial begin #(781.25 * 2000); failures++; $display("watchdog"); `FINISH end
endmodule
