// derandomizer: the small per-channel hit FIFO between the 1.28 GHz digitizer
// and the 320 MHz channel logic.
//
// Up to one hit per 1.28 GHz cycle is written; one hit can leave per 320 MHz
// cycle (rd with ce). DEPTH entries absorb short bursts; a hit that finds the
// FIFO full is dropped and counted in `lost`.
//
// Interface: write side `wr`/`wdata` any clk; read side shows the oldest hit
// on `rdata` while `valid`, and `rd` removes it in a cycle where `ce` is high.
// The depth of four hits follows the document; dropping on overflow is this
// design's choice.
module derandomizer
  import tdc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        wr,
  input  hit_t        wdata,
  input  logic        rd,
  output logic        valid,
  output hit_t        rdata,
  output logic [15:0] lost
);
  timeunit 1ps; timeprecision 1fs;

  localparam int AW = $clog2(DEPTH);

  hit_t           mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    cnt;
  logic           do_wr, do_rd;

  assign valid = (cnt != '0);
  assign rdata = mem[rp];
  assign do_rd = rd && ce && valid;
  assign do_wr = wr && ((cnt != (AW+1)'(DEPTH)) || do_rd);

  always_ff @(posedge clk) begin
    if (rst) begin
      wp   <= '0;
      rp   <= '0;
      cnt  <= '0;
      lost <= '0;
    end else begin
      if (do_wr) begin
        mem[wp] <= wdata;
        wp      <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr && !do_wr && lost != '1) lost <= lost + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) cnt <= (AW+1)'(DEPTH));
endmodule
