// channel_buffer: per-channel hit buffer of the 320 MHz logic.
//
// A circular buffer of DEPTH chan_word_t entries. It is written in arrival
// order and read by the trigger matcher with look-ahead: `rd_off` selects the
// entry that many places after the oldest, so a matcher can scan the hits of
// one trigger window while keeping them for an overlapping later window.
// `pop` drops the oldest entry. All changes happen in clk cycles with ce high.
// Writing into a full buffer is refused (`full`); the writer counts the loss.
// The depth is this design's choice; the document asks only for significant
// buffering to absorb bursts.
module channel_buffer
  import tdc_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,
  input  logic                     push,
  input  chan_word_t               wdata,
  input  logic                     pop,
  input  logic [$clog2(DEPTH)-1:0] rd_off,
  output chan_word_t               rd_data,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     full
);
  timeunit 1ps; timeprecision 1fs;

  localparam int AW = $clog2(DEPTH);

  chan_word_t     mem [DEPTH];
  logic [AW-1:0]  head, tail;
  logic           do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign do_pop  = ce && pop && (count != '0);
  assign do_push = ce && push && !full;
  assign rd_data = mem[AW'(head + rd_off)];

  always_ff @(posedge clk) begin
    if (rst) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_push) begin
        mem[tail] <= wdata;
        tail      <= tail + 1'b1;
      end
      if (do_pop) head <= head + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  // DEPTH must be a power of two so that the pointers wrap by themselves.
  initial assert (DEPTH == (1 << AW));
endmodule
