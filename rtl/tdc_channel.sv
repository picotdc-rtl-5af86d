// tdc_channel: the digital part of one TDC channel.
//
// capture_ffs -> hit_decoder (1.28 GHz) -> derandomizer (4 hits) ->
// tot_builder -> channel_buffer -> trigger_matcher (320 MHz) -> frame stream.
// `dec_valid`/`dec_hit` expose the decoded edges (channel 0 can trigger).
// A disabled channel records nothing.
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int NPH       = 256,
  parameter int BUF_DEPTH = 64
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           ce,
  input  cfg_t           cfg,
  input  logic           enable,
  input  logic [3:0]     ch_id,
  input  cnt_t           now,
  input  logic [NPH-1:0] phase,
  input  logic           hit,
  input  logic           trig_push,
  input  cnt_t           trig_time,
  output logic           trig_full,
  output logic           dec_valid,
  output hit_t           dec_hit,
  output logic           out_valid,
  output item_t          out_item,
  input  logic           out_ready,
  output logic           overflow     // a hit was lost since reset
);
  timeunit 1ps; timeprecision 1fs;

  localparam int BW = $clog2(BUF_DEPTH);

  logic [NPH-1:0] sample;
  logic           dr_valid, dr_rd;
  hit_t           dr_hit;
  logic [15:0]    dr_lost, tb_lost;
  logic           push;
  chan_word_t     push_word;
  logic           buf_full, buf_pop;
  chan_word_t     buf_data;
  logic [BW:0]    buf_count;
  logic [BW-1:0]  buf_off;

  capture_ffs #(.NPH(NPH)) u_cap (.clk, .phase, .hit, .sample);

  hit_decoder #(.NPH(NPH)) u_dec (
    .clk, .rst, .sample, .now, .fine_mode(cfg.fine_mode),
    .hit_valid(dec_valid), .hit_o(dec_hit));

  derandomizer u_der (
    .clk, .rst, .ce, .wr(dec_valid && enable), .wdata(dec_hit),
    .rd(dr_rd), .valid(dr_valid), .rdata(dr_hit), .lost(dr_lost));

  tot_builder u_tot (
    .clk, .rst, .ce, .cfg, .in_valid(dr_valid), .in_hit(dr_hit), .in_rd(dr_rd),
    .out_push(push), .out_word(push_word), .out_full(buf_full), .lost(tb_lost));

  channel_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst, .ce, .push, .wdata(push_word), .pop(buf_pop), .rd_off(buf_off),
    .rd_data(buf_data), .count(buf_count), .full(buf_full));

  trigger_matcher #(.BUF_DEPTH(BUF_DEPTH)) u_match (
    .clk, .rst, .ce, .cfg, .ch_id, .now, .trig_push, .trig_time, .trig_full,
    .buf_count, .buf_data, .buf_off, .buf_pop, .out_valid, .out_item, .out_ready);

  assign overflow = (dr_lost != '0) || (tb_lost != '0);
endmodule
