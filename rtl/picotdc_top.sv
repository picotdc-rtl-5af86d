// picotdc_top: 64-channel time-to-digital converter, 3 ps / 12 ps bins.
//
// Time is measured in two stages. A DLL divides each 781.25 ps period of the
// 1.28 GHz clock into 64 taps of 12.2 ps, and resistive interpolation splits
// each tap into 4 phases of 3.05 ps. Every channel samples its hit on all 256
// phases; the decoder turns the samples into a fine time and appends the
// 18-bit time counter, giving a 26-bit (204.8 us) time per edge. Each channel
// then has a 4-hit derandomizer, an edge/TOT stage, a buffer and a trigger
// matcher running at 320 MHz. Four groups of 16 channels are merged and sent
// as 32-bit frames on four byte-wide ports, or all on port 0. The chip is
// configured over I2C; a pulse generator can replace the hits.
//
// The 1.28 GHz clock comes from the PLL outside this RTL (clk port); the DLL
// and interpolator are behavioural models. Hits arrive after the receivers.
// Trigger, event reset, BX reset and reset are synchronous to clk.
//
// Configuration bytes (address = byte index, this design's map):
//   0: [0] triggered [1] relative [2] tot_mode [3] tot_fmt19 [4] lead_en
//      [5] trail_en [6] fine_mode [7] single_port
//   1: [0] two_headers [1] trig_ch0 [3:2] port_rate [7:4] glitch filter code
//   2: [2:0] lead_shift [5:3] tot_shift [6] pulse generator enable
//   3-5: latency, 6-8: window (1.28 GHz cycles, 18 bits, little endian)
//   9-10: BX-ID maximum, 11-12: pulse period, 13-14: pulse width
//   16-23: channel enables, 24-31: channels fed by the pulse generator
// Status bytes: 0-1 lost triggers, 2-9 per-channel hit loss flags.
//
// Follows the document: channel count, 3/12 ps bins, the 26-bit data frame,
// the 4-hit derandomizer, 320 MHz matching, 1 or 4 ports at 40-320 MHz, the
// I2C register sizes. This design's choices: the single clock with enables,
// buffer depth, header/trailer/separator contents and the register map.
//
// Lint may report a combinational loop through g_ready. It is not a real
// loop: readout_ctrl derives g_ready from g_valid, but group_merge derives
// g_valid only from its inputs and state, never from g_ready; the tool
// sees the four-bit vectors as single signals.
module picotdc_top
  import tdc_pkg::*;
#(
  parameter int NPH       = 256,
  parameter int BUF_DEPTH = 64
) (
  input  logic            clk,          // 1.28 GHz from the PLL
  input  logic            rst,
  input  logic [NCH-1:0]  hit,
  input  logic            trigger,
  input  logic            event_rst,
  input  logic            bx_rst,
  input  logic            scl,
  input  logic            sda_in,
  output logic            sda_oe,
  output logic [7:0]      port_data        [NPORT],
  output logic [NPORT-1:0] port_byte_en,
  output logic [NPORT-1:0] port_frame_start
);
  timeunit 1ps; timeprecision 1fs;

  localparam int N_CFG = 348, N_DLY = 322, N_STAT = 300;
  localparam logic [8*N_CFG-1:0] CFG_INIT =
      ((8*N_CFG)'(64'hFFFF_FFFF_FFFF_FFFF) << (16*8))
    | ((8*N_CFG)'(12'd3563) << (9*8))
    | (8*N_CFG)'(8'b0111_0000);

  // ---- configuration ----
  logic [15:0]         reg_addr;
  logic                reg_wr;
  logic [7:0]          reg_wdata, reg_rdata;
  logic [8*N_CFG-1:0]  cfg_bytes;
  logic [8*N_DLY-1:0]  dly_bytes;     // drives the analog delay trim only
  logic [8*N_STAT-1:0] status;
  cfg_t                cfg;
  logic [3:0]          filt_code;
  logic                pg_en;
  logic [15:0]         pg_period, pg_width;
  logic [NCH-1:0]      ch_en, pg_mask;

  i2c_slave u_i2c (
    .clk, .rst, .scl_in(scl), .sda_in, .sda_oe,
    .addr(reg_addr), .wr_en(reg_wr), .wdata(reg_wdata), .rd_data(reg_rdata));

  config_regs #(.N_CFG(N_CFG), .N_DLY(N_DLY), .N_STAT(N_STAT), .CFG_INIT(CFG_INIT)) u_regs (
    .clk, .rst, .addr(reg_addr), .wr_en(reg_wr), .wdata(reg_wdata), .rd_data(reg_rdata),
    .cfg(cfg_bytes), .dly(dly_bytes), .status);

  always_comb begin
    cfg.triggered   = cfg_bytes[0];
    cfg.relative    = cfg_bytes[1];
    cfg.tot_mode    = cfg_bytes[2];
    cfg.tot_fmt19   = cfg_bytes[3];
    cfg.lead_en     = cfg_bytes[4];
    cfg.trail_en    = cfg_bytes[5];
    cfg.fine_mode   = cfg_bytes[6];
    cfg.single_port = cfg_bytes[7];
    cfg.two_headers = cfg_bytes[8];
    cfg.trig_ch0    = cfg_bytes[9];
    cfg.port_rate   = cfg_bytes[11:10];
    cfg.lead_shift  = cfg_bytes[18:16];
    cfg.tot_shift   = cfg_bytes[21:19];
    cfg.latency     = cfg_bytes[24 +: CNT_W];
    cfg.window      = cfg_bytes[48 +: CNT_W];
    cfg.bx_max      = cfg_bytes[72 +: 12];
    filt_code       = cfg_bytes[15:12];
    pg_en           = cfg_bytes[22];
    pg_period       = cfg_bytes[88 +: 16];
    pg_width        = cfg_bytes[104 +: 16];
    ch_en           = cfg_bytes[128 +: NCH];
    pg_mask         = cfg_bytes[192 +: NCH];
  end

  // ---- time base ----
  cnt_t        now;
  logic        ce, ce_40;
  logic [11:0] bx_id;

  time_counter u_tc (.clk, .rst, .cnt(now), .ce_320(ce), .ce_40);
  bx_counter #(.W(12)) u_bx (.clk, .rst, .ce_40, .bx_rst, .bx_max(cfg.bx_max), .bx_id);

  // ---- timing macro: DLL + resistive interpolation ----
  logic [NPH/4-1:0] tap;
  logic [NPH-1:0]   phase;

  dll #(.NTAPS(NPH/4)) u_dll (.clk, .tap);
  res_interp #(.NTAPS(NPH/4), .NINT(4)) u_ri (.tap, .phase);

  // ---- hit path ----
  logic           pulse;
  logic [NCH-1:0] hit_mux, hit_f;

  pulse_gen u_pg (.clk, .rst, .enable(pg_en), .period(pg_period), .width(pg_width), .pulse);

  // ---- channels ----
  logic [NCH-1:0] trig_full, dec_valid, ch_valid, ch_ready, ch_ovf;
  hit_t           dec_hit  [NCH];
  item_t          ch_item  [NCH];
  logic           trig_push, busy;
  event_t         trig_event;
  logic [15:0]    trig_lost;
  logic [NPORT-1:0] evt_full;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    assign hit_mux[c] = (pg_en && pg_mask[c]) ? pulse : hit[c];

    glitch_filter u_gf (.hit_in(hit_mux[c]), .filt_code, .hit_out(hit_f[c]));

    tdc_channel #(.NPH(NPH), .BUF_DEPTH(BUF_DEPTH)) u_ch (
      .clk, .rst, .ce, .cfg, .enable(ch_en[c]), .ch_id(4'(c % GROUP_SZ)), .now,
      .phase, .hit(hit_f[c]), .trig_push, .trig_time(trig_event.trig_time),
      .trig_full(trig_full[c]), .dec_valid(dec_valid[c]), .dec_hit(dec_hit[c]),
      .out_valid(ch_valid[c]), .out_item(ch_item[c]), .out_ready(ch_ready[c]),
      .overflow(ch_ovf[c]));
  end

  // ---- triggers ----
  assign busy = (|trig_full) || (|evt_full);

  trigger_ctrl u_trig (
    .clk, .rst, .ce, .cfg, .now, .trigger, .event_rst,
    .ch0_valid(dec_valid[0]), .ch0_hit(dec_hit[0]), .bx_id, .busy,
    .trig_push, .trig_event, .lost(trig_lost));

  // ---- readout ----
  logic [NGROUP-1:0] g_valid;
  item_t             g_item [NGROUP];
  logic [NGROUP-1:0] g_ready_p [NPORT];
  logic [NGROUP-1:0] g_ready;
  logic [NPORT-1:0]  p_valid, p_ready;
  logic [31:0]       p_word [NPORT];

  for (genvar g = 0; g < NGROUP; g++) begin : g_grp
    group_merge #(.N(GROUP_SZ)) u_gm (
      .clk, .rst, .ce, .triggered(cfg.triggered),
      .in_valid(ch_valid[g*GROUP_SZ +: GROUP_SZ]),
      .in_item(ch_item[g*GROUP_SZ +: GROUP_SZ]),
      .in_ready(ch_ready[g*GROUP_SZ +: GROUP_SZ]),
      .out_valid(g_valid[g]), .out_item(g_item[g]), .out_ready(g_ready[g]));
  end

  always_comb begin
    g_ready = '0;
    for (int p = 0; p < NPORT; p++) g_ready |= g_ready_p[p];
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_port
    logic [NGROUP-1:0] mask;
    assign mask = cfg.single_port ? ((p == 0) ? '1 : '0) : NGROUP'(1 << p);

    readout_ctrl u_ro (
      .clk, .rst, .ce, .cfg, .group_mask(mask), .evt_push(trig_push),
      .evt_in(trig_event), .evt_full(evt_full[p]), .g_valid, .g_item,
      .g_ready(g_ready_p[p]), .out_valid(p_valid[p]), .out_word(p_word[p]),
      .out_ready(p_ready[p]));

    readout_port u_port (
      .clk, .rst, .ce, .rate(cfg.port_rate), .in_valid(p_valid[p]), .in_word(p_word[p]),
      .in_ready(p_ready[p]), .data(port_data[p]), .byte_en(port_byte_en[p]),
      .frame_start(port_frame_start[p]));
  end

  // ---- status ----
  always_comb begin
    status        = '0;
    status[15:0]  = trig_lost;
    status[16 +: NCH] = ch_ovf;
  end
endmodule
