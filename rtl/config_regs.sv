// config_regs: configuration, delay-adjust and status registers.
//
// Three byte arrays behind one 16-bit byte address space:
//   0x0000 + i, i < N_CFG   configuration / control (read-write)
//   0x0200 + i, i < N_DLY   delay adjust of the timing macro (read-write)
//   0x0400 + i, i < N_STAT  status (read-only)
// Writes come from the I2C target one byte per wr_en; reads are
// combinational. All read-write bytes reset to zero, except what the top
// gives in CFG_INIT. The array sizes are the document's; the address map is
// this design's choice.
module config_regs #(
  parameter int N_CFG  = 348,
  parameter int N_DLY  = 322,
  parameter int N_STAT = 300,
  parameter logic [8*N_CFG-1:0] CFG_INIT = '0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [15:0]           addr,
  input  logic                  wr_en,
  input  logic [7:0]            wdata,
  output logic [7:0]            rd_data,
  output logic [8*N_CFG-1:0]    cfg,
  output logic [8*N_DLY-1:0]    dly,
  input  logic [8*N_STAT-1:0]   status
);
  timeunit 1ps; timeprecision 1fs;

  localparam logic [15:0] DLY_BASE  = 16'h0200;
  localparam logic [15:0] STAT_BASE = 16'h0400;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg <= CFG_INIT;
      dly <= '0;
    end else if (wr_en) begin
      if (addr < 16'(N_CFG))
        cfg[8*addr[9:0] +: 8] <= wdata;
      else if (addr >= DLY_BASE && addr < DLY_BASE + 16'(N_DLY))
        dly[8*(addr[9:0] - DLY_BASE[9:0]) +: 8] <= wdata;
    end
  end

  always_comb begin
    rd_data = 8'h00;
    if (addr < 16'(N_CFG))
      rd_data = cfg[8*addr[9:0] +: 8];
    else if (addr >= DLY_BASE && addr < DLY_BASE + 16'(N_DLY))
      rd_data = dly[8*(addr[9:0] - DLY_BASE[9:0]) +: 8];
    else if (addr >= STAT_BASE && addr < STAT_BASE + 16'(N_STAT))
      rd_data = status[8*(addr[9:0] - STAT_BASE[9:0]) +: 8];
  end
endmodule
