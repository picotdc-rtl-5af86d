// readout_port: sends 32-bit frames byte-wise on one 8-bit readout port.
//
// A frame goes out as four bytes, most significant first, one byte per
// byte slot. Byte slots come every 2^rate cycles of the 320 MHz enable, so the
// port runs at 320, 160, 80 or 40 MByte/s. When no frame is waiting, the idle
// frame 0xD0D0D0D0 is sent. `byte_en` marks a slot, `frame_start` its first
// byte. Byte order, rate coding and the framing strobe are this design's
// choice; the line drivers are outside this block.
module readout_port
  import tdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,            // 320 MHz enable
  input  logic [1:0]  rate,          // byte rate 320 MHz >> rate
  input  logic        in_valid,
  input  logic [31:0] in_word,
  output logic        in_ready,
  output logic [7:0]  data,
  output logic        byte_en,
  output logic        frame_start
);
  timeunit 1ps; timeprecision 1fs;

  logic [2:0]  div;
  logic        slot;
  logic [1:0]  bidx;
  logic [31:0] sh;

  assign slot     = ce && ((div & ((3'd1 << rate) - 3'd1)) == '0);
  assign in_ready = slot && (bidx == 2'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      div         <= '0;
      bidx        <= '0;
      sh          <= '0;
      data        <= '0;
      byte_en     <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      byte_en     <= slot;
      frame_start <= slot && (bidx == 2'd0);
      if (ce) div <= div + 1'b1;
      if (slot) begin
        if (bidx == 2'd0) begin
          data <= in_valid ? in_word[31:24] : IDLE_FRAME[31:24];
          sh   <= in_valid ? {in_word[23:0], 8'h00} : {IDLE_FRAME[23:0], 8'h00};
        end else begin
          data <= sh[31:24];
          sh   <= {sh[23:0], 8'h00};
        end
        bidx <= bidx + 1'b1;
      end
    end
  end
endmodule
