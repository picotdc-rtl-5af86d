// i2c_slave: I2C target of the configuration, control and status interface.
//
// SCL and SDA are sampled on the system clock through two-stage
// synchronizers, so any bus rate well below clk/8 works (the chip's bus runs
// up to 1 Mbit/s). Write: START, address+W, register address high byte, low
// byte, data bytes (the address increments after each). Read: a write of the
// two address bytes, repeated START, address+R, then data bytes until the
// master's NACK. Each byte is acknowledged by pulling SDA low (sda_oe).
// Register access: `wr_en` with `addr`/`wdata` for one cycle per written byte;
// `rd_data` must show the byte at `addr` combinationally. The 7-bit device
// address and the 16-bit register address are this design's choice.
module i2c_slave #(
  parameter logic [6:0] DEV_ADDR = 7'h5A
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        scl_in,
  input  logic        sda_in,
  output logic        sda_oe,      // 1: pull SDA low
  output logic [15:0] addr,
  output logic        wr_en,
  output logic [7:0]  wdata,
  input  logic [7:0]  rd_data
);
  timeunit 1ps; timeprecision 1fs;

  typedef enum logic [2:0] {I_IDLE, I_DEVADDR, I_ACK, I_RX, I_TX, I_TXACK} istate_t;

  logic [2:0] scl_s, sda_s;
  logic       scl_rise, scl_fall, start_c, stop_c;
  istate_t    st;
  logic [7:0] sh;
  logic [3:0] nbit;
  logic [1:0] byte_no;      // bytes received since address: 0 hi, 1 lo, 2+ data
  logic       rw;
  logic       ack_ok;       // the ACK slot belongs to this device

  assign scl_rise = (scl_s[2:1] == 2'b01);
  assign scl_fall = (scl_s[2:1] == 2'b10);
  assign start_c  = scl_s[1] && scl_s[2] && (sda_s[2:1] == 2'b10);
  assign stop_c   = scl_s[1] && scl_s[2] && (sda_s[2:1] == 2'b01);

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_s   <= '1;
      sda_s   <= '1;
      st      <= I_IDLE;
      sh      <= '0;
      nbit    <= '0;
      byte_no <= '0;
      rw      <= 1'b0;
      ack_ok  <= 1'b0;
      sda_oe  <= 1'b0;
      addr    <= '0;
      wr_en   <= 1'b0;
      wdata   <= '0;
    end else begin
      scl_s <= {scl_s[1:0], scl_in};
      sda_s <= {sda_s[1:0], sda_in};
      wr_en <= 1'b0;
      if (start_c) begin
        st     <= I_DEVADDR;
        nbit   <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        st     <= I_IDLE;
        sda_oe <= 1'b0;
      end else begin
        case (st)
          I_DEVADDR, I_RX: begin
            if (scl_rise) begin
              sh   <= {sh[6:0], sda_s[1]};
              nbit <= nbit + 1'b1;
            end
            if (scl_fall && nbit == 4'd8) begin
              nbit <= '0;
              if (st == I_DEVADDR) begin
                ack_ok  <= (sh[7:1] == DEV_ADDR);
                rw      <= sh[0];
                sda_oe  <= (sh[7:1] == DEV_ADDR);
                if (sh[7:1] == DEV_ADDR && !sh[0]) byte_no <= '0;
                st      <= (sh[7:1] == DEV_ADDR) ? I_ACK : I_IDLE;
              end else begin
                sda_oe <= 1'b1;
                st     <= I_ACK;
                case (byte_no)
                  2'd0: begin addr[15:8] <= sh; byte_no <= 2'd1; end
                  2'd1: begin addr[7:0]  <= sh; byte_no <= 2'd2; end
                  default: begin
                    wdata <= sh;
                    wr_en <= 1'b1;
                  end
                endcase
              end
            end
          end
          I_ACK: if (scl_fall) begin
            // end of the ACK clock: receive the next byte or start sending
            if (rw && ack_ok) begin
              st     <= I_TX;
              sh     <= rd_data;
              sda_oe <= !rd_data[7];
              nbit   <= 4'd1;
            end else begin
              sda_oe <= 1'b0;
              st     <= I_RX;
            end
          end
          I_TX: if (scl_fall) begin
            if (nbit == 4'd8) begin
              sda_oe <= 1'b0;           // release for the master's ACK
              st     <= I_TXACK;
            end else begin
              sda_oe <= !sh[3'd7 - nbit[2:0]];
              nbit   <= nbit + 1'b1;
            end
          end
          I_TXACK: begin
            if (scl_rise) begin
              if (sda_s[1]) st <= I_IDLE;            // NACK: done
              else          addr <= addr + 1'b1;
            end
            if (scl_fall && st == I_TXACK) begin
              sh     <= rd_data;
              sda_oe <= !rd_data[7];
              nbit   <= 4'd1;
              st     <= I_TX;
            end
          end
          default: ;
        endcase
      end
      if (wr_en) addr <= addr + 1'b1;
    end
  end
endmodule
