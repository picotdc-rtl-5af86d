// tb_i2c_slave: an I2C master model writes bytes at a 16-bit register address
// and reads them back (auto-increment, repeated START, NACK end); a wrong
// device address is not acknowledged. The register file is a model here.
`include "tb/tb_util.svh"
module tb_i2c_slave;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst, scl, sda_m, sda_oe, wr_en;
  logic [15:0] addr;
  logic [7:0] wdata, rd_data;
  logic [7:0] mem [65536];
  logic       written [65536];
  wire sda = sda_m & ~sda_oe;
  localparam real Q = 781.25 * 10;   // quarter bit period
  i2c_slave dut (.clk, .rst, .scl_in(scl), .sda_in(sda), .sda_oe, .addr, .wr_en, .wdata, .rd_data);
  always #390.625 clk = ~clk;
  always @(posedge clk) if (wr_en) begin mem[addr] <= wdata; written[addr] <= 1'b1; end
  assign rd_data = written[addr] ? mem[addr] : 8'hEE;

  task automatic start(); sda_m = 1; #Q scl = 1; #Q sda_m = 0; #Q scl = 0; #Q; endtask
  task automatic stop();  sda_m = 0; #Q scl = 1; #Q sda_m = 1; #(2*Q); endtask
  task automatic wbyte(logic [7:0] b, output logic ack);
    for (int i = 7; i >= 0; i--) begin sda_m = b[i]; #Q scl = 1; #(2*Q) scl = 0; #Q; end
    sda_m = 1; #Q scl = 1; #Q ack = !sda; #Q scl = 0; #Q;
  endtask
  task automatic rbyte(logic ack, output logic [7:0] b);
    sda_m = 1;
    for (int i = 7; i >= 0; i--) begin #Q scl = 1; #Q b[i] = sda; #Q scl = 0; #Q; end
    sda_m = !ack; #Q scl = 1; #(2*Q) scl = 0; #Q; sda_m = 1;
  endtask

  logic ack;
  logic [7:0] b;
  initial begin
    rst = 1; scl = 1; sda_m = 1;
    for (int i = 0; i < 65536; i++) written[i] = 1'b0;
    repeat (4) @(posedge clk); rst = 0;
    #(4*Q);
    // write 3 bytes at 0x0123
    start(); wbyte({7'h5A, 1'b0}, ack); `CHECK(ack, "address ACK")
    wbyte(8'h01, ack); `CHECK(ack, "addr hi ACK")
    wbyte(8'h23, ack); `CHECK(ack, "addr lo ACK")
    wbyte(8'hA5, ack); wbyte(8'h3C, ack); wbyte(8'h7E, ack); `CHECK(ack, "data ACK")
    stop();
    `CHECK(mem[16'h0123] == 8'hA5 && mem[16'h0124] == 8'h3C && mem[16'h0125] == 8'h7E, "bytes written")
    // read back from 0x0124
    start(); wbyte({7'h5A, 1'b0}, ack); wbyte(8'h01, ack); wbyte(8'h24, ack);
    start(); wbyte({7'h5A, 1'b1}, ack); `CHECK(ack, "read address ACK")
    rbyte(1, b); `CHECK(b == 8'h3C, "read byte 1")
    rbyte(0, b); `CHECK(b == 8'h7E, "read byte 2")
    stop();
    // other device
    start(); wbyte({7'h11, 1'b0}, ack); `CHECK(!ack, "no ACK for another address")
    wbyte(8'h00, ack); wbyte(8'h00, ack); wbyte(8'h55, ack); stop();
    `CHECK(!written[16'h0000], "no write for another address")
    `FINISH
  end
  initial begin #(781.25 * 100000); failures++; $display("watchdog"); `FINISH end
endmodule
