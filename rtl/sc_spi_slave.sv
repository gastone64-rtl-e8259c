// sc_spi_slave: slow-control serial port of the chip.
//
// The port has a data input (sdi), a data output (sdo), a clock (sck, 1 MHz
// in the chip's use) and a reset (rst, active high, asynchronous), and no
// chip select. A transaction is 16 clock periods, MSB first: a command byte
// {write, addr[6:0]} then a data byte. sdi is sampled on the rising edge of
// sck; sdo changes on the falling edge so the master samples it on the next
// rising edge.
//   write: on the 16th rising edge wr_en is high for that edge and the
//          register file stores wdata at addr.
//   read : on the 8th rising edge the register at addr is loaded into an
//          output shift register; bits 7..0 appear on sdo after the 8th..15th
//          falling edges. sdo is 0 outside the data byte.
// Transactions follow each other with no gap; the bit counter is realigned
// by rst. Addresses at or above NREG are ignored on write and read as 0
// (the register file decides that).
// The chip description gives the SPI port, its 1 MHz rate and that it reads
// and writes the internal registers; the framing above is this design's.
module sc_spi_slave
  import gastone64_pkg::*;
(
  input  logic              sck,
  input  logic              rst,
  input  logic              sdi,
  output logic              sdo,
  // register-file side, in the sck domain
  output logic              wr_en,
  output logic [ADDR_W-1:0] addr,
  output logic [REG_W-1:0]  wdata,
  output logic [ADDR_W-1:0] raddr,
  input  logic [REG_W-1:0]  rdata
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [3:0]       bit_cnt;   // rising edges seen in this transaction
  logic [14:0]      sh;        // bits received so far, newest in bit 0
  logic [REG_W-1:0] rd_sh;     // read data being shifted out
  logic             rd_phase;  // current transaction is a read
  sc_cmd_t          cmd_q;     // command byte, valid from the 8th edge on

  assign cmd_q = sc_cmd_t'(sh[14:7]);

  // Read address: during the 8th rising edge it is the 7 newest bits
  assign raddr = {sh[5:0], sdi};

  // Write strobe and data for the 16th rising edge
  assign wr_en = (bit_cnt == 4'd15) && cmd_q.write;
  assign addr  = cmd_q.addr;
  assign wdata = {sh[6:0], sdi};

  always_ff @(posedge sck or posedge rst) begin
    if (rst) begin
      bit_cnt  <= '0;
      sh       <= '0;
      rd_sh    <= '0;
      rd_phase <= 1'b0;
    end else begin
      bit_cnt <= bit_cnt + 4'd1;       // wraps after 16
      sh      <= {sh[13:0], sdi};
      if (bit_cnt == 4'd7) begin
        rd_phase <= ~sh[6];           // command bit 7 arrived 7 edges ago
        rd_sh    <= rdata;
      end else if (bit_cnt == 4'd15) begin
        rd_phase <= 1'b0;
      end
    end
  end

  // Data out: bit (15 - bit_cnt) of the read byte during the data phase
  always_ff @(negedge sck or posedge rst) begin
    if (rst) begin
      sdo <= 1'b0;
    end else if (rd_phase && bit_cnt >= 4'd8) begin
      sdo <= rd_sh[3'(4'd15 - bit_cnt)];
    end else begin
      sdo <= 1'b0;
    end
  end

endmodule
