// sc_regfile: the 28 eight-bit slow-control registers of the chip.
//
// Written by the SPI port on a rising edge of the slow-control clock when
// wr_en is high; read combinationally at raddr. Addresses at or above NREG
// are ignored on write and read back as 0. rst (asynchronous, active high)
// loads every register with gastone64_pkg::reg_reset_value.
// The registers are decoded into sc_cfg_t: a 64-bit channel mask, a 64-bit
// test-pulse enable, the threshold, pulse-width and test-input DAC codes, the
// 9-bit chip ID and seven general configuration bytes.
// The count and width of the registers, and that they hold the DAC settings
// and the masks, follow the chip description; the address map and reset
// values are this design's (see gastone64_pkg).
module sc_regfile
  import gastone64_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] addr,
  input  logic [REG_W-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [REG_W-1:0]  rdata,
  output sc_cfg_t           cfg
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [REG_W-1:0] regs [NREG];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) regs[i] <= reg_reset_value(i);
    end else if (wr_en && addr < ADDR_W'(NREG)) begin
      regs[addr[4:0]] <= wdata;
    end
  end

  assign rdata = (raddr < ADDR_W'(NREG)) ? regs[raddr[4:0]] : '0;

  always_comb begin
    for (int i = 0; i < NCH / REG_W; i++) begin
      cfg.mask [i*REG_W +: REG_W] = regs[A_MASK0 + i];
      cfg.tp_en[i*REG_W +: REG_W] = regs[A_TPEN0 + i];
    end
    cfg.thr     = regs[A_THR];
    cfg.width   = regs[A_WIDTH];
    cfg.tp_amp  = regs[A_TPAMP];
    cfg.chip_id = {regs[A_ID_HI][0], regs[A_ID_LO]};
    for (int i = 0; i < NCFG; i++) cfg.cfg[i] = regs[A_CFG0 + i];
  end

endmodule
