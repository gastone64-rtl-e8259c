// gastone64_pkg: constants and types shared by the digital section of the
// GASTONE64 64-channel GEM front-end chip.
//
// Follows the chip description: 64 channels, 28 slow-control registers of
// 8 bits each, and a 96-bit readout event word made of a 10-bit header, a
// 5-bit trigger number, a 9-bit chip ID, 64 data bits and 8 trailing zeros.
// This design's own choices: the register map (which address holds what),
// the header bit pattern and the reset values of the registers.
package gastone64_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NCH       = 64;  // channels per chip
  localparam int unsigned NREG      = 28;  // slow-control registers
  localparam int unsigned REG_W     = 8;   // register width
  localparam int unsigned ADDR_W    = 7;   // address field of an SPI command

  // Readout event word
  localparam int unsigned HDR_W     = 10;
  localparam int unsigned TRG_W     = 5;
  localparam int unsigned ID_W      = 9;
  localparam int unsigned TRL_W     = 8;
  localparam int unsigned FRAME_W   = HDR_W + TRG_W + ID_W + NCH + TRL_W; // 96
  localparam int unsigned FRAME_CYC = FRAME_W / 2;  // clock cycles, both edges used

  // Header pattern sent first on the serial line (own choice: starts with a 1
  // so that a receiver sees the frame start on an otherwise idle-low line).
  localparam logic [HDR_W-1:0] HEADER = 10'b11_1111_1010;

  // Register map (own choice)
  localparam int unsigned A_MASK0   = 0;   // 0..7   : channel mask, 1 = channel off
  localparam int unsigned A_TPEN0   = 8;   // 8..15  : test-pulse enable per channel
  localparam int unsigned A_THR     = 16;  // threshold DAC code
  localparam int unsigned A_WIDTH   = 17;  // monostable pulse-width DAC code
  localparam int unsigned A_TPAMP   = 18;  // test-input amplitude DAC code
  localparam int unsigned A_ID_LO   = 19;  // chip ID bits 7:0
  localparam int unsigned A_ID_HI   = 20;  // chip ID bit 8 in bit 0
  localparam int unsigned A_CFG0    = 21;  // 21..27 : general configuration
  localparam int unsigned NCFG      = NREG - A_CFG0;  // 7

  // Decoded slow-control settings driven to the rest of the chip
  typedef struct packed {
    logic [NCH-1:0]             mask;     // 1 = channel excluded from data and OR
    logic [NCH-1:0]             tp_en;    // 1 = channel receives the test pulse
    logic [REG_W-1:0]           thr;      // threshold DAC code
    logic [REG_W-1:0]           width;    // pulse-width DAC code
    logic [REG_W-1:0]           tp_amp;   // test-input DAC code
    logic [ID_W-1:0]            chip_id;
    logic [NCFG-1:0][REG_W-1:0] cfg;
  } sc_cfg_t;

  // Reset value of every register (own choice): channels enabled, no test
  // pulse, mid-scale threshold, shortest pulse width, chip ID 0.
  function automatic logic [REG_W-1:0] reg_reset_value(int unsigned a);
    case (a)
      A_THR:   return 8'h80;
      default: return 8'h00;
    endcase
  endfunction

  // SPI command byte: bit 7 = write (1) / read (0), bits 6:0 = address
  typedef struct packed {
    logic              write;
    logic [ADDR_W-1:0] addr;
  } sc_cmd_t;

endpackage
