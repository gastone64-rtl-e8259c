// gastone64: digital view of the GASTONE64 64-channel front-end chip for
// GEM strip detectors.
//
// Each channel's leading-edge discriminator output (disc, from the analog
// front end, which is outside this RTL) drives a monostable that stretches
// the hit to a programmable 200 ns to 1 us so that it is still present when
// the level-1 trigger arrives. The stretched hits pass the channel mask; the
// masked hits feed the global OR output (a self-trigger) and the readout.
// On a rising edge of lev1 the readout stores the 64 hits with a header, a
// 5-bit trigger number and the 9-bit chip ID in a 96-bit word, which is then
// sent on data_out on both edges of ck_ro: 48 clock periods, 100 Mbit/s at
// 50 MHz. ck_ro runs only during readout.
// The SPI slow-control port (sc_ck, sc_din, sc_dout, rst) reads and writes 28
// eight-bit registers: channel mask, test-pulse enables, the threshold,
// pulse-width and test-input DAC codes, the chip ID and seven configuration
// bytes. The DAC codes, test-pulse enables and configuration bytes leave the
// module as ports towards the analog section, whose DACs are not modelled;
// the pulse-width code also sets the monostable models.
// rst is asynchronous and active high and clears registers, trigger counter
// and serial state. Block structure and pins follow the chip's block
// diagram; register map, serial framings and reset polarity are this
// design's own choices (see the submodules).
module gastone64
  import gastone64_pkg::*;
(
  input  logic                      rst,
  // analog front end
  input  logic [NCH-1:0]            disc,       // discriminator outputs
  output logic [REG_W-1:0]          thr_code,   // threshold DAC
  output logic [REG_W-1:0]          width_code, // monostable width DAC
  output logic [REG_W-1:0]          tp_code,    // test-input DAC
  output logic [NCH-1:0]            tp_en,      // test-pulse channel enables
  output logic [NCFG-1:0][REG_W-1:0] cfg_regs,  // general configuration
  // readout
  input  logic                      lev1,
  input  logic                      ck_ro,
  output logic                      data_out,
  output logic                      or_out,
  // slow control
  input  logic                      sc_ck,
  input  logic                      sc_din,
  output logic                      sc_dout
);
  timeunit 1ns;
  timeprecision 1ps;

  sc_cfg_t           cfg;
  logic              wr_en;
  logic [ADDR_W-1:0] waddr, raddr;
  logic [REG_W-1:0]  wdata, rdata;
  logic [NCH-1:0]    stretched, hits;

  sc_spi_slave u_spi (
    .sck   (sc_ck),
    .rst   (rst),
    .sdi   (sc_din),
    .sdo   (sc_dout),
    .wr_en (wr_en),
    .addr  (waddr),
    .wdata (wdata),
    .raddr (raddr),
    .rdata (rdata)
  );

  sc_regfile u_regs (
    .clk   (sc_ck),
    .rst   (rst),
    .wr_en (wr_en),
    .addr  (waddr),
    .wdata (wdata),
    .raddr (raddr),
    .rdata (rdata),
    .cfg   (cfg)
  );

  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    monostable u_mono (
      .disc  (disc[ch]),
      .width (cfg.width),
      .out   (stretched[ch])
    );
  end

  channel_mask #(.NCH(NCH)) u_mask (
    .hit_in  (stretched),
    .mask    (cfg.mask),
    .hit_out (hits),
    .or_out  (or_out)
  );

  readout_ser u_ro (
    .rst      (rst),
    .lev1     (lev1),
    .ck_ro    (ck_ro),
    .hits     (hits),
    .chip_id  (cfg.chip_id),
    .dout     (data_out),
    .done     (),
    .trig_num ()
  );

  assign thr_code   = cfg.thr;
  assign width_code = cfg.width;
  assign tp_code    = cfg.tp_amp;
  assign tp_en      = cfg.tp_en;
  assign cfg_regs   = cfg.cfg;

endmodule
