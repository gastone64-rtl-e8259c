// channel_mask: per-channel mask and global OR.
//
// Each of the NCH stretched discriminator signals is passed on to the readout
// only when its mask bit is 0. The global OR output is high while any
// unmasked channel is high and serves as a self-trigger. Purely
// combinational, no clock: the chip's clock runs only during readout, so
// the channel signals and the OR are asynchronous.
// The mask and the OR output follow the chip's block diagram; that a mask bit
// of 1 switches a channel off, and that the OR is taken after the mask, are
// this design's choices.
module channel_mask #(
  parameter int unsigned NCH = 64
) (
  input  logic [NCH-1:0] hit_in,
  input  logic [NCH-1:0] mask,     // 1 = channel off
  output logic [NCH-1:0] hit_out,
  output logic           or_out
);
  timeunit 1ns;
  timeprecision 1ps;

  assign hit_out = hit_in & ~mask;
  assign or_out  = |hit_out;

endmodule
