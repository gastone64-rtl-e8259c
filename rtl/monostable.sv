// monostable: behavioural model of the per-channel monostable (pulse
// stretcher) that follows the leading-edge discriminator. Not synthesizable:
// in the chip this is an analog circuit whose width is set by a DAC.
//
// A rising edge of disc starts an output pulse of programmable width; the
// channel thereby holds a hit until the level-1 trigger arrives. The width
// runs linearly from W_MIN_NS (code 0) to W_MAX_NS (code 255) of the 8-bit
// pulse-width DAC code. The model is retriggerable: a new rising edge while
// the output is high restarts the width from that edge.
// The 200 ns to 1 us range follows the chip description; the linear code
// mapping and the retriggering are this model's choices.
module monostable #(
  parameter int unsigned W_MIN_NS = 200,
  parameter int unsigned W_MAX_NS = 1000
) (
  input  logic       disc,      // discriminator output
  input  logic [7:0] width,     // pulse-width DAC code
  output logic       out
);
  timeunit 1ns;
  timeprecision 1ps;

  realtime t_end;                // time at which the pulse ends

  function automatic int unsigned width_ns(logic [7:0] code);
    return W_MIN_NS + (32'(code) * (W_MAX_NS - W_MIN_NS) + 127) / 255;
  endfunction

  // Every rising edge moves the end of the pulse to edge + width
  always @(posedge disc) t_end = $realtime + realtime'(width_ns(width));

  // Pulse generator: high from an edge until the latest end time is reached
  initial out = 1'b0;
  always begin
    @(posedge disc);
    out = 1'b1;
    #0;                          // let t_end take this edge
    while (out) begin
      #(t_end - $realtime);
      if ($realtime >= t_end) out = 1'b0;
    end
  end

endmodule
