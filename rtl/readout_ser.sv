// readout_ser: trigger-driven event capture and double-data-rate serializer.
//
// On the rising edge of the level-1 trigger (lev1) the NCH channel signals
// are stored, together with the header, the trigger number and the chip ID,
// in a FRAME_W-bit event word:
//   [95:86] header   [85:81] trigger number   [80:72] chip ID
//   [71:8]  channel 0 .. channel 63 (channel 0 first on the line)
//   [7:0]   zeros
// The trigger number is a 5-bit counter of lev1 edges since reset, sent
// before it advances (the first event after reset carries 0); it wraps
// after 31.
// The readout clock ck_ro is running only while a word is read out: the
// receiver gives exactly FRAME_CYC (48) periods after lev1 and the word
// leaves MSB first on dout, one bit per clock edge (100 Mbit/s at 50 MHz):
// bit 95-2k is on dout while ck_ro is high after its k-th rising edge
// (k = 0..47), bit 94-2k while it is low after the following falling edge.
// lev1 high clears the bit counter asynchronously (through the clear
// signal clr = rst | lev1), so a trigger always restarts the word. After
// 48 periods dout stays 0 and done is 1.
// Timing: hits must be stable around the rising edge of lev1; lev1 must be
// low again before the first rising edge of ck_ro (an assertion checks this).
// Follows the chip description for the word layout, the field widths, the
// use of both clock edges and the exact clock count. The header pattern,
// the bit order inside each field and the lev1 timing are this design's.
// The word is held in a capture register and selected by a counter rather
// than shifted, which sends the same bits with one write clock per register.
// dout is a multiplexer driven by ck_ro, which is how the two clock edges
// are merged onto one line; lint notes the clock used as data.
module readout_ser
  import gastone64_pkg::*;
(
  input  logic            rst,      // asynchronous, active high
  input  logic            lev1,     // level-1 trigger
  input  logic            ck_ro,    // readout clock, runs only during readout
  input  logic [NCH-1:0]  hits,     // masked channel signals
  input  logic [ID_W-1:0] chip_id,
  output logic            dout,     // serial data, both edges of ck_ro
  output logic            done,     // whole word sent since the last lev1
  output logic [TRG_W-1:0] trig_num // number the next event will carry
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [FRAME_W-1:0] frame_q;
  logic [5:0]         cyc;          // rising edges of ck_ro since lev1
  logic               q_rise;       // bit shown while ck_ro is high
  logic               q_fall_nxt;   // bit for the coming low phase
  logic               q_fall;       // bit shown while ck_ro is low
  logic               clr;          // restarts the word: reset or trigger

  assign clr = rst | lev1;

  // Channel 0 goes first, so the data field holds the channels reversed
  function automatic logic [NCH-1:0] reverse(logic [NCH-1:0] v);
    for (int i = 0; i < NCH; i++) reverse[NCH-1-i] = v[i];
  endfunction

  // Trigger counter
  always_ff @(posedge lev1 or posedge rst) begin
    if (rst) trig_num <= '0;
    else     trig_num <= trig_num + TRG_W'(1);
  end

  // Event capture
  always_ff @(posedge lev1 or posedge rst) begin
    if (rst) frame_q <= '0;
    else     frame_q <= {HEADER, trig_num, chip_id, reverse(hits), TRL_W'(0)};
  end

  // Rising-edge half: count clock periods, pick the next two bits
  always_ff @(posedge ck_ro or posedge clr) begin
    if (clr) begin
      cyc        <= '0;
      q_rise     <= 1'b0;
      q_fall_nxt <= 1'b0;
    end else if (cyc < 6'(FRAME_CYC)) begin
      cyc        <= cyc + 6'd1;
      q_rise     <= frame_q[FRAME_W - 1 - 2*cyc];
      q_fall_nxt <= frame_q[FRAME_W - 2 - 2*cyc];
    end else begin
      q_rise     <= 1'b0;
      q_fall_nxt <= 1'b0;
    end
  end

  // Falling-edge half
  always_ff @(negedge ck_ro or posedge clr) begin
    if (clr) q_fall <= 1'b0;
    else             q_fall <= q_fall_nxt;
  end

  // The trigger must be over before the readout clock starts
  a_lev1_before_clock: assert property (@(posedge ck_ro) !lev1)
    else $error("lev1 still high at a rising edge of ck_ro");

  assign dout = ck_ro ? q_rise : q_fall;
  assign done = (cyc == 6'(FRAME_CYC));

endmodule
