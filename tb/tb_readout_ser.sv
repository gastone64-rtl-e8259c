// tb_readout_ser: triggers the readout with random hit patterns and chip
// IDs, runs the 50 MHz readout clock for exactly 48 periods, samples the
// serial line in the middle of every half period and compares the 96 bits
// with a word assembled in the testbench (header, trigger number, chip ID,
// channels 0..63, eight zeros). Also checks that the word ends after exactly
// 48 periods (done, idle-low line), that the trigger number counts and wraps
// after 31, that a trigger restarts an unfinished word, and that reset
// clears the trigger number.
module tb_readout_ser;
  import gastone64_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam time HALF = 10ns;    // 50 MHz

  logic            rst = 1'b0, lev1 = 1'b0, ck_ro = 1'b0;
  logic [NCH-1:0]  hits;
  logic [ID_W-1:0] chip_id;
  logic            dout, done;
  logic [TRG_W-1:0] trig_num;
  int              exp_trig = 0, n_wraps = 0, n_restart = 0;
  int checks = 0, failures = 0;

  readout_ser dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [95:0] got, logic [95:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [95:0] ref_word(int trg, logic [8:0] id, logic [63:0] h);
    logic [95:0] w;
    w[95:86] = 10'b11_1111_1010;
    w[85:81] = 5'(trg);
    w[80:72] = id;
    for (int c = 0; c < 64; c++) w[71 - c] = h[c];
    w[7:0] = 8'h00;
    return w;
  endfunction

  task automatic trigger();
    #20ns lev1 = 1'b1;
    #25ns lev1 = 1'b0;
    #15ns;
  endtask

  // Clock n periods, sampling the line in the middle of each half period
  task automatic clock_out(int n, output logic [95:0] w);
    w = '0;
    for (int k = 0; k < n; k++) begin
      ck_ro = 1'b1;
      #(HALF / 2) w = {w[94:0], dout};
      #(HALF / 2) ck_ro = 1'b0;
      #(HALF / 2) w = {w[94:0], dout};
      #(HALF / 2);
    end
  endtask

  task automatic one_event(logic [63:0] h, logic [8:0] id);
    logic [95:0] w, tail;
    hits = h; chip_id = id;
    trigger();
    expect_eq("done low before readout", 96'(done), 96'(0));
    clock_out(FRAME_CYC - 1, w);
    expect_eq("done low after 47 periods", 96'(done), 96'(0));
    begin
      logic [95:0] last;
      clock_out(1, last);
      w = {w[93:0], last[1:0]};
    end
    expect_eq("event word", w, ref_word(exp_trig, id, h));
    expect_eq("done after 48 periods", 96'(done), 96'(1));
    clock_out(4, tail);                     // extra clocks: line stays low
    expect_eq("idle after word", tail[7:0], 96'(0));
    if (exp_trig == 31) n_wraps++;
    exp_trig = (exp_trig + 1) % 32;
    expect_eq("trigger counter", 96'(trig_num), 96'(exp_trig));
  endtask

  initial begin
    hits = '0; chip_id = '0;
    #1 rst = 1'b1;
    #100ns rst = 1'b0;
    one_event('1, 9'h1FF);
    one_event('0, 9'h000);
    one_event(64'h8000_0000_0000_0001, 9'h155);
    for (int n = 0; n < 40; n++)
      one_event({$urandom, $urandom}, 9'($urandom));
    // A trigger in the middle of a word restarts it
    begin
      logic [95:0] w;
      hits = 64'hDEAD_BEEF_0123_4567; chip_id = 9'h0AA;
      trigger();
      clock_out(20, w);
      exp_trig = (exp_trig + 1) % 32;
      n_restart++;
      one_event(64'h0F0F_F0F0_1234_8765, 9'h101);
    end
    // Reset clears the trigger number
    rst = 1'b1; #20ns rst = 1'b0;
    exp_trig = 0;
    expect_eq("trigger counter after reset", 96'(trig_num), 96'(0));
    one_event({$urandom, $urandom}, 9'h0C3);
    checks++;
    if (n_wraps == 0 || n_restart == 0) begin
      failures++;
      $display("trigger wrap or restart never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
