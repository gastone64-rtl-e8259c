// tb_monostable: measures the output pulse of the monostable model for
// several pulse-width codes against 200 ns + code * 800 ns / 255 (rounded),
// checks that a short and a long discriminator pulse give the same width,
// and that a second edge during the pulse extends it.
module tb_monostable;
  timeunit 1ns;
  timeprecision 1ps;

  logic       disc = 1'b0;
  logic [7:0] width;
  logic       out;
  realtime    t_rise, t_fall;
  int         n_retrig = 0;
  int checks = 0, failures = 0;

  monostable dut (.*);

  always @(posedge out) t_rise = $realtime;
  always @(negedge out) t_fall = $realtime;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_ns(int code);
    return 200 + (code * 800 + 127) / 255;
  endfunction

  task automatic expect_near(string what, realtime got, realtime exp);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("%s: got %0.3f ns expected %0.3f ns", what, got, exp);
    end
  endtask

  task automatic pulse(int code, int disc_ns);
    realtime t0;
    width = 8'(code);
    #100;
    disc = 1'b1; t0 = $realtime;
    #(disc_ns) disc = 1'b0;
    #1500;
    checks++;
    if (out !== 1'b0) begin failures++; $display("output stuck high"); end
    expect_near($sformatf("start code %0d", code), t_rise, t0);
    expect_near($sformatf("width code %0d", code), t_fall - t_rise, realtime'(exp_ns(code)));
  endtask

  initial begin
    width = 8'd0;
    #50;
    checks++;
    if (out !== 1'b0) begin failures++; $display("output high at start"); end
    pulse(0, 20);
    pulse(255, 20);
    pulse(128, 20);
    pulse(64, 150);
    for (int n = 0; n < 10; n++) pulse($urandom_range(0, 255), $urandom_range(5, 150));
    // Retrigger: with code 255 (1 us) a second edge 300 ns after the first
    // must end the pulse 1 us after the second edge
    begin
      realtime t0, t1;
      width = 8'd255;
      #100 disc = 1'b1; t0 = $realtime;
      #20 disc = 1'b0;
      #280 disc = 1'b1; t1 = $realtime;
      #20 disc = 1'b0;
      #2000;
      n_retrig++;
      expect_near("retrigger start", t_rise, t0);
      expect_near("retrigger end", t_fall, t1 + 1000.0);
    end
    checks++;
    if (n_retrig == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
