// tb_gastone64: end-to-end test of the chip at its default size (64
// channels, 28 registers, 96-bit event word).
//
// A 1 MHz SPI master configures the chip (mask, pulse width, chip ID, DAC
// codes) and reads every register back. Each event fires the discriminator
// of random channels at random times before a level-1 trigger; a model in
// the testbench decides which hits are still held by their monostable
// (edge less than 200 ns + code * 800 ns / 255 before the trigger) and not
// masked. The testbench then runs the 50 MHz readout clock for exactly 48
// periods, samples both edges and compares the 96-bit word (header, trigger
// number, chip ID, channels, trailer) with the model, and checks the global
// OR just before the trigger. Mechanisms counted, each must occur: masked
// hit, hit stretched past its discriminator pulse, hit expired before the
// trigger, OR high and low, trigger-number wrap, register read-back, pulse
// width change, DAC and configuration ports following the registers, reset.
module tb_gastone64;
  import gastone64_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam time SC_HALF = 500ns;  // 1 MHz slow control
  localparam time RO_HALF = 10ns;   // 50 MHz readout

  logic                       rst = 1'b0;
  logic [NCH-1:0]             disc = '0;
  logic [REG_W-1:0]           thr_code, width_code, tp_code;
  logic [NCH-1:0]             tp_en;
  logic [NCFG-1:0][REG_W-1:0] cfg_regs;
  logic                       lev1 = 1'b0, ck_ro = 1'b0, data_out, or_out;
  logic                       sc_ck = 1'b0, sc_din = 1'b0, sc_dout;

  gastone64 dut (.*);

  int checks = 0, failures = 0;
  // model state
  logic [7:0]  regs_m [NREG];
  int          trig_m = 0;
  // mechanism counters
  int n_masked = 0, n_stretched = 0, n_expired = 0, n_or_hi = 0, n_or_lo = 0;
  int n_wrap = 0, n_readback = 0, n_width = 0, n_ports = 0, n_reset = 0;

  initial begin
    #20ms;
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

  // ---------------- slow control ----------------
  task automatic sc_xfer(logic [15:0] word, output logic [7:0] rd);
    rd = '0;
    for (int i = 15; i >= 0; i--) begin
      sc_din = word[i];
      #(SC_HALF - 1ns);
      if (i < 8) rd[i] = sc_dout;
      #1ns sc_ck = 1'b1;
      #SC_HALF sc_ck = 1'b0;
    end
  endtask

  task automatic sc_write(int a, logic [7:0] d);
    logic [7:0] dummy;
    sc_xfer({1'b1, 7'(a), d}, dummy);
    if (a < NREG) regs_m[a] = d;
  endtask

  task automatic sc_read_check(int a);
    logic [7:0] got;
    sc_xfer({1'b0, 7'(a), 8'h00}, got);
    expect_eq($sformatf("register %0d", a), 96'(got), 96'(a < NREG ? regs_m[a] : 8'h00));
    n_readback++;
  endtask

  task automatic reset_model();
    for (int a = 0; a < NREG; a++) regs_m[a] = (a == A_THR) ? 8'h80 : 8'h00;
    trig_m = 0;
  endtask

  function automatic logic [63:0] mask_m();
    for (int b = 0; b < 8; b++) mask_m[b*8 +: 8] = regs_m[A_MASK0 + b];
  endfunction

  function automatic int width_m();
    return 200 + (int'(regs_m[A_WIDTH]) * 800 + 127) / 255;
  endfunction

  task automatic check_ports();
    logic [63:0] tpe;
    for (int b = 0; b < 8; b++) tpe[b*8 +: 8] = regs_m[A_TPEN0 + b];
    expect_eq("threshold DAC", 96'(thr_code), 96'(regs_m[A_THR]));
    expect_eq("width DAC", 96'(width_code), 96'(regs_m[A_WIDTH]));
    expect_eq("test DAC", 96'(tp_code), 96'(regs_m[A_TPAMP]));
    expect_eq("test enables", 96'(tp_en), 96'(tpe));
    for (int c = 0; c < NCFG; c++)
      expect_eq("config", 96'(cfg_regs[c]), 96'(regs_m[A_CFG0 + c]));
    n_ports++;
  endtask

  // ---------------- readout ----------------
  task automatic read_word(output logic [95:0] w);
    w = '0;
    #20ns lev1 = 1'b1;
    #25ns lev1 = 1'b0;
    #15ns;
    for (int k = 0; k < FRAME_CYC; k++) begin
      ck_ro = 1'b1;
      #(RO_HALF / 2) w = {w[94:0], data_out};
      #(RO_HALF / 2) ck_ro = 1'b0;
      #(RO_HALF / 2) w = {w[94:0], data_out};
      #(RO_HALF / 2);
    end
    #(4 * RO_HALF);
    checks++;
    if (data_out !== 1'b0) begin failures++; $display("line not idle after word"); end
  endtask

  // One event: random channels fire in the 1.3 us before the trigger
  task automatic one_event(int p_fire);
    int          t_edge [NCH];     // ns before the trigger, -1 = no hit
    logic [63:0] exp_hits = '0;
    logic [95:0] w, exp_w;
    int          wd = width_m();
    logic [63:0] m  = mask_m();
    for (int c = 0; c < NCH; c++) begin
      t_edge[c] = -1;
      if ($urandom_range(0, 99) < p_fire) begin
        int t = 5 * $urandom_range(8, 260);        // 40 .. 1300 ns
        // the trigger comes 20 ns after the window: stay clear of the end
        if (t > wd - 50 && t < wd + 15) t = wd + 20;
        t_edge[c] = t;
        if (t < wd) begin
          if (m[c]) n_masked++;
          else begin
            exp_hits[c] = 1'b1;
            if (t > 25) n_stretched++;
          end
        end else begin
          n_expired++;
        end
      end
    end
    // play the discriminator pulses (20 ns wide) in 5 ns steps
    for (int s = 1400; s > 0; s -= 5) begin
      for (int c = 0; c < NCH; c++)
        disc[c] = (t_edge[c] >= 0) && (s <= t_edge[c]) && (s > t_edge[c] - 20);
      #5ns;
    end
    disc = '0;
    checks++;
    if (or_out !== |exp_hits) begin
      failures++;
      $display("OR: got %b expected %b", or_out, |exp_hits);
    end
    if (or_out) n_or_hi++; else n_or_lo++;
    // the trigger comes 20 ns after the last step (inside read_word)
    exp_w[95:86] = HEADER;
    exp_w[85:81] = 5'(trig_m);
    exp_w[80:72] = {regs_m[A_ID_HI][0], regs_m[A_ID_LO]};
    for (int c = 0; c < NCH; c++) exp_w[71 - c] = exp_hits[c];
    exp_w[7:0] = '0;
    read_word(w);
    expect_eq($sformatf("event %0d word", trig_m), w, exp_w);
    if (trig_m == 31) n_wrap++;
    trig_m = (trig_m + 1) % 32;
    #1us;                                   // let every monostable expire
  endtask

  initial begin
    int codes [4] = '{0, 255, 100, 40};
    #1 rst = 1'b1;
    reset_model();
    #2us rst = 1'b0;
    #1us;
    for (int a = 0; a < NREG; a++) sc_read_check(a);   // reset values
    check_ports();
    // configure: chip ID, DACs, configuration, test enables
    sc_write(A_ID_LO, 8'h5B);
    sc_write(A_ID_HI, 8'h01);
    sc_write(A_THR, 8'h42);
    sc_write(A_TPAMP, 8'h99);
    for (int c = 0; c < NCFG; c++) sc_write(A_CFG0 + c, 8'($urandom));
    for (int b = 0; b < 8; b++) sc_write(A_TPEN0 + b, 8'($urandom));
    sc_write(A_MASK0 + 3, 8'hFF);          // channels 24..31 off
    sc_write(A_MASK0 + 6, 8'h81);          // channels 48 and 55 off
    sc_write(127, 8'hEE);                  // outside the map: ignored
    check_ports();
    for (int i = 0; i < 4; i++) begin
      sc_write(A_WIDTH, 8'(codes[i]));
      n_width++;
      for (int a = 0; a < NREG; a++) sc_read_check(a);
      for (int e = 0; e < 9; e++) one_event(e == 0 ? 0 : 15);
    end
    // new mask, random chip ID
    for (int b = 0; b < 8; b++) sc_write(A_MASK0 + b, 8'($urandom));
    sc_write(A_ID_LO, 8'($urandom));
    sc_write(A_ID_HI, 8'($urandom));
    for (int e = 0; e < 6; e++) one_event(30);
    check_ports();
    // reset returns registers and trigger number to their reset values
    rst = 1'b1; #1us rst = 1'b0; #1us;
    reset_model();
    n_reset++;
    for (int a = 0; a < NREG; a++) sc_read_check(a);
    check_ports();
    one_event(20);
    // every mechanism must have happened
    begin
      automatic int cnt [10] = '{n_masked, n_stretched, n_expired, n_or_hi, n_or_lo,
                       n_wrap, n_readback, n_width, n_ports, n_reset};
      automatic string nm [10] = '{"masked hit", "stretched hit", "expired hit", "OR high",
                         "OR low", "trigger wrap", "read-back", "width change",
                         "DAC ports", "reset"};
      for (int i = 0; i < 10; i++) begin
        checks++;
        $display("%s: %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin failures++; $display("  never happened"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
