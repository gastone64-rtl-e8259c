// tb_hit_rate: runs the chip under the hit rate expected on the innermost
// detector layer, 30 kHz per strip on every one of the 64 channels, for
// 1 ms with level-1 triggers at random intervals (mean 10 us). Every event
// word read out is compared with a model that keeps the time of each
// channel's latest discriminator edge: a channel is 1 in the word when that
// edge is less than the programmed monostable width before the trigger and
// the channel is not masked. Runs once with the shortest (200 ns) and once
// with the longest (1 us) width. Reports the observed channel occupancy.
module tb_hit_rate;
  import gastone64_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  RATE_HZ  = 30_000;    // per strip
  localparam int  STEP_NS  = 10;
  localparam int  RUN_NS   = 1_000_000;
  localparam time SC_HALF  = 500ns;
  localparam time RO_HALF  = 10ns;

  logic                       rst = 1'b0;
  logic [NCH-1:0]             disc = '0;
  logic [REG_W-1:0]           thr_code, width_code, tp_code;
  logic [NCH-1:0]             tp_en;
  logic [NCFG-1:0][REG_W-1:0] cfg_regs;
  logic                       lev1 = 1'b0, ck_ro = 1'b0, data_out, or_out;
  logic                       sc_ck = 1'b0, sc_din = 1'b0, sc_dout;

  gastone64 dut (.*);

  int checks = 0, failures = 0;
  int n_events = 0, n_hits_sent = 0, n_hits_read = 0;
  realtime last_edge [NCH];
  realtime next_trig;
  int      width_ns;
  logic [63:0] mask_m;
  logic [8:0]  id_m;
  int      trig_m = 0;
  bit      running;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sc_write(int a, logic [7:0] d);
    for (int i = 15; i >= 0; i--) begin
      sc_din = (i >= 8) ? (i == 15 ? 1'b1 : a[i - 8]) : d[i];
      #SC_HALF sc_ck = 1'b1;
      #SC_HALF sc_ck = 1'b0;
    end
  endtask

  // Hits change on multiples of 10 ns, triggers come 5 ns off that grid
  function automatic realtime grid();
    return realtime'(longint'($realtime) / STEP_NS * STEP_NS);
  endfunction

  // Discriminator pulses: each channel fires with probability RATE * STEP
  task automatic hits_run();
    int unsigned thresh = 32'(longint'(RATE_HZ) * STEP_NS * 4295 / 1000); // p * 2^32
    int busy [NCH];
    for (int c = 0; c < NCH; c++) busy[c] = 0;
    #(grid() + STEP_NS - $realtime);
    while (running) begin
      for (int c = 0; c < NCH; c++) begin
        if (busy[c] > 0) begin
          busy[c]--;
          if (busy[c] == 0) disc[c] = 1'b0;
        end else if ($urandom < thresh) begin
          realtime age = next_trig - $realtime;
          // keep clear of the pulse end at the next trigger
          if (age > width_ns - 30 && age < width_ns + 30) continue;
          disc[c] = 1'b1;
          last_edge[c] = $realtime;
          busy[c] = 2;
          n_hits_sent++;
        end
      end
      #(STEP_NS * 1ns);
    end
    disc = '0;
  endtask

  task automatic trig_run();
    realtime t_end = $realtime + RUN_NS;
    next_trig = grid() + 5005 + 10 * $urandom_range(0, 1000);
    while ($realtime < t_end) begin
      logic [95:0] w, exp_w;
      logic [63:0] h = '0;
      #(next_trig - $realtime);
      lev1 = 1'b1;
      for (int c = 0; c < NCH; c++)
        h[c] = !mask_m[c] && (last_edge[c] >= 0) && ($realtime - last_edge[c] < width_ns);
      #25ns lev1 = 1'b0;
      next_trig = grid() + 2005 + 10 * $urandom_range(0, 1600);  // mean ~10 us
      #15ns;
      w = '0;
      for (int k = 0; k < FRAME_CYC; k++) begin
        ck_ro = 1'b1;
        #(RO_HALF / 2) w = {w[94:0], data_out};
        #(RO_HALF / 2) ck_ro = 1'b0;
        #(RO_HALF / 2) w = {w[94:0], data_out};
        #(RO_HALF / 2);
      end
      exp_w = {HEADER, 5'(trig_m), id_m, 64'(0), 8'(0)};
      for (int c = 0; c < NCH; c++) exp_w[71 - c] = h[c];
      checks++;
      if (w !== exp_w) begin
        failures++;
        $display("event %0d: got %h expected %h", n_events, w, exp_w);
      end
      for (int c = 0; c < NCH; c++) n_hits_read += int'(w[71 - c]);
      trig_m = (trig_m + 1) % 32;
      n_events++;
    end
  endtask

  task automatic run(int code);
    width_ns = 200 + (code * 800 + 127) / 255;
    sc_write(A_WIDTH, 8'(code));
    for (int c = 0; c < NCH; c++) last_edge[c] = -1.0e9;
    running = 1'b1;
    fork
      hits_run();
      begin trig_run(); running = 1'b0; end
    join
    #2us;
  endtask

  initial begin
    #1 rst = 1'b1;
    #2us rst = 1'b0;
    mask_m = 64'h0000_0100_0000_8001;   // channels 0, 15, 40 off
    id_m = 9'h1A7;
    for (int b = 0; b < 8; b++) sc_write(A_MASK0 + b, mask_m[b*8 +: 8]);
    sc_write(A_ID_LO, id_m[7:0]);
    sc_write(A_ID_HI, {7'd0, id_m[8]});
    run(0);
    run(255);
    $display("events %0d, discriminator hits %0d, hits read %0d, occupancy %0.2f %%",
             n_events, n_hits_sent, n_hits_read,
             100.0 * n_hits_read / (n_events * 61.0));
    checks++;
    if (n_events < 100 || n_hits_read == 0) begin
      failures++;
      $display("too few events or hits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
