// tb_sc_regfile: checks reset values, writes and read-back of all 28
// registers, rejection of out-of-range addresses, and the decoding of the
// registers into mask, test-pulse enables, DAC codes, chip ID and
// configuration bytes, against a reference array kept by the testbench.
module tb_sc_regfile;
  import gastone64_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic              clk = 1'b0, rst = 1'b0;
  logic              wr_en;
  logic [ADDR_W-1:0] addr, raddr;
  logic [REG_W-1:0]  wdata, rdata;
  sc_cfg_t           cfg;
  logic [7:0]        ref_regs [32];
  int checks = 0, failures = 0;

  sc_regfile dut (.*);

  always #500 clk = ~clk;   // 1 MHz slow-control clock

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(int a, logic [7:0] d);
    @(negedge clk);
    wr_en = 1'b1; addr = ADDR_W'(a); wdata = d;
    @(negedge clk);
    wr_en = 1'b0;
    if (a < 28) ref_regs[a] = d;
  endtask

  task automatic check_all();
    logic [63:0] m, t;
    for (int a = 0; a < 128; a++) begin
      raddr = ADDR_W'(a);
      #1;
      expect_eq($sformatf("read %0d", a), 128'(rdata), 128'(a < 28 ? ref_regs[a] : 8'h00));
    end
    for (int b = 0; b < 8; b++) begin
      m[b*8 +: 8] = ref_regs[b];
      t[b*8 +: 8] = ref_regs[8 + b];
    end
    expect_eq("mask",    128'(cfg.mask), 128'(m));
    expect_eq("tp_en",   128'(cfg.tp_en), 128'(t));
    expect_eq("thr",     128'(cfg.thr), 128'(ref_regs[16]));
    expect_eq("width",   128'(cfg.width), 128'(ref_regs[17]));
    expect_eq("tp_amp",  128'(cfg.tp_amp), 128'(ref_regs[18]));
    expect_eq("chip_id", 128'(cfg.chip_id), 128'({ref_regs[20][0], ref_regs[19]}));
    for (int c = 0; c < 7; c++)
      expect_eq($sformatf("cfg %0d", c), 128'(cfg.cfg[c]), 128'(ref_regs[21 + c]));
  endtask

  initial begin
    wr_en = 1'b0; addr = '0; wdata = '0; raddr = '0;
    #1 rst = 1'b1;
    for (int a = 0; a < 28; a++) ref_regs[a] = (a == 16) ? 8'h80 : 8'h00;
    #2000 rst = 1'b0;
    check_all();                               // reset values
    for (int a = 0; a < 28; a++) write(a, 8'($urandom));
    check_all();
    write(28, 8'hA5); write(100, 8'h5A); write(127, 8'hFF);  // ignored
    check_all();
    for (int n = 0; n < 100; n++) write($urandom_range(0, 40), 8'($urandom));
    check_all();
    rst = 1'b1; #10 rst = 1'b0;                // asynchronous reset
    for (int a = 0; a < 28; a++) ref_regs[a] = (a == 16) ? 8'h80 : 8'h00;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
