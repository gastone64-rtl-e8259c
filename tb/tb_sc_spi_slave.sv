// tb_sc_spi_slave: drives the slow-control port as a 1 MHz master and checks
// 16-bit write and read transactions. A register array in the testbench
// answers the port's read address and records its writes; every write must
// arrive exactly once, with the right address and data, on the 16th clock
// of its transaction, and every read must shift out the stored byte.
module tb_sc_spi_slave;
  import gastone64_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam time HALF = 500ns;   // 1 MHz

  logic              sck = 1'b0, rst = 1'b0, sdi = 1'b0, sdo;
  logic              wr_en;
  logic [ADDR_W-1:0] addr, raddr;
  logic [REG_W-1:0]  wdata, rdata;
  logic [7:0]        mem [128];
  int                n_wr = 0, edge_no = 0, wr_edge = 0;
  int checks = 0, failures = 0;

  sc_spi_slave dut (.*);

  assign rdata = mem[raddr];

  always @(posedge sck) begin
    edge_no++;
    if (wr_en) begin
      mem[addr] <= wdata;
      n_wr++;
      wr_edge = edge_no;
    end
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // One 16-bit transaction; returns the byte seen on sdo in the data phase
  task automatic xfer(logic [15:0] word, output logic [7:0] rd);
    rd = '0;
    for (int i = 15; i >= 0; i--) begin
      sdi = word[i];
      #(HALF - 1ns);
      if (i < 8) rd[i] = sdo;       // master samples just before the edge
      #1ns sck = 1'b1;
      #HALF sck = 1'b0;
    end
  endtask

  task automatic spi_write(int a, logic [7:0] d);
    logic [7:0] dummy;
    int n0 = n_wr, e0 = edge_no;
    xfer({1'b1, 7'(a), d}, dummy);
    expect_eq("write count", n_wr - n0, 1);
    expect_eq("write on 16th edge", wr_edge - e0, 16);
    expect_eq($sformatf("stored %0d", a), int'(mem[a]), int'(d));
    expect_eq("sdo idle during write", int'(dummy), 0);
  endtask

  task automatic spi_read(int a);
    logic [7:0] got;
    int n0 = n_wr;
    xfer({1'b0, 7'(a), 8'h00}, got);
    expect_eq("no write on read", n_wr - n0, 0);
    expect_eq($sformatf("read %0d", a), int'(got), int'(mem[a]));
  endtask

  initial begin
    for (int a = 0; a < 128; a++) mem[a] = 8'(a * 7 + 3);
    #1 rst = 1'b1;
    #2us rst = 1'b0;
    #1us;
    for (int a = 0; a < 28; a++) spi_read(a);
    for (int a = 0; a < 28; a++) spi_write(a, 8'($urandom));
    for (int a = 0; a < 28; a++) spi_read(a);
    for (int n = 0; n < 60; n++) begin
      if ($urandom_range(0, 1)) spi_write($urandom_range(0, 127), 8'($urandom));
      else                      spi_read($urandom_range(0, 127));
    end
    // Back-to-back: bit counter realigned by reset after a broken transaction
    begin
      logic [7:0] dummy;
      for (int i = 0; i < 5; i++) begin sck = 1'b1; #HALF sck = 1'b0; #HALF; end
      rst = 1'b1; #1us rst = 1'b0; #1us;
      spi_write(5, 8'h3C);
      spi_read(5);
      xfer(16'h0000, dummy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
