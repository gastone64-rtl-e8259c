// tb_channel_mask: checks the channel mask and the global OR with random and
// corner-case hit and mask patterns, against values computed bit by bit.
module tb_channel_mask;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NCH = 64;
  logic [NCH-1:0] hit_in, mask, hit_out;
  logic           or_out;
  int checks = 0, failures = 0;

  channel_mask #(.NCH(NCH)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic exp_or = 1'b0;
    #1;
    for (int i = 0; i < NCH; i++) begin
      logic e = hit_in[i] && !mask[i];
      checks++;
      if (hit_out[i] !== e) begin
        failures++;
        $display("ch %0d: hit=%b mask=%b out=%b", i, hit_in[i], mask[i], hit_out[i]);
      end
      if (e) exp_or = 1'b1;
    end
    checks++;
    if (or_out !== exp_or) begin
      failures++;
      $display("OR: got %b expected %b", or_out, exp_or);
    end
  endtask

  initial begin
    hit_in = '0; mask = '0;              check_one();
    hit_in = '1; mask = '0;              check_one();
    hit_in = '1; mask = '1;              check_one();
    for (int i = 0; i < NCH; i++) begin  // a single hit, masked then not
      hit_in = '0; hit_in[i] = 1'b1;
      mask = '0; mask[i] = 1'b1;         check_one();
      mask = ~mask;                      check_one();
    end
    for (int n = 0; n < 200; n++) begin
      hit_in = {$urandom, $urandom};
      mask   = {$urandom, $urandom} | {$urandom, $urandom};
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
