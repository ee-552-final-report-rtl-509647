// tb_readadc: every 4-bit offset-binary code must read as code - 8, and
// only at a sample tick.
`timescale 1ns/1ps
module tb_readadc;
  import cdma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, tick;
  logic [3:0] rx;
  sample_t sample;

  readadc dut (.clk(clk), .rst_n(rst_n), .sample_tick(tick), .rx(rx), .sample(sample));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; tick = 0; rx = 4'hF;
    @(posedge clk); #1;
    check(sample == 0, "reset value");
    rst_n = 1;
    for (int c = 0; c < 16; c++) begin
      rx = 4'(c); tick = 1;
      @(posedge clk); #1;
      check(int'(sample) == c - 8, $sformatf("code %0d", c));
      tick = 0; rx = 4'(15 - c);
      @(posedge clk); #1;
      check(int'(sample) == c - 8, "holds without a tick");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
