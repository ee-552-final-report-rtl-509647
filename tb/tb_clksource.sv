// tb_clksource: the counter must advance by exactly one every clock, and
// bit k must toggle every 2^k cycles. The start value is arbitrary (the
// counter has no reset), so all checks are relative to the first value.
`timescale 1ns/1ps
module tb_clksource;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [22:0] count, prev;
  int toggles3 = 0;

  clksource dut (.clk(clk), .count(count));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    prev = count;
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk); #1;
      checks++;
      if (count != prev + 23'd1) begin
        failures++;
        $display("FAIL: %h -> %h", prev, count);
      end
      if (count[3] != prev[3]) toggles3++;
      prev = count;
    end
    checks++;
    if (toggles3 != 4096 / 8) begin
      failures++;
      $display("FAIL: bit 3 toggled %0d times", toggles3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
