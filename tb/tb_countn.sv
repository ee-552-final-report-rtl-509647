// tb_countn: the default 12-bit counter counts enabled cycles only, wraps
// after 4096 counts and clears synchronously with priority over enable.
`timescale 1ns/1ps
module tb_countn;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic clr, en;
  logic [11:0] count;
  int model;

  countn dut (.clk(clk), .clr(clr), .en(en), .count(count));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; en = 0;
    @(posedge clk); #1;
    check(count == 0, "clear");
    clr = 0;
    model = 0;
    for (int i = 0; i < 9000; i++) begin
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) model = (model + 1) % 4096;
      if (i % 97 == 0 || count == 0) check(count == 12'(model), "count follows enabled cycles");
    end
    clr = 1; en = 1;
    @(posedge clk); #1;
    check(count == 0, "clear wins over enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
