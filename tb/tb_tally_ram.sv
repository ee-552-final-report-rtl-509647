// tb_tally_ram: random writes and reads against an array model; a read in
// the cycle of a write to the same address returns the old word.
`timescale 1ns/1ps
module tb_tally_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic       we;
  logic [4:0] addr;
  logic [3:0] d, q;
  logic [3:0] model [32];
  logic [3:0] expect_q;

  tally_ram dut (.clk(clk), .we(we), .addr(addr), .d(d), .q(q));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a); d = 4'(a * 7); model[a] = 4'(a * 7);
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      we = $urandom_range(0, 1);
      addr = 5'($urandom);
      d = 4'($urandom);
      expect_q = model[addr];
      @(posedge clk); #1;
      if (we) model[addr] = d;
      checks++;
      if (q != expect_q) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", addr, q, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
