// tb_reg3shift: random samples are shifted in with random gaps; after every
// cycle all 32 taps must match a queue model (newest at tap 0).
`timescale 1ns/1ps
module tb_reg3shift;
  import cdma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, shift;
  sample_t d;
  sample_t taps [WINDOW];
  sample_t model [WINDOW];

  reg3shift dut (.clk(clk), .rst_n(rst_n), .shift(shift), .d(d), .taps(taps));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; shift = 0; d = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      shift = ($urandom_range(0, 2) != 0);
      d = sample_t'($urandom);
      @(posedge clk); #1;
      if (shift) begin
        for (int i = WINDOW - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = d;
      end
      checks++;
      for (int i = 0; i < WINDOW; i++)
        if (taps[i] != model[i]) begin
          failures++;
          $display("FAIL: tap %0d is %0d, expected %0d", i, taps[i], model[i]);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
