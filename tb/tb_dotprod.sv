// tb_dotprod: two worked examples (results 11 and -15) and random vectors
// against a reference sum of +/-1 x sample products.
`timescale 1ns/1ps
module tb_dotprod;
  import cdma_pkg::*;
  int checks = 0, failures = 0;
  sample_t  s [CHIPS];
  chipseq_t cs;
  dp_t      dp;

  dotprod dut (.s(s), .cs(cs), .dp(dp));

  task automatic run(input int vals [CHIPS], input chipseq_t c);
    int ref_sum;
    ref_sum = 0;
    for (int i = 0; i < CHIPS; i++) begin
      s[i] = sample_t'(vals[i]);
      ref_sum += c[i] ? vals[i] : -vals[i];
    end
    cs = c;
    #1;
    checks++;
    if (int'(dp) != ref_sum) begin
      failures++;
      $display("FAIL: dp %0d, expected %0d", dp, ref_sum);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [CHIPS];
    v = '{3, 0, -1, -2, -3, 3, 2, 1};
    run(v, 8'b11010111);
    checks++;
    if (dp != 7'sd11) begin failures++; $display("FAIL: first example"); end
    v = '{6, 3, -7, -6, 1, -1, -4, 5};
    run(v, 8'b01111000);
    checks++;
    if (dp != -7'sd15) begin failures++; $display("FAIL: second example"); end
    for (int n = 0; n < 300; n++) begin
      chipseq_t c;
      for (int i = 0; i < CHIPS; i++) v[i] = $urandom_range(0, 15) - 8;
      c = chipseq_t'($urandom);
      if (c == '0) c = 8'b00000001;   // a code always holds a 1 chip
      run(v, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
