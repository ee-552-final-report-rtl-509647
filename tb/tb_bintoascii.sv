// tb_bintoascii: every key number against the character it must produce.
`timescale 1ns/1ps
module tb_bintoascii;
  int checks = 0, failures = 0;
  logic [3:0] key;
  logic [6:0] ascii;
  string expected = "0123456789ABCDEF";

  bintoascii dut (.key(key), .ascii(ascii));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      key = 4'(k);
      #1;
      checks++;
      if (ascii != expected[k][6:0]) begin
        failures++;
        $display("FAIL: key %0d gave %h", k, ascii);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
