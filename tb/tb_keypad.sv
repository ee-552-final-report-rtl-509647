// tb_keypad: a matrix model connects the pressed key's column to its row.
// Keys 13 (fourth row, second column) and 11 (third row, fourth column)
// are pressed in turn and every key is then tried once: each press must
// give the key number with exactly one valid pulse, and key must hold its
// value afterwards. A press shorter than the debounce time is ignored, and
// a key held down is reported only once.
`timescale 1ns/1ps
module tb_keypad;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic       rst_n;
  logic [3:0] row_input, col_check, key;
  logic       valid;
  logic       down;
  int         pressed;
  int         pulses = 0;

  keypad #(.DEBOUNCE(50), .SETTLE(3)) dut (.clk(clk), .rst_n(rst_n), .row_input(row_input),
    .col_check(col_check), .key(key), .valid(valid));

  always_comb
    row_input = (down && col_check[pressed % 4]) ? (4'b0001 << (pressed / 4)) : 4'b0000;

  always @(posedge clk) if (valid) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press(input int k, input int hold);
    int p0;
    p0 = pulses;
    pressed = k;
    down = 1;
    repeat (hold) @(posedge clk);
    down = 0;
    repeat (150) @(posedge clk);
    #1;
    if (hold > 100) begin
      check(pulses == p0 + 1, $sformatf("one valid pulse for key %0d", k));
      check(key == 4'(k), $sformatf("key %0d reported as %0d", k, key));
    end else begin
      check(pulses == p0, "short press ignored");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; down = 0; pressed = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    check(key == 0 && col_check == 4'b1111, "idle after reset");
    press(13, 200);
    press(11, 200);
    press(6, 20);
    check(key == 11, "key holds its value");
    press(2, 2000);
    for (int k = 0; k < 16; k++) press(k, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
