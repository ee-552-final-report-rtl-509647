// tb_rxbuff: bits before the frame marker are ignored; after a 1 and eight
// 0s, bytes are packed LSB first and handed over with the valid/ack
// handshake; an all-ones byte drops framing until the next marker; a byte
// not yet acknowledged is overwritten by the next; clear restarts framing.
`timescale 1ns/1ps
module tb_rxbuff;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, clear, bit_in, bit_valid, ack, byte_valid, framed;
  logic [7:0] byte_out;

  rxbuff dut (.clk(clk), .rst_n(rst_n), .clear(clear), .bit_in(bit_in),
              .bit_valid(bit_valid), .byte_out(byte_out), .byte_valid(byte_valid),
              .ack(ack), .framed(framed));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic send_bit(input bit b);
    bit_in = b; bit_valid = 1;
    @(posedge clk); #1;
    bit_valid = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  task automatic send_byte(input logic [7:0] v);
    for (int i = 0; i < 8; i++) send_bit(v[i]);
  endtask

  task automatic take(input logic [7:0] v, input string what);
    check(byte_valid && byte_out == v, what);
    ack = 1;
    @(posedge clk); #1;
    check(!byte_valid, "valid cleared by ack");
    ack = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; bit_in = 0; bit_valid = 0; ack = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    // zeros before any one are not a marker
    repeat (10) send_bit(0);
    check(!framed && !byte_valid, "leading zeros ignored");
    repeat (12) send_bit(1);
    repeat (7) send_bit(0);
    check(!framed, "seven zeros are not a marker");
    send_bit(0);
    check(framed, "marker found");
    send_byte(8'hB5);
    take(8'hB5, "first byte");
    send_byte(8'h01);
    take(8'h01, "second byte, LSB first");
    send_byte(8'h83);
    send_byte(8'h04);
    take(8'h04, "unacknowledged byte is overwritten");
    // an all-ones byte means a new preamble
    send_byte(8'hFF);
    check(!framed && !byte_valid, "all-ones byte drops framing");
    repeat (8) send_bit(1);
    send_byte(8'h00);
    check(framed, "reframed on the next marker");
    send_byte(8'h2A);
    take(8'h2A, "byte after reframing");
    clear = 1;
    @(posedge clk); #1;
    clear = 0;
    check(!framed, "clear drops framing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
