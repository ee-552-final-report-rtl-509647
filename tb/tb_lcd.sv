// tb_lcd: the LCD controller against a display model. Checks the setup
// command sequence (38 38 38 08 01 06 0C 02), that done stays low until
// it is finished, that no write is issued while the display reports busy,
// and three line rewrites:
//   mode 0, device 1, data '0'  -> 44 65 76 69 63 65 3A 31 A0 44 61 74 61 3A 30 A0
//   mode 1, 1234 bytes, 4321 errors -> 42 3A 31 32 33 34 A0 45 3A 34 33 32 31 A0 A0 A0
//   mode 1, 1114 bytes, 4444 errors -> 42 3A 31 31 31 34 A0 45 3A 34 34 34 34 A0 A0 A0
`timescale 1ns/1ps
module tb_lcd;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst_n, data_valid, mode, done, e, rw, rs, busy;
  logic [1:0]  device;
  logic [7:0]  data_char, data;
  logic [15:0] bytes_bcd, errors_bcd;
  logic [7:0]  line [16];
  int          commands, line_writes, busy_reads;
  logic [7:0]  cmds [$];
  int          write_while_busy = 0;
  logic        e_q = 0;

  lcd #(.POWERUP(100), .INIT_WAIT(30), .E_CYCLES(2)) dut (
    .clk(clk), .rst_n(rst_n), .data_valid(data_valid), .mode(mode), .device(device),
    .data_char(data_char), .bytes_bcd(bytes_bcd), .errors_bcd(errors_bcd), .done(done),
    .lcd_e(e), .lcd_rw(rw), .lcd_rs(rs), .lcd_data(data), .lcd_busy(busy));

  lcd_model #(.BUSY_CYCLES(20)) u_model (
    .clk(clk), .e(e), .rw(rw), .rs(rs), .data(data), .busy(busy),
    .line(line), .commands(commands), .line_writes(line_writes), .busy_reads(busy_reads));

  always @(posedge clk) begin
    e_q <= e;
    if (e && !e_q && !rw) begin
      if (busy) write_while_busy++;
      if (!rs) cmds.push_back(data);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit line_is(input logic [127:0] s);
    for (int i = 0; i < 16; i++) if (line[i] != s[127 - 8*i -: 8]) return 0;
    return 1;
  endfunction

  task automatic show(input logic m, input logic [1:0] dev, input logic [7:0] ch,
                      input logic [15:0] b, input logic [15:0] er);
    int lw0;
    lw0 = line_writes;
    mode = m; device = dev; data_char = ch; bytes_bcd = b; errors_bcd = er;
    wait (done);
    @(negedge clk);
    data_valid = 1;
    @(negedge clk);
    data_valid = 0;
    mode = ~m; data_char = 8'h3F; bytes_bcd = '1;   // inputs were latched
    check(!done, "done drops during a write");
    wait (done);
    check(line_writes == lw0 + 1, "one full line written");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; data_valid = 0; mode = 0; device = 0; data_char = 0;
    bytes_bcd = 0; errors_bcd = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    repeat (50) @(posedge clk); #1;
    check(!done, "not ready during power-up wait");
    wait (done);
    check(cmds.size() == 8, $sformatf("%0d setup commands", cmds.size()));
    if (cmds.size() == 8)
      check(cmds[0] == 8'h38 && cmds[1] == 8'h38 && cmds[2] == 8'h38 && cmds[3] == 8'h08 &&
            cmds[4] == 8'h01 && cmds[5] == 8'h06 && cmds[6] == 8'h0C && cmds[7] == 8'h02,
            "setup command order");
    show(1'b0, 2'd1, "0", 16'h0000, 16'h0000);
    check(line_is(128'h446576696365_3A31_A0_44617461_3A30_A0), "device/data line");
    show(1'b1, 2'd0, "x", 16'h1234, 16'h4321);
    check(line_is(128'h42_3A_31323334_A0_45_3A_34333231_A0A0A0), "bytes/errors line");
    show(1'b1, 2'd0, "x", 16'h1114, 16'h4444);
    check(line_is(128'h42_3A_31313134_A0_45_3A_34343434_A0A0A0), "second bytes/errors line");
    check(busy_reads > 3 * 17, "busy flag read after every write");
    check(write_while_busy == 0, "no write while the display is busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
