// tb_cdma_full: two stations at the full default parameters (25 MHz clock,
// 195 kHz sampling in fast mode, 6.1 kbit/s per station, real keypad and
// LCD timings), both sending the stream of incrementing bytes. Station A
// must initialize its LCD, send its preamble, synchronize to B and to
// itself, receive eight consecutive bytes from each with odd parity, one
// byte every 32768 cycles, and show "B:nnnn E:0000" on the LCD. The two
// clocks are 13 ns apart and both rate counters are started together, so
// the stations' chips line up as the code set requires.
`timescale 1ns/1ps
module tb_cdma_full;
  import cdma_pkg::*;

  localparam int BYTE_CYCLES = 8 * WINDOW * 128;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  logic clk_a = 0, clk_b = 0;
  always #20 clk_a = ~clk_a;
  initial begin
    #13;
    forever #20 clk_b = ~clk_b;
  end

  logic       rst_n;
  logic [3:0] rx;
  logic [3:0] kp_col_a, kp_col_b;
  logic       high_a, low_a, high_b, low_b;
  logic       e_a, rw_a, rs_a, busy_a, e_b, rw_b, rs_b, busy_b;
  logic [7:0] d_a, d_b;
  logic       sclk_a, sclk_b;
  logic [7:0] line_a [16], line_b [16];
  int         cmd_a, lw_a, br_a, cmd_b, lw_b, br_b;

  cdma dut_a (
    .clk(clk_a), .reset_n(rst_n), .rx(rx),
    .clock_mode(1'b1), .output_mode(1'b1), .latched_mode(1'b0), .tx_disable(1'b0),
    .local_cs(2'd1), .remote1_cs(2'd0), .remote2_cs(2'd1),
    .kp_row(4'b0000), .kp_col(kp_col_a),
    .cdma_low(low_a), .cdma_high(high_a),
    .lcd_enable(e_a), .lcd_rw(rw_a), .lcd_select(rs_a), .lcd_data(d_a),
    .lcd_high_bit(busy_a), .sample_clock(sclk_a));

  cdma dut_b (
    .clk(clk_b), .reset_n(rst_n), .rx(rx),
    .clock_mode(1'b1), .output_mode(1'b1), .latched_mode(1'b0), .tx_disable(1'b0),
    .local_cs(2'd0), .remote1_cs(2'd1), .remote2_cs(2'd0),
    .kp_row(4'b0000), .kp_col(kp_col_b),
    .cdma_low(low_b), .cdma_high(high_b),
    .lcd_enable(e_b), .lcd_rw(rw_b), .lcd_select(rs_b), .lcd_data(d_b),
    .lcd_high_bit(busy_b), .sample_clock(sclk_b));

  tx_channel #(.N(2)) u_channel (
    .high({high_b, high_a}), .low({low_b, low_a}),
    .invert(2'b00), .noise(4'sd0), .rx(rx));

  lcd_model #(.BUSY_CYCLES(1000)) u_lcd_a (
    .clk(clk_a), .e(e_a), .rw(rw_a), .rs(rs_a), .data(d_a), .busy(busy_a),
    .line(line_a), .commands(cmd_a), .line_writes(lw_a), .busy_reads(br_a));
  lcd_model #(.BUSY_CYCLES(1000)) u_lcd_b (
    .clk(clk_b), .e(e_b), .rw(rw_b), .rs(rs_b), .data(d_b), .busy(busy_b),
    .line(line_b), .commands(cmd_b), .line_writes(lw_b), .busy_reads(br_b));

  longint cyc = 0;
  always @(posedge clk_a) cyc++;

  int         rx_count [2] = '{0, 0};
  int         bad      [2] = '{0, 0};
  int         gaps_ok = 0, gaps_bad = 0;
  logic [7:0] prev     [2];
  longint     prev_t   [2];
  logic       rv_q     [2] = '{0, 0};
  logic [7:0] b;

  always @(posedge clk_a) begin
    for (int k = 0; k < 2; k++) begin
      rv_q[k] <= dut_a.rx_valid[k];
      if (dut_a.rx_valid[k] && !rv_q[k]) begin
        b = dut_a.rx_byte[k];
        if (!(^b)) bad[k]++;
        if (rx_count[k] > 0) begin
          if (b[6:0] != 7'(prev[k][6:0] + 7'd1)) bad[k]++;
          if (cyc - prev_t[k] == longint'(BYTE_CYCLES)) gaps_ok++;
          else gaps_bad++;
        end
        prev[k]   = b;
        prev_t[k] = cyc;
        rx_count[k]++;
      end
    end
  end

  function automatic bit line_is(input logic [7:0] l [16], input logic [127:0] s);
    for (int i = 0; i < 16; i++) if (l[i] != s[127 - 8*i -: 8]) return 0;
    return 1;
  endfunction

  function automatic logic [15:0] to_bcd(input int v);
    return {4'(v / 1000 % 10), 4'(v / 100 % 10), 4'(v / 10 % 10), 4'(v % 10)};
  endfunction

  initial begin
    repeat (4_000_000) @(posedge clk_a);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    force dut_a.u_ctrl.u_clk.count = '0;
    force dut_b.u_ctrl.u_clk.count = '0;
    rst_n = 0;
    #1000;
    release dut_a.u_ctrl.u_clk.count;
    release dut_b.u_ctrl.u_clk.count;
    repeat (20) @(posedge clk_a);
    rst_n = 1;
    wait (rx_count[0] >= 8 && rx_count[1] >= 8);
    repeat (10) @(posedge clk_a);
    check(bad[0] == 0, "bytes from B: odd parity and consecutive");
    check(bad[1] == 0, "own bytes: odd parity and consecutive");
    check(gaps_ok >= 14 && gaps_bad == 0, "one byte every 32768 cycles");
    check(dut_a.errors_bcd == 16'h0000, "no errors counted");
    check(dut_a.bytes_bcd == to_bcd(rx_count[0] + rx_count[1]), "every byte counted, in BCD");
    wait (lw_a >= 1);
    check(cmd_a >= 9, "LCD initialized before the first line write");
    repeat (20000) @(posedge clk_a);
    check(line_is(line_a, {"B:", line_a[2], line_a[3], line_a[4], line_a[5],
                           8'hA0, "E:0000", 8'hA0, 8'hA0, 8'hA0}),
          "LCD shows bytes and errors");
    check(dut_b.dec_synced[0] && dut_b.dec_synced[1], "station B synchronized too");
    $display("received %0d + %0d bytes in %0d cycles", rx_count[0], rx_count[1], cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
