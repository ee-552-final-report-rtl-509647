// tb_cdma_3st: three stations on one modelled channel, each decoding the
// other two, at reduced rates (a sample every 8 cycles) and with shortened
// keypad and LCD timings. All three send the incrementing byte stream.
// Station k uses code k; its decoders follow the two other codes.
//
// Phase 1: station 2's transmitter is disabled. Codes 0 and 1 are exactly
// orthogonal, so stations 0 and 1 must receive each other's bytes intact
// (odd parity, in sequence), and so must station 2, which only listens.
// Phase 2: station 2 transmits too. Code 2 has a dot product of +2 with
// both other codes, so a decoder's +-8 can be pulled to 6 or 4, which is
// not above the decision threshold, and bits are lost. The test prints
// how many bytes each decoder delivers and with how many errors, checks
// that this cross-talk does corrupt reception (the limit of the code set),
// and checks that each controller counts exactly the bytes and parity
// errors its buffers deliver, so the LCD statistics show the damage.
// The three clocks are offset by a few ns and the rate counters are
// started together, so the stations' chips line up.
`timescale 1ns/1ps
module tb_cdma_3st;
  import cdma_pkg::*;

  localparam int FSB = 2;
  localparam int BYTE_CYCLES = 8 * WINDOW * (1 << (FSB + 1));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  logic clk [3];
  initial begin
    clk[0] = 0; clk[1] = 0; clk[2] = 0;
    fork
      forever #20 clk[0] = ~clk[0];
      begin #7;  forever #20 clk[1] = ~clk[1]; end
      begin #13; forever #20 clk[2] = ~clk[2]; end
    join_none
  end

  logic       rst_n;
  logic [3:0] rx;
  logic [2:0] high, low;
  logic       txdis [3];
  logic [3:0] kp_col [3];
  logic       e [3], rw [3], rs [3], busy [3], sclk [3];
  logic [7:0] d [3];
  logic [7:0] line [3][16];
  int         cmds [3], lws [3], brs [3];

  cdma #(.FAST_SAMPLE_BIT(FSB), .SLOW_SAMPLE_BIT(FSB + 1), .KP_DEBOUNCE(20),
         .LCD_POWERUP(200), .LCD_INIT_WAIT(50), .LCD_E_CYCLES(2)) st0 (
    .clk(clk[0]), .reset_n(rst_n), .rx(rx),
    .clock_mode(1'b1), .output_mode(1'b1), .latched_mode(1'b0), .tx_disable(txdis[0]),
    .local_cs(2'd0), .remote1_cs(2'd1), .remote2_cs(2'd2),
    .kp_row(4'b0000), .kp_col(kp_col[0]), .cdma_low(low[0]), .cdma_high(high[0]),
    .lcd_enable(e[0]), .lcd_rw(rw[0]), .lcd_select(rs[0]), .lcd_data(d[0]),
    .lcd_high_bit(busy[0]), .sample_clock(sclk[0]));

  cdma #(.FAST_SAMPLE_BIT(FSB), .SLOW_SAMPLE_BIT(FSB + 1), .KP_DEBOUNCE(20),
         .LCD_POWERUP(200), .LCD_INIT_WAIT(50), .LCD_E_CYCLES(2)) st1 (
    .clk(clk[1]), .reset_n(rst_n), .rx(rx),
    .clock_mode(1'b1), .output_mode(1'b1), .latched_mode(1'b0), .tx_disable(txdis[1]),
    .local_cs(2'd1), .remote1_cs(2'd0), .remote2_cs(2'd2),
    .kp_row(4'b0000), .kp_col(kp_col[1]), .cdma_low(low[1]), .cdma_high(high[1]),
    .lcd_enable(e[1]), .lcd_rw(rw[1]), .lcd_select(rs[1]), .lcd_data(d[1]),
    .lcd_high_bit(busy[1]), .sample_clock(sclk[1]));

  cdma #(.FAST_SAMPLE_BIT(FSB), .SLOW_SAMPLE_BIT(FSB + 1), .KP_DEBOUNCE(20),
         .LCD_POWERUP(200), .LCD_INIT_WAIT(50), .LCD_E_CYCLES(2)) st2 (
    .clk(clk[2]), .reset_n(rst_n), .rx(rx),
    .clock_mode(1'b1), .output_mode(1'b1), .latched_mode(1'b0), .tx_disable(txdis[2]),
    .local_cs(2'd2), .remote1_cs(2'd0), .remote2_cs(2'd1),
    .kp_row(4'b0000), .kp_col(kp_col[2]), .cdma_low(low[2]), .cdma_high(high[2]),
    .lcd_enable(e[2]), .lcd_rw(rw[2]), .lcd_select(rs[2]), .lcd_data(d[2]),
    .lcd_high_bit(busy[2]), .sample_clock(sclk[2]));

  tx_channel #(.N(3)) u_channel (
    .high(high), .low(low), .invert(3'b000), .noise(4'sd0), .rx(rx));

  for (genvar k = 0; k < 3; k++) begin : g_lcd
    lcd_model #(.BUSY_CYCLES(20)) u_lcd (
      .clk(clk[k]), .e(e[k]), .rw(rw[k]), .rs(rs[k]), .data(d[k]), .busy(busy[k]),
      .line(line[k]), .commands(cmds[k]), .line_writes(lws[k]), .busy_reads(brs[k]));
  end

  // ---- byte monitors: per station s and decoder k, count bytes, bytes
  // with even parity and bytes that do not follow the previous one
  int         got   [3][2];
  int         par_e [3][2];
  int         seq_e [3][2];
  logic [7:0] prev  [3][2];
  logic       rv_q  [3][2];
  bit         count_en = 0;

  task automatic sample_station(input int s, input logic v0, input logic v1,
                                input logic [7:0] b0, input logic [7:0] b1);
    logic       v [2];
    logic [7:0] b [2];
    v[0] = v0; v[1] = v1; b[0] = b0; b[1] = b1;
    for (int k = 0; k < 2; k++) begin
      if (v[k] && !rv_q[s][k] && count_en) begin
        if (!(^b[k])) par_e[s][k]++;
        if (got[s][k] > 0 && b[k][6:0] != 7'(prev[s][k][6:0] + 7'd1)) seq_e[s][k]++;
        prev[s][k] = b[k];
        got[s][k]++;
      end
      rv_q[s][k] = v[k];
    end
  endtask

  always @(posedge clk[0]) sample_station(0, st0.rx_valid[0], st0.rx_valid[1], st0.rx_byte[0], st0.rx_byte[1]);
  always @(posedge clk[1]) sample_station(1, st1.rx_valid[0], st1.rx_valid[1], st1.rx_byte[0], st1.rx_byte[1]);
  always @(posedge clk[2]) sample_station(2, st2.rx_valid[0], st2.rx_valid[1], st2.rx_byte[0], st2.rx_byte[1]);

  task automatic clear_counts();
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < 2; k++) begin
        got[s][k] = 0; par_e[s][k] = 0; seq_e[s][k] = 0; prev[s][k] = 0; rv_q[s][k] = 0;
      end
  endtask

  function automatic int total_parity(input int s);
    return par_e[s][0] + par_e[s][1];
  endfunction

  function automatic int from_bcd(input logic [15:0] v);
    return 1000 * v[15:12] + 100 * v[11:8] + 10 * v[7:4] + v[3:0];
  endfunction

  initial begin
    repeat (60 * BYTE_CYCLES + 200_000) @(posedge clk[0]);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e [3], n [3];
    int bad;
    clear_counts();
    txdis[0] = 0; txdis[1] = 0; txdis[2] = 1;
    force st0.u_ctrl.u_clk.count = '0;
    force st1.u_ctrl.u_clk.count = '0;
    force st2.u_ctrl.u_clk.count = '0;
    rst_n = 0;
    #1000;
    release st0.u_ctrl.u_clk.count;
    release st1.u_ctrl.u_clk.count;
    release st2.u_ctrl.u_clk.count;
    repeat (20) @(posedge clk[0]);
    rst_n = 1;

    // ---- phase 1: the orthogonal pair alone
    repeat (30 * BYTE_CYCLES) @(posedge clk[0]);
    count_en = 1;
    repeat (10 * BYTE_CYCLES) @(posedge clk[0]);
    count_en = 0;
    $display("phase 1: st0<-st1 %0d bytes (%0d parity, %0d sequence errors), st1<-st0 %0d (%0d, %0d)",
             got[0][0], par_e[0][0], seq_e[0][0], got[1][0], par_e[1][0], seq_e[1][0]);
    check(got[0][0] >= 9 && par_e[0][0] == 0 && seq_e[0][0] == 0, "station 0 receives station 1 intact");
    check(got[1][0] >= 9 && par_e[1][0] == 0 && seq_e[1][0] == 0, "station 1 receives station 0 intact");
    check(got[2][0] >= 9 && par_e[2][0] == 0 && seq_e[2][0] == 0 &&
          got[2][1] >= 9 && par_e[2][1] == 0 && seq_e[2][1] == 0,
          "listening station 2 receives stations 0 and 1 intact");

    // ---- phase 2: all three stations
    txdis[2] = 0;
    repeat (25 * BYTE_CYCLES) @(posedge clk[0]);
    clear_counts();
    e[0] = from_bcd(st0.errors_bcd); n[0] = from_bcd(st0.bytes_bcd);
    e[1] = from_bcd(st1.errors_bcd); n[1] = from_bcd(st1.bytes_bcd);
    e[2] = from_bcd(st2.errors_bcd); n[2] = from_bcd(st2.bytes_bcd);
    count_en = 1;
    repeat (20 * BYTE_CYCLES) @(posedge clk[0]);
    count_en = 0;
    for (int s = 0; s < 3; s++)
      $display("phase 2: station %0d: decoder 1 %0d bytes (%0d parity, %0d sequence errors), decoder 2 %0d (%0d, %0d)",
               s, got[s][0], par_e[s][0], seq_e[s][0], got[s][1], par_e[s][1], seq_e[s][1]);
    bad = 0;
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < 2; k++) bad += par_e[s][k] + seq_e[s][k];
    check(bad > 0, "cross-talk from code 2 corrupts some bytes");
    repeat (100) @(posedge clk[0]);
    check(from_bcd(st0.errors_bcd) - e[0] == total_parity(0) &&
          from_bcd(st1.errors_bcd) - e[1] == total_parity(1) &&
          from_bcd(st2.errors_bcd) - e[2] == total_parity(2),
          "each controller counts the parity errors it receives");
    check(from_bcd(st0.bytes_bcd) - n[0] == got[0][0] + got[0][1] &&
          from_bcd(st1.bytes_bcd) - n[1] == got[1][0] + got[1][1] &&
          from_bcd(st2.bytes_bcd) - n[2] == got[2][0] + got[2][1],
          "each controller counts the bytes it receives");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
