// tb_cdma: end-to-end test of two stations on a modelled shared channel.
//
// Station A (code 1) receives station B (code 0) on its first decoder and
// itself on its second; B receives A and itself the same way. The two run
// on separate clocks of the same frequency, 13 ns apart, with their rate
// counters started together so that their chips line up (the codes cancel
// only when aligned); the decoders still find the bit phase themselves.
// Rates are scaled down (a sample every 8 cycles in fast mode, 16 in slow
// mode) and the keypad and LCD timings are shortened. The test walks through:
//   1. power-up preamble, synchronization and framing, stream reception
//      with the byte sequence, parity and byte interval checked;
//   2. one bit of B inverted on the channel -> exactly one parity error;
//   3. B's transmitter disabled (silence) and re-enabled (new preamble,
//      reframing, counter restarted);
//   4. keypad mode: one key press gives exactly one byte and the LCD shows
//      "Device:1 Data:5";
//   5. latched mode: the key is repeated; a control key is not sent;
//   6. switch to slow clock mode: re-initialization, resynchronization and
//      reception at the slower byte interval.
// Each mechanism is counted and a mechanism that never happened fails.
`timescale 1ns/1ps
module tb_cdma;
  import cdma_pkg::*;

  localparam int FSB = 2;           // fast sample tick every 8 cycles
  localparam int SSB = 3;           // slow sample tick every 16 cycles
  localparam int FAST_BYTE = 8 * WINDOW * (1 << (FSB + 1));
  localparam int SLOW_BYTE = 8 * WINDOW * (1 << (SSB + 1));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ stations
  logic clk_a = 0, clk_b = 0;
  always #20 clk_a = ~clk_a;
  initial begin
    #13;
    forever #20 clk_b = ~clk_b;
  end

  logic       rst_n;
  logic [3:0] rx;
  logic       clock_mode_a, clock_mode_b, output_mode_a, output_mode_b;
  logic       latched_a, latched_b, txdis_a, txdis_b;
  logic [3:0] kp_row_a, kp_col_a, kp_col_b;
  logic       high_a, low_a, high_b, low_b;
  logic       e_a, rw_a, rs_a, busy_a, e_b, rw_b, rs_b, busy_b;
  logic [7:0] d_a, d_b;
  logic       sclk_a, sclk_b;
  logic       flip_b;
  logic [7:0] line_a [16], line_b [16];
  int         cmd_a, lw_a, br_a, cmd_b, lw_b, br_b;

  // keypad model: a held key connects its column to its row
  logic       key_down;
  logic [3:0] key_num;
  always_comb kp_row_a = (key_down && kp_col_a[key_num[1:0]]) ? (4'b0001 << key_num[3:2]) : 4'b0000;

  cdma #(.FAST_SAMPLE_BIT(FSB), .SLOW_SAMPLE_BIT(SSB), .KP_DEBOUNCE(20),
         .LCD_POWERUP(200), .LCD_INIT_WAIT(50), .LCD_E_CYCLES(2)) dut_a (
    .clk(clk_a), .reset_n(rst_n), .rx(rx),
    .clock_mode(clock_mode_a), .output_mode(output_mode_a),
    .latched_mode(latched_a), .tx_disable(txdis_a),
    .local_cs(2'd1), .remote1_cs(2'd0), .remote2_cs(2'd1),
    .kp_row(kp_row_a), .kp_col(kp_col_a),
    .cdma_low(low_a), .cdma_high(high_a),
    .lcd_enable(e_a), .lcd_rw(rw_a), .lcd_select(rs_a), .lcd_data(d_a),
    .lcd_high_bit(busy_a), .sample_clock(sclk_a));

  cdma #(.FAST_SAMPLE_BIT(FSB), .SLOW_SAMPLE_BIT(SSB), .KP_DEBOUNCE(20),
         .LCD_POWERUP(200), .LCD_INIT_WAIT(50), .LCD_E_CYCLES(2)) dut_b (
    .clk(clk_b), .reset_n(rst_n), .rx(rx),
    .clock_mode(clock_mode_b), .output_mode(output_mode_b),
    .latched_mode(latched_b), .tx_disable(txdis_b),
    .local_cs(2'd0), .remote1_cs(2'd1), .remote2_cs(2'd0),
    .kp_row(4'b0000), .kp_col(kp_col_b),
    .cdma_low(low_b), .cdma_high(high_b),
    .lcd_enable(e_b), .lcd_rw(rw_b), .lcd_select(rs_b), .lcd_data(d_b),
    .lcd_high_bit(busy_b), .sample_clock(sclk_b));

  tx_channel #(.N(2)) u_channel (
    .high({high_b, high_a}), .low({low_b, low_a}),
    .invert({flip_b, 1'b0}), .noise(4'sd0), .rx(rx));

  lcd_model #(.BUSY_CYCLES(30)) u_lcd_a (
    .clk(clk_a), .e(e_a), .rw(rw_a), .rs(rs_a), .data(d_a), .busy(busy_a),
    .line(line_a), .commands(cmd_a), .line_writes(lw_a), .busy_reads(br_a));
  lcd_model #(.BUSY_CYCLES(30)) u_lcd_b (
    .clk(clk_b), .e(e_b), .rw(rw_b), .rs(rs_b), .data(d_b), .busy(busy_b),
    .line(line_b), .commands(cmd_b), .line_writes(lw_b), .busy_reads(br_b));

  // ------------------------------------------------------------ monitors
  longint cyc = 0;
  always @(posedge clk_a) cyc++;

  // received bytes at station A, per decoder channel
  int      rx_count   [2] = '{0, 0};
  int      parity_bad [2] = '{0, 0};
  int      seq_bad    [2] = '{0, 0};
  logic [7:0] last_byte [2];
  bit      have_prev  [2] = '{0, 0};
  longint  last_time  [2] = '{0, 0};
  int      interval_ok = 0, interval_bad = 0;
  int      expect_interval = FAST_BYTE;
  bit      check_seq = 1;
  logic    rv_q [2] = '{0, 0};
  logic    framed_q [2] = '{0, 0};

  // mechanism counters
  int m_preamble = 0, m_sync = 0, m_frame = 0, m_reframe = 0;
  int m_parity_err = 0, m_both_valid = 0, m_lcd_stats = 0, m_lcd_data = 0;
  int m_single_key = 0, m_latched_repeat = 0, m_silence = 0, m_clock_switch = 0;
  int m_busy_poll = 0, m_slow_bytes = 0, m_ctrl_key_ignored = 0;
  logic synced_q [2] = '{0, 0};
  logic init_q = 1;

  logic [7:0] b;
  always @(posedge clk_a) begin
    for (int k = 0; k < 2; k++) begin
      rv_q[k]     <= dut_a.rx_valid[k];
      framed_q[k] <= dut_a.rx_framed[k];
      synced_q[k] <= dut_a.dec_synced[k];
      if (dut_a.dec_synced[k] && !synced_q[k]) m_sync++;
      if (dut_a.rx_framed[k] && !framed_q[k]) m_frame++;
      if (!dut_a.rx_framed[k] && framed_q[k] && !dut_a.rx_clear) begin
        m_reframe++;
        have_prev[k] = 0;
      end
      if (dut_a.rx_valid[k] && !rv_q[k]) begin
        b = dut_a.rx_byte[k];
        rx_count[k]++;
        if (!(^b)) begin
          parity_bad[k]++;
          have_prev[k] = 0;   // the next byte cannot be compared
        end
        else if (check_seq && have_prev[k]) begin
          if (b[6:0] != 7'(last_byte[k][6:0] + 7'd1)) seq_bad[k]++;
          if (cyc - last_time[k] == longint'(expect_interval)) interval_ok++;
          else interval_bad++;
        end
        if (^b) begin
          last_byte[k] = b;
          have_prev[k] = 1;
        end
        last_time[k] = cyc;
      end
    end
    if (dut_a.u_ctrl.in_state == 0 && dut_a.rx_valid[0] && dut_a.rx_valid[1])
      m_both_valid++;
    init_q <= dut_a.initializing;
    if (init_q && !dut_a.initializing) m_preamble++;
    if (e_a && rw_a && busy_a) m_busy_poll++;
  end

  // ------------------------------------------------------------ helpers
  task automatic wait_a(input int n);
    repeat (n) @(posedge clk_a);
  endtask

  task automatic press(input logic [3:0] k);
    key_num  = k;
    key_down = 1;
    wait_a(200);
    key_down = 0;
    wait_a(200);
  endtask

  // compare the model's line with 16 characters packed left to right
  function automatic bit line_is(input logic [7:0] l [16], input logic [127:0] s);
    for (int i = 0; i < 16; i++) if (l[i] != s[127 - 8*i -: 8]) return 0;
    return 1;
  endfunction

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (2_500_000) @(posedge clk_a);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    int n0, n1, e0;
    // The station codes cancel only when the stations' chips line up, so
    // both free-running rate counters are started from zero together; the
    // clocks still differ in phase by 13 ns.
    force dut_a.u_ctrl.u_clk.count = '0;
    force dut_b.u_ctrl.u_clk.count = '0;
    rst_n = 0; flip_b = 0; key_down = 0; key_num = 0;
    clock_mode_a = 1; clock_mode_b = 1;
    output_mode_a = 1; output_mode_b = 1;
    latched_a = 0; latched_b = 0; txdis_a = 0; txdis_b = 0;
    #1000;
    release dut_a.u_ctrl.u_clk.count;
    release dut_b.u_ctrl.u_clk.count;
    wait_a(20);
    rst_n = 1;

    // ---- 1. stream reception
    wait (rx_count[0] >= 12 && rx_count[1] >= 12);
    check(m_preamble >= 1, "initialization completed");
    check(dut_a.dec_synced[0] && dut_a.dec_synced[1], "both decoders synchronized");
    check(parity_bad[0] == 0 && parity_bad[1] == 0, "no parity errors in clean stream");
    check(seq_bad[0] == 0 && seq_bad[1] == 0, "stream bytes increment by one");
    check(interval_ok >= 20 && interval_bad == 0, "one byte every 2048 cycles");
    check(dut_a.errors_bcd == 16'h0000, "error count is zero");
    wait (lw_a >= 2);
    wait_a(400);
    check(line_is(line_a, {"B:", line_a[2], line_a[3], line_a[4], line_a[5],
                           8'hA0, "E:0000", 8'hA0, 8'hA0, 8'hA0}) &&
          line_a[2] inside {["0":"9"]} && line_a[5] inside {["0":"9"]},
          "LCD shows bytes and errors");
    m_lcd_stats = lw_a;
    check(dut_a.bytes_bcd[3:0] <= 4'd9 && dut_a.bytes_bcd != 0, "byte count is BCD and nonzero");

    // ---- 2. one inverted bit of B -> one parity error
    @(posedge clk_b iff (dut_b.u_enc.bit_idx == 3'd3 && dut_b.u_enc.chip_idx == 3'd0));
    @(posedge clk_b iff dut_b.chip_tick);
    @(posedge clk_b);
    flip_b = 1;
    repeat (8) @(posedge clk_b iff dut_b.chip_tick);
    @(posedge clk_b);
    flip_b = 0;
    n0 = rx_count[0];
    wait (rx_count[0] >= n0 + 4);
    check(parity_bad[0] == 1, "exactly one corrupted byte seen");
    check(dut_a.errors_bcd == 16'h0001, "controller counted one error");
    if (dut_a.errors_bcd != 0) m_parity_err++;
    check(seq_bad[0] == 0, "stream continues after the corrupted byte");

    // ---- 3. transmitter of B disabled, then re-enabled
    txdis_b = 1;
    wait_a(5 * FAST_BYTE);            // up to three bytes are still in flight
    n0 = rx_count[0];
    wait_a(3 * FAST_BYTE);
    check(rx_count[0] == n0, "no bytes from a disabled transmitter");
    if (rx_count[0] == n0) m_silence++;
    txdis_b = 0;
    wait (rx_count[0] >= n0 + 5);
    check(m_reframe >= 1, "receiver reframed on the new preamble");
    check(seq_bad[0] == 0, "restarted stream increments by one");

    // ---- 4. keypad mode, single key
    output_mode_a = 0; output_mode_b = 0;
    wait_a(5 * FAST_BYTE);
    n0 = rx_count[0]; n1 = rx_count[1];
    check_seq = 0;
    press(4'd5);
    wait_a(5 * FAST_BYTE);
    check(rx_count[1] == n1 + 1, "one key press sends exactly one byte");
    check(last_byte[1] == 8'hB5, "key 5 arrives as '5' with odd parity");
    check(rx_count[0] == n0, "silent station B sends nothing");
    if (rx_count[1] == n1 + 1) m_single_key++;
    wait_a(2000);
    check(line_is(line_a, {"Device:1", 8'hA0, "Data:5", 8'hA0}), "LCD shows device and data");
    if (line_is(line_a, {"Device:1", 8'hA0, "Data:5", 8'hA0})) m_lcd_data++;

    // ---- 5. latched mode
    latched_a = 1;
    n1 = rx_count[1];
    wait_a(6 * FAST_BYTE);
    check(rx_count[1] >= n1 + 4, "latched key is sent repeatedly");
    if (rx_count[1] >= n1 + 4) m_latched_repeat++;
    press(4'd2);
    wait_a(4 * FAST_BYTE);
    check(last_byte[1] == 8'h32, "new key replaces the latched one");
    press(4'd12);
    wait_a(4 * FAST_BYTE);
    check(last_byte[1] == 8'h32, "control key is not transmitted");
    if (last_byte[1] == 8'h32) m_ctrl_key_ignored++;

    // ---- 5b. both stations latched: both buffers fill, picks alternate
    latched_b = 1;
    n0 = rx_count[0]; n1 = rx_count[1];
    e0 = lw_a;
    wait_a(8 * FAST_BYTE);
    check(rx_count[0] >= n0 + 4 && rx_count[1] >= n1 + 4, "both stations received together");
    check(last_byte[0] == 8'hB0, "station B repeats its default key '0'");
    check(lw_a >= e0 + 4, "LCD rewritten for both stations");

    // ---- 6. slow clock mode
    n1 = rx_count[1];
    e0 = m_preamble;
    clock_mode_a = 0; clock_mode_b = 0;
    expect_interval = SLOW_BYTE;
    wait (m_preamble > e0);
    m_clock_switch++;
    n1 = rx_count[1];
    wait (rx_count[1] >= n1 + 3);
    wait_a(10);
    check(last_byte[1] == 8'h32, "slow mode delivers the latched key");
    check(rx_count[1] >= n1 + 3, "reception resumes after the clock switch");
    check(cyc - last_time[1] < 20 && dut_a.u_ctrl.sample_clock == sclk_a, "sample clock output");
    m_slow_bytes = rx_count[1] - n1;
    begin
      longint t0;
      int nn;
      nn = rx_count[1];
      wait (rx_count[1] == nn + 1);
      t0 = cyc;
      wait (rx_count[1] == nn + 2);
      check(cyc - t0 == longint'(SLOW_BYTE), "slow mode byte interval is 4096 cycles");
    end

    // ---- mechanism summary
    $display("mechanisms: preamble=%0d sync=%0d frame=%0d reframe=%0d parity_err=%0d both_valid=%0d",
             m_preamble, m_sync, m_frame, m_reframe, m_parity_err, m_both_valid);
    $display("            lcd_stats=%0d lcd_data=%0d busy_poll=%0d single_key=%0d latched=%0d",
             m_lcd_stats, m_lcd_data, m_busy_poll, m_single_key, m_latched_repeat);
    $display("            silence=%0d clock_switch=%0d slow_bytes=%0d ctrl_key_ignored=%0d",
             m_silence, m_clock_switch, m_slow_bytes, m_ctrl_key_ignored);
    check(m_preamble >= 2, "mechanism: preamble / initialization");
    check(m_sync >= 2, "mechanism: decoder synchronization");
    check(m_frame >= 2, "mechanism: frame marker");
    check(m_reframe >= 1, "mechanism: reframe on preamble");
    check(m_parity_err >= 1, "mechanism: parity error count");
    check(m_both_valid >= 1, "mechanism: both buffers ready at once");
    check(m_lcd_stats >= 1, "mechanism: LCD statistics display");
    check(m_lcd_data >= 1, "mechanism: LCD device/data display");
    check(m_busy_poll >= 1, "mechanism: LCD busy polling");
    check(m_single_key >= 1, "mechanism: single key send");
    check(m_latched_repeat >= 1, "mechanism: latched repeat");
    check(m_silence >= 1, "mechanism: transmit disable");
    check(m_clock_switch >= 1, "mechanism: clock mode switch");
    check(m_ctrl_key_ignored >= 1, "mechanism: control keys not sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
