// tb_controlr: the station controller with modelled neighbours: an encoder
// that takes the offered byte every 50 cycles, a keypad that pulses valid,
// two receive buffers with the valid/ack handshake, and an LCD that is
// busy for 30 cycles per update. Checks:
//   - sample and chip tick rates in both clock modes (every 4/16 and 8/32
//     cycles with sample bits 1 and 2);
//   - after reset: 20 all-ones bytes, one all-zeros byte, then the stream
//     0, 1, 2, ... with odd parity;
//   - keypad mode: nothing without a key, one byte per data key, no byte
//     for a control key, repetition when latched;
//   - transmit disable stops bytes, re-enabling and a clock-mode change
//     restart the preamble;
//   - receive side: byte handed to the LCD with its device number, buffer
//     acknowledged, bytes and parity errors counted in BCD, picks alternate
//     when both buffers are full, no LCD update in stream mode while busy.
`timescale 1ns/1ps
module tb_controlr;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, clock_mode, output_mode, latched_mode, tx_disable;
  logic        sample_tick, chip_tick, sample_clock;
  logic [3:0]  kp_key;
  logic [6:0]  kp_ascii;
  logic        kp_valid;
  logic        enc_cs_load, enc_valid, enc_taken;
  logic [7:0]  enc_data;
  logic [7:0]  rx_byte [2];
  logic        rx_valid [2];
  logic [1:0]  rx_device [2];
  logic        rx_ack [2];
  logic        rx_clear;
  logic        lcd_valid, lcd_mode, lcd_done, initializing;
  logic [1:0]  lcd_device;
  logic [7:0]  lcd_char;
  logic [15:0] bytes_bcd, errors_bcd;

  controlr #(.FAST_SAMPLE_BIT(1), .SLOW_SAMPLE_BIT(2)) dut (
    .clk(clk), .rst_n(rst_n), .clock_mode(clock_mode), .output_mode(output_mode),
    .latched_mode(latched_mode), .tx_disable(tx_disable),
    .sample_tick(sample_tick), .chip_tick(chip_tick), .sample_clock(sample_clock),
    .kp_key(kp_key), .kp_ascii(kp_ascii), .kp_valid(kp_valid),
    .enc_cs_load(enc_cs_load), .enc_data(enc_data), .enc_valid(enc_valid), .enc_taken(enc_taken),
    .rx_byte(rx_byte), .rx_valid(rx_valid), .rx_device(rx_device), .rx_ack(rx_ack),
    .rx_clear(rx_clear), .lcd_valid(lcd_valid), .lcd_mode(lcd_mode), .lcd_device(lcd_device),
    .lcd_char(lcd_char), .bytes_bcd(bytes_bcd), .errors_bcd(errors_bcd), .lcd_done(lcd_done),
    .initializing(initializing));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [7:0] with_parity(input logic [6:0] c);
    return {~(^c), c};
  endfunction

  // ---- encoder model: takes a byte every 50 cycles
  logic [7:0] sent [$];
  int         enc_cnt = 0;
  always @(posedge clk) begin
    enc_cnt   <= (enc_cnt == 49) ? 0 : enc_cnt + 1;
    enc_taken <= (enc_cnt == 49);
    if (enc_taken && enc_valid && rst_n) sent.push_back(enc_data);
  end

  // ---- LCD model: busy 30 cycles per update, unless forced busy
  int   lcd_busy_cnt = 0;
  bit   lcd_hold = 0;
  int   lcd_updates = 0;
  logic [1:0] lcd_dev_log [$];
  always @(posedge clk) begin
    if (lcd_valid && lcd_done) begin
      lcd_busy_cnt <= 30;
      lcd_updates++;
      lcd_dev_log.push_back(lcd_device);
    end else if (lcd_busy_cnt > 0) lcd_busy_cnt <= lcd_busy_cnt - 1;
  end
  assign lcd_done = (lcd_busy_cnt == 0) && !lcd_hold;

  // ---- receive buffer models
  int acks [2] = '{0, 0};
  always @(posedge clk)
    for (int k = 0; k < 2; k++)
      if (rx_ack[k] && rx_valid[k]) begin
        rx_valid[k] <= 0;
        acks[k]++;
      end

  // The buffer model drops valid on acknowledge; callers wait a few
  // cycles after that before offering the next byte, as a real link does.
  task automatic put_rx(input int k, input logic [7:0] v);
    rx_byte[k] = v;
    rx_valid[k] = 1;
  endtask

  task automatic key(input logic [3:0] k);
    @(negedge clk);
    kp_key = k;
    kp_ascii = (k < 10) ? 7'h30 + 7'(k) : 7'h41 + 7'(k - 10);
    kp_valid = 1;
    @(negedge clk);
    kp_valid = 0;
  endtask

  task automatic count_ticks(input int cycles, output int st, output int ct);
    st = 0; ct = 0;
    repeat (cycles) begin
      @(posedge clk); #1;
      if (sample_tick) st++;
      if (chip_tick) begin
        ct++;
        if (!sample_tick) failures++;   // a chip tick is always a sample tick
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st, ct, n0, ok;
    rst_n = 0; clock_mode = 1; output_mode = 1; latched_mode = 0; tx_disable = 0;
    kp_key = 0; kp_ascii = 0; kp_valid = 0;
    rx_valid[0] = 0; rx_valid[1] = 0; rx_byte[0] = 0; rx_byte[1] = 0;
    rx_device[0] = 2'd2; rx_device[1] = 2'd1;
    repeat (3) @(posedge clk); #1;
    check(enc_cs_load && rx_clear && initializing, "initialization during reset");
    rst_n = 1;

    count_ticks(256, st, ct);
    check(st == 64 && ct == 16, $sformatf("fast rates: %0d samples %0d chips", st, ct));

    // ---- preamble then stream
    wait (sent.size() >= 30);
    ok = 1;
    for (int i = 0; i < 20; i++) if (sent[i] != 8'hFF) ok = 0;
    check(ok, "twenty all-ones bytes");
    check(sent[20] == 8'h00, "then one all-zeros byte");
    ok = 1;
    for (int i = 21; i < 30; i++) if (sent[i] != with_parity(7'(i - 21))) ok = 0;
    check(ok, "then incrementing bytes with odd parity");
    check(!initializing, "normal operation after the preamble");

    // ---- keypad mode
    output_mode = 0;
    repeat (200) @(posedge clk);
    n0 = sent.size();
    repeat (500) @(posedge clk);
    check(sent.size() == n0, "no bytes without a key press");
    key(4'd5);
    repeat (500) @(posedge clk);
    check(sent.size() == n0 + 1 && sent[n0] == 8'hB5, "one byte for key 5");
    key(4'd9);
    repeat (500) @(posedge clk);
    check(sent.size() == n0 + 1, "no byte for a control key");
    latched_mode = 1;
    repeat (500) @(posedge clk);
    check(sent.size() >= n0 + 8 && sent[sent.size() - 1] == 8'hB5, "latched key repeats");

    // ---- transmit disable and re-enable
    tx_disable = 1;
    repeat (200) @(posedge clk);
    n0 = sent.size();
    repeat (500) @(posedge clk);
    check(sent.size() == n0, "no bytes while disabled");
    tx_disable = 0;
    repeat (2) @(posedge clk); #1;
    check(initializing, "re-enabling restarts initialization");
    repeat (21 * 50 + 200) @(posedge clk);
    ok = 1;
    for (int i = 0; i < 20; i++) if (sent[n0 + i] != 8'hFF) ok = 0;
    check(ok && sent[n0 + 20] == 8'h00, "preamble sent again");

    // ---- clock mode change
    clock_mode = 0;
    repeat (2) @(posedge clk); #1;
    check(initializing, "clock change restarts initialization");
    count_ticks(256, st, ct);
    check(st == 32 && ct == 8, $sformatf("slow rates: %0d samples %0d chips", st, ct));
    wait (!initializing);

    // ---- receive side, keypad (device/data) mode
    put_rx(0, 8'h31);   // '1' with odd parity
    wait (!rx_valid[0]);
    repeat (40) @(posedge clk); #1;
    check(lcd_updates == 1 && lcd_char == 8'h31 && lcd_device == 2'd2 && !lcd_mode,
          "byte shown with its device number");
    check(bytes_bcd == 16'h0001 && errors_bcd == 16'h0000, "one byte, no error");
    put_rx(1, 8'h30);   // even parity
    wait (!rx_valid[1]);
    repeat (40) @(posedge clk); #1;
    check(bytes_bcd == 16'h0002 && errors_bcd == 16'h0001, "parity error counted");
    lcd_dev_log.delete();
    for (int r = 0; r < 3; r++) begin
      put_rx(0, 8'h31);
      put_rx(1, 8'h32);
      wait (!rx_valid[0] && !rx_valid[1]);
      repeat (3) @(posedge clk); #1;
    end
    repeat (40) @(posedge clk); #1;
    ok = (lcd_dev_log.size() == 6);
    for (int i = 1; i < lcd_dev_log.size(); i++) if (lcd_dev_log[i] == lcd_dev_log[i-1]) ok = 0;
    check(ok, "picks alternate between the buffers");
    for (int i = 0; i < 7; i++) begin
      put_rx(0, 8'h31);
      wait (!rx_valid[0]);
      repeat (3) @(posedge clk); #1;
    end
    repeat (40) @(posedge clk); #1;
    check(bytes_bcd == 16'h0015, $sformatf("BCD byte count 15, got %h", bytes_bcd));

    // ---- stream mode while the LCD is busy: counted, not shown
    output_mode = 1;
    lcd_hold = 1;
    n0 = lcd_updates;
    put_rx(0, 8'h83);
    wait (!rx_valid[0]);
    repeat (20) @(posedge clk); #1;
    check(lcd_updates == n0 && bytes_bcd == 16'h0016, "stream byte counted without display");
    lcd_hold = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
