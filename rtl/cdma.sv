// cdma: one station of a wired CDMA network.
//
// Every station on the network transmits at the same time over one shared
// wire. Each spreads every data bit over its own 8-chip sequence (the
// sequence for a 1, its complement for a 0); an external op-amp adder sums
// the +1/0/-1 outputs of all stations and every station samples the sum
// with an ADC. A receiver recovers one station's bits by correlating the
// samples with that station's chip sequence; where the codes are orthogonal
// and the stations' chips line up, the other stations' contributions cancel.
//
// Transmit path: keypad (or the internal byte counter in stream mode) ->
// controller (parity, preamble, handshake) -> encoder -> cdma_high /
// cdma_low. Receive path: rx (4 ADC MSBs) -> readadc -> despread (shared
// 32-sample window, two correlators) -> one rxbuff per remote station ->
// controller (statistics, parity check) -> lcd.
//
// Ports follow the station's FPGA pin list: switches for the four modes
// and for the local and two remote chip sequences, the keypad matrix, the
// LCD bus with its busy input, the ADC inputs and ADC clock, and the two
// transmit lines. The chip-sequence switches pick one of the three station
// codes. reset_n is active low and synchronous. Everything runs on clk
// (25 MHz in the original station) with rate enables from the controller.
// The nets dec_synced, dec_dp, rx_framed and initializing drive no pin;
// they are kept as named observation points for simulation (decoder lock,
// correlation values, framing and preamble state).
module cdma
  import cdma_pkg::*;
#(
  parameter int FAST_SAMPLE_BIT = 6,
  parameter int SLOW_SAMPLE_BIT = 10,
  parameter int KP_DEBOUNCE     = 250_000,
  parameter int LCD_POWERUP     = 375_000,
  parameter int LCD_INIT_WAIT   = 125_000,
  parameter int LCD_E_CYCLES    = 12
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic [3:0] rx,
  input  logic       clock_mode,
  input  logic       output_mode,
  input  logic       latched_mode,
  input  logic       tx_disable,
  input  logic [1:0] local_cs,
  input  logic [1:0] remote1_cs,
  input  logic [1:0] remote2_cs,
  input  logic [3:0] kp_row,
  output logic [3:0] kp_col,
  output logic       cdma_low,
  output logic       cdma_high,
  output logic       lcd_enable,
  output logic       lcd_rw,
  output logic       lcd_select,
  output logic [7:0] lcd_data,
  input  logic       lcd_high_bit,
  output logic       sample_clock
);

  logic        sample_tick, chip_tick;
  logic [3:0]  kp_key;
  logic        kp_valid;
  logic [6:0]  kp_ascii;
  logic        enc_cs_load, enc_valid, enc_taken;
  logic [7:0]  enc_data;
  sample_t     sample;
  chipseq_t    remote_cs [2];
  logic        resync    [2];
  logic        dec_bit   [2];
  logic        dec_valid [2];
  logic        dec_synced[2];
  dp_t         dec_dp    [2];
  logic [7:0]  rx_byte   [2];
  logic        rx_valid  [2];
  logic        rx_ack    [2];
  logic        rx_framed [2];
  logic [1:0]  rx_device [2];
  logic        rx_clear;
  logic        lcd_valid, lcd_mode, lcd_done, initializing;
  logic [1:0]  lcd_device;
  logic [7:0]  lcd_char;
  logic [15:0] bytes_bcd, errors_bcd;

  assign remote_cs[0] = station_cs(remote1_cs);
  assign remote_cs[1] = station_cs(remote2_cs);
  assign rx_device[0] = remote1_cs;
  assign rx_device[1] = remote2_cs;
  assign resync[0]    = rx_clear;
  assign resync[1]    = rx_clear;

  keypad #(.DEBOUNCE(KP_DEBOUNCE)) u_keypad (
    .clk      (clk),
    .rst_n    (reset_n),
    .row_input(kp_row),
    .col_check(kp_col),
    .key      (kp_key),
    .valid    (kp_valid)
  );

  bintoascii u_b2a (
    .key  (kp_key),
    .ascii(kp_ascii)
  );

  controlr #(
    .FAST_SAMPLE_BIT(FAST_SAMPLE_BIT),
    .SLOW_SAMPLE_BIT(SLOW_SAMPLE_BIT)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (reset_n),
    .clock_mode  (clock_mode),
    .output_mode (output_mode),
    .latched_mode(latched_mode),
    .tx_disable  (tx_disable),
    .sample_tick (sample_tick),
    .chip_tick   (chip_tick),
    .sample_clock(sample_clock),
    .kp_key      (kp_key),
    .kp_ascii    (kp_ascii),
    .kp_valid    (kp_valid),
    .enc_cs_load (enc_cs_load),
    .enc_data    (enc_data),
    .enc_valid   (enc_valid),
    .enc_taken   (enc_taken),
    .rx_byte     (rx_byte),
    .rx_valid    (rx_valid),
    .rx_device   (rx_device),
    .rx_ack      (rx_ack),
    .rx_clear    (rx_clear),
    .lcd_valid   (lcd_valid),
    .lcd_mode    (lcd_mode),
    .lcd_device  (lcd_device),
    .lcd_char    (lcd_char),
    .bytes_bcd   (bytes_bcd),
    .errors_bcd  (errors_bcd),
    .lcd_done    (lcd_done),
    .initializing(initializing)
  );

  encoder u_enc (
    .clk       (clk),
    .rst_n     (reset_n),
    .chip_tick (chip_tick),
    .cs_load   (enc_cs_load),
    .cs        (station_cs(local_cs)),
    .data_in   (enc_data),
    .data_valid(enc_valid),
    .taken     (enc_taken),
    .tx_high   (cdma_high),
    .tx_low    (cdma_low)
  );

  readadc u_adc (
    .clk        (clk),
    .rst_n      (reset_n),
    .sample_tick(sample_tick),
    .rx         (rx),
    .sample     (sample)
  );

  despread #(.NST(2)) u_despread (
    .clk        (clk),
    .rst_n      (reset_n),
    .sample_tick(sample_tick),
    .sample     (sample),
    .cs         (remote_cs),
    .resync     (resync),
    .bit_out    (dec_bit),
    .bit_valid  (dec_valid),
    .synced     (dec_synced),
    .dp         (dec_dp)
  );

  for (genvar k = 0; k < 2; k++) begin : g_rx
    rxbuff u_rxbuff (
      .clk       (clk),
      .rst_n     (reset_n),
      .clear     (rx_clear),
      .bit_in    (dec_bit[k]),
      .bit_valid (dec_valid[k]),
      .byte_out  (rx_byte[k]),
      .byte_valid(rx_valid[k]),
      .ack       (rx_ack[k]),
      .framed    (rx_framed[k])
    );
  end

  lcd #(
    .POWERUP  (LCD_POWERUP),
    .INIT_WAIT(LCD_INIT_WAIT),
    .E_CYCLES (LCD_E_CYCLES)
  ) u_lcd (
    .clk       (clk),
    .rst_n     (reset_n),
    .data_valid(lcd_valid),
    .mode      (lcd_mode),
    .device    (lcd_device),
    .data_char (lcd_char),
    .bytes_bcd (bytes_bcd),
    .errors_bcd(errors_bcd),
    .done      (lcd_done),
    .lcd_e     (lcd_enable),
    .lcd_rw    (lcd_rw),
    .lcd_rs    (lcd_select),
    .lcd_data  (lcd_data),
    .lcd_busy  (lcd_high_bit)
  );

endmodule
