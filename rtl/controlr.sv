// controlr: the station controller. It ties the keypad, the byte
// generator, the encoder, the receive buffers and the LCD together.
//
// Rates. A free-running counter (clksource) provides the rates. The
// clock-mode switch selects bit FAST_SAMPLE_BIT or SLOW_SAMPLE_BIT; the
// sample tick fires once per 2^(bit+1) cycles and the chip tick once per
// four sample ticks, on a sample tick. sample_clock is the selected
// counter bit itself and clocks the ADC. With the defaults and a 25 MHz
// clock the fast mode samples at 195 kHz (48.8 kchip/s, 6.1 kbit/s) and
// the slow mode at 12.2 kHz.
//
// Initialization FSM (initreset -> count -> normal). It enters initreset on
// reset, on a change of the clock-mode switch and when transmission is
// re-enabled. initreset loads the chip sequence into the encoder, clears
// the receive side and the statistics and restarts the byte counter. In
// count the encoder is fed PREAMBLE all-ones bytes and one all-zeros byte,
// then normal operation starts.
//
// Encoder-control FSM (enwait -> write1 -> write2 -> valid). enwait holds
// only in keypad mode with no latch and no new key (and while transmission
// is disabled); write1 waits for the keypad's valid to be low; write2
// writes the byte register that feeds the encoder; valid offers the byte
// until the encoder's taken pulse. Data bytes are a 7-bit character with
// an odd parity bit on top: the ASCII code of the last data key (keys 0-7;
// keys 8-15 are left for control functions and are not sent) or, in
// stream mode, the low 7 bits of the incrementing byte counter.
//
// Input-control FSM (idle -> pick -> tell -> stall1 -> stall2). When a
// receive buffer holds a byte, pick selects it (alternating when both
// do), counts it and, if its parity is even, counts an error; tell hands
// it to the LCD and waits for the LCD to accept; stall1 waits until the
// LCD has finished; stall2 acknowledges the buffer and waits until it has
// cleared its valid. In stream mode, when the LCD is still busy, the byte
// is counted and acknowledged without a display update.
//
// The three FSMs, their states and the preamble follow the original design.
// The tick arithmetic, the reaction to re-enabling transmission, the
// alternating choice and the skipped display update are this design's.
// Byte and error counts are 4-digit BCD, cleared by initialization.
// lcd_char carries the 7-bit character with bit 7 always 0 (the parity
// bit is removed before display), and lcd_mode is the output-mode switch
// passed on to the LCD, which picks its line layout from it.
module controlr
  import cdma_pkg::*;
#(
  parameter int CLK_WIDTH       = 23,
  parameter int FAST_SAMPLE_BIT = 6,
  parameter int SLOW_SAMPLE_BIT = 10,
  parameter int PREAMBLE        = PREAMBLE_BYTES
) (
  input  logic        clk,
  input  logic        rst_n,
  // mode switches
  input  logic        clock_mode,     // 0 slow, 1 fast
  input  logic        output_mode,    // 0 keypad, 1 stream
  input  logic        latched_mode,   // 1: repeat the last key
  input  logic        tx_disable,     // 1: do not transmit
  // rates
  output logic        sample_tick,
  output logic        chip_tick,
  output logic        sample_clock,
  // keypad
  input  logic [3:0]  kp_key,
  input  logic [6:0]  kp_ascii,
  input  logic        kp_valid,
  // encoder
  output logic        enc_cs_load,
  output logic [7:0]  enc_data,
  output logic        enc_valid,
  input  logic        enc_taken,
  // receive buffers
  input  logic [7:0]  rx_byte  [2],
  input  logic        rx_valid [2],
  input  logic [1:0]  rx_device[2],
  output logic        rx_ack   [2],
  output logic        rx_clear,
  // LCD
  output logic        lcd_valid,
  output logic        lcd_mode,
  output logic [1:0]  lcd_device,
  output logic [7:0]  lcd_char,
  output logic [15:0] bytes_bcd,
  output logic [15:0] errors_bcd,
  input  logic        lcd_done,
  // status
  output logic        initializing
);

  // ---------------------------------------------------------------- rates
  logic [CLK_WIDTH-1:0] clk_count;
  logic [CLK_WIDTH-1:0] smask, cmask;
  int unsigned          sbit;

  clksource #(.WIDTH(CLK_WIDTH)) u_clk (
    .clk  (clk),
    .count(clk_count)
  );

  always_comb begin
    sbit         = clock_mode ? FAST_SAMPLE_BIT : SLOW_SAMPLE_BIT;
    smask        = CLK_WIDTH'((64'd1 << (sbit + 1)) - 1);
    cmask        = CLK_WIDTH'((64'd1 << (sbit + 3)) - 1);
    sample_tick  = ((clk_count & smask) == smask);
    chip_tick    = ((clk_count & cmask) == cmask);
    sample_clock = clk_count[sbit];
  end

  // ------------------------------------------------------- initialization
  typedef enum logic [1:0] { INITRESET, COUNT, NORMAL } init_t;
  typedef enum logic [1:0] { ENWAIT, WRITE1, WRITE2, VALID } enc_t;
  typedef enum logic [2:0] { IDLE, PICK, TELL, STALL1, STALL2 } in_t;

  init_t      init_state;
  enc_t       enc_state;
  in_t        in_state;
  logic       clock_mode_q, tx_disable_q, restart;
  logic [7:0] gen_count;
  logic       gen_clr, gen_en;

  assign restart = (clock_mode_q != clock_mode) || (tx_disable_q && !tx_disable);

  countn #(.WIDTH(8)) u_count256 (
    .clk  (clk),
    .clr  (gen_clr),
    .en   (gen_en),
    .count(gen_count)
  );

  assign initializing = (init_state != NORMAL);
  assign enc_cs_load  = (init_state == INITRESET);
  assign rx_clear     = (init_state == INITRESET);
  assign gen_en       = (enc_state == WRITE2);
  assign gen_clr      = (init_state == INITRESET) ||
                        (init_state == COUNT && enc_state == VALID && enc_taken &&
                         gen_count == 8'(PREAMBLE + 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_state   <= INITRESET;
      clock_mode_q <= clock_mode;
      tx_disable_q <= tx_disable;
    end else begin
      clock_mode_q <= clock_mode;
      tx_disable_q <= tx_disable;
      if (restart) init_state <= INITRESET;
      else case (init_state)
        INITRESET: init_state <= COUNT;
        COUNT: if (tx_disable || (enc_state == VALID && enc_taken &&
                                  gen_count == 8'(PREAMBLE + 1)))
                 init_state <= NORMAL;
        default: ;
      endcase
    end
  end

  // -------------------------------------------------------- encoder side
  logic [6:0] held_ascii;
  logic       key_pending;
  logic [7:0] next_byte;
  logic       want_send;

  always_comb begin
    if (init_state == COUNT)
      next_byte = (gen_count < 8'(PREAMBLE)) ? 8'hFF : 8'h00;
    else if (output_mode)
      next_byte = {odd_parity(gen_count[6:0]), gen_count[6:0]};
    else
      next_byte = {odd_parity(held_ascii), held_ascii};
  end

  assign want_send = (init_state == COUNT && !tx_disable) ||
                     (init_state == NORMAL && !tx_disable &&
                      (output_mode || latched_mode || key_pending));

  assign enc_valid = (enc_state == VALID);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held_ascii  <= 7'h30;
      key_pending <= 1'b0;
    end else begin
      if (kp_valid && !kp_key[3]) begin
        held_ascii  <= kp_ascii;
        key_pending <= 1'b1;
      end else if (enc_state == WRITE2 && init_state == NORMAL && !output_mode) begin
        key_pending <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || init_state == INITRESET || restart) begin
      enc_state <= ENWAIT;
      enc_data  <= '0;
    end else begin
      case (enc_state)
        ENWAIT: if (want_send) enc_state <= WRITE1;
        WRITE1: if (!kp_valid) enc_state <= WRITE2;
        WRITE2: begin
          enc_data  <= next_byte;
          enc_state <= VALID;
        end
        VALID:  if (enc_taken) enc_state <= ENWAIT;
        default: enc_state <= ENWAIT;
      endcase
    end
  end

  // -------------------------------------------------------- receive side
  logic       ch, last_ch;
  logic [7:0] cur_byte;

  function automatic logic [15:0] bcd_inc(input logic [15:0] v);
    logic [15:0] r;
    r = v;
    for (int d = 0; d < 4; d++) begin
      if (r[4*d +: 4] == 4'd9) r[4*d +: 4] = 4'd0;
      else begin
        r[4*d +: 4] = r[4*d +: 4] + 4'd1;
        break;
      end
    end
    return r;
  endfunction

  always_comb begin
    rx_ack[0] = (in_state == STALL2) && (ch == 1'b0);
    rx_ack[1] = (in_state == STALL2) && (ch == 1'b1);
  end

  assign lcd_valid = (in_state == TELL);
  assign lcd_mode  = output_mode;
  assign lcd_char  = {1'b0, cur_byte[6:0]};

  always_ff @(posedge clk) begin
    if (!rst_n || init_state == INITRESET) begin
      in_state   <= IDLE;
      ch         <= 1'b0;
      last_ch    <= 1'b1;
      cur_byte   <= 8'h20;
      lcd_device <= '0;
      bytes_bcd  <= '0;
      errors_bcd <= '0;
    end else begin
      case (in_state)
        IDLE: begin
          if (rx_valid[0] && rx_valid[1]) begin
            ch       <= ~last_ch;
            in_state <= PICK;
          end else if (rx_valid[0] || rx_valid[1]) begin
            ch       <= rx_valid[1];
            in_state <= PICK;
          end
        end
        PICK: begin
          last_ch    <= ch;
          cur_byte   <= rx_byte[ch];
          lcd_device <= rx_device[ch];
          bytes_bcd  <= bcd_inc(bytes_bcd);
          if (!(^rx_byte[ch])) errors_bcd <= bcd_inc(errors_bcd);
          in_state   <= (!output_mode || lcd_done) ? TELL : STALL2;
        end
        TELL:   if (lcd_done) in_state <= STALL1;
        STALL1: if (lcd_done) in_state <= STALL2;
        STALL2: if (!rx_valid[ch]) in_state <= IDLE;
        default: in_state <= IDLE;
      endcase
    end
  end

  // The encoder must have taken the offered byte before a new one is written.
  a_enc_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (enc_state == VALID && !enc_taken && !restart && init_state != INITRESET)
      |=> (enc_state == VALID || init_state == INITRESET));

endmodule
