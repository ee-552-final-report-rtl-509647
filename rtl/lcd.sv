// lcd: drives an HD44780-style character LCD over an 8-bit bus and shows
// one 16-character line.
//
// After reset it waits POWERUP cycles, then sends eight setup commands,
// each followed by a fixed wait of INIT_WAIT cycles (the busy flag cannot
// be trusted this early): function set 0x38 three times, display off 0x08,
// clear 0x01, entry mode 0x06, display on 0x0C and cursor home 0x02. It
// then raises done. When data_valid is seen with done high it latches its
// inputs, drops done and rewrites the whole first line: the command 0x80
// (address 0) followed by 16 characters. With mode = 0 the line is
//   "Device:<d>" 0xA0 "Data:<c>" 0xA0
// and with mode = 1 it is
//   "B:<4 digits>" 0xA0 "E:<4 digits>" 0xA0 0xA0 0xA0
// where the digits are the BCD byte and error counts. After every write
// in this phase it reads the busy flag (rw = 1, rs = 0, one enable pulse,
// busy sampled at the end of the pulse) until it is clear. The line
// layouts and character codes (0xA0 as the blank) are the original
// design's, as is rewriting every position on each update. The command
// values, the timing parameters and the busy polling are this design's
// choices (defaults for a 25 MHz clock: 15 ms, 5 ms, 480 ns).
//
// Interface: every bus write is: rs/rw/data set up for E_CYCLES, e high for
// E_CYCLES, e low for E_CYCLES. done is high only when idle. Synchronous
// active-low reset restarts the initialization.
module lcd #(
  parameter int POWERUP   = 375_000,
  parameter int INIT_WAIT = 125_000,
  parameter int E_CYCLES  = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        data_valid,
  input  logic        mode,
  input  logic [1:0]  device,
  input  logic [7:0]  data_char,
  input  logic [15:0] bytes_bcd,
  input  logic [15:0] errors_bcd,
  output logic        done,
  output logic        lcd_e,
  output logic        lcd_rw,
  output logic        lcd_rs,
  output logic [7:0]  lcd_data,
  input  logic        lcd_busy
);

  localparam int N_INIT  = 8;
  localparam int N_WRITE = 17;  // address command + 16 characters
  localparam int CW = $clog2(POWERUP + 1) + 1;
  localparam logic [7:0] BLANK = 8'hA0;

  typedef enum logic [3:0] {
    S_POWERUP, S_SETUP, S_EHI, S_ELO, S_INITWAIT,
    S_READY, S_BSETUP, S_BHI, S_BLO
  } state_t;

  state_t        state;
  logic [CW-1:0] cnt;
  logic [4:0]    step;
  logic          init_phase;
  logic          busy_seen;
  logic          l_mode;
  logic [1:0]    l_device;
  logic [7:0]    l_char;
  logic [15:0]   l_bytes, l_errors;
  logic [7:0]    cur_byte;
  logic          cur_rs;

  function automatic logic [7:0] init_cmd(input logic [4:0] i);
    case (i)
      5'd0, 5'd1, 5'd2: return 8'h38;
      5'd3:             return 8'h08;
      5'd4:             return 8'h01;
      5'd5:             return 8'h06;
      5'd6:             return 8'h0C;
      default:          return 8'h02;
    endcase
  endfunction

  function automatic logic [7:0] digit(input logic [3:0] b);
    return 8'h30 + 8'(b);
  endfunction

  // character at line position p (0..15)
  function automatic logic [7:0] line_char(input logic [3:0] p);
    if (!l_mode) begin
      case (p)
        4'd0:  return "D";
        4'd1:  return "e";
        4'd2:  return "v";
        4'd3:  return "i";
        4'd4:  return "c";
        4'd5:  return "e";
        4'd6:  return ":";
        4'd7:  return digit({2'b00, l_device});
        4'd8:  return BLANK;
        4'd9:  return "D";
        4'd10: return "a";
        4'd11: return "t";
        4'd12: return "a";
        4'd13: return ":";
        4'd14: return l_char;
        default: return BLANK;
      endcase
    end else begin
      case (p)
        4'd0:  return "B";
        4'd1:  return ":";
        4'd2:  return digit(l_bytes[15:12]);
        4'd3:  return digit(l_bytes[11:8]);
        4'd4:  return digit(l_bytes[7:4]);
        4'd5:  return digit(l_bytes[3:0]);
        4'd6:  return BLANK;
        4'd7:  return "E";
        4'd8:  return ":";
        4'd9:  return digit(l_errors[15:12]);
        4'd10: return digit(l_errors[11:8]);
        4'd11: return digit(l_errors[7:4]);
        4'd12: return digit(l_errors[3:0]);
        default: return BLANK;
      endcase
    end
  endfunction

  always_comb begin
    if (init_phase) begin
      cur_byte = init_cmd(step);
      cur_rs   = 1'b0;
    end else if (step == 5'd0) begin
      cur_byte = 8'h80;
      cur_rs   = 1'b0;
    end else begin
      cur_byte = line_char(4'(step - 5'd1));
      cur_rs   = 1'b1;
    end
  end

  assign done = (state == S_READY);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_POWERUP;
      cnt        <= '0;
      step       <= '0;
      init_phase <= 1'b1;
      busy_seen  <= 1'b0;
      l_mode     <= 1'b0;
      l_device   <= '0;
      l_char     <= '0;
      l_bytes    <= '0;
      l_errors   <= '0;
      lcd_e      <= 1'b0;
      lcd_rw     <= 1'b0;
      lcd_rs     <= 1'b0;
      lcd_data   <= '0;
    end else begin
      case (state)
        S_POWERUP: begin
          if (cnt == CW'(POWERUP)) begin
            cnt   <= '0;
            state <= S_SETUP;
          end else cnt <= cnt + 1'b1;
        end
        S_SETUP: begin                    // address/data setup, e low
          lcd_rw   <= 1'b0;
          lcd_rs   <= cur_rs;
          lcd_data <= cur_byte;
          if (cnt == CW'(E_CYCLES - 1)) begin
            cnt   <= '0;
            lcd_e <= 1'b1;
            state <= S_EHI;
          end else cnt <= cnt + 1'b1;
        end
        S_EHI: begin
          if (cnt == CW'(E_CYCLES - 1)) begin
            cnt   <= '0;
            lcd_e <= 1'b0;
            state <= S_ELO;
          end else cnt <= cnt + 1'b1;
        end
        S_ELO: begin                      // hold after the falling edge
          if (cnt == CW'(E_CYCLES - 1)) begin
            cnt   <= '0;
            state <= init_phase ? S_INITWAIT : S_BSETUP;
          end else cnt <= cnt + 1'b1;
        end
        S_INITWAIT: begin
          if (cnt == CW'(INIT_WAIT)) begin
            cnt <= '0;
            if (step == 5'(N_INIT - 1)) begin
              init_phase <= 1'b0;
              step       <= '0;
              state      <= S_READY;
            end else begin
              step  <= step + 1'b1;
              state <= S_SETUP;
            end
          end else cnt <= cnt + 1'b1;
        end
        S_READY: begin
          if (data_valid) begin
            l_mode   <= mode;
            l_device <= device;
            l_char   <= data_char;
            l_bytes  <= bytes_bcd;
            l_errors <= errors_bcd;
            step     <= '0;
            cnt      <= '0;
            state    <= S_SETUP;
          end
        end
        S_BSETUP: begin                   // busy-flag read
          lcd_rw <= 1'b1;
          lcd_rs <= 1'b0;
          if (cnt == CW'(E_CYCLES - 1)) begin
            cnt   <= '0;
            lcd_e <= 1'b1;
            state <= S_BHI;
          end else cnt <= cnt + 1'b1;
        end
        S_BHI: begin
          if (cnt == CW'(E_CYCLES - 1)) begin
            cnt       <= '0;
            busy_seen <= lcd_busy;
            lcd_e     <= 1'b0;
            state     <= S_BLO;
          end else cnt <= cnt + 1'b1;
        end
        S_BLO: begin
          if (cnt == CW'(E_CYCLES - 1)) begin
            cnt <= '0;
            if (busy_seen) begin
              state <= S_BSETUP;
            end else if (step == 5'(N_WRITE - 1)) begin
              lcd_rw <= 1'b0;
              state  <= S_READY;
            end else begin
              step  <= step + 1'b1;
              state <= S_SETUP;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_POWERUP;
      endcase
    end
  end

endmodule
