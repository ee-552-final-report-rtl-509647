// keypad: scans a 4x4 matrix keypad and reports which key was pressed.
//
// While idle all four column lines are driven high; a press connects one
// column to one row, so some row input goes high. The scanner then waits
// DEBOUNCE cycles; if a row is still high it drives the columns high one
// at a time, waits SETTLE cycles on each and reads the rows. The first
// column that produces a high row gives key = 4*row + column (keys are
// numbered 0-3 on the top row to 12-15 on the bottom row). key is then
// updated, valid is high for exactly one cycle, and key keeps its value
// until the next press or reset. Before accepting another press the
// scanner waits until all rows have been low for DEBOUNCE cycles.
// The scan order and the key numbering are the original design's; the
// release wait, the two-flop input synchronizer and the timing values
// (DEBOUNCE = 10 ms at 25 MHz) are this design's choices.
//
// Interface: row_input is asynchronous; col_check drives the columns.
// Synchronous active-low reset clears key to 0.
module keypad #(
  parameter int DEBOUNCE = 250_000,
  parameter int SETTLE   = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] row_input,
  output logic [3:0] col_check,
  output logic [3:0] key,
  output logic       valid
);

  localparam int CW = $clog2(DEBOUNCE + 1) + 1;

  typedef enum logic [2:0] {
    WAITFORKEY, DEBOUNCING, SCAN, RELEASE
  } state_t;

  state_t        state;
  logic [3:0]    row_meta, row_s;
  logic [CW-1:0] cnt;
  logic [1:0]    col;

  // row number of the lowest high row input
  function automatic logic [1:0] row_index(input logic [3:0] r);
    if (r[0])      return 2'd0;
    else if (r[1]) return 2'd1;
    else if (r[2]) return 2'd2;
    else           return 2'd3;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_meta <= '0;
      row_s    <= '0;
    end else begin
      row_meta <= row_input;
      row_s    <= row_meta;
    end
  end

  always_comb begin
    case (state)
      SCAN:    col_check = 4'b0001 << col;
      default: col_check = 4'b1111;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= WAITFORKEY;
      cnt   <= '0;
      col   <= '0;
      key   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      case (state)
        WAITFORKEY: begin
          cnt <= '0;
          if (row_s != 4'b0000) state <= DEBOUNCING;
        end
        DEBOUNCING: begin
          if (row_s == 4'b0000) begin
            state <= WAITFORKEY;            // a bounce, not a press
          end else if (cnt == CW'(DEBOUNCE)) begin
            state <= SCAN;
            col   <= '0;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        SCAN: begin
          if (cnt == CW'(SETTLE)) begin
            cnt <= '0;
            if (row_s != 4'b0000) begin
              key   <= {row_index(row_s), col};
              valid <= 1'b1;
              state <= RELEASE;
            end else if (col == 2'd3) begin
              state <= WAITFORKEY;          // released during the scan
            end else begin
              col <= col + 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RELEASE: begin
          if (row_s != 4'b0000)          cnt <= '0;
          else if (cnt == CW'(DEBOUNCE)) state <= WAITFORKEY;
          else                           cnt <= cnt + 1'b1;
        end
        default: state <= WAITFORKEY;
      endcase
    end
  end

endmodule
