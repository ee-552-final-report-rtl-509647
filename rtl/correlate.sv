// correlate: synchronizer and bit decoder for one remote station.
//
// The decoder sees the dot product dp of its station's chip sequence with
// eight samples spaced one chip apart, recomputed after every sample tick.
// Which of the 32 sample positions of a bit period is the start of the
// station's chip sequence is unknown, so the FSM works in three phases:
//   1. clear  - write 0 into all 32 tally words of the tally RAM;
//   2. sync   - on every sample tick advance the RAM address (the sample
//               position modulo 32), wait DELAY cycles for dp to settle,
//               and if |dp| > 6 add one to that position's tally. The
//               first position whose tally reaches 15 is taken as the bit
//               phase;
//   3. decode - count 32 ticks; at the chosen position wait DELAY cycles
//               and emit bit_out = 1 for dp > +6, 0 for dp < -6, with a
//               one-cycle bit_valid. Between those bounds the station is
//               taken to be silent and no bit is emitted.
// resync (the original's "invalid sync") restarts from phase 1.
// The thresholds, the tally target, the RAM and the three-cycle wait are
// the original design's. The threshold test is inclusive-exclusive exactly
// as stated there (strictly greater than 6 in magnitude).
//
// Interface: sample_tick must be at least DELAY+3 cycles apart. dp is
// combinational from the sample register. Synchronous active-low reset.
module correlate
  import cdma_pkg::*;
#(
  parameter int POSITIONS = WINDOW,
  parameter int THRESHOLD = GOOD_THRESHOLD,
  parameter int TARGET    = SYNC_TALLY,
  parameter int DELAY     = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic resync,
  input  logic sample_tick,
  input  dp_t  dp,
  output logic bit_out,
  output logic bit_valid,
  output logic synced
);

  localparam int AW = $clog2(POSITIONS);

  typedef enum logic [2:0] {
    S_CLEAR,      // writing zero tallies
    S_SYNC_IDLE,  // waiting for the next sample tick
    S_SYNC_DELAY, // letting dp and the RAM read settle
    S_SYNC_EVAL,  // judge dp and update the tally
    S_DEC_IDLE,   // counting sample ticks to the next bit
    S_DEC_DELAY,
    S_DEC_EVAL
  } state_t;

  state_t              state;
  logic [AW-1:0]       addr;        // tally address / sample position
  logic [AW-1:0]       corr_count;  // position within the bit when decoding
  logic [1:0]          delay_cnt;
  logic                ram_we;
  logic [TALLY_W-1:0]  ram_d, ram_q;
  logic                good, is_one, is_zero;

  assign is_one  = (dp >  dp_t'(THRESHOLD));
  assign is_zero = (dp < -dp_t'(THRESHOLD));
  assign good    = is_one | is_zero;

  tally_ram #(.WORDS(POSITIONS), .W(TALLY_W)) u_ram (
    .clk (clk),
    .we  (ram_we),
    .addr(addr),
    .d   (ram_d),
    .q   (ram_q)
  );

  always_comb begin
    ram_we = 1'b0;
    ram_d  = '0;
    case (state)
      S_CLEAR:     ram_we = 1'b1;
      S_SYNC_EVAL: begin
        ram_we = good;
        ram_d  = ram_q + 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n || resync) begin
      state      <= S_CLEAR;
      addr       <= '0;
      corr_count <= '0;
      delay_cnt  <= '0;
      bit_out    <= 1'b0;
      bit_valid  <= 1'b0;
      synced     <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      case (state)
        S_CLEAR: begin
          addr <= addr + 1'b1;
          if (addr == AW'(POSITIONS - 1)) state <= S_SYNC_IDLE;
        end
        S_SYNC_IDLE: if (sample_tick) begin
          addr      <= addr + 1'b1;
          delay_cnt <= '0;
          state     <= S_SYNC_DELAY;
        end
        S_SYNC_DELAY: begin
          delay_cnt <= delay_cnt + 1'b1;
          if (delay_cnt == 2'(DELAY - 1)) state <= S_SYNC_EVAL;
        end
        S_SYNC_EVAL: begin
          if (good && (ram_q == TALLY_W'(TARGET - 1))) begin
            corr_count <= '0;
            synced     <= 1'b1;
            state      <= S_DEC_IDLE;
          end else begin
            state <= S_SYNC_IDLE;
          end
        end
        S_DEC_IDLE: if (sample_tick) begin
          corr_count <= corr_count + 1'b1;
          delay_cnt  <= '0;
          if (corr_count == AW'(POSITIONS - 1)) state <= S_DEC_DELAY;
        end
        S_DEC_DELAY: begin
          delay_cnt <= delay_cnt + 1'b1;
          if (delay_cnt == 2'(DELAY - 1)) state <= S_DEC_EVAL;
        end
        S_DEC_EVAL: begin
          bit_out   <= is_one;
          bit_valid <= good;
          state     <= S_DEC_IDLE;
        end
        default: state <= S_CLEAR;
      endcase
    end
  end

  // A tick must not arrive while a previous one is still being judged.
  a_tick_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {S_SYNC_DELAY, S_SYNC_EVAL, S_DEC_DELAY, S_DEC_EVAL}) |-> !sample_tick);

endmodule
