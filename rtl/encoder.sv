// encoder: spreads bytes over the station's chip sequence, continuously.
//
// Two byte registers, A and B, each with a valid flag, take turns: while
// one is being sent the other waits with the next byte. A byte is sent
// least significant bit first and every bit takes eight chip periods. For
// each chip the encoder sends the chip itself when the data bit is 1 and
// its complement when the data bit is 0; a chip value of 1 drives tx_high,
// a chip value of 0 drives tx_low. A register whose valid flag is clear
// sends nothing (both outputs low) for the whole byte. After the last chip
// of a byte the encoder switches registers, loads the register it just left
// with data_in/data_valid and pulses taken for one cycle: the source must
// present the next byte before that moment.
//
// After reset nothing is sent until cs_load; cs_load takes the chip
// sequence, empties both registers and restarts with register A, so the
// first two byte periods carry no data. The A/B structure, the valid
// flags, the registered outputs and the reset behaviour follow the
// original design; driving all state from a single clock with a chip-rate
// enable (instead of a divided clock) is this design's choice.
//
// Interface: chip_tick is a one-cycle enable at the chip rate; tx_high and
// tx_low change on the cycle after a chip_tick.
module encoder
  import cdma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       chip_tick,
  input  logic       cs_load,
  input  chipseq_t   cs,
  input  logic [7:0] data_in,
  input  logic       data_valid,
  output logic       taken,
  output logic       tx_high,
  output logic       tx_low
);

  chipseq_t   cs_reg;
  logic       cs_valid;
  logic [7:0] reg_a, reg_b;
  logic       valid_a, valid_b;
  logic       sel;           // 0: A is being sent, 1: B is being sent
  logic [2:0] chip_idx;
  logic [2:0] bit_idx;

  logic data_bit, cur_valid, chip_val, last_chip;

  assign data_bit  = sel ? reg_b[0] : reg_a[0];
  assign cur_valid = sel ? valid_b  : valid_a;
  assign chip_val  = ~(data_bit ^ cs_reg[chip_idx]);
  assign last_chip = (chip_idx == 3'(CHIPS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cs_reg   <= '0;
      cs_valid <= 1'b0;
      reg_a    <= '0;
      reg_b    <= '0;
      valid_a  <= 1'b0;
      valid_b  <= 1'b0;
      sel      <= 1'b0;
      chip_idx <= '0;
      bit_idx  <= '0;
      taken    <= 1'b0;
      tx_high  <= 1'b0;
      tx_low   <= 1'b0;
    end else if (cs_load) begin
      cs_reg   <= cs;
      cs_valid <= 1'b1;
      reg_a    <= '0;
      reg_b    <= '0;
      valid_a  <= 1'b0;
      valid_b  <= 1'b0;
      sel      <= 1'b0;
      chip_idx <= '0;
      bit_idx  <= '0;
      taken    <= 1'b0;
      tx_high  <= 1'b0;
      tx_low   <= 1'b0;
    end else begin
      taken <= 1'b0;
      if (chip_tick && cs_valid) begin
        tx_high  <= cur_valid &  chip_val;
        tx_low   <= cur_valid & ~chip_val;
        chip_idx <= chip_idx + 1'b1;
        if (last_chip) begin
          bit_idx <= bit_idx + 1'b1;
          // next data bit of the register being sent
          if (sel) reg_b <= reg_b >> 1;
          else     reg_a <= reg_a >> 1;
          if (bit_idx == 3'd7) begin
            // byte done: switch registers and refill the one just left
            sel   <= ~sel;
            taken <= 1'b1;
            if (sel) begin
              reg_b   <= data_in;
              valid_b <= data_valid;
            end else begin
              reg_a   <= data_in;
              valid_a <= data_valid;
            end
          end
        end
      end
    end
  end

endmodule
