// cdma_pkg: constants and types shared by the blocks of one wired-CDMA station.
//
// Every station spreads each data bit over an 8-chip sequence and receives
// by sampling the summed channel four times per chip, so one data bit spans
// 32 samples. Samples are 4-bit two's-complement values; one transmitting
// station contributes +1 or -1 per chip. Dot products of 8 samples with a
// chip sequence fit in 7 bits.
//
// Chip sequences are written as strings in the order the chips are sent:
// chip 0 is the leftmost character. The type chipseq_t is indexed [0:7] so
// that an 8'b literal keeps that order. The three station codes, the
// +/-6 "good decode" threshold, the tally target of 15 and the 20-byte
// preamble are the numbers of the original design; the code used for the
// unused fourth switch setting is this design's choice.
// As +/-1 vectors, codes 0 and 1 are orthogonal, but code 2 has a dot
// product of +2 with each of them, so with all three stations sending a
// wanted +/-8 can fall to the threshold and bits are lost. Another code
// set can be put into station_cs without changing any other block.
package cdma_pkg;

  localparam int CHIPS      = 8;                  // chips per data bit
  localparam int OVERSAMPLE = 4;                  // samples per chip
  localparam int WINDOW     = CHIPS * OVERSAMPLE; // samples per data bit
  localparam int SAMPLE_W   = 4;                  // ADC MSBs used
  localparam int DP_W       = 7;                  // dot-product width
  localparam int TALLY_W    = 4;                  // tally RAM word width

  localparam int GOOD_THRESHOLD = 6;   // |dp| > 6 is a good decode
  localparam int SYNC_TALLY     = 15;  // tally that ends initial sync
  localparam int PREAMBLE_BYTES = 20;  // all-ones bytes before the marker

  typedef logic [0:CHIPS-1]             chipseq_t;
  typedef logic signed [SAMPLE_W-1:0]   sample_t;
  typedef logic signed [DP_W-1:0]       dp_t;

  // Station codes selected by the 2-bit chip-sequence switches.
  function automatic chipseq_t station_cs(input logic [1:0] sel);
    case (sel)
      2'd0:    return 8'b00110101;
      2'd1:    return 8'b00001111;
      2'd2:    return 8'b00010110;
      default: return 8'b00110101;  // setting 3 aliases station 0
    endcase
  endfunction

  // Odd parity bit for a 7-bit character: the 8-bit byte {p, c} then
  // always holds an odd number of ones.
  function automatic logic odd_parity(input logic [6:0] c);
    return ~(^c);
  endfunction

endpackage
