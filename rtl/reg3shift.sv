// reg3shift: shift register of the DEPTH most recent signed samples, shared
// by every correlator of the decoder. Each shift moves all samples one place
// and puts the new one at taps[0], so taps[0] is the most recent sample and
// taps[DEPTH-1] the oldest.
//
// Interface: when shift is high at a rising edge, d enters taps[0]; taps are
// registered outputs. Synchronous active-low reset clears all samples.
// The depth of 32 (8 chips x 4 samples) is the original design's.
module reg3shift
  import cdma_pkg::*;
#(
  parameter int DEPTH = WINDOW
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    shift,
  input  sample_t d,
  output sample_t taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) taps[i] <= '0;
    end else if (shift) begin
      taps[0] <= d;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
