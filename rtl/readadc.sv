// readadc: captures the four most significant ADC bits at each sample tick
// and turns them into a signed sample. The ADC output is offset binary
// (mid-scale, the channel's zero level, reads 1000), so inverting the top
// bit gives two's complement: 1000 -> 0, 1001 -> +1, 0111 -> -1.
// Using only the 4 MSBs is the original design's choice; offset-binary
// coding and the register are this design's.
//
// Interface: rx is the raw 4-bit ADC bus, sampled when sample_tick is high;
// sample holds the converted value from the cycle after the tick until the
// next tick. Synchronous active-low reset clears it to 0.
module readadc
  import cdma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample_tick,
  input  logic [3:0] rx,
  output sample_t    sample
);

  always_ff @(posedge clk) begin
    if (!rst_n)           sample <= '0;
    else if (sample_tick) sample <= sample_t'({~rx[3], rx[2:0]});
  end

endmodule
