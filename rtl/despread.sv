// despread: the receive decoder. One shift register keeps the 32 most
// recent channel samples; for each of NST remote stations a dot-product
// unit and a correlator (with its own tally RAM) synchronize to that
// station and recover its data bits. Decoding two stations at once is the
// original design's main configuration.
//
// The dot product for a station takes one sample per chip: the 1st, 5th,
// ..., 29th most recent samples. The oldest of them (the 29th) is paired
// with chip 0, the first chip sent, and the most recent with chip 7.
//
// Interface: sample is registered by the caller and shifted in on
// sample_tick; cs[k] is station k's chip sequence; resync[k] restarts
// station k's synchronization. bit_valid[k] is a one-cycle pulse with
// bit_out[k] about DELAY+1 cycles after the tick that completes a bit.
module despread
  import cdma_pkg::*;
#(
  parameter int NST = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sample_tick,
  input  sample_t  sample,
  input  chipseq_t cs       [NST],
  input  logic     resync   [NST],
  output logic     bit_out  [NST],
  output logic     bit_valid[NST],
  output logic     synced   [NST],
  output dp_t      dp       [NST]
);

  sample_t taps [WINDOW];
  sample_t chip_samples [CHIPS];

  reg3shift #(.DEPTH(WINDOW)) u_shift (
    .clk  (clk),
    .rst_n(rst_n),
    .shift(sample_tick),
    .d    (sample),
    .taps (taps)
  );

  always_comb
    for (int i = 0; i < CHIPS; i++)
      chip_samples[i] = taps[OVERSAMPLE * (CHIPS - 1 - i)];

  for (genvar k = 0; k < NST; k++) begin : g_station
    dotprod #(.N(CHIPS)) u_dp (
      .s (chip_samples),
      .cs(cs[k]),
      .dp(dp[k])
    );

    correlate u_corr (
      .clk        (clk),
      .rst_n      (rst_n),
      .resync     (resync[k]),
      .sample_tick(sample_tick),
      .dp         (dp[k]),
      .bit_out    (bit_out[k]),
      .bit_valid  (bit_valid[k]),
      .synced     (synced[k])
    );
  end

endmodule
