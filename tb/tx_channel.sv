// tx_channel: behavioural model of the shared wired channel and of each
// station's analogue front end, for testbenches only.
//
// The summing board adds the +1 (high), -1 (low) or 0 outputs of up to N
// stations; the receiving ADC delivers that sum as a 4-bit offset-binary
// code (0 reads as 1000), assuming the gain is set so that one station is
// one step of the top four ADC bits. invert[i] reverses station i's
// contribution, which lets a testbench corrupt chosen bits; noise is added
// to the sum. Results beyond the 4-bit range saturate.
module tx_channel #(
  parameter int N = 2
) (
  input  logic [N-1:0]      high,
  input  logic [N-1:0]      low,
  input  logic [N-1:0]      invert,
  input  logic signed [3:0] noise,
  output logic [3:0]        rx
);

  int sum;

  always_comb begin
    sum = int'(noise);
    for (int i = 0; i < N; i++) begin
      if (high[i]) sum += invert[i] ? -1 : 1;
      if (low[i])  sum += invert[i] ? 1 : -1;
    end
    if (sum > 7)  sum = 7;
    if (sum < -8) sum = -8;
    rx = 4'(sum + 8);
  end

endmodule
