// dotprod: dot product of N signed samples with a chip sequence. Because a
// chip is +1 (bit 1) or -1 (bit 0), no multiplier is needed: each sample is
// added or subtracted. s[i] is paired with chip i of cs.
//
// Interface: purely combinational; dp = sum over i of (cs[i] ? s[i] : -s[i]),
// in DP_W-bit two's complement (7 bits in the original design, enough for
// any code holding at least one 1 chip).
module dotprod
  import cdma_pkg::*;
#(
  parameter int N = CHIPS
) (
  input  sample_t          s [N],
  input  logic [0:N-1]     cs,
  output dp_t              dp
);

  always_comb begin
    dp = '0;
    for (int i = 0; i < N; i++) begin
      if (cs[i]) dp = dp + dp_t'(s[i]);
      else       dp = dp - dp_t'(s[i]);
    end
  end

endmodule
