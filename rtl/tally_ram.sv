// tally_ram: single-port on-chip RAM holding one tally per sample position
// for a correlator (32 words of 4 bits in the original design, which used
// the FPGA's embedded RAM for it).
//
// Interface: synchronous write when we is high; synchronous read, so q shows
// the word at the address presented on the previous rising edge (the value
// before a write to that address in the same cycle). The contents are not
// reset: the correlator clears every word before using it.
module tally_ram
  import cdma_pkg::*;
#(
  parameter int WORDS = WINDOW,
  parameter int W     = TALLY_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [W-1:0]             d,
  output logic [W-1:0]             q
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= d;
    q <= mem[addr];
  end

endmodule
