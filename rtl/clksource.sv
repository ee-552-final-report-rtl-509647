// clksource: free-running 23-bit counter from which the station takes its
// slower rates. Bit k toggles every 2^k cycles, so bit k is a square wave
// with period 2^(k+1) system clocks. As in the original design it has no
// reset: only the rates matter, never the count itself.
//
// Interface: clk in, count[WIDTH-1:0] out. The count advances by one on
// every rising clock edge.
module clksource #(
  parameter int WIDTH = 23
) (
  input  logic             clk,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk)
    count <= count + 1'b1;

endmodule
