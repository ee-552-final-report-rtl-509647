// countn: WIDTH-bit up counter with synchronous clear and count enable.
// The station controller uses an 8-bit instance as its byte generator and
// initialization byte counter; the default width of 12 (a count to 4096)
// is the general counter of the original design.
//
// Interface: clr has priority over en; count changes one cycle after the
// edge that sees clr or en, and wraps from all ones to zero.
module countn #(
  parameter int WIDTH = 12
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (clr)     count <= '0;
    else if (en) count <= count + 1'b1;
  end

endmodule
