// bintoascii: converts a 4-bit keypad key number into its 7-bit ASCII
// character: keys 0-9 become '0'-'9' and keys 10-15 become 'A'-'F'.
// The original design names this conversion; the hexadecimal mapping of
// keys 10-15 is this design's choice. Purely combinational.
module bintoascii (
  input  logic [3:0] key,
  output logic [6:0] ascii
);

  always_comb begin
    if (key < 4'd10) ascii = 7'h30 + 7'(key);
    else             ascii = 7'h41 + 7'(key - 4'd10);
  end

endmodule
