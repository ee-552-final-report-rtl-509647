// rxbuff: turns the decoded bit stream of one remote station into bytes.
//
// A transmitter opens with twenty all-ones bytes and then one all-zeros
// byte; with odd parity on every data byte neither can occur as data. The
// buffer therefore ignores bits until it has seen a 1 followed by eight
// consecutive 0s (the frame marker) and from then on packs every eight
// bits into a byte, least significant bit first. If a framed byte is all
// ones the sender has restarted its preamble, so the buffer drops framing
// and waits for the marker again (this reframing rule is this design's
// choice). Marker detection and byte packing follow the original design.
//
// Handshake with the controller: byte_valid rises with a new byte and
// stays high until ack is seen high; the controller keeps ack high until
// byte_valid has fallen. A newer byte overwrites one not yet taken.
// clear restarts framing. Synchronous active-low reset.
module rxbuff (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       bit_in,
  input  logic       bit_valid,
  output logic [7:0] byte_out,
  output logic       byte_valid,
  input  logic       ack,
  output logic       framed
);

  logic       seen_one;
  logic [3:0] zero_run;
  logic [2:0] bit_cnt;
  logic [7:0] shreg;
  logic [7:0] next_byte;

  assign next_byte = {bit_in, shreg[7:1]};

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      seen_one   <= 1'b0;
      zero_run   <= '0;
      bit_cnt    <= '0;
      shreg      <= '0;
      byte_out   <= '0;
      byte_valid <= 1'b0;
      framed     <= 1'b0;
    end else begin
      if (ack) byte_valid <= 1'b0;
      if (bit_valid) begin
        if (!framed) begin
          if (bit_in) begin
            seen_one <= 1'b1;
            zero_run <= '0;
          end else if (seen_one) begin
            zero_run <= zero_run + 1'b1;
            if (zero_run == 4'd7) begin
              framed  <= 1'b1;
              bit_cnt <= '0;
            end
          end
        end else begin
          shreg   <= next_byte;
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt == 3'd7) begin
            if (next_byte == 8'hFF) begin
              framed   <= 1'b0;
              seen_one <= 1'b1;
              zero_run <= '0;
            end else begin
              byte_out   <= next_byte;
              byte_valid <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
