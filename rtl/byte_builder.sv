// Byte builder and stop condition of the encoder.
//
// Collects the encoder's bit stream, first bit into the most significant
// position, and emits a byte with a one-cycle new_byte strobe each time eight
// bits are collected. byte_count counts the bytes emitted so far; done
// (end_spiht) rises when byte_count equals desired_byte, or after `flush`
// once the encoder has run out of bit planes. On flush, a partly filled byte
// is padded with zeros and emitted, unless the byte budget is already used
// (padding is this design's choice). Bits that arrive after done are
// ignored. start clears the counters for a new tile.
// new_byte follows the eighth bit by one cycle; done follows the last
// byte's new_byte in the same cycle.
module byte_builder #(
  parameter int unsigned CW = 17     // width of the byte counters
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,        // clear, new tile
  input  logic          bit_valid,    // new_bit
  input  logic          bit_in,       // output_bit
  input  logic          flush,        // encoder has no more bits
  input  logic [CW-1:0] desired_byte,
  output logic [7:0]    byte_out,
  output logic          new_byte,
  output logic [CW-1:0] byte_count,
  output logic          done
);

  logic [6:0] sh;      // collected bits
  logic [2:0] nbits;   // how many are collected

  wire reached = (byte_count == desired_byte);

  always_ff @(posedge clk) begin
    new_byte <= 1'b0;
    if (rst || start) begin
      sh         <= '0;
      nbits      <= '0;
      byte_count <= '0;
      byte_out   <= '0;
      done       <= 1'b0;
    end else if (!done) begin
      if (reached) begin
        done <= 1'b1;
      end else if (bit_valid) begin
        if (nbits == 3'd7) begin
          byte_out   <= {sh, bit_in};
          new_byte   <= 1'b1;
          byte_count <= byte_count + 1'b1;
          nbits      <= '0;
        end else begin
          sh    <= {sh[5:0], bit_in};
          nbits <= nbits + 1'b1;
        end
      end else if (flush) begin
        if (nbits != '0) begin
          byte_out   <= 8'({sh, 1'b0} << (3'd7 - nbits));
          new_byte   <= 1'b1;
          byte_count <= byte_count + 1'b1;
          nbits      <= '0;
        end
        done <= 1'b1;
      end
    end
  end

endmodule
