// Output interface and bitstream memory of one compressor core.
//
// The compressed bytes of a tile are stored in a byte memory, from which a
// host controller reads them after the tile is finished. The output
// interface proper is an address counter, addr_byte. It starts at 0 and
// steps by one on every new_byte, so byte k of the tile lands at address k.
// The memory address comes from a multiplexer selected by end_spiht:
//  * while the core is coding (end_spiht low), the memory is written at
//    addr_byte with byte_in;
//  * once the tile is finished (end_spiht high), the host's address addr_enc
//    reads the memory. The padded last byte of a stream can be strobed in
//    the same cycle in which end_spiht rises, so a new_byte strobe keeps the
//    multiplexer on addr_byte for that cycle.
// The read data, bitstream, is registered: it appears one cycle after
// addr_enc.
//
// The counter returns to 0 on rst and while clear is high. The core level
// connects clear to newtile, which the host raises before each tile.
//
// What follows the design description: the counter driven by new_byte, the
// memory written with the core's byte output, and the address multiplexer
// between the counter and the host's address, switched by end_spiht.
// This design's own choices: the clear input, the priority of new_byte in
// the multiplexer, and the depth of DEPTH bytes,
// which by default is N*N bytes, i.e. 8 bits per pixel for an N x N tile.
// A longer stream wraps around the memory.
module output_interface #(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          new_byte,
  input  logic [7:0]    byte_in,
  input  logic          end_spiht,
  input  logic [AW-1:0] addr_enc,
  output logic [AW-1:0] addr_byte,
  output logic [7:0]    bitstream
);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] addr;

  always_ff @(posedge clk) begin
    if (rst || clear) addr_byte <= '0;
    else if (new_byte) addr_byte <= addr_byte + 1'b1;
  end

  // Address multiplexer in front of the memory module.
  assign addr = (end_spiht && !new_byte) ? addr_enc : addr_byte;

  always_ff @(posedge clk) begin
    if (new_byte) mem[addr] <= byte_in;
    bitstream <= mem[addr];
  end

endmodule
