// Parallel image compressor: NUM_CORES independent compressor cores side by
// side, each compressing its own N x N tile.
//
// Every core has its own tile input, byte budget and output stream (arrays
// indexed by core), so a host can keep NUM_CORES tiles in flight and
// multiply the pixel rate by NUM_CORES. With the defaults (four cores on
// 64 x 64 tiles) this is the fastest configuration the design was evaluated
// in. How tiles are dealt out to the cores and how the streams are merged
// is left to the host. All timing is that of compressor_core.
//
// Behind every core sits an output_interface: the core's bytes are written
// to a byte memory at consecutive addresses (from 0 for each tile, the
// counter being cleared while newtile is high before a tile), and after end_spiht the
// host reads the stream back through addr_enc, one cycle per byte, on
// bitstream. This mirrors the test set-up around the core (bitstream
// memory, its output interface and the address multiplexer), repeated per
// core; the raw byte stream is also brought out, as are the write address
// addr_byte and the initial threshold init_th of each core (a decoder needs
// the latter to know the first bit plane; it is not part of the stream).
module image_compressor #(
  parameter int unsigned NUM_CORES = 4,
  parameter int unsigned N         = 64,
  parameter int unsigned LEVELS    = 4,
  localparam int unsigned CW       = $clog2(N * N) + 1,
  localparam int unsigned BW       = $clog2(N * N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          newtile      [NUM_CORES],
  input  logic [7:0]    datain_p1    [NUM_CORES],
  input  logic [7:0]    datain_p2    [NUM_CORES],
  input  logic [CW-1:0] desired_byte [NUM_CORES],
  output logic [7:0]    byte_out     [NUM_CORES],
  output logic          new_byte     [NUM_CORES],
  output logic [CW-1:0] byte_count   [NUM_CORES],
  output logic          end_spiht    [NUM_CORES],
  output logic          end_dwt      [NUM_CORES],
  input  logic [BW-1:0] addr_enc     [NUM_CORES],
  output logic [7:0]    bitstream    [NUM_CORES],
  output logic [BW-1:0] addr_byte    [NUM_CORES],
  output logic [14:0]   init_th      [NUM_CORES]
);

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    compressor_core #(.N(N), .LEVELS(LEVELS)) u_core (
      .clk, .rst,
      .newtile(newtile[c]), .datain_p1(datain_p1[c]), .datain_p2(datain_p2[c]),
      .desired_byte(desired_byte[c]),
      .byte_out(byte_out[c]), .new_byte(new_byte[c]), .byte_count(byte_count[c]),
      .end_spiht(end_spiht[c]), .end_dwt(end_dwt[c]),
      .init_th(init_th[c])
    );

    output_interface #(.DEPTH(N * N)) u_out (
      .clk, .rst, .clear(newtile[c]), .new_byte(new_byte[c]), .byte_in(byte_out[c]),
      .end_spiht(end_spiht[c]), .addr_enc(addr_enc[c]), .addr_byte(addr_byte[c]),
      .bitstream(bitstream[c])
    );
  end

endmodule
