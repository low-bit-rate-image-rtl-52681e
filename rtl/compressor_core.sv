// One compressor core: 2-D DWT followed by the SPIHT-style encoder.
//
// A tile of N x N 8-bit pixels is streamed in after a high-to-low
// transition of newtile, one horizontal pixel pair per cycle in raster order
// (datain_p1 even column, datain_p2 odd column), starting in the first cycle
// newtile is low. The DWT (dwt_2d) computes LEVELS levels of the 5/3
// transform, drops the level-1 detail bands and leaves sign-magnitude,
// normalized coefficients in its MEMa memory; end_dwt then starts the
// encoder (spiht_encoder), which reads MEMa and emits the compressed stream
// one byte at a time on byte_out/new_byte. end_spiht rises when
// desired_byte bytes have been produced or all bit planes are coded. The
// next tile may start once end_spiht is high. init_th is the initial
// threshold found by the encoder, brought out because a decoder needs it.
module compressor_core #(
  parameter int unsigned N      = 64,
  parameter int unsigned LEVELS = 4,
  localparam int unsigned CW    = $clog2(N * N) + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          newtile,
  input  logic [7:0]    datain_p1,
  input  logic [7:0]    datain_p2,
  input  logic [CW-1:0] desired_byte,
  output logic [7:0]    byte_out,
  output logic          new_byte,
  output logic [CW-1:0] byte_count,
  output logic          end_spiht,
  output logic          end_dwt,
  output logic [14:0]   init_th
);

  localparam int unsigned AW = $clog2((N / 2) * (N / 2));

  logic [AW-1:0] addout_p1, addout_p2;
  logic [15:0]   dataout_p1, dataout_p2;

  dwt_2d #(.N(N), .LEVELS(LEVELS)) u_dwt (
    .clk, .rst, .newtile, .datain_p1, .datain_p2, .end_dwt,
    .addout_p1, .addout_p2, .dataout_p1, .dataout_p2
  );

  spiht_encoder #(.N(N), .LEVELS(LEVELS)) u_enc (
    .clk, .rst, .end_dwt, .desired_byte,
    .addout_p1, .addout_p2, .dataout_p1, .dataout_p2,
    .byte_out, .new_byte, .byte_count, .end_spiht, .init_th
  );

endmodule
