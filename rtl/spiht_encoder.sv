// Encoder of the compressor: modified NLS (no-list SPIHT) coder.
//
// Made of the maximum descendant magnitude circuit (mdmc, with the Dmax and
// Gmax memories), the dual-port marker memory (3 bits per coefficient), the
// NLS control/operative unit (nls_unit) and the byte builder with the stop
// condition (byte_builder).
//
// Operation: a rising edge of end_dwt starts the MDMC, which reads the
// coefficients through addout_p1/addout_p2 (Morton-order indices into the
// DWT's MEMa, data one cycle later on dataout_p1/dataout_p2) and builds the
// Dmax/Gmax tables and the initial threshold. Its start_encode starts the
// NLS unit, which writes the start markers and then codes bit plane after
// bit plane, using addout_p1 only. The bits are packed into bytes, first bit
// in the most significant position, and each byte appears on byte_out with a
// one-cycle new_byte strobe. end_spiht rises when byte_count reaches
// desired_byte, or when all bit planes are coded (a last partial byte is
// then padded with zeros). No header is produced: the initial threshold is
// available on init_th for whoever frames the stream.
//
// The coder's pass and threshold outputs and the marker memory's second
// read port are left unused here; lint reports them. They are kept because
// they show the coder's state and the memory is a true dual-port RAM.
module spiht_encoder
  import spiht_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned LEVELS = 4,
  localparam int unsigned NC    = (N / 2) * (N / 2),
  localparam int unsigned AW    = $clog2(NC),
  localparam int unsigned DAW   = $clog2(NC / 4),
  localparam int unsigned GAW   = (NC / 16 > 1) ? $clog2(NC / 16) : 1,
  localparam int unsigned CW    = $clog2(N * N) + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          end_dwt,
  input  logic [CW-1:0] desired_byte,
  output logic [AW-1:0] addout_p1,
  output logic [AW-1:0] addout_p2,
  input  logic [15:0]   dataout_p1,
  input  logic [15:0]   dataout_p2,
  output logic [7:0]    byte_out,
  output logic          new_byte,
  output logic [CW-1:0] byte_count,
  output logic          end_spiht,
  output logic [14:0]   init_th
);

  logic           end_dwt_q, start_mdmc, start_encode;
  logic [AW-1:0]  md_a1, md_a2, nls_a1;
  logic [DAW-1:0] dmax_addr;
  logic [GAW-1:0] gmax_addr;
  logic [14:0]    dmax_q, gmax_q, th;
  logic [AW-1:0]  mk_addr1, mk_addr2;
  logic           mk_we1, mk_we2;
  marker_t        mk_wd1, mk_wd2;
  logic [2:0]     mk_q1, mk_q2;
  logic           out_bit, new_bit, flush, nls_busy;
  pass_t          pass;

  always_ff @(posedge clk) begin
    if (rst) end_dwt_q <= 1'b0;
    else     end_dwt_q <= end_dwt;
  end
  assign start_mdmc = end_dwt && !end_dwt_q;

  mdmc #(.N(N)) u_mdmc (
    .clk, .rst, .start(start_mdmc),
    .addr_p1(md_a1), .addr_p2(md_a2), .data_p1(dataout_p1), .data_p2(dataout_p2),
    .start_encode, .init_th,
    .dmax_raddr(dmax_addr), .dmax_q, .gmax_raddr(gmax_addr), .gmax_q
  );

  dp_ram #(.WIDTH(3), .DEPTH(NC)) u_markers (
    .clk,
    .addr1(mk_addr1), .we1(mk_we1), .wdata1(mk_wd1), .rdata1(mk_q1),
    .addr2(mk_addr2), .we2(mk_we2), .wdata2(mk_wd2), .rdata2(mk_q2)
  );

  nls_unit #(.N(N), .LEVELS(LEVELS)) u_nls (
    .clk, .rst, .start(start_encode), .init_th, .stop(end_spiht),
    .addout_p1(nls_a1), .w(dataout_p1),
    .dmax_addr, .dmax(dmax_q), .gmax_addr, .gmax(gmax_q),
    .mk_addr1, .mk_we1, .mk_wd1, .mk_q1(marker_t'(mk_q1)),
    .mk_addr2, .mk_we2, .mk_wd2,
    .out_bit, .new_bit, .flush, .busy(nls_busy), .pass, .th
  );

  byte_builder #(.CW(CW)) u_bb (
    .clk, .rst, .start(start_encode),
    .bit_valid(new_bit), .bit_in(out_bit), .flush,
    .desired_byte, .byte_out, .new_byte, .byte_count, .done(end_spiht)
  );

  assign addout_p1 = nls_busy ? nls_a1 : md_a1;
  assign addout_p2 = md_a2;

endmodule
