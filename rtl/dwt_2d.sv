// Two-dimensional 5/3 DWT of one N x N tile of 8-bit pixels.
//
// Structure: a row processor Prow and a column processor Pcol (both
// lifting_proc), two dual-port memories MEMb (N x N/2 words, Prow results)
// and MEMa (N/2 x N/2 words, Pcol results and the final pyramid), two
// sign-magnitude/normalization units on the MEMa write ports and the
// control unit dwt_cu. Prow gets its pair of samples either from the pixel
// inputs datain_p1/datain_p2 (level 1) or from the two MEMa read ports
// (levels 2..LEVELS), selected by mux_input.
//
// The level-1 detail subbands (LH1, HL1, HH1) are not kept, so the result is
// the (N/2) x (N/2) pyramid of levels 2..LEVELS, in sign-magnitude form
// (bit 15 sign, bits 14:0 magnitude) and normalized to powers of two.
//
// Interface: after a high-to-low transition of newtile the tile is streamed
// in raster order, one horizontal pixel pair per cycle, the first pair in
// the first cycle newtile is low (datain_p1 = even column, datain_p2 = odd
// column). When the transform is finished end_dwt goes high and stays high
// until the next tile starts. While end_dwt is high, addout_p1/addout_p2 read
// MEMa (registered, data one cycle later on dataout_p1/dataout_p2). The read
// addresses are coefficient indices in Morton (Z) order: bits 2k and 2k+1 of
// the index are bits k of the column and of the row. Converting them to the
// row-major MEMa address is wiring only. A 64 x 64 tile takes about 4.4k
// cycles.
//
// The control unit's currlevel, dir and ext_take outputs are status
// signals that this data path does not need; lint reports them as unused.
module dwt_2d #(
  parameter int unsigned N      = 64,
  parameter int unsigned LEVELS = 4,
  localparam int unsigned H2    = N / 2,
  localparam int unsigned AWA   = $clog2(H2 * H2),
  localparam int unsigned AWB   = $clog2(N * H2),
  localparam int unsigned HB    = AWA / 2
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           newtile,
  input  logic [7:0]     datain_p1,
  input  logic [7:0]     datain_p2,
  output logic           end_dwt,
  input  logic [AWA-1:0] addout_p1,
  input  logic [AWA-1:0] addout_p2,
  output logic [15:0]    dataout_p1,
  output logic [15:0]    dataout_p2
);

  logic           mux_input, ext_take, dir;
  logic [2:0]     currlevel;
  logic           prow_valid, sol_prow, eol_prow;
  logic           pcol_valid, sol_pcol, eol_pcol;
  logic           prow_ov, pcol_ov;
  logic [AWA-1:0] addint_ma_p1, addint_ma_p2;
  logic [AWB-1:0] addint_mb_p1, addint_mb_p2;
  logic           we_ma_p1, we_ma_p2, we_mb_p1, we_mb_p2;
  logic           sm_p1, sm_p2;
  logic [2:0]     norm_p1, norm_p2;

  logic signed [15:0] prow_e, prow_o, prow_l, prow_h;
  logic signed [15:0] pcol_l, pcol_h;
  logic [15:0]        mema_q1, mema_q2, memb_q1, memb_q2;
  logic [15:0]        sm_d1, sm_d2;
  logic [AWA-1:0]     ma_a1, ma_a2, z_a1, z_a2;

  dwt_cu #(.N(N), .LEVELS(LEVELS)) u_cu (
    .clk, .rst, .newtile,
    .mux_input, .end_dwt, .currlevel, .dir, .ext_take,
    .prow_valid, .sol_prow, .eol_prow,
    .pcol_valid, .sol_pcol, .eol_pcol,
    .prow_out_valid(prow_ov), .pcol_out_valid(pcol_ov),
    .addint_ma_p1, .addint_ma_p2, .we_ma_p1, .we_ma_p2,
    .sm_p1, .sm_p2, .norm_p1, .norm_p2,
    .addint_mb_p1, .addint_mb_p2, .we_mb_p1, .we_mb_p2
  );

  // input multiplexers of Prow
  assign prow_e = mux_input ? mema_q1 : {8'd0, datain_p1};
  assign prow_o = mux_input ? mema_q2 : {8'd0, datain_p2};

  lifting_proc #(.W(16)) u_prow (
    .clk, .rst, .in_valid(prow_valid), .in_even(prow_e), .in_odd(prow_o),
    .in_sol(sol_prow), .in_eol(eol_prow),
    .out_valid(prow_ov), .out_l(prow_l), .out_h(prow_h)
  );

  dp_ram #(.WIDTH(16), .DEPTH(N * H2)) u_memb (
    .clk,
    .addr1(addint_mb_p1), .we1(we_mb_p1), .wdata1(prow_l), .rdata1(memb_q1),
    .addr2(addint_mb_p2), .we2(we_mb_p2), .wdata2(prow_h), .rdata2(memb_q2)
  );

  lifting_proc #(.W(16)) u_pcol (
    .clk, .rst, .in_valid(pcol_valid), .in_even(memb_q1), .in_odd(memb_q2),
    .in_sol(sol_pcol), .in_eol(eol_pcol),
    .out_valid(pcol_ov), .out_l(pcol_l), .out_h(pcol_h)
  );

  sm_norm #(.W(16)) u_smn1 (.din(pcol_l), .sm(sm_p1), .norm(norm_p1), .dout(sm_d1));
  sm_norm #(.W(16)) u_smn2 (.din(pcol_h), .sm(sm_p2), .norm(norm_p2), .dout(sm_d2));

  // Morton index -> row-major address: de-interleave the index bits
  always_comb begin
    z_a1 = '0;
    z_a2 = '0;
    for (int k = 0; k < HB; k++) begin
      z_a1[k]      = addout_p1[2*k];
      z_a1[HB + k] = addout_p1[2*k + 1];
      z_a2[k]      = addout_p2[2*k];
      z_a2[HB + k] = addout_p2[2*k + 1];
    end
  end

  // MEMa address multiplexers: internal addresses during the transform,
  // external addresses once end_dwt is high
  assign ma_a1 = end_dwt ? z_a1 : addint_ma_p1;
  assign ma_a2 = end_dwt ? z_a2 : addint_ma_p2;

  dp_ram #(.WIDTH(16), .DEPTH(H2 * H2)) u_mema (
    .clk,
    .addr1(ma_a1), .we1(we_ma_p1), .wdata1(sm_d1), .rdata1(mema_q1),
    .addr2(ma_a2), .we2(we_ma_p2), .wdata2(sm_d2), .rdata2(mema_q2)
  );

  assign dataout_p1 = mema_q1;
  assign dataout_p2 = mema_q2;

endmodule
