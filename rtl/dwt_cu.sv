// Control unit of the 2-D DWT.
//
// It sequences LEVELS levels of the 2-D transform of an N x N tile, each
// level a horizontal step (processor Prow) followed by a vertical step
// (processor Pcol), and generates everything the data path needs:
//  * Top FSM: waits for a high-to-low transition of newtile, keeps the
//    current level (currlevel) and direction (dir), selects the Prow input
//    (mux_input: external pixels at level 1, MEMa afterwards) and raises
//    end_dwt when all levels are done.
//  * MMU: read and write address counters for MEMa and MEMb (the GEN_*
//    counters) and the write enables. Horizontal steps read MEMa (or the
//    external port) and write MEMb; vertical steps read MEMb and write MEMa.
//  * HB_ext / VB_ext: sol/eol flags that mark the first and last pair of a
//    row (Prow) or column (Pcol) for the border treatment.
//  * Coeff_corr P1/P2: the sm and norm controls of the sign-magnitude and
//    normalization units on the two MEMa write ports.
//
// Memory layout (row-major, N/2 words per row, this design's choice):
// MEMb holds N x N/2 words, the horizontally filtered level-1 L band, and
// later the L|H halves of each level. MEMa holds the final (N/2) x (N/2)
// pyramid: LL_j top left, HL_j top right, LH_j bottom left, HH_j bottom
// right of each S x S square, S = N/2^(j-1). Level-1 detail bands are never
// written: at level 1 only L outputs are kept.
// Normalization shifts: LL_LEVELS by LEVELS, HL_j and LH_j by j-1, HH_j by
// j-2, which are the power-of-two factors of the un-normalized 5/3 lifting
// divided by the smallest kept factor (that of HH_2).
//
// Timing: external pixel pairs are taken from the cycle in which newtile is
// first seen low, one pair per cycle in raster order, N*N/2 cycles in all.
// Memory reads are registered, so processor inputs read from a memory are
// valid one cycle after the address. One pair per cycle is filtered in every
// step; a step starts the cycle after the previous step's last write.
module dwt_cu #(
  parameter int unsigned N      = 64,
  parameter int unsigned LEVELS = 4,
  localparam int unsigned H2    = N / 2,
  localparam int unsigned AWA   = $clog2(H2 * H2),
  localparam int unsigned AWB   = $clog2(N * H2),
  localparam int unsigned LW    = $clog2(N) + 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           newtile,
  // Top FSM
  output logic           mux_input,    // 1: Prow reads MEMa, 0: external
  output logic           end_dwt,
  output logic [2:0]     currlevel,
  output logic           dir,          // 0 horizontal, 1 vertical
  output logic           ext_take,     // external pair consumed this cycle
  // processors
  output logic           prow_valid, sol_prow, eol_prow,
  output logic           pcol_valid, sol_pcol, eol_pcol,
  input  logic           prow_out_valid,
  input  logic           pcol_out_valid,
  // MEMa
  output logic [AWA-1:0] addint_ma_p1, addint_ma_p2,
  output logic           we_ma_p1, we_ma_p2,
  output logic           sm_p1, sm_p2,
  output logic [2:0]     norm_p1, norm_p2,
  // MEMb
  output logic [AWB-1:0] addint_mb_p1, addint_mb_p2,
  output logic           we_mb_p1, we_mb_p2
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t st;

  logic          newtile_q;
  logic [2:0]    level;
  logic [LW-1:0] rd_line, rd_p, wr_line, wr_p;
  logic          rd_active;
  logic          iss_q, sol_q, eol_q;

  logic [LW-1:0] S, pp, nl;
  logic          fall, ext_step, issue, rd_last, wr_fire, wr_last;

  always_comb begin
    S        = LW'(N >> (level - 3'd1));
    pp       = S >> 1;
    nl       = (level == 3'd1 && dir) ? LW'(H2) : S;
    fall     = newtile_q && !newtile;
    ext_step = (level == 3'd1) && !dir;
    // a pair is taken from the external port or read from a memory
    ext_take = ((st != S_RUN) && fall) || ((st == S_RUN) && rd_active && ext_step);
    issue    = (st == S_RUN) && rd_active && !ext_step;
    rd_last  = (rd_p == pp - 1'b1) && (rd_line == nl - 1'b1);
    wr_fire  = (st == S_RUN) && (dir ? pcol_out_valid : prow_out_valid);
    wr_last  = wr_fire && (wr_p == pp - 1'b1) && (wr_line == nl - 1'b1);
  end

  // Top FSM and MMU counters
  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      newtile_q <= 1'b0;
      level     <= 3'd1;
      dir       <= 1'b0;
      rd_line   <= '0; rd_p <= '0; rd_active <= 1'b0;
      wr_line   <= '0; wr_p <= '0;
      iss_q     <= 1'b0; sol_q <= 1'b0; eol_q <= 1'b0;
    end else begin
      newtile_q <= newtile;
      iss_q     <= issue;
      sol_q     <= (rd_p == '0);
      eol_q     <= (rd_p == pp - 1'b1);
      if (st != S_RUN && fall) begin
        // pair 0 of the new tile is taken in this cycle
        st        <= S_RUN;
        level     <= 3'd1;
        dir       <= 1'b0;
        rd_line   <= '0;
        rd_p      <= LW'(1);
        rd_active <= 1'b1;
        wr_line   <= '0; wr_p <= '0;
      end else if (st == S_RUN) begin
        if (ext_take || issue) begin
          if (rd_last) rd_active <= 1'b0;
          if (rd_p == pp - 1'b1) begin
            rd_p    <= '0;
            rd_line <= rd_line + 1'b1;
          end else begin
            rd_p <= rd_p + 1'b1;
          end
        end
        if (wr_fire) begin
          if (wr_p == pp - 1'b1) begin
            wr_p    <= '0;
            wr_line <= wr_line + 1'b1;
          end else begin
            wr_p <= wr_p + 1'b1;
          end
        end
        if (wr_last) begin
          rd_line <= '0; rd_p <= '0; wr_line <= '0; wr_p <= '0;
          if (!dir) begin
            dir       <= 1'b1;
            rd_active <= 1'b1;
          end else if (level == 3'(LEVELS)) begin
            st    <= S_DONE;
            level <= 3'd1;
            dir   <= 1'b0;
          end else begin
            level     <= level + 1'b1;
            dir       <= 1'b0;
            rd_active <= 1'b1;
          end
        end
      end
    end
  end

  assign end_dwt   = (st == S_DONE);
  assign currlevel = level;
  assign mux_input = (level != 3'd1);

  // HB_ext / VB_ext
  always_comb begin
    prow_valid = !dir && (ext_step ? ext_take : iss_q);
    sol_prow   = ext_step ? (rd_p == '0 || st != S_RUN) : sol_q;
    eol_prow   = ext_step ? (rd_p == pp - 1'b1 && st == S_RUN) : eol_q;
    pcol_valid = dir && iss_q;
    sol_pcol   = sol_q;
    eol_pcol   = eol_q;
  end

  // MMU address generation and Coeff_corr
  always_comb begin
    addint_ma_p1 = '0; addint_ma_p2 = '0; we_ma_p1 = 1'b0; we_ma_p2 = 1'b0;
    addint_mb_p1 = '0; addint_mb_p2 = '0; we_mb_p1 = 1'b0; we_mb_p2 = 1'b0;
    sm_p1 = 1'b0; sm_p2 = 1'b0; norm_p1 = '0; norm_p2 = '0;
    if (!dir) begin
      // horizontal: read row rd_line of MEMa, write row wr_line of MEMb
      addint_ma_p1 = AWA'(rd_line * H2 + 2 * rd_p);
      addint_ma_p2 = AWA'(rd_line * H2 + 2 * rd_p + 1);
      addint_mb_p1 = AWB'(wr_line * H2 + wr_p);
      addint_mb_p2 = AWB'(32'(wr_line) * H2 + 32'(pp) + 32'(wr_p));
      we_mb_p1     = wr_fire;
      we_mb_p2     = wr_fire && (level != 3'd1);
    end else begin
      // vertical: read column rd_line of MEMb, write column wr_line of MEMa
      addint_mb_p1 = AWB'(2 * rd_p * H2 + rd_line);
      addint_mb_p2 = AWB'((2 * rd_p + 1) * H2 + rd_line);
      addint_ma_p1 = AWA'(wr_p * H2 + wr_line);
      addint_ma_p2 = AWA'((32'(pp) + 32'(wr_p)) * H2 + 32'(wr_line));
      we_ma_p1     = wr_fire;
      we_ma_p2     = wr_fire && (level != 3'd1);
      // Coeff_corr P1: L outputs are HL (right half) or LL (left half)
      if (wr_line >= pp) begin
        sm_p1   = (level != 3'd1);
        norm_p1 = level - 3'd1;
      end else begin
        sm_p1   = (level == 3'(LEVELS));
        norm_p1 = 3'(LEVELS);
      end
      // Coeff_corr P2: H outputs are LH (left half) or HH (right half)
      sm_p2   = (level != 3'd1);
      norm_p2 = (wr_line >= pp) ? level - 3'd2 : level - 3'd1;
    end
  end

endmodule
