// NLS encoder: control unit and operative unit of the modified no-list SPIHT
// coder.
//
// The wavelet coefficients of a tile are addressed in Morton order, index n
// = 0..NC-1 with NC = (N/2)^2, so that the children of n are 4n..4n+3. A
// marker per coefficient (marker memory, outside this module) replaces the
// lists of SPIHT. After an initialization that writes the start markers
// (MIP for the NDC coefficients of the LL band, MD/MN2/MN3 at the first
// element of every group of 4/16/64 descendants of the following
// generations), the threshold th starts at the initial threshold and each
// bit plane is coded with three scans over n:
//  * refinement pass (RP): for every MSP, output bit th of its magnitude;
//  * insignificant pixel pass (IPP): for every MIP, output its significance
//    and, if significant, its sign, and mark it MSP;
//  * insignificant set pass (ISP): for an MD (D set with first child n) test
//    dmax[n/4]; if significant, mark the grandchild group 4n as MG and code
//    the four children n..n+3 (significance, sign, MSP/MIP). For an MG
//    (G set with first grandchild n) test gmax[n/16]; if significant, split
//    it into four D sets at n, n+4, n+8, n+12 (MD there, MN2 at 4j and MN3
//    at 16j) and test n again.
// Any other marker is skipped by the distance of the skip tables. After the
// ISP the threshold is shifted right; coding ends when it reaches zero
// (flush is then pulsed) or as soon as stop (the byte budget is used) is
// seen.
//
// Timing: all memories have registered reads, so each scanned position costs
// a fetch and an execute cycle; every output bit costs one cycle. Bits come
// out on out_bit with the strobe new_bit, at most one per cycle, registered.
// The first pass at the initial threshold starts with an (empty) RP; the
// threshold is halved before every later RP.
//
// Following the original design, the control unit is a one-hot state
// machine. The split of the work into states and cycles is this design's
// own.
module nls_unit
  import spiht_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned LEVELS = 4,
  localparam int unsigned NC    = (N / 2) * (N / 2),
  localparam int unsigned AW    = $clog2(NC),
  localparam int unsigned DAW   = $clog2(NC / 4),
  localparam int unsigned GAW   = (NC / 16 > 1) ? $clog2(NC / 16) : 1,
  localparam int unsigned NDC   = NC >> (2 * (LEVELS - 1))
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,       // start_encode
  input  logic [14:0]    init_th,
  input  logic           stop,        // byte budget reached
  // coefficient memory (MEMa), sign-magnitude
  output logic [AW-1:0]  addout_p1,
  input  logic [15:0]    w,
  // Dmax / Gmax
  output logic [DAW-1:0] dmax_addr,
  input  logic [14:0]    dmax,
  output logic [GAW-1:0] gmax_addr,
  input  logic [14:0]    gmax,
  // marker memory
  output logic [AW-1:0]  mk_addr1,
  output logic           mk_we1,
  output marker_t        mk_wd1,
  input  marker_t        mk_q1,
  output logic [AW-1:0]  mk_addr2,
  output logic           mk_we2,
  output marker_t        mk_wd2,
  // bit stream
  output logic           out_bit,
  output logic           new_bit,
  output logic           flush,
  output logic           busy,
  output pass_t          pass,
  output logic [14:0]    th
);

  // one-hot state encoding, one flip-flop per state
  typedef enum logic [11:0] {
    S_IDLE     = 12'b000000000001,
    S_INIT     = 12'b000000000010,
    S_FETCH    = 12'b000000000100,
    S_EXEC     = 12'b000000001000,
    S_SIGN     = 12'b000000010000,
    S_CH_FETCH = 12'b000000100000,
    S_CH_EXEC  = 12'b000001000000,
    S_CH_SIGN  = 12'b000010000000,
    S_PUSH     = 12'b000100000000,
    S_DRAIN    = 12'b001000000000,
    S_FLUSH    = 12'b010000000000,
    S_DONE     = 12'b100000000000
  } state_t;
  state_t st;

  logic [AW:0]   n, n_adv;
  logic [2:0]    j;          // child index 0..3, then 4 = done
  logic [1:0]    pk;         // push index
  logic          ps;         // push sub-step
  logic          sgn;
  logic          sig_val, sig_d, sig_g;
  logic [AW+4:0] jpos, j4, j16;
  logic [AW:0]   skip_n;

  // marker that the initialization writes at index n
  function automatic marker_t init_mark(logic [AW:0] idx);
    int unsigned i;
    i = 32'(idx);
    if (i < NDC)            return M_MIP;
    else if (i < 4 * NDC)   return (i % 4 == 0)  ? M_MD  : M_MIP;
    else if (i < 16 * NDC)  return (i % 16 == 0) ? M_MN2 : M_MIP;
    else                    return (i % 64 == 0) ? M_MN3 : M_MIP;
  endfunction

  always_comb begin
    sig_val = |(w[14:0] & th);
    sig_d   = |(dmax & th);
    sig_g   = |(gmax & th);
    skip_n  = (pass == P_ISP) ? (AW+1)'(skip_isp(mk_q1)) : (AW+1)'(skip_rp(mk_q1));
    jpos    = (AW+5)'(n) + (AW+5)'({pk, 2'b00});
    j4      = jpos << 2;
    j16     = jpos << 4;
  end

  // addresses
  always_comb begin
    addout_p1 = AW'(n);
    mk_addr1  = AW'(n);
    if (st == S_CH_FETCH || st == S_CH_EXEC || st == S_CH_SIGN) begin
      addout_p1 = AW'(n + (AW+1)'(j));
      mk_addr1  = AW'(n + (AW+1)'(j));
    end else if (st == S_PUSH) begin
      mk_addr1  = AW'(jpos);
    end
    dmax_addr = DAW'(n >> 2);
    gmax_addr = GAW'(n >> 4);
  end

  // marker writes
  always_comb begin
    mk_we1 = 1'b0; mk_wd1 = M_MIP;
    mk_we2 = 1'b0; mk_wd2 = M_MIP; mk_addr2 = '0;
    case (st)
      S_INIT: begin
        mk_we1 = 1'b1;
        mk_wd1 = init_mark(n);
      end
      S_EXEC: begin
        if (pass == P_IPP && mk_q1 == M_MIP && sig_val) begin
          mk_we1 = 1'b1; mk_wd1 = M_MSP;
        end
        if (pass == P_ISP && mk_q1 == M_MD && sig_d && 32'(n) * 4 < NC) begin
          mk_we2 = 1'b1; mk_wd2 = M_MG; mk_addr2 = AW'(n << 2);
        end
      end
      S_CH_EXEC: begin
        mk_we1 = 1'b1;
        mk_wd1 = sig_val ? M_MSP : M_MIP;
      end
      S_PUSH: begin
        if (!ps) begin
          mk_we1   = 1'b1; mk_wd1 = M_MD;
          mk_we2   = (32'(j4) < NC); mk_wd2 = M_MN2; mk_addr2 = AW'(j4);
        end else begin
          mk_we2   = (32'(j16) < NC); mk_wd2 = M_MN3; mk_addr2 = AW'(j16);
        end
      end
      default: ;
    endcase
  end

  always_comb n_adv = n + skip_n;


  always_ff @(posedge clk) begin : seq
    logic        adv;    // move to position nn (or end the pass)
    logic [AW:0] nn;
    adv = 1'b0;
    nn  = n;
    new_bit <= 1'b0;
    if (rst) begin
      st   <= S_IDLE;
      n    <= '0;
      pass <= P_RP;
      th   <= '0;
      out_bit <= 1'b0;
    end else if (stop && st != S_IDLE && st != S_DONE) begin
      st <= S_DONE;
    end else begin
      case (st)
        S_IDLE: if (start) begin
          st   <= S_INIT;
          n    <= '0;
          th   <= init_th;
          pass <= P_RP;
        end
        S_INIT: begin
          if (32'(n) == NC - 1) begin
            n  <= '0;
            st <= (th == '0) ? S_DRAIN : S_FETCH;
          end else begin
            n <= n + 1'b1;
          end
        end
        S_FETCH: st <= S_EXEC;
        S_EXEC: begin
          sgn <= w[15];
          case (pass)
            P_RP: begin
              if (mk_q1 == M_MSP) begin
                out_bit <= sig_val; new_bit <= 1'b1;
              end
              begin adv = 1'b1; nn = n_adv; end
            end
            P_IPP: begin
              if (mk_q1 == M_MIP) begin
                out_bit <= sig_val; new_bit <= 1'b1;
                if (sig_val) st <= S_SIGN;
                else         begin adv = 1'b1; nn = n_adv; end
              end else begin
                begin adv = 1'b1; nn = n_adv; end
              end
            end
            default: begin
              if (mk_q1 == M_MD) begin
                out_bit <= sig_d; new_bit <= 1'b1;
                if (sig_d) begin
                  j  <= '0;
                  st <= S_CH_FETCH;
                end else begin
                  begin adv = 1'b1; nn = n + 4; end
                end
              end else if (mk_q1 == M_MG) begin
                out_bit <= sig_g; new_bit <= 1'b1;
                if (sig_g) begin
                  pk <= '0; ps <= 1'b0;
                  st <= S_PUSH;
                end else begin
                  begin adv = 1'b1; nn = n + 16; end
                end
              end else begin
                begin adv = 1'b1; nn = n_adv; end
              end
            end
          endcase
        end
        S_SIGN: begin
          out_bit <= sgn; new_bit <= 1'b1;
          begin adv = 1'b1; nn = n + 1; end
        end
        S_CH_FETCH: st <= S_CH_EXEC;
        S_CH_EXEC: begin
          sgn <= w[15];
          out_bit <= sig_val; new_bit <= 1'b1;
          if (sig_val) begin
            st <= S_CH_SIGN;
          end else if (j == 3'd3) begin
            begin adv = 1'b1; nn = n + 4; end
          end else begin
            j  <= j + 1'b1;
            st <= S_CH_FETCH;
          end
        end
        S_CH_SIGN: begin
          out_bit <= sgn; new_bit <= 1'b1;
          if (j == 3'd3) begin
            begin adv = 1'b1; nn = n + 4; end
          end else begin
            j  <= j + 1'b1;
            st <= S_CH_FETCH;
          end
        end
        S_PUSH: begin
          ps <= !ps;
          if (ps) begin
            if (pk == 2'd3) st <= S_FETCH;   // test n again, now an MD
            else            pk <= pk + 1'b1;
          end
        end
        S_DRAIN: st <= S_FLUSH;
        S_FLUSH: st <= S_DONE;
        S_DONE:  if (start) begin
          st   <= S_INIT;
          n    <= '0;
          th   <= init_th;
          pass <= P_RP;
        end
        default: st <= S_IDLE;
      endcase
      // next position after a skip or a coded element; end of a pass
      if (adv) begin
        if (32'(nn) >= NC) begin
          n <= '0;
          case (pass)
            P_RP:    pass <= P_IPP;
            P_IPP:   pass <= P_ISP;
            default: begin
              pass <= P_RP;
              th   <= th >> 1;
            end
          endcase
          if (pass == P_ISP && (th >> 1) == '0) st <= S_DRAIN;
          else                                   st <= S_FETCH;
        end else begin
          n  <= nn;
          st <= S_FETCH;
        end
      end
    end
  end

  assign flush = (st == S_FLUSH);
  assign busy  = (st != S_IDLE) && (st != S_DONE);

endmodule
