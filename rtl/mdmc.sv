// Maximum descendant magnitude circuit (MDMC).
//
// Before encoding, it reads all wavelet magnitudes of the tile once and
// builds, for every coefficient k that has children, the bitwise OR of the
// magnitudes of all its descendants (dmax, set D) and of all its descendants
// but the children (gmax, set G):
//   gmax[k] = dmax[4k] | dmax[4k+1] | dmax[4k+2] | dmax[4k+3]
//   dmax[k] = val[4k] | val[4k+1] | val[4k+2] | val[4k+3] | gmax[k]
// with gmax[k] = 0 for k >= NC/16 (NC = number of coefficients, (N/2)^2,
// indices in Morton order so that the children of k are 4k..4k+3). Because
// significance against a power-of-two threshold is a single-bit test, the
// OR carries the same information as the maximum. It also ORs all
// magnitudes and gives the initial threshold as the highest set bit.
//
// Order: k runs from NC/4-1 down to 0, so the tree is walked bottom-up; the
// four dmax values of one gmax word are produced on consecutive k and
// accumulated in a register, so gmax needs no extra reads. Each k takes 3
// cycles (two reads of the two MEMa ports, one write), NC*3/4 cycles in all.
// The Dmax and Gmax memories are inside; their second read port serves the
// encoder (registered read, one cycle latency). start_encode pulses when the
// tables and init_th are ready.
//
// Only the magnitudes of the coefficients matter here, so bit 15 (the sign)
// of both MEMa read ports is unused, which lint reports.
module mdmc #(
  parameter int unsigned N   = 64,
  localparam int unsigned NC  = (N / 2) * (N / 2),
  localparam int unsigned AW  = $clog2(NC),
  localparam int unsigned KD  = NC / 4,
  localparam int unsigned KG  = NC / 16,
  localparam int unsigned DAW = $clog2(KD),
  localparam int unsigned GAW = (KG > 1) ? $clog2(KG) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  // MEMa read ports (Morton-order indices)
  output logic [AW-1:0]  addr_p1,
  output logic [AW-1:0]  addr_p2,
  input  logic [15:0]    data_p1,
  input  logic [15:0]    data_p2,
  // results
  output logic           start_encode,
  output logic [14:0]    init_th,
  input  logic [DAW-1:0] dmax_raddr,
  output logic [14:0]    dmax_q,
  input  logic [GAW-1:0] gmax_raddr,
  output logic [14:0]    gmax_q
);

  typedef enum logic [1:0] {S_IDLE, S_RD0, S_RD1, S_WR} state_t;
  state_t st;

  logic [DAW-1:0] k;
  logic [14:0]    v01, g, acc, allor, dnew, all_next;
  logic           d_we, g_we;
  logic [GAW-1:0] g_addr1;
  logic [14:0]    g_q1, d_unused;

  always_comb begin
    dnew     = v01 | data_p1[14:0] | data_p2[14:0] | g;
    all_next = allor | v01 | data_p1[14:0] | data_p2[14:0];
    d_we     = (st == S_WR);
    g_we     = (st == S_WR) && (k[1:0] == 2'd0) && (32'(k >> 2) < KG);
    g_addr1  = (st == S_WR) ? GAW'(k >> 2) : GAW'(k);
    addr_p1  = (st == S_RD1) ? AW'({k, 2'd2}) : AW'({k, 2'd0});
    addr_p2  = (st == S_RD1) ? AW'({k, 2'd3}) : AW'({k, 2'd1});
  end

  always_ff @(posedge clk) begin
    start_encode <= 1'b0;
    if (rst) begin
      st      <= S_IDLE;
      init_th <= '0;
    end else begin
      case (st)
        S_IDLE: if (start) begin
          st    <= S_RD0;
          k     <= DAW'(KD - 1);
          acc   <= '0;
          allor <= '0;
        end
        S_RD0: st <= S_RD1;
        S_RD1: begin
          v01 <= data_p1[14:0] | data_p2[14:0];
          g   <= (32'(k) < KG) ? g_q1 : '0;
          st  <= S_WR;
        end
        S_WR: begin
          allor <= all_next;
          acc   <= (k[1:0] == 2'd0) ? '0 : (acc | dnew);
          if (k == '0) begin
            st           <= S_IDLE;
            start_encode <= 1'b1;
            init_th      <= '0;
            for (int b = 0; b < 15; b++)
              if (all_next[b]) init_th <= 15'(1) << b;
          end else begin
            k  <= k - 1'b1;
            st <= S_RD0;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  dp_ram #(.WIDTH(15), .DEPTH(KD)) u_dmax (
    .clk,
    .addr1(k), .we1(d_we), .wdata1(dnew), .rdata1(d_unused),
    .addr2(dmax_raddr), .we2(1'b0), .wdata2('0), .rdata2(dmax_q)
  );

  dp_ram #(.WIDTH(15), .DEPTH(KG)) u_gmax (
    .clk,
    .addr1(g_addr1), .we1(g_we), .wdata1(acc | dnew), .rdata1(g_q1),
    .addr2(gmax_raddr), .we2(1'b0), .wdata2('0), .rdata2(gmax_q)
  );

endmodule
