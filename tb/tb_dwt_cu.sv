// Testbench of dwt_cu on its own (16 x 16 tile, 4 levels). The processors
// are modelled by a four-cycle delay of the valid signals. For every step it
// checks that the input pairs, start-of-line and end-of-line flags come in
// the right numbers, that the MEMb and MEMa write addresses cover the
// step's region exactly once, that level-1 detail outputs are never written,
// and that the sign-magnitude/normalization controls on each MEMa write
// match the subband the address lies in. end_dwt must rise after the last
// level and the FSM must accept a second tile.
module tb_dwt_cu;
  localparam int N = 16, LEVELS = 4, H2 = N / 2;
  localparam int AWA = $clog2(H2 * H2), AWB = $clog2(N * H2);

  logic clk = 0, rst = 1, newtile = 1;
  logic mux_input, end_dwt, dir, ext_take;
  logic [2:0] currlevel;
  logic prow_valid, sol_prow, eol_prow, pcol_valid, sol_pcol, eol_pcol;
  logic prow_out_valid, pcol_out_valid;
  logic [AWA-1:0] addint_ma_p1, addint_ma_p2;
  logic we_ma_p1, we_ma_p2, sm_p1, sm_p2;
  logic [2:0] norm_p1, norm_p2;
  logic [AWB-1:0] addint_mb_p1, addint_mb_p2;
  logic we_mb_p1, we_mb_p2;
  logic [3:0] pv_d, cv_d;
  int checks = 0, failures = 0;
  int n_in[2][8], n_sol[2][8], n_eol[2][8];   // [dir][level]
  int wa[2][8][H2*H2], wb[8][N*H2];
  int bad_sm = 0;

  dwt_cu #(.N(N), .LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    pv_d <= {pv_d[2:0], prow_valid};
    cv_d <= {cv_d[2:0], pcol_valid};
  end
  assign prow_out_valid = pv_d[3];
  assign pcol_out_valid = cv_d[3];

  task automatic exp_sm(int a, int lv, output bit sm, output int nrm);
    int r = a / H2, c = a % H2, s = N >> (lv - 1), h = s / 2;
    if (lv == 1)               begin sm = (LEVELS == 1); nrm = LEVELS; end
    else if (r < h && c < h)   begin sm = (lv == LEVELS); nrm = LEVELS; end
    else if (r >= h && c >= h) begin sm = 1; nrm = lv - 2; end
    else                       begin sm = 1; nrm = lv - 1; end
  endtask

  always @(posedge clk) if (!rst) begin
    int lv;
    bit s; int nr;
    lv = currlevel;
    if (prow_valid) begin n_in[0][lv]++; n_sol[0][lv] += sol_prow; n_eol[0][lv] += eol_prow; end
    if (pcol_valid) begin n_in[1][lv]++; n_sol[1][lv] += sol_pcol; n_eol[1][lv] += eol_pcol; end
    if (we_mb_p1) wb[lv][addint_mb_p1]++;
    if (we_mb_p2) wb[lv][addint_mb_p2]++;
    if (we_ma_p1) begin
      wa[0][lv][addint_ma_p1]++;
      exp_sm(addint_ma_p1, lv, s, nr);
      if (sm_p1 != s || (s && norm_p1 != 3'(nr))) bad_sm++;
    end
    if (we_ma_p2) begin
      wa[1][lv][addint_ma_p2]++;
      exp_sm(addint_ma_p2, lv, s, nr);
      if (sm_p2 != s || (s && norm_p2 != 3'(nr))) bad_sm++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic one_tile();
    int t;
    n_in = '{default: 0}; n_sol = '{default: 0}; n_eol = '{default: 0};
    wa = '{default: 0}; wb = '{default: 0}; bad_sm = 0;
    newtile <= 1;
    repeat (2) @(posedge clk);
    newtile <= 0;
    t = 0;
    @(posedge clk);
    #1;
    expect_eq("end_dwt low once a tile starts", end_dwt, 0);
    while (!end_dwt && t < 5000) begin @(posedge clk); t++; end
    expect_eq("end_dwt", end_dwt, 1);
    for (int lv = 1; lv <= LEVELS; lv++) begin
      int s = N >> (lv - 1), cols;
      cols = (lv == 1) ? H2 : s;
      expect_eq($sformatf("L%0d row pairs", lv), n_in[0][lv], s * s / 2);
      expect_eq($sformatf("L%0d row sol", lv), n_sol[0][lv], s);
      expect_eq($sformatf("L%0d row eol", lv), n_eol[0][lv], s);
      expect_eq($sformatf("L%0d col pairs", lv), n_in[1][lv], cols * s / 2);
      expect_eq($sformatf("L%0d col sol", lv), n_sol[1][lv], cols);
      expect_eq($sformatf("L%0d col eol", lv), n_eol[1][lv], cols);
      // MEMb: rows 0..s-1, columns 0..(lv==1 ? H2 : s)-1, each once
      for (int a = 0; a < N * H2; a++) begin
        int r = a / H2, c = a % H2;
        bit in_reg = (r < s) && (c < cols);
        checks++;
        if (wb[lv][a] != (in_reg ? 1 : 0)) failures++;
      end
      // MEMa: port 1 the top half, port 2 the bottom half of the s x s square
      for (int a = 0; a < H2 * H2; a++) begin
        int r = a / H2, c = a % H2;
        bit top = (r < s / 2) && (c < cols);
        bit bot = (lv > 1) && (r >= s / 2) && (r < s) && (c < cols);
        checks += 2;
        if (wa[0][lv][a] != (top ? 1 : 0)) failures++;
        if (wa[1][lv][a] != (bot ? 1 : 0)) failures++;
      end
    end
    expect_eq("sm/norm controls wrong", bad_sm, 0);
    expect_eq("mux_input after end", mux_input, 0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    one_tile();
    one_tile();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
