// End-to-end testbench of image_compressor with its default parameters
// (four cores, 64 x 64 tiles, 4 levels). Two rounds are run; in each round
// the four cores compress different tiles at the same time with different
// byte budgets, and every core's stream is compared with the reference
// transform plus reference coder. The testbench counts how often each
// mechanism of the design happened in the cores and fails if one never did:
// border treatment at line starts/ends, dropping of level-1 details,
// sign-magnitude normalization, refinement bits, newly significant
// coefficients, significant D sets (split into children) and G sets (split
// into four D sets), skips over MN3-marked groups, stopping on the byte
// budget and stopping after the last bit plane (with a padded last byte).
// After each round every core's stream is also read back from its bitstream
// memory through addr_enc and compared with the expected bytes.
module tb_image_compressor;
  import tb_ref_pkg::*;
  import spiht_pkg::*;
  localparam int NCORE = 4, N = 64, LEVELS = 4, CW = $clog2(N*N) + 1;

  logic clk = 0, rst = 1;
  logic          newtile      [NCORE];
  logic [7:0]    datain_p1    [NCORE];
  logic [7:0]    datain_p2    [NCORE];
  logic [CW-1:0] desired_byte [NCORE];
  logic [7:0]    byte_out     [NCORE];
  logic          new_byte     [NCORE];
  logic [CW-1:0] byte_count   [NCORE];
  logic          end_spiht    [NCORE];
  logic          end_dwt      [NCORE];
  logic [CW-2:0] addr_enc     [NCORE];
  logic [7:0]    bitstream    [NCORE];
  logic [CW-2:0] addr_byte    [NCORE];
  logic [14:0]   init_th      [NCORE];
  byte unsigned got[NCORE][$];
  int checks = 0, failures = 0;

  typedef enum int {
    EV_SOL, EV_EOL, EV_DROP_L1, EV_SM, EV_RP_BIT, EV_NEW_SIG, EV_D_SPLIT,
    EV_G_SPLIT, EV_MN3_SKIP, EV_BUDGET_STOP, EV_LAST_PLANE, EV_READBACK, EV_NUM
  } ev_t;
  int ev[EV_NUM];
  string ev_name[EV_NUM] = '{"line start", "line end", "level-1 detail dropped",
    "sign-magnitude normalization", "refinement bit", "new significant coefficient",
    "D set split", "D set created by a G split", "MN3 group skipped", "stop on byte budget",
    "stop after last bit plane", "stream read back from memory"};

  image_compressor dut (.*);

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCORE; c++) begin : g_mon
    always @(posedge clk) if (!rst) begin
      if (new_byte[c]) got[c].push_back(byte_out[c]);
      if (dut.g_core[c].u_core.u_dwt.u_cu.prow_valid && dut.g_core[c].u_core.u_dwt.u_cu.sol_prow) ev[EV_SOL]++;
      if (dut.g_core[c].u_core.u_dwt.u_cu.pcol_valid && dut.g_core[c].u_core.u_dwt.u_cu.eol_pcol) ev[EV_EOL]++;
      if (dut.g_core[c].u_core.u_dwt.u_cu.we_mb_p1 && !dut.g_core[c].u_core.u_dwt.u_cu.we_mb_p2) ev[EV_DROP_L1]++;
      if (dut.g_core[c].u_core.u_dwt.u_cu.we_ma_p2 && dut.g_core[c].u_core.u_dwt.u_cu.sm_p2) ev[EV_SM]++;
      if (dut.g_core[c].u_core.u_enc.u_nls.new_bit && dut.g_core[c].u_core.u_enc.u_nls.pass == P_RP) ev[EV_RP_BIT]++;
      if (dut.g_core[c].u_core.u_enc.u_nls.mk_we1 && dut.g_core[c].u_core.u_enc.u_nls.mk_wd1 == M_MSP) ev[EV_NEW_SIG]++;
      if (dut.g_core[c].u_core.u_enc.u_nls.mk_we2 && dut.g_core[c].u_core.u_enc.u_nls.mk_wd2 == M_MG) ev[EV_D_SPLIT]++;
      if (dut.g_core[c].u_core.u_enc.u_nls.mk_we1 && dut.g_core[c].u_core.u_enc.u_nls.mk_wd1 == M_MD) ev[EV_G_SPLIT]++;
      if (dut.g_core[c].u_core.u_enc.u_nls.st.name() == "S_EXEC" &&
          dut.g_core[c].u_core.u_enc.u_nls.mk_q1 == M_MN3) ev[EV_MN3_SKIP]++;
      if (dut.g_core[c].u_core.u_enc.u_nls.flush) ev[EV_LAST_PLANE]++;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fin[c]: core c has finished the tile it was last given (rising edge of
  // end_spiht since that tile's newtile pulse)
  logic fin[NCORE], end_q[NCORE];
  for (genvar c = 0; c < NCORE; c++) begin : g_fin
    always @(posedge clk) begin
      end_q[c] <= end_spiht[c];
      if (newtile[c]) fin[c] <= 0;
      else if (end_spiht[c] && !end_q[c]) fin[c] <= 1;
    end
  end

  task automatic feed(int c, input int px[]);
    newtile[c] <= 1;
    repeat (2) @(posedge clk);
    newtile[c] <= 0;
    for (int i = 0; i < N * N; i += 2) begin
      datain_p1[c] <= 8'(px[i]);
      datain_p2[c] <= 8'(px[i + 1]);
      @(posedge clk);
    end
  endtask

  task automatic round(int kinds[NCORE], int budgets[NCORE]);
    int px[NCORE][];
    byte_q exp[NCORE];
    int eth[NCORE];
    nls_stats_t stt;
    for (int c = 0; c < NCORE; c++) begin
      int coef[];
      px[c] = gen_tile(N, kinds[c]);
      coef = to_morton(dwt_ref(px[c], N, LEVELS), N/2);
      exp[c] = nls_ref(coef, LEVELS, budgets[c], stt);
      eth[c] = init_th_ref(coef);
      got[c].delete();
      desired_byte[c] <= CW'(budgets[c]);
    end
    fork
      feed(0, px[0]);
      feed(1, px[1]);
      feed(2, px[2]);
      feed(3, px[3]);
    join
    for (int c = 0; c < NCORE; c++) begin
      int t = 0;
      while (!fin[c] && t < 1000000) begin @(posedge clk); t++; end
    end
    repeat (3) @(posedge clk);
    for (int c = 0; c < NCORE; c++) begin
      checks++;
      if (got[c].size() != exp[c].size() || byte_count[c] != CW'(exp[c].size())) begin
        failures++;
        $display("core %0d: %0d bytes, expected %0d", c, got[c].size(), exp[c].size());
      end
      if (byte_count[c] == desired_byte[c]) ev[EV_BUDGET_STOP]++;
      checks += 2;
      if (init_th[c] != 15'(eth[c])) begin
        failures++;
        $display("core %0d: init_th %0d, expected %0d", c, init_th[c], eth[c]);
      end
      if (addr_byte[c] != (CW-1)'(exp[c].size())) begin
        failures++;
        $display("core %0d: addr_byte %0d, expected %0d", c, addr_byte[c], exp[c].size());
      end
      foreach (exp[c][i]) begin
        checks++;
        if (i >= got[c].size() || got[c][i] != exp[c][i]) failures++;
      end
    end
    // read every core's stream back from its bitstream memory
    for (int i = 0; i < N * N; i++) begin
      bit any = 0;
      for (int c = 0; c < NCORE; c++) begin
        addr_enc[c] <= (CW-1)'(i);
        if (i < exp[c].size()) any = 1;
      end
      if (!any) break;
      @(posedge clk);
      @(negedge clk);
      for (int c = 0; c < NCORE; c++) if (i < exp[c].size()) begin
        checks++;
        ev[EV_READBACK]++;
        if (bitstream[c] != exp[c][i]) begin
          failures++;
          if (failures < 10) $display("core %0d memory byte %0d: %h, expected %h", c, i, bitstream[c], exp[c][i]);
        end
      end
    end
  endtask

  initial begin
    for (int c = 0; c < NCORE; c++) begin
      newtile[c] = 1; datain_p1[c] = 0; datain_p2[c] = 0; desired_byte[c] = 0; addr_enc[c] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    round('{1, 0, 3, 1}, '{1024, 512, 4096, 25});
    round('{0, 1, 2, 3}, '{4096, 4096, 64, 300});
    foreach (ev[i]) begin
      checks++;
      $display("%-30s %0d", ev_name[i], ev[i]);
      if (ev[i] == 0) begin
        failures++;
        $display("never happened: %s", ev_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
