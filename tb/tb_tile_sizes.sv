// Testbench for the larger tile sizes: the same RTL with its tile-size
// parameter raised, as in the larger configurations the design was
// evaluated in. Three instances run side by side:
//  * a compressor_core with N = 128,
//  * a compressor_core with N = 256,
//  * an image_compressor with two cores on 128 x 128 tiles.
// Each is given image-like tiles at 2 bits per pixel (N*N/4 bytes, the
// slowest case) and at a low rate, and its byte stream is compared with the
// reference transform plus reference coder. At 2 bpp the cycle count from
// the start of a tile to end_spiht is checked against the published pixel
// rates at 100 MHz: 7.2 Mpixel/s for 128 x 128 (at most 227,555 cycles per
// tile) and 12 Mpixel/s for 256 x 256 (at most 546,133 cycles per tile);
// for the two-core version, 14.4 Mpixel/s for both tiles together (at most
// 227,555 cycles for the pair of tiles).
module tb_tile_sizes;
  import tb_ref_pkg::*;
  localparam int LEVELS = 4;
  localparam int N1 = 128, CW1 = $clog2(N1*N1) + 1;
  localparam int N2 = 256, CW2 = $clog2(N2*N2) + 1;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- single core, N = 128
  logic a_newtile = 1, a_new_byte, a_end_spiht, a_end_dwt;
  logic [7:0] a_p1 = 0, a_p2 = 0, a_byte;
  logic [CW1-1:0] a_desired = 0, a_count;
  logic [14:0] a_th;
  byte unsigned a_got[$];
  compressor_core #(.N(N1), .LEVELS(LEVELS)) u_a (
    .clk, .rst, .newtile(a_newtile), .datain_p1(a_p1), .datain_p2(a_p2),
    .desired_byte(a_desired), .byte_out(a_byte), .new_byte(a_new_byte),
    .byte_count(a_count), .end_spiht(a_end_spiht), .end_dwt(a_end_dwt), .init_th(a_th));
  always @(posedge clk) if (a_new_byte) a_got.push_back(a_byte);

  // ---- single core, N = 256
  logic b_newtile = 1, b_new_byte, b_end_spiht, b_end_dwt;
  logic [7:0] b_p1 = 0, b_p2 = 0, b_byte;
  logic [CW2-1:0] b_desired = 0, b_count;
  logic [14:0] b_th;
  byte unsigned b_got[$];
  compressor_core #(.N(N2), .LEVELS(LEVELS)) u_b (
    .clk, .rst, .newtile(b_newtile), .datain_p1(b_p1), .datain_p2(b_p2),
    .desired_byte(b_desired), .byte_out(b_byte), .new_byte(b_new_byte),
    .byte_count(b_count), .end_spiht(b_end_spiht), .end_dwt(b_end_dwt), .init_th(b_th));
  always @(posedge clk) if (b_new_byte) b_got.push_back(b_byte);

  // ---- two cores, N = 128
  logic          p_newtile [2] = '{1, 1};
  logic [7:0]    p_p1 [2] = '{0, 0}, p_p2 [2] = '{0, 0}, p_byte [2], p_bits [2];
  logic [CW1-1:0] p_desired [2] = '{0, 0}, p_count [2];
  logic          p_new_byte [2], p_end_spiht [2], p_end_dwt [2];
  logic [CW1-2:0] p_addr_enc [2] = '{0, 0}, p_addr_byte [2];
  logic [14:0]   p_th [2];
  byte unsigned p_got[2][$];
  image_compressor #(.NUM_CORES(2), .N(N1), .LEVELS(LEVELS)) u_p (
    .clk, .rst, .newtile(p_newtile), .datain_p1(p_p1), .datain_p2(p_p2),
    .desired_byte(p_desired), .byte_out(p_byte), .new_byte(p_new_byte),
    .byte_count(p_count), .end_spiht(p_end_spiht), .end_dwt(p_end_dwt),
    .addr_enc(p_addr_enc), .bitstream(p_bits), .addr_byte(p_addr_byte), .init_th(p_th));
  // p_fin[c]: rising edge of end_spiht seen since core c's last newtile
  logic p_fin[2], p_end_q[2];
  always @(posedge clk) begin
    if (p_new_byte[0]) p_got[0].push_back(p_byte[0]);
    if (p_new_byte[1]) p_got[1].push_back(p_byte[1]);
    for (int c = 0; c < 2; c++) begin
      p_end_q[c] <= p_end_spiht[c];
      if (p_newtile[c]) p_fin[c] <= 0;
      else if (p_end_spiht[c] && !p_end_q[c]) p_fin[c] <= 1;
    end
  end

  function automatic int compare(string label, byte unsigned got[$], byte_q exp,
                                 ref int checks);
    int f = 0;
    checks++;
    if (got.size() != exp.size()) begin
      f++;
      $display("%s: %0d bytes, expected %0d", label, got.size(), exp.size());
    end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp[i]) f++;
    end
    return f;
  endfunction

  // image-like tile with a second kind of texture per seed
  function automatic int_da tile(int n, int seed);
    int px[];
    px = gen_tile(n, 1);
    if (seed % 2)
      for (int r = n/2; r < n; r++)
        for (int c = 0; c < n/3; c++) px[r*n + c] = ((r / 4 + c / 4) % 2) ? 200 : 60;
    return px;
  endfunction

  task automatic run_a(int budget, bit rate);
    int px[];
    byte_q exp;
    nls_stats_t st;
    longint t0;
    px = tile(N1, 0);
    exp = nls_ref(to_morton(dwt_ref(px, N1, LEVELS), N1/2), LEVELS, budget, st);
    a_got.delete();
    a_desired <= CW1'(budget);
    a_newtile <= 1;
    repeat (2) @(posedge clk);
    a_newtile <= 0;
    t0 = cyc;
    for (int i = 0; i < N1 * N1; i += 2) begin
      a_p1 <= 8'(px[i]); a_p2 <= 8'(px[i + 1]);
      @(posedge clk);
    end
    while (a_end_spiht) @(posedge clk);
    while (!a_end_spiht) @(posedge clk);
    $display("128x128, %0d bytes: %0d cycles (%.1f Mpixel/s at 100 MHz)", budget, cyc - t0,
             real'(N1 * N1) / real'(cyc - t0) * 100.0);
    if (rate) begin
      checks++;
      if (cyc - t0 > 227555) begin failures++; $display("128x128 slower than 7.2 Mpixel/s"); end
    end
    repeat (2) @(posedge clk);
    failures += compare("128x128", a_got, exp, checks);
  endtask

  task automatic run_b(int budget, bit rate);
    int px[];
    byte_q exp;
    nls_stats_t st;
    longint t0;
    px = tile(N2, 1);
    exp = nls_ref(to_morton(dwt_ref(px, N2, LEVELS), N2/2), LEVELS, budget, st);
    b_got.delete();
    b_desired <= CW2'(budget);
    b_newtile <= 1;
    repeat (2) @(posedge clk);
    b_newtile <= 0;
    t0 = cyc;
    for (int i = 0; i < N2 * N2; i += 2) begin
      b_p1 <= 8'(px[i]); b_p2 <= 8'(px[i + 1]);
      @(posedge clk);
    end
    while (b_end_spiht) @(posedge clk);
    while (!b_end_spiht) @(posedge clk);
    $display("256x256, %0d bytes: %0d cycles (%.1f Mpixel/s at 100 MHz)", budget, cyc - t0,
             real'(N2 * N2) / real'(cyc - t0) * 100.0);
    if (rate) begin
      checks++;
      if (cyc - t0 > 546133) begin failures++; $display("256x256 slower than 12 Mpixel/s"); end
    end
    repeat (2) @(posedge clk);
    failures += compare("256x256", b_got, exp, checks);
  endtask

  task automatic feed_p(int c, input int px[]);
    p_newtile[c] <= 1;
    repeat (2) @(posedge clk);
    p_newtile[c] <= 0;
    for (int i = 0; i < N1 * N1; i += 2) begin
      p_p1[c] <= 8'(px[i]); p_p2[c] <= 8'(px[i + 1]);
      @(posedge clk);
    end
  endtask

  task automatic run_p(int budget, bit rate);
    int px[2][];
    byte_q exp[2];
    nls_stats_t st;
    longint t0;
    for (int c = 0; c < 2; c++) begin
      px[c] = tile(N1, c + 1);
      exp[c] = nls_ref(to_morton(dwt_ref(px[c], N1, LEVELS), N1/2), LEVELS, budget, st);
      p_got[c].delete();
      p_desired[c] <= CW1'(budget);
    end
    t0 = cyc + 2;
    fork
      feed_p(0, px[0]);
      feed_p(1, px[1]);
    join
    for (int c = 0; c < 2; c++) while (!p_fin[c]) @(posedge clk);
    $display("2x(128x128), %0d bytes per tile: %0d cycles for both (%.1f Mpixel/s at 100 MHz)",
             budget, cyc - t0, real'(2 * N1 * N1) / real'(cyc - t0) * 100.0);
    if (rate) begin
      checks++;
      if (cyc - t0 > 227555) begin failures++; $display("2x(128x128) slower than 14.4 Mpixel/s"); end
    end
    repeat (2) @(posedge clk);
    for (int c = 0; c < 2; c++) failures += compare("2x(128x128)", p_got[c], exp[c], checks);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    fork
      begin run_a(N1 * N1 / 4, 1); run_a(100, 0); end
      begin run_b(N2 * N2 / 4, 1); run_b(400, 0); end
      begin run_p(N1 * N1 / 4, 1); run_p(100, 0); end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
