// Testbench of compressor_core at its default size (64 x 64 tile, 4
// levels). Tiles of several kinds are compressed back to back with byte
// budgets derived from a target bit rate, bytes = N*N/8 * bpp (2 bpp, 0.5
// bpp, 0.05 bpp i.e. 160:1, and a budget large enough to code all bit
// planes). Each byte stream is compared with the reference transform
// followed by the reference coder. The cycles from the start of a tile to
// end_spiht are checked against the rate of the published 64 x 64 core at
// 100 MHz in its worst case (2 bpp): 4.6 Mpixel/s, i.e. at most
// 4096 / 4.6e6 * 1e8 = 89,043 cycles per tile.
module tb_compressor_core;
  import tb_ref_pkg::*;
  localparam int N = 64, LEVELS = 4, CW = $clog2(N*N) + 1;

  logic clk = 0, rst = 1, newtile = 1;
  logic [7:0] datain_p1 = 0, datain_p2 = 0;
  logic [CW-1:0] desired_byte = 0, byte_count;
  logic [7:0] byte_out;
  logic new_byte, end_spiht, end_dwt;
  logic [14:0] init_th;
  byte unsigned got[$];
  int checks = 0, failures = 0, cyc = 0;

  compressor_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (new_byte) got.push_back(byte_out);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int kind, int budget, bit rate_check);
    int px[], coef[];
    byte_q exp;
    nls_stats_t stt;
    int t0, t;
    px = gen_tile(N, kind);
    coef = to_morton(dwt_ref(px, N, LEVELS), N/2);
    exp = nls_ref(coef, LEVELS, budget, stt);
    got.delete();
    desired_byte <= CW'(budget);
    newtile <= 1;
    repeat (2) @(posedge clk);
    newtile <= 0;
    t0 = cyc;
    for (int i = 0; i < N * N; i += 2) begin
      datain_p1 <= 8'(px[i]);
      datain_p2 <= 8'(px[i + 1]);
      @(posedge clk);
    end
    t = 0;
    while (end_spiht && t < 20000) begin @(posedge clk); t++; end
    while (!end_spiht && t < 1000000) begin @(posedge clk); t++; end
    t = cyc - t0;
    repeat (3) @(posedge clk);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("kind %0d budget %0d: %0d bytes, expected %0d", kind, budget, got.size(), exp.size());
    end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp[i]) failures++;
    end
    checks++;
    if (init_th != 15'(init_th_ref(coef))) begin
      failures++;
      $display("init_th %0d, expected %0d", init_th, init_th_ref(coef));
    end
    if (rate_check) begin
      checks++;
      if (t > 89043) begin
        failures++;
        $display("tile took %0d cycles, more than 89043", t);
      end
    end
    $display("kind %0d budget %0d bytes: %0d cycles (%.1f Mpixel/s at 100 MHz)",
             kind, budget, t, real'(N*N) / real'(t) * 100.0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run(1, N*N/8 * 2, 1);        // 2 bpp, worst case
    run(0, N*N/8 * 2, 1);
    run(1, N*N/8 / 2, 0);        // 0.5 bpp
    run(1, N*N/8 / 20, 0);       // 0.05 bpp, 160:1
    run(3, 4096, 0);             // all bit planes
    run(2, 100, 0);              // flat tile
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
