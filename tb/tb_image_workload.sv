// Workload testbench: a whole 512 x 512 image coded in 64 x 64 tiles by the
// default top (four cores), at the two ends of the compression range,
// 4:1 (2 bits per pixel, 1024 bytes per tile, the slowest case) and 160:1
// (26 bytes per tile, 0.05 bit per pixel).
//
// The image is synthetic and continuous across tile borders: smooth
// gradients, a few bright and dark discs, a textured region, a sharp-edged
// bar pattern and mild noise. The 64 tiles are dealt to the four cores in
// raster order, four at a time; each core's stream, as read back from its
// bitstream memory, is compared with the reference transform plus
// reference coder. The testbench also measures the cycles from the start of
// the first tile to the end of the last one and checks that, at 4:1, the
// image is coded at no less than 18.4 Mpixel/s at 100 MHz, i.e. within
// 512*512 / 18.4e6 * 100e6 = 1,424,695 cycles. The totals (bytes, cycles,
// pixel rate) are printed for both ratios.
module tb_image_workload;
  import tb_ref_pkg::*;
  localparam int NCORE = 4, N = 64, LEVELS = 4, CW = $clog2(N*N) + 1;
  localparam int IMG = 512, TPR = IMG / N;   // tiles per row

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
  int checks = 0, failures = 0;
  int img[IMG * IMG];
  longint cyc = 0;

  image_compressor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_image();
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        int v = 30 + (r * 120) / IMG + (c * 70) / IMG + $urandom_range(0, 5);
        int d1r = r - 150, d1c = c - 200, d2r = r - 380, d2c = c - 120;
        if (d1r*d1r + d1c*d1c < 90*90) v += 70;
        if (d2r*d2r + d2c*d2c < 50*50) v -= 40;
        if (r > 300 && c > 300) v += ((r ^ c) & 8) ? 25 : -25;   // texture
        if (r > 40 && r < 110 && c > 330 && c < 480) v = ((c / 6) % 2) ? 220 : 35;  // bars
        img[r*IMG + c] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
  endfunction

  function automatic int_da tile_px(int t);
    int px[];
    int r0 = (t / TPR) * N, c0 = (t % TPR) * N;
    px = new[N * N];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) px[r*N + c] = img[(r0 + r)*IMG + c0 + c];
    return px;
  endfunction

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

  // code tiles t0..t0+3 on the four cores; returns the bytes produced
  task automatic group(int t0, int budget, output int nbytes);
    int px[NCORE][];
    byte_q exp[NCORE];
    nls_stats_t stt;
    nbytes = 0;
    for (int c = 0; c < NCORE; c++) begin
      px[c] = tile_px(t0 + c);
      exp[c] = nls_ref(to_morton(dwt_ref(px[c], N, LEVELS), N/2), LEVELS, budget, stt);
      desired_byte[c] <= CW'(budget);
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
    @(posedge clk);
    for (int c = 0; c < NCORE; c++) begin
      checks++;
      nbytes += int'(byte_count[c]);
      if (byte_count[c] != CW'(exp[c].size())) begin
        failures++;
        $display("tile %0d: %0d bytes, expected %0d", t0 + c, byte_count[c], exp[c].size());
      end
    end
    for (int i = 0; i < budget; i++) begin
      for (int c = 0; c < NCORE; c++) addr_enc[c] <= (CW-1)'(i);
      @(posedge clk);
      @(negedge clk);
      for (int c = 0; c < NCORE; c++) if (i < exp[c].size()) begin
        checks++;
        if (bitstream[c] != exp[c][i]) begin
          failures++;
          if (failures < 10) $display("tile %0d byte %0d: %h, expected %h", t0 + c, i, bitstream[c], exp[c][i]);
        end
      end
    end
  endtask

  // whole image at one budget; the read-back time is not counted
  task automatic image(int budget, string label, bit rate_check);
    longint coding = 0, t1;
    int total = 0, nb;
    for (int t0 = 0; t0 < TPR * TPR; t0 += NCORE) begin
      t1 = cyc;
      group(t0, budget, nb);
      coding += cyc - t1;
      total += nb;
    end
    $display("%s: %0d bytes (%.3f bit/pixel), %0d cycles, %.1f Mpixel/s at 100 MHz",
             label, total, real'(total) * 8.0 / real'(IMG * IMG), coding,
             real'(IMG * IMG) / real'(coding) * 100.0);
    if (rate_check) begin
      checks++;
      if (coding > 1424695) begin
        failures++;
        $display("slower than 18.4 Mpixel/s");
      end
    end
  endtask

  initial begin
    for (int c = 0; c < NCORE; c++) begin
      newtile[c] = 1; datain_p1[c] = 0; datain_p2[c] = 0; desired_byte[c] = 0; addr_enc[c] = 0;
    end
    make_image();
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    image(26, "160:1", 0);
    image(1024, "4:1", 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
