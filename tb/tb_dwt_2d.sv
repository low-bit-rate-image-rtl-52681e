// Testbench of dwt_2d at its default size (64 x 64 tile, 4 levels): three
// tiles (random, smooth gradient, random again) are streamed in; after
// end_dwt every coefficient is read back through both ports in Morton order
// and compared with the reference transform. The time from the start of a
// tile to end_dwt is checked against the pair count of all steps plus a
// small per-step pipeline allowance.
module tb_dwt_2d;
  import tb_ref_pkg::*;
  localparam int N = 64, LEVELS = 4, H2 = N / 2, AWA = $clog2(H2 * H2), HB = AWA / 2;

  logic clk = 0, rst = 1, newtile = 1;
  logic [7:0] datain_p1 = 0, datain_p2 = 0;
  logic end_dwt;
  logic [AWA-1:0] addout_p1 = 0, addout_p2 = 0;
  logic [15:0] dataout_p1, dataout_p2;
  int checks = 0, failures = 0, cyc = 0;

  dwt_2d dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_tile(int kind);
    int px[], res[];
    int t0, pairs, lat;
    px = new[N * N];
    foreach (px[i]) begin
      case (kind)
        0: px[i] = $urandom_range(0, 255);
        1: px[i] = ((i % N) * 3 + (i / N) * 2) % 256;
        default: px[i] = (i % 7 == 0) ? 255 : $urandom_range(0, 40);
      endcase
    end
    res = dwt_ref(px, N, LEVELS);
    newtile <= 1;
    repeat (3) @(posedge clk);
    newtile <= 0;
    t0 = cyc;
    for (int i = 0; i < N * N; i += 2) begin
      datain_p1 <= 8'(px[i]);
      datain_p2 <= 8'(px[i + 1]);
      @(posedge clk);
    end
    while (!end_dwt) @(posedge clk);
    lat = cyc - t0;
    pairs = N * N / 2 + N * N / 4;
    for (int l = 2; l <= LEVELS; l++) pairs += (N >> (l - 1)) * (N >> (l - 1));
    checks++;
    if (lat < pairs || lat > pairs + 8 * 2 * LEVELS) begin
      failures++;
      $display("DWT took %0d cycles, %0d pairs", lat, pairs);
    end
    // read back in Morton order
    for (int r = 0; r < H2; r++)
      for (int c = 0; c < H2; c += 2) begin
        addout_p1 <= AWA'(morton(r, c, HB));
        addout_p2 <= AWA'(morton(r, c + 1, HB));
        @(posedge clk);
        #1;
        checks += 2;
        if (dataout_p1 !== 16'(res[r*H2 + c]) || dataout_p2 !== 16'(res[r*H2 + c + 1])) begin
          failures++;
          if (failures < 10) $display("r%0d c%0d got %h %h exp %h %h", r, c, dataout_p1, dataout_p2, 16'(res[r*H2+c]), 16'(res[r*H2+c+1]));
        end
      end
    $display("tile %0d: DWT %0d cycles", kind, lat);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run_tile(0);
    run_tile(1);
    run_tile(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
