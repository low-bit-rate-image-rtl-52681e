// Testbench of mdmc at its default size (64 x 64 tile, 1024 coefficients).
// A coefficient memory with registered reads is modelled in the testbench.
// After start_encode every dmax and gmax entry is read through the encoder
// ports and compared with a recursive walk of the coefficient tree, and the
// initial threshold with the largest magnitude. The run time must be three
// cycles per dmax entry.
module tb_mdmc;
  import tb_ref_pkg::*;
  localparam int N = 64, NC = (N/2) * (N/2), AW = $clog2(NC);
  localparam int KD = NC / 4, KG = NC / 16, DAW = $clog2(KD), GAW = $clog2(KG);

  logic clk = 0, rst = 1, start = 0;
  logic [AW-1:0] addr_p1, addr_p2;
  logic [15:0] data_p1, data_p2;
  logic start_encode;
  logic [14:0] init_th, dmax_q, gmax_q;
  logic [DAW-1:0] dmax_raddr = 0;
  logic [GAW-1:0] gmax_raddr = 0;
  int w[];
  int checks = 0, failures = 0, cyc = 0;

  mdmc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    data_p1 <= 16'(w[addr_p1]);
    data_p2 <= 16'(w[addr_p2]);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int kind);
    int t0, mx, eth;
    w = rand_coefs(NC, 4, kind);
    @(posedge clk);
    start <= 1; t0 = cyc;
    @(posedge clk);
    start <= 0;
    while (!start_encode) @(posedge clk);
    checks++;
    if (cyc - t0 != 3 * KD + 2) begin
      failures++;
      $display("MDMC took %0d cycles, expected %0d", cyc - t0, 3 * KD + 2);
    end
    mx = 0;
    foreach (w[i]) if ((w[i] & 32'h7fff) > mx) mx = w[i] & 32'h7fff;
    eth = 0;
    for (int b = 0; b < 15; b++) if ((1 << b) <= mx) eth = 1 << b;
    checks++;
    if (init_th != 15'(eth)) begin failures++; $display("init_th %0d exp %0d", init_th, eth); end
    for (int k = 1; k < KD; k++) begin
      dmax_raddr <= DAW'(k);
      gmax_raddr <= GAW'(k % KG);
      @(posedge clk);
      #1;
      checks++;
      if (dmax_q != 15'(dmax_ref(w, k))) begin
        failures++;
        if (failures < 10) $display("dmax[%0d] %h exp %h", k, dmax_q, dmax_ref(w, k));
      end
      if (k < KG) begin
        checks++;
        if (gmax_q != 15'(gmax_ref(w, k))) begin
          failures++;
          if (failures < 10) $display("gmax[%0d] %h exp %h", k, gmax_q, gmax_ref(w, k));
        end
      end
    end
  endtask

  initial begin
    w = new[NC];
    repeat (3) @(posedge clk);
    rst <= 0;
    run(0);
    run(1);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
