// Testbench of spiht_encoder at its default size (64 x 64 tile, 1024
// coefficients). The DWT's coefficient memory is modelled in the testbench
// (registered reads, Morton-ordered sign-magnitude words). For each case an
// end_dwt edge starts the encoder, the emitted bytes are collected and
// compared with the reference NLS coder: dense and sparse random pyramids,
// an all-zero tile, budgets that stop the coder in the middle of a pass and
// a budget large enough to code every bit plane (ending with a padded
// byte). end_spiht and byte_count are checked at the end of each case.
module tb_spiht_encoder;
  import tb_ref_pkg::*;
  localparam int N = 64, NC = (N/2) * (N/2), AW = $clog2(NC), CW = $clog2(N*N) + 1;

  logic clk = 0, rst = 1, end_dwt = 0;
  logic [CW-1:0] desired_byte = 0, byte_count;
  logic [AW-1:0] addout_p1, addout_p2;
  logic [15:0] dataout_p1, dataout_p2;
  logic [7:0] byte_out;
  logic new_byte, end_spiht;
  logic [14:0] init_th;
  int w[];
  byte unsigned got[$];
  int checks = 0, failures = 0;

  spiht_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    dataout_p1 <= 16'(w[addout_p1]);
    dataout_p2 <= 16'(w[addout_p2]);
  end
  always @(posedge clk) if (new_byte) got.push_back(byte_out);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int kind, int budget);
    byte_q exp;
    nls_stats_t stt;
    int t;
    w = rand_coefs(NC, 4, kind);
    exp = nls_ref(w, 4, budget, stt);
    got.delete();
    desired_byte <= CW'(budget);
    end_dwt <= 0;
    repeat (2) @(posedge clk);
    end_dwt <= 1;
    t = 0;
    while (end_spiht && t < 5000) begin @(posedge clk); t++; end
    t = 0;
    while (!end_spiht && t < 2000000) begin @(posedge clk); t++; end
    repeat (3) @(posedge clk);
    checks++;
    if (got.size() != exp.size() || byte_count != CW'(exp.size())) begin
      failures++;
      $display("kind %0d budget %0d: %0d bytes (count %0d), expected %0d", kind, budget, got.size(), byte_count, exp.size());
    end
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        if (failures < 10) $display("byte %0d: %h expected %h", i, got[i], exp[i]);
      end
    end
    $display("kind %0d budget %0d: %0d bytes in %0d cycles, planes %0d, D %0d G %0d, stopped by budget %0b",
             kind, budget, got.size(), t, stt.planes, stt.d_split, stt.g_split, stt.budget_stop);
  endtask

  initial begin
    w = new[NC];
    repeat (3) @(posedge clk);
    rst <= 0;
    run(0, 100);
    run(1, 4096);
    run(0, 4096);
    run(2, 50);
    run(1, 33);
    run(0, 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
