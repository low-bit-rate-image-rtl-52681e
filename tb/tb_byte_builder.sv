// Testbench of byte_builder: random bit streams with random gaps are packed
// and compared with a bit-queue model, for byte budgets that stop the stream
// and for streams that end with a flush (zero padding of the last byte).
module tb_byte_builder;
  logic clk = 0, rst = 1, start = 0, bit_valid = 0, bit_in = 0, flush = 0;
  logic [16:0] desired_byte = 0, byte_count;
  logic [7:0] byte_out;
  logic new_byte, done;
  int checks = 0, failures = 0;
  byte unsigned got[$];

  byte_builder #(.CW(17)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (new_byte) got.push_back(byte_out);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nbits, int budget);
    byte unsigned exp[$];
    int acc = 0, k = 0;
    got.delete();
    for (int i = 0; i < nbits; i++) begin
      int b = $urandom_range(0, 1);
      acc = (acc << 1) | b; k++;
      if (k == 8) begin
        if (exp.size() < budget) exp.push_back(byte'(acc));
        acc = 0; k = 0;
      end
      if (i == nbits - 1 && k != 0 && exp.size() < budget) exp.push_back(byte'(acc << (8 - k)));
    end
    desired_byte <= 17'(budget);
    start <= 1; @(posedge clk); start <= 0;
    // replay the same bits: regenerate with the same seed is not possible,
    // so rebuild the bit list from exp and the padding is checked separately
    for (int i = 0; i < nbits; i++) begin
      int byi = i / 8, bi = 7 - i % 8;
      bit_valid <= 1;
      bit_in <= (byi < exp.size()) ? exp[byi][bi] : 1'b0;
      @(posedge clk);
      if ($urandom_range(0, 3) == 0) begin
        bit_valid <= 0;
        @(posedge clk);
      end
    end
    bit_valid <= 0;
    flush <= 1; @(posedge clk); flush <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (!done) begin failures++; $display("done not set"); end
    checks++;
    if (got.size() != exp.size() || byte_count != 17'(exp.size())) begin
      failures++;
      $display("bytes %0d count %0d expected %0d", got.size(), byte_count, exp.size());
    end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp[i]) failures++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    run(64, 100);   // ends by flush, exact bytes
    run(61, 100);   // ends by flush, padded
    run(200, 10);   // stopped by budget
    run(13, 1);
    for (int t = 0; t < 20; t++) run($urandom_range(1, 300), $urandom_range(0, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
