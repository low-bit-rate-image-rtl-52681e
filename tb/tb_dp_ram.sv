// Testbench of dp_ram: random writes and reads on both ports against an
// array model, including the one-cycle read latency and port-2 priority on
// a same-address write.
module tb_dp_ram;
  localparam int W = 12, D = 64;
  logic clk = 0;
  logic [5:0] addr1 = 0, addr2 = 0;
  logic we1 = 0, we2 = 0;
  logic [W-1:0] wdata1 = 0, wdata2 = 0, rdata1, rdata2;
  logic [W-1:0] model [D];
  logic [W-1:0] e1, e2;
  int checks = 0, failures = 0;

  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < D; i += 2) begin
      addr1 <= 6'(i); addr2 <= 6'(i + 1); we1 <= 1; we2 <= 1;
      wdata1 <= W'($urandom); wdata2 <= W'($urandom);
      @(posedge clk);
      model[i] = wdata1; model[i+1] = wdata2;
    end
    we1 <= 0; we2 <= 0;
    for (int t = 0; t < 4000; t++) begin
      addr1 <= 6'($urandom); addr2 <= 6'($urandom);
      we1 <= $urandom_range(0, 2) == 0; we2 <= $urandom_range(0, 2) == 0;
      wdata1 <= W'($urandom); wdata2 <= W'($urandom);
      @(posedge clk);
      e1 = model[addr1]; e2 = model[addr2];
      if (we1) model[addr1] = wdata1;
      if (we2) model[addr2] = wdata2;
      #1;
      checks += 2;
      if (rdata1 !== e1) failures++;
      if (rdata2 !== e2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
