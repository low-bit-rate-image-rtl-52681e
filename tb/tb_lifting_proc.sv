// Testbench of lifting_proc: random lines of several lengths are fed back to
// back (and with gaps between lines), and each output pair is compared with
// the 1-D 5/3 lifting reference. Also checks the four-cycle latency.
module tb_lifting_proc;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_sol = 0, in_eol = 0;
  logic signed [15:0] in_even = 0, in_odd = 0;
  logic out_valid;
  logic signed [15:0] out_l, out_h;
  int checks = 0, failures = 0;
  int exp_l[$], exp_h[$];
  int cyc = 0, last_in_cyc = 0, last_out_cyc = 0;

  lifting_proc #(.W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (in_valid) last_in_cyc = cyc;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    int el, eh;
    el = exp_l.pop_front();
    eh = exp_h.pop_front();
    checks++;
    if (out_l !== 16'(el) || out_h !== 16'(eh)) begin
      failures++;
      if (failures < 10) $display("mismatch #%0d L %0d/%0d H %0d/%0d", checks, out_l, el, out_h, eh);
    end
    last_out_cyc = cyc;
  end

  task automatic send_line(int n, bit big);
    int x[], lo[], hi[];
    x = new[n];
    foreach (x[i]) x[i] = big ? int'($urandom_range(0, 8000)) - 4000 : int'($urandom_range(0, 255));
    lift53(x, n, lo, hi);
    for (int k = 0; k < n/2; k++) begin
      exp_l.push_back(lo[k]);
      exp_h.push_back(hi[k]);
    end
    for (int k = 0; k < n/2; k++) begin
      in_valid <= 1; in_even <= 16'(x[2*k]); in_odd <= 16'(x[2*k+1]);
      in_sol <= (k == 0); in_eol <= (k == n/2 - 1);
      @(posedge clk);
    end
  endtask

  task automatic idle(int cycles);
    in_valid <= 0; in_sol <= 0; in_eol <= 0;
    repeat (cycles) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // single short line: latency check
    send_line(4, 0);
    idle(6);
    checks++;
    if (last_out_cyc - last_in_cyc != 4) begin
      failures++;
      $display("latency %0d, expected 4", last_out_cyc - last_in_cyc);
    end
    for (int t = 0; t < 40; t++) begin
      int lens[4] = '{4, 8, 16, 64};
      send_line(lens[t % 4], t % 3 == 0);
      if (t % 5 == 0) idle($urandom_range(1, 3));
    end
    idle(10);
    checks++;
    if (exp_l.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_l.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
