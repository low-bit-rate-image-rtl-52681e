// Testbench of sm_norm: random and corner values with every shift, with the
// conversion on and off, against an integer model.
module tb_sm_norm;
  import tb_ref_pkg::*;

  logic [15:0] din, dout;
  logic sm;
  logic [2:0] norm;
  int checks = 0, failures = 0;

  sm_norm #(.W(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int v, bit s, int sh);
    int e;
    din = 16'(v); sm = s; norm = 3'(sh);
    #1;
    e = s ? to_sm(int'(shortint'(16'(v))), sh) : (v & 16'hffff);
    checks++;
    if (dout !== 16'(e)) begin
      failures++;
      if (failures < 10) $display("din=%0d sm=%0b norm=%0d got %h exp %h", shortint'(16'(v)), s, sh, dout, 16'(e));
    end
  endtask

  initial begin
    int corner[8] = '{0, 1, -1, 255, -255, 32767, -32768, 4096};
    foreach (corner[i]) for (int sh = 0; sh < 8; sh++) begin
      check(corner[i], 1, sh);
      check(corner[i], 0, sh);
    end
    repeat (3000) check(int'($urandom_range(0, 65535)), $urandom_range(0, 1), $urandom_range(0, 7));
    repeat (3000) check(int'($urandom_range(0, 600)) - 300, 1, $urandom_range(0, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
