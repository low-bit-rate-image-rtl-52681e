// Testbench of nls_unit at its default size (64 x 64 tile). The testbench
// provides the coefficient memory, the Dmax/Gmax tables (from a recursive
// walk of the tree) and the initial threshold; the marker memory is a
// dp_ram. The testbench packs the bits itself, raises stop when the byte
// budget is used, and compares the bytes with the reference NLS coder. It
// checks that flush comes exactly when all bit planes are coded, and counts
// how often each pass emitted a bit.
module tb_nls_unit;
  import tb_ref_pkg::*;
  import spiht_pkg::*;
  localparam int N = 64, NC = (N/2) * (N/2), AW = $clog2(NC);
  localparam int DAW = $clog2(NC/4), GAW = $clog2(NC/16);

  logic clk = 0, rst = 1, start = 0, stop = 0;
  logic [14:0] init_th = 0, dmax, gmax, th;
  logic [AW-1:0] addout_p1, mk_addr1, mk_addr2;
  logic [15:0] w;
  logic [DAW-1:0] dmax_addr;
  logic [GAW-1:0] gmax_addr;
  logic mk_we1, mk_we2;
  marker_t mk_wd1, mk_wd2;
  logic [2:0] mk_q1, mk_q2;
  logic out_bit, new_bit, flush, busy;
  pass_t pass;
  int coef[], dm[], gm[];
  byte unsigned got[$];
  int acc = 0, nb = 0, budget = 0, flushes = 0;
  int bits_in_pass[3];
  int checks = 0, failures = 0;

  nls_unit dut (.clk, .rst, .start, .init_th, .stop, .addout_p1, .w,
                .dmax_addr, .dmax, .gmax_addr, .gmax,
                .mk_addr1, .mk_we1, .mk_wd1, .mk_q1(marker_t'(mk_q1)),
                .mk_addr2, .mk_we2, .mk_wd2,
                .out_bit, .new_bit, .flush, .busy, .pass, .th);

  dp_ram #(.WIDTH(3), .DEPTH(NC)) u_mk (
    .clk, .addr1(mk_addr1), .we1(mk_we1), .wdata1(mk_wd1), .rdata1(mk_q1),
    .addr2(mk_addr2), .we2(mk_we2), .wdata2(mk_wd2), .rdata2(mk_q2));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    w    <= 16'(coef[addout_p1]);
    dmax <= 15'(dm[dmax_addr]);
    gmax <= 15'(gm[gmax_addr]);
  end

  // bit packing and the stop condition
  always @(posedge clk) begin
    if (new_bit && !stop) begin
      bits_in_pass[pass]++;
      acc = (acc << 1) | int'(out_bit);
      nb++;
      if (nb == 8) begin
        got.push_back(byte'(acc));
        nb = 0; acc = 0;
      end
    end
    if (flush) begin
      flushes++;
      if (nb != 0) got.push_back(byte'(acc << (8 - nb)));
      nb = 0;
    end
    stop <= (got.size() >= budget);
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int kind, int bud);
    byte_q exp;
    nls_stats_t stt;
    int mx, t;
    coef = rand_coefs(NC, 4, kind);
    exp = nls_ref(coef, 4, bud, stt);
    dm = new[NC/4];
    gm = new[NC/16];
    for (int k = 0; k < NC/4; k++) dm[k] = dmax_ref(coef, k);
    for (int k = 0; k < NC/16; k++) gm[k] = gmax_ref(coef, k);
    mx = 0;
    foreach (coef[i]) if ((coef[i] & 32'h7fff) > mx) mx = coef[i] & 32'h7fff;
    init_th <= 0;
    for (int b = 0; b < 15; b++) if ((1 << b) <= mx) init_th <= 15'(1 << b);
    got.delete(); nb = 0; acc = 0; flushes = 0; budget = bud;
    @(posedge clk);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    t = 0;
    @(posedge clk);
    while (busy && !stop && t < 2000000) begin @(posedge clk); t++; end
    repeat (3) @(posedge clk);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("kind %0d budget %0d: %0d bytes, expected %0d", kind, bud, got.size(), exp.size());
    end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] != exp[i]) failures++;
    end
    checks++;
    if (flushes != (stt.budget_stop ? 0 : 1)) begin
      failures++;
      $display("flush seen %0d times", flushes);
    end
  endtask

  initial begin
    coef = new[NC]; dm = new[NC/4]; gm = new[NC/16];
    repeat (3) @(posedge clk);
    rst <= 0;
    run(0, 300);
    run(1, 100000);
    run(0, 100000);
    run(2, 10);
    checks++;
    if (bits_in_pass[0] == 0 || bits_in_pass[1] == 0 || bits_in_pass[2] == 0) begin
      failures++;
      $display("a pass never emitted a bit: %p", bits_in_pass);
    end
    $display("bits per pass RP/IPP/ISP: %p", bits_in_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
