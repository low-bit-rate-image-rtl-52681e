// Testbench of output_interface. Several "tiles" are simulated: a random
// number of random bytes arrives with random gaps on new_byte/byte_in,
// sometimes with the last byte strobed in the same cycle in which end_spiht
// rises (as the core does for a padded last byte). After each tile the
// stream is read back through addr_enc while end_spiht is high and compared
// with the bytes sent; the write counter addr_byte is checked after every
// strobe. Between tiles clear is pulsed, so every tile starts at address 0.
// The memory is kept small (DEPTH 256) so that a tile can also wrap around.
module tb_output_interface;
  localparam int DEPTH = 256, AW = $clog2(DEPTH);
  logic clk = 0, rst = 1, clear = 0, new_byte = 0, end_spiht = 0;
  logic [7:0] byte_in = 0, bitstream;
  logic [AW-1:0] addr_enc = 0, addr_byte;
  int checks = 0, failures = 0;

  output_interface #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tile(int nbytes, bit last_with_end);
    byte unsigned sent[$];
    clear <= 1; end_spiht <= 0;
    @(posedge clk);
    clear <= 0;
    @(posedge clk);
    for (int i = 0; i < nbytes; i++) begin
      byte unsigned b = 8'($urandom);
      sent.push_back(b);
      new_byte <= 1; byte_in <= b;
      if (last_with_end && i == nbytes - 1) end_spiht <= 1;
      @(posedge clk);
      new_byte <= 0;
      checks++;
      #1 if (addr_byte != AW'(i + 1)) begin
        failures++;
        $display("addr_byte %0d after %0d bytes", addr_byte, i + 1);
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    end_spiht <= 1;
    // read back; with more than DEPTH bytes only the last DEPTH survive
    for (int i = (nbytes > DEPTH ? nbytes - DEPTH : 0); i < nbytes; i++) begin
      addr_enc <= AW'(i);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (bitstream != sent[i]) begin
        failures++;
        $display("byte %0d: read %h, sent %h", i, bitstream, sent[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    tile(10, 0);
    tile(1, 1);
    tile(37, 1);
    tile(DEPTH, 0);
    tile(DEPTH + 20, 1);
    for (int t = 0; t < 20; t++) tile($urandom_range(1, 120), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
