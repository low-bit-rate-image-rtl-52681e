// Dual-port synchronous RAM.
//
// Used for the DWT buffers MEMa and MEMb, the Dmax and Gmax memories and the
// encoder's marker memory. Each port has its own address, write enable and
// write data; reads are registered (the data of the address presented in
// cycle t is on rdata in cycle t+1), as in an FPGA block RAM. If both ports
// write the same word in one cycle, port 2 wins. The memory is not cleared by
// reset: every user writes a location before reading it.
module dp_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr1,
  input  logic             we1,
  input  logic [WIDTH-1:0] wdata1,
  output logic [WIDTH-1:0] rdata1,
  input  logic [AW-1:0]    addr2,
  input  logic             we2,
  input  logic [WIDTH-1:0] wdata2,
  output logic [WIDTH-1:0] rdata2
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we1) mem[addr1] <= wdata1;
    if (we2) mem[addr2] <= wdata2;
    rdata1 <= mem[addr1];
    rdata2 <= mem[addr2];
  end

endmodule
