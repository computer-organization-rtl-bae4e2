// r2000_memory: the shared instruction/data memory (Princeton organisation)
// of the R2000 processor, 2**ADDR_BITS words of WIDTH bits (256 x 32 by
// default), indexed by the low ADDR_BITS of the word address on the memory
// address bus. Read is asynchronous: with 'read' (mr) high the addressed word
// appears on rdata and rdata_en asks the data bus to carry it. With 'write'
// (mw) high, the word on wdata is stored at the rising clock edge that ends
// the cycle (the reference model instead writes a fixed delay after mw rises).
// A second port (host_*) lets a host load a program and read results; it is
// this design's addition and has write priority over the processor port.
module r2000_memory #(
  parameter int unsigned ADDR_BITS = 8,
  parameter int unsigned WIDTH     = 32
) (
  input  logic                 clk,
  input  logic [31:0]          addr,
  input  logic                 read,
  input  logic                 write,
  input  logic [WIDTH-1:0]     wdata,
  output logic [WIDTH-1:0]     rdata,
  output logic                 rdata_en,
  input  logic                 host_we,
  input  logic [ADDR_BITS-1:0] host_addr,
  input  logic [WIDTH-1:0]     host_wdata,
  output logic [WIDTH-1:0]     host_rdata
);

  logic [WIDTH-1:0] mem [2**ADDR_BITS];
  logic [ADDR_BITS-1:0] a;

  assign a = addr[ADDR_BITS-1:0];

  always_ff @(posedge clk) begin
    if (host_we)    mem[host_addr] <= host_wdata;
    else if (write) mem[a]         <= wdata;
  end

  assign rdata      = read ? mem[a] : '0;
  assign rdata_en   = read;
  assign host_rdata = mem[host_addr];

endmodule
