// sram_1024x4: a static RAM of 2**ADDR_BITS words of WIDTH bits (1024 x 4
// by default) with one address bus a, read enable rd (also the chip select),
// write enable wr and bidirectional data pins, split here into io_in (pins
// as inputs) and io_out/io_oe (pins as outputs). With wr high the word on
// io_in is stored at a on the rising clock edge, and the chip does not drive
// its pins. With rd high and wr low the word at a is driven on io_out
// (combinational read) and io_oe is high; otherwise io_out reads 0. The
// array is written as synchronous-write storage, not as latches.
module sram_1024x4 #(
  parameter int unsigned ADDR_BITS = 10,
  parameter int unsigned WIDTH     = 4
) (
  input  logic                 clk,
  input  logic                 rd,
  input  logic                 wr,
  input  logic [ADDR_BITS-1:0] a,
  input  logic [WIDTH-1:0]     io_in,
  output logic [WIDTH-1:0]     io_out,
  output logic                 io_oe
);

  logic [WIDTH-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (wr) mem[a] <= io_in;
  end

  assign io_oe  = rd && !wr;
  assign io_out = io_oe ? mem[a] : '0;

endmodule
