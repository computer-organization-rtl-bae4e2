// regfile_4x4: a small register file, WORDS words of WIDTH bits (4 x 4 by
// default, 16 flip-flops), with independent write and read addresses so a
// write and a read can happen in the same cycle. A rising clock edge with we
// high stores d at wa. Reading is combinational: with re (the output enable)
// high, q shows the word at ra and q_en is high; with re low the outputs are
// released (q reads 0). A read of the word being written returns the old
// value until the edge. No reset.
module regfile_4x4 #(
  parameter int unsigned WORDS = 4,
  parameter int unsigned WIDTH = 4
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] wa,
  input  logic [WIDTH-1:0]         d,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] ra,
  output logic [WIDTH-1:0]         q,
  output logic                     q_en
);

  logic [WIDTH-1:0] words [WORDS];

  always_ff @(posedge clk) begin
    if (we) words[wa] <= d;
  end

  assign q    = re ? words[ra] : '0;
  assign q_en = re;

endmodule
