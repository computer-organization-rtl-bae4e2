// reg_ld_oe: a WIDTH-bit register (8 bits by default) with load enable and
// output enable, the standard building block of a register-transfer datapath.
// A rising clock edge with ld high stores d. With oe high the stored value is
// driven on q and q_en is high; with oe low the outputs are released (q_en
// low, q reads 0), which stands for the high-impedance state of 3-state
// output pins. No reset.
module reg_ld_oe #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             ld,
  input  logic             oe,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             q_en
);

  logic [WIDTH-1:0] r;

  always_ff @(posedge clk) begin
    if (ld) r <= d;
  end

  assign q    = oe ? r : '0;
  assign q_en = oe;

endmodule
