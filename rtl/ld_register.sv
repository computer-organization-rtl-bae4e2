// ld_register: parameterised register with a load enable. On a rising clock
// edge with ld high the register takes d; otherwise it holds. In the R2000
// datapath it is used for the instruction register (IR), the memory buffer
// register (MBR) and ALUoutReg (ld tied high, so it samples the ALU every
// cycle). No reset, as in the reference design: every use loads it before
// reading it. Output q is the register itself, valid one edge after the load.
module ld_register #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             ld,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (ld) q <= d;
  end

endmodule
