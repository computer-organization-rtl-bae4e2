// r2000_pc: the program counter. A synchronous reset clears it to 0. When
// pc_ld is high at a rising edge it loads either the ALU result (pc_sel=1:
// PC+1 during fetch, PC+offset for a taken branch) or the jump target
// {6'b0, Inst[25:0]} (pc_sel=0). The PC is a word address.
module r2000_pc
  import r2000_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] alu_out,
  input  logic [31:0] inst,
  input  logic        pc_sel,
  input  logic        pc_ld,
  output logic [31:0] pc
);

  logic [31:0] src;

  assign src = (pc_sel == PCSEL_ALU) ? alu_out : {6'b000000, inst[25:0]};

  always_ff @(posedge clk) begin
    if (reset)      pc <= 32'd0;
    else if (pc_ld) pc <= src;
  end

endmodule
