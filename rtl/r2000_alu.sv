// r2000_alu: the datapath's single ALU, with its operand selectors.
// Operand A is RegA or the PC (src_a); operand B is RegB, zero, the
// sign-extended 16-bit immediate Inst[15:0], or one (src_b). The one-hot op
// selects add, subtract, and, or, pass A or pass B; any other op code gives 0.
// Status outputs: zero (result is all zeros) and neg (result bit 31, no
// overflow correction). The same ALU increments the PC during fetch, adds
// branch offsets and computes load/store addresses. Purely combinational.
module r2000_alu
  import r2000_pkg::*;
(
  input  logic [31:0] reg_a,
  input  logic [31:0] pc,
  input  logic [31:0] inst,
  input  logic [31:0] reg_b,
  input  alu_op_e     op,
  input  src_a_e      src_a,
  input  src_b_e      src_b,
  output logic [31:0] alu_out,
  output logic        zero,
  output logic        neg
);

  logic [31:0] a, b;

  assign a = (src_a == SRCA_PC) ? pc : reg_a;

  always_comb begin
    unique case (src_b)
      SRCB_REG:  b = reg_b;
      SRCB_ZERO: b = 32'd0;
      SRCB_IMM:  b = {{16{inst[15]}}, inst[15:0]};
      SRCB_ONE:  b = 32'd1;
      default:   b = 32'd0;
    endcase
  end

  always_comb begin
    case (op)
      ALU_ADD:   alu_out = a + b;
      ALU_SUB:   alu_out = a - b;
      ALU_AND:   alu_out = a & b;
      ALU_OR:    alu_out = a | b;
      ALU_PASSA: alu_out = a;
      ALU_PASSB: alu_out = b;
      default:   alu_out = 32'd0;
    endcase
  end

  assign zero = (alu_out == 32'd0);
  assign neg  = alu_out[31];

endmodule
