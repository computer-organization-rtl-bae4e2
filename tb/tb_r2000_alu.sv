// tb_r2000_alu: random operands through every operand selection and every
// one-hot operation, checked against an independent model of the operand
// muxes, the six operations and the zero/neg flags. Also checks an illegal
// op code gives 0 and the sign extension of the immediate.
module tb_r2000_alu;
  import r2000_pkg::*;
  `include "tb_common.svh"
  logic [31:0] reg_a, pc, inst, reg_b, alu_out, a, b, e;
  alu_op_e op; src_a_e src_a; src_b_e src_b;
  logic zero, neg;
  r2000_alu dut (.reg_a, .pc, .inst, .reg_b, .op, .src_a, .src_b, .alu_out, .zero, .neg);
  alu_op_e ops [7] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_PASSA, ALU_PASSB, ALU_NONE};
  initial begin #1000000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int sa = 0; sa < 2; sa++) for (int sb = 0; sb < 4; sb++) for (int o = 0; o < 7; o++) begin
        reg_a = $urandom; reg_b = $urandom; pc = $urandom; inst = $urandom;
        if (r == 0) begin reg_a = reg_b; pc = reg_b; end
        src_a = src_a_e'(sa); src_b = src_b_e'(sb); op = ops[o];
        #1;
        a = sa ? pc : reg_a;
        case (sb)
          0: b = reg_b;
          1: b = 0;
          2: b = 32'($signed(inst[15:0]));
          default: b = 1;
        endcase
        case (o)
          0: e = a + b;  1: e = a - b;  2: e = a & b;
          3: e = a | b;  4: e = a;      5: e = b;
          default: e = 0;
        endcase
        check(alu_out == e, $sformatf("op %s sa %0d sb %0d: %h exp %h", op.name(), sa, sb, alu_out, e));
        check(zero == (e == 0) && neg == e[31], "flags");
      end
    end
    // immediate sign extension
    src_a = SRCA_REG; src_b = SRCB_IMM; op = ALU_PASSB; inst = 32'h0000_8000; #1;
    check(alu_out == 32'hffff_8000, "sign-extended negative immediate");
    inst = 32'hffff_7fff; #1;
    check(alu_out == 32'h0000_7fff, "positive immediate ignores upper bits");
    finish_tb();
  end
endmodule
