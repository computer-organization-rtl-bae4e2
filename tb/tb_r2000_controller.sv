// tb_r2000_controller: drives the controller with each instruction of the
// subset (IR held constant, zero/neg set per case) and checks, cycle by
// cycle, the state sequence and the control word of each state against
// tables written from the register-transfer description: fetch
// (PCmaEN, mr, IRld, PC+1), decode (nothing), and each execute step. The
// number of cycles per instruction is checked through the sequence length.
module tb_r2000_controller;
  import r2000_pkg::*;
  `include "tb_common.svh"
  logic clk = 0, reset, zero, neg, halted;
  logic [31:0] inst;
  ctrl_t ctrl, exp_c;
  state_e state;
  always #5 clk = ~clk;
  r2000_controller dut (.clk, .reset, .inst, .zero, .neg, .ctrl, .state, .halted);
  initial begin #1000000; failures++; $display("FAIL: watchdog"); finish_tb(); end

  function automatic ctrl_t c_fetch();
    ctrl_t c = '0;
    c.pc_ma_en = 1; c.mr = 1; c.ir_ld = 1; c.src_a = SRCA_PC; c.src_b = SRCB_ONE;
    c.op = ALU_ADD; c.pc_sel = 1; c.pc_ld = 1;
    return c;
  endfunction
  function automatic ctrl_t c_alu(src_a_e a, src_b_e b, alu_op_e op, logic we, logic dsel, logic rsel);
    ctrl_t c = '0;
    c.src_a = a; c.src_b = b; c.op = op; c.reg_write = we; c.wr_data_sel = dsel; c.wr_reg_sel = rsel;
    return c;
  endfunction

  // Run one instruction from fetch; compare the execute states and control words.
  task automatic run_inst(string name, logic [31:0] i, logic z, logic n,
                          state_e exp_s [], ctrl_t exp_w []);
    inst = i; zero = z; neg = n;
    check(state == S_FETCH, {name, ": starts in fetch"});
    check(ctrl == c_fetch(), {name, ": fetch control word"});
    @(posedge clk); #1;
    check(state == S_DECODE && ctrl == '0, {name, ": decode"});
    @(posedge clk); #1;
    foreach (exp_s[k]) begin
      check(state == exp_s[k], $sformatf("%s: step %0d state %s exp %s", name, k, state.name(), exp_s[k].name()));
      check(ctrl == exp_w[k], $sformatf("%s: step %0d control %h exp %h", name, k, ctrl, exp_w[k]));
      @(posedge clk); #1;
    end
    check(state == S_FETCH, {name, ": back to fetch"});
  endtask

  initial begin
    ctrl_t lw2 = '0, sw2 = '0, j1 = '0, beq2, lw3;
    lw2.alu_ma_en = 1; lw2.mr = 1; lw2.mbr_ld = 1;
    sw2.alu_ma_en = 1; sw2.regb_md_en = 1; sw2.mw = 1;
    j1.pc_sel = 0; j1.pc_ld = 1;
    beq2 = c_alu(SRCA_PC, SRCB_IMM, ALU_ADD, 0, 0, 0); beq2.pc_sel = 1; beq2.pc_ld = 1;
    lw3 = c_alu(SRCA_REG, SRCB_REG, ALU_NONE, 1, 1, 0);
    reset = 1; inst = 0; zero = 0; neg = 0;
    @(posedge clk); #1;
    reset = 0;
    run_inst("add", enc_r(1, 2, 3, FN_ADD), 0, 0, '{S_EXEC1}, '{c_alu(SRCA_REG, SRCB_REG, ALU_ADD, 1, 0, 1)});
    run_inst("sub", enc_r(1, 2, 3, FN_SUB), 0, 0, '{S_EXEC1}, '{c_alu(SRCA_REG, SRCB_REG, ALU_SUB, 1, 0, 1)});
    run_inst("and", enc_r(1, 2, 3, FN_AND), 0, 0, '{S_EXEC1}, '{c_alu(SRCA_REG, SRCB_REG, ALU_AND, 1, 0, 1)});
    run_inst("or",  enc_r(1, 2, 3, FN_OR),  0, 0, '{S_EXEC1}, '{c_alu(SRCA_REG, SRCB_REG, ALU_OR, 1, 0, 1)});
    run_inst("slt<", enc_r(1, 2, 3, FN_SLT), 0, 1, '{S_EXEC1, S_EXEC2},
             '{c_alu(SRCA_REG, SRCB_REG, ALU_SUB, 1, 0, 1), c_alu(SRCA_REG, SRCB_ONE, ALU_PASSB, 1, 0, 1)});
    run_inst("slt>=", enc_r(1, 2, 3, FN_SLT), 0, 0, '{S_EXEC1, S_EXEC3},
             '{c_alu(SRCA_REG, SRCB_REG, ALU_SUB, 1, 0, 1), c_alu(SRCA_REG, SRCB_ZERO, ALU_PASSB, 1, 0, 1)});
    run_inst("lw", enc_i(OP_LW, 1, 2, 16'h10), 0, 0, '{S_EXEC1, S_EXEC2, S_EXEC3},
             '{c_alu(SRCA_REG, SRCB_IMM, ALU_ADD, 0, 0, 0), lw2, lw3});
    run_inst("sw", enc_i(OP_SW, 1, 2, 16'h10), 0, 0, '{S_EXEC1, S_EXEC2},
             '{c_alu(SRCA_REG, SRCB_IMM, ALU_ADD, 0, 0, 0), sw2});
    run_inst("beq taken", enc_i(OP_BEQ, 1, 2, 16'h3), 1, 0, '{S_EXEC1, S_EXEC2},
             '{c_alu(SRCA_REG, SRCB_REG, ALU_SUB, 0, 0, 0), beq2});
    run_inst("beq not taken", enc_i(OP_BEQ, 1, 2, 16'h3), 0, 1, '{S_EXEC1},
             '{c_alu(SRCA_REG, SRCB_REG, ALU_SUB, 0, 0, 0)});
    run_inst("addi", enc_i(OP_ADDI, 1, 2, 16'hffff), 0, 0, '{S_EXEC1},
             '{c_alu(SRCA_REG, SRCB_IMM, ALU_ADD, 1, 0, 0)});
    run_inst("j", enc_j(OP_J, 26'h5), 0, 0, '{S_EXEC1}, '{j1});
    run_inst("undefined", 32'hfc00_0000 ^ 32'h0400_0000, 0, 0, '{S_EXEC1}, '{ctrl_t'('0)});
    // halt: stays in execute1 until reset
    inst = enc_j(OP_HALT, 0);
    @(posedge clk); #1; @(posedge clk); #1;
    for (int k = 0; k < 10; k++) begin
      check(state == S_EXEC1 && halted && ctrl == '0, "halt holds");
      @(posedge clk); #1;
    end
    reset = 1; @(posedge clk); #1; reset = 0;
    check(state == S_FETCH && !halted, "reset leaves halt");
    finish_tb();
  end
endmodule
