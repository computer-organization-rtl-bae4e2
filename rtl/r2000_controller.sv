// r2000_controller: the Moore control FSM of the multi-cycle R2000 subset.
// Every instruction takes fetch (IR <- mem[PC], PC <- PC+1) and decode (IR
// reaches the controller, RegA/RegB are read), then one to three execute
// states chosen by the opcode Inst[31:26] and function Inst[5:0]:
//   add/sub/and/or  EXEC1: rd <- RegA op RegB                        (3 cycles)
//   slt             EXEC1: rd <- RegA-RegB, branch on neg;
//                   EXEC2: rd <- 1 (neg) or EXEC3: rd <- 0           (4 cycles)
//   lw              EXEC1: ALUoutReg <- rs+offset; EXEC2: MBR <- mem;
//                   EXEC3: rt <- MBR                                 (5 cycles)
//   sw              EXEC1: ALUoutReg <- rs+offset; EXEC2: mem <- RegB (4 cycles)
//   beq             EXEC1: RegA-RegB, branch on zero; EXEC2: PC <- PC+offset
//                   (3 cycles not taken, 4 taken; PC already holds PC+1)
//   addi            EXEC1: rt <- rs+offset                           (3 cycles)
//   j               EXEC1: PC <- {6'b0, Inst[25:0]}                  (3 cycles)
//   halt            stays in EXEC1 until reset
// The state codes, the sequence and the control values follow the reference
// controller. Outputs depend only on the state register and the IR (Moore);
// the next state also uses the ALU's zero and neg flags. Signals the reference
// leaves as don't-care are driven 0, and an opcode outside the subset returns
// to fetch, acting as a no-op (the reference leaves that case undefined).
module r2000_controller
  import r2000_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] inst,
  input  logic        zero,
  input  logic        neg,
  output ctrl_t       ctrl,
  output state_e      state,
  output logic        halted
);

  logic [5:0] inst_op, inst_fn;
  state_e     state_nxt;

  assign inst_op = inst[31:26];
  assign inst_fn = inst[5:0];

  function automatic logic is_alu_fn(logic [5:0] fn);
    return fn inside {FN_ADD, FN_SUB, FN_AND, FN_OR, FN_SLT};
  endfunction

  // Next-state logic
  always_comb begin
    state_nxt = S_FETCH;
    unique case (state)
      S_FETCH:  state_nxt = S_DECODE;
      S_DECODE: state_nxt = S_EXEC1;
      S_EXEC1: begin
        case (inst_op)
          OP_ALU:  state_nxt = (inst_fn == FN_SLT) ? (neg ? S_EXEC2 : S_EXEC3) : S_FETCH;
          OP_LW:   state_nxt = S_EXEC2;
          OP_SW:   state_nxt = S_EXEC2;
          OP_BEQ:  state_nxt = zero ? S_EXEC2 : S_FETCH;
          OP_HALT: state_nxt = S_EXEC1;
          default: state_nxt = S_FETCH;  // addi, j, and undefined opcodes
        endcase
      end
      S_EXEC2: state_nxt = (inst_op == OP_LW) ? S_EXEC3 : S_FETCH;
      S_EXEC3: state_nxt = S_FETCH;
      default: state_nxt = S_FETCH;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) state <= S_FETCH;
    else       state <= state_nxt;
  end

  // Output logic
  always_comb begin
    ctrl = '0;
    unique case (state)
      S_FETCH: begin
        ctrl.pc_ma_en = 1'b1;
        ctrl.mr       = 1'b1;
        ctrl.ir_ld    = 1'b1;
        ctrl.src_a    = SRCA_PC;
        ctrl.src_b    = SRCB_ONE;
        ctrl.op       = ALU_ADD;
        ctrl.pc_sel   = PCSEL_ALU;
        ctrl.pc_ld    = 1'b1;
      end
      S_DECODE: ;  // IR propagates into the controller; RegA/RegB are read
      S_EXEC1: begin
        case (inst_op)
          OP_ALU: if (is_alu_fn(inst_fn)) begin
            ctrl.src_a = SRCA_REG;
            ctrl.src_b = SRCB_REG;
            case (inst_fn)
              FN_ADD:  ctrl.op = ALU_ADD;
              FN_AND:  ctrl.op = ALU_AND;
              FN_OR:   ctrl.op = ALU_OR;
              default: ctrl.op = ALU_SUB;  // sub, slt
            endcase
            ctrl.wr_reg_sel  = WRREG_RD;
            ctrl.wr_data_sel = WRDATA_ALU;
            ctrl.reg_write   = 1'b1;
          end
          OP_LW, OP_SW: begin
            ctrl.src_a = SRCA_REG;
            ctrl.src_b = SRCB_IMM;
            ctrl.op    = ALU_ADD;
          end
          OP_BEQ: begin
            ctrl.src_a = SRCA_REG;
            ctrl.src_b = SRCB_REG;
            ctrl.op    = ALU_SUB;
          end
          OP_ADDI: begin
            ctrl.src_a       = SRCA_REG;
            ctrl.src_b       = SRCB_IMM;
            ctrl.op          = ALU_ADD;
            ctrl.wr_data_sel = WRDATA_ALU;
            ctrl.wr_reg_sel  = WRREG_RT;
            ctrl.reg_write   = 1'b1;
          end
          OP_J: begin
            ctrl.pc_sel = PCSEL_TARGET;
            ctrl.pc_ld  = 1'b1;
          end
          default: ;  // halt and undefined opcodes: nothing
        endcase
      end
      S_EXEC2: begin
        case (inst_op)
          OP_ALU: begin  // slt, rs < rt: rd <- 1
            ctrl.src_b       = SRCB_ONE;
            ctrl.op          = ALU_PASSB;
            ctrl.wr_data_sel = WRDATA_ALU;
            ctrl.wr_reg_sel  = WRREG_RD;
            ctrl.reg_write   = 1'b1;
          end
          OP_LW: begin   // MBR <- mem[ALUoutReg]
            ctrl.alu_ma_en = 1'b1;
            ctrl.mr        = 1'b1;
            ctrl.mbr_ld    = 1'b1;
          end
          OP_SW: begin   // mem[ALUoutReg] <- RegB
            ctrl.alu_ma_en  = 1'b1;
            ctrl.regb_md_en = 1'b1;
            ctrl.mw         = 1'b1;
          end
          OP_BEQ: begin  // taken: PC <- PC + offset
            ctrl.src_a  = SRCA_PC;
            ctrl.src_b  = SRCB_IMM;
            ctrl.op     = ALU_ADD;
            ctrl.pc_sel = PCSEL_ALU;
            ctrl.pc_ld  = 1'b1;
          end
          default: ;
        endcase
      end
      S_EXEC3: begin
        case (inst_op)
          OP_ALU: begin  // slt, rs >= rt: rd <- 0
            ctrl.src_b       = SRCB_ZERO;
            ctrl.op          = ALU_PASSB;
            ctrl.wr_data_sel = WRDATA_ALU;
            ctrl.wr_reg_sel  = WRREG_RD;
            ctrl.reg_write   = 1'b1;
          end
          OP_LW: begin   // rt <- MBR
            ctrl.wr_reg_sel  = WRREG_RT;
            ctrl.wr_data_sel = WRDATA_MBR;
            ctrl.reg_write   = 1'b1;
          end
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  assign halted = (state == S_EXEC1) && (inst_op == OP_HALT);

endmodule
