// r2000_pkg: shared types and constants of the multi-cycle MIPS-R2000-subset
// processor. Opcode and function-field values are the MIPS ones for the
// implemented subset (add, sub, and, or, slt, lw, sw, beq, addi, j) plus a
// HALT opcode 63 that stops the machine until reset. ALU operations are
// one-hot, and the controller state codes follow the reference controller
// (fetch 000, decode 100, execute1..3 001..011). The ctrl_t struct bundles
// every register-transfer control signal the controller drives into the
// datapath.
package r2000_pkg;

  localparam logic [4:0]  ZERO_REG = 5'd31;  // rz: reads as 0, ignores writes

  typedef enum logic [5:0] {
    OP_ALU  = 6'h00,
    OP_J    = 6'h02,
    OP_BEQ  = 6'h04,
    OP_ADDI = 6'h08,
    OP_LW   = 6'h23,
    OP_SW   = 6'h2b,
    OP_HALT = 6'h3f
  } opcode_e;

  typedef enum logic [5:0] {
    FN_ADD = 6'h20,
    FN_SUB = 6'h22,
    FN_AND = 6'h24,
    FN_OR  = 6'h25,
    FN_SLT = 6'h2a
  } funct_e;

  // One-hot ALU operation codes
  typedef enum logic [5:0] {
    ALU_NONE  = 6'b000000,
    ALU_ADD   = 6'b000001,
    ALU_SUB   = 6'b000010,
    ALU_AND   = 6'b000100,
    ALU_OR    = 6'b001000,
    ALU_PASSA = 6'b010000,
    ALU_PASSB = 6'b100000
  } alu_op_e;

  typedef enum logic [2:0] {
    S_FETCH  = 3'b000,
    S_DECODE = 3'b100,
    S_EXEC1  = 3'b001,
    S_EXEC2  = 3'b010,
    S_EXEC3  = 3'b011
  } state_e;

  typedef enum logic {
    SRCA_REG = 1'b0,
    SRCA_PC  = 1'b1
  } src_a_e;

  typedef enum logic [1:0] {
    SRCB_REG  = 2'b00,
    SRCB_ZERO = 2'b01,
    SRCB_IMM  = 2'b10,
    SRCB_ONE  = 2'b11
  } src_b_e;

  localparam logic PCSEL_TARGET = 1'b0;
  localparam logic PCSEL_ALU    = 1'b1;
  localparam logic WRDATA_ALU   = 1'b0;
  localparam logic WRDATA_MBR   = 1'b1;
  localparam logic WRREG_RT     = 1'b0;
  localparam logic WRREG_RD     = 1'b1;

  typedef struct packed {
    src_a_e  src_a;
    src_b_e  src_b;
    alu_op_e op;
    logic    mr;          // memory read: memory drives the data bus
    logic    mw;          // memory write
    logic    pc_ma_en;    // PC drives the memory address bus
    logic    alu_ma_en;   // ALUoutReg drives the memory address bus
    logic    regb_md_en;  // RegB drives the memory data bus
    logic    mbr_ld;
    logic    ir_ld;
    logic    reg_write;
    logic    wr_data_sel; // 0 ALUout, 1 MBR
    logic    wr_reg_sel;  // 0 rt, 1 rd
    logic    pc_sel;      // 0 jump target, 1 ALUout
    logic    pc_ld;
  } ctrl_t;

  // Instruction encoders, used by testbenches to build programs
  function automatic logic [31:0] enc_r(logic [4:0] rs, logic [4:0] rt, logic [4:0] rd, funct_e fn);
    return {OP_ALU, rs, rt, rd, 5'd0, fn};
  endfunction

  function automatic logic [31:0] enc_i(opcode_e op, logic [4:0] rs, logic [4:0] rt, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] enc_j(opcode_e op, logic [25:0] target);
    return {op, target};
  endfunction

endpackage
