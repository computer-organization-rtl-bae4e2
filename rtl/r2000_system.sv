// r2000_system: a multi-cycle processor for a subset of the MIPS R2000
// instruction set (add, sub, and, or, slt, lw, sw, beq, addi, j, halt) with
// one memory for instructions and data (Princeton organisation).
//
// Datapath: PC, instruction register IR, memory buffer register MBR,
// ALUoutReg (samples the ALU every cycle), the 32-entry register file with
// its registered outputs RegA/RegB, and one ALU that also increments the PC.
// Two shared buses connect them to the memory: the memory address bus is
// driven by PC (PCmaEN, instruction fetch) or by ALUoutReg (ALUmaEN, load
// and store); the memory data bus is driven by the memory (mr) or by RegB
// (RegBmdEN, store) and is loaded into IR (IRld) or MBR (MBRld). The
// controller sequences each instruction through fetch, decode and up to three
// execute cycles (see r2000_controller for the cycle counts).
//
// Interface: clk, synchronous reset (PC <- 0, controller to fetch). While
// the processor is held in reset or halted, a host can write the memory
// through host_we/host_addr/host_wdata and read any word on host_rdata.
// 'halted' is high while a HALT instruction holds the machine. pc, ir and
// state are brought out for observation. The buses are multiplexers in place
// of the reference's 3-state drivers; an assertion checks that no bus ever
// has two drivers enabled.
module r2000_system
  import r2000_pkg::*;
#(
  parameter int unsigned MEM_ADDR_BITS = 8
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     host_we,
  input  logic [MEM_ADDR_BITS-1:0] host_addr,
  input  logic [31:0]              host_wdata,
  output logic [31:0]              host_rdata,
  output logic                     halted,
  output logic [31:0]              pc,
  output logic [31:0]              ir,
  output state_e                   state
);

  ctrl_t       ctrl;
  logic [31:0] reg_a, reg_b, mbr, alu_out, alu_out_reg;
  logic        zero, neg;
  logic [31:0] ma_bus, md_bus, mem_rdata;
  logic        mem_rdata_en;
  logic        ma_conflict, md_conflict, ma_driven, md_driven;

  r2000_controller u_ctrl (
    .clk, .reset, .inst(ir), .zero, .neg, .ctrl, .state, .halted
  );

  r2000_pc u_pc (
    .clk, .reset, .alu_out, .inst(ir),
    .pc_sel(ctrl.pc_sel), .pc_ld(ctrl.pc_ld), .pc
  );

  r2000_regfile u_rf (
    .clk, .mbr, .alu_out, .inst(ir),
    .reg_write(ctrl.reg_write), .wr_data_sel(ctrl.wr_data_sel),
    .wr_reg_sel(ctrl.wr_reg_sel), .reg_a, .reg_b
  );

  r2000_alu u_alu (
    .reg_a, .pc, .inst(ir), .reg_b,
    .op(ctrl.op), .src_a(ctrl.src_a), .src_b(ctrl.src_b),
    .alu_out, .zero, .neg
  );

  ld_register #(.WIDTH(32)) u_ir     (.clk, .ld(ctrl.ir_ld),  .d(md_bus),  .q(ir));
  ld_register #(.WIDTH(32)) u_mbr    (.clk, .ld(ctrl.mbr_ld), .d(md_bus),  .q(mbr));
  ld_register #(.WIDTH(32)) u_aluout (.clk, .ld(1'b1),        .d(alu_out), .q(alu_out_reg));

  // Memory address bus: PC or ALUoutReg
  shared_bus #(.N(2), .WIDTH(32)) u_ma_bus (
    .data({alu_out_reg, pc}), .en({ctrl.alu_ma_en, ctrl.pc_ma_en}),
    .bus(ma_bus), .conflict(ma_conflict), .driven(ma_driven)
  );

  // Memory data bus: memory or RegB
  shared_bus #(.N(2), .WIDTH(32)) u_md_bus (
    .data({reg_b, mem_rdata}), .en({ctrl.regb_md_en, mem_rdata_en}),
    .bus(md_bus), .conflict(md_conflict), .driven(md_driven)
  );

  r2000_memory #(.ADDR_BITS(MEM_ADDR_BITS), .WIDTH(32)) u_mem (
    .clk, .addr(ma_bus), .read(ctrl.mr), .write(ctrl.mw), .wdata(md_bus),
    .rdata(mem_rdata), .rdata_en(mem_rdata_en),
    .host_we, .host_addr, .host_wdata, .host_rdata
  );

  // Bus rules: one driver at a time; a memory access needs a driven address
  // bus; whatever loads from or writes the data bus needs it driven.
  a_ma_single: assert property (@(posedge clk) disable iff (reset) !ma_conflict);
  a_md_single: assert property (@(posedge clk) disable iff (reset) !md_conflict);
  a_ma_access: assert property (@(posedge clk) disable iff (reset)
                                (ctrl.mr || ctrl.mw) |-> ma_driven);
  a_md_use:    assert property (@(posedge clk) disable iff (reset)
                                (ctrl.ir_ld || ctrl.mbr_ld || ctrl.mw) |-> md_driven);

endmodule
