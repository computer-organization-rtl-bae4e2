// tb_r2000_pc: reset to 0, loads from the ALU path and from the jump-target
// path ({6'b0, Inst[25:0]}), holding when pc_ld is low, reset priority.
module tb_r2000_pc;
  `include "tb_common.svh"
  logic clk = 0, reset, pc_sel, pc_ld;
  logic [31:0] alu_out, inst, pc, model;
  always #5 clk = ~clk;
  r2000_pc dut (.clk, .reset, .alu_out, .inst, .pc_sel, .pc_ld, .pc);
  initial begin #100000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    reset = 1; pc_ld = 1; pc_sel = 1; alu_out = 32'h1234; inst = 0;
    @(posedge clk); #1; model = 0;
    check(pc == 0, "reset clears PC, even with pc_ld");
    reset = 0;
    for (int i = 0; i < 500; i++) begin
      pc_ld = 1'($urandom); pc_sel = 1'($urandom); alu_out = $urandom; inst = $urandom;
      reset = ($urandom % 50) == 0;
      @(posedge clk); #1;
      if (reset) model = 0;
      else if (pc_ld) model = pc_sel ? alu_out : {6'b0, inst[25:0]};
      check(pc == model, $sformatf("step %0d pc %h exp %h", i, pc, model));
    end
    finish_tb();
  end
endmodule
