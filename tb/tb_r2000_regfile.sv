// tb_r2000_regfile: random writes through both data sources (ALU result,
// MBR) to both destinations (rt, rd), with RegA/RegB checked one edge later
// against a model; register 31 must read 0 and ignore writes, and a read in
// the same cycle as a write to that register returns the old value.
module tb_r2000_regfile;
  `include "tb_common.svh"
  logic clk = 0, reg_write, wr_data_sel, wr_reg_sel;
  logic [31:0] mbr, alu_out, inst, reg_a, reg_b, exp_a, exp_b;
  logic [31:0] model [32];
  logic [4:0] wr;
  always #5 clk = ~clk;
  r2000_regfile dut (.clk, .mbr, .alu_out, .inst, .reg_write, .wr_data_sel, .wr_reg_sel, .reg_a, .reg_b);
  initial begin #1000000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    // initialise every register through the ALU path, writing rd
    reg_write = 1; wr_data_sel = 0; wr_reg_sel = 1; mbr = 0;
    for (int i = 0; i < 32; i++) begin
      inst = {16'd0, 5'(i), 11'd0}; alu_out = $urandom;
      model[i] = (i == 31) ? 32'd0 : alu_out;
      @(posedge clk); #1;
    end
    for (int k = 0; k < 2000; k++) begin
      inst = $urandom; alu_out = $urandom; mbr = $urandom;
      reg_write = 1'($urandom); wr_data_sel = 1'($urandom); wr_reg_sel = 1'($urandom);
      if (k % 7 == 0) inst[20:16] = 5'd31;
      exp_a = model[inst[25:21]]; exp_b = model[inst[20:16]];
      wr = wr_reg_sel ? inst[15:11] : inst[20:16];
      @(posedge clk); #1;
      check(reg_a == exp_a, $sformatf("RegA r%0d = %h exp %h", inst[25:21], reg_a, exp_a));
      check(reg_b == exp_b, $sformatf("RegB r%0d = %h exp %h", inst[20:16], reg_b, exp_b));
      if (reg_write && wr != 31) model[wr] = wr_data_sel ? mbr : alu_out;
    end
    finish_tb();
  end
endmodule
