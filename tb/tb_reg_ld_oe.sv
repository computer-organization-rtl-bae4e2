// tb_reg_ld_oe: 8-bit LD/OE register. Random LD/OE/D; the stored value
// changes only on an edge with LD, and appears on q (with q_en) only with OE.
module tb_reg_ld_oe;
  `include "tb_common.svh"
  logic clk = 0, ld, oe, q_en;
  logic [7:0] d, q, model;
  always #5 clk = ~clk;
  reg_ld_oe dut (.clk, .ld, .oe, .d, .q, .q_en);
  initial begin #100000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    ld = 1; oe = 0; d = 8'h5a; @(posedge clk); #1; model = 8'h5a;
    check(q == 0 && !q_en, "released when OE low");
    for (int i = 0; i < 500; i++) begin
      ld = 1'($urandom); oe = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (ld) model = d;
      check(q_en == oe, "q_en follows OE");
      check(q == (oe ? model : 8'd0), $sformatf("q %h exp %h", q, model));
    end
    finish_tb();
  end
endmodule
