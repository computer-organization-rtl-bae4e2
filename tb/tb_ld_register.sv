// tb_ld_register: random load/hold sequence on a 32-bit load-enable register;
// q must equal the last value loaded, one edge after the load.
module tb_ld_register;
  `include "tb_common.svh"
  logic clk = 0, ld;
  logic [31:0] d, q, model;
  always #5 clk = ~clk;
  ld_register #(.WIDTH(32)) dut (.clk, .ld, .d, .q);
  initial begin #100000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    ld = 1; d = 32'hdead_beef; @(posedge clk); #1; model = d;
    check(q == model, "first load");
    for (int i = 0; i < 500; i++) begin
      ld = 1'($urandom); d = $urandom;
      @(posedge clk); #1;
      if (ld) model = d;
      check(q == model, $sformatf("step %0d q=%h exp %h", i, q, model));
    end
    finish_tb();
  end
endmodule
