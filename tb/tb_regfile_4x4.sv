// tb_regfile_4x4: 4 x 4 register file. Random simultaneous writes and reads
// at independent addresses; reads are combinational, show the old value of
// a word written in the same cycle, and are released when RE is low.
module tb_regfile_4x4;
  `include "tb_common.svh"
  logic clk = 0, we, re, q_en;
  logic [1:0] wa, ra;
  logic [3:0] d, q;
  logic [3:0] model [4];
  always #5 clk = ~clk;
  regfile_4x4 dut (.clk, .we, .wa, .d, .re, .ra, .q, .q_en);
  initial begin #100000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    re = 0; ra = 0;
    for (int i = 0; i < 4; i++) begin
      we = 1; wa = 2'(i); d = 4'(i * 3 + 1); model[i] = d; @(posedge clk); #1;
    end
    for (int k = 0; k < 1000; k++) begin
      we = 1'($urandom); wa = 2'($urandom); d = 4'($urandom);
      re = 1'($urandom); ra = 2'($urandom);
      #1;
      check(q_en == re, "q_en follows RE");
      check(q == (re ? model[ra] : 4'd0), $sformatf("read [%0d] = %h exp %h", ra, q, model[ra]));
      @(posedge clk); #1;
      if (we) model[wa] = d;
    end
    finish_tb();
  end
endmodule
