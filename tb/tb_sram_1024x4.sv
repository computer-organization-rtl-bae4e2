// tb_sram_1024x4: fills all 1024 words, reads them back, then random
// reads/writes. The chip drives its data pins only with RD high and WR low.
module tb_sram_1024x4;
  `include "tb_common.svh"
  logic clk = 0, rd, wr, io_oe;
  logic [9:0] a;
  logic [3:0] io_in, io_out;
  logic [3:0] model [1024];
  always #5 clk = ~clk;
  sram_1024x4 dut (.clk, .rd, .wr, .a, .io_in, .io_out, .io_oe);
  initial begin #1000000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    rd = 0;
    for (int i = 0; i < 1024; i++) begin
      wr = 1; a = 10'(i); io_in = 4'($urandom); model[i] = io_in; #1;
      check(!io_oe, "pins released while writing");
      @(posedge clk); #1;
    end
    wr = 0; rd = 1;
    for (int i = 0; i < 1024; i++) begin
      a = 10'(i); #1;
      check(io_oe && io_out == model[i], $sformatf("read [%0d] = %h exp %h", i, io_out, model[i]));
    end
    for (int k = 0; k < 2000; k++) begin
      rd = 1'($urandom); wr = 1'($urandom); a = 10'($urandom); io_in = 4'($urandom);
      #1;
      check(io_oe == (rd && !wr), "io_oe");
      check(io_out == ((rd && !wr) ? model[a] : 4'd0), "random read");
      @(posedge clk); #1;
      if (wr) model[a] = io_in;
    end
    finish_tb();
  end
endmodule
