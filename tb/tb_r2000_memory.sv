// tb_r2000_memory: 256 x 32 memory. Fills it through the host port, then a
// random mix of processor reads (asynchronous, only with 'read'), processor
// writes (at the clock edge, only with 'write', using the low 8 address
// bits) and host reads, all checked against a model array.
module tb_r2000_memory;
  `include "tb_common.svh"
  logic clk = 0, read, write, rdata_en, host_we;
  logic [31:0] addr, wdata, rdata, host_wdata, host_rdata;
  logic [7:0] host_addr;
  logic [31:0] model [256];
  always #5 clk = ~clk;
  r2000_memory dut (.clk, .addr, .read, .write, .wdata, .rdata, .rdata_en,
                    .host_we, .host_addr, .host_wdata, .host_rdata);
  initial begin #1000000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    read = 0; write = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      host_we = 1; host_addr = 8'(i); host_wdata = $urandom; model[i] = host_wdata;
      @(posedge clk); #1;
    end
    host_we = 0;
    for (int k = 0; k < 3000; k++) begin
      addr = $urandom; read = 1'($urandom); write = !read && 1'($urandom); wdata = $urandom;
      host_addr = 8'($urandom);
      #1;
      check(rdata_en == read, "rdata_en follows read");
      check(rdata == (read ? model[addr[7:0]] : 32'd0), $sformatf("read [%h] = %h exp %h", addr[7:0], rdata, model[addr[7:0]]));
      check(host_rdata == model[host_addr], "host read");
      @(posedge clk); #1;
      if (write) model[addr[7:0]] = wdata;
    end
    finish_tb();
  end
endmodule
