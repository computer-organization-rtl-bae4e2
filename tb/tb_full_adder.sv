// tb_full_adder: all eight input combinations against a + b + cin.
module tb_full_adder;
  `include "tb_common.svh"
  logic a, b, cin, sum, cout;
  full_adder dut (.a, .b, .cin, .sum, .cout);
  initial begin #100000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i); #1;
      check({cout, sum} == 2'(int'(a) + int'(b) + int'(cin)), $sformatf("%b%b%b -> %b%b", a, b, cin, cout, sum));
    end
    finish_tb();
  end
endmodule
