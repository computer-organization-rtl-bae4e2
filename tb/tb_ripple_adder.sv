// tb_ripple_adder: 32-bit ripple adder against 33-bit arithmetic, with
// random operands and the carry-chain corner cases (all ones + 1, etc.).
module tb_ripple_adder;
  `include "tb_common.svh"
  logic [31:0] a, b, sum;
  logic cin, cout;
  logic [32:0] e;
  ripple_adder dut (.a, .b, .cin, .sum, .cout);
  initial begin #100000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    for (int k = 0; k < 2000; k++) begin
      case (k)
        0: begin a = '1; b = 0; cin = 1; end
        1: begin a = '1; b = '1; cin = 1; end
        2: begin a = 0; b = 0; cin = 0; end
        3: begin a = 32'h8000_0000; b = 32'h8000_0000; cin = 0; end
        default: begin a = $urandom; b = $urandom; cin = 1'($urandom); end
      endcase
      #1;
      e = 33'(a) + 33'(b) + 33'(cin);
      check({cout, sum} == e, $sformatf("%h + %h + %b = %h exp %h", a, b, cin, {cout, sum}, e));
    end
    finish_tb();
  end
endmodule
