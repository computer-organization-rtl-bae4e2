// tb_shared_bus: every enable pattern of a 3-driver bus with random data;
// the bus must carry the single enabled driver (0 when none), and conflict /
// driven must flag two-or-more / at-least-one enables.
module tb_shared_bus;
  `include "tb_common.svh"
  logic [2:0][15:0] data;
  logic [2:0] en;
  logic [15:0] bus, exp_bus;
  logic conflict, driven;
  shared_bus #(.N(3), .WIDTH(16)) dut (.data, .en, .bus, .conflict, .driven);
  initial begin #100000; failures++; $display("FAIL: watchdog"); finish_tb(); end
  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int e = 0; e < 8; e++) begin
        en = 3'(e);
        for (int i = 0; i < 3; i++) data[i] = 16'($urandom);
        #1;
        exp_bus = 16'd0;
        for (int i = 0; i < 3; i++) if (en[i]) exp_bus = exp_bus | data[i];
        check($countones(en) > 1 || bus == exp_bus, $sformatf("bus %h exp %h en %b", bus, exp_bus, en));
        check(conflict == ($countones(en) > 1), $sformatf("conflict en=%b", en));
        check(driven == (en != 0), $sformatf("driven en=%b", en));
      end
    end
    finish_tb();
  end
endmodule
