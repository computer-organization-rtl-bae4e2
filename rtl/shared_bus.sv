// shared_bus: a bus with N drivers, each with its own output enable. The
// reference design uses 3-state drivers on the memory address bus (PC or
// ALUoutReg) and the memory data bus (memory or RegB); here the bus is an
// AND-OR multiplexer of the enabled drivers, which behaves the same when at
// most one enable is high. An undriven bus reads 0 instead of floating.
// 'conflict' flags two or more enables at once (a short on a real 3-state
// bus), 'driven' flags that some driver is enabled. Purely combinational.
module shared_bus #(
  parameter int unsigned N     = 2,
  parameter int unsigned WIDTH = 32
) (
  input  logic [N-1:0][WIDTH-1:0] data,
  input  logic [N-1:0]            en,
  output logic [WIDTH-1:0]        bus,
  output logic                    conflict,
  output logic                    driven
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++) begin
      bus |= data[i] & {WIDTH{en[i]}};
    end
  end

  assign driven   = |en;
  assign conflict = (en & (en - 1'b1)) != '0;

endmodule
