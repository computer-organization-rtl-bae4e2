// half_adder: one-bit half adder, the bottom level of the adder hierarchy.
// s = a XOR b, c = a AND b. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a ^ b;
  assign c = a & b;

endmodule
