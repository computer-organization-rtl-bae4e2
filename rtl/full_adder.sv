// full_adder: one-bit full adder built hierarchically from two half adders
// and an OR gate. The first half adder adds b and cin; the second adds a to
// that partial sum, giving sum; cout is the OR of the two half-adder carries.
// Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic s1, c1, c2;

  half_adder u_ha1 (.a(b), .b(cin), .s(s1),  .c(c1));
  half_adder u_ha2 (.a(a), .b(s1),  .s(sum), .c(c2));

  assign cout = c1 | c2;

endmodule
