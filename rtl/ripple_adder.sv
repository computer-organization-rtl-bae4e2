// ripple_adder: a WIDTH-bit adder (32 bits by default; 4, 8 or 16 work the
// same way) made of WIDTH identical full-adder slices, each slice's carry out
// feeding the next slice's carry in. sum = a + b + cin, cout is the carry out
// of the top slice. Combinational; the delay grows linearly with WIDTH.
module ripple_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_slice
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[WIDTH];

endmodule
