// Carry-ripple adder of WIDTH full adders.
//
// sum + 2^WIDTH * cout = a + b + cin.  The carry runs from bit 0 to bit
// WIDTH-1 through a chain of full adders, so the delay grows linearly with
// WIDTH.  It is the final (vector-merging) row of the carry-ripple array
// multiplier and of the Baugh-Wooley array.  Purely combinational.
module ripple_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1]));
  end

  assign cout = carry[WIDTH];
endmodule
