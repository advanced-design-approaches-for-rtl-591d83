// Multiply/add (M/A) cell of the parallel array multipliers.
//
// The cell forms one partial-product bit from one multiplicand bit p_bit and
// one multiplier bit q_bit and adds it, with a full adder, to the partial sum
// s_in and the partial carry c_in arriving from the row above.  Two controls
// cover the signed forms of the array:
//   invert_p  - AND the inverted multiplicand bit (~p & q), used in the row of
//               the multiplier sign bit when the array negates the
//               multiplicand (two's complement by sign extension);
//   invert_pp - invert the AND result (~(p & q)), used for the Baugh-Wooley
//               partial products.
// Purely combinational; s_out has the weight of the inputs, c_out twice that.
module ma_cell (
  input  logic p_bit,
  input  logic q_bit,
  input  logic invert_p,
  input  logic invert_pp,
  input  logic s_in,
  input  logic c_in,
  output logic s_out,
  output logic c_out
);
  logic pp;

  always_comb pp = ((p_bit ^ invert_p) & q_bit) ^ invert_pp;

  full_adder u_fa (.a(pp), .b(s_in), .cin(c_in), .sum(s_out), .cout(c_out));
endmodule
