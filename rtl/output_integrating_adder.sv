// Output integrating adder of the parallel carry-save array multiplier.
//
// Merges the partial-sum vector a and the partial-carry vector b left by the
// last carry-save row, plus a carry-in, into the upper half of the product:
// sum = (a + b + cin) mod 2^WIDTH.  Only its function is specified, so it is
// written as a word-level addition and the synthesis tool picks the carry
// structure (a fast carry chain on an FPGA).  Purely combinational.
module output_integrating_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum
);
  always_comb sum = a + b + WIDTH'(cin);
endmodule
