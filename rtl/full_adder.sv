// One-bit full adder: sum = a ^ b ^ cin, cout = majority(a, b, cin).
// Purely combinational.  It is the adding half of every multiply/add cell and
// the bit slice of the carry-ripple adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
