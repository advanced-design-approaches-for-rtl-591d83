// Parallel carry-ripple array multiplier (CRAM), N x N bits, signed.
//
// Computes m = p * q for two's complement p and q in one combinational pass.
// The partial products are formed by AND gates and summed in carry-save rows
// of multiply/add cells (horner_csa_array: Horner's rule, sign extension, the
// multiplicand inverted in the row of the multiplier's sign bit).  The lower
// N product bits leave the array one per row; the upper N bits come from a
// last row of full adders through which the carry ripples from the least to
// the most significant place (ripple_adder).
//
// Interface: p, q (N bits each), m (2N bits).  No clock; the critical path is
// N carry-save rows plus an N-bit ripple.
module cram_parallel #(
  parameter int unsigned N = mult_pkg::WORD_BITS
) (
  input  logic [N-1:0]   p,
  input  logic [N-1:0]   q,
  output logic [2*N-1:0] m
);
  logic [N-1:0] s_vec, c_vec, m_high;
  logic         cin_fin, cout_unused;

  horner_csa_array #(.N(N)) u_array (
    .p(p), .q(q), .m_low(m[N-1:0]), .s_vec(s_vec), .c_vec(c_vec), .cin_fin(cin_fin)
  );

  // the carry out of the top place lies beyond the 2N-bit product
  ripple_adder #(.WIDTH(N)) u_rca (
    .a(s_vec), .b(c_vec), .cin(cin_fin), .sum(m_high), .cout(cout_unused)
  );

  assign m[2*N-1:N] = m_high;
endmodule
