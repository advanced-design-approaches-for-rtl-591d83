// Parallel carry-save array multiplier (CSAM), N x N bits, signed.
//
// Computes m = p * q for two's complement p and q in one combinational pass.
// Every partial-product bit is formed at once by AND gates; rows of carry-save
// multiply/add cells add them, each row handing its sums and carries to the
// next, so no carry travels along a row (horner_csa_array).  The lower N
// product bits leave the array one per row.  The output integrating adder
// merges the final sum and carry vectors into the upper N bits.
//
// Interface: p, q (N bits each), m (2N bits).  No clock.
module csam_parallel #(
  parameter int unsigned N = mult_pkg::WORD_BITS
) (
  input  logic [N-1:0]   p,
  input  logic [N-1:0]   q,
  output logic [2*N-1:0] m
);
  logic [N-1:0] s_vec, c_vec;
  logic         cin_fin;

  horner_csa_array #(.N(N)) u_array (
    .p(p), .q(q), .m_low(m[N-1:0]), .s_vec(s_vec), .c_vec(c_vec), .cin_fin(cin_fin)
  );

  output_integrating_adder #(.WIDTH(N)) u_oia (
    .a(s_vec), .b(c_vec), .cin(cin_fin), .sum(m[2*N-1:N])
  );
endmodule
