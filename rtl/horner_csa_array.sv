// Carry-save multiply/add array for signed (two's complement) operands,
// organised by Horner's rule with sign extension.
//
// Row j (j = 0 .. N-1) holds N multiply/add cells, one per multiplicand bit.
// Each row adds the partial product P*q_j to the running result, which is
// kept in carry-save form: the sum of cell i moves diagonally to cell i-1 of
// the next row (a right shift by one place, the factor 2^-1 of Horner's rule)
// and its carry drops straight down to cell i of the next row.  The sum that
// leaves cell 0 of row j is product bit j.  The most significant column has
// negative weight in every vector, so the shifted sum vector is sign-extended
// by repeating its top bit.  Row 0 starts from zero sums and carries.
//
// In the row of the sign bit q_{N-1} the multiplicand is inverted, which
// together with a +1 in the lowest place subtracts P*q_{N-1}.  That +1 is
// added to the sum leaving cell 0 by a half adder; its carry becomes the
// carry-in of the final adder, which the parent module supplies.
//
// Outputs: m_low = product bits N-1..0, s_vec/c_vec/cin_fin = the three
// operands of the final adder whose N-bit sum is product bits 2N-1..N.
// Purely combinational; N*N cells deep in carry-save form.
//
// Provenance: the row/column arrangement, the zero inputs of the first row
// and the inverted multiplicand in the sign row follow the published
// dependence graphs; where the +1 of the negation enters is this design's
// choice.
module horner_csa_array #(
  parameter int unsigned N = mult_pkg::WORD_BITS
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] q,
  output logic [N-1:0] m_low,
  output logic [N-1:0] s_vec,
  output logic [N-1:0] c_vec,
  output logic         cin_fin
);
  // s_in/c_in of each row, and s/c produced by each row
  logic [N-1:0] s_in [N];
  logic [N-1:0] c_in [N];
  logic [N-1:0] s_out[N];
  logic [N-1:0] c_out[N];

  assign s_in[0] = '0;
  assign c_in[0] = '0;

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      ma_cell u_cell (
        .p_bit    (p[i]),
        .q_bit    (q[j]),
        .invert_p (j == N-1),
        .invert_pp(1'b0),
        .s_in     (s_in[j][i]),
        .c_in     (c_in[j][i]),
        .s_out    (s_out[j][i]),
        .c_out    (c_out[j][i])
      );
    end
    if (j < N-1) begin : g_link
      // arithmetic right shift of the sums, carries stay in their column
      assign s_in[j+1] = {s_out[j][N-1], s_out[j][N-1:1]};
      assign c_in[j+1] = c_out[j];
      assign m_low[j]  = s_out[j][0];
    end
  end

  // +1 of the two's complement negation in the sign row
  assign m_low[N-1] = s_out[N-1][0] ^ q[N-1];
  assign cin_fin    = s_out[N-1][0] & q[N-1];
  assign s_vec      = {s_out[N-1][N-1], s_out[N-1][N-1:1]};
  assign c_vec      = c_out[N-1];
endmodule
