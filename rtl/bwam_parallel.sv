// Parallel Baugh-Wooley array multiplier (BWAM), N x N bits, signed.
//
// Computes m = p * q for two's complement p and q with an array that only
// ever adds non-negative bits.  The Baugh-Wooley partial products are
//   p_i q_j                 for i, j < N-1 and for i = j = N-1,
//   ~(p_i q_j)              when exactly one of i, j equals N-1,
// plus a constant 1 in column N, and the most significant product bit is
// inverted at the end.  (Each negative-weight term -x*2^k is rewritten as
// ~x*2^k - 2^k; the constants sum to 2^N - 2^(2N-1), and -2^(2N-1) equals
// +2^(2N-1) modulo 2^(2N).)
//
// The rows are carry-save multiply/add cells in Horner form: the sum of a
// cell moves diagonally to the next lower column of the next row, the carry
// drops straight down, and column 0 of row j delivers product bit j.  The
// final sum and carry vectors are merged by a carry-ripple adder whose
// carry-in, at column N, adds the constant 1.  Purely combinational.
//
// Provenance: the inversion rule, the 1 in column N and the final MSB
// inversion follow the published Baugh-Wooley description; feeding the 1 in
// as the final adder's carry-in is this design's reading of the drawing.
module bwam_parallel #(
  parameter int unsigned N = mult_pkg::WORD_BITS
) (
  input  logic [N-1:0]   p,
  input  logic [N-1:0]   q,
  output logic [2*N-1:0] m
);
  logic [N-1:0] s_in [N];
  logic [N-1:0] c_in [N];
  logic [N-1:0] s_out[N];
  logic [N-1:0] c_out[N];
  logic [N-1:0] m_high;
  logic         cout_unused;

  assign s_in[0] = '0;
  assign c_in[0] = '0;

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      ma_cell u_cell (
        .p_bit    (p[i]),
        .q_bit    (q[j]),
        .invert_p (1'b0),
        .invert_pp((i == N-1) != (j == N-1)),
        .s_in     (s_in[j][i]),
        .c_in     (c_in[j][i]),
        .s_out    (s_out[j][i]),
        .c_out    (c_out[j][i])
      );
    end
    assign m[j] = s_out[j][0];
    if (j < N-1) begin : g_link
      // unsigned right shift of the sums, carries stay in their column
      assign s_in[j+1] = {1'b0, s_out[j][N-1:1]};
      assign c_in[j+1] = c_out[j];
    end
  end

  // carry-in 1 is the constant 2^N; the carry out lies beyond 2^(2N)
  ripple_adder #(.WIDTH(N)) u_cra (
    .a({1'b0, s_out[N-1][N-1:1]}), .b(c_out[N-1]), .cin(1'b1),
    .sum(m_high), .cout(cout_unused)
  );

  assign m[2*N-1:N] = {~m_high[N-1], m_high[N-2:0]};
endmodule
