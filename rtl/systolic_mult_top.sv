// Family of 8 x 8 signed array multipliers, side by side.
//
// Three combinational (bit-parallel) arrays and six clocked serial arrays,
// all computing the 16-bit two's complement product of two 8-bit two's
// complement operands:
//   cram_par   carry-ripple array (carry-save rows, ripple-carry last row)
//   csam_par   carry-save array with an output integrating adder
//   bwam_par   Baugh-Wooley carry-save array, ripple-carry final adder
//   cram_bs    bit-serial carry-ripple array   (multiplier 1 bit/clock)
//   cram_ds    digit-serial carry-ripple array (multiplier 2 bits/clock)
//   csam_bs    bit-serial systolic carry-save array   (multiplicand 1 bit/clock)
//   csam_ds    digit-serial systolic carry-save array (multiplicand 2 bits/clock)
//   bwam_bs    bit-serial systolic Baugh-Wooley array
//   bwam_ds    digit-serial systolic Baugh-Wooley array
// The multipliers share only the clock and reset; each has its own operand
// and result ports.  Serial ports follow the start/ready, m_digit/m_valid/
// m_first convention of cram_serial and csa_serial: the product leaves least
// significant digit first, 2N/DIGIT digits per product.
//
// Parallel ports are arrays indexed 0 = CRAM, 1 = CSAM, 2 = BWAM.  Serial
// ports are arrays indexed 0 = CRAM, 1 = CSAM, 2 = BWAM, with separate
// bit-serial (bs_*) and digit-serial (ds_*) groups.
//
// Provenance: the nine multipliers are the published ones; putting them
// side by side in one module with separate ports is this design's choice.
module systolic_mult_top #(
  parameter int unsigned N     = mult_pkg::WORD_BITS,
  parameter int unsigned DIGIT = mult_pkg::DIGIT_SIZE
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // bit-parallel arrays
  input  logic [2:0][N-1:0]     par_p,
  input  logic [2:0][N-1:0]     par_q,
  output logic [2:0][2*N-1:0]   par_m,
  // bit-serial arrays
  input  logic [2:0]            bs_start,
  output logic [2:0]            bs_ready,
  input  logic [2:0][N-1:0]     bs_p,
  input  logic [2:0][N-1:0]     bs_q,
  output logic [2:0]            bs_m_digit,
  output logic [2:0]            bs_m_valid,
  output logic [2:0]            bs_m_first,
  // digit-serial arrays
  input  logic [2:0]            ds_start,
  output logic [2:0]            ds_ready,
  input  logic [2:0][N-1:0]     ds_p,
  input  logic [2:0][N-1:0]     ds_q,
  output logic [2:0][DIGIT-1:0] ds_m_digit,
  output logic [2:0]            ds_m_valid,
  output logic [2:0]            ds_m_first
);
  cram_parallel #(.N(N)) u_cram_par (.p(par_p[0]), .q(par_q[0]), .m(par_m[0]));
  csam_parallel #(.N(N)) u_csam_par (.p(par_p[1]), .q(par_q[1]), .m(par_m[1]));
  bwam_parallel #(.N(N)) u_bwam_par (.p(par_p[2]), .q(par_q[2]), .m(par_m[2]));

  cram_serial #(.N(N), .DIGIT(1)) u_cram_bs (
    .clk(clk), .rst_n(rst_n), .start(bs_start[0]), .ready(bs_ready[0]),
    .p(bs_p[0]), .q(bs_q[0]), .m_digit(bs_m_digit[0:0]),
    .m_valid(bs_m_valid[0]), .m_first(bs_m_first[0]));
  csa_serial #(.N(N), .DIGIT(1), .BAUGH_WOOLEY(1'b0)) u_csam_bs (
    .clk(clk), .rst_n(rst_n), .start(bs_start[1]), .ready(bs_ready[1]),
    .p(bs_p[1]), .q(bs_q[1]), .m_digit(bs_m_digit[1:1]),
    .m_valid(bs_m_valid[1]), .m_first(bs_m_first[1]));
  csa_serial #(.N(N), .DIGIT(1), .BAUGH_WOOLEY(1'b1)) u_bwam_bs (
    .clk(clk), .rst_n(rst_n), .start(bs_start[2]), .ready(bs_ready[2]),
    .p(bs_p[2]), .q(bs_q[2]), .m_digit(bs_m_digit[2:2]),
    .m_valid(bs_m_valid[2]), .m_first(bs_m_first[2]));

  cram_serial #(.N(N), .DIGIT(DIGIT)) u_cram_ds (
    .clk(clk), .rst_n(rst_n), .start(ds_start[0]), .ready(ds_ready[0]),
    .p(ds_p[0]), .q(ds_q[0]), .m_digit(ds_m_digit[0]),
    .m_valid(ds_m_valid[0]), .m_first(ds_m_first[0]));
  csa_serial #(.N(N), .DIGIT(DIGIT), .BAUGH_WOOLEY(1'b0)) u_csam_ds (
    .clk(clk), .rst_n(rst_n), .start(ds_start[1]), .ready(ds_ready[1]),
    .p(ds_p[1]), .q(ds_q[1]), .m_digit(ds_m_digit[1]),
    .m_valid(ds_m_valid[1]), .m_first(ds_m_first[1]));
  csa_serial #(.N(N), .DIGIT(DIGIT), .BAUGH_WOOLEY(1'b1)) u_bwam_ds (
    .clk(clk), .rst_n(rst_n), .start(ds_start[2]), .ready(ds_ready[2]),
    .p(ds_p[2]), .q(ds_q[2]), .m_digit(ds_m_digit[2]),
    .m_valid(ds_m_valid[2]), .m_first(ds_m_first[2]));
endmodule
