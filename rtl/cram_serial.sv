// Bit-serial (DIGIT = 1) and digit-serial (DIGIT > 1) carry-ripple array
// multiplier, signed two's complement, N x N bits.
//
// The multiplicand p is held in parallel and split into K = N/DIGIT digit
// cells.  The multiplier q is applied one digit per clock, least significant
// digit first.  Every clock each cell ANDs its multiplicand digit with the
// multiplier digit and adds the result, its digit of the running result and
// the carry from the cell below; the carry ripples through all K cells within
// the clock.  The cell sums are registered one cell lower (a right shift by
// one digit, Horner's rule), and the sum of cell 0 becomes the next product
// digit.  The top cell keeps the sign extension of the running result in a
// small signed register and feeds it back to itself.
//
// During the multiplier's sign digit the cells use the inverted multiplicand
// and the carry into cell 0 is q_{N-1} * 2^(DIGIT-1); together they subtract
// p * q_{N-1} * 2^(N-1).  After the K multiplier digits the array runs K more
// clocks with a zero multiplier digit, which shifts out the upper half of the
// product.
//
// Interface: start loads p and q and clears the running result; it is
// accepted only while ready is high.  ready is high when idle and in the last
// clock of a product, so products can follow back to back, one every 2K
// clocks.  m_digit carries the 2K product digits least significant first,
// one per clock, flagged by m_valid; m_first marks digit 0, which appears two
// clocks after the start cycle (one clock of arithmetic, one output
// register).  Synchronous active-low reset.
//
// Provenance: the cell row, the switchable multiplicand inversion, the
// sign-bit carry-in and the serial output register follow the published
// bit-serial and digit-serial (digit size 2) carry-ripple architectures.
// The 2K-clock framing with a K-clock flush, the signed feedback register of
// the top cell, the parallel operand load and the start/ready handshake are
// this design's choices.
module cram_serial #(
  parameter int unsigned N     = mult_pkg::WORD_BITS,
  parameter int unsigned DIGIT = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             ready,
  input  logic [N-1:0]     p,
  input  logic [N-1:0]     q,
  output logic [DIGIT-1:0] m_digit,
  output logic             m_valid,
  output logic             m_first
);
  localparam int unsigned K  = N / DIGIT;      // digit cells
  localparam int unsigned F  = 2 * K;          // clocks per product
  localparam int unsigned CW = DIGIT + 1;      // carry width between cells
  localparam int unsigned TW = 2 * DIGIT + 4;  // width of a cell's total
  localparam int unsigned AW = DIGIT + 2;      // top cell feedback width
  localparam int unsigned NW = $clog2(F);

  logic [N-1:0]       p_reg;
  logic [N-1:0]       q_sh;                   // multiplier, shifted out LSB first
  logic [NW-1:0]      cnt;
  logic               busy;
  logic [DIGIT-1:0]   acc  [K-1];             // running result, cells 0..K-2
  logic signed [AW-1:0] acc_top;              // sign extension fed back

  // per-clock cell signals
  logic [DIGIT-1:0]   qd;                     // multiplier digit of this clock
  logic               sign_digit;
  logic [DIGIT-1:0]   q_low;                  // digit without its sign bit
  logic               q_neg;                  // sign bit of the sign digit
  logic [CW-1:0]      carry [K];
  logic [DIGIT-1:0]   sum   [K];
  logic signed [AW-1:0] top_next;

  assign ready = !busy || (cnt == NW'(F-1));

  always_comb begin
    sign_digit = busy && (cnt == NW'(K-1));
    qd         = (busy && cnt < NW'(K)) ? q_sh[DIGIT-1:0] : '0;
    q_low      = qd;
    q_neg      = 1'b0;
    if (sign_digit) begin
      q_low[DIGIT-1] = 1'b0;
      q_neg          = qd[DIGIT-1];
    end
  end

  // unsigned digit cells 0..K-2
  always_comb begin
    carry[0] = CW'(q_neg) << (DIGIT-1);
    for (int k = 0; k < K-1; k++) begin
      logic [DIGIT-1:0] pk, pk_n;
      logic [TW-1:0]    tot;
      pk   = p_reg[k*DIGIT +: DIGIT];
      pk_n = ~pk;
      tot = TW'(pk) * TW'(q_low)
          + (q_neg ? (TW'(pk_n) << (DIGIT-1)) : '0)
          + TW'(acc[k]) + TW'(carry[k]);
      sum[k]     = tot[DIGIT-1:0];
      carry[k+1] = CW'(tot >> DIGIT);
    end
  end

  // signed top cell: holds the multiplicand's sign bit
  always_comb begin
    logic signed [TW-1:0] pt, tot;
    pt  = TW'(signed'(p_reg[N-1 -: DIGIT]));
    tot = pt * signed'(TW'(q_low))
        + (q_neg ? ((~pt) <<< (DIGIT-1)) : '0)
        + TW'(acc_top) + signed'(TW'(carry[K-1]));
    sum[K-1] = tot[DIGIT-1:0];
    top_next = AW'(tot >>> DIGIT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      p_reg   <= '0;
      q_sh    <= '0;
      acc_top <= '0;
      for (int k = 0; k < K-1; k++) acc[k] <= '0;
      m_digit <= '0;
      m_valid <= 1'b0;
      m_first <= 1'b0;
    end else begin
      m_valid <= busy;
      m_first <= busy && (cnt == '0);
      m_digit <= sum[0];
      if (start && ready) begin
        busy    <= 1'b1;
        cnt     <= '0;
        p_reg   <= p;
        q_sh    <= q;
        acc_top <= '0;
        for (int k = 0; k < K-1; k++) acc[k] <= '0;
      end else if (busy) begin
        cnt     <= cnt + 1'b1;
        busy    <= (cnt != NW'(F-1));
        q_sh    <= q_sh >> DIGIT;
        for (int k = 0; k < K-1; k++) acc[k] <= sum[k+1];
        acc_top <= top_next;
      end
    end
  end

  // a start outside ready would be ignored
  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);
endmodule
