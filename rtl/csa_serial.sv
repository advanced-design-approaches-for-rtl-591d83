// Bit-serial (DIGIT = 1) and digit-serial (DIGIT > 1) systolic carry-save
// array multiplier, N x N bits, signed two's complement.  With
// BAUGH_WOOLEY = 0 it is the serial carry-save array multiplier; with
// BAUGH_WOOLEY = 1 it forms Baugh-Wooley partial products instead.
//
// The multiplier q is held in parallel, one digit per cell (K = N/DIGIT
// cells, cell j holds q digit j).  The multiplicand p enters a
// parallel-to-serial register and streams through the cells least
// significant digit first, for a frame of F = 2K clocks, 2N bits:
//   carry-save mode  - p sign-extended to 2N bits;
//   Baugh-Wooley     - p zero-extended.
// Each clock a cell multiplies the multiplicand digit in front of it by its
// multiplier digit, adds the sum digit from the cell before it and its own
// carry from the previous clock (kept in a local carry register, the
// carry-save step in time), passes the low digit on and keeps the rest as its
// new carry.  Sum digits move one register per cell, multiplicand digits two,
// so that every cell sees operand digits of the same weight; no signal
// travels further than one cell per clock.
//
// Sign handling, carry-save mode: the last cell uses the inverted
// multiplicand for the sign bit q_{N-1} and the stream into the first cell
// (its "carry input bits") holds q_{N-1} at bit N-1, which together subtract
// p * q_{N-1} * 2^(N-1).  Baugh-Wooley mode: the partial-product bits with
// exactly one of i, j = N-1 are inverted, and the carry input stream holds
// ones at bits N and 2N-1 (the second one inverts the product's MSB).
//
// Each cell clears its carry, and takes its multiplier digit, when the first
// digit of a frame reaches it; a token travelling with the sums marks it.  In
// carry-save mode a second token travelling with the multiplicand enables
// the cell's partial products, so that the tail of the previous word is not
// added.
//
// Interface: start loads p and q (accepted only while ready is high; ready
// is high when idle and in the last clock of a frame, so products follow
// back to back, one every F clocks).  m_digit carries the F product digits
// least significant first, flagged by m_valid; m_first marks digit 0, which
// appears K+1 clocks after the start cycle.  Synchronous active-low reset.
//
// Provenance: parallel multiplier digits, a streamed multiplicand, local
// carry registers, an inverted multiplicand for the sign bit and a carry
// input stream into the first cell follow the published bit-serial and
// digit-serial carry-save architectures.  Two registers per cell on the
// multiplicand line (the published drawing shows one, which would not line up
// operand weights), the frame tokens, the 2N-bit sign-extended frame and the
// handshake are this design's choices.  The Baugh-Wooley mode is this
// design's construction of the serial Baugh-Wooley multipliers, whose
// internal structure was not available.
module csa_serial #(
  parameter int unsigned N            = mult_pkg::WORD_BITS,
  parameter int unsigned DIGIT        = 1,
  parameter bit          BAUGH_WOOLEY = 1'b0
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
  localparam int unsigned K  = N / DIGIT;
  localparam int unsigned F  = 2 * K;
  localparam int unsigned CW = DIGIT + 1;
  localparam int unsigned TW = 2 * DIGIT + 2;
  localparam int unsigned NW = $clog2(F + 1);

  // digit on the multiplicand line
  typedef struct packed {
    logic [DIGIT-1:0] d;
    logic             tok;     // digit 0 of a word
    logic             inword;  // digit index below K
    logic             msb;     // digit holding bit N-1
  } pbeat_t;

  // digit on the sum line
  typedef struct packed {
    logic [DIGIT-1:0] d;
    logic             tok;     // frame position 0
    logic             v;       // inside a frame
  } sbeat_t;

  // ---------------- parallel-to-serial input register ----------------
  logic [2*N-1:0] psh;
  logic [NW-1:0]  ser_cnt;
  logic [NW-1:0]  ser_pos;
  logic [N-1:0]   q_hold;
  pbeat_t         pbeat0;
  sbeat_t         sbeat0;

  assign ready = (ser_cnt <= NW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      psh     <= '0;
      ser_cnt <= '0;
      ser_pos <= '0;
      q_hold  <= '0;
    end else if (start && ready) begin
      psh     <= BAUGH_WOOLEY ? {{N{1'b0}}, p} : {{N{p[N-1]}}, p};
      ser_cnt <= NW'(F);
      ser_pos <= '0;
      q_hold  <= q;
    end else if (ser_cnt != '0) begin
      psh     <= psh >> DIGIT;
      ser_cnt <= ser_cnt - 1'b1;
      ser_pos <= ser_pos + 1'b1;
    end
  end

  always_comb begin
    logic [DIGIT-1:0] cib;  // carry input bits
    cib = '0;
    if (BAUGH_WOOLEY) begin
      if (ser_pos == NW'(N / DIGIT))       cib[N % DIGIT]       = 1'b1;
      if (ser_pos == NW'((2*N-1) / DIGIT)) cib[(2*N-1) % DIGIT] = 1'b1;
    end else begin
      if (ser_pos == NW'((N-1) / DIGIT))   cib[(N-1) % DIGIT]   = q_hold[N-1];
    end
    pbeat0.d      = psh[DIGIT-1:0];
    pbeat0.tok    = (ser_cnt != '0) && (ser_pos == '0);
    pbeat0.inword = (ser_cnt != '0) && (ser_pos < NW'(K));
    pbeat0.msb    = (ser_pos == NW'(K-1));
    sbeat0.d      = (ser_cnt != '0) ? cib : '0;
    sbeat0.tok    = pbeat0.tok;
    sbeat0.v      = (ser_cnt != '0);
  end

  // ---------------- systolic cells ----------------
  pbeat_t           pin  [K];   // multiplicand beat in front of cell j
  sbeat_t           sin  [K];   // sum beat in front of cell j
  sbeat_t           sout [K];
  pbeat_t           pmid [K];   // first register of the two per cell
  pbeat_t           pnext[K];   // second register
  sbeat_t           sreg [K];   // sum register after cell j
  logic [DIGIT-1:0] qd_reg [K];
  logic [DIGIT-1:0] qd_now [K];
  logic             pact [K];
  logic             act_now [K];
  logic [CW-1:0]    carry [K];
  logic [CW-1:0]    carry_next [K];

  always_comb begin
    for (int j = 0; j < K; j++) begin
      pin[j] = (j == 0) ? pbeat0 : pnext[j-1];
      sin[j] = (j == 0) ? sbeat0 : sreg[j-1];
    end
  end

  always_comb begin
    for (int j = 0; j < K; j++) begin
      logic [TW-1:0]    term, tot;
      logic [DIGIT-1:0] pd, pd_n, qlow;
      logic             qneg;
      qd_now[j]  = sin[j].tok ? q_hold[j*DIGIT +: DIGIT] : qd_reg[j];
      act_now[j] = BAUGH_WOOLEY ? pin[j].inword
                                : (pin[j].tok || (pact[j] && !sin[j].tok));
      pd   = pin[j].d;
      pd_n = ~pd;
      term = '0;
      // carry-save mode: split the sign digit into its sign bit and the rest
      qlow = qd_now[j];
      qneg = 1'b0;
      if (j == K-1) begin
        qlow[DIGIT-1] = 1'b0;
        qneg          = qd_now[j][DIGIT-1];
      end
      if (BAUGH_WOOLEY) begin
        for (int a = 0; a < DIGIT; a++) begin
          for (int b = 0; b < DIGIT; b++) begin
            logic bit_pp;
            bit_pp = pd[a] & qd_now[j][b];
            if ((pin[j].msb && a == DIGIT-1) != (j == K-1 && b == DIGIT-1))
              bit_pp = !bit_pp;
            term = term + (TW'(bit_pp) << (a + b));
          end
        end
      end else begin
        term = TW'(pd) * TW'(qlow) + (qneg ? (TW'(pd_n) << (DIGIT-1)) : '0);
      end
      if (!act_now[j]) term = '0;
      tot = term + TW'(sin[j].d) + (sin[j].tok ? '0 : TW'(carry[j]));
      sout[j].d     = tot[DIGIT-1:0];
      sout[j].tok   = sin[j].tok;
      sout[j].v     = sin[j].v;
      carry_next[j] = CW'(tot >> DIGIT);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < K; j++) begin
        pmid[j]   <= '0;
        pnext[j]  <= '0;
        sreg[j]   <= '0;
        qd_reg[j] <= '0;
        pact[j]   <= 1'b0;
        carry[j]  <= '0;
      end
    end else begin
      for (int j = 0; j < K; j++) begin
        pmid[j]   <= pin[j];
        pnext[j]  <= pmid[j];
        sreg[j]   <= sout[j];
        qd_reg[j] <= qd_now[j];
        pact[j]   <= act_now[j];
        carry[j]  <= carry_next[j];
      end
    end
  end

  assign m_digit = sreg[K-1].d;
  assign m_valid = sreg[K-1].v;
  assign m_first = sreg[K-1].tok;

  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);
endmodule
