// Stimulus and checker for one systolic_mult_top of word length N (helper of
// tb_word_lengths).  All nine multipliers run at once on independent operand
// streams: corner cases (0, 1, -1, most positive, most negative) in all pairs
// first, then random operands of full width.  The parallel arrays take a new
// pair every clock; the serial arrays are started back to back.  Every
// product is compared with the product of the operands taken as signed
// integers; serial latency and start spacing are checked.  Each multiplier
// must see a negative multiplier, a negative multiplicand and both, and each
// serial one a back-to-back start.  Results are returned through checks,
// failures and done.
module mult_family_stimulus #(
  parameter int unsigned N        = 8,
  parameter int unsigned DIGIT    = 2,
  parameter int unsigned PRODUCTS = 200   // per serial multiplier
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int          NCORNER  = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0][N-1:0]     par_p = '0, par_q = '0;
  logic [2:0][2*N-1:0]   par_m;
  logic [2:0]            bs_start = '0, bs_ready, bs_m_digit, bs_m_valid, bs_m_first;
  logic [2:0][N-1:0]     bs_p = '0, bs_q = '0;
  logic [2:0]            ds_start = '0, ds_ready, ds_m_valid, ds_m_first;
  logic [2:0][N-1:0]     ds_p = '0, ds_q = '0;
  logic [2:0][DIGIT-1:0] ds_m_digit;

  longint cycle = 0;

  systolic_mult_top #(.N(N), .DIGIT(DIGIT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string what);
    failures++;
    if (failures <= 20) $display("N=%0d FAIL at cycle %0d: %s", N, cycle, what);
  endtask

  function automatic logic [N-1:0] corner(int k);
    case (k)
      0: return N'(0);
      1: return N'(1);
      2: return '1;                     // -1
      3: return {1'b0, {(N-1){1'b1}}};  // most positive
      default: return {1'b1, {(N-1){1'b0}}};  // most negative
    endcase
  endfunction

  // operand pair number k of a stream
  function automatic logic [2*N-1:0] operands(int k);
    logic [2*N-1:0] r;
    if (k < NCORNER * NCORNER) return {corner(k / NCORNER), corner(k % NCORNER)};
    for (int w = 0; w < (2*N + 31) / 32; w++) r = (r << 32) | (2*N)'($urandom);
    return r;
  endfunction

  function automatic logic [2*N-1:0] ref_product(logic [N-1:0] a, logic [N-1:0] b);
    return (2*N)'(signed'(a)) * (2*N)'(signed'(b));
  endfunction

  // mechanism counters: [unit] with units 0..2 parallel, 3..8 serial
  int neg_q[9], neg_p[9], neg_both[9], back_to_back[9];

  task automatic count_signs(int u, logic [N-1:0] a, logic [N-1:0] b);
    if (b[N-1]) neg_q[u]++;
    if (a[N-1]) neg_p[u]++;
    if (a[N-1] && b[N-1]) neg_both[u]++;
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
  end

  // ---------------- parallel arrays ----------------
  int par_done = 0;
  initial begin
    @(posedge clk);
    for (int k = 0; k < 4 * PRODUCTS; k++) begin
      for (int u = 0; u < 3; u++) begin
        {par_p[u], par_q[u]} = operands(k);
      end
      #1;
      for (int u = 0; u < 3; u++) begin
        checks++;
        count_signs(u, par_p[u], par_q[u]);
        if (par_m[u] !== ref_product(par_p[u], par_q[u]))
          fail($sformatf("parallel unit %0d: %0d * %0d gave %0d", u,
               signed'(par_p[u]), signed'(par_q[u]), signed'(par_m[u])));
      end
      @(posedge clk);
    end
    par_done = 1;
  end

  // ---------------- serial arrays ----------------
  // unit s = 0..5: bs CRAM, bs CSAM, bs BWAM, ds CRAM, ds CSAM, ds BWAM
  logic [2*N-1:0] exp_q[6][$];
  longint         start_cyc[6][$];
  int             started[6], finished[6];
  longint         last_start[6];
  logic [2*N-1:0] got[6];
  int             pos[6];

  function automatic int dig(int s);
    return (s < 3) ? 1 : DIGIT;
  endfunction
  function automatic int frame(int s);
    return 2 * N / dig(s);
  endfunction
  function automatic int latency(int s);
    return (s % 3 == 0) ? 2 : (N / dig(s) + 1);
  endfunction

  initial begin
    for (int s = 0; s < 6; s++) begin
      started[s] = 0; finished[s] = 0; last_start[s] = -1; pos[s] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    forever begin
      #1;
      for (int s = 0; s < 6; s++) begin
        logic rdy;
        logic [N-1:0] a, b;
        rdy = (s < 3) ? bs_ready[s] : ds_ready[s-3];
        if (rdy && started[s] < PRODUCTS) begin
          {a, b} = operands(started[s]);
          if (s < 3) begin bs_p[s] = a; bs_q[s] = b; bs_start[s] = 1'b1; end
          else begin ds_p[s-3] = a; ds_q[s-3] = b; ds_start[s-3] = 1'b1; end
          count_signs(s + 3, a, b);
          exp_q[s].push_back(ref_product(a, b));
          start_cyc[s].push_back(cycle);
          if (last_start[s] >= 0) begin
            checks++;
            if (cycle - last_start[s] != frame(s))
              fail($sformatf("serial unit %0d: starts %0d clocks apart", s, cycle - last_start[s]));
            else
              back_to_back[s + 3]++;
          end
          last_start[s] = cycle;
          started[s]++;
        end else begin
          if (s < 3) bs_start[s] = 1'b0; else ds_start[s-3] = 1'b0;
        end
      end
      @(posedge clk);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < 6; s++) begin
        logic v, f;
        logic [DIGIT-1:0] d;
        v = (s < 3) ? bs_m_valid[s] : ds_m_valid[s-3];
        f = (s < 3) ? bs_m_first[s] : ds_m_first[s-3];
        d = (s < 3) ? DIGIT'(bs_m_digit[s]) : ds_m_digit[s-3];
        if (v) begin
          if (f) begin
            pos[s] = 0;
            got[s] = '0;
            checks++;
            if (cycle - start_cyc[s][0] != latency(s))
              fail($sformatf("serial unit %0d: latency %0d", s, cycle - start_cyc[s][0]));
          end
          if (pos[s] >= 0) begin
            for (int b = 0; b < dig(s); b++) got[s][pos[s] * dig(s) + b] = d[b];
            pos[s]++;
            if (pos[s] == frame(s)) begin
              checks++;
              if (got[s] !== exp_q[s][0])
                fail($sformatf("serial unit %0d: product %0d expected %0d", s,
                     signed'(got[s]), signed'(exp_q[s][0])));
              void'(exp_q[s].pop_front());
              void'(start_cyc[s].pop_front());
              pos[s] = -1;
              finished[s]++;
            end
          end else fail($sformatf("serial unit %0d: digit outside a product", s));
        end
      end
    end
  end

  // ---------------- end of run ----------------
  initial begin
    wait (par_done == 1 && finished[0] == PRODUCTS && finished[1] == PRODUCTS &&
          finished[2] == PRODUCTS && finished[3] == PRODUCTS &&
          finished[4] == PRODUCTS && finished[5] == PRODUCTS);
    for (int u = 0; u < 9; u++) begin
      $display("N=%0d unit %0d: negative multiplier %0d, negative multiplicand %0d, both %0d, back-to-back %0d",
               N, u, neg_q[u], neg_p[u], neg_both[u], back_to_back[u]);
      checks++;
      if (neg_q[u] == 0 || neg_p[u] == 0 || neg_both[u] == 0) fail($sformatf("unit %0d: a sign case never ran", u));
      if (u >= 3) begin
        checks++;
        if (back_to_back[u] == 0) fail($sformatf("unit %0d: no back-to-back products", u));
      end
    end
    done = 1'b1;
  end
endmodule
