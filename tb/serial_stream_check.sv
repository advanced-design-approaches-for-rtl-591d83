// Stimulus and checker for one serial multiplier of word length N (helper of
// tb_serial_128).  KIND selects the multiplier: 0 = cram_serial,
// 1 = csa_serial in carry-save mode, 2 = csa_serial in Baugh-Wooley mode.
// Corner operands (0, 1, -1, most positive, most negative, in all pairs) come
// first, then random full-width operands; starts are issued back to back.
// Each product is reassembled from its digits and compared with the product
// of the operands taken as signed integers; the first-digit latency and the
// start spacing are checked too.  Results return through checks, failures,
// done.
module serial_stream_check #(
  parameter int unsigned N        = 128,
  parameter int unsigned DIGIT    = 1,
  parameter int unsigned KIND     = 0,
  parameter int unsigned PRODUCTS = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int unsigned F   = 2 * N / DIGIT;
  localparam int unsigned LAT = (KIND == 0) ? 2 : N / DIGIT + 1;
  localparam int          NC  = 5;

  logic start = 1'b0, ready, m_valid, m_first;
  logic [N-1:0] p = '0, q = '0;
  logic [DIGIT-1:0] m_digit;
  longint cycle = 0;

  if (KIND == 0) begin : g_cram
    cram_serial #(.N(N), .DIGIT(DIGIT)) dut (.*);
  end else begin : g_csa
    csa_serial #(.N(N), .DIGIT(DIGIT), .BAUGH_WOOLEY(KIND == 2)) dut (.*);
  end

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [N-1:0] corner(int k);
    case (k)
      0: return N'(0);
      1: return N'(1);
      2: return '1;
      3: return {1'b0, {(N-1){1'b1}}};
      default: return {1'b1, {(N-1){1'b0}}};
    endcase
  endfunction

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    for (int w = 0; w < (N + 31) / 32; w++) r = (r << 32) | N'($urandom);
    return r;
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures <= 10) $display("N=%0d DIGIT=%0d KIND=%0d FAIL at %0d: %s", N, DIGIT, KIND, cycle, what);
  endtask

  logic [2*N-1:0] exp_q[$];
  longint         start_cyc[$];

  initial begin
    int n = 0;
    longint last = -1;
    checks = 0; failures = 0; done = 1'b0;
    @(posedge rst_n);
    @(posedge clk);
    while (n < PRODUCTS) begin
      #1;
      if (ready) begin
        if (n < NC * NC) begin p = corner(n / NC); q = corner(n % NC); end
        else begin p = rnd(); q = rnd(); end
        start = 1'b1;
        exp_q.push_back((2*N)'(signed'(p)) * (2*N)'(signed'(q)));
        start_cyc.push_back(cycle);
        if (last >= 0) begin
          checks++;
          if (cycle - last != F) fail("start spacing");
        end
        last = cycle;
        n++;
      end else start = 1'b0;
      @(posedge clk);
    end
    #1 start = 1'b0;
  end

  logic [2*N-1:0] got;
  int pos = -1, finished = 0;
  always @(posedge clk) begin
    if (rst_n && m_valid) begin
      if (m_first) begin
        pos = 0; got = '0;
        checks++;
        if (cycle - start_cyc[0] != LAT) fail("latency");
      end
      if (pos >= 0) begin
        got[pos*DIGIT +: DIGIT] = m_digit;
        pos++;
        if (pos == F) begin
          checks++;
          if (got !== exp_q[0]) fail("product");
          void'(exp_q.pop_front());
          void'(start_cyc.pop_front());
          pos = -1;
          finished++;
          if (finished == PRODUCTS) done = 1'b1;
        end
      end else fail("digit outside a product");
    end
  end
endmodule
