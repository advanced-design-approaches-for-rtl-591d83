// Self-checking testbench of the bit-serial carry-ripple array multiplier (cram_serial, DIGIT=1).
//
// All 2^16 pairs of 8-bit two's complement operands are started back to
// back: a new start is issued in every clock in which ready is high.  The
// product digits are collected least significant first and compared with the
// product of the operands taken as signed integers.  The testbench also
// checks the timing: the first product digit appears 2 clocks after the
// start cycle, consecutive starts are 2N/DIGIT clocks apart, and m_valid
// stays high for the 2N/DIGIT digits of each product.
module tb_cram_bit_serial;
  localparam int unsigned N     = 8;
  localparam int unsigned DIGIT = 1;
  localparam int unsigned F     = 2 * N / DIGIT;
  localparam int unsigned LAT   = 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, ready;
  logic [N-1:0] p = '0, q = '0;
  logic [DIGIT-1:0] m_digit;
  logic m_valid, m_first;
  int checks = 0, failures = 0;
  longint cycle = 0;

  cram_serial #(.N(N), .DIGIT(DIGIT)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready), .p(p), .q(q),
    .m_digit(m_digit), .m_valid(m_valid), .m_first(m_first));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // expected products and start cycles, in order
  logic [2*N-1:0] exp_q[$];
  longint         start_cyc[$];
  longint         last_start = -1;

  task automatic fail(string what);
    failures++;
    if (failures <= 10) $display("FAIL at cycle %0d: %s", cycle, what);
  endtask

  initial begin
    repeat (400_000 * F) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver
  initial begin
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (n < (1 << (2*N))) begin
      #1;
      if (ready) begin
        p     = N'(n >> N);
        q     = N'(n);
        start = 1'b1;
        exp_q.push_back((2*N)'(signed'(p)) * (2*N)'(signed'(q)));
        start_cyc.push_back(cycle);
        if (last_start >= 0) begin
          checks++;
          if (cycle - last_start != F) fail($sformatf("start spacing %0d", cycle - last_start));
        end
        last_start = cycle;
        n++;
      end else begin
        start = 1'b0;
      end
      @(posedge clk);
    end
    #1 start = 1'b0;
  end

  // monitor
  logic [2*N-1:0] got;
  int             pos = -1;
  int             done = 0;
  always @(posedge clk) begin
    if (rst_n && m_valid) begin
      if (m_first) begin
        if (pos != -1) fail("m_first before the previous product ended");
        pos = 0;
        got = '0;
        checks++;
        if (cycle - start_cyc[0] != LAT)
          fail($sformatf("latency %0d, expected %0d", cycle - start_cyc[0], LAT));
      end
      if (pos < 0) fail("m_valid without a product in flight");
      else begin
        got[pos*DIGIT +: DIGIT] = m_digit;
        pos++;
        if (pos == F) begin
          checks++;
          if (got !== exp_q[0])
            fail($sformatf("product %0d, expected %0d", signed'(got), signed'(exp_q[0])));
          void'(exp_q.pop_front());
          void'(start_cyc.pop_front());
          pos = -1;
          done++;
          if (done == (1 << (2*N))) begin
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end else if (rst_n && pos >= 0) begin
      fail("m_valid dropped inside a product");
      pos = -1;
    end
  end
endmodule
