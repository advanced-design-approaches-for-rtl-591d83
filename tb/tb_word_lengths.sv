// Word-length testbench of systolic_mult_top: the nine multipliers are built
// and checked at the word lengths 4, 16, 32 and 64 bits (8 bits is the
// default, covered by tb_systolic_mult_top), each with digit size 2 for the
// digit-serial forms.  Each size runs through mult_family_stimulus with the
// corner cases and random operands; the counts are summed into one result.
module tb_word_lengths;
  localparam int NSIZES = 4;
  int  c[NSIZES], f[NSIZES];
  bit  d[NSIZES];
  int  checks, failures;

  mult_family_stimulus #(.N(4),   .DIGIT(2), .PRODUCTS(200)) u_n4   (.checks(c[0]), .failures(f[0]), .done(d[0]));
  mult_family_stimulus #(.N(16),  .DIGIT(2), .PRODUCTS(200)) u_n16  (.checks(c[1]), .failures(f[1]), .done(d[1]));
  mult_family_stimulus #(.N(32),  .DIGIT(2), .PRODUCTS(100)) u_n32  (.checks(c[2]), .failures(f[2]), .done(d[2]));
  mult_family_stimulus #(.N(64),  .DIGIT(2), .PRODUCTS(60))  u_n64  (.checks(c[3]), .failures(f[3]), .done(d[3]));

  task automatic report(bit timed_out);
    checks   = 0;
    failures = timed_out ? 1 : 0;
    for (int i = 0; i < NSIZES; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #5_000_000;   // 500,000 clocks of the 10-unit period used by the helpers
    $display("watchdog expired");
    report(1'b1);
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    report(1'b0);
  end
endmodule
