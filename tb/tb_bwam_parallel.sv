// Self-checking testbench of bwam_parallel, the parallel Baugh-Wooley array
// multiplier.  It applies all 2^16 pairs of 8-bit two's complement operands
// and compares the 16-bit product with the product of the operands taken as
// signed integers by the simulator.  Ends with a TB_RESULT line; a watchdog
// stops it if it hangs.
module tb_bwam_parallel;
  localparam int unsigned N = 8;

  logic [N-1:0]   p, q;
  logic [2*N-1:0] m;
  int checks = 0, failures = 0;

  bwam_parallel #(.N(N)) dut (.p(p), .q(q), .m(m));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        logic signed [2*N-1:0] expected;
        p = N'(a);
        q = N'(b);
        #1;
        expected = (2*N)'(signed'(p)) * (2*N)'(signed'(q));
        checks++;
        if (m !== expected) begin
          failures++;
          if (failures <= 10)
            $display("mismatch: p=%0d q=%0d m=%0d expected=%0d",
                     signed'(p), signed'(q), signed'(m), expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
