// Self-checking testbench of output_integrating_adder at WIDTH = 8.  All 2^17 combinations of
// the two operands and the carry-in are applied and the result is compared
// with integer addition.
module tb_output_integrating_adder;
  logic [7:0] a, b, sum;
  logic cin;
  
  int checks = 0, failures = 0;

  output_integrating_adder #(.WIDTH(8)) dut (.a(a), .b(b), .cin(cin), .sum(sum));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = 17'(v);
      #1;
      checks++;
      if (sum !== 8'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures <= 10) $display("mismatch a=%0d b=%0d cin=%0d sum=%0d", a, b, cin, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
