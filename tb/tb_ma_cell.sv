// Self-checking testbench of ma_cell.  All 64 input combinations are applied;
// the expected partial-product bit and the 2-bit sum of the three addends
// are worked out here from the cell's definition.
module tb_ma_cell;
  logic p_bit, q_bit, invert_p, invert_pp, s_in, c_in, s_out, c_out;
  int checks = 0, failures = 0;

  ma_cell dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int pp, total;
      {p_bit, q_bit, invert_p, invert_pp, s_in, c_in} = 6'(v);
      #1;
      pp    = invert_p ? (!p_bit && q_bit) : (p_bit && q_bit);
      if (invert_pp) pp = 1 - pp;
      total = pp + int'(s_in) + int'(c_in);
      checks++;
      if ({c_out, s_out} !== 2'(total)) begin
        failures++;
        $display("mismatch for inputs %b: got %b%b expected %0d", 6'(v), c_out, s_out, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
