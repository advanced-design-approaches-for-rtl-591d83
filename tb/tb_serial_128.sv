// 128-bit testbench of the serial multipliers: the bit-serial and
// digit-serial (digit size 2) forms of the carry-ripple, carry-save and
// Baugh-Wooley serial arrays at N = 128, the largest word length of the
// design's evaluation.  Each runs through serial_stream_check with corner
// and random operands, back to back; the counts are summed into one result.
module tb_serial_128;
  logic clk = 1'b0, rst_n = 1'b0;
  int  c[6], f[6];
  bit  d[6];

  always #5 clk = ~clk;

  for (genvar k = 0; k < 3; k++) begin : g_kind
    serial_stream_check #(.N(128), .DIGIT(1), .KIND(k)) u_bs (
      .clk(clk), .rst_n(rst_n), .checks(c[k]), .failures(f[k]), .done(d[k]));
    serial_stream_check #(.N(128), .DIGIT(2), .KIND(k)) u_ds (
      .clk(clk), .rst_n(rst_n), .checks(c[k+3]), .failures(f[k+3]), .done(d[k+3]));
  end

  task automatic report(bit timed_out);
    int checks, failures;
    checks = 0;
    failures = timed_out ? 1 : 0;
    for (int i = 0; i < 6; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    $display("watchdog expired");
    report(1'b1);
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    report(1'b0);
  end
endmodule
