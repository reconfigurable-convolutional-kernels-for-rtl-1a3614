// tb_sop_sum: self-checking test of the summation tree with faithful
// rounding, at three sizes: the default 3x3 kernel with 8-bit words
// (18 rows, 5 guard bits, latency 5), three 12-bit products rounded to 12
// bits with 4 guard bits, and a 2-input 2-bit kernel where nothing is cut.
module tb_sop_sum;
  logic clk = 1'b0, rst_n = 1'b0;
  int c0, f0, u0, c1, f1, u1, c2, f2, u2;
  logic d0, d1, d2;

  always #5 clk = ~clk;

  sop_sum_check #(.N(9), .B(8),  .B_O(8))         k0 (.clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .rounded_up(u0), .finished(d0));
  sop_sum_check #(.N(3), .B(12), .B_O(12), .G(4)) k1 (.clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .rounded_up(u1), .finished(d1));
  sop_sum_check #(.N(2), .B(2),  .B_O(4))         k2 (.clk(clk), .rst_n(rst_n), .checks(c2), .failures(f2), .rounded_up(u2), .finished(d2));

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("results above the exact value: %0d %0d %0d", u0, u1, u2);
    // the rounding must round up at least sometimes in each instance
    checks++;
    if (u0 == 0 || u1 == 0 || u2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
