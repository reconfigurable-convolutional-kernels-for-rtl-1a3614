// tb_sizes: the kernel built at other sizes of the evaluated range (5x5,
// 9x9 and 11x11 kernels, words of 4, 6, 9 and 12 bits), each run through
// two kernel changes while inputs stream (O = 200 per kernel). Every output
// is checked bit-exactly and for faithful rounding, with the latency
// clog2(N*ceil(B/4)) and the stall cycles max(0, 32*ceil(N/R) - O).
module tb_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  int c [4], f [4], ov [4];
  logic d [4];

  always #5 clk = ~clk;

  layer_runner #(.N(25),  .B(4),  .B_O(4),  .R(5),  .SHADOW(1'b1), .O(200), .KERNELS(2)) s0 (.clk(clk), .rst_n(rst_n), .checks(c[0]), .failures(f[0]), .overhead_cycles(ov[0]), .finished(d[0]));
  layer_runner #(.N(49),  .B(6),  .B_O(6),  .R(7),  .SHADOW(1'b1), .O(200), .KERNELS(2)) s1 (.clk(clk), .rst_n(rst_n), .checks(c[1]), .failures(f[1]), .overhead_cycles(ov[1]), .finished(d[1]));
  layer_runner #(.N(121), .B(12), .B_O(12), .R(11), .SHADOW(1'b1), .O(200), .KERNELS(2)) s2 (.clk(clk), .rst_n(rst_n), .checks(c[2]), .failures(f[2]), .overhead_cycles(ov[2]), .finished(d[2]));
  layer_runner #(.N(81),  .B(9),  .B_O(9),  .R(1),  .SHADOW(1'b1), .O(200), .KERNELS(2)) s3 (.clk(clk), .rst_n(rst_n), .checks(c[3]), .failures(f[3]), .overhead_cycles(ov[3]), .finished(d[3]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end
endmodule
