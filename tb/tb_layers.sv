// tb_layers: convolution layers of a DarkNet19-like network run on the
// kernel, 8-bit words, several kernels per layer, O identical operations per
// kernel:
//   3x3, O = 64,  R = 5 (smallest R that hides the 64-cycle load) : no stall
//   3x3, O = 256, R = 2 (160-cycle load)                           : no stall
//   3x3, O = 64,  R = 1 (288-cycle load)                           : 224 stall cycles per kernel
//   1x1, O = 64,  R = 1 (32-cycle load)                            : no stall
//   3x3, 12-bit words, R = 3, no shadow LUTs                       : every load stalls
module tb_layers;
  logic clk = 1'b0, rst_n = 1'b0;
  int c [5], f [5], ov [5];
  logic d [5];

  always #5 clk = ~clk;

  layer_runner #(.N(9), .B(8),  .R(5), .SHADOW(1'b1), .O(64),  .KERNELS(3)) l0 (.clk(clk), .rst_n(rst_n), .checks(c[0]), .failures(f[0]), .overhead_cycles(ov[0]), .finished(d[0]));
  layer_runner #(.N(9), .B(8),  .R(2), .SHADOW(1'b1), .O(256), .KERNELS(2)) l1 (.clk(clk), .rst_n(rst_n), .checks(c[1]), .failures(f[1]), .overhead_cycles(ov[1]), .finished(d[1]));
  layer_runner #(.N(9), .B(8),  .R(1), .SHADOW(1'b1), .O(64),  .KERNELS(2)) l2 (.clk(clk), .rst_n(rst_n), .checks(c[2]), .failures(f[2]), .overhead_cycles(ov[2]), .finished(d[2]));
  layer_runner #(.N(1), .B(8),  .R(1), .SHADOW(1'b1), .O(64),  .KERNELS(3)) l3 (.clk(clk), .rst_n(rst_n), .checks(c[3]), .failures(f[3]), .overhead_cycles(ov[3]), .finished(d[3]));
  layer_runner #(.N(9), .B(12), .B_O(12), .R(3), .SHADOW(1'b0), .O(64), .KERNELS(2)) l4 (.clk(clk), .rst_n(rst_n), .checks(c[4]), .failures(f[4]), .overhead_cycles(ov[4]), .finished(d[4]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end
endmodule
