// tb_msb_gen: self-checking test of the signed-table generator.
// After init at t = 0 and load at t = 8, the entry at cycle t must be k*c
// for address a = 15 - t, where k = a for a < 8 and k = a - 16 otherwise.
module tb_msb_gen;
  localparam int unsigned W = 13;
  logic clk = 1'b0, init = 1'b0, load = 1'b0;
  logic [W-1:0] c_in = '0, entry;
  int checks = 0, failures = 0;

  msb_gen #(.W(W)) dut (.clk(clk), .init(init), .load(load), .c_in(c_in), .entry(entry));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, a, k;
    for (int rep = 0; rep < 200; rep++) begin
      c = int'($urandom_range(0, 255)) - 128;
      if (rep % 2 == 1) c = 2 * c;
      if (rep == 0) c = -128;
      if (rep == 2) c = 127;
      for (int t = 0; t < 32; t++) begin
        @(negedge clk);
        c_in = W'(c);
        init = (t % 16 == 0);
        load = (t % 16 == 8);
        #1;
        a = 15 - t % 16;
        k = (a < 8) ? a : a - 16;
        checks++;
        if (entry !== W'(k * c)) begin
          failures++;
          $display("c=%0d t=%0d entry=%0d expected %0d", c, t, $signed(entry), k * c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
