// tb_lsb_gen: self-checking test of the unsigned-table generator.
// For random coefficients (and their doubles) checks that, after init, the
// generator emits 15c, 14c, ..., 0 on consecutive cycles, twice in a row.
module tb_lsb_gen;
  localparam int unsigned W = 13;
  logic clk = 1'b0, init = 1'b0;
  logic [W-1:0] c_in = '0, entry;
  int checks = 0, failures = 0;

  lsb_gen #(.W(W)) dut (.clk(clk), .init(init), .c_in(c_in), .entry(entry));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    for (int rep = 0; rep < 200; rep++) begin
      c = int'($urandom_range(0, 255)) - 128;
      if (rep % 2 == 1) c = 2 * c;
      if (rep == 0) c = -128;
      if (rep == 2) c = 127;
      for (int t = 0; t < 32; t++) begin
        @(negedge clk);
        c_in = W'(c);
        init = (t % 16 == 0);
        #1;
        checks++;
        if (entry !== W'((15 - t % 16) * c)) begin
          failures++;
          $display("c=%0d t=%0d entry=%0d expected %0d", c, t, $signed(entry), (15 - t % 16) * c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
