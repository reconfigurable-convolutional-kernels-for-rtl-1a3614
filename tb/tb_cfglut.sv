// tb_cfglut: self-checking test of the reconfigurable LUT.
// Shifts random 32-bit tables in (first bit = address 31), reads every
// address on O6 and O5, checks CDO, and checks that the table holds while
// CE is low.
module tb_cfglut;
  logic clk = 1'b0, ce = 1'b0, cdi = 1'b0;
  logic [4:0] i = '0;
  logic o5, o6, cdo;
  int checks = 0, failures = 0;

  cfglut dut (.clk(clk), .ce(ce), .cdi(cdi), .i(i), .o5(o5), .o6(o6), .cdo(cdo));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [31:0] t);
    for (int b = 31; b >= 0; b--) begin
      @(negedge clk); ce = 1'b1; cdi = t[b];
    end
    @(negedge clk); ce = 1'b0; cdi = 1'b0;
  endtask

  task automatic verify(input logic [31:0] t);
    for (int a = 0; a < 32; a++) begin
      i = 5'(a); #1;
      checks++;
      if (o6 !== t[a] || o5 !== t[a % 16]) begin
        failures++;
        $display("addr %0d: o6=%b o5=%b expected %b %b", a, o6, o5, t[a], t[a % 16]);
      end
    end
    checks++;
    if (cdo !== t[31]) begin failures++; $display("cdo wrong"); end
  endtask

  initial begin
    logic [31:0] t;
    for (int rep = 0; rep < 20; rep++) begin
      t = (rep == 0) ? 32'h8000_0001 : $urandom;
      load(t);
      verify(t);
      // CE low: clocks must not disturb the table
      cdi = ~cdi;
      repeat (3) @(negedge clk);
      verify(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
