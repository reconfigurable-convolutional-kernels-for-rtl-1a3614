// tb_cfg_circuit: self-checking test of the configuration circuit.
// Runs the 32-cycle sequence (init at 0/16, load at 8/24, run2 from 16) for
// random 8-bit coefficients, checks both buses every cycle, and rebuilds the
// 32-bit table each CFGLUT would receive (bit 2j+1 of each bus, first bit at
// address 31) to check that O6 gives product bit 2j+1 and O5 bit 2j for all
// 16 chunk values, unsigned (LSB bus) and signed (MSB bus).
module tb_cfg_circuit;
  localparam int unsigned B = 8;
  localparam int unsigned W = B + 5;
  localparam int unsigned P = (B + 5) / 2;  // CFGLUTs per row
  logic clk = 1'b0, run2 = 1'b0, init = 1'b0, load = 1'b0;
  logic [B-1:0] c = '0;
  logic [W-1:0] lsb_bus, msb_bus;
  int checks = 0, failures = 0;

  cfg_circuit #(.B(B)) dut (.clk(clk), .c(c), .run2(run2), .init(init), .load(load),
                            .lsb_bus(lsb_bus), .msb_bus(msb_bus));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cv, a, ks, m;
    logic [31:0] tab_l [P];
    logic [31:0] tab_m [P];
    logic [W-1:0] pu, ps;
    for (int rep = 0; rep < 100; rep++) begin
      cv = (rep == 0) ? -128 : (rep == 1) ? 127 : int'($urandom_range(0, 255)) - 128;
      for (int t = 0; t < 32; t++) begin
        @(negedge clk);
        c = B'(cv);
        init = (t % 16 == 0);
        load = (t % 16 == 8);
        run2 = (t >= 16);
        #1;
        a  = 15 - t % 16;
        ks = (a < 8) ? a : a - 16;
        m  = run2 ? 2 : 1;
        checks++;
        if (lsb_bus !== W'(a * m * cv) || msb_bus !== W'(ks * m * cv)) begin
          failures++;
          $display("c=%0d t=%0d lsb=%0d msb=%0d", cv, t, $signed(lsb_bus), $signed(msb_bus));
        end
        for (int j = 0; j < P; j++) begin
          tab_l[j][31 - t] = lsb_bus[2*j+1];
          tab_m[j][31 - t] = msb_bus[2*j+1];
        end
      end
      for (int k = 0; k < 16; k++) begin
        ks = (k < 8) ? k : k - 16;
        pu = W'(k * cv);
        ps = W'(ks * cv);
        for (int j = 0; j < P; j++) begin
          checks++;
          if (tab_l[j][16 + k] !== pu[2*j+1] || tab_l[j][k] !== pu[2*j] ||
              tab_m[j][16 + k] !== ps[2*j+1] || tab_m[j][k] !== ps[2*j]) begin
            failures++;
            $display("table mismatch c=%0d chunk=%0d lut=%0d", cv, k, j);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
