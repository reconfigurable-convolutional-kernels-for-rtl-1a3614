// tb_kcm_row: self-checking test of one LUT row.
// The testbench plays the configuration circuit: for 32 cycles it drives
// the generator bus with a*c (first 16 cycles) and a*2c (last 16), a going
// 15..0, using unsigned table values for one row and signed ones for a
// second row. It then checks the row output against chunk*c for all 16
// chunks, and that a load into the idle shadow set leaves the output alone
// until sel flips. A third row is built without its two lowest CFGLUTs
// (SKIP = 2): its four low bits must read 0 and the rest must match.
module tb_kcm_row;
  localparam int unsigned B = 8, RW = 12, GW = B + 5;
  logic clk = 1'b0, en = 1'b0, sel = 1'b0;
  logic [3:0] chunk = '0;
  logic [GW-1:0] gen_u = '0, gen_s = '0;
  logic [RW-1:0] row_u, row_s, row_k;
  int checks = 0, failures = 0;

  kcm_row #(.B(B)) dut_u (.clk(clk), .chunk(chunk), .gen_bus(gen_u), .cfg_en(en), .sel(sel), .row(row_u));
  kcm_row #(.B(B)) dut_s (.clk(clk), .chunk(chunk), .gen_bus(gen_s), .cfg_en(en), .sel(sel), .row(row_s));

  kcm_row #(.B(B), .SKIP(2)) dut_k (.clk(clk), .chunk(chunk), .gen_bus(gen_u), .cfg_en(en), .sel(sel), .row(row_k));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sgn4(input int k);
    return (k < 8) ? k : k - 16;
  endfunction

  task automatic expect_c(input int c, input string what);
    for (int k = 0; k < 16; k++) begin
      chunk = 4'(k); #1;
      checks++;
      if (row_u !== RW'(k * c) || row_s !== RW'(sgn4(k) * c)) begin
        failures++;
        $display("%s c=%0d chunk=%0d u=%0d s=%0d", what, c, k, $signed(row_u), $signed(row_s));
      end
      checks++;
      if (row_k !== {RW'(k * c) >> 4, 4'b0000}) begin
        failures++;
        $display("%s skipped row c=%0d chunk=%0d got %h", what, c, k, row_k);
      end
    end
  endtask

  task automatic load(input int c, input int old_c, input bit check_old);
    int a, m;
    for (int t = 0; t < 32; t++) begin
      @(negedge clk);
      a = 15 - t % 16; m = (t < 16) ? 1 : 2;
      en = 1'b1;
      gen_u = GW'(a * m * c);
      gen_s = GW'(sgn4(a) * m * c);
      if (check_old) begin
        chunk = 4'($urandom); #1;
        checks++;
        if (row_u !== RW'(int'(chunk) * old_c)) begin
          failures++; $display("active row disturbed during load");
        end
      end
    end
    @(negedge clk); en = 1'b0;
  endtask

  initial begin
    int c, old_c;
    // fill both sets
    c = -128; load(c, 0, 1'b0); sel = ~sel; #1; expect_c(c, "first");
    old_c = c;
    for (int rep = 0; rep < 40; rep++) begin
      c = (rep == 0) ? 127 : int'($urandom_range(0, 255)) - 128;
      load(c, old_c, rep > 0);
      expect_c(old_c, "before swap");
      sel = ~sel; #1;
      expect_c(c, "after swap");
      old_c = c;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
