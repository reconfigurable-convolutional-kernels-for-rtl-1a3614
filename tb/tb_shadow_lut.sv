// tb_shadow_lut: self-checking test of the shadow LUT pair.
// Loads the idle LUT while the active one is read on every cycle, checks
// that the outputs keep the old table during the load and show the new
// table in the very cycle sel flips, and that a load with cfg_en low has no
// effect.
module tb_shadow_lut;
  logic clk = 1'b0, sel = 1'b0, cfg_en = 1'b0, cdi = 1'b0;
  logic [4:0] i = '0;
  logic o5, o6;
  int checks = 0, failures = 0;

  shadow_lut dut (.clk(clk), .sel(sel), .cfg_en(cfg_en), .cdi(cdi), .i(i), .o5(o5), .o6(o6));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expect the table t at the current address.
  task automatic expect_tab(input logic [31:0] t, input string what);
    checks++;
    if (o6 !== t[i] || o5 !== t[{1'b0, i[3:0]}]) begin
      failures++;
      $display("%s: addr %0d o6=%b o5=%b expected %b %b", what, i, o6, o5, t[i], t[{1'b0, i[3:0]}]);
    end
  endtask

  // Shift t into the idle LUT while reading the active one (table act).
  task automatic load(input logic [31:0] t, input logic [31:0] act, input logic en);
    for (int b = 31; b >= 0; b--) begin
      @(negedge clk); cfg_en = en; cdi = t[b]; i = 5'($urandom); #1;
      expect_tab(act, "during load");
    end
    @(negedge clk); cfg_en = 1'b0;
  endtask

  task automatic sweep(input logic [31:0] t, input string what);
    for (int a = 0; a < 32; a++) begin i = 5'(a); #1; expect_tab(t, what); end
  endtask

  initial begin
    logic [31:0] tab [2];
    logic [31:0] t;
    // initialise both halves: sel=0 loads LUT B, sel=1 loads LUT A
    tab[0] = $urandom; tab[1] = $urandom;
    sel = 1'b1;
    @(negedge clk);
    for (int b = 31; b >= 0; b--) begin @(negedge clk); cfg_en = 1'b1; cdi = tab[0][b]; end
    @(negedge clk); cfg_en = 1'b0; sel = 1'b0;
    for (int b = 31; b >= 0; b--) begin @(negedge clk); cfg_en = 1'b1; cdi = tab[1][b]; end
    @(negedge clk); cfg_en = 1'b0;
    sweep(tab[0], "A active");
    sel = 1'b1; #1;
    sweep(tab[1], "B active");
    for (int rep = 0; rep < 12; rep++) begin
      // active is tab[sel]; load the other one
      t = $urandom;
      load(t, tab[sel], 1'b1);
      tab[~sel] = t;
      // switch in zero cycles: same time step, no clock
      sel = ~sel; i = 5'($urandom); #1;
      expect_tab(tab[sel], "right after swap");
      sweep(tab[sel], "after swap");
      // a load with cfg_en low must change nothing
      load($urandom, tab[sel], 1'b0);
      sel = ~sel; #1;
      sweep(tab[sel], "idle unchanged");
      sel = ~sel; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
