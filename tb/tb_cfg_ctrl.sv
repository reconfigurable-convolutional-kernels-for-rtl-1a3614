// tb_cfg_ctrl: self-checking test of the reconfiguration sequencer.
// Two instances: N = 9 with R = 1 (load time 32*9 = 288 cycles) and N = 9
// with R = 5 (load time 32*2 = 64 cycles, the R_min of the smallest layers).
// Checks busy length, done pulse, init/load/run2 positions, that cfg_en
// enables exactly the coefficients of the current slot, that start and swap
// are ignored during a load, and that swap flips sel when idle.
module tb_cfg_ctrl;
  localparam int unsigned N = 9;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, swap = 1'b0;
  int checks = 0, failures = 0;

  logic busy1, done1, init1, load1, run21, sel1;
  logic [3:0] slot1;
  logic [N-1:0] en1;
  logic busy5, done5, init5, load5, run25, sel5;
  logic [0:0] slot5;
  logic [N-1:0] en5;

  cfg_ctrl #(.N(N), .R(1)) dut1 (.clk(clk), .rst_n(rst_n), .start(start), .swap(swap),
    .busy(busy1), .done(done1), .init(init1), .load(load1), .run2(run21),
    .slot(slot1), .cfg_en(en1), .sel(sel1));
  cfg_ctrl #(.N(N), .R(5)) dut5 (.clk(clk), .rst_n(rst_n), .start(start), .swap(swap),
    .busy(busy5), .done(done5), .init(init5), .load(load5), .run2(run25),
    .slot(slot5), .cfg_en(en5), .sel(sel5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Observe one full load of an instance with R circuits, sampling before
  // each rising edge. Returns the number of busy cycles.
  task automatic observe(input int r, output int cycles);
    int t, s, done_seen;
    logic b, d, in, ld, r2;
    logic [N-1:0] en;
    cycles = 0; done_seen = 0;
    for (int i = 0; i < 32 * N + 8; i++) begin
      @(negedge clk);
      // sample the state left by the last rising edge, then drive
      start = (i == 0 || i == 3);  // the second start, while busy, must be ignored
      swap  = (i == 5);  // a swap while busy must be ignored
      if (r == 1) begin b = busy1; d = done1; in = init1; ld = load1; r2 = run21; en = en1; end
      else        begin b = busy5; d = done5; in = init5; ld = load5; r2 = run25; en = en5; end
      if (b) begin
        t = cycles % 32; s = cycles / 32;
        chk(in == (t == 0 || t == 16), "init position");
        chk(ld == (t == 8 || t == 24), "load position");
        chk(r2 == (t >= 16), "run2");
        for (int n = 0; n < N; n++) chk(en[n] == (n / r == s), "cfg_en slot");
        cycles++;
      end else begin
        chk(en == '0 && !in && !ld, "quiet when idle");
        if (d) done_seen++;
      end
    end
    start = 1'b0; swap = 1'b0;
    chk(done_seen == 1, "one done pulse");
  endtask

  initial begin
    int cyc;
    logic s1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    chk(!busy1 && !busy5 && sel1 == 1'b0, "reset state");
    // swap when idle flips sel in the next clock
    @(negedge clk); swap = 1'b1; @(negedge clk); swap = 1'b0;
    chk(sel1 == 1'b1 && sel5 == 1'b1, "swap when idle");
    s1 = sel1;
    observe(1, cyc);
    chk(cyc == 32 * 9, "R=1 load time 288 cycles");
    $display("R=1 load time %0d cycles", cyc);
    chk(sel1 == s1, "swap during load ignored");
    observe(5, cyc);
    chk(cyc == 32 * 2, "R=5 load time 64 cycles");
    $display("R=5 load time %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
