// tb_conv_core: end-to-end test of the convolution kernel at its default
// size (3x3 kernel, 8-bit words, one configuration circuit, shadow LUTs).
//
// Loop: write a random kernel into the coefficient memory, start the online
// reconfiguration, keep streaming random input vectors through the kernel
// while the idle LUT set is loaded, then swap sets. Every output is checked
// bit-exactly against a model of the LUT products, row cut and rounding,
// and against the exact sum of products (faithful rounding: within one
// output LSB). Also checked: the 5-cycle latency, the 32*N-cycle load, that
// inputs in the cycle right after a swap already use the new kernel, and
// that a swap requested during a load is ignored. Each mechanism must occur.
module tb_conv_core;
  localparam int unsigned N = 9, B = 8, B_O = 8, R = 1;
  localparam bit          SHADOW = 1'b1;
  localparam int unsigned K    = conv_pkg::num_chunks(B);
  localparam int unsigned W    = conv_pkg::full_width(B, N);
  localparam int unsigned ROWS = N * K;
  localparam int unsigned G    = $clog2(ROWS + 1);
  localparam int unsigned CUT  = (W > B_O + G) ? W - B_O - G : 0;
  localparam int unsigned WT   = W - CUT;
  localparam int unsigned SH   = WT - B_O;
  localparam int unsigned LV   = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned LOAD_CYCLES = 32 * ((N + R - 1) / R);
  localparam longint      C    = (CUT > 0) ? (longint'(1) << (SH - 1)) + ROWS / 2
                                           : ((SH > 0) ? (longint'(1) << (SH - 1)) : 0);
  localparam int unsigned AW   = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned KERNELS = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic coef_we = 1'b0;
  logic [AW-1:0] coef_addr = '0;
  logic [B-1:0] coef_data = '0;
  logic cfg_start = 1'b0, cfg_busy, cfg_done, swap = 1'b0, active_set;
  logic in_valid = 1'b0;
  logic [N-1:0][B-1:0] x = '0;
  logic out_valid;
  logic [B_O-1:0] o;

  conv_core dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .cfg_start(cfg_start), .cfg_busy(cfg_busy), .cfg_done(cfg_done), .swap(swap),
    .active_set(active_set), .in_valid(in_valid), .x(x), .out_valid(out_valid), .o(o)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_loads = 0, n_swaps = 0, n_swap_ignored = 0, n_during_load = 0;
  int n_after_swap = 0, n_rounded_up = 0, n_outputs = 0;

  longint kset [2][N];   // coefficients held by LUT set 0 and set 1
  longint mem [N];       // model of the kernel memory
  longint exp_bits [$];
  longint exp_v [$];
  int     exp_cyc [$];
  int     cyc = 0;
  logic   swapped_last = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(input longint v, input int bits);
    return (v >= (longint'(1) << (bits - 1))) ? v - (longint'(1) << bits) : v;
  endfunction

  // Drive one random input vector (or none) in the current cycle and record
  // what the kernel must return for it.
  task automatic drive_cycle();
    longint v, s, p, xv, xs, ch, cv;
    int set;
    @(negedge clk);
    swap = 1'b0;
    in_valid = ($urandom_range(0, 7) != 0);
    for (int n = 0; n < N; n++) x[n] = B'($urandom);
    if ($urandom_range(0, 15) == 0) for (int n = 0; n < N; n++) x[n] = {1'b1, {(B-1){1'b0}}};
    #1;
    if (in_valid && (SHADOW || !cfg_busy)) begin
      set = int'(active_set);
      v = 0; s = 0;
      for (int n = 0; n < N; n++) begin
        xv = sx(longint'(x[n]), B);
        cv = kset[set][n];
        v += xv * cv;
        xs = xv;
        for (int k = 0; k < K; k++) begin
          ch = xs & 15;
          if (k == K - 1) ch = (ch >= 8) ? ch - 16 : ch;
          xs = xs >>> 4;
          p = ch * cv;
          s += (p <<< (4 * k)) >>> CUT;
        end
      end
      exp_bits.push_back(((s + C) & ((longint'(1) << WT) - 1)) >> SH);
      exp_v.push_back(v);
      exp_cyc.push_back(cyc);
      if (cfg_busy) n_during_load++;
      if (swapped_last) n_after_swap++;
    end
    swapped_last = 1'b0;
  endtask

  always @(posedge clk) begin
    longint eb, ev, got, diff, ulp;
    int ec;
    if (rst_n && out_valid) begin
      n_outputs++;
      if (exp_bits.size() == 0) begin
        checks++; failures++; $display("unexpected output");
      end else begin
        eb = exp_bits.pop_front(); ev = exp_v.pop_front(); ec = exp_cyc.pop_front();
        got  = sx(longint'(o), B_O);
        ulp  = longint'(1) << (W - B_O);
        diff = got * ulp - ev;
        checks += 3;
        if (longint'(o) != eb) begin
          failures++; $display("o=%0h expected %0h", o, eb);
        end
        if (diff >= ulp || diff <= -ulp) begin
          failures++; $display("not faithful: o=%0d exact=%0d", got, ev);
        end
        if (cyc - ec != int'(LV)) begin
          failures++; $display("latency %0d expected %0d", cyc - ec, LV);
        end
        if (diff > 0) n_rounded_up++;
      end
    end
  end

  task automatic write_kernel(input int kind);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = AW'(n); in_valid = 1'b0;
      coef_data = (kind == 0) ? {1'b1, {(B-1){1'b0}}} :
                  (kind == 1) ? {1'b0, {(B-1){1'b1}}} : B'($urandom);
      mem[n] = sx(longint'(coef_data), B);
    end
    @(negedge clk); coef_we = 1'b0;
  endtask

  // Start a load and keep streaming until it is done; check its duration.
  task automatic reconfigure();
    int busy_cycles, target;
    target = int'(~active_set);
    @(negedge clk); cfg_start = 1'b1; swap = 1'b0; in_valid = 1'b0;
    @(negedge clk); cfg_start = 1'b0;
    busy_cycles = 0;
    while (cfg_busy) begin
      busy_cycles++;
      if (busy_cycles == 40) begin
        // a swap in the middle of a load must be ignored
        @(negedge clk); swap = 1'b1; in_valid = 1'b0; #1;
        @(posedge clk); #1;
        checks++;
        if (int'(active_set) == target) begin failures++; $display("swap during load accepted"); end
        else n_swap_ignored++;
        busy_cycles++;
      end
      drive_cycle();
    end
    checks++;
    if (busy_cycles != int'(LOAD_CYCLES) && busy_cycles != int'(LOAD_CYCLES) - 1) begin
      failures++; $display("load took %0d cycles, expected %0d", busy_cycles, LOAD_CYCLES);
    end
    for (int n = 0; n < N; n++) kset[target][n] = mem[n];
    n_loads++;
  endtask

  task automatic do_swap();
    @(negedge clk); swap = 1'b1; in_valid = 1'b0;
    @(negedge clk); swap = 1'b0;
    n_swaps++;
    swapped_last = 1'b1;
  endtask

  initial begin
    int load_start, load_len;
    for (int s = 0; s < 2; s++) for (int n = 0; n < N; n++) kset[s][n] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // exact load time, measured from the start pulse to the done pulse
    write_kernel(2);
    @(negedge clk); cfg_start = 1'b1; load_start = cyc;
    @(negedge clk); cfg_start = 1'b0;
    @(posedge cfg_done);
    load_len = cyc - load_start;
    checks++;
    if (load_len != int'(LOAD_CYCLES) + 1) begin
      failures++; $display("start-to-done %0d cycles, expected %0d", load_len, LOAD_CYCLES + 1);
    end
    $display("reconfiguration: %0d busy cycles", load_len - 1);
    for (int n = 0; n < N; n++) kset[1][n] = mem[n];
    n_loads++;
    do_swap();
    repeat (50) drive_cycle();
    for (int kern = 0; kern < KERNELS; kern++) begin
      write_kernel(kern % 3 == 2 ? 2 : kern % 3);
      repeat (5) drive_cycle();
      reconfigure();
      repeat (5) drive_cycle();
      do_swap();
      repeat (60) drive_cycle();
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LV + 3) @(negedge clk);
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("%0d outputs missing", exp_bits.size()); end
    $display("loads=%0d swaps=%0d ignored_swaps=%0d inputs_during_load=%0d first_after_swap=%0d rounded_up=%0d outputs=%0d",
             n_loads, n_swaps, n_swap_ignored, n_during_load, n_after_swap, n_rounded_up, n_outputs);
    checks += 6;
    if (n_loads == 0)        begin failures++; $display("no load happened"); end
    if (n_swaps == 0)        begin failures++; $display("no swap happened"); end
    if (n_swap_ignored == 0) begin failures++; $display("no ignored swap"); end
    if (SHADOW && n_during_load == 0) begin failures++; $display("no input during a load"); end
    if (n_after_swap == 0)   begin failures++; $display("no input right after a swap"); end
    if (n_rounded_up == 0)   begin failures++; $display("rounding never rounded up"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
