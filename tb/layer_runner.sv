// layer_runner: runs one convolution kernel instance through a sequence of
// KERNELS kernels, O operations (input vectors) per kernel, as a layer of a
// network does, and counts the cycles the reconfiguration costs.
//
// With SHADOW = 1 the next kernel is loaded into the idle LUT set while the
// O operations of the current kernel stream through, one per cycle; the sets
// are swapped as soon as both the O operations and the load are finished.
// The cycles the stream had to wait for a load are the configuration
// overhead, expected to be max(0, T - O) per kernel with T = 32*ceil(N/R).
// With SHADOW = 0 each load must finish before streaming (overhead T).
// Every output is checked bit-exactly against a model and for faithful
// rounding (within one output LSB of the exact sum of products), and for
// its latency clog2(N*K).
module layer_runner #(
  parameter int unsigned N       = 9,
  parameter int unsigned B       = 8,
  parameter int unsigned B_O     = 8,
  parameter int unsigned R       = 1,
  parameter bit          SHADOW  = 1'b1,
  parameter int unsigned O       = 64,
  parameter int unsigned KERNELS = 3
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   overhead_cycles,
  output logic finished
);
  localparam int unsigned K    = conv_pkg::num_chunks(B);
  localparam int unsigned W    = conv_pkg::full_width(B, N);
  localparam int unsigned ROWS = N * K;
  localparam int unsigned G    = $clog2(ROWS + 1);
  localparam int unsigned CUT  = (W > B_O + G) ? W - B_O - G : 0;
  localparam int unsigned WT   = W - CUT;
  localparam int unsigned SH   = WT - B_O;
  localparam int unsigned LV   = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned T    = 32 * ((N + R - 1) / R);
  localparam longint      C    = (CUT > 0) ? (longint'(1) << (SH - 1)) + ROWS / 2
                                           : ((SH > 0) ? (longint'(1) << (SH - 1)) : 0);
  localparam int unsigned AW   = (N > 1) ? $clog2(N) : 1;

  logic coef_we = 1'b0;
  logic [AW-1:0] coef_addr = '0;
  logic [B-1:0] coef_data = '0;
  logic cfg_start = 1'b0, cfg_busy, cfg_done, swap = 1'b0, active_set;
  logic in_valid = 1'b0;
  logic [N-1:0][B-1:0] x = '0;
  logic out_valid;
  logic [B_O-1:0] o;

  conv_core #(.N(N), .B(B), .B_O(B_O), .R(R), .SHADOW(SHADOW)) dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .cfg_start(cfg_start), .cfg_busy(cfg_busy), .cfg_done(cfg_done), .swap(swap),
    .active_set(active_set), .in_valid(in_valid), .x(x), .out_valid(out_valid), .o(o)
  );

  longint kset [2][N];
  longint mem [N];
  longint exp_bits [$];
  longint exp_v [$];
  int     exp_cyc [$];
  int     cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint sx(input longint v, input int bits);
    return (v >= (longint'(1) << (bits - 1))) ? v - (longint'(1) << bits) : v;
  endfunction

  // Coefficient memory writes happen through a port the stream does not use.
  task automatic write_kernel();
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = AW'(n); coef_data = B'($urandom);
      mem[n] = sx(longint'(coef_data), B);
    end
    @(negedge clk); coef_we = 1'b0;
  endtask

  // One operation per call, in the current cycle.
  task automatic op();
    longint v, s, p, xv, xs, ch, cv;
    int set;
    @(negedge clk);
    in_valid = 1'b1; swap = 1'b0; cfg_start = 1'b0;
    for (int n = 0; n < N; n++) x[n] = B'($urandom);
    #1;
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
  endtask

  always @(posedge clk) begin
    longint eb, ev, got, diff, ulp;
    int ec;
    if (rst_n && out_valid) begin
      if (exp_bits.size() == 0) begin
        checks++; failures++; $display("unexpected output");
      end else begin
        eb = exp_bits.pop_front(); ev = exp_v.pop_front(); ec = exp_cyc.pop_front();
        got  = sx(longint'(o), B_O);
        ulp  = longint'(1) << (W - B_O);
        diff = got * ulp - ev;
        checks += 3;
        if (longint'(o) != eb) begin failures++; $display("N=%0d R=%0d: o=%0h expected %0h", N, R, o, eb); end
        if (diff >= ulp || diff <= -ulp) begin failures++; $display("N=%0d: not faithful", N); end
        if (cyc - ec != int'(LV)) begin failures++; $display("N=%0d: latency %0d", N, cyc - ec); end
      end
    end
  end

  initial begin
    int target, expected;
    checks = 0; failures = 0; overhead_cycles = 0; finished = 1'b0;
    for (int s = 0; s < 2; s++) for (int n = 0; n < N; n++) kset[s][n] = 0;
    @(posedge rst_n);
    // first kernel: load and make it active before the layer starts
    write_kernel();
    @(negedge clk); cfg_start = 1'b1;
    @(negedge clk); cfg_start = 1'b0;
    wait (!cfg_busy);
    for (int n = 0; n < N; n++) kset[SHADOW ? 1 : 0][n] = mem[n];
    if (SHADOW) begin @(negedge clk); swap = 1'b1; @(negedge clk); swap = 1'b0; end
    for (int kern = 0; kern < KERNELS; kern++) begin
      // the next kernel's coefficients go to memory ahead of the window
      write_kernel();
      target = SHADOW ? int'(~active_set) : 0;
      if (SHADOW) begin
        // start the load in the first operation cycle of this window
        @(negedge clk); in_valid = 1'b0; cfg_start = 1'b1;
        @(posedge clk);
        for (int i = 0; i < int'(O); i++) op();
        @(negedge clk); in_valid = 1'b0;
        while (cfg_busy) begin @(negedge clk); overhead_cycles++; end
        for (int n = 0; n < N; n++) kset[target][n] = mem[n];
        swap = 1'b1;
        @(negedge clk); swap = 1'b0;
        expected = (T > O) ? int'(T - O) : 0;
      end else begin
        for (int i = 0; i < int'(O); i++) op();
        @(negedge clk); in_valid = 1'b0; cfg_start = 1'b1;
        @(negedge clk); cfg_start = 1'b0;
        overhead_cycles++;
        while (cfg_busy) begin @(negedge clk); overhead_cycles++; end
        for (int n = 0; n < N; n++) kset[target][n] = mem[n];
        expected = int'(T) + 1;
      end
      $display("N=%0d B=%0d R=%0d shadow=%0d O=%0d: kernel %0d, configuration overhead %0d cycles",
               N, B, R, SHADOW, O, kern, overhead_cycles);
      checks++;
      if (overhead_cycles != expected) begin
        failures++; $display("overhead %0d expected %0d", overhead_cycles, expected);
      end
      overhead_cycles = 0;
    end
    @(negedge clk); swap = 1'b0; in_valid = 1'b0;
    repeat (LV + 3) @(negedge clk);
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("outputs missing"); end
    finished = 1'b1;
  end
endmodule
