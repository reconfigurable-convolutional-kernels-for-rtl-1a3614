// sop_sum_check: drives one sop_sum instance with the partial-product rows of
// random kernels (random B-bit x_n and c_n, chunked as the kernel does) and
// checks every output two ways: bit-exactly against a model of the cut,
// the correction constant and the final shift, and against the exact sum of
// products (the result must be within one output LSB: faithful rounding).
// It also checks that every result appears exactly LV = clog2(N*K) cycles
// after its input. Results are reported through checks/failures once done.
module sop_sum_check #(
  parameter int unsigned N   = 9,
  parameter int unsigned B   = 8,
  parameter int unsigned B_O = 8,
  parameter int unsigned G   = $clog2(N * conv_pkg::num_chunks(B) + 1),
  parameter int unsigned VECTORS = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   rounded_up,
  output logic finished
);
  localparam int unsigned K    = conv_pkg::num_chunks(B);
  localparam int unsigned RW   = conv_pkg::row_width(B);
  localparam int unsigned W    = conv_pkg::full_width(B, N);
  localparam int unsigned ROWS = N * K;
  localparam int unsigned CUT  = (W > B_O + G) ? W - B_O - G : 0;
  localparam int unsigned WT   = W - CUT;
  localparam int unsigned SH   = WT - B_O;
  localparam int unsigned LV   = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam longint      C    = (CUT > 0) ? (longint'(1) << (SH - 1)) + ROWS / 2
                                           : ((SH > 0) ? (longint'(1) << (SH - 1)) : 0);

  logic in_valid = 1'b0;
  logic [ROWS-1:0][RW-1:0] rows = '0;
  logic out_valid;
  logic [B_O-1:0] o;

  sop_sum #(.N(N), .K(K), .RW(RW), .W(W), .B_O(B_O), .G(G)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .rows(rows), .out_valid(out_valid), .o(o));

  longint exp_bits [$];
  longint exp_v [$];
  int     exp_cyc [$];
  int     cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    longint v, s, p, xv, cv, ch, xs;
    int sent;
    checks = 0; failures = 0; rounded_up = 0; finished = 1'b0; sent = 0;
    @(posedge rst_n);
    while (sent < VECTORS) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        v = 0; s = 0;
        for (int n = 0; n < N; n++) begin
          xv = longint'($urandom_range(0, (1 << B) - 1)) - (longint'(1) << (B - 1));
          cv = longint'($urandom_range(0, (1 << B) - 1)) - (longint'(1) << (B - 1));
          if (sent < 4) begin  // extreme kernels first
            xv = (sent[0]) ? (longint'(1) << (B - 1)) - 1 : -(longint'(1) << (B - 1));
            cv = (sent[1]) ? (longint'(1) << (B - 1)) - 1 : -(longint'(1) << (B - 1));
          end
          v += xv * cv;
          xs = xv;
          for (int k = 0; k < K; k++) begin
            ch = xs & 15;
            if (k == K - 1) ch = (ch >= 8) ? ch - 16 : ch;
            xs = xs >>> 4;
            p = ch * cv;
            rows[n*K + k] = RW'(p);
            s += (p <<< (4 * k)) >>> CUT;
          end
        end
        s = ((s + C) & ((longint'(1) << WT) - 1)) >> SH;
        exp_bits.push_back(s);
        exp_v.push_back(v);
        exp_cyc.push_back(cyc);
        sent++;
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LV + 3) @(negedge clk);
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("missing outputs: %0d", exp_bits.size()); end
    finished = 1'b1;
  end

  always @(posedge clk) begin
    longint eb, ev, got, diff, ulp;
    int ec;
    if (rst_n && out_valid) begin
      if (exp_bits.size() == 0) begin
        checks++; failures++; $display("unexpected output");
      end else begin
        eb = exp_bits.pop_front(); ev = exp_v.pop_front(); ec = exp_cyc.pop_front();
        got  = longint'($signed(o));
        ulp  = longint'(1) << (W - B_O);
        diff = got * ulp - ev;
        checks += 3;
        if (longint'(o) != eb) begin
          failures++; $display("N=%0d B=%0d: o=%0h expected %0h", N, B, o, eb);
        end
        if (diff >= ulp || diff <= -ulp) begin
          failures++; $display("N=%0d B=%0d: not faithful, o=%0d exact=%0d", N, B, got, ev);
        end
        if (cyc - ec != int'(LV)) begin
          failures++; $display("N=%0d B=%0d: latency %0d expected %0d", N, B, cyc - ec, LV);
        end
        if (diff > 0) rounded_up++;
      end
    end
  end
endmodule
