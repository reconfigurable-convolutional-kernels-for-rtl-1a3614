// sop_sum: summation of all partial-product rows with faithful rounding.
//
// Row n*K + k is the product of chunk k of x_n with c_n (RW-bit two's
// complement) and has weight 2^(4k). The exact sum of products needs W bits;
// only the top B_O bits are output. Rather than computing the whole sum and
// truncating it, every row is cut below bit CUT = W - B_O - G before it is
// added, keeping G guard bits under the output LSB. One shared tree serves
// all coefficients, whatever their values.
//
// Rounding: let ROWS = N*K and u = 2^CUT. Cutting a row loses less than u,
// so the sum of cut rows S is below the exact value V by e in [0, ROWS*u).
// The constant C = 2^(G-1) + floor(ROWS/2) (in units of u) is added and the
// G guard bits dropped. The result differs from V by less than one output
// LSB (faithful rounding) as long as ROWS < 2^G, which the default
// G = clog2(ROWS+1) guarantees. If no bits are cut (CUT = 0), C is half an
// output LSB and the result is V rounded to nearest, ties upward.
//
// Compressor tree: the rows are reduced in carry-save form. Every level
// turns each group of four rows into two (a 4:2 compressor built from two
// rows of full adders), three leftover rows into two (one row of full
// adders), and passes one or two leftover rows on; levels repeat until two
// rows remain, and a final carry-propagate adder adds those two and C. Each
// level and the final adder end in a register, so the latency is
// clog2(ROWS) cycles (at least 1) from in_valid to out_valid: 5 for the
// default 18 rows. One new sum is accepted per cycle. The use of a
// compressor tree shared by all coefficients follows the design; the 4:2
// grouping, the register placement, the cut point, the guard bits and the
// correction constant are this implementation's choices.
module sop_sum #(
  parameter int unsigned N   = 9,
  parameter int unsigned K   = 2,
  parameter int unsigned RW  = 12,
  parameter int unsigned W   = 20,
  parameter int unsigned B_O = 8,
  parameter int unsigned G   = conv_pkg::guard_bits(N * K)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [N*K-1:0][RW-1:0]    rows,
  output logic                      out_valid,
  output logic [B_O-1:0]            o
);

  localparam int unsigned ROWS = N * K;
  localparam int unsigned CUT  = conv_pkg::cut_pos(W, B_O, G);
  localparam int unsigned WT   = W - CUT;
  localparam int unsigned SH   = WT - B_O;
  localparam logic [WT-1:0] C  = (CUT > 0) ? WT'((1 << (SH - 1)) + ROWS / 2)
                                           : ((SH > 0) ? WT'(1 << (SH - 1)) : '0);

  // Rows left after one compressor level acting on m rows.
  function automatic int unsigned next_cnt(input int unsigned m);
    return (m / 4) * 2 + ((m % 4 == 3) ? 2 : m % 4);
  endfunction

  // Rows left after l compressor levels.
  function automatic int unsigned cnt(input int unsigned l);
    int unsigned m;
    m = ROWS;
    for (int unsigned i = 0; i < l; i++) m = next_cnt(m);
    return m;
  endfunction

  // Number of compressor levels needed to reach two rows.
  function automatic int unsigned num_levels();
    int unsigned m, l;
    m = ROWS; l = 0;
    while (m > 2) begin m = next_cnt(m); l++; end
    return l;
  endfunction

  localparam int unsigned NL  = num_levels();
  localparam int unsigned LAT = NL + 1;

  // Full-adder row (3:2 compressor), modulo 2^WT.
  function automatic logic [1:0][WT-1:0] csa(input logic [WT-1:0] a, b, c);
    csa[0] = a ^ b ^ c;
    csa[1] = ((a & b) | (a & c) | (b & c)) << 1;
  endfunction

  for (genvar l = 0; l <= NL; l++) begin : g_lvl
    logic [WT-1:0] v [ROWS];
    if (l == 0) begin : g_in
      always_comb begin
        for (int unsigned r = 0; r < ROWS; r++) begin
          logic [W-1:0] ext;
          ext  = W'(signed'(rows[r])) << (conv_pkg::CHUNK_W * (r % K));
          v[r] = ext[W-1:CUT];
        end
      end
    end else begin : g_cmp
      localparam int unsigned M  = cnt(l - 1);  // rows in
      localparam int unsigned GR = M / 4;       // full 4:2 groups
      localparam int unsigned LO = M % 4;       // leftover rows
      always_ff @(posedge clk) begin
        logic [1:0][WT-1:0] t1, t2;
        for (int unsigned i = 0; i < ROWS; i++) v[i] <= '0;
        for (int unsigned g = 0; g < GR; g++) begin
          t1 = csa(g_lvl[l-1].v[4*g], g_lvl[l-1].v[4*g+1], g_lvl[l-1].v[4*g+2]);
          t2 = csa(t1[0], t1[1], g_lvl[l-1].v[4*g+3]);
          v[2*g]   <= t2[0];
          v[2*g+1] <= t2[1];
        end
        if (LO == 3) begin
          t1 = csa(g_lvl[l-1].v[4*GR], g_lvl[l-1].v[4*GR+1], g_lvl[l-1].v[4*GR+2]);
          v[2*GR]   <= t1[0];
          v[2*GR+1] <= t1[1];
        end else begin
          for (int unsigned j = 0; j < LO; j++) v[2*GR+j] <= g_lvl[l-1].v[4*GR+j];
        end
      end
    end
  end

  // Final carry-propagate adder with the rounding constant.
  logic [WT-1:0] sum_q;
  always_ff @(posedge clk) begin
    if (cnt(NL) > 1) sum_q <= g_lvl[NL].v[0] + g_lvl[NL].v[1] + C;
    else             sum_q <= g_lvl[NL].v[0] + C;
  end

  logic [LAT:0] vld_q;
  always_ff @(posedge clk) begin
    if (!rst_n) vld_q[LAT:1] <= '0;
    else        vld_q[LAT:1] <= vld_q[LAT-1:0];
  end
  assign vld_q[0] = in_valid;

  assign o         = sum_q[WT-1:SH];
  assign out_valid = vld_q[LAT];

endmodule
