// conv_core: reconfigurable convolution kernel, o = sum_{n<N} x_n * c_n.
//
// The kernel multiplies N inputs by N coefficients that change rarely
// (weight-stationary convolution) without any embedded multiplier. Every
// input x_n (B bits, two's complement) is sign-extended to K = ceil(B/4)
// chunks of 4 bits; each chunk addresses a row of run-time reconfigurable
// LUTs (kcm_row) holding chunk * c_n, so the products are table look-ups.
// The rows of all coefficients go through one summation tree (sop_sum) that
// rounds faithfully to B_O output bits. Because the LUT contents are tables,
// the same hardware serves any coefficient values: new coefficients are
// written to the kernel memory (coef_mem) and the tables are recomputed
// online by R configuration circuits (cfg_circuit) under cfg_ctrl. Each
// coefficient takes 32 cycles, so a full load takes 32*ceil(N/R) cycles.
// With SHADOW = 1 every LUT is doubled (shadow_lut): the load writes the
// idle set while the active set keeps computing, and swap makes the new set
// active in the same cycle.
//
// Interface:
//   coef_we/coef_addr/coef_data  write coefficient coef_addr (B bits)
//   cfg_start  pulse: compute the LUT contents of all coefficients from the
//              kernel memory (into the idle set if SHADOW); cfg_busy is high
//              for 32*ceil(N/R) cycles, cfg_done pulses after the last one
//   swap       pulse, honoured when not busy: flips active_set
//   in_valid/x one input vector per cycle; x[n] is x_n
//   out_valid/o  the rounded sum, clog2(N*K) cycles later (at least 1)
// The top B_O bits of the exact W = 2B + clog2(N) bit sum are returned, so
// o approximates (sum x_n c_n) / 2^(W - B_O) to within one LSB. With
// SHADOW = 0, inputs are dropped (no out_valid) while a load runs.
//
// What follows the design: chunked LUT multiplication, CFGLUT rows, the
// online LSB/MSB table generators with their 32-cycle load, shadow LUTs,
// the shared summation tree with faithful rounding (LUTs whose bits all fall
// below the rounding cut are left out), and the default size
// (3 x 3 kernel, 8-bit words, one configuration circuit, shadow LUTs). The
// handshake, the output word size and scaling, the 4:2 structure of the
// compressor tree and the reset behaviour are this implementation's choices.
module conv_core #(
  parameter int unsigned N      = 9,
  parameter int unsigned B      = 8,
  parameter int unsigned B_O    = 8,
  parameter int unsigned R      = 1,
  parameter bit          SHADOW = 1'b1,
  localparam int unsigned AW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // kernel memory write port
  input  logic                coef_we,
  input  logic [AW-1:0]       coef_addr,
  input  logic [B-1:0]        coef_data,
  // reconfiguration control
  input  logic                cfg_start,
  output logic                cfg_busy,
  output logic                cfg_done,
  input  logic                swap,
  output logic                active_set,
  // data path
  input  logic                in_valid,
  input  logic [N-1:0][B-1:0] x,
  output logic                out_valid,
  output logic [B_O-1:0]      o
);

  import conv_pkg::*;

  localparam int unsigned K     = num_chunks(B);
  localparam int unsigned RW    = row_width(B);
  localparam int unsigned GW    = gen_width(B);
  localparam int unsigned W     = full_width(B, N);
  localparam int unsigned G     = guard_bits(N * K);
  localparam int unsigned CUT   = cut_pos(W, B_O, G);
  localparam int unsigned SLOTS = (N + R - 1) / R;
  localparam int unsigned SW    = (SLOTS > 1) ? $clog2(SLOTS) : 1;

  // ---------------------------------------------------------------- control
  logic          init, load, run2;
  logic [SW-1:0] slot;
  logic [N-1:0]  cfg_en;
  logic          sel;

  cfg_ctrl #(.N(N), .R(R)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(cfg_start), .swap(swap && SHADOW),
    .busy(cfg_busy), .done(cfg_done), .init(init), .load(load), .run2(run2),
    .slot(slot), .cfg_en(cfg_en), .sel(sel)
  );

  assign active_set = sel;

  // ---------------------------------------------------------- kernel memory
  logic [R-1:0][31:0]  raddr;
  logic [R-1:0][B-1:0] coef;

  always_comb begin
    for (int unsigned r = 0; r < R; r++) raddr[r] = 32'(slot) * R + r;
  end

  coef_mem #(.N(N), .B(B), .R(R)) u_mem (
    .clk(clk), .rst_n(rst_n), .we(coef_we), .waddr(coef_addr), .wdata(coef_data),
    .raddr(raddr), .rdata(coef)
  );

  // ------------------------------------------ online configuration circuits
  logic [R-1:0][GW-1:0] lsb_bus, msb_bus;

  for (genvar r = 0; r < R; r++) begin : g_cfg
    cfg_circuit #(.B(B)) u_cfg (
      .clk(clk), .c(coef[r]), .run2(run2), .init(init), .load(load),
      .lsb_bus(lsb_bus[r]), .msb_bus(msb_bus[r])
    );
  end

  // -------------------------------------------------------------- LUT array
  logic [N*K-1:0][RW-1:0] rows;

  for (genvar n = 0; n < N; n++) begin : g_coef
    logic [K*CHUNK_W-1:0] xe;
    assign xe = (K*CHUNK_W)'(signed'(x[n]));
    for (genvar k = 0; k < K; k++) begin : g_chunk
      // The top chunk is signed and takes the MSB table; the others the LSB
      // table. LUTs that only hold bits below the rounding cut are not built.
      kcm_row #(.B(B), .SHADOW(SHADOW), .SKIP(skipped_luts(CUT, k, RW))) u_row (
        .clk(clk), .chunk(xe[k*CHUNK_W +: CHUNK_W]),
        .gen_bus((k == K - 1) ? msb_bus[n % R] : lsb_bus[n % R]),
        .cfg_en(cfg_en[n]), .sel(sel), .row(rows[n*K + k])
      );
    end
  end

  // ------------------------------------------------------------- summation
  sop_sum #(.N(N), .K(K), .RW(RW), .W(W), .B_O(B_O), .G(G)) u_sum (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid && (SHADOW || !cfg_busy)),
    .rows(rows), .out_valid(out_valid), .o(o)
  );

  // The configuration circuits read the kernel memory slot by slot, so it
  // must not change while a load runs.
  a_no_coef_write_during_load: assert property (
    @(posedge clk) disable iff (!rst_n) !(coef_we && cfg_busy));

endmodule
