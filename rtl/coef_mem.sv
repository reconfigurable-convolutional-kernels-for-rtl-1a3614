// coef_mem: kernel memory holding the N coefficients of one convolution
// kernel, B bits each (N*B bits in all: with online LUT configuration the
// kernel needs no more storage than its coefficients).
//
// One synchronous write port (we, waddr, wdata) and R combinational read
// ports, one per configuration circuit. A read address at or beyond N reads
// zero. Contents reset to zero (synchronous, active-low reset). The port
// arrangement is this implementation's choice.
module coef_mem #(
  parameter int unsigned N = 9,
  parameter int unsigned B = 8,
  parameter int unsigned R = 1,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [B-1:0]         wdata,
  input  logic [R-1:0][31:0]   raddr,
  output logic [R-1:0][B-1:0]  rdata
);

  logic [B-1:0] mem_q [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < N; n++) mem_q[n] <= '0;
    end else if (we && 32'(waddr) < N) begin
      mem_q[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < R; r++) begin
      rdata[r] = (raddr[r] < N) ? mem_q[raddr[r]] : '0;
    end
  end

endmodule
