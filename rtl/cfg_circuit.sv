// cfg_circuit: online configuration circuit for one coefficient.
//
// Computes the LUT contents for a coefficient c on the fly instead of storing
// them, so the kernel memory holds only the B-bit coefficient. A first pass
// of 16 cycles (run2 = 0) feeds c to the generators; a second pass of 16
// cycles (run2 = 1) feeds 2c. The CFGLUT that provides product bits 2j+1
// (O6) and 2j (O5) always taps bit 2j+1 of a generator bus: in the first
// pass that is bit 2j+1 of k*c, loaded into table[31:16]; in the second pass
// bit 2j+1 of k*2c, which is bit 2j of k*c, loaded into table[15:0]. So 32
// cycles load every CFGLUT of the coefficient at once.
//
// lsb_bus feeds the LUT rows of the unsigned (lower) chunks of x, msb_bus the
// row of the signed top chunk. Both buses are B+5 bits wide, as in the
// design. Timing: the bus carries the entry for the cycle's table address
// combinationally; controls init/load/run2 come from cfg_ctrl.
module cfg_circuit #(
  parameter int unsigned B = 8
) (
  input  logic         clk,
  input  logic [B-1:0] c,
  input  logic         run2,
  input  logic         init,
  input  logic         load,
  output logic [B+4:0] lsb_bus,
  output logic [B+4:0] msb_bus
);

  localparam int unsigned W = B + 5;

  logic [W-1:0] c_ext;
  logic [W-1:0] c_sel;

  assign c_ext = W'(signed'(c));
  assign c_sel = run2 ? (c_ext << 1) : c_ext;

  lsb_gen #(.W(W)) u_lsb (.clk(clk), .init(init), .c_in(c_sel), .entry(lsb_bus));
  msb_gen #(.W(W)) u_msb (.clk(clk), .init(init), .load(load), .c_in(c_sel), .entry(msb_bus));

endmodule
