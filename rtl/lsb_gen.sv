// lsb_gen: LSB-table generator of the online configuration circuit.
//
// Produces the contents of a LUT that multiplies an unsigned 4-bit chunk k by
// the coefficient c_in, one table entry per clock, from address 15 down to 0:
// 15c, 14c, ..., c, 0. This is the order in which a CFGLUT must receive its
// bits. In the cycle init is high, the entry is 16c - c = 15c; in every later
// cycle it is the previous entry minus c. The entry is taken from the
// subtractor output (combinational), and registered for the next step.
// The structure (init multiplexer selecting c<<4 or the register, one
// subtractor, one register) follows the design; W is the bus width B+5.
// All arithmetic is modulo 2^W, which is exact because every entry fits.
module lsb_gen #(
  parameter int unsigned W = 13
) (
  input  logic         clk,
  input  logic         init,
  input  logic [W-1:0] c_in,
  output logic [W-1:0] entry
);

  logic [W-1:0] acc_q;
  logic [W-1:0] base;

  assign base  = init ? (c_in << 4) : acc_q;
  assign entry = base - c_in;

  always_ff @(posedge clk) acc_q <= entry;

endmodule
