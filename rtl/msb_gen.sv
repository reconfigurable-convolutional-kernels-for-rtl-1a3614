// msb_gen: MSB-table generator of the online configuration circuit.
//
// The most significant chunk of x is signed, so its LUT holds k*c for
// k = -1, -2, ..., -8 at addresses 15..8 and k = 7, ..., 0 at addresses 7..0.
// Entries are produced from address 15 down to 0, one per clock, from a
// three-way multiplexer (register / 0 / c<<3) followed by one adder stage
// and a register:
//   init high : 0  - c = -c        (address 15)
//   load high : 8c - c =  7c       (address 7)
//   otherwise : previous entry - c
// The multiplexer inputs 0 and c<<3 and the init/load controls follow the
// design; the adder stage subtracts c, which is the only sign that yields the
// descending address order the CFGLUT needs from those two start values.
// W is the bus width B+5; arithmetic is modulo 2^W and exact.
module msb_gen #(
  parameter int unsigned W = 13
) (
  input  logic         clk,
  input  logic         init,
  input  logic         load,
  input  logic [W-1:0] c_in,
  output logic [W-1:0] entry
);

  logic [W-1:0] acc_q;
  logic [W-1:0] base;

  always_comb begin
    unique case ({load, init})
      2'b01:   base = '0;
      2'b10:   base = c_in << 3;
      default: base = acc_q;
    endcase
  end

  assign entry = base - c_in;

  always_ff @(posedge clk) acc_q <= entry;

endmodule
