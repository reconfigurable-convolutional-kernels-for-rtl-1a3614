// cfglut: run-time reconfigurable 5-input look-up table.
//
// This is the behaviour of the FPGA CFGLUT primitive the kernel is built on,
// written as plain logic: a 32-bit table that shifts in one bit from CDI per
// clock while CE is high (the first bit shifted in ends up at table address
// 31), and is read combinationally. O6 is the 5-input function table[I4..I0];
// O5 is the 4-input function table[0,I3..I0], so with I4 tied high the LUT
// provides two independent 4-input functions: O6 from table[31:16] and O5 from
// table[15:0]. CDO is the last table bit, for chaining (left open in the
// kernel). The table powers up with the INIT parameter, like the primitive's
// INIT attribute; it has no reset, so the initial value is given in the
// declaration (Verilator notes this as PROCASSINIT, which is intended).
module cfglut #(
  parameter logic [31:0] INIT = '0
) (
  input  logic       clk,
  input  logic       ce,
  input  logic       cdi,
  input  logic [4:0] i,
  output logic       o5,
  output logic       o6,
  output logic       cdo
);

  logic [31:0] table_q = INIT;

  always_ff @(posedge clk) begin
    if (ce) table_q <= {table_q[30:0], cdi};
  end

  assign o6  = table_q[i];
  assign o5  = table_q[{1'b0, i[3:0]}];
  assign cdo = table_q[31];

endmodule
