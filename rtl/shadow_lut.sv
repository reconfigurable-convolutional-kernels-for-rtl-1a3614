// shadow_lut: two CFGLUTs that share their address inputs, so that one can be
// reloaded while the other is in use.
//
// sel chooses the active LUT: sel = 0 makes LUT A drive o5/o6 and lets the
// shift enable cfg_en reach LUT B; sel = 1 does the opposite. Loading the
// idle LUT takes 32 cycles in the background; flipping sel then switches to
// the new contents in the same cycle, so the reconfiguration costs no
// throughput. The output multiplexers are the LUT6 that follows the two
// CFGLUTs. The pairing and the output multiplexing follow the shadow-LUT
// structure of the design; gating CE with cfg_en (so that the idle LUT keeps
// its contents when no load runs) is this implementation's choice.
module shadow_lut (
  input  logic       clk,
  input  logic       sel,
  input  logic       cfg_en,
  input  logic       cdi,
  input  logic [4:0] i,
  output logic       o5,
  output logic       o6
);

  logic a_o5, a_o6, b_o5, b_o6;
  logic a_cdo, b_cdo;

  cfglut u_a (.clk(clk), .ce(cfg_en & sel),  .cdi(cdi), .i(i), .o5(a_o5), .o6(a_o6), .cdo(a_cdo));
  cfglut u_b (.clk(clk), .ce(cfg_en & ~sel), .cdi(cdi), .i(i), .o5(b_o5), .o6(b_o6), .cdo(b_cdo));

  assign o5 = sel ? b_o5 : a_o5;
  assign o6 = sel ? b_o6 : a_o6;

endmodule
