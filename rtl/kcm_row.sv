// kcm_row: one partial-product row of the LUT-based constant multiplier.
//
// A 4-bit chunk of an input x addresses RW/2 CFGLUTs (RW = B+4 rounded up to
// even). CFGLUT j holds product bits 2j+1 (O6) and 2j (O5) of chunk * c for
// all 16 chunk values; its address is {1, chunk}, and its configuration bit
// comes from bit 2j+1 of the generator bus gen_bus (see cfg_circuit). The
// row output is the RW-bit two's-complement product, combinational from the
// chunk. With SHADOW = 1 every CFGLUT is a shadow pair (shadow_lut) and sel
// picks the active set; with SHADOW = 0 a single CFGLUT is used and loading
// overwrites the table in use. cfg_en is the shift enable of this row.
// The lowest SKIP CFGLUTs are not built and their bits read as 0: the
// kernel sets SKIP so that only LUTs whose bits all lie below the rounding
// cut of the summation are left out (they cannot affect the result).
module kcm_row #(
  parameter int unsigned B      = 8,
  parameter bit          SHADOW = 1'b1,
  parameter int unsigned SKIP   = 0,
  localparam int unsigned RW    = conv_pkg::row_width(B)
) (
  input  logic          clk,
  input  logic [3:0]    chunk,
  input  logic [B+4:0]  gen_bus,
  input  logic          cfg_en,
  input  logic          sel,
  output logic [RW-1:0] row
);

  logic [4:0] addr;
  assign addr = {1'b1, chunk};

  for (genvar j = 0; j < RW / 2; j++) begin : g_lut
    if (j < SKIP) begin : g_skipped
      assign row[2*j+1 -: 2] = 2'b00;
    end else if (SHADOW) begin : g_shadow
      shadow_lut u_lut (
        .clk(clk), .sel(sel), .cfg_en(cfg_en), .cdi(gen_bus[2*j+1]), .i(addr),
        .o5(row[2*j]), .o6(row[2*j+1])
      );
    end else begin : g_single
      logic cdo;
      cfglut u_lut (
        .clk(clk), .ce(cfg_en), .cdi(gen_bus[2*j+1]), .i(addr),
        .o5(row[2*j]), .o6(row[2*j+1]), .cdo(cdo)
      );
    end
  end

endmodule
