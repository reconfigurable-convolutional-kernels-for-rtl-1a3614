// cfg_ctrl: sequencer of the online reconfiguration.
//
// A pulse on start (ignored while busy) loads new LUT contents for all N
// coefficients. There are R configuration circuits working in lockstep;
// circuit r handles coefficients r, r+R, r+2R, ..., one per 32-cycle slot,
// so a full load takes 32 * ceil(N/R) cycles (32 cycles for R = N, 32N for
// R = 1). In slot s, the coefficients n with n / R == s have their CFGLUT
// shift enable cfg_en[n] high.
//
// Within a slot, cycle t = 0..31 loads table address 31 - t: cycles 0..15
// use c (run2 = 0), cycles 16..31 use 2c (run2 = 1); init restarts both
// generators at t = 0 and 16, and load restarts the signed (MSB) generator
// at address 7, i.e. t = 8 and 24.
//
// sel names the active LUT set of the shadow LUTs; the load always writes
// the idle set. A pulse on swap flips sel in the same clock (zero switching
// time); it is ignored while a load runs so that no half-written set can
// become active. done pulses for one cycle after the last shift. Reset is
// synchronous and active low; the 32-cycle load time follows the design,
// the handshake (start/busy/done/swap) is this implementation's choice.
module cfg_ctrl #(
  parameter int unsigned N = 9,
  parameter int unsigned R = 1,
  localparam int unsigned SLOTS = (N + R - 1) / R,
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     swap,
  output logic                     busy,
  output logic                     done,
  output logic                     init,
  output logic                     load,
  output logic                     run2,
  output logic [SW-1:0]            slot,
  output logic [N-1:0]             cfg_en,
  output logic                     sel
);

  logic [$clog2(conv_pkg::CFG_BITS)-1:0] cyc_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cyc_q <= '0;
      slot  <= '0;
      sel   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          cyc_q <= '0;
          slot  <= '0;
        end else if (swap) begin
          sel <= ~sel;
        end
      end else begin
        cyc_q <= cyc_q + 5'd1;
        if (cyc_q == 5'd31) begin
          if (32'(slot) == SLOTS - 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            slot <= slot + 1'b1;
          end
        end
      end
    end
  end

  assign init = busy && (cyc_q[3:0] == 4'd0);
  assign load = busy && (cyc_q[3:0] == 4'd8);
  assign run2 = cyc_q[4];

  always_comb begin
    for (int unsigned n = 0; n < N; n++) begin
      cfg_en[n] = busy && (n / R == 32'(slot));
    end
  end

  // The two generator restarts never coincide.
  a_init_load_exclusive: assert property (@(posedge clk) !(init && load));

endmodule
