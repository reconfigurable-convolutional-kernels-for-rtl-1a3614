# Reconfigurable LUT-based convolution kernel

Convolution layers in a neural-network accelerator are mostly weight
stationary: one set of kernel coefficients is used for thousands of input
windows before it changes. This RTL uses that. It computes one kernel output

    o = x_0*c_0 + x_1*c_1 + ... + x_{N-1}*c_{N-1}

per clock cycle without any hardware multiplier. The products come from
look-up tables that hold `chunk * c_n` for every possible 4-bit chunk of the
input. The tables sit in run-time reconfigurable FPGA LUTs (CFGLUTs), so a
new kernel needs no new bitstream: its tables are reloaded in 32 clock cycles
per coefficient. The table contents are computed on the fly from the
coefficients by a small adder circuit, so the kernel memory holds only the
N coefficients. Each LUT can be doubled ("shadow LUTs"): the next kernel is
then loaded into the idle copy while the current one keeps computing, and the
switch costs zero cycles.

The default build is a 3 x 3 kernel (N = 9) with 8-bit inputs, 8-bit
coefficients and an 8-bit result, one configuration circuit (R = 1) and
shadow LUTs.

## From a product to table look-ups

Every input `x_n` (B bits, two's complement) is sign-extended to K = ceil(B/4)
chunks of 4 bits. Chunk k has weight 2^(4k):

    x_n * c_n = sum_k chunk_k(x_n) * c_n * 2^(4k)

The lower chunks are unsigned (0..15). The top chunk carries the sign
(-8..7). Each chunk addresses one *row* of LUTs (`kcm_row`) that returns
`chunk * c_n` as a (B+4)-bit two's-complement number. The kernel therefore
has N*K rows. For the default that is 9 * 2 = 18 rows of 12 bits.

A row is built from CFGLUTs (`cfglut`). A CFGLUT is a 5-input LUT whose
32-bit table is loaded serially: one bit per clock through `cdi` while `ce`
is high. The first bit shifted in ends up at address 31. With address bit I4
tied high, one CFGLUT serves as two 4-input LUTs:

* `O6` reads table[31:16], indexed by the chunk;
* `O5` reads table[15:0], indexed by the chunk.

So CFGLUT j of a row delivers product bits 2j+1 (`O6`) and 2j (`O5`), and a
row needs ceil((B+4)/2) CFGLUTs. That is 6 per row for B = 8.

All rows are combinational. The product of a chunk is available in the same
cycle the chunk is applied.

## Computing the tables online (`cfg_circuit`, `lsb_gen`, `msb_gen`)

This is the least obvious part of the design. Storing complete tables would
take 32 bits per CFGLUT, up to 12 CFGLUTs per 8-bit coefficient. Instead, a
configuration circuit generates the table entries of one coefficient at a
time, in the order the CFGLUTs need them.

**Entry order.** A CFGLUT must receive address 31 first. With I4 = 1, the
first 16 shifted bits become table[31:16] (the `O6` table, addresses 15 down
to 0). The next 16 bits become table[15:0] (the `O5` table, again 15 down to
0). So each pass walks the 16 chunk values downward, from 15 to 0.

**Unsigned table (`lsb_gen`).** A register and a subtractor. On `init` the
subtractor sees 16c, so the first entry is 16c - c = 15c. Each later entry is
the previous one minus c: 15c, 14c, ..., c, 0.

**Signed table (`msb_gen`).** Addresses 15..8 stand for chunk values -1..-8,
and addresses 7..0 for 7..0. On `init` the base is 0 and the entry is -c.
Each step then subtracts c, down to -8c. At address 7, `load` switches the
base to 8c, which gives 7c. The steps continue down to 0.

**Two bits per CFGLUT from one tap.** The entry bus is B+5 bits wide. The
CFGLUT that holds product bits 2j+1 and 2j always takes bus bit 2j+1 as its
`cdi`:

* In the first pass (`run2` = 0) the generators are fed c. Bus bit 2j+1 is
  then bit 2j+1 of k*c. It goes into table[31:16], which `O6` reads.
* In the second pass (`run2` = 1) the generators are fed 2c. Bit 2j+1 of
  k*2c is bit 2j of k*c. It goes into table[15:0], which `O5` reads.

This is why the bus is B+5 bits wide: 15 * 2c needs B+5 bits. It also means
all CFGLUTs of one coefficient load in parallel. Every row of a coefficient
gets its table in 32 cycles. All unsigned rows of a coefficient share the
`lsb_gen` bus, because their tables are identical.

**Sequencing (`cfg_ctrl`).** R configuration circuits run in lockstep.
Circuit r handles coefficients r, r+R, r+2R, ..., one per 32-cycle slot. A
full reload therefore takes T = 32 * ceil(N/R) cycles:

* 288 cycles for the default (N = 9, R = 1);
* 32 cycles with one circuit per coefficient (R = N).

Within a slot, cycle t loads address 31 - t:

* `init` is high at t = 0 and t = 16;
* `load` is high at t = 8 and t = 24;
* `run2` is high for t >= 16.

## Shadow LUTs and switching kernels (`shadow_lut`)

With `SHADOW = 1` every CFGLUT is a pair that shares the address and the
configuration input. `sel` (the `active_set` output) picks which copy drives
`O5`/`O6`. The shift enable only reaches the other, idle copy. A reload
therefore never disturbs the running computation. When it is done, `swap`
flips `sel`. The input presented in the next cycle already uses the new
kernel.

The reload is hidden completely as long as a kernel is used for at least
T = 32 * ceil(N/R) operations. For layers with fewer operations per kernel,
raise R (more configuration circuits). Up to T - O stall cycles per kernel
remain otherwise.

With `SHADOW = 0` there is one CFGLUT per position (half the LUTs). Inputs
presented while `cfg_busy` is high produce no output.

## Summation and faithful rounding (`sop_sum`)

The exact sum needs W = 2B + clog2(N) bits: 20 for the default. Only the top
`B_O` bits are returned:

    o ~ (sum x_n*c_n) / 2^(W - B_O)

The result is *faithfully* rounded. It is one of the two representable
values next to the exact result, so its error is less than one LSB of `o`.

That allows a cheaper adder and fewer LUTs. Every row is cut below bit
CUT = W - B_O - G before the addition. This keeps G guard bits under the
output LSB. A CFGLUT whose two product bits both lie below the cut is not
built at all (`SKIP` of `kcm_row`, computed by `conv_core`). For the default,
the lower row of each coefficient loses 3 of its 6 CFGLUTs and the upper row
loses 1.

Each cut loses less than one guard-bit unit u = 2^CUT. The cut sum therefore
lies below the exact value V by e, with 0 <= e < ROWS*u (ROWS = N*K). The
tree then does two things:

1. It adds the constant C = 2^(G-1) + floor(ROWS/2) (in units of u).
2. It drops the G guard bits.

The result then lies within (-2^G, +2^G) units of V, i.e. within one output
LSB, provided ROWS < 2^G. The default G = clog2(ROWS + 1) is the smallest G
that meets this. For the default, ROWS = 18, G = 5, CUT = 7 and the adders
are 13 bits wide. If W - B_O - G <= 0, nothing is cut and the result is V
rounded to nearest (ties upward).

The rows are added by a carry-save compressor tree, one tree for all
coefficients. Each level turns every group of four rows into two (a 4:2
compressor made of two rows of full adders). Three leftover rows become two
through one row of full adders; one or two leftover rows pass unchanged.
When two rows remain, a carry-propagate adder adds them together with C.
Every level and the final adder end in a register. The latency is therefore
clog2(N*K) cycles (at least 1), and one result comes out per cycle. For the
default, 18 rows shrink to 10, 6, 4 and 2 rows, then the final adder runs:
5 cycles.
`W` keeps one spare top bit, so the rounding constant cannot overflow.

## Interface and timing of `conv_core`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `coef_we`, `coef_addr`, `coef_data` | in | 1, clog2(N), B | write coefficient `coef_addr` into the kernel memory |
| `cfg_start` | in | 1 | pulse: compute the tables of all N coefficients (into the idle set if `SHADOW`) |
| `cfg_busy` | out | 1 | high for exactly 32*ceil(N/R) cycles after the start |
| `cfg_done` | out | 1 | one-cycle pulse after the last load cycle |
| `swap` | in | 1 | pulse: flip `active_set`; ignored while `cfg_busy` |
| `active_set` | out | 1 | which shadow copy computes |
| `in_valid`, `x` | in | 1, N x B | one input vector per cycle, `x[n]` = x_n |
| `out_valid`, `o` | out | 1, B_O | result, clog2(N*K) cycles after the input |

Typical use: write new coefficients, pulse `cfg_start`, keep streaming, wait
for `cfg_done`, then pulse `swap`. Two rules apply:

* Do not write the kernel memory while a load is running. The circuits read
  it slot by slot.
* `cfg_start` while busy is ignored.

| parameter | default | meaning |
|---|---|---|
| `N` | 9 | coefficients per kernel (3 x 3) |
| `B` | 8 | word size of inputs and coefficients |
| `B_O` | 8 | output word size |
| `R` | 1 | configuration circuits; load time 32*ceil(N/R) |
| `SHADOW` | 1 | double every LUT to hide the load |

At the defaults: 18 rows with 72 shadow CFGLUT pairs in all (144 CFGLUTs,
after leaving out those below the rounding cut), a load time of 288 cycles
and a latency of 5 cycles.

## Files

| file | contents |
|---|---|
| `rtl/conv_pkg.sv` | chunk width, table size, size functions |
| `rtl/conv_core.sv` | top level: memory, configuration circuits, LUT array, summation |
| `rtl/cfg_ctrl.sv` | load sequencer and shadow-set select |
| `rtl/coef_mem.sv` | N x B kernel memory, one write port, R read ports |
| `rtl/cfg_circuit.sv` | c / 2c selection feeding the two table generators |
| `rtl/lsb_gen.sv`, `rtl/msb_gen.sv` | unsigned and signed table generators |
| `rtl/kcm_row.sv` | one row of CFGLUTs: chunk * c |
| `rtl/shadow_lut.sv` | CFGLUT pair with output select |
| `rtl/cfglut.sv` | plain-logic model of the reconfigurable LUT primitive |
| `rtl/sop_sum.sv` | cut rows, compressor tree, faithful rounding |

`cfglut.sv` describes the behaviour of the vendor CFGLUT primitive. For an
FPGA build you may map it onto the primitive itself (CFGLUT5 with
`O6`/`O5`). Synthesised as written it becomes 32 flip-flops and a
multiplexer per LUT.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

* `tb_conv_core` runs the top at its default parameters end to end:
  * it writes six kernels, including all -128 and all +127;
  * it reloads while inputs stream;
  * it swaps sets, and also tries a swap during a load;
  * it checks every output bit-exactly against a model and for faithful
    rounding;
  * it checks the 5-cycle latency and the 288-cycle load;
  * it counts that each mechanism occurred.
* `tb_layers` runs convolution layers with O operations per kernel, as in
  DarkNet19 (3 x 3 with O = 64 and 256, 1 x 1 with O = 64). It measures the
  stall cycles caused by reloading: 0 when 32*ceil(N/R) <= O, T - O
  otherwise, and T + 1 without shadow LUTs. It also covers 12-bit words
  (three chunks) and R = 2, 3, 5.
* `tb_sizes` builds the kernel at 5 x 5, 7 x 7, 9 x 9 and 11 x 11 with
  4- to 12-bit words and checks results, latency and reload stalls there.
* `tb_sop_sum` covers three sizes. One is three 12-bit products rounded to
  12 bits with 4 guard bits.
* `tb_cfg_circuit` rebuilds the table each CFGLUT receives and checks it
  against chunk * c.

Run one testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl rtl/conv_pkg.sv tb/tb_conv_core.sv \
        -y rtl -y tb --top-module tb_conv_core -o sim
    ./obj_dir/sim

Replace `tb_conv_core` by any other `tb_*` name. Each finishes within a
minute, most within seconds.

## Where this RTL departs from the original design, and its limits

* **Compressor tree structure and latency.** A compressor tree is called
  for, but its structure is not given. The 4:2 tree with one register per
  level is this design's own. Its latency clog2(N*K) matches the published
  latency of the 3 x 3, 8-bit configuration (5 cycles) and several others.
  It differs at other sizes: for 3 x 3 with 12-bit words it gives 5 cycles
  against 6, and for 11 x 11 with 8-bit words 8 against 10.
* **Rounding details are this design's own.** This covers the cut position,
  the number of guard bits, the correction constant and the output scaling
  (top B_O bits of the exact sum). The faithful-rounding guarantee is proven
  above and checked in simulation. The published example (three 12-bit
  products, 12-bit result, 4 guard bits) is one of the tested sizes.
* **Sign of the signed-table generator.** That generator is drawn with an
  adder. Here it subtracts c, because with the start values 0 and 8c and the
  descending load order nothing else yields the table.
* **Signedness.** Inputs and coefficients are taken as two's complement.
* **Not included.** The variant that loads complete, precomputed tables from
  memory ("direct configuration") is not included. Neither are the
  conventional multiplier-based reference kernels it was compared with.
* **Not verified.** LUT counts and clock rates of the original FPGA
  implementation cannot be reproduced from RTL simulation and have not been
  checked.
* **Handshake and reset are this design's choice.** This covers
  `cfg_start`/`cfg_busy`/`cfg_done`/`swap` and `in_valid`/`out_valid`.
  CFGLUT tables power up as zero and are not reset.
