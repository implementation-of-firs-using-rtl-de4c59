# FIR filtering with run-time reconfigurable constant multipliers

A filter tap multiplies every sample by a constant. Shifts and adds can do that
much more cheaply than a general multiplier, but then the constant is fixed in
the wiring. A *reconfigurable constant multiplier* (RCM) sits between the two.
It multiplies by one of a small set of constants, or by any constant, and can
be switched while the circuit runs. It costs far less than a full multiplier.

This RTL builds two kinds of RCM and a FIR filter that uses the first kind:

* **Fused adder graph** (`rcm_pag`). Each constant of a set has its own
  pipelined shift-and-add graph. The graphs are merged stage by stage so that
  nodes are shared, and 2:1 multiplexers (plus one adder that can switch to a
  subtractor) choose between them. Switching the constant means changing a
  select code, which takes effect on the very next sample. The constant set
  built here is {1912, 1111, 1331}.
* **FIR filter** (`fir_rcm`, `fir_frame_ctrl`). This is a three-tap filter in
  which every tap is a fused-graph multiplier. Each tap picks its own
  coefficient from the set at run time.
* **Table-based multiplier** (`kcm_rcm`, `kcm_reconf_ctrl`, `cfg_lut`). This
  is the classic "KCM". The input is cut into 4-bit chunks. Each chunk
  addresses a table of precomputed partial products c·chunk, and an adder
  tree sums them. The tables are FPGA-style configurable LUTs that are loaded
  serially, so a new coefficient is written in 32 clock cycles.

The top level `rcm_fir_top` holds the filter and the table-based multiplier
side by side. Each has its own ports.

## The fused adder graph for 1912, 1111 and 1331

Every node computes `2^a·u ± 2^b·v` from two earlier node values, and every
node output is registered. Every path from `x` to `y` therefore crosses
exactly three registers. The merged graph is:

```
stage 1   p17   = x + (x<<4)                                   17x, shared

stage 2   left  = (p17<<4) + x                                273x
          right = (x<<8) - p17      for 1912 and 1331          239x
                  (x<<1) + p17      for 1111                    19x

stage 3   y     = (left<<2) + (right<<3)   for 1912, left = 0
          y     = (left<<2) +  right       for 1111 and 1331
```

| cfg | constant | left (stage 2) | right (stage 2) | output adder          |
|-----|----------|----------------|-----------------|-----------------------|
| 0   | 1912     | – (cleared)    | 239x            | 0 + 239x·8            |
| 1   | 1111     | 273x           | 19x             | 273x·4 + 19x          |
| 2   | 1331     | 273x           | 239x            | 273x·4 + 239x         |

Code 3 is unused and behaves like code 2.

Three details are easy to miss:

* **A zero input costs no multiplexer.** For 1912 the left node is unused. It
  does not get a multiplexer input of 0. Instead, its pipeline register is
  cleared in that configuration, so the output adder sees 0.
* **The configuration travels with the data.** `cfg` is registered alongside
  `x` at every stage. Each sample is therefore multiplied by the constant
  selected when it entered, and `cfg` may change on every cycle without
  corrupting samples already in flight.
* **How the design departs from its source.** The node values and
  multiplexers of the last two stages follow the source design (left node
  –/273/273 into a `<<2`/0 multiplexer, right node 239/19/239 into a
  `<<3`/unshifted multiplexer). The stage-1 node 17x, and the way 273, 239
  and 19 are built from it, were worked out for this implementation. Another
  valid decomposition would give the same products.

Widths: `x` is 16 bits signed (`WX`), and `y` is `WX+11` bits because
1912 < 2^11. The latency is 3 cycles, with one sample per clock.

## The filter and its block sequencer

`fir_rcm` is a direct-form filter, y[n] = h0·x[n] + h1·x[n-1] + h2·x[n-2].
Each hk is chosen per tap by `coef_sel[k]`. Its three multipliers run in
parallel, and a registered adder sums them. The latency is 4 cycles. The
delay line advances only on valid samples, and `clear` empties it.

`fir_frame_ctrl` handles blocks of samples. On `start` it latches `ip[0..2]`,
clears the filter, and feeds it the three samples followed by two zeros. It
therefore outputs the complete linear convolution, five values on consecutive
cycles, each marked by `op_en`. `done` marks the last value, and `op` then
holds it. A `start` while a block is running is ignored.

With `ip = {1, 10, 100}` and `coef_sel = {0, 1, 2}` (h = 1912, 1111, 1331),
the output stream is:

```
1912, 20231, 203641, 124410, 133100
```

Timing at the top level: `op_en` is first high 6 cycles after the clock edge
that samples `start` (1 clear cycle, 4 filter cycles, 1 output register).

## The table-based multiplier and its 32-cycle reload

The default size is an 8×4-bit signed multiplier (`BX=8`, `BC=4`).

* **Tables.** The input is cut into `K = BX/L = 2` chunks of `L = 4` bits.
  The low chunk is read as unsigned. The top chunk carries the sign of `x`
  and is read as signed. Chunk k addresses a table holding c·chunk in
  `BLUT = L+BC = 8` bits. That width is enough for both the signed and the
  unsigned chunk.
* **LUT bits.** Each table is 8 one-bit `cfg_lut` primitives. A `cfg_lut` is a
  32-bit shift register read through a 5-bit address, which models the
  configurable 5-input LUT found in FPGAs. Only the lower 16 entries are
  addressed (the top address bit is 0).
* **Datapath.** The table outputs are registered, shifted by k·L (wiring
  only), and summed by a binary adder tree with a register after each level.
  The latency is `1 + clog2(K)`, which is 2 cycles at the default size.
* **Reload.** On `reconf_req`, `kcm_reconf_ctrl` takes `coef`. For 32 cycles
  it computes one table entry per cycle, highest entry first, and shifts the
  bits of that entry into all 16 LUTs in parallel. Entry e of table k is
  c·chunk_k(e), or 0 for unused entries. After 32 shifts every LUT holds the
  new table.
* **Validity during a reload.** `reconf_busy` is high for exactly those 32
  cycles. Samples taken while it is high come out with `y_valid` low. Every
  sample taken afterwards uses the new coefficient.
* **After reset.** The controller loads the parameter `INIT_COEF` (0 by
  default) by itself. Outputs are therefore invalid for the first 32 cycles.

The coefficient-to-table computation is built in hardware here. The source
design only says that the LUT contents are rewritten at run time.

## Interfaces and conventions

* A single clock. `rst` is synchronous and active high. The one exception is
  the `cfg_lut` tables, which have no reset.
* Streams use a plain valid bit with no back-pressure. All blocks accept one
  sample per clock.
* `rcm_pkg` holds the configuration enum (`CFG_1912`, `CFG_1111`,
  `CFG_1331`) and `COEF_GROWTH = 11`.

| module            | latency           | throughput        | main parameters                   |
|-------------------|-------------------|-------------------|-----------------------------------|
| `rcm_pag`         | 3                 | 1/clock           | `WX=16`                           |
| `fir_rcm`         | 4                 | 1/clock           | `WX=16`, `TAPS=3`                 |
| `fir_frame_ctrl`  | 6 (start→op_en)   | 5 results/block   | `NIN=3`, `TAPS=3`                 |
| `kcm_rcm`         | 2                 | 1/clock           | `BX=8`, `BC=4`, `L=4`, `AW=5`     |
| `kcm_reconf_ctrl` | 32-cycle reload   | –                 | `DEPTH=2^AW=32`                   |

## How far to trust it, and what is not here

Every module has a self-checking testbench that compares against independent
arithmetic:

* `rcm_pag_tb` covers all configurations, including the example inputs 1,
  100 and 1111, the input extremes, and 2000 random inputs with random
  switching on every cycle. The latency is checked.
* `fir_rcm_tb` covers all 27 coefficient assignments with random streams and
  gaps.
* `kcm_rcm_tb` covers all 16 coefficients × 256 inputs, the 32-cycle reload,
  and the invalid flag during a reload.
* `rcm_fir_top_tb` runs both paths together for 200 random blocks with
  coefficient changes and reloads.

Choices this implementation made where the source design is silent:

* the 16-bit data width;
* the direct-form filter structure and its registered output adder;
* the block sequencer's states, its one-cycle `op_en` and its `done` pulse;
* reset behaviour;
* pipelining the configuration with the data;
* computing the LUT contents on chip, and loading `INIT_COEF` after reset.

Not implemented:

* The design-time search that merges adder graphs. It is software, and its
  result for this constant set is what `rcm_pag` implements.
* The two table-based FIR filter structures, which are mentioned but not
  described in the source.
* The unfused per-constant graphs and the general-purpose multiplier that the
  source compares against.
* Partial reconfiguration through the FPGA configuration port.
* The FPGA fabric itself: logic elements, routing, the slice multiplexers, and
  the bit-level full-adder chain (here it is a word-level adder).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/rcm_pkg.sv tb/rcm_fir_top_tb.sv --top-module rcm_fir_top_tb
./obj_dir/Vrcm_fir_top_tb
```

Replace `rcm_fir_top_tb` with `rcm_pag_tb`, `fir_rcm_tb`, `fir_frame_ctrl_tb`,
`kcm_rcm_tb`, `kcm_reconf_ctrl_tb` or `cfg_lut_tb` to test a single block.
`-y rtl` lets Verilator find the modules below the one under test.

Parameters you can change:

* the data width `WX`;
* the table-based multiplier's `BX`, `BC` and `L` (`BX` must be a multiple of
  `L`, and `L ≤ AW`);
* `INIT_COEF`.

The filter's constant set is fixed by the structure of `rcm_pag`. A different
set needs a different merged graph.
