# One-level carry-skip adder with optimised block sizes

A ripple-carry adder is small and frugal but its carry has to walk through
every bit. A *carry-skip* adder keeps the ripple cells and adds one
multiplexer per block of bits: if every bit of a block propagates
(`a[i] ^ b[i] = 1` for all of them), the block's carry-out equals its
carry-in, so the multiplexer hands the carry-in straight to the next block.
With one level of skipping, the worst carry

1. is generated at the least significant bit of some block and ripples to
   the end of that block,
2. skips every block in between, one multiplexer each,
3. ripples into the block where it stops, up to that block's most
   significant bit.

Big blocks make step 1 and step 3 slow; small blocks make step 2 slow. The
answer is unequal blocks: small at both ends of the word and large in the
middle. This RTL builds such an adder. By default it is 64 bits wide, with blocks

```
block   0  1  2  3  4  5 | 6  7  8  9 10 11
bits    2  3  4  6  8  9 | 9  8  6  4  3  2      (block 0 = least significant)
lsb     0  2  5  9 15 23 |32 41 49 55 59 62
```

In 1 um CMOS this sizing gives a worst-case carry path of 5.78 ns and a total
add time of 6.23 ns, excluding sum buffering. The circuit style and the sizing
method are those of V. Kantabutra's one-level carry-skip adder (IEEE
Transactions on Computers, 1993). The SystemVerilog, its packaging and its
tests are an independent implementation.

The RTL describes the logic only. The adder's speed comes from transistor-level
circuits and from the block sizes. The RTL keeps the circuit structure: every
cell, multiplexer and block of the original is a module or an instance here.
It keeps the sizes as parameters. No delays are simulated.

## The inverting carry chain: even and odd cells

This is the part that is easiest to get wrong. To keep the carry path short,
no cell restores the polarity of its carry: each ripple cell's carry-out is
the complement of the true carry. Cells therefore come in two kinds, and
they alternate by **absolute bit position**, across block boundaries:

| cell (`module`) | bit positions | takes | delivers |
|---|---|---|---|
| even (`csk_ripple_even`) | 0, 2, 4, ... | `a`, `b`, true carry | carry-out **complemented** |
| odd (`csk_ripple_odd`) | 1, 3, 5, ... | `~a`, `~b`, complemented carry | carry-out **true** |

The polarity rule that follows is used throughout the RTL. *A carry wire is
true if the bit it enters is even, and complemented if that bit is odd.*
That holds for the wires between cells and for the wires between blocks.

Inside a cell, `P = A xor B`. When `P = 1` the cell passes its carry-in on,
inverted. When `P = 0` the two operand bits are equal and decide the carry
directly: both 1 generates, both 0 kills. The sum is `P xor carry-in`. In
CMOS the inverted pass is an inverting tristate gated by `P`. A
series/parallel transistor stack on the operand bits drives the same node when
`P = 0`. In the RTL this becomes `c_out_n = p ? ~c_in : ~a` (even cell) and
`c_out = p ? ~c_in_n : ~a_n` (odd cell). Each cell also brings out its `P`,
for skip detection, and a buffered copy of its carry-in in the opposite
polarity. The odd cells need complemented operand bits. The skip block makes
them with inverters.

## Skip multiplexers: MUX1 and MUX2

Each block ends in a multiplexer whose select line is low exactly when every
`P` of the block is 1:

* `"if 0"` input (`in0`): the block's carry-in, which is the skip path;
* `"if 1"` input (`in1`): the carry rippled out of the block's last cell.

When the select line is high, at least one bit of the block generates or
kills. The rippled carry is then correct and does not depend on the
block's carry-in. When it is low, the block would only pass its carry-in on,
so taking it directly is correct and fast. Either way the multiplexer
output is the true sum carry, in the polarity the next bit expects.

* An **even-sized** block holds an even number of inverting cells, so the
  rippled carry has the polarity of the carry-in. It uses **MUX1**
  (`csk_mux1`): `y = sel ? in1 : in0`.
* An **odd-sized** block flips the polarity once. It uses **MUX2**
  (`csk_mux2`): `y = sel ? in1 : ~in0`. The skipped carry is inverted to
  match the rippled one.

Which MUX2 input carries the inverter is derived here from the polarity
rule above. The original describes MUX2 only as a multiplexer that inverts
one of its inputs.

The last block's multiplexer drives the carry-out. Its polarity is that
of bit position `WIDTH`, so `csk_adder` inverts it when `WIDTH` is odd. For the
default 64 bits it is already true.

## How the block sizes are chosen

The sizes are not a formula. They come from a short procedure over measured
component delays, in picoseconds:

| delay | 2 um CMOS | 1 um CMOS |
|---|---|---|
| `mux`: skip one block | 1240 | 440 |
| `pair`: two cells, not at a block end | 1550 | 580 (see below) |
| `single`: one cell, not at a block end | 950 | 400 |
| `end_pair`: last two cells of a block plus its multiplexer | 3100 | 800 |

For block sizes `s[i]`, the cost of a carry from the lsb of block `i` to the
msb of block `j > i` is `src(s[i]) + (j-i-1)*mux + sink(s[j])`:

* `src` ripples out through the multiplexer: pairs plus one `end_pair`, with
  a `single` first for an odd size;
* `sink` ripples in but not through the multiplexer: pairs, with a `single`
  for an odd size.

The carry-in acts as a source of zero delay.

To build the largest adder whose carry delay stays within a budget `d`:

1. Form a *nucleus* of two equal blocks of the largest size `m` with
   `src(m) + sink(m) <= d`.
2. Add blocks below the nucleus, one at a time, each the largest size that
   keeps every path within `d`.
3. Then add blocks above the nucleus in the same way.

To find the fastest `n`-bit adder, bisect on `d` until the procedure just
reaches `n` bits. The path to the carry-out is not held to `d`. Its
multiplexer usually drives a lighter load. If it does not, drop the top
block.

With the 1 um figures and `d = 5.78 ns` the procedure gives exactly the
default sizes above. The delays it implies, lsb of each lower block to the
centre of the adder, are 3.00, 2.96, 2.70, 2.84, 2.98 and 2.94 ns. From the
centre to the msb of each upper block they are 2.72, 2.76, 2.62, 2.48, 2.74
and 2.78 ns. The worst path is 3.00 + 2.78 = 5.78 ns. Those numbers need a
cell-pair delay of 0.58 ns. The characterisation of the 1 um cells quotes
0.55 ns. With 0.55 ns the same sizing would have a 5.75 ns worst path. At
5.78 ns the procedure would then build 66 bits (the two middle blocks of 10),
so the published sizing is not reproduced. The sizing model therefore uses
0.58 ns. Bisection for the fastest 64-bit adder
under this model also lands on 5.78 ns.

With the 2 um figures and `d = 12 ns` the procedure gives a 30-bit adder with
blocks `2,4,5,6,6,4,2,1`. Its worst carry path is 11.80 ns. Its carry-out path
is 12.09 ns, slightly over budget, as expected from the rule above.

The procedure is design-time software. It lives in the testbench package
`tb/csk_sizing_pkg.sv` (`procedure_p`, `min_delay`, `worst_delay`) and can be
reused to size the adder for other delay figures or widths.

## Modules

| file | what it is |
|---|---|
| `rtl/csk_pkg.sv` | `size_list_t` (16-entry block-size list, unused entries 0), the three sizings `SIZES_64` (64 bits, default), `SIZES_30` (30 bits), `SIZES_18` (18 bits), `sum_sizes`, `block_lsb` |
| `rtl/csk_adder.sv` | top: the chain of skip blocks |
| `rtl/csk_skip_block.sv` | one block: alternating cells, all-propagate detect, MUX1 or MUX2 |
| `rtl/csk_ripple_even.sv`, `rtl/csk_ripple_odd.sv` | the two ripple cells |
| `rtl/csk_mux1.sv`, `rtl/csk_mux2.sv` | the two skip multiplexers |
| `rtl/csk_xor2.sv` | the XOR used for `P` and the sum |

### `csk_adder`

| parameter | default | meaning |
|---|---|---|
| `NUM_BLOCKS` | 12 | number of blocks (1 to 16) |
| `BLOCK_SIZES` | `2,3,4,6,8,9,9,8,6,4,3,2` | sizes, least significant block first |
| `WIDTH` | 64 | must equal the sum of the sizes; checked at elaboration |

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | `WIDTH` | operands |
| `cin` | in | 1 | carry into bit 0 |
| `sum` | out | `WIDTH` | `a + b + cin`, low `WIDTH` bits |
| `cout` | out | 1 | carry out of bit `WIDTH-1` |
| `skip` | out | `NUM_BLOCKS` | bit `k` is 1 when block `k` forwards its carry-in (all bits propagate) |

The adder is purely combinational: no clock, no reset, no pipeline. Outputs
are valid one propagation delay after the inputs settle. The `skip` vector is
not part of the original circuit. It is the inverted select line of each
multiplexer, brought out for observation, and can be left open.

`csk_skip_block` has parameters `WIDTH` (bits in the block) and `LSB_ODD`
(parity of the block's first bit position). `csk_adder` sets both.

## Verification

Every testbench checks itself against integer arithmetic. Each ends with
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

| testbench | covers |
|---|---|
| `tb_csk_xor2`, `tb_csk_mux1`, `tb_csk_mux2`, `tb_csk_ripple_even`, `tb_csk_ripple_odd` | exhaustive truth tables, including carry polarities |
| `tb_csk_skip_block` | 14 blocks: sizes 1, 2, 3, 4, 5, 8 and 9, each on an even and an odd start position; exhaustive up to 5 bits, random above; every block must skip a live carry |
| `tb_csk_adder` | the default 64-bit adder: corner cases, the longest carry path, 20 000 random vectors, and 20 000 vectors with one block forced to propagate; counts, and requires, a skipped carry in each of the 12 blocks, a carry rippled out of a block, a carry-in skipping all blocks, and a carry-out |
| `tb_csk_adder_configs` | the 30-bit and 18-bit sizings, random and forced-propagate vectors |
| `tb_csk_sizing` | the sizing procedure rebuilds both published sizings and their annotated delays; bisection; the longest-path vector on the default adder |

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_csk_adder \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/csk_pkg.sv tb/tb_csk_adder.sv
./obj_dir/Vtb_csk_adder
```

For `tb_csk_sizing`, also list `tb/csk_sizing_pkg.sv` after `rtl/csk_pkg.sv`.
Each testbench finishes in well under a second.

## Where the RTL departs from, or goes beyond, the original

* **Transistor-level circuits become logic.** The inverting tristate with its
  keeper, the transistor-level XOR and the `P = 0` stack are replaced by their
  Boolean function. There is no high-impedance node. The tristate is not a
  module of its own: its behaviour is inside the two ripple cells.
* **No timing.** Component delays, transistor sizes and load effects are
  not in the RTL. They appear only in the sizing model.
* **Operand complements.** The odd cells take `~a`, `~b`. The original does not
  show where these come from, so each skip block makes them with inverters.
* **Carry taps.** The cells' buffered carry-in outputs are brought out of the
  cell modules but left unused in the block, since nothing in the original
  says what they drive. Lint reports them as unused.
* **Sum buffering.** The original leaves sum buffering to the application.
  None is added.
* **Observation port.** `skip` on `csk_adder` and `csk_skip_block` is an
  addition.
* **MUX2 input assignment.** Which input MUX2 inverts is derived from the carry
  polarity rule, not taken from a drawing.
* **1 um pair delay.** The sizing model uses 0.58 ns, not 0.55 ns, as
  explained above.

## Changing the design

* **Another width or sizing.** Pass `NUM_BLOCKS`, `BLOCK_SIZES` (a
  `csk_pkg::size_list_t`, zero-padded to 16 entries) and `WIDTH`. Odd widths,
  odd-sized blocks and one-bit blocks all work. The polarity rule handles them.
* **Different technology.** Put its delays in a `delay_model_t` in
  `csk_sizing_pkg`. Call `min_delay(n, dm)`, then `procedure_p(d, dm, sizes,
  nblocks)`. Use the result as `BLOCK_SIZES`.
