# Block transpose-form FIR filters, fixed and reconfigurable

A transpose-form FIR filter broadcasts each input sample to all coefficient
multipliers at once and pushes the partial sums, not the samples, through the
delay line. Two properties follow. The structure is pipelined by construction,
with one multiplier and one adder between registers. And all the products of
one sample can share work: with fixed coefficients, "multiply x by every h(i)"
becomes one *multiple constant multiplication* (MCM), a shift-and-add network
in which the constants reuse each other's terms.

What the transpose form does not give directly is **block processing**, where
L samples are taken in and L outputs are returned per clock. This RTL
implements a block formulation of the transpose form, at L = 4, in two
flavours:

* `reconf_block_fir`: the coefficients come from a table of channel filters
  and can change from one block to the next. It uses general multipliers in
  *inner-product units* (IPUs).
* `fixed_block_fir`: the coefficients are constants fixed at elaboration.
  There is no table and there are no multipliers. Each distinct input sample
  of the block drives one MCM unit built from shifts and adds.

A third filter, `transpose_fir`, is the plain one-sample-per-clock transpose
form (N = 6) that the block versions generalise. `fir_top` places all three
side by side.

## The block formulation

This part is the least obvious, and both block filters depend on it.

Write the filter as y(n) = Σ_{i=0}^{N-1} h(i)·x(n−i). Take one block of L
outputs, y(Lk), y(Lk−1), …, y(Lk−L+1). Cut the N taps into M = ⌈N/L⌉ short
weight vectors, padding with zeros as needed:

    c_m = [h(mL), h(mL+1), …, h(mL+L−1)],   m = 0..M−1

and form the L×L input matrix of block k:

    S_k[l][j] = x(Lk − l − j),   l, j = 0..L−1

Row l of S_k is the window of L samples that output y(Lk−l) meets against one
weight vector. The matrix has only 2L−1 distinct entries, x(Lk)…x(Lk−2L+2)
(seven for L = 4). These are the current input block plus the L−1 newest
samples of the previous block. The partial output block of weight vector m is

    r_k^m = S_k · c_m        (L values)

and the output block is

    y_k = r_k^0 + r_{k−1}^1 + r_{k−2}^2 + … + r_{k−M+1}^{M−1}

That last line is a transpose-form FIR again, but one *block* wide. Every
partial product uses the current matrix S_k, which is the broadcast, and the
delays sit in the accumulation path. The *pipelined adder unit* (PAU) builds
it as

    acc[M−2] <= r^{M−1};   acc[m−1] <= r^m + acc[m];   y <= r^0 + acc[0]

so no adder chain is longer than one addition between registers.

With L = 4 and N = 6 (the default reconfigurable filter), M = 2. Taps 6 and 7
are zero padding. With L = 4 and N = 16 (the default fixed filter), M = 4.

## Reconfigurable filter (`reconf_block_fir`)

    x_blk ─► register_unit ─ smp[0..6] ─┬─► IPU-1 (c_{M-1}) ─ r^{M-1} ─┐
                                         ├─► …                          ├─► pipelined_adder_unit ─► y_blk
    ch ───► coef_storage_unit ─ c_m ────┴─► IPU-M (c_0)     ─ r^0    ──┘

* **Register unit (`register_unit`).** Stores the accepted block, plus the
  L−1 newest samples of the block before it. It outputs `smp[s] = x(Lk−s)`,
  and row l of S_k is `smp[l +: L]`.
* **Coefficient storage unit (`coef_storage_unit`).** A constant table
  (`COEF[NCH][N]`) of NCH channel filters: one look-up table per tap, NCH
  words deep. The channel number `ch` is sampled with each input block. The M
  weight vectors of that channel are registered, so coefficients arrive in the
  same cycle as the block they belong to. An assertion flags a channel number
  that does not exist; such a channel reads zeros.
* **Inner-product units (`inner_product_unit`).** Each unit computes
  `r[l] = Σ_j smp[l+j]·c[j]` with L² multipliers. It is combinational. IPU
  number i receives c_{M−i}, so IPU-1 handles the taps that are delayed the
  most.
* **Pipelined adder unit (`pipelined_adder_unit`).** The block-wide
  transpose accumulation shown above, plus an output register.

**Channel switching.** A new channel applies from the block that carries it.
The PAU still holds partial sums made with the old coefficients, so the
M−1 output blocks after a switch are a defined mix. Tap i of output sample n
(block k) uses the coefficients selected with block k − ⌊i/L⌋:

    y(n) = Σ_i h_{ch(k − ⌊i/L⌋)}(i) · x(n − i)

From the M-th block on, the output is purely the new filter. The testbenches
check this formula exactly, including across switches.

Default table: channel 0 = {0, 1, 2, 3, 4, 5}, the example set of the original
article. Channels 1 to 3 are this design's test sets: the same taps reversed,
an identity filter, and a set with extreme signed values. Override `COEF` for
real use.

## Fixed-coefficient filter (`fixed_block_fir`)

    x_blk ─► register_unit ─ x(4k) x(4k-1) … x(4k-6)
                               │      │          │
                           4-wide  8-wide …  4-wide   MCM units (mcm_unit)
                               └──────┴────┬─────┘
                                    adder_network ─ r^0..r^3 ─► pipelined_adder_unit ─► y_blk

Sample x(Lk−s) appears in S_k once for each column j where 0 ≤ s−j < L.
Each appearance meets the M coefficients h(mL+j), one per weight vector. For
L = 4 and N = 16, the seven MCM units are therefore 4, 8, 12, 16, 12, 8 and
4 products wide, which is L·N = 64 products in all.

Each product is used exactly once. The saving comes from building all the
products of one sample together:

* **`mcm_unit`.** Builds the products of one sample. At elaboration, every
  constant is written as c = ±2^k·f, where f is odd (its *fundamental*).
  * Each distinct fundamental is built once. Its canonical-signed-digit form
    (digits −1, 0 and +1, with no two non-zero digits adjacent) becomes a
    shift-and-add chain on the sample, subtracting for −1 digits. f = 1 is the
    sample itself.
  * Every product is its fundamental, shifted left by k and negated if c < 0.
    So 3, 6, −12 and 96 all share one adder.
  * A zero constant produces a constant zero and costs no logic.
  * Product t of sample s is x·h(`fir_pkg::mcm_coef_index(s, t, L)`).
* **`adder_network`.** Adds the products into
  `r[m][l] = Σ_j x(Lk−l−j)·h(mL+j)`. It finds each product through the
  numbering in `fir_pkg` (`mcm_offset`, `mcm_nj`, `mcm_jlo`).
* **`register_unit` and `pipelined_adder_unit`.** The same modules as in the
  reconfigurable filter.

Not implemented: common-subexpression sharing *between different*
fundamentals. This is the kind of "horizontal and vertical" elimination that
a dedicated MCM optimiser would find. The network is correct, but not
minimal in adders.

Default coefficients: 1, 2, 3, 4, then twelve zeros. This is the article's
example filter, whose constant-1 input settles at 10.

## Single-rate transpose filter (`transpose_fir`)

    z[5] <= h(5)·x;   z[i] <= h(i)·x + z[i+1] (i = 4..1);   y = h(0)·x + z[1]

It has N = 6 taps, N−1 = 5 registers and coefficient inputs `h[N]`. The
output y belongs to the *current* input sample: it is combinational from x,
exactly as in the data-flow graph. With h(i) = i and x = 1, the registers
settle at 5, 9, 12, 14, 15 and y settles at 15.

## Interfaces and timing

| filter | in | out | latency | rate |
|---|---|---|---|---|
| `reconf_block_fir` | `in_valid`, `x_blk[L]`, `ch` | `out_valid`, `y_blk[L]` | 2 clock edges | L samples / clock |
| `fixed_block_fir` | `in_valid`, `x_blk[L]` | `out_valid`, `y_blk[L]` | 2 clock edges | L samples / clock |
| `transpose_fir` | `in_valid`, `x`, `h[N]` | `y` (same cycle) | 0 | 1 sample / clock |

* **Block order.** `x_blk[0]` is the newest sample, x(Lk), and `x_blk[L−1]`
  is the oldest. `y_blk[l]` is y(Lk−l), in the same order.
* **Block latency.** A block accepted at clock edge e (`in_valid` high) is on
  `y_blk` with `out_valid` after edge e+1.
* **Stalls.** A cycle with `in_valid` low moves no state and produces no
  output block. Blocks may arrive with any gaps.
* **Reset.** `rst_n` is active-low and synchronous. It clears every register
  to zero, so the filters start from an all-zero history.
* **Number format.** Two's complement, signed. Every sum is formed in the
  output width OW and wraps modulo 2^OW. The low OW bits are always exact, and
  overflow is not saturated or flagged.

## Default sizes

| | L | N | x bits | coefficient bits | y bits |
|---|---|---|---|---|---|
| reconfigurable | 4 | 6 | 8 | 8 | 16 |
| fixed | 4 | 16 | 4 | 4 | 4 |
| single-rate | – | 6 | 8 | 8 | 16 |

These are the sizes of the article's worked examples. For the fixed filter
they are very small: a 4-bit output holds the example result 10 only as the
bit pattern 1010. For real signals, set `OW` (and `W`, `CW`) wide enough; full
precision is W + CW + ⌈log2 N⌉ bits. Every size is a parameter. In the fixed
filter, `H` is an `int` array of N constants and `CW` sets how many CSD
digits are examined (CW + 1).

## Where this RTL goes beyond or departs from the source description

* **The article gives structure, not these details.** The handshake
  (`in_valid` / `out_valid`), the stall behaviour, synchronous reset,
  wrap-around arithmetic, the signed number format, the register placement
  (registered input and coefficients, combinational IPUs and MCMs, registered
  PAU) and the two-edge latency are all this design's choices.
* **Channel selection.** The number of channels (4), how a channel is
  selected (`ch` sampled with each block) and the contents of channels 1 to 3
  are assumptions.
* **Fixed filter length.** The article gives both 16 and 15 coefficients for
  the fixed filter. The MCM widths (4…16…4) imply N = 16, which is what is
  built. A 15-tap filter runs with its last tap set to zero.
* **Fixed coefficients.** Only the first six fixed coefficients are known
  (1, 2, 3, 4, 0, 0). The remaining taps default to zero.
* **Transpose filter delays.** The article's text says "N delay units", but
  its data-flow graph draws N−1 = 5. The graph is followed.
* **Not reproduced.** The FPGA area and delay results of the article (LUT and
  flip-flop counts, 1.2 to 1.4 ns) are not reproduced. The direct-form
  filters they are compared with are not part of this RTL.

## Files

| file | content |
|---|---|
| `rtl/fir_pkg.sv` | block-formulation index helpers, CSD recoding |
| `rtl/register_unit.sv` | RU |
| `rtl/coef_storage_unit.sv` | CSU |
| `rtl/inner_product_unit.sv` | IPU |
| `rtl/pipelined_adder_unit.sv` | PAU |
| `rtl/mcm_unit.sv` | shift-add MCM of one sample |
| `rtl/adder_network.sv` | MCM products to partial blocks |
| `rtl/reconf_block_fir.sv` | reconfigurable block filter |
| `rtl/fixed_block_fir.sv` | fixed MCM block filter |
| `rtl/transpose_fir.sv` | single-rate transpose filter |
| `rtl/fir_top.sv` | all three side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_block_sizes.sv`, `tb/block_fir_harness.sv` | block filters at other block sizes and lengths |

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. For example:

    verilator --binary --timing --assert -Irtl -y rtl --top-module tb_fir_top \
        rtl/fir_pkg.sv tb/tb_fir_top.sv
    ./obj_dir/Vtb_fir_top

Pass `fir_pkg.sv` first. The `-y rtl` flag lets verilator find the other
modules by name.

What the testbenches check:

* **Leaf units.** Random and extreme operands against integer arithmetic
  reduced to the output width. `tb_mcm_unit` covers all seven MCM positions,
  with a coefficient set that has positive, negative, repeated and zero
  constants.
* **Filters.** Long random streams with random stalls, checked sample by
  sample against a direct convolution. The reconfigurable filter also gets
  random channel switches, checked with the mixing formula above. Every
  output block's latency is checked.
* **Worked examples.** The article's examples: 15 for the reconfigurable and
  single-rate filters, and 1010 for the fixed one.
* **`tb_block_sizes`.** Runs the block filters at other sizes, using the
  helper `tb/block_fir_harness.sv`:
  * L = 2, N = 6 for both kinds: two-output blocks, the smallest block
    formulation.
  * L = 4, N = 16, reconfigurable (M = 4).
  * L = 8, N = 16, fixed.
  * L = 4, N = 15, fixed: a length that is not a multiple of L.
* **`tb_fir_top`.** Runs all three filters at the default parameters at
  once. It counts stalls, channel switches, coefficient reloads and output
  wrap-arounds, and requires each to occur.

All testbenches finish in well under a second.
