# Karatsuba FIR filter

A programmable N-tap FIR filter whose multiplications are organised with the
Karatsuba formula, at two levels:

* **Filter level.** Every sample and every coefficient is cut into a high half
  and a low half. Instead of one wide filter, three narrow *sub-filters* run
  side by side on the halves, and a small output stage recombines their
  results into the exact full-precision output.
* **Multiplier level.** Inside each sub-filter, every tap multiplier is itself
  a Karatsuba multiplier: three narrower products instead of four, combined
  through carry-save adders and one final adder.

The result is bit-exact: for any coefficients and samples, `y_out` equals the
plain convolution `y(n) = sum_k h[k]·x(n−k)` at full precision. The point of
the structure is that no multiplier in it is wider than about half of the
operand width plus two bits.

## The Karatsuba identity

For an operand pair split at bit `L`,

```
X = XH·2^L + XL        Y = YH·2^L + YL
A = XH·YH              C = XL·YL              M = (XH+XL)·(YH+YL)
X·Y = A·2^(2L) + (M − A − C)·2^L + C
```

`M − A − C` equals the cross term `XH·YL + XL·YH`, so three products replace
four. The middle product has operands one bit wider than the halves.

Because the identity is linear in the products, it also holds for sums of
products. With `x(n)` and `h[k]` split the same way,

```
y(n) = 2^(2L)·FA(n) + 2^L·(FM(n) − FA(n) − FC(n)) + FC(n)
FA = sum hH[k]·xH(n−k)               high sub-filter
FC = sum hL[k]·xL(n−k)               low sub-filter
FM = sum (hH+hL)[k]·(xH+xL)(n−k)     middle sub-filter
```

which is what the top level implements.

### Signed operands

The identity is stated for plain binary numbers. Here samples and coefficients
are two's complement. `ks_split` keeps the sign in the high half and treats the
low half as unsigned:

```
hi = v >>> L            (signed, W−L bits)
lo = v[L−1:0]           (0 … 2^L−1, carried as a signed L+1-bit value)
mid = hi + lo           (signed, max(W−L, L+1)+1 bits)
```

so `v == hi·2^L + lo` holds exactly and the identity needs no correction
terms. The price is that the low and middle sub-filters are one and two bits
wider than a pure half. For the default 16-bit operands split at 8:

| signal                  | high (A) | low (C) | middle (M) |
|-------------------------|----------|---------|------------|
| sample / coefficient    | 8 bits   | 9 bits  | 10 bits    |
| sub-filter result       | 19 bits  | 21 bits | 23 bits    |
| final output `y_out`    | 35 bits (16 + 16 + log2 8)         |||

The tap multipliers (`karatsuba_mult_signed`) take magnitudes, multiply them
with the unsigned Karatsuba core and negate the product when the signs differ.

## Block structure

```
 coef_we/addr/wdata ──► coef_bank ──► ks_split (per tap) ──┬─ hH ─┐
                                                          ├─ hL ─┼─┐
                                                          └─ hM ─┼─┼─┐
 x_in ──► ks_split ──┬─ xH ──► transposed_fir (A) ◄────────────────┘ │ │
                     ├─ xL ──► transposed_fir (C) ◄──────────────────┘ │
                     └─ xM ──► transposed_fir (M) ◄────────────────────┘
                                   │ A      │ C      │ M
                                   └────────┴────────┴──► ks_combine ──► reg ──► y_out
```

| module                  | role |
|-------------------------|------|
| `karatsuba_fir_top`     | the filter: wiring, output register, in-step assertion |
| `ks_split`              | input conversion: high half, low half, half sum |
| `transposed_fir`        | one sub-filter, transposed direct form |
| `karatsuba_mult_signed` | two's complement tap multiplier (sign-magnitude wrapper) |
| `karatsuba_mult`        | unsigned Karatsuba multiplier, `LEVELS` deep |
| `csa_3to2`              | carry-save adder row (3:2 compressor) with carry-in |
| `ks_combine`            | output conversion: fixed shifts and three adders |
| `coef_bank`             | coefficient registers with a write port |
| `kfir_pkg`              | default sizes and width functions |

## Karatsuba multiplier (`karatsuba_mult`)

The multiplier is a tree. The root splits `W`-bit operands at `L = W/2`
(the high part takes the extra bit when `W` is odd) and hands three operand
pairs to its children: the high parts (A), the low parts (C) and the half sums
(M). Each child splits again, down to `LEVELS` levels or until operands are
narrower than 4 bits; the leaves are plain products. The tree is unrolled with
`generate` loops over flat arrays (node `n` of level `d` has children `3n`,
`3n+1`, `3n+2` on level `d+1`). All nodes of one level use the width of the
middle branch; the zero high bits of the A and C branches are constants that
synthesis removes.

At each node the recombination avoids a subtractor chain:

* `A·2^(2L)` and `C` do not overlap, so they are simply concatenated, `{A, C}`.
* `M·2^L` is added as is; `−A·2^L` and `−C·2^L` are added as one's
  complements.
* These four vectors go through two carry-save rows. Each row's carry vector
  has a free least significant bit, which takes a carry-in of 1: these are the
  two `+1`s that turn the one's complements into two's complements.
* One carry-propagate adder finishes. Everything is modulo `2^(2w)`, which is
  exact because the true product fits.

With the default `W = 16, LEVELS = 1` this is the textbook case: 8×8, 8×8 and
9×9 products.

## Sub-filters (`transposed_fir`)

Transposed direct form: each accepted sample is multiplied by all taps at
once, and the products are added into a chain of partial-sum registers that
runs from the last tap to the first:

```
r[N−1] <= h[N−1]·x(n)
r[k]   <= h[k]·x(n) + r[k+1]
y       = r[0]
```

The critical path is one multiplier plus one adder regardless of `N`.
Accumulators are wide enough for `N` full products, so nothing overflows.

Because the product `h[k]·x(j)` is formed when `x(j)` arrives, a coefficient
written while the filter runs takes effect tap by tap: for the next `N−1`
outputs, older samples still carry products made with the old value. The
testbenches model exactly this.

## Interface and timing (`karatsuba_fir_top`)

| port         | dir | width                       | meaning |
|--------------|-----|-----------------------------|---------|
| `clk`        | in  | 1                           | clock |
| `rst_n`      | in  | 1                           | asynchronous, active-low reset; clears coefficients and all state |
| `coef_we`    | in  | 1                           | write `coef_wdata` into tap `coef_addr` at this clock edge |
| `coef_addr`  | in  | clog2(TAPS)                 | tap index (addresses ≥ TAPS are ignored) |
| `coef_wdata` | in  | COEF_W                      | signed coefficient |
| `in_valid`   | in  | 1                           | `x_in` is accepted at this clock edge |
| `x_in`       | in  | DATA_W                      | signed sample |
| `out_valid`  | out | 1                           | `y_out` holds a new result |
| `y_out`      | out | DATA_W + COEF_W + clog2(TAPS) | signed, full-precision output |

* Throughput: one sample per clock. `in_valid` low simply pauses the filter
  (it is a clock enable for the partial-sum chains); there is no back-pressure.
* Latency: a sample accepted at edge `t` produces its output at edge `t+2`
  (sub-filter register, then the output register after `ks_combine`).
  `out_valid` is `in_valid` delayed by two cycles.
* A coefficient written at edge `t` is used by samples accepted from edge
  `t+1` on; a sample accepted at the same edge as the write still sees the old
  value.
* After reset all coefficients are zero, so the output is zero until the taps
  are programmed.
* Because `rst_n` is asynchronous, it acts on its falling edge: a simulation
  should start with `rst_n` high and pull it low, rather than hold it low
  from time zero.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W`  | 16 | sample width |
| `COEF_W`  | 16 | coefficient width |
| `SPLIT`   | 8  | width of the low half (the same cut for samples and coefficients) |
| `TAPS`    | 8  | number of taps |
| `LEVELS`  | 1  | Karatsuba recursion depth inside each tap multiplier (0 = plain multipliers) |

The 16-bit operands split into 8-bit halves are the sizes the Karatsuba
scheme was worked out for. The tap count of 8 and the recursion depth of 1 are
this implementation's choices; nothing in the RTL depends on them.

## Design choices and departures

What the RTL takes from the design it implements: the three-product Karatsuba
formula and its split of 16-bit operands into 8-bit halves; the filter built
from three sub-filters of reduced width with an input conversion and an output
conversion made of adders and two fixed shifts; transposed-form filtering;
Karatsuba applied recursively; carry-save addition; programmable coefficients.

Chosen here, because nothing was specified:

* two's complement samples and coefficients, with the signed-high /
  unsigned-low split described above;
* the coefficient write port, the reset (asynchronous, active low, to zero)
  and the `in_valid`/`out_valid` handshake;
* full-precision output, no rounding or saturation;
* the two-cycle latency (no pipelining inside the multipliers);
* how the carry-save adders are arranged (the 4:2 recombination above);
* signed tap multiplication by sign and magnitude.

Known differences from a minimal reading of the structure:

* The coefficient halves and their sums (`hH + hL`) are formed in hardware,
  one `ks_split` per tap, from the full coefficients held in `coef_bank`.
  A design that only loads fixed coefficients could precompute them and store
  three narrower coefficient sets instead.
* The output conversion computes `M − A − C` and then adds the three shifted
  terms, four add/subtract operations in total, plus the one adder of the
  input conversion. The shifts are pure wiring.
* The middle branch is one bit wider than a half (9×9 for 16-bit operands),
  and with signed data the low and middle sub-filters gain one more bit.
* A parallel (block-processing) version of the filter using the fast FIR
  algorithm, with coefficient symmetry, is a related structure that is not
  included here.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`:

| testbench                    | what it covers |
|------------------------------|----------------|
| `tb_csa_3to2`                | bitwise sum and `sum + carry = a + b + c + cin` on random and corner vectors |
| `tb_karatsuba_mult`          | 16-bit with 1 and 3 levels, 13-bit with 2 levels, against a 64-bit product |
| `tb_karatsuba_mult_signed`   | 16- and 10-bit, including the most negative value |
| `tb_ks_split`                | all 65 536 16-bit values |
| `tb_ks_combine`              | recombination of split single products and of 8-term sums |
| `tb_coef_bank`               | reset, writes, ignored writes, asynchronous reset |
| `tb_transposed_fir`          | random stream with pauses and coefficient changes; latency 1 |
| `tb_karatsuba_fir_top`       | default size end to end: every output value, latency 2, and counts of pauses, coefficient writes while streaming, half sums beyond the high-half range, negative and positive cross terms, and the full-scale output (−32768 on every tap and sample, 2^33) |
| `tb_karatsuba_fir_variants`  | other sizes: 12-bit samples / 10-bit coefficients split at 5 with 5 taps and 2 levels; 1 tap with plain multipliers; 4 taps with 3 levels |

The top level also asserts that the three sub-filters' valid signals stay in
step.

## Simulating

With Verilator 5 (the package file must be read first; everything else is
found through `-y`):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_karatsuba_fir_top rtl/kfir_pkg.sv tb/tb_karatsuba_fir_top.sv
./obj_dir/Vtb_karatsuba_fir_top
```

Replace the top module name to run any other testbench. For lint:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/kfir_pkg.sv rtl/karatsuba_fir_top.sv
```

To change the filter, override the parameters of `karatsuba_fir_top`
(`DATA_W`, `COEF_W`, `SPLIT`, `TAPS`, `LEVELS`); all internal widths follow
from them through the functions in `kfir_pkg`. `SPLIT` should be at least 2
and less than both `DATA_W` and `COEF_W`.
