# Radix-4 Booth multiplier with selectable row adders

A combinational multiplier for two 32-bit two's complement numbers, giving a 64-bit signed
product. Operand `a` is recoded into radix-4 Booth digits, which halves the number of partial
products from 32 to 16. The 16 partial products are then added one row at a time by a chain of
fifteen 64-bit carry-propagate adders. The adder in each row is a parameter:

* **ripple carry** (`ADDER_RCA`, the default): smallest and lowest power, with delay linear
  in the width (about 2N gate delays per adder);
* **carry lookahead** (`ADDER_CLA`): two levels of 8-bit lookahead, with delay logarithmic in
  the width but more area and more switching.

The default is the ripple carry adder. It is the choice for a low-power multiplier: the
lookahead logic grows faster than linearly with width, in both area and power.

There are no clocks, registers or handshakes. The product is valid one combinational delay
after the operands change.

## Top-level interface

```
booth_r4_multiplier #(
  parameter int unsigned N    = 32,          // operand width, must be even
  parameter adder_arch_e ARCH = ADDER_RCA    // booth_pkg::ADDER_RCA or ADDER_CLA
) (
  input  logic [N-1:0]   a,         // multiplier, recoded (two's complement)
  input  logic [N-1:0]   b,         // multiplicand (two's complement)
  output logic [2*N-1:0] mul,       // a * b, signed
  output logic           overflow   // carry out of the last row adder (see below)
);
```

## How a product is formed

### 1. Radix-4 recoding of `a`

A 0 is appended below the LSB of `a`, giving `N+1` bits `tt = {a, 0}`. These bits are cut into
`N/2` overlapping windows of three bits, `tt[2k+2 : 2k]` for `k = 0 .. N/2-1`. Each window
`{y(2k+1), y(2k), y(2k-1)}` stands for the digit `d = -2*y(2k+1) + y(2k) + y(2k-1)`, which has
weight `4^k`:

| window | digit | partial product |
|:------:|:-----:|:----------------|
| 000    |  0    | 0               |
| 001    | +1    | +b              |
| 010    | +1    | +b              |
| 011    | +2    | +2b             |
| 100    | -2    | -2b             |
| 101    | -1    | -b              |
| 110    | -1    | -b              |
| 111    |  0    | 0               |

A run of ones in `a` becomes a +1 at its top and a -1 at its bottom, as in Booth's original
algorithm. In radix 4 every digit is one of five values that need only a shift and a negation.
Since `a` is two's complement, its top window carries the sign. No correction term is needed.

The table is `booth_pkg::booth_digit()`. The window slicing is in `booth_r4_multiplier`.

### 2. Partial-product generation (`booth_r4_encoder`)

Each encoder sign-extends `b` to `N+2` bits. It shifts `b` left by one for ±2, and takes the
two's complement (invert and add one) for the negative digits. The `N+2`-bit result is then
sign-extended to `2N` bits. `N+2` bits are needed because `-2b` for `b = -2^(N-1)` equals
`2^N`, which does not fit in `N+1` signed bits. With one bit fewer, that single case would come
out with the wrong sign.

### 3. Reduction by rows

Partial product `k` is shifted left by `2k` bits. The first partial product starts the running
sum. Each of the next `N/2-1` row adders adds one shifted partial product to it:

```
acc[0] = pp[0]
acc[k] = acc[k-1] + (pp[k] << 2k)      k = 1 .. N/2-1     (2N-bit row_adder, cin = 0)
mul    = acc[N/2-1]
```

Every partial product is fully sign-extended, and every sum is taken modulo `2^(2N)`. The result
is therefore the exact signed product; the carries out of the rows can be ignored. This is a
linear chain, not a tree. Its critical path runs through all 15 adders. With ripple carry rows,
though, the carry of one row and the sum bits of the next overlap in time, so the chain is
shorter than 15 full ripple delays.

### The `overflow` output

`overflow` is the carry out of bit 63 of the last row adder. The other rows' carries are
dropped. The output is kept for compatibility with the structure this design follows, but it
is **not** a signed-overflow indication: a 64-bit product always holds a 32 × 32 signed product.
It is set whenever the unsigned sum of the last two 64-bit words wraps. That happens for a large
share of ordinary operand pairs, including small negative products, so do not use it as an
error flag.

## The row adders

`row_adder` picks `rca_adder` or `cla_adder` at elaboration from `ARCH`. Both compute
`{cout, sum} = a + b + cin`.

### Ripple carry (`rca_adder`, `full_adder`)

`N` full adders are chained, with the carry out of bit `i` feeding the carry in of bit `i+1`.
The full adder is `sum = a^b^cin`, `cout = ab + a·cin + b·cin`.

### Two-level carry lookahead (`cla_adder`)

For each bit, propagate is `P = A xor B` and generate is `G = A and B`. The sum is
`S = P xor C` and the carry is `C(i+1) = G(i) + P(i)C(i)`. Unrolled, the carry becomes a flat
sum of products: `C4 = G3 + P3G2 + P3P2G1 + P3P2P1G0 + P3P2P1P0C0`. Unrolling across all 64 bits
would give 65-input terms. The adder therefore uses two levels:

* `cla_carry_gen` (W = 8) computes all eight carries of an 8-bit group from its `p`, `g` and
  carry in, each as a flat sum of products (no ripple).
* `cla_block` uses one such generator to make the 8 sum bits of a group.
* `cla_group_pg` reduces a group to a group propagate (all `p` set) and a group generate (the
  group produces a carry by itself).
* A second `cla_carry_gen`, `N/8` wide, turns the group P/G pairs and the adder's carry in into
  the carry into every group and the adder's carry out.

For 64 bits this is eight 8-bit groups and an 8-bit second level. For 16 bits it is two groups,
and for 8 bits one group with a single-input second level. `N` must be a multiple of 8.

## Files

| file | contents |
|------|----------|
| `rtl/booth_pkg.sv` | `adder_arch_e`, `booth_digit_e`, `booth_digit()`, `CLA_BLOCK_W` |
| `rtl/booth_r4_multiplier.sv` | top: recoding, encoders, row-adder chain |
| `rtl/booth_r4_encoder.sv` | one radix-4 partial-product generator |
| `rtl/row_adder.sv` | RCA/CLA selector for one row |
| `rtl/rca_adder.sv`, `rtl/full_adder.sv` | ripple carry adder |
| `rtl/cla_adder.sv`, `rtl/cla_block.sv`, `rtl/cla_group_pg.sv`, `rtl/cla_carry_gen.sv` | two-level lookahead adder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_booth_r4_multiplier_full.sv` | the multiplier at its defaults only |

## Verification

Each testbench compares the design with values it computes itself, and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

* `tb_full_adder`, `tb_cla_carry_gen`, `tb_cla_group_pg`, `tb_cla_block`: exhaustive (up to
  2^17 vectors). The lookahead units are checked against a rippled recurrence.
* `tb_rca_adder`, `tb_cla_adder`: 64-, 16- and 8-bit instances, corner and 3000 random vectors.
* `tb_booth_r4_encoder`: every window with corner and random multiplicands at N = 32, and
  exhaustively at N = 4. The most negative multiplicand with digit -2 is included.
* `tb_booth_r4_multiplier`: 32-bit RCA and CLA instances with 64 corner pairs and 2000 random
  pairs, plus exhaustive 8 × 8 for both adders. It checks the product and the `overflow` carry.
  The carry is predicted by a separate model that accumulates the shifted partial products. The
  testbench also counts how often each Booth digit, each value of the carry and each adder type
  occurred, and fails if any of them never occurred.
* `tb_booth_r4_multiplier_full`: the default configuration (no parameter overrides), including
  the textbook example 3 × (-4) = -12 and the extreme operands.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/booth_pkg.sv \
    tb/tb_booth_r4_multiplier.sv --top-module tb_booth_r4_multiplier
./obj_dir/Vtb_booth_r4_multiplier
```

`tb_booth_r4_multiplier` takes about 20 seconds; the others take a few seconds each.

## Choices made in this design

These points are fixed by this RTL, not by the architecture it follows:

* The encoder forms each multiple in `N+2` bits, so `-2b` is correct for `b = -2^(N-1)`.
* `rca_adder` has a carry-in port, so both adder types share one interface. The multiplier
  ties it to 0.
* How the 8-bit lookahead units are wired into a 64-bit adder (two levels, with an `N/8`-wide
  second-level generator) is this design's reading.
* The gate equations of the full adder and of the group propagate/generate are the standard
  ones.
* `N` must be even (asserted at elaboration). Odd widths would need an extra sign bit on `a`,
  which is not implemented.
* Not included: a radix-2 (one bit per step) Booth multiplier, which is a slower baseline with
  twice as many partial products. Power estimation, including the search for peak-power input
  vectors, is a gate-level analysis flow and not part of the RTL.

## Changing the design

* Width: set `N` (even, at least 4). The row adders are `2N` bits wide. With `ADDER_CLA`, `2N`
  must be a multiple of 8, so `N` must be a multiple of 4.
* Adder: set `ARCH` to `booth_pkg::ADDER_CLA`. The group width is `booth_pkg::CLA_BLOCK_W`.
* Faster reduction: the row chain in `booth_r4_multiplier` is the place to put a carry-save
  tree. The encoders and the final adder can stay as they are.
