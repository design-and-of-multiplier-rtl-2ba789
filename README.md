# Approximate 16 × 16 multiplier built on 15-4 compressors

Most of the area, delay and power of a multiplier goes into reducing its partial
products. Reducing 16 of them in one column with chains of small counters is
slow. A *15-4 compressor* counts fifteen bits of equal weight at once and turns
them into a 4-bit number. Making that compressor slightly inexact saves more
logic. The errors stay small when the inexact compressors go only into the
middle-weight columns of the product. Image processing, which tolerates small
errors, is the target use.

This repository is a synthesizable SystemVerilog model of such a multiplier.
It is unsigned and combinational. The output is the approximate 32-bit product
of two 16-bit operands. It comes in four variants: the default approximate
multiplier, two other approximate ones, and an exact reference.

## The 15-4 compressor (`comp154`)

The compressor has three levels:

1. Five exact full adders, one on each group {X2,X1,X0}, {X5,X4,X3}, …,
   {X14,X13,X12}.
2. Two 5-3 compressors, i.e. five-input counters. One counts the five FA sums
   (A, weight 1) and one counts the five FA carries (B, weight 2).
3. A 4-bit ripple-carry adder that forms `O = A + 2·B`.

With exact 5-3 counters, `O` is exactly the number of ones in `X` (0…15). All
the approximation lives in the 5-3 counters. The full adders and the 4-bit
adder are always exact.

### The three 5-3 counters

| module | structure | wrong for | error |
|---|---|---|---|
| `comp53_exact` | 5 XOR, 2 two-input MUX, 1 AND. O0 takes three XOR levels. | never | 0 |
| `comp53_mux` | three 4-1 MUX. D and E (`x[3]`, `x[4]`) drive the selects. Functions of A, B, C drive the data inputs. | 2 of 32 inputs | −4 |
| `comp53_aa` | approximate adder on `x[0..2]`, then an exact FA and a carry merge | 8 of 32 inputs | ±1 |

`comp53_mux` is the proposed approximate counter. Its point is that D and E
reach every output through a single multiplexer. With s = A⊕B⊕C, m =
majority(A,B,C) and t = "one or two of A, B, C set":

```
select {D,E}:   00    01    10    11
O0              s     ~s    ~s    s      (exact)
O1              m     t     t     ~m     (exact)
O2'             0     0     0     m      (exact would be 0, ABC, ABC, m)
```

Only O2 is approximated. Its result is 0 instead of 4 when exactly one of D, E
is set and A = B = C = 1. The multiplexer structure is the source's. These
equations are this design's own reconstruction: the source names the
approximated output but gives no equations.

`comp53_aa` uses `approx_adder`. That adder computes the carry as the majority
of its inputs and the sum as simply NOT carry. This sum is right for one or two
set inputs and off by one for 000 and 111.

### Compressor variants (`mult_pkg::c154_design_e`)

| DESIGN | counter on sums (weight 1) | counter on carries (weight 2) | exact outputs of 32768 |
|---|---|---|---|
| `ACCURATE` | exact | exact | 32768 |
| `DESIGN1` (default) | mux | mux | 28692 |
| `DESIGN2` | approx-adder | approx-adder | 19968 |
| `DESIGN4` | approx-adder | mux | 23424 |

`DESIGN4` puts the counter with the higher pass rate on the heavier carry
signals. A third approximate design is not provided, because the 5-3 counter it
needs is not specified.

## The multiplier (`mult16`)

```
a,b ─► pp_gen ─► pp_tree ─────────────────────────────► parallel_adder(32) ─► p
        256 AND  │ stage 1: six 15-4 compressors in       row0 + row1
                 │   columns 12..17, all others pass
                 │ stages 2..7: exact Dadda reduction with
                 │   4-2 compressors, full and half adders
```

**Partial products.** `pp[i][j] = a[j] & b[i]` has weight 2^(i+j). There is
no Booth recoding. Column c (0-based) holds min(c+1, 31−c) bits.

**The 15-4 stage.** This is the heart of the design. Columns 12…17 (the 13th
to 18th columns, counted from 1) each get one 15-4 compressor:

* Column 12 has only 13 bits, so it is padded with two zeros.
* Columns 13 and 17 have 14 bits and get one zero each.
* Column 15 has 16 bits. Its 16th bit bypasses the compressor.
* Zeros go on the highest X inputs. Partial products enter in increasing
  row order.
* The compressors in columns 12, 13 and 14 use the selected `DESIGN`.
* The compressors in columns 15, 16 and 17 are always exact. Errors there
  would weigh more.

A compressor in column j puts its outputs O0…O3 into columns j…j+3.

**Exact stages.** After the 15-4 stage the tallest column holds 16 bits. A
Dadda schedule then brings every column down to at most 13, 9, 6, 4, 3 and
finally 2 bits. In each column the schedule picks parts in this order:

1. a 4-2 compressor while four or more bits must go;
2. then full adders while two or more bits must go;
3. then a half adder.

The carries that arrive from the column below in the same stage count toward
that stage's limit. The 4-2 compressor's carry-in is taken from its own
column, so there is no carry chain along a stage. In total the schedule uses
30 4-2 compressors, 72 full adders and 31 half adders.

The heights, bit positions and part counts are computed once, at elaboration.
The constant function `geom()` builds them into the packed table `GEOM`. Bit k
of column c in stage s is bit `offset(s,c)+k` of `g_st[s].bits`. This table is
the place to change if you want a different reduction schedule. Keep the
rule that `offset` and `height` are only looked up, never recomputed per bit.
Recomputing them makes elaboration very slow.

**Final adder.** A 32-bit ripple-carry adder of full adders adds the two
rows. The product is kept modulo 2^32.

**Interface and timing.** `mult16 #(.DESIGN(...)) (input [15:0] a, b,
output [31:0] p)`. There is no clock and no reset: `p` follows `a` and `b`
after the combinational delay. To pipeline it, register the two rows between
`pp_tree` and the final adder.

### Accuracy of the default multiplier

Over 20000 random operand pairs, 88 % of the products (17641) are exact. The
mean error distance is about 5000 and the largest seen is 229376 (7·2^15). The
errors come only from columns 12…14 and their carries. The relative error
therefore falls quickly as the product grows.

`tb_image_contrast` applies a contrast curve to a synthetic 512 × 512 RGB
image. That is 786432 pixels, the size of the source's image experiment. Each
8-bit pixel is widened to 16 bits, v = pixel·257. The multiplier forms
F = v·65535. The testbench then applies C = (1 − cos(π·F/2^32))/2 and
requantises to 8 bits:

* 36 % of the products are inexact.
* No output pixel differs from the exact-multiplier result, so the PSNR is
  unbounded.
* The testbench requires more than 30 dB.

## How far this follows its source

Taken from the source:

* The 15-4 compressor: five FAs, two 5-3 counters on the sums and on the
  carries, and a 4-bit adder with the unused A3 and B0 tied to ground.
* The gate list of the exact 5-3 counter.
* The three-4-1-MUX organisation of the proposed counter, with D and E as
  selects.
* The approximate adder.
* The 16 × 16 array with six 15-4 compressors from the 13th column on.
* Approximate compressors only in the 13th–15th columns, with the padding
  zeros.
* Exact 4-2 compressors and half and full adders in the later stages, and a
  parallel adder at the end.

This design's own choices:

* The select wiring inside the exact 5-3 counter.
* The equations of the approximate MUX counter, including which term of O2 is
  dropped.
* How the approximate adder forms a 5-3 counter.
* Which counter design 4 uses on the sum signals.
* The zero-padding position and the input order.
* The Dadda schedule of the exact stages. The source's reduction has three
  stages; this one has six after the 15-4 stage.
* Unsigned operands.
* Combinational timing.

Not built:

* The third approximate 5-3 counter and the 15-4 design and multiplier that
  use it.
* Hardware for the image-contrast application. The source runs it in
  software (F = pixel·65535, contrast (1 − cos F)/2). Here only the products
  run on the multiplier, and the testbench evaluates the cosine. How the
  cosine argument is scaled is not given; π/2^32 is this testbench's choice.

## Files

`rtl/`:

* `mult_pkg.sv`: variant enum and column constants.
* `mult16.sv`: top level.
* `pp_gen.sv`, `pp_tree.sv`, `parallel_adder.sv`: the multiplier's stages.
* `comp154.sv`: the 15-4 compressor.
* `comp53_exact.sv`, `comp53_mux.sv`, `comp53_aa.sv`: the three 5-3 counters.
* `mux4.sv`, `approx_adder.sv`, `full_adder.sv`, `half_adder.sv`,
  `comp42.sv`: the leaf cells.

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) plus:

* `tb_mult16_designs.sv`: the accurate multiplier and multipliers 2 and 4.
* `tb_image_contrast.sv`: the image workload above.
* `tb_model_pkg.sv`: arithmetic reference models. They count bits instead of
  copying gates.

Each testbench prints `TB_RESULT checks=N failures=M`. The compressor tests
are exhaustive. The tree and multiplier tests are random, with corner cases.

## Simulating

```
verilator --binary --timing -Irtl -Itb --top-module tb_mult16 \
    rtl/mult_pkg.sv tb/tb_model_pkg.sv tb/tb_mult16.sv -o sim
./obj_dir/sim
```

Replace `tb_mult16` with any other testbench. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/mult_pkg.sv rtl/mult16.sv`. Each
simulation finishes within a few seconds.
