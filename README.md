# Pipelined fused floating-point dot product (radix-2^r multipliers, FCF carry-lookahead adders)

This design computes a floating-point dot product

    result = round( a[0]*b[0] + a[1]*b[1] + ... + a[N-1]*b[N-1] )

on IEEE-754 operands with **one** rounding for the whole expression. It does
not round each product and then each partial sum. The products and their sum
are kept exact, apart from one sticky bit, until the final round-to-nearest-even
step. Compared with a discrete multiplier followed by an adder, this removes
all intermediate rounding errors. It also lets the whole computation be
pipelined as one unit.

Two ideas shape the datapath:

* **Radix-2^r significand multipliers.** The multiplier operand is cut into
  7-bit windows. Each window is rewritten as the sum or difference of two
  terms `{1,3,5,7} * 2^n`. The partial product of a window is then one
  add/subtract of two shifted odd multiples of the other operand. Those odd
  multiples are computed once, shared by all windows.
* **Feedforward-cutset-free (FCF) pipelined carry-lookahead adders.** A wide
  addition is cut into a low and a high half at a pipeline register. Only
  the low half's carry crosses the register, in a single flip-flop, and it is
  added into the high half in the next stage. A conventional pipelined adder
  would also register the unfinished operand halves.

The default build is single precision with two products (`A1*B1 + A2*B2`).
Double precision is a parameter setting (`EXP_W = 11, MAN_W = 52`). A
stand-alone FCF accumulator sits next to the dot product unit in the top level.

## Pipeline

```
            stage 1                 stage 2                      stage 3               stage 4
 a[i],b[i] ─┬─ unpack, sign XOR ──── exponent compare ────────── │                     │
            ├─ Ea+Eb, specials      (max, distances)             │                     │
            └─ radix-2^r multiply ─┤ root-adder carry            │                     │
               (encode, select,    │ align + sticky              │                     │
                shift, add/sub,    │ one's complement if < 0     │                     │
                CLA tree, low half │ 3:2 CSA (+1 corrections)    │                     │
                of FCF root adder) │   ├─ FCF adder, low half ──┤ carry into high half│
                                   │   └─ LZA (indicator + LZD) ┤ |sum|, zero test    │
                                   │                            │ shift by LZA count  │ round to nearest even
                                   │                            │ ±1 correction, exp. │ exponent adjust, pack
                                   ▼ reg                        ▼ reg                 ▼ reg                 ▼ reg → result
```

Every stage boundary is a register (`│`/`▼` above). An operand set accepted
with `in_valid` at one rising edge gives `result`, `flags` and `out_valid`
four edges later. A new set can enter every cycle. There is no stall and no
back-pressure.

Both FCF adders straddle a register:

* The multiplier's root adder straddles the stage 1/2 register.
* The final carry-propagate adder straddles the stage 2/3 register.

So each wide addition's carry chain is split across two stages at the cost of one flip-flop.

## The 7-bit window encoder

Every integer 0..127 can be written as

    v = A(m1)·2^n1 + s·A(m2)·2^n2 ,   A(00,01,10,11) = 1,3,5,7,  n1,n2 ∈ 0..7,  s = ±1

The first term is always positive. The encoder (`encoder7`) packs the choice into 11 bits,
`{m1[1:0], n1[2:0], m2[1:0], s2, n2[2:0]}`, with `s2 = 1` for `+` and `s2 = 0` for `−`:

| value | code            | meaning           |
|-------|-----------------|-------------------|
| 125   | `00_111_01_0_000` | 1·2^7 − 3·2^0     |
| 96    | `00_101_00_1_110` | 1·2^5 + 1·2^6     |
| 0     | `00_000_00_0_000` | 1·2^0 − 1·2^0     |

Most values have several representations. The encoder is a 128-entry look-up
table, computed at elaboration by a constant function. The function tries
candidates in a fixed order: `m1`, then `m2`, then `n1`, then `n2`, each
ascending, with `+` before `−`. It keeps the first candidate that produces
each value. This order reproduces the two worked examples above. All 128
values are covered; `encoder7_tb` decodes every entry.

## Radix-2^r multiplier

`radix2r_multiplier` (default `WIDTH = 24`) multiplies two unsigned integers:

1. `x` is zero-extended to `7·ceil(WIDTH/7)` bits and cut into windows.
   That gives 4 windows for 24 bits, 5 for 32 and 8 for 53.
2. The odd multiples of `y` are built once with three CLAs:
   `3y = (y<<1)+y`, `5y = (y<<2)+y`, `7y = (y<<3)−y`.
3. Per window, two 4:1 multiplexers pick `A(m1)·y` and `A(m2)·y`. Two barrel
   shifters shift them by `n1` and `n2`. One CLA adds or subtracts them
   (`s2`), which gives `x_k·y`.
4. The window products are weighted by `2^(7k)` and summed by a binary tree
   of CLAs. The root of the tree is the two-stage FCF adder (`pfcf_cla_adder`),
   so the product comes out one cycle after the operands.

For 32 bits this uses 12 useful adders/subtractors: 3 for the multiples, 5
for the windows and 4 in the tree. The tree is padded to a power-of-two
number of leaves. The padding adders only ever add zeros, and synthesis
removes them.

## FCF adders and accumulator

`pfcf_accumulator` shows the mechanism most plainly. It is a `WIDTH`-bit
accumulator split into `SEGMENTS` segments. Each segment adds its slice of
the input plus the carry that the segment below produced *in the previous
cycle*. `SEGMENTS−1` carry flip-flops are the whole pipelining cost. A
conventional pipelined accumulator needs `(WIDTH+1)·(SEGMENTS−1)`.

The register therefore holds the sum in a redundant form: `acc` plus the
pending carries (`carry`). Feeding zeros for `SEGMENTS−1` cycles flushes it.
With 32 bits in two halves and the inputs `1511B9AD, 0502B9B9, 1606B9BA, 0, 0`:

| cycle | input      | acc (hi_lo)   | carry |
|-------|------------|---------------|-------|
| 1     | 1511B9AD   | 0000_0000     | 0     |
| 2     | 0502B9B9   | 1511_B9AD     | 0     |
| 3     | 1606B9BA   | 1A13_7366     | 1     |
| 4     | 0          | 301A_2D20     | 1     |
| 5     | 0          | 301B_2D20     | 0     |

The result is exact in cycle 5, the same cycle as a conventional two-stage
pipelined accumulator. `settled` is high when no carry is pending.

`pfcf_cla_adder` applies the same cut to a two-operand adder:

* Stage 1 adds both halves with CLAs. The high half does not wait for the
  low half's carry.
* The register holds both half sums and one carry bit.
* Stage 2 folds the carry into the high half with a CLA incrementer.

`cla_adder` is a two-level carry-lookahead adder. It uses 4-bit groups, and
every group carry and bit carry is written out from generate/propagate terms.

## Alignment, reduction and leading-zero anticipation

Products are 2·(MAN_W+1) bits wide (48 for single precision). Each one is
placed in an aligned field of `AW = HEAD + 48 + 3` bits. `HEAD = log2(N)+1`
leaves room for the sum and its sign. Three guard bits sit below the product.

* **Exponent compare** (`fdp_exp_compare`) finds the largest `Ea+Eb` and the
  distance of every product from it. The distance is clamped at the field
  width. A zero product takes no part in the maximum.
* **Alignment** (`fdp_align`) shifts each product right by its distance and
  ORs all lost bits into the lowest bit (sticky). A negative product is only
  one's-complemented here.
* **Reduction** (`csa_reduce`) adds the aligned terms in a chain of 3:2
  carry-save adders. The number of negative terms is fed in as one more
  vector, which completes every two's complement. This leaves a sum vector
  and a carry vector, with no carry propagation yet.
* **LZA** (`lza`) works on those two vectors while the FCF adder adds them.
  It builds the standard indicator string from `t = a^b`, `g = a&b` and
  `z = ~a&~b` of neighbouring bits, and a leading zero detector (`lzd`)
  counts its leading zeros. The count is one short in roughly 40% of random
  cases. It is one too large only for some negative powers of two (−2^k),
  depending on the addend bits. None of the tested dot products hit that
  case, including directed −2^k sums; the normalizer test covers the
  correction.
* **Normalization** (`fdp_normalize`) takes `|sum|` and tests it for zero with
  an OR over all bits (catastrophic cancellation). It shifts `|sum|` left by
  the LZA count into a window one bit wider than the field. A final one-bit
  shift in either direction corrects the prediction. The biased exponent is

      exp = emax − BIAS + HEAD + 1 − lz

  where `emax` is the largest `Ea+Eb`.

For two products this is enough for correctly rounded results. Large
cancellation only happens when the exponents are within one of each other,
and then no bit has been shifted out.

## Rounding and exceptions

`fdp_round` rounds the normalized significand to `MAN_W` bits, to nearest
with ties to even, and increments the exponent on a carry out. It then packs
`{sign, exponent, fraction}`. In priority order:

| condition                                   | result                 | flag        |
|---------------------------------------------|------------------------|-------------|
| NaN operand, `inf·0`, `+inf + −inf`         | quiet NaN `0_11..1_10..0` | `invalid`   |
| any other infinite product                  | ±inf                   | –           |
| sum exactly zero                            | +0 (−0 if all products are −0) | `cancel` if some product was nonzero |
| exponent ≥ all-ones after rounding          | ±inf                   | `overflow`  |
| exponent ≤ 0 after rounding                 | ±0 (flushed)           | `underflow` |

An operand with a zero exponent field, that is zero or subnormal, counts as
zero. Subnormal results are not produced.

## Interface of `pffdp_top`

| port          | dir | width          | meaning |
|---------------|-----|----------------|---------|
| `clk`         | in  | 1              | clock, all registers on the rising edge |
| `rst_n`       | in  | 1              | active-low asynchronous reset (valid bits, accumulator, output register) |
| `in_valid`    | in  | 1              | an operand set is present |
| `a`, `b`      | in  | `N_TERMS` × (1+EXP_W+MAN_W) | IEEE-754 operands, unpacked arrays |
| `out_valid`   | out | 1              | `result` valid (4 cycles after `in_valid`) |
| `result`      | out | 1+EXP_W+MAN_W  | rounded dot product |
| `flags`       | out | 4              | `fdp_pkg::fdp_flags_t` = {invalid, overflow, underflow, cancel} |
| `acc_clr`     | in  | 1              | synchronous clear of the accumulator |
| `acc_x`       | in  | `ACC_W`        | word added every cycle |
| `acc_sum`     | out | `ACC_W`        | accumulator register (carries may be pending) |
| `acc_carry`   | out | `ACC_SEG`−1    | pending carry flip-flops |
| `acc_settled` | out | 1              | no carry pending: `acc_sum` is the exact sum |

Parameters: `EXP_W = 8`, `MAN_W = 23` (single precision; 11/52 for double),
`N_TERMS = 2`, `ACC_W = 32`, `ACC_SEG = 2`.

Size after generic synthesis (yosys, coarse cells, default parameters):
about 5,700 word-level cells and 340 flip-flops for the whole top level.
The FCF adders account for 1 carry flip-flop each. No timing, area or power
figures for a standard-cell library have been produced for this RTL.

## Choices made in this design

These points are not fixed by the architecture description this design
follows. They are this design's own choices.

* **Number of products.** `N_TERMS = 2` by default. Any value ≥ 1 is
  accepted. Above two products, a massive cancellation after a large
  alignment shift can lose the bits that went into the sticky bit. The
  result is then no longer correctly rounded. The testbench runs three
  products only on values where that cannot happen.
* **Register placement.** Where exactly the four pipeline registers sit is
  this design's choice, as is the decision to pipeline through the two FCF
  adders.
* **Number handling.** Rounding mode, subnormal flushing, NaN/infinity
  handling and the flag outputs.
* **Window count.** The number of windows is `ceil(WIDTH/7)`, which is 8 for
  53-bit double-precision significands.
* **Encoder search order.** See above.
* **Second-cycle carry in the accumulator.** The carry of cycle 3 is added
  in cycle 4, which makes the high half `301A` in cycle 4 and the exact
  `301B2D20` in cycle 5.
* **Adder structure.** A 4-bit-group CLA, the carry-save chain shape, the LZA
  indicator function and its ±1 correction.
* **Accumulator clear.** The accumulator has a synchronous clear.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`, and each has a
watchdog.

| testbench | what it checks |
|-----------|----------------|
| `pffdp_top_tb` | whole top level at default parameters: 4,000 operand sets against an exact reference, latency 4, accumulator bursts; counts back-to-back issue, FCF carries in both adders, subtracting encoder terms, LZA correction, rounding up, cancellation, overflow, underflow, NaN, pending accumulator carries |
| `pffdp_tb` | single precision (3,000 sets), double precision (1,000) and three-product single precision (1,000), all against the exact reference |
| `encoder7_tb` | all 128 codes decode to their value; both worked examples bit-exact |
| `radix2r_multiplier_tb` | 24-, 32- and 53-bit products, one-cycle latency |
| `cla_adder_tb`, `pfcf_cla_adder_tb` | sums at several widths, long carry chains |
| `pfcf_accumulator_tb` | the cycle-by-cycle example above, 2 and 4 segments on random streams |
| `fdp_exp_compare_tb`, `fdp_align_tb`, `csa_reduce_tb`, `lzd_tb`, `lza_tb`, `fdp_normalize_tb`, `fdp_round_tb` | each stage against an independent model |

The reference model, `tb/fdp_ref_pkg.sv`, shares no code with the design. It
lines all products up in a 4,480-bit integer, adds them exactly and rounds
once.

To run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -Itb \
    rtl/fdp_pkg.sv tb/fdp_ref_pkg.sv tb/pffdp_top_tb.sv --top-module pffdp_top_tb
./obj_dir/Vpffdp_top_tb
```

Replace `pffdp_top_tb` with any other testbench name. The full-size top-level
test takes about 20 s to build and under a second to run. To try double
precision at the top level, override `EXP_W = 11` and `MAN_W = 52`. The
reference model handles both formats.

## Files

`rtl/` has one module or package per file:

* `fdp_pkg`: shared types (`enc7_t`, `fdp_flags_t`) and constants.
* `encoder7`, `cla_adder`, `pfcf_cla_adder`, `pfcf_accumulator`, `radix2r_multiplier`.
* `fdp_exp_compare`, `fdp_align`, `csa_reduce`, `lzd`, `lza`, `fdp_normalize`, `fdp_round`.
* `pffdp`: the four-stage dot product unit.
* `pffdp_top`: the top level.

`tb/` holds one testbench per module, plus `fdp_tb_driver` (stimulus and
checking for one `pffdp` configuration) and `fdp_ref_pkg`.
