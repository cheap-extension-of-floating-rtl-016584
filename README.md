# Interval arithmetic on a split double-precision FPU

Interval arithmetic keeps a lower and an upper bound for every value, and
rounds the lower bound down and the upper bound up, so the true result is
always enclosed. In software this is slow: each operation needs two
computations, rounding-mode switches and, for products, several
comparisons. This RTL follows the paper "Cheap Extension of Floating-Point
Units for Interval Arithmetic". Its idea is to pack an interval of two
IEEE single-precision bounds into one 64-bit double-precision word. The
double-precision adder and multiplier are then cut in the middle so that
they work on both bounds at once. The buses, the register file width and
the pipeline control of an ordinary double-precision FPU stay as they are.

The same hardware runs three kinds of operation on a 64-bit word:

| mode            | word holds                         | result                              |
|-----------------|------------------------------------|-------------------------------------|
| `MODE_DOUBLE`   | one double                         | one double, rounding mode `rm`      |
| `MODE_PAIR`     | two independent singles            | two singles, both rounded with `rm` |
| `MODE_INTERVAL` | interval `[inf, sup]` of singles   | interval, `inf` rounded down, `sup` rounded up |

In an interval word the lower bound sits in bits 63:32 and the upper bound
in bits 31:0, so a hex dump reads `[inf, sup]` from left to right. The paper
does not say which half holds which bound; this layout is this design's
choice.

## The top level: `interval_fpu`

`interval_fpu` takes one operation per cycle on two 64-bit operand buses:
`op` is add, sub or mul, plus `mode` and `rm`. It sends additions and
subtractions to `fp_add_pipe` and multiplications to `fp_mul_pipe`. Each
pipeline has its own 64-bit result bus with a valid bit (`add_res`/`add_valid`,
`mul_res`/`mul_valid`).

| operation                    | latency (accept edge to result) |
|------------------------------|---------------------------------|
| add/sub, any mode            | 6                               |
| mul, double or pair          | 6                               |
| mul, interval                | 7                               |

`in_ready` is low in only one case: a double or pair multiplication is
offered in the cycle right after an interval multiplication was accepted.
Otherwise both would reach the multiplier's rounding stage in the same
cycle. The adder always accepts. The offer is taken on a rising edge when
`in_valid && in_ready`. Reset (`rst_n`) is synchronous and active low, and
clears only the valid bits.

Rounding modes (`fpu_pkg::rnd_mode_e`): `RM_RNE` (nearest, ties to even),
`RM_RZ`, `RM_RU` (toward +inf), `RM_RD` (toward -inf). Interval operations
ignore `rm`.

## How a unit is split

Every integer part of the double-precision datapath is built as two halves
plus a small cut point at the middle. In double mode the cut point joins
the halves. In the other modes it separates them.

- **Carry-lookahead adder** (`split_cla`, halves in `cla_half`). Each half
  is a Kogge-Stone prefix tree. The root is one multiplexer: the upper
  half's carry-in is either the lower half's carry-out or its own carry-in.
  The same module is used at three widths:
  - 2x8 bits: the exponent subtractor;
  - 2x32 bits: the mantissa adder and the rounding incrementer;
  - 2x64 bits: the multiplier's final adder.
- **Tree comparator** (`split_cmp`). The (greater, equal) pairs are merged in
  a binary tree per half. The last merge is bypassed in split mode. With
  2x8 bits it compares exponents. The paper widens the exponent unit from
  11 to 16 bits for this reason: a double exponent fits in the 16-bit word,
  and each single exponent fits in one byte.
- **Converter** (`split_negate`). Inverters plus an incrementor (a
  `split_cla` with a zero operand). It negates the whole word or each lane.
- **Right shifter** (`split_rshift`). It has log2(64) = 6 stages. In split
  mode, a lower-lane bit whose source would be in the upper lane takes the
  lower lane's sign bit instead. Each lane has its own shift amount. Bit 0
  of each lane is a sticky bit: the OR of every bit shifted below bit 1.
  The second lane needs its own sticky logic.
- **Normalizing left shifter** (`split_normalize`). A leading-zero count
  per lane, merged for a full word, then a 6-stage left shifter that no bit
  may cross in split mode.
- **Rounding** (`split_round`). It holds two `round_unit`s. One rounds a
  double or the upper single; the other rounds the lower single. The ulp
  increment goes through a `split_cla`, so a double's carry can cross the
  middle and a single's carry cannot.

## The addition pipeline (`fp_add_pipe`)

The six stages are those of the paper's example adder:

1. **Unpack, compare, swap.** Compare the exponents and swap so that A has
   the larger exponent `Er`. For a subtraction, the signs of B are flipped.
   For an interval subtraction the two bounds of B are also exchanged, since
   `[a,b] - [c,d] = [a - d, b - c]`.
2. **Negate and subtract.** If the effective signs differ, B = -B (two's
   complement, converter). The exponent difference `d = Ea - Eb` is computed
   on the 16-bit unit split into two bytes.
3. **Align.** Arithmetic right shift of B by `d` (saturated), with the sticky bit.
4. **Add.** R = A + B. The sign of R is noted.
5. **Round or convert.** If R < 0, then R = -R. This can only happen when
   `d = 0`, where the sum is exact. Otherwise R is rounded.
6. **Normalize.** Left shift by the leading-zero count, adjust the exponent,
   and pack.

The hard part is that **rounding comes before normalization**. This works
because of where the result's leading one can be:

- If `d >= 2`, the leading one lies in one of the top three positions (2^1,
  2^0 or 2^-1), so stage 5 knows where the result's last bit falls.
- If `d <= 1`, the sum can lose many leading bits. Such a sum is exact, so
  rounding it "as if" the leading one were at 2^-1 changes nothing.

If rounding carries out (for example 11.11...1 + ulp), the leading one moves
up a position; the lane keeps one spare integer bit for this, and stage 6
normalizes it.

Each lane has L bits: 64 for a double, 32 for a single. From the top:

| bits          | content                                   |
|---------------|-------------------------------------------|
| L-1           | sign (two's complement)                   |
| L-2, L-3      | integer bits 2^2 and 2^1                  |
| L-4           | hidden bit 2^0                            |
| below L-4     | fraction (52 or 23 bits)                  |
| lowest        | guard bits (8 or 5), bit 0 is the sticky bit |

The sticky bit is set after B is negated, so a truncated negative value still
lies strictly between the represented value and the next one up. This keeps
the directed roundings correct.

The paper's figure also carries the flags `d>1` and `R>0` down the pipe. In
this design the sign of R alone selects round or convert. The leading-zero
count covers both the near and the far case, so `d>1` is not carried.

## The multiplication pipeline (`fp_mul_pipe`)

The four significand multipliers are `csa_mul` units: 27x27 array
multipliers with carry-save output. They are used in two ways:

| stage | double (or pair)                                        | interval `[a,b] * [c,d]`                                  |
|-------|---------------------------------------------------------|-----------------------------------------------------------|
| 1     | split each 53-bit significand into 27+26 bits; 4 partial products | the 4 bound products ac, ad, bc, bd              |
| 2     | carry-save tree, 8 vectors to 2                         | tree bypassed: the 4 carry-save pairs stay apart          |
| 3     | one 128-bit carry-lookahead add                         | adder split in two, plus two more 64-bit adders           |
| 4     | normalize (1 bit), add exponents                        | same, for 4 products                                      |
| 5     | round                                                   | exact min and max of the 4 products (`minmax4`)           |
| 6     | normalize again, pack                                   | round: min downward, max upward                           |
| 7     | -                                                       | normalize again, pack                                     |

This is the paper's "four-product" method. The products of the single
bounds are exact (48 bits), so one comparison of exact values and one
rounding per bound are enough. Rounding is monotonic, so this gives the same
result as rounding each product and then comparing.

In pair mode, products 0 (upper times upper) and 3 (lower times lower) are
used. They skip the min/max stage.

The paper is not consistent about the extra length. Its stage list adds one
stage (7 against 6). Its summary speaks of "two additional stages" and of
"1 through 2 cycles" more. The one-stage version is built. An interval
product followed directly by a double product would collide at stage 6; the
`in_ready` rule above prevents this. An assertion (`a_no_collision`) checks
the rule.

## Numeric behaviour and where it departs from IEEE-754

The paper says nothing about these points. This design chooses:

- Subnormal inputs read as zero.
- Results never become subnormal. A nonzero result below the smallest
  normal becomes the smallest normal when the rounding direction points
  away from zero, and zero otherwise. Intervals stay valid enclosures.
- Overflow gives infinity for round-to-nearest and for rounding away from
  zero; otherwise it gives the largest finite number.
- Infinities and NaN follow IEEE-754 through a side path: inf - inf and
  0 * inf give the quiet NaN `7FF8...`/`7FC00000`.
- The sign of an exact zero sum is + except under `RM_RD`.
- No exception flags are produced.
- An interval multiplication with a zero bound and an infinite bound gives
  NaN, the IEEE product. A dedicated interval library would return 0 for
  that product.

## What is not built

These are mentioned in the paper but not designed there, or are
alternatives to the main design:

- Division.
- Double-precision intervals, whose two bounds would come as two
  consecutive 64-bit words. The paper mentions this as a further extension.
- The eight-product multiplication method.
- The case-selection method of the paper's Table 1. This is a software
  approach.

## Files

`rtl/` (the package comes first when compiling):

| file | content |
|------|---------|
| `fpu_pkg.sv` | modes, opcodes, rounding modes, the `prod_t` product record, rounding decision and result packing |
| `interval_fpu.sv` | top level |
| `fp_add_pipe.sv`, `fp_mul_pipe.sv` | the two pipelines |
| `split_cla.sv`, `cla_half.sv`, `split_cmp.sv`, `split_negate.sv`, `split_rshift.sv`, `split_normalize.sv`, `split_round.sv`, `round_unit.sv` | split datapath units |
| `csa_mul.sv`, `minmax4.sv` | multiplier parts |

`tb/`:

- Each testbench `tb_<module>.sv` is self-checking. It ends with a line
  `TB_RESULT checks=N failures=M`.
- `fp_ref_pkg.sv` is the reference model. It forms every sum and product
  as an exact wide integer and rounds it once, so it shares no code with
  the datapath.
- The pipeline testbenches also check latencies. `tb_interval_fpu` runs a
  random mixed stream through the whole unit at its default size. It also
  counts how often each mechanism occurred and fails if one never did:
  - swap;
  - sticky;
  - conversion;
  - inexact rounding;
  - each interval operation;
  - the carry-save bypass;
  - the min/max stage;
  - refused offers;
  - overflow.

`tb_interval_enclosure` checks the interval results without any rounding
model. It picks random points inside random input intervals, combines them
in `real` arithmetic, and requires every point result to lie inside the
interval the hardware returned.

To simulate with Verilator:

```
verilator --binary --timing --assert --top-module tb_interval_fpu \
    rtl/fpu_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/tb_interval_fpu.sv
./obj_dir/Vtb_interval_fpu
```

Lint the RTL alone with
`verilator --lint-only -Wall rtl/fpu_pkg.sv rtl/*.sv --top-module interval_fpu`.
Warnings about unused bits remain, such as unused carry-outs of adders that
are reused at several widths.
