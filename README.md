# Interval multiplier for double precision intervals

Interval arithmetic carries every quantity as a closed range `X = [xl, xu]`
that is guaranteed to contain the true value. Multiplying two intervals is
the expensive basic operation: the result is

    Z = X * Y = [ min(xl*yl, xl*yu, xu*yl, xu*yu),  max(same four products) ]

and, on a computer, the lower end must be rounded toward -infinity and the
upper end toward +infinity (outward rounding) so that `Z` still encloses the
exact result.

Software usually avoids computing all four products by looking at the signs
of the end points: whether each interval is positive, negative or straddles
zero gives nine cases, eight of which need only two products. That costs a
chain of data-dependent branches, the ninth case (both intervals straddle
zero) still needs four products and two comparisons, and the number of
multiplications varies from case to case, which is hard to pipeline.

This unit takes the other road. It always forms the four products in
parallel and then finds the minimum and maximum with a fixed sequence of
comparisons. Every operand pair takes the same path and the same number of
cycles, whatever its signs, and there is no branch anywhere.

## Data format

* End points are IEEE 754 binary64 (double precision) words.
* An interval is the packed struct `interval_t {lo, hi}`, 128 bits, lower end
  point in the upper half.
* Every product inside the unit is carried as `prod_t {dn, up}`: the same
  product rounded toward -infinity and toward +infinity.

All shared types and constants are in `rtl/ia_pkg.sv`.

## Outward rounding without a rounding mode

A conventional floating-point unit has one global rounding mode, and
switching it between the two end points is what makes software interval
arithmetic slow. Here each multiplier keeps its 106-bit significand product
exact and rounds it at the end in two directions at once, from the same
guard and sticky bits. Round-to-nearest comes from the same bits as well.

Rounding is monotone, so two things follow:

* The smallest of the four round-down products is the round-down of the
  smallest exact product.
* The largest of the four round-up products is the round-up of the largest
  exact product.

The minimum side of the unit therefore looks only at `.dn` words, and the
maximum side only at `.up` words. Four multipliers then give a correctly
outward-rounded result. An exact product gives `dn == up`. An inexact one
gives two neighbouring doubles.

## Stage 1: four products (`ia_stage1`, `fp_mul`)

Four `fp_mul` instances compute

| register | product   |
|----------|-----------|
| `p`      | `xl * yl` |
| `q`      | `xl * yu` |
| `r`      | `xu * yl` |
| `t`      | `xu * yu` |

The results are held in the `p, q, r, t` registers, 128 bits each.

`fp_mul` is a full binary64 multiplier:

* Subnormal inputs and outputs are handled with gradual underflow.
* Overflow gives infinity, or the largest finite number when rounding toward
  zero.
* Infinity times a non-zero number gives a signed infinity.
* A NaN input, or zero times infinity, gives the canonical quiet NaN
  `0x7FF8000000000000`.
* No exception flags are produced except `inexact`, which the interval unit
  does not use.

## Stage 2: the select-line sequence (`ia_stage2`, `fp_cmp`)

Stage 2 has two 64-bit comparators, one for the minimum side and one for the
maximum side. Each comparator has two operand multiplexers in front of it. A
2-bit select line `sel` steps through three codes, one per clock cycle:

| `sel` | minimum side (`.dn` words)  | maximum side (`.up` words)  |
|-------|-----------------------------|-----------------------------|
| `00`  | `min1 = min(p, q)`          | `max1 = max(p, q)`          |
| `01`  | `min2 = min(min1, r)`       | `max2 = max(max1, r)`       |
| `10`  | `Zl   = min(min2, t)`       | `Zu   = max(max2, t)`       |

How the multiplexers and registers work:

* The first multiplexer of each comparator chooses `p` in step `00`. In the
  other steps it chooses the running register, which holds `min1`/`min2` on
  one side and `max1`/`max2` on the other.
* The second multiplexer chooses `q`, `r` or `t`.
* `fp_cmp` uses its comparison result as the select line of its own min/max
  output multiplexer.
* Step `10` writes the `Zl`/`Zu` result registers, pulses `z_valid` and
  raises `take`. `take` releases the stage-1 registers.

`fp_cmp` orders doubles by sign and magnitude. Its rules:

* `+0` and `-0` compare equal.
* On a tie, `min` returns the first operand and `max` the second.
* A NaN operand makes both outputs NaN.

A NaN end point, or an undefined product such as `0 * inf`, therefore makes
both result end points NaN. The unit does not apply the extended interval
rules that would give `[0, 1] * [-inf, 2] = [-inf, 2]`.

One sequence of comparisons serves every sign combination. For example, with
`X = [1, 2]` and `Y = [-3, 0.5]`, the products are `p = -3`, `q = 0.5`,
`r = -6` and `t = 1`:

* min1 = -3, min2 = -6, Zl = -6
* max1 = 0.5, max2 = 0.5, Zu = 1
* Z = [-6, 1]

## Floating-point multiply (`OP_FMUL`)

The same multipliers also serve as a double precision multiplier. With
`op = OP_FMUL`:

* `Zl = xl * yl` and `Zu = xu * yu`, both rounded to nearest even.
* Stage 1 loads both roundings of `p` and of `t` with the nearest-even value.
* Stage 2 copies `p` and `t` to `Zl`/`Zu` in its first cycle and skips the
  comparisons.

## Interface and timing (`ia_mul`, the top)

| port       | dir | width | meaning                                            |
|------------|-----|-------|----------------------------------------------------|
| `clk`      | in  | 1     | clock, all registers on the rising edge            |
| `rst_n`    | in  | 1     | asynchronous reset, active low                     |
| `in_valid` | in  | 1     | `op`, `x`, `y` are offered                         |
| `in_ready` | out | 1     | the offer is taken at this rising edge             |
| `op`       | in  | 1     | `OP_IMUL` (0) interval multiply, `OP_FMUL` (1)     |
| `x`, `y`   | in  | 128   | operand intervals `{lo, hi}`                       |
| `z`        | out | 128   | result registers `{Zl, Zu}`; hold until the next result |
| `z_valid`  | out | 1     | one-cycle pulse in the cycle `z` changes           |

The top has no parameters. Handshake rules:

* An offer must be held, unchanged, until it is accepted. An assertion in
  `ia_mul` checks this.
* The result has no back-pressure. `z` is valid from the `z_valid` pulse
  until the next pulse.

Cycle by cycle, for back-to-back interval multiplications (edge 0 accepts A):

| edge | stage 1 registers | stage 2 step      | `z_valid` after the edge |
|------|-------------------|-------------------|--------------------------|
| 0    | A loaded          | -                 | 0                        |
| 1    | A                 | A `00` done       | 0                        |
| 2    | A                 | A `01` done       | 0                        |
| 3    | B loaded (`take`) | A `10` done       | 1 (A)                    |
| 4    | B                 | B `00` done       | 0                        |

* An interval result arrives 4 cycles after its operands are accepted.
* A new interval multiplication is accepted every 3 cycles. Stage 1 refills
  in the same cycle that stage 2 consumes it.
* `OP_FMUL` results arrive after 2 cycles, and one can be accepted every
  cycle.
* The design has no combinational path from `in_valid` to `in_ready`.

The critical path is one 53x53-bit multiplier plus normalisation and
rounding within a cycle. The design has no pipeline registers inside
`fp_mul`. Retiming or pipelining it is left to the implementation.

## How far it can be trusted

Every block has a self-checking testbench in `tb/`. The expected values are
computed independently of the RTL, from the simulator's own double
arithmetic:

* **`tb_fp_mul`**: about 9000 products, with bit patterns chosen to reach
  subnormals, overflow, ties, zeros, infinities and NaNs. Checks:
  * the nearest-even result matches the simulator's multiplication;
  * `dn <= exact <= up`;
  * `dn` and `up` are equal or adjacent;
  * the exactness flag matches an integer computation.
* **`tb_ia_stage1`**: the four product registers, both roundings, and the
  load/hold/refill handshake.
* **`tb_fp_cmp`**, **`tb_ia_stage2`**: min/max against real comparisons,
  including ties, signed zeros, infinities and NaNs. Also the `00 -> 01 -> 10`
  select sequence, the 3-cycle and 1-cycle latencies, and that results hold.
* **`tb_ia_mul`**: end to end, at the design's only size. It runs 4000 random
  operations with random gaps, plus a worked example and a NaN case.
  * The reference takes the min of the round-down and the max of the
    round-up products. Both directed roundings come from Dekker's
    error-free product.
  * Every result is also checked to enclose products of sample points drawn
    from inside `X` and `Y`.
  * It checks the latencies and the 3-cycle issue interval.
  * It counts each mechanism and fails if one never occurs: all nine sign
    cases, both operations, stalled offers, back-to-back refills, widened
    and exact results, and NaN propagation.

The directed-rounding reference in `tb/ia_ref_pkg.sv` needs moderate
exponents. For that reason the end-to-end test draws end points with
unbiased exponents between about -23 and +23. The extreme ranges are covered
by `tb_fp_mul` alone.

Timing figures assume one select step per clock cycle and a single-cycle
multiplier. No synthesis for a technology, no timing closure and no
gate-level simulation have been done.

## Where this design makes its own choices

The algorithm and datapath are given by their source. The following points
are choices of this implementation:

* **Comparator sharing.** The block diagram this design follows draws a tree
  of comparators: one for `p`/`q`, then one per side for `r`, then one per
  side for `t`. Its description instead steps shared comparators with the
  select lines `00`, `01`, `10`. This RTL follows the stepped description:
  two comparators, three cycles. A fully parallel tree would cost three more
  comparators but would give one result per cycle.
* **Minimum and maximum sides.** The two sides compare different roundings
  of the same products (`.dn` and `.up`). The diagram shares the first
  comparator between the `p`/`q` minimum and maximum.
* **Interface and timing.** The handshake, reset style, cycle timing and the
  running `min1`/`min2` registers are all choices of this design.
* **`OP_FMUL` lanes.** The source says the unit also performs plain
  floating-point multiplication but not how. Using the `p` and `t`
  multipliers as two lanes is this design's choice.
* **Special values.** NaN handling, signed zero and tie rules are this
  design's own.
* **Not implemented.** Interval comparison operations, and the interval hull
  and intersection that could reuse the comparators, are mentioned but not
  specified. They are not part of this RTL.

## Files

| file                 | contents                                                  |
|----------------------|-----------------------------------------------------------|
| `rtl/ia_pkg.sv`      | types `interval_t`, `prod_t`, `op_e`, `sel_e`; constants  |
| `rtl/fp_mul.sv`      | binary64 multiplier, round down / up / nearest            |
| `rtl/fp_cmp.sv`      | binary64 min/max comparator                               |
| `rtl/ia_stage1.sv`   | four multipliers and the `p, q, r, t` registers           |
| `rtl/ia_stage2.sv`   | select-line sequencer, multiplexers, `Zl`/`Zu` registers  |
| `rtl/ia_mul.sv`      | top: stage 1 + stage 2                                    |
| `tb/ia_ref_pkg.sv`   | reference arithmetic for the testbenches                  |
| `tb/tb_*.sv`         | one self-checking testbench per module                    |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. A
watchdog ends it with a failure if it hangs. With Verilator 5, from the
folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/ia_pkg.sv tb/ia_ref_pkg.sv tb/tb_ia_mul.sv --top-module tb_ia_mul
    ./obj_dir/Vtb_ia_mul

Replace `tb_ia_mul` with `tb_fp_mul`, `tb_fp_cmp`, `tb_ia_stage1` or
`tb_ia_stage2` to run the block tests. Each one runs in well under a second.
`N_OPS` in `tb_ia_mul` sets the length of the random run.
