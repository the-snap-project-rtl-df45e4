# A variable-latency double precision FPU

This is a floating point unit for IEEE double precision addition, subtraction,
multiplication and division. Its main idea is that a unit need not always take
its worst-case time. The adder returns a result after one, two or three cycles,
depending on the operands. The divider returns a result in 7 cycles when it has
seen the divisor before and in 31 cycles when it has not, and it does the
expensive exact-rounding step only when the quotient lies close to a rounding
boundary. The processor around it must therefore accept results that arrive
after a varying number of cycles and out of issue order. Every port returns a
tag with its result for that purpose.

The organization follows the FPU proposed by the Stanford SNAP (subnanosecond
arithmetic processor) project, in "The SNAP Project: Design of Floating Point
Arithmetic Units":
- a variable latency pipelined adder;
- a pipelined Booth-3 multiplier with an array of (3,2) counters;
- a Newton-Raphson divider that borrows the multiplier's idle cycles, uses an
  initial approximation table and a reciprocal cache, and rounds with guard
  bits.

The published description gives the structure and the reasons for it, but few
of the details. Widths, encodings, handshakes, the collision rule, the table
contents, the cache organization and the fixed-point formats are choices made
for this RTL. They are listed in "Departures and choices" below.

All arithmetic supports the four IEEE rounding modes: to nearest even (RN),
toward zero (RZ), toward +infinity (RP) and toward -infinity (RM). Denormal
inputs count as zero, and results too small to be normal become zero
("flush to zero"). Infinities and NaNs follow IEEE rules. Every NaN result is
the quiet NaN `0x7FF8000000000000`.

```
     add port              mul port                  div port
        |                     |                         |
 +------v-------+     +-------v--------+  idle   +-------v--------+
 | vla_fp_adder |     | fp_multiplier  |<------->|  nr_div_ctrl   |
 | FAR / CLOSE  |     | Booth-3, (3,2) |  cycles | 2 contexts,    |
 | 1, 2, 3 cyc  |     | array, 3 cyc   |         | NR iterations  |
 +------+-------+     +-------+--------+         +--+----------+--+
        |                     |                     |          |
   add result            mul result           recip_table  recip_cache
                                              (256 x 8)    (128 lines)
                                                    |
                                               div result
```

## Top level: `fpu_top`

There are three independent issue ports, each with its own result port. All
ports are synchronous to `clk`. `rst_n` is a synchronous, active-low reset. It
clears valid bits and cache valid bits, not data.

| Port group | Issue | Result | Notes |
|---|---|---|---|
| `add_*` | `add_valid`, `add_a`, `add_b`, `add_sub` (1 = a-b), `add_rm`, `add_tag` | `add_out_valid`, `add_out_result`, `add_out_tag` | One issue per cycle. `add_out_latency` tells 1, 2 or 3. `add_out_natural` tells the latency the operation would have had without a port collision. |
| `mul_*` | `mul_valid`, `mul_a`, `mul_b`, `mul_rm`, `mul_tag` | `mul_out_valid`, `mul_out_result`, `mul_out_tag` | One issue per cycle. Always 3 cycles. |
| `div_*` | `div_valid`, `div_ready`, `div_a`, `div_b`, `div_rm`, `div_tag` | `div_out_valid`, `div_out_result`, `div_out_tag`, `div_out_hit`, `div_out_back` | A division is accepted when `div_valid && div_ready`. Up to two divisions are in flight. `div_out_hit` and `div_out_back` report whether the cache hit and whether a back-multiplication was made. |

The rounding mode uses the `rmode_e` enum from `snap_pkg` (`RM_RN`, `RM_RZ`,
`RM_RP`, `RM_RM`). Tags are `TAG_W` (default 4) bits wide.

Latencies, counted in clock edges from the issue edge to the edge at which the
result is valid:

| Operation | Latency |
|---|---|
| Addition, FAR path (exponents differ by more than 1) | 3 |
| Addition, CLOSE path, effective addition | 1 |
| Addition, CLOSE path, subtraction with a normalizing shift of at most 2 | 1 |
| Addition, CLOSE path, subtraction with a longer shift | 2 |
| Addition, zero / infinity / NaN operand | 1 |
| Addition that loses the output port to an older result | +1 per loss, never more than 3 in total |
| Multiplication | 3 |
| Division, reciprocal cache miss | 31 |
| Division, reciprocal cache hit | 7 |
| Division, back-multiplication needed | +4 |
| Division, special operands (zero, infinity, NaN) | 2 |

The division numbers hold when the multiplier is free. FP multiplications have
priority on the shared multiplier, so every multiplication issued on the
`mul_*` port can delay a division by one cycle.

## The variable latency adder (`vla_fp_adder`)

### Two paths

A double precision adder has two expensive shifts:
- an aligning right shift of the operand with the smaller exponent;
- a normalizing left shift after a subtraction that cancels leading bits.

They never both matter for the same operands:
- If the exponents differ by more than one (the **FAR** path), the alignment
  shift can be long. A subtraction can then lose at most one leading bit.
- If the exponents differ by at most one (the **CLOSE** path), the alignment
  shift is at most one bit. The cancellation can then be massive.

So there are two datapaths, and each contains only one long shifter.

The FAR path is a classic three-stage pipeline:

1. `fadd_expdiff_swap` subtracts the exponents with a 12-bit adder and swaps
   the operands so that the larger one comes first.
2. `fadd_rshift` aligns the smaller significand. It keeps guard, round and
   sticky bits.
3. `fadd_sum3` is a row of half adders followed by two compound adders. It
   delivers A+B, A+B+1 and A+B+2 at once. Rounding is then only a selection
   among these three results; there is no incrementer after the adder.
   - For a subtraction, the smaller operand is inverted and the +1 of the two's
     complement is one of the selected increments.
   - A+B+2 is needed for the directed rounding modes. Rounding after a carry
     out (a one-bit normalizing right shift) adds one unit at bit 1 of the
     unshifted sum.

### The CLOSE path starts early

The CLOSE path needs the exponent difference only modulo 4, because it
handles only differences of -1, 0 and +1. `fadd_predict_swap` reads the two
low bits of each exponent and swaps and pre-shifts the significands in a few
gates. The CLOSE path can therefore start in the first cycle, next to the
exponent subtraction of the FAR path. It does not wait for it.

In that first cycle the CLOSE path does three things in parallel:
- a compound adder (`compound_adder`) forms the difference;
- a leading-one predictor (`fadd_lop`) forms an indicator string from the
  operands, without waiting for the difference;
- a priority encoder (`fadd_penc`) turns that string into a shift count.

The predictor is either exact or one position too far left. A one-bit
correction after the shift removes the error. This is the usual
leading-one-prediction trick. The check of the result's top bit is part of
`fadd_lshift`.

At the end of the first cycle the FAR path knows the true exponent difference,
and with it which path holds the right answer. A CLOSE result then finishes:
- **in cycle 1** if the operation is an effective addition (no left shift is
  ever needed), or a subtraction whose predicted shift is at most
  `SHORT_SHIFT` = 2. A small multiplexor, a second instance of
  `fadd_lshift` limited to 2 positions, does such a shift in the same cycle.
- **in cycle 2** otherwise, through the full 53-position left shifter.

When the exponents are equal, the difference may come out negative. It is
recomplemented by selection: the magnitude is the bitwise inverse of A + ~B.
With equal exponents the result is exact and needs no rounding.

CLOSE effective additions with exponents one apart do need rounding, and they
may carry out. The CLOSE adder is therefore the same half adder plus two
compound adder block as in the FAR path, so that +1 and +2 are available in
cycle 1.

### One result port: collision logic

Results can finish in cycle 1, 2 or 3, but there is one output port. When
results finish in the same cycle, `fadd_collision` gives the port to the
oldest one. A younger result that loses moves one stage down the pipeline and
tries again next cycle. A result in stage 3 always wins, so no operation takes
more than three cycles.

The adder accepts a new operation every cycle and never stalls its issue
port. Results can overtake each other, so the caller matches them by
`add_out_tag`.

Some special cases finish in cycle 1:
- zero, infinity and NaN operands;
- an exact zero difference, which gives +0, or -0 in RM.

Overflow gives infinity or the largest finite number, depending on the
rounding mode.

### Average latency

With the published operand statistics for floating point programs, the
average latency is 2.25 cycles against 3 for a fixed-latency adder:
- 57% of the operations take the FAR path;
- 20% are CLOSE additions;
- 23% are CLOSE subtractions, and 52.5% of those shift by at most 2 bits.

The testbench `tb_vla_adder_mix` draws random operands in these proportions.
It measures 2.23 cycles when the additions are spaced out so that no results
collide. 33.7% of the additions finish in one cycle, against 32% expected.
The excess comes from subtractions with a true shift of 3 that the predictor
reports as 2.

Collisions cost more as the issue rate rises:
- at two additions every three cycles, the average becomes 2.5 cycles;
- at one addition every cycle, it becomes 3.0.

The last case is a property of a single result port, not of the arbitration
rule. When an operation is issued every cycle, a result must also leave every
cycle. Once a FAR result takes the slot three cycles after its issue, every
later result is held to three cycles as well. The early exits pay off only
when the instruction stream leaves gaps on the add port.

## The multiplier (`fp_multiplier`, `booth3_mult`)

The core, `booth3_mult`, is a 64 × 64-bit unsigned multiplier with three
pipeline stages. It is 64 bits wide rather than the 53 a double needs, so
that division can keep guard bits beyond the 53-bit quotient.

- **Stage 1, `booth3_ppgen`.** Booth radix-8 recoding produces 22 signed digits
  in -4..4. The only multiple that is not a shift is 3X, the "hard multiple";
  it is formed once with a full adder. Negative partial products are inverted
  and sign-extended. A 23rd row collects the +1 of every inverted row (the
  "hot ones"). All 23 rows are 128 bits wide.
- **Stage 2, `csa32_array`.** The 23 rows are reduced to two by levels of
  (3,2) counters (full adders). Each level maps every group of three rows to a
  sum and a carry row. Leftover rows pass through. The carry rows are shifted
  one place left.
- **Stage 3.** A final adder gives the 128-bit product.

`fp_multiplier` wraps the core:
- In stage 1 it unpacks the operands and handles special operands.
- In stage 3 it normalizes by one bit, rounds in the requested mode and
  registers the IEEE result. The latency is 3 cycles at one operation per
  cycle.

It has a second, raw port for the divider, `div_req_*` / `div_rsp_*`. A
request carries two 64-bit fixed-point values and returns their full 128-bit
product 3 cycles later. FP multiplications have priority:
`div_req_ready = !mul_valid`.

## The divider (`nr_div_ctrl` and its helpers)

### Newton-Raphson on a shared multiplier

Division a/b first forms the reciprocal 1/b by the Newton-Raphson iteration

    x(i+1) = x(i) · (2 − b · x(i))

Each iteration is two dependent multiplications. The subtraction from 2 is
done as a one's complement (bit inversion) instead of a two's complement.
That is one unit of the last place off, which the next iteration absorbs.

All reciprocal arithmetic is in 64-bit fixed point with 63 fraction bits. The
quotient is then q = a · x.

The divider owns no multiplier. Each multiplication is a request to the FP
multiplier, and a dependent multiplication must wait 3 cycles for its
operand. During that wait the multiplier is free for other work. Two division
contexts (`NCTX` = 2) use this:
- each context is a small state machine that issues one multiplication at a
  time and waits for its product;
- each cycle, the lowest-numbered context with a request ready is served.

Two divisions therefore run interleaved, and FP multiplications fill the
remaining slots. A context returns to idle after its result is delivered.

### Initial approximation: `recip_table`

The iteration starts from an 8-bit approximation. A 256-entry table is
indexed by the 8 fraction bits below the divisor's hidden one. Entry i is the
reciprocal of the middle of its interval:

    T[i] = round(2^18 / (513 + 2i)) − 256,    x0 = (256 + T[i]) / 512

The relative error is below 2^-8. The error roughly squares with each
iteration, so three iterations (`NR_ITERS`) give more than the 64 bits the
datapath holds. The table is computed by a function when the design is
elaborated. There is no data file.

### Reciprocal cache: `recip_cache`

Many programs divide by the same few values again and again. When a division
starts, its divisor fraction is looked up in a direct-mapped cache of 128
lines, and the lookup is combinational.
- **On a hit**, the stored reciprocal replaces the whole iteration. Only
  q = a · x and rounding remain: 7 cycles instead of 31.
- **On a miss**, the reciprocal is written into the cache when the iterations
  end.

The cache holds 128 × (1 valid + 45 tag + 64 data) = 14,080 bits. The
published proposal sizes it at about 16 Kbits, eight times a 256 × 8 table.

### Exact rounding with guard bits: `div_round_ctrl`

An iterated quotient has no remainder, so it is not obvious which way to
round. The classic fix multiplies the quotient back by the divisor and
compares the product with the dividend. That costs one more multiplication
for every division.

This design avoids it in most cases. The quotient estimate keeps `M` = 8
guard bits below the 53-bit significand. The estimate is within ±2 units of
those guard bits. Rounding can only go wrong if the exact quotient may lie on
the other side of a rounding boundary:
- the halfway point between two doubles for RN;
- a double itself for RZ, RP and RM.

If the guard bits are more than 2 units from that boundary, the estimate is
rounded at once. Otherwise (5 of the 256 guard-bit codes, about 2% of random
quotients) the boundary value c is multiplied by b and compared with a, and
the comparison decides the rounding. On a perfect tie in RN it rounds to
even. This back-multiplication adds 4 cycles.

Quotient normalization, that is whether a/b lies in [0.5, 1) or [1, 2),
comes from an exact comparison of the significands. It is not read off the
estimate.

## Departures and choices

The following are choices of this RTL, not given by the published design, or
places where it deliberately differs:

- **Initial approximation.** The proposal calls for dedicated hardware with a
  *very accurate* initial reciprocal approximation, without describing it.
  A plain 8-bit table is used here, plus enough iterations to make up for it.
  As a result the cache-miss division takes 31 cycles. The published work
  recommends 10 cycles or fewer; this design reaches that only on cache hits.
- **Division result port.** In the published organization, divisions
  appear to return through the multiplier's result bus. Here they have a
  port of their own, so FP multiplications never wait for division results.
- **Pipeline depths.** The multiplier's three stages are this design's
  choice. So are the divider's one-cycle start, rounding and output steps.
- **Multiplier width.** 64 bits. The proposal asks only for "wider than
  strictly required". Only double precision rounding is provided around the
  core.
- **Collision logic.** The adder's port arbitration is oldest-first. The
  tri-state output bus of the original is an AND-OR multiplexor here.
- **Short-shift test.** The 1-cycle CLOSE subtraction is chosen from the
  *predicted* shift count. That count may be one less than the true shift,
  so some subtractions with a true shift of 3 also finish in cycle 1.
- **Counter array.** The (3,2) counter array of the original is placed and
  wired by a delay-driven layout algorithm. Only its logic function is kept
  here: a regular level-by-level reduction. Layout, wire lengths and the
  timing gains of that algorithm are outside what RTL expresses.
- **Denormals.** Denormals are flushed to zero everywhere, so the unit is not
  fully IEEE conforming for tiny numbers.
- **Guard-bit window.** The window is ±2 units wide instead of the ideal
  2^-M fraction of cases. It covers the error of this design's 64-bit
  iterations.
- **Left out.** The fixed-latency three-cycle adder, which the variable
  latency adder improves on, is not built. Neither are the non-Booth and
  Booth-2 multipliers, or binary trees of 4-2 compressors, which the
  published work uses only as comparisons.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints a line
`TB_RESULT checks=N failures=M`. The reference values are computed
independently in `tb/fp_ref_pkg.sv`:
- round-to-nearest results come from the simulator's `real` arithmetic;
- results in the directed modes come from the exact error of the operation:
  - TwoSum for additions;
  - Dekker's exact product for multiplications;
  - the remainder a − q·b for divisions.

The FP testbenches draw random operands biased toward the interesting cases:
- equal and neighbouring exponents;
- cancellation;
- overflow and underflow;
- special values;
- reused divisors.

Latencies are checked cycle by cycle:
- the adder's 1/2/3 schedule and its collision delays;
- the multiplier's 3 cycles;
- the divider's 31/7/+4/2.

`tb_vla_adder_mix` runs the adder on the benchmark path mix described above.
It checks the average latency.

`tb_div_workload` runs single divisions through the whole unit:
- With fresh divisors, 2.2% of quotients need the back-multiplication, and the
  average latency is 31.1 cycles.
- With three divisors in four drawn from a set of 32, the reciprocal cache
  hits 61% of the time. The average falls to 16.4 cycles, a speedup of 1.9.
  Other seeds give hit rates from 50% to 66%. The rate depends on how many
  of the 32 divisors share a line of the direct-mapped cache.

`tb_fpu_top` runs the whole unit at its default parameters with all three
ports busy at once. It checks about 20,000 results. It also counts each
mechanism and fails if one never happens:
- the three adder latencies;
- collisions;
- cache hits;
- back-multiplications;
- divisions held off by FP multiplications;
- two divisions in flight at once.

## Simulating

Every testbench runs with plain Verilator 5 from the directory that holds
`rtl/` and `tb/`. For example:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_fpu_top rtl/snap_pkg.sv tb/fp_ref_pkg.sv tb/tb_fpu_top.sv
./obj_dir/Vtb_fpu_top
```

Replace `tb_fpu_top` with any `tb_<module>` in `tb/` to test one block.
Modules are found through `-y`. Packages must be listed first. The testbenches
use `$urandom`, so pass `+verilator+seed+<n>` to the binary to change the
operands. Each testbench has a watchdog that fails the run if it hangs.

## Files

| File | Contents |
|---|---|
| `rtl/snap_pkg.sv` | rounding-mode enum, rounding decision, final packing with overflow |
| `rtl/fpu_top.sv` | top level |
| `rtl/vla_fp_adder.sv` | variable latency adder |
| `rtl/fadd_expdiff_swap.sv`, `fadd_rshift.sv`, `fadd_sum3.sv`, `compound_adder.sv` | FAR path stages |
| `rtl/fadd_predict_swap.sv`, `fadd_lop.sv`, `fadd_penc.sv`, `fadd_lshift.sv` | CLOSE path stages |
| `rtl/fadd_collision.sv` | output port arbitration |
| `rtl/fp_multiplier.sv`, `booth3_mult.sv`, `booth3_ppgen.sv`, `csa32_array.sv` | multiplier |
| `rtl/nr_div_ctrl.sv`, `div_round_ctrl.sv`, `recip_table.sv`, `recip_cache.sv` | divider |
| `tb/fp_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_<module>.sv` | one testbench per module |
| `tb/tb_vla_adder_mix.sv`, `tb/tb_div_workload.sv` | workload testbenches: adder path mix, division guard bits and cache |

Parameters worth changing:
- `SHORT_SHIFT` in the adder: 0 or 1 gives the less aggressive variants of
  the one-cycle CLOSE subtraction. Results stay the same; only latencies
  change. On the random path mix the average becomes 2.32 cycles (0) or
  2.26 cycles (1) instead of 2.23.
- `NCTX`, `NR_ITERS` and `M` in the divider.
- `ENTRIES` in the reciprocal cache.

The divider and the FP rounding assume the multiplier's default width of
64 bits.
