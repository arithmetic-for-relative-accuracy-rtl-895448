# Accuracy-driven arithmetic unit

This is an integer and floating-point arithmetic unit that stops as soon as
its result is accurate enough. An ordinary multiplier or divider spends the
same time on every operand. This unit builds the result from contributions
that shrink from one clock cycle to the next, most significant part first.
After the first cycle a product is already within about 12 % of the exact
value. Every further cycle improves it, and the result is exact once the
contributions run out. The caller chooses when to stop, either with an
absolute accuracy threshold or with a maximum number of iterations. Fewer
iterations give an approximate result sooner. A numerical solver can use
coarse results early in its search and exact ones near the answer.

The unit is made of two identical *AD modules* ("accuracy-driven"), each
with 32-bit data ports and a 64-bit result. One works on exponents and the
other on mantissas. Together they provide floating-point multiply, divide, add
and subtract, integer power and root, and every integer operation of a single
module.

## The arithmetic

### Multiplication: a recursion on the leading ones

Write each operand as its leading one plus a rest: A = 2^j + Ar and
B = 2^k + Br, where j and k are the positions of the leading ones. Then

    A*B = 2^j*B + 2^k*Ar + Ar*Br

The first two terms are two shifted operands, so one addition gives them.
The third term is again a product, of two strictly smaller numbers, so the
same step applies to (Ar, Br). One iteration therefore takes:

- a leading-one detection on each operand;
- removal of each leading one;
- two shifts, B << j and Ar << k;
- one addition into the running result.

The product is exact once either rest is zero. Within a single iteration the
two terms have the same leading-one position as the product. So the first
result already carries the full dynamic range, and later iterations only
refine it.

Example, 22 × 14 (10110 × 01110):

| Iteration | A, B | Contribution | Running sum |
|---|---|---|---|
| 1 | 22, 14 | (14<<4) + (6<<3) = 272 | 272 |
| 2 | 6, 6 | (6<<2) + (2<<2) = 32 | 304 |
| 3 | 2, 2 | (2<<1) + (0<<1) = 4 | 308, exact |

Iteration 3 leaves Ar = 0, so the product is complete.

The number of iterations depends on how many ones the operands hold, not on
their width. 1 × 32767 takes a single iteration.

### Division: the same machinery in reverse

Division aligns the divisor's leading one under the remainder's leading one.
It then subtracts the aligned divisor and adds 2^(j−k) to the quotient. The
remainder may go negative. In that case the unit keeps the remainder's
magnitude together with a sign flag. The next step *adds* the aligned divisor
and *subtracts* its power of two from the quotient. This is non-restoring
division (SRT-like), but the shift comes from leading-one positions instead
of a full-width compare.

The loop runs while the remainder's leading one is at or above the divisor's.
If the remainder ends negative, one correction step runs: the quotient loses
one and the divisor is added back to the remainder. This makes the integer
quotient and remainder exact.

Example, 308 / 14: the first step gives 32 (a remainder of −140), and the
fourth step gives the exact 22.

### Stopping early

Every iteration's contribution is compared with the `accuracy` input. For a
multiplication the contribution is the amount added to R; for a division it
is the power of two added to or taken from the quotient.

- With a non-zero threshold, the operation ends at the first contribution
  below it. That contribution is still added, and `acc_reached` is set.
- With a non-zero `max_iter`, the operation ends after that many iterations,
  and `limited` is set.
- With both inputs at zero, the result is exact.

A multiplication's partial result never exceeds the exact product, because
every contribution is positive. A stopped division returns the quotient as
accumulated so far, without the correction step.

## The AD module (`ad_module`)

### Datapath

The register names follow the usual drawing of this module.

| Stage | Registers | Work |
|---|---|---|
| 1 | A, B (32 bit) | Leading-one detection (D, `lod_tree`) and leading-one elimination (E, `lead_elim`) on both. The operand registers hold the rests of a multiplication and the remainder of a division. |
| 2 | SA, SB, pre-shift operands | The segment registers. `spec_unit` loads them with the shift amounts the operation needs. |
| 3 | MA, MB (64 bit) | Two barrel shifters (`barrel_shifter`), each five log stages deep, shift by SA and SB. |
| 4 | IR (64 bit) | `ad_adder` forms MA ± MB, or passes one shifted operand around the adder. |
| 5 | R (64 bit) | Iterating operations accumulate, R ← R + IR. Single-pass operations load R ← IR. `ad_compare` checks each contribution against `accuracy`. |

Each stage has a valid bit.

- A multiplication issues one new iteration per clock cycle. A, B ← Ar, Br
  happens in the same cycle in which the shift amounts are captured.
- A division cannot do that, because its next step needs the new remainder
  in A. It issues one step every third cycle.
- When an operation stops early, iterations already in flight behind the
  stopping one are discarded.

For a multiplication the segment loads are crossed. SA takes B's leading-one
position, which shifts Ar. SB takes A's, which shifts B.

### Operations (`ad_pkg::ad_op_e`)

| Op | Result |
|---|---|
| `OP_ADD`, `OP_SUB` | R = A ± B. The first half of the pipeline is passed through, but the stage count is kept. |
| `OP_MUL` | R = A·B, iterating as above. |
| `OP_MAC` | R = inC + A·B. R is preset with inC. |
| `OP_DIV` | R = A / B. The remainder appears on `remainder`. Division by zero returns 0 with A as the remainder. |
| `OP_FADD`, `OP_FSUB` | R = (A << expA) ± (B << expB). The segment registers are loaded from the exp ports: a float-to-fixed conversion followed by an add. |
| `OP_NORM` | R = A shifted so that its leading one lands on bit 31. `seg_out` holds the original position of that leading one. |
| `OP_LOG` | R = j·2^32 + Ar·2^(32−j): the characteristic in the upper word and the linear (Mitchell) segment value as a 32-bit fraction. `seg_out` = j. |
| `OP_ANTILOG` | A is preset with a leading one: R = (2^32 + A) << expA. This is 2^(expA + A/2^32), with the linear approximation, as a 32.32 fixed-point value. |
| `OP_SEGADD`, `OP_SEGSUB` | `seg_out` = expA ± expB. This is arithmetic on the segment registers, whose result goes straight to the neighbouring module. |

Zero operands need no special case. A zero operand has no leading one, so
nothing is issued and R stays 0 (or inC for MAC).

### Interface and timing

- Pulse `start` for one cycle while `ready` is high. `op` and the operands
  are registered in that cycle.
- `done` pulses once per operation. `result`, `seg_out`, `remainder`,
  `iterations`, `acc_reached` and `limited` then stay valid until the next
  `done`.
- `busy` is high while any operation is in flight.
- `iterations` counts the contributions that reached R.
- Reset is asynchronous and active low.

Latency, in cycles from the start cycle to the done cycle:

| Operation | Cycles |
|---|---|
| Multiplication of n iterations | n + 4 |
| Single-pass operation | 5 |
| Division of s steps (correction step included) | 3s + 2 |
| Iterating operation with nothing to iterate | 2 |

### Overlapping instructions

A multiplication occupies A and B only until it has issued its last
iteration. Its last three iterations are then still in stages 2 to 5. At
that point `ready` rises, and the next operation can start while the
previous one drains.

- Every pipeline entry carries a one-bit tag of its operation and its own
  operation code.
- The IR adder, the accuracy guard and the R accumulator handle each entry
  by its own operation.
- The first entry of an operation starts R afresh, from 0 or from inC.
- The draining operation keeps its own copies of the accuracy threshold, the
  R preset, the contribution count and the remainder.
- An accuracy stop discards only younger entries of the same operation.

At most two operations are in flight, and results come back in order. An
overlapped operation keeps the latency in the table above, so back-to-back
multiplications finish n + 1 cycles apart instead of n + 4. There is one
exception: an operation that issues nothing, such as a product with a zero
operand, may wait up to three cycles for the older one to leave.

A division needs A until its last step has returned. It overlaps with the
operation after it, but not with the one before.

## Leading-one detection tree (`lod_tree`)

The critical circuit finds the leading one in parallel. A 32-bit word is
handled as a tree of 4-input cells, which takes three levels instead of a
32-stage ripple.

- **Nibble cell** (`lod_nibble`). It takes 4 bits and produces a 2-bit
  position code plus a detect signal:
  - `bx = b3 | b2`
  - `ax = b3 | (b1 & ~bx)`
  - `detect = |bits`

  The code is valid only when detect is high.
- **Higher levels.** Each level reuses the same cell on the four detect
  signals of the level below. This gives the next two upper bits of the
  position.
- **Merge** (`lod_merge`). It passes on the lower code bits of the highest
  group that detected a one. It is built as a tree of 2-to-1 selectors
  driven by det1, det3 and det2|det3.
- **Word widths.** The word is padded with zeros at the top to a power of
  four, so a 32-bit word fills half of a 64-bit tree. The position is cut
  to `POSW` bits.
- **Elimination** (`lead_elim`). It clears the bit at the detected position.
  For each bit this is one decode-and-clear gate.

## Floating-point unit (`ad_float_unit`, the top)

### Format

This format is a design choice. A number has:

- a sign;
- an 8-bit two's-complement exponent e;
- a 16-bit mantissa m with an explicit leading one at bit 15.

Its value is (−1)^s · m/2^15 · 2^e. A zero mantissa means zero. The mantissa
is half the module width, so a mantissa product or an aligned sum always fits
the 32-bit port of the NORM step that follows it.

### Multiplication

1. The exponent module adds the exponents (`OP_ADD`) while the mantissa
   module multiplies the mantissas (`OP_MUL`). `accuracy` and `max_iter`
   apply to this multiplication.
2. The mantissa module normalises the product (`OP_NORM`) and reports the
   position p of its leading one.
3. The exponent module adds p − 30 to the exponent sum. The result mantissa
   is the top 16 bits of the normalised product, truncated.

### Division

Division runs the same three steps as multiplication:

1. The exponent module subtracts the exponents while the mantissa module
   divides mA·2^16 by mB (`OP_DIV`). The quotient lies between 2^15 and
   2^17. `accuracy` and `max_iter` apply to this division.
2. `OP_NORM` normalises the quotient.
3. The exponent module adds p − 16 to the exponent difference.

A zero divisor returns zero and sets `exp_ovf`.

### Addition and subtraction

1. The exponent module subtracts the exponents. The operand with the larger
   magnitude becomes L, the other S. The distance d goes straight into the
   mantissa module's segment register.
2. `OP_FADD` or `OP_FSUB` forms (mL << d) ± mS. An effective subtraction
   happens when the signs differ for add, or are equal for subtract.
3. `OP_NORM` normalises the sum.
4. The exponent module adds p − 15 to S's exponent.

Shortcuts:

- If S lies entirely below L's last bit (d > 16), L is returned.
- A zero operand returns the other operand at once.
- An exact cancellation returns zero.

The result takes L's sign.

`exp_ovf` flags a result exponent outside −128..127. The exponent then
wraps.

### Power and root

`FOP_POW` and `FOP_ROOT` take integers: x on `int_a` and n on `int_b`. The
mantissa module runs three operations:

1. `OP_LOG` of x gives log2 x as a 5.27 fixed-point value.
2. `OP_MUL` by n (power) or `OP_DIV` by n (root). This step is
   accuracy-driven like any other multiplication or division.
3. `OP_ANTILOG` of the product or quotient gives the result.

`int_result` returns x^n or x^(1/n) as a 32.32 fixed-point value.

- Log and antilog use the linear approximation, so the result carries its
  error of a few percent.
- A result of 2^32 or more sets `exp_ovf` and returns all ones.
- x = 0 returns 0.

### Integer pass-through

`int_start` sends any `ad_op_e` operation with the `int_*` operands straight
to the mantissa module. The results appear on `int_result`, `int_seg` and
`int_remainder`. If `start` and `int_start` are both high, `start` wins.

### Timing (defaults)

| Operation | Cycles from start to done |
|---|---|
| Float multiply | mantissa multiplication's n + 4, plus 14 |
| Float multiply with a zero mantissa | 7 |
| Float divide | mantissa division's 3s + 2, plus 14 |
| Float divide with a zero dividend or divisor | 7 |
| Float add or subtract | 25 |
| Float add or subtract with exact cancellation | 13 |
| Float add or subtract with a negligible operand | 7 |
| Float add or subtract with a zero operand | 1 |
| Integer command | the module latency plus 2 |
| Power or root | 8 plus the multiplication or division latency, plus 6 more for the antilog unless the result overflows |
| Power or root with x = 0 | 7 |

`iterations`, `acc_reached` and `limited` report the mantissa module's last
iterating operation.

## Design choices and departures

The following follow the usual description of this unit:

- the module's register set and widths (32-bit ports, 64-bit MA/MB/IR/R);
- the D/E/SPEC/BARREL/ADDER/COMPARE split;
- the crossed segment loading;
- the operation list;
- one shift-and-add iteration per cycle;
- a pipeline with data-valid signals in which instructions partly overlap;
- the nibble cell and the selector-based merge;
- building the floating-point operations from two integer modules, in the
  steps listed above.

The following are this design's own choices:

- the pipeline cut and its valid bits;
- division with a magnitude plus sign flag, and its correction step;
- the one-step-per-three-cycles division issue;
- the LOG, ANTILOG and NORM formats;
- the absolute accuracy threshold and the `max_iter` input;
- the float number format, truncation instead of rounding, the operand swap
  and the sequencer;
- float division by analogy with multiplication (subtract the exponents,
  divide the mantissas, normalise);
- the log·n·antilog method for power and root;
- which instructions may overlap, and the tagging that keeps them apart;
- all encodings.

Known departures:

- **Overlap is module-level only.** The floating-point sequencer waits for
  each step's `done`, because every step needs the previous step's result.
  So do integer commands passed through the unit. Only a design that drives
  an `ad_module` directly gains from the overlap.
- **Shifts take one cycle.** The five shift steps of the barrel shifter are
  five log stages of one combinational shifter, which runs in a single
  pipeline stage. It is not five clock steps.
- **Two adder stages.** The IR adder and the R accumulator are separate
  stages. They are not condensed into one three-input adder.
- **Sign handling.** A float's sign is held outside the modules. An integer
  `OP_SUB` result is two's complement in R.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | Checks |
|---|---|
| `tb_lod_nibble` | all 16 inputs of the cell |
| `tb_lod_merge` | random detects and codes against a priority model |
| `tb_lod_tree` | widths 32 and 64: every single-bit word, a leading one over random lower bits, zero, and random words |
| `tb_lead_elim` | 32 bits, random words and zero |
| `tb_barrel_shifter` | every shift amount |
| `tb_ad_adder` | random operands and edge cases |
| `tb_ad_compare` | random operands and edge cases |
| `tb_spec_unit` | every operation's segment loads |
| `tb_ad_module` | every operation on random and corner operands, against the reference model in `tb/ad_ref_pkg.sv` (iteration by iteration), including the cycle counts above, early stops, the division correction, division by zero, and a stream of 800 back-to-back operations that overlap in the pipeline |
| `tb_ad_float_unit` | the whole unit at its default parameters, see below |
| `tb_ad_tables` | a convergence workload, see below |
| `tb_ad_div_sweep` | a division workload on the whole unit, see below |
| `tb_ad_newton` | an equation-solver workload on the whole unit, see below |

`tb_ad_float_unit` checks float multiply, divide, add and subtract bit for
bit against a truncating model. It also checks them against the real value with
a relative tolerance. It checks power and root against a model of the three
steps, and every pass-through integer operation. It checks the latencies
above. It counts each mechanism and fails if one never happens:

- zero operand;
- negligible operand;
- cancellation;
- exponent overflow;
- power overflow;
- float division by zero;
- accuracy stop;
- iteration limit;
- operand swap;
- division correction;
- negative remainder;
- division by zero.

`tb_ad_tables` squares every n from 1 to 32767 and divides n² by n. For each
run it records the first iteration limit at which the result is within 4, 5,
6 and 7 % of the exact value.

The squaring histogram below is checked count for count. It matches the
published convergence table for AD multiplication exactly:

| Iterations | 4 % | 5 % | 6 % | 7 % |
|---|---|---|---|---|
| 1 | 8206 | 9444 | 10639 | 11797 |
| 2 | 20478 | 21102 | 21696 | 20970 |
| 3 | 4083 | 2221 | 432 | 0 |
| Mean | 1.87 | 1.78 | 1.69 | 1.64 |

The division histogram is printed but not checked. This division converges
faster than the published AD division figures:

| | This design (4 %) | Published (4 %) |
|---|---|---|
| 1 iteration | 3888 | 2615 |
| 2 iterations | 16804 | 12411 |
| 3 iterations | 11051 | 13847 |
| 4 iterations | 1024 | 3098 |
| 5 iterations | 0 | 796 |
| Mean | 2.28 | 2.61 |

The published figures may count steps differently, or use a different
alignment rule. Treat the division's iteration counts as this design's
behaviour, not as a reproduction.

`tb_ad_div_sweep` runs a division sweep on the top unit. For
A = 1000 … 10000 in steps of 0.02 (450,001 values), it squares A with
`FOP_MUL` and divides the square by A with `FOP_DIV`, both to full precision.

- Every square and quotient is checked to 2^−13 relative.
- The mantissa division steps are collected in a histogram. It peaks at 7
  steps (124,284 divisions) with a mean of 6.80.
- Published AD figures for the same sweep peak at 9 steps, with a similar
  bell shape. They were computed in double precision to an unstated
  accuracy.
- Here the 16-bit mantissa makes neighbouring values of A coincide, and the
  division runs to the last quotient bit. Only the shape is comparable.

`tb_ad_newton` plays the host software of an equation solver. It finds a
root of x³ − 9x² − 66x + 90 and of −2x³ + 33x² − 17x − 100 by Newton–Raphson,
with the derivative taken as a difference quotient of the last two points.
Every multiplication, addition, subtraction and division runs on the unit,
one after the other. Each solve is repeated with `max_iter` at none, 8, 6, 4
and 3.

| Limit | Root, first equation | Cycles | Root, second equation | Cycles |
|---|---|---|---|---|
| none | 1.194824 | 1205 | 2.189636 | 2140 |
| 8 | 1.194824 | 1199 | 2.189636 | 2098 |
| 6 | 1.194824 | 1165 | 2.189636 | 2057 |
| 4 | 1.194855 | 969 | 2.189697 | 1937 |
| 3 | 1.195038 | 948 | 2.189697 | 1903 |

The true roots are 1.194811 and 2.189652. The bench checks each root
against a bound: the error of evaluating the polynomial on the unit,
divided by the slope at the root. Lower limits cost little accuracy and
save up to about a fifth of the cycles.

The solves run at the unit's 16-bit mantissa rather than 24 bits. Not
simulated: solving with the derivative computed in parallel with the next
function value, and raising the precision during a solve.

## Simulating

Verilator 5 is enough. The packages must be listed ahead of the testbench:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/ad_pkg.sv tb/ad_ref_pkg.sv tb/tb_ad_float_unit.sv \
        --top-module tb_ad_float_unit
    ./obj_dir/Vtb_ad_float_unit

Replace `tb_ad_float_unit` with any other testbench name. Each run prints
`TB_RESULT`. `tb_ad_div_sweep` takes about 20 seconds, `tb_ad_tables` a few seconds,
and the others less.

## Changing it

- `ad_module` is parameterised by `DW`, the data width. RW = 2·DW, and the
  segment width is log2 DW.
- `ad_float_unit` is parameterised by `DW`, `MW` and `EW`. Keep MW ≤ DW/2,
  so that products fit the NORM step.
- The leading-one tree, eliminator and shifter take any width.
- The iteration counter width `IW` (default 6) bounds `max_iter`.
- The reference model in `tb/ad_ref_pkg.sv` describes the expected
  iteration sequence. Change it together with the RTL.
