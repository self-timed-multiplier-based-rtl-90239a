# Self-timed signed multiplier with CSD recoding

This is a signed N × M array multiplier (16 × 16 by default) that finishes sooner when the
operands are easy. It rests on two ideas:

* **Radix-4 canonical signed-digit (CSD) recoding of the multiplier.** Each pair of multiplier
  bits becomes one digit in {0, ±1, ±2}. A recoding carry ripples between the pairs, so about a
  third of the digits come out as **zero**. Radix-4 Booth recoding gives a quarter. A zero digit
  means that a whole row of the adder array has nothing to add.
* **Self-timed, dual-rail evaluation.** Every internal bit travels on two wires, and the adders of
  a zero row turn into **pass cells**. A pass cell copies the incoming sum and carry through
  without doing arithmetic, and it switches faster than an adder. A completion detector on the
  product raises `done` as soon as every product bit is known. The time from request to `done`
  therefore depends on the data: on the zero rows, on the length of the recoding carry chain and
  on the carry runs in the final adder.

The circuit this RTL describes was designed as asynchronous dynamic logic. The RTL keeps its
structure and its dual-rail logic equations cell by cell. To make the data-dependent timing
visible in an ordinary simulator, it adds a clocked delay model. Every gate output waits a fixed
number of ticks of a time-base clock, and `done` rises after a number of ticks that depends on
the operands (see [Timing model](#timing-model)).

## Interface and handshake

| port        | dir | width  | meaning |
|-------------|-----|--------|---------|
| `clk`       | in  | 1      | time base of the delay model |
| `r`         | in  | 1      | request: 1 = evaluate, 0 = precharge |
| `a`         | in  | M      | multiplicand, two's complement |
| `b`         | in  | N      | multiplier, two's complement, N even, N ≥ 4 |
| `p`         | out | N+M    | product `a*b`, valid while `done` = 1 |
| `done`      | out | 1      | completion |
| `null_rows` | out | N/2    | bit J is high when digit J is zero (for observation) |

One operation takes four steps:

1. With `r` low (precharge), present `a` and `b`.
2. Raise `r`. The inputs are turned into dual rail and the array evaluates.
3. `done` rises when the product is complete. Read `p`. Keep `a` and `b` stable until then.
4. Lower `r`. One tick later every internal rail, `p` and `done` are back at 0, and the next
   operation can start.

## Dual-rail signalling

Each internal bit is a pair `(t, f)` of type `csd_pkg::dr_t`:

* `(0,0)` is the *spacer* (no data yet).
* `(1,0)` is a valid 1.
* `(0,1)` is a valid 0.

Every rail is a sum of products of input rails, with no inversions. So an output stays at the
spacer until one of its product terms is complete, and from then on it can only rise. That gives
two properties the design relies on:

* **Completion detection.** A bit is known when `t | f`.
* **Early evaluation.** A gate answers as soon as *enough* of its inputs are known. A pass cell's
  sum needs only its sum input. The final adder's carry needs no incoming carry when both
  operand bits are equal. A recoder's carry needs no incoming carry when `B_j` equals `B_(j-1)`
  or `B_(j+1)`.

A digit travels as a 5-out-of-1 code `{N, X, 2X, Y, 2Y}` for `{0, +1, +2, -1, -2}`
(`csd_pkg::csd_code_t`). Exactly one wire is high once the digit is known, and all are low
before. An assertion in the top checks this.

## The recoder chain (`csd_recoder`)

Stage J reads these inputs:

* `B_(2J)` at weight 1;
* `B_(2J+1)` at weight 2;
* the carry `ci` from stage J-1 at weight 1;
* the look-ahead bit `B_(2J+2)`.

With `r = B_(2J) + ci + 2·B_(2J+1)`, it gives:

| r | digit | carry out |
|---|-------|-----------|
| 0 | 0 | 0 |
| 1 | +1 | 0 |
| 2 | +2 if `B_(2J+2)` = 0, otherwise -2 | 0, or 1 for -2 |
| 3 | -1 | 1 |
| 4 | 0 | 1 |

so `digit + 4·carry = r` and `b = Σ D_J·4^J`.

* **Stage 0:** its carry-in is 0.
* **Last stage:** it uses the sign bit `B_(N-1)` as its look-ahead. Its carry-out then always
  equals `B_(N-1)` and can be dropped, so the K = N/2 digits represent the signed `b` exactly.

A stage's carry has to wait for the stage below only when `B_(2J+1)` differs from both
`B_(2J)` and `B_(2J+2)`. Otherwise the carry is known from the stage's own bits. So long carry
ripples are rare. For random multipliers the average longest waiting chain is:

| multiplier width | average longest waiting chain |
|------------------|-------------------------------|
| 16 bits | 1.2 stages |
| 32 bits | 1.7 stages |
| 64 bits | 2.2 stages |

All three stay below 0.5·log2(N).

For random operands the digits come out as follows:

| configuration | measured share of zero digits | expected |
|---------------|-------------------------------|----------|
| 16-bit | 32.3 % | 32.6 % |
| 32-bit | 33.4 % | 32.7 % |
| 64-bit | 33.6 % | 33.1 % |

Each non-zero value takes about 16–18 %.

## The carry-save array

Row J adds `D_J · a · 4^J`, so each row sits two weights to the left of the one above it. All
rows select M+1 bits. Bit i is built from `a_i` and `a_(i-1)`, with `a_M = a_(M-1)` (sign
extension) and `a_(-1) = 0`:

| digit | bit i of the row |
|-------|------------------|
| +1 | `a_i` |
| +2 | `a_(i-1)` |
| -1 | `~a_i` |
| -2 | `~a_(i-1)` |
| 0  | nothing |

Negative digits thus give the ones' complement, and the missing +1 is added separately.

The cells of a row:

| cell | where | does |
|------|-------|------|
| `pi_cell` | row 0, weights 0..M | selects the bit; a null digit gives a valid 0. Row 0 is the first sum vector. |
| `pha_cell` | row 1, weights 2..M-1 | selector + half adder: row 0 made no carries, so only two bits meet |
| `pfa_cell` | row 1 weights M..M+2, rows ≥ 2 all | selector + full adder |
| `ps_cell` | weight 2J+M+1 | the complement of the row's sign |
| `ad_cell` | weight 2J | +1 for a negative digit; for a zero digit it forwards the carry that arrives at weight 2J |

**Pass mode.** When `D_J = 0` the selectors stay at the spacer, and every adder of the row
switches to pass mode:

* The sum output copies the sum input.
* The carry output (weight w+1) copies the *incoming* carry of weight w+1, the one that would
  have entered the neighbouring cell.

The row then hands the previous row's sum and carry vectors on unchanged, and their addition
happens in the next row. The AD cell forwards the carry of weight 2J, because no adder of the row
outputs that weight.

**Sign handling ("sign generate").** Row J does not sign-extend its partial product. Its top bit
is replaced by the complemented sign `~S_J` (from the PS cell) at weight 2J+M+1. That leaves a
constant of `-2^(2J+M+1)` per row. The sum of these constants, modulo 2^(N+M), is

    2^(M+1) + Σ_{J=0}^{K-2} 2^(2J+M+2)

and it enters the array as constant-1 inputs in slots that would otherwise be empty:

* weight M+1, as a carry into row 1;
* weight 2J+M, as the sum input of the top cell of each row J ≥ 1.

**What leaves the array.** These bits go straight to the final adder:

* the two lowest sum bits of each row;
* the AD bit (weight 2J);
* the carry of each row's lowest cell (weight 2J+1);
* all sums and carries of the last row.

For 8 × 8 this gives:

```
weight  15 ........................................ 0
row 0                       PS PI PI PI PI PI PI PI PI PI      AD->w0
row 1                 PS PFA PFA PFA PHA PHA PHA PHA PHA PHA   AD->w2
row 2           PS PFA PFA PFA PFA PFA PFA PFA PFA PFA         AD->w4
row 3     PS PFA PFA PFA PFA PFA PFA PFA PFA PFA               AD->w6
          ripple-carry adder (16 bits) + completion  ->  p[15:0], done
```

## Final adder and completion (`rca_completion`)

The final adder is a P = N+M bit dual-rail ripple-carry adder with carry-in 0:

* **Generate or kill.** When both operand bits are 1 (generate) or both are 0 (kill), the carry
  out is known at once, without waiting for the carry from below.
* **Propagate.** When the operand bits differ, the carry waits for the one from below.

The adder's delay is therefore set by the longest run of propagating bits, not by P. `done` is
the AND of `t | f` over every sum bit, delayed by one tick.

## Timing model

`dr_delay` puts a delay in front of every gate output in the array:

| gate | ticks | parameter |
|------|-------|-----------|
| recoder, selector, PS, AD | 1 | `GATE_TICKS` |
| each final-adder sum and carry, and `done` | 1 | `GATE_TICKS` |
| array adder | 3 | `FA_TICKS` |
| adder in pass mode | 2 | `PASS_TICKS` |

The 3 : 2 ratio comes from the transistor-level sum delays of the adder cell: about 0.46 ns in
normal mode and 0.31 ns in pass mode. The other tick counts are choices of this model.

* **Precharge.** Lowering `r` clears every delay stage on the next clock edge.
* **Zero-delay mode.** Setting all tick counts to 0 gives a purely combinational multiplier, with
  `done` combinational as well.

Measured from `r` to `done` over random and corner operands:

| size | min | average | max |
|------|-----|---------|-----|
| 16 × 16 | 21 | 26.9 | 42 |
| 32 × 32 | 42 | 48.7 | 82 |

The average is well below the worst case, as with the real circuit.

The model does not reproduce transistor-level delays. For example, the circuit's slowest case is
reported as -1 × 1, which takes 35 ticks here, below the maximum. The numbers are useful for
comparing operands within this model only.

## Departures and choices

The following points are choices of this RTL, not taken from the original circuit description:

* **Clocked delay model.** The circuit is asynchronous. The clocked delay model, its tick counts
  and the `null_rows` output were added here.
* **Completion tree.** It is a plain AND of per-bit ORs. The original uses a tree of dynamic
  OR-AND-invert gates.
* **Bus widths.** The carries and sums between cells are carried as separate dual-rail wires,
  with no attempt to model the wiring of the layout.
* **Sign-generate constants.** They are injected in the slots listed above. The original draws
  them on the top cells of the rows, but the exact slots are this design's own.
* **Pass-mode carry.** It is the neighbouring carry of weight w+1. That is what makes the arithmetic
  correct, and it matches the drawing of the cell's inputs.
* **Look-ahead of the last recoder.** The last recoder takes the sign bit as its look-ahead bit.
* **Operand stability.** `a` and `b` must stay stable while `r` is high. Nothing checks this.
* **Not modelled.** The electrical parts of the circuit have no logic function and are not
  modelled: drivers that distribute the request and the digits along the rows, and power rails.
  The same goes for its fault-secure property (a single fault shows up as a non-code word on a
  dual-rail pair or a digit code). The RTL only asserts that neither happens.

## Files

`rtl/`

| file | role |
|------|------|
| `csd_pkg.sv` | dual-rail and digit-code types, helpers |
| `csd_multiplier.sv` | top: input encoding, recoder chain, array, final adder |
| `csd_recoder.sv` | one recoder stage |
| `pp_select.sv` | selector |
| `fa_cell.sv`, `ha_cell.sv` | dual-rail full / half adder with pass mode |
| `pfa_cell.sv`, `pha_cell.sv` | selector + full / half adder |
| `pi_cell.sv`, `ps_cell.sv`, `ad_cell.sv` | first-row selector, sign cell, add-one cell |
| `rca_completion.sv` | final adder and completion detector |
| `dr_delay.sv` | delay element of the timing model |

`tb/` holds one self-checking testbench per module:

* The cell testbenches are exhaustive over all valid dual-rail inputs. They also check spacer
  behaviour and early evaluation.
* `tb_rca_completion` checks all 65,536 pairs of 8-bit operands, including the exact tick count
  each one takes.
* `tb_csd_multiplier` is the end-to-end test at the default 16 × 16. It runs about 3,000
  operations and checks the product, the null-row flags against a reference recoding,
  precharge, the time bound, that every mechanism occurred, the share of zero digits and the
  average longest recoder carry chain.
* `tb_csd_multiplier_32` runs the same test at 32 × 32.
* `tb_csd_digit_stats` runs it on a 64 × 8 multiplier for the 64-bit digit statistics.
* `csd_tb_pkg.sv` holds helpers for the testbenches.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/` (the package first, the other
modules found through the search paths):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/csd_pkg.sv tb/tb_csd_multiplier.sv --top-module tb_csd_multiplier
./obj_dir/Vtb_csd_multiplier
```

To run a cell test, add `tb/csd_tb_pkg.sv` after `rtl/csd_pkg.sv` and name the cell's testbench.
To change the size, override `N` (even, ≥ 4) and `M` (≥ 2) on `csd_multiplier`. The end-to-end
testbenches compute their reference with (N+M)-bit signed arithmetic, so any size works there.
