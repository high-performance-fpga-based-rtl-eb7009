# Floating-point reduction circuits for back-to-back sets

Many floating-point kernels (dot products, vector norms, matrix-vector
products split into pieces) end in the same step: a stream of values arrives
one per clock, grouped into sets, and each set must be summed to a single
value. With a deeply pipelined adder this is harder than it looks. An adder
with ALPHA pipeline stages cannot add a new value to a running sum every
cycle, because that sum is still ALPHA cycles away from existing. The usual
way around this, keeping several partial sums in the pipeline, leaves a
tangle of partial sums behind when one set ends and the next begins
immediately.

This RTL implements two circuits that reduce such streams without ever
stalling the input, for sets of any length, each using only two pipelined
floating-point adders and a small buffer:

* **The serial circuit** (`serial_reduce`) folds a binary reduction tree onto
  two adders. Its buffer is `lg(n)` levels of three words, for sets of up to
  `n` values.
* **The parallel circuit** (`parallel_reduce`) accumulates each set inside
  one adder's pipeline. While that adder combines its leftover partial sums
  ("coalescing"), the second adder starts on the next set. Its buffer is one
  FIFO of `ALPHA * ceil(lg(ALPHA) + 1)` words.

`reduction_top` places the two circuits side by side. They share only clock
and reset; each has its own ports.

## The serial circuit

### Idea

Picture the full binary tree that sums a set. Its leaves are the input
values, level 1 holds sums of two values, level 2 sums of four, and so on.
Level 0 of the tree (adding input pairs) needs at most one addition every
two cycles per set. All the higher levels together need fewer additions
than level 0. So one adder is enough for level 0 (adder A) and a second
adder is enough for every other level, shared in time (adder B). The circuit
never needs a third adder and never has to stop the input.

```
 in ──► serial_input_buffer ──► adder A ──► level 1 ─┐
                                           level 2  ├──► serial_control ──► out
                                             ...    │        │   ▲
                                           level L ─┘        ▼   │
                                             ▲             adder B
                                             └──── sums written to level k+1
```

### Tags: how sets are delimited

Sets follow each other with no gap, so the circuit must know which words
belong together without counting set lengths. Every word carries a tag
(`reduce_pkg::tag_t`):

* `first`: this is the first word of its set at this tree level.
* `last`: this is the last word of its set at this tree level.
* `id`: an 8-bit set number counted at the input.

The rules follow from the tree:

* Two words `(i, i+1)` of one set at one level add into one word at the next
  level. The new word's `first` is the `first` of word `i`. Its `last` is the
  `last` of word `i+1`.
* A set with an odd number of words at a level leaves its last word without
  a partner. That word is sent through the adder with +0.0 and moves up one
  level, still marked `last`.
* A word that is both `first` and `last` is the only word of its set at that
  level. It is the finished sum.

Under these rules, a set of `m` values finishes at level `max(1, ceil(lg m))`:
a one-value set at level 1 (after one trip through adder A with +0.0), and
a set of `2^LOG_N` values at level `LOG_N`.

### The blocks

* `serial_input_buffer` holds one value until its partner arrives, then
  issues the pair to adder A. The last value of an odd-length set goes with
  +0.0. It sets the tags for level 1.
* `level_buffer` is one tree level: a queue of `BUF_DEPTH` (3) words. It
  shows its two oldest words, can drop one or two of them per cycle, and can
  take one new word in the same cycle. Level 1 is written only by adder A.
  Levels 2 to `LOG_N` are written only by adder B. Each level therefore
  receives at most one word per cycle.
* `serial_control` is purely combinational. Each cycle it chooses two
  things:
  * **Adder B:** the lowest level whose two front words pair up, or whose
    front word is a lone `last` word that is not also `first`. The result
    goes to the next level; adder B's tag carries the destination level.
  * **Output:** the lowest level whose front word is finished.

  The two choices always pick different levels, because they need different
  kinds of front word.
* `serial_reduce` wires the blocks together and registers the output.

### Behaviour worth knowing

* **Results can come out of set order.** A short set that follows a long one
  finishes at a lower level, so it finishes sooner. Use `out_id` to match
  each result to its set.
* **Latency.** The result of an `m`-value set appears about
  `m + (ceil(lg m) + 1) * ALPHA` cycles after the set's first value, plus
  any cycles spent waiting for adder B. The testbenches check the bound
  `m + (lg m + 2) * (ALPHA + 4) + 40`.
* **Three words per level.** The original description says its schedule
  never overflows a three-word level. The schedule here (tags, zero padding,
  lowest level first) is this design's own, and no proof is given for it. In
  every simulation a level reached three words but never overflowed. That
  includes `tb_serial_stress`: 4800 back-to-back sets in twelve patterns
  (short odd lengths, lengths `2^k + 1` that load adder B most with
  padding, long sets followed by very short ones), with adders of 5, 14
  and 30 stages. If a level ever overflows, the word is lost, the sticky
  `overflow` flag is set and an assertion warns.
* **Sets longer than `2^LOG_N`** are not reduced. They leave an unfinished
  word at the top level, which raises the sticky `too_long` flag.

## The parallel circuit

### Modes of one adder

`par_reduce_unit` is one adder with a small controller. The controller
passes through four modes:

| mode     | what happens |
|----------|--------------|
| WAIT     | Idle. The first value of a new set is taken (with +0.0) and the unit enters FILL. |
| FILL     | Each new value enters the pipeline with +0.0. The pipeline has not produced anything yet. The first pipeline output moves the unit to STEADY. |
| STEADY   | Each pipeline output is added to the next input value and sent back in, so ALPHA running partial sums circulate. |
| COALESCE | Entered when the set's last value is read. Pipeline outputs are paired with each other until one value is left. That value is the sum, and the unit returns to WAIT. |

The only transitions are WAIT→FILL, FILL→STEADY, FILL→COALESCE (sets
shorter than the pipeline), STEADY→COALESCE and COALESCE→WAIT. A one-value
set spends one cycle in FILL before COALESCE.

COALESCE is the subtle part. A hold register keeps one pipeline output
until the next output arrives, and then the two are added. The pipeline
empties when roughly half the partial sums are left, and the same happens
again each round. Coalescing ALPHA partial sums therefore takes about
`ALPHA * (ceil(lg ALPHA) + 1)` cycles. With ALPHA = 14 the longest coalesce
measured was 69 cycles, against 70 for that formula. The hold register also
absorbs idle input cycles in FILL and STEADY: an output that finds no new
value waits there and is added to the next value that appears.

### Two adders and the FIFO

`parallel_reduce` puts every input value, with its `last` flag and set
number, into `input_fifo`. Exactly one unit owns the input at a time:

1. Unit 0 owns the input after reset.
2. When the owner reads a set's last value, it starts coalescing, and
   ownership passes to the other unit.
3. The new owner starts reading as soon as it is back in WAIT. Until then,
   values wait in the FIFO.

The FIFO holds `ALPHA * ($clog2(ALPHA) + 1)` words, 70 for ALPHA = 14. That
is enough to cover one full coalesce time.

**Limitation:** values enter and leave the FIFO at one per cycle, so a
backlog only shrinks in cycles when the input is idle. The FIFO can overflow
in two cases:

* A long stream of back-to-back sets that are shorter than the coalesce time.
* Short sets that come too often for idle cycles to drain the backlog.

For example, 1-value sets at one per cycle would need a fresh set every
cycle, while each adder needs about ALPHA cycles per set. Overflow raises
the sticky `overflow` flag and an assertion warning. The testbenches
exercise these two workloads:

* Sets longer than 70 values. No backlog builds up.
* A long set, a short set, then a long set followed by idle cycles. The
  FIFO peaked at 69 of its 70 words.

When both units finish in the same cycle, unit 0's result goes out first and
unit 1 holds its result for one cycle. Results carry their set number, as
in the serial circuit.

## The floating-point adder

`fp_add_pipe` adds two IEEE-754 numbers of any binary format (`EXP_W`
exponent bits, `MAN_W` fraction bits: 11/52 for double, 8/23 for single
precision). It accepts one addition per cycle, and each result appears
exactly ALPHA cycles later. A tag of `TAG_W` bits travels with each
operation.

* Rounding is to nearest, ties to even. Guard, round and sticky bits are
  used.
* Subnormal inputs count as zero. Results below the normal range flush to a
  zero of the same sign.
* Infinities follow IEEE-754. A NaN input, or inf + (-inf), gives the
  default quiet NaN.

The arithmetic takes five register stages:

1. Unpack the operands, detect special values, and order the operands by
   magnitude.
2. Align the smaller operand.
3. Add or subtract.
4. Normalise.
5. Round and pack.

`ALPHA - 5` delay registers follow, bringing the latency to exactly ALPHA.
ALPHA must therefore be at least 5. For an FPGA build you may prefer to
replace this adder with a vendor core of the same latency.

## Interfaces

All ports are synchronous to the rising edge of `clk`. `rst_n` is an
active-low synchronous reset. It clears control state and valid bits, not
data registers.

| port (per circuit) | dir | meaning |
|---|---|---|
| `in_valid`, `in_data`, `in_last` | in | One value per cycle at most. `in_last` marks the final value of a set. There is no ready signal: the circuits never stall the input. Idle cycles are allowed anywhere, including inside a set. |
| `out_valid`, `out_data`, `out_id` | out | One registered result per cycle at most: the set's sum and its 8-bit set number (sets numbered from 0 after reset, wrapping at 256). |
| `overflow` | out | Sticky: a buffer level (serial) or the FIFO (parallel) lost a word. |
| `too_long` | out | Serial only, sticky: a set exceeded `2^LOG_N` values. |
| `mode[2]`, `fifo_count` | out | Parallel only: each unit's mode and the FIFO fill. |

In `reduction_top` these ports are prefixed with `s_` (serial) and `p_`
(parallel).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `EXP_W`, `MAN_W` | 11, 52 | Floating-point format (double precision). Use 8, 23 for single precision. |
| `ALPHA` | 14 | Adder pipeline depth. The method works for any depth. 14 is an assumed, typical depth for a double-precision FPGA adder. |
| `LOG_N` | 20 | Serial circuit: number of buffer levels; sets of up to `2^LOG_N` values. |
| `BUF_DEPTH` | 3 | Serial circuit: words per buffer level. |
| `FIFO_DEPTH` | `ALPHA*($clog2(ALPHA)+1)` | Parallel circuit: input FIFO size (70). |
| `reduce_pkg::SET_ID_W` | 8 | Width of the set number. |

## What follows the original methods and what is this design's own

These parts follow the original description of the two methods:

* Two ALPHA-stage adders per circuit.
* The serial circuit's input buffer, `lg(n)` three-word levels and control.
* The parallel circuit's four modes and their transitions, the steady-state
  rule (pipeline output plus FIFO value), the FIFO size, and the hand-over
  of the next set to the second adder while the first one coalesces.
* Double- and single-precision IEEE formats, and set sizes up to 2^20.

These parts are this design's own:

* The serial schedule: first/last tags, zero padding of odd tails, and
  lowest level first.
* The one-word input buffer.
* The hold register and the pairing rule in coalesce.
* Alternating ownership between the two units, and the output arbitration.
* The set number on the outputs.
* The overflow and `too_long` flags.
* Flush-to-zero handling of subnormals.
* The adder's internal structure.
* The default ALPHA of 14.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fp_add_pipe` | 4000 random additions plus directed cases (ties, cancellation, zeros, inf, NaN, overflow) in double and single precision, against the simulator's own arithmetic. Also checks latency = ALPHA. |
| `tb_level_buffer`, `tb_input_fifo` | Random traffic against a queue model, plus the overflow flag. |
| `tb_serial_input_buffer` | Pairing, zero padding and tags for random set lengths with idle cycles. |
| `tb_serial_control` | 20000 random level states against a model of the schedule. |
| `tb_serial_reduce` | 250 sets with 7 levels (mixed lengths with idle cycles, then lengths `2^k + 1` back to back): sums, set numbers, latency bound, no overflow, each mechanism used, `too_long`. |
| `tb_par_reduce_unit` | 200 sets: sums, no input stall, legal mode transitions (each seen), coalesce time ≤ `ALPHA*ceil(lg ALPHA + 1)`. |
| `tb_parallel_reduce` | 240 sets: sums, FIFO bound, every transition of both units, values waiting in the FIFO. |
| `tb_reduction_top` | Both circuits at default parameters at once, including one serial set of 2^20 values. Every mechanism above must occur. |
| `tb_serial_stress` | Twelve back-to-back set-length patterns on circuits with 5-, 14- and 30-stage adders: sums and no level overflow. |
| `tb_serial_workloads` | Serial circuit in single and double precision with sets of 2^4, 2^6, ..., 2^20 values; exact sums and linear latency. |

The testbenches use small integer values wherever the summation order would
otherwise matter. Sums of such values are exact in any order, so the
expected result does not depend on the circuit's tree shape.

To run one with Verilator 5 (package first, then the design, then the
testbench):

```
verilator --binary --timing --assert -Irtl rtl/reduce_pkg.sv rtl/*.sv \
    tb/tb_reduction_top.sv --top-module tb_reduction_top -o sim
./obj_dir/sim
```

The end-to-end test at full size takes a few seconds. The workload test
(over four million cycles) takes about a quarter of a minute.
