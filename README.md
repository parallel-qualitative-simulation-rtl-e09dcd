# MULT-CCF: a hardware constraint check for qualitative simulation

QSIM, the qualitative simulator, predicts every behaviour a physical system
can show from a weak model of it: variables take values such as "between
landmark 0 and landmark *max*, increasing" instead of numbers. The model is a
network of constraints (ADD, MULT, D/DT, M+, M-) over such variables. QSIM
spends most of its time in the **constraint check functions (CCFs)**. A CCF
takes one candidate assignment of qualitative values to the variables of one
constraint and decides whether it is locally consistent. Each simulation step
calls it tens of thousands of times.

This repository holds the RTL of a coprocessor that runs the CCF of the
**MULT constraint** `x * y = z` in hardware. A host processor streams
candidate tuples to it and gets one consistent/inconsistent bit back per
tuple. The architecture follows a published QSIM accelerator ("Parallel
qualitative simulation", 1997). That system spreads the constraint filter
over a tree of DSP processors in software and attaches CCF coprocessors to
some of them. Only the coprocessor is hardware, and only it is here.

The main ideas:

* The check is split into four subfunctions. **SF1** tests signs and
  directions, **SF2** tests zero and infinite magnitudes, and **SF3** tests
  against each stored tuple of *corresponding values*. **SF4** ANDs the
  three results. SF1, SF2 and the first SF3 iteration do not depend on each
  other, so they run in the same cycle. SF4 stops at the first negative
  partial result.
* Corresponding values change rarely, so they are stored inside the
  coprocessor and not sent with every tuple. The memory has one bank per
  variable, so a whole tuple is read per cycle. Its read address steps
  itself and wraps around the list.
* Qualitative values use a compact encoding. Every rule then becomes a
  small table on 2-bit sign codes or one integer comparison.

## Qualitative values and their encoding

A variable's *quantity space* is an ordered list of landmarks, for example
`-inf < -max < 0 < max < inf`. A qualitative magnitude (qmag) is either one
of the landmarks or the open interval between two neighbouring landmarks. A
qualitative direction (qdir) is increasing, steady or decreasing.

The RTL stores a qmag in 8 bits, `qmag_t = {inf, pos[6:0]}`:

| `pos` (signed) | meaning |
|---|---|
| 0 | the landmark zero |
| 2k (k > 0) | the k-th landmark above zero |
| -2k | the k-th landmark below zero |
| odd | the open interval between the two neighbouring landmarks |

`inf` is set when the landmark is +inf or -inf. `pos` then holds the
outermost even position used on that side. Because positions are counted
from zero, the sign of a magnitude is just the sign of `pos`. Two values on
the same side of zero compare in size by comparing `|pos|`. An interval
can never equal a landmark, so such comparisons are always strict.

Signs and directions share a 2-bit two's-complement code: `00` zero/steady,
`01` plus/increasing, `11` minus/decreasing (`10` is unused). A qualitative
value is `qval_t = {qmag, qdir}`, 10 bits in all, so three of them and an
opcode fit in one 32-bit word. All types live in `rtl/qsim_pkg.sv`.

Example: with landmarks `0 < a < b < inf` on the positive side, `pos = 3`
means "between a and b", and `{inf=1, pos=6}` is +inf.

## The MULT check, subfunction by subfunction

For a tuple `(x, y, z)`:

**SF1, value check** (`sf1_value_check`). `sign(z)` must equal
`sign(x)·sign(y)`. The product rule `d(xy) = x·dy + y·dx` restricts the
direction: `qdir(z)` must be a possible sign of
`sign(x)·qdir(y) + sign(y)·qdir(x)`. If the two terms have opposite signs,
any direction is possible. The rules are written as sign tables, not nested
case analysis.

**SF2, infinite-value check** (`sf2_infvalue_check`). `0 · inf` is
undefined, so a tuple with one operand zero and the other infinite is
rejected. Otherwise `z` must be infinite exactly when `x` or `y` is.

**SF3, corresponding-value check** (`sf3_cval_check`, one tuple per
instance). A corresponding-value tuple `(a, b, c)` is a set of landmarks
known to satisfy `a·b = c`. The check applies when `a`, `b` and `c` are
finite, nonzero, and on the same side of zero as `x`, `y` and `z`. It
compares `|x|` with `|a|`, `|y|` with `|b|` and `|z|` with `|c|`. The order
found for `z` must be one the other two allow: both larger gives larger,
both equal gives equal, and mixed allows anything. A tuple the check does
not apply to passes.

**SF4, short-circuit AND and sequencer** (`sf4_short_circuit`). In the
first cycle SF1, SF2 and the first SF3 iteration are valid together. Each
further cycle checks the next stored tuple. The first failure ends the
execution with result 0. If several subfunctions fail in the same cycle, the
one reported follows the order SF1, SF2, SF3. The result is 1 when all
stored tuples have passed. An execution examines k tuples (counted as at
least 1) and takes `max(1, k)` cycles.

The outcome falls into one of the cases used to measure the original
prototype:

| case | terminated by |
|---|---|
| 1 | SF1 |
| 2 | SF2 |
| 3 to 6 | SF3 after 1 to 4 iterations |

Executions that run through more tuples, or pass, continue the same pattern.

## Corresponding-value memory

`cval_mem` holds up to `DEPTH` tuples in three banks (`bank1` for x, `bank2`
for y, `bank3` for z) and reads asynchronously, like FPGA LUT RAM. There is
no read address: a pointer moves forward under control of SF4 and wraps
from the last stored tuple to the first. An execution can start anywhere in
the list, because the result is an AND over all tuples. When SF3 fails, the
pointer stays on the failing tuple, and the next execution starts with it.
After a full pass the pointer is back where it started. The `iters` count
(and so the case) depends on where the pointer stands, but the
consistent/inconsistent result does not.

Tuples are appended to the end of the list, and an append to a full list is
dropped. The whole list can be cleared.

## Host interface

The coprocessor has two independent 32-bit valid/ready channels. A word
moves on a clock edge where `valid` and `ready` are both high, and the sender
holds `valid` and data steady until then. Each channel has a small FIFO
(`io_ctrl`), so the host can send the next instructions while a result is
still waiting to be read.

Instruction words (input channel):

| bits 31:30 | instruction | payload |
|---|---|---|
| `01` | CLEAR: empty the tuple list | none |
| `10` | APPEND: add one tuple | bits 23:0 = `{c1, c2, c3}`, three qmags |
| `11` | EXEC: check a tuple | bits 29:0 = `{q1, q2, q3}` = `{x, y, z}`, three qvals |
| `00` | ignored | |

Only EXEC answers. It returns one result word on the output channel:

| bits | field |
|---|---|
| 0 | result, 1 = consistent |
| 2:1 | terminating subfunction: 0 none (passed), 1 SF1, 2 SF2, 3 SF3 |
| 15:8 | tuples examined by SF3 |
| 23:16 | tuples stored |
| 24 | tuple memory full |

The function controller (`func_ctrl`) handles one instruction at a time.
CLEAR and APPEND take one cycle. Take a coprocessor that is idle, with empty
buffers and an output channel that is always ready. Its result word appears
on the output channel `k + 3` cycles after the clock edge that takes the
EXEC word, with `k = max(1, tuples examined)`. Back-to-back instructions
overlap this time with input buffering.

## Array variant

The published design also proposes running SF3 iterations side by side. The
parameter `LANES` (default 1) gives the array form. That many `sf3_cval_check`
units check consecutive tuples from the circular pointer in the same cycle.
SF4 takes the first failing lane in list order and moves the pointer by up
to `LANES` per cycle. Results are bit-identical to `LANES = 1`. Only the
execution time changes, to `max(1, ceil(k / LANES))` cycles. The pipelined
variant the source also mentions is not implemented.

## Parameters (top: `mult_ccf_coproc`)

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 16 | corresponding-value tuples held |
| `IN_FIFO_DEPTH` | 2 | instruction buffer |
| `OUT_FIFO_DEPTH` | 2 | result buffer |
| `LANES` | 1 | SF3 units (1 = sequential) |

The position width (`POS_W = 7`, up to 31 landmarks on each side of zero) is
set in `qsim_pkg`. Changing it also changes the instruction-word layout.

## Files

| file | contents |
|---|---|
| `rtl/qsim_pkg.sv` | types, encodings, sign-algebra functions |
| `rtl/mult_ccf_coproc.sv` | top: wires I/O, function controller, memory, SF1..SF4 |
| `rtl/io_ctrl.sv`, `rtl/sync_fifo.sv` | the two buffered host channels |
| `rtl/func_ctrl.sv` | instruction decode, operand registers, result word |
| `rtl/cval_mem.sv` | three-bank circular tuple memory |
| `rtl/sf1_value_check.sv` … `rtl/sf4_short_circuit.sv` | the four subfunctions |
| `tb/qsim_ref_pkg.sv` | integer reference model, instruction-level model `ccf_model`, stimulus helpers |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ccf_array_variant` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/qsim_pkg.sv tb/qsim_ref_pkg.sv tb/tb_mult_ccf_coproc.sv \
  --top-module tb_mult_ccf_coproc
./obj_dir/Vtb_mult_ccf_coproc
```

Replace the last file and the top name to run another testbench. The
simulator has two states only, so every register the design reads is reset
(synchronous, active-low `rst_n`).

What the testbenches cover:

* SF1 and SF2 are tested exhaustively over a range of magnitudes and all
  directions. SF3 gets hand-worked cases and 20,000 random tuples. All
  three are compared with an integer model written independently of the
  sign tables.
* The SF4 test, with three lanes, covers every failing position for every
  list length. It checks result, cause, tuples examined, pointer movement
  and cycle count.
* The memory, FIFO-channel and controller tests check wrap-around, overflow,
  clear-over-append priority, ordering under random back-pressure,
  simultaneous input and output, and the result-word layout.
* `tb_mult_ccf_coproc` runs the top at its default parameters, through the
  host channels only:
  * cases 1 to 6, with their latency;
  * a constraint-filter workload of 30 MULT constraints, each with its own
    tuple list, and 64 tuple checks per constraint (1,920 executions, with
    random host back-pressure);
  * overflow of the tuple memory.

  It counts every mechanism (each termination cause, empty list, pointer
  wrap, dropped append, input taken while output is blocked) and fails if
  one never happens.
* `tb_ccf_array_variant` runs the same model against `LANES = 4` and checks
  the shorter latency.

## Design choices and limits

The source describes the block structure:

* SF1 to SF4;
* a three-bank memory with circular auto-increment;
* an I/O controller with two separate channels for simultaneous input and
  output;
* a function controller with three instructions, two of which update the
  memory;
* short-circuit evaluation and parallel SF3.

It also names what each subfunction tests. The following are this design's
own choices, and deserve review before reuse:

* **The exact consistency rules** of SF1, SF2 and SF3 above. They follow
  the usual QSIM multiplication rules, but the source gives them only in
  words. In particular, SF3 constrains only tuples that lie on the same
  side of zero as the values being checked. This is sound but may accept
  tuples a fuller check would reject.
* The value encoding and all widths: 7-bit positions, 32-bit words.
* The valid/ready channel protocol. The original host is a TMS320C40 DSP
  with byte-wide communication ports; a bridge to those ports is not
  included.
* The meaning of the two memory instructions (CLEAR and APPEND), the
  opcodes and the result word.
* `DEPTH = 16`, the FIFO depths, the asynchronous memory read, dropping
  appends when the list is full, and leaving the pointer on a failing tuple.
* The cycle schedule: one cycle per SF3 iteration, and result reporting two
  cycles after SF4 finishes.

Not included: the DSP multiprocessor and its software (tuple filters, Waltz
filter, form-all-states, task scheduling), the wide-tree network between
the processors, and the CCF coprocessors for the other constraint types.
The source says only that those coprocessors are simpler and similar in
structure.

For scale: the original coprocessor ran at 15 MHz in a Xilinx XC4013 FPGA
with sequential SF3. Including host communication, it was reported as 7 to
31 times faster than the software check, growing with the number of SF3
iterations.
