# Accumulator-based 3-weight test pattern generator for BIST

Pseudorandom built-in self test needs many patterns before it hits the few
input combinations that expose hard-to-detect faults. Weighted patterns
shorten this. Each CUT input is given a weight: 0 (always 0), 1 (always 1)
or 0.5 (pseudorandom). The weights are derived from a small deterministic
test set. This design produces such patterns with an ordinary ripple-carry
accumulator, leaving the adder unchanged. Each accumulator bit is one CUT
input. A weight-0 or weight-1 bit is pinned by the asynchronous set or reset
of its flip-flops, and its carry passes through as if the cell were not there.
The free bits then act as a shorter accumulator that adds LFSR data every
clock, so they toggle pseudorandomly. The generator makes one new pattern per
clock (test-per-clock).

The RTL is a complete BIST around a 10-input, 3-output circuit under test
(CUT):

```
            +-----------------+   set[9:0]   +---------------------+
 session -> |  logic_block    |------------->|                     |  A[9:0]
 counter    |  (weight table) |  reset[9:0]  |  accumulator        |------+--> CUT (fault-free) --> N8,N16,N22 --+
            +-----------------+------------->|  10 x acc_cell      |      |                                     v
                                             |  ripple carry       |      +--> CUT (faulty)     --> N8,N16,N22 -> ora -> bist_controller -> done, pass, fail
 lfsr (11 bit) --- B[9:0] data ------------->|                     |
                                             +---------------------+
```

`bist_top` holds the generator (`tpg`), the response analyzer (`ora`) and the
controller (`bist_controller`). The two CUTs are outside it. `test_pattern`
drives both of them, and their responses come back on `cut_out` and
`cut_faulty_out`.

## The weight table

The CUT inputs are nets N1, N2, N3, N9, N10, N13, N14, N17, N18 and N21. They
are accumulator bits A[0] to A[9]. The deterministic test set has six vectors,
written with A[0] first:

| test | A[0..9]    |
|------|------------|
| T1   | 1010010100 |
| T2   | 0110010010 |
| T3   | 1110110100 |
| T4   | 0001100110 |
| T5   | 0111111110 |
| T6   | 0001100000 |

The tests are split into three subsets, and each subset is one session. An
input gets weight 1 if every test of the subset has a 1 there. It gets weight
0 if every test has a 0, and 0.5 (`-`) otherwise:

| input | N1 | N2 | N3 | N9 | N10 | N13 | N14 | N17 | N18 | N21 |
|-------|----|----|----|----|-----|-----|-----|-----|-----|-----|
| session 0 {T1,T3} | 1 | - | 1 | 0 | - | 1 | 0 | 1 | 0 | 0 |
| session 1 {T2,T5} | 0 | 1 | 1 | - | - | 1 | - | - | 1 | 0 |
| session 2 {T4,T6} | 0 | 0 | 0 | 1 | 1 | 0 | 0 | - | - | 0 |

This table is `WEIGHTS` in `rtl/bist_pkg.sv`. It is the only thing tied to
this particular CUT.

## The accumulator cell (`acc_cell`)

A cell holds a full adder and two D flip-flops with asynchronous, active-high
set and reset:

* Register A holds the CUT input A[i]. It is the adder's first operand and
  loads the sum on each clock.
* Register B holds the operand B[i]. It loads one LFSR bit on each clock.

`set` and `reset` reach the two flip-flops crossed over. `set` forces A=1 and
B=0, and `reset` forces A=0 and B=1:

| set | reset | A[i] | B[i] | carry |
|-----|-------|------|------|-------|
| 1 | 0 | 1 | 0 | cout = cin |
| 0 | 1 | 0 | 1 | cout = cin |
| 0 | 0 | A + B + cin (each clock) | LFSR bit | normal |

A forced cell keeps B equal to NOT A. For a full adder with b = ~a, the carry
out equals the carry in (rows 2, 3, 6 and 7 of its truth table). So the carry
from the free cell below a forced cell reaches the free cell above it
unchanged.

Take the free cells in order and read them as one binary number. That number
then behaves exactly like a `k`-bit accumulator, `A_free <= A_free + B_free +
cin`. `tb_accumulator` checks this property directly.

The set/reset controls act at once, with no clock. A new session's constant
bits therefore appear in the same cycle the session number changes.

Both flip-flops have two asynchronous controls. A synthesis flow must map them
to a flip-flop with asynchronous preset and clear. Front ends that accept only
one asynchronous control per register (the yosys/slang flow, for one) reject
`acc_cell`. Verilator and slang elaborate it without complaint.

## Sequencing (`session_counter`, `logic_block`, `tpg`)

* `session_counter` counts `PATTERNS` patterns per session (default 16) and
  then moves to the next session. After the last pattern of session 2 it
  wraps to session 0. `last` is high during the final pattern of the final
  session.
* `logic_block` decodes the registered session number into `set`/`reset`
  through `WEIGHTS`. While its `active` input is low it drives `reset` on
  every bit. That clears A to 0 and loads B with 1, so each test starts from
  the same state.
* `lfsr` is 11 bits wide and shifts towards bit 0. Its new top bit is
  `q[0] ^ q[2]` (x^11 + x^2 + 1, period 2047), and it resets to seed `11'h001`.
  Bits 0 to 9 feed register B.
* The carry into cell 0 is 0.

With 16 patterns per session, all six tests T1 to T6 are applied in the first
48 patterns. `tb_tpg` and `tb_bist_top` both check this.

## Test control (`ora`, `bist_controller`)

`ora` is a comparator. It raises `mismatch` when the fault-free CUT and the
faulty CUT give different outputs for the current pattern.

`bist_controller` has two states:

* **IDLE**: the generator is stopped and the pattern is 0.
* **RUN**: entered on the clock edge where `start` is high. The generator
  runs, and each clock the comparison of the pattern just applied is
  registered. `pass` means the two CUTs agreed and `fail` means they
  differed. The two are never high together, and an assertion checks this.

Cycle timing, counting the start edge as edge 0:

| what | when |
|---|---|
| session-0 pattern appears | right after edge 0 |
| pattern k | during cycle k |
| pass/fail for pattern k | after edge k+1 |
| `done` (one clock) | after edge 48, with the last pattern's pass/fail |

After `done`, the controller starts a new test if `start` is still high. The
accumulator is not cleared in between, so the next test uses different
patterns. If `start` is low, the controller returns to IDLE. Lowering `start`
during a test does not abort it.

`ovf` is the accumulator's carry out. It is brought out for observation only.

## What is fixed by the method and what is chosen here

These parts are the method itself:

* the cell structure and its crossed set/reset wiring;
* the three cell configurations;
* the weight table and the order of the CUT inputs;
* the session counter, logic block, LFSR and accumulator arrangement;
* the comparison of a fault-free and a faulty CUT;
* the controller's `clk`, `rst`, `start`, `done`, `pass` and `fail`;
* the 11-bit LFSR width.

These are this implementation's own choices:

* the controller starting and stopping the generator through `run` and
  learning the end of a test from the generator's `last` flag;
* 16 patterns per session;
* the LFSR polynomial, shift direction and seed;
* carry-in 0;
* clearing the cells while idle;
* pass/fail reported per pattern rather than as a final verdict;
* `done` as a one-clock pulse;
* restarting while `start` stays high;
* asynchronous active-high `rst`;
* the flip-flop priority if `set` and `reset` were both high, which the logic
  block never produces.

Not included:

* **The CUT.** Its gate-level logic is not part of this RTL; the BIST treats
  it as an external circuit. `tb/cut_model.sv` is a stand-in of the same shape with an
  arbitrary function. A parameter sticks one of its inputs at 0 or 1 to make
  the faulty copy.
* **A plain-LFSR BIST.** This design is meant to be compared against one, but
  none is built here.

## Resources

The design has 41 flip-flops:

| part | flip-flops |
|---|---|
| accumulator (A and B) | 20 |
| LFSR | 11 |
| session and pattern counters | 6 |
| controller (state, done, pass, fail) | 4 |

On top of that it needs a 10-cell ripple adder and a small decoder. A small
FPGA such as a Spartan-3E XC3S500E (9,312 flip-flops) holds it many times
over.

## Files

| file | content |
|---|---|
| `rtl/bist_pkg.sv` | sizes, weight enum, weight table, LFSR taps and seed |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/acc_cell.sv` | full adder + registers A and B with async set/reset |
| `rtl/accumulator.sv` | N cells, ripple carry |
| `rtl/lfsr.sv` | Fibonacci LFSR |
| `rtl/session_counter.sv` | pattern and session counters |
| `rtl/logic_block.sv` | session → set/reset |
| `rtl/tpg.sv` | the pattern generator |
| `rtl/ora.sv` | response comparator |
| `rtl/bist_controller.sv` | IDLE/RUN control, done/pass/fail |
| `rtl/bist_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/cut_model.sv` | stand-in CUT for the top-level testbench |

## Simulating

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
stops. For example, for the full design at its default size:

```
verilator --binary --timing --assert rtl/bist_pkg.sv tb/tb_bist_top.sv \
          -y rtl -y tb --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

Replace `tb_bist_top` with any other `tb/tb_*.sv` to test one module. All of
them run in well under a second.

`tb_bist_top` runs three tests: two back to back with `start` held, then one
more after a pause. Clock by clock it checks:

* the constant inputs against the weight table;
* pass/fail against its own comparison of the two CUT models;
* `done` exactly 48 clocks after each start;
* the idle pattern.

It also counts how often each session, pass, fail (a detected fault), done,
restart and return to idle happened. It fails if any of them never occurred.

## Adapting to another circuit

1. In `bist_pkg`, set `N_INPUTS`, `N_OUTPUTS`, `N_SESSIONS` and `SESSION_W`.
   Write one `WEIGHTS` row per subset of the new test set, using the rule
   above.
2. Keep `LFSR_WIDTH` at or above `N_INPUTS`, because bits 0 to N-1 feed
   register B. Use primitive taps for the new width.
3. Set `PATTERNS` on `bist_top` so that every deterministic test appears
   within its session. Check this in simulation, as `tb_tpg` does for the
   default table.
4. Update the weight strings and the test list in the testbenches.
