# Alternating-output BIST

Classic signature-analysis BIST runs a whole test, then compares the final
signature of a multiple-input signature analyzer (MISA) with a stored
reference. This design instead watches the MISA while the test runs. It
watches one bit per clock: g(t), the next value of the MISA's first stage.
Two small combinational *cover circuits* turn that bit into a signal phi(t)
that must read 0, 1, 0, 1, ... in a fault-free run. The first time phi fails
to alternate, the chip is known to be bad. That can be long before the test
ends. The step where it happened helps diagnosis, and no reference signature
has to be stored.

The scheme is from T. Bogue, H. Jürgensen, M. Gössel and Y. Zorian,
*Built-in Self-Test with an Alternating Output*. This RTL implements it
around the paper's small worked example: a 3-input, 2-output circuit, a
mod-8 counter as test input generator, a two-stage MISA and five test
vectors. Every generic part is parameterised, so the same blocks serve a
larger circuit under test (CUT) once its covers are built.

## How phi is made to alternate

Let x(t) be the test vector at step t and g(t) = z1(t+1) the MISA's
first-stage next value. The monitoring circuit computes

    phi(t) = C0(x(t)) & g(t)  |  C1(x(t)) & ~g(t)

So C0 is consulted when g = 1 and C1 when g = 0. The covers are built
offline from a fault-free simulation of the test. For every applied vector
x(t):

* if the fault-free g(t) is 1, require C0(x(t)) = t mod 2;
* if the fault-free g(t) is 0, require C1(x(t)) = t mod 2.

Everything else is a don't-care: the other cover at that vector, and every
vector the test never applies. A two-level minimiser fills the don't-cares
and keeps the covers small. The test vectors must not repeat. If a vector
came up twice, its cover value would have to equal two different values of
t mod 2.

A fault-free run then gives phi(t) = t mod 2 by construction.

Suppose a fault makes g(t) wrong. phi then flips exactly when
C0(x(t)) != C1(x(t)), and the step is *active*. When the two covers agree,
phi does not depend on g, and the error is masked at that step. A fault that
has corrupted the MISA state usually keeps g wrong over many later steps,
though. The next active step with a wrong g then catches it. Don't-cares
filled at random make about half the steps active. The paper's benchmark
runs (1000 vectors) caught all but one of 10909 detectable stuck-at faults
this way.

### The worked example

The CUT is `y1 = (x1 & x2) | x3` and `y2 = ~x2 & x3`. The MISA is
`z1' = y1 ^ z1 ^ z2` and `z2' = y2 ^ z1`, starting from 00. The vectors are
written x1x2x3, and z is written z1z2.

| t | x(t) | y1y2 | z(t+1) | g | C0 = x2 | C1 = x1 | phi |
|---|------|------|--------|---|---------|---------|-----|
| 0 | 000  | 00   | 00     | 0 | 0       | 0       | 0   |
| 1 | 100  | 00   | 00     | 0 | 0       | 1       | 1   |
| 2 | 010  | 00   | 00     | 0 | 1       | 0       | 0   |
| 3 | 110  | 10   | 10     | 1 | 1       | 1       | 1   |
| 4 | 001  | 11   | 00     | 0 | 0       | 0       | 0   |

Now give x3 a stuck-at-1 fault. The CUT outputs become y1 = 1 and
y2 = ~x2, and the MISA runs 11, 10, 01, 00, 11. g is wrong at t = 0, but
C0 = C1 = 0 there, so that error is masked. At t = 1 g is still wrong and
the step is active (C0 = 0, C1 = 1). phi is 0 twice in a row, and the
checker raises `fail` with `first_t = 1`.

The MISA equations are the ones that reproduce both the fault-free and the
faulty state sequences of the example. The testbenches check both sequences
cycle by cycle.

## Blocks

| module | role |
|---|---|
| `bist_alt_pkg` | TIG mode enum, example sizes, fault-site enum |
| `tig` | test input generator: mod-2^M counter (x1 = LSB) or Fibonacci LFSR |
| `example_cut` | the example circuit, with optional single stuck-at injection |
| `misa` | NZ-stage multiple-input LFSR; outputs state `z` and `g = z1(t+1)` |
| `cover_pla` | one cover as a sum of K cubes (`CARE` = literals, `VAL` = polarities) |
| `alt_monitor` | two `cover_pla` plus the AND-OR gating; also `active = C0 ^ C1` |
| `alt_checker` | compares phi with a t mod 2 reference; `err`, sticky `fail`, `first_t`, `dev_count` |
| `bist_ctrl` | session FSM IDLE, INIT, RUN (T_LEN steps), DONE; optional stop at first failure |
| `bist_alt_top` | everything wired together |

Data flow: `tig.x` goes to `example_cut` and to both covers. `example_cut.y`
goes to `misa`. `misa.g` and the cover outputs go into `alt_monitor`, whose
`phi` goes to `alt_checker`. `bist_ctrl` drives `init` (reset TIG, MISA and
checker to their start states) and `step` (advance one vector). The checker's
`fail` goes back to the controller for the early stop.

### Timing of a session

```
cycle:   0        1       2 .. T+1          T+2
         start=1  INIT    RUN, step=1       DONE (done=1, pass = ~fail)
                          t = 0 .. T-1
```

In each RUN cycle, x(t), y(t), g(t), phi(t) and `err` are combinational
from the registered TIG and MISA state. At the clock edge the MISA takes in
y(t), the TIG advances and the checker records the step. `fail`,
`first_t` and `dev_count` are registered, so `fail` rises one cycle after the
failing step. With `stop_on_fail` high, the controller withholds `step` as
soon as `fail` is high and goes to DONE with `aborted` set. A session with a
fault at step t therefore ends after t + 1 vectors. Without a failure a
session takes T_LEN + 2 cycles from the `start` cycle to `done`. A new
`start` from DONE runs again.

### The checker

The paper says only that an error is flagged when the alternation is
disturbed. This checker keeps an expected-phase bit that starts at 0 and
toggles on every checked step, and flags each step where phi differs from
it. The first flag comes at the same step as with a compare-with-previous
checker. After that, each flagged step is one where phi itself was wrong.
`dev_count` therefore counts wrong steps and not alternation breaks, which
is the more useful measure for diagnosis. `dev_count` saturates at its
maximum.

## Building covers for another CUT

This is the only step that is not hardware:

1. Simulate the fault-free CUT and MISA over the planned test to get g(t)
   for every step.
2. Write the two partial truth tables with the rule above.
3. Minimise each one, for example with a two-level minimiser.
4. Give each resulting cube to `bist_alt_top` or `alt_monitor` as one entry
   of `CARE0`/`VAL0` (C0) or `CARE1`/`VAL1` (C1). Bit i of a cube is x_(i+1).
   A set `CARE` bit makes the literal present, and the matching `VAL` bit
   gives its polarity.

`tb/bist_alt_top_lfsr_tb.sv` shows the procedure for the example circuit
under a 3-bit LFSR TIG (seed 001, x^3+x^2+1, T = 7). Its header comment
holds the required values and the hand-filled result:
C0 = x1·~x3 | ~x1·x2·x3 and C1 = ~x1·~x3. Those don't-care choices make
4 of the 7 steps active. All 22 stuck-at faults change the CUT output in
that test, and the alternating output catches 21 of them. The default
5-vector counter test catches far fewer (see the last section). The
difference shows how much the test length and the filling of the
don't-cares matter.

The covers depend on everything that shapes g(t): the CUT function, the TIG
sequence and seed, the MISA feedback and initial state, and T. Change any of
these and the covers must be rebuilt.

## Parameters of `bist_alt_top`

| parameter | default | meaning |
|---|---|---|
| `T_LEN` | 5 | test length T |
| `TIG_MODE` | `TIG_COUNTER` | counter (example) or `TIG_LFSR` |
| `TIG_SEED` | 000 | first vector; must be non-zero for the LFSR |
| `TIG_TAPS` | 3'b110 | LFSR feedback taps (x^3+x^2+1); chosen here |
| `NZ` | 2 | MISA stages (at least the number of CUT outputs) |
| `MISA_FB` | 2'b11 | stages XORed into stage 1 |
| `MISA_Z0` | 00 | MISA initial state |
| `K0`, `CARE0`, `VAL0` | 1 cube, x2 | cover C0 |
| `K1`, `CARE1`, `VAL1` | 1 cube, x1 | cover C1 |

The number of inputs and outputs of the top is fixed by `example_cut` (3 and
2). The generic blocks (`tig`, `misa`, `cover_pla`, `alt_monitor`,
`alt_checker`, `bist_ctrl`) take any size.

## Fault injection

`example_cut` can force one line of its schematic to a constant: `fault_en`,
`fault_site` and `fault_val`. The sites are listed in
`bist_alt_pkg::fault_site_e`. They cover the three inputs, the fanout
branches of x2 and x3, both internal gate outputs and both outputs: 11 sites
and 22 single stuck-at faults. This hook exists for demonstration and for
coverage runs and is not part of the scheme. Tie `fault_en` low in normal
use.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/bist_alt_pkg.sv tb/bist_alt_top_tb.sv --top-module bist_alt_top_tb
./obj_dir/Vbist_alt_top_tb
```

| testbench | what it shows |
|---|---|
| `bist_alt_top_tb` | The example at default parameters. Both example runs are checked row by row against the tables. All 22 stuck-at faults are checked against an independent model. Also checked: the early stop, the session length, and that a pass, a detection, a masked step and an abort each happen. |
| `bist_alt_top_lfsr_tb` | The LFSR TIG end to end, with rebuilt covers and all 22 faults. |
| `tig_tb` | The example counter sequence. LFSR periods at M = 3 (7) and M = 8 (255, taps x^8+x^6+x^5+x^4+1), with no repeated vector. |
| `example_cut_tb` | The truth table, the x3 stuck-at-1 behaviour, and every fault against a gate model. |
| `misa_tb` | Both example state sequences, and a 4-stage, 3-input variant with random inputs. |
| `cover_pla_tb`, `alt_monitor_tb` | The example covers, a 3-cube cover, and the gating. |
| `alt_checker_tb`, `bist_ctrl_tb` | The example phi sequences, random streams, step counts, restart and early stop. |

All testbenches finish in well under a second.

## Results on the example, and limits

* With the default 5-vector test, 20 of the 22 stuck-at faults change the
  CUT output. The alternating output catches 6 of them, each at the first or
  second step where the output is wrong. The covers agree at t = 0, 3 and 4
  (x = 000, 110 and 001), so only t = 1 and 2 are active. Twelve of the
  missed faults first change the output at t = 3 or 4, when no active step
  is left. A 5-vector test is far too short for the effect that gives the
  scheme its coverage: a wrong MISA state that stays wrong over many active
  steps. The paper reports near-complete coverage only for 1000-vector
  tests on its benchmark circuits.
* The benchmark circuits of the paper's evaluation (ISCAS'85 C432 to C3540
  and Berkeley IN5 to X9DN, with 24 to 60 inputs, T = 1000) are not
  included. Their netlists and minimised covers are not part of this design.
* The controller FSM, the checker's registers (`first_t`, `dev_count`), the
  early stop, the LFSR polynomial and the fault-injection hook are design
  choices made here. The paper describes these parts only by their function,
  or not at all. The example's circuit, test sequence, MISA behaviour, covers
  and the AND-OR monitor follow the paper.
