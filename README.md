# Self-timed radix-2 SRT divider

This is a mantissa divider built on a simple fact. If quotient digits may be
-1, 0 or +1 instead of just 0 or 1, a digit can be picked from a rough
estimate of the partial remainder. That lets the remainder stay in carry-save
form, so each iteration costs one carry-free addition whatever the word width.
The iterations are done by three identical stages in a ring. The stages are
precharged, self-timed logic: no clock decides when a stage may work. Each
stage's quotient digit doubles as its "I am finished" signal, and a small
controller uses those signals to let the stages precharge, evaluate and hold
in turn. One digit of the quotient comes out per stage visit.

The RTL follows the architecture of Williams' self-timed SRT divider as
reconstructed for formal verification: the three-stage ring, the stage
datapath (mux, carry-save adder, 4-bit carry-ripple adder, quotient select,
shift), the 55-bit remainder buses, the quotient-selection table, the
dual-rail and one-hot codes, and the precharge handshake with its timed
optimisation. Everything this design adds is listed under
"Choices and departures" below. The most important addition is that the
self-timed delays are emulated with a clock.

## The arithmetic

### Number format

Operands are normalised mantissas of MW = N-2 = 53 bits whose leading bit
weighs 1/2. The divisor D is in [1/2, 1) and the dividend C must satisfy
0 < C < D. Partial remainders are N = 55-bit two's complement words whose
bits weigh -2, 1, 1/2, 1/4, ..., 2^-53. A mantissa therefore enters the
remainder format as `{2'b00, mantissa}`.

### The iteration

Starting from w_0 = C, every step does:

    q_j     = select(w_j)            digit in {-1, 0, +1}
    w_{j+1} = 2*w_j - q_j*D

The digit is chosen so that the bound |w| <= D always holds. From that bound
and the recurrence, C*2^K - Q*D = w_K, where Q = sum q_j * 2^(K-1-j). So after
K digits, Q is within one unit of C/D * 2^K. The design uses K = ITER = 55
(53 bits plus two extra).

### A worked example

Take D = 241/256 and C = 177/512 on a small divider (11-bit remainders,
12 digits). Remainders below are in units of 1/512, so D = 482:

| j | w_j  | CRA sum | q_j | | j | w_j  | CRA sum | q_j |
|---|------|---------|-----|-|---|------|---------|-----|
| 0 | 177  | 0001    | +1  | | 6 | -240 | 1110    | -1  |
| 1 | -128 | 1110    | -1  | | 7 | 2    | 1111    | 0   |
| 2 | 226  | 0001    | +1  | | 8 | 4    | 0000    | +1  |
| 3 | -30  | 1111    | 0   | | 9 | -474 | 1100    | -1  |
| 4 | -60  | 1111    | 0   | |10 | -466 | 1011    | -1  |
| 5 | -120 | 1111    | 0   | |11 | -450 | 1100    | -1  |

The plus word is 101000001000 and the minus word 010000100111, so
Q = 1505. Then C*2^12 - Q*D = 724992 - 725410 = -418 = w_12, and
Q/2^12 = 0.3674 is C/D to within 2^-12. Step 7 shows the carry-save effect:
w = 2 is positive, but its pending carries are not yet added, so the
four-bit sum reads 1111 and the safe digit 0 is chosen. Step 10 shows the
code 1011. `tb_srt_divider_example` checks this whole table.

### Why four bits are enough

The remainder is held as two words, sum and carry, and its value is their sum.
The stage adds only the top four digits of both words, in a 4-bit ripple
adder (the CRA). The bits it ignores are non-negative in both words and each
word's tail is below 1/4, so the true remainder lies in [s, s + 1/2), where s
is the 4-bit result read with weights -2, 1, 1/2, 1/4. Given |w| <= D < 1,
that interval is narrow enough to fix a digit that is safe for any divisor
in [1/2, 1):

| CRA sum              | remainder lies in           | digit |
|----------------------|-----------------------------|-------|
| 0000, 0001, 0010, 0011 | non-negative              | +1    |
| 1011, 1100, 1101, 1110 | negative                  | -1    |
| 1111                 | [-1/4, +1/4)                | 0     |
| 0100 ... 1010        | cannot occur while \|w\| <= D | (flagged) |

Code 1011 (-1.25) is reachable only because the ignored bits must then hold
pending carries worth at least 1/4. This is why the adder needs four bits and
not three. A three-bit estimate mis-selects after the small adder overflows.

### Getting an ordinary binary quotient

Each digit goes into one of two words: a 1 into the "plus" word for +1 and a
1 into the "minus" word for -1. At the end, one subtraction, plus - minus,
gives the binary quotient. This design does the subtraction in a ripple-carry
adder.

## One stage

```
 q(i-1) ──► qd_mux ──(-D, 0 or +D as ~D+1 / 0 / D)──┐
                                                    ▼
 r(i-1) ─(sum, carry)───────────────────────────► csa ──► w (sum, carry)
                                                          │
                          top 4 digits of both words ◄────┤
                                   │                      │
                          ripple_adder (4 bit, CRA)       shift left 1
                                   │                      │
                                  qsl ──► q(i)            └──► r(i) = 2w
```

`r(i)` is the carry-save pair shifted left by one place, so the next stage
sees 2*w. The value -D is added as the inverted divisor plus a carry-in of 1.
That 1 goes in bit 0 of the carry word, which the carry-save adder leaves free.

### Phases and codes

A stage runs through three phases, set by its precharge-bar input `pb`:

* **precharge** (`pb` low): every output is driven empty. The remainder bits
  are dual-rail (true rail, false rail; both low = empty). The digit is
  three wires, one-hot (`pos`, `zero`, `neg`; all low = empty).
* **evaluate** (`pb` high, outputs empty): the datapath settles. The
  remainder rails become valid first. The digit follows, because its path
  (adder, CRA, select logic) is deeper.
* **hold** (`pb` high, digit valid): outputs stay fixed while the successor
  reads them, even though the stage's own inputs may already be precharging.

The stage has no completion detector for its 110 dual-rail remainder bits. A valid
digit is taken to mean the whole stage is finished. An assertion checks that
the remainder is complete whenever the digit is valid.

## The ring and its handshake

This is the hard part of the design. Stage i reads stage i-1 (indices mod 3)
and feeds stage i+1. The controller (`precharge_control`) has two rules per
stage, and both look only at the stage's successor:

* **start precharging**: when `pb(i)` and `pb(i+1)` are both high and stage i+1
  has a valid digit, `pb(i)` falls. The successor has consumed stage i's
  result, so stage i may discard it.
* **enable evaluation**: when `pb(i)` and `pb(i+1)` are both low, `pb(i)`
  rises. The successor has let go of its old result, so stage i may produce
  a new one.

Together, the rules keep at least one stage precharging at all times
(`pb` is never H H H). A precharging stage outputs "empty" whatever its
inputs are, so it cuts the loop. That is why a ring of combinational stages
cannot race around itself. A division steps through this cycle of
(pb(0) pb(1) pb(2) / valid-or-empty outputs) states:

```
HLH/E?V  -- stage 0 evaluates -->  HLH/VEV  -- pb(2) falls -->  HLL/VEV
HLL/VEV  -- pb(1) rises, stage 2 precharges, stage 1 evaluates -->  HHL/VVE
HHL/VVE  -- pb(0) falls -->  LHL/VVE  -- pb(2) rises ... -->  LHH/EVV
LHH/EVV  -- pb(1) falls -->  LLH/EVV  -- pb(0) rises ... -->  HLH/VEV
```

(`?` marks a stage that is in the middle of precharging or evaluating.)

### Timed versus speed-independent control

There is one subtle point: when stage i starts evaluating, its successor may
still be precharging. If stage i finished first, stage i+1 would still be
holding old data when the new digit arrived. Two schemes prevent this, and a
parameter selects between them:

* `SPEED_INDEPENDENT = 0` (default, as in the chip): stage i does not check.
  Correctness depends on a timing bound: precharging a stage must take less
  time than evaluating one. In this RTL that means
  `PRECHARGE_CYCLES < Q_EVAL_CYCLES`, and an assertion at elaboration
  rejects any other setting. This saves a completion check and lets one
  stage's precharge overlap the next stage's evaluation.
* `SPEED_INDEPENDENT = 1`: stage i evaluates only once its successor's digit
  is empty. This works for any delays but costs a wait when precharge is
  slow. With a 3-clock precharge, a digit takes 6 clocks instead of 4.

The second optimisation, that the digit is the last output to settle, is
kept in both modes. It is checked by assertion
(`R_EVAL_CYCLES < Q_EVAL_CYCLES`). Further assertions in each stage check
that its inputs are valid when it starts evaluating and stay unchanged until
its digit is captured. This is the property the whole handshake exists to
guarantee.

## How the self-timed circuit is represented

The real circuit has no clock. To make it synthesizable, simulatable RTL,
every handshake event happens on a rising edge of `clk`, and every circuit
delay is a whole number of clocks:

| parameter          | default | meaning                                           |
|--------------------|---------|---------------------------------------------------|
| `R_EVAL_CYCLES`    | 1       | `pb` rising to remainder valid                     |
| `Q_EVAL_CYCLES`    | 2       | `pb` rising to digit valid (minimum evaluation time) |
| `PRECHARGE_CYCLES` | 1       | `pb` falling to all outputs empty (maximum precharge time) |

Each stage holds its outputs in flip-flops. That stands for the keeper
inverters that hold a precharged node in the hold phase. The controller's
rules are evaluated together, on one registered state, each clock. All rules
that are enabled fire at once. They never conflict, because a rule only
reads a `pb` that no simultaneously enabled rule writes.

With the defaults, a digit appears every `Q_EVAL_CYCLES + 2 = 4` clocks:
evaluate, then the predecessor starts precharging, then the successor is
enabled. A 55-digit division takes
`Q_EVAL + 54*(Q_EVAL+2) + 1 = 219` clocks from the `start` edge to `done`.
In speed-independent mode the period is `Q_EVAL + max(2, PRECHARGE+1)`.

## The precharged gates

The stages stand for a family of precharged circuits. Three modules show that
family at gate level.

* `precharged_gate` is the generic gate. A dynamic node is pulled high by a
  precharge device while `pb` is low. During evaluation an n-channel network
  pulls it low when the network conducts. A weak keeper holds the node
  otherwise. The output is the inverted node. The network's conduction
  condition arrives as one input, so the same body serves any function.
  Precharge wins over a conducting network. The node is written as an
  `always_latch`, and the one latch that synthesis reports is intended.
* `pc_and_or` is a single-rail gate for a AND (b OR c). Its network is a in
  series with the parallel pair b, c. A low output means either "false" or
  "not evaluated yet", so this gate cannot signal completion.
* `dr_and_or` is the dual-rail version, built from two `precharged_gate`s.
  The true rail pulls down when a.T AND (b.T OR c.T). The false rail pulls
  down when a.F OR (b.F AND c.F). Exactly one rail rises once the inputs
  that have arrived decide the function. `y_empty`, the NOR of the two rails,
  is the completion signal.

Both AND-OR gates sit beside the divider in the top level on their own ports
(`g_*` dual-rail, `s_*` single-rail). They are not in the divider's datapath,
which is described at word level.

## Using the divider

`srt_divider` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all stages precharge, ring idle) |
| `start` | in | 1 | one-clock pulse: load operands, begin a division (also aborts one in flight) |
| `dividend`, `divisor` | in | 53 | mantissas C and D, MSB weight 1/2; require 1/2 <= D < 1, 0 < C < D |
| `busy`, `done` | out | 1 | `done` rises when all digits are in and stays until the next `start` |
| `quotient` | out | 56 | binary quotient Q with \|C*2^55 - Q*D\| <= D, i.e. within one unit of C/D*2^55 |
| `rem_sum`, `rem_car` | out | 55 | carry-save remainder 2*w of the last stage; exact final remainder is `(rem_sum+rem_car) - q_last*D` (mod 2^55) |
| `pb`, `stage_valid` | out | 3 | ring observation: precharge-bar and digit-valid per stage |
| `g_*` | in/out | 1 | example dual-rail AND-OR gate |
| `s_*` | in/out | 1 | example single-rail precharged AND-OR gate |

To divide mantissas with C >= D, halve C first (shift it right by one) and
add 1 to the result exponent. The quotient is not rounded. If a correctly
truncated result is needed, use the sign of the final remainder: Q-1 when
the remainder is negative.

## Files

`rtl/`:

* `srt_pkg.sv`: one-hot digit type and helpers
* `srt_divider.sv`: top: ring, controller, assembler, divisor register, example gates
* `srt_stage.sv`: one stage: datapath, phases, dual-rail outputs
* `qd_mux.sv`: divisor-multiple select
* `csa.sv`: carry-save adder
* `ripple_adder.sv`: carry-ripple adder (4-bit CRA and final converter)
* `qsl.sv`: quotient select table
* `precharge_control.sv`: `pb` sequencing
* `quotient_assembler.sv`: digit words, count, done, final subtraction
* `precharged_gate.sv`: generic precharged gate (node, precharge, keeper)
* `pc_and_or.sv`: single-rail precharged AND-OR gate
* `dr_and_or.sv`: precharged dual-rail AND-OR gate with completion output

`tb/`: one self-checking bench per module (`tb_<module>.sv`), plus
`tb_srt_divider_si.sv` for the speed-independent mode and
`tb_srt_divider_example.sv` for the worked 177/241 division.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/srt_pkg.sv tb/tb_srt_divider.sv \
          --top-module tb_srt_divider
./obj_dir/Vtb_srt_divider
```

Swap in any other bench name in the same way. Each bench prints
`TB_RESULT checks=<n> failures=<m>` and stops itself, and a watchdog stops a
hung run. The full-size bench (`tb_srt_divider`, default parameters) finishes
about 1500 divisions in under a second.

## What the tests establish

* `tb_srt_divider` runs at full size and default parameters: corner operands,
  the 177/241 example and 1500 random pairs. For each division it checks the
  quotient bound, the exact identity C*2^55 - Q*D = final remainder, and the
  219-clock latency. Every clock it checks that the ring is in one of the nine
  states of the timed protocol. It also checks that exactly one stage holds
  the current data: that stage is in hold mode and its successor is not.
  Whenever that role moves on, the new holder's remainder must equal
  2(r - qD) formed from the previous holder's r and q, and must stay within
  2D. This is the clocked ring checked step by step against the plain
  one-digit-per-step recurrence. It fails if any of these never happens: one of
  those nine states, a digit value, one of the nine reachable CRA codes (and
  it checks that no excluded code ever occurs), the remainder settling before
  the digit, or a stage being enabled while its successor still held data.
* `tb_srt_divider_example` runs the textbook 177/241 division on a small
  divider (11-bit remainders, 12 digits), with divisor 241/256 and dividend
  177/512. It checks every digit (+1 -1 +1 0 0 0 -1 0 +1 -1 -1 -1), every
  carry-ripple sum the selection saw, the two digit words, the quotient
  1505/4096 and the latency.
* `tb_srt_divider_si` runs two speed-independent dividers (1- and 3-clock
  precharge) on the same operands. It checks results and latency. It checks
  that every ring state is one of the fifteen speed-independent protocol
  states, and runs the same step-by-step recurrence check. Here two
  neighbouring stages are often both in hold mode, and the data is taken
  from the later one. The fixed delays reach 12 of the 15 states. The three
  missed states (`HLL/VEE`, `LHL/EVE`, `LLH/EEV`) need a stage to finish
  precharging before its predecessor is re-enabled. That would need a
  controller that reacts more slowly than one precharge. The controller
  here reacts within one clock. `tb_precharge_control` covers them instead.
  It drives the controller with model stages whose precharge can finish at
  once and which obey the speed-independent rule. All fifteen states occur
  there, and no other state does.
* The block benches check: the selection table exhaustively against the
  bound |2w - qD| <= D; the adders against integer arithmetic; the stage's
  phase timing, hold behaviour, dual-rail encoding and speed-independent
  wait; the controller's ordering rules and its fifteen protocol states
  against a stage model; the assembler
  against a reference sum; the generic gate's three phases against a
  reference model; and both AND-OR gates over all inputs in every arrival
  order.
* Each bench was also run against a deliberately broken copy of its module
  and reported failures.

Not established: anything about real transistor-level delays. The
clock-count parameters only stand in for the bounds the timed scheme needs.

## Choices and departures

* **Clocked emulation.** The original is asynchronous. Here delays are clock
  counts and handshake events are clock edges. The delay values are this
  design's; the original's timed scheme states only that precharge must be
  faster than evaluation.
* **Operand loading and completion.** These are not part of the original
  description. `start` puts the dividend into stage 2 as a held remainder
  with digit 0, empties stages 0 and 1, and sets `pb = H L H`. After 55
  digits the controller stops enabling stages and the ring freezes with the
  last stage holding.
* **Digit count.** ITER = 55 is a choice.
* **Operand range.** The divider needs C < D. Normalising a dividend in
  [1/2, 1) that is not below D is left to the caller.
* **Excluded CRA codes.** These yield the sign-bit digit and an assertion
  fires. They cannot occur for legal operands.
* **Dual-rail decoding.** A stage reads a remainder bit as its true rail.
* **Example gates.** The dual-rail AND-OR gate uses the pull-down networks
  a.T(b.T+c.T) and a.F+b.F·c.F, which match its function a·(b+c). The
  single-rail gate keeps the generic gate's keeper, which the hold phase
  needs.
* **Not built.** Rounding, exponent handling, and denormal divisors.
* **Final adder.** The final quotient subtraction uses a ripple-carry adder.
  A carry look-ahead adder would also do.
