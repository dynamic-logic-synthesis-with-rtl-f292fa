# Self-timed SRT divider in dual-rail dynamic logic

A divider that is not driven by a clock. Each step of radix-2 SRT division
(one quotient digit per step) is built as a block of dual-rail dynamic logic
(DCVSL, dynamic cascode voltage switch logic). Five such blocks are closed
into a ring. A single data token carrying the partial remainder goes round
the ring, and each stage passes it on as soon as its own logic has finished.
Speed therefore follows the real delay of the data path, with no clock
margin. Two ideas make that work:

* **Dual-rail values carry their own timing.** Every bit travels on two
  wires. (0,0) means "not yet known", and a 1 on exactly one wire gives the
  value. A stage can see from its outputs alone that it has finished.
* **The digit step needs no carry chain.** SRT division with digits
  {-1, 0, +1} lets the remainder stay in carry-save form. Each digit is
  chosen from a 3-bit estimate of the remainder, so every stage has a
  short, fixed depth.

Next to the divider sits the second piece of hardware in this design: a
**programmable DCVSL cell** (the "encoded tree"). It computes any 5-input
Boolean function from a 32-bit program, and it needs about half the
transistors of a plain switching tree.

Two small circuits show the mechanism everything else rests on:

* a **chain of five C elements**, along which a change travels as a wave;
* a **three-stage linear pipeline** of dynamic stages. Its measured cycle
  time reproduces the textbook cycle-time formulas for the PC0 and PS0
  handshakes.

All four are written as synthesizable SystemVerilog. Asynchronous behaviour is
modelled with a unit delay (see [Timing model](#timing-model)).

## Dual-rail words and dynamic gates

`st_pkg` defines the shared types:

| type   | rails     | meaning |
|--------|-----------|---------|
| `dr_t` | `{t, f}`  | `00` empty, `10` one, `01` zero (`11` never occurs) |
| `qd_t` | `{p, z, n}` | one-hot quotient digit +1 / 0 / -1; `000` empty |

The whole design is built from a few basic pieces:

* **`dcvsl_block`: a dynamic function block.**
  * While `eval` is low it precharges, and every output rail is 0.
  * When `eval` is high and all its inputs are valid, it evaluates once. One
    rail of each output rises.
  * It then holds that value until the next precharge, even if its inputs
    are reset in the meantime. This is why a ring of such blocks needs no
    latches between stages.
  * The transistor tree is described by the Boolean function it computes
    (`value`).
* **`muller_c`: a Muller C element.** The output follows the inputs when
  they agree and holds otherwise.
* **`muller_c_tree`: an N-input C element.** It is a balanced tree of
  two-input C elements.
* **`completion_detector`: a completion detector.** Each dual-rail bit goes
  through an OR gate, and the results feed a C-element tree.
  * `done` rises once every bit is valid.
  * `done` falls once every bit is empty again.

## Stage handshake: PC0 and PS0

`stage_ctrl` decides when a stage evaluates and when it precharges. Two
signals drive it:

* `req_in`: high while the predecessor is empty.
* `ack_out`: high while the successor is empty.

| configuration | `USE_C` | rule |
|---|---|---|
| PC0 (default) | 1 | `eval = C(ack_out, !req_in)` |
| PS0 | 0 | `eval = ack_out` |

In PC0, a stage evaluates when its predecessor holds data and its successor
is empty. It precharges when its predecessor is empty and its successor
holds data. In between it keeps its state.

PS0 drops the C element. This works because the dual-rail inputs already
keep a stage from evaluating too early.

In a chain of such stages, a data wave followed by an empty wave moves
forward on its own. Every other stage holds a token or a gap.

### Linear pipeline (`st_pipeline`)

`st_pipeline` is the plain form of this. It has `STAGES` (default 3)
identical stages. Each stage is a DCVSL block, its completion detector and
a `stage_ctrl`, and there are no latches anywhere. The function block is a
dual-rail buffer, so tokens come out unchanged; real logic would go into the
block's `value`.

Both ends use 4-phase dual-rail signalling:

* **Input.** `in_req` low means the input word is valid. `in_ack` goes low
  once stage 0 has evaluated, and high once it has been reset.
* **Output.** `out_req` low means the output word is valid. The consumer
  drives `out_ack` high while it is ready.

Take every element delay as one clock. This covers the dynamic gate rising
(tF↑) and falling (tF↓), a C element (tC), and one level of the completion
detector (tD = ceil(log2 WIDTH); the OR gates cost nothing). The classic
cycle-time expressions for these handshakes then predict:

| | formula | 1-bit word | 2-bit word |
|---|---|---|---|
| PC0 | 3 tF↑ + tF↓ + 4 tC + 4 tD | 8 | 12 |
| PS0 | 3 tF↑ + tF↓ + 2 tD | 4 | 6 |

`tb_st_pipeline` measures exactly these periods between output tokens. This
shows that the unit-delay model reproduces the handshake structure, not
just its function.

## The divider ring (`srt_divider`)

### Number format

* **Operands.** `dividend` X and `divisor` D are normalised to [1, 2). Each
  has `FRAC_BITS` fraction bits, and bit `FRAC_BITS` is the leading one.
* **Remainder.** Inside the ring, the shifted partial remainder Y is a
  carry-save pair (S, C).
  * Each word is `W = FRAC_BITS + 4` bits.
  * There are 3 integer bits and `FRAC_BITS + 1` fraction bits, in two's
    complement modulo 2^W.
  * The divisor is stored in the same format.
* **Start.** The first Y is the dividend itself, so the first digit q_0 is
  the integer digit.
* **Quotient.** There are n = `STAGES * LOOPS` digits, with digit k at bit
  n-1-k of `q_pos` / `q_neg`:

      Q = (q_pos - q_neg) / 2^(n-1),   X/D = Q + (small remainder term)

  The remainder pair `rem_s + rem_c` is the shifted remainder Y from which
  the last digit was selected, with `|Y| <= 2D`. Exactly:
  `2^(n-1) X = D (Qi - q_{n-1}) + Y`, where `Qi = q_pos - q_neg` as integers.
  The remainder after the last digit would be `2 (Y - q_{n-1} D)`.

The number of digits is fixed by `LOOPS`. With the defaults (12 fraction
bits, 5 stages, 3 loops) that is 15 digits, or 14 bits after the binary
point.

### One stage (`srt_stage`)

A stage computes one SRT step:

    Y' = 2 (S + C - q D)

Here q is the digit the previous stage chose. Its parts:

* **`divisor_mux`** forms -qD, one dual-rail bit per position.
  * For q = +1 it takes the complement of D. The missing +1 goes into the
    free least significant bit of the carry word.
  * For q = 0 it gives zero; for q = -1 it gives D.
* **A row of `W-1` `dr_full_adder`s** (the carry-save adder) adds S, C and
  -qD. The factor 2 is just wiring, a shift by one place.
* **`msb_gen`** computes the estimate P ahead of time.
  * It needs the top three bits of Y' for the next digit.
  * It computes the 3-bit estimate for each of the three possible q at once
    (a small carry-save adder plus a 3-bit adder each).
  * It picks one as soon as q arrives, so the digit path does not wait for
    the wide adder.
  * P = (top3(S') + top3(C')) mod 8. This is never above the true value and
    at most 2 units below it.
* **`quotient_gen`** selects the digit from P and the previous flag F:

  | F | P (as signed 3-bit) | q |
  |---|---|---|
  | 1 | any | -1 |
  | 0 | 0 … 3 | +1 |
  | 0 | -1 | 0 |
  | 0 | -4 … -2 | -1 |

* **`flag_gen`** raises the force-ahead flag F when P = -4 (`100`). When the
  most negative estimate occurs, the next digit will also be -1, so it is
  decided at once.
* **`completion_detector`** covers every output of the stage (S', C', q, F)
  and reports to the neighbours.
* **`stage_ctrl`** uses PC0 by default.

### Around the ring

```
          +------+   +---------+   +---------+         +---------+
start --> | merge|-->| stage 0 |-->| stage 1 |--> ... -| stage 4 |--+
          +------+   +---------+   +---------+         +---------+  |
             ^            |             |                   |       |
             |        q-reg 0       q-reg 1             q-reg 4     |
             |                                                      |
             +---------- feedback (closed after the last loop) -----+
                                   |
                        remainder register + compare
```

* **Inject.** A dual-rail merge in front of stage 0 takes either a new token
  or the token fed back from stage 4. The new token is S = X/2, C = 0,
  q = 0, F = 0, so stage 0 produces Y = X and picks q_0 from it.
* **Quotient registers.** `quotient_shift_reg` holds the register for each
  stage. It shifts in one digit each time its stage produces a valid digit,
  so stage k collects digits k, k+5, k+10, ….
* **Loop counting.** A small synchronous controller counts the token's
  passes through stage 4.
  * After `LOOPS` passes, it closes the feedback path. The last token stays
    parked in stage 4, and its remainder is the `rem_s` / `rem_c` output.
  * A later `start` first flushes the parked token.
* **Early termination.** `remainder_compare` stores the token that leaves
  stage 4 on each pass. If a pass returns exactly the same token (remainder
  and digit state), every later digit would repeat the last loop.
  * The ring stops and `early` is raised.
  * The missing digits are filled in by repeating the last computed loop.
  * A division that stops early finishes in fewer loops.
* **Interface.** With `busy` low, a one-cycle `start` latches the operands.
  `done` rises when the digits are ready and stays high until the next start.

### Divisor range (read this before use)

The digit rule reads three remainder bits and no divisor bits. The design
keeps that rule as it stands. Combined with the carry-save remainder, it is
exact only for part of the divisor range.

* **Below 1.625: exact.** Simulation found no wrong quotient for D below
  1.625. The testbenches use D in [1, 1.625).
* **Close to 2: quotients can be wrong.** For divisors above about 1.67, the
  remainder can settle near -2D ≈ -4. The 3-bit estimate then wraps round to
  a positive value, and the quotient becomes wrong.

Fixing it would mean looking at a divisor bit or a fourth remainder bit.
This changes the selection table and the digit logic in `msb_gen`,
`quotient_gen` and `flag_gen`.

## Programmable cell (`cvsl_encoded_cell`)

A DCVSL gate for an N-input function can be drawn as a full binary tree of
transistor pairs: N levels, one variable per level. Each leaf is wired to
the true or the complement output node according to the truth table.

Look at the last variable. Each pair of leaves under it can need only four
things: constant 0, constant 1, x, or not x. The encoded cell builds these
four once, with two transistor pairs. At each leaf of an (N-1)-level tree it
then selects one of them. That selection is the program:

    prog[k] = {L, R} = {f(k, x_last = 0), f(k, x_last = 1)},
    leaf k = {x[0], ..., x[N-2]}   (x[0] is the root variable)

Transistor counts for N = 5 are 62 for the full tree against 34 for the
encoded tree (2^N + 2). The cell behaves like any `dcvsl_block`: it
precharges while `eval` is low, evaluates once all inputs are valid, and
then holds its value.

The testbenches program it with the four 5-input functions used to compare
tree styles: majority, XOR, prime detector and divisible-by-3. Each is run
over all 32 inputs.

## C-element wave chain (`c_element_chain`)

Five C elements sit in a row. Each sees its predecessor directly and its
successor through an inverter. So an element copies its predecessor when
predecessor and successor differ, and holds its value otherwise.

* **Free end.** A change at `in` moves one element per delay and reaches
  the last element after five delays.
* **Blocked end.** When `sink` is held, the chain fills from the end with
  alternating values and then refuses further changes. It can hold five
  waves.
* **Released end.** The stored waves drain out one after another.

This is the handshake skeleton of the pipeline: a PC0 stage controller is
exactly one such element, with a data path hung on it.

## Timing model

Every C element and every dynamic gate is modelled as a flip-flop on `clk`,
reset by `rst_n`. Such an element therefore switches one clock period after
its inputs have settled. The OR gates of the completion detectors and the
inverters are taken as free, so they are plain combinational logic. `clk`
is only a time base for simulation and synthesis.

* Handshakes and completion follow the real self-timed structure, so the
  number of cycles a division takes depends on the depth of each stage's
  logic.
* At the defaults, a division takes at most about 190 cycles with PC0
  stages and about 100 with PS0.
* Delay differences between gates of the same depth are not modelled.
* The ring controller (start, loop count, flush, done) is ordinary
  synchronous logic.

For a real asynchronous implementation, the `always_ff` of `muller_c`,
`dcvsl_block` and `quotient_gen` (its own dynamic gate) has to become the
matching transistor-level circuit.

## Files

| module | role |
|---|---|
| `st_pkg` | dual-rail and digit types, helpers |
| `muller_c`, `muller_c_tree` | C element and N-input C element |
| `completion_detector` | all-valid / all-empty detection |
| `dcvsl_block` | generic dynamic dual-rail function block |
| `stage_ctrl` | PC0 / PS0 handshake |
| `dr_full_adder` | carry-save adder cell |
| `divisor_mux` | -qD selection |
| `msb_gen` | 3-bit look-ahead remainder estimate |
| `quotient_gen`, `flag_gen` | digit selection, force-ahead flag |
| `srt_stage` | one ring stage |
| `quotient_shift_reg` | per-stage digit register |
| `remainder_compare` | early-termination register and comparator |
| `srt_divider` | the divider ring |
| `cvsl_encoded_cell` | programmable 5-input cell |
| `c_element_chain` | five-element C-element wave chain |
| `st_pipeline` | linear PC0/PS0 pipeline of DCVSL stages |
| `dynamic_logic_top` | divider, cell, chain and pipeline side by side (top level) |

Each module has a testbench `tb/tb_<module>.sv`. A testbench prints
`TB_RESULT checks=… failures=…` and stops itself with a watchdog if a
handshake hangs.

* **`tb_dynamic_logic_top`** runs the complete design at its default
  parameters.
  * About 300 random divisions plus directed cases, including early
    termination, each checked against an exact integer identity.
  * The four cell functions.
  * Twenty waves through the C-element chain, each timed.
  * Thirty tokens through the pipeline, checked for value, order and a
    12-cycle period.
  * It counts each mechanism: +1, 0 and -1 digits, force-ahead, early stop,
    full runs, flush of a parked token, cell evaluations, chain waves and pipeline tokens. It reports a
    failure for any mechanism that never occurred.
* **`tb_srt_divider`** runs the same divider test on its own.
* **`tb_srt_divider_ps0`** runs that test on a ring that uses the PS0
  handshake.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/st_pkg.sv tb/tb_dynamic_logic_top.sv \
          --top-module tb_dynamic_logic_top -Mdir obj
./obj/Vtb_dynamic_logic_top
```

Replace the testbench name to run any other test.

Parameters of `srt_divider`:

| parameter | default | meaning |
|---|---|---|
| `FRAC_BITS` | 12 | operand fraction bits |
| `STAGES` | 5 | ring stages |
| `LOOPS` | 3 | loops per division (digits = `STAGES * LOOPS`) |
| `USE_C` | 1 | 1 = PC0, 0 = PS0 |

`cvsl_encoded_cell` takes `N`, the number of inputs, default 5.

## Where this design departs from, or adds to, its source

* **Word length and loop count.** The source fixes neither. 12 fraction
  bits and 3 loops are this design's choices.
* **Ring interfacing.** Token injection, parking, flushing and the loop
  counter are this design's own.
* **Early termination.** The compare block compares the whole token
  (remainder plus digit state), not only the remainder.
* **Quotient registers.** They are written as edge-triggered shift
  registers, not built from C elements and NOR gates.
* **Digit selection at P = 0.** The source's equation asks for P > 0 to
  give +1, but its truth table gives +1 for P ≥ 0. The table is followed.
* **Divisor range.** See [above](#divisor-range-read-this-before-use).
* **PS0.** Both configurations are tested in the full ring. In the
  unit-delay model, the longest division takes 97 cycles with PS0 against
  187 with PC0, because the C element of each stage is no longer on the
  path of a moving token. PC0 stays the default.
* **Not built.** The PC1–PC3 and PS1–PS3 configurations (one to three
  extra latches per stage) and
  multiple tokens in the ring are not built. Transistor-level matters are
  not modelled: charge sharing, the reduced-tree synthesis procedure, and
  layout.
