# Accumulator-based 3-weight test pattern generator

A pseudo-random test generator detects most faults of a circuit quickly, but
some faults need input combinations that random patterns almost never hit.
A 3-weight generator fixes this cheaply. The test is split into *sessions*. In
each session every input of the circuit under test (CUT) gets one of three
weights:

* **0**: held at 0 for the whole session,
* **1**: held at 1 for the whole session,
* **0.5 (`-`)**: pseudo-random.

A session's weights come from a deterministic test set. Take a group of test
vectors and compare them bit by bit: a bit where they all agree is held at
that value, and a bit where they differ becomes random. The random patterns of
that session are then likely to reproduce the vectors of the group, together
with their neighbours.

This RTL builds the generator from an accumulator, `A <= A + B + cin`, of the
kind a datapath already has. The adder is left unchanged.

## The key trick: a held bit passes its carry through

In a full adder, whenever the two operand bits differ (`A[i] != B[i]`), the
carry out equals the carry in. Holding a bit therefore means forcing *both*
registers of that bit to opposite values:

| weight | Set[i] | Reset[i] | A[i] | B[i] | carry through bit i |
|--------|--------|----------|------|------|---------------------|
| 1      | 1      | 0        | 1    | 0    | cout = cin          |
| 0      | 0      | 1        | 0    | 1    | cout = cin          |
| `-`    | 0      | 0        | A+B  | LFSR | normal addition     |

The forcing uses the asynchronous set and reset pins of the flip-flops. Each
`Set[i]` line goes to the S pin of the Register A flip-flop and to the R pin of
the Register B flip-flop. `Reset[i]` is wired the other way round. So the held
bits cost nothing inside the adder. The adder sees `A[i] + B[i] = 1` at each
held bit, which passes the carry along. The free bits add up exactly as if the
held bits were not there. The sum the adder computes at a held bit is thrown
away, because the forced flip-flop ignores its D input.

Since the adder is untouched, it can be of any kind: ripple, carry-lookahead,
or whatever synthesis picks. `accumulator` offers two builds through
`ADDER_KIND`. They produce identical sequences, and a testbench checks this:

* `ADD_CELLS` (default): a ripple of `acc_cell` bit slices. Each slice holds a
  full adder and the two flip-flops.
* `ADD_WORD`: Register A and Register B as plain flip-flop rows around
  `word_adder`, a word-level `+`.

## Block structure

```
                 +-----------------+  session   +--------------+ Set[n-1:0]
 clk, rst ------>| session_counter |----------->| weight_logic |------------+
                 +-----------------+            +--------------+ Reset[n-1:0]
                        | done, valid                                       |
                        v                                                   v
 +------+  b_d   +---------------------------------------------------------------+
 | lfsr |------->| accumulator: Register B -> adder <- Register A (fed back)     |--> cut_in = A
 +------+        +---------------------------------------------------------------+
                                                                       ci -> cin, cout ->
 cut_resp (from the CUT) --> response_compactor --> signature
```

| module               | role |
|----------------------|------|
| `wpg_pkg`            | `weight_e` (two-bit weight code) and `adder_kind_e` |
| `sr_dff`             | D flip-flop with asynchronous active-high set and reset |
| `full_adder`         | one-bit full adder |
| `acc_cell`           | one bit slice: full adder plus the A and B flip-flops, with Set/Reset crossed |
| `word_adder`         | unmodified word-level adder, for `ADD_WORD` |
| `accumulator`        | Register A, Register B and the adder, `WIDTH` bits |
| `lfsr`               | 7-bit Fibonacci LFSR, x^7 + x^6 + 1, which feeds Register B |
| `session_counter`    | counts `N` patterns per session and `K` sessions, then raises `done` |
| `weight_logic`       | looks up the current session's weights and drives Set/Reset |
| `response_compactor` | adds every CUT response into a signature register |
| `wpg_top`            | the generator, with the CUT kept outside |

## Weight sessions

`weight_logic` holds the table `WEIGHTS[K][WIDTH]` of `weight_e` codes. The
defaults target the ISCAS-85 c17 benchmark, which has five inputs. Its
deterministic test set is:

| vector | A[4:0] |
|--------|--------|
| T1     | 00101  |
| T2     | 01010  |
| T3     | 10010  |
| T4     | 11111  |

The default table groups T1 with T2 and T3 with T4, which gives two sessions:

| session | from    | weights (bit 4 first) |
|---------|---------|-----------------------|
| 0       | T1, T2  | `0----`               |
| 1       | T3, T4  | `1--1-`               |

This grouping is one reasonable choice, not the only one. To use another test
set, override `WIDTH`, `K` and `WEIGHTS` together. The table is packed with
session `K-1` first and bit `WIDTH-1` first within each session. A
non-power-of-two `K` is allowed, and session indices past `K-1` decode to
all-random.

## Timing

* `rst` is synchronous for the counters, the LFSR and the signature. While
  `rst` is high, `weight_logic` raises every `Reset[i]`, so Register A is 0
  and Register B is all ones.
* After `rst` falls there are `K*N` consecutive cycles, one pattern per clock
  (test per clock). During these cycles `valid` is high, `session` and
  `pattern` give the position in the test, and `cut_in` is the pattern.
* A new session's held bits appear on `cut_in` in the first cycle of that
  session. They are forced through the asynchronous pins, so no clock edge is
  needed.
* `cut_resp` is sampled at the clock edge that ends each valid cycle, so the
  CUT must be combinational. The compactor adds it, zero-extended, modulo
  2^`SIG_W`.
* After the last pattern `done` rises and stays high, and `valid` falls. The
  accumulator and the LFSR keep running, but the signature is frozen.
* `ci` is the adder's carry in and `cout` its carry out. Both are brought out
  as ports.

### The set/reset flip-flop

A flip-flop with both an asynchronous set and an asynchronous reset is
written here as:

* one asynchronous load with the value `set & ~reset`;
* an output bypass that shows the forced value for as long as the flip-flop
  is forced.

Two reasons lead to this form. First, it synthesizes to a single
async-load cell. Second, it behaves correctly when a bit moves straight from
held-0 in one session to held-1 in the next: the load stays high across the
change, so an edge-triggered load alone would miss the new value. The
register takes the new forced value at the next clock edge. Reset wins if set
and reset are both high, which the decoder never produces.

Set and Reset are decoded combinationally from the registered session index,
and they drive asynchronous pins. In silicon these lines should be glitch-free:
for example, register the decoder outputs or Gray-code the session counter.
This RTL leaves that to the implementation.

## Parameters of `wpg_top`

| parameter    | default       | meaning |
|--------------|---------------|---------|
| `WIDTH`      | 5             | generator outputs = CUT inputs (c17) |
| `K`          | 2             | weight sessions |
| `N`          | 16            | patterns per session |
| `WEIGHTS`    | `0----`, `1--1-` | session weight table |
| `ADDER_KIND` | `ADD_CELLS`   | adder build, see above |
| `LFSR_W`, `LFSR_TAPS`, `LFSR_SEED` | 7, `7'b1100000`, 1 | pseudo-random source; the seed must be nonzero |
| `RESP_W`     | 2             | CUT outputs |
| `SIG_W`      | 16            | signature width |

Register B bit i takes LFSR bit `i mod LFSR_W`.

## Where this RTL makes its own choices

These points are not fixed by the method and were chosen here:

* the LFSR's polynomial, seed and length;
* feeding Register B from the LFSR every clock;
* `N`, and the grouping of the c17 vectors into sessions;
* the reset behaviour;
* reset priority in the flip-flop;
* the width of the signature register, and its plain modular sum.

Some waveform captures of an earlier build of this generator show 16-bit
registers. This RTL uses a 5-bit default instead, matching the five-input c17
example. `WIDTH` can be set to 16 or to any other width.

The compactor is a plain accumulator. Variants that lower its aliasing
probability are not included. The c17 benchmark itself is not part of the
RTL. A behavioural model of it, `tb/c17_model.sv`, serves the end-to-end
tests. It maps `in[4:0]` to primary inputs 1, 2, 3, 6 and 7, and `out` to
outputs {22, 23}.

## Verification

Each module has a self-checking testbench in `tb/` that compares it against
an independent model. Each testbench prints
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

* `wpg_top_tb` runs a complete test at the default parameters against the c17
  model. Every cycle it checks `cut_in`, `cout` and the control outputs
  against a model of the generator. It also checks that held bits never move,
  that exactly `K*N` patterns are applied, and the final signature. It
  requires every mechanism to occur at least once:
  * a session change;
  * a bit held at 0;
  * a bit held at 1;
  * a carry passed through a held bit;
  * a free bit toggling;
  * a carry out;
  * the end of the test.

  With the defaults, T1, T3 and T4 of the c17 test set appear among the
  patterns of their own sessions. T2 does not.
* `wpg_adder_choice_tb` runs `ADD_CELLS` and `ADD_WORD` generators side by
  side and requires identical outputs.
* `accumulator_tb` does the same at 8 bits with random weight masks.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/wpg_pkg.sv tb/wpg_top_tb.sv \
  --top-module wpg_top_tb -o sim
./obj_dir/sim
```

Replace `wpg_top_tb` with any other testbench name in `tb/`. Lint gives two
unused-signal warnings in `wpg_top`: `b_q`, Register B, which is kept for
debug visibility, and an LFSR bit that is not used when `WIDTH < LFSR_W`.
