# All-states 8-bit LFSR pattern generator for logic BIST

A logic built-in self-test (BIST) needs an on-chip source of pseudo-random
test patterns. The usual source is a linear feedback shift register (LFSR).
A maximal-length LFSR of n bits gives only 2^n − 1 patterns. It can never
produce the all-zero word, because from zero the XOR feedback yields zero
again and the register would lock up.

The generator here, `fib_mod`, is an ordinary 8-bit Fibonacci LFSR with a
small piece of state-based logic in front of its feedback. That logic puts the
zero state back into the sequence, so the register walks all 256 states. The
extra logic is two 8-bit comparisons and a multiplexer. It replaces heavier
schemes that reach all states by swapping bits after the LFSR.

Around the generator sits a minimal logic BIST: a controller that switches the
circuit under test between functional data and test patterns, and an output
response analyzer that compacts the responses into a signature and compares it
with a golden one.

## How the all-states LFSR works

The classical part shifts towards the MSB. The XOR of the tapped bits enters
bit 0:

    classic(d) = { d[6:0], d[7] ^ d[5] ^ d[4] ^ d[3] }     // x^8+x^6+x^5+x^4+1

This polynomial is primitive. The classical register therefore runs through
all 255 non-zero states in one loop. Somewhere in that loop, one state
`PRE_ZERO` is followed by state `8'h01`. The modification cuts the loop at
that point and puts zero in between:

    next(d) = 8'h00       if d == PRE_ZERO
            = 8'h01       if d == 8'h00
            = classic(d)  otherwise

The checks are made in that order. `PRE_ZERO` is the state whose classical
successor is 1. The module finds it at elaboration time by running the
classical step over every state, so it follows `TAPS` and `WIDTH`
automatically. With the default taps and shift direction, `PRE_ZERO = 8'h80`.
That is the only state that shifts into `8'h01`: bits 6..0 must be zero and the
feedback must be 1.

The sequence starting from reset is:

    00 01 02 04 08 11 23 47 8E 1C 38 71 ... D0 A0 40 80 | 00 01 02 ...

This is exactly 256 distinct states, one per clock. At a 100 ns clock, state 0
comes back 25.6 µs after it was first left.

Reset is synchronous and active low. While `rst_n` is low the output is held
at 0. At the first rising edge with `rst_n` high the output becomes 1. From
then on it advances once per clock. A reset in mid-sequence returns the
register to 0 and holds it there. The generator has no enable input: a
controller stops it by holding it in reset. This costs nothing, because reset
puts the register at the start of the sequence anyway.

The two choices not fixed by the design's description are:

* the polynomial, x^8+x^6+x^5+x^4+1 (`TAPS = 8'hB8`, where bit i set means
  register bit i feeds the XOR);
* the shift direction.

Any primitive polynomial works; change `TAPS` and `PRE_ZERO` follows. The same
module at `WIDTH = 4`, `TAPS = 4'b1100` (x^4+x^3+1) walks all 16 states.

## The BIST around it

```
              ext_data ─┐
                        ▼
 test_mode ─► bist_controller ── cut_in ──► [circuit under test] ── cut_out ─┐
                 ▲    │ tpg_rst_n                                           │
      tpg_pattern│    ▼                                                     ▼
                 └── fib_mod                      golden_sig ──►  ora (MISR + compare)
                                                                         │ match
                      bist_done / bist_pass ◄── bist_controller ◄────────┘
```

**bist_controller** selects the data for the circuit under test with
`test_mode`. When `test_mode` is low, `ext_data` passes straight through. When
it is high, the LFSR pattern passes, and the controller runs one session:

| state   | length         | generator              | analyzer           |
|---------|----------------|------------------------|--------------------|
| IDLE    | until test_mode| held in reset (state 0)| cleared            |
| RUN     | 256 clocks     | running: 00, 01, …, 80 | absorbs a response per clock |
| COMPARE | 1 clock        | held in reset          | `match` latched as the verdict |
| DONE    | until test_mode falls | held in reset   | holds the signature |

`bist_done` rises 258 clocks after `test_mode` is first sampled high, and
`bist_pass` is valid while `bist_done` is high. Lowering `test_mode` returns
to IDLE from any state, which aborts a running session and clears the verdict.
Two assertions check that RUN never outlasts its pattern count and that leaving
test mode always ends the session.

**ora** is a multiple-input signature register (MISR) of 8 bits. It uses the
same polynomial as the generator:

    sig <= { sig[6:0], sig[7]^sig[5]^sig[4]^sig[3] } ^ resp

`clear` loads 0 and has priority over `enable`. `match` is the combinational
comparison of the signature with `golden_sig`.

**The circuit under test** is outside `lbist_top`. `cut_in` drives it and its
response must come back on `cut_out` in the same clock period, so a
combinational circuit is assumed. `golden_sig` is an input. Compute it once
from a fault-free model: run the 256-pattern sequence above through the
circuit and the MISR equation, starting from signature 0.

## Files

| file | content |
|------|---------|
| `rtl/lbist_pkg.sv` | widths (8), default polynomial, pattern count (256), controller state type |
| `rtl/fib_mod.sv` | the all-states Fibonacci LFSR (parameters `WIDTH`, `TAPS`) |
| `rtl/bist_controller.sv` | session state machine and functional/test data select (`W`, `PATTERNS`) |
| `rtl/ora.sv` | MISR signature register and golden comparison (`W`, `TAPS`) |
| `rtl/lbist_top.sv` | the three blocks wired together; no parameters |
| `tb/cut_model.sv` | small combinational stand-in circuit with stuck-at fault injection |
| `tb/tb_*.sv` | self-checking testbenches, one per block |

## Verification

Each testbench computes its expected values with its own bit-level model. Each
ends by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_fib_mod` checks the following:
  * the reset hold, and state 1 one clock after release;
  * every transition against the reference;
  * 256 distinct states, with state 0 returning after exactly 256 clocks
    (25.6 µs at 100 ns);
  * 8'h80 as the state before zero;
  * a mid-sequence reset;
  * the 4-bit instance walking all 16 states.
* `tb_ora` feeds random responses with random enable gaps. It checks the
  signature after every clock, clear priority, match and mismatch, and that a
  single flipped response bit is detected.
* `tb_bist_controller` drives the generator and analyzer signals from the
  testbench. It checks the data selection in both modes, a RUN of exactly 256
  clocks, `bist_done` after 258 clocks, the verdict for both values of
  `match`, and an abort.
* `tb_lbist_top` runs the full design at its default sizes with `cut_model`
  attached. It checks functional mode and a fault-free session that must pass;
  in that session, every applied pattern is compared with the reference
  sequence and all 256 states must appear. It then injects stuck-at-0 and
  stuck-at-1 faults on three response bits, and every one must fail. It
  aborts a session half way and then runs a clean session that must pass. It
  counts mode switches, exits from state 0, full 256-state cycles, pass and
  fail verdicts and aborts, and fails if any of them never happened.

Each testbench was also run against a deliberately broken copy of its block,
and each one caught the fault:

* `fib_mod` without the pre-zero check;
* a MISR that ORs instead of XORs;
* a controller session one pattern short;
* a top with the analyzer fed from the wrong signal.

To simulate with Verilator, for example the whole design:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lbist_pkg.sv rtl/fib_mod.sv rtl/ora.sv rtl/bist_controller.sv rtl/lbist_top.sv \
  tb/cut_model.sv tb/tb_lbist_top.sv --top-module tb_lbist_top
./obj_dir/Vtb_lbist_top
```

All files pass `verilator --lint-only -Wall`. The only warnings are for package
constants that a given module does not use.

## What follows the original design and what does not

These parts follow the original design:

* the 8-bit Fibonacci generator;
* the synchronous active-low reset to state 0;
* the forced transitions PRE_ZERO → 0 → 1 and their priority;
* the period of 256;
* the one-clock start after reset release;
* the existence of a BIST controller that selects between test patterns and
  external data;
* an analyzer that compares a signature with a golden signature.

These are choices made for this implementation:

* the polynomial and the shift direction;
* the MISR as the compactor, with its width, polynomial and zero start value;
* the golden signature as a port;
* the controller's state machine, its one-full-cycle session length and the
  abort behaviour;
* the assumption of a combinational circuit under test.

Two things are not included:

* **A Galois-structure counterpart.** The same zero-insertion idea can be
  applied to a Galois LFSR, and was evaluated as an alternative. It is slightly
  larger and uses slightly more power than the Fibonacci form.
* **The bit-swapping LFSRs** that serve as the reference point for
  comparison.

The claimed savings come from a 180 nm standard-cell synthesis of the
generator alone. For `fib_mod` against a bit-swapping LFSR they are about 66 %
less power and 70 % fewer cells (155 against 518). No power or area figures
were produced for this RTL.
