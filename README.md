# Variable-latency carry skip adder with a speculative Han-Carlson nucleus

A carry skip adder (CSKA) is small and frugal, but slow. Its worst case is a
carry that ripples through the first block, skips every middle block and then
ripples through the last one. This design is a 32-bit CSKA with three
changes that speed it up:

1. **Concatenation and incrementation (CI).** Every block except the first
   adds its operand slice with carry in zero, so all blocks work at the same
   time. A chain of half adders then adds the carry that comes from the block
   below. The skip multiplexers are replaced by single inverting AOI/OAI gates.
2. **Prefix adder in the middle.** The largest block, the *nucleus*, lies on
   both of the long paths that are left. It is built as a parallel prefix
   adder, here a speculative Han-Carlson adder, instead of a ripple chain.
3. **Variable latency.** The clock is set to the delay of the longest path
   that is *not* the critical one. A predictor spots the rare operands that
   could use the critical path, and a speculation-error flag spots the rare
   operands the speculative nucleus gets wrong. Those operations take two
   cycles; all others take one.

Everything is synthesizable SystemVerilog. The top module is
`hvl_cicska_top`.

## Stage map of the 32-bit adder

The adder has Q = 8 stages, least significant first. The sizes grow towards
the middle and shrink again (variable stage size), with a one-bit first stage:

| stage number | bits   | size | block                                     | skip gate  | carry it passes on |
|--------------|--------|------|-------------------------------------------|------------|--------------------|
| 1            | 0      | 1    | ripple block with the adder's carry in    | none       | true               |
| 2            | 1–2    | 2    | ripple (cin 0) + incrementer              | AOI        | complemented       |
| 3            | 3–5    | 3    | ripple (cin 0) + incrementer              | OAI        | true               |
| 4            | 6–9    | 4    | ripple (cin 0) + incrementer              | AOI        | complemented       |
| 5 (nucleus)  | 10–25  | 16   | speculative Han-Carlson (cin 0) + incrementer | OAI    | true               |
| 6            | 26–28  | 3    | ripple (cin 0) + incrementer              | AOI        | complemented       |
| 7            | 29–30  | 2    | ripple (cin 0) + incrementer              | OAI        | true               |
| 8            | 31     | 1    | ripple (cin 0) + incrementer              | AOI        | complemented → inverted to `cout` |

The stage sizes, the 16-bit nucleus and its position are this design's
choices. The structure itself follows the CI-CSKA scheme: a first stage with
the carry in, stages 2..Q with an incrementer, and a nucleus that is the
largest stage. Set all `STAGE_W` entries equal to get the fixed-stage-size
variant of the same adder. The testbench of `hvl_cicska` also runs a
fixed-stage-size configuration of eight 4-bit stages.

## How one CI stage works

A stage j ≥ 2 of M bits computes:

* `S0, G = A + B` with carry in zero (ripple block, or the prefix adder in the
  nucleus). `G` is the stage's own carry out.
* `P = AND(a_i ^ b_i)`, true when every bit of the stage propagates.
* `S = S0 + C_{j-1}` with a half-adder chain. Its carry out is dropped. That
  is safe because `S0` can only be all ones when `P = 1`, and then `G = 0`.
* `C_j = G | (P & C_{j-1})` with one compound gate.

An AOI gate gives `~C_j` from true inputs, and an OAI gate gives `C_j` from
complemented inputs: `~(~G & (~P | ~C_{j-1})) = G | P·C_{j-1}`. So
the skip carry alternates in polarity from stage to stage, with no
inverters on the chain. Even stages produce a complemented carry. Each
incrementer is told the polarity of its incoming carry (`CI_INV`) and
undoes it in its first half adder. After an even number of stages, the
final carry is inverted once to give `cout`.

Module map: `cska_full_adder` → `cska_rca` (ripple block), `cska_incrementer`,
`cska_skip_logic` (`OAI` parameter selects the gate), and `cicska_stage`,
which puts them together. The stage number sets the polarity.

## The speculative Han-Carlson nucleus

This is the least obvious part of the design (`spec_han_carlson`,
`cicska_nucleus_stage`).

**Han-Carlson tree.** Bit signals are `g = a&b` and `p = a^b`. The prefix
cell (`shc_prefix_cell`) merges a high span with the adjacent low span:
`G = Gh | Ph·Gl`, `P = Ph·Pl`. Han-Carlson places cells only on odd bits.
Level l (1..log2 N) merges odd bit i with bit i − 2^(l−1), so after level l
an odd bit holds the group signals of 2^l bits. One last level gives each
even bit i its carry from odd bit i−1: `c_i = g_i | p_i·G_{i−1}`. For
N = 16 there are 4 odd-bit levels plus the final level.

**Speculation.** The speculative tree keeps only the first `SPEC_LEVELS`
odd-bit levels (3 of 4 by default) and then applies the final level
directly. Each carry is then computed from a window of operand bits:
K = 2^SPEC_LEVELS = 8 bits for odd positions and K+1 = 9 for even ones.
Anything further down is ignored. The result has one logic level fewer, and
it is correct unless a long propagate run carries a generate from below the
window.

**Error detection.** The odd-bit windows tile the operand in steps of K. A
speculative carry is wrong only if some window propagates entirely and a
carry enters it from below. Following such a chain downwards always ends at
a pair of adjacent windows where the upper one propagates (P_j) and the
lower one generates (G_{j−K}). That term is exactly what the first pruned
level would have added. So

    err = OR over odd j ≥ K+1 of  P_j(level SPEC_LEVELS) · G_{j−K}(level SPEC_LEVELS)

and err = 1 *if and only if* the speculative sum or carry out differs from
the exact one. It never misses an error and never gives a false alarm. The
testbench checks this equivalence on every vector.

**Correction.** The pruned levels, with their own final level, are still
built alongside the speculative tree. They give the exact carries one level
later. `cicska_nucleus_stage` uses the speculative outputs while
`correct = 0` and the exact ones while `correct = 1`.

**Inside the stage.** The nucleus keeps the CI structure: the prefix adder
works with carry in zero, the incrementer adds the carry from stage 4, and
the OAI gate uses the prefix adder's carry out as G and the AND of the 16
propagates as P. A speculative carry out is right whenever `spec_err = 0`.
So the skip chain above the nucleus is also right in every cycle the
controller accepts.

## Variable latency: predictor and controller

**Predictor** (`vl_predictor`): `pred = AND(a_i ^ b_i)` over a window in the
middle of the adder. By default the window is the 16 nucleus bits, 10..25.
If some bit in the window does not propagate, no carry can travel from the
low stages past the middle. Only the two shorter paths are then active:
low stages into the nucleus, and nucleus to the top. One cycle suffices. A
wider window fires less often but makes those shorter paths longer.

The two slow causes exclude each other when the window equals the nucleus.
A nucleus that propagates on every bit has no generate bit, so its
speculation cannot fail. The end-to-end testbench checks that they never
coincide. With a narrower window they can coincide.

**Controller** (`vl_controller`, states IDLE / FIRST / SECOND):

* In FIRST, if `slow = pred | spec_err` is 0, the result is taken at the end
  of the cycle and a new operation may be accepted in the same cycle.
* Otherwise the operation moves to SECOND. There the nucleus uses its
  corrected carries (`correct = 1`) and the result is taken at the end of
  that cycle.

Assertions check that a slow first cycle never completes or accepts, and
that SECOND always completes.

Note that zero-delay RTL simulation cannot show the timing half of the
scheme. A fast result taken while the critical path was active would be
wrong only in silicon at the reduced clock period. The speculation half can
be shown: in FIRST the nucleus really delivers its speculative carries, so a
controller that skipped the second cycle after a speculation error would
give wrong sums, and the testbenches detect that.

## Top-level interface and timing (`hvl_cicska_top`)

| port           | dir | width | meaning |
|----------------|-----|-------|---------|
| `clk`, `rst_n` | in  | 1     | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | valid-ready handshake for `a`, `b`, `cin`; a pending request must stay stable |
| `a`, `b`       | in  | 32    | operands |
| `cin`          | in  | 1     | carry in |
| `out_valid`    | out | 1     | one-cycle result strobe (no back-pressure) |
| `sum`, `cout`  | out | 32, 1 | result |
| `out_slow`     | out | 1     | the operation took two cycles |
| `out_pred`, `out_spec_err` | out | 1 | which condition made it slow |

Datapath: operand register → `hvl_cicska` → result register. Count clock
edges from the edge that accepts an operation. The result register loads
1 edge later for a one-cycle operation and 2 edges later for a two-cycle
operation, and `out_valid` is high for the following cycle. Fast operations
can be issued back to back, one per clock. Operations come out in order.

## Parameters

Defaults live in `cska_pkg` and are passed down from the top:

| parameter     | default | meaning |
|---------------|---------|---------|
| `WIDTH`       | 32      | operand width |
| `NSTAGES`     | 8       | number of stages Q |
| `STAGE_W`     | {1,2,3,4,16,3,2,1} | stage sizes, LSB first; must add up to `WIDTH` |
| `NUCLEUS_IDX` | 4       | 0-based index of the prefix-adder stage (not 0); its size must be a power of two ≥ 4 |
| `SPEC_LEVELS` | 3       | odd-bit levels kept in the speculative tree (1..log2 of nucleus size); the window is 2^SPEC_LEVELS |
| `PRED_LSB`, `PRED_W` | 10, 16 | predictor window |

Elaboration-time `$error`s catch sizes that do not add up, an invalid
nucleus, and a predictor window outside the operands. The 32-bit width
matches the design's main configuration. Everything else is a choice of
this implementation. Larger adders (64 bits and up) need only new
`STAGE_W` values.

## Files

`rtl/` has one module or package per file:

* `cska_pkg`: widths, stage sizes, defaults, `log2c`
* `cska_full_adder`, `cska_rca`, `cska_incrementer`, `cska_skip_logic`, `cicska_stage`: CI-CSKA stages
* `shc_prefix_cell`, `spec_han_carlson`, `cicska_nucleus_stage`: speculative nucleus
* `vl_predictor`, `vl_controller`: variable-latency control
* `hvl_cicska`: combinational 32-bit hybrid adder
* `hvl_cicska_top`: registered top

`tb/` has one self-checking testbench per module, named `tb_<module>`. They
share `shc_model_pkg`, a bit-serial reference model of exact and window-based
speculative addition that is written independently of the RTL. Each
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
      rtl/cska_pkg.sv tb/shc_model_pkg.sv tb/tb_hvl_cicska_top.sv \
      --top-module tb_hvl_cicska_top
    ./obj_dir/Vtb_hvl_cicska_top

Replace `tb_hvl_cicska_top` with any other testbench name to run that one.
Each run takes well under a second.

## Verification status

* Exhaustive tests: ripple block, incrementer (both polarities), skip gates,
  even and odd CI stages, and the 4-bit predictor.
* `spec_han_carlson` at 16/8, 8/4 and 4/2 (width/window): 20 000 vectors
  each, partly biased towards long propagate runs. Exact outputs equal
  `a+b`, speculative outputs equal the window model, and `err` is 1 exactly
  when they differ.
* Nucleus stage and whole hybrid adder (both the default and a
  fixed-stage-size configuration): with correction the result always
  equals `a+b+cin`; without it, the result is correct whenever `spec_err`
  is 0. `pred` and `spec_err` match the models. Directed full-carry-chain
  cases are included.
* Controller: compared cycle by cycle with a reference model under random
  requests and slow flags.
* End to end at default parameters: 20 000 operations with random gaps. The
  testbench checks every sum, every latency (1 or 2 cycles) and every
  status flag. Each of these must occur at least once: single-cycle
  operations, predictor-caused and speculation-caused second cycles, back-
  to-back issue, stalled requests, full 32-bit carry chains, and predictor
  mispredictions. A misprediction is a second cycle spent although no carry
  entered the window. The first operation is 85218 + 75235 = 160453.

Each testbench has also been run against a deliberately broken copy of its
module and fails there.

## Departures and open points

* **Timing.** The design targets a reduced clock and two-cycle operations,
  but timing is not modelled. The published figures are 11.381 ns for this
  adder against 14.64 ns for the same structure with a Brent-Kung nucleus, on
  an FPGA flow. They have not been reproduced.
* **Sizes.** Stage sizes, nucleus size, predictor window and the number of
  pruned levels are not fixed by the source scheme. The values here are
  reasonable choices, not tuned ones.
* **"Modified" prefix adder.** The source only says the nucleus prefix adder
  is modified. Here it keeps carry in zero plus an incrementer, like every
  other stage. An alternative is to fold the incoming carry into the prefix
  adder's sum level, which removes the 16-bit half-adder chain.
* **Speculation details.** Which levels are pruned, the error network and the
  correction network follow the general description (pruned intermediate
  levels, an error flag) in this implementation's own form. Only the top
  level is pruned.
* **Speculation error as a slow cause.** Besides the predictor, a nucleus
  speculation error also forces the second cycle. This is this design's way
  of combining the two mechanisms.
* **Interface.** The handshake, the registers, the reset and the absence of
  output back-pressure are this implementation's choices.
* **Gates.** AOI/OAI gates appear as Boolean expressions. Synthesis maps them
  to whatever cells the target offers, so the transistor-level savings of the
  scheme depend on the library.
