# Concatenation-incrementation carry skip adder (CI-CSKA) and its hybrid variable latency form

A carry skip adder splits an N-bit addition into stages and lets a carry
jump over any stage in which every bit propagates. In the classic form each
stage's ripple chain waits for the carry from below, and a multiplexer picks
either that ripple result or the incoming carry. The CI-CSKA changes two things:

* **Concatenation.** Every stage except the first adds its bits with a carry
  input of 0. All stages work at the same time, and none waits for the carry
  chain. Each produces intermediate sums `Z` and a local carry `Cj`.
* **Incrementation.** The carry that finally arrives from below is added to
  `Z` by a short chain of half adders. The carry passed upward does not come
  from this chain. It comes from one compound gate per stage:

      CO(j) = Cj | (&Z & CO(j-1))

  A carry made inside the stage sets it. Otherwise the incoming carry passes
  when `Z` is all ones, which, given `Cj = 0`, means every bit propagates.
  Otherwise it is 0.

The skip gate is an AND-OR-Invert (AOI) or OR-AND-Invert (OAI) cell rather
than a multiplexer. Both cells invert, so the design alternates them along the
chain. The carry leaves an AOI stage complemented, the next OAI stage takes the
complement and gives the true carry, and so on. No inverter sits in the skip
path.

The second design, the **hybrid variable latency CSKA**, keeps this chain but
replaces the largest, middle stage (the *nucleus*) with a Brent-Kung parallel
prefix adder. The all-propagate signal of the nucleus selects its skip gate.
It also acts as a **predictor**: when it is 0, no carry can ripple from the
low stages through the nucleus into the high stages, so the adder settles
within a shorter delay. A clock period sized for that shorter delay then
suffices, and only predicted-long additions take a second cycle. The slack
this frees is meant to be spent on a lower supply voltage.

Both designs are written at the gate-function level (full adders, half
adders, AOI/OAI equations, prefix operators), so the RTL mirrors the circuit
structure. A synthesis tool will of course restructure it.

## Blocks

| Module | Role |
|---|---|
| `rca_block` | Ripple chain of M full adders. It is stage 0 of both adders, fed by the carry input. In later stages it is fed by 0 and gives `Z` and `Cj`. |
| `inc_block` | Chain of M half adders: `s = Z + carry`. Its carry out is not built. `CIN_INV = 1` takes the complemented carry. |
| `cska_skip` | The skip compound gate. `OAI = 0`: AOI form, true carry in, complemented carry out. `OAI = 1`: OAI form, complemented carry in, true carry out. |
| `ci_cska_stage` | One stage j ≥ 1: `rca_block` with carry in 0, then `inc_block`, then `cska_skip`. It also outputs `skip = &Z`. |
| `bk_nucleus` | The nucleus stage: preprocessing, a Brent-Kung prefix network, then carries, sums and the skip gate. Outputs `p_all` (the predictor) and `g_all`. |
| `ci_cska` | The CI-CSKA: stage 0 plus Q-1 `ci_cska_stage`s. |
| `hybrid_cska` | The same chain, except that stage `P_IDX` is a `bk_nucleus`. Outputs `pred`. |
| `vl_cska_unit` | Registers around `hybrid_cska`, plus the hold logic that gives predicted-long operations a second cycle. Valid/ready handshake. |
| `cska_top` | `ci_cska` and `vl_cska_unit` side by side, each with its own ports. |
| `cska_pkg` | Word width and default stage splits. |

## The polarity of the skip chain

This is the part of the design that is easiest to get wrong when changing it.

* Stage 0 has no skip gate. Its ripple carry out is the true carry.
* Stage j ≥ 1 uses an AOI gate when j is odd and an OAI gate when j is even.
  So `cc[j]`, the carry out of stage j, is **true for even j** and
  **complemented for odd j**.
* An AOI stage computes `~(Cj | p & c)` from the true `c`. An OAI stage
  computes `~((~p | ~c) & ~Cj)` from `~c`, which equals `Cj | p & c`. The OAI
  form needs `~Cj` and `~p`. Here they are formed inside `cska_skip`; in a
  cell-level design they would come from complementary outputs of the stage
  logic.
* The incrementation block and the nucleus both need the true carry. They take
  the chain's signal as it is and invert it internally when it arrives
  complemented (`CIN_INV`, or `OAI` in `bk_nucleus`). This places the inversion
  off the skip path.
* `cout` is `cc[Q-1]`, inverted once when the last stage is an AOI stage
  (Q even).

## Stage sizes

`SIZES` is an array of `cska_pkg::MAX_STAGES` (16) entries. Only the first `Q`
are used, and they must sum to `N`; elaboration stops with an error otherwise.
Unequal sizes give the variable stage size (VSS) form, which has the better
delay. Equal sizes give the fixed stage size (FSS) form.

Sizing rule: make the first and last stages small, because the worst path
ripples through the first stage, skips the middle and ripples through the
last. The middle stages can be larger. The split itself depends on gate delays
that RTL does not model, so the defaults are this design's choice:

* `ci_cska`: N = 32, Q = 9, `{1, 2, 3, 4, 5, 6, 5, 4, 2}`, least significant
  first. The last stage uses an OAI gate, so `cout` needs no inverter.
* `hybrid_cska`: N = 32, Q = 7, `{3, 4, 5, 8, 5, 4, 3}`, with the nucleus at
  index 3 (bits 19:12). The nucleus must be a power of two and is the largest
  stage. Its 8 bits match the size used to describe the nucleus.

## The nucleus stage (`bk_nucleus`)

1. **Preprocessing:** `p_i = a_i ^ b_i` and `g_i = a_i & b_i`.
2. **Brent-Kung network with no carry input.** The up-sweep has log2(M)
   levels: node i, where i+1 is a multiple of 2^(l+1), absorbs node i − 2^l.
   The down-sweep has log2(M)−1 levels: nodes i = 3·2^l − 1, 5·2^l − 1, …
   absorb node i − 2^l. The whole-stage pair `G[M-1:0]`, `P[M-1:0]` comes out
   of the up-sweep alone, ahead of the other prefixes. That is why this network
   was chosen: the skip gate and the predictor need exactly that pair, early.
3. **Carries:** `c_i = G[i-1:0] | P[i-1:0] & carry_in`, with `c_0 = carry_in`.
   This is the same "add the incoming carry last" idea as the incrementation
   block.
4. **Postprocessing:** `s_i = p_i ^ c_i`.
5. **Skip gate:** `CO = G[M-1:0] | P[M-1:0] & carry_in`, an AOI or OAI gate
   chosen by the stage's position.

## Variable latency timing (`vl_cska_unit`)

The longest path of the hybrid adder runs from bit 0, through the carry skip
chain and the nucleus, to the top sum bit. It can only be active when the
nucleus propagates in every bit, which is exactly when `pred = 1`. The unit is
meant to be clocked at a period that covers every path except those.

| Cycle | Short operation (`pred = 0`) | Long operation (`pred = 1`) |
|---|---|---|
| edge k | operands captured (`in_valid & in_ready`) | operands captured |
| after edge k | adder evaluates; `in_ready = 1` | adder evaluates; `in_ready = 0` |
| edge k+1 | result captured; `out_valid = 1` after it | hold: second evaluation cycle |
| edge k+2 | — | result captured; `out_valid = 1`, `out_long = 1` |

A new operand is accepted in the same cycle a result is captured. Short
operations therefore stream at one per clock, and each long one costs one
extra clock.

Reset is synchronous and active low. It clears only the control flags (busy,
hold, `out_valid`, `out_long`). The data registers are not reset. Two
assertions guard the hold logic: the hold lasts exactly one cycle, and nothing
is accepted while a long operation is held.

The handshake, the latencies and the reset are this design's own choices. The
underlying method only says that the nucleus's all-propagate signal is the
predictor of a variable latency adder.

## Where this RTL departs from, or goes beyond, the method

* **Word width and stage splits are assumptions.** The method is defined for
  any N and any split. 32 bits and the splits above were chosen here.
* **One nucleus stage.** The method speaks of replacing "some of the middle
  stages" but describes a single nucleus. Only one is built.
* **Skip condition.** The skip uses the product of the intermediate results
  `Z`, as the method states, rather than a separate AND of the propagate
  signals. The two agree whenever the skip gate uses them, because `Cj = 0`
  there.
* **Hold logic and handshake** are not specified by the method; see above.
* **Electrical content is outside the RTL.** The method's claims concern
  delay, power and energy at supply voltages from super-threshold down to near
  threshold. RTL can show only the logic, not those figures. Gate polarity and
  the absence of inverters on the skip path are kept structurally, but a
  synthesis tool is free to remap them.
* **Not included:** the conventional multiplexer-based CSKA and the other
  adders that the method is compared against.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M`.

* `rca_block`, `inc_block`, `cska_skip`, `ci_cska_stage` and `bk_nucleus`
  (M = 8, both gate forms) are checked exhaustively against integer addition.
* `ci_cska` runs 200 000 vectors through the default VSS adder, a 4 × 8 FSS
  adder and a 6-stage adder that ends on an AOI gate. Half the vectors are
  built to propagate across many stages (`b = ~a`, with a few generate or kill
  bits).
* `hybrid_cska` runs 200 000 vectors and also checks `pred` against
  `&(a ^ b)[19:12]`.
* `vl_cska_unit` runs a random stream with gaps. It checks each result in
  order, plus its latency and `out_long`. It requires short operations, long
  operations, refused offers and back-to-back acceptances to each occur.
* `tb_cska_top` runs both adders at their default parameters for 50 000
  cycles. Besides checking results, it counts from the operands that carries
  skipped through AOI stages and through OAI stages, that stage carries were
  generated, and that a carry skipped every stage above the first. It also
  counts short and long operations, stalls and back-to-back acceptances. A
  mechanism that never occurs is a failure.

## Simulating

All files are plain SystemVerilog. `cska_pkg.sv` must be read first. With
Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/cska_pkg.sv tb/tb_cska_top.sv --top-module tb_cska_top -o sim
    ./obj_dir/sim

The other modules are found through `-Irtl`. To build another size, override
`N`, `Q` and `SIZES` (and `P_IDX` for the hybrid) with a keyed pattern, for
example `.SIZES('{0: 8, 1: 8, 2: 8, 3: 8, default: 0})`.
