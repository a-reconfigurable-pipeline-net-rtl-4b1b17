# Pipeline-net integrator for the isomorphic Hopfield model

This RTL simulates a continuous Hopfield network of N neurons in digital
hardware. It integrates the equations of motion with a fourth-order
predictor–corrector method. Four processors work in parallel, each on a
different time step.

The Hopfield model is usually written in terms of the neuron potentials `u`:

    du_i/dt = sum_j T_ij v_j + I_i,      v_i = (1 + tanh(lambda_i u_i)) / 2

The `tanh` is awkward to build, and `u` needs a large dynamic range because the
firing rates saturate. The design instead integrates the *isomorphic* form,
written in the firing rates `v` alone:

    dv_i/dt = F_i(v) = 2 lambda_i v_i (1 - v_i) * (sum_j T_ij v_j + I_i)

This form has the same trajectories and equilibria. It needs only multipliers
and adders, and `v` stays in [0, 1].

Three ideas shape the hardware:

* **Mixed integration.** A multistep predictor–corrector method is accurate
  and parallel, but it cannot start itself. So the first time points come from
  a Milne Runge–Kutta start-up: an Euler guess, then a five-point
  order-improvement formula applied three times. After that the net switches to
  a Ghoshal predictor with three correctors.
* **One formula per processor.** In the predictor–corrector regime, P0 predicts
  `v_{k+3}` while P1, P2 and P3 correct `v_{k+2}`, `v_{k+1}` and `v_k`. All
  four use only results of the previous step, so they run at the same time.
  This is the "computational wavefront".
* **A pipeline net.** The processors are not wired to each other directly. A
  programmable 12 × 30 routing network connects every processor input to any
  processor output or shifter row. A 6 × N shifter array holds vectors that are
  needed again one or more steps later. The connection pattern changes from one
  wavefront to the next.

## The wavefront schedule

One wavefront `CW_j` takes one block of **N + 4 clock cycles**. In a block,
every active processor reads six input vectors, one component per cycle, and
produces a new state vector `v` and its derivative `F = F(v)`. These results
stream out during the next block, where the next wavefront consumes them.
Notation: `v_{k,r}` is a start-up approximation of `v(t_k)` after `r`
improvements. `v_k^[0]` is the prediction and `v_k^[l]` is the `l`-th
correction.

| wavefront | phase (`phase_t`) | P0 | P1 | P2 | P3 |
|---|---|---|---|---|---|
| CW0 | `PH_CW0` | – | – | – | F0 = F(v0) |
| CW1 | `PH_EULER` | v_{1,0} = v0 + hF0 | v_{2,0} = v0 + 2hF0 | v_{3,0} | v_{4,0} |
| CW2–CW4 | `PH_MRKP` | v_{1,r+1} | v_{2,r+1} | v_{3,r+1} | v_{4,r+1} |
| CW5 | `PH_MRKP5` | v_{5,3} | – | – | – |
| CW6 | `PH_TRANS` | v_6^[0] | v_5^[1] | v_4^[2] | v_3^[3] |
| CW(k+3), k ≥ 4 | `PH_GPCM` | v_{k+3}^[0] | v_{k+2}^[1] | v_{k+1}^[2] | v_k^[3] |

A "–" processor is idle. It keeps its output banks and streams its last
results again. The schedule relies on this: in CW6, P1, P2 and P3 still supply
the CW4 values `v_{2,3}`, `F_{2,3}`, `F_{3,3}` and `F_{4,3}`.

Every processor evaluates the same kind of expression:

    v = in[0] + h * sum_{s=1..5} w[s] * in[s]

The coefficients `w[s]` depend on the processor and the phase
(`hop_pkg::proc_weight`):

| phase | processor | in[0] | w[1..5] (on the derivative inputs of the next table) |
|---|---|---|---|
| Euler | Pp | v0 | (p+1), 0, 0, 0, 0 |
| MRKP | P0 | v0 | (251, 646, −264, 106, −19)/720 |
| MRKP | P1 | v0 | (29, 124, 24, 4, −1)/90 |
| MRKP | P2 | v0 | 3/80 · (9, 34, 24, 14, −1) |
| MRKP | P3 | v0 | 2/45 · (7, 32, 12, 32, 7) |
| CW5 | P0 | v0 | 5/144 · (19, −10, 120, −70, 85) |
| GPCM | P0 (predictor) | v_{k−1}^[3] | 8/3, −4/3, 8/3, 0, 0 |
| GPCM | P1 (corrector 1) | v_{k−1}^[3] | 3/8, 9/8, 9/8, 3/8, 0 |
| GPCM | P2 (corrector 2) | v_{k−1}^[3] | 0, 1/3, 4/3, 1/3, 0 |
| GPCM | P3 (corrector 3) | v_{k−1}^[3] | 1/24, 0, 9/24, 19/24, −5/24 |

In the start-up phases the five derivative inputs are F0 and F_{1,r} … F_{4,r}.
In the GPCM phases they are F_{k+2}^[0], F_{k+1}^[1], F_k^[2], F_{k−1}^[3] and
F_{k−2}^[3]. P3 does not use F_{k+2}^[0], so its slot 1 carries F_{k−3}^[3]
instead.

## Moving the vectors: sources, routing patterns and shifter rows

The routing network has twelve sources:

| source | A | B | C | D | E | F | G..L |
|---|---|---|---|---|---|---|---|
| signal | P0 F | P1 F | P1 v | P2 F | P3 F | P3 v | shifter rows 1..6 (last stage) |

Routing output `q = 6p + s + 1` feeds input slot `s` of processor `Pp`.
Outputs 25..30 feed shifter rows 1..6. The control signals generator writes one
of five patterns into the thirty 4-bit latches between blocks. Each pattern
below lists, for P0 | P1 | P2 | P3 | shifter rows 1–6, the source of every slot
(`-` means unconnected, which delivers 0):

    CW0      ------ ------ ------ ------ | G-----
    CW1      GE---- GE---- GE---- GE---- | GE----
    CW2..5   GHABDE GHABDE GHABDE GHABDE | GHA---
    CW6      CAED-- CAEDB- C-EDB- CH-DBI | -IB---
    CW7..    FABD-- FABDE- F-BDE- FH-DEI | -IE---

The shifter rows do the bookkeeping:

* Row 1 holds v0. The host loads it before the run, and the row recirculates
  through CW5 (G is routed back to its own input). SA(1,n) is also wired
  directly to P3's `v0_in`. P3 uses that input, not a routed slot, as its base
  operand in CW0.
* Row 2 takes F0 in CW1 and keeps it. From CW6 on it holds F_{k−3}^[3].
* Row 3 takes F_{1,3} from P0 in CW5. From CW6 on it holds F_{k−2}^[3].

In the predictor–corrector regime, rows 3 and 2 form a two-step delay line
behind E, the output of P3. A row shifts only during the N streaming cycles of
a block, so it delays a vector by exactly one wavefront. Rows 4–6 exist but
this schedule does not use them.

CW6 needs its own pattern because its inputs are start-up values, not
predictor–corrector results. `v_{k−1}^[3] = v_{2,3}` comes from C, the held
state output of P1. `F_{k+1}^[1] = F_{4,3}` comes from E. `F_{k−1}^[3] =
F_{2,3}` comes from B.

## Timing inside a block

The cycle counter `cyc` runs from 0 to N+3. Component `i` of every input
stream is present in cycle `i`.

| cycle | work |
|---|---|
| i (0..N−1) | inputs of component i; stage 1 registers sum_s w[s]·in[s] and in[0] |
| i+1 | stage 2: v_i = in[0] + h·sum, written into the v buffer |
| i+2 | stage 3: N multiply–accumulate cells add T[l][i]·v_i to acc_l |
| N+2 | all N derivatives F_l = 2λ_l v_l (1−v_l)(acc_l + I_l) are evaluated in parallel and latched with v into the output banks |
| N+3 | accumulators cleared; gain step applied if requested; routing latches reloaded |

The whole `v` vector must exist before any `T v` product is complete. So a
wavefront's derivative can only leave the processor a block later, and the
next wavefront cannot start earlier. The result is one wavefront per N + 4
cycles. The first final result `v_3^[3]` starts streaming at cycle 0 of
block 7, which is 7·(N+4) cycles after `start`. After that one result vector
follows every N + 4 cycles.

## Processor (`functional_pipeline`)

The processor has a weighted-sum stage, a state-update stage, a column of N
multiply–accumulate cells, N copies of `iso_nonlinearity`, and two output
banks (F and v), which are streamed by `cyc`. Each processor holds its own
copy of `T` (N×N), `I` and `λ`. The host writes these through a broadcast port.
The coefficient table is fixed at elaboration for each `ROW`, so the hardware
contains no dividers.

Three signals run up the processor chain, from P3 to P0:

* the phase, which the CW_j generator hands to P3;
* the gain-increment request;
* STOP, which P3 raises.

STOP means that every component of P3's newly corrected derivative satisfies
`|F_k^[3]| ≤ eps`, so the state has come to rest.

## Routing column (`tree_mux`)

Each of the 30 outputs uses a four-level binary tree of 2:1 multiplexers
instead of twelve crosspoints on one wire. The 16 leaves are, in order: none,
A … L, and three more "none" leaves. Latch bit 0 steers the leaf level, and
bit 3 steers the root. So the latch value is simply the number of the selected
leaf: 1 = A … 12 = L, and 0 or 13–15 = nothing.

## Numbers

All values are signed fixed point: 32 bits with 16 fractional bits (Q15.16).
Every product is truncated toward −∞ and every result saturates. A weighted sum
adds the five truncated products exactly and saturates once. The reference
models in `tb/` use the same rules, so the tests compare bit for bit. The step
size `h`, the threshold `eps` and the gain step are run-time inputs.

## Using the top (`hopfield_pipeline_net`)

1. Reset (`rst_n` low, asynchronous).
2. Write `T[i][j]`, `I[i]` and `λ[i]` through `cfg` (`cfg_wr_t`: `we`, `kind`
   = `CFG_T`/`CFG_I`/`CFG_LAMBDA`, `row`, `col`, `data`), one word per cycle.
3. Shift v0 into shifter row 1: N cycles of `v0_load_en` with `v0_load_d`,
   component 0 first.
4. Set `h`, `eps`, `lambda_step` and `max_cw`, then pulse `start` for one cycle.
5. From block 7 on, `v_out` carries `v_k^[3]` for `k = v_out_k`, one component
   per cycle, while `v_out_valid` is high. `proc_v`/`proc_f` expose the streams
   of all four processors.
6. The run ends after the wavefront in which STOP appears, or after `max_cw`
   wavefronts. One more "drain" block streams the last result, then `done` goes
   high.

`gain_incr`, if high in the last cycle of a block, adds `lambda_step` to every
gain. This makes it possible to raise the gain step by step during a run
(annealing).

The default size is `N = 16`. N is the only parameter. The routing size
(12 × 30), the six shifter rows and the four processors are fixed by the
architecture.

## Simulating

Each testbench checks its results and prints
`TB_RESULT checks=<n> failures=<m>`. To build and run one with Verilator:

    verilator --binary --timing --assert -Wno-fatal rtl/hop_pkg.sv rtl/*.sv \
        tb/tb_fix_pkg.sv tb/tb_hopfield_pipeline_net.sv \
        --top-module tb_hopfield_pipeline_net -Mdir obj -o sim
    ./obj/sim

(`rtl/hop_pkg.sv` is listed explicitly so that it is read first. Verilator
warns about the duplicate; `-Wno-fatal` keeps that from stopping the build.)

| testbench | what it shows |
|---|---|
| `tb_hopfield_pipeline_net` | the whole net at N = 16 |
| `tb_functional_pipeline` | P1 and P3 at N = 4 |
| `tb_iso_nonlinearity` | the derivative cell |
| `tb_tree_mux`, `tb_routing_network` | routing column and network |
| `tb_shifter_array` | the 6 × N shifter array |
| `tb_cw_generator`, `tb_control_signals_generator` | sequencing and routing patterns |
| `tb_hopfield_accuracy` | the net against the original tanh model |

What each test checks:

* **`tb_hopfield_pipeline_net`** runs the whole net at N = 16 with a random
  symmetric network. It compares every streamed component of every `v_k^[3]`
  bit for bit with an independent model of the complete mixed integration. It
  also checks:
  * the 7-block start latency and the N+4 block period;
  * that STOP ends the run at the first step where the model reaches
    `|F| ≤ eps`;
  * that the wavefront limit ends a second run, with a gain step in the middle;
  * that every phase, the idle "hold", STOP, the limit and the gain step each
    occurred.
* **`tb_functional_pipeline`** drives P1 and P3 (N = 4) through random phases
  and inputs, and checks the outputs, hold, STOP and gain behaviour.
* **`tb_hopfield_accuracy`** integrates the *original* potential-form model
  (with `tanh`) in double precision, using a fine Runge–Kutta step. It maps the
  result through `g` and compares every streamed `v_k^[3]` with it, at N = 16,
  h = 1/8 and 60 wavefronts. The observed maximum deviation is about 6·10⁻⁴;
  the test fails above 2·10⁻³. This shows that the isomorphic form, the
  start-up, the predictor–corrector formulas and the Q15.16 word together
  follow the true trajectory.
* **The unit benches** check, in turn: the derivative cell against a 64-bit
  reference; every latch code of the tree; random routing patterns;
  shift/recirculate/load of the array; the block, wavefront and phase sequence
  with stop/limit/drain; and the five routing patterns against the hand-derived
  table above.

## Where this design makes its own choices

The architecture fixes:

* the block diagram: four processors, the 12 × 30 tree-multiplexer routing
  network, the 6 × N shifter array, the CW_j generator and the control signals
  generator;
* the source letters A–L, the tree shape and the latch bit weights;
* all integration formulas and the (N+4)-cycle block period.

The following are filled in here:

* **Start-up schedule.** The mapping of start-up formulas to processors and the
  CW5/CW6 hand-over are taken from the wavefront diagram: row r of the diagram
  maps to processor P(r−1), and idle processors keep their results. The order
  of the start-up is m = 4. The routing patterns and the use of the shifter
  rows follow from that schedule.
* **Processor insides.** The pipeline stages, the N parallel multiply–accumulate
  and derivative cells, and the private copies of `T`, `I` and `λ` are this
  design's choice. So are the host write port and the host load of v0 into
  shifter row 1.
* **Word format.** Q15.16, with truncation and saturation.
* **STOP test.** `max |F^[3]| ≤ eps`. The architecture only asks for a stop
  "near the ground state".
* **Gain increment.** A `λ += lambda_step` step at a block boundary. The
  architecture only names a gain-increment signal at P3.
* **Output.** `v_out` carries the third correction `v_k^[3]`, which P3
  computes. One description of the architecture names the second correction
  at that port; the final corrected value is the one produced there.
* **Run control.** The start/limit/drain protocol and the parallel loading of
  all routing latches.
* **Shifter enables.** The architecture shows the control signals generator
  driving only the routing network. Here it also drives the shifter rows'
  shift enables.
* **Chain contents.** The processor chain carries the phase as well as the
  gain and STOP signals. The architecture shows the wavefront index entering
  P3 and two links between neighbouring processors.

Hardware cost grows as N² for the T copies and as N for the cells: each
processor has N multiply–accumulate cells and N derivative cells. That is a
direct reading of "two-dimensional functional pipeline", not an optimised
implementation. A processor could instead share one T column per cycle with
the others, since all four read the same column in the same cycle.

## Files

* `rtl/hop_pkg.sv`: types, fixed-point helpers, the coefficient and routing
  tables.
* `rtl/hopfield_pipeline_net.sv`: the top.
* `rtl/functional_pipeline.sv`, `rtl/iso_nonlinearity.sv`: the processors.
* `rtl/routing_network.sv`, `rtl/tree_mux.sv`: the routing network.
* `rtl/shifter_array.sv`: the shifter array.
* `rtl/cw_generator.sv`, `rtl/control_signals_generator.sv`: the sequencing.
* `tb/`: one self-checking testbench per module and `tb_fix_pkg.sv`, the
  reference fixed-point arithmetic.
