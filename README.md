# LRNN job shop scheduling hardware

This RTL implements hardware for a *Lagrangian relaxation neural network* (LRNN) that
schedules a job shop. It follows the architecture in the paper "Architectural Design of
Neural Network Hardware for Job Shop Scheduling".

**The problem.** A job shop has `H` machine types and a horizon of `K` time slots. Each part
`i` has a due date `D_i`, a weight `W_i` and `J_i` operations that must run in order.
Operation `j` needs machine type `h_ij` for `P_ij` consecutive slots. The goal is to choose
beginning times `b_ij` that minimise total weighted tardiness. At any slot, no machine type
may be booked beyond its capacity `M_kh`.

**The idea.** The capacity constraints are relaxed with Lagrange multipliers `pi[k][h]`,
which act as a price for using machine type `h` at slot `k`. With the prices fixed, each
part can be scheduled on its own. This is a small dynamic program (DP) per part:

    minimise  W_i * max(0, C_i - D_i)  +  sum_j  sum_{k=b_ij}^{b_ij+P_ij-1} pi[k][h_ij]

The "neural" part is how the prices move. They are not updated only after every part has
been re-solved. Instead, after **each** part subproblem the hardware does two things:

1. It adjusts the subgradient directions `g[k][h] = (slots booked) - M_kh` by removing that
   part's old bookings and adding its new ones.
2. It moves every price along that direction, `pi <- max(0, pi + g * 2^-n)`.

Over many iterations the surrogate dual value, `sum_i L_i* - sum pi*M`, rises towards its
maximum. The schedules then approach a near-optimal feasible solution. In the paper, a
host-side heuristic makes the final schedule feasible. That heuristic is not part of this
hardware.

The system has two parts. A micro-controller moves data between the host PC and an
optimization chip and decides which part to solve next. The optimization chip solves one
part subproblem per command and updates all multipliers itself, so large arrays never
cross the chip boundary. The paper proposes two architectures for this chip and leaves the
choice open, so both are built here:

| chip | main resources | cycles per subproblem |
|---|---|---|
| `opt_chip_parallel` | `K` state cells, one per time slot | `sum_j (P_ij + K + 1)` + sweep + `J_i + H` + 3, about `K*J_i` |
| `opt_chip_pipeline` | `J` stage cells, one per operation | `3*J_i + K + 6` + sweep + `H`, about `K` |

The sweep takes at most `K + J_i` cycles (see below). `lrnn_top` contains both chips side by
side with identical interfaces (`par_*` and `pipe_*` ports). Given the same commands, both
produce bit-identical results.

## Number formats

* All costs and multipliers are 16-bit unsigned integers (`lrnn_pkg::cost_t`). Directions
  are 16-bit signed (`dir_t`).
* `16'hFFFF` (`COST_INF`) marks an infeasible state: an operation that would run past slot
  `K-1`. Any sum that has `COST_INF` as an operand stays `COST_INF`. Finite sums saturate at
  `16'hFFFE`, so a large cost is never read as infeasible.
* The hardware has no multipliers. A part weight is `W_i = 2^w_i`, and the step size is
  `2^-n`. Both are shift amounts (4 bits each).
* Tardiness is linear, `W_i * T_i`, not `W_i * T_i^2`. The paper formulates the problem with
  `T_i^2` but reports that 16-bit arithmetic overflowed with it and simulated `T_i` instead.
* An operation at `b` occupies slots `b .. b+P-1`. The next operation of the same part may
  start at `b+P` or later. Every part may start at slot 0 (there are no release dates).
* Ties: a state's minimum-indicating bit is set when its cost is `<=` the minimum over all
  later states. Among equal-cost choices, the earliest beginning time therefore wins.

## The DP both chips compute

Stages are operations, and states are beginning times `k = 0..K-1`. Going backwards from
the last operation:

    S_j(k) = sum_{t=k}^{k+P_j-1} pi[t][h_j]               (stage-wise cost, INF if k+P_j > K)
    V_j(k) = S_j(k) + Mnext_j(k + P_j)                     (cumulative cost)
    M_j(k) = min(V_j(k), M_j(k+1)),   M_j(K) = INF         (running minimum)
    bit_j(k) = V_j(k) != INF  and  V_j(k) <= M_j(k+1)

Here `Mnext_j = M_{j+1}` for every stage except the last. For the last stage,
`Mnext(k') = W*max(0, k'-1-D)`: the tardiness of a part that finishes at `k'-1`. The
subproblem cost is `L_i* = M_0(0)`.

The **forward sweep** rebuilds the schedule. It starts at slot 0 with stage 0 and looks at
one state per cycle. On the first set bit, that slot is `b_j`, and the search for stage
`j+1` resumes at `b_j + P_j`. The pointer never moves backwards, so the sweep takes (slack
between operations) + `J_i` cycles, and never more than `K + J_i`. If the pointer runs past
the horizon, the part has no feasible schedule. The chip then raises `fail`, skips the
updates and keeps the part's previous schedule.

## Parallel chip: `K` state cells

Each `state_cell` stands for one time slot `k`. Its local storage holds:

* `pi[k][0..H-1]` and `g[k][0..H-1]`
* `J` minimum-indicating bits
* a running-minimum register `M`

Each cell has one adder and one comparator. The cells form a chain: cell `k` exchanges
values with cell `k+1` on its right. `COST_INF` enters from the far right (beyond cell
`K-1`).

One DP stage with processing time `P` and machine type `h` works like this. All cells act
together, driven by a broadcast operation (`cell_op_e`) from `sequence_controller`:

| cycles | op | what every cell does |
|---|---|---|
| 1 | `OP_LOAD` | `acc <= pi[k][h]`. The chains load the right neighbour's `pi[k+1][h]` and `M(k+1)`. |
| `P-1` | `OP_ACC` | `acc += chain value`. Both chains shift one cell left. |
| 1 | `OP_CC` | `V <= acc + M(k+P)`. The M chain holds `M(k+P)` after `P` shifts. |
| `K` | `OP_CMP` | A token enters cell `K-1` and moves one cell left per cycle. The cell holding it sets `M <= min(V, M_right)` and writes `bit[j]`. |

A stage therefore takes `P + K + 1` cycles. The sequential comparison is the bottleneck.
Before the last stage, one `OP_TARDY` cycle presets every `M` register with the tardiness
cost of finishing at `k-1`. Because of this preset, the last stage needs no special case.
For the last stage, the controller feeds the tardiness of finishing at `K-1` into the right
end of the M chain.

After the backward pass, `forward_sweep` reads the bit column of the stage it is tracing
(one bit from each cell). The controller then runs two update phases:

* `J_i` cycles of `OP_DIR`: each cell checks whether `k` lies in the old and new interval
  of that operation.
* `H` cycles of `OP_MULT`: every cell updates `pi` for one machine type.

`global_memory` holds the part records, the operation records and the last schedule of
every part. The direction update needs that last schedule.

## Pipeline chip: `J` stage cells

Each `pipe_stage_cell` computes a whole stage and handles one state per cycle, from `K-1`
down to 0. Each state passes through four pipeline steps, one per cycle:

    SC1  x(k) = pi[k][h] - pi[k+P][h]        (0 for slots past the horizon)
    SC2  S(k) = S(k+1) + x(k)                 sliding-window stage cost
    CC   V(k) = S(k) + Mnext(k+P)
    MC   M(k) = min(V(k), M(k+1)), bit(k)

Stage cell `j` starts one cycle after stage cell `j+1` (`go_out`). Stage cell `j+1`
finishes state `k+P` on cycle `t0_{j+1}(k) - P + 3`, and its result is valid one cycle
later. Stage cell `j` needs that result in its CC step, on cycle `t0_{j+1}(k) + 3`. The
value is therefore exactly `P-1` cycles old.

Each stage cell keeps two circular buffers of depth `PMAX` (default 256; must be a power of
two):

* the last `pi` values it read, which supply `pi[k+P]`
* its neighbour's `M` output, which supplies `Mnext(k+P)`

Processing times must therefore not exceed `PMAX`. For the last operation's cell,
`Mnext(k+P)` is computed directly as the tardiness of finishing at `k+P-1`.

Every stage cell reads a different slot of the multipliers in the same cycle.
`pipe_mult_memory` therefore has one combinational read port per stage cell (`NR = J`). Its
updating circuit changes all `K` slots in one cycle per operation (directions) and in one
cycle per machine type (multipliers). `pipe_forward_sweep` stores the `J x K` bits as the
stage cells produce them, then traces them with the same `forward_sweep`. `pipe_controller`
does four things in order:

1. copies the part's `J_i` operation records into the stage-cell registers (`J_i` cycles)
2. pulses `go` into the last operation's cell
3. waits for stage cell 0 to finish state 0, then latches `L_i*`
4. runs the sweep and the updates as in the parallel chip

## Driving a chip (the micro-controller's side)

All ports are synchronous to `clk`. `rst_n` is an asynchronous, active-low reset that
clears all multipliers, directions and control state.

1. **Load data.**
   * `part_wr` with `part_wi`, `part_wdue` (D), `part_wwsh` (w) and `part_wnops` (J_i) writes
     one part record. Rewriting a part drops its stored schedule.
   * `op_wr` with `op_wi`, `op_wj`, `op_wh` and `op_wp` writes one operation.
2. **Initialise the prices.** For every slot and machine type, use `mw_en`, `mw_k`, `mw_h`,
   `mw_pi` and `mw_g` to write `pi` (0 or a warm start) and `g = -M_kh`. This is the only
   place the capacities enter.
3. **Iterate.** For each part in turn, pulse `start` with `part` and `step_n` (n), then wait
   for the one-cycle `done` pulse. `busy` is high from the cycle after `start` until `done`.
   Along with `done`, the chip presents `sub_cost = L_i*` and `fail`.
4. **Read results.** Read beginning times with `hs_i` and `hs_j` (returns `hs_b` and
   `hs_valid`), and prices with `mr_k` and `mr_h` (returns `mr_pi` and `mr_g`). Both are
   combinational reads.

The micro-controller can track the surrogate dual as `sum_i L_i* - sum_{k,h} pi*M_kh`.

## Sizes

`lrnn_top` defaults to:

* `K = 5000` slots
* `J = 20` operations per part
* `H = 11` machine types
* `I = 500` parts
* `PMAX = 256`

`K`, `J` and `I` come from the paper's largest test problem (500 parts, 20 operations, 5000
slots, 10 machine types). `H` is 11 so that its smaller test problems, which use up to 11
machine types, also fit. At these sizes:

* A parallel-chip subproblem with 20 operations takes about 101,000 cycles. One iteration
  over 500 parts takes about 0.5 s at 100 MHz.
* A pipeline-chip subproblem takes 5,000 to 10,000 cycles. The variation comes from the
  sweep, which is not overlapped with the next subproblem. One iteration takes 0.025 to
  0.05 s.

The horizon is fixed at `K`. To run a problem with a shorter horizon, the host must make the
unused slots expensive through their multipliers.

## Departures and open points

* **Not built.** The micro-controller and the PC are not part of this RTL. Their role is
  played by the testbenches, and the chip interface appears as top-level ports.
* **Tardiness is linear**, not squared (see Number formats).
* **The forward sweep** scans one state per cycle, within the paper's budget of about
  `0.05*K*J` cycles. The paper mentions a dedicated tracing circuit but does not describe
  it.
* **Pipeline buffer depth.** Processing times are bounded by `PMAX` in the pipeline chip.
  The paper gives no bound.
* **Own choices** (the paper does not specify them):
  * port encodings
  * neighbour shift chains in the parallel chip
  * the one-cycle stagger and buffers in the pipeline chip
  * operation-by-operation direction update
  * zero-clamping and saturation rules
  * the tie rule
  * reset behaviour

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/lrnn_ref_pkg.sv` holds a reference
model of one LRNN step:

* whole-array DP, sweep and updates
* the expected sweep length
* an exhaustive search over all schedules, which checks the DP itself on small cases

| testbench | covers |
|---|---|
| `tb_state_cell`, `tb_global_memory`, `tb_forward_sweep`, `tb_sequence_controller` | parallel-chip blocks |
| `tb_pipe_stage_cell`, `tb_pipe_mult_memory`, `tb_pipe_forward_sweep`, `tb_pipe_controller` | pipeline-chip blocks |
| `tb_opt_chip_parallel`, `tb_opt_chip_pipeline` | each chip, four iterations, exact cycle counts, brute-force cost check |
| `tb_lrnn_top` | both chips in lockstep, six iterations; checks that tardiness, infeasible parts, re-solving, moving schedules, clamping, rising prices, `P=1`, `P=PMAX` and the pipeline speed-up each occur |
| `tb_lrnn_top_full` | `lrnn_top` at its default size; one late part of 20 operations solved twice on both chips, with every one of the 55,000 multipliers and directions compared (a few minutes to build and run) |

To run a testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/lrnn_pkg.sv tb/lrnn_ref_pkg.sv rtl/*.sv tb/tb_lrnn_top.sv \
      --top-module tb_lrnn_top -o sim
    ./obj_dir/sim

(`rtl/lrnn_pkg.sv` must come first. Listing it twice, once explicitly and once through
`rtl/*.sv`, is harmless. You can also drop it from the glob.)

## Files

| file | contents |
|---|---|
| `rtl/lrnn_pkg.sv` | types, `COST_INF`, saturating add, tardiness and multiplier-update functions, cell operation codes |
| `rtl/lrnn_top.sv` | both chips side by side |
| `rtl/opt_chip_parallel.sv` | parallel chip: `state_cell` x K, `global_memory`, `forward_sweep`, `sequence_controller` |
| `rtl/opt_chip_pipeline.sv` | pipeline chip: `pipe_stage_cell` x J, `pipe_mult_memory`, `pipe_forward_sweep`, `pipe_controller`, `global_memory` |
