# Long-horizon direct MPC with a sphere decoder: FPGA current controller

This is the fixed-point datapath of a current controller for a three-level
neutral-point-clamped (NPC) inverter that drives an induction machine. It uses
*direct* model predictive control with a finite control set (FCS-MPC). There is
no modulator: every sampling interval (Ts = 25 µs, 40 kHz) the controller picks
the switch position of each of the three phase legs, −1, 0 or +1. To choose
it, the controller looks N = 3 steps ahead. It minimises the predicted
current-tracking error plus a weighted penalty on switching, over all
3^(3N) = 19 683 switch sequences. The first step of the best sequence is
applied, and the whole search is repeated in the next interval.

Trying every sequence inside 25 µs is not practical. The design instead turns
the problem into an integer least-squares problem and solves it with a
**sphere decoder**, a depth-first branch-and-bound search. The search has
three refinements that make it suitable for hardware:

* a hard limit on the number of visited tree nodes (130), so that the worst
  case fits in the sampling interval;
* all three sibling distances of a tree level are computed together the
  first time the level is entered. The two not yet needed are kept in a small
  table, so the later visits are only look-ups;
* a good starting radius: the smaller of the rounded unconstrained solution
  (the Babai estimate) and the previous optimum shifted by one step (the
  educated guess).

## The optimisation problem in hardware terms

The machine state is `x = [i_sα i_sβ ψ_rα ψ_rβ]`: stator current and rotor
flux in the stationary frame. The discrete model is
`x(k+1) = A x(k) + B u_abc(k)`, with `u_abc ∈ {−1,0,1}³`. Stack the switch
positions of the horizon into `U ∈ {−1,0,1}^(3N)` and the current references
into `I*`. The cost is

    J = || Γ x(k) + Υ U − I* ||² + λu || S U − E u(k−1) ||²

Up to a constant, this equals `(U − U_unc)ᵀ H (U − U_unc)`, where

    H     = Υᵀ Υ + λu Sᵀ S
    Θ     = Υᵀ (Γ x(k) − I*) − λu Sᵀ E u(k−1)
    U_unc = −H⁻¹ Θ                       (unconstrained optimum)

With a lower-triangular `V` for which `Vᵀ V = H`, and `ū = V U_unc`, the problem
becomes

    minimise || ū − V U ||²   over U ∈ {−1,0,1}^(3N).

Because `V` is lower triangular, residual row `j` depends only on
`u_1 … u_j`. So the squared distance grows level by level down a 3N-level
ternary tree, and a branch can be dropped as soon as its partial distance
exceeds the best distance found so far (the squared sphere radius `ρ²`).

Γ, Υ, S and E follow from the model (`S` is the block difference matrix with
`I₃` on the diagonal and `−I₃` below it, and `E = [I₃ 0 … 0]ᵀ`). The hardware
does not compute them. The host processor computes Γ, Υ, H⁻¹, V, λu, A and B
and loads them as Q16.16 words (see *Register map*). `V` can be obtained as a
Cholesky factor of `H` with the index order reversed: factor
`J H J = R Rᵀ` (R lower triangular, J the exchange matrix) and take
`V = J Rᵀ J`. The datapath ignores entries above the diagonal of `V`. The
testbench `tb_mpc_drive` contains a complete floating-point example of this
computation.

## Block structure

```
              AXI4-Lite (host)                      ┌────────────── fcs_mpc_core ──────────────┐
                    │                               │                                          │
             ┌──────┴───────┐  A,B,Γ,Υ,H⁻¹,V,λu     │  unc_solver ─► init_radius ─► sphere_    │
             │ mpc_cfg_regs ├──────────────────────►│  U_unc, ū      ρ²_ini, U_ini   decoder   │
             └──────────────┘                       │       ▲                          │       │
 x_obs ──► delay_comp ──► x_k ──► (reference) ──► iref     └── stored U_opt(k−1) ◄─────┘       │
  x(k−1)   x(k)=Ax+Bu(k−1)                          └──────────────────────────┬───────────────┘
                                                                                ▼
 ctrl_timer: tick every 2500 cycles, execution time, overruns              u_abc (3 × {−1,0,1})
```

| Module | Role |
|---|---|
| `mpc_top` | Control loop: sequencing per period, ports to the observer, the reference block, the inverter and the host |
| `mpc_cfg_regs` | AXI4-Lite register bank: shadow and active coefficient banks, commit at idle, status words |
| `ctrl_timer` | Period tick (Ts), execution-time measurement, overrun counter |
| `delay_comp` | `x(k) = A x(k−1) + B u(k−1)`: compensates the one-period computation delay |
| `fcs_mpc_core` | The MPC algorithm: runs the three blocks below, stores `U_opt` for the next period |
| `unc_solver` | Computes Θ, `U_unc = −H⁻¹Θ` and `ū = V U_unc` |
| `init_radius` | Babai estimate vs. educated guess; the smaller radius and its sequence |
| `sphere_decoder` | The tree search, one node per clock cycle |
| `mpc_pkg` | Widths, types, horizon, node limit, coefficient offsets |

Three parts of the loop are outside this RTL and connect through ports. The
state observer supplies `x_obs`. The reference generator turns the torque
reference into the current trajectory `iref`. Current sampling and the speed
encoder are also external: the rotor speed reaches the design only through the
matrices the host loads.

## The sphere decoder (`sphere_decoder.sv`)

State of the search, for L = 3N levels:

* `sp[j] ∈ {−1, 0, +1, +2}`: the sibling under test on level j. The value +2
  means the level is exhausted.
* `d[j]`: the partial squared distance of the path above level j.
* `lut0[j]`, `lut1[j]`: the precomputed distances of siblings 0 and +1 of
  level j.
* `j`: the current level. `ρ²` and `u_opt` hold the best leaf so far, or the
  initial guess.

Every clock cycle evaluates exactly one node:

1. **Distance.** If `sp[j] = −1`, the level is entered for the first time. The
   shared term `δ = ū_j − Σ_{i<j} V(j,i)·u_i` is formed with adders only, since
   every `u_i` is −1, 0 or +1. The three distances `(δ+V(j,j))² + d[j]`,
   `δ² + d[j]` and `(δ−V(j,j))² + d[j]` are computed in parallel with three
   squarers. The −1 distance is used now; the other two go into `lut0`/`lut1`.
   For `sp[j] = 0` or `+1` the distance is read from the table.
2. **Decision.** If the distance is ≤ `ρ²`: at the bottom level it becomes the
   new tentative optimum (`u_opt` and `ρ²` are updated and `sp[j]`
   advances); on an inner level the search descends, storing the distance
   as `d[j+1]`. Otherwise the branch is pruned and `sp[j]` advances.
3. **Backtracking.** Any level with `sp > +1` is reset to −1, and its parent
   advances. This runs from the bottom level up as a combinational cascade in
   the same cycle, so one cycle can climb several levels.
4. **Termination.** The search is complete, which certifies optimality, when
   `sp[0]` is exhausted. Otherwise it stops when the node counter reaches
   `MAX_NODES`. The result is then the best sequence found so far, which may be
   the initial guess itself. The `optimal` output tells the two cases apart.

Every level visited needs all three siblings evaluated, so the search visits at
least 9N = 27 nodes. The latency is exactly `nodes` clock cycles: `done` is
raised by the `nodes`-th clock edge after the edge that samples `start`.

## Initial radius (`init_radius.sv`)

* **Babai estimate:** each element of `U_unc` is rounded to the nearest
  integer and clipped to [−1, 1] (`x ≥ 0.5 → +1`, `x < −0.5 → −1`, else 0).
* **Educated guess:** the previous optimal sequence is shifted forward by one
  step (three elements), and its last step is repeated.

Both costs `||ū − V U||²` are evaluated in parallel. The smaller one, with its
sequence, starts the search; a tie goes to the Babai estimate. Latency: the
start edge registers the candidates, and the next edge registers the radii and
raises `done`.

## Unconstrained solution (`unc_solver.sv`)

One bank of 3N multiply-accumulate units works through the four products one
matrix column per cycle:

| Phase | Computes | Columns |
|---|---|---|
| 1 | `e = Γ x − I*` | 4 |
| 2 | `Θ = Υᵀ e − λu·[u(k−1); 0]` | 2N |
| 3 | `U_unc = −H⁻¹ Θ` | 3N |
| 4 | `ū = V U_unc` (lower triangle only) | 3N |

Phase 2 has no multiplier for its λu term, because `Sᵀ E u(k−1)` is just
`u(k−1)` in the first three rows. Each element keeps its sum at full width and
is truncated once, by an arithmetic right shift of 16 bits. `done` follows
`start` by 4 + 2N + 6N + 1 = 29 clock edges for N = 3.

## Timing of one control period

| Step | Clock cycles (N = 3) |
|---|---|
| Delay compensation | 1 |
| Wait for the reference block | external (≥ 1) |
| Unconstrained solution | 29 |
| Initial radius | 1 |
| Sphere decoder | 27 … 130 (one per node) |
| Hand-overs between the blocks inside the core | 3 |

The core (`fcs_mpc_core`) raises `done` `nodes + 33` edges after its start,
so at most 163 cycles. With the 100 MHz clock assumed here, that is under
1.7 µs of the 25 µs period. The measured figure is readable in the `EXEC`
register. If a period tick arrives while the previous period is still
running, for example because the reference block stalls, the tick is skipped
and counted in `OVERRUN`.

## Number formats

* All vectors and matrices: signed 32-bit Q16.16 (`data_t`).
* Squared distances: unsigned 64-bit with 16 fractional bits (`dist_t`). Each
  squared residual is truncated to 16 fractional bits before it is summed.
* Switch positions: 2-bit signed (`sw_t`). Tree pointers: 3-bit signed
  (`sp_t`).

There is no saturation. The host must scale the problem so that `H⁻¹`
entries, `ū` and the residuals stay within ±32768 and the squared distances
within 2^47. For the per-unit drive model in `tb_mpc_drive` the margins are
large.

## Interfaces

**Top-level ports of `mpc_top`:**

* `sample_tick`: one-cycle pulse at the start of each period. `x_obs`, the
  observer output x(k−1), is read in that cycle.
* `x_k`, `x_k_valid`: the delay-compensated state for the reference block.
  `x_k_valid` stays high until `iref_valid` is seen, and `iref` (2N words,
  α/β pairs for steps k+1 … k+N) is captured in that cycle.
* `u_abc`, `u_valid`: the new switch positions, held until the next period.
  `u_valid` pulses once per period.
* `nodes`, `optimal`, `use_edu`: statistics of the last search.

Reset is asynchronous and active low. After reset the stored sequence is all
zeros, and the loop stays stopped until the host sets the enable bit.

**Register map** (AXI4-Lite, 32-bit words, byte address = 4 × word):

| Word | Content |
|---|---|
| 0 … 268 | Coefficients, row-major, in this order: A (4×4) at 0, B (4×3) at 16, Γ (6×4) at 28, Υ (6×9) at 52, H⁻¹ (9×9) at 106, V (9×9) at 187, λu at 268 (offsets for N = 3; `mpc_pkg` computes them for any N) |
| 1020 CTRL | bit 0: commit request (reads 1 while pending); bit 1: loop enable |
| 1021 STATUS | [15:0] nodes of the last period, [16] optimality certificate, [17] educated guess chosen |
| 1022 EXEC | [15:0] last execution time in cycles (tick to result), [31:16] maximum |
| 1023 OVERRUN | number of skipped periods |

Writes go to a shadow bank. A commit copies it to the active bank in the first
cycle in which the loop is idle, so the matrices (for example after a change
of λu, or of the rotor speed) can be replaced while the drive runs without a
period ever seeing a mixture of old and new values.

## What follows the described controller, and what is this implementation's

These follow the described controller:

* the problem formulation;
* the search order and the pruning rule (≤);
* the sibling-distance table;
* the 130-node limit with fallback to the best solution found;
* the two initial guesses and the minimum of their radii;
* horizon N = 3, Ts = 25 µs;
* fixed-point arithmetic for the MPC core;
* the matrices computed by the host and loaded over AXI-Lite, updatable online;
* the three MPC blocks combined into one core that shares the matrices.

These are choices of this implementation:

* the word widths and the rounding;
* the 100 MHz clock;
* one node per clock cycle with single-cycle backtracking;
* the column-serial unconstrained solver;
* precomputing H⁻¹ on the host;
* all handshakes, the register map, the shadow/commit scheme and the timer
  and overrun logic;
* the tie rules.

The original design computes the delay compensation in floating point. Here it
uses the same Q16.16 arithmetic as the rest. The observer and the reference
generator are not part of this RTL.

The original controller was produced with high-level synthesis. Its reported
execution times (4–18 µs for the MPC core) depend on that tool's schedule, and
they are not a target of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/tb_mpc_util_pkg.sv` are written from the equations. They use the same
integer Q16.16 arithmetic, so results compare bit for bit. They do not use the
hardware's shortcuts: distances are recomputed from scratch, and sequences are
searched exhaustively over all 3⁹ candidates.

| Testbench | What it shows |
|---|---|
| `tb_sphere_decoder` | Node count, certificate and cost equal to the search model. Certified results equal the exhaustive optimum. Latency = nodes. Well-conditioned and skewed lattices; the node limit is reached (also with a limit of 40); the 27-node minimum occurs |
| `tb_init_radius` | Both radii, the choice, rounding at ±0.5, the shift of the educated guess, latency |
| `tb_unc_solver` | Bit-exact `U_unc`, `ū`; floating-point cross-check; upper triangle of V ignored; 29-cycle latency |
| `tb_delay_comp` | Bit-exact and floating-point agreement |
| `tb_ctrl_timer` | Tick spacing, execution time and its maximum, overruns |
| `tb_mpc_cfg_regs` | AXI-Lite in every address/data order with back-pressure, byte strobes, commit held off while busy, register map |
| `tb_fcs_mpc_core` | Consecutive periods with the stored sequence; both initial guesses used; latency nodes + 33 |
| `tb_mpc_top` | Whole loop at default parameters, 48 periods. Host loading, online update to a skewed lattice, reference stall causing an overrun, status registers. Every mechanism (certificate, node limit, improved leaf, each initial guess, commit, overrun) must occur |
| `tb_mpc_drive` | Closed loop on the per-unit model of the drive (Rs 0.049, Rr 0.052, Xm 2.44, Xls = Xlr 0.072, Vdc 1.8, 2870 rpm), matrices built in the testbench, for a large and a small switching weight. Bit-exact against the model in every period; certified results equal the exhaustive optimum; tracking; no overrun; the large weight always certified, the small one reaching the node limit; step response of the current within 1 ms |

To run one with plain Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
        rtl/mpc_pkg.sv tb/tb_mpc_util_pkg.sv tb/tb_mpc_top.sv \
        --top-module tb_mpc_top -o sim && ./obj_dir/sim

Replace `tb_mpc_top` with any other testbench name. Each runs in seconds
(`tb_mpc_drive` in about fifteen).

## Closed-loop results on the drive model

`tb_mpc_drive` runs 1600 periods (40 ms) per case. The first 400
periods are excluded from the error and switching figures:

| λu | Mean nodes | Max nodes | At the 27-node minimum | At the 130-node limit | Switching frequency per device | RMS current error (p.u.) |
|---|---|---|---|---|---|---|
| 0.1 | 28.5 | 69 | 87 % | 0 % | ≈ 210 Hz | 0.21 |
| 0.001 | 55.9 | 130 | 23 % | 3 % | ≈ 2.9 kHz | 0.017 |

A third run uses λu = 0.1 and steps the reference amplitude from 0 to 1 p.u.
and back. This is the current-loop side of a torque step. The current reaches
90 % of the new amplitude 12 periods (0.3 ms) after the step up. It falls
below 10 % 27 periods after the step down. At most 66 nodes are visited
around the steps.

The pattern is the expected one. With a large weight, the lattice is nearly
orthogonal: almost every period needs only the minimum of 9N nodes, and every
result is certified optimal. With a small weight, the lattice is skewed: the
search visits more nodes and sometimes ends at the node limit. Even then, the
worst case is 130 nodes, i.e. 163 core cycles.

## Limits and cautions

* The matrices in all testbenches except `tb_mpc_drive` are random, with
  structure imposed only where it matters (lower-triangular V, well- or
  ill-conditioned). They test the arithmetic and the search, not control
  quality.
* `tb_mpc_drive` uses an ideal machine model, feeds back the exact state in
  place of an observer, and uses a plain rotating current reference. The
  switching weights were chosen by hand. The RMS error includes the ripple
  and the start-up of the rotor flux; it is not a THD measurement.
* The one-node-per-cycle search has a long combinational path: the shared term
  over up to 3N−1 additions, a 40-bit squarer, the comparison and the
  backtracking cascade. At high clock rates it would need a pipeline stage, at
  the cost of two cycles per node.
* The horizon is a parameter (`N`), but the register map's fixed words
  (1020–1023) limit the coefficient bank to 1020 words, i.e. N ≤ 6.
