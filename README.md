# Pipeline interleaving in systolic arrays

A systolic array is a grid of identical processing elements (PEs), each
talking only to its neighbours. When a PE contains a loop, such as an
accumulator whose adder output is fed back to its own input, a new operand
can normally be accepted only once the previous sum has come back around the
loop. Cutting the adder and the wires into pipeline stages then does not help.
A faster clock only makes the loop longer in cycles, and the loop stays idle
for most of them.

This RTL applies **pipeline interleaving** to keep those loops busy. If the
loop takes `T_loop` cycles and a PE can take an input every `K` cycles, then
`N = T_loop / K` *independent* operations can circulate in the loop at the
same time. Each operation occupies its own time slot. The inputs are issued as
step 0 of operations 0..N-1, then step 1 of operations 0..N-1, and so on. When
`K` does not divide `T_loop`, `R = T_loop % K` stall cycles follow every set of
N inputs. Each set therefore starts exactly `T_loop` cycles after the previous
one, and every operand meets the partial result of its own operation at the
adder. The PE hardware does not change. Only a control bit travels with each
operand: it tells the adder whether to add the loop value or zero.

The design holds three arrays that demonstrate the technique side by side:

| array | class | what it computes | default size |
|---|---|---|---|
| `wils_array` (main design) | loop inside the PE, result stored in the PE | interleaved matrix products `C_m = A_m x B_m` | 128 x 128 PEs |
| `fdd_array` | loop inside the PE, result also passed to the neighbour | 1st, 2nd, 3rd ... derivatives of interleaved sampled functions | 5 cells |
| `woil_array` | no loop in the PE, result flows through the array | interleaved matrix products with exact operand synchronization | 16 x 16 PEs |

`sa_top` instantiates all three, each with its own ports.

## The interleaving schedule

`interleave_sched` generates the input slots. It has four parameters:
`T_LOOP`, the input spacing `K`, the number of operations actually used
(`OPS <= T_LOOP/K`), and the number of steps per operation (`STEPS`). For each
slot it outputs `op`, `step` and a tag:

- `valid`: the slot carries an input.
- `acc`: 0 on step 0, which makes the PE add to zero; 1 on later steps, which
  adds the value coming back around the loop.
- `last`: the final step.

Slot `(op, step)` is issued `step*T_LOOP + op*K` cycles after the first slot.
A run lasts `STEPS*T_LOOP` cycles. `stall` is high during the `R` idle cycles
of each set.

A small example, with timing `T_E = 3`, `T_FF = 3`, `T_FB = 10`:

- `T_loop = 13` and `K = 3`.
- Four operations are interleaved, with one stall cycle after each set of four.
- Inputs enter at cycles 0, 3, 6 and 9 (step 0) and at 13, 16, 19 and 22
  (step 1).
- The results of a 2x2 matrix product appear at cycles 19, 22, 25 and 28.

If the stall count is high, lengthen the feedback path instead. For example,
`T_FF = 20`, `T_FB = 6`, `K = 9` gives N = 2 with 8 stalls. With `T_FB = 7`
the same PE holds three operations and needs no stalls.

## WIL-S matrix multiplier (`wils_pe`, `wils_array`)

**PE data path.** Each PE works through these stages in order:

- **Multiply.** The PE multiplies `a` by `b`. This is the entry section: `T_E`
  cycles, with no loop.
- **Select.** A multiplexer controlled by the tag's `acc` bit picks either zero
  or the partial sum coming back from the feedback path.
- **Add.** The adder takes `T_FF` cycles. Its output goes two ways:
  - back through the `T_FB`-cycle feedback path;
  - out on the PE's `sum`/`sum_tag` line. A result is final when
    `sum_tag.last` is set.
- **Empty slots.** When a slot is empty (`valid = 0`), the loop value keeps
  circulating unchanged. A finished result therefore stays stored in the PE.

**Operand flow.** `a` (together with its tag) moves right and `b` moves down,
each through an `L`-stage shift register in every PE. PE `(i,j)` therefore
runs the common schedule `(i+j)*L` cycles after PE `(0,0)`: its Manhattan
distance times `L`. No PE needs any logic of its own for interleaving.

**End-to-end time.** A run of `p` input slots per PE ends after
`2(N-1)L + (p-1)K + T_cell` cycles, where `T_cell = T_E + T_FF`. For
interleave level `n`, `p = nN`. `tb_wils_workloads` checks this time.

**Defaults.** The defaults are the CMOS interleaved configuration:

- 16-bit signed operands and a 32-bit accumulator.
- Multiplier `T_E = 2`, adder `T_FF = 1`, `K = 2`, `L = 1`.
- Interleave level `n = 2`, which sets the feedback length `T_FB = n*K - T_FF = 3`.

Other technologies are only different numbers:

| configuration | T_E | T_FF | T_FB | K | L | n |
|---|---|---|---|---|---|---|
| CMOS, slow clock, no interleave | 1 | 1 | 1 | 2 | 1 | 1 |
| CMOS, fast clock, interleave n | 2 | 1 | 2n-1 | 2 | 1 | n |
| NML (nanomagnet logic) | 38 | 19 | 19 | 19 | 20 | 2 |
| NWFET (nanowire FET) | 68 | 33 | 33 | 34 | 20 | 1 |

In NML the multiplier is padded from 32 to 38 cycles to line up with the
adder. For NWFET, `T_loop = 66 < 2K`, so every set is followed by 32 stall
cycles.

**Top-level interface (`sa_top`, `mm_*` ports).**

- Pulse `mm_start`. The scheduler then issues `MM_OPS = (T_FF+T_FB)/K` products
  of `MM_N` steps each.
- For every slot, the top raises `mm_req_valid` with the product index
  (`mm_req_op`) and the step index (`mm_req_k`).
- The operand source must put column `k` of `A_m` on `mm_a_col` and row `k` of
  `B_m` on `mm_b_row` **in the same cycle**. The operand store itself is not
  part of this design.
- `skew_bank` instances delay row `i` by `i*L` cycles and column `j` by `j*L`
  cycles before the array edge.
- The element `c_ij` of product `m` appears on `mm_sum[i][j]` when
  `mm_sum_tag[i][j]` has `valid` and `last` set. This is
  `(i+j)*L + T_E + T_FF` cycles after the slot of its last step.
- `mm_stall`, `mm_busy` and `mm_done` show the scheduler's state.

## Finite-difference derivative array (`fdd_cell`, `fdd_array`)

**What each cell computes.** Each cell computes `(g(x+h) - g(x)) / h` for
`h = 1`, and repeats this to get successive derivatives:

- **Step 0 (`ctrl = 0`).** The cell takes the samples `f(x)` (`inup`) and
  `f(x+h)` (`inright`). The result is the first derivative.
- **Later steps (`ctrl = 1`).** The cell takes its own previous result from the
  feedback path (`T_FB` cycles) and the previous result of its right neighbour
  (`in0`), which arrives after the propagation path (`T_P` cycles). The result
  is the next-order derivative.

The subtractor and the multiplier by `1/h` take `T_SUB` and `T_MUL` cycles. The
result is truncated to `W` bits, with two's-complement wrap-around.

**Cell layout.** Cells are numbered from the right. Cell `c` works at point
`x = NC-1-c`. The rightmost cell receives the derivatives at the boundary point
`x = NC` from outside (`bnd`).

**Wavefront.** The two paths out of a cell have different lengths, so the cells
cannot all start together:

- When `T_P > T_FB`, each cell starts `T_P - T_FB` cycles after its right
  neighbour.
- Otherwise, each cell starts `T_FB - T_P` cycles before it.

`fdd_array` accepts all inputs on one schedule and delays each cell's inputs by
its offset through a `skew_bank`. The `ctrl`/`valid` pair is delayed with the
data, so it behaves as a control wave moving along the array.

**Defaults.** The defaults describe five cells with 5-bit data:

- `T_SUB = T_MUL = 3`, `T_FB = 7` and `T_P = 10`.
- This gives `T_loop = 13` and `K = 3`: four functions are interleaved, with one
  stall cycle per set.

**In `sa_top` (`fd_*` ports).**

- A second scheduler issues the slots.
- For each slot, the operand source supplies the samples `fd_samples[0..NC]` of
  function `fd_req_op`.
- For orders after the first, it also supplies the boundary derivative
  `fd_bnd` of order `fd_req_order`.

## WOIL multiplier with exact synchronization (`woil_pe`, `woil_array`)

**How the array computes.** Here the PE has no loop:

- Row `k` of the grid handles index `k` of the inner product.
- Partial sums `c_ij` flow down the columns. They take `D` cycles per PE:
  an adder plus registers, `D = n*K` for `n` interleaved products.
- `a_ik` flows right, `L` cycles per PE.

**How `b` is delivered.** The `b_kj` operands are not preloaded. Each column
has one shift-register chain, with `L` stages per PE. The feeder injects every
`b_kj` at the cycle that makes it pass PE `(k,j)` exactly when that PE needs
it. PE `(k,j)` computes its `i`-th operation at `k*D + j*L + i*K`, so `b_kj`
enters the chain at `k*D + i*K - k*L + j*L`.

**Collision rule.** Two values must never need the chain input in the same
cycle. This holds when `m*(D-L) != n*K` for all row distances `m` and slot
distances `n`; otherwise `K` must be increased. The testbenches pick the
smallest `K` that satisfies this rule.

**Defaults.** 16 x 16 PEs, `T_MUL = 2`, `T_ADD = 1`, `D = 10`, `L = 1`.
`sa_top` brings the array's edge ports (`wo_*`) out unchanged, because the
feeding schedule belongs to the operand source.

## Building blocks

- `delay_line`: `DEPTH` registers. Every multi-cycle unit and wire is modelled
  as combinational logic followed by a delay line of its cycle count. `DEPTH = 0`
  is a wire.
- `skew_bank`: one delay line per lane. Lane `i` is delayed by
  `OFFSET + i*STEP`, or in reverse lane order.
- `sa_pkg`: the slot tag type `op_tag_t` and the functions `n_interleave`,
  `n_stalls` and `t_fb_for` (`T_FB = n*K - T_FF`).

All registers clear on a synchronous, active-high `rst`.

## How far to trust it, and where it departs

- **Array size.** Throughput figures for this technique are usually quoted for
  a 1024 x 1024 array. The default WIL-S array here is 128 x 128. Tool run time
  and memory grow faster than the PE count:
  - Synthesis of 32 x 32 already takes six times as long as 16 x 16.
  - 128 is the largest power of two that a typical open-source flow finishes in
    about an hour.

  `ROWS`/`COLS` (and `MM_N` in `sa_top`) take any size.
- **Arithmetic.**
  - Matrix data is signed two's complement; the accumulator width is not
    checked for overflow.
  - The derivative cells wrap to `W` bits. With 5-bit data, a third derivative
    of 25 therefore reads as -7.
- **Timing model.** Units are ideal pipelines with no internal timing. Wire
  delays appear only as `L`, `T_FB` and `T_P` register stages.
- **Not built:**
  - the operand memories (only their request interface is given);
  - arrays whose loop closes over a whole line of PEs;
  - the multiphase clocking of QCA/NML/nanowire technologies, which the delay
    parameters stand in for.
- **Top-level choices.** The request/response timing of the operand ports, the
  tag encoding and the empty-slot behaviour are this design's own choices.

**Lint notes.**

- Verilator reports `clk`/`rst` unused in `delay_line` instances with
  `DEPTH = 0`.
- It reports the unused `last` bit of the derivative scheduler's tag in
  `sa_top`.

Both are explained in the files' header comments.

## Verification

Every testbench is self-checking. Each one computes its expected values
independently of the RTL, counts checks and failures, prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_delay_line`, `tb_skew_bank` | latency of every lane and depth, including zero |
| `tb_interleave_sched` | slot order, stall cycles and run length for the 13/3 example and the CMOS timing |
| `tb_wils_pe` | two back-to-back runs of four interleaved dot products with the 13/3 timing; `sum` timing and values |
| `tb_wils_array` | 4 x 4 array, two interleaved products, every result and its cycle |
| `tb_wils_workloads` | 8 x 8 array with every configuration in the table above; results, stall count and total time `2(N-1)L + (p-1)K + T_cell` |
| `tb_fdd_cell`, `tb_fdd_array` | single cell; five-cell array computing 1st-3rd derivatives of four interleaved sample sets, compared cycle by cycle |
| `tb_woil_pe`, `tb_woil_array` | PE timing; 3 x 3 array with two interleaved products, chain collision check |
| `tb_sa_top` | all three arrays: a 16 x 16 WIL-S array with two interleaved 16 x 16 products, the default 5-cell derivative array, and the WOIL array at its default 16 x 16 with two interleaved products; every PE output is checked in every cycle, and each mechanism is counted (interleaved slots, zero and loop selection, stalls, neighbour-fed derivative steps, chain deliveries); a mechanism that never happens counts as a failure |

The test scales with its parameters. At the default sizes (`MM_SIZE = 128`,
with `sa_top` instantiated without a parameter list) it also passes, with 31
million checks. However, Verilator turns the 16,384 PEs into about 400 C++
files: the build takes about 18 CPU-minutes, while the simulation itself takes
16 seconds. The test in `tb/` is therefore kept at 16 x 16 for the WIL-S
array. The derivative and WOIL arrays already run at their default sizes.

`wils_workload_run.sv` is a harness module used by `tb_wils_workloads`.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sa_pkg.sv tb/tb_sa_top.sv \
          --top-module tb_sa_top -o sim
./obj_dir/sim
```

For `tb_wils_workloads`, also pass `-ytb`. Add `-j 4` to build in parallel.
