# Barrier-free, cross-level scheduled pipeline for an irregular loop nest

This RTL implements a hardware pipeline for a two-level loop nest whose inner
trip count depends on the data. The example is the pull-style PageRank step on
a graph stored in compressed sparse row (CSR) form:

```
for i in 0 .. N-1:                      # outer loop, one node per iteration
    acc = 0
    for j in row_ptr[i] .. row_ptr[i+1]-1:   # inner loop, data-dependent length
        acc += contrib[col_idx[j]]      # loop-carried accumulation, 2-cycle adder
    score[i] = DAMPING * acc            # 3-cycle multiplier, then store
```

A conventional pipelined implementation has two problems:

1. **The task-boundary barrier.** The inner loop is pipelined, but a new outer
   iteration can start only after the inner pipeline has drained. Short rows
   leave the pipeline mostly empty.
2. **The loop-carried dependency.** `acc` depends on the previous inner
   iteration. With a 2-cycle adder, one iteration of a row can start only every
   2 cycles (initiation interval II = 2). Half of the issue slots stay empty even
   inside a long row.

This design removes both problems:

* **Barrier-free.** Inner iterations and outer iterations use the same
  pipeline. A new outer iteration (a new row) enters as soon as the previous
  one has *issued* its last inner iteration. It does not wait for those
  iterations to finish.
* **Cross-level interleaving.** Up to II rows are in flight together. Each row
  owns one *context slot*. The slots take turns issuing, one per cycle. Each
  row therefore issues every II cycles, which is exactly when its previous sum
  leaves the adder. The pipeline as a whole accepts one iteration per cycle.

The result for rows of equal length: with interleaving, 64 rows of 5 edges
finish in 396 cycles. Without it, they take 780 cycles. At the full size the
numbers are 9,228 cycles with interleaving and 18,444 without (1,024 nodes,
8,192 edges).

The gain grows with II. With single-precision data and a 7-cycle adder
(II = 7), a 400-row graph with 5,078 edges and skewed row lengths takes 5,551
cycles with interleaving. Without it, the same graph takes 38,360 cycles, a
speedup of 6.9. In fixed point at II = 2, the same graph takes 5,499 cycles
with interleaving and 10,967 without.

## Structure

```
 host load port ──► row_ptr  col_idx  contrib          score ──► host read port
                      │         │        │                ▲
  Stage 1 ────────────┘         │        │                │
  outer_ctx_gen: {i, s, e, 0}   │        │                │
        │                       │        │                │
        ▼ OC_Q (ctx_fifo)       │        │                │
  Stage 2  stage2_pipe ─────────┘────────┘                │
    loop_ctrl (MUX1 + loop control E, context slots)      │
    F: v = col_idx[j] ── G: c = contrib[v] ── H: lc_accum │
                         (MUX2, 2-cycle adder, DEMUX,     │
                          lc_status_buf)                  │
        │                                                 │
        ▼ IR_Q (ctx_fifo)  {i, acc}                       │
  Stage 3  outer_epilogue: I = acc * DAMPING (3 cycles), J: store score[i]
```

Stages 1 and 3 hold the outer-loop body (the row bounds before the inner loop,
and the scaling and store after it). The stages are joined by ready/valid
queues: OC_Q carries outer contexts, IR_Q carries finished rows. Stage 2 holds
all of the inner loop's work.

## Stage 2: how contexts share the pipeline

This is the part that takes the most explaining.

### Context slots and the round-robin pointer

`loop_ctrl` keeps II slots (II = 2 by default). Each slot holds one in-flight
row: its node index `i`, its next inner index `j` and its end `e`. A pointer
visits one slot per cycle, in turn. On a visit the unit does one of three
things:

| slot state                          | action                                                     | token bits            |
|-------------------------------------|------------------------------------------------------------|-----------------------|
| holds a row                         | issue that row's next iteration (inner rows always win)    | `fwd=1`               |
| free, index < MAX_CTX, OC_Q has a row | pop the row, issue its first iteration `j = s`           | `fwd=0`, `acc0` = 0   |
| free, no row offered                | bubble                                                     | `valid=0`             |

For every issued token the unit tests `j < e`:

* **True:** the token has `enable=1`. The slot keeps `j+1` for its next visit.
* **False:** the token has `enable=0` and `exit=1`, and the slot is freed.

A row with k edges therefore issues k + 1 tokens. The last one is an *exit
token*: it does no arithmetic and carries the final sum to the output. An empty
row (s = e) issues only its exit token.

A freed slot can take a new row on its very next visit. The pipeline never
drains between rows. This is the barrier-free property.

### Why forwarding needs no matching logic

A slot is visited exactly every II cycles, and the adder takes exactly II
cycles. So a row's next token reaches the adder input in the same cycle as that
row's previous sum leaves the adder output. The pipeline depth from `loop_ctrl`
to the adder is the same for every token, so this timing holds for every row.
Which slot a token belongs to tells you which value to forward. Addresses and
tags are not needed.

Token timeline for one slot, with II = 2 (cycle numbers are relative):

```
cycle   0        1        2        3        4        5        6
slot 0  issue j  F(j)     G(j)     H in ─── add ───► out
slot 0                    issue j+1 F(j+1)  G(j+1)   H in  ◄── forwarded here
slot 1           issue    F        G        H in ...          (the other row)
```

### Loop-carried context status buffer (`lc_status_buf`)

The buffer has one entry per slot: a valid bit and the row's running sum.
When a result leaves the adder, the demultiplexer (`lc_accum`) does one of two
things:

* For a continuing row, it writes the sum into the row's entry.
* For an exiting row, it sends `{i, acc}` to IR_Q and clears the entry.

The forwarding multiplexer reads the entry of the token entering the adder.
With the default `ADD_LAT = II`, the write and the read fall in the same
cycle, so the read bypasses the array. The entries and valid bits are kept
anyway. They give a validity check: a token with `fwd=1` must find its slot
valid, which `fwd_err` and an assertion watch. They also hold the sum when
the adder is faster than II (`ADD_LAT < II`), until the slot comes round. The first token
of a row has `fwd=0` and uses the row's own initial value `acc0`, never a value
left over from the slot's previous row.

### Backpressure

An exit token can reach the adder output while IR_Q is full. In that case
`adv` goes low and the whole of Stage 2 holds for the cycle: the control unit,
the token registers, the load outputs, the adder pipeline and the buffer
writes. Because everything holds together, the fixed II spacing between a
slot's tokens is preserved. In this top, Stage 3 takes a result every cycle,
so IR_Q never fills. The stall path is exercised by the Stage 2 testbench.

Stage 1 is throttled by credit. It starts a row-bound load only when OC_Q's
occupancy plus the load already in flight leaves room, so its pushes are
never refused.

### MAX_CTX

`MAX_CTX` limits which slots may accept new rows. At its default (= II), all
slots interleave. With `MAX_CTX = 1`, only one row is in flight. That is the
barrier-free pipeline without cross-level interleaving: it is still free of the
barrier, but issues one token every II cycles.

## Top-level interface (`selene_pr_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, active-low synchronous reset |
| `host_we`, `host_sel`, `host_addr`, `host_wdata` | in | 1, 2, 16, 32 | array load while idle: `sel` 0 = row_ptr, 1 = col_idx, 2 = contrib |
| `start`, `num_nodes` | in | 1, 16 | one-cycle start pulse and N |
| `done` | out | 1 | rises when all N scores are stored; stays high until the next start |
| `run_cycles` | out | 32 | cycles from start to done of the last run |
| `host_raddr`, `host_rdata` | in, out | 16, 32 | score read-back, 1-cycle latency |
| `fwd_err` | out | 1 | forwarding validity violation (never expected) |
| `events` | out | 6 | one-cycle strobes: {Stage 1 held by full OC_Q, >1 row in flight, Stage 2 stall, bubble, inner dispatch, outer dispatch} |

Data are unsigned Q16.16, or IEEE single precision with `FLOAT = 1`. `row_ptr` must be non-decreasing, with
`row_ptr[N] <= E_MAX`. Every `col_idx` entry must be below `N_MAX`.

Latency: the first row reaches Stage 2 three cycles after `start`. A token
leaves the adder 5 cycles after the control unit selects it. Stage 3 adds 1 cycle in IR_Q
and 3 cycles in the multiplier. The fixed fill-and-drain overhead is about 12
cycles per run.

## Parameters

| parameter | default | where it comes from |
|-----------|---------|---------------------|
| `II` (`loop_ctrl`, `lc_accum`, `stage2_pipe`, top) | 2 | the 2-cycle loop-carried adder of the example |
| `MAX_CTX` | II | the in-flight bound equals II |
| adder latency `ADD_LAT` (`lc_accum`, `stage2_pipe`, top) | II | 1 to II (checked by assertion); below II a sum waits in the status buffer for its slot |
| multiplier latency `MUL_LAT` | 3 | the example's multiply latency |
| `DAMPING` | 55706 (0.85 in Q16.16) | this design's choice |
| `N_MAX`, `E_MAX` | 1024, 8192 | this design's choice |
| `OCQ_DEPTH`, `IRQ_DEPTH` | 4, 4 | this design's choice |
| `FLOAT` (top, `stage2_pipe`, `lc_accum`, `outer_epilogue`, `pipe_fu`) | 0 | this design's choice: 1 switches the adder and multiplier to single precision |
| widths (`selene_pkg`) | 16-bit node and edge indices, 32-bit data | this design's choice |

## Files

| file | content |
|------|---------|
| `rtl/selene_pkg.sv` | widths and the context, token and result structs |
| `rtl/selene_pr_top.sv` | top: arrays, the three stages, the two queues, run control |
| `rtl/outer_ctx_gen.sv` | Stage 1 |
| `rtl/ctx_fifo.sv` | ready/valid context queue (OC_Q, IR_Q) |
| `rtl/stage2_pipe.sv` | Stage 2: control unit, F and G loads, H |
| `rtl/loop_ctrl.sv` | context selector and loop control with the slot table |
| `rtl/lc_accum.sv` | forwarding mux, adder, result demux |
| `rtl/lc_status_buf.sv` | loop-carried context status buffer |
| `rtl/pipe_fu.sv` | pipelined adder / multiplier with an operation enable, fixed point or single precision |
| `rtl/fp32_pkg.sv` | single-precision add and multiply functions used by `pipe_fu` |
| `rtl/outer_epilogue.sv` | Stage 3 |
| `rtl/sync_ram.sv` | on-chip array with one write port and N synchronous read ports |
| `tb/tb_<module>.sv` | one self-checking testbench per module (`tb_loop_ctrl_run.sv` and `tb_lc_accum_run.sv` are helpers) |
| `tb/tb_selene_pr_float.sv` | the top in single precision at II = 7 |
| `tb/tb_selene_pr_ablation.sv` | with and without interleaving, side by side |
| `tb/tb_fp_ref.sv` | conversions between single-precision bit patterns and reals, for the references |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. To run one:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_selene_pr_top \
    -y rtl -y tb -Irtl rtl/selene_pkg.sv rtl/fp32_pkg.sv tb/tb_fp_ref.sv \
    tb/tb_selene_pr_top.sv -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. The testbenches use `$urandom`
only, so the simulator needs no constraint solver.

What each testbench checks:

* `tb_selene_pr_top`: the top at its default sizes. It runs a 24-node graph,
  then a 1,024-node graph with all 8,192 edges and skewed row lengths, then
  64 uniform rows. Every score is compared with a reference computed in the
  testbench. It checks that the uniform run takes 384 issue cycles plus fill,
  and that every event occurs: dispatches, bubbles, two rows in flight, Stage 1
  held back, empty rows.
* `tb_selene_pr_float`: the top with `FLOAT = 1` and `II = 7`, so seven rows
  share the pipeline. Scores must match, bit for bit, a reference that adds
  each row in edge order with single-precision rounding after every step.
  A run of 64 uniform rows must take 384 issue cycles plus fill and drain.
  The drain is about 42 cycles at this II: the last row's tokens issue once
  per round of seven slots.
* `tb_selene_pr_ablation`: four copies of the top on one skewed graph. It
  runs II = 2 in fixed point and II = 7 in single precision, each with and
  without interleaving (`MAX_CTX = II` and `MAX_CTX = 1`). It checks every
  score of every copy. A copy without interleaving must need at least
  II × tokens cycles. A copy with interleaving must stay within tokens + 10 %
  plus a short drain.
* `tb_stage2_pipe`: Stage 2 under random backpressure. It checks that no result
  is dropped under stall, and that uniform rows are dispatched with no bubble,
  one token per cycle.
* `tb_loop_ctrl`: checks every issued token against an independent model of
  the slot rules. It runs at II = 2 and at II = 3 with MAX_CTX = 1.
* `tb_lc_accum`: the forwarding multiplexer, adder and status buffer at
  II / adder latency = 2/2 (every value bypasses the buffer), 3/2 and 4/1
  (values wait in it).
* `tb_lc_status_buf`, `tb_pipe_fu`, `tb_ctx_fifo`,
  `tb_sync_ram`, `tb_outer_ctx_gen`, `tb_outer_epilogue`: the building blocks,
  each against a model, including latencies. `tb_pipe_fu` also checks the
  single-precision adder and multiplier against rounded double-precision
  results.

## How far it can be trusted, and where it departs from the architecture

What follows the architecture:

* the three-stage split;
* the outer and inner context paths;
* the context multiplexer with inner priority;
* the enable/exit/forward control bits, with the exit token carrying the
  result;
* at most II rows in flight;
* round-robin slot visits;
* the loop-carried status buffer with its valid bits;
* a new row admitted as soon as a slot frees;
* the example's latencies (loads 1 cycle, add 2, multiply 3).

Choices made here:

* **Number format.** The default is fixed-point Q16.16, which keeps the
  example's 2-cycle adder. The original benchmark uses floating point, and
  `FLOAT = 1` provides it. That mode uses a single-precision adder and
  multiplier of this design's own. They round to nearest even, flush
  subnormals to zero, and do not handle NaN. The adder latency, and so II,
  must then be set to match; the float testbench uses 7. The operator computes
  in one stage and delays the result, so a real floating-point unit of that
  latency would have to be pipelined for timing. Simulated II values are 2,
  3, 4 and 7.
* **Inner context queue.** It is a set of per-slot registers instead of a
  FIFO. The round-robin discipline guarantees it holds exactly one entry per
  slot.
* **Queues inside Stage 2.** These are pipeline registers that stall together,
  not queues.
* **Node index in the context.** The node index `i` travels with each context,
  because rows of different lengths finish out of order. Stage 3 stores each
  result by its own `i`.
* **Loop test.** The loop test is `j < e`, as in the source loop.
* **Host interface, sizes and observation outputs.** The host port, the array
  sizes, the queue depths, `DAMPING`, `events` and `run_cycles` are this
  design's own.

Limitations:

* The RTL implements this one kernel. The other irregular kernels that the same
  method applies to (SpMV, graph traversals, hashing and so on) would each need
  their own stage bodies. The control unit, status buffer and queues are
  generic and could be reused.
* Only two-level loop nests are handled. Dependencies from the inner loop back
  into the outer loop are not supported.
* The example's reference schedule (three rows finishing in 21 cycles) has not
  been matched cycle by cycle, because its inner trip counts are not known. The uniform-row test checks the
  same property instead: one issued iteration per cycle once rows interleave.
