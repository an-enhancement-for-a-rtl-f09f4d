# Two-cycle instruction scheduler with early wakeup through a second matrix

Out-of-order cores often split the scheduler into two stages, wakeup and
select, so that the cycle time can be short. The cost is that the loop from
"instruction selected" to "its consumers woken" to "consumer selected" now
takes two cycles. A consumer of a one-cycle ALU operation can no longer issue
in the cycle right after its producer. A dependence chain of adds therefore
issues at half rate.

This RTL implements a non-speculative fix for that loss. A second wakeup
matrix, **matrix B**, works out one cycle early which instructions the
*currently competing* one-cycle instructions will wake. Those pre-woken
instructions may compete for selection as soon as all of those one-cycle
candidates have actually been selected. A **zero-detection logic (ZDL)**
detects that condition. Nothing is issued before its operands are
guaranteed, so there is no replay. An optional **instruction fusing** mode
(E-F) lets a consumer whose only pending operand comes from a one-cycle
producer compete as soon as that producer is granted.

The top module is `enhanced_scheduler`: a 32-entry integer issue queue with
4-wide dispatch and 4-wide issue, two memory ports and one non-pipelined
multiplier.

## The scheduling loop, cycle by cycle

For one entry, the baseline two-cycle loop runs like this:

| cycle | what happens |
|-------|--------------|
| t     | the producer is at the select input and is granted |
| t+1   | its wakeup line fires in matrix A; the consumer's row becomes ready and its request is registered by logic M |
| t+2   | the consumer is at the select input and can be granted |

With the enhancement, a consumer that waits for a one-cycle producer also has
a row in matrix B. Matrix B receives the producer's line already in cycle t,
while the producer is still only competing. If the ZDL is active at the end
of cycle t, logic M registers the matrix-B request. The consumer then
competes in t+1: the two instructions issue back-to-back.

Longer producers (load, 3 cycles; multiply, 10 cycles) raise their wakeup
line `L-1` cycles after selection, in both matrices at once. Their consumer is
then selected exactly `L` cycles after them. For these producers the
two-cycle loop never costs anything.

## The parts

All vectors below have one bit per issue-queue entry. Entry *i* owns row *i*
and column *i* of each matrix.

### Wakeup matrices A and B (`wakeup_matrix`)

Each row holds one dependence bit per column. When a column's line fires,
every row clears that bit. A valid row with no bit left, counting this
cycle's lines, raises its request. Clearing the bits instead of holding the
lines means a column may be reused as soon as its line has fired once.

- **Matrix A** holds every instruction. Its lines are `wake_a`, driven by
  the per-entry result timers (described below).
- **Matrix B** holds only instructions that wait for at least one one-cycle
  producer still in the queue. It does not hold fused consumers. A row in B
  holds the same dependence bits as in A, except bits whose B line has
  already fired.

### The filter (`req_filter`)

This is the source of matrix B's lines. Two signals feed it:

- **C** is the request an entry presents at the select input.
- **D** is the entry's matrix-A line.

Per entry, the filter passes C if the instruction is short-latency (shorter
than the two-cycle loop) and D otherwise. So a one-cycle producer wakes its
consumers in B while it competes. A long producer wakes them in B at the same
time as in A.

### Zero-detection logic (`zero_detect`)

The ZDL output is high when every short-latency request at the select input
in this cycle was granted. A matrix-B row may have been woken by a one-cycle
producer that was not selected after all, or is still waiting. If so, that
producer is still requesting, so the ZDL stays low and the B request is held
back. This is what keeps the scheme non-speculative.

One consequence is that the select order is not strictly oldest-first. An
instruction woken from B waits until all competing one-cycle instructions
are selected, including younger ones.

### Logic M and the issued bits (`logic_m`)

Per entry, logic M registers `request_A | (request_B & zdl)`. The registered
value, ANDed with the inverted issued bit, is the request the select logic
sees. A grant sets the issued bit.

An instruction woken through B is usually selected before matrix A also wakes
it. The issued bit then drops that late second request. A request from
matrix A stays high after selection until the entry is released, and the
issued bit masks it throughout. Allocating an entry clears both flip-flops.

### Select logic (`select_logic`, `age_matrix`)

The select logic runs W cascaded oldest-first pickers over an age matrix
(`older[i][j]`: entry j is older than entry i). Slot k takes the oldest
request not taken by slots 0..k-1 whose resource is still free:

- at most `MEM_PORTS` loads and store-address operations per cycle;
- a multiply only if the single multiplier is idle and no earlier slot took
  it.

The age matrix loads a new entry's row with all occupied entries. It also
marks lower-numbered entries allocated in the same cycle as older, because
dispatch fills free entries lowest index first, in program order.

### Instruction fusing (`fusion_detect`, enabled by `FUSION`)

At dispatch, an instruction is fused with its producer when all of these
hold:

- it waits for exactly one operand;
- that operand's producer is a one-cycle instruction that is in the queue and
  not yet selected;
- both carry the same basic-block tag;
- the producer has no fused consumer yet (only the first consumer in program
  order is fused).

A producer dispatched in the same cycle is not a candidate.

A fused consumer still takes its own entry and its own issue slot. It is not
written into matrix B. Instead, a per-entry flag is set by the producer's
grant, and that flag is ORed into request_A. The consumer therefore competes
in the cycle after its producer's grant, without waiting for the ZDL.

### Entry state and result timers (inside `enhanced_scheduler`)

Each entry stores:

- its class: short-latency, memory, multiply, store-address;
- its basic-block tag;
- its wakeup delay, `max(1, L-1)`;
- a countdown started by its grant. `wake_a[i]` is high when the countdown
  reaches 1.

The entry is released in that cycle. A multiply busies the multiplier for
`LAT_MUL` cycles.

## Interface of `enhanced_scheduler`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset empties the queue |
| `alloc_ok[k]`, `alloc_idx[k]` | out | DW, DW×log2 N | dispatch slot k would take entry `alloc_idx[k]` (lowest free first); valid if `alloc_ok[k]` |
| `disp_valid[k]` | in | DW | slot k dispatches; allowed only with `alloc_ok[k]` (asserted) |
| `disp_op[k]` | in | DW × `op_e` | `OP_ALU`, `OP_LOAD`, `OP_STA`, `OP_STD`, `OP_MUL` |
| `disp_dep[k]` | in | DW×N | entries of the producers still awaited |
| `disp_bb[k]` | in | DW×BBW | dynamic basic-block tag (for fusing) |
| `issue_valid[k]`, `issue_idx[k]` | out | W, W×log2 N | instructions selected this cycle, oldest in slot 0 |
| `wake_a` | out | N | matrix-A wakeup line per entry; the entry is free from the next cycle |
| `zdl` | out | 1 | zero-detection output |

The dispatcher plays the role of rename. It must know, for each source
operand, the entry of its producer. It names a producer in `disp_dep` only
while that producer's `wake_a` has not fired in an earlier cycle. A line that
fires in the dispatch cycle itself is handled inside. A consumer may name a
producer dispatched in an earlier slot of the same cycle, using that slot's
`alloc_idx`. Operands that are already available are simply left out. Stores
are dispatched as two operations, STA and STD. The scheduler itself makes each
load wait for every older STA still in the queue, so no load is issued before
the address of an older store is known.

Timing: a row written in cycle t can wake in t+1 at the earliest and be
selected in t+2.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 32 | issue-queue entries (integer queue of the evaluated machine) |
| `W` | 4 | issue slots per cycle |
| `DW` | 4 | dispatch slots per cycle |
| `MEM_PORTS` | 2 | memory operations issued per cycle |
| `BBW` | 8 | width of the basic-block tag |
| `FUSION` | 1 | 1: base enhancement plus fusing (E-F); 0: base enhancement (E) |

Latencies and the loop length are in `sched_pkg`: `SCHED_LOOP_LAT` = 2,
`LAT_ALU` = 1, `LAT_LOAD` = 3, `LAT_MUL` = 10. An operation is "short" when
its latency is below `SCHED_LOOP_LAT`.

At the defaults, synthesis gives about 3,300 word-level cells and 4,100
flip-flops. Most of the flip-flops are the two 32×32 dependence matrices and
the 32×32 age matrix.

## How far it follows the original scheme, and what was chosen here

These parts follow the published scheme:

- the two matrices and what each stores;
- the filter's C/D rule and the ZDL condition;
- logic M with its issued bits;
- oldest-first selection;
- the latency classes and latencies;
- the fusing conditions;
- loads depending on all older store-address operations;
- the timing of wakeup lines.

The worked six-instruction example of the scheme is reproduced cycle for
cycle (see below).

The following were not specified and are this design's choices:

- entry allocation (lowest free first) and release (when the matrix-A line
  fires);
- the age matrix as the form of priority information;
- the resource model: any slot takes ALU, STD and multiply; loads and STAs
  share `MEM_PORTS`; one 10-cycle multiplier;
- the basic-block tag and its width;
- how a fused consumer's request enters logic M;
- clearing logic M's state on allocation;
- the synchronous reset.

Not implemented:

- **Variable load latency.** Loads are scheduled with the fixed hit latency.
  A cache miss would need a recovery mechanism that was not described.
- **Power gating.** Empty entries and the mirror row of an instruction
  already seen by logic M could be switched off to save energy. This is a
  power measure, not a change in function, and is left out.
- **The rest of the processor**: front end, payload RAM, register file,
  execution units, ROB/LSQ, caches, branch predictor and the floating-point
  issue queue. The scheme applies only to the integer queue.

## Verification

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it shows |
|-----------|---------------|
| `tb_fig6_example` | The six-instruction example with one issue slot: load r1; load r2; add r3←r1; load r4←[r3]; add r5←r1,r2; add r6←r4,r5. They are selected in cycles 2, 3, 5, 6, 7 and 9. The load r4 is woken in matrix B in cycle 5, back-to-back with the add r3. Without matrix B it would go in cycle 7. Also checked: the ZDL in cycle 5, the wakeup of r6 in both matrices in cycle 8, each instruction selected once, and the same schedule with fusing, where the load r4 is fused instead of placed in B. |
| `tb_dependence_chain` | Chains at full size, with and without fusing: 16 dependent ALU operations issue one per cycle; dependent loads issue 3 cycles apart; dependent multiplies 10 cycles apart. |
| `tb_enhanced_scheduler` | End to end at the default parameters, with 3,000 random instructions (ALU, loads, STA/STD pairs, multiplies, basic blocks). Details below. |
| `tb_wakeup_matrix`, `tb_select_logic`, `tb_age_matrix`, `tb_req_filter`, `tb_zero_detect`, `tb_logic_m`, `tb_fusion_detect` | Each unit against an independent reference model, with random and directed stimulus. |

`tb_enhanced_scheduler` checks that:

- no instruction is selected before every parent's result is usable;
- every instruction is selected exactly once and released;
- no load is selected before all older STAs;
- memory-port and multiplier limits hold;
- wakeup lines fire after `max(1, L-1)` cycles;
- nothing starves.

It also requires each of these mechanisms to happen at least once:
back-to-back issue through matrix B, a back-to-back fused pair, a B request
held by the ZDL, a request dropped by an issued bit, the memory-port limit,
the busy multiplier, dispatch stalled by a full queue, and a load dispatched
behind a pending STA.

What the tests do not show: the IPC they print comes from a synthetic
instruction stream. It is not a measure of performance on real programs.

## Simulating

Any testbench builds with plain Verilator 5 from the repository root. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sched_pkg.sv \
    tb/tb_enhanced_scheduler.sv --top-module tb_enhanced_scheduler -o sim
./obj_dir/sim
```

Modules are found through `-Irtl`, one module per file. The package
`rtl/sched_pkg.sv` must come first. Every run takes well under a second once
built.
