# Interlocked synchronous pipelines

A synchronous pipeline usually stalls globally: one stall signal reaches every
stage in the same cycle, so it needs a long wire on the critical path, and
every stage switches on or off at once. Asynchronous pipelines avoid this.
Each stage makes its own decision from a request from upstream and an
acknowledge from downstream. This RTL gives the same stage-level interlocking
to an ordinary clocked pipeline by using local clock gating and two bits per
stage:

* a **valid** bit travels forward with the data. When the item entering a
  stage is not valid, the stage's data latches are not clocked. No computation
  is done and no power is spent on a hole.
* a **stall** bit travels backward, one stage per clock edge. A stalled stage
  keeps its latches closed and holds its item. The stall bit is ANDed with
  the valid bit, so a stall stops as soon as it meets a hole and only
  reaches the input once the pipeline is full.

No stall signal spans more than one stage. A stall therefore builds up and
clears stage by stage, not in a single cycle.

The library has three parts:

* the linear pipelines: elastic (stall only), interlocked (valid and stall),
  and the one-phase master-slave form of the interlocked one;
* the templates that join such pipelines into graphs: aligned and non-aligned
  fork, branch, join and priority select;
* a multicycle ring built from a select and a branch.

`isp_top` connects all of them into one small system.

## Why a stall needs no extra buffers: the two-phase view

In a two-phase latch pipeline, neighbouring stages are never transparent at
the same time. Odd stages close on the rising edge of `gclk` and even stages
on the falling edge. Data therefore moves one stage per clock edge, and a
freely flowing pipeline of N stages holds only N/2 live items. The other half
of the latches hold stale copies, which are bubbles.

The elastic pipeline uses those bubbles as buffer space. Each stage has a
stall latch that is clocked on the edge opposite to its data latch and is
never gated. The stall latch's output gates the stage's data latch. When the
sink raises `stall`, the last stage closes at its next edge. Its stall latch
hands the stall to the stage in front of it one edge later, and so on. For N
edges the input keeps delivering items; in a two-phase pipeline that is N/2
items. These items land in the bubbles, so after N edges the pipeline holds N
distinct items and nothing has been overwritten. Releasing the stall works in
reverse: stages reopen one edge at a time, which recreates the bubbles.

The interlocked pipeline adds the valid bit, with three rules:

1. A stage's valid register is clocked whenever the stage is not stalled, so
   a hole is created in place: the valid bit turns 0, and the stale data is
   left untouched.
2. The stage's data register is clocked only when the stage is not stalled
   **and** the incoming item is valid.
3. The stall bit a stage receives is `valid(this stage) AND stall(next
   stage)`. A stage that holds a hole lets the item behind it move into the
   hole instead of passing the stall on.

## How the latches are modelled

The RTL uses no latches and no gated clocks. Each latch array is a register
(`isp_reg`) that loads on the edge at which the latch becomes opaque. Each
local clock gate is that register's enable. The value a latch holds while
opaque is then exactly the value in the register, and the registers see the
same sequence of values, edge by edge, as the latch circuit. Two things are
lost:

* the value a transparent latch passes through before it closes;
* the analog timing and hazard constraints on the gate inputs.

A synthesis tool maps the enabled registers to integrated clock-gating cells.
To get real latches, replace `isp_reg` with a latch plus a gate.

Register placement:

| register | loads on | gated by |
|---|---|---|
| data of an odd stage (1, 3, ...) | rising edge | stall register of the stage, and incoming valid |
| valid of an odd stage | rising edge | stall register of the stage |
| stall of an odd stage | falling edge | never |
| even stages | the opposite edges | the same |

`isp_pkg::edge_e` (`EDGE_RISE`, `EDGE_FALL`) selects the edge. Every module
that holds stages takes the edge of its first stage as a parameter, so
modules can be chained as long as neighbours alternate.

## Handshake at every boundary

An item moves from stage U to stage D at D's edge if U's valid is 1 and D's
stall register is 0. D's stall register changes only on U's edge, so it is
stable for the whole half cycle before D's edge. Pipeline modules present this
as:

* `in_data`, `in_valid` → and ← `in_stall`, where `in_stall` is a register
  output. The source must keep its item while `in_valid && in_stall`.
* `out_data`, `out_valid` → and ← `out_stall`. The sink takes the item at the
  edge opposite to the last stage's edge when `out_stall` is 0 there.
  `out_stall` is sampled at that same edge.

The templates work one level lower. They take the valid bits of the upstream
stages and the stall registers of the downstream stages. They return the
valid inputs of the downstream stages and the stall-register **inputs**
(`stall_up_d`) of the upstream stages. Every template includes the upstream
valid in that stall input, so a stage can only be stalled while it holds
valid data. `isp_stage` asserts this.

A pipeline module's `out_stall` can be connected straight to a template's
`stall_up_d`. The module forms `v AND out_stall` internally, and
`stall_up_d` already contains `v`.

## Modules

| module | what it is |
|---|---|
| `isp_pkg` | `edge_e` and `other_edge()` |
| `isp_reg` | enabled register on a chosen edge, with asynchronous reset (one latch array and its clock gate) |
| `isp_stage` | one interlocked stage: data, valid and stall registers |
| `isp_pipeline` | N-stage two-phase interlocked pipeline, with a `local_stall` input for the last stage |
| `esp_pipeline` | N-stage two-phase elastic pipeline (stall only, no valid bits) |
| `latch_pair` | two stages on opposite edges with external gates `gate1` and `gate2`; the basic two-item storage trick |
| `isp_ms_pipeline` | one-phase pipeline of NS master-slave segments, each master and slave with its own valid and stall |
| `isp_fork` | aligned 1-to-N fork |
| `isp_fork_nonaligned` | 1-to-N fork that delivers each copy as soon as its destination is free |
| `isp_branch` | 1 to 1-of-N branch controlled by a one-hot `enable` |
| `isp_join` | N-to-1 join that concatenates the data words |
| `isp_select` | 1-of-N to 1 select with fixed priority (highest index wins) |
| `isp_ring` | multicycle ring with out-of-order completion |
| `isp_top` | demonstration system (see below) |

### Template functions

In the formulas below, `stall[i]` on the right-hand side is a downstream stall
register. On the left-hand side it is the input of an upstream stall register.

* aligned fork: `stall = valid & |stall[i]`, `valid[i] = valid & ~|stall[i]`.
  All copies leave on the same edge, so no destination can receive a
  duplicate.
* branch: `valid[i] = valid & enable[i]`,
  `stall = |(valid[i] & stall[i])`. Only the selected destination can stall
  the source.
* join: `valid = &valid[i]`, `stall[i] = valid[i] & (~valid | stall)`.
* select: `valid = |valid[i]`,
  `stall[i] = valid[i] & (stall | valid[j] for any j > i)`. The data comes
  from the highest-index valid input, so the select is also an arbiter.
* non-aligned fork: this is a state machine. One `done` bit per destination
  records which copies have been delivered, and
  `valid[i] = valid & ~done[i]`. The source stays stalled until every copy
  has gone; then `done` is cleared. The `done` register loads on the
  destinations' edge.

### The multicycle ring (`isp_ring`)

The ring is the hardest module to reason about. It consists of:

* an input stage and a feedback stage feeding a priority select, in which
  the feedback stage wins;
* K ring stages, the last of which is a branch stage;
* an output stage.

Several items circulate at once, and each leaves when its own computation
finishes, so items can complete out of order. A new item enters only on an
edge at which nothing returns from the feedback stage. K must be odd: the
loop of K ring stages plus the feedback stage must alternate edges.

The document leaves the computation in the ring open, so this design uses an
iteration count. A word is `{count[CNT_W], payload}`. At the branch stage, a
word with count 0 leaves the ring. Any other word goes back, and the logic in
front of the feedback stage decrements the count and increments the payload.
A word entering with count c therefore leaves after c+1 passes with payload +
c. Alone in the ring, each extra pass costs (K+1)/2 cycles.

**Known hazard.** A ring can be completely full, with every stage holding a
word that still needs another pass. Such a ring cannot move, because every
stage waits for the next. It can only fill completely after a long output
stall has compacted it and a new word has taken the last bubble. Short output
stalls (the tests use single-cycle stalls at up to 8 % of cycles) never caused
it. Any user that can stall the output for long while words circulate must
limit how many words it lets into the ring.

## The demonstration system (`isp_top`)

```
in -> isp_pipeline (4 stages, local stall)
   -> isp_fork (aligned) --+-> A: isp_ms_pipeline (2 segments) ------------------+
                           +-> B: stage -> isp_branch -> isp_ring (count != 0) --+ |
                                                   \-> isp_pipeline (3)  -> isp_select -> isp_pipeline (2)
   -> isp_join {B, A} -> stage -> isp_fork_nonaligned -> out0 stage, out1 stage
```

* Path A carries each word unchanged and in order.
* Path B computes `payload + count`, possibly out of order. The ring has
  priority at the select.
* The join pairs the i-th word to arrive on A with the i-th result to arrive
  on B.
* Both consumers receive every joined word. Each consumer has its own stall.

The elastic pipeline (`esp_*` ports) and the latch pair (`lp_*` ports) sit
beside the system with their own ports, because neither uses valid bits.

Timing of the ports:

* `in_*` is taken on the rising edge.
* `out0_*` and `out1_*` change on the falling edge and are taken on the next
  rising edge when their stall is 0.
* `esp_in_data` is taken on the rising edge unless `esp_in_stall` is 1.
  `esp_out_data` is taken on the rising edge unless `esp_out_stall` is 1.

Default parameters: `W = 8`, `CNT_W = 3`, `N_ISP = 4`, `NS_MS = 2`,
`RING_K = 3`, `N_DIRECT = 3`, `ESP_N = 4`. After coarse synthesis the system
has about 300 flip-flop bits.

## What follows the source and what is this design's own

Taken from the source:

* the stage structure, including which registers are gated by what and the
  opposite-edge stall registers;
* the valid-qualified stall chain;
* the OR of local and downstream stall in the last stage;
* the template functions of the fork, branch, join and select;
* the ring's structure and feedback priority;
* the sizes of 4 stages and 2-way templates.

Two stall traces are reproduced exactly on 4-stage pipelines, with every
stored value checked edge by edge (`tb_paper_traces`):

* the elastic trace: a stall raised for two rising edges compacts items A to D
  into the four stages and then releases them;
* the interlocked trace: the stream A, hole, B, hole, C, D, E with a two-cycle
  output stall. Stage 4 stalls for 2 cycles, stage 3 for 1, and stages 2 and
  1 and the source never stall.

This design's own choices:

* Registers with enables stand in for latches with gated clocks (see above).
  The hazard-freedom and timing constraints on the gate inputs are circuit
  matters, and this RTL does not model them.
* The combinational logic between stages is unspecified in the source, so it
  is left empty. Data passes unchanged, except in the ring.
* The ring's datapath: an iteration count, decrement, and a payload
  increment.
* The non-aligned fork's state machine. Only its purpose was given.
* While `local_stall` is 1, `isp_pipeline` masks `out_valid`, so an item held
  by a local stall is not offered downstream.
* The one-phase master-slave pipeline taps the master's gating valid before
  the master register. In the circuit, the valid is taken after the master
  latch to keep the gate glitch-free; that has no effect at register level.
* Widths (8-bit data, 3-bit count), asynchronous active-low reset, the
  0-based template indices, and the join's concatenation order (input 0 in
  the low bits).
* The composition of `isp_top`. The source gives primitives, not a system.

Not included:

* Scan support for testing stalled pipelines. It relies on standard LSSD scan
  latches and a test procedure, not on extra logic.
* A select with state-based arbitration, such as round-robin. Only the
  fixed-priority select is built.

## Simulating

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/isp_pkg.sv tb/tb_isp_top.sv \
          --top-module tb_isp_top
./obj_dir/Vtb_isp_top
```

Replace `tb_isp_top` with any other testbench name. The testbenches drive
inputs away from the clock edges, or with non-blocking assignments at the
edge on which the design samples them.

| testbench | checks |
|---|---|
| `tb_isp_stage` | both edge types against a reference model, random valid, data and stall |
| `tb_isp_pipeline` | order; N/2-cycle latency; stall reaching the input after N edges; N items when stalled; the hole-absorption trace; local stall; random traffic |
| `tb_esp_pipeline` | order; latency; stall and release each reaching the input after N edges; compaction into N consecutive items; random stalls |
| `tb_latch_pair` | the store-two, read-two sequence; random gates against a model |
| `tb_isp_ms_pipeline` | the `tb_isp_pipeline` checks on two master-slave segments |
| `tb_isp_fork`, `tb_isp_branch`, `tb_isp_join`, `tb_isp_select` | every input combination of the 3-way templates against the formulas |
| `tb_isp_fork_nonaligned` | two destinations with independent random stalls; each gets every item once; early deliveries occur |
| `tb_isp_ring` | latency per pass; overtaking; random counts, holes and short stalls; every result exactly once |
| `tb_isp_top` | the whole system at default parameters. Random traffic, local and consumer stalls, and the elastic pipeline and latch pair. Every mechanism must occur at least once. |
| `tb_paper_traces` | the two detailed stall traces, edge by edge |

`tb_isp_top` runs for about 15,000 cycles in well under a second.
