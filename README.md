# Instruction clustering for short-lived operands

In a wide out-of-order core every result travels over the global bypass
network. Every functional unit output drives every functional unit input, so
the delay of that network grows with the issue width. In multimedia inner
loops, though, many values are produced and consumed within a few
instructions of the same basic block and are never needed elsewhere. This
design finds such producer/consumer groups (*clusters*) at run time. It keeps
them in a dedicated *cluster queue* and runs them on a small grid of
*networked ALUs*. The grid has direct wires between consecutive rows, so a
dependent instruction gets its operand in the next cycle without the global
bypass.

The RTL covers the clustering machinery: the basic block cache, the cluster
formation unit, the cluster cache, the dispatch logic, the cluster queue with
its scheduler, and the 4 x 4 cluster execution unit. The rest of the
out-of-order core connects through ports on the top module `clustering_top`:
the front end, renamer, conventional queue and ALUs, register file,
load/store unit and commit stage. The scheme follows the paper "Reducing
Operand Communication Overhead using Instruction Clustering for Multimedia
Applications"; the sections below say where this RTL goes its own way.

```
 commit ──► cluster_formation ◄──► bb_cache           (built once per block,
                 │                                      off the critical path)
                 ▼
           cluster_cache
                 ▲ lookup by pc
 rename ──► cluster_dispatch ──► conventional queue   (iq_v / iq_i ports)
                 │ whole clusters
                 ▼
           cluster_queue ──issue packets──► cluster_exec_unit ──► out ports
               ▲    │ rd_tag                   ▲ rd_data
        bc_tag │    └──────────► register file ┘
```

## Dependence edges and what a cluster is

Inside one basic block, each register source of an instruction is an edge
from the last earlier instruction in the block that wrote that register. If
no earlier instruction did, the edge comes from outside the block. Each edge
falls into one of three classes:

| class    | producer                              | consumer use                             |
|----------|---------------------------------------|------------------------------------------|
| local    | integer ALU instruction in the block  | ALU or branch operand, load/store base   |
| internal | load, FP or other non-ALU instruction in the block | any                         |
| internal | any instruction in the block          | store data or FP operand                 |
| external | outside the block                     | any                                      |

A *cluster* is a connected component of the local edges with at least two
members. Only local edges can use the direct row-to-row wires, because only
ALU-to-ALU traffic stays inside the grid. Loads and stores still compute
their addresses in the grid, since the base register is a local source. Their
memory access happens outside it.

Each member gets a *dependence depth*. The first member of a chain has depth
0. Any other member has 1 + the largest depth of its local producers. Depth
decides the grid row, so a consumer lands one row below its producer.

A result also needs to leave the grid if either:
- an internal consumer uses it;
- its register is still live at the block's end, that is, no later
  instruction in the block overwrites it.

Either case sets the member's `out_ext` bit. A result that is overwritten
inside the block and used only by local consumers never reaches the
broadcast network.

The size of a cluster is limited to `CL_MAX` = 8 members, the height of a
cluster queue column. An instruction that would make a cluster larger stays
out of it, and its edge is treated as global.

## Building clusters: basic block cache, formation, cluster cache

`cluster_formation` stores the committed instructions of the current basic
block, up to `BB_MAX` = 64 of them. At the block's last instruction it
reports the block's start address to `bb_cache`. The basic block cache counts
commits per start address, and on the **second** commit of a block it answers
`form_en`. The cache is direct-mapped with a full tag, and its counter
saturates. Formation then runs one instruction per cycle:

1. **ANALYZE.** A last-writer table gives the producer of each source. The
   edge is classified as above. An instruction with local sources joins its
   producers' clusters; two clusters are merged by relabelling. Its depth is
   computed as described above.
2. **LIVEOUT.** Results that are live at the block end are marked `out_ext`.
3. **EMIT.** Each cluster of two or more members is written, members in
   program order, to `cluster_cache`.

A cluster cache entry holds, per member:
- the instruction address;
- the depth;
- for each source, a local bit and the index of the producing member;
- whether the result has local consumers (`out_local`);
- whether the result must leave the grid (`out_ext`).

The cache is direct-mapped on the address of member 0 and has 256 entries.

Formation takes one cycle per instruction for the analysis, one cycle for the
live-out marking, and for each cluster one scan from its first member to the
block end. While it runs (`busy`),
further commits are ignored, so a block that was missed is formed on a later
commit. Building clusters only after the second commit keeps formation rare.
Multimedia code spends its time in a few hot blocks.

For the JPEG colour-conversion block used in the tests (37 instructions),
formation finds 23 local, 15 internal and 15 external edges. It builds 10
clusters holding 33 of the 37 instructions.

## Dispatch

`cluster_dispatch` sits in the rename stage and sees one renamed instruction
per cycle. It looks up the instruction address in the cluster cache.

When the address matches a cluster's member 0:
- the dispatcher allocates a cluster queue column;
- it opens one of `OPEN` = 4 slots for that cluster.

Each open slot waits for the address of its cluster's next member. When that
address arrives, the instruction is written into that member's row of the
column, together with its depth and locality bits. The other instructions go
on to the conventional queue (`iq_v`/`iq_i`).

Several slots are needed because the clusters of a block interleave in
program order. If no column or no slot is free when member 0 arrives, the
whole cluster takes the conventional path. A cluster is never split between
the two paths.

Local sources need no tag wakeup. The producer is an earlier member of the
same column, so readiness depends only on where its value sits in the grid
(see below).

## The cluster queue and its scheduler

This is the core of the design and where most choices had to be made.

**Organisation.** `ENTRIES` = 8 columns form a circular buffer. Each column
holds one cluster: up to 8 members in program order and an *issue pointer*.
Members of a column issue strictly in order, at most one per column per
cycle. A column retires when it is at the head and all its members have
issued.

**Steering.** A member goes to row `depth mod ROWS`. A chain of four or more
dependent members therefore wraps around from the last row to row 0.

If no ALU is free in that row this cycle, the next rows are tried in turn.
The same happens when the operand cannot be reached from that row. A member
placed outside its depth row counts as a *remap* (mapping failure). Its local
operand then comes over the pass-through path, which costs one extra cycle.

Columns are scanned from oldest to youngest, and the oldest column wins any
conflict.

**Operand readiness.** An operand of a member is ready through one of four
routes, checked in this order:

| route        | condition                                                                  | latency after producer issue |
|--------------|----------------------------------------------------------------------------|------------------------------|
| local        | producer's buffer still holds its value, and the consumer goes to the row just below | next cycle (0 bypass)        |
| pass-through | producer's buffer still holds its value, producer did not issue last cycle | two cycles (1 bypass)         |
| input port   | tag has been broadcast (or was ready at dispatch)                          | register file read           |
| immediate    | -                                                                          | -                             |

An ALU buffer "holds the value" when its identity tag equals {column, member}
of the producer. This tag comparison lets the scheduler tell whether the
buffer has been overwritten by a later instruction.

A source that is not local always uses an input port. At most `N_IN` = 8
input ports are used per cycle in total.

**Holding local results.** Only values that other parts of the core need
should use the output path. If every result took an output port, the four
output ports would limit the grid to four issues per cycle. That is exactly
one row, so rows would never conflict and steering would never fall back.

So an ALU result that has local consumers and is not needed outside
(`out_local` and not `out_ext`) stays in its ALU's buffer. That ALU takes no
new instruction until the column retires. At most `HOLD_MAX` = 12 buffers are
held at once, which keeps at least one row's worth of ALUs free. Past this
budget the result goes out on an output port like a global value.

The following always take one of the `N_OUT` = 4 output ports per cycle:
- results with internal or external consumers;
- load and store addresses;
- branch outcomes.

**Timing.** Dispatch writes in cycle t are visible to selection in t+1. Issue
packets and register read tags are combinational from the queue state and the
grid's buffer tags. The grid executes in the issue cycle.

## The cluster execution unit

`cluster_exec_unit` is a ROWS x COLS (4 x 4) grid of `network_alu` instances.
Each ALU computes a 32-bit integer operation (add, sub, logic ops, shifts,
set-less-than, lui) in the cycle its packet arrives. It registers the result
in its buffer together with the producer's identity.

Each operand of an ALU in row r is selected from one of:
- **local path**: the buffer of any ALU in row r-1, through a full crossbar
  between consecutive rows. Row 0 has no local source; the last row does not
  feed row 0.
- **pass-through path**: the buffer of any ALU in the grid.
- **input port** `n` (0 ... N_IN-1), which carries a register file value.
- **immediate**.

A packet with `out_v` also writes its result to output port `out_port` at
the next clock edge. The port carries one of four kinds:
- `OUT_REG`: a register result, with its tag;
- `OUT_LDADDR`: a load address;
- `OUT_STADDR`: a store address, with the store data tag;
- `OUT_BRANCH`: a branch outcome.

An assertion checks that no two ALUs claim the same output port in a cycle.

## The top module and its ports

`clustering_top` wires the six blocks as in the diagram. The host core
drives it as follows:

- `commit_v`/`commit_i`: one committed instruction per cycle. This carries the
  pc, the class (ALU, branch, load, store, FP, other), the architectural
  sources and destination, and a flag marking the last instruction of a
  basic block.
- `rn_v`/`rn_i`: one renamed instruction per cycle. This carries the pc,
  class, ALU op, immediate, physical tags and ready bits. If the instruction
  is not clustered it comes back on `iq_v`/`iq_i` in the same cycle.
- `rd_v`/`rd_tag` → `rd_data`: a combinational register file read for each
  input port.
- `bc_v`/`bc_tag`: tags broadcast by the rest of the core. The core must also
  broadcast the tags of register results it receives from `out`.
- `out`: the registered output ports. Loads and stores are completed by the
  core's memory unit from the addresses on these ports.
- `flush`: empties the cluster queue and the open dispatch slots.
- Statistics counters: edges by class, clusters formed, clustered
  instructions, issues, and operands by route (local / pass-through / input
  port), plus remap count.

## Where this RTL departs from the paper or fills gaps

These were not specified and are this design's choices:

- the direct-mapped organisation of both caches;
- the commit counter width;
- the block size limit;
- serial formation, ignoring commits while busy;
- `CL_MAX`;
- the open-slot dispatch table;
- whole-cluster fallback;
- the fallback rows;
- oldest-first arbitration;
- the readiness rules of the pass-through and input routes;
- the hold mechanism and its budget;
- the number of output ports (4) and broadcast tags (8).

The last row does not feed row 0 over a local path. A chain that wraps uses
the pass-through path there.

Only the 8-way configuration is built, with one 4 x 4 unit and 8 cluster
queue columns. The 16-way configuration has two 4 x 4 units and 16 columns.
`CQ_ENTRIES = 16` is a parameter change, but a second execution unit and its
steering are not implemented.

The conventional core is not part of this RTL. That covers the front end,
renamer, 24-entry instruction queue, conventional ALUs, global bypass,
register file, load/store queue, caches, branch predictor and reorder buffer.
Therefore whole MediaBench programs cannot be run. The testbench of the top
models a minimal core instead.

Reset is asynchronous and active low everywhere. No floating-point operations
execute in the grid: FP instructions are never cluster members, and FP
producers make edges internal.

## Parameters

| parameter     | default | where     | meaning                                            |
|---------------|---------|-----------|----------------------------------------------------|
| `CQ_ENTRIES`  | 8       | top       | cluster queue columns (8-way machine)             |
| `CC_ENTRIES`  | 256     | top       | cluster cache entries                              |
| `BB_ENTRIES`  | 256     | top       | basic block cache entries                          |
| `BB_MAX`      | 64      | top       | longest basic block that is formed                 |
| `ROWS`,`COLS` | 4, 4    | top       | network ALU grid                                   |
| `N_IN`        | 8       | top       | input ports (register file reads) per cycle        |
| `N_OUT`       | 4       | top       | output ports per cycle                             |
| `NB`          | 8       | top       | broadcast tags per cycle                           |
| `OPEN`        | 4       | top       | clusters being dispatched at once                  |
| `HOLD_MAX`    | ROWS*COLS-COLS | queue | buffers that may be held at once               |
| `CL_MAX`      | 8       | `clu_pkg` | members per cluster                                |
| `TAG_W`       | 7       | `clu_pkg` | physical register tag width                        |

## Files

- `rtl/clu_pkg.sv`: types shared by all blocks (instruction records, cluster
  entry, issue packet, output port) and the ALU function.
- `rtl/network_alu.sv`, `rtl/cluster_exec_unit.sv`, `rtl/bb_cache.sv`,
  `rtl/cluster_formation.sv`, `rtl/cluster_cache.sv`,
  `rtl/cluster_dispatch.sv`, `rtl/cluster_queue.sv`: the blocks.
- `rtl/clustering_top.sv`: the top.
- `tb/tb_<block>.sv`: one self-checking testbench per block.
- `tb/tb_blocks_pkg.sv`: the test basic blocks (JPEG colour conversion, a
  ten-instruction dependence chain), a load-value function and a reference
  ALU written independently of the RTL.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The top testbench (`tb_clustering_top`) runs the design at its default size:
1. It commits both test blocks twice, so that 12 clusters are formed.
2. It dispatches five passes of them through a modelled renamer and
   conventional path.
3. After each pass it compares the architectural registers, the stores and
   the branch conditions with a sequential reference interpreter.

It also requires that each of these mechanisms happens at least once:
- formation;
- local, pass-through and input-port operands;
- remaps;
- full-queue fallback;
- the conventional path.

A typical run: 107 instructions issued to the grid, 73 local-path operands,
8 pass-through, 73 through input ports, 12 remaps, 6 clusters sent to the
conventional path.

## Simulating

With Verilator 5 (list the package first, then the blocks a testbench uses):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/clu_pkg.sv rtl/network_alu.sv rtl/cluster_exec_unit.sv rtl/bb_cache.sv \
  rtl/cluster_cache.sv rtl/cluster_formation.sv rtl/cluster_dispatch.sv \
  rtl/cluster_queue.sv rtl/clustering_top.sv \
  tb/tb_blocks_pkg.sv tb/tb_clustering_top.sv --top-module tb_clustering_top
./obj_dir/Vtb_clustering_top
```

The block testbenches need only their block and its sub-blocks. For example,
`tb_cluster_queue` needs `clu_pkg`, `network_alu`, `cluster_exec_unit`,
`cluster_queue` and `tb_blocks_pkg`. `verilator --lint-only -Wall` on the RTL
reports only a few unused-bit warnings and the reset used by the assertions;
the module headers explain why these stand.
