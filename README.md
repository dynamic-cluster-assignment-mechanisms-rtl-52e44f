# Dynamic cluster steering for a two-cluster superscalar core

A wide out-of-order core can be split into two clusters. Each cluster has its
own issue queue, register file and functional units. This keeps wires and
register-file ports short, but every value that one cluster produces and the
other consumes now has to cross between them, which costs time. The dispatch
stage must therefore decide, instruction by instruction, which cluster runs
each one. It has two goals that pull against each other:

* keep dependent instructions together, so few values cross between the clusters;
* keep both clusters busy, so neither one's issue slots sit idle while the other has a backlog.

This RTL is that dispatch stage. It steers and renames up to 8 decoded
instructions per cycle for a machine with these two clusters:

| cluster | units | notes |
|---|---|---|
| INT (`CL_INT`, 0) | simple integer ALUs + integer multiply/divide | |
| FP (`CL_FP`, 1) | FP units + simple integer ALUs | FP registers live only here |

Simple integer work can run in either cluster: ALU operations, the address
calculation of loads and stores, and integer branches. Only for that work does
the steering have a real choice. FP operations and anything that names an FP
register always go to FP. Integer multiply/divide always goes to INT.

The steering follows the *dynamic cluster assignment* mechanisms published
under that name. The main configuration, and the default here, is **general
balance steering**. Four slice-based schemes can be selected at run time with
`scheme_i`, for comparison and for workloads where they help.

## Block structure

```
                 +------------------------ steering_logic -----------------------+
 dec_i[8] ------>| parent_table   slice_table   cluster_table   crit_threshold   |
 ready counts -->| balance_monitor                                               |-- cl[8] --+
 miss/mispredict>|                per-slot decision loop                         |           |
                 +---------------------------------------------------------------+           |
                        ^ loc[64] (which clusters hold each logical register)                |
                        |                                                                    v
                 +------+----------------------- cluster_rename --------------------------------+
 free_i[8] ----->| map table (2 fields / reg)   free_list INT (96)   free_list FP (96)          |--> ren_o[8]
                 +------------------------------------------------------------------------------+    (+ copies)
```

| file | what it is |
|---|---|
| `rtl/dcs_pkg.sv` | types: decoded/renamed instruction records, enums for cluster, op class, scheme |
| `rtl/dcs_dispatch.sv` | top: steering + renaming, group handshake |
| `rtl/steering_logic.sv` | the cluster decision for all five schemes |
| `rtl/balance_monitor.sv` | the workload imbalance counter |
| `rtl/parent_table.sv` | logical register -> PC of its last writer |
| `rtl/slice_table.sv` | PC -> slice membership and slice ID |
| `rtl/cluster_table.sv` | slice ID -> cluster, miss count, critical flag |
| `rtl/crit_threshold.sv` | adaptive criticality threshold |
| `rtl/cluster_rename.sv` | two-field map table, copy insertion, replicas |
| `rtl/free_list.sv` | free physical registers of one cluster |

## The imbalance counter

The balance schemes keep one signed counter, `bal_cnt_o`. A positive value
means the FP cluster is more loaded. Two measurements feed it.

* **I1, steering count.** Each instruction sent to FP adds 1 and each one sent
  to INT subtracts 1. The step is applied *inside* a decode group: slot *j*
  sees the counter moved by the decisions of slots 0..*j*-1. Without this, a
  group of 8 independent instructions would all see the same value and would
  all go to the same cluster.
* **I2, ready-instruction imbalance.** A cycle counts only if one cluster has
  more ready instructions than its issue width (4) and the other has fewer.
  For such a cycle the sample is `ready_fp - ready_int`; any other cycle gives
  0, because both clusters can then issue at full rate. The last 16 samples
  sit in a shift register, and every cycle their average (sum >>> 4) is added
  to the counter.

The imbalance is **strong** when |counter| > 8. The **least loaded** cluster is
INT when the counter is positive, FP otherwise. The counter saturates at
8 bits.

## The steering schemes

For an instruction that may run in either cluster, count how many of its
source operands are already mapped in each cluster. The input for this is
`loc`, which the renamer exports, updated for the earlier slots of the same
group.

* **General balance** (`SCH_GENERAL_BAL`, default). Send the instruction to the
  least loaded cluster if the imbalance is strong, or if both clusters hold
  the same number of its operands. Otherwise send it to the cluster that holds
  more of them. This scheme uses no tables.
* **Slice steering** (`SCH_SLICE`). Instructions in the backward slice of
  loads/stores (`kind_i = SLICE_LDST`) or of branches (`SLICE_BR`) go to INT.
  Everything else goes to FP.
* **Non-slice balance** (`SCH_NONSLICE_BAL`). Slice instructions go to INT. The
  rest use the general balance rule.
* **Slice balance** (`SCH_SLICE_BAL`). Every load/store or branch defines its
  own slice, and the slice ID is the defining instruction's PC index. A slice
  instruction goes to the cluster the cluster table assigns to its slice. If
  the imbalance is strong and that cluster is the loaded one, the *whole
  slice* is remapped to the other cluster and the instruction follows it.
  Later slots of the same group see the remap. Non-slice instructions use the
  general balance rule.
* **Priority slice balance** (`SCH_PRIO_SLICE_BAL`). Works like slice balance,
  but only *critical* slices are treated as slices.

### How slices are found

Slices are found with three tables.

* `parent_table` holds, for each logical register, the PC of the last decoded
  instruction that wrote it. Inside a group, an earlier slot's destination
  takes precedence.
* `slice_table` is untagged and direct-mapped, with 1024 entries indexed by
  PC[11:2]. Each entry holds a valid bit and a slice ID.
* When an instruction is a load/store or branch, or its own entry is valid,
  it writes its slice ID into the slice-table entries of its parents.
  - For loads and stores, only the address operand's parent is marked.
  - Over repeated executions, membership spreads backwards through the
    dependence graph, one level per execution.

Three write ports per decode slot make this a 24-write-port table. It is the
largest structure in the design.

### Criticality

`ev_v_i`/`ev_pc_i` report the PC of a load that missed in the cache (LdSt
slices) or of a mispredicted branch (Br slices). `cluster_table` keeps a
saturating 8-bit count per slice. When an event updates the count, the slice
is flagged critical if the new count is greater than the threshold.

`crit_threshold` tunes that threshold:

* It counts the instructions steered as members of a critical slice, and all
  other instructions, in two 16-bit counters.
* Each period is 8192 cycles (a 13-bit cycle counter).
* At the end of a period, if the critical count is more than half the total,
  the threshold goes up by 1; otherwise it goes down by 1. It saturates at 0
  and 255.
* The target is about half of all instructions being in critical slices.

## Renaming and copies

There is one map table. Each logical register has two fields, one per
cluster, and each field is a valid bit plus a 7-bit physical register
number. Each cluster has 96 physical registers.

* Logical registers 0..31 are integer. At reset they map to INT registers 0..31.
* Logical registers 32..63 are FP. At reset they map to FP registers 0..31.

Each slot is renamed in program order:

1. **Source mapped in the chosen cluster.** Use that mapping.
2. **Source mapped only in the other cluster.** Allocate a register in the
   chosen cluster and emit a *copy*: `cp1`/`cp2` with `dst_cl`, `src_p` and
   `dst_p`. The copy moves the value over an inter-cluster bus. Both fields
   are now valid: the register is *replicated*, and later readers in that
   cluster use the replica without another copy.
3. **Destination.** Allocate a register in the chosen cluster, and clear the
   other field. This drops the replica. Both old mappings are returned in
   `old_int`/`old_fp`. The commit logic gives them back through `free_i` once
   the instruction retires.

The whole group is accepted or stalled as a unit. It stalls if either
cluster lacks enough free registers for all of the group's destinations and
copies, or if `disp_ready_i` is low because the queues are full. The copies
are emitted alongside the instruction. It is up to the queue logic to insert
them ahead of it and give them issue slots.

Replication stays small in practice. The published evaluation of general
balance steering reports about 3 replicated logical registers on average.

## Interface and timing (`dcs_dispatch`)

* **Group handshake.**
  - The sender holds `dec_i[8]` stable until `dec_ready_o` is high.
  - In that cycle `fire_o` is high if any slot is valid, and `ren_o`/`info_o`
    carry the result (both are combinational).
  - Tables, map table, free lists and counters update at the clock edge.
* **`dec_i[j]` fields.**
  - `valid`, `pc`
  - `op`: `OP_SIMPLE`, `OP_COMPLEX`, `OP_FP`, `OP_LOAD`, `OP_STORE` or `OP_BRANCH`
  - up to two sources and one destination, each a 6-bit logical register with a valid bit
  - For a store, `src1` is the address operand and `src2` is the data.
* **`ready_int_i`/`ready_fp_i`.** The ready-instruction counts of the two
  issue queues this cycle.
* **`free_i[8]`.** Old mappings released by committing instructions.
* **`scheme_i`/`kind_i`.** Static mode selection. Changing them on the fly
  is allowed, but the tables keep their contents.
* **Debug/observation outputs.**
  - `info_o`: chosen cluster, in-slice, treated-as-slice, strong imbalance,
    remap, forced.
  - `bal_cnt_o`, `thresh_o`, `i2_imbal_o`, `period_end_o`.
  - Free-register counts.

The decode, rename and steering decision happen in one combinational path of
8 dependent slots. A real implementation would pipeline or predecode parts of
it. This RTL keeps it in one cycle to keep the behaviour exact.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W` | 8 | decode/rename width |
| `RET_W` | 8 | retire width, i.e. release ports |
| `N_PHYS` | 96 | physical registers per cluster |
| `ISSUE_W` | 4 | issue width per cluster, used by I2 |
| `BAL_N` | 16 | I2 averaging window, power of two |
| `BAL_THRESH` | 8 | strong-imbalance threshold |
| `BAL_CNT_W` | 8 | imbalance counter width |
| `ENTRIES` | 1024 | slice/cluster table entries, assumed |
| `NEV` | 2 | miss/mispredict event ports, assumed |
| `MISS_W` | 8 | miss counter and threshold width, assumed |
| `PERIOD_W` | 13 | threshold period, 2^13 cycles |
| `ACC_W` | 16 | width of the critical/non-critical counters |

These values describe an 8-wide machine with two 4-issue clusters, 64-entry
queues and 64 instructions in flight. The queues and the in-flight limit sit
outside this block.

## Where this design makes its own choices

The published mechanism leaves these points open. This RTL settles them as
follows.

* **Slice propagation at decode.** Slice IDs are propagated when the
  instruction is dispatched. An execute-time variant is also described; it
  would need the parent PCs carried down the pipeline.
* **Counting for the threshold.** Instructions are counted at dispatch, not
  at execution.
* **Table geometry.** Table sizes, direct mapping and the lack of tags are
  choices. Aliasing changes only steering quality, never correctness.
* **Slice reset state.** All slices start mapped to INT.
* **Ties.** The least loaded cluster is FP when the counter is 0.
* **Copies.** Copy instructions do not move the I1 count.
* **Remap condition.** A slice is remapped only if it sits on the loaded side.
* **Lost history.** There is no branch-misprediction recovery of the map
  table. The commit side must drain and reset, or restore the map from its
  own checkpoint, which this block does not provide.
* **Slice-scheme forcing rules.** In slice steering, complex integer
  instructions are forced to INT and FP instructions to FP, whatever the
  slice says.

## Not included

The following are outside this block and connect only through ports:

* fetch, I-cache and branch predictor
* the decoder
* the issue queues and their select logic
* register files, functional units and the inter-cluster bypass buses (three each way)
* load/store disambiguation
* data caches
* the reorder buffer

The modulo and FIFO-based steering schemes, which exist only as comparison
points, are not built.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_balance_monitor`, `tb_crit_threshold`, `tb_parent_table`,
  `tb_slice_table`, `tb_cluster_table` and `tb_free_list` compare each module
  against a reference model written in the testbench, using random stimulus.
  Saturation, the ends of periods and same-entry write collisions are
  covered.
* `tb_cluster_rename` tracks values, not register numbers.
  - Every destination writes a unique token into a modelled register file.
  - Copies move tokens between the clusters.
  - Every source must read the token that program order says it should.
  - It also checks: no live register is handed out twice, the copy flags,
    and that the old mappings match the replicas.
* `tb_steering_logic` runs a full reference model of all five schemes: the
  tables, in-group forwarding, remaps and the threshold. It compares every
  decision.
* `tb_dcs_dispatch` runs the whole stage at its default parameters.
  - It runs a looping 128-instruction program: 30 % loads, stores, branches,
    FP and multiplies.
  - Its behavioural back end has two 64-entry queues that issue 4 per cycle,
    with dependence tracking, a commit queue and cache-miss/misprediction
    events.
  - It runs every scheme with both slice kinds, plus a stress phase with a
    large window.
  - It checks every value read through the token method, and checks that
    stalls happen only when they must.
  - It counts each mechanism and fails if one never happens: copies, replica
    reuse, in-group dependences, strong imbalance, slice remaps, critical
    slices, threshold moving up and down, queue-full and register-full
    stalls, forced FP/INT, I2 imbalance and slice membership.
  - Typical copy rates on this program: about 0.12–0.19 per instruction with
    general balance, and about 0.23–0.25 with plain slice steering.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_dcs_dispatch rtl/dcs_pkg.sv tb/tb_dcs_dispatch.sv
./obj_dir/Vtb_dcs_dispatch
```

The full-size end-to-end run takes a few seconds. The modules use
`always_ff`/`always_comb` and packed structs only. Assertions (`assert ...
else $error`) guard the free lists and the map table.

### Synthesis notes

All logic is synthesizable. The slice and cluster tables are arrays without
reset. A separate reset-able valid bit per entry provides the "empty" state,
so the arrays can map to memories. With defaults the top synthesizes (generic
cells) to roughly 6.4 k cells, 6.6 k flip-flop bits and 20 k memory bits.

## Lint notes

Verilator `-Wall` reports only warnings that are deliberate:

* the upper bits of the imbalance average are unused, because the counter
  saturates anyway;
* the package exposes constants that not every module uses;
* the asynchronous reset also feeds the synchronous assertion blocks.
