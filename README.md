# L2miss: precomputing the work that does not wait for a cache miss

A load that misses the last-level cache stalls an out-of-order core for hundreds of
cycles. The reorder buffer fills up behind the load, and the processor stops fetching.
Many instructions after the missing load do not depend on it at all: typically the
next iterations of a loop that walk arrays with a fixed stride. They could run, but
they have not even been fetched yet.

This design runs those instructions before the core fetches them. When a load misses
L2, the independent instructions that commit after it name the strided loads they
depend on. The next time one of those strided loads is decoded, it is *replicated*:
four copies are built for the next four addresses of its stride, and they run in the
background. Their results go to a separate bank of registers. Arithmetic instructions
fed by a replicated instruction are replicated in turn. Later, when the real instances
of these instructions reach decode, they are checked against what the replicas
assumed. If the check passes, an instruction takes the precomputed value and is not
executed.

The RTL is the mechanism only. The core it attaches to is outside: fetch, ROB, issue
queue, functional units, lower register file, caches and branch predictor. The core
reaches the mechanism through the ports of `l2miss_top`. The mechanism accepts one
decoding and one committing instruction per cycle. The core the mechanism was designed
for is 8 wide.

## The four steps

1. **Strided-load propagation (decode).**
   - The stride predictor marks a load as *strided* once it has seen the same non-zero
     stride twice in a row.
   - The rename map is extended with a *StridedPC* per logical register:
     - a strided load writes its own PC there;
     - any other load writes 0;
     - an ALU instruction copies the first non-zero StridedPC of its sources.
   - The StridedPCs of the sources travel with the instruction to commit, in its ROB
     entry (`dec_rob_spc`, returned in `cmt_i.spc`).
2. **Selection (commit).**
   - A committing load that missed L2 starts a *Dependence Mask* (DM, one bit per
     logical register). Only that load's destination bit is set.
   - Each later instruction ORs its source bits into its destination bit. An
     instruction whose sources are all clear is *independent* of the load.
   - An independent instruction sets the *S* bit, in the stride predictor, of each
     StridedPC it carries.
   - The missing load's PC goes into the *Delinquent Load Table* (DLT: 8 PCs, LRU).
     Later, a load that hits L2 while its PC is in the DLT restarts the DM in clear mode.
     The independent instructions after it then clear S bits instead of setting them.
     This stops the mechanism when the load stops missing.
3. **Replication (decode).**
   - A strided load whose S bit is set gets an entry in the *Replication Maps* (RM)
     table and a set of four upper-level registers.
   - Its four replicas load from last address + 2, 3, 4 and 5 strides. The decoding
     instance itself is taken to be at last address + 1 stride.
   - The rename map records, for the load's destination register, that the value is
     replicated (R) and which PC produces it (PPC).
   - An ALU instruction with a source marked R is replicated too. Its replicas read the
     producer's upper-level registers. The other source must be a value known at decode;
     it is kept in the entry's SR field.
4. **Validation and reuse (decode).** When an instruction with a live RM entry is decoded,
   it is checked:
   - **load:** the predictor still reports the same stride;
   - **ALU instruction:**
     - each replicated source still comes from the same producer PC;
     - that producer is exactly one replica ahead in the same register set;
     - a non-replicated source still has the value in SR.

   If the check passes and a replica is left, the instruction *reuses* upper-level
   register `REGS_ID*4 + decode`. The core then gets a copy of the value into a
   lower-level register, and the instruction goes straight to commit. If the check
   fails, the entry is killed, a new replication is attempted, and the instruction
   executes normally.

## The RM table and the register sets

This is the most intricate part. It lives in `rm_table.sv`, with its policy in
`decode_ctrl.sv` and `replica_gen.sv`.

The table has 4 ways × 64 sets and is indexed by PC bits [7:2]. Its fields are:

| field | meaning |
|---|---|
| `regs_id` | register set number; register k of the entry is `regs_id*4 + k` of the 768-register upper file (192 sets) |
| `nregs` | replicas in the set (4, or fewer for an ALU entry that starts part-way through its producer's set) |
| `decode` | next replica to be reused by a decoding instance |
| `commit` | replicas whose reusing instance has committed |
| `issue` | replicas not yet written back |
| `pc1`, `pc2` | producer PCs of replicated sources (0 = not replicated) |
| `off1`, `off2`, `pset1`, `pset2` | where in which producer set replica 0 reads (this design's addition) |
| `ac` | branch mispredictions since the last successful validation |
| `range_first`, `range_last` | addresses covered by a load's replicas |
| `sr` | a load's stride, or an ALU entry's non-replicated source value |

An entry moves through three states:

- **FREE** to **LIVE** at allocation. The LRU way of the PC's set is taken among ways that
  are FREE or *deallocatable*: `issue == 0` and either DRAIN, or `decode == commit`.
  Allocation also needs a free register set and room in the replica generator. If
  anything is missing, the instruction is simply not replicated.
- **LIVE** to **DRAIN** when the entry is killed:
  - failed validation;
  - `ac` reaching `MAX_AC` = 2 on branch mispredictions;
  - a committing store inside a load's `range`;
  - all replicas used without a refill.
- **DRAIN** to **FREE** once `issue` is 0, so a register still being written is never
  handed out again.

Other events:

- **Branch misprediction.** Every LIVE entry copies `commit` into `decode`, which squashes
  reuses by wrong-path instructions, and increments `ac`. A successful validation clears
  `ac`.
- **Refill.** When the instance that uses the last replica commits, and all replicas are
  written back, the entry starts a new set of four in the same registers. `decode` and
  `commit` return to 0. A load's `range` moves on by four strides.
- **Store check.** Up to two committing store addresses per cycle are registered once,
  then compared with the ranges of all LIVE load entries at 8-byte granularity. A store
  therefore costs one extra cycle before it can kill.

Register sets are not kept in a free list. A set is busy when a non-FREE entry owns it,
or when an ALU entry with unwritten replicas reads it as a producer set. The second rule
matters: without it, a producer killed and remade while its consumers' replicas are still
waiting would hand its registers to a new owner, and the consumers would read the wrong
values. For the same reason, a set that someone is reading is not refilled. Whenever a
set gets a new owner or is refilled, its four ready bits in the upper file are cleared
in that cycle.

An ALU instruction can be replicated while its producer is part-way through a set. Its
replica k then reads the producer's register `off + k`, and it gets only as many replicas
as the producer has left. Validation requires the producer to be one replica ahead of the
consumer, in the same set. So a producer that has been remade, refilled or re-aligned
invalidates its consumers instead of feeding them mismatched values.

## Blocks

| module | role |
|---|---|
| `l2m_pkg` | sizes and the structs shared by all blocks |
| `stride_pred` | 4-way × 512-set stride predictor with the S bit; 2 lookup ports, 1 training port, 2 S-update ports |
| `rename_ext` | StridedPC / PPC / R per logical register (64) |
| `dlt` | 8-entry fully associative DLT, LRU by age rank |
| `dep_mask` | the DM and the independence test |
| `commit_select` | DM + DLT + set/clear mode; produces S-bit updates |
| `decode_ctrl` | combinational validation, reuse and replication decisions |
| `rm_table` | the RM table described above |
| `replica_gen` | queue of entries to build (from allocation and refill); emits one replica micro-op per cycle |
| `upper_rf` | 768 × 64-bit upper register level with ready bits; queue of copies to the lower level, up to 4 start per cycle, 2-cycle latency |
| `wide_bus` | groups up to 4 buffered load replicas that fall in the same 32-byte line into one cache access |
| `prefetch_gen` | on an L2 miss of a load with a confirmed stride, issues the next 4 addresses, one per cycle |
| `l2miss_top` | wires everything together |

### Timing at the top

- **Decode.** All decode answers are combinational in the cycle the instruction is
  presented: `dec_reuse`, `dec_reuse_reg`, `dec_replicated`, `dec_rm_idx` and
  `dec_rob_spc`. The RM, rename-map and predictor updates take effect at the next edge.
- **Copies.** A reuse enqueues a copy tagged `dec_ltag`. The copy starts once the upper
  register has been written, and `cp_rsp_*` shows the value two cycles after the start.
  An assertion requires the copy queue to have room whenever a reuse is reported.
- **Load replicas.** They go to `dc_acc_*`, one line request at a time. The line returns
  on `dc_rsp_*`, in order, with any latency. Its words are written into the upper file
  on four write ports.
- **ALU replicas.** They leave on `alu_uop_o`. The core reads their register operands
  through `urf_rd_*`, and writes their results back on `alu_wb_i`.
- **Commit.** `cmt_i` is processed in one cycle. A store check adds one cycle.
- **Events.** The `ev_*` outputs pulse for every event. The testbench counts them.

## How far it follows the original mechanism

It follows the original for:

- the four steps;
- the RM fields and their update rules: allocation, decode/commit tracking, deallocation
  only when `issue == 0` and `decode == commit`, LRU choice, `commit` copied into `decode`
  on a misprediction, and the store range kill with two stores per cycle;
- the 2-cycle, 4-wide copy between register levels;
- the 4-load wide access;
- the prefetcher's 4 elements per miss;
- the evaluated sizes.

Choices made here, where the original is silent or where this design departs from it:

- One instruction per cycle at decode and commit, instead of 8.
- A strided load is confirmed after two equal strides.
- `MAX_AC` = 2.
- The DLT receives every L2-missing load at commit.
- A strided load that comes *after* the missing load is not selected by itself. It is
  replicated only if an instruction after the miss depends on it. The original
  description is inconsistent on this point; this design follows its worked example.
- Replica addresses start two strides past the last address.
- Register sets of four, with the reference rule and the offset fields described above.
- The DRAIN state.
- The non-replicated source value must be known at decode.
- Store ranges are checked at 8-byte granularity.
- Stores and branches never select strided loads.
- The table's entry is 279 bits, against about 42 bytes in the original estimate. The
  original field widths are not known.

Not built: the core, the lower register file and its allocation, the caches, and the
recovery path. A failed validation just means the instruction executes normally.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/l2m_pkg.sv tb/tb_rm_table.sv \
          --top-module tb_rm_table -Mdir obj && obj/Vtb_rm_table
```

Replace `tb_rm_table` with any other testbench name. `-y rtl` lets Verilator find each
module in the file named after it. Simulation is two-state; the
testbenches initialise everything they read.

`tb_l2miss_top` runs the full design at its default sizes. It plays the core for 70
iterations of a loop:

- three strided loads, one of them not used after the miss;
- a load that misses L2;
- independent and dependent ALU instructions;
- a branch and a store.

It checks every reused value against the value the instruction would have computed. It
also forces each mechanism at least once, and fails any that never happened:

- selection and deselection;
- allocation, reuse and refill;
- validation failure, when a register value changes;
- kill by a store inside a range;
- kill by `ac` after branch mispredictions;
- abort of a replica set whose producer disappeared;
- wide accesses serving several loads;
- prefetch, and a prefetch dropped while a burst is in progress.

The other testbenches check each block's rules, and the cycle counts where a latency is
part of the design: the 2-cycle copy, the store check one cycle late, one prefetch per
cycle.

## What is verified, and what is not

- All modules pass Verilator's `-Wall` lint without errors. The remaining warnings are
  unused signals and unused bits of shared structs. The modules also elaborate under the
  slang front end of yosys.
- Each block testbench has been shown to fail when its module is broken in one
  significant way, for example a wrong LRU victim, a missing source in the dependence
  test, or a copy path only three wide.
- The end-to-end test covers one loop shape and a single-issue core model. It does not
  show speedup: no processor or memory timing model is attached.
- No gate-level netlist or timing result exists. The 768 × 64-bit upper register file
  and the 256-entry RM table are written as flop arrays. A real implementation would map
  them to multi-ported RAM macros.
- Wrong-path behaviour is simplified. A branch misprediction is a single pulse, and reuse
  decisions made for squashed instructions are undone only through the `decode`
  rollback. The copy requests they made still complete.
