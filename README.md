# TSD core: a small register file that still exposes memory-level parallelism

An out-of-order core needs one physical register for every in-flight
instruction that produces a value. When the register file is small,
renaming stalls, the window stops filling, and loads that would miss in the
cache are reached late and one after another. This RTL implements the back
end of a core that renames with **two-step physical register deallocation
(TSD)**, so renaming never stalls for lack of registers. Instructions whose
destination register is not yet really free are still executed
(**pre-execution**) to warm the cache. A **stride address predictor** lets
loads in that state issue even before their address has been computed.

The design is SystemVerilog (IEEE 1800-2017), synthesizable, with defaults
taken from the scheme's main configuration:

* 8-wide dispatch, issue and commit;
* a 128-entry ROB, a 64-entry instruction window and a 64-entry load queue;
* 48 physical registers for 32 logical registers;
* 8 integer ALUs and 4 data-cache ports;
* a 1024-entry value history table.

## The idea in one paragraph

In a conventional renamer, the previous physical register of a logical
register is freed only when the instruction that redefines that logical
register commits. Under TSD, that register is instead released at once to the
free list when the redefining instruction is renamed. This is the *first
step*, a temporary deallocation. A later instruction may therefore be given a
register whose old value is still needed. Such an instruction may execute, but
it may not write its result until the *second step*, the commit of the
instruction that released the register. Until then it is a pre-execution
candidate:

* It executes when its operands are ready.
* Its result goes only to the bypass network, never to the register file.
* It stays in the window.

Once the write is granted, it executes again (*main execution*) and writes its
register. Its loads now hit the cache lines that the pre-execution brought
in. Pre-execution never changes architectural state. So when the predictor's
guess is wrong, the only cost is a useless cache access, and nothing has to be
recovered.

## Two-step deallocation in the rename stage (`tsd_rename`)

The renamer has three tables:

| table | indexed by | holds |
|---|---|---|
| map table | logical register | current physical register, ROB entry of its newest in-flight producer, in-flight flag |
| free list | (ring) | `NUM_PREGS - NUM_LREGS` physical registers |
| deallocation table (DAT) | physical register | valid bit and the ROB entry that will finally free it |

For each instruction with a destination, in slot order within the group:

1. The register now mapped to `rd` (`pold`) goes to the free list. The
   instruction's own ROB entry is written into `DAT[pold]`.
2. A register `pd` is taken from the free list and mapped to `rd`.
3. `DAT[pd]` is read. If it is valid, its ROB number becomes the
   instruction's **ROBP** tag: the write of `pd` must wait until that ROB
   entry commits. If it is not valid, the write is granted at once.

Every rename pushes one register and pops one, so the free list always holds
the same number of registers. It is built as a ring in which the popped slot
receives the pushed register. With 34 physical registers only two are free,
and a register released by one slot can be taken again later in the same
group. The sequential slot loop handles this case, and the rename testbench
exercises it.

Example: `i2` redefines `r2`, which was mapped to register 36, and gets ROB
entry 13. Register 36 goes to the free list and `DAT[36] = 13`. When `i3` is
later given register 36, it reads `DAT[36]` and gets ROBP = 13. Its result
write waits for `i2` to commit. By then every reader of the old value of
register 36, all older than `i2`, has committed.

**Second step.** When an instruction commits, its ROB number is broadcast to
the instruction window and the load queue. Every entry whose ROBP matches is
granted. The commit also clears `DAT[pold]`, but only if the entry still
names this instruction, so a register handed out after the commit is granted
at once. These clears are applied before the same cycle's lookups.

## Pre-execution in the window (`tsd_iwin`)

Each window entry carries the ROBP tag, a granted flag, the destination
register and two sources. Each source has two ready flags:

* `avail`: the producer's main execution has produced the value. This flag
  is persistent, and the value is captured in the entry.
* `byp`: a pre-executed producer broadcast its result in the previous cycle.
  This flag lasts **one cycle only**, because a pre-executed value exists
  only on the bypass. If the consumer does not issue in that cycle, the flag
  is dropped. This is the "bypass problem" that address prediction is meant
  to work around; the `byp_drop` event counts it.

Issue, up to 8 per cycle:

* **Main execution**: granted and both sources `avail`. The result is
  written to the register file and broadcast as persistent, the ROB entry is
  marked done, and the entry leaves the window.
* **Pre-execution**: not eligible for main execution, both sources ready
  through `avail` or `byp`, and not pre-executed before. The result is
  broadcast as bypass-only. The entry stays, its `byp` flags are reset, and it
  is not pre-executed again.

Main executions take the ALUs first, lowest entry first. A granted
instruction with an operand available only on the bypass is pre-executed,
not main-executed. Together with the one-cycle `byp` flag, this guarantees
that no value computed from a pre-executed or predicted input ever reaches
the register file.

**Why sources are tagged by ROB entry.** Under TSD several in-flight
instructions can own the same physical register number, one after another. A
wakeup broadcast that named only the register would wake the wrong
consumers. Sources are therefore tagged with the producer's ROB entry, which
the map table keeps next to the physical register. A source is available at
dispatch if its producer has committed (map in-flight flag clear) or is
already done (ROB done bit). It is then read from the register file, and the
same cycle's broadcasts are checked as well.

## Loads, the load queue and address prediction (`tsd_lsq`, `tsd_vpred`)

A load is split at dispatch into two parts that share one ROB entry:

* an address calculation (`OP_AGEN`, `rs1 + imm`), which goes to the window
  and is always granted because it writes no register;
* a memory access, which goes to the load queue with the load's destination
  register, its ROBP, and the address predicted from its PC.

A queue entry can learn up to three addresses:

* the **computed** address, from a main execution of the address calculation;
* a **pre-executed** address, from an address calculation whose operand came
  from the bypass;
* the **predicted** address, from the predictor, used only while the write
  is not granted.

Up to 4 requests per cycle go out, oldest first:

* **Main access**: granted and the computed address known. The response
  writes the register, wakes consumers and completes the ROB entry.
* **Pre-execution**: one per load. It uses the best address available, in
  the order computed, pre-executed, predicted. The response only drives the
  bypass. It is dropped if the entry has since issued its main access or
  been reused.

**The predictor** is a direct-mapped value history table indexed by
`PC[11:2]` and tagged by `PC[31:12]`. Each entry holds:

* the previous address;
* a stride;
* a confidence flag;
* this design's additions: the last committed address and a count of
  predicted instances still in flight.

A lookup that hits a confident entry predicts `previous + stride`.
Confidence is set exactly when the previous prediction turned out right.

The table must also serve a loop load that is dispatched many times before
its first instance commits. If `previous` were updated only at commit, every
in-flight instance would get the same, wrong, prediction. This design
therefore updates it speculatively:

* Every lookup hit advances `previous` to the address it predicted and
  increments the in-flight count.
* Training happens at commit, in program order, with the real address. It
  receives the hit flag and the prediction made at dispatch, carried in the
  ROB.
* A correct prediction sets confidence.
* A wrong one clears confidence and sets `stride = actual − last committed`.
  It then realigns `previous = actual + stride × (instances still in
  flight)`, so that the next lookup again predicts the right element.
* A training miss allocates the entry with stride 0 and confidence clear.

In the end-to-end test, this turns 0 of 98 predictions correct (with
commit-only update) into 70 of 70 correct. The test's run time drops from
8229 to 2221 cycles.

## Core organisation and timing (`tsd_core`)

```
 decoded group (8) ──► dispatch ─┬─► tsd_rename (map, free ring, DAT) ──► ROBP tags
                                 ├─► tsd_rob (alloc)           ▲ commit broadcast
                                 ├─► tsd_iwin ──► 8 × tsd_alu ─┼─► bypass / wakeup buses (12)
                                 │                             │      │
                                 ├─► tsd_lsq ◄─ addresses ─────┘      ├─► tsd_regfile (main only)
                                 │     ▲ predicted address            └─► tsd_rob done
                                 └─► tsd_vpred ◄── training at commit
                 tsd_lsq ◄──► data cache (4 ports, outside the core: mreq_* / mrsp_*)
```

* **Dispatch** takes one cycle and is all or nothing. The group is accepted
  (`in_ready`) when the ROB, the window and the load queue each have 8 free
  entries. Renaming, ROB allocation, predictor lookup and operand reads are
  combinational. The entries are written at the clock edge.
* **Issue and execute** take one cycle. The ALUs are combinational. A result
  broadcast in cycle *t* is captured at the edge, so a dependent instruction
  can issue in cycle *t+1*.
* **Loads**: requests leave in the cycle they are selected. Responses may
  come back in any order (`mrsp_*` tagged by ROB and load-queue entry) and
  are used in the cycle they arrive.
* **Commit**: up to 8 instructions per cycle in order, with at most 4 loads,
  because the predictor has 4 training ports. `cm_out_*` gives the committed
  PC, destination and value (read from the register file) in program order.
* `ev` (`tsd_events_t`) counts, per cycle: main executions and
  pre-executions, load pre-executions on predicted addresses, confident and
  correct predictions, grants, deferred writes and dropped bypass operands.

Reset is synchronous and active low. After reset, logical register *i* maps
to physical register *i*, every register holds 0, and registers
`NUM_LREGS..NUM_PREGS-1` are free.

### Parameters of `tsd_core`

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 8 | dispatch and commit width |
| `NUM_LREGS` | 32 | logical registers of the modelled class |
| `NUM_PREGS` | 48 | physical registers (must exceed `NUM_LREGS`; 34–112 are the sizes of interest, 96 is the conventional balance of ROB + logical registers split over two files) |
| `ROB_DEPTH` | 128 | reorder buffer entries |
| `IW_DEPTH` | 64 | instruction window entries |
| `LSQ_DEPTH` | 64 | load queue entries |
| `ALU_UNITS` | 8 | integer ALUs (issue width of the window) |
| `LDST_PORTS` | 4 | data-cache ports |
| `VHT_ENTRIES` | 1024 | predictor entries |
| `XLEN` | 32 | data width |

## Files

| file | contents |
|---|---|
| `rtl/tsd_pkg.sv` | operation enum, decoded-instruction struct `inst_t`, event struct |
| `rtl/tsd_core.sv` | top: dispatch, load split, result buses, commit |
| `rtl/tsd_rename.sv` | map table, free ring, DAT, ROBP lookup |
| `rtl/tsd_rob.sv` | reorder buffer, in-order commit, commit broadcast |
| `rtl/tsd_iwin.sv` | instruction window with grant, pre-execution and one-cycle bypass flags |
| `rtl/tsd_lsq.sv` | load queue with predicted, pre-executed and computed addresses |
| `rtl/tsd_vpred.sv` | stride address predictor |
| `rtl/tsd_regfile.sv` | physical register file |
| `rtl/tsd_alu.sv` | integer ALU |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_dmem_model.sv` is a behavioural cache/memory model |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog.

* `tb_tsd_core` runs the core at its default size. The program is 482
  instructions: a loop with two strided load streams that miss for 300
  cycles per new 32-byte line, plus dependent ALU work. A sequential
  reference model checks every committed value in program order. The test
  also requires each mechanism to have happened at least once: deferred
  writes, ROBP grants, ALU and load pre-executions, confident and correct
  predictions, pre-executions on predicted addresses, dropped bypass
  operands and dispatch stalls. The memory model reports up to 18 misses
  outstanding at once.
* `tb_tsd_core_pregs` runs a shorter version of the same program on four
  cores with 34, 64, 96 and 112 physical registers. Every commit is checked
  against the reference model. The test also requires that a larger register
  file never needs more deferred writes or more cycles than a smaller one.
  Results:

  | physical registers | cycles | deferred writes |
  |---|---|---|
  | 34 | 1852 | 320 |
  | 64 | 1265 | 288 |
  | 96 | 1242 | 256 |
  | 112 | 1236 | 240 |

  The gain flattens above 64 registers, as in the scheme's own measurements.
* `tb_tsd_rename` runs 400 random 8-wide groups against a queue-based model,
  with 34 physical registers, so registers are reused within a group.
* `tb_tsd_rob` checks random completion and in-order commit, including the
  per-cycle load limit.
* `tb_tsd_iwin` and `tb_tsd_lsq` are directed scenarios: pre-execution once,
  grant then main execution, the dropped bypass operand, back-to-back
  bypass, use of predicted addresses only while not granted, priorities and
  wrap-around.
* `tb_tsd_vpred` runs a strided stream with 12 instances in flight and a
  stride change.
* `tb_tsd_regfile` and `tb_tsd_alu` are random tests against models.

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_tsd_core -Irtl -Itb \
          rtl/tsd_pkg.sv tb/tb_tsd_core.sv -o sim
./obj_dir/sim
```

The RTL lints cleanly with `verilator --lint-only -Wall`, apart from
unused-bit warnings, and elaborates with the slang front end of yosys.

## Where this design departs from or goes beyond the scheme

* **One register class.** The scheme's processor has integer and
  floating-point files of equal size. Only the integer class is modelled, and
  a second class would be a second renamer and register file.
* **Small instruction set.** The core supports add, sub, and, or, xor, addi
  and load. There are no stores, no branches (so no misprediction recovery)
  and no multiply, divide or floating point. The load queue therefore holds
  loads only.
* **No front end or caches.** The front end and the cache hierarchy are
  outside the core. Decoded instructions enter at `in_inst`. The data cache
  is reached through a request/response port that is assumed always to
  accept. `tb_dmem_model` stands in for it in simulation (2-cycle hits,
  300-cycle misses, merging of misses to a line in flight).
* **This design's own choices:**
  * ROB-number source tags;
  * the data-capture window;
  * one pre-execution per instruction;
  * speculative predictor update, with training at commit;
  * at most 4 committed loads per cycle;
  * the all-or-nothing dispatch group;
  * single-cycle ALUs;
  * the port counts of the register file (24 read, 12 write).

  The scheme leaves all of these open.
* **Not modelled:** power-saving selection of which instructions consult the
  predictor. The scheme mentions it but does not use it in its main
  configuration.
