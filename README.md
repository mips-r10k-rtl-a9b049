# R10K-style register renaming with a physical register file

This is the back end of an out-of-order core that renames registers the way the MIPS R10000
did. It uses no architectural register file and copies no values into reservation stations
or the reorder buffer. Every value, speculative or committed, lives in one **physical
register file** (PRF). Everything else in the machine holds only *tags*, which are physical
register numbers:

- the **map table** says which physical register currently holds each architectural register;
- the **free list** holds the physical registers nobody uses;
- the **ROB** records, for each instruction, the register it writes (`T`) and the register
  that held the same architectural register before it (`Told`);
- the **reservation stations** (RS) hold the input tags `T1`/`T2` and the output tag `T`;
- the **CDB** carries only the tag of the completing instruction.

The data paths are short: the PRF feeds the functional units, and the units write back into
the PRF. The cost of this scheme is recovery: speculative state is spread over the map table
and the free list, so undoing instructions means editing both.

## Sizes

| parameter    | default | meaning |
|--------------|---------|---------|
| `ARCH_REGS`  | 4       | architectural registers |
| `ROB_DEPTH`  | 8       | ROB entries |
| `PHYS_REGS`  | 12      | derived: `ARCH_REGS + ROB_DEPTH` |
| RS / units   | 5       | one station per unit: ALU, LD, ST, FP1, FP2 |
| `XLEN`       | 32      | data width (`r10k_pkg`) |
| `LAT_ALU`, `LAT_LD`, `LAT_ST`, `LAT_FP1`, `LAT_FP2` | 1, 1, 1, 3, 4 | execute cycles per unit |
| `NUM_CKPT`   | 4       | map-table checkpoints that can be live at once |

The rule `PHYS_REGS = ARCH_REGS + ROB_DEPTH` means the free list can never run dry while the
ROB has room for an instruction with a destination. At any time, each architectural register
owns one physical register, and each in-flight instruction with a destination owns one more.

## Why `Told` is what gets freed

An instruction cannot free its own destination when it retires, because that register now
*is* the architectural value. What it can free is `Told`, the register that held the same
architectural register before it. Every instruction that could read `Told` is older, so all
of them have retired by then. Take the example below, starting from the mapping r1→p1,
r2→p2, r3→p3:

```
add r2,r3,r1  ->  add p2,p3,p4   Told=p1   retire frees p1
sub r2,r1,r3  ->  sub p2,p4,p5   Told=p3   retire frees p3
mul r2,r3,r1  ->  mul p2,p5,p6   Told=p4   retire frees p4
div r1,r3,r2  ->  div p6,p5,p7   Told=p2   retire frees p2
```

`tb_rename_example` runs exactly this sequence and checks every tag.

## Pipeline and timing

| stage | what happens | where |
|-------|--------------|-------|
| D  dispatch | Read the source tags and ready bits from the map table, read the destination's current mapping (`Told`), take `T` from the free-list head. Write the RS entry, the ROB tail and the map table (the new mapping starts not ready). Stall if the unit's RS is busy, the ROB is full, or a destination is needed and the free list is empty. Stores take no register. | `r10k_core`, `map_table`, `free_list`, `rob`, `rs` |
| S  issue | An RS entry whose two inputs are ready issues to its unit if the unit can accept. It reads its operands from the PRF, and the entry is freed. | `rs`, `prf` |
| X  execute | The unit works for `LAT_*` cycles. Loads read the data cache in their last cycle. | `fu` |
| C  complete | One finished unit wins the CDB (`cdb_arb`, lowest unit first). It writes `PRF[T]`, broadcasts `T` (sets the map-table ready bit and wakes matching RS inputs) and marks its ROB entry complete. A store instead parks its address and data in the store buffer. | `cdb_arb`, `prf`, `map_table`, `rs`, `rob`, `store_buffer` |
| R  retire | If the ROB head is complete, `Told` goes back to the free-list tail and `T` is written to the architectural map. A store writes the data cache. A head that completed with an exception does not retire (see "Exceptions"). | `rob`, `free_list`, `arch_map`, `store_buffer` |

Two bypasses let back-to-back dependent work happen without a bubble:

- A tag on the CDB counts as ready in the same cycle, both in the RS (wakeup and issue in one
  cycle) and at dispatch.
- A PRF read of the register being written returns the new value.

Each unit holds one instruction. It can accept the next one in the cycle its result wins the
CDB.

The opening of the classic loop (`ldf X(r1),f1; mulf f0,f1,f2; stf f2,Z(r1); addi r1,4,r1;
ldf X(r1),f1`), dispatched one per cycle from cycle 1, runs as follows. `tb_r10k_core`
checks all of it. Physical registers are numbered from PR#1, and index k in the RTL is
PR#(k+1).

| cycle | event |
|-------|-------|
| 1 | ldf dispatched: T=PR#5, Told=PR#2; the LD station holds base PR#4+ |
| 2 | ldf issues; mulf dispatched: T=PR#6, Told=PR#3, waiting on PR#5 |
| 3 | stf dispatched, no register taken |
| 4 | ldf completes: PR#5 on the CDB, map f1 becomes ready, and mulf wakes and issues in the same cycle; addi dispatched: T=PR#7, Told=PR#4 |
| 5 | ldf retires: PR#2 returns to the free list and the architectural map records f1→PR#5. The second ldf is dispatched into the entry freed in that same cycle: T=PR#8, Told=PR#5 |

## Serial rollback (precise state)

Registers are written out of order at C. So the precise state is not kept in any register
file: it is rebuilt by editing the map table and the free list. The basic mechanism is serial
rollback. `rb_req` with `rb_idx` names the oldest ROB entry to discard; the reason does not
matter to the core (mispredicted branch, exception, interrupt). From the next cycle, one
entry per cycle is undone, youngest first:

1. its `T` goes back to the free list (at the tail);
2. its map-table entry is set back to `Told`; the ready bit comes from `Told`'s own state, so
   a restored mapping to a finished value is ready at once;
3. the ROB tail moves back over it.

Stores have no register to return.

In the first rollback cycle, every reservation-station entry and unit operation that belongs
to an entry being undone is dropped. The ROB's `squash_mask` drives this, and a dropped unit
never requests the CDB. Older instructions keep executing and completing during the
rollback. Dispatch and retire wait until `rb_busy` falls.

Undoing entries 3 to 5 of the loop above takes three cycles. Afterwards f1 maps to PR#5+
again and r1 maps to PR#4+, and the free list ends in PR#2, PR#8, PR#7.

The ready bit of the map table is kept per physical register, not per map entry, because
step 2 needs to know whether `Told` already holds its value. This matches the behaviour of
a per-entry "+" bit.

## Exceptions

Exceptions are taken at retire, so they are precise. The only source built in is a faulting
load. The data cache raises `dmem_fault` together with the data, for example on a page
fault. The load completes normally and writes its (meaningless) result, but its ROB entry
is marked. Younger instructions may use that result speculatively. When the marked entry
reaches the head:

1. it does not retire;
2. `exc_valid` is high for one cycle, and `exc_rob` names the entry;
3. a serial rollback undoes the whole ROB, the faulting load included, so the map table and
   free list return to the state just before the load.

The front end then restarts, at a handler or at the same load once the fault is fixed. An
exception overrides an `rb_req` or `ck_req` in the same cycle, because it discards
everything they would have. Interrupts need no separate path: `rb_req` on the ROB head does
the same.

## Checkpoint recovery (the fast path)

Serial rollback costs one cycle per discarded instruction. For instructions that are likely
to be wrong, such as branches predicted with low confidence, the core can instead keep a
checkpoint and recover in a single cycle. Rare events (page faults, interrupts) keep using
the cheaper serial path.

- **Taking a checkpoint.** Dispatch an instruction with `disp_ckpt` high. A free slot in
  `ckpt_table` saves the map table as it stands *after* that instruction's own rename, and
  the instruction's ROB index. Dispatch of a checkpointed instruction stalls while all
  `NUM_CKPT` slots are in use.
- **Counting.** From then on, every live slot counts the physical registers the free list
  hands out. Those are exactly the registers taken by younger instructions.
- **Restoring.** `ck_req` with `ck_rob` asks to discard everything younger than ROB entry
  `ck_rob`. If a slot holds that entry (`ck_hit`), then in that one cycle:
  1. the map table is reloaded from the slot;
  2. the free-list head moves back by the slot's count;
  3. the ROB tail is cut to just after `ck_rob`;
  4. RS entries and unit operations of the discarded instructions are dropped.

  The slot and every younger slot are then freed.
- **Why moving the head back works.** The registers allocated since the checkpoint still sit
  in the free-list storage just behind the head. Returns go to the tail. The tail can only
  reach those slots once the list has been refilled past them, and that cannot happen while
  the instructions holding those registers are in flight. The ready bits need no restore,
  because they are kept per physical register.
- **Fallback.** Without a live slot for `ck_rob`, the same request runs as a serial rollback
  of the entries after `ck_rob`. A serial rollback, whatever started it, clears every
  checkpoint: it returns registers to the tail, which the counts do not track.
- **Slot lifetime.** A slot is freed when its instruction retires.

`ck_req` must not be raised together with `rb_req` or while `rb_busy` is high. Dispatch and
retire wait in the restore cycle.

## Memory

The data cache is outside the core:

- a load reads it through `dmem_raddr`/`dmem_rdata` (combinational) in its last execute cycle;
- a store computes its address and data in the ST unit and keeps them in a one-slot-per-ROB-entry
  `store_buffer`; it writes the cache through `dmem_we`/`dmem_waddr`/`dmem_wdata` only when it
  retires.

So a rolled-back store never reaches memory. Loads do **not** check older stores that have
not retired yet. Memory ordering (the rest of a load/store queue) is not part of this design.
Anything that needs a load to see an earlier in-flight store to the same address must add it.

## Instruction interface

`r10k_pkg` defines the operations, the unit of each, and which slots they read:

| op | unit | reads | writes |
|----|------|-------|--------|
| `OP_ADD`, `OP_SUB` | ALU | rs1 (T1), rs2 (T2) | rd = rs1 ± rs2 |
| `OP_ADDI` | ALU | rs1 (T1) | rd = rs1 + imm |
| `OP_MUL` | FP1 | rs1, rs2 | rd = rs1 × rs2 (low 32 bits) |
| `OP_DIV` | FP2 | rs1, rs2 | rd = rs1 / rs2 unsigned; all ones if rs2 = 0 |
| `OP_LD` | LD | rs2 (T2, base) | rd = mem[rs2 + imm] |
| `OP_ST` | ST | rs1 (T1, data), rs2 (T2, base) | mem[rs2 + imm] = rs1 at retire |

The slot use for loads and stores follows the classic example (`ldf X(r1)` keeps r1 in T2,
`stf f2,Z(r1)` keeps f2 in T1). Integer operations stand in for the floating-point units.

`r10k_core` ports:

- **Dispatch.** `disp_valid`, `disp_op`, `disp_rd`, `disp_rs1`, `disp_rs2`, `disp_imm`. The
  instruction is taken at a rising edge when `disp_ready` is high; `disp_rob_idx` is its ROB
  entry.
- **Rollback.** `rb_req` and `rb_idx` (must name an entry in the ROB); `rb_busy`.
- **Checkpoints.** `disp_ckpt` with the dispatched instruction; `ck_req` and `ck_rob` (an entry
  in the ROB) to discard everything younger; `ck_hit` shows that a checkpoint served it.
- **Data cache.** `dmem_re`, `dmem_raddr`, `dmem_rdata`, `dmem_fault`, `dmem_we`, `dmem_waddr`,
  `dmem_wdata`.
- **Exceptions.** `exc_valid` and `exc_rob`.
- **Observation.**
  - `retire_*`: the retiring instruction, including `retire_value` read from `PRF[T]`;
  - `cdb_valid`/`cdb_tag`;
  - `arch_tag[]`, the architectural map.

After reset, architectural register i maps to physical register i, all registers hold zero,
and the free list holds registers `ARCH_REGS`..`PHYS_REGS-1` in increasing order.

## Files

| file | block |
|------|-------|
| `rtl/r10k_pkg.sv` | opcodes, unit classes, operand conventions |
| `rtl/r10k_core.sv` | top: wiring of D/S/X/C/R, rollback, checkpoints and exceptions |
| `rtl/map_table.sv` | speculative map with ready bits, rename, restore, reload |
| `rtl/arch_map.sv` | committed map |
| `rtl/free_list.sv` | FIFO of free physical registers, head rewind |
| `rtl/rob.sv` | reorder buffer of T/Told, retire, exceptions, serial rollback, checkpoint cut, squash mask |
| `rtl/ckpt_table.sv` | map-table checkpoints and allocation counts |
| `rtl/rs.sv` | reservation stations with tag wakeup |
| `rtl/prf.sv` | physical register file with write-through |
| `rtl/fu.sv` | functional unit (parameterised latency) |
| `rtl/cdb_arb.sv` | CDB arbiter |
| `rtl/store_buffer.sv` | store address/data held until retire |

Every file in `tb/` is a self-checking testbench. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. The unit testbenches compare their
block with a behavioural model under random stimulus. `tb_r10k_core` runs the loop
walkthrough and the rollback above. It then runs a 4000-instruction random program with
random serial rollbacks and checkpoint restores, checking every retirement against an in-order reference interpreter. It
also requires each mechanism to occur at least once:

- reservation-station, ROB-full and free-list-empty stalls;
- wakeup and issue in one cycle;
- CDB conflicts;
- undo steps and dropped unit operations;
- exceptions at retire from faulting loads;
- single-cycle checkpoint restores, fallbacks to serial rollback, and stalls on a full
  checkpoint table;
- loads, stores, and dispatch into a full ROB on retire.

`tb_rename_example` runs the add/sub/mul/div example. The core testbenches use the default
sizes.

To simulate, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/r10k_pkg.sv tb/tb_r10k_core.sv \
          --top-module tb_r10k_core -o sim && ./obj_dir/sim
```

Substitute any other `tb/tb_*.sv` and its module name. A lint-only check of the top is
`verilator --lint-only -Wall -Irtl -y rtl rtl/r10k_pkg.sv rtl/r10k_core.sv`.

## Departures and limits

- **Checkpoint details are this design's own.** The slot count, the free-list head rewind,
  the fallback to serial rollback and the clearing of slots by a serial rollback are choices
  made here. There is no branch unit; the front end decides which instructions get a
  checkpoint and when to restore.
- **Squash timing.** Squashed RS entries and unit operations are dropped in the first
  rollback cycle, not one by one with their ROB entries. Retire also pauses during rollback.
- **Exceptions.** Faulting loads are the only built-in source. The architectural map is kept
  and observable, but nothing copies it back into the map table: recovery always goes through
  serial rollback or a checkpoint.
- **The CDB carries the ROB index.** It carries it next to the tag, so the ROB can mark
  completion.
- **Units and latencies are placeholders.** Only the load's one execute cycle is pinned down
  by the walkthrough.
- **Loads do not see in-flight stores.** See "Memory".
- **Reservation stations.** There is one per unit. A unit executes one instruction at a
  time, and the CDB arbitration is fixed-priority.
- **Flip-flop storage.** The PRF, map tables and ROB are flip-flop arrays with combinational
  reads.
