# Value-locality physical register management

In an out-of-order processor, many results are values that some physical register
already holds. Zero and one are by far the most common such values, and recent
results often repeat. A conventional renamer still gives each result its own
physical register, writes the value into it, and reads it back for every
consumer. This RTL removes that redundancy in three ways:

* **Static mappings for 0 and 1.** Physical registers P0 and P1 are reserved names
  for the constants 0 and 1. They take no storage. A result that is 0 or 1 is not
  written to the register file. Instead, its destination is re-mapped to P0 or P1.
  Its consumers learn the value from two state bits that travel with the wakeup,
  so they never read the register file for it.
* **Dynamic reuse of other values.** A Value Cache (a CAM of <value, register>
  pairs) finds a register that already holds the result's value. The destination
  is then re-mapped to that register. Reference counts let several logical
  registers share one physical register.
* **Early freeing with a partitioned free list.** The register given up by a reused
  result goes to a second free-list partition. That partition is used only when
  the normal partition is empty. Consumers that were already renamed to the
  given-up register can keep reading it. Only once it has been handed out again
  do they read through an Alias Table.

All of this saves physical registers: a file of 60 registers can stand in for a
conventional one of 80. The 0/1 mappings also save register-file writes and reads.
The design is a register-management subsystem: rename map, free list, reference
counts, Value Cache, Alias Table, an instruction window with value-state bits, and
the physical register file. The pipeline around it is not part of it: fetch,
execution units, reorder buffer and caches.

## What happens to a result at writeback

This is the core of the design (`reuse_ctrl`, wired up in `vl_regmgr`). At rename,
an instruction gets a fresh register `A` from the free list, exactly as in a
conventional machine. When its value `v` comes back, one of three things happens
in the same cycle:

| outcome | when | register file | rename map | counts / free list | consumers already waiting on `A` |
|---|---|---|---|---|---|
| `RU_STATIC` | `v` is 0 or 1 | not written | dest -> P0/P1 | `A` dropped to partition 1 | woken with value state ZERO/ONE; never read `A` |
| `RU_DYNAMIC` | the Value Cache holds `v` in register `M` | `A` **is** written | dest -> `M` | `M` +1, `A` dropped to partition 2, Alias Table entry `A -> M` | woken normally; read `A` (or `M` via the alias) |
| `RU_NONE` | new value | `A` written | unchanged | none | woken normally |

For a new value (`RU_NONE`), an entry `<v, A>` is also created in the Value Cache.

Some details matter:

* **The map is written only if it still points at `A`.** If a younger instruction
  has renamed the same logical register since, the re-mapping is skipped. The
  reuse itself still happens: counts, freeing and alias entry. Only the map write
  is skipped. `wb_final_preg` tells the core which register now holds the result.
  The core must keep that register for commit.
* **Dynamic duplicates are still written** (by default). Consumers renamed to `A`
  before the writeback hold the tag `A`. Writing `A` lets them read it directly
  for as long as `A` sits in partition 2. Leaving `A` unwritten
  (`SKIP_DUP_WRITE=1`) sends every such consumer through the Alias Table.
* **0/1 registers go straight back to partition 1.** No consumer ever reads them,
  so they need no protection.
* The order of the checks is: 0/1 first, then the Value Cache. Values 0 and 1 are
  never entered in the Value Cache.

## Keeping shared registers alive: reference counts and commit

`refcount_table` keeps one count per register:

- It is set to 1 when the register is allocated.
- It is incremented when a later duplicate is mapped onto the register.
- It is decremented when a committing instruction overwrites a committed mapping
  to the register.
- At zero, the register returns to partition 1. Its Value Cache entry is
  invalidated, and any Alias Table entries that redirect to it are freed.

To find the mapping that is being overwritten, `rename_map` keeps a second,
committed map next to the speculative one. Commit presents `(logical dest, final
register)`. The map returns the mapping it replaces, and that register's count is
decremented. All updates of one cycle (allocation, reuse increment, drop, commit
release) are combined into one next-count per register. So a register that commit
releases in the same cycle as a writeback reuses it simply stays alive.

P0 and P1 have no count and are never freed. At reset every logical register maps
to P0, i.e. holds 0.

## Giving registers back early: partitions and the Alias Table

This is the subtle part.

- A register in partition 2 still holds the duplicate value. Consumers that were
  renamed to it (they carry its tag) keep reading it.
- When partition 1 is empty, the allocator takes a register from partition 2
  (`alloc_from_p2`). At the same moment the window receives a **re-allocation
  broadcast** with that tag. Every waiting operand that is ready, holds that tag
  and has value state REG sets its **alias bit**.
- At issue, an operand with the alias bit set reads the register named by the
  Alias Table entry for its tag, not the tag itself.

This is safe for three reasons:

- The broadcast is sent in the rename cycle of the new owner. All consumers of
  the new owner enter the window later, so none of them is marked by mistake.
- The new owner writes the register at the earliest one cycle later. Until then,
  unmarked readers still see the old value.
- The alias target `M` stays allocated until its count reaches zero. That happens
  only when an instruction younger than every consumer of the value commits.
  Freeing `M` frees the alias entry, which can therefore no longer be needed.

One rule is this design's own: **a register whose alias entry is still live is
never given up a second time.** If its new owner's result is a duplicate too,
dynamic reuse is skipped and the result is kept as new. This way an entry is
never overwritten while older consumers may still use it. An assertion in
`alias_table` checks the rule.

## Operands that are never read: value-state bits

Every operand in `reservation_station` carries a two-bit value state:

| code | meaning |
|---|---|
| `VS_REG` | unknown: read the register file |
| `VS_ZERO` | the value is 0 |
| `VS_ONE` | the value is 1 |
| `VS_TWO` | the value is 2 (used only with `NUM_STATIC=3`) |

The state is set from the wakeup broadcast, or at rename when the source maps to
P0/P1. `phys_regfile` serves a known state with a constant and performs no array
read. It suppresses the array write of a 0/1 result. It counts performed and
saved reads and writes.

## Blocks and files

| file | role |
|---|---|
| `rtl/vl_pkg.sv` | value-state and reuse-outcome enums, value classification |
| `rtl/value_cache.sv` | CAM value -> register, one entry per register, invalidate on free |
| `rtl/refcount_table.sv` | per-register counts, free masks by cause, rebuild on flush |
| `rtl/partitioned_free_list.sv` | two bit-vector partitions, lowest-index grant, partition 1 first |
| `rtl/alias_table.sv` | <old, new, valid> per old register, zero-latency lookup |
| `rtl/rename_map.sv` | speculative and committed maps, conditional re-mapping |
| `rtl/reuse_ctrl.sv` | writeback decision (table above) |
| `rtl/reservation_station.sv` | window with ready, value-state and alias bits per operand |
| `rtl/phys_regfile.sv` | storage for P2..P(N-1) only, write suppression, read elimination, counters |
| `rtl/vl_regmgr.sv` | top: wires everything, keeps a ready bit per register, statistics |

## Top-level interface and timing (`vl_regmgr`)

The interface handles one operation of each kind per cycle:

- **Rename:** `rn_valid, rn_id, rn_lsrc[2], rn_ldest` -> `rn_preg`. The instruction
  is accepted when `rn_stall` is low. It stalls when no register or no window slot
  is free.
- **Issue:** `is_valid, is_id, is_opnd[2]`, accepted by `is_ack`. The lowest
  ready window entry issues.
- **Writeback:** `wb_valid, wb_preg` (the register given at rename), `wb_ldest,
  wb_value` -> `wb_final_preg, wb_kind`.
- **Commit:** `cm_valid, cm_ldest, cm_preg` (the final register), in program order.
- **Flush:** discards every uncommitted instruction. Other inputs are ignored in
  that cycle. The speculative map is restored from the committed map. Counts are
  rebuilt from the committed map, and the free list, Value Cache, Alias Table and
  window are cleaned up to match.
- **Statistics:** register-file writes and reads (performed and saved), rename-map
  writes from rename and from re-mapping, reuse counts, partition-2 allocations,
  reads through the Alias Table, issue cycles lost to a slow Alias Table, and the
  free-list occupancy.

All lookups are combinational and all state changes at the rising edge. This has
three consequences:

- An instruction renamed in cycle *t* with ready operands can issue in *t+1*.
- A consumer woken by a writeback in cycle *t* can issue in *t+1* and reads the
  new value.
- The Alias Table adds no cycle by default: it is the zero-latency variant.
  `ALIAS_PENALTY=1` adds one cycle before an instruction that reads through it
  issues.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_PREGS` | 60 | physical registers, including the reserved ones. 60 with reuse performs like 80 conventional registers; 80, 128 and 160 are the other evaluated sizes |
| `NUM_STATIC` | 2 | reserved constants 0..N-1 in P0..P(N-1). The encoding allows up to 3; with 3, the value 2 is also handled statically in P2. Both 2 and 3 are tested |
| `NUM_LREGS` | 32 | logical registers (Alpha integer file) |
| `XLEN` | 64 | value width |
| `ENTRIES` | 128 | window entries; keep it at least `NUM_PREGS` |
| `IDW` | 8 | width of the opaque instruction id |
| `DYNAMIC_REUSE` | 1 | 0 removes the Value Cache path, leaving only the 0/1 scheme |
| `TAG_UPDATE` | 0 | 1 rewrites source tags on re-allocation instead of reading through the Alias Table (see below) |
| `ALIAS_PENALTY` | 0 | 1 gives the Alias Table a one-cycle access (see below) |
| `SKIP_DUP_WRITE` | 0 | 1 does not write Value Cache duplicates to the register file (see below) |
| `ALIAS_FREE` | 0 | 1 selects the plain Alias Table scheme instead of the partitioned free list (see below) |

## Relation to the source design, and own choices

**Follows the published scheme:**

- the Value Cache behaviour;
- the reference-count rules;
- the partitioned free list and its allocation policy;
- the Alias Table entry lifetime;
- the conditional rename-map update;
- reserved storage-less registers for 0 and 1;
- the 2-bit operand value states;
- write and read elimination for 0/1.

**This design's own choices:**

- Single-ported. The reference machine is a 4-wide core with a 128-entry window,
  so a 4-wide core would need four rename, writeback and commit lanes, including
  dependences inside a rename group and several Value Cache lookups per cycle.
  None of that is built here.
- The static and dynamic schemes run together. The source evaluates them as
  separate alternatives; `DYNAMIC_REUSE=0` gives the 0/1-only one.
- The Value Cache and Alias Table have one entry per register, indexed by number.
  Their sizes and organisation are unspecified in the source.
- Lowest-index grant in the free list and lowest-index select in the window.
- The committed map, the flush/recovery behaviour and reset to P0.
- Dynamic reuse is blocked while an alias entry is live.
- Count width of 8 bits. The bound is 32 committed mappings plus a 128-entry
  window.

**Source-tag update (`TAG_UPDATE=1`).** The source also describes rewriting the
source tags of waiting instructions to the new register, instead of using alias
bits. The source rewrites at re-mapping time, which puts the Value Cache latency
in front of the wakeup. This design rewrites later, on the re-allocation broadcast
it already has. The broadcast then also carries the surviving register `M`, read
from the Alias Table by the register number being handed out. Matching operands
take `M` as their tag, and issue reads the register file directly. The Alias Table
remains, but only to remember `M`; it is off the operand read path.

**Plain Alias Table scheme (`ALIAS_FREE=1`).** Before the partitioned free list,
the source describes a simpler scheme and evaluates it next to it. The register
`A` given up by a duplicate is freed at once to partition 1 and is not written.
Every consumer already renamed to `A` reads `M` through the Alias Table. Here the
wakeup for `A` carries `wk_alias`, so those consumers set their alias bit as they
wake. The entry lifetime argument is the same as above. More consumers pay the
indirection than with the partitioned free list, which only matters if the table
is slow.

**One-cycle Alias Table (`ALIAS_PENALTY=1`).** The source also evaluates the plain
scheme with an Alias Table that costs a cycle, and finds it the slowest option.
That is `ALIAS_FREE=1` with `ALIAS_PENALTY=1`; the penalty also works with the
partitioned free list. Here the cost is modelled at issue. The first time an instruction with an aliased register operand
is selected, it holds the issue slot for one cycle without issuing (`is_alias_wait`,
counted in `stat_alias_stalls`). It issues when it is next selected.

**Skipping the write of duplicates (`SKIP_DUP_WRITE=1`).** The source notes that
a duplicate need not be written if the consumers already renamed to `A` are
redirected. It judges the saving doubtful, because of the cost of the redirection.
With this option, `reuse_ctrl` drops the write. The wakeup for `A` then carries
`wk_alias`, so every operand it wakes sets its alias bit at once (or, with
`TAG_UPDATE`, takes `M` as its tag). `A` still goes to partition 2, so the
lifetime argument above is unchanged.

**Not modelled:** bypass paths. The read counters count every operand served at
issue.

## Verification

Every block has a self-checking random testbench against an independent model
(`tb/tb_<block>.sv`). Three testbenches exercise the top:

- **`tb_vl_regmgr`** (default size). It plays the core: random instruction stream,
  random issue acceptance, writeback after 1-3 cycles in any order, in-order
  commit, periodic flushes. Every operand value delivered at issue is compared
  with an in-order golden model. It also checks the reuse decision and that no
  register leaks. Each mechanism must occur: 0/1 reuse, Value Cache reuse,
  skipped map writes, partition-2 allocation, alias reads, register stalls, saved
  writes and reads, flushes.
- **`tb_vl_regmgr_configs`** runs the same core model (`tb/regmgr_core_model.sv`)
  at 80, 128 and 160 registers, at 80 registers with only the 0/1 scheme, and at
  60 registers with three reserved values (0, 1 and 2), and at 60 registers with
  source-tag update, with duplicate writes skipped, and with the plain Alias Table
  scheme with a free and a one-cycle table.
- **`tb_vl_regmgr_fig6`** is a directed run of a twelve-result example: values
  0,1,1,0,-1,0,32768,0,1,2,3,2 end up in four registers plus P0/P1, and the
  register holding 2 has count 2. It also checks rename-to-issue and
  wakeup-to-issue timing.

Run any of them with plain Verilator (5.x), for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/vl_pkg.sv \
    tb/tb_vl_regmgr.sv --top-module tb_vl_regmgr -Mdir build
./build/Vtb_vl_regmgr
```

Each run ends with `TB_RESULT checks=N failures=M`. Internal assertions check
several invariants:

- no count underflow;
- no drop of a shared register;
- no double free;
- no overwrite of a live alias entry;
- every aliased read finds its entry.

Limits of the evidence: the instruction streams are random, with a value mix rich
in 0, 1 and repeated values. No real program traces are used. Synthesis has only
been taken to a generic gate-level netlist, with no timing or area study.
