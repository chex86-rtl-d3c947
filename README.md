# Capability-based memory safety injected at the micro-op level

Heap bugs such as out-of-bounds accesses, use-after-free and double free are
the starting point of most memory-corruption exploits. This design catches
them in hardware, for unmodified binaries, without compiler support. It does
not change the pointer format. Every heap block gets a *capability*: a base,
a bound, permission bits and a *valid* bit. Each capability is named by a
non-zero identifier, the PID. The hardware follows which register, and which
spilled memory word, holds a pointer into which block. It does so entirely
from the micro-op stream. When a load or store goes through such a pointer,
an extra micro-op is slipped in beside it, the way a microcoded x86 core
already expands complex instructions. The extra micro-op checks the access
against the capability.

The RTL here is the extension that sits beside an out-of-order x86 core. The
core itself (decoder, rename, scheduler, caches) is not part of it. The core
talks to the extension through plain signals on `chex86_top`.

## The life of a capability

1. **Generation.** System software registers the entry and exit addresses of
   the allocator (`malloc` and friends) in configuration registers.
   - When the first micro-op of the allocator's entry instruction is decoded,
     a `capGen.Begin` micro-op is injected. It carries a fresh PID and reads
     the size register (`rdi` by default). It creates the capability with
     *busy* set and the size as its bound.
   - At the allocator's return, `capGen.End` reads the result register
     (`rax`). It writes that value as the base, clears *busy*, and sets
     *valid* if the base is non-zero.
   - The result register is tagged with the PID from then on.
2. **Transfer.** Register moves and pointer arithmetic copy PIDs from source
   to destination according to a small rule table (see below). Stores copy a
   register's PID to memory, and loads bring it back.
3. **Validation.** A load or store whose base register carries a non-zero PID
   gets a `capCheck` micro-op. It looks the PID up and raises one of these:
   - out-of-bounds: address plus access size is outside `[base, base+bound)`;
   - use-after-free: *valid* is clear;
   - permission: the r/w bit is missing;
   - wild pointer: the PID is PID(-1), or a PID that was never generated.
4. **Free.** The deallocator's entry injects `capFree.Begin`.
   - It takes the PID of the argument register and sets *busy*.
   - A PID that was never generated, or is 0, is an *invalid free*. A
     capability already invalid is a *double free*.
   - The exit injects `capFree.End`, which clears *valid* and *busy*. It also
     sends an invalidation to the other cores. The capability stays in the
     table, so later uses are caught as use-after-free.
5. **Oversized allocations.** A `capGen.Begin` whose size exceeds a
   configurable maximum (1 GiB at reset) raises a size exception. This
   catches resource-exhaustion attacks.

An integer constant loaded into a register (`limm`) gets PID(-1). No
capability ever has that PID, so dereferencing a forged pointer is caught.

Capabilities are 128 bits: a 64-bit base, a 32-bit bound, 27 reserved bits,
then *busy*, *valid*, x, w and r (`chex_pkg::cap_t`). The capability for PID
`p` lives in a per-process table in memory at `cap_tbl_base + 16*p`. A small
fully associative capability cache holds the ones in use.

## Tracking pointers in the front end

`spec_ptr_tracker` sees each decoded micro-op, one per cycle. Everything it
does is combinational from the micro-op to its annotation (`uop_ann`), and
tags are written at the clock edge.

**Rule table (`pid_rule_db`).** There is one rule per {micro-op class,
register or immediate form}, 32 entries. The table is writable at run time,
so it can be corrected in the field. It resets to this set:

| micro-op | rule |
|---|---|
| mov r,r; and/add r,imm; sub (both forms); lea | PID(dst) = PID(src1) |
| and r,r; add r,r | PID(dst) = whichever source PID is non-zero (src1 if both) |
| load | PID(dst) = predicted PID of the loaded word |
| store | PID(memory word) = PID(data register) |
| limm | PID(dst) = PID(-1) |
| everything else | PID(dst) = 0 |

**Speculative tags (`pid_tag_file`).** The front end runs ahead of commit,
so each architectural register keeps two things:
- the *finalized* PID from the last committed writer;
- up to `DEPTH` (8) *transient* PIDs, each with the sequence number of the
  in-flight micro-op that wrote it.

Reads return the youngest transient PID, or the finalized one if there is
none. The other operations:
- **Commit** (`cm_seq`) promotes matching head entries to finalized.
- **Squash** (`sq_seq`) deletes every transient entry with a sequence number
  greater than the squash point.
- **Full.** When a register's vector is nearly full, the front end is stalled
  (`uop_stall`) until commits free space.

Sequence numbers are 16 bits and are compared with wrap-around. There are 32
tracked registers: 16 GPRs and 16 microcode temporaries.

## Spilled pointers: predicting and validating reloads

This is the subtle part. A pointer spilled to the stack and reloaded later
must get its PID back. The reloaded value is only known at execute, but the
check has to be injected at decode. The design therefore *predicts* the PID
at decode and *validates* the prediction at execute.

**Prediction (`reload_predictor`).** The predictor has 512 entries, indexed
by load PC, with a tag, a last PID, a stride and a 2-bit saturating counter.
- It predicts `last + stride` once the counter's upper bit is set.
- A 64-entry blacklist (`ptr_blacklist`) holds loads that turned out to read
  non-pointers. It suppresses predictions for them, so data loads do not
  disturb pointer loads.
- After a flush caused by a missed reload, a one-entry replay register makes
  the restarted load take the PID actually found.

**Validation (`alias_unit`).** When the load's effective address is known, its
actual PID is looked up, first hit wins:
1. the store PID buffer, for the youngest older store to the same 8-byte word;
2. only if the page's *alias-hosting* bit is set (supplied by the core's TLB
   on `ld_ah`): the 256-entry 2-way alias cache;
3. the 32-entry victim cache; a hit moves the line back into the alias cache;
4. the shadow alias table in memory, through the walker.

The prediction is then classified:

| predicted | actual | name | what happens |
|---|---|---|---|
| N | N | OK | predictor trained |
| N | 0 | PNA0 | `zi_valid`: the injected check becomes a zero idiom (the core drops it); load added to the blacklist |
| 0 | N | P0AN | `flush_valid` with `flush_seq` = the load's sequence number; the tracker squashes from the load itself; the core restarts at the load, which now gets PID N |
| M | N | PMAN | the load's destination tag is corrected to N in place; no flush |

In the PMAN case, PIDs that were already copied from the wrong tag to younger
registers are not corrected.

**Stores.** A store reports its PID at decode (`uop_ann.st_pid`). The core
enters it into the store PID buffer at execute (`st_*`). The buffer has one
entry per store-queue entry (56).
- Only committed stores leave the buffer, so wrong-path stores never reach
  the alias structures.
- A committed store with a non-zero PID, or to an alias-hosting page, updates
  the victim cache if the word is there, and otherwise the alias cache.
- It is then written through to the shadow alias table, and an invalidation
  goes to the other cores (`alias_inv_out_*`).

Setting the alias-hosting bit in the page tables is left to the core.

**Shadow alias table.** The table is five levels deep, indexed by virtual
address bits [47:39], [38:30], [29:21], [20:12] and [11:3], with 512 entries
of 8 bytes per level.
- An upper-level entry holds the next table's address in bits [47:12] and a
  present bit in bit 0.
- A leaf entry holds the PID of the pointer stored at that word.
- A read walk stops with PID 0 at the first absent level.
- A write walk links new zeroed 4 KiB pages from a bump allocator. The
  allocator starts at `alias_alloc` and is reloaded whenever that register
  is written.

## Checking the rule table (`hw_checker`)

The rule table is only as good as its rules. For profiling new code, a checker
co-processor takes a micro-op's result value and the PID the tracker gave it
(`chk_*` on the top). It then searches the capability table entry by entry,
starting at PID 1, for a block whose range contains the value. Freed blocks
count too. The search stops at the first hit, at the first PID never handed
out, or at PID(-1).
- No block found means the value is not a pointer into a tracked block, and
  the actual PID is 0.
- If the actual PID differs from the tracked one, `chk_mismatch` is raised
  with `chk_done`, and the PC and PID found are held for software to read.
  `chk_count` counts these reports.
- The rule table can then be corrected through the configuration registers.
- The checker reads the table through its own read-only port (`kmem_*`). A
  search costs one read per PID visited, so it is meant for profiling runs,
  not for normal operation.

## Context-sensitive enforcement

The mode register selects one of three modes:
- `OFF`: nothing is injected.
- `ALL`: every tracked dereference is checked.
- `REGION`: checks are injected only for instructions whose address lies in
  `[region_lo, region_hi)`, the security-critical code. Allocations and frees
  are still tracked everywhere, so a pointer created outside the region is
  still checked inside it.

## Top-level interface (`chex86_top`)

All ports are plain signals or `chex_pkg` structs. The core drives:

- **Decode.** `uop_valid`/`uop` (a `uop_t`) in; `uop_stall`, `uop_ann`,
  `inj_valid`/`inj` out, all combinational.
  - A micro-op is accepted in a cycle where `uop_valid && !uop_stall`.
  - `inj` is the injected capability micro-op. It carries the host micro-op's
    sequence number and the register whose value it consumes.
- **Capability execution.** `cx_valid/cx_ready/cx_op/cx_pid/cx_value/cx_size/cx_write`
  in; `cx_done/cx_exc/cx_done_pid` out.
  - For `capCheck` the value is the effective address; otherwise it is the
    register value.
  - One operation at a time. On a capability-cache hit, `cx_done` rises at the
    second clock edge after the accepting one. A miss adds one table read.
    Every change is written through before `cx_done`.
  - The core is expected to execute these micro-ops in program order at
    commit.
- **Load validation.** `ld_*` in (address, PC, sequence number, destination
  register, the prediction from `uop_ann.pred_pid`, alias-hosting bit); one
  at a time, with `ld_ready`.
  - The result is `rl_valid/rl_kind/rl_actual`, together with
    `flush_valid/flush_seq` or `zi_valid/zi_seq`.
  - On an alias-cache hit the result arrives two cycles after acceptance. A
    walk costs one memory access per level.
- **Stores, commit, squash.** `st_*` at execute; `cm_en/cm_seq` once per
  committed sequence number, in order; `sq_en/sq_seq` to squash everything
  younger than `sq_seq`.
- **Coherence.** `cap_inv_*` and `alias_inv_*`, in and out, to connect
  several cores.
- **Memory.** Two request/response ports: `cmem_*` (128 bits) to the
  capability table and `amem_*` (64 bits) to the alias table. A request is
  held until `req_ready`; the response is a one-cycle `rsp_valid`. Inside the
  top these are `shmem_if` interfaces, whose assertion checks that requests
  stay stable.
- **Rule checker.** `chk_*` request and report, `kmem_*` read port (see
  above).
- **Statistics.** `ev_*` pulses: capability hit and miss, alias hit, victim
  hit, walk step.

## Configuration registers (`chex_msr`)

Written with `msr_we/msr_addr/msr_wdata`; reads are combinational on
`msr_rdata`.

| address | register |
|---|---|
| 0x000 | mode (0 off, 1 all, 2 region) |
| 0x001 / 0x002 | region low / high |
| 0x003 | capability table base |
| 0x004 | alias table root |
| 0x005 | alias page allocator start (writing it restarts the allocator) |
| 0x006 | maximum allocation size (reset 1 GiB) |
| 0x100 + 4i + {0,1,2,3} | heap function slot i (8 slots): entry address, exit address, kind (1 alloc, 2 free), {result register << 8, argument register} |
| 0x200 + {class, imm} | rule table entry (`rule_e`) |

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `NUM_HEAP_FN` | 8 | registered heap-function slots (own choice) |
| `TAG_DEPTH` | 8 | transient PIDs per register (own choice) |
| `PRED_ENTS` | 512 | reload predictor entries |
| `CAP_ENTS` | 64 | capability cache entries, fully associative |
| `AC_ENTS` | 256 | alias cache entries, 2-way |
| `VC_ENTS` | 32 | victim cache entries |
| `SB_ENTS` | 56 | store PID buffer entries (= store queue size) |

## Design choices not fixed by the original description

- PIDs are handed out at decode by a counter that starts at 1 and skips 0
  and PID(-1). Squashed PIDs are not reused.
- Only one allocation and one free can be in progress at a time.
- A heap-function event takes the single injection slot ahead of a
  `capCheck`.
- Replacement: round robin in the capability cache, LRU in the alias cache,
  FIFO in the victim cache.
- A remote capability invalidation clears *valid* and *busy* in the cached
  line. A later check therefore reports use-after-free.
- The alias cache allocates lines only for non-zero PIDs.
- Store-to-load PID forwarding from the store PID buffer is an addition.
  Without it, a reload that overtakes its spill would always be mispredicted.
- Not built: a sequencer that creates capabilities for global variables from
  the symbol table. The core can issue `capGen` operations on the `cx_*`
  port for them.

## Files

- `rtl/chex_pkg.sv` holds the types, enums and register addresses.
- `rtl/shmem_if.sv` is the memory interface.
- Every other file in `rtl/` is one module, named after the file, with a
  header comment describing its timing.
- `tb/tb_<module>.sv` is a self-checking testbench for each module.
- `tb/shmem_model.sv` is a behavioural memory.
- `tb/tb_chex86_top.sv` runs the whole design at its default size. It uses a
  host-core model (`tb/chex_host.svh`) and a program (`tb/tb_chex86_top_prog.svh`).
  - The program covers malloc, pointer copies, checked accesses, an
    out-of-bounds access, spills and reloads with all four prediction
    outcomes, victim hits, walks, remote invalidations, capability-cache
    eviction, front-end stalls, a squash, free, use-after-free, double free,
    invalid free, a forged pointer, region mode and the rule checker.
  - It fails if any of these mechanisms never occurs.

## Simulating

With Verilator 5, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/chex_pkg.sv rtl/*[!g].sv tb/shmem_model.sv \
  tb/tb_chex86_top.sv --top-module tb_chex86_top -o sim
obj_dir/sim
```

The glob skips `chex_pkg.sv`, which is already listed. Listing the files
explicitly works too. For a single block, give the package, the block, any
sub-blocks it instantiates, and its testbench. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs. Simulation is two-state, so all state that is read is reset.
