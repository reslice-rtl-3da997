# ReSlice: replaying only the forward slice of a mispredicted value

In a thread-level speculative (TLS) processor, a task that read a value too
early, before an earlier task wrote it, is normally squashed and restarted from
its beginning. Often only a few instructions actually depend on the wrong
value. ReSlice records those few instructions while the task runs. That set,
the *forward slice* of the value, starts at the load that produced the value,
its *seed*. When the true value arrives, ReSlice replays only the slice in a
small side engine. It checks that the replay is guaranteed to produce what a
full re-run would, and then patches the registers and memory of the stalled
task. The task continues from where it was instead of being thrown away. If
the check cannot guarantee correctness, the task is squashed as before, so
ReSlice never changes the result, only the amount of wasted work.

This repository holds synthesizable SystemVerilog for the ReSlice hardware
attached to one core, plus self-checking testbenches. The core, the caches and
the TLS protocol are not included. Their side of every interface is a plain
port, and the end-to-end testbench supplies a small behavioural model of them.

## The pieces and how a slice flows through them

```
 fetch       rename          operand read              retire                    resolution point
  |            |                  |                       |                             |
 dvp <- tdb  slice_id_alloc   slicetag_logic          slice_buffer (IB, SD, SLIF)   reexec_ctrl
  (seed?)    (one-hot ID)     reg_slicetag_file       tag_cache  (store tags)        |
                              tag_cache (load tags)   undo_log   (old values)       reu  -> L1 / registers
```

* **Seed prediction** (`dvp`, `tdb`). When a task is squashed by a dependence
  violation, the violating address goes into a 4-entry CAM, the `tdb`. When
  the restarted task loads from that address again, the load's PC is entered
  into the 512-entry, 4-way dependence and value predictor (`dvp`) with full
  confidence. From then on, a fetch of that PC that hits a valid entry marks
  the load as a seed. If the two upper bits of its 4-bit confidence are both
  set, the predicted value (last value or last value plus stride) is used;
  otherwise the loaded value is used. Every 100,000 cycles all confidences are
  decremented, and an entry that reaches zero is dropped.
* **Slice IDs and SliceTags** (`slice_id_alloc`, `slicetag_logic`,
  `reg_slicetag_file`).
  * A seed gets a free one-hot slice ID at rename. There are 16 IDs, so 16
    slices can be buffered per task.
  * Every physical register carries a 16-bit SliceTag with one bit per slice.
  * At operand read, an instruction's tag is the OR of its two source tags
    (plus its own ID if it is a seed). A load's right-hand tag comes from the
    tag cache, or from the store queue when the core forwards it.
  * An operand is a *live-in* of a slice when the other operand belongs to the
    slice and this one does not. Per operand, that is `other & ~own`. Live-in
    values are the only outside data a replay needs.
* **Slice buffer** (`slice_buffer`). At retirement, a slice instruction is
  copied once, decoded, into the 160×40-bit Instruction Buffer (IB). Loads and
  stores also put their address in the next IB entry. Live-in operand values
  go into the 80×32-bit Slice Live-In File (SLIF). Each slice then gets one
  18-bit entry in its own Slice Descriptor (SD): 16 SDs of 16 entries each. An
  entry is:

  | field      | bits | meaning                                            |
  |------------|------|----------------------------------------------------|
  | `ib`       | 8    | IB index of the instruction                        |
  | `slif`     | 7    | SLIF index of this slice's live-in, if any         |
  | `taken`    | 1    | branch outcome in the original run                 |
  | `left_op`  | 1    | the left source is the live-in                     |
  | `right_op` | 1    | the right source is the live-in                    |

  An instruction in two slices is stored in the IB once, and each SD points
  at it. When that happens, both SDs get their *Overlap* bit. Buffering of a
  slice is abandoned in these cases:
  * its SD, the IB or the SLIF is full;
  * it reaches an indirect jump;
  * its tag-cache entry is evicted;
  * the undo log has no room for it.
* **Memory written by slices** (`tag_cache`, `undo_log`).
  * A retiring slice store writes its SliceTag into the 32-entry tag cache.
    The tag cache holds word address plus tag, 48 bits per entry.
  * A later store outside the slice overwrites that tag with zero but keeps
    the entry. "Entry without my bit" then means "my update is dead", while
    "no entry" means "nobody else wrote it".
  * The first update of a word by a slice also logs the overwritten value in
    the 32-entry undo log (address, value, tag).
* **Resolution** (`reexec_ctrl`, `reu`). When the real value of a seed is
  known, the pipeline stalls and `reexec_ctrl` compares it with the value the
  task used:
  * Equal: the task resumes.
  * Different, and the slice is not fully buffered: the task is squashed.
  * Otherwise the REU replays the slice. If the slice's Overlap bit is set,
    every other Overlap slice that was already re-executed in this task joins
    the replay, because the first replay may have changed their live-ins. More
    than three slices at once are not supported and cause a squash.

## The re-execution unit (`reu`)

This is the part that decides correctness, and the least obvious one.

**Replay.** The REU starts with a clean 16-register file and walks the SDs of
the one to three slices being replayed, one instruction per cycle.
* Each cycle it takes the smallest IB index among the slices' cursors, so the
  merged slices run in program order. Every cursor that points at that
  instruction advances.
* A source operand is taken from the SLIF only when every participating slice
  that contains the instruction names the same SLIF entry for the same operand.
  Otherwise the value comes from the REU's own registers, because another
  replayed slice has just recomputed it.
* The first SD entry is the seed, which produces the new seed value.
* Loads read the L1. Stores go to an internal store list: the L1 is not changed
  during replay. The store list also forwards to later loads and keeps, for
  each store, its address in the original run and in the replay.

**Checks during replay.** The replay is correct only if no instruction outside
the slice would have behaved differently. The L1 keeps per-word Speculative
Read and Speculative Write bits for the running task, so the REU can see what
the original run touched.

| failure          | detected when                                                                    |
|------------------|----------------------------------------------------------------------------------|
| branch           | a replayed branch goes the other way than recorded                               |
| inhibiting load  | a load moved to a new address that the task had written                          |
| inhibiting store | a store moved to a new address that the task had read or written                 |
| dangling load    | a load at its old address whose original producer store (in the slice) has moved |

**Merge.** Merge is reached only when every check passed.
* *Check pass (CHKUNDO).* This pass changes nothing. Each address the slice
  wrote originally but no longer writes, and whose tag-cache entry still shows
  the slice, must be restored from the undo log. The merge fails if:
  * the log has no entry for the address;
  * the entry was already used for an undo;
  * the slice wrote the address more than once;
  * the logged value was itself a live write of another slice.

  It also fails if any store that moved shares its old address with another
  store of the replayed slices.
* *Registers (MRGREG).* Each register the replay defined is written through
  the core's rename table into the current physical register, but only if
  that register's SliceTag still carries a replayed slice. Otherwise a later
  non-slice instruction has overwritten it.
* *Undo (MRGUNDO).* The undo values are written back to the L1.
* *Apply (MRGAPPLY).* The last replayed store to each address is written to
  the L1 if the tag cache has no entry for the address, or the entry still
  carries a replayed slice.

If any check fails, `fail` reports the class, nothing has been written, and the
task is squashed. The REU's reads must set Speculative Read in the L1, and its
merge writes must set Speculative Write, so that a later replay in the same
task sees them.

## Instruction format

The IB holds decoded instructions of a small RISC set, 40 bits each:

```
[39:36] opcode  [35:32] rd  [31:28] rs1  [27:24] rs2  [23:0] imm (sign-extended)
ADD SUB AND OR XOR SLT SLL SRL   rd <- rs1 op rs2
LD  rd <- M[rs1+imm]     ST  M[rs1+imm] <- rs2
BEQ BNE BLT (rs1, rs2)   JR (indirect: aborts buffering)   NOP
```

The left operand is `rs1`. The right operand is `rs2`, or the loaded memory
word for a load. Addresses are byte addresses of 32-bit words. A core with a
different ISA would re-encode this format and `reslice_pkg::alu`.

## Sizes

All defaults are the evaluated configuration; nothing is scaled down.

| structure         | default                    | where                                  |
|-------------------|----------------------------|----------------------------------------|
| slices per task   | 16 (one-hot 16-bit tags)   | `reslice_pkg::N_SLICES`                |
| SD entries        | 16 × 18 bits per slice     | `reslice_pkg::SD_ENTRIES`              |
| instruction buffer| 160 × 40 bits              | `reslice_pkg::IB_ENTRIES`              |
| slice live-in file| 80 × 32 bits               | `reslice_pkg::SLIF_ENTRIES`            |
| tag cache         | 32 entries, 4-way          | `tag_cache #(ENTRIES, WAYS)`           |
| undo log          | 32 entries                 | `undo_log #(ENTRIES)`                  |
| REU registers     | 16                         | `reslice_pkg::AREGS`                   |
| concurrent slices | 3                          | `reslice_pkg::MAX_CONC`                |
| predictor         | 512 entries, 4-way, 4 bits | `dvp #(ENTRIES, WAYS, CONF_BITS)`      |
| predictor decay   | every 100,000 cycles       | `dvp #(DECAY_CYCLES)`                  |
| violation CAM     | 4 entries                  | `tdb #(ENTRIES)`                       |
| physical registers| 90                         | `reslice_top #(N_PREGS)`               |

Average per-task use reported for SpecInt 2000 workloads is about 10 slices,
7 instructions per slice, 78 IB and 36 SLIF entries. That fits these sizes with
room to spare. Slices longer than 16 instructions (common in `gap` and `mcf`)
do not fit an SD. They are dropped, and their tasks fall back to a squash.
`tb_slice_buffer_workloads` builds one task per application from those
averages and checks both points.

## Where this design makes its own choices

These points are not fixed by the architecture description the design follows:

* **Replay engine.** The REU is a finite-state machine that executes one
  instruction per cycle and does one merge action per cycle. It is not a
  small in-order core.
* **Two extra merge rules.** The undo log's *chained* flag and the rule that a
  moved store must be the only replayed store that wrote its old address are
  additions. Without them, two slices that wrote the same word, or one slice
  that wrote a word twice, could restore a stale value. The end-to-end test
  finds such cases.
* **Retirement rate.** The slice buffer accepts one retiring instruction per
  cycle. The core modelled retires up to three, so a real integration needs
  either more write ports or a small queue in front.
* **Abort policy.**
  * A full SD, IB, SLIF or undo log abandons the affected slices.
  * So does the eviction of one of their tag-cache entries.
  * Eviction is round-robin per set, and the set index is the low word-address
    bits.
* **Register file ports.** The register SliceTag file has 3 read ports and 1
  write port. A core's issue width would need more.
* **Store-queue tags.** The store queue's SliceTags belong to the core. Its
  forwarded tag comes in on `or_lsq_tag`.
* **Predictor.**
  * The DVP is one instance per core; it is not a distributed table shared
    across cores.
  * Its value predictor is a last-value/stride hybrid with a 2-bit chooser.
* **Task boundaries.** A squash or `task_clear` empties every structure.
  Slice IDs are freed only then, or through `seed_free_*` for seeds squashed
  before retiring.

## Interfaces of `reslice_top`

Grouped by pipeline stage (see the port comments in `rtl/reslice_top.sv`):

* **Fetch** (`fe_*`): seed and value prediction for a load PC. `viol_*`,
  `ldchk_*` and `train_*` train the predictor.
* **Rename** (`rn_seed*`, `seed_free_*`): ID allocation.
* **Operand read** (`or_*`): physical source and destination registers, load
  address, store-queue forwarding. Outputs are the instruction's SliceTag and
  its live-in masks.
* **Retire** (`rt_*`): the instruction, its tag, operand values, address and
  branch outcome.
* **Resolution** (`rs_*`): seed ID, real value and a ready flag. Outputs are
  `squash`/`resume` and the failure class.
* **L1** (`mem_*`): reads with the word's Speculative Read/Write bits, and
  merge writes.
* **Register merge** (`mg_*`/`rf_*`): rename-table lookup by architectural
  register, and physical register write.
* **Counters**: correct predictions, re-executions, concurrent re-executions,
  salvaged tasks and squashes.

All logic is on one clock, with an asynchronous active-low reset. Lookups are
combinational, and state updates on the rising edge.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs.

| testbench              | what it checks                                                                      |
|------------------------|-------------------------------------------------------------------------------------|
| `tb_slicetag_logic`    | 2000 random tag pairs against the OR / AND-NOT formulas                             |
| `tb_slice_id_alloc`    | lowest-free allocation, exhaustion, freeing, clear                                  |
| `tb_reg_slicetag_file` | random writes and reads against a model array                                       |
| `tb_tdb`               | insert, match, FIFO replacement, duplicates                                         |
| `tb_tag_cache`         | allocation, overwrite, zero-tag kill, eviction report                               |
| `tb_undo_log`          | first-update logging, multi, undone and chained flags, overflow                     |
| `tb_dvp`               | seed marking, confidence threshold, value/stride prediction, decay (short period)   |
| `tb_slice_buffer`      | a two-slice overlap example, live-in placement, SD/IB overflow, indirect jump abort |
| `tb_reexec_ctrl`       | correct prediction, squash, overlap selection, more-than-three squash               |
| `tb_reu`               | directed replays for every failure class, merge undo/apply, concurrent slices       |
| `tb_reslice_top`       | end to end at default sizes (below)                                                 |
| `tb_slice_buffer_workloads` | per-application average slice, IB and SLIF demand fits; slices over 16 instructions are dropped |

`tb_reslice_top` (with `tb/reslice_harness.svh`) runs 1500 random tasks
through an in-order core model with a register file, memory and
Speculative Read/Write bits.
* Each task has one to three seeds. The predictor is trained first, and every
  seed must be predicted at fetch.
* After each resume, registers and memory must equal a full re-run of the task
  with the true seed values.
* It counts each mechanism and fails if any never happened: seed prediction,
  buffering, overlap, correct prediction, salvaged task, concurrent
  re-execution, register merge, undo, apply, each failure class, a too-long
  slice, tag-cache eviction and predictor decay.

It runs in well under a second and passed with 21 different random seeds.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -I. -Itb rtl/reslice_pkg.sv tb/tb_reslice_top.sv \
          --top-module tb_reslice_top -Mdir build/tb_reslice_top -o sim
build/tb_reslice_top/sim +verilator+seed+7 +verilator+rand+reset+2
```

Modules are found through `-Irtl`. Replace the name for any other testbench.

## Not included

Not included:
* the out-of-order core, with its rename table, store queue and checkpoints;
* the L1 with its Speculative Read/Write bits and the rest of the memory
  hierarchy;
* the TLS protocol that detects violations and orders tasks.

`reslice_top` expects these as described under Interfaces.
