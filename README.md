# ATX near-core accelerator complex: the Unified Transfer Engine

An out-of-order CPU core can use an accelerator placed next to its L2 cache
without managing it. The core issues one *ATX instruction* per accelerator
task. The instruction names a task type and carries a few runtime constants,
such as array base addresses and bounds. It returns the task's result in a
vector register, just as a load returns data. Everything between is done by
the **Unified Transfer Engine (UTE)**, one per core:

- it picks an accelerator instance that can run the task;
- it generates the task's memory reads from programmable, possibly dependent
  *streams*, and reads the L2 on the accelerator's behalf;
- it fills the accelerator's input buffer (scratchpad) and starts it;
- it returns the result to the core, tagged with the instruction.

The core only sees a long-latency load. Tasks may be issued speculatively and
out of order, and the core can squash them.

This repository holds synthesizable SystemVerilog for the UTE and for the
near-core accelerators (NCAs) it feeds. Every NCA is an example kernel that
sums the rows of a CSR sparse matrix. Self-checking testbenches are included
for every module.

## The picture in one paragraph

`atx_top` holds one `ute` and three `rowsum_nca` instances. Each NCA has two
32 KB input buffers (`input_buffer`), one per *PAcc port*, so the UTE can fill
one buffer while the NCA works on the other.

The core side has four parts:

- a task port (`task_in`, valid/ready);
- a squash port;
- a result port (`out_tag`, `out_data`, valid/ready) and an exception port;
- a configuration-register port (`cfg`, `cfg_rdata`, `cfg_err`).

The memory side is one L2 read port: request with tag, response with tag, in
any order, one 128-byte line per response. The L2, its TLB and the core are
not in this repository. The testbenches provide behavioural models of the core
and the L2.

```
 core ──task──► [VAcc→PAcc CAM]──┐
                [VAcc→Streams CAM]┴► InTaskQ ──dispatch──► Stream Units (32)
                 Task Predictor ──► (prefetch)           │ Access Queues
                                                         ▼
                          Stream Scheduler (oldest first, RR ties) ──► LDQ (128) ──► L2
                                                                          │
       ◄── OutQ ◄── PAcc ports (6) ◄────── Common Bus (128 B/beat) ◄───────┘
            ▲            │  ▲                    └──► Parent Data Queues of child streams
            │            ▼  │
            └──────── NCA 0..2 (2 × 32 KB buffers each)
```

## Tasks and their encoding (`atx_pkg`)

A task (`task_t`) is what one ATX instruction sends:

- a 4-bit tag (the instruction's slot in the core's 16-entry ATX queue);
- an 8-bit VAcc id, the *virtual accelerator*, that is, the task type;
- seven 64-bit runtime constants `c0..c6`.

The vector-register operand holds these as `{VAccId, c0..c6}` in 64-bit slots.
The result is one 512-bit vector register.

The core configures the UTE with writes of `cfg_req_t {op, vacc, stream, data}`:

| op | meaning |
|---|---|
| `CFG_CHECK_TYPE` | `cfg_rdata` = 1 next cycle if an NCA of type `data` is attached |
| `CFG_MAP_TYPE` | map VAcc `vacc` to NCA type `data`; all ports of that type become capable |
| `CFG_NUM_STREAMS` | number of streams of the task type |
| `CFG_SIZE` | element size of stream `stream` (1, 2, 4, 8 bytes) |
| `CFG_PARENT` | parent stream index, all ones for a root stream |
| `CFG_BEXP_BEG` / `CFG_BEXP_END` | 16-bit bound expressions of the stream |
| `CFG_STRIDE` | memory stride in elements (default 1) |
| `CFG_NCA_BASE` / `CFG_NCA_STRIDE` | scratchpad byte where the stream's data starts, and its stride in elements |
| `CFG_REMOVE` | free the VAcc in both tables |

Mapping a new VAcc when a table is full pulses `cfg_err`. The core turns that
into an exception.

`atx_top` gives NCA *n* the type identifier *n*+1. Both ports of an NCA share
that type. All three NCAs run the same row-sum kernel, but because the types
differ, a task type mapped to type *t* runs only on NCA *t*−1. This is how a
complex with three different accelerators behaves.

## Streams and bound expressions (the core of the design)

A stream reads elements of a fixed size. It reads from a begin address up to
an end address (exclusive), advancing by `size × stride`. One such pass is a
*repetition*.

- A **root** stream has one repetition. Its bounds are computed from the
  runtime constants.
- A **child** stream runs one repetition for each element that its parent
  delivers. The parent's element is what supplies the child's bounds.

This gives indirection and pointer chasing without the core. For a CSR matrix,
the row-pointer stream S1 is the parent of the value stream S2, and each row
pointer pair bounds one row of values.

Bounds come from **bound expressions** (`bexp_t`, 16 bits):
`Op1(I1, Op2(I2, I3))`.

- Bit layout: `op1[15:14] op2[13:12] I1[11:8] I2[7:4] I3[3:0]`.
- Operators: add, multiply, unsigned less-than (gives 0/1), shift left.
- Each operand is a 4-bit specifier:
  - 0–6: runtime constant c0..c6;
  - 7: zero;
  - 8: `parent[i]`;
  - 9: `parent[i+1]`;
  - 10: repetition index `i`;
  - 11: the stream's element size;
  - 12: one.

`bounds_alu` evaluates both bounds of a repetition combinationally.

For the row-sum task of 16 rows, with `c0 = &row_ptrs[r]`,
`c1 = &row_ptrs[r+16]`, `c2 = vals` and `c3 = 4`:

| stream | begin | end |
|---|---|---|
| S1 (8-byte row pointers, root) | `c0 + (0 + 0)` | `c1 + (esize + 0)`, which includes `row_ptrs[r+16]` |
| S2 (4-byte values, child of S1) | `c2 + parent[i] * c3` | `c2 + parent[i+1] * c3` |

### Inside a Stream Unit (`stream_unit`)

A Stream Unit has three parts:

- **Repetition initializer.** It holds the Parent Data Queue (PDQ) and a
  Bounds ALU. When the PDQ holds the entries a repetition needs, the
  initializer computes `beg`/`end`.
  - A repetition consumes one PDQ entry. It needs two entries when a bound
    uses `parent[i+1]`.
  - After the parent has finished, the stream ends once the PDQ no longer holds
    enough entries for another repetition.
- **Memory and scratchpad address generators.** Each steps by a fixed
  increment, one element per cycle. Scratchpad addresses continue across
  repetitions, so the values of consecutive rows land packed.
- **Access Queue.** Consecutive elements that fall in the same L2 line merge
  into one access (`access_t`: line, offset, count, steps, scratchpad address,
  element index).

The **PDQ** (1 KB by default, 128 eight-byte entries) receives the parent's
lines from the Common Bus.

- The L2 answers out of order, so the PDQ is written *by position*. Each access
  carries the index of its first element, and each PDQ entry has a valid bit.
  A repetition starts only when the entries at the PDQ head are valid.
- A parent may issue an access only when every child's PDQ has room for that
  access's elements, counting accesses still in flight. The UTE supplies this
  as `child_free`. This bounds how far a parent runs ahead of its children.

In prefetch mode, a leaf stream turns its accesses into L2 prefetch hints that
return nothing. Non-leaf streams still fetch real data, because their children
need it for address generation.

## Frontend: from instruction to dispatch

1. **Lookup.** An incoming task is looked up in both CAMs: `vacc_pacc_map`
   gives the capable-port mask, and `vacc_stream_map` gives the stream-table
   entry and the stream count. If either lookup misses, the task is not queued.
   `exc_valid`/`exc_tag` report it to the core.
2. **InTaskQ** (`intaskq`, 8 entries). This queue collapses on removal, so
   entry 0 is always the oldest. Each cycle it offers the *oldest task whose
   resources are free*: a capable, free PAcc port, and as many free Stream Units
   as the task has streams. A task waiting for a busy NCA therefore does not
   block younger tasks of another type.
3. **Allocators.**
   - `pacc_allocator` picks a free capable port and holds a busy bit per port.
   - `su_allocator` picks the first *n* free Stream Units and holds a busy
     bit per unit.

   Dispatch copies each stream's configuration, the constants and an age stamp
   into the Stream Units. It also records the port's Stream Units and streams.
4. **Squash.** A squash removes the tag from the InTaskQ. If the task is
   already running, its PAcc port handles the squash (see below).

## Backend: memory traffic

- **`stream_sched`.** Each cycle it picks one Stream Unit whose Access Queue
  has a head. It prefers the oldest task, by age stamp with wrap-around
  compare. Ties, that is, the streams of one task, rotate round-robin.
- **`ldq`** (128 entries). A data access takes a free entry. The entry index is
  the L2 request tag, so the number of entries bounds the outstanding reads.
  Prefetch hints take no entry. Answers come back in any order. Each one goes
  on the **Common Bus** as one beat (line + the recorded access + owning
  Stream Unit), and the entry is freed. When a task is squashed, its entries
  are marked, and their answers are dropped.
- **Inter-stream forwarding.** Each beat from a parent stream is also written
  into the PDQs of that stream's children.

## PAcc ports, NCAs and results

A **`pacc_port`** serves one task on one NCA input buffer.

- It forwards the Common Bus beats of its own Stream Units to the buffer.
  `input_buffer` unpacks a beat of `cnt` elements into scratchpad writes.
- Its **Task Status** is the set of its streams that have finished and whose
  data has all arrived. When the set is complete, the port requests its NCA.
- When the NCA is done, the port offers `{tag, result}` to the **OutQ**
  (`sync_fifo`, 8 entries). Once the OutQ accepts it, the port frees itself
  and its Stream Units, and it reports the task's input bytes to the predictor.
- A squash naming the port's tag does the following at any stage: it kills the
  NCA, flushes the Stream Units (their answers in flight are dropped), and
  frees the port. The NCA keeps no state between tasks, so nothing else needs
  cleaning.

**`rowsum_nca`** reads the row pointers at scratchpad byte 0. It reads the
values packed from byte `VAL_BASE` (1024). It sums each row, one value per
cycle, into one 32-bit lane of the 512-bit result: lane *k* holds row
`r_start+k`, and unused lanes are zero. The row count comes from the task
constants: `(c1 − c0) / 8`. When both of its ports have a task ready, it
alternates between them. While it runs on one buffer, the UTE fills the other.

## Task prefetching

When no real task can be dispatched in a cycle, the UTE may dispatch a task
in **prefetch mode**. Such a task gets Stream Units only, with no PAcc port.
It takes one of `PF_SLOTS` (2) prefetch slots, and its leaf streams only warm
the L2. There are two sources:

- **Assisted.** This is the oldest task waiting in the InTaskQ that has not
  been prefetched yet. Each queued task is prefetched at most once. This
  source helps when tasks arrive faster than NCA buffers free up.
- **Predicted** (`task_predictor`). This source helps when the core produces
  tasks too slowly. For each task type, the predictor keeps the last task's
  constants and the per-constant stride between the last two tasks. Each real
  task yields a predicted task `c + N × stride`.
  - The prefetch distance `N` shrinks as the average task input grows:
    1 above 32 KB, 2 above 16 KB, 4 above 8 KB, 8 above 4 KB, and 16 otherwise.
  - The average is a running mean of completed tasks' input bytes.
  - Assisted prefetches take priority.

`pf_enable` turns both sources off.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_NCA` | 3 | NCAs, two PAcc ports each |
| `N_SU` | 32 | Stream Units |
| `LDQ_N` | 128 | LDQ entries (outstanding L2 reads) |
| `LINE_BYTES` | 128 | L2 line and Common Bus width, at most 256 |
| `PDQ_BYTES` | 1024 | Parent Data Queue per Stream Unit |
| `BUF_BYTES` | 32768 | each NCA input buffer |
| `VAL_BASE` | 1024 | scratchpad byte where the row-sum NCA expects values |
| `INTQ_DEPTH`, `OUTQ_DEPTH` | 8, 8 | queue depths (in `ute`) |
| `MAP_N` | 16 | entries of each VAcc CAM (in `ute`) |
| `PF_SLOTS` | 2 | tasks in prefetch mode at once (in `ute`) |

Two smaller configurations of the engine are of interest:

- {8 Stream Units, 32 LDQ entries, 64 B bus, 256 B PDQ} is reachable by
  parameters.
- A 512-byte Common Bus is not. The access record's 8-bit offset and count
  fields limit `LINE_BYTES` to 256.

## Where this RTL departs from the design it implements

- **NCAs.** The design targets real accelerators: a sparse-matrix
  (SpMM/SDDMM) engine, an 8×8 double-precision GeMM engine and a decompression
  engine. None of them is here. All three NCAs are the row-sum example kernel.
  The row-sum kernel sums 32-bit integers, not floating point.
- **Output size.** Results are one 512-bit vector register. Outputs of up to
  two 1 KB tile registers are not supported.
- **Core side.** The core's ATX scheduler (ATX queue, reservation stations,
  issue), the single ATX port, the L2 cache and the TLB are outside this RTL.
  The L2 port carries virtual addresses and expects them translated behind it.
- **Stream flags.** The optional per-stream flags are not stored. Their
  meaning is not defined.
- **Prefetch policy.** Assisted and predicted prefetching are both built and
  share one enable. There is no switch that leaves only the predictor on.
- **Exceptions.** A task type that is mapped in neither table raises the
  exception at the UTE input. A table that is full raises `cfg_err`. Saving and
  restoring the CAMs on a context switch is left to software. The tables are
  plain registers and hold no process id.
- **Scratchpad overflow.** Keeping a task's data inside a 32 KB buffer is the
  software's job. Addresses past the buffer wrap. For the row-sum layout, a
  16-row task holds at most (32768 − 1024) / 4 = 7936 values.
- **Widths and encodings.** The bexp bit layout, operand codes,
  configuration opcodes, 48-bit addresses, queue depths, CAM sizes and all
  handshakes are this implementation's choices.

## Verification

Each module has a testbench `tb/tb_<module>.sv`. Each one compares against a
model written independently in the testbench, prints
`TB_RESULT checks=N failures=M`, and stops itself with a watchdog.
`tb/l2_mem_model.sv` is a behavioural L2: it answers in random order after
4–30 cycles and can apply back-pressure.

`tb_atx_top` runs the whole complex at its default sizes. The core model does
the following:

- configures three task types with the two-stream row-sum program;
- issues 40 tasks of 16 rows, and checks every lane of every result;
- squashes one task in flight and re-issues it;
- sends a task of an unmapped type and expects the exception;
- overfills the CAM and expects `cfg_err`;
- stops taking results for a while.

It counts and requires each of these at least once:

- out-of-order dispatch;
- access coalescing;
- double buffering;
- InTaskQ-full stalls;
- assisted and predicted prefetches;
- L2 prefetch hints;
- L2 back-pressure.

`tb_ute` runs the engine alone with 8 Stream Units and small queues.

To simulate with Verilator 5 (from the repository root):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/atx_pkg.sv tb/l2_mem_model.sv tb/tb_atx_top.sv -y rtl --top-module tb_atx_top
./obj_dir/Vtb_atx_top            # add +trace for a dispatch/result log
```

For a single block, list `rtl/atx_pkg.sv`, the block's file and its
testbench. Add `-y rtl` so the files of sub-modules are found.

With `-Wall`, Verilator reports two kinds of notice on the design:

- unused bits, meaning fields of the shared structs that some modules do not
  read;
- `rst_n` used both asynchronously and synchronously. The synchronous use is
  only the assertions' `disable iff`.

Neither points to a logic problem.
