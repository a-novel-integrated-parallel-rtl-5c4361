# Nested Parallel Accelerator (NPA)

Unit propagation is the core loop of a SAT solver. In a serial solver it is a work list.
Each time a literal becomes true, every clause that contains its variable must be
revisited. Any clause that is left with a single open literal forces a new literal, and
the loop repeats. The amount of work per step is small and unpredictable, and it depends
on data, so this loop fits neither SIMD units nor coarse software threads.

This accelerator runs the loop as **join-free nested threads**:

- A thread handles one small piece of work.
- It may **spawn** a group of child threads.
- It never waits for its children. It just ends.
- The only synchronisation point is global: the host waits until no thread exists
  anywhere, then reads one verdict bit.

Because nobody joins, a thread's state can be dropped as soon as it ends. The hardware
then only has to create threads very fast and keep many of them in flight while they wait
on memory.

The design splits every thread into two phases, and each phase runs on its own kind of
unit:

1. A **prologue** runs on a cheap Thread Reservation Station (TRS). It only computes
   addresses and loads the thread's irregular data, using nothing but `lui`, `add` and
   `lw`.
2. A **body** runs on a Thread Execution Unit (TEU). The TEU is a real RISC-V core, and
   it is shared by several TRSs.

With five TRSs per TEU, the memory latency of one thread overlaps with the execution of
another, without the cost of five full cores.

```
 host CPU ──spawn──► Control Unit ◄──spawn── TEUs (nested spawns)
                         │
                         ▼
              Spawn Waiting Buffer ── prefix sum over TRS Idle bits
                         │  one thread to every idle TRS per clock
                         ▼
                 dispatch link (5 clocks)
                         │
   ┌──────────── cluster 0 ─────────────┐        ┌── cluster 9 ──┐
   │ TRS0 … TRS4  ──ready──► TEU        │  ...   │               │
   │ code copy (stencil memory)         │        │               │
   └───────────────┬────────────────────┘        └──────┬────────┘
                   │  loads / stores / atomics          │
                   ▼                                    ▼
           request Omega network  ───►  8 cache banks (1 MB, 8-way, 5 clocks)
           response Omega network ◄───        │
                                       8 main-memory banks (100 clocks)
```

The default configuration is 10 TEUs and 50 TRSs, with the CPU as one more memory port.
`npa_top` builds all of the above except the host CPU. The CPU's three connections are
brought out as ports:

- a spawn port;
- the busy, done and conflict status;
- a memory port into the shared cache.

## Thread model and instructions

Three instructions are added in the RISC-V custom-0 major opcode (`0001011`). funct3
selects the instruction:

| funct3 | instruction | meaning |
|---|---|---|
| 0 | `spawn rs1, rs2, label` | create `rs2` threads. Each gets seed = `rs1` and a unique id 0…`rs2`−1, and starts at `label` (S-type immediate, an absolute byte address in the code copy). |
| 1 | `trs_halt` | end of the prologue. The thread is now ready for the TEU. |
| 2 | `teu_halt` | end of the thread. |

- **Start state.** A thread starts in its TRS with `a0` = seed, `a1` = thread id, and all
  other registers zero.
- **Conflict.** A thread reports a conflict by storing to address `0xFFFF_FFFC`. The store
  never reaches memory. Instead the Control Unit sets the verdict and halts everything.
- **Spawn timing.** After a `spawn` the TEU waits only until the Control Unit has
  accepted the command, then carries on with the same thread. The document also has a
  sentence saying a spawning thread vacates its TEU. This design follows the thread
  listings instead, which continue after the spawn.
- **Locking.** Updates that need mutual exclusion use RISC-V atomics (`amoadd.w`,
  `amoor.w`, …). The cache bank executes them, so they are atomic across the whole
  accelerator.

## Spawn Waiting Buffer and one-clock dispatch

This is the heart of the design (`swb.sv`, `prefix_sum.sv`).

**Entries.** The SWB is a FIFO of pending spawn commands. An entry holds the seed, the
label, the original count, and how many threads are still to be created.

**Prefix sum.** Every clock, the SWB sees the Idle bit of all 50 TRSs. A combinational
Kogge–Stone prefix sum gives each idle TRS its rank *r* among the idle ones (0, 1, 2, …),
and also gives the total.

**Numbering.** Idle TRS number *r* receives thread id `count − remaining + r` of the head
entry. So one clock creates as many threads as there are idle TRSs, and ids stay dense
and unique across clocks.

**Running out mid-clock.** The head entry may have fewer threads left than there are idle
TRSs. In that case the extra idle TRSs are served from the *second* entry in the same
clock, with rank *r − remaining*. Dispatch draws from at most two entries per clock. An
entry that runs out is popped.

**A full buffer.** When the SWB is full it refuses new commands. The spawning TEU, or the
CPU, simply waits in its `spawn` instruction. This is how "suspend further spawning" is
realised here.

**Handing out a thread.** A thread is only seed, id and label (96 bits). It travels to its
TRS through `dispatch_link`, a plain 5-stage pipeline per TRS lane. The TRS is marked
Running when it is granted, so it is never granted twice while a thread is still in
flight.

Timing:

- A spawn accepted in clock *t* can be dispatched in clock *t+1*.
- The thread arrives at its TRS in clock *t+1+5*.
- The TRS executes its first prologue instruction in the next clock.

## TRS, TEU and the cluster hand-over

**TRS (`trs.sv`).** The TRS holds one thread and its own 32-register file. It runs one
instruction per clock from the cluster's code copy. It knows only four instructions:
`lui`, `add`, `lw` and `trs_halt`. Anything else raises `illegal_o`. A `lw` goes out to
the shared cache, and the TRS waits for the answer. At `trs_halt` the TRS shows `ready_o`
and keeps its registers.

**Hand-over (`trs_cluster.sv`).** When the cluster's TEU is idle, a round-robin picker
chooses one ready TRS. In one clock, the TRS's whole register file and its pc (the
instruction after `trs_halt`) move into the TEU. The TRS turns Idle in that same clock
and can receive a new thread from the SWB. A ready TRS that finds the TEU busy just
waits. The `wait` event counts these clocks.

**TEU (`teu.sv`).** The TEU executes RV32I plus the word AMOs, `spawn` and `teu_halt`. It
is not pipelined: it finishes one instruction per clock. Loads, stores and AMOs hold it
until the cache answers. It fetches from the cluster's code copy, never from the cache.

**Code copy (`stencil_mem.sv`).** Each cluster has one copy of the thread code: 256 words,
one read port per TRS plus one for the TEU, and all reads combinational. The host fills
every copy at once through `code_we_i`, `code_addr_i` and `code_data_i`.

### Known limitation: a full SWB can deadlock

Holding a spawn back is not always safe. Suppose all of the following hold at once:

- the SWB is full;
- every TEU is waiting in a `spawn`;
- every TRS holds a ready thread.

Then no TEU is free to take a ready thread, so no TRS turns idle, and the SWB never
drains. The document says a fallback takes over when the SWB overflows, but does not
describe it, and none is built here.

With the default 16 entries, random formulas of the size of the smaller SAT benchmarks
(about 540 variables and 1800 clauses) reach this state. With `SWB_DEPTH` = 1024, the
same formulas run correctly and never use more than 35 entries. Size `SWB_DEPTH` for the
workload, or add a spill path to memory.

## Control Unit, busy and conflict

`control_unit.sv` arbitrates round-robin among the 10 TEUs and the CPU, and forwards one
spawn per clock to the SWB.

**Busy.** The accelerator is busy while any of these holds a thread:

- the SWB;
- the dispatch link;
- any TRS or TEU.

`done_o` pulses in the clock it becomes idle.

**Conflict.** A conflict store from any TEU does three things:

- sets the sticky `conflict_o`;
- gives one clock of kill to the SWB, the link and every TRS and TEU;
- leaves a unit with a memory access in flight busy until its response has drained, so
  that no stray response can reach a later thread.

The next CPU spawn made while idle clears the verdict.

## Memory system

Every TRS, every TEU and the CPU is a port into the memory system: 61 ports by default.
Each request is one word, tagged with the port number. The tag width is 9 bits, which
allows up to 512 ports.

**Request network (`omega_net.sv`).** This is an Omega network with log2(N) stages. Each
stage is a perfect shuffle followed by 2×2 switches. It is combinational and has no
buffers, and routing follows the destination bits.

- If two packets want the same switch output, one wins and the other is **not granted**.
- If the bank at the end cannot take a packet, that packet is not granted either.
- A packet that is not granted stays at its source, which retries in the next clock.

Which input wins a switch alternates with the clock, the switch number and the stage.
This prevents steady starvation in ordinary traffic. It is not a strict fairness
guarantee under a permanent hot spot.

- **Banks.** Bank *b* is attached at network output *b·(2^LOGN/8)*. The bank of an
  address is chosen by the line-address bits just above the 64-byte offset.
- **Responses.** They return over a second Omega network of the same shape, routed by
  the tag.

**Cache bank (`cache_bank.sv`).** There are 8 banks of 128 KB each. Every bank is:

- 8-way set associative, with 64-byte lines;
- write-back and write-allocate, with round-robin replacement.

How it works:

- The Omega network delivers at most one request per bank per clock.
- Requests wait in a 4-entry queue per bank. This is the per-bank queuing for
  simultaneous accesses.
- A bank starts at most one access per clock.
- A hit answers 5 clocks after it starts.
- A miss fetches the line from the bank's own main-memory bank, first writing back a
  dirty victim. It answers after 100 + 5 + 1 = 106 clocks.
- A bank handles one miss at a time.
- Stores and AMOs are answered too: a store with no data, an AMO with the old value.

**Main memory (`main_mem_bank.sv`).** There are 8 banks of 4 MB each, one per cache bank.
Each bank stores whole lines and answers a read 100 clocks later. A line index beyond the
capacity raises `mem_range_err_o`.

## Status outputs

`events_o` carries one bit per event each clock. These are the hooks for performance
counters:

- SWB full;
- more than one thread dispatched;
- dispatch from two entries;
- a ready thread waiting for its TEU;
- thread start and end on a TEU;
- a nested spawn;
- kill;
- an Omega request or response blocked;
- cache hit, miss, write-back and queued;
- main memory busy.

`swb_used_o` gives the SWB occupancy.

## The unit-propagation program used by the tests

`tb/sat_prog_pkg.sv` holds three things:

- a small assembler;
- the two thread routines;
- a serial reference solver.

**Memory image.** The image contains:

- a value word per variable (bit 0 = true, bit 1 = false);
- per literal, a clause count and a pointer to a clause list;
- per clause, a satisfied flag, a count of literals not yet false, the length, and the
  literals.

**Routines.**

- **PROPAGATE(L).** The TRS loads the clause count of L's variable. The TEU spawns that
  many ELIM_RESOLVE(L) threads.
- **ELIM_RESOLVE(L), thread i.** The TRS loads clause `list[i]` and its header. The TEU
  does one of two things:
  - marks the clause satisfied, if the clause holds L;
  - otherwise atomically counts one more false literal. When none is left, it reports a
    conflict. When one is left, it claims that literal's variable with `amoor.w`: it
    either spawns PROPAGATE for it, or reports a conflict if the variable was already
    set the other way.

The host writes the formula through the CPU memory port and spawns PROPAGATE for each
initial unit literal. Then it waits for `busy_o` to fall. The testbench compares the
verdict, and all variable values, with the serial reference.

## Simulating

Plain Verilator 5 runs everything. Compile the package first, and add
`tb/sat_prog_pkg.sv` for the two top-level tests:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/npa_pkg.sv tb/sat_prog_pkg.sv \
    rtl/prefix_sum.sv rtl/swb.sv rtl/dispatch_link.sv rtl/stencil_mem.sv rtl/trs.sv \
    rtl/teu.sv rtl/trs_cluster.sv rtl/control_unit.sv rtl/omega_net.sv \
    rtl/cache_bank.sv rtl/main_mem_bank.sv rtl/npa_top.sv \
    tb/tb_npa_top.sv --top-module tb_npa_top -j 8
./obj_dir/Vtb_npa_top
```

Use the same command with another `tb/tb_<block>.sv` and `--top-module` for each block.
`-Wno-fatal` keeps lint-style warnings from stopping the build.

Every testbench checks itself, has a watchdog, and ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it covers |
|---|---|
| `tb_prefix_sum` | a worked 16-TRS dispatch example and 300 random Idle patterns against a counted reference |
| `tb_swb` | thread ids, two-entry dispatch, full buffer, flush, against a software model |
| `tb_dispatch_link` | exact 5-clock latency, flush |
| `tb_trs` | the prologue instructions, ready/take, the n+2-clock timing |
| `tb_teu` | random RV32I/AMO programs against a reference interpreter, one clock per instruction |
| `tb_trs_cluster` | 300 threads through 5 TRSs and one TEU |
| `tb_control_unit` | one command per clock, a bound on how long a requester waits, busy/done, conflict kill |
| `tb_omega_net` | random traffic: every packet is delivered once to the right output |
| `tb_cache_bank` | loads, stores and AMOs against a memory model; the 5- and 106-clock latencies; dirty eviction |
| `tb_main_mem_bank` | the 100-clock latency, write-then-read, range flag |
| `tb_stencil_mem` | multi-port reads and writes |
| `tb_npa_top` | a reduced accelerator (4 TEUs × 3 TRSs, 4-entry SWB, 2 KB cache) on random formulas. It requires every mechanism to happen at least once: SWB full, multi- and two-entry dispatch, TEU wait, nested spawn, conflict kill, cache hit, miss, dirty write-back, bank queuing and Omega blocking. |
| `tb_npa_full` | the default configuration (10 TEUs, 50 TRSs, 1 MB cache) on the same workload |
| `tb_npa_bench` | the default configuration, except a 1024-entry SWB, on random formulas with the variable and clause counts of the four mutilated-chessboard SAT benchmarks (420–760 variables, 1391–2556 clauses) |

The full-size test takes a few minutes. Its formulas fit in the 1 MB cache, so only the
reduced test produces dirty evictions.

## Where this design departs from the document, or fills gaps

- **TEU.** The document asks for the complete RISC-V instruction set. The TEU implements
  RV32I and the word AMOs only. M, F/D, `lr`/`sc`, CSRs and `ecall`/`ebreak` raise
  `illegal_o`. The TEU is also not pipelined: it finishes one instruction per clock and
  stalls on memory.
- **Host CPU.** It is not included. Its interfaces are ports of `npa_top`.
- **Chosen here, not given by the document:**
  - instruction encodings;
  - the a0/a1 start registers;
  - the conflict address;
  - SWB depth (16), and dispatch from at most two entries per clock;
  - code-copy size (256 words);
  - line size (64 B), write policy and replacement;
  - queue depth (4), and one miss per bank at a time;
  - main-memory capacity (4 MB per bank);
  - a bufferless retry Omega network, plus a second network for responses;
  - round-robin choices in the Control Unit and in each cluster.
- **Dispatch link.** The document suggests a Mesh-of-Trees with buffering for the
  SWB-to-TRS connection. Here it is a per-lane pipeline with the same 5-clock latency.
  Each TRS receives at most one thread per clock, so no buffering is needed.
- **Spawning thread.** A spawning thread keeps its TEU and continues, as in the thread
  listings. It does not vacate the TEU.
- **Conflict.** It is signalled by a store to a reserved address, and it stops everything
  within one clock. Accesses already in flight drain.
- **Thread management.** The document gives the Control Unit four duties: creating spawn
  entries, allocating threads to TRSs, moving ready threads to TEUs, and reclaiming TEUs.
  Here the Control Unit does only the first. The SWB allocates threads to TRSs itself,
  and each cluster's picker does the TRS-to-TEU hand-over and reclaims its TEU at
  `teu_halt`. The observable behaviour is the same.
- **Addresses.** The accelerator uses physical byte addresses. The CPU's address
  translation, which the document says the accelerator shares, is not modelled.
- **Full SWB.** Spawning stalls and can deadlock (see the SWB section).
- **Larger configurations.** Up to 50 TEUs × 5 TRSs (301 memory ports), and 10 TEUs with
  1–7 TRSs each, are reached by parameters. Only the default size and the reduced test
  size have been simulated.
