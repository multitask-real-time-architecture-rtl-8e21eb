# A time-predictable multithreaded processor that never waits for memory

Classic precision-timed (PRET) processors avoid pipeline hazards by
interleaving hardware threads: with as many threads as pipeline stages, each
stage holds an instruction of a different thread, so no instruction ever
depends on one still in flight. That scheme breaks down at two points: real
systems have many more threads than stages, and a load or store to main memory
takes an unpredictable number of cycles that the thread's time slot has to
absorb as bubbles.

This design solves both with one idea: **a thread that needs IO leaves the
pipeline, and a ready thread takes its place at once.** The pipeline never
performs a load or store. It records which registers take part in an *IO
register*, and hands the thread's complete register state to a thread
controller. A separate memory unit performs the transfer while other threads
run. When the transfer ends the thread becomes ready again and waits to be
scheduled back in. As long as enough threads are ready, the pipeline runs
without a single stall, and memory timing is hidden from it completely.

The RTL implements the platform as it was published: a six-stage interleaved
pipeline with ten register banks, the Thread State Controller (TSC), the
Thread State Memory (TSM), the Dynamic Interleave Controller (DIC) and the
Memory Access Control Unit (MACU). The published description fixes the block
structure, the queues and the exchange procedure. It gives no instruction set,
no encodings, no scheduling formula and no handshakes. Those are this design's
own choices, and each is marked as such below and in the file headers.

## Slots, banks and thread IDs

The pipeline has ten *slots*. Each slot owns one register bank and holds at
most one thread at a time. Three ID streams describe the threads:

| stream | held in | content |
|---|---|---|
| Main ID Stream (MIDS) | TSC, `mids[10]` + `slot_active` | system thread ID (0..127) in each slot |
| Processor ID Stream (PIDS) | TSC, `pids[10]` | register bank used by each slot |
| Shadow ID Stream (SIDS) | TSC, 10-entry queue | the next ready threads, already chosen |

The Shadow State Queue (SSQ, 10 entries) holds the register states of the SIDS
threads, read from the TSM in advance. When a thread leaves, its replacement's
ID and registers are therefore already on hand. PIDS is a fixed table,
slot *k* → bank *k*: a slot keeps its bank, and the bank is reloaded
whenever the slot changes thread.

A thread's *state* (`tstate_t`, 498 bits) is R1..R15, the program counter and
an 8-bit scheduling key. R0 always reads as zero. The state is either in a
register bank (the thread is active) or in the TSM (the thread is offline).

## Issue: fixed windows or shared windows

The ThId stage issues one instruction per cycle. A slot may issue again only
after its previous instruction has left Writeback, which is six cycles later.
That single rule removes every data and control hazard: there is no forwarding,
no branch prediction and no stall logic.

* `io_share = 0`, **fixed windows**: a strict round robin over all ten slots.
  Every thread issues exactly once every ten cycles. A slot whose thread is away
  on IO issues a bubble, so the timing of the other threads does not depend on
  anyone's IO.
* `io_share = 1`, **shared windows**: the round robin skips empty slots and
  slots still in flight. The remaining threads use the freed issue cycles.
  With six or more threads present the pipeline issues every cycle. With fewer,
  each thread issues every six cycles, one pipeline depth.

## Leaving and entering the pipeline (the context change)

This is the core of the design. Take an instruction of slot *s* issued in
cycle *t*:

| cycle | stage | what happens |
|---|---|---|
| t | ThId | slot chosen, PC read from bank `pids[s]` |
| t+1 | Fetch | program memory read (synchronous) |
| t+2 | Decode | operands read. A load, store or EndTask is recognised here and is not executed. |
| t+3 | Execute | ALU and branch. For a load or store, the IO register (IOR) is built. |
| t+4 | Memory | **the TSC decides whether the thread leaves** |
| t+5 | Writeback | register and PC written, unless the instruction was killed |

In cycle t+4 the TSC takes the thread out (`m_kill`) if the instruction is a
load/store or EndTask, or if the slot is marked for preemption. In that same
cycle it:

1. pushes `{ID, reason, IOR}` into the ThId Temp Queue (IDQ), and pushes the
   bank's content into the Register Temp Queue (RTQ). The saved PC points past
   a load/store, and at the killed instruction for a preemption.
2. if the SSQ is not empty, pops the SIDS and SSQ heads. The new ID goes into
   `mids[s]` and the new state goes into the bank at the clock edge. The new
   thread's first instruction can issue in cycle t+5.
3. if no shadow thread is ready, marks the slot empty. An empty slot is filled
   later, in any cycle in which a shadow thread exists and the slot has nothing
   in flight.

Because a slot has at most one instruction in flight, a bank is never loaded
while another instruction of its thread is still in the pipeline.

**Shadow fill.** While SIDS has room, the TSC raises `fill_req`. In the same
cycle the DIC answers with the best ready thread. Its ID enters SIDS, its
state is read from the TSM, and the state enters SSQ one cycle later. The
fill waits while read data is still queued in the MMDQ. This ordering ensures
that a thread's load result is in the TSM before the thread's state is fetched
again.

**Draining.** The TSC pops one IDQ/RTQ pair per cycle:

* IO: the state goes to the TSM. An IO packet goes to the IO queue (IOQ). The
  packet holds the ID, the key, R/W, the value of the address register, the
  value of the data register and the index of the data register.
* preemption: the state goes to the TSM and the ID goes back to the ready pool.
* EndTask: `thend_valid`/`thend_id` pulse. The ID is free.

The TSM has one write port. Its priority order is IDQ drain, then MMDQ (load
results), then the external thread-launch port. Since at most one thread leaves
per cycle and the drain takes one per cycle, the IDQ never holds more than one
entry. The ten-entry depth matters only for the bursts of a full context
change.

## The IO register

Each load or store produces a 32-bit IOR. Its fields are, from the most
significant bit down:

```
bit 31      : unused (the position R0 would have)
bits 30..16 : address register, one-hot, R1 at bit 30 ... R15 at bit 16
bits 15..1  : data register, one-hot, R1 at bit 15 ... R15 at bit 1
bit 0       : R/W, 1 = read (load), 0 = write (store)
```

The field order is published. The bit numbering and the R/W polarity are this
design's choice. An all-zero register field means R0, which is the value 0.

## The memory side: DTM, MACU, MMDQ

The MACU copies one packet per cycle from the IOQ into the Data Temporary
Memory (DTM). The DTM has one entry per thread ID, since a thread has at most
one IO outstanding, so it can never overflow. Whenever the MACU is idle it picks
one waiting packet and runs it on the global-memory port. It keeps one transfer
outstanding at a time. When the response arrives:

* for a read, `{ID, destination register, data}` goes into the Main Memory
  Data Queue (MMDQ). The TSC writes the data into the thread's saved state in
  the TSM. The MMDQ sits inside the TSC.
* the thread's ID and key go to the DIC's ready pool.

The global memory itself (DRAM or any device) is outside the design. Its port
is a valid/ready request (`we`, `addr`, `wdata`). Each request, read or write,
gets exactly one response beat (`mem_rsp_valid`, `mem_rsp_rdata`). The MACU
holds a read response off while the MMDQ is full.

## Scheduling (DIC and MACU)

Both controllers aim to keep as many threads ready as possible. The published
criteria are memory intensity, access time and deadline, but no formula is
given. This design reduces them to one 8-bit **scheduling key** per thread,
given at launch and carried with the thread's state. Both units offer two
policies:

* policy 0: first come, first served, by the cycle the thread or packet arrived;
* policy 1: smallest key first, oldest first among equal keys.

Remaining ties go to the lower thread ID. The DIC keeps its ready-to-go queue
(RGQ) as a ready bit, key and arrival stamp per thread. It picks the best entry
on demand, which gives the same order as re-sorting the queue whenever a thread
arrives. Both selections are linear scans over 128 entries. They are simple and
exact, but they form the longest combinational paths of the design.

## Full context change (DIC mode 1)

With `dic_mode = 1` the DIC pulses `ev_cc` every `QUANTUM` cycles (default
600, this design's choice) while at least one thread is waiting. The TSC then
marks every active slot. Each marked slot is preempted when its next
instruction reaches Memory, but only if a shadow thread is ready to replace it.
Within one round of the pipeline, all ten threads can thus be exchanged for new
ones. This gives fair time-sliced access when more threads are ready than there
are slots. In mode 0, threads change only on IO and EndTask.

## Instruction set (this design's own)

32-bit words: `[31:28] opcode, [27:24] rd, [23:20] rs1, [19:16] rs2, [15:0] imm`
(immediate sign-extended). The program memory holds 1024 words, is shared by
all threads and is written through `imem_*`. `prt_pkg::mk_instr` builds words.

| op | mnemonic | effect |
|---|---|---|
| 0 | NOP | |
| 1 / 2 | ADD / SUB | rd = rs1 ± rs2 |
| 3 | ADDI | rd = rs1 + imm |
| 4 / 5 / 6 | AND / OR / XOR | rd = rs1 op rs2 |
| 7 / 8 | BNE / BEQ | if rs1 ≠ / = rs2: pc = pc + imm |
| 9 | LD | rd = mem[rs1] (the thread leaves the pipeline) |
| A | ST | mem[rs1] = rs2 (the thread leaves the pipeline) |
| B | EndTask | last instruction of the thread |

Codes C..F execute as NOP. Program counters count words.

## Using the top (`prt_top`)

1. Hold `rst_n` low, then release it.
2. Write the code through `imem_we/imem_waddr/imem_wdata`.
3. Start each thread with `launch_valid`, `launch_id` (0..127, unique),
   `launch_pc` and `launch_key`. The launch is taken in a cycle where
   `launch_ready` is high. All registers start at zero.
4. Connect `mem_*` to a memory.
5. Each EndTask is reported on `thend_valid/thend_id`.

A thread ID may be launched again once it has ended.

Status and event outputs: `slot_active`, `ready_count`, `macu_busy`, and
one-cycle pulses `issue`, `retire`, `ev_exit` (a thread left), `ev_swap` (it
was replaced in the same cycle), `ev_fill` (an empty slot was filled),
`ev_cc`, `ev_preempt`.

Fixed sizes live in `rtl/prt_pkg.sv`: 6 stages, 10 banks and 10-entry queues
(all published), and 128 threads, 32-bit data, 10-bit PC and 8-bit key (chosen
here). `QUANTUM` is a parameter of `prt_top` and `prt_dic`. At these sizes the
design synthesises to about 10k flip-flops plus 124 kbit of memory arrays: the
TSM, the DTM and the program memory.

## Files

| file | block |
|---|---|
| `rtl/prt_pkg.sv` | constants, state/IOR/packet types, opcodes |
| `rtl/prt_top.sv` | the platform |
| `rtl/prt_pipeline.sv` | six-stage interleaved pipeline, program memory |
| `rtl/prt_regbanks.sv` | ten register banks with bulk load/save |
| `rtl/prt_ior_enc.sv` | IO register encoder |
| `rtl/prt_tsc.sv` | Thread State Controller (ID streams, all queues, context change) |
| `rtl/prt_fifo.sv` | queue used for SIDS, SSQ, IDQ, RTQ, IOQ, MMDQ |
| `rtl/prt_tsm.sv` | Thread State Memory |
| `rtl/prt_dic.sv` | Dynamic Interleave Controller and ready pool |
| `rtl/prt_macu.sv` | Memory Access Control Unit |
| `rtl/prt_dtm.sv` | Data Temporary Memory |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_prt_fig6.sv` | five-thread comparison of fixed and shared windows |
| `tb/prt_gmem_model.sv` | behavioural main memory with fixed latency (testbenches only) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/prt_pkg.sv tb/tb_prt_top.sv --top-module tb_prt_top
./obj_dir/Vtb_prt_top
```

Replace `tb_prt_top` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/prt_pkg.sv rtl/prt_top.sv`.

## What the tests show

`tb_prt_top` runs the platform at its default parameters. 40 threads share the
ten slots. Half of them are IO bound: four loads, a sum and a store. The other
half are compute bound: a 30-iteration loop and a store. Main memory answers
after 100 cycles. The workload runs three times from reset: fixed windows,
shared windows, and shared windows with full context changes and key-ordered
scheduling.

After each run, every result word in memory is compared with its closed-form
value. Every thread must have ended exactly once, and the memory must have seen
exactly the expected reads and writes. Across the runs the test also requires
that each of these mechanisms occurs at least once: same-cycle exchange, exit
with no replacement, refill of an empty slot, fixed-window bubbles, shared
issue past empty slots, CC pulses and preemptions. In shared mode the pipeline
must issue in every cycle in which six or more threads are present.

Each run takes about 12,400 cycles. This workload is bound by the single
outstanding memory transfer, so sharing gains only a few cycles here. The gain
grows with the share of compute between IOs.

`tb_prt_fig6` runs a small scene, also at the default parameters. One thread
reads eight words one by one, and four compute threads each run a 100-iteration
loop. The compute threads are named DCT, LMS, FFT and ADPCM after classic
embedded benchmarks, but their code is only a stand-in loop. The scene runs once
with fixed windows and once with shared windows. While the IO thread is away:

* with fixed windows, every compute thread issues exactly once per 10 cycles,
  and the absent thread's slot issues bubbles;
* with shared windows, every compute thread issues once per 6 cycles, and no
  bubbles are issued.

Both rates are checked. With sharing, the compute threads finish after 2262
cycles instead of 3498. The test also checks the results in memory, and that
the compute threads kept issuing while a memory transfer was under way.

The unit testbenches check:

* exact issue spacing: 10 cycles in fixed mode, 6 in shared mode with three
  threads;
* IOR encodings;
* FIFO and key ordering in the DIC and MACU;
* constant MACU transfer time;
* CC period;
* masked TSM writes;
* the whole TSC exchange sequence, including a load result travelling through
  the MMDQ and TSM back into a register bank.

## Limits and departures

* **Instruction set.** The published architecture only says the core is a
  load/store RISC. The ISA above is this design's own, so code for the
  original platform does not run unchanged. The benchmark programs used to
  evaluate the original platform are not included.
* **One IO at a time.** The MACU keeps one transfer outstanding. This keeps
  transfer times predictable but caps memory bandwidth. Overlapping transfers
  would need a different MACU.
* **Where the exchange happens.** The leaving ID enters the IDQ in the Memory
  stage, together with the register state. The published description moves
  the ID one stage earlier, in Execute. The resulting queue contents are the
  same.
* **Load results.** They reach the TSC through the MACU and the MMDQ. There is
  no direct path from memory to the TSC.
* **Thread cycle.** The published description equates one thread cycle with
  six clocks. Here, with ten slots in fixed mode, a thread issues every ten
  clocks. Six clocks per instruction holds in shared mode when six or fewer
  threads are present.
* **Not specified by the source, chosen here:**
  * the scheduling key and the two policies;
  * `QUANTUM`;
  * the launch port;
  * the 128-thread ID space;
  * the sizes of the IOQ and MMDQ queues (10, like the queues whose size is
    given);
  * all handshakes and reset values.
* **Long selection paths.** The DIC and MACU find the best of 128 entries with
  combinational scans. For a fast clock they would need pipelining or a
  sorted structure.
* **Stamp wrap-around.** The 32-bit arrival stamps wrap after 2^32 cycles.
  After a wrap, first-come order can be wrong once.
