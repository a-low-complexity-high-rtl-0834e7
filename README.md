# One thread per cycle, sixteen instructions wide: a stream-based SMT fetch unit

A simultaneous multithreading (SMT) core runs several threads at once, and its
front end has to keep an 8-wide decoder busy. The usual way to do that is to
fetch from two threads in the same cycle. That needs one branch-predictor port
and one I-cache port per thread, a banked cache with bank-conflict logic, one
miss register per thread, and a network that masks, shifts and merges two
cache lines into one fetch group.

This front end takes the opposite route. It fetches from **one thread per
cycle** and makes that one fetch wide enough. The trick is the predictor. A
conventional predictor covers one basic block per prediction, about 6 to 8
instructions. This one is a **stream predictor**. A *stream* is the dynamic run
of instructions from the target of a taken branch up to and including the next
taken branch. It can span many not-taken branches. So a single prediction can
name 16 or more sequential instructions. With one predictor port, one
single-ported I-cache and a 16-instruction fetch width, the design feeds the
8-wide decoder through a 32-entry fetch buffer. In the usual notation this is
ICOUNT.1.16: up to 16 instructions from 1 thread, with the thread picked by
the ICOUNT policy.

The organisation follows the paper "A Low-Complexity, High-Performance Fetch
Unit for Simultaneous Multithreading Processors" (Falcón, Ramirez, Valero).
The paper gives the organisation and the sizes. The RTL details,
such as encodings, the back-end protocol and the miss handling, are this
implementation's own. Section "Departures and own choices" lists them.

## Structure

```
               ICOUNT counts (registered)          ICOUNT counts
                        |                                |
  back end  ---+   +----v------+    per-thread     +-----v-----+
  redirect,    |   | icount    |    FTQs (4 each)  | icount    |
  training     |   | select    |                   | select    |
               v   +----+------+   +-----------+   +-----+-----+
         +-----------------------+ |  ftq[0]   |         |
         |   stream_pred_stage   |-|  ftq[1]   |-> head  v
         |  per thread: next PC, | |   ...     |   +-------------+   +------------+
         |  path history, RAS    | |  ftq[7]   |   | fetch_stage |<->|  icache    |
         |  shared: stream_pred. | +-----------+   | + align     |   | 32KB 2-way |
         +-----------------------+                 | + MSHRs     |   +-----^------+
                                                   +------+------+         | refill
                                                          | <=16 insn      |
                                                   +------v------+   mem_req/mem_resp
                                                   | fetch_buffer|
                                                   |  32 entries |
                                                   +------+------+
                                                          | <=8 insn / cycle
                                                          v  decode
```

The front end has two decoupled stages: *prediction* and *fetch*. Fetch
target queues (FTQs), one per thread, connect them.

- **Prediction stage** (`stream_pred_stage`). Each cycle it predicts one stream
  for one thread and appends it to that thread's FTQ. The thread is the one
  ICOUNT ranked best in the *previous* cycle, among active threads whose FTQ
  is not full.
- **Fetch stage** (`fetch_stage`). Each cycle it serves one thread: the one
  with the lowest ICOUNT among threads that have a queued stream, are not
  waiting for an I-cache refill and are not being redirected. Fetch happens
  only while the fetch buffer has room for a full 16-instruction block. The
  stage reads the I-cache at the FTQ head, aligns up to 16 instructions and
  writes them into the fetch buffer.
- **Decode side.** The fetch buffer hands up to 8 instructions per cycle to
  decode.

## The stream predictor

`stream_predictor` answers one question. A thread starts a stream at address
*A*, having followed a known path to get there. How many sequential
instructions come before the next taken branch, where does that branch go,
and what kind of branch is it (plain branch, call or return)?

It has two set-associative tables, both 4-way, searched in the same cycle:

| table        | entries | indexed by                                  |
|--------------|---------|---------------------------------------------|
| first level  | 1024    | low 8 bits of the start word address        |
| second level | 4096    | DOLC hash of path history and start address |

Both tables are tagged with the full start word address, so a hit always
belongs to the stream asked about. When the second level hits, its answer
wins. It can tell apart streams that start at the same address but behave
differently depending on how the program got there. When only the first level
hits, the first level answers. When neither hits, the predictor guesses a
sequential stream of 16 instructions, which keeps fetch going until the back
end corrects it.

**Path history (DOLC 16-2-4-10).** Each thread keeps a history of the start
addresses of its last 16 streams:

- the most recent stream contributes 4 bits;
- each of the 15 older streams contributes 2 bits;
- the current start address adds 10 bits when the index is formed.

That gives 30 + 4 + 10 = 44 bits, XOR-folded into the 10-bit second-level
index. `hist_push` and `dolc_fold` in `smt_fetch_pkg` implement this. The
prediction stage shifts each predicted stream's start into the thread's
history.

**Entries and training.** An entry holds:

- tag
- length (6 bits; longer streams must be reported in pieces)
- target
- end type
- a 2-bit hysteresis counter

The back end trains both tables with every completed stream through the
`upd_*` port. The update carries the stream's start, the path history in
force before it, its length, its target and its type. The tables react as
follows:

- **Matching entry that agrees:** it gains confidence.
- **Matching entry that disagrees:** it loses confidence. Once the counter is
  at zero, the entry is overwritten.
- **Stream not found:** it is allocated in an invalid way, or else in the
  set's round-robin victim.

The tables are read combinationally. One write per cycle happens at the clock
edge.

**Calls and returns.** Each thread has a 64-entry return address stack
(`return_address_stack`). A predicted call stream pushes the address after
its last instruction (start + length). A predicted return stream takes its
target from the top of the stack, not from the table, and pops it.

The table geometry fits the predictor budget of about 45 KB used in the
original study. Each entry is about 70 bits, and 5 K entries come to about 44 KB.

## Thread selection: ICOUNT

`icount_counters` counts, per thread, the instructions between decode and the
end of dispatch:

- instructions are counted in when the fetch buffer hands them to decode;
- they are counted out when the back end reports them dispatched or squashed
  (`icount_dec`).

`icount_select` picks the eligible thread with the smallest count. Ties go to
the first tied thread at or after a pointer that rotates every cycle. The
policy steers fetch to threads that are draining through the pipeline. A
thread stuck behind a data-cache miss accumulates a large count and loses
fetch slots, instead of filling shared queues with instructions that cannot
issue. The prediction stage uses the counts registered one cycle earlier, so
the predictor works ahead for the thread that fetch is likely to pick next.

## FTQs, fetch and the I-cache

An `ftq` entry is a predicted stream: current start, remaining length,
predicted successor, end type, plus the original start and a checkpoint used
for recovery. The fetch stage consumes the head in pieces. A 40-instruction
stream takes three fetch cycles (16 + 16 + 8). Each piece advances the head's
start and shrinks its length, and the last piece pops the entry.

A 64-byte line holds 16 instructions. A 16-instruction block that starts in
the middle of a line therefore needs the next line as well. `icache` keeps
even-numbered and odd-numbered lines in separate banks. One lookup reads the
addressed line and its successor together, each from its own bank, with its
own tag check. `fetch_align` treats the two lines as a 32-instruction window,
shifts it by the start offset and masks it to the block length.

**Misses.** A miss gives the thread a miss status register in `fetch_stage`
and marks the thread `blocked`. The selector skips it until the refill
returns, and other threads keep fetching in the meantime. The details:

- If only the second line misses, the part of the block in the first line is
  still fetched and the miss is raised in the same cycle.
- Refill requests leave on a valid/ready channel (`mem_req_*`), one per
  cycle, round-robin over the waiting threads.
- Threads that miss on a line that has already been requested wait for the
  same refill.
- A refill (`mem_resp_*`, one whole line) is written into the LRU way of its
  set and releases every thread waiting for that line.

## Fetch buffer and the decode interface

`fetch_buffer` is a 32-entry circular queue. Fetch writes one block of up to
16 instructions per cycle, and decode takes up to 8 per cycle in order
(`dec_slot`, `dec_cnt`, `dec_ready`). When decode stalls, the buffer fills.
Once fewer than 16 slots are free, fetch stops (`events.fb_stall`).

Every slot is an `fb_entry_t` and carries:

- the thread id, the instruction and its word address;
- a `last` flag, set on the last instruction of a predicted stream;
- the predicted successor of the stream (`pred_next`) and its end type;
- the stream's original start (`sstart`) and its checkpoint (`ckpt`: path
  history and RAS pointer before the stream was predicted).

## What the back end must do

The fetch unit trusts the back end for three things.

1. **Start threads.** After reset all threads are idle. The first redirect to
   a thread, carrying its entry address (checkpoint and `redir_sstart` zero),
   starts it.
2. **Catch mispredictions.** For each instruction, the predicted continuation
   depends on the `last` flag:
   - if `last` is set, the predicted continuation is `pred_next`;
   - otherwise it is the next sequential address.

   When the real continuation differs, drive `redir_valid` for one cycle with
   the thread, the correct address, and the instruction's `ckpt` and
   `sstart`. The redirect acts as follows:
   - **FTQ:** flushes the thread's FTQ.
   - **Fetch buffer:** clears the thread's fetch-buffer slots. They appear as
     invalid slots in the same cycle and are freed as they reach decode.
   - **This cycle's work:** cancels the thread's fetch and prediction in that
     cycle.
   - **Predictor state:** restarts prediction at the new address, with the
     path history rebuilt as `hist_push(ckpt.hist, sstart)` and the RAS
     pointer restored from the checkpoint.

   Only one redirect is accepted per cycle. The back end should ignore a
   redirected thread's later instructions until its redirect has been sent.
3. **Train and drain.** Report each completed stream on `upd_*` (one per
   cycle). Report departures from dispatch on `icount_dec`.

The `events` output pulses once per cycle for each mechanism:

- a prediction, and from which table it came;
- a fetch, a full 16-instruction block, a block that spans two lines;
- an I-cache miss;
- a fetch-buffer stall, a cycle with every active FTQ full;
- a redirect.

Count these to measure fetch throughput.

## Parameters

| parameter (`smt_fetch_unit`) | default | meaning |
|---|---|---|
| `NTHREADS`   | 8     | hardware threads (at most 8) |
| `FETCH_W`    | 16    | instructions fetched per cycle (8 gives ICOUNT.1.8) |
| `DECODE_W`   | 8     | instructions handed to decode per cycle |
| `FBUF_DEPTH` | 32    | fetch buffer entries |
| `FTQ_DEPTH`  | 4     | FTQ entries per thread |
| `RAS_DEPTH`  | 64    | return stack entries per thread |
| `IC_BYTES`, `IC_WAYS` | 32768, 2 | I-cache size and associativity (64-byte lines) |
| `L1_ENTRIES`, `L2_ENTRIES`, `SP_WAYS` | 1024, 4096, 4 | stream predictor tables |

`smt_fetch_pkg` fixes the following:

- a 32-bit byte address;
- 32-bit instructions;
- a 6-bit stream length;
- the DOLC geometry.

## Departures and own choices

The source describes the organisation and its sizes, but not the logic
inside it. These points are choices made here:

- **Predictor internals:**
  - the DOLC fold, the entry layout and the full-address tags;
  - the 2-bit hysteresis and round-robin replacement;
  - the 16-instruction sequential guess on a predictor miss.
- **Redirect and repair:** the redirect protocol and checkpoint contents. The
  RAS is repaired only by restoring its pointer, so entries overwritten on a
  wrong path are not recovered.
- **I-cache banking.** The original study's processor has an 8-bank cache. Here two
  banks (even/odd lines) are enough to read a line pair, and the single fetch
  thread needs no bank-conflict logic. Reads are combinational, so the fetch
  stage is one cycle from FTQ head to fetch buffer, and the tag, data and
  align path is the critical path. A real implementation would pipeline it or
  use synchronous SRAM macros.
- **ICOUNT bookkeeping:** what counts in and out of the counters, 8-bit
  saturating counters, and the rotating tie-break.
- **Flushing the fetch buffer:** in place, leaving holes.
- **Miss handling:** one miss register per thread; when only the second line
  misses, the part in the first line is still fetched.

Not built:

- **Comparison engines.** The comparison engines of the study are not part of
  this design: gshare with a BTB, gskew with an FTB, and the two-threads-per-cycle
  (2.X) fetch.
- **Surrounding machinery.** Neither is the machinery around the front end:
  the I-TLB, the L2 and main memory, and the execution core. Their
  interfaces are ports.
- **Decoding.** Instructions are not decoded. Stream boundaries come only
  from the predictor and from back-end redirects.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fetch_align` | every offset/count pair over random lines against direct selection |
| `tb_icount_select` | random counts/eligibility/pointer against a reference scan |
| `tb_icount_counters` | random in/out counts against a saturating reference |
| `tb_return_address_stack` | push/pop/restore and overflow against a reference stack |
| `tb_ftq` | pushes, partial and full consumption, flushes against a reference queue |
| `tb_fetch_buffer` | 16-in/8-out traffic, room, thread flushes against a reference queue |
| `tb_icache` | hits, line pairs, contents and LRU fills against a reference cache |
| `tb_stream_predictor` | miss default, level selection, hysteresis, eviction, 1500-stream bulk recall |
| `tb_stream_pred_stage` | thread start, history rebuild, sequential guesses, call/return via RAS, redirect priority |
| `tb_fetch_stage` | every fetched slot, consumption, misses, partial blocks, refills, kill |
| `tb_smt_fetch_unit` | whole front end, default sizes, 8 threads (below) |

`tb_smt_fetch_unit` runs the whole front end at its default sizes. Each of the
8 threads runs a synthetic program: a loop of 10 streams, a call to a
one-stream function, and a branch whose target alternates between loop
iterations, which only the path history can predict. A back-end model follows
each thread's real path, checks every instruction it receives and redirects
on mispredictions. It trains the predictor and drains odd threads slowly, as
memory-bound threads would. A memory model answers refills after 100 cycles
the first time a line is touched and after 10 cycles after that.

The test requires:

- every correct-path instruction, in order and with the right contents;
- single-thread fetch blocks;
- fewer mispredictions after warm-up than before;
- fast threads reaching their quota sooner than slow ones;
- every mechanism in `events` occurring.

A run takes about 12 000 cycles. It averages about 10 instructions per fetch
cycle and predicts mostly from the second-level table. It takes seconds.

`tb_workloads` runs synthetic stand-ins for the ten multithreaded workloads
the architecture was evaluated with, one after another:

- 2, 4, 6 and 8 threads;
- ILP (high instruction-level parallelism), memory-bound (MEM) and mixed
  (MIX).

Each benchmark becomes a loop program whose streams are about two of its
basic blocks long (uniform between one and three times its average
basic-block size). Memory-bound benchmarks drain from dispatch slowly. Every
thread must reach its quota. The test prints the fetch throughput of each
workload:

- 11 to 11.5 instructions per fetch cycle for the ILP mixes;
- 7 to 11 for the memory-bound and mixed ones.

These programs are far smaller than the real benchmarks, so the numbers show
that the mechanisms work. They are not performance predictions.

With `FETCH_W` set to 8 (ICOUNT.1.8), the end-to-end test also passes, at
about 6.8 instructions per fetch cycle against 10.4 with the default width
of 16.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl rtl/smt_fetch_pkg.sv rtl/*.sv \
          tb/tb_smt_fetch_unit.sv --top-module tb_smt_fetch_unit -o sim
./obj_dir/sim
```

Replace the testbench file and top name to run any other testbench. The
package must come first on the command line.

**Not verified.** No timing closure or gate-level work has been done. The
design has not been run against the SPEC traces that the architecture was
evaluated with. Those workloads (2 to 8 threads, ILP, memory-bound and mixed)
fit the default 8 thread contexts.
