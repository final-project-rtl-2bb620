# Coherent non-blocking caches with LL/SC for a two-core out-of-order processor

Two out-of-order cores share one main memory. Each core keeps issuing loads
and stores while earlier ones still miss, so its data cache must be
*non-blocking*. The two data caches must also agree on what memory holds, so
they are kept coherent with an MSI protocol run by a single parent. On top of
that, the cores need atomic read-modify-write operations: a shared counter
incremented by both cores with plain load/add/store loses updates. This RTL
provides them with *load-linked / store-conditional* (LL/SC), implemented
inside the data cache with one extra register.

This repository holds the memory system of such a processor: everything
between the cores' memory ports and the main-memory port. The cores and the
main memory are not included; their ports are brought out of the top module
`mc_proc`.

```
 core 0 fetch ─► icache[0] ───────────────────────────────┐
 core 0 ld/st/ll/sc ─► nbcache[0] ◄─► msg_fifo ×2 ◄─┐      │
                                                    msg_router ◄─► msg_fifo ×2 ◄─► ppp ─► wide_mem_arb ─► WideMem
 core 1 ld/st/ll/sc ─► nbcache[1] ◄─► msg_fifo ×2 ◄─┘      │
 core 1 fetch ─► icache[1] ───────────────────────────────┘
```

| file | what it is |
|---|---|
| `rtl/mc_pkg.sv` | shared types: core requests/responses, coherence messages, WideMem requests, MSI states |
| `rtl/nbcache.sv` | non-blocking MSI L1 data cache with store queue, load buffer and LL/SC |
| `rtl/ppp.sv` | parent protocol processor: directory, grants, downgrades, write-backs |
| `rtl/msg_fifo.sv` | message FIFO in which responses overtake requests |
| `rtl/msg_router.sv` | moves messages between the data caches and the parent |
| `rtl/icache.sv` | per-core instruction cache |
| `rtl/wide_mem_arb.sv` | shares the main-memory port |
| `rtl/sync_fifo.sv` | generic FIFO used by the others |
| `rtl/mc_proc.sv` | top: the whole memory system for `NUM_CORES` cores |

## The core's view of its data cache

A core sends `nb_req_t {op, addr, data, rid}` and receives
`nb_resp_t {data, rid}`. `rid` is a request id chosen by the core; responses
can return in a different order from the requests, and the id matches them
up.

| op | answer |
|---|---|
| `OP_LD` load | the word |
| `OP_LR` load-linked | the word; also sets the link (below) |
| `OP_ST` store | none |
| `OP_SC` store-conditional | 1 if it stored, 0 if it did not |

Plain stores are never answered: once the cache accepts a store, the store
will happen, and a later load from the same core will see it. Addresses are
32-bit byte addresses of aligned 32-bit words.

## LL/SC: the link address register

Each data cache has one *link address register*: a valid bit and a line
address. It says "a load-linked read this line, and nobody else has written
it since, as far as this cache can tell".

* **Set** when a load-linked *returns its value*, to the line of its
  address. If the load-linked missed, that is when its line arrives, not when
  it was accepted.
* **Cleared** when the linked line leaves the cache: replaced by another
  line, or invalidated because another cache wants to write it (a downgrade
  to I). A downgrade to S leaves the link alone: another core is only
  reading.
* **Cleared** when any store-conditional completes, whether it succeeded or
  failed.

A store-conditional is checked against the link twice:

1. **When it enters the cache.** No match (link invalid, or for another
   line): it is dropped and 0 is answered at once. Match: it is treated as a
   store. If the store queue is empty and the line is held in M, it writes at
   once and answers 1.
2. **When it reaches the head of the store queue.** It is checked again
   before it may write *or* ask the parent for write permission. If the link
   broke while it waited, it answers 0 and leaves without writing and without
   any upgrade request. Otherwise it waits for M if needed, writes and
   answers 1.

A store-conditional therefore always gets exactly one answer, and memory is
never written without a valid link (an assertion in `nbcache` checks the
second part).

Why this is atomic: the link covers a whole line. Suppose both cores hold the
counter's line in S after their load-linked. The first store-conditional
needs M, so the parent invalidates the other core's copy. That breaks the
other core's link, and its store-conditional fails and is retried. A loop of
`ll; addiu; sc; beq retry` therefore adds exactly one per iteration that
exits. The end-to-end test runs 1000 such increments on each of two cores and
gets exactly 2000.

**Known weakness.** A load-linked that finds a younger store to the same
word in its own store queue takes the value from there (bypass) and sets the
link at once. That store may later evict the linked line (it may need the
same cache row for another line, or its upgrade may move the line around),
so the load-linked has effectively run out of order with that store. Test
programs written for an in-order core with a blocking cache, where a store
and a following load-linked to a conflicting line are interleaved on
purpose, can see a store-conditional succeed where they expect it to fail, or
the reverse. Normal LL/SC loops, which put no store between the load-linked
and the store-conditional, are not affected.

## Inside the non-blocking data cache

`nbcache` is direct-mapped: `ROWS` rows, each with a tag, an MSI state, a
"waiting for the parent" bit and a 16-word line. Around the array sit:

* a **store queue** (`SQ_DEPTH`) of stores and store-conditionals waiting for
  write permission, written to the line in order from its head;
* a **load buffer** (`LB_DEPTH`) of loads waiting for their line;
* a 2-entry **response queue** toward the core.

**One action per cycle.** Each cycle the cache picks at most one action, in
this priority:

1. install a grant from the parent (fill or S→M upgrade);
2. answer one load-buffer entry whose line is now present;
3. retire the store-queue head: a store-conditional with a broken link
   answers 0, or a store whose line is in M writes;
4. answer a downgrade request from the parent, or drop one for a line the
   row no longer holds with more rights than asked;
5. for the first load-buffer entry, or else the store-queue head, whose line
   is missing and whose row is not already waiting: first evict the row's
   other line if it holds one (a response to the parent, carrying the line if
   it was M), then, on a later cycle, send the upgrade request (S for a load,
   M for a store) and mark the row as waiting;
6. accept a new request from the core.

Putting 2 and 3 ahead of 4 means that a line granted to this cache is always
used once before a downgrade can take it away. Without that, two caches
that both want to write a line could keep taking it from each other forever.

**New requests.**
* A load first searches the store queue for the youngest store to the same
  word. If it finds one, that value is the answer. If that youngest entry is
  a store-conditional, the load waits, because its value depends on whether
  the store-conditional succeeds. Without a match, a hit answers from the
  line. A miss goes into the load buffer, and later hits to other lines keep
  being answered meanwhile (hit under miss).
* A store writes at once if the store queue is empty and the line is in M.
  Otherwise it joins the store queue.

Because waiting loads are answered before the store-queue head writes, a
buffered load never sees a store that came after it.

**Timing.** A hit or bypass answer is visible on `resp_*` the cycle after
the request is accepted. A miss sends its upgrade request the cycle after
acceptance if the row is free, or two cycles after if a line must be evicted
first. Its answer appears two cycles after the grant reaches the head of the
cache's incoming FIFO.

## Coherence: messages, parent and deadlock freedom

Caches and parent exchange `cache_msg_t` messages. Each message is either a
request or a response, and carries a child number, a line address, an MSI
state and, optionally, a line of data:

| direction | request | response |
|---|---|---|
| cache → parent | "give me this line in state S/M" | "I now hold this line in state y" (downgrade answer or eviction; carries the line if it was M) |
| parent → cache | "downgrade this line to S/I" | "you now have this line in state y" (carries the line unless it is an S→M upgrade) |

The **parent protocol processor** (`ppp`) records, for every cache and every
row, which tag that cache holds and in which state. This record is exact
because all caches are direct-mapped with the same number of rows. It takes
responses at any time: it updates the record and writes dirty data back to
memory. It serves one request at a time. If every other cache is compatible
(for M: all others in I; for S: no other in M), it grants. When the
requester held the line in I, the grant carries the line read from memory;
an S→M upgrade needs no data. Otherwise the parent sends one downgrade
request to each incompatible cache and waits for the answers.

**Why it cannot deadlock.** The parent can be stuck on a request while the
answers it needs are behind other requests. Every message FIFO (`msg_fifo`)
therefore holds requests and responses in separate queues and always
delivers a waiting response first, and the router (`msg_router`) also
prefers responses. Responses are always consumed: by the parent at any time,
by a cache as a grant. So the answers the parent waits for always get
through.

The router writes the sending port's number into the child field of every
upward message, so caches need not know their own number. It serves caches
round-robin.

## Instruction caches and main memory

Each core fetches instructions through its own `icache`. It is
direct-mapped and read-only, and is filled a line at a time from main
memory. It is non-blocking: accepted fetches wait in a 4-entry queue and are
answered strictly in order. Behind a miss, further fetches are still
accepted, and their own misses go to memory while the first read is in
flight. One restriction applies: a row has only one line read in flight at a
time. A hit that finds the queue empty is answered the next cycle.
Instructions are assumed never to be written, so the instruction caches take
no part in coherence.

Main memory is reached through one **WideMem** port that moves whole lines
(`wide_req_t`: a per-word write mask, an address and a line; a request with
an empty mask is a read). Main memory is assumed to answer reads in order.
`wide_mem_arb` shares the port round-robin among the parent (client 0) and
the instruction caches (client 1 + core number). It remembers, in order, who
asked for each read, and routes each answer back to that client.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NUM_CORES` | 2 | `mc_proc` | cores, i.e. data caches, instruction caches and directory columns |
| `ROWS` | 16 | `mc_proc`, `nbcache`, `icache`, `ppp` | rows of each direct-mapped cache (must match between caches and parent) |
| `SQ_DEPTH` | 8 | `nbcache` | store-queue entries |
| `LB_DEPTH` | 8 | `nbcache` | load-buffer entries |
| `MSG_DEPTH` | 2 | `mc_proc`, `msg_fifo` | entries per kind in each message FIFO |
| `QDEPTH` | 4 | `icache` | queued fetches per instruction cache |
| `MAX_READS` | 4 | `wide_mem_arb` | outstanding main-memory reads |
| `LINE_WORDS`, `ADDR_W`, `DATA_W`, `RID_W`, `CHILD_W` | 16, 32, 32, 4, 2 | `mc_pkg` | line size, widths, request-id width, up to 4 caches |

Only the two cores are fixed by the design itself. All the other sizes are
this implementation's own choices. `NUM_CORES` above 4 needs a wider
`CHILD_W`.

## What is and is not here, and how far to trust it

Included: the complete memory system for two (or up to four) cores. This
covers the coherent non-blocking data caches with LL/SC, the parent, the
message network, the instruction caches and the memory arbiter.

Not included:
* the out-of-order cores themselves. Only their memory ports exist, as the
  `i_*` and `d_*` ports of `mc_proc`.
* the host link of the cores (program loading, printing).
* main memory. The test benches use the behavioural model
  `tb/wide_mem_model.sv`.

Simplifications against a fuller design:
* the parent is blocking (one request at a time), with no L2 cache;
* the data cache is direct-mapped and performs one action per cycle;
* there is no fence operation.

The load-linked bypass weakness described above is deliberate: it is the
straightforward implementation.

Verification is by simulation only; nothing has been formally verified. Each
block has a self-checking test bench in `tb/`. Each test bench was also run
against a deliberately broken copy of its block, and failed there. The
assertions in the RTL (no FIFO overflow, no message enqueued into a full
FIFO, no store-conditional write without a link, no request for rights a
cache already has) are active in every simulation.

| test bench | checks |
|---|---|
| `nbcache_tb` | miss/fill/answer sequence, hit latency, hit under miss, store queue with M upgrade and bypass, dirty and clean replacement, downgrades answered and ignored, every LL/SC case above including a link broken while the store-conditional waits in the queue, and a load-linked answered by bypass |
| `ppp_tb` | grants with and without data, a single downgrade per conflicting cache, write-back before granting to a reader, write-back of evictions |
| `msg_fifo_tb`, `msg_router_tb` | ordering per kind, responses first, per-kind full flags, round-robin, routing by child number |
| `icache_tb`, `wide_mem_arb_tb` | data against memory, hit latency, one read per miss, in-order answers while several misses are in flight; in-order routing of answers with three concurrent clients, fairness |
| `mc_proc_tb` | full default size, end to end (see below) |
| `mc_workloads_tb` | full default size, the memory traffic of multicore benchmark programs (see below) |

`mc_proc_tb` replaces each core with a request sequence and runs six
phases:

1. instruction fetches;
2. random loads and stores with up to 8 loads outstanding per core, checked
   against a reference model;
3. one core writes data that the other reads;
4. 2 × 1000 atomic LL/SC increments; the counter must be exactly 2000;
5. 2 × 1000 plain increments; the counter must be at least 1000 and below
   2000 (a typical run gives about 1000, since almost every update is lost);
6. random loads and stores by both cores on the same 8 lines. Every load must
   return a value that some core stored there, or the initial one. At the
   end, both cores must read the same value from every word.

Throughout the run, a monitor checks the single-writer rule: a line held in
M by one cache is held by no other.

It also counts that every mechanism happened at least once. The mechanisms
are store-queue bypass, hit under miss, dirty eviction, store-conditional
success and failure, a link broken by an invalidation, parent downgrades,
S→M upgrades without data, load-buffer answers, store-queue writes, and
instruction hits and misses. The atomic phase takes about 29,000 cycles,
roughly 14.5 cycles per increment, since the counter's line moves between
the two caches on almost every increment.

`mc_workloads_tb` replays, on the full-size system, the memory traffic of
four typical multicore programs:

* a "hello world" in which core 0 streams text through an 8-word software
  FIFO in shared memory and core 1 reads it out;
* a vector add split statically between the cores;
* a 3-point median filter split statically between the cores;
* a product loop in which the cores take 16-element chunks from a shared
  work counter, using LL/SC, until no work is left.

Results are read back by the other core and checked word by word.

## Simulating

The testbenches use hierarchical names into `mc_proc` for their event
counters, and `wide_mem_model` lives in `tb/`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mc_pkg.sv tb/mc_proc_tb.sv \
          --top-module mc_proc_tb -o sim
./obj_dir/sim
```

Replace `mc_proc_tb` with any other test bench name to run it. Each prints
`TB_RESULT checks=N failures=M` at the end. All modules are in one file
each, named after the module, so `-Irtl -Itb` finds everything that the
package does not provide.
