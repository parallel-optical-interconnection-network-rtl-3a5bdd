# SYMNET: an optical, pipelined address network for snooping SMPs

A snooping shared-memory multiprocessor broadcasts every cache miss's
address to all caches. On an electrical bus only one address is in flight at
a time, and that limits address bandwidth. SYMNET carries the addresses
optically, over a tree of light couplers and splitters, and lets a new
request enter the tree **every processor cycle**. So up to one request per
tree stage is in flight at once, and every request still reaches all
processors and the memory in the same cycle.

An optical token gives each processor a fixed insertion slot, so two
requests never collide. Optics also rules out the usual wired-OR "shared"
line. Only one pulse may answer a snoop. The coherence protocol, COSYM, is
therefore a MOESI variant in which every cached block has exactly one
owner, and only that owner answers.

This repository holds synthesizable SystemVerilog for the logic of the
address network:
- the token generator and its ring of delay elements;
- the coupler/splitter tree;
- a per-processor port controller;
- a per-processor COSYM second-level-cache coherence controller (tags,
  states and sharer pointers);
- the memory's snooper.

It also has self-checking testbenches for each block and for the whole
network. The optical devices and the data network are not RTL; see
[What is not here](#what-is-not-here).

## Timing of the broadcast

Everything runs on one clock, the processor clock. One cycle is 1 ns at the
1 GHz the design was sized for.

**Token ring.** A token generator emits one pulse every `N_PROC` cycles.
The pulse passes processor 0, then goes through a one-cycle delay element to
processor 1, and so on.
- Processor *i* holds the token in cycles `k*N_PROC + i`. That cycle is its
  only insertion slot (pre-allocated TDMA).
- The one-cycle delay per processor comes from the insertion time. Detecting
  the token, converting it, one gate, and driving the laser array take about
  0.88 ns. This is rounded up to a 1 ns delay, which is a 20 cm fiber loop.

**Tree.** `addr_subnet` is a binary tree of `y_coupler_splitter` nodes.
- Going up, each node ORs its two children's lanes and registers the result.
- At the root the combined signal turns round. Physically it passes an
  optical amplifier there; in RTL it is a wire.
- Going down, each node registers the signal and copies it to both
  children.
- A request put on a leaf's lanes in cycle *t* therefore appears at every
  leaf, and at the memory's tap, in cycle **t + 2·log2(N_PROC)**. That is
  10 cycles for 32 processors.
- Tokens are one cycle apart, so each register stage holds a different
  request, and requests never overlap.

```
cycle        t     t+1   t+2   ...   t+L   t+L+1 ...  t+2L+1
node i       insert
all nodes                            see request (L = 2*log2 N)
owner                                      snoop pulse
all nodes                                             see snoop -> commit
```

**Snoop answer.** The owner drives a single snoop lane one cycle after it
sees the request (`SNOOP_LAT = 1`). That pulse crosses the tree like any
request, so every node sees the answer `RESP = 1 + 2·log2(N_PROC)` cycles
after the request. For 32 processors that is 11 cycles.

The port controller does not wait for the token before sending the snoop
pulse. This is safe for two reasons: only one cache owns a block, and
requests become visible in distinct cycles.

A four-processor example: processor 1 inserts in cycle 1, and its request is
at all processors after four stages. Processor 2's request, inserted in
cycle 2, follows one stage behind.

### Lanes

The network is bit-parallel: one optical lane per bit (`m = b`). The
original proposal leaves the bit count open; this design uses 46 lanes:

| field | bits | meaning |
|---|---|---|
| `valid` | 1 | a request is present |
| `op` | 2 | `RD`, `RDX`, `WB`, `RPL` |
| `blk` | 27 | block address (32-bit address, 32-byte blocks) |
| `src` | 7 | requesting node (up to 128 nodes) |
| `nxt_v`, `nxt` | 1 + 7 | WB/RPL only: the sender's next sharer |
| `snoop` | 1 | the owner's snoop answer |

## COSYM: one owner, one answer

Line states are M, O, E, S and I. E, M and O are owner states. For each
block there is at most one owner, and shared copies always have one.

**Read miss (`RD`).**
- If there is an owner, it answers HIGH and supplies the data cache to
  cache. The reader loads **S**.
- If there is no owner, nobody answers (LOW). Memory supplies the data, and
  the reader loads **E**.
- An E owner that is read becomes **O**, not S. This is the one change
  against MOESI: a clean block that has been shared still has one owner, who
  answers the next read. An M owner also becomes O.

**Write (`RDX`).**
- The owner answers and supplies the data, or memory does.
- Every other copy goes to I, and the writer loads M.
- A write that hits E changes it to M silently.
- A write that hits S or O sends an `RDX`.

**Sharer list.** Every O or S line keeps the id of one "next sharer". The
sharers of a block form a singly linked list that starts at the owner.
- A new reader is appended at the tail. The tail is the line with no next
  sharer. When the read commits, the tail stores the reader's id.
- The list exists so that ownership can move when the owner leaves.

**Replacement.** When the set is full, the controller first evicts a victim
(round-robin) over the network.
- **Owner leaves (`WB`).** The packet carries the owner's next sharer.
  - That sharer becomes **O**.
  - If there is no next sharer, the block is written back to memory. Only an
    unshared owned block goes back to memory.
  - E and M victims also send a `WB`. It has no next sharer, so M data is
    written back.
- **Sharer leaves (`RPL`).** The packet carries the leaver's next sharer. The
  list predecessor, whose pointer names the leaver, takes that pointer. The
  list stays intact.

**Memory.** `mem_ctrl` only listens. It supplies a block when an `RD`/`RDX`
commits with snoop LOW. It takes a write-back when a `WB` without a next
sharer commits.

## Keeping pipelined requests apart

This is the subtle part of the design.

Because up to `2·log2(N)` requests are in the tree, and more wait in
buffers, a controller can form a request from a cache state that an earlier,
not yet visible request for the same block is about to change. Two
examples:
- a reader picks the wrong tail to append to;
- a leaving owner names a next sharer that has just been invalidated.

The original proposal says special transient states handle this but gives no detail.
This design uses a rule that every snooper applies identically, implemented
in `txn_tracker` (one copy in every cache controller and in the memory).

1. **Commit at the answer.** A request becomes visible in cycle *v*. Nobody
   changes any state until the request's snoop answer arrives in cycle
   `v + RESP`. At that moment every snooper applies the whole transaction
   (requester fill, E→O, invalidation, list append, ownership move, unlink)
   in the same cycle. Visible-but-uncommitted requests are kept in a shift
   register.
2. **Void window.** A visible request is **void** if a non-void request for
   the same block became visible in the last `HIST` cycles, where
   `HIST = N_PROC + 2·log2(N_PROC) + RESP + 2`. That is 55 for 32 nodes.
   - `HIST` bounds the time from a controller reading its tags to its
     request becoming visible. It adds up as follows:
     - 1 cycle to the port controller;
     - 1 cycle into its buffer;
     - up to `N_PROC-1` cycles waiting for the token;
     - `2·log2(N_PROC)` cycles in the tree;
     - `RESP` cycles for an earlier request to commit.
   - A request whose sender could not have seen the effect of the earlier
     request therefore always falls inside the window.
   - All snoopers ignore a void request, and nobody answers it. Its sender
     notices that its own request went by void and starts again from a fresh
     tag lookup.
3. **Local busy check.** Before issuing, a controller also waits while its
   own block is visible or uncommitted. This avoids making requests that
   would only be voided.

All nodes see the same request stream, so their trackers hold identical
histories. They agree on void and commit without exchanging anything. The
cost is that requests for one block are spaced at least `HIST` cycles apart.
Requests for different blocks are unaffected.

## Blocks

| module | role |
|---|---|
| `symnet_pkg` | widths, request packet and lane structs, op and state enums |
| `token_ring` | token generator and one-cycle delay per processor; asserts exactly one token per cycle |
| `y_coupler_splitter` | one tree node: registered OR up, registered copy down, per-lane collision flag |
| `addr_subnet` | heap-numbered binary tree, root turn-round, memory tap, sticky collision flag |
| `addr_port_ctrl` | 2-entry request buffer released in the token slot; snoop lane driver; receive path |
| `txn_tracker` | commit point and void window shared by all snoopers (above) |
| `cosym_ctrl` | COSYM second-level-cache controller: 512×4 tags, states and next-sharer ids; miss/evict state machine; snoop answer; cache-to-cache supply |
| `mem_ctrl` | memory's supply and write-back decisions |
| `symnet_top` | `N_PROC` nodes (controller + port controller) on the token ring and tree, plus the memory |

### `symnet_top` interface

Per processor *i* (unpacked arrays `[N_PROC]`):
- `cpu_req_valid/write/addr` and `cpu_req_ready`: one blocking access at a
  time.
- `cpu_done`: pulses when the access finishes, with `cpu_done_state` (the
  line's final state) and `cpu_done_miss` (whether the network was used).
- `c2c_valid/dest/blk`: this cache must send block `blk` to node `dest` over
  the data network.

Memory:
- `mem_supply_valid/dest/blk`: supply a block on snoop LOW.
- `mem_wb_valid/src/blk`: take a write-back.
- Running counts: `mem_supply_cnt` and `mem_wb_cnt`.

Observation outputs (bit vectors `[N_PROC-1:0]`):
- `token` and `token_wait`;
- protocol event pulses `ev_e_to_o`, `ev_own_xfer`, `ev_unlink`, `ev_void`;
- the sticky `collision` flag, which must stay low.

A cached read costs 1 cycle after the tag lookup. A miss costs:
- a wait of up to `N_PROC` cycles for the token;
- `2·log2 N` cycles to visibility;
- `RESP` cycles to commit.

That is about 22–53 cycles for 32 processors, plus an eviction first if the
set is full.

### Parameters

| parameter | default | origin |
|---|---|---|
| `N_PROC` (top) | 32 | largest system evaluated; power of two, 2…128 |
| `SETS`, `WAYS` | 512, 4 | 64 KB, 4-way, 32-byte second-level cache |
| `APC_DEPTH` | 2 | own choice |
| `ADDR_W` (package) | 32 | own choice |
| `BLOCK_B` (package) | 32 | 32-byte blocks |
| `MAX_NODES` (package) | 128 | sets the 7-bit node id; the optical power budget was worked out up to 128 processors |
| `SNOOP_LAT` (tracker) | 1 | own choice |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
(each has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_symnet_top \
  rtl/symnet_pkg.sv tb/tb_symnet_top.sv -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_token_ring` | token position every cycle, period N |
| `tb_y_coupler_splitter` | OR/copy, one-cycle latency, collision flag (random) |
| `tb_addr_subnet` | every leaf and the memory tap see each request after exactly 2·log2 N cycles; several requests in flight; collision detection |
| `tb_addr_port_ctrl` | release only in the token slot, in order; buffer-full backpressure; snoop and receive paths |
| `tb_mem_ctrl` | supply on LOW only, write-back only without next sharer, void requests ignored, commit timing |
| `tb_cosym_ctrl` | one controller against a modelled network: E/S fill, E→O, append, RDX invalidation, WB ownership move, RPL unlink, void and retry |
| `tb_symnet_top` | 4 nodes, small caches, 150 random accesses per node |
| `tb_symnet_full` | the top at its defaults (32 nodes, 512×4 tags), 60 random accesses per node; about a minute |
| `tb_symnet_n128` | 128 nodes (7-level tree, 14-cycle latency), small tag stores, 16 random accesses per node; about two minutes including the build |

The two system tests check, every cycle, across all nodes' tag stores:
- at most one owner per block;
- E/M alone;
- no sharer without an owner;
- the owner's sharer list visits exactly the S copies;
- token-slot insertion;
- exact tree latency.

They count each mechanism and fail if any of these never occurs: token
wait, several requests in flight, cache-to-cache and memory supply, E→O,
ownership move, write-back, unlink, void/retry, write hit.

## Departures and open points

- **Tree shape.** The physical network groups 2–4 processors per board and
  joins boards at further levels. A binary tree gives the same stage count
  for power-of-two sizes, so `N_PROC` must be a power of two.
- **Memory attachment.** Memory sits on a receive-only tap. It never sends
  on the address network, so it takes no leaf or token slot.
- **Chosen here.** The commit point and void window stand in for the
  unpublished transient states. The following are also this design's own
  choices:
  - tail append;
  - unlinking a sharer that leaves;
  - `WB` for E/M victims;
  - a write to S/O as a full `RDX`;
  - round-robin replacement;
  - one outstanding access per controller.
- **Fairness.** Under heavy contention for one block, the winner of each
  request window is whichever waiting node's token slot comes first, so a
  single node has no bound on how often it is voided. In the 128-node test,
  with every node on 24 blocks, some accesses took thousands of cycles.
- **Timing.** The snoop answer is assumed to cross the tree with the same
  latency as a request.
- **Not modelled.** Second-level cache data and the first-level cache are
  not modelled. The tag store tracks permissions only.

## What is not here

- **Optical devices.** VCSEL and photodetector arrays with their
  transmitter/receiver ICs, optical amplifiers, waveguides, fibers and
  connectors have no logic function. With one lane per bit they are wires:
  - `addr_port_ctrl.tx` and `rx` are where the transmitter and receiver
    attach;
  - the root turn-round in `addr_subnet` is where the amplifiers sit.
- **Data network.** The data network (an optical crossbar) is a separate
  design. The `c2c_*`, `mem_supply_*` and `mem_wb_*` ports are its
  commands.
- **Processors.** Processors and their first-level caches connect at the
  `cpu_req_*` ports.
- **Application workloads.** The evaluated applications (Splash-2 FFT, LU,
  RADIX, OCEAN, CHOLESKY, WATER on 4–32 processors) are not reproduced.
  Their traces are not available; the system tests use random access
  streams over blocks chosen to collide in the same sets.
- **Larger systems.** More than 128 processors need a wider node id in
  `symnet_pkg`.
