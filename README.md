# PHAST: an explicit-state model checker in hardware

Explicit-state model checking means doing a breadth-first search over every
state a finite system can reach, and testing a safety property on each state.
In software, most of the time goes into three steps repeated for every state:
making its successors, hashing each successor, and looking the hash up in a
table of visited states. PHAST makes these steps a hardware pipeline. Every
cycle the pipeline takes one new state. The visited set is a large hash table
in SDRAM. It stores only a short *compacted* hash of each state, not the state
itself.

This RTL implements the PHAST pipeline for one model, `DOWN`. DOWN has six
3-bit counters, all starting at 5, which rules count down to zero. The safety
property is "not every counter is zero". That property does fail, so a run
ends with `stop` and a counterexample. With the violation check turned off,
the search visits all 10,962 reachable states and then raises `done`.

## The loop of states

```
            +-----------------------------------------------------------+
            |                                                           |
   unvisited queue --> next state generator --> enqueue --+--> lookup pending queue --+
   (SDRAM + buffers)                              ^       |                           |
            ^                                     |       +--> hash compaction --> hash table lookup --> dequeue
            |                              collision      +--> invariant checker       |   (CAM + SDRAM)   |
            |                                queue <------------------------------------------------------+ collision
            +------------------------------------------------------------------------------------------+ new
                                                                    duplicate: dropped
```

At any moment each state being processed is in exactly one place: the
generator, the lookup pending queue, the collision queue or the unvisited
queue.

- **Next state generator** (`down_next_state_gen`). It first emits the start
  state. After that it pops one parent from the unvisited queue and applies
  one rule per cycle, so one parent takes 1 fetch cycle plus 6 rule cycles.
  Each rule also returns a *same* bit, which is set when the rule was disabled
  and so left the state unchanged. Such results are dropped right away. They
  never reach the hash table.
- **Enqueue** (`enqueue`). It chooses which state enters the pipeline next. A
  freshly generated state has priority over a state coming back from the
  collision queue. The state is written to the lookup pending queue and to
  hash compaction in the same cycle. New states are also shown to the
  invariant checker.
- **Invariant checker** (`down_invariant_checker`). It sets a sticky `stop`
  on the first violating state and keeps that state in `bad_state`. `stop`
  freezes the generator, so no state is emitted from the cycle it rises.
- **Hash compaction** (`hash_compaction`) turns a state into a 40-bit hash.
  See below.
- **Hash table lookup** (`hash_table_lookup`) gives each hash one of three
  verdicts: *new*, *duplicate* or *collision*. See below.
- **Dequeue** (`dequeue`) pairs the head of the lookup pending queue with the
  next verdict. Verdicts come out in the same order the states went in.
  - A new state goes to the unvisited queue.
  - A duplicate is dropped.
  - A collision goes to the collision queue.
- **Unvisited queue** (`unvisited_queue`) is the breadth-first frontier.

## Hash compaction and rehashing

Each hash bit is the XOR of a pseudo-random subset of the input bits. The
subset for bit `j` is column `j` of a hash matrix. The matrix comes from an
integer mixing function of (row, column, seed) in `phast_pkg::hash_matrix_bit`,
evaluated at elaboration. To give the model a different matrix, change
`HASH_SEED`.

Each XOR is built as a tree of `FANIN`-input gates, with a register after
every level. For the 22 input bits (see below) and `FANIN = 6` there are two
levels plus an input register. The hash therefore comes out 3 cycles after
the state is accepted, and a new state can be accepted every cycle.

A *collision* means that two different states hashed to the same table
address with different tags. When that happens, the state is rotated left by
one bit, and that copy is hashed again. The copy waits in the shifted
collision queue until the original state comes back through enqueue. Then
hash compaction takes the state from that queue instead of the one enqueue
offers.

This design adds one input to the hash: a 4-bit *rehash round* (how many
times the state has been rotated). The reason is that an XOR hash is linear.
Without the round, the rotated copy of state A hashes exactly like any real
state B that equals that rotation. B would then be reported as a duplicate of
A and never explored. For DOWN this actually lost states. The round is 0 for
a fresh state. It travels with the copy through the shifted collision queue.
The hash input is therefore `{round, state}`, 22 bits wide for DOWN.

## Hash table lookup: CAM phase and drain phase

This is the least obvious part of the design. An SDRAM read takes tens of
cycles, and the design wants one lookup per cycle anyway. It gets there with
a small CAM and by working in batches.

A hash is split into two parts:
- the low `HT_ADDR_W` = 25 bits are the table address (32 M entries);
- the high 15 bits are the tag.

A table entry holds `{valid, tag}`.

**CAM.** A 32-entry CAM (`cam`) keeps the hashes of the last 32 states that
missed in it. A hash that hits the CAM is a duplicate straight away, with no
memory access. This matters because the successors of nearby parents repeat
often. A CAM write takes two cycles, and no lookup can be done in the second
one. Entries are replaced oldest first.

**Read phase.** Each hash in turn is checked in the CAM.
- On a hit, the verdict is *duplicate* at once.
- On a miss, the hash is written into the CAM and a read of its table address
  is sent.

Reads keep being sent until the first read result comes back. Up to
`HTL_MAX_OUT` = 16 reads can be outstanding.

**Drain phase.** No new reads are sent. Each result is compared with its tag:
- an empty slot makes the state *new*, and `{1, tag}` is written back;
- an equal tag makes it a *duplicate*;
- a different tag makes it a *collision*.

CAM hits are still accepted during this phase. When the last read of the
batch has been resolved, a new read phase starts.

**Same-batch addresses.** All reads of a batch are sent before any of its
writes. So two states of one batch that share an address would both find the
slot empty, and both would be called new. To prevent this, a small table of
the addresses written in the current batch is checked before the memory
result is used.

Verdicts are kept in arrival order, so dequeue only ever has to look at the
head of the lookup pending queue. For DOWN at default sizes this gives
about 0.27 generated states through the lookup per cycle. The limit is the turnaround
between the two phases, not the hash.

## Avoiding a lock-up in the collision loop

A collided state leaves through dequeue into the collision queue and comes
back through enqueue. If the lookup pending queue and the collision queue
were both full, neither could move. To prevent this, enqueue admits a *new*
state only while

`lpq_count + cq_count < CQ_DEPTH`.

So every state inside the loop always has a free place in the collision
queue. This is this design's own rule.

## Unvisited queue

The queue body is a circular region of `2**UQ_ADDR_W` states in its own SDRAM
bank. On chip there are two buffers of `UQ_BUF_DEPTH` = 512 states each:
- the *bottom* buffer, where states are written;
- the *top* buffer, where states are read.

States that are pushed while the SDRAM region is empty, with no reads in
flight, go straight into the top buffer (bypass). Otherwise they go through
the bottom buffer to SDRAM (*spill*) and are read back into the top buffer
(*fill*) as it empties. Writes take precedence once the bottom buffer is half
full. Reads take precedence otherwise.

## External memory ports

The top has two memory ports: `ht_*` for the hash table and `uq_*` for the
unvisited queue. Each port has two channels:
- a request channel (`req_valid`/`req_ready`, `req_we`, `req_addr`,
  `req_wdata`);
- a read-response channel (`rsp_valid`, `rsp_rdata`), which has no
  back-pressure.

The memory must apply requests in the order it accepts them and return read
data in that order. Latency can be anything. A controller for real DDR memory
is not included. `tb/sdram_model.sv` is a behavioural stand-in with random
ready and random 8 to 24 cycle latency. Memory that has never been written
must read as zero (an empty slot), so the hash table bank has to be cleared
before a run.

## Top-level interface (`phast_top`)

| port | meaning |
|---|---|
| `start` | pulse once after reset to begin |
| `stop`, `bad_state` | the property failed; the first violating state |
| `done` | nothing left to explore: every reachable state was checked |
| `stats` | `phast_stats_t`: 32-bit counts of generated states, CAM hits, table reads, new states, table duplicates, collisions, spills, fills, violations, cycles |
| `ht_*`, `uq_*` | the two SDRAM ports above |

Reset is synchronous and active low (`rst_n`). All handshakes are
valid/ready.

Main parameters:

| parameter | default | meaning |
|---|---|---|
| `HASH_W` | 40 | compacted hash width |
| `HT_ADDR_W` | 25 | hash table address bits; 32 M entries fill one 256 MB bank at 8 bytes per entry |
| `CAM_DEPTH` | 32 | CAM entries |
| `HC_FANIN` | 6 | XOR gate width per hash tree level |
| `LPQ_DEPTH`, `CQ_DEPTH` | 64 | lookup pending queue and collision queue depths |
| `HTL_MAX_OUT` | 16 | table reads in flight |
| `UQ_BUF_DEPTH` | 512 | each on-chip unvisited queue buffer |
| `UQ_ADDR_W` | 16 | unvisited queue SDRAM region, in states |
| `STOP_ON_VIOLATION` | 1 | 0 = count violations and keep searching |

## The DOWN model (`down_model_pkg`)

Counter `i` is held in state bits `[3i+2:3i]`.
- Rules 0 to 3: rule `i` decrements counter `i` if it is above zero, and also
  decrements counter `i+1` if that one is above zero.
- Rules 4 and 5 each decrement only their own counter.
- A rule whose counter `i` is zero is disabled.

The invariant is "state ≠ 0", which is the same as "sum of counters > 0". To
check a different model, replace this package, the generator and the
checker. Everything else takes the state width as a parameter.

## Where this design departs from the original description, or fills it in

- A collided state is *rotated* by one bit rather than shifted, so that no
  bit is lost. The rehash round is added to the hash input, for the reason
  given above.
- The same-batch address table, the queue depths, the hash and address
  widths, the memory port protocol, the enqueue admission rule and the
  oldest-first CAM replacement are all choices made here.
- `bad_state`, the `violation` count, `done` and `stats` are added outputs.
  Originally only a stop signal was described.
- Only the DOWN model is built. The larger cache coherence model that the
  architecture was also aimed at is not included, because its rules are not
  available here.
- There is no host link, no DDR controller and no table-clearing engine.
- Run counts. At default sizes, with the memory model's 8 to 24 cycle
  latency, DOWN stops on its violation after about 197 k cycles. By then it
  has:
  - generated 52 k states (one for every enabled rule firing);
  - found 10,955 new states;
  - removed 41 k duplicates (18 k in the CAM, 23 k from the table);
  - had 0 collisions.

  The published hardware figures for this configuration were about 26 k
  generated states and 20 k duplicates. Those counts depend on what is
  counted as "generated" and on the real memory timing, so they are not
  reproduced exactly. That there are no collisions with a full-bank table
  does match.
- Latency from state to verdict. For a CAM hit this is 3 cycles of hash plus
  1 cycle of CAM, which is within the five cycles given for the original.

## Simulating

The testbenches use plain Verilator 5. The packages have to come first on the
command line:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/phast_pkg.sv rtl/down_model_pkg.sv rtl/phast_fifo.sv rtl/cam.sv \
  rtl/hash_compaction.sv rtl/hash_table_lookup.sv rtl/enqueue.sv rtl/dequeue.sv \
  rtl/unvisited_queue.sv rtl/down_next_state_gen.sv rtl/down_invariant_checker.sv \
  rtl/phast_top.sv tb/sdram_model.sv tb/tb_phast_top.sv --top-module tb_phast_top
./obj_dir/Vtb_phast_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog.

- `tb_phast_top`: end to end, with a 15-bit table address so that collisions
  happen, and small unvisited-queue buffers so that spills happen.
  - It runs two copies of the design. One stops on the violation. The other
    searches the whole space.
  - The second copy is checked against a software breadth-first search: all
    10,962 states, none twice, nothing unreachable.
  - It counts every mechanism and fails if one never happened: CAM hit, table
    duplicate, collision, re-entry of a collided state, spill, fill, disabled
    rule, drain phase, violation, stop, done.
- `tb_phast_full`: the top with every parameter at its default, run to the
  violation. It takes about 200 k cycles and finds about 11 k new states,
  with no collisions at the 25-bit address.
- One testbench per block (`tb_phast_fifo`, `tb_cam`, `tb_hash_compaction`,
  `tb_hash_table_lookup`, `tb_enqueue`, `tb_dequeue`, `tb_unvisited_queue`,
  `tb_down_next_state_gen`, `tb_down_invariant_checker`).
  - Each compares the block against an independent reference model under
    random stalls.
  - Where a latency is fixed, it checks the cycle count as well. For example,
    hash compaction is 3 cycles and the generator is one rule per cycle.
