# Barriers over an optical broadcast network

This repository holds synthesizable SystemVerilog for hardware barriers on a
many-core chip. The cores are connected by an optical single-writer,
multiple-reader (SWMR) broadcast network. A barrier here is not limited to
one thread per core or to a single barrier at a time:

* any subset of the threads may form a barrier group, and a thread does not
  know the others in its group;
* several barriers of several processes can be active at once;
* threads may be context-switched out while waiting, and may migrate.

These cases force three things on any correct protocol:

1. Every message names its barrier with a unique barrier id:
   48-bit physical address, 16-bit process id, 1-bit sense.
2. Part of the barrier's state lives in memory, at the barrier's address.
   That state is a count and a sense.
3. The count for a barrier instance is kept in one place. A count
   scattered over the units could not survive context switches.

Two protocols are built, side by side:

* **Distributed** (`dist_barrier_system`). This is the scalable one. Every
  core has a barrier unit. One unit per barrier group is elected
  *co-ordinator* and keeps the count. A release takes 3 rounds of 2 cycles
  (6 cycles) once a co-ordinator exists.
* **Centralized** (`cent_barrier_system`). A central station holds every
  active barrier in a 32-entry CAM. It counts the ENTRY messages and
  broadcasts RELEASE.

`optical_barrier_top` instantiates both. They are alternatives and share only
the clock and reset. The cores and main memory are outside the design, and
their signals are ports.

## Message format

All messages are 74 bits (`barrier_pkg::msg_t`):

| field | bits | contents |
|---|---|---|
| `mtype` | 3 | REGISTER=0, ENTRY=1, RELEASE=2, ACCEPT=3, TRANSFER=4, REPLY=5, COUNT=6 |
| `bid`   | 65 | address[48], process id[16], sense[1] |
| `field` | 6 | thread id (ENTRY, REPLY) or count (TRANSFER, COUNT, REGISTER capacity) |

The sense bit is part of the id. Messages of the previous instance of the
same barrier therefore never match. A capacity of 64 does not fit in the
6-bit field, so in a REGISTER message the value 0 means 64. Inside the units,
counts and capacities are 7 bits wide (`CNT_W`).

The memory word of a barrier holds `{count, sense}` (`mem_req_t`/`mem_rsp_t`).
The memory ports are a valid/ready request and a response valid, with any
fixed latency.

## Distributed protocol

### Rounds

All units share one cycle count. A round is `M = 2` cycles, and every unit
starts its rounds on the same cycle.

* A unit loads its transmit register at the start of a round and holds it
  for the whole round. Each unit sends at most one message per round.
* The network model (`swmr_bus`) delivers every channel to every unit one
  cycle later.
* Each receiver evaluates its channels combinationally:
  * the barrier-id comparators select the messages for its own barrier;
  * the ENTRY counter (an adder tree) counts them;
  * the minimum-thread-id detector (a comparator tree) finds the smallest
    thread id.
* The controllers act on these results at the last cycle of the round.

If two messages compete for a unit's transmitter in the same round, the
priority is RELEASE > COUNT > TRANSFER > ACCEPT > REPLY > ENTRY.

### Entering a barrier (`barrier_wait_fsm`)

On `barrier_wait()` the unit sends ENTRY, with its thread id, in the next
round (state E1). It then watches two rounds, E2 and E3:

* **ACCEPT** for its barrier: a co-ordinator counted it, and the unit waits
  (WAIT).
* **RELEASE**: the barrier is complete. The unit flips its local sense and
  releases the thread. This happens in the third round after the request
  round, so the release comes 6 cycles after a request made at a round start.
* **Nothing** by the end of E2: there is no co-ordinator. Each unit takes the
  minimum of its own thread id and the ids of the ENTRY messages seen in E1
  and E2. The unit whose id is the minimum declares itself co-ordinator. It
  starts with a count of the ENTRY messages seen plus one for itself. No
  message is needed for this.

A unit that lost the election re-sends ENTRY if it gets no ACCEPT in the
following round (E3). This is an addition to the protocol. A unit whose ENTRY
went out one round before the winner's would otherwise be counted by nobody.
TRANSFER and COUNT messages also count as acknowledgements, because a
co-ordinator busy handing over its role cannot send ACCEPT in that round.

### Co-ordinator (`coordinator_fsm`)

After an election the new co-ordinator does two things:

1. It waits `TAU_W` cycles. This is the longest a memory write can take, so
   a write-back from an earlier co-ordinator has landed.
2. It reads the barrier's memory word. If the stored sense equals the
   barrier's sense, it adds the stored count. That count belongs to threads
   counted by a co-ordinator that was later swapped out.

During this time it keeps counting ENTRY messages.

Every round, the co-ordinator adds the ENTRY messages it received, and its
own thread's arrival, to its count:

* If the count reaches the capacity, it sends RELEASE, releases its own
  thread in the next round, and writes `{count 0, flipped sense}` to memory.
* Otherwise, if it received any ENTRY, it sends ACCEPT.

The unit keeps the co-ordinator role for the next instance of the barrier.
That is why a second instance needs no new election and meets the 6-cycle
latency. When the unit's thread starts waiting on a *different* barrier, the
unit gives up the role. The new request is held off until the co-ordinator is
idle: nothing is pending, and nothing arrived this round.

### Context switches (`context_swap_fsm`)

A swap-out is taken only at a round end. A unit in E1, E2 or E3 first
finishes its rounds and any outstanding read. A thread swapped out before its
ENTRY went out keeps an *entry pending* bit in its context (`bar_ctx_t`). The
unit sends that ENTRY when the thread is swapped back in.

A co-ordinator being swapped out hands its role over:

| round | what happens |
|---|---|
| a | old co-ordinator sends TRANSFER with its count |
| a+1 | every unit waiting on the barrier sends REPLY with its thread id; the smallest id takes over the role (no memory read) |
| a+2 | old co-ordinator sends COUNT with the count it had at the end of a+1; the new one adds it |

If nobody replies, the old co-ordinator writes `{count, sense}` back to
memory. A later co-ordinator reads that count after its election. If the old
co-ordinator released the barrier during the hand-over, nothing is handed
over.

A thread swapped back in while waiting does two things:

1. Its unit waits `TAU_W` cycles and reads the barrier's memory word.
2. If the stored sense differs from the thread's sense, the barrier was
   released while the thread was away, and the thread is released.

Otherwise the thread keeps waiting for RELEASE.

## Centralized protocol

The path from a core to the station and back:

1. **`central_barrier_unit`** (one per core).
   * `barrier_init()` sends REGISTER (address and capacity).
   * `barrier_wait()` sends ENTRY.
   * The thread is released when the station broadcasts RELEASE with its
     barrier id.
   * Swap-out and swap-in follow the distributed protocol: an entry-pending
     bit, and a sense check in memory `TAU_W` cycles after swap-in.
2. **`cluster_tx_arbiter`**. The 64 cores form 16 clusters of 4. The four
   units of a cluster share one station input channel, granted round-robin.
3. **`central_station`**:
   * One 4-deep `msg_buffer` per input channel. A message that reaches a
     full buffer is dropped and sets that channel's `lost` flag.
   * The `message_controller` takes one message per cycle, round-robin over
     the buffers. It sends the message straight into the pipeline (the
     bypass) when the queue is empty and the pipeline can take it. Otherwise
     it appends the message to the 16-deep `message_queue`.
   * The `barrier_buffer`, a 2-stage pipeline:
     * Stage 1 looks up the CAM by address and process id.
     * Stage 2 increments the count and compares it with the capacity.
     * On release it broadcasts RELEASE, writes `{0, flipped sense}` to
       memory and flips the entry's sense.
     * REGISTER creates or re-initialises an entry and writes
       `{0, initial sense}` to memory.
     * Two messages for the same barrier in consecutive cycles stall the
       second one for one cycle (`stall_o`); there is no forwarding.
4. **Downlink**: the RELEASE goes out on one broadcast channel that every
   unit reads.

The last ENTRY reaches a release 7 cycles after the thread's request:

| stage | cycles |
|---|---|
| transmitter register | 1 |
| optical hop | 1 |
| message buffer | 1 |
| two pipeline stages | 2 |
| release register | 1 |
| optical hop back | 1 |

**Overflow.** The barrier buffer has 32 entries. A REGISTER that finds the
buffer full sets `overflow_o` and is handed out on the `spill_*` port. An
ENTRY for a barrier not in the buffer is handed out on `miss_*`. What is done
with barriers kept outside the buffer is left to the system. CAM entries are
never freed, because no message ends a barrier.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NCORE` / `N` | 64 | cores, barrier units, distributed channels |
| `NCH` | 16 | station input channels (one per cluster) |
| `M` | 2 | cycles per round |
| `TAU_W` | 200 | wait before a memory read that must see earlier writes (the memory latency) |
| `BUF_DEPTH` | 4 | messages per station input buffer |
| `Q_DEPTH` | 16 | station message queue depth |
| `ENTRIES` | 32 | barrier-buffer (CAM) entries |

Thread ids are 6 bits, so one system serves at most 64 threads at once.

## Where this design departs from the protocol description

* The **E3 re-send** of ENTRY, and **TRANSFER/COUNT acting as
  acknowledgements**, are additions. Without them, an arrival order that the
  described election does not cover would lose a count.
* A co-ordinator **keeps its role** after a release. It **gives the role up**
  when its thread waits on another barrier. If other threads' arrivals for the
  next instance were already counted at that moment, that count is lost. This
  means the thread left its barrier group mid-instance, which the protocol
  does not cover.
* The **COUNT round** and the exact split of counting between the old and the
  new co-ordinator during a hand-over are this design's choices.
* **Centralized latency** is 7 cycles from request to release, not 4. The
  optical hops and the station's input buffer are registered here.
* The station processes messages in **arrival order**. It does not sort them
  by barrier group.
* **Overflow** stops at the overflow bit and the spill/miss ports. There is no
  management of barriers kept in main memory.
* `TAU_W` is set to the memory latency of the evaluated system (200 cycles).
  For another memory system it must be set to the longest write latency.
* The cluster transmit arbiter is round-robin. This is an assumption: four
  cores share one station channel.

## Files

* `rtl/barrier_pkg.sv`: widths, message and context types, helper functions.
* Distributed system:
  * `rtl/dist_barrier_system.sv` → `dist_barrier_unit` ×N + `swmr_bus`.
  * Each unit holds `bid_comparators`, `entry_counter`, `min_tid_detector`,
    `barrier_wait_fsm`, `coordinator_fsm` and `context_swap_fsm`.
* Centralized system:
  * `rtl/cent_barrier_system.sv` → `central_barrier_unit` ×NCORE +
    `cluster_tx_arbiter` ×NCH + two `swmr_bus` + `central_station`.
  * The station holds `msg_buffer` ×NCH, `message_controller`,
    `message_queue` and `barrier_buffer`.
* `rtl/optical_barrier_top.sv`: both systems.
* `rtl/swmr_bus.sv` is a behavioural model of the optical network: a
  one-cycle register stage. Modulators, waveguides and detectors are not
  modelled.

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/barrier_pkg.sv \
    tb/tb_dist_barrier_system.sv --top-module tb_dist_barrier_system -Mdir obj
./obj/Vtb_dist_barrier_system
```

What each testbench covers:

* **Block-level** (`tb_entry_counter`, `tb_min_tid_detector`,
  `tb_bid_comparators`, `tb_swmr_bus`, `tb_msg_buffer`, `tb_message_queue`):
  random stimulus against a reference model in the bench.
* **`tb_dist_barrier_system`** (8 units, `TAU_W`=6):
  * the first election;
  * the 6-cycle latency with a co-ordinator present;
  * staggered arrivals;
  * two barriers at once;
  * swap-out and swap-in with the sense check;
  * co-ordinator hand-over;
  * write-back and the read by a new co-ordinator;
  * a pending ENTRY.
* **`tb_cent_barrier_system`** (8 cores, 4 channels, 2 CAM entries):
  * registration;
  * the 7-cycle latency;
  * contention through the queue and the bypass;
  * same-barrier stalls;
  * swap-out and swap-in;
  * CAM overflow.
* **`tb_optical_barrier_top`** runs the top with all parameters at their
  defaults. It covers 64-thread barriers on both systems and every mechanism
  above. It counts each mechanism and fails if one never happens.
  `tb/barrier_mem_model.sv` is the memory model it uses.

The full-size top takes several minutes to compile with Verilator. Its
simulation takes under a second.
