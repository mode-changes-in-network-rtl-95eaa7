# Run-time schedule changes for a TDM network-on-chip

A time-division-multiplexed (TDM) network-on-chip gives every core a fixed
share of bandwidth. A static schedule decides which network adapter may send
to whom in each time slot. Each adapter stores its part of that schedule in a
*slot table*. Such a schedule fits one application phase. When the platform
moves to a different set of tasks (a *mode change*), the bandwidth should be
reassigned. That has to happen without stopping the cores, without losing or
corrupting packets, and within a time bound that can be computed in advance.

This SystemVerilog implements the hardware for such a mode change, on the
T-CREST / Argo platform. It reimplements the design of the thesis *Mode
Changes in Network-on-Chip Based Multiprocessor Platforms*. The main idea:

* Every slot table has **two banks**. One bank is active and is read slot by
  slot. The other bank may be overwritten at any time.
* A dedicated **mode change module** reads the new global schedule from its
  own scratch pad memory (SPM). It broadcasts the schedule word by word
  through an **asynchronous broadcast tree** to one **extractor** per node.
  Each extractor picks out the words tagged with its node ID and writes them
  into the idle bank of its adapter's slot table.
* The module then sends a single **swap command** that names a future
  schedule period. The controller and every adapter count slots and periods
  in lock-step, because the clock is mesochronous: same frequency, different
  phases. So all of them flip banks at the end of the same period, and the
  new schedule starts everywhere at the same TDM moment.

The network is drained at the end of every schedule period. Switching at a
period boundary therefore never cuts a packet in half, and the tasks on the
cores see only a change of bandwidth.

## Contents

* [The mode change step by step](#the-mode-change-step-by-step)
* [Shared notion of time](#shared-notion-of-time)
* [Controller](#controller)
* [Broadcast tree: asynchronous click elements](#broadcast-tree-asynchronous-click-elements)
* [Extractor](#extractor)
* [Network adapter changes](#network-adapter-changes)
* [Formats](#formats)
* [Latency](#latency)
* [Parameters](#parameters)
* [Module hierarchy](#module-hierarchy)
* [Simulating](#simulating)
* [Verification](#verification)
* [Departures, simplifications and limits](#departures-simplifications-and-limits)

## The mode change step by step

1. **Request.** Software on the system processor decides that a new mode is
   needed. This is a software policy; there is no hardware for it.
2. **Acquisition.** The system processor copies the new global schedule into
   the mode change SPM (`mc_spm`) through a write-only OCPcore port.
   * The SPM holds two schedules of the maximum size for all nodes.
   * Software can therefore fill one half while the controller still uses
     the other.
3. **Instruction.** The system processor polls the controller's status over
   OCPio until it reads "free". It then writes one word that holds the
   location of the schedule in the SPM and its size.
4. **Fetch and broadcast.** The controller reads the schedule and pushes one
   token per clock cycle into the broadcast tree. For each node the tokens
   are:
   * first the schedule size;
   * then the node's G slot words.

   This takes `N*(G+1)` cycles for N nodes.
5. **Swap command.** After the last token, the controller toggles a 2-phase
   swap request. The bundled data is a *moment*: the period counter value two
   periods ahead. Each extractor adds the size it received and passes the
   command to its adapter.
6. **Apply.** In the last clock cycle of the moment period, every adapter
   does three things:
   * toggles its bank-select flip-flop;
   * loads the new slot count into its slot counter;
   * and, from the next cycle on, runs the new schedule.

   The controller loads the same size at the same moment and becomes free
   again.

The time between the swap command and the moment has to cover three things:
* the remaining propagation through the tree;
* the clock skew between controller and adapters;
* the synchronizer delay at the adapters.

A period lasts at least 6 cycles (2 slots of 3 cycles each). So "two periods
ahead" leaves at least 8 cycles, which is enough for a 64-node tree (5
asynchronous stages) plus about 3 cycles of skew.

## Shared notion of time

`tdm_counter` is instantiated once in the controller and once in every
adapter.
* **Slot timing.** A timing machine steps through three states, s1, s2 and
  s3, one cycle each. One round is one slot.
* **Slot counter.** In s3 the slot counter advances. It wraps to 0 after
  `max_slot`, which is the schedule size minus one.
* **Period counter.** A one-hot period counter (3 bits) rotates one place
  towards its MSB at each wrap, with the MSB going back to bit 0. The
  sequence is `001 -> 010 -> 100 -> 001`.
* **End of period.** `eop` is high in the s3 cycle of the last slot.

After reset, every counter starts at slot 0 and period `001`, with the boot
schedule size of 10 slots. Because all resets are released at the same TDM
moment, each seen through its own clock phase, all copies stay aligned for
ever. Size changes keep them aligned too, because everyone loads the new size
in the same `eop` cycle.

**The moment.** The swap moment is the current period value rotated one place
the other way. With 3 bits that is exactly two periods ahead. The swap happens
in the `eop` cycle where `period_cnt == moment`, so it happens at the end of
period x+2 when the command is issued during period x.

## Controller

`mc_controller` contains three small machines.

**OCPio machine** (`IO_IDLE`, `IO_WRITE_DONE`). The controller occupies a
single address, `MC_ADDR`.
* A read is answered in the same cycle. `SData[0]` is 1 while a mode change
  is running.
* A write starts a mode change. `MData[31:16]` holds the SPM word address of
  the schedule and `MData[7:0]` holds its size minus one.
* After a write, the machine holds `SCmdAccept` and the response until
  `MRespAccept`.
* A command to another address is answered with `ERR`.
* A write that arrives while a change is running is acknowledged and ignored.
  Software is expected to poll first.

**Timing machine.** This is the `tdm_counter` described above.

**Main machine**: `IDLE -> INIT -> PUSH_LEAD_IN -> PUSH -> ... -> WAIT_SWAP -> IDLE`.
* `INIT` resets the node ID.
* `PUSH_LEAD_IN` pushes the size token and presents the first SPM address.
* The SPM reads synchronously, so in `PUSH` the word on the bus always
  belongs to the address presented one cycle earlier. `PUSH` pushes one word
  per cycle and moves on to the next node after G words.
* After the last word of the last node it toggles `swap_req` and latches the
  moment.
* `WAIT_SWAP` waits for the `eop` cycle of the moment period.

Every token is one toggle of `tree_req`. The controller **never waits for the
tree's acknowledge**. It relies on the tree and the extractors being faster
than the clock (see the next section), so the schedule leaves at the full
rate of one word per cycle.

## Broadcast tree: asynchronous click elements

This is the least conventional part of the design. The controller and the
adapters share a frequency but not a phase, and they may be far apart on the
chip. The schedule therefore travels through a small **self-timed** network
rather than through clocked pipeline registers.

**Channels.** Each channel uses the 2-phase bundled-data protocol:
* The sender puts data on the wires and toggles `req`.
* The receiver captures the data and toggles `ack`.
* A channel is idle when `req == ack`.

**Click element.** Every stage is a *click element*: a small circuit built
from ordinary flip-flops and gates, with no latches and no C-elements.
* One `state` flip-flop drives the stage's outgoing requests and its incoming
  acknowledge.
* The *click* signal is the AND of two conditions:
  * new data waits at the input: `state != req_in`;
  * every consumer has taken the previous data: `state == ack_out[i]` for
    all outputs i.
* The rising edge of click toggles `state` and, in the tree nodes, captures
  the data word into a register.
* The toggle removes the first condition again, so click falls by itself.
  Click is therefore a short pulse, used as a local clock.

In `mc_tree_node` this is a fork to 2 or 3 outputs with a data register. It
behaves like a handshake latch followed by a fork.

**Tree shape.** `mc_broadcast_tree` builds a tree with these properties:
* It uses only forks to three and forks to two.
* Every leaf is the same number of stages from the root. The number of
  stages is `tree_levels(LEAVES)` = ceil(log3 LEAVES).
* Levels are filled with as many forks to three as fit, then forks to two.
  The functions `tree_level_info` and `tree_level_offset` in `mc_pkg` compute
  the counts. The tree is built with `generate` loops from them, so any
  number of nodes works.

| Nodes | Fork levels |
|-------|-------------|
| 4 | 2 |
| 8 | 2 |
| 64 | 4 |

With the extractor added, 64 nodes gives 5 asynchronous stages.

The swap channel (request plus moment) is only wired to all leaves, with no
buffering, because it changes once per mode change.

**Matched delays.** Before the request reaches the click logic it passes a
**matched delay**. The delay is longer than the data path, so the data is
stable when click captures it.
* `matched_delay` is a behavioural model: `assign #(DELAY_NS)`.
* Defaults are 1 ns per tree stage and 2 ns in the extractor, where the
  delay also covers the ID compare and the slot table write.
* In silicon it is a delay-cell chain. On an FPGA it is a chain of LUTs,
  each used as a buffer.
* Synthesis drops the `#` delay. A physical implementation has to put real
  delay elements there.

**Why blind pushing works.** A token needs at most one clock period per
stage. The controller toggles once per cycle. Each stage answers faster than
that, so a stage has always acknowledged token k before token k+1 arrives.
The latency from the controller to a slot table is at most B + 1 cycles for B
stages. `tb_mc_broadcast_tree` pushes a token every 10 ns without looking at
`ack` and checks that all 8 leaves see every token in order.

**Reset and simulation.** All click elements have an asynchronous reset that
clears `state` and data, leaving all channels idle with req = ack = 0. The
click pulses are real clock edges in simulation, so Verilator must be run
with `--timing`.

## Extractor

`mc_extractor` is a token *sink*, so its click is simply
`state XOR delayed req`. It consumes every token and acts only on tokens
whose ID tag equals its parameter `ID`. Its state machine is itself clocked
by click:

* **IDLE.** The counter is 0. A matching token carries the size and is
  stored, and the machine goes to EXTRACT.
* **EXTRACT.** Each matching token is written to the slot table:
  * address `{wbank, counter}`;
  * the token word as data;
  * write enable high;
  * click as the write clock.

  The counter then increments. When the counter equals the stored size it
  returns to 0 and the machine goes back to IDLE, ready for the next
  schedule's size token.

No extra signal marks the start of a new schedule: the next matching token
after IDLE is always a size.

The extractor also passes the swap command (request and moment) to its
adapter, together with the stored size. The size travels as *size minus one*,
the last slot index, which is what the slot counter compares with.

## Network adapter changes

`network_adapter` is a simplified Argo-style adapter that carries the mode
change extension. The extension itself is in `na_mode_change`.

* **Slot table.** `slot_table` is a simple dual-port memory, twice as deep as
  a schedule.
  * The address MSB selects the bank.
  * The read port (`{rbank, slot_cnt}`) is synchronous to the adapter clock.
  * The write port belongs to the extractor and runs on its click pulse.
  * `wbank` is always the inverse of `rbank`, so the extractor can only ever
    write the bank that is not being read.
* **Synchronizer.** `swap_sync` has two flip-flops. The swap request comes
  from another clock phase through asynchronous wiring. Its moment and size
  have been stable for many cycles when the toggle leaves the second
  flip-flop.
* **Swap.** A toggle of the synchronized request latches the moment and size
  and marks a swap as pending. In the `eop` cycle of the moment period, three
  things happen:
  * `rbank` toggles;
  * the slot counter's ceiling is loaded;
  * `swapped` pulses.
* **Boot.** The local processor no longer writes the slot table. The adapter
  therefore sends nothing until its first swap (`booted`), and the first
  schedule after reset is loaded by a normal mode change. Until then the
  counters run with the boot size of 10 slots, so the timing is defined
  before any schedule exists.
* **Route in the slot.** The route moved from the DMA table into the slot
  word. Different slots that serve the same DMA entry may therefore use
  different paths.
* **Send path**, one slot per 3 cycles:
  * s1: the slot table read.
  * s2: if the entry is valid, the adapter is booted and the entry's DMA
    entry is active, the SPM is read at the read pointer.
  * s3: the packet is formed, and the read pointer, write pointer and word
    count are updated. The DMA entry turns inactive when the count reaches 0.
  * The packet is presented on `tx_*` for one cycle, in the cycle after s3
    plus the slot's *postpone* field, which is 0, 1 or 2 cycles.
  * A slot whose DMA entry is inactive sends nothing. This is a *closed
    channel*: the block simply waits until a schedule gives it a slot again.
* **DMA table.** The processor programs the DMA table through OCPio. There is
  one entry per destination, 4 entries by default.

  | byte address | write | read |
  |---|---|---|
  | `8*i` | `{write pointer[31:16], read pointer[15:0]}` | same |
  | `8*i+4` | word count; non-zero makes the entry active | `{active[31], count[15:0]}` |

* **Receive.** A packet on `rx_*` goes into a one-word buffer. The buffer is
  written to the SPM in the next cycle in which s2 is not using the SPM port.
  At most one packet arrives per slot.

## Formats

**Slot word** (`mc_word_t`, 21 bits). This is the format of the mode change
SPM contents, the tree tokens and the slot table entries.

| bits | field |
|---|---|
| 20 | valid |
| 19:18 | DMA table index |
| 17:16 | postpone (0..2 cycles) |
| 15:0 | route |

The tree token adds the node ID above it: `{id[ID_W-1:0], word[20:0]}`.

**Global schedule in the mode change SPM.** The schedule starts at word
`location`. It holds node 0's G words, then node 1's G words, and so on: N×G
words in all.

**Controller command word**: `(location << 16) | (G - 1)`.

**OCP encodings** (`mc_pkg`):

| signal | IDLE / NULL | WR / DVA | RD / FAIL | ERR |
|---|---|---|---|---|
| MCmd | 000 | 001 | 010 | — |
| SResp | 00 | 01 | 10 | 11 |

## Latency

The cycles the hardware adds to a mode change are:

* **start and fetch:** `2 + N*(G+1)` cycles;
* **apply:** at most `3*(P+1)*G_old - 1` cycles after the fetch, with P = 2
  periods of distance. The worst case is a command issued just after a
  period began: the rest of that period plus two full periods.

The complete worst case also counts two software steps:
* copying the schedule into the SPM, 8 cycles per word;
* about 10 cycles for polling and the write.

Together:

    T = 8*N*Gmax + N*(Gmax+1) + 3*(P+1)*Gmax + 11 cycles

Examples for 4 nodes:

| Case | Estimate |
|---|---|
| From the 10-slot boot schedule to a 5-slot schedule | fetch 26 cycles + apply ≤ 89 cycles. With software, about 285 cycles; a cycle-accurate simulation of the full platform gave 280. |
| Worst case, 10-slot maximum | 465 cycles |
| Worst case, 256-slot maximum | 11 535 cycles |

Measured in this RTL, from the command write to the swap cycle, for the
10 → 5 slot change:
* 107 cycles in the controller testbench;
* 100 cycles in the platform testbench;
* 87 cycles in the workload testbench, whose command falls at a random
  point of the old period.

All are within the 115-cycle bound.

`tb_mc_workloads` runs the two worst cases on the full-size platform. Each
mode change starts at a random point of the old period, which sweeps over
the apply wait. The hardware part of each bound is fetch plus apply:

| Case | Mode changes | Longest measured | Bound |
|---|---|---|---|
| 10-slot schedules | 20 | 133 cycles | 2 + 44 + 89 = 135 |
| 256-slot schedules | 6 | 3295 cycles | 2 + 1028 + 2303 = 3333 |

The software part of the totals (copying the schedule, polling) is not
measured, because the processors are not part of this design.

The same testbench also issues each command in the cycle right after the
previous swap. The most skewed adapter lags the controller by 2.9 cycles,
so it may not have swapped yet. Afterwards both slot table banks of every
adapter must still hold the right schedules. This tests the minimum
separation of three cycles between a swap and the next push.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NODES` | 4 | `mc_platform`, `mc_module`, `mc_controller`, `mc_spm` | NoC-attached nodes (adapters, extractors, tree leaves) |
| `MAX_SCHEDULE_SIZE` | 256 | `mc_pkg` | largest schedule, in slots; slot counter width `SLOT_CNT_W` = 8 |
| `BOOT_SCHEDULE_SIZE` | 10 | `mc_pkg` | period length after reset |
| `PERIOD_CNT_SIZE` | 3 | `mc_pkg` | one-hot period counter; swap distance = `PERIOD_CNT_SIZE - 1` periods |
| `MC_SPM_AW` | 11 | `mc_platform` | mode change SPM = 2 × 256 × NODES = 2048 words |
| `SPM_AW` | 16 | `mc_platform`, `network_adapter` | node SPM word address width |
| `MC_ADDR` | 0 | `mc_platform` | OCPio address of the controller |
| `SYNC_STAGES` | 2 | `network_adapter` | synchronizer flip-flops |
| `TREE_DELAY_NS`, `EXTR_DELAY_NS` | 1, 2 | `mc_module` | matched delays (simulation only) |

With `NODES = 64` the design still elaborates: a 32 768-word mode change SPM
and 4 fork levels.

Coarse synthesis of the default top (`mc_platform`) gives:
* 856 word-level cells;
* 1 701 flip-flop bits;
* 86 016 memory bits: the mode change SPM plus four two-bank slot tables.

## Module hierarchy

    mc_platform                 top: one mode change module, its SPM, NODES adapters
    ├── mc_spm                  mode change SPM (OCPcore write, synchronous read)
    ├── mc_module
    │   ├── mc_controller
    │   │   └── tdm_counter
    │   ├── mc_broadcast_tree
    │   │   └── mc_tree_node × n
    │   │       └── matched_delay
    │   └── mc_extractor × NODES
    │       └── matched_delay
    └── network_adapter × NODES
        ├── na_mode_change
        │   ├── swap_sync
        │   └── tdm_counter
        └── slot_table

`mc_pkg` holds the shared types, constants, OCP codes and tree-shape
functions.

**Top-level ports.** The processors, the node SPMs and the asynchronous
router network are not part of this RTL. Their connections are ports of
`mc_platform`:
* `sys_spm_*` and `sys_io_*` for the system processor;
* `na_io_*` for the node processors;
* `spm_*` for the node SPMs;
* `tx_*` and `rx_*` for the router network.

**Clocks and resets.** Each adapter has its own `na_clk[i]` and `na_rst[i]`.
A mesochronous system gives each adapter a skewed copy of `clk` and `rst`.

## Simulating

Use Verilator 5 with timing support. The asynchronous parts need `--timing`.
Always pass the package first. For example, for the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mc_pkg.sv tb/tb_mc_platform.sv --top-module tb_mc_platform -o sim
    ./obj_dir/sim +verilator+rand+reset+2

Any other testbench runs the same way with `tb_<name>`. Each one:
* prints `TB_RESULT checks=N failures=M`;
* stops itself with a watchdog if something hangs;
* uses only `$urandom`;
* resets everything it reads, so a random start-up state
  (`+verilator+rand+reset+2`) is safe.

## Verification

Every block has a self-checking testbench. Each result is compared with
values computed independently in the testbench. Each block's testbench was
also checked against a deliberately broken copy of its module, and it
failed. `tb_mc_test_cases` and `tb_mc_workloads` are extra testbenches on
the top level, not tied to one block.

| testbench | what it establishes | checks |
|---|---|---|
| `tb_tdm_counter` | cycle-exact slot/period/eop against a reference model; size change at eop | 601 |
| `tb_swap_sync` | latency of exactly 2 edges, for unaligned toggles | 41 |
| `tb_slot_table` | both banks; pulse-clocked writes; registered read | 342 |
| `tb_matched_delay` | every edge is delayed by exactly the delay | 40 |
| `tb_mc_tree_node` | fork to 3 with slow and fast consumers: no token lost or overwritten | 181 |
| `tb_mc_broadcast_tree` | 8 leaves, blind pushing every cycle, order and data at every leaf; swap wiring; tree shape for 4, 8 and 64 leaves | 819 |
| `tb_mc_extractor` | only its own ID is written, to the right bank and addresses; acknowledge within the matched delay; 22 schedules with token spacing down to 4 ns; swap size | 1361 |
| `tb_mc_spm` | full 2048-word depth; DVA timing | 433 |
| `tb_mc_controller` | OCPio (status, ERR); exact token stream; one token per cycle; moment two periods ahead; latency bound; new period length | 178 |
| `tb_na_mode_change` | swap exactly in the first eligible `eop` after synchronization, for 12 random requests; bank, booted, period length | 4714 |
| `tb_network_adapter` | cycle/route/address/data of every packet against a model, including postponed, empty and closed slots; receive path; DMA read-back | 961 |
| `tb_mc_module` | controller + tree + 4 extractors: per-node slot table contents, banks and swap commands, for 8 random schedules of up to 40 slots | 432 |
| `tb_mc_platform` | whole design at default parameters, see below | 236 |
| `tb_mc_test_cases` | the thesis's two test cases with its 12 schedules: open channels after each of 10 mode changes equal the schedule's channel set; blocks stay intact across 5 mode changes | 217 |
| `tb_mc_workloads` | latency workloads at full size (10→5, 10→10 and 256→256 slots): time bound for every mode change; every slot of the new schedule sent by every adapter, in order, with its route; 12 back-to-back mode changes with a 2.9-cycle adapter skew, then both slot table banks checked | 8548 |

**End-to-end test.** `tb_mc_platform` runs the design at its default
parameters. The four adapters get clock and reset phases skewed by 0, 0.4,
1.3 and 2.2 cycles. The test performs three mode changes:
1. boot schedule → schedule A (5 slots);
2. A → schedule B (3 slots). B closes one channel, which must stall while the
   other channels keep delivering;
3. B → A. The stalled block must then complete.

It checks every received word, every adapter's swap against the controller,
and the latency. It also counts each mechanism: 3 mode changes, 12 bank
swaps, 3 size changes, 11 postponed packets, 1 closed-channel stall and 97
status polls while busy.

**Thesis test cases.** `tb_mc_test_cases` uses the static set of 12
schedules: 5, 4, 5 and nine times 3 slots, with the open channels among
cores 1 to 3 that the thesis lists. Core 0 is the system processor and is
in no schedule. The slot positions and routes are this test's own. Test
case 1 applies schedules 4, 5, ..., 12, 1 while every core keeps starting
blocks to every other core. After each change, exactly the channels of the
active schedule must carry packets. Test case 2 starts one block per
channel and applies schedules 1, 4, 3, 2, 1 a few periods apart. Every
block must arrive intact.

## Departures, simplifications and limits

* **Packets are one word.** A packet is `{route, remote address, data}` on
  `tx_*`/`rx_*`. The real adapter sends three-flit packets into a self-timed
  router. The send path's s1/s2/s3 split and the one-word receive buffer
  belong to this implementation.
* **DMA register map, field widths, slot-word bit order and controller
  command encoding** are this implementation's choices. The original design
  fixes the fields but not their layout.
* **`booted` flag.** An adapter stays silent until its first swap. In the
  original platform the processors no longer load the slot tables at boot,
  and the first schedule comes from the mode change module.
* **Postpone** supports 0 to 2 cycles, the range the scheduler uses. A value
  of 3 would collide with the next slot's packet. An assertion in
  `network_adapter` flags such a slot.
* **No enforced gap after a swap.** The original design asks the controller
  to stay idle for two cycles after a swap, so that a skewed adapter has
  finished its swap before new tokens arrive. Here the status read and the
  command write already take longer than that. If the skew allowed is larger
  than about 2 cycles, `mc_controller` would need an explicit hold-off.
* **Matched delays are behavioural.** The values are only for simulation.
  Synthesis sees plain wires, and real delay elements must be inserted and
  constrained. The click pulses are used as clocks (`st_wclk`, tree and
  extractor registers).
* **Lint warning `SYNCASYNCNET`.** Verilator notes that the reset of the
  controller and of the adapter is both an asynchronous reset and sampled by
  the `disable iff` of an assertion. This is harmless.
* **The mode change SPM's processor port is write-only.** Reads are answered
  with `DVA` and zero data.
* **No swap command is issued while a change is running.** A write while
  busy is dropped, so software must poll the status first, as the API of the
  original design does.
* **Not part of the RTL:**
  * the processors, including the system processor that runs the mode change
    software;
  * their SPMs;
  * the shared memory and its arbiter;
  * the serial port;
  * the asynchronous router network.

  The testbenches model what they need: memories, a packet network and OCP
  masters.
