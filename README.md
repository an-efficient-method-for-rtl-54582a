# Slotted queueing-network emulator: a Fair Queueing multiplexer in RTL

Cell-switched networks such as ATM move fixed-size cells. If a time slot is
taken as the transmission time of one cell, the network becomes a
clock-driven system: every queue, link and server is a small automaton, and
all of them step together once per slot. Written as synchronous logic, the
automaton runs on an FPGA-class emulator one slot every few clocks. At 1 MHz
that is a few hundred thousand slots per second. A rare-event measurement
such as a loss rate then costs seconds of emulation, where a discrete-event
simulation would take hours.

This repository holds that emulator as synthesizable SystemVerilog:

* **`fq_emulator`**, the main design. It is a Fair Queueing multiplexer. N
  random cell streams fill one queue each. A server picks the cell with the
  smallest virtual finishing time (SFF: Smallest virtual Finishing time
  First) once per slot. Instruments record the traffic that leaves the
  server.
* **`queue_emulator`**, the elementary set-up. It is one instrumented
  `./1/k` queue: a single server and a buffer of k cells.
* **`tagged_queue_emulator`**, a queue whose cells carry a source number and
  a time stamp, so that waiting times can be measured.
* **`emulator_top`** puts the three side by side. They share only clock and
  reset.

All three are built from a small library: random generators, traffic
sources, queues, counters and histogram memories.

## Random traffic from shift registers

* **`lfsr127`** is a 127-bit feedback shift register on the primitive
  trinomial 1 + X + X^127. It gives one bit per clock, and its period is
  2^127 - 1.
* **`random_word`** runs 16 of these registers side by side. Their bits form
  a new 16-bit word `w` every clock, read as a uniform integer in
  0..65535. Each register starts from the 32-bit user seed, XORed with its
  own 127-bit constant. These constants are computed at elaboration by
  splitmix64 and cost no logic. They are needed because this trinomial mixes
  slowly: its two taps are adjacent. A regular seed (0x55555555), or two
  registers whose states differ in few bits, would give visibly correlated
  words for thousands of clocks.
* **`bernoulli_source`** emits a cell when `w <= theta`, with
  `theta = rate * 65535`. The probability is (theta + 1) / 65536. For
  example, theta = 52429 gives 0.8, 14745 gives 0.225 and 8191 gives exactly
  0.125.
* **`onoff_source`** holds an On/Off state register. A first random word
  moves the state: Off to On when the word is at most `p_on`, On to Off when
  it is at most `p_off`. A second word decides emission while On. The Off
  state is silent.
* **`mmbp_source`** is a Markov-modulated Bernoulli process with NS states.
  Each state has a row of cumulative thresholds that picks the next state
  from the first word. Each state also has an emission threshold and an
  enable bit, applied to the second word.

All sources give the same one-bit "cell in this slot" output, so they can
replace one another.

## Queues

**`slot_queue`** is a queue in which cells carry no information. It is only
an occupation register, updated once per slot:

```
kept   = min(occ + arrivals, capacity)   -- the excess is lost
depart = min(kept, service)
occ'   = kept - depart                   -- i.e. max(kept - service, 0)
```

The capacity limit comes before the service. A cell that arrives at a full
buffer is therefore lost, even if a cell leaves in the same slot. Emulation
time depends only on the number of slots, not on the number of cells.

**`packet_queue`** stores a tag per cell in a circular memory whose depth is
the buffer capacity. Up to NIN cells may arrive in one slot, and a memory
takes one write per clock. A slot therefore lasts NIN + 1 clocks:

| phase | action |
|---|---|
| 0 | Sample the arrivals and the service request. If service is requested and the queue holds cells, read the head cell (`dep_valid`/`dep_tag` are valid from phase 1). |
| 1 .. NIN | Write arrival k-1. If the buffer is full, drop it and pulse `loss`. |

Service comes before the arrivals in a slot. So a cell can leave at the
earliest one slot after it arrived, and a departure frees room for that
slot's arrivals. This order differs from `slot_queue`.

## The Fair Queueing emulator

```
  theta[i] ──► random_word ─► bernoulli_source ─┐   (one per stream, N = 4)
  capacity[i] ────────────────────────► slot_queue[i] ── occ[i] ─────────────┐
                                            ▲   │ nonempty                   │
                                 serve[i] ──┘   ▼                            ▼
  inc[i] = 1/phi_i ─────────────────► fq_mark_table ── mark[i] ─► fq_server │
                                            ▲                (min tree,      │
                                            └──── vtime_next ─ virtual time) │
                                                                  │ serve    │
                                   fq_stream_stats[i] (per stream) ◄┴────────┘
                                   fq_stream_stats[N] (aggregate output)
```

### One slot is three clocks

`fq_server` counts the clocks of a slot (`phase`). It searches for the
smallest mark in log2(N) + 1 = 3 clocks:

| phase | action |
|---|---|
| 0 | Register one candidate per stream: {non-empty, mark, tie rank, index}. These values are a snapshot of the state at the start of the slot. |
| 1 | Reduce the first level of the tree of two-input minimum cells (4 → 2) and register it. |
| 2 | Reduce the last level combinationally to the winner. At the clock edge that ends the slot (`slot_end`), everything commits. |

At that commit edge, these events happen together:

* each queue takes its arrival and loses the served cell;
* the mark table updates;
* the virtual time becomes the winner's mark;
* the round-robin pointer moves;
* all instruments record the slot.

A cell that arrives in slot t can be served in slot t+1 at the earliest.
For N other than a power of two, the tree is padded with invalid
candidates. `SLOT_CYCLES` must be at least log2(N) + 1, and elaboration
stops otherwise.

### Marks and virtual time

Each stream i has a reservation phi_i. It is given as `inc[i] = 1/phi_i` in
mark units: phi_i = 1/4 gives inc = 4. `fq_mark_table` keeps one mark per
stream, for the head cell of its queue only. The virtual time `v` is the
mark of the last cell served. At each commit:

* **Stream i served and still backlogged.** The next cell becomes head with
  mark `mark[i] + inc[i]`.
* **Stream i not served, its queue was empty, and a cell arrives.** The mark
  becomes `max(mark[i], v_new) + inc[i]`. Here `v_new` is the virtual time
  after this slot's service.
* **Otherwise** the mark does not change. An empty stream keeps the mark of
  its last cell, so it cannot gain credit by falling silent.

Among equal marks the server takes the stream that comes first after the
one served last. The tie rank of stream i is `(i - last - 1) mod N`. This
alternates the streams round robin. Under saturation with equal
reservations, all marks tie in turn and service is exactly 0,1,2,3,0,...

Marks are 32 bits wide. They are compared by the sign of their difference
(`emu_pkg::mark_before`), so wrap-around is harmless as long as the marks
being compared are less than 2^31 apart.

### Experiment control and read-out

1. After reset, every histogram memory clears itself. This takes one clock
   per bin, 301 clocks for the occupation histograms.
2. A `start` pulse loads `seed` into the random generators.
3. Once the histograms are clear, slots run.
4. The first `warmup_slots` slots are not recorded.
5. The next `measure_slots` slots are recorded: `measuring` is high.
6. The emulator then stops with `done`. A new experiment needs a reset.

Each `fq_stream_stats` instance covers one stream, or the aggregate output
when `rd_stream = N`. It keeps:

* the number of emitted cells;
* a histogram of the **inter-cell time**, the slots between two consecutive
  cells (1 means back to back, so a silent period lasts gap - 1 slots);
* a histogram of **burst lengths**, runs of back-to-back cells;
* for single streams only, a histogram of the **queue occupation**, sampled
  every slot.

Values beyond the last bin are counted in the last bin. A bin is selected
with `rd_stream`, `rd_kind` (`HIST_GAP`, `HIST_BURST`, `HIST_OCC`) and
`rd_addr`, and read combinationally on `rd_data`. The `arrived`, `lost` and
`emitted` counters cover the measurement window.

### What the full-size run shows

`tb_emulator_full` runs the reference experiment with every parameter at
its default: N = 4, phi_i = 1/4, capacity 300, 10,000 warm-up slots and
10^7 measured slots, at rho = 0.5 and rho = 0.9. Each load takes 30,030,000
clocks. On a 1 MHz emulator that is about 30 s, and under Verilator about
half a minute.

The server idles only when no queue holds a cell. Each idle slot is followed
by another with probability (1 - alpha)^N. The aggregate inter-cell times
for k >= 2 should therefore fall geometrically with that ratio, and they do:

| load | alpha | (1-alpha)^4 | h[3]/h[2] measured | fraction of cells back to back |
|---|---|---|---|---|
| 0.5 | 0.125 | 0.586 | 0.586 | 0.586 |
| 0.9 | 0.225 | 0.361 | 0.360 | 0.929 |

For a single stream, the inter-cell time distribution is not geometric, and
at rho = 0.9 it has several modes. Stream 0 gives P(1..6) = 0.04, 0.16,
0.28, 0.27, 0.05, 0.05. This comes from the round-robin alternation of
streams whose marks are equal.

The buffer of stream 0 is empty in 84 % of slots at rho = 0.5, and in 46 %
at rho = 0.9. The sampled occupation distributions are:

| load | P(0) | P(1) | P(2) | P(3) |
|---|---|---|---|---|
| 0.5 | 0.836 | 0.157 | 0.007 | 0.000 |
| 0.9 | 0.463 | 0.310 | 0.122 | 0.053 |

The original measurements of this system put most of the mass at one or two
cells at rho = 0.5. The exact per-stream heights, both inter-cell times and
occupation, depend on details this design had to fix itself (listed
below): when an arriving cell may first be served, the mark rules, and
whether the cell in service counts as occupying the buffer. Here the
occupation is sampled at the end of a slot, after that slot's departure. A
stream offering 0.125 cells per slot to a server that is idle half the time
should be empty most of the time, which is what this design shows. Treat the
per-stream shapes as qualitative. The aggregate figures above are exact
consequences of a work-conserving server, and they agree with the
published values.

## The two side designs

**`queue_emulator`** emulates one slot per clock while `run` is high. The
parts are:

* a source chosen by `src_sel`: Bernoulli, On/Off, or a 2-state MMBP;
* a Bernoulli server with probability (theta_srv + 1) / 65536;
* a `slot_queue` with capacity up to 255.

Its instruments are:

* an occupation histogram;
* counters of losses, arrivals, departures and idle slots (slots with an
  empty queue, which give the occupation rate);
* a 256-entry `history_mem` of the most recent inter-departure times. The
  oldest value is at `hist_wr_ptr` once `hist_count` reaches 256.

The per-slot signals `arrival`, `service`, `occupation`, `loss` and
`departure` are brought out for observation.

**`tagged_queue_emulator`** has four Bernoulli sources feeding a 300-cell
`packet_queue`. Each cell is tagged {source, 24-bit slot stamp}. When a cell
leaves, its waiting time in slots goes into a 64-bin histogram.

## Files

| file | content |
|---|---|
| `rtl/emu_pkg.sv` | Widths (random word 16, counters 32, marks 32), histogram and source selector enums, `mark_before`. |
| `rtl/lfsr127.sv`, `random_word.sv` | Random generation. |
| `rtl/bernoulli_source.sv`, `onoff_source.sv`, `mmbp_source.sv` | Traffic sources. |
| `rtl/slot_queue.sv`, `packet_queue.sv` | Counting queue and tagged-cell queue. |
| `rtl/event_counter.sv`, `histogram_mem.sv`, `history_mem.sv`, `period_meter.sv` | Instruments. |
| `rtl/fq_mark_table.sv`, `fq_server.sv`, `fq_stream_stats.sv`, `fq_emulator.sv` | Fair Queueing emulator. |
| `rtl/queue_emulator.sv`, `tagged_queue_emulator.sv` | Side designs. |
| `rtl/emulator_top.sv` | Top level. |
| `tb/tb_<module>.sv` | One self-checking testbench per module. |
| `tb/tb_emulator_full.sv` | Full-size Fair Queueing experiment. |

Generic synthesis of `emulator_top` gives about 25,700 flip-flop bits and
71,200 memory bits. Most of the flip-flops are the 9 × 16 LFSRs of
127 bits.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles if something hangs. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/emu_pkg.sv \
          tb/tb_fq_emulator.sv --top-module tb_fq_emulator -o sim
./obj_dir/sim
```

* `tb_fq_emulator` runs three experiments:
  * saturation with equal reservations: exact round robin, a quarter of the
    slots per stream, overflow at capacity 5;
  * saturation with reservations 1/2, 1/4, 1/4, 1/8: service shares 4/9,
    2/9, 2/9, 1/9;
  * rho = 0.9 with capacity 300: arrival rates, per-queue cell conservation,
    histogram totals, and a virtual time that never decreases.
* `tb_emulator_top` runs all three emulators together at reduced run
  lengths. It counts each mechanism and fails if one never occurs:
  * Fair Queueing overflow, idle server slots, round-robin ties, marks
    restarting from the virtual time, backlogged marks, the measurement
    switch;
  * single-queue losses and idle slots, and each source kind;
  * tagged-queue losses and multiple arrivals in one slot.
* `tb_emulator_full` is the full-size run above. It takes about a minute.

The other testbenches compare their module with an independent model. The
LFSR is checked against its recurrence. The queues, meters and mark table
are checked against reference models driven with random stimulus.

## Choices this design makes

The structure and sizes follow the reference design:

* 16-bit words from 127-bit LFSRs, and threshold sources;
* the counting queue's +/min/-1/max chain;
* per-stream queues, head-of-line marks, virtual time equal to the last
  served mark, and round-robin ties;
* 3-clock slots and a log2(N) + 1 clock minimum search;
* N = 4, capacity 300, 10,000 + 10^7 slots;
* the measured histograms.

The following are this design's own, where the reference says nothing:

* **Mark update rules.** See "Marks and virtual time" above. The rules are
  self-clocked, applied to head cells only.
* **Commit timing.** Arrivals and service commit together at the end of a
  slot. An arrival is servable from the next slot.
* **Reservation encoding.** Reservations are given as the integer 1/phi.
* **LFSR seeding** and all counter and bin widths: 32-bit counters, 32
  inter-cell and burst bins, 301 occupation bins.
* **Control.** The self-clearing histograms and the start/warm-up/measure/done
  sequence.
* **Side designs.** The On/Off silent Off state, the MMBP threshold
  encoding, and the Bernoulli server of `queue_emulator`.
* **Tagged queue.** The phase order of `packet_queue` and everything about
  `tagged_queue_emulator` beyond "cells tagged with time stamps to measure
  delay".

The host that loads, runs and reads the emulator is not part of the RTL.
Its controls are the top-level ports.
