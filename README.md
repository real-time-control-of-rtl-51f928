# Real-time bus scheduling for COTS I/O peripherals

Commercial buses such as PCI and PCI Express have no notion of priority.
When several high-bandwidth peripherals write to main memory at the same
time, the bus shares bandwidth unpredictably. A periodic transfer that needs
4.4 ms on an idle bus can then take more than 8 ms and miss its deadline.

This design puts the I/O traffic of such a system under ordinary
uniprocessor real-time scheduling without changing the peripherals, the
motherboard or the applications. It adds two kinds of hardware:

* a **real-time bridge** between each peripheral and the bus. The bridge
  buffers the peripheral's traffic and starts bus transfers only when it is
  allowed to;
* one **reservation controller**. It decides, system-wide, which bridge may
  use the bus.

Bridge *i* and the controller share exactly two wires:

| wire          | direction            | meaning                                      |
|---------------|----------------------|----------------------------------------------|
| `data_rdy[i]` | bridge → controller  | the bridge holds data ready for the bus       |
| `block[i]`    | controller → bridge  | 1 = do not start bus transactions             |

The controller lets at most one bridge onto the bus at a time. The bus then
behaves like a single CPU: each I/O flow is a task, each data chunk is a
job, and a chunk's transfer time plays the part of its execution time. Any
schedulability test for fixed-priority uniprocessor scheduling then applies
to the I/O flows.

## What the two wires can express

The controller knows nothing about a flow except whether its bridge has
data. A scheduling policy can be built on the two wires only if every
per-flow *scheduling server* can run its rules from that single bit (plus
the current time and its own grant). Servers of this kind include:

* a strictly periodic task. Its READY is simply `data_rdy`.
* a **sporadic server**. It enforces a budget `e_s` per period `p_s` for an
  aperiodic or jittery flow.

Servers that need job arrival times cannot be built this way, for example
EDF deadlines for jobs that overlap, or a total-bandwidth server. This RTL
implements fixed priority with periodic and sporadic servers.

## Reservation controller (`reservation_controller`)

```
data_rdy[i] ──► server i ──READY[i]──► fp_scheduler ──► block[i]
                   ▲                                      │
                   └────────── granted = !block[i] ◄──────┘
```

* `tick_gen` makes a 1 µs tick and a 32-bit microsecond time stamp
  `now_us`. All servers share this one time base, so their budgets need no
  clock synchronisation between separate boxes.
* Each flow has a server: `sporadic_server` if its bit in `SPORADIC` is set,
  otherwise a plain wire (READY = `data_rdy`).
* `fp_scheduler` is the global logic. The flows are wired in priority order,
  index 0 highest. Bridge *i* is unblocked exactly when READY[i] is set and
  every higher-priority bridge is blocked:

  `block[0] = !ready[0]`, and `block[i] = !(block[0] & … & block[i-1] & ready[i])`.

  Wiring flows in order of increasing period gives rate-monotonic
  scheduling. The path from `data_rdy` through READY to `block` is
  combinational. A winning bridge behind a sporadic server sees `block` fall
  one clock after it raises `data_rdy`, because the server first opens an
  active period. Without a server, `block` falls in the same cycle.

## Sporadic server (`sporadic_server`): the part to read carefully

The server holds a budget, initially `BUDGET` ticks. A pending replenishment
is a pair *(time, amount)*. The rules, all driven by `data_rdy` and the
grant:

1. **READY** = an active period is open, `data_rdy` = 1, and budget > 0.
2. **Consumption.** On every tick where READY = 1 and the flow is granted
   (`block` = 0), the budget drops by one and the consumed count rises by one.
3. **Opening an active period.** This happens when the server is idle,
   `data_rdy` = 1 and budget > 0. The replenishment time is fixed at this
   moment as `now_us + PERIOD`, and the consumed count is cleared.
4. **Closing.** The period closes when `data_rdy` falls (the flow has
   finished) or the budget reaches 0. The consumed amount is queued with the
   time fixed in rule 3. A period that consumed nothing queues nothing.
5. **Replenishment.** When `now_us` reaches the head entry's time, its
   amount is added back to the budget.

Consequences worth knowing:

* The replenishment time is fixed at **activation**, not at first use. A
  flow that is active but pre-empted still has its clock running. The
  server therefore interferes with lower priorities no more than a periodic
  task of (`BUDGET`, `PERIOD`) would. It does **not** guarantee at most
  `BUDGET` in every sliding window of length `PERIOD`: a late chunk followed
  by an early one can use up to 2·`BUDGET` in such a window, exactly as a
  periodic task can.
* If the flow stays backlogged, the server delivers `BUDGET` ticks in every
  `PERIOD`, at the start of each period (for the highest-priority flow).
  This is the upper service curve min(⌈t/p_s⌉·e_s, t − ⌊t/p_s⌋·(p_s − e_s)).
  The worst case delays the same curve by p_s − e_s.
* Pending replenishments sit in a `REPL_DEPTH`-entry FIFO. They leave it in
  time order because `PERIOD` is constant. While the FIFO is full, no new
  active period opens. The flow then waits; it loses no budget.
* Budget is counted in whole ticks. A bus transaction that has already
  started is not pre-empted (see below). Its length (16 µs for 4 KB at
  250 MB/s) is neglected in the budget accounting, which is harmless for
  periods of milliseconds.

## Real-time bridge (`real_time_bridge`, `bridge_dma_engine`)

Only the bridge's DMA engine is connected to the scheduling wires. The
processor, the Ethernet MAC and the bus endpoint inside a bridge handle just
addresses and lengths; the DMA engine moves the data.

**Queues.** Each queue is `Q_DEPTH` descriptors deep. A descriptor is a
32-bit address and a 16-bit length.

| queue   | filled by        | holds                                           |
|---------|------------------|-------------------------------------------------|
| `avail` | host driver      | host buffer addresses for received packets       |
| `out`   | host driver      | outgoing packets in host memory (address, length)|
| `in`    | bridge driver    | received packets in the bridge's DRAM            |
| `ffree` | bridge driver    | free bridge-DRAM buffers for outgoing packets    |
| `hdone` | engine → host    | finished packets {direction, host address, length} |
| `fdone` | engine → bridge  | finished packets {direction, local address, length} |

**Pairing.** A received packet pairs the heads of `in` and `avail`. An
outgoing packet pairs the heads of `out` and `ffree`.

**data_rdy** is high while a complete pair is waiting (and both completion
queues have room), or while a packet is in progress.

**Transfers.** The engine takes a packet only while `block` = 0. It cuts the
packet into bus transactions of at most `TXN_BYTES` (4 KB) and checks
`block` before each one. A transaction that has started always finishes,
because COTS buses do not pre-empt transactions. When both directions have
work, they alternate packet by packet.

**Transaction port.** This port connects to the bus interface (a PCIe
endpoint with its address-translating bridge). The bus interface is outside
this RTL. `dma_req` stays high with `dma_dir/src/dst/len` stable until
`dma_ack` pulses once all bytes of that transaction are written. An
assertion checks that the fields stay stable.

**Interrupts** (`irq_coalescer`). There is one interrupt line, used by both
drivers. It pulses only when at least one packet has finished since the last
interrupt and one of these holds:
* nothing more is ready (bit 0 of `irq_cause`);
* `block` has just risen (bit 1);
* `IRQ_LIMIT` packets have finished (bit 2).

**Synthetic mode.** With `synth_mode = 1` the bridge's `data_rdy` comes from
a `traffic_generator` instead of the DMA engine, and the engine is held
blocked. The generator releases `JOB_BYTES` every `PERIOD` ticks. It sends
`BYTES_PER_TICK` on each unblocked tick and counts a deadline miss when a
job is still pending at the next release. Its data rate is a simple
bytes-per-tick model of the bus. Change `synth_mode` only while both sources
are idle.

## Trace unit (`trace_acquisition`)

To see the schedule without probing the bus, the controller samples
`{block, data_rdy}` on every microsecond tick. Each change is written into a
`TRACE_DEPTH`-entry FIFO and sent as a record on `uart_txd` (8N1, `BAUD`):

```
0xA5, then 5 bytes LSB first of {block[3:0], data_rdy[3:0], timestamp_us[31:0]}
```

The record has ⌈(32+2N)/8⌉ data bytes in general. The first tick after reset
is always recorded. If a change arrives while the FIFO is full, its record
is dropped and counted in `trace_dropped`. At 115200 baud a record takes
about 0.52 ms, so changes spaced milliseconds apart (as in the four-flow
workload) lose nothing.

## Top level (`rt_io_system`) and default configuration

The top contains the controller, `N_FLOWS` bridges and the trace unit. Each
bridge's driver and bus-interface signals are brought out as the struct
arrays `bi[i]` / `bo[i]` (`bridge_in_t`, `bridge_out_t` in `rtio_pkg`).

The defaults reproduce a four-flow experiment on a PC with four PCIe slots,
with flow 0 at the highest priority:

| flow | source             | job      | transfer time          | server budget / period |
|------|--------------------|----------|------------------------|------------------------|
| 0    | 8-lane board       | 4.0 MB   | 4.4 ms (910 B/µs)      | 5 ms / 8 ms            |
| 1–3  | 1-lane boards      | 1.1 MB   | 7.5 ms (147 B/µs)      | 9 ms / 72 ms           |

The total reserved utilisation is 5/8 + 3·9/72 = 1, and the periods are
harmonic, so the set is schedulable under rate-monotonic priority. Without
scheduling, the simultaneous start stretches flow 0's transfer beyond its
8 ms deadline. With the servers in place, every deadline is met.

Other defaults: 100 MHz clock, 1 µs tick, `TXN_BYTES` = 4096, `Q_DEPTH` =
16, `IRQ_LIMIT` = 8, `REPL_DEPTH` = 4, `TRACE_DEPTH` = 16, 115200 baud. Job
sizes treat MB as 10^6 bytes.

For a purely static-priority controller with no budgets, set `SPORADIC = '0`.

## Sizing a bridge buffer

For a periodic flow with job size e, period p and worst-case response time
r, the bridge must buffer ⌈r/p⌉·e bytes. For flow 0 that is 4.0 MB.

For a flow behind a sporadic server, combine the flow's arrival curve with
the server's service curve. The server's service curve is given above; the
worst-case delay and backlog are the usual horizontal and vertical
distances between the curves.

The packet data itself lives in the bridge's external DRAM. The RTL holds
only descriptors.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_fp_scheduler` | all input patterns, N = 4 and 6: the lowest ready index wins |
| `tb_sporadic_server` | exact replenishment instant (activation + period); `BUDGET` per `PERIOD` when backlogged; cycle-by-cycle match with a reference model under random load |
| `tb_reservation_controller` | priority/exclusivity every cycle; with all flows backlogged, exactly 45/9/9/9 ticks per 72-tick hyperperiod and no idle bus; periodic-only configuration follows the priority chain |
| `tb_traffic_generator` | job length, release spacing, delay under block, miss counting |
| `tb_trace_acquisition` | serial records decoded and compared with the applied changes; overflow drops and counts |
| `tb_bridge_dma_engine` | no transaction while blocked; in-flight transaction completes; addresses/lengths of every transaction; completion queues; all three interrupt conditions |
| `tb_real_time_bridge` | synthetic/DMA mode switch |
| `tb_rt_io_system` | whole system at 1/100 time scale with one bridge switched to DMA mode; counts preemption, budget exhaustion, replenishment, transaction across a block, interrupt, mode switch, trace records |
| `tb_rt_io_workload` | the four-flow set for three hyperperiods at the real time scale, twice: with sporadic servers and releases staggered by up to 0.8 ms, and as plain rate-monotonic periodic flows; no miss, all jobs complete, flow 0 jobs take 4396 µs |
| `tb_rt_io_system_full` | default parameters, one full 72 ms hyperperiod from a simultaneous release: no miss, flow 0 jobs take exactly 4396 µs, flows 1–3 use exactly 7483 µs each, first trace records exact |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/rtio_pkg.sv tb/tb_rt_io_system_full.sv \
          --top-module tb_rt_io_system_full -Mdir obj && obj/Vtb_rt_io_system_full
```

The full-size run simulates 7.3 million cycles in a few seconds. Lint with
`verilator --lint-only -Wall -y rtl rtl/rtio_pkg.sv rtl/<module>.sv`. The
remaining warnings are unused fill-level outputs of the FIFOs and
`SYNCASYNCNET` notes caused by the `disable iff (!rst_n)` clauses of
assertions.

## Where this RTL is its own design

The controller's structure follows a described design: the two-wire
interface, servers feeding a fixed-priority logic, the sporadic-server
rules, and the budgets and periods. So do the 1 µs trace polling, the 4 KB
bus transactions, the named DMA queues and the three interrupt conditions.

The following are choices made here and can be changed freely:

* the 100 MHz clock, the 24-bit budget and 32-bit time widths, and the
  asynchronous active-low reset (budgets start full);
* the replenishment FIFO and its full-FIFO rule;
* the trace record format, baud rate and drop policy;
* the free-buffer and completion queues, the descriptor widths, the queue
  depths, the direction alternation, the single shared interrupt line and
  `IRQ_LIMIT` = 8;
* the request/acknowledge transaction port;
* the synthetic-mode select and the bytes-per-tick traffic model.

Not included:

* the bus endpoint and its address-translating bridge, the Ethernet MAC,
  the bridge's soft processor and its drivers, the DRAMs, and the
  motherboard. These are the parts the `bi`/`bo` ports connect to;
* several flows per bridge, which would need one DMA engine per flow and a
  packet classifier;
* an `executing` feedback wire for schedulers that switch at
  bus-transaction granularity;
* EDF-style servers, which the two-wire interface cannot support.
