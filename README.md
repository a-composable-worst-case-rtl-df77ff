# Predictable open-row DDR3 controller with private banks

A DRAM controller for multi-core real-time systems. Every request gets a
latency with a provable upper bound. Those bounds are still tight enough to
profit from row hits.

Predictable controllers usually close the row after every access, because
an open row that another core may close makes latency hard to bound. This
controller keeps rows open instead, and stays predictable in two ways:

* **Private banks.** Every requestor owns one DRAM bank: a core, a DMA
  engine, or a *virtual* requestor that stands for a group of cores sharing
  data. No one else can close its row. Whether a request is a hit or a miss
  depends only on that requestor's own history.
* **FIFO arbitration with one slot per requestor.** Each requestor may have
  only one command waiting for the command bus. Commands are served in
  arrival order, except that a blocked command is passed by later ones.
  Column commands (RD/WR) never pass each other. As a result, a command
  waits for at most one command of every other requestor. That gives a
  bound that depends only on the number of requestors and on DDR timing.

Refresh is a fixed, precomputed command sequence. It puts every open row
back afterwards, so refresh does not disturb the row state either.

## Block structure

```
             front end                          back end
 core i  -> request queue -> command generator -> command buffer -> per-requestor arbiter --+
 ...                                                                                        |
 shared  -> shared queues -> round robin -> command generator -> virtual buffer -> arbiter -+
 requests   (one per core)                                                                  v
                                                   global FIFO (one entry per requestor)
                                                                    |
                                     global command arbiter (+ refresh sequence) -> command bus
                                                                    |
                                               data bus unit (bursts in/out)   <-> data bus
```

| module | role |
|---|---|
| `mc_pkg` | types (commands, requests, timing set), DDR3-1333H and other timing constants |
| `mc_fifo` | generic valid/ready FIFO: request queues, command buffers, shared queues |
| `cmd_generator` | turns a request into CAS / ACT+CAS / PRE+ACT+CAS from its bank's row state |
| `req_arbiter` | per-requestor arbiter: own-bank timing, one command in flight |
| `global_fifo` | arbitration queue, several inserts per cycle, removal at any position |
| `global_arbiter` | picks the command to issue, cross-requestor timing, refresh timer |
| `refresh_seq` | static PREA / REF / re-activation sequence |
| `data_path` | write bursts out, read bursts in, end-of-data report |
| `rr_arbiter` | round robin among the shared queues |
| `shared_partition` | shared queues + round robin + completion routing |
| `mc_top` | the whole controller |

Requestor `i` (the cores first, then the virtual requestors) uses rank
`i mod NUM_RANKS` and bank `i div NUM_RANKS`. Requestors are therefore
spread evenly over the ranks. `NUM_CORES + NUM_SHARED` must not exceed
`8 * NUM_RANKS`.

## The five arbitration rules

These rules are the heart of the design. The latency bounds rest on them
alone.

1. **One command in flight per requestor** (`req_arbiter`).
   * A requestor inserts one command into the global FIFO, then waits until
     that command is serviced.
   * A PRE or ACT counts as serviced when it is issued.
   * A RD/WR counts as serviced only when its data has left the data bus:
     `data_done` from `data_path`, the cycle after the last beat.
   * This stops a requestor from delaying others by two bursts in a row.
   * It also makes N entries enough for the global FIFO.
2. **Own timing first** (`req_arbiter`).
   * A command enters the FIFO only once every constraint its own
     requestor caused is met: tRCD, tRAS, tRC, tRP, tRTP, write recovery,
     tRTW, tWTR, and tBUS between its own bursts.
   * From then on only other requestors can delay it.
3. **Oldest non-blocked command wins** (`global_arbiter`).
   * Each cycle, every FIFO entry is checked against the constraints that
     involve other requestors:
     * for an ACT: tRRD, and the four-activate window tFAW of its rank;
     * for a RD/WR: data bus occupancy, plus tRTR between ranks, tWTR and
       tRTW within a rank.
   * The first entry that is not blocked is issued.
   * PRE is never blocked by others, because banks are private.
4. **Column commands stay in order** (`global_arbiter`).
   * Once a RD/WR in the FIFO is blocked, every later RD/WR is blocked too.
   * Without this rule, a stream of younger column commands could starve an
     older one forever, for example through repeated read/write turnarounds.
   * PRE and ACT may still pass a blocked column command.
5. **Refresh** (`global_arbiter`, `refresh_seq`).
   * Every tREFI cycles the arbiter stops serving the FIFO and plays the
     static refresh sequence. Then it continues.

### Cycle timing of the two arbiter levels

The analysis assumes that, with nobody else in the system, a command issues
exactly T cycles after the command that constrains it.

* **Per-requestor arbiter.**
  * It keeps one countdown timer per command class (PRE, ACT, RD, WR).
  * When a constraining command is issued, the timer is loaded with T−2.
  * The command is inserted when the timer reads zero, which is T−1 cycles
    after that issue.
  * The global FIFO registers the insertion.
  * The arbiter sees the new entry one cycle later, at exactly T.
* **Global arbiter.**
  * It uses timers loaded with T−1.
  * Its decision is combinational from registered state, so a chosen
    command is on the command bus in the same cycle.
* **Next command of a requestor.**
  * It enters the FIFO one cycle after its previous PRE/ACT was issued, or
    one cycle after the `data_done` of its CAS.
  * That is when the head of the command buffer changes.

### Measured waiting bounds

The testbenches measure how long a command waits in the global FIFO. M is
the number of requestors and Mr the number on the command's rank.

* PRE: at most `tIP = M − 1`. Each queued command can cost it one command
  bus cycle.
* ACT: at most `tIA = (tFAW − 4·tRRD) + floor((Mr−1)/4)·tFAW +
  ((Mr−1) mod 4)·tRRD + (M − Mr)`.

* RD/WR: the time from entering the FIFO to the end of its data is at
  most `F_R + (M−1)·D_WR`, where `F_R = D_WR = tWTR + tRL + tBUS`.
  * The exact bound picks the worst mix of write-to-read, read-to-write
    and rank-switch steps between the M−1 bursts that may go first.
  * Counting every step as a write-to-read, the longest one, gives this
    simpler, looser bound.

At the default size with DDR3-1333H these bounds are 7, 35 and 144
cycles. The longest values seen in the full-size test are 2, 33 and 88
cycles.

## Refresh sequence

`refresh_seq` is started at t0 and issues, at fixed offsets:

| step | offset |
|---|---|
| PREA (all ranks) | tAP = max(tRAS, tRTP, tWL+tBUS+tWR) − 1 after t0 |
| REF (all ranks) | tRP later |
| re-activation | tRFC later |
| end | tAE = max(tRAS, tRCD, tRC−tRP) after the last ACT |

The waits have these reasons:

* **tAP** lets any command issued in the cycle before t0 mature.
* **Re-activation** comes in 8 groups, one per bank. Each group holds R
  ACTs, one per rank, on consecutive cycles. Groups are S = max(tRRD, R)
  apart, and the fifth group waits until max(tFAW, 4S) after the first.
  Banks that had no open row get no ACT.
* **tAE** makes sure that nothing issued after the sequence can violate a
  constraint caused by its last ACT.

The total length is tREFS = tAP + tRP + tRFC + tRA + tAE, with
tRA = max(tFAW, 4S) + 3S + R − 1. For DDR3-1333H this is 198 cycles with
one rank and 201 with four.

The rows re-opened are those open at t0, so each requestor's private view
of its row buffer stays correct. tRFC (160 ns) and tREFI (7.8 µs) become
107 and 5200 cycles at the 1.5 ns clock. tRFC is rounded up and tREFI
down, the safe direction for each.

## Shared data

Cores that share data form a *shared partition*:

* Each core has its own shared request queue.
* A round robin arbiter feeds the command generator of one virtual
  requestor. That requestor has its own bank, command buffer, per-requestor
  arbiter and FIFO slot.
* The presented request is held until the command generator takes it (at
  its CAS). The round robin therefore never switches in the middle of a
  PRE/ACT/CAS sequence.
* Completions return in order. A small FIFO of core indices routes each
  completion back to the core that sent the request.

Cores keep their private queues for non-shared data.

## Interface and timing of `mc_top`

| parameter | default | meaning |
|---|---|---|
| `NUM_CORES` | 7 | real requestors |
| `NUM_SHARED` | 1 | shared partitions (virtual requestors) |
| `NUM_RANKS` | 1 | ranks |
| `TP` | `DDR3_1333H` | timing set |
| `REQ_Q_DEPTH`, `CMD_BUF_DEPTH` | 4 | queue depths |

The defaults give 7 cores plus one shared partition on one rank with a
64-bit bus: 8 requestors on the 8 banks of a rank. The package also
provides `DDR3_800D`, `DDR3_2133M` and `DDR2_800E` timing sets.

### Request side

* `core_req_*` is one port per core.
* `shr_req_*[p][c]` is one port per shared partition and core.
* Requests use valid/ready and carry `store`, `row`, `col` and a 512-bit
  `wdata`. There is no bank field, because the bank is implied by the
  requestor.
* A completion (`*_resp_valid`, with the read line) pulses in the cycle
  after the last data beat of the request's RD/WR.

### Device side

* `cmd_valid` qualifies `cmd` (command, rank, bank, row, col). The bus
  carries one command per clock.
* Data is two 64-bit DDR beats per clock on `dq_out`/`dq_in`, with
  `dq_oe` high during write bursts.
* A 64-byte line takes tBUS = 4 clocks.
* The PHY (I/O cells, DQS, beat serialisation) is not part of this design.

### Observation

* `events` flags per cycle:
  * a reorder (Rule-3);
  * a column command held behind a blocked one (Rule-4);
  * tFAW and tRRD stalls;
  * a rank switch;
  * read/write turnarounds;
  * the start of a refresh.
* `refresh_busy` marks the sequence.

Reset is active-low `rst_n`.

## Where this design goes beyond or departs from the analysed controller

* **Design choices the analysis leaves open:**
  * The command generators emit one command per cycle. The analysis only
    assumes conversion takes a constant time.
  * PREA and REF address all ranks at once.
  * Commands inserted in the same cycle enter the FIFO in ascending
    requestor order.
  * The refresh interval counter starts at reset, so the first refresh
    comes about tREFI cycles after reset.
* **One-cycle shift.** The FIFO insertion is registered. The arbiter
  timers are set so that, without interference, issue times are still
  exactly the JEDEC minimum. The analysis instead counts insertion and
  issue in the same cycle.
* **Data bus width.** Only a 64-bit bus is built: `DQ_W` in `mc_pkg`,
  one 64-byte line per CAS. Narrower 32- and 16-bit buses would need two or
  four requests per cache line; that splitting is not implemented.
* **16 requestors on one rank** is impossible with private banks, because
  a rank has 8 banks. Use 2 or 4 ranks instead.
* **Other devices.** Timing sets are given only for DDR2-800E, DDR3-800D,
  DDR3-1333H and DDR3-2133M.
* **Shared partitions.**
  * A virtual requestor owns exactly one bank. The analysis also allows a
    set of banks.
  * Every partition has a request port for every core. A core outside the
    sharing group leaves its port idle.
* **Virtual requestor.** It uses the same open-row logic as any other
  requestor. The latency analysis treats all of its requests as misses,
  which is safe, since shared cores can close each other's rows.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the
block with an independent model, checks exact cycle counts where a latency
is defined, and prints `TB_RESULT checks=… failures=…`.

Testbench helpers:

* `dram_model` is a behavioural DDR3 device. It checks every JEDEC
  constraint on the buses, stores data and returns read bursts.
* `mc_stim` drives random private and shared traffic and checks every
  completion against a reference memory.
* `mc_monitor` counts the mechanisms and checks the tIP/tIA bounds and the
  tREFI spacing of REF commands.
* `mc_workload` wraps a whole system (controller, device model, stimulus,
  monitor) for one workload configuration.

| testbench | what it shows |
|---|---|
| `tb_mc_fifo` | ordering, full/empty, simultaneous push/pop against a model |
| `tb_rr_arbiter` | rotation, hold while not accepted, fairness |
| `tb_global_fifo` | multi-insert order, removal at any position |
| `tb_cmd_generator` | command sequence and cycle count for hit, empty, conflict |
| `tb_req_arbiter` | exact insertion cycles for every constraint, Rules 1–2 |
| `tb_global_arbiter` | reference model of Rules 3–4 cycle by cycle; refresh every tREFI, frozen for exactly tREFS |
| `tb_refresh_seq` | exact offsets and tREFS = 198 (R=1) / 201 (R=4), checked by the device model |
| `tb_data_path` | beat timing and completion cycle for RD/WR, back-to-back bursts |
| `tb_shared_partition` | routing, order, stable presentation, round robin bound |
| `tb_mc_top` | 9 cores + 1 shared partition on 2 ranks; tRRD shortened to 4 so that the tFAW window can bind; every mechanism counted |
| `tb_mc_workloads` | nine systems side by side: 4 requestors on 1/2/4 ranks, 16 on 2/4 ranks, DDR3-800D/1333H/2133M, 0/40/100 % row hits, 20 % stores; bounds and hit ratio per system, average latency falls with hit ratio and device speed |
| `tb_mc_top_full` | `mc_top` at its defaults, over 5000 requests and 8 refreshes, zero JEDEC violations, bounds hold |

### Measured behaviour

Results from `tb_mc_workloads` with random traffic: 40 % row hits, 20 %
stores, about one request per core every 150 ns. Latency runs from a
request's acceptance to its completion.

| system | avg latency | longest ACT wait / tIA (cycles) |
|---|---|---|
| 4 requestors, 1 rank, DDR3-1333H | 59.6 ns | 5 / 15 |
| 4 requestors, 2 ranks | 57.5 ns | 4 / 7 |
| 4 requestors, 4 ranks | 59.4 ns | 2 / 3 |
| 4 requestors, 1 rank, DDR3-800D | 77.1 ns | 8 / 12 |
| 4 requestors, 1 rank, DDR3-2133M | 45.7 ns | 5 / 20 |
| 4 requestors, 1 rank, 0 % hits | 86.8 ns | 7 / 15 |
| 4 requestors, 1 rank, 100 % hits | 33.0 ns | 1 / 15 |

With 16 requestors at that rate the controller is close to saturation.
Averages reach 220 to 470 ns, while every wait stays within its bound.

### Running a testbench

Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mc_pkg.sv tb/tb_mc_top_full.sv --top-module tb_mc_top_full -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the testbench name to run another one. The full-size run takes
a few seconds.
