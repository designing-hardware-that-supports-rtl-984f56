# Cycle-accurate deterministic replay support for a processor–memory system

Computer hardware is not usually cycle-deterministic. Run the same program twice from
the same state and, by the hundredth microsecond, the two runs are doing different things
in different cycles. Several things cause this:

* state that nothing initialises, such as predictor tables, queue contents and counters;
* memory refresh and scrubbing walkers that are in a different place on the second run;
* I/O devices and interrupts that arrive whenever they like;
* power and thermal management that reacts to the die temperature;
* source-synchronous buses, where a message can arrive in either of two receiver cycles
  depending on temperature, voltage and crosstalk.

This RTL follows the CADRE (Cycle-Accurate Deterministic REplay) architecture. It removes
or records every one of those sources. The machine can then be rolled back to a checkpoint
up to an interval (one second by default) in the past and re-executed so that every
signal repeats in exactly the same cycle. Bring-up engineers use this to reproduce a
hardware failure at will. It also lets redundant copies of a system run in lock step
without resynchronisation logic.

The design covers the logic that a system adds for this: the bus synchronizers, a
deterministic memory controller with an undo log, the input and CPU event logs, and the
checkpoint/replay sequencer. The processor, the DRAM, the I/O devices and the link wires
are outside the design and connect through ports.

## How each source of nondeterminism is handled

| Source | Remedy | Block |
|---|---|---|
| Uninitialised state | Every counter, pointer and flag is cleared by the one-cycle checkpoint broadcast `ckpt`. Outputs never expose uninitialised memory contents. | all |
| Bus arrival time | Each message is processed at the *latest* cycle it could have arrived, not when it arrived. | `bus_tx_tagger`, `bus_synchronizer` |
| DRAM refresh | The refresh timer and row counter restart at each checkpoint. | `refresh_ctrl` |
| Scrubbing | The scrubbed-line index is saved at a checkpoint and restored before a replay. | `scrubber` |
| Memory contents | The first overwrite of each line after a checkpoint logs the old value. Rollback writes the old values back. | `memory_log`, `mem_ctrl` |
| I/O input and interrupts | Recorded with their cycle. During replay the devices are clock-gated and disconnected, and the log plays the input back. | `input_log` |
| DVFS, duty cycle, thermal and ECC events | Recorded with their cycle. During replay the processor's own sources are masked and the log plays the events back. | `cpu_log` |
| Processor state | The processor flushes, saves its registers and resets all internal state (its `DETRST` instruction). This happens at every checkpoint and again before a replay. | outside; sequenced by `checkpoint_ctrl` |

## The bus synchronizer

This is the subtle part. A source-synchronous link carries its own clock with the data.
The receiver latches a message into a holding queue when the transmitter's clock edge
arrives. That edge wanders by up to a cycle or more relative to the receiver's clock.
A receiver that takes the message at the first core-clock edge after arrival therefore
processes it in a cycle that depends on analog conditions.

Every clock domain has a **domain-clock counter** (`domain_clock`). It counts local cycles
and is cleared by the checkpoint broadcast. Both ends of a link run at the same frequency,
so two counters always differ by a bounded amount. The link delay is bounded too. A message
sent at transmitter count `x_T` therefore arrives at receiver count

    y_R  in  x_T + [THETA1, THETA2]

The receiver processes it at `z_R = x_T + THETA2`. That cycle is the same in every run,
wherever the arrival fell in the window. The cost is at most `THETA2 − THETA1` extra
cycles per message (one cycle with the defaults).

The receiver needs `x_T`, but sending a full count with every message would be wasteful.
The transmitter (`bus_tx_tagger`) sends only `rho = x_T mod W`, with `W = 2**RHO_W` (2 bits
by default). The receiver reconstructs `x_T` as follows:

1. The lookup table maps the received tag to `x_T mod W`. After reset it is the identity.
   It can be reprogrammed through `cfg_*`, for example to decode a Gray-coded tag.
2. Adder 1 forms `s = y_R − THETA1 − (x_T mod W)`.
3. Clearing the low `RHO_W` bits of `s` gives the start of the W-cycle window that
   contains `x_T`. The result is the latest count that is no later than `y_R − THETA1` and
   has the right residue.
4. Adder 2 adds `(x_T mod W) + THETA2` to get `z_R`.
5. `{z_R, data}` enters the holding queue. An equality comparator between the domain count
   and the head's `z_R` releases the message to the core.

This is exact as long as `THETA2 − THETA1 < W`, which is checked at elaboration.

Worked example, with `THETA1 = 1`, `THETA2 = 3` and `W = 4`: the message is sent at
`x_T = 13`, so `rho = 1`. It arrives at `y_R = 16`. Then `s = 16 − 1 − 1 = 14`, the window
start is 12, `x_T = 13` and `z_R = 16`. Had it arrived at 14, `s` would be 12, giving the
same `x_T` and the same `z_R`.

Timing: `out_valid` is high for exactly the cycle in which the domain count equals `z_R`.
A message that arrives in its `z_R` cycle passes straight through, in the same cycle.
Messages leave in order. `late_err` (sticky) reports a message whose `z_R` had already
passed, which means the THETA bounds were set too tight. `hq_overflow` reports a full
holding queue.

Published block diagrams of the synchronizer also show a circular queue between the two
adders. Its contents are not described, and `z_R` can be computed without it, so it is
not part of this RTL.

## Checkpoint, record and replay

`checkpoint_ctrl` sequences the machine:

* **Checkpoint.** The sequencer acts when its interval expires (`CKPT_INTERVAL`, one second
  at an assumed 1 GHz), on `ckpt_force`, or at power-on. It raises `cpu_ckpt_req`, and the
  processors drain, write back and invalidate caches and TLBs, save their registers and
  reset their internal state. On `cpu_ckpt_done` it pulses `ckpt` with `replay = 0`. Every
  block then restarts:
  * domain clocks, refresh and scrub timers start from zero;
  * the scrub index is saved;
  * the memory log and both event logs are emptied.

  The count `t` of running cycles since the checkpoint is the time stamp of the logs.
* **Replay request** (`replay_req`). The sequencer records the length of the interval so
  far. It then runs three steps:
  1. It starts the memory-log rollback (`rb_start` … `rb_done`).
  2. It has the processors restore their saved registers and reset again
     (`cpu_restore_req` … `cpu_restore_done`).
  3. It pulses `ckpt` with `replay = 1`. The scrub index is restored instead of saved, and
     the logs rewind to their first entry instead of being emptied.
* **Replay.** The machine runs for exactly the recorded number of cycles. Meanwhile:
  * `io_clk_en` and `io_connect` are low;
  * `cpu_src_mask` is high;
  * the logs supply I/O input and processor events.

  The sequencer then raises `halt`. The machine is now in the state it had when the
  replay was requested, and can be inspected. Another `replay_req` replays the same
  interval again. `ckpt_force` takes a new checkpoint and resumes recording.

`run` is high while the machine executes (recording or replaying). Processors must not
issue work while it is low.

## Deterministic memory controller

`mem_ctrl` issues one DRAM command at a time. When idle, it serves in this priority order:

1. rollback write-back;
2. refresh (`refresh_ctrl`);
3. host request;
4. scrub (`scrubber`).

A host write to a line that has not been written since the checkpoint works in three steps:

1. The controller reads the old value.
2. It pushes `{address, old value}` into `memory_log`.
3. It issues the write.

A bit per line marks lines already logged, so each line is logged at most once per
interval. `LINES` log entries are therefore always enough. Rollback writes the entries back
newest first. From `rb_start` until the next broadcast, host requests and scrubs are held
back, so that requests still queued from the abandoned execution cannot touch the restored
memory. Command fields of an idle DRAM port are driven to zero. No stale data reaches the
pins, so the pin trace of a replay matches the recording bit for bit.

Host port: `req_valid`/`req` are held until `req_ready`. `req_ready` pulses when a write
has been issued, or when read data returns, with `resp_valid`. DRAM port: a command is
taken on `dram_cmd_valid && dram_ready`. Read data returns on `dram_rvalid` after any
latency.

## Input log and CPU log

Both are built on `replay_log`, a time-stamped array. In record mode each event is appended
with its `t`. In replay mode the entry whose stamp equals `t` is presented in that cycle. An
append to a full log sets a sticky `overflow`, after which replay is no longer exact.

* `input_log` stores one entry per cycle with I/O activity:
  `{msg valid, 64-bit message, irq valid, 8-bit vector}`. Its default depth is 2^18 entries
  (about 3.3 MiB). The system side (`sys_*`) shows live input while recording and logged
  input while replaying.
* `cpu_log` stores `{kind, 8-bit value}` for four kinds: duty-cycle change, DVFS change,
  thermal emergency and ECC failure. It decodes them into the `duty_*`, `dvfs_*`,
  `therm_irq` and `ecc_irq` outputs that the processor acts on.

## Top level (`cadre_top`)

The top connects one processor and one memory controller. Each direction has its own link,
with a `bus_tx_tagger` at the sender and a `bus_synchronizer` at the receiver. Requests
released by the controller-side synchronizer wait in a small queue (`holding_queue`) until
the memory controller takes them. The input log and the CPU log share the sequencer's `t`
and `replay`.

What the user connects:

* the processor (`cpu_*`, including the checkpoint handshakes);
* each link: route `c2m_tx_*` to `c2m_rx_*`, and `m2c_tx_*` to `m2c_rx_*`, through the
  physical channel;
* the DRAM (`dram_*`);
* the I/O devices (`io_*`).

The lookup tables are programmed through `cfg_we_c2m`/`cfg_we_m2c`, `cfg_addr` and
`cfg_data`. `err` collects these sticky flags: log overflow, queue overflow, and a late
message on either link.

A processor request given on `cpu_req_valid` is on the link one cycle later. It reaches the
memory controller at `x_T + THETA2`, goes through the request queue and DRAM, and the
response comes back through the other synchronizer, again at its own `x_T + THETA2`.

All blocks use one clock, in line with the assumption that both ends of a link run at the
same frequency. The channel's delay stands for the phase uncertainty.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `RHO_W` (package) | 2 | tag of "1 or 2 bits" in CADRE |
| `THETA1`, `THETA2` | 1, 2 | chosen; one-cycle uncertainty, as HyperTransport specifies |
| `DC_W` (package) | 32 | chosen; one second at up to 4 GHz |
| `HQ_DEPTH` | 8 | chosen |
| `LINES`, `DATA_W` (package `ADDR_W`) | 4096 lines × 64 bits | chosen |
| `ROWS`, `REFRESH_INTERVAL` | 8192, 6240 cycles | chosen; a DDR-style 7.8 µs at 800 MHz |
| `SCRUB_INTERVAL` | 65536 cycles | chosen |
| `INPUT_LOG_DEPTH` | 262144 | "a few MB" of SRAM in CADRE |
| `CPU_LOG_DEPTH` | 1024 | chosen; CPU events are rare |
| `CKPT_INTERVAL` | 10^9 cycles | one second in CADRE, at an assumed 1 GHz |

`LINES` must match the package's `ADDR_W` (`2**ADDR_W`).

## Where this departs from CADRE, and limits

* The synchronizer's circular queue is not built (see above). How the tag is formed and
  decoded is this design's own reading.
* The memory log lives in an on-chip array sized to the modelled memory. CADRE keeps it in
  DRAM, at about 50 MB/s per processor. The modelled 32 KiB memory is far smaller than a
  real one, so the log here cannot hold a full second of a real server's logging (about
  200 MB for four processors).
* At the default depth, the input log holds a second of the 1 MB/s steady-state I/O
  bandwidth reported for SPEC workloads. It does not hold a full second of the 100 MB/s
  peaks; at that rate it fills in about 20 ms.
* CADRE places the CPU log inside each processor. Here it sits at the processor's event
  ports. `DETRST` and register save/restore are left to the processor, behind the
  handshakes.
* The holding queue and request queue are cleared at checkpoints. Checkpoints are assumed
  to be taken with the links drained, which the processor handshake provides.
* The top has one processor. A multiprocessor, such as the four-way server CADRE's cost
  estimates assume, needs more than copies of the per-processor parts:
  * each processor gets its own pair of links and its own CPU log;
  * the memory controller's request queue needs an arbiter in front of it. The arbiter
    must be deterministic, for example a round robin reset at each checkpoint.

  That arbiter is not part of this RTL.
* Only the processor–controller link has synchronizers, one in each direction. A system
  whose controller reaches the DRAM over another source-synchronous link would put a
  `bus_tx_tagger`/`bus_synchronizer` pair on that link as well. With one cycle of
  uncertainty on each of the four crossings, a memory access costs up to four extra cycles;
  here it costs up to two.
* Clock-domain crossing is not modelled. Both ends of a link share `clk`, and the link
  delay models the phase uncertainty.
* Scrubbing is issued as a single `DRAM_SCRUB` command. The ECC logic is outside the design.

## Verification

Each block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_bus_synchronizer`: a tagger, a random-delay in-order channel and a synchronizer.
  * Every message must be processed exactly `THETA2 + k` cycles after it was sent, whatever
    its delay. Here `k` is a 0 or 1 cycle counter offset.
  * Half the intervals use Gray-coded tags, with the lookup table programmed to match.
  * A message delayed past the bound must raise `late_err`.
* `tb_mem_ctrl`: reads are checked against a reference model. After a rollback, DRAM must
  equal its checkpoint contents. A replay after a restoring checkpoint must produce the
  same DRAM command trace, cycle for cycle, including refresh and scrub.
* `tb_input_log`, `tb_cpu_log`: a replay driven with random junk inputs must reproduce the
  recorded outputs cycle for cycle. `tb_input_log` also over-fills a small log and expects
  `overflow`.
* `tb_input_log_rates` checks the full-depth input log at the two measured I/O rates.
  Rates are counted in 8-byte messages at 1 GHz.
  * At the 100 MB/s peak, it runs for 2 ms in real time and replays it.
  * At the 1 MB/s steady rate, it covers a whole second. It fits the second's 125,000
    messages by stepping the time stamp over idle cycles.
  * It then fills the log at the peak rate, which overflows after about 21 ms.
* `tb_refresh_ctrl_pass` runs one full refresh pass at the default size (about 51 M
  cycles, with random grant delays). It checks that every row is refreshed once and on
  time, well inside a 10^9-cycle checkpoint interval.
* `tb_checkpoint_ctrl`, `tb_memory_log`, `tb_refresh_ctrl`, `tb_scrubber`, `tb_domain_clock`,
  `tb_bus_tx_tagger`, `tb_holding_queue`: each is checked against an independent model.
* `tb_cadre_top` (reduced sizes) and `tb_cadre_top_full` (all defaults) share
  `tb/cadre_top_tb_body.svh`. The body models:
  * a deterministic processor with checkpoint save/restore;
  * the two links, with fresh random delays on every run;
  * the DRAM, the I/O devices and the processor's events.

  Each test records from a checkpoint, requests a replay, and replays twice. Every replay
  must give the same per-cycle trace of what the processor and the DRAM see, and the same
  final processor state. Every mechanism must occur at least once: periodic and forced
  checkpoints, held and direct link messages, rollback writes, refresh, scrub, replayed I/O
  and CPU events, gated I/O, and halt. The full-size run records 70,000 cycles and runs in
  a few seconds.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_cadre_top \
        -y rtl -y tb -Itb rtl/cadre_pkg.sv tb/tb_cadre_top.sv
    ./obj_dir/Vtb_cadre_top

Replace `tb_cadre_top` with any other testbench name. Lint a block with
`verilator --lint-only -Wall -y rtl rtl/cadre_pkg.sv rtl/<module>.sv`. The remaining lint
warnings are unused outputs of shared blocks (for example the domain counter's split
fields) and the reset used in assertion `disable iff` clauses.
