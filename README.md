# eMiCES acquisition core: coincidence-filtered event streaming over Firewire

A small-animal PET scanner sees a flood of single gamma detections, but only
pairs of detections that arrive at nearly the same time on opposite sides of
the ring carry an image. The eMiCES acquisition system (built at the
University of Washington for the MiCES scanner, 72 detector modules read out
as 36 IEEE 1394a "Firewire" nodes) therefore splits the work in two:

* every **node FPGA** time-stamps and integrates its own PMT pulses and keeps
  each event on hold;
* a central **coincidence controller** watches one trigger line per node and
  answers with an *accept* pulse only when two nodes on opposite sides of the
  ring fired within 40 ns (a window the processor can change while running).

Only accepted events become 16-byte packets. Each node packs them into
2016-byte blocks in the FIFO of its Firewire link controller. The
controller then sends the block to the host computer without help.

This repository holds synthesizable SystemVerilog for the digital core of
that system: the coincidence controller FPGA, the node FPGA, and a top level
with 36 nodes. The processors, the Firewire controller chips and the analog
front end are outside the RTL; their signals are ports.

```
  board processor                   sync_clk (master/8)
      | ccb_cpu_* (8-bit)  +----------------------------------------+
      v                    |                                        v
 +-------------------------+---+        +-------------------------------------+
 | coincidence_controller      |        | node_fpga  (x36, module ID = n)     |
 |  ccb_regs                   |        |  node_regs <------------------------+-- cpu_* (8-bit)
 |  sync_clock_gen             |        |  time_scaler ---- time stamp        |   from node
 |  time_scaler                | trig   |  singles_scaler x2                  |   processor
 |  coincidence_unit  <--------+--------+  event_capture --> sync_fifo (64)   |
 |                    ---------+------->|                     |               |
 |  ccb_status_sampler  accept |        |                block_loader         |
 +-----------------------------+        +-----+------------------+------------+
   gantry_pos, gate -> status record           | ti_wr/ti_data    | last_ready
                                               v                  v
                                     1394a controller FIFO    node processor
```

All logic runs on the 62.5 MHz master clock (16 ns). In the scanner, the
coincidence board fans this clock out to every node over cables of equal
length.

## One event, cycle by cycle

Cycle `t` is the cycle in which a PMT's timing pickoff (`pmt_trig`) is high
at a node that is running and idle (`event_capture`):

| cycle | node | coincidence controller |
|---|---|---|
| t | latches the run time clock, the 8 MSBs of that PMT's TAC value, and which PMT fired; starts 4 integrators on X-, X+, Y-, Y+ | |
| t+1 | `event_trig` high for one cycle | sees the trigger |
| t+1 .. t+3 | | a partner trigger in this span (or the same cycle) forms a pair |
| partner+1 | `accept` pulse arrives | `accept` to both nodes |
| t+8 | no accept by now: event cleared (`ev_cleared`), node idle again | |
| t+16 | integrators done (samples of cycles t .. t+15) | |
| t+17 | accepted: packet written to the event FIFO (`ev_stored`), or dropped if the FIFO is full (`ev_dropped`) | |

A node holds one event at a time. While an event is pending, its PMTs can
still trigger. Those triggers are not captured, but they are counted by the
singles scalers.

## The coincidence decision

`coincidence_unit` keeps, per node, a flag and an age: the number of cycles
since the node's last trigger, up to the window setting `win_cyc`. In each cycle, every new
trigger is compared with the other new triggers of that cycle and with
every trigger still inside its window. A pair is accepted when

* the two triggers are at most `win_cyc` cycles apart. The reset value is
  2: triggers are sampled on the 16 ns clock, so 2 cycles (32 ns) is the
  largest spacing that fits in the 40 ns window, and 3 cycles (48 ns) does
  not. `win_cyc` = 0 pairs only triggers of the same cycle; the largest window
  held is `WINDOW_MAX` = 15 cycles (240 ns).
* the nodes are in the **angular acceptance window**. The nodes sit on a
  ring of 18 detector cassettes, two nodes per cassette, with node `n` in
  cassette `n/2`. A pair qualifies when the distance between their
  cassettes around the ring is at least `min_sep` (reset value 6). That
  default is the opposite fan of 7 cassettes. 0 accepts every pair of
  distinct nodes, 1 every pair in different cassettes, and 10 or more
  accepts none.

Both nodes get a one-cycle `accept` in the cycle after the later trigger. A
trigger can pair with several partners inside its window, and every such
pair is accepted. The comparison is a full 36 × 36 matrix, evaluated every
cycle. The fan test compares a constant ring-distance table, worked out at
elaboration, against `min_sep`.

The original system defines its angular window in the coincidence FPGA code
but does not publish it. Only the 40 ns window is given. The geometry above
is this implementation's choice. The separation is a register, so it can be
tuned without rebuilding; a different fan shape needs a change to the
distance table in `coincidence_unit`.

## Starting 37 clocks together

Every time stamp is a 32-bit count of master clock cycles. This count is
only meaningful across nodes if all 37 scalars (36 nodes plus the
coincidence board) start on the same edge. Start commands do not arrive
together: they pass along a daisy-chained command bus and through
processors that do not run on the master clock. So `time_scaler` treats a
start command only as *arming*. The count is cleared and starts on the next
rising edge of the **sync clock**, a square wave at 1/8 of the master rate
made by `sync_clock_gen` and sent to every node. Any start that arrives
within the same sync period therefore starts on the same edge. `stop` halts
the count at once. Each processor issues start and stop by writing its
FPGA's control register (below).

The count wraps after 2^32 cycles (68.7 s). The host has to unwrap it when it
re-sorts the list-mode data by time.

## Blocks and the 4-byte hand-shake

Before a block can leave the node, the node processor must write the return
header (which depends on the host's read request) into the link
controller's registers. Writing the final bytes of a block into the
controller's FIFO starts the automatic send. `block_loader` therefore holds
those bytes back:

1. Events leave the event FIFO as four 32-bit quadlets each, most
   significant (first-sent) byte first. They go straight into the
   controller FIFO (`ti_wr`/`ti_data`, held off by `ti_full`).
2. After 503 quadlets (2012 bytes), the 504th quadlet (the last 4 bytes of
   event 126) goes into a holding register. `last_ready` goes high.
3. The processor sets up the header and writes the send-last bit of the
   node's control register. At the next
   cycle where `ti_full` is low, the held quadlet is written, `block_done`
   pulses, `last_ready` drops, and streaming resumes.

While `last_ready` is high, new accepted events collect in the 64-entry
event FIFO (`sync_fifo`). If the processor takes too long, the FIFO fills,
and further accepted events are dropped. Each drop pulses `ev_dropped` and
increments a saturating 8-bit counter the processor can read; start clears
it. At the
scanner's peak of about 400 k coincidences/s, a node produces about 22 k
events/s. That is about 9 events during a 400 µs turnaround, well inside 64.
In simulation at that load (`tb_rate_400kcps`, random node pairs), the FIFO
held at most 16 events when the processor released a block, and nothing
was dropped.

## Event packet

16 bytes. Byte 0 is sent first, and multi-byte fields are most significant
byte first. The type is `emices_pkg::event_t`.

| bytes | field |
|---|---|
| 0 | bit 7 = 0, bit 6 = PMT id (0/1 within the node), bits 5..0 = module ID (node number) |
| 1-4 | time stamp: run time clock at the trigger, 16 ns units |
| 5 | TAC: 8 most significant bits of the PMT's TAC value (fine time) |
| 6-13 | X-, X+, Y-, Y+: 12-bit integrated signals, each right-aligned in 16 bits |
| 14 | singles rate of PMT 0: triggers in the last complete 10 ms interval / 256, saturated to 255 |
| 15 | singles rate of PMT 1 |

The integrated signal is the top 12 bits of the sum of 16 consecutive 10-bit
ADC samples (the sum divided by 4), starting with the sample of the trigger
cycle. There is no baseline subtraction.

## Coincidence board status

`ccb_status_sampler` captures the gantry position (16 bits), four gating
inputs and the coincidence board's time stamp every `period` cycles while
running (reset value 625 000 = 10 ms; 0 turns recording off). It pulses
`status_valid` and sets a record-pending flag so the board's processor can
read the record and forward it to the host.

## Processor registers

Each FPGA has an 8-bit register bus for its processor: `cpu_addr` (5 bits),
`cpu_wr`, `cpu_wdata` and `cpu_rdata`. A write happens at the clock edge
where `cpu_wr` is high. Reads are combinational from `cpu_addr`. Unused
addresses read 0. Multi-byte registers are least significant byte first.
The bus is assumed to be synchronized to the master clock already.

Coincidence controller (`ccb_regs`):

| addr | access | content |
|---|---|---|
| 0x00 | W | bit 0 start (arms; run begins at the next sync edge), bit 1 stop, bit 2 clear record-pending |
| 0x01 | R | bit 0 running, bit 1 armed, bit 2 record pending |
| 0x02 | RW | coincidence window in cycles (reset 2) |
| 0x03 | RW | minimum cassette separation (reset 6) |
| 0x04-0x06 | RW | status period in cycles (reset 625 000) |
| 0x08-0x09 | R | last record: gantry position |
| 0x0A | R | last record: gating inputs |
| 0x0C-0x0F | R | last record: time stamp |

Window values above 15 are treated as 15. Any separation of 10 or more
accepts no pair.

Node (`node_regs`):

| addr | access | content |
|---|---|---|
| 0x00 | W | bit 0 start, bit 1 stop, bit 2 send the last 4 bytes |
| 0x01 | R | bit 0 running, bit 1 armed, bit 2 last 4 bytes ready, bit 3 event FIFO full, bit 4 event FIFO empty |
| 0x02 | R | event FIFO fill level |
| 0x03 | R | accepted events dropped on a full FIFO (saturates at 255, cleared by start) |

`last_ready` is also a pin, so the processor can use it as an interrupt
instead of polling.

## Parameters

Defaults are the MiCES scanner's values where the original design gives
them.

| parameter | default | origin |
|---|---|---|
| `N_NODES` | 36 | published: 72 modules as 36 nodes |
| `NODES_PER_CASSETTE` | 2 | published: 18 cassettes, two processor/controller chains per digital board |
| `WINDOW_CYC` | 2 | reset value of the window register; published 40 ns at 16 ns per cycle |
| `WINDOW_MAX` | 15 | chosen |
| `MIN_SEP` | 6 cassettes | reset value of the separation register; chosen |
| `SYNC_DIV` | 8 | published |
| `BLOCK_BYTES` / `HOLD_BYTES` | 2016 / 4 | published |
| `TS_W` | 32 | published (4-byte time stamp) |
| ADC width | 10 | published system figure (4 ADCs on a 40-bit bus) |
| `N_SAMPLES` | 16 (256 ns) | chosen |
| `TAC_W` | 10 | the width of the ASIC's timing data in the original block diagram (only the 8 MSBs are stored) |
| `ACCEPT_TIMEOUT` | 8 cycles | chosen (window plus controller latency) |
| `FIFO_DEPTH` | 64 events | chosen |
| `STATUS_PERIOD` | 625 000 (10 ms) | reset value of the period register; published |
| `SINGLES_PERIOD` | 625 000 (10 ms) | chosen |

## Where this RTL departs from, or adds to, the original

* **126, not 128, events per block.** The original text says both "128
  events per data packet" and that the 1394a payload is 2016 bytes, streamed
  as 2012 + 4 bytes. 2016 bytes hold 126 16-byte events, so blocks here
  carry 126. `BLOCK_BYTES = 2048` gives 128.
* **PMTs per node.** The packet format has a one-bit PMT id and two singles
  bytes, and 72 modules map onto 36 nodes. So a node serves two PMTs, each
  with four position signals. A note in the original block diagram speaks of
  four analog chains per FPGA. That reading is not followed.
* **Time stamp and TAC.** The original says the run time clock is latched
  and the TAC data is "added" to form the time stamp. The packet lists the
  two as separate fields, so they are stored side by side and not summed.
* **Register maps.** The original only says that the processors have
  direct access to control and data registers in the FPGAs and that all
  acquisition parameters can be changed at run time. The maps, the 8-bit
  width and the timing above are this implementation's own. The FIFO level
  and drop counter are additions for error tracking.
* **Chosen details:** integration length, accept timeout, FIFO
  depth, singles interval, fan geometry, the sync clock's 50 % duty cycle,
  the byte order inside fields, PMT 0 winning a same-cycle tie, one pending
  event per node, and dropping accepted events when the FIFO is full.
* **Not built:** the flush of a last partial block at the end of a run
  (not described). Also not built: the command bus between processors,
  which is processor software. Each processor's register bus is a top
  port. The system-wide reset command is taken to be the `rst_n` pin;
  there is no soft-reset register bit.
* **Outside the RTL:** the Rabbit 3100 processor modules and their
  software, the TI TSB43AA82 1394a controllers (SBP-2, configuration ROM,
  the two logical units per node), the bus switches, the Concorde ASICs,
  the 62.5 MHz ADCs, the analog summing boards, high voltage supplies, DAC,
  optical converters and slip rings, and the master controller with its
  motion control.

## Files

`rtl/`: one module per file, bottom-up:
`emices_pkg` (types, packet), `sync_fifo`, `sync_clock_gen`, `time_scaler`,
`pulse_integrator`, `singles_scaler`, `event_capture`, `block_loader`,
`node_regs`, `node_fpga`, `coincidence_unit`, `ccb_status_sampler`,
`ccb_regs`, `coincidence_controller`, `emices_top`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb_emices_top` runs
the full default configuration (36 nodes, 2016-byte blocks, 10 ms periods)
through about 11.5 ms of scanner time, in roughly 10-30 s of simulation. It
compares every quadlet that every node writes with packets built from the
driven inputs, including the singles bytes. It also requires each of these
to happen at least once:

* an aligned start
* an accepted coincidence
* a single that is cleared
* an angular rejection
* a window rejection
* a block hand-shake
* events queued during a header
* a FIFO overflow
* a status record
* a nonzero singles rate

`tb_rate_400kcps` runs the same default top at the scanner's peak load:
one coincidence every 156 cycles (400 kcps) plus one lone single per
coincidence, for 1.2 M cycles (19.2 ms). Every processor takes 200-400 µs
to release each block. The test checks that every coincidence is
accepted, that every accepted event is stored and none dropped, that the
drop counters read 0, and that every node completes at least two blocks.
It takes about 40 s.

## Simulating

With Verilator 5 (two-state, so every register read is reset):

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/emices_pkg.sv tb/tb_emices_top.sv --top-module tb_emices_top -o sim
./obj_dir/sim
```

Replace `emices_top` with any other module name to run that block's test.
For lint: `verilator --lint-only -Wall -Irtl -y rtl rtl/emices_pkg.sv rtl/emices_top.sv`.
The remaining lint warnings are unconnected optional outputs (`busy`, the
controller time stamp), unused bits (control bits 7..3, the done flags of
three integrators that finish with the first, `CLK_PERIOD_NS`). There is also a reset that is
used both as an asynchronous flop reset and as the disable of the
hand-shake assertions.

Assertions in the RTL check two bus rules. No accept may reach a node
without a pending event (`event_capture`), and no write may happen while
the controller FIFO is full (`block_loader`).
