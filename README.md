# Trigger-timed receive port for deterministic at-speed test

A chip with a source-synchronous high-speed input (LVDS data lanes plus a
forwarded clock, as in RapidIO, HyperTransport and similar links) takes each
received packet across an asynchronous boundary. The packet is written into an
elasticity buffer with the incoming Rx clock and read out with the chip's core
clock. On a tester this causes trouble. The tester places every clock edge only
to within its *edge placement accuracy* (EPA), so a packet written close to a
core clock edge is seen by the core in one cycle on one run and in the next
cycle on another. The chip then answers in a different cycle, or even in a
different order, from what simulation predicted. A good part fails the test.

This RTL removes the uncertainty with a small design-for-test addition. In
test mode the buffer is not read as soon as a packet shows up. It is read a
fixed number of core cycles after a **trigger** that the tester drives,
synchronously to the core clock, on an existing input pin. The tester times the
trigger so that the packet is in the buffer even at its latest arrival. An
early packet waits in the buffer. Either way it enters the core in the same,
known cycle. In normal mode the port behaves as an ordinary receiver.

## Structure

```
            rx_clk domain                 |            core_clk domain
 rx_data ─► rx_ddr_deserializer ─► elasticity_buffer ─► trigger_read_ctrl ─► pkt_valid
 rx_frame   (DDR capture,          (dual-clock FIFO,   ▲ (counter gates      pkt_data
            BEATS beats/packet)    Gray pointers)      │  packet-ready)
                                          pkt_ready ───┘       ▲
                                                     test_mode ┘  shared_pin ─► pin_func
```

| File | Role |
|---|---|
| `rtl/rx_pkg.sv` | Default sizes shared by all modules |
| `rtl/rx_ddr_deserializer.sv` | Captures the lanes on both Rx clock edges and packs `BEATS` beats into a packet |
| `rtl/elasticity_buffer.sv` | Dual-clock FIFO between the Rx and core clocks; raises `pkt_ready` in the core domain |
| `rtl/cdc_sync.sv` | Flip-flop synchronizer for the FIFO's Gray-coded pointers |
| `rtl/trigger_read_ctrl.sv` | The test feature: shared-pin demultiplexer, trigger counter, gating of packet-ready |
| `rtl/hs_rx_port.sv` | Top level: the three blocks wired together, plus the output register to the core |

## Where the uncertainty comes from

The deserializer writes a packet on an Rx clock rising edge. The buffer's write
pointer then crosses to the core domain through `SYNC_STAGES` flip-flops (two
by default). Let W be the core clock edge nearest that write edge. In normal
mode:

* If the write edge comes before W, the first synchronizer flop catches it at
  W. `pkt_ready` rises in cycle W+1, the read is in cycle W+1, and `pkt_valid`
  is high in cycle W+2.
* If the write edge comes after W, everything happens one cycle later, and
  `pkt_valid` is high in cycle W+3.

Cycle *n* here means the core clock period that starts at rising edge *n*.
Which of the two cases happens depends on the phase of the tester's Rx clock
against the core clock. That phase is known only to within the tester's EPA,
which is a few tens to a few hundred picoseconds. The core clock comes from an
on-chip PLL locked to a tester reference, so it carries the tester's error
too. At 1 GHz the Rx edges are far from the core edges compared with the EPA,
and the problem never shows. At several GHz the Rx half-period is no bigger
than the EPA, and it shows in most test sessions (see *Verification*).

## How the trigger removes it

`trigger_read_ctrl` holds one counter. In test mode:

1. The tester drives `shared_pin` high for one core cycle, cycle *n*. The pin
   is an ordinary primary input, timed to the core clock like any other
   synchronous input. No synchronizer is used.
2. At edge *n*+1 the counter loads `TRIG_DELAY` and then counts down once
   per cycle.
3. In the cycle where the counter reads 1, cycle *n*+`TRIG_DELAY`, the
   buffer's `pkt_ready` passes through to the read enable. In every other
   cycle it is blocked.
4. The packet is popped at edge *n*+`TRIG_DELAY`+1, and the top level
   presents it on `pkt_valid`/`pkt_data` in cycle *n*+`TRIG_DELAY`+1.

The latency from trigger to core is therefore fixed, and the phase of the Rx
clock no longer matters as long as one rule holds:

> **Trigger rule:** the read cycle *n*+`TRIG_DELAY` must not be earlier than
> the latest cycle in which `pkt_ready` can rise. With the default sizes, a
> packet whose write edge is nominally at core edge W has `pkt_ready` high by
> cycle W+2 at the latest. A trigger in cycle W+1 with `TRIG_DELAY` = 2 reads
> it in cycle W+3. This holds for any phase error smaller than one core period.

The cost is latency: in test mode a packet reaches the core one cycle later
than its latest normal-mode arrival. The response stream shows this as extra
idle symbols, which the tester's expected data can include because they are
now deterministic.

Details of the controller that the technique leaves open, as chosen here:

* **Reload.** A trigger is accepted when the counter is idle or in its last
  cycle. Triggers exactly `TRIG_DELAY` cycles apart therefore give
  back-to-back timed reads. A trigger that comes while the counter still has
  more than one cycle to run is ignored (`trig_busy` is high then).
* **Miss.** If the counter expires while the buffer is empty, nothing is read
  and `trig_miss` pulses for one cycle. The packet stays in the buffer for the
  next trigger. A miss means the tester's trigger was placed too early.
* **Mode change.** Leaving test mode clears the counter. In normal mode the
  read enable is simply `pkt_ready`.
* **Shared pin.** In normal mode `shared_pin` drives `pin_func`, the pin's
  normal function in the rest of the chip. In test mode `pin_func` is held at
  0 and the pin acts as the trigger. The chip therefore needs no extra pin.

## Receive data path

**DDR capture and framing** (`rx_ddr_deserializer`). A rising-edge flop and a
falling-edge flop catch the two beats of each Rx clock cycle. At the next
rising edge the pair is shifted into the packet being assembled. The first
beat goes in the least significant bits. Framing is this design's own choice,
since any real protocol brings its own:

* `rx_frame` high with a rising-edge beat marks the first beat of a packet.
* A packet is `BEATS` beats long, so `BEATS` must be even and a packet
  starts on a rising edge.
* Beats outside a packet are idle symbols and are dropped.
* A frame mark inside a packet is ignored.

For a packet starting at rising edge *s*, `wr_en` is high after edge
*s*+`BEATS`/2, and the buffer writes the packet at edge *s*+`BEATS`/2+1.

**Elasticity buffer** (`elasticity_buffer`). This is a standard dual-clock
FIFO:

* Binary pointers address a `DEPTH`-entry array.
* Gray-coded copies of the pointers cross the clock domains through
  `cdc_sync`.
* Full and empty come from comparing Gray pointers.

The read side is first-word fall-through: `rd_data` always shows the oldest
packet, and `pkt_ready` is the packet-ready signal that the trigger
controller gates. A write while the buffer is full is dropped and reported on
`overflow` for one Rx cycle. The link's flow control should prevent this, so
the flag marks a protocol or test-program error. An assertion flags any read
while the buffer is empty.

## Top-level interface (`hs_rx_port`)

| Port | Dir | Width | Domain | Meaning |
|---|---|---|---|---|
| `rx_clk` | in | 1 | – | forwarded Rx clock (after the LVDS receiver) |
| `rx_rst_n` | in | 1 | rx | asynchronous reset, active low |
| `rx_data` | in | `LANE_W` | rx | DDR data lanes |
| `rx_frame` | in | 1 | rx | first beat of a packet |
| `eb_overflow` | out | 1 | rx | a packet was dropped, buffer full |
| `core_clk` | in | 1 | – | core clock (from the PLL) |
| `core_rst_n` | in | 1 | core | asynchronous reset, active low; assert together with `rx_rst_n` |
| `test_mode` | in | 1 | core | 1: trigger-timed reads |
| `shared_pin` | in | 1 | core | primary input; trigger in test mode |
| `pin_func` | out | 1 | core | the pin's normal function (0 in test mode) |
| `pkt_valid` | out | 1 | core | a packet enters the core this cycle |
| `pkt_data` | out | `LANE_W*BEATS` | core | the packet |
| `trig_miss` | out | 1 | core | trigger expired with the buffer empty |

## Parameters

| Parameter | Default | Set by |
|---|---|---|
| `LANE_W` | 8 | own choice (an 8-bit parallel LVDS port) |
| `BEATS` | 4 (32-bit packets) | own choice |
| `EB_DEPTH` | 8 | own choice (power of two, at least 4) |
| `SYNC_STAGES` | 2 | own choice (`rx_pkg`; used by the buffer) |
| `TRIG_DELAY` | 2 | own choice; the technique only asks for "a fixed number" |

None of these values is fixed by the technique. If you change `SYNC_STAGES`
or `TRIG_DELAY`, move the trigger according to the trigger rule above.

## What is not included

These parts of a complete chip are outside this RTL:

* the PLL that makes the core clock;
* the LVDS pad cells;
* the transmit port, which sends the response stream with its own forwarded
  clock and idle symbols;
* the core logic that consumes the packets.

The top brings their connections out as plain ports. The tester appears only
in the testbenches, as a behavioural model.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a watchdog.

| Testbench | What it shows |
|---|---|
| `tb/tb_rx_ddr_deserializer.sv` | Random idle and framed traffic on both edges, `BEATS`=4 and 2 side by side. Checks every packet's contents and beat order, and the exact cycle of `wr_en`. Checks that idle beats and frame marks inside a packet are ignored. |
| `tb/tb_elasticity_buffer.sv` | Unrelated write and read clocks (2 ns, 6.2 ns), random rates, writes while full. Scoreboard for order and loss, overflow count, and `pkt_ready` latency of `SYNC_STAGES` to `SYNC_STAGES`+1 read edges. |
| `tb/tb_trigger_read_ctrl.sv` | Cycle-by-cycle reference model of the controller (`TRIG_DELAY`=3). Random triggers and packet-ready, mode switches. Checks misses, ignored triggers, and the exact trigger-to-read distance. |
| `tb/tb_hs_rx_port.sv` | The whole port at its default sizes (see below). |
| `tb/tb_hs_rx_session.sv` | Test sessions at 1 to 15 GHz and EPA from 25 to 200 ps (see below). |

`tb_hs_rx_port` sends the same six packets in eight runs per mode. Each run
shifts the Rx clock by a random phase of up to ±400 ps against a 125 MHz core
clock; the Rx clock runs at 1 GHz. Every write edge is placed nominally on a
core edge, which is the worst case. The testbench checks the following:

* In normal mode, arrivals fall in cycle W+2 or W+3 and do change between
  runs.
* In test mode, every packet of every run arrives in cycle W+4. Runs with
  early packets and runs with late packets both occur.
* A trigger with no packet produces `trig_miss`.
* Ten untriggered packets overflow the 8-entry buffer twice, and the eight
  stored packets drain in order.
* The shared pin works in both modes.

`tb_hs_rx_session` models the tester statistically:

* Each clock edge gets a Gaussian error with σ = EPA/3, on both the Rx clock
  and the core clock.
* The two errors are folded into one per-packet phase error with σ√2. The
  phase drifts smoothly between packets, so the Rx clock stays continuous.
* Each session has 100 packets, each written half an Rx period before a core
  edge.
* The core clock runs at 1/8 of the Rx clock.
* Rx periods are whole picoseconds: 142 ps stands for 7 GHz, and 66 ps
  (15.2 GHz) for 15 GHz.
* The Gaussian is approximated by a sum of twelve uniform random numbers.

In normal mode the testbench predicts each packet's arrival cycle from its own
phase error and checks it. In test mode it checks the fixed cycle. It prints
how many sessions had at least one packet a cycle late, out of 40 normal-mode
and 4 test-mode sessions per configuration:

```
  Rx clock | EPA 25      50      100     150     200 ps
    1.0 GHz|  0 / 0    0 / 0    0 / 0    0 / 0    0 / 0
    2.0 GHz|  0 / 0    0 / 0    0 / 0    0 / 0   11 / 0
    5.0 GHz|  0 / 0    0 / 0   29 / 0   40 / 0   40 / 0
    7.0 GHz|  0 / 0    2 / 0   40 / 0   40 / 0   40 / 0
   10.0 GHz|  0 / 0   28 / 0   40 / 0   40 / 0   40 / 0
   15.2 GHz|  3 / 0   40 / 0   40 / 0   40 / 0   40 / 0
```

The normal-mode fractions follow the analytic session probability
1 − (1 − P)^100. Here P is the probability that a single packet lands in the
other cycle, Q(Δ / (√2·EPA/3)), with Δ half the Rx period. That gives 0.33
for 2 GHz at 200 ps, 0.12 for 7 GHz at 50 ps, and 0.82 for 10 GHz at 50 ps.
With the trigger, no session is non-deterministic.

For each block, a copy with a single deliberate bug fails its testbench:

* beats swapped in the deserializer;
* writes accepted while the buffer is full;
* the read taken one cycle early;
* the trigger disconnected at the top level.

## Simulating

The testbenches use delays and need `--timing`. The RTL has no `timescale`,
so give one on the command line. For example, for the whole port:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -Irtl rtl/rx_pkg.sv tb/tb_hs_rx_port.sv --top-module tb_hs_rx_port
./obj_dir/Vtb_hs_rx_port
```

Replace `tb_hs_rx_port` with any other testbench name. Each one runs in
seconds. Lint the RTL with
`verilator --lint-only -Wall -Wno-fatal -y rtl rtl/rx_pkg.sv rtl/hs_rx_port.sv`. The
remaining warnings are expected:

* unused package constants;
* `eb_full` and `trig_busy`, which are left unconnected at the top;
* the FIFO assertion, which samples a reset that the flops also use
  asynchronously.
