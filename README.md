# Timing and fast control over a deterministic-latency GBT link

A free-streaming data acquisition system has no trigger to line data up.
Every readout board stamps its data with its own copy of a common time, and
the event builder relies on those stamps. The readout boards must therefore
count the same 40 MHz clock and hold the same 64-bit time. The time
must stay the same after every restart, to well under one clock period.

This RTL is the gateware of such a Timing and Fast Control (TFC) system. It
follows the architecture of the GBT-FPGA based upgrade of the CBM TFC system
described in "Evaluation of GBT-FPGA for timing and fast control in CBM
experiment". A **Master** node owns the time and sends it periodically to an
**Endpoint** over an optical GBT link. The Endpoint loads its own time counter
from the first timestamp it receives and then checks every later one. This
works only if the downstream path from the Master's timing logic to the
Endpoint's counter has the same latency, in whole clock cycles, on every
power-up. The link core (latency-optimised GBT-FPGA) takes care of bit and
word alignment and of the recovered clock. The gateware here must add no
variable latency of its own. It therefore has no FIFO and no clock-domain
crossing in the downstream path, and timing messages always go first on the
link.

The same link also carries a fast control path: the Endpoint reports its
status upstream, and the Master answers a busy Endpoint with a throttling
command without the host taking part. Pattern detectors on the Master's Tx
port and the Endpoint's Rx port turn a chosen test word into two pulses. An
oscilloscope measures the link latency as the skew between them.

## Structure

```
 Master node (clk_m)                                      Endpoint node (clk_e, recovered)
 ─────────────────────                                    ────────────────────────────────
 time_counter ──► timing_master ──┐                       ┌─► timing_endpoint ─► endpoint_time
                                  │                       │     (time_counter inside)
 Wishbone ─► wb_master_regs ─┐    ▼                       │
              ▲   test word  └► tx_frame_mux ─► gbt_tx_data ═══ GBT link ═══► gbt_rx_data
              │   commands   ┌►  (timing > cmd > test)    │
              │              │        │                   ├─► fast_control_endpoint ─► throttle,
 fast_control_master ────────┘        ▼                   │          │                 cmd strobe
              ▲               pattern_detector ─► tx_pulse└─► pattern_detector ─► rx_pulse
              │                                                      │ status messages
      gbt_up_rx_data ◄══════════════ GBT link (upstream) ═══════ gbt_up_tx_data
```

`tfc_gbt_top` holds both nodes side by side. They share no signal and have
separate clocks and resets, because in a real system they sit on different
boards. Both directions of the GBT link, and everything analog, lie between
the `gbt_*` ports (see "Outside this RTL").

| Module | Role |
|---|---|
| `tfc_pkg` | word width, message kinds, frame struct, command codes |
| `time_counter` | 64-bit loadable time counter, +1 per 40 MHz cycle |
| `timing_master` | captures the Master time every `PERIOD` cycles and offers a timing message |
| `tx_frame_mux` | chooses the Tx word each frame: timing, then command, then test word, else idle |
| `wb_master_regs` | Wishbone slave: test word, send request, commands, Endpoint status read-back |
| `fast_control_master` | captures upstream status; automatic throttle decision; command queue |
| `timing_endpoint` | loads or checks the local time counter from received timestamps |
| `fast_control_endpoint` | decodes commands (throttle level); sends status upstream |
| `pattern_detector` | stretched pulse when the pre-defined test word passes a port |
| `tfc_gbt_top` | both nodes wired together |

## Words on the link

Each 40 MHz frame carries one 80-bit user word, which is the data field of a
GBT frame. The word is a `tfc_frame_t`:

| bits | field |
|---|---|
| 79:72 | kind: `0x00` idle, `0x5A` timing, `0x96` command, `0xC3` test (user) word, `0x69` status |
| 71:64 | reserved, 0 |
| 63:0 | payload |

* Timing: payload = 64-bit Master time.
* Command: payload[15:0] = command code. `0x0001` is throttle on and `0x0002` is throttle off. Other codes pass through to the Endpoint as a one-cycle strobe.
* Test word: payload = the 64 bits programmed over Wishbone.
* Status (upstream): payload[63:32] = Endpoint board status, of which bit 32 (status bit 0) means *busy*. Payload[31:16] = the Endpoint's time-adjustment count, and bit 0 = its *synced* flag.

The 80-bit width comes from the GBT frame. The layout and all codes are this
design's own choices.

## How an Endpoint's time is aligned

This part is the reason the design exists. Every stage is a fixed number of
register stages, so the delay from "Master time is T" to "the Endpoint sees a
timestamp T" is a constant that can be added back.

1. In the cycle in which `timing_master` raises `msg_valid`, its payload equals
   the Master's counter value *in that same cycle*. The module samples the
   counter and adds one.
2. `tx_frame_mux` registers the word, so it is on `gbt_tx_data` one cycle
   later. Timing messages have top priority, so this is always exactly one
   cycle.
3. The link delivers the word `L` frame clocks later on `gbt_rx_data`.
4. In the cycle the word is on `gbt_rx_data`, `timing_endpoint` expects its
   local counter to read `payload + latency_comp`. With `latency_comp = L + 1`,
   this is exactly the Master's time in that cycle. On a load it writes
   `payload + latency_comp + 1`, the value for the next cycle.

So with `latency_comp = L + 1` and equal clocks, `endpoint_time` equals
`master_time` in every cycle. The testbenches check this cycle by cycle. Any
other constant leaves a fixed offset, which is harmless as long as it does
not change: downstream processing calibrates constant offsets out. What must
not happen is a change between power-ups, and that is what the fixed-latency
path prevents.

Endpoint behaviour:

* While `gbt_rx_ready` is low, received words are ignored and `synced` is
  low. The counter keeps running.
* The first timing message after the link comes up loads the counter
  (`load` pulses and `synced` rises). This is the initial synchronisation.
* Each later timing message is compared with the counter. On a mismatch,
  for example after a transmission error, the counter is reloaded, `adjust`
  pulses and `adjust_count` increments. The next correct message pulls the
  counter back, so a single corrupted timestamp costs two adjustments and
  one broadcast period of wrong time. No error check or majority vote is
  applied to a received timestamp. The GBT link's own forward error
  correction is relied on.

Throughput and timing: one timestamp every `TIME_PERIOD` cycles (default
40 000 = 1 ms). Time resolution is one clock period (25 ns). Phase alignment
below one clock period belongs to the link core and the clocking.

## Fast control: status up, throttling down

`fast_control_endpoint` sends a status message in the cycle after
`endpoint_status` changes. It also sends one every `STATUS_PERIOD` cycles
(default 4 000 = 100 µs) as a refresh. `fast_control_master` stores the last
status and counts the messages. If automatic throttling is enabled (CTRL bit
2, on after reset), it compares the busy bit with the throttle state it last
requested. On a difference it queues throttle-on or throttle-off at once.
The Endpoint's `throttle` output follows the command.

Loop latency, from a busy change at the Endpoint to `endpoint_throttle`, is
**2L + 4** cycles, with L the one-way link delay. The cycles are: the status
register, the link, the decision register, the Tx mux register, the link
again, and the throttle register. If a timing message takes the
multiplexer's slot, the latency is one cycle more. A newer automatic decision
replaces one not yet sent. Host commands (CMD register) wait behind an
automatic decision. A host throttle command also updates the Master's
throttle state.

## Measuring link latency

`pattern_detector` instances watch the Master's Tx word and the Endpoint's Rx
word. When the word equals `PATTERN` (default: a test word whose payload is
`0xC0FFEE00_DEADBEEF`), `tx_pulse` or `rx_pulse` goes high for `PULSE_LEN`
cycles (default 8 = 200 ns). `tx_hits` and `rx_hits` count the matches. The
detectors are identical, so their own delay cancels in the skew. To take a
sample:

1. Write the pattern into DATA_LO/DATA_HI.
2. Write SEND.
3. Measure the rising-edge skew between `tx_pulse` and `rx_pulse`.

In simulation the skew is exactly `L` cycles. On hardware, the interesting
part is the picosecond-level spread of that skew. That spread comes from the
link core, the transceivers and the clocks, and this RTL does not model it.

## Register map (`wb_master_regs`, 32-bit Wishbone B4 classic, byte addresses)

| addr | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | rw | bit0 timing broadcast enable (reset 1); bit1 SEND: write 1 to queue the test word, reads 1 while it waits; bit2 automatic throttling (reset 1) |
| 0x04 | DATA_LO | rw | test word 31:0 |
| 0x08 | DATA_HI | rw | test word 63:32 |
| 0x0C | SENT | ro | 15:0 test words sent |
| 0x10 | CMD | rw | write: queue command `dat[15:0]`; read: 15:0 last code, bit16 pending, bit17 throttle state |
| 0x14 | EP_STAT_LO | ro | last status payload 31:0 |
| 0x18 | EP_STAT_HI | ro | last status payload 63:32 |
| 0x1C | EP_COUNT | ro | 15:0 status messages received |

`ack_o` is registered: each access has one wait state. CTRL and CMD act only
if byte lane 0 is selected. An assertion checks that `ack_o` is high only
while `cyc_i && stb_i` is held.

## Outside this RTL

These parts have no logic given for them here. They connect at the top's
ports:

* **GBT link core** (latency-optimised GBT-FPGA) on each board. It does
  encoding, scrambling, forward error correction, bit and word alignment and
  clock recovery. It provides `gbt_tx_data`/`gbt_rx_data`/`gbt_rx_ready`
  downstream and `gbt_up_tx_data`/`gbt_up_rx_data`/`gbt_up_rx_ready`
  upstream. It is expected to deliver received words in the receiving node's
  frame clock (`clk_e` at the Endpoint, `clk_m` at the Master).
* **Transceivers and optics** (board and mezzanine).
* **Clocking**: PLLs and clock cleaners with a fixed input-to-output phase.
  They make `clk_m` and the recovered `clk_e`.
* **The host** behind Wishbone, and the oscilloscope.

For simulation, `tb/gbt_link_model.sv` stands for a link. It is a
`LATENCY`-cycle delay line on one clock with a ready signal and an injector
for a bit error in a timestamp. It is behavioural and is not part of the
design.

## Parameters

| parameter | default | origin |
|---|---|---|
| time width | 64 bits | design description |
| frame clock | 40 MHz | design description |
| word width `DATA_W` | 80 | GBT frame data field |
| `TIME_PERIOD` | 40 000 cycles (1 ms) | own choice; the broadcast is described only as periodic |
| `STATUS_PERIOD` | 4 000 cycles (100 µs) | own choice |
| `PATTERN` | kind 0xC3, payload `0xC0FFEE00_DEADBEEF` | own choice ("a pre-defined pattern") |
| `PULSE_LEN` | 8 cycles | own choice |

## Departures and own choices

* The block diagram of the original architecture is not reproduced. The
  structure follows its description in text: a timing master and a
  Wishbone-programmed sender on the Master, and a timing endpoint on the
  Endpoint. A pattern detector sits on each side.
* The message format, register map, arbitration, reset values, command codes
  and both periods are this design's choices.
* The fast control path is described only as a role of the system: collect
  status from the readout boards and issue commands such as throttling. The
  decision rule (busy bit compared with the last request), the
  send-on-change status policy and the queueing are the simplest complete
  choice, not a reproduction.
* Re-adjustment after a mismatch is included because the Endpoints "adjust
  their local time counters if needed". The initial load happens at link
  initialisation.
* Only one Endpoint per Master link is built. The distribution to hundreds of
  Endpoints and the reference (pre-upgrade) link are not part of this RTL.
* The Wishbone clock is the Master's 40 MHz system clock.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_time_counter` | counting, loads, wrap at 2^64, load held |
| `tb_timing_master` | period, first-message delay, payload, enable off/on |
| `tb_timing_endpoint` | ignore while link down, initial load, tracking, adjust on a bad timestamp and back, resync after link loss |
| `tb_tx_frame_mux` | random traffic against a model of the priority and the one-cycle delay |
| `tb_wb_master_regs` | all registers, byte lanes, wait states, SEND handshake, command strobe |
| `tb_fast_control_master` | status capture, decision only on change, stall, replacement, host order, auto off |
| `tb_fast_control_endpoint` | commands, throttle level, status stream against a cycle model |
| `tb_pattern_detector` | pulse position and length, hit count, near-miss words |
| `tb_tfc_gbt_top` | the whole design at default parameters over two link models (L = 13): equal Master and Endpoint time in every synced cycle, broadcast period, corrupted timestamp, broadcast disabled, receiver restart and resync, Tx/Rx pulse skew = L, a test word held back by a timing message, status refresh, busy-to-throttle latency 2L+4, host commands |
| `tb_latency_runs` | the latency test procedure: 10 runs of 1000 samples, both nodes reset and the link re-established between runs; every sample must measure the same skew |

What this shows is that the gateware's own latency is fixed to the cycle,
within a run and from reset to reset. It cannot show anything about sub-cycle
phase, which depends on the link core and the clocks.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tfc_pkg.sv tb/tb_tfc_gbt_top.sv --top-module tb_tfc_gbt_top
./obj_dir/Vtb_tfc_gbt_top
```

Replace `tb_tfc_gbt_top` with any other testbench name. The full-design test
runs about 0.8 million cycles and finishes in about a second. Testbenches that
start from random initial values (`+verilator+rand+reset+2`) also pass:
everything that is read is reset.
