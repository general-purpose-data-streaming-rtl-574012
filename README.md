# Streaming TDC with heartbeat framing

A time-to-digital converter (TDC) for trigger-less data acquisition: every
edge on every input is measured and sent off continuously, with no hardware
trigger deciding what to keep. The difficulty in such a stream is time: a hit
has to carry an absolute time, but a long local timestamp per hit is
expensive. This design solves it with a **heartbeat**: a short 16-bit counter
on the 125 MHz system clock gives each hit its coarse time, and every time the
counter wraps (every 2^16 cycles, 524 µs) a **delimiter word** carrying a 24-bit
**frame number** is inserted into the stream. Frame number, heartbeat count and
fine count together span 2^40 × 8 ns ≈ 2.4 hours. Because all FPGAs of a
system run heartbeat units aligned to a common upstream heartbeat, the data of
all front ends can be cut into the same frames downstream.

Two instruments are built from the same blocks:

* **High-resolution TDC** (`str_hrtdc`): 64 channels, each input sampled by a
  tapped delay line (192 taps over one 8 ns period, about 42 ps per tap). The
  channels sit on two 32-channel mezzanine FPGAs, each with its own front
  merger; the base-board FPGA merges the two streams (back merger).
* **Low-resolution TDC** (`str_lrtdc`): 1 ns bins, from 8 samples per clock,
  32 channels, all in one FPGA.

`str_tdc_top` holds both side by side, each with its own clock, inputs and
output stream. On a real board you would load one or the other.

## Data format

All words are 64 bits (one word per clock = 8 Gbps, the internal bandwidth).

| word | bits |
|---|---|
| hit | `[63:60]` = 0xB, `[59:54]` channel, `[53:38]` TOT (taps), `[37:24]` 0, `[23:8]` heartbeat count of the leading edge, `[7:0]` fine count |
| delimiter | `[63:60]` = 0xF, `[59:56]` flags, `[55:40]` 0, `[39:16]` frame number, `[15:0]` 0 |

Delimiter flags: bit 0 hits were lost in this frame (buffer overflow), bit 1
the merged inputs disagreed on the frame number, bit 2 the heartbeat counter
was realigned at this heartbeat. Types and helpers are in `str_tdc_pkg`.

Time of a hit in tap units: `coarse * TAPS + fine` (+ a constant). The fine
count is the number of taps from the previous clock edge to the edge. Taps
are taken as equal; there is no bin-width calibration in the RTL, so the fine
count is raw.

## The channel: from taps to hit words (`tdc_block`)

Each clock, a channel receives one period of samples, `taps[0]` the newest.

1. **`tdc_edge_encoder`** finds 0→1 (leading) and 1→0 (trailing) steps, using
   the newest sample of the previous period as well so that boundary edges are
   not lost. It reports the oldest step of each kind, so it sees at most one
   leading and one trailing edge per 8 ns period.
2. **`le_te_pairing`** joins each leading edge with the next trailing edge
   into one hit with TOT = trailing − leading. Half the words, and the TOT
   becomes available for a cut. A pulse shorter than one clock (both edges in
   one period) pairs within the cycle. A trailing edge with no open leading
   edge is dropped. A second leading edge replaces an open one, and a leading
   edge left open for `MAX_TOT_CYCLES` cycles (340 at 192 taps, the largest
   TOT the 16-bit field holds) times out.
3. **`tot_filter`** keeps only hits with `tot_min <= TOT <= tot_max` when
   enabled.
4. **Event gate**: in trigger emulation mode, only hits arriving while the
   gate of `trigger_emulator` is open pass.
5. **Stream builder**: builds hit words and, at each heartbeat, a delimiter.
   The heartbeat is delayed by the same three stages as the hits. As a result,
   an edge captured in the last cycle of a frame goes before that frame's
   delimiter. A hit belongs to the frame in which its trailing edge was seen;
   its coarse count still gives the leading-edge time. A 4-word in-order queue
   absorbs a hit and a delimiter that arrive in the same cycle. The queue feeds
   the channel FIFO (32 words). When the FIFO or queue is full, hits are dropped
   and the overflow flag is set in that frame's delimiter. Delimiters are never
   dropped, because the mergers need one from every input to close a frame.

Latency from taps to FIFO write is four clocks after the trailing edge.

## Merging frames (`merger`)

The merger reads N first-word-fall-through FIFOs and writes one. Every cycle
its path switcher looks at all FIFO flags and head words:

* an input whose head is a delimiter is **paused**, so words of the next
  frame cannot overtake the current frame;
* among the other non-empty inputs the **lowest-numbered** one is read (fixed
  priority), one word per cycle;
* when **all** heads are delimiters, all are popped together and one
  **rebuilt delimiter** is written. It carries input 0's frame number, the OR
  of all flags, and the mismatch flag if the frame numbers differ.

The output is again a FIFO holding frames closed by single delimiters. The
same block therefore serves as the front merger (32 channels in each
mezzanine) and as the back merger (two mezzanines). When the output FIFO is
full the merger stalls, and back-pressure travels to the channel FIFOs.
Within one frame, a busy low-numbered channel can delay higher ones. It
cannot starve them across frames, because every input is paused at its
delimiter.

Rate: one 64-bit word per clock = 8 Gbps at 125 MHz. With one word per hit,
64 channels can be emptied at up to 1.95 MHz per channel on average.

## Heartbeat and synchronisation (`heartbeat_unit`)

Stand-alone, the unit free-runs: it beats in the last cycle of each frame
(`hb_count == 0xFFFF`) and then increments the frame number. As a follower
(`sync_en = 1`) it beats exactly when the upstream `sync_beat` arrives, takes
the frame number from `sync_frame` and restarts its counter. If the local
counter was not at its last value, the beat is marked as a resync, and the
flag appears in the delimiter. In `str_hrtdc` the base-board unit follows the
external `sync_*` ports (or free-runs), and both mezzanine units follow the
base-board unit. The links between the FPGAs are plain wires here, with no
latency.

## Trigger emulation (`trigger_emulator`)

For setups whose computers cannot take the full stream, or which must work
with front ends that need a hardware trigger, `trig_mode = 1` turns the stream
into a triggered one. A `trigger` pulse opens an event gate for `gate_width`
clocks, starting in the next cycle, and a new trigger restarts the gate. Only
hits that reach the gate stage while it is open are kept. The gate is not
positioned by hit timestamp, and there is no look-back window.
Delimiters always pass, so the frame structure does not change.

## Interfaces of the top

`str_tdc_top` ports come in `hr_*` and `lr_*` sets:

* `*_clk`, `*_rst`: synchronous, active-high reset.
* `hr_taps[64]` (192 bits each) and `lr_samples[32]` (8 bits each): one
  sample word per clock per channel, bit 0 newest.
* `*_sync_en`, `*_sync_beat`, `*_sync_frame`: upstream heartbeat (a one-cycle
  pulse in the last cycle of a frame, plus that frame's number).
* `*_trig_mode`, `*_trigger`, `*_gate_width`, `*_tot_en`, `*_tot_min`,
  `*_tot_max`: run control.
* `*_out_valid`, `*_out_data`, `*_out_ready`: output stream. A word moves
  when valid and ready are both high.
* `hr_status` bits, from 0 up: hit lost, edge dropped, TOT cut, merger stall,
  frame mismatch, frame done, trigger accepted. `lr_status` has the same bits
  without frame mismatch. Each is a one-cycle pulse.

## What is outside the RTL

The design begins at the sampled taps and ends at the output stream. Outside
it, and not modelled:

* the carry-chain delay lines and the 1 ns input serialisers;
* the clock-distribution link, which carries clock, heartbeat and frame
  number to the board, and its synchronisation protocol (the heartbeat enters
  at the `sync_*` ports);
* the TCP/IP engine behind the output stream, the DDR3 buffer, the jitter
  cleaner and the optical transceivers;
* slow control (run-control settings are plain ports);
* delay-line bin-width calibration.

## Departures and own choices

These points are choices made in this design:

* word layout and flag bits; one delimiter word per heartbeat;
* tap count (192), LR channel count (32) and every FIFO depth;
* the pairing rules for unmatched edges, and the timeout;
* the TOT window form;
* the gate form and the gate position in the pipeline;
* frame assignment by trailing edge;
* hits dropped on overflow, with a flag, while delimiters are kept;
* fixed-priority merging with a frame-mismatch flag;
* zero-latency links between the FPGAs.

## Files and simulation

`rtl/`: `str_tdc_pkg` (types), `heartbeat_unit`, `tdc_edge_encoder`,
`le_te_pairing`, `tot_filter`, `trigger_emulator`, `sync_fifo`, `tdc_block`,
`merger`, `str_tdc_group` (one FPGA: heartbeat unit, channels, trigger
emulator, front merger), `str_hrtdc`, `str_lrtdc`, `str_tdc_top`.

`tb/`: one self-checking testbench per module (`tb_<module>`). Each prints
`TB_RESULT checks=N failures=M`. `tdc_tb_pkg` is the shared model: it
generates random pulses, turns them into tap words, and predicts every hit
word of every frame. The multi-channel tests check the merged stream against
it word by word. Tests and sizes:

* `tb_str_tdc_top` runs both TDCs at reduced size (8+8 channels, 512-cycle
  frames). It counts each mechanism and requires every one to occur: short
  pulse, unpaired edge, TOT cut, trigger gate, merger stall, overflow flag,
  rebuilt delimiter, follower heartbeat.
* `tb_str_tdc_full` runs the top at full size (64 + 32 channels, 65536-cycle
  frames) for two frames at about 1.8 MHz per channel. No hit may be lost.
  The run sustains about 0.9 output words per clock and takes under a minute.

Any testbench runs with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_str_tdc_top rtl/str_tdc_pkg.sv tb/tdc_tb_pkg.sv tb/tb_str_tdc_top.sv
./obj_dir/Vtb_str_tdc_top
```

To get short frames in simulation, lower the heartbeat counter width
(`CNT_W`). Hit words keep their 16-bit coarse field.
