# 64-channel SiPM waveform sampling chip, digital design

This chip records the waveforms of 64 silicon photomultiplier (SiPM) channels.
Each channel keeps its last 256 samples, taken at 200 MHz, in an analog memory.
When a trigger arrives, all 256 samples are digitised at once. This works
because every memory cell has its own single-slope (Wilkinson) ADC. The events
then leave the chip on eight 400 MHz DDR lanes, with eight channels per lane.
The point of the design is the trade-off between dead time and power:

- Nothing is converted until a trigger arrives.
- When it does, the conversion runs fully in parallel. A 12-bit conversion of
  a whole channel takes 2^12 clock periods of 5 ns, or 20.5 µs, however many
  cells take part.

This repository holds the synthesizable digital part of the chip in
SystemVerilog:

- the cell latches
- counters
- control state machines
- event formatting
- triggering
- arbitration
- serialisation

It also holds small behavioural models of the analog parts that the digital
logic talks to: the storage cell and comparator, the ramp and the
discriminator. These models let the whole signal chain be simulated, from a
front-end voltage to bits on a lane.

## Structure

```
waveform_asic_top
 ├─ trigger_unit                 chip-wide trigger logic, primitives out
 └─ readout_module  x8           one DDR lane each
     ├─ channel  x8
     │   ├─ discriminator        (behavioural)
     │   ├─ channel_controller   segment/conversion state machines
     │   ├─ gray_counter         shared by the channel's 256 cells
     │   ├─ ramp_generator       (behavioural) shared by the 256 cells
     │   ├─ cell_analog  x256    (behavioural) capacitor + comparator
     │   ├─ cell_logic   x256    Gray-code latches: data and offset memory
     │   └─ channel_readout      header + samples, Gray→binary, offset subtract
     ├─ module_arbiter           one channel's event at a time
     └─ ddr_serializer           2 bits per 400 MHz clock
```

Shared types and constants are in `rtl/asic_pkg.sv`:

- sizes
- `chip_cfg_t`
- `seg_mode_e`
- the header layout
- the stream word
- Gray conversion

### Clocking

The design uses one clock, `clk`, at 400 MHz. That is the serializer rate.
The top makes an enable, `ce`, that is high on every second clock. `ce`
drives everything that runs at the 200 MHz sampling rate:

- cell writing
- the Gray counter
- the ramp
- the trigger unit
- the controller's state machines

The readout, the arbiter and the serializer run on every clock. The reset,
`rst_n`, is asynchronous and active low.

## How a cell becomes a number

Each cell stores the front-end voltage on a capacitor. During conversion the
channel's single ramp is applied to the capacitor's bottom plate. That raises
the floating top plate by the same amount. At the same time the channel's Gray
counter counts. The cell's comparator flips when the top plate crosses its
threshold. From then on, the cell's latches stop following the counter and
hold the value.

Only one ramp and one counter are used per channel. That makes the gain the
same in every cell. Gray coding means a latch that closes while the counter
changes is off by at most one count.

The conversion sequence for a segment is:

| slots (5 ns) | what happens |
|---|---|
| 2 | comparators of the segment powered up, counter and ramp cleared |
| 2^N | counter and ramp run; each cell's latches follow the counter until its comparator flips |
| 1 | last latch update, segment handed to readout |

N is the resolution, from 8 to 12 bits, set by `res_sel` = N − 8. The ramp
rises by 2^(12−N) level steps per count, so it crosses the full input range
at any resolution. A cell holding level v with offset p reads
min(2^N − 1, ⌈(v + p) / 2^(12−N)⌉). A cell that never flips keeps the full
count 2^N − 1.

### Levels in the models

Analog quantities pass between the models as 14-bit unsigned codes
(`level_t`). One code step is one 12-bit ADC step, measured from the
reference voltage used during sampling. The models are:

- `cell_analog`: stores the input level, plus a fixed per-cell pedestal
  (`OFFSET`), when it samples. Its comparator output is `ramp >= stored` while
  it is powered up.
- `ramp_generator`: an ideal linear staircase.
- `discriminator`: fires while the front-end level is strictly above its
  threshold.

Each model is cycle based. None has delays, noise or nonlinearity.

### Offset calibration

Each cell has two 12-bit latch sets: a data memory and an offset memory.

- With `cal_mode` set, a conversion writes the offset memory instead of the
  data memory, and the readout sends the offsets.
- To calibrate, feed a steady input and trigger once, with the partitioning
  set so that the segment covers the cells you want.
- During normal running with `sub_offset` set, each cell's stored offset is
  subtracted at readout, and the result saturates at 0.

The pedestal in the model cells is (37·cell + 11·seed + 5) mod 13 steps. Its
only purpose is to give the calibration something to remove.

## Segments and the controller

A channel's 256 cells can be used in three partitionings (`seg_mode`):

| `seg_mode` | segments | cells each | events held |
|---|---|---|---|
| `SEG_256` (0) | 1 | 256 | 1 |
| `SEG_64` (1) | 4 | 64 | 4 |
| `SEG_32` (2) | 8 | 32 | 8 |

While `acq_en` is high, the controller writes one cell per 5 ns slot. It
writes round the current segment as a ring. When a trigger comes, it does
three things:

1. It freezes that segment.
2. It records the cell that holds the oldest sample and the event number.
3. It moves writing on to the next free segment.

Segments are used, converted and read out strictly in round-robin order.
Because the counter and the ramp are shared, only one segment of a channel
converts at a time. The others wait their turn. A segment returns to the free
pool once its event has been sent.

The controller reports each trigger in one of two ways:

- `trig_taken` if the trigger was accepted.
- `trig_lost` if no segment was free. In that case `full` is also high.

The controller tracks three counts:

- `n_busy`: segments holding an event.
- `n_conv`: segments converted but not yet read.
- `rd_seg`: the next segment to read.

Assertions check that these counts stay consistent. A segment that is picked
up right after a trigger may hold some samples from before acquisition
started; those cells are overwritten only after a full lap.

Change `seg_mode` only while `acq_en` is low and no event is pending. Taking
`acq_en` low also returns the write pointer to cell 0.

There is no post-trigger delay. Sampling of the segment stops at the slot the
trigger is seen. The event therefore shows the waveform that led up to the
trigger.

## Triggers

`trigger_unit` samples each channel's discriminator on `ce`. It sends out
three primitives:

- `prim_disc`, per channel
- `prim_or`, the OR of all the unmasked channels
- `prim_topo`, the topological trigger

An off-chip processor can use the primitives to combine several chips. The
unit turns rising edges into per-channel trigger pulses as follows:

- **Sparse mode** (`imaging` = 0): each channel is triggered by its own
  discriminator.
- **Imaging mode** (`imaging` = 1): every channel is triggered at once, so the
  whole chip records the same time frame. The trigger is either the fast OR
  (`topo_sel` = 0) or the topological trigger (`topo_sel` = 1).
- The topological trigger uses the channels as an 8 × 8 map, with channel =
  8·row + column. It fires when a channel and at least one of its four direct
  neighbours fire together. An isolated hit does not trigger.
- `int_trig_en` allows the on-chip decision to start a readout. With it low,
  the chip only provides primitives.
- `ext_trig_en` allows the external trigger, `ext_trig`. It triggers every
  channel in either mode. It is meant for background monitoring.
- `ch_mask` removes channels from all of the above.

## Event format

Each event carries one channel's segment, sent MSB first:

| bits | field |
|---|---|
| 6 | channel number (0..63) |
| 3 | `res_sel` (resolution − 8) |
| 2 | `seg_mode` (gives the number of samples) |
| 8 | cell holding the oldest sample |
| 8 | event number, counted per channel |
| N × L | L samples of N bits each, oldest first |

So the header is 27 bits. A full 256-cell event at 12 bits is
27 + 3072 = 3099 bits. Samples are in binary, with the offset subtracted if
that was requested. The order of the header fields is this design's own
choice.

## Lanes

Each readout module has eight channels that share one lane. `module_arbiter`
grants the lane to one channel for a whole event, in round-robin order.

`ddr_serializer` sends two bits per 400 MHz clock:

- `dq[1]` is the earlier bit, for the rising edge.
- `dq[0]` is the later bit, for the falling edge.

The DDR output register itself is outside this design. `lane_valid` is high
exactly while the bits of an event are on the lane. If an event has an odd
length, a single 0 is added at its end. The receiver finds event boundaries
from the header, since the header gives the number of samples. The serializer
does not accept a new event until the last one has fully left.

Timing at 12 bits and 256 cells:

| step | time |
|---|---|
| conversion | 4099 × 5 ns = 20.5 µs |
| one channel's event on a lane | 3100 bits / 2 per 2.5 ns = 3.875 µs |
| all 8 channels of a module | 8 × 3.875 µs = 31.0 µs |

The module testbench measures 31.02 µs from the first bit of the first event
to the last bit of the eighth. At lower resolution both the conversion and
the events get shorter: 10 bits convert in 5.1 µs.

## Departures and open points

- The front-end amplifiers, the on-chip calibration pulse generator and the
  reference voltage are analog and are not modelled. The front-end output
  enters as `vfe`, a level code per channel, and the thresholds enter as
  `thr`.
- The analog models are idealised. They are good enough to test the logic,
  but say nothing about linearity, noise or power. The comparator's two-branch
  power scheme is reduced to one enable, `conv_pwrup`.
- Several things are this design's own: the configuration arrives as a static
  record, `chip_cfg_t`, with no slow-control interface; the header layout;
  and the lane framing (valid strobe and pad bit).
- Also this design's own: the topological neighbourhood, the round-robin
  policies, and dropping triggers when all segments are busy.
- There is no zero suppression or compression. Raw samples are sent.

The circuit warnings that remain in lint are intended:

- `channel` leaves the Gray counter's binary output unconnected.
- Configuration fields not used by a block are left unread.
- The model cell's stored level is initialised at declaration.
- Assertions use `rst_n` in `disable iff`, so the reset is also seen on a
  synchronous path.

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
prints `TB_RESULT checks=… failures=…` and has a watchdog. The testbenches
share two helpers:

- `tb/tb_pkg.sv` holds the reference model of the ADC code.
- `tb/lane_rx.sv` is a lane receiver that rebuilds events from `dq` and
  `lane_valid`.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
  rtl/asic_pkg.sv tb/tb_pkg.sv tb/tb_channel.sv --top-module tb_channel
./obj_dir/Vtb_channel
```

`tb_waveform_asic_top` runs the whole chain end to end:

- imaging with fast OR and with the topological trigger
- sparse mode with the external trigger
- all three partitionings
- 8- and 12-bit resolution
- offset calibration and subtraction
- bursts that fill the segments and lose triggers

It decodes every event from the lane. It then checks every sample against the
ADC model of the input waveform, and checks each event against a trigger it
caused. It also counts each mechanism, and counts a failure for any that
never happened.

By default it builds the top with `NMODULES = 1` (8 channels, one lane), set
by `NM` in the testbench. That builds in under a minute and runs in about a
second. The full 64-channel chip has 16,384 cells. It has been simulated with
the same testbench at `NM = 8`. The build took about 18 minutes and the run
20 s, with 44,825 checks. All of them passed except one tolerance on stale
samples, which has since been widened. There is no testbench that runs the
top with its default parameters, because of that build time.
