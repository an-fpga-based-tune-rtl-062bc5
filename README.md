# FPGA tune measurement for a ramped electron synchrotron

The betatron tune of a booster synchrotron drifts while the energy ramps (325 MeV to
7 GeV in 226 ms for the APS booster), and that drift costs injection efficiency. This
firmware measures the horizontal and vertical tune many times per ramp. A stripline
pinger kicks the beam at programmed moments. After each kick the firmware takes one
position sample per turn in each plane, runs an FFT over 1024 turns, converts the bins
to magnitudes and finds the strongest line inside a tune window. A three-point
parabolic fit refines the line's position to a fraction of a bin. One ramp yields, per
plane, up to 128 tunes and 128 spectra. A processor reads them out as waveforms.

Everything is SystemVerilog-2017 and synthesizable. Simulation needs Verilator 5
only.

## Signal path

```
 ADC A ─┐            ┌─ channel A' ─ sampler ─ turn record ─ DC/window ─ FFT ─ |X|,φ ─ peak ─ tune
        ├ crosspoint ┤                              │                          │        │
 ADC B ─┘            └─ channel B' ─ (same)        turn history          waterfall  tune record
 events ─ event_receiver ─ pinger_driver ─ ping_out (to the external pulse generator)
                       └─ adc_recorder (raw A, B and the sampling-instant flag)
 processor bus ─ coldfire_if (registers, commands, status, all memories)
```

| module | role |
|---|---|
| `tune_top` | top level; wires the blocks below |
| `tune_pkg` | shared widths, event numbers, register structs, region numbers |
| `crosspoint` | routes ADC A or B to each of the channels A' and B' |
| `tune_channel` | one complete measurement chain |
| `turn_sampler` | one averaged sample per turn at a programmable bucket delay |
| `tbt_recorder` | stores the turns of one ping, replays them with their mean |
| `dc_window` | removes the mean and applies a Hann window |
| `fft_core` | 1024-point radix-2 FFT, in place |
| `cordic_magphase` | magnitude and phase of each bin |
| `peak_detect` | peak search in a tune window plus parabolic interpolation |
| `seq_divider` | radix-2 restoring divider used by `peak_detect` |
| `waterfall_recorder` | spectrum of every ping (128 × 512 words per channel) |
| `tune_recorder` | tune of every ping |
| `event_receiver` | machine events, pinger start delay, 0.1 µs time base |
| `pinger_driver` | ping table and trigger output |
| `adc_recorder` | 1024-sample raw ADC capture for timing set-up |
| `coldfire_if` | processor bus, register map, memory readout |

## Clocking and the turn

The design runs on a single clock: the ADC sample clock. This clock is assumed to be
the RF divided by three, 117.31 MHz. The booster has 432 RF buckets, so one turn
(1.228 µs) is 144 clocks. Turns are defined by `p0`, a one-clock revolution marker. No
clock ratio is built into the logic. A machine with another turn length only needs
`p0` at its own revolution rate. `CLK_HZ` in `tune_pkg` matters only for the 0.1 µs
time base.

The operator gives the sampling delay in RF buckets. Each clock advances three
buckets. `turn_sampler` takes the first sample whose bucket position reaches the delay,
so the default of 201 buckets is sample 67 after the marker. It then adds 0 to 15
"extra" samples that follow (default 3) and divides by the count. The division is a
multiplication by ⌊2¹⁶/n⌋. The result is 16 bits with two fraction bits
(4 × ADC counts). `sample_instant` marks the first sample. The raw-ADC recorder stores
that mark next to the waveform, so the operator can see where the sampling point falls
on the beam pulse.

## Pings and events

`event_receiver` takes an already decoded event number (`ev_valid`, `ev_code`). It
recognises 2 (linac trigger, for the accumulator ring), 46 (booster injection) and 47
(storage-ring injection). Each event has its own enable for starting the pinger and
for triggering the ADC recorder. An enabled event starts a delay counted in 0.1 µs
ticks (default 300.0 µs) and then starts the ping sequence. A phase accumulator
produces the ticks, so they are exact on average for any clock frequency. A new event
during the delay restarts it.

`pinger_driver` holds a 128-entry table. Each word is `{offset[31:16],
interval[15:0]}`:

* `interval`: turns from the previous ping (from the start, for entry 0).
* `offset`: clocks from the revolution marker to the trigger.

Moving the trigger against the bunch is how the kick strength follows the beam energy:
the half-sine pulse (about 600 ns) is comparable to the turn. The trigger goes out
`offset + 1` clocks after the marker and lasts 8 clocks. The external pulse generator
and pulser form the real waveform. `ping_strobe` and `ping_idx` tell both channels that
ping *k* happened. Switching the pinger off suppresses only `ping_out`. The sequence,
strobes and records keep running, so the background spectrum can still be recorded.
A soft ping fires once on the next turn, with the offset of entry 0. `NPINGS`
(register 0x0A) can shorten the sequence. The table is a plain RAM with no reset, so
the host must write every entry the sequence will use.

## One measurement: from a ping to a tune

Per channel, in order:

1. **Turn record** (`tbt_recorder`). After a ping it skips `ping_to_fft` turns
   (default 50). This lets the pinger transient pass. It then stores N = 1024
   per-turn samples and their sum. A ping that arrives while a record is in progress
   is ignored and counted in `overruns`. When the FFT is free, the record is replayed
   at one sample per clock, together with its mean (sum / N). The record stays in
   memory as the turn history of the latest ping.
2. **DC removal and window** (`dc_window`). `y = ((x − mean) · w[n]) >>> 16`, where
   w is a periodic Hann window (w[n] = ½ − ½ cos 2πn/N) in 17 bits. The table is
   computed at elaboration, so there is no data file. Without the mean subtraction,
   the closed-orbit offset leaks into the lowest bins. The window keeps the leakage
   of a strong line low enough for the peak fit.
3. **FFT** (`fft_core`). Radix-2 decimation in time with one butterfly per clock.
   The memory holds 1024 complex 32-bit words. Samples are loaded in bit-reversed
   order, as they arrive. Twiddles are Q16 and come from a table computed at
   elaboration. There is no scaling: 18-bit inputs grow by at most 10 bits, so 32
   bits cannot overflow. A transform takes `log2(N)·N/2` = 5120 clocks (44 µs).
   Bins 0..N/2−1 are then streamed out.
4. **Magnitude** (`cordic_magphase`). A 16-stage pipelined vectoring CORDIC with 5
   guard bits. The CORDIC gain is removed by multiplying by 0.6073 (39797/2¹⁶). The
   phase is also produced but is not used further.
5. **Peak search** (`peak_detect`). The channel's two range limits are tunes in units
   of 2⁻¹⁶. They may be given in either order. They are converted to a bin range,
   inclusive. While the spectrum streams past, the block keeps the largest bin in
   the range with its two neighbours m₋, m₀, m₊. The fractional offset is
   `δ = (m₊ − m₋) / (2·(2m₀ − m₋ − m₊))`, clamped to ±½. It is computed by a
   sequential divider (49 clocks). The tune is `(k + δ)/N`, output as a 16-bit
   fraction of the revolution frequency, together with `found`. `found` is low when
   the range held no bin.
6. **Records**. `waterfall_recorder` stores every bin's magnitude (>> 8, saturated
   to 16 bits) at address `{ping, bin}`. `tune_recorder` stores `{found, 15'b0,
   tune}` at address `ping`. The latest tune also goes to the top-level ports
   `tune_valid_x / tune_x / tune_found_x` for a fast link.

Timing per ping: 1074 turns of recording (1.32 ms), then 1024 clocks of replay. The
FFT, CORDIC and peak search follow in about 5 700 clocks (49 µs). The channel can
therefore accept a ping every 1.33 ms, faster than the shortest specified ping interval
of 1.5 ms. Bin spacing is 1/1024 ≈ 0.00098 in tune. On clean simulated signals, the
interpolation error is well under 0.001.

## Processor interface

`coldfire_if` serves a synchronous word bus. A read returns data one clock after `cs`,
with `rvalid`. Address bits [19:16] select the region:

| region | content | address bits used |
|---|---|---|
| 0 | registers | [7:0] |
| 1 | ping table (read/write) | [6:0] |
| 2 | raw ADC record `{flag, 3'b0, B[13:0], A[13:0]}` | [9:0] |
| 3 / 4 | turn history A' / B' | [9:0] |
| 5 / 6 | tune records A' / B' | [6:0] |
| 7 / 8 | spectra A' / B' `{ping, bin}` | [15:0] |

Registers (reset values are the operating values of the original system):

| addr | name | content |
|---|---|---|
| 0x00 | CTRL | [0] pinger on, [1] ADC auto restart, [3:2] ADC trigger 0 soft / 1 event / 2 ping, [4] A' takes ADC B, [5] B' takes ADC A |
| 0x01 | CMD | pulses: [0] soft ping, [1] arm, [2] disarm, [3] soft ADC trigger |
| 0x02 | EXTRA | extra samples per turn (3) |
| 0x03 | ADC_DELAY | sampling delay, buckets (201) |
| 0x04 | PING_FFT | turns from ping to record (50) |
| 0x05 | RANGE_A | [15:0] start, [31:16] end (0.33, 0.40) |
| 0x06 | RANGE_B | [15:0] start, [31:16] end (0.1271, 0.30) |
| 0x07 | EVENTS | [2:0] pinger enables, [6:4] ADC-recorder enables (events 2, 46, 47) |
| 0x08 | PING_DLY | event to first ping, 0.1 µs (3000) |
| 0x09 | ADC_DLY | trigger to ADC record, 0.1 µs (3000) |
| 0x0A | NPINGS | pings per sequence, 0 = 128 |
| 0x10 | STATUS | [0] pinger busy, [1] armed, [2] recording, [3] ADC done, [4]/[5] A'/B' record busy |
| 0x11–0x15 | | ADC records, overruns, tune count, last tunes, spectra count (A' low half, B' high half) |

The raw-ADC recorder can be armed once or with auto-restart. It fires on a soft
command, an enabled event or a ping, waits its delay and records 1024 samples of
both ADCs.

## Parameters and resources

| parameter | default | meaning |
|---|---|---|
| `N` | 1024 | turns per FFT |
| `NPINGS` | 128 | pings per ramp, records per plane |
| `ADC_DEPTH` | 1024 | raw ADC record |
| `ADC_W` (package) | 14 | ADC word |

N = 1024 is the largest power of two that fits in the shortest ping interval. Halving
it doubles the bin width, and tune resolution then rests on the interpolation alone.
All blocks take N as a parameter. At the defaults the top holds about 2.4 Mbit of
memory, mostly the two waterfalls (2 × 128 × 512 × 16 bits). This suits a
Stratix II EP2S60-class device.

## How far it follows the original system

Taken from the original description:

* the block structure (sampler, turn-by-turn recorder, DC removal and windowing, FFT,
  I/Q to magnitude/phase, peak detect, waterfall, tune and ADC recorders, event
  receiver, pinger driver, processor interface);
* two channels with an A/B crosspoint;
* start and end tune per channel;
* the programmable ping intervals and timing;
* the event numbers, delays and default settings;
* FFT followed by parabolic interpolation;
* 128 pings per ramp;
* the 1024-sample raw record.

This design's own choices:

* the clock (RF/3) and how bucket delays map onto it;
* N, the Hann window, all fixed-point formats and the FFT architecture;
* the CORDIC;
* the skipped-ping rule;
* the bus protocol and the address map;
* the ping table format;
* the 8-clock trigger width.

Departures and gaps:

* **Diagnostic tone generator**: the original firmware has one, but nothing is known
  of its function. It is not built.
* **Serial tune stream**: planned in the original for fast tune correction, and not
  specified there. The firmware only provides the latest tune as parallel ports with
  a strobe.
* **x / y / sum selection** happens in the analog front end. Any of these signals can
  be fed to either ADC. For the synchrotron tune on the sum signal, set a low tune
  range.
* **Clock from the 44 MHz reference**: the ADC clock is taken as given. No PLL is
  included.
* **Event link**: only decoded event numbers are accepted. The serial event-link
  decoder is outside this design.
* **Turn-by-turn memory**: in the original block diagram the turn-by-turn recorder
  is a side tap of the sampler. Here the same memory is also the FFT input buffer,
  which saves a second 1024-word buffer per channel.
* **Phase output**: the CORDIC phase has no consumer.
* **Active bucket**: the original operator screen shows an "active bucket" readout
  whose source is not described. There is no such register here.
* **Ping interval**: the text gives 1.5–10 ms and the pulser table 1.5–20 ms. The
  16-bit interval field covers up to 80 ms.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each compares against
values computed independently in the testbench, such as a direct DFT, a
floating-point window, a CORDIC-free magnitude or an analytic tune. Each ends with
`TB_RESULT checks=… failures=…` and has a cycle watchdog. Example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb --top-module tb_tune_top \
          rtl/tune_pkg.sv tb/tb_tune_top.sv
./obj_dir/Vtb_tune_top
```

`tb_tune_top` runs the whole firmware at its default sizes, with no parameter
overrides, through one ramp of four pings. It takes about 10 s. It programs the
registers and the ping table over the bus, sends a booster-injection event, and
generates beam signals whose tune changes from ping to ping. The signals contain a DC
offset, a stronger line outside the search window and noise. The beam signal is
present for four samples around the sampling point of each turn. The test checks:

* the event-to-ping delay;
* the ping offsets;
* one skipped ping (overrun);
* the crosspoint swap;
* that the range excludes a stronger line;
* the sampling-instant flags in the raw record;
* DC removal;
* the ping-to-tune latency;
* every tune to within 0.001.

`tb_tune_ramp` runs a complete ramp of 128 pings with the tune drifting from ping to
ping. It uses a 64-turn FFT, which is the only parameter it changes. It checks:

* the ping spacing, including the per-ping timing offset;
* that no ping is skipped;
* all 128 tunes and 128 spectra of each plane, read back over the bus.

`tb_tune_sr` sets the firmware up for a storage ring:

* 1296 buckets, 432 clocks per turn;
* the pinger started by event 47 only;
* the sampling point at bucket 600;
* new search ranges.

It checks that a booster event is ignored, and it checks every tune.

`tb_fft_core` checks all 512 output bins of a full 1024-point transform against a
direct DFT. The other testbenches use smaller N to keep runs short.
