# FADC250 Hall D firmware core

A 16-channel, 12-bit, 250 MS/s flash ADC board produces a sample per channel
every 4 ns. This core is the logic that turns that stream into three things:

* **trigger inputs**: one hit bit per channel and the channel amplitudes for
  a crate-level energy sum, with a mask that takes single channels out of the
  trigger;
* **pedestal monitoring**: 14-bit baseline sums for all 16 channels, computed
  continuously and read out together on demand, without a trigger;
* **compact event data**: after a readout trigger, each channel's readout
  window is reduced to a few numbers per pulse (integral, time, peak, time
  over threshold), plus the pedestal measured at the start of the window. The
  results go out as a stream of 32-bit words ("data type 9"). A debug mode
  adds the raw samples.

The design follows the changes that Hall D requested to the FADC250 pulse
processing firmware. Those changes have three aims: shorter trigger
processing, more monitoring, and smaller data. The requested changes are the
thresholds taken from ADC count 0, the 3-bit NSB with a sign bit, the
multi-sample threshold test, time over threshold, the new data type 9 and the
suppressed event headers. Several things this core needs are not covered by
those requests: the sample buffer, trigger handling, the pulse timing
algorithm, and the block header and trailer layouts. These are this
implementation's own choices. Each one is listed under
[Departures and own choices](#departures-and-own-choices).

## Data flow

```
adc[16] ──┬─► trig_input ──► hit[16] ──► hitbit_scaler ──► scaler[16]
          │        └───────► trig_amp[16]   (to an external energy sum)
          ├─► async_ped (16 x ped_sum) ──sync_event──► ped_word[16]
          └─► sample_ring[16] ──► pulse_proc[16] ──► event_builder ──► dout (valid/ready)
                      ▲   └────────── raw window (mode 10) ──┘
             trig ──► readout control in fadc250_hd_top (base = wptr - PL)
```

All logic runs on the sample clock. Each clock takes one sample per channel.

## The readout window and pulse finding

This is the most involved part (`pulse_proc`). Every channel writes its
samples into a 2048-entry circular buffer (`sample_ring`). The top accepts a
readout trigger only when no event is in flight. It then takes the buffer
address `wptr - PL` as the window start and starts all 16 pulse processors on
the same window of `PTW` samples. Each pulse processor reads the window one
sample per clock and works through these phases:

1. **Pedestal.** It sums the first `N_PED` samples (4 to 16). Each sample is
   clipped to 1023. The quality bit is set if any sample is above `A_MAX` or
   equals 0 (ADC underflow). The accumulator is the same one the asynchronous
   pedestal uses.
2. **Threshold search.** A pulse starts where `N_SAMP_THR+1` consecutive
   samples (1 to 4) are all strictly above the readout threshold `TET`. `TET`
   is compared with the raw ADC code, with no pedestal subtracted. The first
   of those samples is the *threshold sample* `t`. Requiring several samples
   suppresses single-sample noise spikes, so lower thresholds can be used.
3. **Timing.** The coarse time is `t`, the sample index in the window (9
   bits). The fine time (6 bits) is the crossing point of `TET` between
   samples `t-1` and `t`, interpolated linearly:
   `fine = floor(64*(TET - s[t-1]) / (s[t] - s[t-1]))`. It is 0, with time
   quality bit 0 set, when `t` is the first sample of the window.
4. **Integration.** The window runs from `t-NSB` to `t+NSA`. When `NSB_SIGN`
   is 1 it runs from `t+NSB` to `t+NSA` instead ("negative NSB": the integral
   starts *after* the threshold sample). It is cut at both ends of the readout
   window. Over these samples the processor forms:
   * the integral, 18 bits, saturating;
   * the time over threshold: the number of samples above `TET`, 9 bits;
   * the peak: the largest sample;
   * the quality flags.
5. **Next pulse.** The search continues after the integration window. It
   must first see a sample at or below `TET` before it can trigger again. It
   stops after `NP` pulses (at most 3) or at the end of the window.

Example: take `TET=150`, `N_SAMP_THR=1` (2 samples), `NSB=3`, `NSB_SIGN=0`,
`NSA=12`, and the samples `... 101, 260, 900, 1400, ...` at indices
`19, 20, 21, 22`. The threshold sample is `t=20`. The coarse time is 20 and
the fine time is `floor(64*(150-101)/(260-101)) = 19`. The integral covers
indices 17 to 32. A lone spike at index 40 with value 230 is not a pulse,
because index 41 is back at the baseline.

Processing takes one clock for the start, one clock per pedestal sample,
one clock per searched sample, and per pulse 2 clocks for the timing, one
per integrated sample and 1 to store the pulse. Samples inside an
integration window after the threshold test are not searched again. The
testbench checks this clock count exactly. A 60-sample window with
`N_PED=6` and one pulse integrated over 16 samples takes about 75 clocks.

## Two pedestals

* **Asynchronous** (`async_ped`): one shared counter splits time into
  back-to-back windows of `N_ASYNC_PED` samples. At each window boundary,
  all 16 sums are latched at the same time. `sync_event` (or a register read)
  copies them into `ped_word`. Bit 15 of `ped_word` is the quality bit, bit 14
  is 0, and bits 13..0 hold the sum. The trigger mask does not affect this
  path.
* **Per event**: the pedestal at the start of each readout window, reported
  in every hit header. It uses the same `A_MAX` and the same quality rule.

## Trigger inputs and the channel mask

`trig_input` compares every sample with the trigger threshold. The threshold
is either the common 12-bit `trig_thr` or, when `trig_indiv` is set, one
12-bit threshold per channel (`thr_ch`). The comparison uses the raw ADC
code. A channel with its `trig_mask` bit set produces no hit bit and a zero
amplitude. It therefore disappears from the trigger and from the hit-bit
scalers, but it is still read out and still monitored. `hitbit_scaler` counts
rising edges of each hit bit in 32-bit saturating counters.

The trigger energy sum itself is not part of this core. The specification
fixes its NSB to 3 samples but defines the algorithm elsewhere. `trig_amp`
carries its masked inputs.

## Output data stream

Words leave on `dout` with a valid/ready handshake. A word stays unchanged
until it is taken; an assertion in `event_builder` checks this. The event
layout, with optional parts in brackets:

```
[block header]                 first event of a block
[event header]                 every event, or only the first of a block if hdr_suppress=1
for channel 0..15:
   [raw header, raw data...]   mode 10 only, every channel
   [hit header                 only channels with >= 1 pulse
      integral word, time word   per pulse, up to 3]
[block trailer]                after block_level events
```

| word | bits |
|---|---|
| block header | 31=1, 30-27=0, 26-22 slot, 17-8 block number (from 1), 7-0 events per block |
| event header | 31=1, 30-27=2, 26-22 slot, 21-12 trigger time, 11-0 event number |
| event header, `hdr_ext=1` | 31=1, 30-27=2, 26 format extension bit, 25-22 data type, 21-12 trigger time, 11-0 event number |
| hit header (type 9) | 31=1, 30-27=9, 26-19 event number within block (from 1), 18-15 channel, 14 pedestal quality, 13-0 pedestal sum |
| integral | 31=0, 30=1, 29-12 integral, 11-9 quality (0 underflow, 1 overflow, 2 sum overflow), 8-0 time over threshold |
| time | 31=0, 30=0, 29-21 coarse time, 20-15 fine time, 14-3 peak, 2-0 quality (0 no fine time, 1 window cut, 2 peak overflow) |
| raw header (type 4) | 31=1, 30-27=4, 26-23 channel, 11-0 window length |
| raw data | 31-29=0, 28-16 sample n, 13 sample n+1 not valid, 12-0 sample n+1 |
| block trailer | 31=1, 30-27=1, 26-22 slot, 21-0 words in the block including header and trailer |

Event headers make up most of the data volume. With `hdr_suppress=1`, only
the first event of a block keeps its event header. That header is still
enough to check that modules in different slots are in step. The hit header
identifies the event inside the block. Data type code 11 is reserved for a
future format extension (`DT_EXTENSION` in `fadc_pkg`); no type 11 words are
produced.

## Registers (`fadc_cfg_t`)

| field | width | meaning |
|---|---|---|
| `trig_mask` | 16 | 1 = channel out of trigger and hit-bit scalers |
| `trig_thr`, `trig_indiv` (+ `thr_ch` port) | 12, 1 | trigger threshold(s), from ADC count 0 |
| `n_async_ped`, `n_ped` | 4, 4 | pedestal windows: code+1 samples, limited to 4..16 |
| `a_max` | 10 | pedestal amplitude limit |
| `nsb`, `nsb_sign` | 3, 1 | samples before (sign 0) or after (sign 1) the threshold sample |
| `nsa` | 9 | samples after the threshold sample |
| `tet` | 12 | readout threshold, from ADC count 0 |
| `nsamp_thr` | 2 | 0..3 = 1..4 consecutive samples over threshold |
| `np` | 2 | pulses per window, 1..3 (0 = 1) |
| `pl`, `ptw` | 11, 10 | trigger latency and window length in samples (window 1..512) |
| `mode10` | 1 | 0 = mode 9 (production), 1 = mode 10 (adds raw window) |
| `hdr_suppress`, `hdr_ext`, `hdr_ext_bit`, `hdr_dtype` | 1, 1, 1, 4 | event header options |
| `slot`, `block_level` | 5, 8 | slot number; events per block (0 = 256) |

The pulse processors capture the register set at the trigger. The event
builder uses it live. Change registers only while `busy` is low.

## Timing, throughput and limits

* One event is in flight at a time. A trigger that arrives while `busy` is
  high is refused and counted in `trig_lost`. Event numbers count accepted
  triggers from 1. The trigger time is the low 10 bits of a clock counter.
* The event builder writes one word per clock when `dout_ready` is high. It
  spends 2 extra clocks per channel, and 2 clocks per raw data word.
* The buffer is 2048 samples deep, about 8.2 us. A window must be fully read
  before it is overwritten. In mode 10 the raw readout alone takes at least
  `8*PTW` clocks, so keep `PL + 10*PTW` below 2048. For example, `PTW=512`
  works in mode 9 but not in mode 10.

## Departures and own choices

These points are not fixed by the specification this core implements:

* the circular sample buffer, its depth, and the one-event-at-a-time trigger
  handling with a lost-trigger counter;
* the pulse algorithms: the fine time (linear interpolation), the peak (the
  largest sample in the integration window), the rule for re-arming between
  pulses, and the meaning of the three time quality bits;
* ADC code 0 counts as underflow and 4095 as overflow;
* the block header and trailer layouts, and the raw window (type 4) layout;
* the hit header carries the event's position in the block, counted from 1.
  The specification names this field both "event number (trigger number)"
  and "relative event number in the block"; the relative number is used;
* the asynchronous pedestal uses back-to-back windows, and the 4-bit window
  code is taken as length-1;
* hit-bit scalers count rising edges, in 32 bits, with a synchronous clear;
* the earlier event header format (22-bit event number, no trigger time) is
  not offered. Only the new format and its data-type variant are.

Not in this core: the trigger energy sum algorithm (specified separately),
the VME register and block-readout interface, and any type 11 format.

## Files

`rtl/`: `fadc_pkg` (types, register struct, word packing), `ped_sum`,
`async_ped`, `trig_input`, `hitbit_scaler`, `sample_ring`, `pulse_proc`,
`event_builder`, `fadc250_hd_top`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. `tb/fadc_ref_pkg.sv`
holds a loop-based reference model of the window processing and the word
packing, used by the end-to-end test.

## Simulating

With Verilator 5, from the top folder:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fadc_pkg.sv tb/fadc_ref_pkg.sv tb/tb_fadc250_hd_top.sv \
    --top-module tb_fadc250_hd_top
./obj_dir/Vtb_fadc250_hd_top
```

Block tests build the same way, e.g. `rtl/fadc_pkg.sv tb/tb_pulse_proc.sv
--top-module tb_pulse_proc`. Each test prints `TB_RESULT checks=N failures=M`
and has a watchdog.

What the tests establish:

* `tb_pulse_proc` runs 600 random windows and compares every output field
  against the reference model. The configurations include all NSB, sign and
  threshold-sample settings and windows up to 512 samples. The windows
  contain spikes, underflows and overflows. It also checks the clock count.
* `tb_event_builder` compares every word under random back-pressure. It
  covers modes 9 and 10, suppressed and extended headers, and several block
  levels.
* `tb_fadc250_hd_top` runs the whole core at its default sizes for 40,000
  clocks of synthetic detector data. It checks:
  * every output word of about 50 events;
  * the hit bits on every clock and the scaler values;
  * the asynchronous pedestal readouts.

  It counts, and requires at least once each:
  * lost triggers, multi-pulse windows, negative NSB and rejected spikes;
  * suppressed headers, mode switches, mode 10 raw windows and block
    trailers;
  * back-pressure, pedestal quality bits, ADC overflow, masked channels,
    per-channel thresholds and 512-sample windows.
