# GdSP front-end DSP chain

A gas electron multiplier (GEM) detector channel gives a slow, irregular current
pulse. It is amplified, shaped in analog, and sampled by a 10-bit ADC at 40 MHz.
This RTL is the digital part that follows the ADC in a front-end ASIC for such
detectors (the GdSP concept for the CMS GEM upgrade). For every channel and
every clock it does four things:

1. it removes the baseline, either a fixed pedestal or one that it measures
   itself while it keeps pulses out of the measurement;
2. it optionally reshapes and smooths the pulse;
3. it gives a **one-clock trigger** on each pulse at a fixed fraction of the
   pulse height. This is a digital constant fraction discriminator (CFD), so
   the trigger lands in the right bunch crossing whatever the pulse height;
4. it **flags the samples worth reading out** (zero suppression).

The core holds 128 identical channels (64 is the other size in mind). They
share one set of settings and one 10-bit time counter. Each channel also has a
per-channel noise level that raises all of its thresholds.

```
          +----------------- baseline correction ----------------+
 din  --->| BC1: pedestal / SRAM modes --> BC2: moving average   |--> shaper --> integrator --+--> CFD --> trigg, amplitude
 10 bit   |   (Control[5] on/off)          (Control[6] on/off)   |    (3 pole-   (off, 2 or   |
          +------------------------------------------------------+     zero)      4 samples)  +--> ZS  --> delayed data, flag

 tracker mode : pulse = CFD amplitude,   flag = CFD trigger
 waveform mode: pulse = ZS delayed data, flag = ZS flag          (trigg is the CFD trigger in both)
```

All data inside the chain is 13-bit two's complement. Every block accepts one
sample per clock and never stalls.

| stage | latency (clocks) | can be bypassed |
|---|---|---|
| BC1 | 2 | yes, Control[5]=0 (removes its 2 clocks) |
| BC2 | 1 | yes, Control[6]=0 (removes its clock) |
| digital shaper | 1 | yes, `sel_filt`=0 (the clock stays) |
| integrator | 1 | `taps`=00 passes the sample through |
| CFD | 2 | — |
| zero suppression | 12 | — |

With both baseline stages in, the trigger for a pulse whose CFD condition is
met at ADC sample n comes out 7 clocks after that sample entered `din`. The
baseline stages are bypassed around their registers, so switching them off
shortens the chain. The shaper and integrator keep their output register when
off, so the trigger latency depends only on Control[6:5].

## Baseline correction

### BC1: fixed pedestal and a 1024-word SRAM

BC1 computes `dout = signal - baseline`, with both operands unsigned 10-bit.
Control[4:0] selects the source of each operand and the SRAM address:

| bit | meaning when set |
|---|---|
| 0 | signal is the SRAM output (otherwise the ADC sample) |
| 1 | SRAM address is the time counter |
| 2 | SRAM address is the ADC sample (look-up table) |
| 3 | together with bits 2:1 = 01: record the ADC sample at the time address |
| 4 | baseline is the fixed pedestal `fpd` (otherwise the SRAM output) |

If bits 2:1 are 00, the SRAM belongs to the register interface. `add`,
`sram_data`, `wr` and `rd` then write and read it. The core's `sram_ch` input
picks the channel whose SRAM is accessed, and `sram_rdata` returns the read word.

The useful settings are:

| Control[4:0] | use |
|---|---|
| `1xxx0` | subtract the fixed pedestal |
| `1x011` | test mode: play back a waveform stored in the SRAM (address = time), minus pedestal |
| `1x1x1` | SRAM as a look-up table on the input, minus pedestal |
| `0x010` | subtract a periodic disturbance stored in SRAM, addressed by time |
| `0x1x0` | subtract a baseline looked up from the input |
| `x101x` | record the input into the SRAM, addressed by time |
| `x000x` | write/read the SRAM through the registers |

The ADC sample is delayed one clock to meet the synchronous SRAM read, and the
difference is registered. That gives the latency of 2.

### BC2: moving average with a double threshold

BC2 subtracts a self-measured baseline: the average of the last 2, 4 or 8
samples that went into the moving-average unit (`taps_en` = 00, 01/10 or 11).
Without further care, a pulse would go into that average and leave an undershoot
behind it. So BC2 **freezes** the average while the signal is away from the
baseline:

* A sample is *out* when `din - bsl > thrsh_b2h + noise_ch` or
  `bsl - din > thrsh_b2l + noise_ch`.
* The average is fed with the input delayed by `edges[1:0]` clocks (0–3). When
  a pulse crosses the threshold, its first samples are still in that delay line
  and never enter the average.
* After the signal comes back inside, the average stays frozen for
  `edges[1:0] + edges[5:2]` more clocks. `edges[5:2]` is the post-mask (0–15):
  the tail of the pulse stays out.
* With `glitch` = 1, an excursion of only one or two clocks gets no post-mask.
  Noise spikes then cost little and cannot keep the average frozen.
* After either reset, the double-threshold scheme stays off until two things
  have happened. First, `latency` clocks have passed, so the average has filled.
  Then `flat` clocks in a row have been inside the thresholds, so there is no
  pulse present.
* `thr_override` = 1 turns the scheme off: the average then runs freely.

The known weakness of any double-threshold scheme is this: if the true baseline
moves by more than a threshold while the average is frozen, the average stays
frozen for good. `ma_rst_b` is a soft reset of the moving-average unit alone,
meant for use during data taking. It clears the average, the input delay line and the
post-mask, and it re-arms the latency and flat-beat counters. The data
registers of the chain are left alone.
`bsl_frozen` shows the freeze per channel.

## Digital shaper

The shaper is three first-order pole-zero sections in cascade:

```
H(z) = prod_i (1 - L_i z^-1) / (1 - K_i z^-1),    K_i = k_i / 2^13,  L_i = l_i / 2^13
```

Each section is in transposed direct form: `y = x + c`, with the state
`c <= K*y - L*x`. A multiplier forms the full product of the unsigned 13-bit
coefficient and the signed sample. It then drops the 13 low bits, which is
`floor(coef*sample / 2^13)`. The coefficients therefore cover [0, 1) in steps of
2^-13. Raising a pole shortens the tail; raising a zero lengthens the peaking
time. The sections wrap in 13 bits, so coefficients that overflow them are
the user's responsibility. The filter output is registered.

## Integrator

This stage smooths noise near the sampling frequency, which otherwise makes the
CFD fire early or twice. It outputs the input itself (`taps` = 00), the mean of
the last 2 samples (01 or 10), or the mean of the last 4 (11). The division is a
plain right shift of a sum that is two bits wider than the data.

## Constant fraction discriminator

On the rising edge of a pulse, the ratio of two consecutive samples
`x[n] / x[n-1]` starts large and falls to 1 at the peak. The CFD fires where it
has fallen to `a`:

```
slope  = x[n] <= (a * x[n-1]) >> 3          a: unsigned 4.3 fixed point, 0 .. 15.875
above  = x[n] >  thrsh + noise_ch
raw    = slope & above
```

A fixed ratio between two samples is a fixed fraction of the pulse height, so
the trigger does not walk with amplitude. The best `a` depends on the analog
shaping time:

| shaping time | a | nearest code | integrator |
|---|---|---|---|
| 25 ns | 4.43 | 35 (4.375) | 1st order (`taps`=01) |
| 50 ns | 3.98 | 32 (4.0) | 1st order |
| 100 ns | 2.86 | 23 (2.875) | 2nd order (`taps`=11) |
| 250 ns | 1.60 | 13 (1.625) | 2nd order |
| 500 ns | 1.27 | 10 (1.25) | 2nd order |

Noise can chop `raw` into pieces around a threshold crossing. A hold counter
therefore keeps the flag up for `merge` (0–3) clocks after `raw` drops. The
trigger is the one-clock rising edge of the held flag, and a gap of up to `merge`
clocks does not give a second trigger. Together with the trigger, `amplitude`
gives the current sample clipped to 0..1023 (zero otherwise). This is a rough
measure of the pulse height, not a calibrated amplitude.

## Zero suppression

The zero suppression passes the data through unchanged but delayed. Next to it, a
flag marks what to read out. The sample plus `offset`, clipped to 0..1023,
is the 10-bit output. The flag is built in four pipelined steps:

1. **threshold**: the sample (with offset) is above `thrd + noise_ch`;
2. **glitch filter**: a run above threshold counts only once it is at least
   `seq_mask + 1` samples long (1–4);
3. **pre-samples**: up to `premask` (0–3) samples ahead of the run are flagged;
   **post-samples**: `postmask` (0–7) samples after it are flagged;
4. **merger**: gaps of one or two unflagged samples between two flagged regions
   are filled, so they read out as one cluster.

The data delay (12 clocks) matches the flag pipeline, so flag and data line up
at the outputs.

## Reset

`rst_b` is the common active-low reset. It is synchronous and clears every
register in the chain to zero; the SRAM contents are kept. `ma_rst_b` is
described under BC2. The time counter restarts from zero with `rst_b`.

## Choices where the source design is open

The chain follows the published description of the GdSP DSP chain: its
blocks, register variables and widths, option encodings, and the structure
of the shaper, the integrator and the zero-suppression pipelines. Where that
description gives only what a block does, the RTL fills in the rest. The
following are this design's own:

* the order BC → shaper → integrator → {CFD, ZS};
* Control[5] and Control[6] as the BC1/BC2 enables;
* the bit meanings of Control[4:0], derived from the list of useful settings;
* the split of `edges` into a pre-sample part ([1:0]) and a post-mask part ([5:2]);
* the glitch option only cancels the post-mask. The short excursion itself is
  still kept out of the average;
* `ma_rst_b` also re-arms the latency and flat-beat counters;
* the CFD merge as a hold counter, and the sample used for the amplitude;
* the internal arrangement of the pre-sample logic in the zero suppression;
* saturation of the 13-bit chain data to the 11-bit zero-suppression input;
* synchronous reset, registered block outputs and the resulting latencies;
* all register variables shared by all channels, a one-bit `mode`, and
  `sram_ch` to choose which channel's SRAM the registers reach.

Not included: the ADC and analog front end, the memory that holds Pulse/Flag
for the trigger latency, the data formatter, the serial link to the readout,
and the configuration register interface itself (the settings are plain input
ports, gathered in the `dsp_cfg_t` struct).

## Files

| file | content |
|---|---|
| `rtl/gdsp_pkg.sv` | widths, latencies, `dsp_mode_e`, the settings struct `dsp_cfg_t` |
| `rtl/dsp_core.sv` | top: `NCH` channels (default 128), time counter, SRAM channel select |
| `rtl/dsp_channel.sv` | one channel, mode multiplexer |
| `rtl/baseline_correction.sv`, `bc1.sv`, `bc1_sram.sv`, `bc2.sv`, `mau.sv` | baseline correction |
| `rtl/digital_shaper.sv`, `pz_filter.sv`, `ds_mult.sv` | shaper |
| `rtl/integrator.sv`, `cfd.sv`, `zero_suppression.sv` | integrator, CFD, zero suppression |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cfd_workloads.sv` | CFD settings for five shaping times through a full channel |

## Simulation

Each testbench compares the block against a model written in the testbench,
checks the latencies, and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/gdsp_pkg.sv tb/tb_dsp_core.sv --top-module tb_dsp_core
./obj_dir/Vtb_dsp_core
```

`tb_dsp_core` runs the full 128-channel core at its default size. Each channel
has its own pedestal and pulse height, plus noise. The test goes through:

* tracker mode (every pulse gives exactly one trigger, 7 clocks after its
  70 % sample, carrying that sample as amplitude);
* a moving-average reset between bursts;
* waveform mode (one cluster per pulse, peaking at the pulse height);
* a full SRAM write and read-back of one channel through the registers;
* test-mode playback of a stored pulse, which must trigger once per turn of the
  time counter, at a fixed time.

It counts each of these mechanisms, and also the baseline freezes. A mechanism
that never happened counts as a failure. `tb_dsp_channel` does the same for a
single channel, including shaper and integrator settings.

`tb_cfd_workloads` runs the five CFD settings of the table above through a full
channel. Each setting gets CR-RC^4 pulses of three heights, with a peaking time
equal to the shaping time. The test checks each trigger against a model and
checks that the trigger time does not depend on the pulse height.
