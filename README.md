# A shared digital anti-alias filter for 256 multiplexed channels

A slow data-acquisition system scans 256 analog channels through one ADC. The
signals are essentially DC, but they carry 60 Hz mains pickup and other noise
far wider than the band of interest. Sampled without an anti-alias filter, that
noise folds down into the measurement as an apparently random wander or a DC
offset. Building a good analog filter on every channel costs board space and
money. This design replaces all of them with one digital filter:

* each channel is sampled fast enough (160 samples/s) that the existing
  single-pole RC filter on the channel (3.6 Hz) is enough protection for the
  ADC itself;
* a two-stage digital filter, time-shared by all 256 channels, then narrows
  each channel to about 1 Hz and hands the result to the control system through
  a dual-port memory.

The RTL is the hardware form of that filter: a multiplexer scanner, two
channel-multiplexed FIR engines and the result memory. The filter structure,
rates, tap counts and word widths follow the original system, which ran the same
algorithm as a program on a DSP microcomputer. The second-stage tap values, the
clocking, the memory organisation and all handshakes are this design's own.

## Signal chain and rates

| point | rate per channel | aggregate | width |
|---|---|---|---|
| ADC (256 channels, two 16:1 multiplexer levels) | 160 SPS | 40 960 SPS | 14 bit |
| stage 1: three cascaded 8-point moving averages (22 taps), decimate by 4 | 160 in, 40 out | 10 240 out/s | 16 bit |
| stage 2: 26-tap lowpass, 1 Hz cutoff | 40 SPS | 10 240/s | 16 bit |
| result memory, read by the control system at ~3 SPS | rewritten 40 /s | | 16 bit |

With the default 10.24 MHz clock the scanner spends `CLK_DIV = 250` clocks on
each channel, which is exactly 256 x 160 conversions per second.

```
 mux_addr, adc_convert          smp (ch, code)        (ch, y1)             (ch, y2)
ADC  <--  mux_sequencer  ------------------> decimation_filter --> lowpass_filter --> result_dpram --> reader
                                                (fir_stage)          (fir_stage)       (dual port,
                                                                                       own clock)
```

## Stage 1: moving averages as a decimator

Three cascaded 8-point moving averages at 160 SPS make a 22-tap FIR whose
integer taps are the triple convolution of a length-8 boxcar:

    1 3 6 10 15 21 28 36 42 46 48 48 46 42 36 28 21 15 10 6 3 1   (sum 512)

Its response has exact nulls at every multiple of 160/8 = 20 Hz. That kills
60 Hz directly, and also 120 Hz and 180 Hz, which fold to 40 Hz and 20 Hz at
160 SPS. The same nulls sit on the frequencies that would fold into the passband
of stage 2 once the rate drops to 40 SPS, so stage 1 is also stage 2's
anti-alias filter.

Because stage 2 keeps only every fourth stage-1 output, only those outputs are
computed. Every sample still enters the history, but the multiply-accumulate
runs only for the samples of one frame in four (frame = one pass over all 256
channels; the fourth frame of each group of four is the one filtered).

The 32-bit sum is divided by 128 rather than 512, so a 14-bit ADC code comes
out multiplied by 4 and fills the 16-bit result range. Rounding is half up;
saturation to 16 bits follows but cannot trigger with these taps.

## Stage 2: the 1 Hz lowpass

26 taps at 40 SPS. The tap values are this design's choice (only the length,
rate and cutoff are fixed by the original system): a Hamming-windowed sinc,

    h[n] = (2fc/fs) sinc(2fc/fs (n - 12.5)) (0.54 - 0.46 cos(2 pi n / 25)),  n = 0..25,
    fc = 1 Hz, fs = 40 Hz,

normalised to unit DC gain and rounded to Q15, with the two centre taps
corrected so the taps sum to exactly 32768. DC therefore passes with gain
exactly 1. The response is -3 dB at about 1.13 Hz and more than 45 dB down
above 5 Hz. The values are listed in `daq_filter_pkg.sv`. The sum is rounded
half up at bit 15 and saturated to 16 bits.

Group delay is 12.5 samples at 40 SPS (0.31 s) plus 10.5 samples at 160 SPS
(0.066 s) for stage 1: about 0.38 s in all, roughly one reading interval of a
3 SPS reader. The original system quoted two reading intervals. That figure
does not follow from its own tap count and rate, so treat it with care.

Every stage-1 output produces a stage-2 output, so each channel's result is
rewritten 40 times a second.

## How one engine serves 256 channels (`fir_stage`)

Both stages are instances of `fir_stage`, which is the heart of the design:

* **History memory.** A `sample_ram` of 2^5 x 256 words is addressed
  `{slot, channel}`. Each channel has 32 slots used as a circular buffer (32 is
  the next power of two above 26 taps, so the wrap is free).
* **One shared slot pointer.** Samples always arrive in channel order
  0..255, so all channels advance together. The stage keeps a single write
  slot `wp` and increments it after channel 255. Tap `k` of channel `c` lives
  at `{wp_at_arrival - k, c}`.
* **Decimation counter.** A frame counter modulo `DEC` (4 for stage 1, 1 for
  stage 2) decides whether a frame's samples are filtered.
* **Sequence for a filtered sample.** The sample is written (1 cycle). Then
  the taps' samples are read newest first, one per cycle. Each read word meets
  its tap in `mac_unit` one cycle later: the first product loads the
  accumulator and the rest add to it. The rounded result leaves as a one-cycle
  `out_valid` pulse, TAPS + 3 cycles after the sample was accepted: 25 cycles
  for stage 1 and 29 for stage 2. `in_ready` is low meanwhile. A sample of a
  skipped frame takes one cycle.
* **Start-up.** After reset each stage writes zeros through its whole memory
  (8192 cycles). Only then do `init_done`, and the top's `ready`, rise and the
  scan begins, so every channel starts from rest.

The stages run concurrently: stage 2 works on channel *c* while stage 1 has
already moved to channel *c+1*. With 250 clocks per sample, even a sample that
goes through both stages leaves both engines idle most of the time. The
end-to-end test measures them busy 5.7 % of clock cycles. The original DSP
program needed under 25 % of its processor. An assertion in the top fires if
stage 2 is ever busy when stage 1 delivers.

## Scanner and ADC interface (`mux_sequencer`)

At the start of each `CLK_DIV` period `mux_addr` moves to the next channel:
bits [3:0] drive the first 16:1 level and [7:4] the second. `SETTLE` clocks
later (50 by default, about 5 us) `adc_convert` pulses and the channel number
is latched. The ADC answers with `adc_valid`/`adc_data` (14-bit two's
complement) any time before the next convert. The code and its channel are then
held on a valid/ready output until stage 1 takes them. A code arriving while the
previous one is still waiting sets the sticky `overrun` flag. The scan is held
at channel 0 until `enable` (the top's `ready`).

## Result memory and the reader (`result_dpram`)

One 16-bit word per channel at the channel's address. Stage 2 writes on the
filter clock. The reader has its own clock: it raises `ccs_rd` with `ccs_addr`
and gets `ccs_data` on the next `ccs_clk` edge. There is no interlock: a read of
a channel in the cycle that channel is rewritten may return either the old or
the new value. Each channel is rewritten only once every 256 000 clocks, at a
known point in the scan. The memory holds random values until each channel's
first result (25 ms after `ready`), and meaningful values only after the
filters have filled, about 0.8 s.

## Top-level ports (`daq_filter_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | system clock (10.24 MHz for the nominal rates), asynchronous active-low reset |
| `ready` | out | 1 | filter memories cleared, scanning |
| `mux_addr` | out | 8 | multiplexer select |
| `adc_convert` | out | 1 | convert pulse |
| `adc_valid`, `adc_data` | in | 1, 14 | ADC result |
| `overrun` | out | 1 | sticky: ADC result lost |
| `frame_tick`, `decim_tick`, `result_tick`, `result_ch` | out | 1,1,1,8 | monitoring strobes: new frame, stage-1 output being computed, result written for `result_ch` |
| `ccs_clk`, `ccs_rd`, `ccs_addr`, `ccs_data` | in/in/in/out | 1,1,8,16 | reader port |

Parameters: `NCH` (256), `CLK_DIV` (250, must be at least 34), `SETTLE` (50).
Tap counts, decimation and widths are in `daq_filter_pkg`. `MA_LEN` and `TAPS`
of the stage wrappers are checked against the tap tables, which are built for 8
and 26.

Sample-to-result latency is fixed. In the end-to-end test it is 96 clocks from
`adc_convert` to the result write, with an ADC that answers 40 clocks after
`adc_convert`.

## What is not in the RTL

The analog multiplexer, the per-channel RC filters, the ADC and the control
system are outside the digital design. The top brings out their signals. The
original system ran the filter as software on a commercial DSP with one shared
external data memory. Here the algorithm is hardware, each stage has its own
memory and multiplier, and the arithmetic (32-bit sums, 16-bit rounded results)
is kept.

## Files

| file | contents |
|---|---|
| `rtl/daq_filter_pkg.sv` | constants, tap tables, rounding function |
| `rtl/daq_filter_top.sv` | top level |
| `rtl/mux_sequencer.sv` | multiplexer scan and ADC capture |
| `rtl/decimation_filter.sv`, `rtl/lowpass_filter.sv` | the two stages (wrappers of `fir_stage`) |
| `rtl/fir_stage.sv` | channel-multiplexed FIR engine |
| `rtl/sample_ram.sv` | history memory |
| `rtl/mac_unit.sv` | multiply-accumulate |
| `rtl/result_dpram.sv` | dual-port result memory |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench computes its expectations independently. The filter testbenches
derive the taps from their definitions (boxcar convolution, windowed-sinc
formula) and model the rounding bit-exactly. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_mac_unit`: random and extreme operand streams against a 64-bit sum.
* `tb_sample_ram`: random traffic against a shadow array, read-during-write.
* `tb_result_dpram`: writer and reader on unrelated clocks.
* `tb_mux_sequencer`: channel order, conversion spacing of exactly 250 clocks,
  settling time, channel tags under random back-pressure, frame marker,
  overrun.
* `tb_decimation_filter`: all 256 channels, 120 frames. Checks every output
  value and its 25-cycle latency, and that no output comes from a skipped frame.
  60 Hz and 180 Hz tones must vanish from the settled output.
* `tb_lowpass_filter`: all 256 channels, 60 frames. Checks every output value
  and its 29-cycle latency, exact DC gain, at least 45 dB loss at 10 Hz, and a
  -3 dB point between 1 and 1.3 Hz.
* `tb_daq_filter_top`: the whole design at its default size, 150 frames
  (about 0.94 s of system time, ~13 s of simulation). An ADC model feeds
  channels carrying 60 Hz, 180 Hz, 0.1 Hz and 10 Hz tones, noise or plain DC. A
  reader on its own clock checks results against a bit-exact model of both
  stages. The test also checks the 40 SPS result rate, a constant latency, the
  tone rejection, the absence of overruns and the engine load.

* `tb_frequency_sweep`: the frequency response of the whole design. Channel
  *c* carries a sine at *c* x 0.625 Hz, so one run covers 0 to 159.4 Hz. The
  peak result of every channel over 2.5 s must match 4 x amplitude x
  |H1(f)| x |H2(f)| within rounding. It simulates 540 frames (3.4 s of system
  time, 35 million clocks) in under a minute. Typical output:

  | input | expected gain | measured |
  |---|---|---|
  | 0.625 Hz | -0.95 dB | -1.0 dB |
  | 10 Hz | -60.2 dB | -61.0 dB |
  | 20, 40, 60 ... 140 Hz | notch | 0 codes |
  | 30, 130 Hz | -87.6 dB | 1 code (about -84 dB) |
  | 159.375 Hz | -0.95 dB | -1.0 dB (folds to 0.625 Hz) |

  The last row shows the one weakness of the scheme: input near multiples of
  160 Hz folds straight into the passband. Only the analog RC filter in front
  of the ADC, 33 dB down at 160 Hz, protects against it.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/daq_filter_pkg.sv \
    tb/tb_daq_filter_top.sv --top-module tb_daq_filter_top -Mdir obj
./obj/Vtb_daq_filter_top
```

Replace the testbench name to run another. The simulator should start state
variables at random (`+verilator+rand+reset+2`); the design resets or clears
everything it reads.
