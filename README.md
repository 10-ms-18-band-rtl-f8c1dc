# 18-band quasi-ANSI 1/3-octave filter bank for hearing aids

A hearing aid amplifies each frequency region by a different amount, so the
microphone signal first has to be split into bands. ANSI S1.11 defines the
1/3-octave bands that audiologists fit against, but an exact ANSI filter bank
is expensive and slow (tens of milliseconds of delay). This design splits
24 kHz, 16-bit audio into 18 bands with centre frequencies from about 160 Hz
to 8 kHz, using filters whose specification is slightly relaxed ("quasi-ANSI")
so that the whole analysis-plus-synthesis chain has 240 samples (10 ms) of
linear-phase delay and needs only about 211 multiplications per input sample
for the analysis side.

It contains

* an **analysis filter bank** (`afb_top`) built from 14 linear-phase FIR
  sub-filters arranged as a multirate interpolated-FIR (IFIR) pyramid, run on
  8 multipliers at 33 clocks per input sample (792 kHz clock);
* a **synthesis filter bank** (`sfb`) that adds the bands back together,
  interpolating the slower bands back to 24 kHz and equalising path delays;
* a top level (`qansi_fb_top`) that connects the two and brings the 18 band
  streams out and back in, so that per-band gain or dynamic range compression
  (not part of this RTL) can sit between them.

The filter coefficients are not part of the RTL: they are loaded through a
write port after reset (see *Coefficient memory*).

## The multirate IFIR structure

The 18 bands are six octaves of three 1/3-octave bands each. Only the top
octave is filtered at the full rate. The same three prototype filters
H18, H17, H16 (27, 33, 41 taps) that cut the three top-octave bands out of
the 24 kHz signal cut the next octave down out of a copy of the signal that
was low-pass filtered and decimated by 2, and the octave below that out of a
copy decimated by 4. The remaining nine low bands are produced from the
fs/4 signal by nine more filters H9..H1.

| delay line | rate | words | filters run on it | produces |
|---|---|---|---|---|
| 1 | 24 kHz | 49 | IA1 (35 taps), IA2 (49 taps), H18, H17, H16 | bands 18, 17, 16 (8, 6.3, 5 kHz); input for lines 2 and 3 |
| 2 | 12 kHz | 41 | H18, H17, H16 | bands 15, 14, 13 (4, 3.15, 2.5 kHz) |
| 3 | 6 kHz  | 97 | H18, H17, H16, H9 (67), H8 (83), H7 (95), H6..H1 (97 each) | bands 12..1 (2 kHz .. 160 Hz) |

IA1 is the anti-alias filter for the decimation by 2 and runs on every second
input sample; IA2 is the one for decimation by 4 and runs on every fourth
sample. Both read line 1. Their results are shifted into lines 2 and 3.
This is a recursive pyramid schedule: sample phase 0 runs IA1, IA2 and the
three top-octave filters, phase 2 runs IA1 and the top octave, and odd
phases run only the top octave.

### Equal delay inside a delay line

All filters are symmetric with an odd number of taps, so a filter of N taps
delays by (N-1)/2 samples. Filters that share a delay line are made to delay
equally by letting a shorter filter read a window that is centred in the
window of the longest one. On lines 1 and 2 the band filters are centred on
the 41-tap H16: H18 starts reading 7 words into the line and H17 4 words.
On line 3 they are centred on the 97-tap H1..H6: H18 starts at word 35, H17
at 32, H16 at 28, H9 at 15, H8 at 7, H7 at 1. IA1 and IA2 start at word 0.
This costs nothing but an address offset. The resulting band delays, in
24 kHz samples, are

* bands 16..18: 20;
* bands 13..15: 17 (IA1) + 2 x 20 = 57;
* bands 1..12: 24 (IA2) + 4 x 48 = 216 (9 ms).

The synthesis bank equalises these three to 240 samples in total.

## Schedule and cycle budget

Each delay line has its own set of multipliers: 3 for line 1, 1 for line 2,
4 for line 3. Every multiplier handles one symmetric pair of samples per
clock, (x[i] + x[N-1-i]) * c[i], so a filter of N taps takes
ceil(((N+1)/2) / NMAC) clocks. The jobs of a line run back to back:

| line | MACs | jobs | clocks per run | runs every | budget |
|---|---|---|---|---|---|
| 1 | 3 | IA1 6, IA2 9, H18 5, H17 6, H16 7 | 33 / 24 / 18 (phase 0 / 2 / odd) | sample | 33 |
| 2 | 1 | H18 14, H17 17, H16 21 | 52 | 2 samples | 66 |
| 3 | 4 | H18 4, H17 5, H16 6, H9 9, H8 11, H7 12, H6..H1 13 each | 125 | 4 samples | 132 |

So one input sample every 33 clocks is sustainable, which gives the 792 kHz
clock for 24 kHz audio. In line 1 the IA jobs run first, so their results are
ready (and shifted into line 2 or 3) long before the next input sample
arrives; lines 2 and 3 start the clock after their new sample is shifted in
and are always finished before their next sample arrives.

Job order within a line: line 1 IA1, IA2, H18, H17, H16; line 2 H18, H17,
H16; line 3 H18, H17, H16, H9, H8, ..., H1. The last job of each line is
therefore band 16, 13 and 1; the synthesis bank relies on this.

## Analysis bank modules

The analysis bank is three modules, as in the architecture it is based on:

* **`afb_sys_ctrl`**, the system controller. It registers the input sample,
  keeps the two-bit sample phase and decides which line-1 jobs run. It
  drives a single write bus into the delay lines: `data` plus a one-hot
  `in_oct` that says which line shifts the word in on the next clock. The
  IA1/IA2 results come back from the filter engine and go out on the same
  bus. `do_oct` shows which lines are busy. It holds three `afb_seq`
  sequencers, one per line. Each sequencer turns the job list of its line
  into one step word per clock: valid, first/last flags, filter, step index,
  destination (band number, or "into line 2/3") and tap offset.
* **`afb_reg`**, the register module. It holds the three delay lines
  (`afb_delay_line`, plain shift registers with x[0] the newest sample) and
  the coefficient memory (`afb_coef_mem`). From each line's step word it
  forms the coefficient addresses and picks the sample pairs x[off+i] and
  x[off+N-1-i] for every multiplier; the centre tap gets 0 as its partner.
* **`afb_filter`**, the filter engine. It holds three `afb_mac_set`
  instances (3, 1 and 4 multipliers). A MAC set adds the pre-added pairs
  times coefficients into a 40-bit accumulator, which is cleared by the
  first step of a job. On the last step the result is rounded and clipped to
  16 bits. The filter engine then writes it into the band's output register
  and pulses that band's `out_valid` bit, or returns it to the controller
  when it is an IA1/IA2 result.

### Timing of `afb_top`

* `in_valid` with `data_in` is taken at clock edge t. Line 1 shifts at t+1
  and its first step is issued in the next clock.
* `in_valid` must be at least 33 clocks apart. An assertion checks this.
  Longer gaps are fine.
* Band 16, the last line-1 job, is updated 36, 21, 27 or 21 clocks after t
  for sample phases 0, 1, 2 and 3. Bands 13..15 and 1..12 follow later, when
  their lines finish. Each band has its own `out_valid` bit, pulsed for one
  clock when `data_out[b]` changes.
* `sat` pulses when a filter result had to be clipped.

## Number formats and rounding

Samples and coefficients are 16-bit two's complement with 15 fraction bits
(Q1.15). The two samples of a pair are added first (17 bits), then
multiplied (33 bits). The products are accumulated in 40 bits, which cannot
overflow for a 49-term sum. A result is rounded to nearest (add 2^14, shift
right by 15) and clipped to [-32768, 32767]. Band outputs, IA1/IA2 results
and the synthesis outputs all use this format.

## Coefficient memory

The coefficients are held once per symmetric pair: (N+1)/2 words per filter,
513 words in all. `afb_coef_mem` is a register file that is cleared by
reset, has one write port, and has as many combinational read ports as
there are multipliers. Load it through `coef_we`/`coef_addr`/`coef_wdata`,
one word per clock, before the first sample. Word `cbase(f) + i` holds
c[i] = h[i] = h[N-1-i] of filter f, with i = 0 at the filter's end and
i = (N-1)/2 the centre tap:

| filter | IA1 | IA2 | H16 | H17 | H18 | H9 | H8 | H7 | H6 | H5 | H4 | H3 | H2 | H1 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| taps | 35 | 49 | 41 | 33 | 27 | 67 | 83 | 95 | 97 | 97 | 97 | 97 | 97 | 97 |
| base address | 0 | 18 | 43 | 64 | 81 | 95 | 129 | 171 | 219 | 268 | 317 | 366 | 415 | 464 |

The layout is `cbase(f) = sum of (N_g + 1)/2 over the filters g listed
before f` (see `afb_pkg`). Addresses 0..42 (IA1 and IA2) are also written
into the synthesis bank's own 43-word memory, because its interpolators
use the same coefficients.

Design the filters as equiripple (Parks-McClellan) linear-phase FIRs. The
prototypes H16..H18 are the three top-octave 1/3-octave band-passes at
24 kHz. IA1 and IA2 are the low-pass filters for decimation by 2 and by 4.
H1..H9 are the nine low bands at 6 kHz. Any coefficient set works with the
RTL; the testbenches use random ones.

## Synthesis bank

`sfb` rebuilds a 24 kHz signal from the 18 (processed) bands:

1. **Group sums.** The bands of each group are added as they arrive: bands
   16..18 (one sum per input sample), 13..15 (one per two samples) and
   1..12 (one per four samples). A group is complete when its last band
   arrives: band 16, 13 or 1, the last job of each analysis line. The
   16-bit clipped sum goes into an 8-word queue (`sfb_fifo`), one queue per
   group. The queues absorb the different times at which the three lines
   finish.
2. **Output ticks.** The bank produces one output per `tick`; in
   `qansi_fb_top` the tick is `in_valid`. The first output is produced on
   the first tick after the first low-group sum exists, which is the 5th
   input sample. From then on the bank counts output phases m = 0..3. Every
   tick takes one top-octave sum. When m is even it also takes a 2nd-octave
   sum; otherwise it feeds a 0 into IS1. When m = 0 it also takes a
   low-group sum; otherwise it feeds a 0 into IS2. This zero stuffing is
   the up-sampling by 2 and by 4.
3. **Interpolators.** IS1 (35 taps, the IA1 coefficients) and IS2 (49 taps,
   the IA2 coefficients) each have their own zero-stuffed delay line and
   one multiplier. They reuse `afb_seq`, `afb_delay_line` and `afb_mac_set`
   and take 18 and 25 clocks per tick. Zero stuffing by L divides the signal
   level by L, so the IS1 result is doubled and the IS2 result multiplied
   by 4, with clipping.
4. **Delay equalisation.** The low-group path delays
   24 + 4 x 48 + 24 = 240 samples, the 2nd-octave path 17 + 2 x 20 + 17 = 74
   and the top-octave path 20. The top-octave sum therefore waits
   `BUF_A` = 54 samples (`sfb_buffer`) before it is added to the IS1 output.
   That sum waits `BUF_S` = 166 samples before the IS2 output is added:
   20 + 54 + 166 = 74 + 166 = 240.

The output `data_out`/`out_valid` appears 28 clocks after the tick that
caused it, when IS2 finishes. Assertions check that a tick never finds a
group queue empty and that IS1 has finished before IS2.

With unit-gain band processing, the output is the input delayed by 240
samples (plus the 5-sample start-up offset), filtered by whatever
passband ripple the loaded coefficients leave.

## Top level `qansi_fb_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock (792 kHz for 24 kHz audio), synchronous active-high reset |
| `in_valid`, `data_in` | in | 1, 16 | input sample, at least 33 clocks apart; also the synthesis tick |
| `coef_we`, `coef_addr`, `coef_wdata` | in | 1, 10, 16 | coefficient load (table above) |
| `band_out_valid`, `band_out` | out | 18, 18 x 16 | analysis bands, bit/element b-1 is band b |
| `band_in_valid`, `band_in` | in | 18, 18 x 16 | processed bands, same order and timing rules |
| `y_valid`, `y_out`, `y_started` | out | 1, 16, 1 | reconstructed 24 kHz output |
| `in_oct`, `do_oct` | out | 3, 3 | delay-line write select and line-busy flags of the analysis controller |
| `sat_afb`, `sat_sfb` | out | 1, 1 | a result was clipped |

`band_in` must keep the order in which the analysis bank produces the bands
within each group (bands 18, 17, 16; 15, 14, 13; 12 down to 1), because the
group sums close on bands 16, 13 and 1. Feeding `band_out` straight back,
possibly scaled a few clocks later, satisfies this.

## Files

| file | contents |
|---|---|
| `rtl/afb_pkg.sv` | widths, tap lengths, coefficient layout, job lists, step word, rounding |
| `rtl/afb_seq.sv` | per-line schedule sequencer |
| `rtl/afb_delay_line.sv` | shift-register delay line with symmetric pair read-out |
| `rtl/afb_coef_mem.sv` | loadable coefficient register file |
| `rtl/afb_mac_set.sv` | set of pre-add multiply-accumulate units with rounding |
| `rtl/afb_sys_ctrl.sv`, `rtl/afb_reg.sv`, `rtl/afb_filter.sv` | the three analysis-bank modules |
| `rtl/afb_top.sv` | analysis bank |
| `rtl/sfb_fifo.sv`, `rtl/sfb_buffer.sv`, `rtl/sfb.sv` | synthesis bank |
| `rtl/qansi_fb_top.sv` | complete filter bank |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Every testbench compares against values computed independently in the
testbench. Each one prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

* `qansi_fb_top_tb` is the end-to-end test. It runs the full design with
  default parameters on 6000 samples (250 ms of audio): a synthetic voiced
  sound with a 220 Hz fundamental, one with a 120 Hz fundamental, white noise,
  a full-scale burst and occasional longer input gaps. The bands are looped
  back unchanged. Every band output and every synthesis output is compared
  bit for bit with a reference model that uses plain convolutions. The test
  also checks the schedule lengths of each line (33/24/18, 52, 125), the
  band rates, the band-16 latency, the synthesis start and its 28-clock
  latency, and that decimation, saturation, zero stuffing and gaps all
  occurred.
* `qansi_fb_delay_tb` loads every filter as a pure delay, with one
  coefficient at its centre tap, and sends a single impulse through
  different combinations of paths. It checks that the output is one pulse,
  exactly 240 samples after the input impulse, with the summed path gain.
  This checks the delay equalisation independently of any model.
* `qansi_fb_tone_tb` designs a simple coefficient set inside the testbench
  (Hamming-windowed ideal band-passes and low-passes; see the table under
  *Coefficient memory* for what each filter is). It feeds sine tones at the
  centres of bands 18 through 10, 9, 6 and 3. It checks that each tone ends
  up strongest in its own band and that the synthesis output power is
  within a factor of 4 of the input power. With that coefficient set:
  * the own band leads the next band by about 16 to 25 dB, but only 5.6 dB
    at 250 Hz, where 97 taps at 6 kHz are too few for a windowed design;
  * output/input power is 0.8 to 1.14.
* `afb_top_tb` is the same end-to-end test as `qansi_fb_top_tb` for the
  analysis bank alone, on 600 samples.
* `sfb_tb` drives the synthesis bank with band streams that have the
  analysis bank's timing.
* The block testbenches (`afb_seq_tb`, `afb_delay_line_tb`,
  `afb_coef_mem_tb`, `afb_reg_tb`, `afb_mac_set_tb`, `afb_sys_ctrl_tb`,
  `afb_filter_tb`) cover the blocks one at a time.

To run one with Verilator 5:

    verilator --binary --assert -y rtl rtl/afb_pkg.sv tb/qansi_fb_top_tb.sv \
              --top-module qansi_fb_top_tb --Mdir obj_top
    ./obj_top/Vqansi_fb_top_tb

The full-size run takes well under a second of simulation time.

## Departures and open points

* **Coefficients are loaded, not built in.** The filters' coefficient values
  are not available, so the coefficient ROM is a loadable register file.
  Frequency response and matching accuracy therefore depend entirely on the
  coefficients you load; the RTL has been verified only for bit-exact
  arithmetic with random coefficients.
* **513 coefficient words instead of 506.** A symmetric filter with an odd
  number of taps has (N+1)/2 distinct coefficients. Over the 14 filters
  that makes 513. The figure of 506 is half of the total tap count (1012),
  but the multiplication counts of the schedule (for example 21 + 17 + 14
  for H16 + H17 + H18) need (N+1)/2 words.
* **Centring offsets.** Where a shorter filter reads in a shared delay line
  is this design's choice. It was made so that every band of a line has the
  same delay.
* **One `out_valid` bit per band.** The bands update at three different
  rates, so a single valid would not say which bands changed.
* **Synthesis bank buffers: 54 + 166 words instead of 57 + 159.** These
  sizes come from the tap lengths, so that all three paths delay exactly 240
  samples. The other split (216 words in all) does not line up the 35-tap
  IA1/IS1 path with these tap lengths.
* **Synthesis arithmetic.** IS1 and IS2 filter the zero-stuffed signals
  directly, so they spend 43 multiplications per output sample where a
  polyphase form would need about 15. They fit easily in the 33-clock
  budget, with one multiplier each.
* **Interface choices.** These are this design's own: the synchronous
  active-high reset, the queues between the banks, the tick protocol of the
  synthesis bank, the shared coefficient bus and the meaning of
  `in_oct`/`do_oct`.
* **Extra signals between the three analysis modules.** Besides the
  write-bus signals, the controller sends a step word per line to the
  register module and to the filter engine. The filter engine returns the
  IA1/IA2 results to the controller.
* **Not included.** Per-band gain and wide-dynamic-range compression, the
  microphone/ADC and receiver/DAC, and the standard-cell implementation with
  voltage scaling are outside this RTL.
* **Only the optimised architecture is built.** The 25-multiplier
  (filter-oriented or delay-line-oriented, 288 kHz) and adder-based
  variants of the analysis bank are not built.
