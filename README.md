# LF wake-up receiver: digital baseband processor

A tire pressure sensor spends nearly all of its life asleep. A controller in
the car wakes it with a short radio telegram at 125 kHz. The carrier is
switched on and off (on-off keying) and carries Manchester-coded data at
about 4 kbaud. The analog front end turns the weak, noisy carrier into a
single wire, LFRAW. LFRAW is high while the received signal strength is above
its running mean. The digital baseband processor in this repository turns
that wire back into a message.

The baseband processor is clocked at only 90 kHz to save power. Each chip
(half a data bit) therefore lasts about eleven clocks. The design uses this
oversampling twice:

1. A **1-bit noise filter** removes isolated wrong samples before they can
   disturb the timing.
2. A **correlation decoder** decides each chip, and then each whole bit, by
   counting matching against mismatching samples over the symbol. It does not
   trust one sample taken in the middle. Its symbol clock pulls itself into
   phase with the incoming chips, one sample at a time.

A small state machine then looks for the SyncPattern that starts a
transmission and collects the 8-bit message.

For comparison, the chip detector and Manchester decoder of the older
receiver can be built instead of the correlation decoder. A parameter picks
one of three decoder chains:

- `DEC_CORRMD`: the correlation Manchester decoder. This is the default.
- `DEC_CORRCD`: the correlation chip detector with chip-pair decoding.
- `DEC_ORIG`: the edge-triggered chip detector with chip-pair decoding.

All of this is plain counters and shift registers. Without the filter
selection logic the whole processor needs only a few dozen flip-flops.

## Signal format

| item | value |
|---|---|
| sample / processing clock | 90 kHz |
| data rate | 3920 to 4200 baud (nominally 4000) |
| chip rate | twice the data rate, about 8 kchip/s, so 10.7 to 11.5 samples per chip |
| bit coding | inverted Manchester: a One is sent as chips Zero, One; a Zero as One, Zero |
| datagram | preamble of alternating Zero/One chips, then the SyncPattern, then the message |
| message | 8 bits |

The preamble only gives the analog filters and the chip clock time to settle.
The SyncPattern has to be a chip sequence that can occur neither in the
preamble nor in Manchester data. The pattern is not given with the original
design, so this implementation uses `0100_1001` (8 chips, in transmission
order). Pair its chips either way and one pair holds two equal chips, so
Manchester data cannot produce it. The alternating preamble needs three chip
errors to imitate it. It never has more than two equal chips in a row, and
neither do its joins with the preamble and the message.

Long runs are avoided on purpose. During a run of three equal chips the
receiver's 500 Hz threshold drifts towards the signal. The run then comes
out of the comparator several samples short. A pattern built around such a
run was missed even at low noise. You can change the pattern in `lf_rx_pkg`.
The transmitter must use the same pattern.

## Data path

```
 LFRAW ──► sampling FF ──┬─► count_filter  (Count3) ─┐
 (async)   (90 kHz)      ├─► hyst_filter   (Hyst1)  ─┤
                         ├─► median_filter (Median7)─┼─► mux ──► decoder ──► chips, bits ──► sync_fsm ──► msg_data
                         ├─► mo_filter     (MO3)    ─┤  filter_sel  ▲                        │
                         └──────── unfiltered ───────┘              └─── start / stop ◄──────┘

 decoder, chosen by DECODER:
   DEC_CORRMD  corr_md (contains corr_cd for the chip timing)
   DEC_CORRCD  corr_cd ──► manch_dec
   DEC_ORIG    orig_cd ──► manch_dec
```

The `DECODER` parameter builds exactly one decoder chain. `lf_dbp_top` holds
all four filters. The `filter_sel` input picks which one
drives the decoder. This makes it easy to compare the filters on the same
hardware. The recommended setting is the median filter of length 7 with the
correlation Manchester decoder, because that pair decodes best at low signal
to noise ratio. A product would tie `filter_sel` to a constant, and synthesis
would then remove the unused filters.

## The 1-bit noise filters

All four filters take one sample per clock and produce one sample per clock.
Each one trades delay and flip-flops against how long a burst of wrong samples
it can remove. The default sizes are the ones that work best in front of the
correlation decoders. The sizes in brackets are the best ones in front of a
simple edge-triggered chip detector.

| module | idea | size parameter (default) | flip-flops |
|---|---|---|---|
| `count_filter` | An up/down counter, saturating at 0 and MAXCOUNT, moves towards the input. The output is One when the counter is at least MAXCOUNT/2. | `MAXCOUNT` 3 (5) | ceil(log2(MAXCOUNT+1)) + 1 |
| `hyst_filter` | The same counter over 0 .. 3·S-1, split into three bands of S values. The output only switches to One in the top band and to Zero in the bottom band; in the middle band it holds. | `STATESIZE` 1 (2) | ceil(log2(3·S)) + 1 |
| `median_filter` | The median of binary samples is their majority. A delay line of F+1 samples feeds a counter of the Ones inside the window: +1 when a One enters, -1 when one leaves. | `FILTERSIZE` 7 (odd) | F + ceil(log2(F+1)) + 2 |
| `mo_filter` | Morphological opening, then closing, with a structuring element of M samples. Opening removes One-pulses shorter than M; closing fills Zero-gaps shorter than M. | `MASKSIZE` 3 (5) | 4·M |

The morphological filter needs no arithmetic at all. Each of its four stages
(`morph_stage`) is a shift register of M flip-flops:

- **Dilation stage:** a One at the input loads the register with all Ones.
  Otherwise the register shifts and a Zero enters. The output is the far end
  of the register.
- **Erosion stage:** the dual. A Zero clears the register; otherwise a One
  shifts in.

The stage order is erosion, dilation, dilation, erosion.

## Correlation chip detector (`corr_cd`)

This block is the heart of the receiver and the least obvious part.

**Correlating one chip.** For one chip period the chip correlator `z` counts
+1 for every One sample and -1 for every Zero sample. It saturates at
±CHIP_LEN. This count equals the correlation with the One chip minus the
correlation with the Zero chip. At the end of the period the voter outputs
chip = (z ≥ 0). The correlator then restarts with the first sample of the new
period. A sample counter sets the length of a period: normally CHIP_LEN = 11
samples.

**Judging the phase.** Averaging only helps if the window lines up with the
chips. The detector judges its phase from how the count evolved during the
period. Assume the chips change value at the boundary:

- **Window starts `d` samples early.** The tail of the previous chip pulls
  `z` one way first. Then the real chip pulls it back through zero. A zero
  detector notices the crossing and toggles a flag.
- **Window starts late.** The window ends inside the next chip. `z` reaches
  its peak and falls back a little, but it does not cross zero. The final
  |z| is below CHIP_LEN.
- **Window aligned.** |z| reaches exactly CHIP_LEN.

**Correcting the phase.** At the end of each period the clock generator acts
on that judgement:

| situation at the end of a period | action |
|---|---|
| a zero crossing was seen, and the previous clock was not already an extension | **extend**: keep the sample counter for one more clock (12-sample period). Decide on the next clock. |
| no zero crossing, \|z\| < CHIP_LEN, and shortening is allowed | **shorten**: decide now, and make the next period CHIP_LEN-1 samples long |
| the period was already a shortened one and \|z\| = CHIP_LEN-1 (the best possible in 10 samples) | back to normal length |
| otherwise (including \|z\| = CHIP_LEN) | decide now, normal next period |

Shortening is not allowed in the period right after an extension. This stops
the two corrections from fighting each other.

**Tracking and its limits.** Every period is 10, 11 or 12 samples long. So
the detector follows data rates whose chip length lies between those bounds,
such as 3920 baud (11.48 samples) and 4200 baud (10.71 samples). It needs chip
transitions to see its phase error. Manchester data has one at least every
second chip; long runs of equal chips would let it drift. Noise near the
start of a window can look like a zero crossing. The chip clock then jitters
by a sample around the right phase, and at high noise it can slip a whole
chip. The preamble is what gives the detector time to lock.

**Ports.**

- `chip` and `chip_valid` (a one-clock strobe) appear one clock after the last
  sample of the chip.
- `data_clk` toggles once per chip.
- `chip_end`, `adj_longer` and `adj_shorter` are combinational outputs. They
  describe the clock edge that is about to happen. `corr_md` uses `chip_end`;
  the other two are status signals.

## Correlation Manchester decoder (`corr_md`)

**Deciding whole bits.** Deciding each chip separately and then pairing the
chips throws information away. A Manchester bit is a pair of opposite chips.
So the bit correlator `y` correlates over both chips of the bit at once:

- A reference bit `ref_chip` toggles at every chip boundary that the embedded
  `corr_cd` reports.
- `y` counts +1 when a sample equals the reference of the chip it belongs to,
  and -1 otherwise.
- `y` saturates at ±2·CHIP_LEN.

**Finding the bit phase.** The chip stream alone does not tell which chip
boundaries are bit boundaries. The SyncPattern does.

1. After the last SyncPattern chip, `sync_fsm` sends a `start` pulse during
   the first data chip.
2. `corr_md` stores the reference value of that chip as `ref_start`.
3. From then on, every boundary that ends a chip with reference `~ref_start`
   also ends a bit.
4. The decoded bit is (y ≥ 0) XOR `ref_start`. This maps Zero-One to a One
   and One-Zero to a Zero, whichever polarity the free-running reference has.

While decoding is off, `y` restarts at every chip boundary, so the first bit
begins cleanly. The decoder still passes the chips on, because the
SyncPattern search needs them. `stop` ends decoding after the message.
`bit_out` and `bit_valid` appear one clock after the bit's last sample,
every 20 to 24 clocks.

## Edge-triggered chip detector (`orig_cd`)

This is the chip detector of the older receiver, the baseline the
correlation decoders are measured against. It takes one sample per chip:

- A flip-flop holds the previous sample. The XOR of the two marks a level
  change, the first sample of a new chip.
- A level change loads a down counter with the preset 5. When the counter
  reaches zero, the sample is in the middle of the chip (the sixth of
  eleven), and it becomes the chip value.
- The counter then reloads with the chip length. If no level change comes, the
  next chip is sampled eleven clocks later. If one comes, the count restarts
  from the preset.

It needs 8 flip-flops. It has no averaging. One wrong sample at the sampling
point gives a wrong chip, and one wrong sample elsewhere shifts the sampling
point. `chip` and `chip_valid` appear one clock after the sample taken.
`data_clk` toggles with each chip.

## Chip-pair Manchester decoder (`manch_dec`)

This decoder follows `corr_cd` or `orig_cd`. The `start` pulse from the state
machine marks the next chip as the first chip of a bit. From then on the
chips are taken in pairs:

| pair | result |
|---|---|
| Zero, One | bit One |
| One, Zero | bit Zero |
| Zero, Zero or One, One | `code_err` pulse, no bit |

`bit_out`/`bit_valid` or `code_err` come one clock after the `chip_valid` of
the second chip. `stop` ends decoding.

## SyncPattern state machine (`sync_fsm`)

The state machine has two states.

**SEARCH.** The last SYNC_LEN chips are compared with `SYNC_PATTERN` after
every `chip_valid`. On a match the machine:

- pulses `start` and `sync_found`;
- moves to DATA.

**DATA.** Decoded bits are shifted in, first bit into the MSB. After
MSG_BITS = 8 bits the machine:

- presents the message on `msg_data` with a one-clock `msg_valid`;
- pulses `stop`;
- clears the chip history and returns to SEARCH.

Clearing the history means a new SyncPattern must arrive in full before the
next message. Chips seen during DATA are ignored, even if they look like the
pattern.

A `code_err` from the chip-pair decoder during DATA drops the message. The
machine then pulses `stop`, clears the history and returns to SEARCH without
a `msg_valid`. The correlation Manchester decoder decides every bit, so it
never reports a code error.

## Top-level interface (`lf_dbp_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 90 kHz clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `lfraw` | in | 1 | comparator output of the analog front end (asynchronous; sampled by one flip-flop) |
| `filter_sel` | in | 3 | `lf_rx_pkg::filt_sel_e`: `FILT_NONE`, `FILT_COUNT`, `FILT_HYST`, `FILT_MEDIAN`, `FILT_MO` |
| `chip`, `chip_valid` | out | 1, 1 | recovered chips |
| `data_clk` | out | 1 | recovered chip clock |
| `bit_out`, `bit_valid` | out | 1, 1 | decoded bits (only between SyncPattern and end of message) |
| `sync_found` | out | 1 | pulse: SyncPattern detected |
| `in_message` | out | 1 | message bits being collected |
| `msg_data`, `msg_valid` | out | 8, 1 | received message, first bit in the MSB |
| `adj_longer`, `adj_shorter` | out | 1, 1 | chip clock phase corrections (always zero with `DEC_ORIG`) |

Parameters: `CHIP_LEN` (11), `COUNT_MAX` (3), `HYST_STATESIZE` (1),
`MEDIAN_SIZE` (7), `MO_MASKSIZE` (3), `DECODER` (`DEC_CORRMD`). The
SyncPattern and the message length are set in `lf_rx_pkg`.

The older receiver works best with larger filters: Count5, Hyst2, Median7,
MO5 or MO7. With `DEC_ORIG`, set the size parameters to match.

**Latency.** `msg_valid` rises a few clocks after the last sample of the last
message chip. In simulation this is always within 60 clocks.

**Size.** Coarse synthesis of the whole top at its defaults, with all four
filters and the correlation Manchester decoder, gives 87 flip-flop bits.
`corr_cd` alone has 16, `corr_md` 27 (its `corr_cd` included), `orig_cd` 8
and `manch_dec` 6.

## What is not here

The analog part of the receiver has no logic function, so it is not
described in RTL:

- the magnetically coupled antenna circuits, with their MOS input attenuator;
- the low-noise amplifier and the eight-stage limiter with its received
  signal strength output;
- the 11 kHz data filter, the 500 Hz threshold filter and the comparator that
  produce LFRAW;
- the analog gain control loop.

LFRAW is simply an input port.

## Departures from the original design and own choices

- **One clock edge.** The original correlation decoders evaluate their
  control logic on the falling clock edge. Here it is combinational, and all
  state changes on the rising edge. The cycle behaviour is the same.
- **Chip strobe.** `chip_valid` comes with the registered chip. The original
  delays its strobe by a few clocks, towards the middle of the next chip.
- **Bit correlator.** The first sample after a mid-bit chip boundary is
  compared with the reference of the new chip. The original compares it with
  the old one.
- **Added signals.** `bit_valid`, `stop` and the message assembly are
  additions; the original decoder has no bit strobe and never stops.
- **Own choices.** These are:
  - the SyncPattern value and length;
  - the MSB-first message order;
  - the active-low reset;
  - the run-time filter selection and the build-time decoder selection;
  - dropping a message on a Manchester code error.
- **Threshold wording.** Where the prose and the reference models of the
  filters state a threshold differently, the results agree for the odd sizes
  used here. The hysteresis filter follows the prose counter range
  0 .. 3·S-1; the original models use the same bands shifted by one.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench ends with
a line `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_count_filter`, `tb_hyst_filter`, `tb_median_filter`, `tb_mo_filter` | Every output sample matches an independent model of the filter's equations: a counter recursion; a window majority; sliding AND/OR windows for erosion and dilation. This holds for two sizes each, with noisy random runs. Directed cases cover spikes, hysteresis and pulse widths. |
| `tb_corr_cd` | At 3920, 4000 and 4200 baud with random phase, clean streams decode every chip of a Manchester payload with the correct chip count. At 1 % inverted samples, at least three in four runs keep lock. Every period is 10 to 12 clocks. Both corrections occur. |
| `tb_corr_md` | Full datagrams at the three data rates. Clean runs must decode all 8 bits (0x00, 0xFF, random). No bit appears before `start`. Bits are 20 to 24 clocks apart. Noisy runs are checked statistically. |
| `tb_orig_cd` | At the three data rates with random phase, clean and with 1 % inverted samples. On every clock an independent count of samples since the last level change says when a chip is due. The chip must come exactly then, with the sample's value. Clean streams must decode the whole payload. |
| `tb_manch_dec` | Random chip pairs, about one in five invalid. Each valid pair gives its bit, and each invalid pair a code error, on the exact clock. Nothing comes out before `start` or after `stop`, and a new `start` restarts the pairing. |
| `tb_sync_fsm` | `start`, `sync_found`, `stop` and `msg_valid` arrive on the exact clock. Nothing happens on the preamble, a near-miss pattern, or a pattern sent during a message. Stray bits are ignored. The message is assembled MSB first. A code error drops the message and the search starts again. |
| `tb_lf_dbp_top` | The top at its default parameters. One reset, then 32 datagrams, switching the filter at run time: every filter setting × three data rates × clean / 3 % noise. Every clean datagram must give exactly its message. The test counts each mechanism (both clock corrections, SyncPattern found again after a message, every filter delivering, spikes removed). |

| `tb_msr_sweep` | The message success rate of all three decoder chains, for every filter setting at four noise levels, 24 datagrams each. The edge-triggered chain also runs with the larger filters (Count5, Hyst2, Median7, MO5 and MO7). See below. |

`tb/lf_stim_pkg.sv` generates the stimulus. It builds datagrams and samples
them at 90 kHz for a given data rate and phase. In most testbenches, noise is
applied as randomly inverted LFRAW samples.

**Message success rate.** `tb_msr_sweep` drives LFRAW through a simple
baseband stand-in for the front end:

- Gaussian noise is added to the carrier envelope.
- An 11 kHz one-pole low-pass acts as the data filter.
- A 500 Hz one-pole low-pass of that signal acts as the threshold.

Noise levels are given as amplitude over noise standard deviation. A typical
run gives the following share of datagrams received correctly:

| decoder | noise | none | Count3 | Hyst1 | Median7 | MO3 |
|---|---|---|---|---|---|---|
| CorrMD | 14 dB | 1.00 | 1.00 | 1.00 | 1.00 | 1.00 |
| CorrMD | 8 dB | 0.67 | 0.96 | 0.96 | 1.00 | 1.00 |
| CorrMD | 5 dB | 0.62 | 0.75 | 0.75 | 0.75 | 0.83 |
| CorrMD | 2 dB | 0.29 | 0.17 | 0.46 | 0.50 | 0.42 |
| CorrCD | 8 dB | 0.67 | 0.88 | 0.92 | 1.00 | 0.96 |
| CorrCD | 5 dB | 0.38 | 0.54 | 0.50 | 0.58 | 0.67 |
| Original | 8 dB | 0.17 | 0.83 | 0.71 | 1.00 | 0.83 |
| Original | 5 dB | 0.04 | 0.25 | 0.33 | 0.42 | 0.33 |
| Original, larger filters | 8 dB | 0.17 | 0.96 | 0.92 | 1.00 | 0.67 |
| Original, larger filters | 5 dB | 0.04 | 0.50 | 0.54 | 0.42 | 0.21 |

For the last two rows the filter columns are Count5, Hyst2, Median7 and MO5.
At 14 dB every chain receives every datagram with every filter. The one
exception is the edge-triggered chain without a filter, which misses one of
24.

Over all settings the chains received 363 (CorrMD), 307 (CorrCD), 242
(edge-triggered) and 257 (edge-triggered, larger filters) of 480 datagrams.
The ranking matches the original evaluation: the correlation Manchester
decoder is best, and a filter helps most in front of the edge-triggered
detector. In this stand-in, Count5 and Hyst2 beat Count3 and Hyst1 in front
of the edge-triggered detector. The larger morphological filters do not:
MO5 does worse than MO3, and MO7 worse still, with 0.54 at 8 dB and 0.08 at
5 dB. The stand-in has no logarithmic signal strength
stage, so the absolute noise levels do not carry over to a real front end.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_lf_dbp_top \
    rtl/lf_rx_pkg.sv tb/lf_stim_pkg.sv -y rtl -y tb tb/tb_lf_dbp_top.sv
./obj_dir/Vtb_lf_dbp_top
```

Replace the top module and the last file to run another testbench. Each one
finishes in well under a second.
