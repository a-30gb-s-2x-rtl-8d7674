# 2x half-baud-rate clock and data recovery, 30 Gb/s, quarter rate

A bang-bang (Alexander) clock and data recovery circuit samples every unit
interval (UI) twice: once at the bit edge and once at the bit centre. It locks
the clock to the data edges, and that is robust. But it needs eight clock
phases at quarter rate, and it makes two comparisons per UI. A baud-rate
(Mueller-Muller) detector makes one comparison per UI. However, it locks to the
bit centre, and it develops a dead zone when the equalization or the
comparator thresholds are off.

The 2x half-baud-rate scheme sits between the two. It samples only **every
other UI**, and samples that UI four times:

* at its leading edge, with three comparators at thresholds +Vref (**DH**),
  0 (**ED**) and -Vref (**DL**);
* at its centre, with one comparator at 0 (**DM**).

The UI in between is not sampled at all. This still averages two comparisons
per UI. But the receiver has the edge/centre pair of a bang-bang detector, so
it locks to the edge. And it needs only four of the eight quarter-rate
phases: 0, 45, 180 and 225 degrees.

The skipped bit is recovered from inter-symbol interference (ISI). After the
equalizer, one post-cursor remains. The signal at the edge between the skipped
bit D(n-1) and the sampled bit D(n) is therefore:

* above +Vref if both bits are 1;
* below -Vref if both are 0;
* between the two thresholds if the bits differ.

This works like a one-tap speculative decision-feedback equalizer read
backwards.

This repository holds SystemVerilog for the whole receiver of that scheme:

* synthesizable RTL for the digital part: the phase detector, the data
  decoder, the majority voter, the deserializer, the clock dividers and the
  PRBS bit-error-rate tester (BERT);
* behavioural models of the analog clock-recovery loop: the comparators, the
  charge pump with its loop filter, and the ring VCO.

Together they close the loop in simulation.

## Sampling pattern and the two decision tables

One quarter-rate clock period covers four UIs:

| VCO phase | 0 deg | 45 deg | 90 deg | 135 deg | 180 deg | 225 deg | 270 deg | 315 deg |
|---|---|---|---|---|---|---|---|---|
| use | slice 0 edge: DH, ED, DL | slice 0 centre: DM | (skipped UI) | | slice 1 edge: DH, ED, DL | slice 1 centre: DM | digital retiming clock | |

Eight comparators therefore serve two "slices" per clock. Each slice sees one
sampled UI and the skipped UI before it.

**Phase detector** (`hbr_pkg::pd_decide`, `hbr_pd`). A slice reports a
decision only when its edge sample lies between the thresholds (DH=0, DL=1).
That means there was a transition at the edge. The slice then compares ED with
DM:

| DH | DL | ED | DM | decision |
|---|---|---|---|---|
| 0 | 1 | 0 | 0 | LATE |
| 0 | 1 | 0 | 1 | EARLY |
| 0 | 1 | 1 | 0 | EARLY |
| 0 | 1 | 1 | 1 | LATE |
| any other | | | | HOLD |

LATE means the edge sample already shows the new bit, so the clock lags the
data.

**Data decoder** (`hbr_pkg::dd_decode`, `hbr_dd`):

| DH | DL | DM | D(n-1), D(n) |
|---|---|---|---|
| 0 | 0 | 0 | 0, 0 |
| 0 | 1 | 0 | 1, 0 |
| 0 | 1 | 1 | 0, 1 |
| 1 | 1 | 1 | 1, 1 |

ED is not used by the decoder. The other four patterns cannot occur with an
ideal eye, but they can with comparator offset or noise. For them this design
takes:

* D(n) = DM;
* D(n-1) = DL when DH and DL agree, and NOT DM otherwise.

That fallback is a choice of this implementation.

## Clock recovery loop

```
 vin ──► 8 x latch_comparator ──► hbr_pd ──► majority_voter ──► cp_lf ──► ring_vco ─┐
          ▲  (0/45/180/225 deg)   (2 slices)  (up/dn)           (vctrl)    (8 phases)│
          └──────────────────────────────────────────────────────────────────────────┘
```

* `majority_voter` turns the two slices' four EARLY/LATE lines into one
  command per clock. More LATE than EARLY votes gives UP (the VCO speeds up).
  More EARLY than LATE gives DN. A tie gives nothing. The scheme names a
  majority voter but not its rule, so this rule is an assumption.
* `cp_lf` is a behavioural model of a charge pump driving a series R-C filter.
  The resistor gives a proportional step and the capacitor integrates the
  frequency offset. Its defaults are assumptions, chosen for a stable bang-bang
  loop:
  * 100 uA pump current;
  * 50 ohm resistor;
  * 400 pF capacitor;
  * 0.2 V starting voltage.

  With the VCO gain below, the proportional step is ±25 MHz (±3300 ppm). The
  integral path moves the frequency by about 170 kHz for every clock that is
  pumped.
* `ring_vco` is a behavioural four-stage differential ring. It produces phases
  ck[0..7] at k x 45 degrees. Its tuning is f = 6.5 GHz + 5 GHz/V x vctrl,
  clamped to 6.5-11 GHz. The range is the design's; the gain is an assumption.
  At 0.2 V it runs at 7.5 GHz, the quarter-rate clock for 30 Gb/s.

Latency from a sampled edge to the charge pump:

1. the comparator (5 ps clock-to-q in the model);
2. the phase-detector register;
3. the voter register.

Both registers are on the 270-degree clock. From a 0-degree sample to a pump
command that is about 1.75 clock periods (0.75 to the first 270-degree edge,
one more to the second).

## Data path

* `hbr_dd` delivers 4 bits per clock, with bit 0 the oldest:
  {D(n) slice 1, D(n-1) slice 1, D(n) slice 0, D(n-1) slice 0}.
* `deser_4to32` collects eight of these words into a 32-bit word. It updates
  the word once every 8 clocks and flags that clock with a one-clock pulse.
* `clk_divider #(8)` makes CK/8. CK/8 rises four clocks after each word update,
  in the middle of the word's stable window, and it clocks the BERT.
* A second `clk_divider #(2)` makes the CK/16 monitor output.

`prbs_bert` is a 32-lane, self-synchronising PRBS checker:

* It predicts each received bit from the received bits 7 and 6 places earlier
  (PRBS7, x^7+x^6+1), or 31 and 28 places earlier (PRBS31, x^31+x^28+1).
* Its history window is the previous word plus the current word.
* It needs no word alignment.
* Each line error is counted three times: once as itself and once for each
  later prediction that uses it.
* The first word after reset or after a pattern change only fills the history.
* The outputs are:
  * ERR, high for one CK/8 cycle after a word with a mismatch;
  * a saturating error counter;
  * a count of checked bits.

The polynomials are the standard ones. The counters are additions that make
ERR measurable in simulation.

## Clocking and reset

* All digital logic (`hbr_pd`, `hbr_dd`, `majority_voter`, `deser_4to32`, and
  the /8 divider) runs on the 270-degree VCO phase. At that edge, the decisions
  made at 0, 45, 180 and 225 degrees of the same period have all settled. The
  225-degree decision has 45 degrees minus the 5 ps comparator delay to settle.
  At the 11 GHz top of the VCO range that is about 6 ps.
* The BERT runs on CK/8, and the CK/16 divider runs on CK/8.
* `rst_n` is asynchronous and active low. Everything resets to zero: HOLD, no
  pump command, and an empty BERT history.
* The comparators, VCO and charge pump models have no reset. The VCO starts at
  V_INIT = 0.2 V.

## Files

| file | kind | content |
|---|---|---|
| `rtl/hbr_pkg.sv` | package | slice types, phase-detector and decoder tables |
| `rtl/hbr_pd.sv` | RTL | two-slice phase detector, registered |
| `rtl/hbr_dd.sv` | RTL | two-slice data decoder, registered |
| `rtl/majority_voter.sv` | RTL | EARLY/LATE votes to UP/DN |
| `rtl/deser_4to32.sv` | RTL | 4:32 deserializer |
| `rtl/clk_divider.sv` | RTL | even clock divider (/8 and /2) |
| `rtl/prbs_bert.sv` | RTL | PRBS7/PRBS31 checker |
| `rtl/latch_comparator.sv` | behavioural | clocked comparator with offset and delay |
| `rtl/ring_vco.sv` | behavioural | 8-phase ring VCO |
| `rtl/cp_lf.sv` | behavioural | charge pump and R-C loop filter |
| `rtl/hbr_cdr_rx.sv` | top | the receiver |

The top `hbr_cdr_rx` has no parameters. Its ports are:

* inputs: `rst_n`, and `vin` and `vref` as `real` values (the equalizer output
  and the reference level);
* `prbs31`, the BERT pattern select;
* outputs: the BERT outputs, the deserialized word, CK/8, CK/16 and the control
  voltage.

The digital blocks are synthesizable. The top is not, because it instantiates
the three behavioural models. To use the digital part alone, instantiate
`hbr_pd`, `hbr_dd`, `majority_voter`, `deser_4to32`, `clk_divider` and
`prbs_bert` as `hbr_cdr_rx` does, and connect real comparators, charge pump and
VCO.

Not modelled:

* the continuous-time linear equalizer (two boost stages with 4-bit degeneration
  controls), whose transfer function is not available;
* the reference DAC that sets ±Vref;
* the LDO.

Their signals are the top's `vin` and `vref` inputs.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_hbr_pd` | all 256 input combinations against the phase-detector table; reset; 1-clock latency |
| `tb_hbr_dd` | all 64 combinations against the decoder table and fallback; bit order; latency |
| `tb_majority_voter` | all 16 vote patterns |
| `tb_deser_4to32` | word contents and bit order, one word per 8 clocks, stable output |
| `tb_clk_divider` | /8 and /2 period, duty cycle, first edge |
| `tb_prbs_bert` | clean PRBS7 and PRBS31, one flipped bit counted 3 times, wrong pattern detected, priming |
| `tb_latch_comparator` | decision at the edge, clock-to-q, hold, offset |
| `tb_ring_vco` | frequency law and clamping, 45-degree phase spacing |
| `tb_cp_lf` | proportional step, integral slope, clamping |
| `tb_hbr_cdr_rx` | closed loop at default parameters (see below) |
| `tb_hbr_cdr_capture` | frequency capture and sinusoidal jitter, four receivers side by side |
| `tb_hbr_pd_characteristic` | open-loop average detector output versus sampling phase |

The closed-loop testbenches drive the receiver from a model of the
transmitter and the equalized channel. In `tb_hbr_cdr_capture` that model is
the module `tb/tb_tx_channel.sv`:

* PRBS data at 30 Gb/s plus an offset in ppm;
* one post-cursor, y(k) = b(k) + 0.33 b(k-1) with b = ±1, interpolated linearly
  between bit centres and updated every 0.5 ps;
* Vref = 0.6;
* optional sinusoidal jitter.

`tb_hbr_cdr_rx` computes the same waveform itself, because it also keeps the
transmitted bits for comparison. `tb_hbr_pd_characteristic` evaluates it at
the sampling instants directly.

`tb_hbr_cdr_rx` runs the following sequence:

1. The data runs 2000 ppm faster than the VCO's rest frequency, and the loop
   locks on PRBS7.
2. Every recovered 32-bit word is compared with the transmitted bits. This
   check does not rely on the BERT.
3. One transmitted bit is inverted. The BERT must count exactly 3 errors.
4. Transmitter and BERT switch to PRBS31.
5. In a 0.6 us window, the BERT must count 0 errors, the recovered CK/8 must
   match the data rate within 100 ppm (typically 3 ppm), and the BERT must
   check 32 bits per CK/8.

The testbench also counts the mechanisms of the design and requires each to
occur:

* EARLY, LATE and HOLD decisions;
* UP, DN and tie at the voter;
* all four decoder patterns;
* the ERR flag;
* the pattern switch.

In `tb_hbr_cdr_capture` the loop locks error-free:

* from -2300 ppm;
* from +10000 ppm;
* at 0 ppm with 0.3 UIpp sinusoidal jitter at 10 MHz;
* at 0 ppm with 1 UIpp sinusoidal jitter at 1 MHz.

The scheme's asymmetric detector is reported to pull in up to about +66000 ppm
without a frequency detector. This model does **not** reproduce that. It
captures +10000 ppm with the default loop values, and +20000 ppm with a
smaller capacitor (100 pF). From +30000 ppm on, the control voltage drifts
down instead of up, with every charge-pump and filter setting tried.

With this piecewise-linear test waveform, the detector's average output over
a whole phase-slip cycle is nearly balanced. The open-loop curve below shows
this: its EARLY and LATE lobes have about equal area. Pull-in therefore
depends on the shape of the real equalized pulse, which is not modelled here.
The capture and jitter figures above describe this model, not silicon.

`tb_hbr_pd_characteristic` sweeps the sampling phase of `hbr_pd` over one UI
in open loop. The waveform uses the same model, with a second post-cursor
beta and noise of sigma 0.05. It runs six conditions:

* nominal: alpha 0.33, Vref 0.6;
* Vref lowered by 0.05, and Vref raised by 0.05;
* three residual-ISI pairs for (alpha, beta): (0.43, 0.13), (0.22, -0.18)
  and (0.17, -0.27).

Results:

* All six conditions lock 0.05 to 0.09 UI after the nominal data edge,
  where the stable zero crossing lies. Post-cursor ISI skews half of the
  transitions late, which puts the lock point after the edge. So the detector
  locks to the edge, not to the centre.
* The nominal and Vref-offset curves have no dead zone. Their average output
  is at least 0.02 in magnitude 0.05 UI on either side of the lock point.
* With (0.43, 0.13) the curve has a flat stretch of about 0.1 UI. The
  data-dependent zero crossings of this piecewise-linear waveform form
  separate clusters, and between the clusters EARLY and LATE balance. A
  smoother, more realistic pulse would narrow that gap. This behaviour comes
  from the waveform, not from the detector logic.

### Running with Verilator

Unit test, for example the phase detector:

```
verilator --binary --timing --assert -Irtl rtl/hbr_pkg.sv rtl/hbr_pd.sv tb/tb_hbr_pd.sv \
          --top-module tb_hbr_pd -o sim && ./obj_dir/sim
```

Closed loop (about 2 s of CPU time):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/hbr_pkg.sv tb/tb_hbr_cdr_rx.sv \
          --top-module tb_hbr_cdr_rx -o sim && ./obj_dir/sim
```

`--timing` is required, because the behavioural models and testbenches use
delays. Every file declares `timeunit 1ps; timeprecision 1fs;`.

## Where this design chooses for itself

The scheme defines the following, and this design follows it:

* the sampling pattern;
* the phase-detector and decoder tables for legal inputs;
* the quarter-rate phase assignment;
* the X2 slice structure;
* registered detector and decoder outputs;
* the 4:32 deserializer;
* the /8 and /16 clocks;
* the 32-lane BERT for PRBS7/31;
* the 6.5-11 GHz VCO range.

These are this design's own choices:

* the decoder fallback for illegal patterns;
* the voter rule and its register;
* one common 270-degree retiming clock;
* bit order (oldest in bit 0);
* the BERT polynomials, priming and counters;
* reset values;
* all analog model values: comparator delay and offset, charge-pump current,
  R, C, VCO gain and starting voltage.
