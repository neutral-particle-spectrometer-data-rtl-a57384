# NPS calorimeter trigger logic

The Neutral Particle Spectrometer (NPS) calorimeter is a wall of 1080 lead
tungstate crystals, 30 columns by 36 rows, each read out by a photomultiplier
into one channel of a 250 MHz flash ADC (a JLab FADC250). The trigger has to
decide, at the 4 ns sample rate and without any dead time, whether the
calorimeter saw a high-energy photon (one energetic shower) or a π⁰ candidate
(two showers). This RTL implements that decision chain, from the raw ADC
samples of all 1080 channels to the two trigger outputs, TS1 and TS6:

```
 1080 x 12-bit samples ─► FADC250 hit finding ─► VTP clustering ─► VTP bits ─► V1495 ─► TS1, TS6
   (one per 4 ns)          70 modules, 5 crates     one per crate    0, 3, 4     one
```

Everything runs on one clock, the 250 MHz sample clock, and every stage has
a fixed latency, so an event keeps its time from sample to trigger output.
All time windows below are counted in these 4 ns clocks.

## Signal chain

### Hit finding (`fadc_hit_finder`, `fadc250`)

Each channel subtracts its pedestal from the sample (clipping at zero),
multiplies by its gain (MeV per ADC count, 16-bit unsigned with 8 fraction
bits, so `16'h0100` = 1.0) and saturates the result at 13 bits. The
calibrated samples run down a 13-tap delay line.

A **Hit** is made by a calibrated sample above the threshold `tet` (nominally
10 MeV) unless the channel is in its dead time. Its value is the sum of the
NSB = 4 samples before the crossing and the NSA = 9 samples from the
crossing on (crossing included), saturated at 8191. After a Hit no new Hit
may start for 7 samples, i.e. the next can be at the 8th sample. There is no
"must go back below threshold" condition: a long pulse makes a Hit every 8
samples.

The threshold is tested at tap NSA-1 of the delay line, so when a crossing
is seen its whole integration window is already in the line and the Hit can
leave at once: **a Hit leaves NSA+1 = 10 clocks after its crossing sample
entered**, for every channel alike.

`fadc250` is 16 of these channels with per-channel pedestal and gain and a
shared threshold.

### Clustering (`vtp_cluster_finder`)

Each crate's VTP sees the Hit streams of its own 6 columns × 36 rows and of
the adjacent column of each neighbouring crate (the *halo*; zero at the
detector edge). Seeds are looked for only in the own columns, so each crystal
is a seed candidate in exactly one crate, while a cluster on a crate boundary
still gets all of its 3×3 neighbours.

The finder keeps the last 2W+1 = 11 Hit words of every crystal (W = HIT_DT =
20 ns = 5 clocks) and judges the Hit in the middle of that history, at time
*t*, once everything within ±W of it is known. That Hit makes a cluster when

1. its energy is above `seed_thr` (nominally 50 MeV);
2. it is a **local maximum in space and time**: no Hit in the 3×3
   neighbourhood, the crystal itself at other times included, in [*t*−W,
   *t*+W] is larger. On equal energies the earlier Hit wins, and at equal
   times the crystal with lower (row, column); exactly one of two equal
   touching Hits survives;
3. at least `nhit_min` Hits went into its sum.

The cluster energy is the seed plus every Hit of the 8 surrounding crystals
in [*t*, *t*+W] (the window *following* the seed, both ends included),
saturated at 14 bits (16383).

The local-maximum test is what implements the merging rule: two seeds that
touch are not separated by a lower Hit, so the smaller one loses and its
energy ends up in the 3×3 sum of the larger. Two seeds with a lower crystal
between them are both local maxima and both make clusters; a Hit in the
overlap is counted in full by each (how such Hits should be shared is an
open question; counting them twice is this design's choice).

The cluster word (valid, energy, hit count) is presented at the seed crystal
**W+2 = 7 clocks after the seed Hit**.

### VTP output bits (`vtp_trigger`, `pulse_stretch`)

From the cluster words of its crate, each clock:

| Bit | Condition | Pulse width |
|-----|-----------|-------------|
| 0 | a cluster with energy ≥ `trigger_thr` (900 MeV) | TRIG_WIDTH = 5 clocks |
| 3 | a cluster with energy > `pair_thr` (500 MeV) | 5 clocks, fixed constant |
| 4 | two or more clusters > `pair_thr` within the last PAIR_WIDTH = 5 clocks (same clock counts) | PAIR_WIDTH = 5 clocks |

Pulses are retriggerable (a new event restarts the width) and rise one clock
after the cluster. `vtp` is the cluster finder and this logic together.

### Trigger combination (`v1495_trigger`)

- **TS1** = OR of the five Bit 0 inputs: one cluster above 900 MeV anywhere.
- **TS6** = (Bit 3 high in at least two crates) OR (Bit 4 in any crate): two
  clusters above 500 MeV, in different crates or in the same one.

Both are registered once.

### Whole detector (`nps_top`)

Crate *k* reads columns 6*k* … 6*k*+5. Within a crate, channel *n* = 16 ×
module + channel sits at row *n* / 6, column *n* % 6; 14 FADC250 modules per
crate cover the 216 crystals (the last 8 channels of the 14th are unused).

**End-to-end latency**, first sample of a pulse to TS1/TS6: NSA+1 (hit) +
W+2 (cluster) + 1 (VTP bits) + 1 (V1495) = **19 clocks = 76 ns** with the
nominal settings.

## Interfaces

Shared types and nominal settings are in `nps_pkg`:

- `hit_t` = {valid, energy[12:0]} (MeV);
- `cluster_t` = {valid, energy[13:0], nhits[5:0]};
- `vtp_cfg_t` = {seed_thr, nhit_min, trigger_thr, pair_thr}, `DEF_VTP_CFG`
  holds 50 / 1 / 900 / 500.

`nps_top` ports: `clk`, `rst` (synchronous, active high);
`sample`, `pedestal` (12 bit) and `gain` (16 bit) as `[36][30]` arrays indexed
[row][column]; `tet`; `cfg`; outputs `clusters[36][30]` (one word per seed
crystal per clock), `vtp_bit0/3/4[4:0]` (one bit per crate), `ts1`, `ts6`.
Energy thresholds are run-time inputs; window lengths (NSB, NSA, dead time,
HIT_DT, widths) are parameters, in clocks.

## Parameters

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `NSB`, `NSA` | 4, 9 | integration samples before / from the crossing |
| `DEAD` | 8 | minimum distance between two Hits of a channel |
| `GAIN_FRAC` | 8 | fraction bits of the gain |
| `HIT_DT` (`W`) | 5 | cluster coincidence window, clocks (20 ns) |
| `TRIG_WIDTH` | 5 | Bit 0 width, clocks |
| `PAIR_WIDTH` | 5 | Bit 4 coincidence window and width, clocks |
| `ROWS`, `NCRATES`, `CRATE_COLS` | 36, 5, 6 | geometry |

## What is and is not here

Implemented: the per-channel hit finding, the FADC250 module, the VTP
cluster finder and output bits, the V1495 combination and the whole
1080-channel assembly.

Not implemented:

- the analog side (crystals, photomultipliers, pre-amps, cables) and the ADC
  itself; the design starts at the 12-bit sample stream;
- the **readout path**: the FADC waveform buffer (440 ns window looked up
  4500 ns back), the VTP cluster buffer (3000 ns latency, 1000 ns window,
  100 MeV readout threshold) and the 5×5 / 7×7 FADC readout mask. Only their
  settings are known, not their structure, so none of it is modelled;
- the trigger supervisor that receives TS1 and TS6.

## Choices made where the specification is open

These are this design's own decisions, and the first places to look when
matching the RTL to real hardware:

- integration uses NSA samples from the crossing on (one description of the
  algorithm says NSB after; the parameter table says NSA);
- gain format, gain applied per sample before summing, clipping below
  pedestal, saturation of samples, Hits and clusters;
- strict ">" for the hit, seed and pair thresholds, "≥" for the Bit 0
  threshold (one description says "in excess of", the bit table says ≥);
- the local-maximum span (±HIT_DT, 3×3), the tie-break order, and full
  counting of Hits shared by two clusters;
- HIT_DT window inclusive at both ends (6 samples for 20 ns);
- the 6-column crate split, the channel order and the one-column halo;
- retriggerable output pulses; one register stage in the V1495 (the real
  module's delay is not specified);
- synchronous active-high reset everywhere.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|-----------|----------------|
| `tb_fadc_hit_finder` | random pulse trains under three pedestal/gain/threshold settings against a reference model, cycle exact (latency included); counts dead-time suppressions and saturations |
| `tb_fadc250` | 16 channels with different pedestals and gains against per-channel reference models |
| `tb_vtp_cluster_finder` | random sparse hits with many equal energies on a 6×4 crate against a reference model built from the whole hit record; counts local-maximum rejections, ties, halo neighbours, `nhit_min` rejections |
| `tb_vtp_trigger` | random clusters on the thresholds (899/900, 500/501) against a reference timeline of all three bits |
| `tb_vtp` | hand-worked cluster scenarios (neighbour sum, merge, halo, pair in and out of the window) |
| `tb_v1495_trigger` | all 2¹⁵ input combinations |
| `tb_nps_top_full` | the full 1080-channel design at default parameters with planted detector pulses: single-cluster TS1, TS6 from two crates and from one crate, a cluster across a crate boundary, merged seeds, dead time, a re-triggering long pulse, hit and cluster saturation, a per-channel gain, a Hit below the seed threshold; checks the whole cluster map, all VTP bits and TS1/TS6 every clock, and counts each mechanism |
| `tb_nps_top` | the same scenarios on a reduced 12-row × 15-column detector (5 crates of 3 columns), which builds in seconds |

Running one, e.g. the full design:

```
verilator --binary --timing --assert -j 8 -Mdir obj --top-module tb_nps_top_full \
  rtl/nps_pkg.sv rtl/pulse_stretch.sv rtl/fadc_hit_finder.sv rtl/fadc250.sv \
  rtl/vtp_cluster_finder.sv rtl/vtp_trigger.sv rtl/vtp.sv rtl/v1495_trigger.sv \
  rtl/nps_top.sv tb/tb_nps_top_full.sv
obj/Vtb_nps_top_full
```

The full-size model is large for Verilator: the cluster finder unrolls into
about 100 comparisons per crystal per clock, giving some 470 MB of C++ whose
build takes about 15 CPU-minutes (the simulation itself then runs in about a
second). `tb_nps_top` exercises the same paths on a reduced detector and
builds in seconds, as do the block testbenches.

## Limits of trust

The hit-finding, clustering and trigger rules are checked against
independent reference models, but those models encode the same reading of
the specification as the RTL: where the choices listed above differ from the
real firmware, both would be wrong together. The cluster energy sum and the
hit-count rule in particular are exact only for the chosen window and
sharing conventions. Nothing here has been compared with data from the real
modules, and synthesis timing at 250 MHz has not been studied: the cluster
finder's 3×3×11 comparison and 49-input sum are single-cycle combinational
logic and would need pipelining in an FPGA.
