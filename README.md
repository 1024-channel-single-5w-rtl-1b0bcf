# Single-chip 1024-channel volumetric ultrasound beamformer

A 3-D ultrasound scanner with a 32 x 32 matrix probe has to turn the echoes of
1024 receive channels into a volume. For each voxel and each element, the echo
sample to use is set by the round-trip time of flight: from the transmit
origin to the voxel, and back to the element. A 64 x 64 x 600 volume needs
2.5 billion such delays per volume, and each one is a square root.
This RTL builds the whole receive beamformer for all 1024 channels, with no
analog pre-beamforming and no reduction of channels. It reconstructs one voxel
per clock: 2,457,600 cycles per volume, about 54 volumes/s at 133 MHz.

The main idea is in the delay calculation. Square roots are computed only for
voxels on the central line of sight: one per element and per depth. Every
other voxel's delays are derived from those by *steering*, which costs two
additions per delay.

## Data flow

```
 ld_* ──► hann_apodizer ──► echo_store (N_CH/2 dual-port RAMs, echo_bank)
                                 ▲ one sample index per channel    │ one sample per channel
 start ─► voxel_scan_ctrl ──► steering_unit ───────────────────────┘
              │  ▲               ▲ ref_tab[2][N_CH]                 ▼ (out-of-range → 0)
              ▼  │ busy          │                              adder_tree (N_CH:1)
          ref_delay_engine ──────┘                                  │ rf_*
           (sqrt_pipe inside)                                       ▼
 cfg_*, coef_* (geometry, steering tables)                     demodulator ──► vox_*
```

| Module | Role |
|---|---|
| `beamformer_top` | wires everything; top-level ports |
| `hann_apodizer` | weights each loaded sample with the element's static 2-D Hanning weight |
| `echo_bank` | one dual-port RAM shared by two channels |
| `echo_store` | N_CH/2 banks; a load port and one read per channel per cycle |
| `voxel_scan_ctrl` | issues voxels nappe by nappe and sequences the reference tables |
| `ref_delay_engine` | TX + reference RX delay of every element for one nappe, double-buffered |
| `sqrt_pipe` | pipelined integer square root, one result per cycle |
| `steering_unit` | turns the reference delays into per-voxel sample indices |
| `adder_tree` | pipelined N-input sum, one voxel per cycle |
| `demodulator` | absolute value and a 5-tap low-pass filter along depth |
| `us_pkg` | number formats, the voxel tag struct and the enums |

## Units and geometry

All distances are in **sample units**: the distance sound travels in one
sampling period. In these units a round-trip distance is directly an index
into a channel's echo memory. Depths and delays carry 4 fractional bits.
Steering coefficients and the pitch carry 8.

* The probe is N_X x N_Y elements centred on the origin. Element (i,j) sits at
  x_i = p·(2i−N_X+1)/2 and y_j = p·(2j−N_Y+1)/2. Channel number = j·N_X + i.
* A voxel is addressed by (nappe k, phi, theta). A *nappe* is the set of all
  voxels at the same depth r = `cfg_r0` + k·`cfg_dr`.
* The transmit origin is the probe centre, so the transmit path is r.

## Delay calculation: reference plus steering

For a voxel at depth r on the central line, the exact delay to element (i,j) is

    ref(i,j) = r + sqrt(r² + x_i² + y_j²)

`ref_delay_engine` computes this for all N_X·N_Y elements of a nappe. It feeds
one radicand per cycle into `sqrt_pipe`, so a table takes N_X·N_Y + 19 cycles.
It writes into table `k mod 2` while the voxels of the previous nappe use the
other table. With the default sizes a nappe lasts 4096 cycles, against 1043
for a table, so the scan never waits after the first table.

For a voxel on line (theta, phi) of the same nappe, `steering_unit` applies the
first-order far-field correction:

    d(i,j) = ref(i,j) − (2i−N_X+1)·a − (2j−N_Y+1)·b
    a = (p/2)·sin(theta)·cos(phi),   b = (p/2)·sin(phi)

The products with the element offsets are shared by a whole column (a) or
row (b) of the probe. That leaves two additions per delay. The host supplies a
and b once per scan geometry through two coefficient RAMs:

* `coef_sel = COEF_X`: address phi·N_THETA + theta.
* `coef_sel = COEF_Y`: address phi.
* Both hold signed Q7.8 values.

The delay is rounded to the nearest sample. There is no interpolation between
samples. An index outside 0..SAMPLES−1 raises no error: that channel adds zero
to the voxel.

The steering form is an approximation. It drops terms of order
(element offset)²/r. Accuracy therefore falls off at shallow depths and on
wide-angle lines. That is the algorithm's trade-off, not a rounding effect of
this RTL.

## Echo storage and apodization

Samples are loaded one per cycle (`ld_*`) before a volume is reconstructed. On
the way in, `hann_apodizer` multiplies each sample by w(i,j) = h(i)·h(j), where
h(n) = ½(1 − cos(2π(n+1)/(N+1))). The window is static, so the stored echoes
are already apodized and the beamforming path needs no multipliers. The
weights are computed at elaboration time in Q1.15.

`echo_store` puts channels 2p and 2p+1 into the same dual-port RAM
(`echo_bank`). During beamforming, port A reads one channel of the pair and
port B the other. All 1024 channels therefore get their own sample every
cycle from 512 RAMs. With SAMPLES = 1024 and 16-bit samples, a pair fills
32 Kb.

## Summation and demodulation

`adder_tree` adds the N_CH masked samples in log2(N_CH) registered levels. The
result is the RF voxel (`rf_*`, 26 bits at the defaults).

`demodulator` rectifies each RF voxel and filters it along depth:

    out(k) = ( |x(k)|·1 + |x(k−1)|·4 + |x(k−2)|·6 + |x(k−3)|·4 + |x(k−4)|·1 ) / 16

Voxels arrive nappe by nappe, so the four older values of the same line sit in
a circular buffer of five nappe-sized RAMs. Nappe k is written into RAM
k mod 5, and the other four are read at the same line address. Taps older than
nappe 0 count as zero. The output tagged nappe k is the window ending at k, so
the filter's centre lies two nappes earlier.

## Timing

| Event | Cycles |
|---|---|
| `start` → first voxel issued | about N_X·N_Y + 20 (first reference table) |
| voxel rate | 1 per cycle; `stall` is high if a table is late (never at default sizes) |
| issue → `rf_valid` | 4 + log2(N_X·N_Y) (steering 3, RAM read 1, tree) |
| `rf_valid` → `vox_valid` | 2 |
| whole volume, default sizes | about 1044 + 2,457,600 + 16 |

`done` pulses with the last demodulated voxel. Loading and beamforming must
not overlap, because a load takes the port-A read slot of its bank.

## Parameters (top)

| Parameter | Default | Origin |
|---|---|---|
| N_X, N_Y | 32, 32 | published design |
| N_THETA, N_PHI, N_NAPPE | 64, 64, 600 | published design |
| SAMPLES | 1024 | this design's choice (one 36 Kb RAM per channel pair) |

Number formats are in `us_pkg`. The sample width is 16. The steering
multiplier allows element offsets up to ±255, i.e. up to 256 elements per side.

## What follows the published design and what is this design's own

These parts follow the published design:

* the 32 x 32 channels and the 64 x 64 x 600 volume at one voxel per clock;
* pairs of channels sharing a dual-port RAM;
* static Hanning pre-apodization;
* square roots only on the central line of sight, plus two steering additions
  per delay;
* the 1024:1 adder tree;
* demodulation by absolute value and a length-5 low-pass FIR over a
  five-nappe circular buffer.

These are this design's own choices:

* Sample units and all fixed-point formats.
* The echo depth (1024 samples).
* The exact window formula.
* The steering formula's form and its host-written coefficient tables.
* Nearest-sample indexing, and zero for out-of-range indices.
* The nappe-major scan order, the double-buffered reference table and the
  stall handshake.
* The FIR coefficients (1,4,6,4,1)/16.
* All interfaces.

The published design uses a vendor CORDIC core for the square roots.
`sqrt_pipe` is an exact digit-by-digit square root with the same role. The
published design sends voxels to a PC over Ethernet, where scan conversion and
display happen. Neither part is included: the demodulated stream is the
`vox_*` port.

## Simulation

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`. The testbenches compare against
`tb/bf_model_pkg.sv`, an independent integer/real model of the arithmetic.

| Testbench | What it runs |
|---|---|
| `tb_beamformer_top` | whole chain at 4 x 4 channels, 64 samples, 4 x 4 lines, 8 nappes |
| `tb_beamformer_full` | the default configuration (see below) |
| `tb_point_target` | imaging check: a synthetic point scatterer on an 8 x 8 probe must appear at the right line and depth, clearly above voxels three lines away |

`tb_beamformer_top` checks every RF and every demodulated voxel. It also
counts each mechanism: stalls, out-of-range channels, both table buffers,
partial and full filter windows, and circular-buffer wrap. It fails if one
never occurred.

`tb_beamformer_full` loads all 1M samples and reconstructs a full
64 x 64 x 600 volume. It checks:

* every 61st RF voxel against the model;
* every demodulated voxel;
* that the volume takes exactly 2,457,600 cycles.

It runs in about a minute.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/us_pkg.sv tb/bf_model_pkg.sv tb/tb_beamformer_full.sv \
    --top-module tb_beamformer_full -Mdir obj_full
./obj_full/Vtb_beamformer_full
```

Replace the testbench name to run any other one. Verilator reports some width
and unused-bit warnings, which are harmless. Add `-Wno-fatal` if your Verilator
version stops on them.

## Limits

* The design performs no interpolation between samples.
* The expanding (depth-dependent) aperture is not modelled: the window is
  static.
* Only one insonification per volume is handled.
* Sizes beyond 32 x 32 are parameters but have not been simulated. A larger
  probe (for example 90 x 90) also needs a larger device.
* The reference tables are flip-flops (2 x 1024 x 18 bits), because the
  steering stage reads all entries every cycle.
