# Hershey-Kiss spread-spectrum clock generator for DisplayPort 1.2

A DisplayPort 1.2 transmitter needs a link clock of 162, 270 or 540 MHz
(1.62, 2.7 and 5.4 Gb/s after 10:1 serialisation) and is allowed to lower
its EMI peak by sweeping that clock down by up to 0.5 % at 30-33 kHz.
How the sweep is shaped in time decides how flat the resulting spectrum is.
A plain triangle parks most energy at the two edges of the spread band; the
"Hershey-Kiss" profile, which moves fast near its extremes and slowly in
between, spreads energy more evenly and gives a lower peak.

This design produces that profile without a lookup table. Two small
sigma-delta modulators (SDMs) in series do the work:

* the **slope modulator** generates the *slope* of the profile, a triangle,
  and turns it into a 1-bit stream;
* the **division modulator** integrates that stream into the fractional
  division word of a fractional-N PLL.

Integrating a triangular slope gives a curve that is steep where the
triangle peaks and flat where it is near zero, which is the Hershey-Kiss
shape. The whole modulator is a few counters and accumulators.

## Top-level structure

```
ref_clk 30 MHz ─► PFD ─► charge pump ─► loop filter ─► VCO ──┬──► clk_out (540/270/162 MHz)
                   ▲     10/20/40 uA    (3rd order)          │
                   │        ▲                                ▼
                   │   cp_selector(M1,M0)            loop_path_sel (M1: /2 or not)
                   │                                         │
                   └──────── fb_clk ◄────── mmd (ratio N-1 .. N+2, N by M0)
                                │                 ▲ 2-bit code
                                ▼ clock           │
                   slope_modulator ──sm_out,sign──► division_modulator
                   (8-bit counter + 1st-order SDM)   (14-bit counter + MASH 1-1)
```

The modulators are clocked by the divider output `fb_clk`. When the PLL is
locked this is the 30 MHz reference rate, so every count below is one
reference period.

| M1 M0 | output  | VCO path  | N | D range (14 bit) | average division | CP current |
|-------|---------|-----------|---|------------------|------------------|------------|
| 0 0   | 162 MHz | direct    | 5 | 6111 .. 6554     | 5.373 .. 5.400   | 10 uA      |
| 0 1   | 270 MHz | direct    | 8 | 15646 .. 16383   | 8.955 .. 9.000   | 20 uA      |
| 1 1   | 540 MHz | halved    | 8 | 15646 .. 16383   | 2 x (8.955 .. 9) | 40 uA      |

The loop divides by `N + D/2^14` on average, and by twice that in the
540 MHz mode. Spread = (Dmax - Dmin) / (N·2^14 + Dmax) = 0.50 % in every
mode. The top of the profile is the nominal frequency, so the spread is
downward only.

## How the profile is built

### Slope modulator (`sm_counter`, `sdm1`, `slope_modulator`)

The 8-bit slope counter sweeps K, K-1, ..., 0, ..., K with K = 248. Its value
is the magnitude of the profile slope. Each time it comes back to K, the
`sign` output toggles. So one triangle takes 2K = 496 cycles, and one full
up-and-down sweep of the frequency takes 4K = 992 cycles. At 30 MHz this
gives a modulation frequency of 30 MHz / 992 = 30.24 kHz.

A first-order SDM (an 8-bit accumulator whose carry is the output) turns the
count into a 1-bit stream. The density of 1s in that stream is
`AVS = count / 256`.

### Division modulator (`dm_counter`, `mash11_sdm`, `division_modulator`)

Each cycle the 14-bit division counter moves by one step. It counts up while
`sign = 1` and down while `sign = 0`. The step size depends on the slope bit:

* slope bit 1: step γ = 2;
* slope bit 0: step α = 0 (162 MHz mode, M0 = 0) or β = 1 (270/540 MHz, M0 = 1).

So the mean slope of D is `(γ − α)·AVS + α` or `(γ − β)·AVS + β`. Near a cusp
(counter near K) this is about 1.9 codes per cycle. In the middle of each
half (counter near 0) it is about 0 or 1. The testbench measures 1.85/1.05
(M0 = 1) and 1.70/0.10 (M0 = 0) over 60-cycle windows.

At the 270/540 MHz setting, one half period adds exactly 737 codes.
This equals 16383 − 15646, so D moves between the two limits.

The counter saturates at the Dmin and Dmax of the selected mode. Saturation
has three effects:

* the spread cannot go past 0.5 %;
* D is pulled back into range after a mode change;
* in the 162 MHz mode it clips the profile, as described next.

The 162 MHz setting has α = 0, γ = 2 and K = 248. Each half then adds about
482 codes, but the window is only 6554 − 6111 = 443 codes wide. D therefore
sits at a limit for about 20 of the 496 cycles of each half, and the
profile is flat for those cycles at every cusp. If you need the unclipped
shape, you can change α/γ or K in `sscg_pkg`.

The second-order MASH 1-1 modulator turns D into one divider modulus per
feedback cycle:

* two accumulators are cascaded;
* the second accumulates the residue of the first;
* the output is `y = C0 + C1 − C1(z⁻¹)` ∈ {−1, 0, 1, 2}, and `code = y + 1`.

The running sum of `code − 1` stays within ±3 of `t·D/2^14`, and the error is
shaped by (1 − z⁻¹)². The first accumulator registers its carry together with
its residue. This keeps its carry aligned with the residue passed to the
second stage, which the error cancellation needs.

### Multi-modulus divider and loop path (`mmd`, `loop_path_sel`)

`mmd` is a loadable down-counter. When it reaches zero, it takes the code,
reloads with `N − 1 + code − 1`, and raises its output. Each output period
lasts exactly `N − 1 + code` input cycles (4..7 or 7..10). The output is high
for the first ceil(ratio/2) of those cycles.

The rising output edge is the reload edge, and it also clocks the modulator.
A code produced at edge k is therefore used for the period that starts at
edge k+1. `loop_path_sel` is a toggle flip-flop and a clock mux: with M1 = 1
the divider sees half the VCO frequency.

## Analog parts: behavioural models

The PFD, charge pump, loop filter and VCO are analog circuits. They are
written here as behavioural SystemVerilog (real-valued signals and delays) so
that the whole loop can be simulated. They do not synthesize.

* `pfd`: three-state phase-frequency detector with a 150 ps reset delay.
* `charge_pump`: three matched current-source pairs (10/20/40 uA, one-hot
  select from `cp_selector`), up minus down. The real circuit uses a
  unity-gain buffer to clamp the idle source nodes, which avoids
  charge-sharing glitches. The ideal model has no such glitches, so the
  buffer is not modelled.
* `loop_filter`: passive third-order filter (R1 = 750 Ω, C1 = 3 nF,
  C2 = 200 pF, R3 = 1 kΩ, C3 = 20 pF). It is integrated exactly over every
  UP/DN pulse and at least every 50 ps. The values are this implementation's,
  chosen for about 300 kHz bandwidth and about 60° phase margin at 540 MHz.
  The target bandwidth is the original design's; its component values are
  not known.
* `vco`: linear law f = 1.2 GHz/V · Vctrl, clamped to 50 MHz..1.2 GHz. The
  original is a four-stage differential ring with replica biasing; only its
  1.2 GHz/V gain is kept.

`sscg_digital` holds everything that is logic: `loop_path_sel`, `mmd`,
`dual_sdm_modulator` and `cp_selector`. `sscg_top` wraps it with the four
models.

## Files

| file | contents |
|------|----------|
| `rtl/sscg_pkg.sv` | widths, K, α/β/γ, N and D limits per mode, enums |
| `rtl/sm_counter.sv`, `rtl/sdm1.sv`, `rtl/slope_modulator.sv` | slope modulator |
| `rtl/dm_counter.sv`, `rtl/mash11_sdm.sv`, `rtl/division_modulator.sv` | division modulator |
| `rtl/dual_sdm_modulator.sv` | both modulators |
| `rtl/mmd.sv`, `rtl/loop_path_sel.sv`, `rtl/cp_selector.sv` | divider, /2 path, CP select |
| `rtl/sscg_digital.sv` | synthesizable digital core |
| `rtl/pfd.sv`, `rtl/charge_pump.sv`, `rtl/loop_filter.sv`, `rtl/vco.sv` | behavioural analog models |
| `rtl/sscg_top.sv` | complete SSCG |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends on its own,
or through a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/sscg_pkg.sv tb/tb_sscg_top.sv --top-module tb_sscg_top -Mdir obj
./obj/Vtb_sscg_top
```

Replace `tb_sscg_top` with any other `tb_*` name to run that testbench.

`tb_sscg_top` runs the closed loop at default parameters. It simulates 665 µs
in about 4 s. It locks in each mode, measures the output frequency over
400-cycle windows for two modulation periods, and checks the following:

* the top and bottom of the profile, against values computed from the table;
* the spread;
* the modulation period;
* an SSC-off run;
* that all four moduli, the Sign toggles, both D limits and the rate switches
  all occurred.

Typical result:

| mode | f max (MHz) | f min (MHz) | spread | period |
|------|-------------|-------------|--------|--------|
| 540  | 540.008     | 537.224     | 5156 ppm | 33.07 µs |
| 540, SSC off | 540.03 | 539.95   | 148 ppm (ripple) | – |
| 270  | 269.985     | 268.664     | 4894 ppm | 33.07 µs |
| 162  | 162.002     | 161.214     | 4865 ppm | 33.07 µs |

The unit testbenches compare each block with an independent model. Their
checks include:

* slope counter sequence and Sign timing;
* SDM 1s count per 256 cycles;
* D against a reference counter;
* MASH output against a two-accumulator model, plus long-run average;
* divider period per code;
* /2 path;
* CP decode;
* PFD pulse widths;
* filter charge balance;
* VCO tuning.

## Interface notes and choices made here

* **Reset.** All logic has an active-low asynchronous reset. Apply it with a
  real falling edge. The modulator runs on the divider output, which stops
  during reset, so the asynchronous edge is the only thing that initialises
  that clock domain. The VCO keeps running through reset. After reset the
  slope counter is at K, counting down, with Sign = 1. D starts at 0 and is
  clamped to Dmin on the first cycle, so the profile starts at its minimum
  frequency and rises.
* **`ssc_en`.** This input is added by this implementation to give the
  unspread clock that spread-spectrum measurements compare against. With
  `ssc_en = 0` the slope modulator is frozen and D is held at Dmax.
* **M1 = 1, M0 = 0** is not a DisplayPort rate: 2 × 30 × 5.4 ≈ 324 MHz.
  In this setting the CP selector picks 10 uA.
* **Modulation frequency.** The modulation frequency is f_ref / (4K). The
  counter steps once per feedback clock, so changing K or the reference
  moves it.
* **Clocking.** Modulator and divider live in different clock domains,
  `fb_clk` and the VCO clock. The code changes right after the reload edge
  and is sampled at the next one, a full period later. M1 and M0 are meant
  to be static: changing them relocks the loop (about 100 µs in simulation)
  and may produce one short divider-input pulse.
* `sscg_top` has a `real` output, `vctrl`, for observation.
* **Assertions.** Concurrent assertions check three ranges: the slope counter
  stays within 0..K, D stays inside the window of its mode, and the divider
  ratio stays within N−1..N+2. Build with `--assert` to enable them.

## Not modelled

* The replica-bias generator and the differential delay cell inside the VCO
  are transistor circuits. Only their combined tuning gain is modelled.
* The output clock buffer and the test circuitry on the chip have no logic
  described and are not included.
* Jitter, supply noise, charge-pump mismatch and leakage are absent from the
  models. Simulated jitter and spectra therefore say nothing about silicon.
