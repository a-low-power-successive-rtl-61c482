# Low-power SAR ADC that reuses the previous sample

An 8-bit, 10 kS/s successive-approximation ADC for biomedical signals such
as ECG. Such signals barely move between most consecutive samples and only
jump now and then (the QRS complex of a heartbeat). A conventional SAR ADC
ignores this. It grounds its capacitor array for every sample and runs a full
N-step binary search. The big MSB capacitors switch every time, and the
comparator fires N times.

This converter starts from the previous result instead. It spends one extra
cycle checking whether the new sample lies in the same coarse window as the
previous one. If so, it leaves the M = N − K most significant bits as they
were. It then searches only the K least significant bits and turns the
comparator off for the rest of the conversion. If the sample has left the
window, it does a normal full search. Either way, the output code is the same
one a conventional SAR would produce. Only the energy spent differs.

The default configuration has N = 8, K = 4, Vref = 1 V and a 100 kHz clock.
That gives 10 cycles per sample, or 10 kS/s.

## The conversion frame

Every conversion takes exactly N + 2 clock cycles, whichever path it takes:

| cycle        | phase    | DAC (capacitor switches)                        | comparison                  |
|--------------|----------|-------------------------------------------------|-----------------------------|
| 0            | SAMPLE   | previous result, unchanged                      | V_H ≥ previous level?       |
| 1            | DECIDE   | MSBs unchanged; K LSBs all 1 (went up) or all 0 (went down) | inside the window?   |
| 2 … K+1      | CONVERT  | short path: binary search on the K LSBs         | one bit per cycle           |
| K+2 … N+1    | CONVERT  | short path: final code held                     | comparator **off**          |
| 2 … N+1      | CONVERT  | full path: binary search on all N bits from 100…0 | one bit per cycle         |

During DECIDE the DAC sits at one edge of the previous sample's window.
Write p_MSB for the previous code's top M bits:

* V_DAC,H = (p_MSB · 2^K + 2^K − 1) · Vref / 2^N. This is the highest level with those MSBs.
* V_DAC,L = (p_MSB · 2^K) · Vref / 2^N. This is the lowest level.
* V_DAC,H − V_DAC,L ≈ Vref / 2^M. For the default this is 1/16 of full scale, or 62.5 mV.

A sample that went up is inside the window when it is below V_DAC,H. A sample
that went down is inside when it is at or above V_DAC,L. Inside the window,
the top M bits of the answer must equal p_MSB. So searching the K LSBs with
the MSBs held gives exactly the conventional code. Outside the window the full
search runs. A sample exactly on a level counts as "at or above". This keeps
the code equal to floor(V_in · 2^N / Vref).

### Worked example (N = 4, K = 2, previous code 1001)

| new sample's code | path             | DAC code in cycles 0‥5                  | result |
|-------------------|------------------|-----------------------------------------|--------|
| 1010 (went up)    | short            | 1001, 1011, 1010, 1011, 1010, 1010      | 1010   |
| 1000 (went down)  | short            | 1001, 1000, 1010, 1001, 1000, 1000      | 1000   |
| 1110 (went up)    | full             | 1001, 1011, 1000, 1100, 1110, 1111      | 1110   |
| 0010 (went down)  | full             | 1001, 1000, 1000, 0100, 0010, 0011      | 0010   |

In the short rows only C_3 and C_4 (the two smallest capacitors) ever move,
and the comparator is off in cycles 4 and 5. `sar_ctrl_tb` checks these four
sequences cycle by cycle.

### What is saved, and where

* **DAC.** In a short conversion only the K small capacitors switch, so the
  charge taken from Vref is roughly 2^M times smaller than for a full
  search. No capacitor is grounded between samples, because the DAC has to
  hold the previous code for the first comparison. This also means the MSB
  capacitor C_1 is not recharged for every sample.
* **Comparator.** In a short conversion it makes K + 2 decisions instead of
  N + 2. It is off for M of the N + 2 cycles, which is 40 % for the default.
* **Logic.** The sequencer is a little larger than a plain SAR.

`sar_adc_tb` converts two beats of a synthetic ECG (16 000 samples at
10 kS/s). It counts the same quantities for this design and for a
conventional SAR that converts the same codes:

| measure (synthetic ECG, N = 8, K = 4)     | this design | conventional | saving |
|-------------------------------------------|-------------|--------------|--------|
| comparator decisions per sample           | 6.05        | 8            | 24 %   |
| comparator-enabled cycles per 10-cycle frame | 6.05     | 10           | 39.5 % |
| DAC charge from Vref (Cu·Vref, 16 000 samples) | 3.19 · 10^5 | 2.36 · 10^6 | 86.5 % |
| conversions on the short path             | 15 797 of 16 200 (including 200 random jumps) | — | — |

These are switching counts for ideal models. They are not power figures. The
architecture was first presented with circuit-level simulations of a 1-V
design in 0.18 µm CMOS, run on a recorded ECG. Those simulations showed 74 %
less DAC power and 38 % less comparator power, with about 30 % more logic
power. Overall, that is 52 % less power for the ADC. The DAC saving here is
larger than 74 %. The synthetic signal is smoother than a real recording, and
the model leaves out parasitic and driver losses.

## Blocks

```
            v_in ──► sample_hold ──V_H──► (−)
                        ▲ sample            comparator ──comp──► sar_ctrl ──► dout, dout_valid, lsb_mode
                        │                  (+)     ▲ comp_en         │
                        │                   ▲      └─────────────────┤
                        │                 V_DAC                      │ dac_code[N-1:0]
                        │                   └──────── cap_dac ◄──────┘
                        └──────────────────────────────────────────── sar_ctrl.sample
```

| file                   | kind                  | what it is |
|------------------------|-----------------------|------------|
| `rtl/adc_pkg.sv`       | package               | N, K and Vref defaults, and the `phase_e` enum |
| `rtl/sar_ctrl.sv`      | synthesizable RTL     | SAR register and sequencer: the algorithm above |
| `rtl/cap_dac.sv`       | behavioural model     | binary-weighted capacitor array (C_i = 2^(N−i)·Cu plus a dummy Cu), ideal V_DAC, running Vref charge |
| `rtl/comparator.sv`    | behavioural model     | ideal comparator with power-down, counts decisions |
| `rtl/sample_hold.sv`   | behavioural model     | ideal track-and-hold |
| `rtl/sar_adc.sv`       | top                   | the four blocks wired as a converter |

Only `sar_ctrl` is meant for synthesis. On a chip, the other three are analog
circuits. Their models carry `real` voltages, and they exist so the
controller can be simulated in a closed loop.

### `sar_ctrl` interface and timing

* `comp` is high when V_DAC (on the + input) is above V_H (on the − input).
  The bit under test therefore becomes `!comp`. The controller reads `comp`
  at the rising edge that ends the cycle in which `dac_code` was applied. A
  real latched comparator has to resolve within that cycle.
* `sample` is high for the one SAMPLE cycle. The S/H holds from its falling
  edge onward.
* `dac_code[N−i]` switches C_i. A 1 connects the bottom plate to Vref, a 0
  connects it to Vss.
* `comp_en` goes low only during the M sleep cycles of a short conversion.
* `dout` (with `dout[N−1]` = D_1, the MSB) and `lsb_mode` update together
  with a one-cycle `dout_valid` pulse. The pulse comes at the edge that ends
  the last conversion cycle, and there is one every N + 2 cycles.
* `rst_n` is an asynchronous, active-low reset. It clears the code, so the
  first sample is compared with 0 V, and it starts in SAMPLE. Conversions
  then run back to back, with no start signal.
* Assertions check two rules. A search always ends inside its N-cycle frame,
  and the MSBs do not move during a short conversion. An elaboration check
  requires 1 ≤ K < N.

The controller is about 62 word-level cells and 29 flip-flops at N = 8.

### The DAC charge model

The top plates of the array form a floating node that is never reset, so
V_DAC = Vref · code / 2^N. When the switches go from code a to code b, only
the capacitors that end up on Vref exchange charge with it. In units of
Cu·Vref, with A = a/2^N and B = b/2^N, the charge drawn is

    dQ = b · (1 − B + A) − (a AND b)

A negative value means charge is returned. The sum is the `q_ref` output. As
a check, the first step of a full search, from 0 to 100…0, draws 2^(N−2)
Cu·Vref.

## Choices made in this design

The switching algorithm, the N + 2 cycle frame, N = 8, K = 4 and the
10 kS/s rate come from the published architecture. The following are this
design's own choices:

* The first comparison happens at the edge that ends the sampling cycle, and
  each phase lasts whole clock cycles.
* Exact window edges and ties (see above).
* The reset, the back-to-back operation, and the `dout_valid`/`lsb_mode`
  outputs.
* The output of a disabled comparator is held low.
* Vref = 1 V, which equals the supply.
* All analog parts are ideal: no mismatch, offset, noise, settling, charge
  injection or droop.
* The charge and decision counters in the models, and the observation ports
  of the top (`phase`, `comp_en`, `dac_code`, `v_dac`, `q_ref`,
  `switch_events`, `comp_decisions`).

The conventional SAR used for comparison is only computed inside
`sar_adc_tb`. It is not part of the RTL.

## Simulating

Each testbench prints `TB_RESULT checks=… failures=…` and ends with
`$finish`. They need Verilator 5 with `--timing`:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module sar_adc_tb \
  -y rtl -y tb +libext+.sv -Irtl rtl/adc_pkg.sv tb/sar_adc_tb.sv -o sim
./obj_dir/sim
```

| testbench               | what it runs |
|-------------------------|--------------|
| `tb/sar_ctrl_tb.sv`     | The controller against integer "analog". It runs 608 random-walk and edge-case conversions at N = 8, K = 4, and the four 4-bit example sequences. |
| `tb/cap_dac_tb.sv`      | V_DAC levels and hand-computed charge steps (4-bit), plus full-scale levels (8-bit). |
| `tb/comparator_tb.sv`   | Polarity, power-down and decision counting. |
| `tb/sample_hold_tb.sv`  | Tracking and holding. |
| `tb/sar_adc_tb.sv`      | The whole converter at its defaults: 16 000 ECG-like samples plus 200 random jumps. It checks codes, the frame, the path taken and comparator sleep, and prints the saving figures. |
| `tb/sar_adc_ksweep_tb.sv` | Seven converters with K = 1 … 7 side by side, each checked for codes, path and comparator activity. |

To change the resolution or the window, set `N` and `K` on `sar_adc`, or
change the defaults in `adc_pkg`. K trades off the window width (Vref / 2^(N−K))
against the saving in each short conversion. A larger K catches faster
signals but saves less per conversion. The sample rate is f_clk / (N + 2).
