# Fast-lock, jitter-filtering all-digital DLL for a burst-mode memory interface

A DRAM read interface needs a DLL on the memory side. The DLL aligns the data strobe (DQS), which
comes out at the end of a long clock distribution, with the controller's clock (CK). A conventional
DLL needs hundreds of cycles to lock, so it is left running in every idle mode, and that wastes
power. This design turns the DLL fully off whenever the DRAM is not reading. An ACT or RD command
wakes it. It then locks in **3 reference cycles** (under 2 ns at 1.6 GHz), so the read path adds no
latency.

Three ideas make that possible:

1. **Open-loop fast lock.** A two-step time-to-digital converter (TDC) measures the delay of a
   replica of the clock distribution in one shot. The measured 6-bit code is applied directly.
2. **Complementary mapping.** The DLL must add a delay of `T - t_dist`, where `T` is the period
   and `t_dist` the distribution delay. The TDC measures the reference phase at the end of a
   replica of the distribution. The code it gives therefore counts *down* from `T` when it drives
   the phase generator, which is built to output `T - code*T/64`. No subtraction is needed, and
   the code can go straight from the TDC to the output.
3. **An injection-locked ring oscillator (ILO) as the phase generator.** Its 8 stages are
   injected from the reference at a position chosen by the code. Because the output is always
   taken at the same stage, the phase is what moves, not the delay path. The ILO regenerates a
   clean 50 % duty-cycle clock, so it also removes input duty-cycle distortion and filters
   high-frequency input jitter.

After the 3-cycle lock, the TDC is powered down. A slow closed loop then tracks voltage and
temperature drift: a bang-bang phase detector, a decimator and a phase accumulator, which starts
from the TDC code.

## Timeline of a wake-up

```
cmd        ACT/RD
state      IDLE | FAST_BIAS (4 cyc) | FAST_LOCK (3 cyc)        | READY ...      PRE -> IDLE
DLL mode   OFF  | OFF               | FL: coarse, fine, apply  | TRACK ...
TDC power  off  | off               | on                       | off
ILO        off  | free-running      | injected at TDC code     | injected at accumulator code
```

- **Fast bias** brings the analog bias up in about 2 ns. At 1.6 GHz that is 4 reference cycles
  (`FAST_BIAS_CYCLES`).
- **Fast lock** takes 3 cycles, set by `lock_preset`:
  - cycle 1: the coarse TDC code is registered;
  - cycle 2: the fine code is registered;
  - cycle 3: the 6-bit code drives the injectors, and the accumulator is loaded with it.
- The power manager raises `link_ready` only when the DLL reports tracking.
- PRE, power-down entry (PDE), refresh (REF) and self-refresh (SRE) return everything to idle.
  With the DLL off, the injectors and the TDC are off and the tracking loop is frozen. The accumulator keeps its last value, but the next fast lock overwrites it.

## The two-step TDC

The coarse step uses an 8-stage differential delay line, so it has 16 taps spaced `T/16`
(39 ps at 1.6 GHz). All 16 taps are sampled by the reference clock after that clock has passed a
replica of the distribution. That sample is the 16-bit thermometer word `coarse_raw`.
`coarse_tdc_decode` looks for the 1→0 transition:

- the index `m` with `raw[m]=1, raw[m+1]=0` (circular);
- the lowest one wins if there are bubbles;
- an all-0 or all-1 word is flagged invalid.

`m` picks the two adjacent taps that bracket the sampling edge. A phase blender splits that
interval into four phases φ0..φ3, spaced `T/64`. A matched delay samples them a second time,
giving `fine_raw`. `fine_tdc_decode` turns those 4 bits into 2 by counting the leading ones and
subtracting one. φ0 coincides with the early tap and normally reads 1.

The 6-bit code is `{coarse, fine}`. One LSB is `T/64`, which is 9.77 ps at 1.6 GHz.

In `dll_digital`, the coarse code is registered in the first cycle and also steers the blender's
multiplexer (`coarse_sel`). The fine code is registered in the second cycle. The coarse value
used is the one that steered the blender: it has to pair with the fine bits. The TDC analog part,
`tdc_frontend_model`, is behavioural. It computes the sampler outputs from time stamps.

The TDC delay line is not locked to the reference by a loop of its own. It is built from the same
cells as the ILO and shares its tuning code. Calibrating the ILO's free-running frequency to the
reference therefore also sets the TDC stage delay to `T/16`. The model follows this: its stage
delay is `1/(16 f(tune))`. A residual calibration error stretches or shrinks every tap
proportionally.

## ILO injection, weights and polarity

The ring has 8 stages, each `22.5°` apart. Each stage can also be taken inverted (polarity), so 16
phases are available. To reach 64 steps, **two adjacent stages are injected at once** with
complementary strengths. The code `{h, s[2:0], f[1:0]}` maps as follows
(`injection_ctrl`):

- Stages `s` and `s+1` (mod 8) are enabled. Their weights are `4-f` and `f`, each on a 3-bit bus
  per stage.
- `coarse_onehot[s+1]` marks the active pair: bit `k` means injectors `k-1` and `k`.
- Polarity is `h` (the half-cycle bit) on every stage, with two exceptions:
  - the pair (7,0) wraps round the ring, so stage 0 must sit 180° further on. Stage 0 is
    inverted relative to `h` whenever the pair is (6,7) or (7,0).
  - Stage 7 is likewise inverted for pairs (0,1) and (1,2).

The polarity of a stage is set before that stage is enabled, whenever the code approaches the
crossing. So the code can walk through 180° and 360° without a glitch, where a single global
polarity would flip the whole ring at once. All outputs are registered on the same edge. The
stage-0 rule is therefore the one that matters for correctness. The stage-7 rule only touches an
inactive stage and is kept because the scheme specifies it.

`ilo_demux_model` is behavioural:

- It decodes the injected phase `c = 32*pol + 4*s + weight_of_upper_stage`. On every reference
  rising edge it produces a rising output edge `T - c*T/64` later, and a falling edge `T/2` after
  that.
- Without injection it free-runs at `400*(1 + 3*tune/255)` MHz. That covers 400 MHz to 1.6 GHz,
  which is 800 Mb/s to 3.2 Gb/s DDR.

## Continuous tracking

- `bbpd` samples the replica-buffered DLL output (`fb_clk`) at the reference rising edge and
  retimes it once. A 1 means the feedback is early.
- `decimator` (`K_D = 1/4`) takes a majority over 4 decisions. It issues `dec` if the feedback is
  early, `inc` if it is late, and nothing on a 2-2 tie.
- `phase_accumulator` holds `6 + FRAC_MAX` bits.
  - Each step adds `±2^(FRAC_MAX - kdpc_sel)`.
  - So one update moves the output code by 1/2^0, 1/2^1, 1/2^2 or 1/2^3 LSB.
  - This gives `K_DPC` from 1/64 to 1/512 of a cycle per update.
  - The code is the top 6 bits and wraps modulo one cycle. That is where the glitch-free polarity
    crossing is used.
- A larger code means less delay (`T - code*T/64`). An early feedback therefore asks for a
  *smaller* code.

At `kdpc_sel = 0` the loop slews at most 9.77 ps every 4 cycles. With a constant supply, the
measured steady-state dither at 1.6 GHz depends on the gain:

| Gain | Codes spanned |
|---|---|
| `K_DPC` = 1/64 | 4 |
| 1/128, 1/256, 1/512 | 2 |

The loop latency is about 1.5 updates. It is made up of:

- the two detector flops;
- the registered decimator and injector outputs;
- the ILO;
- the 930 ps replica.

At the coarsest gain the limit cycle is one code wider than the 2 to 3 codes expected of such a
loop. Making the decimator outputs combinational, which removes one cycle, does not change this.
The finer gains exist for this reason: they trade bandwidth for less dither.

## ILO frequency calibration

`ilo_freq_cal` tunes the ILO's free-running frequency to the reference before first use. The
same code sets the TDC stage delay, so this step fixes the resolution of both converters. The
method is a successive-approximation search over the 8-bit `tune`:

1. Set the trial bit and wait `SETTLE` cycles.
2. Open a gate for `WIN` (256) reference cycles. The gate is synchronized into the ILO domain.
3. Count the ILO edges inside the gate.
4. Keep the bit if the count is `<= WIN`.

A full calibration takes about 2100 reference cycles, which is 8 trials of `WIN + SETTLE + 2`.
The 8-bit code leaves at most about 0.8 % frequency error. That is well under one phase step at
the last coarse tap. A 6-bit code would leave up to 2.7 % error at 450 MHz.

Calibration runs while the DLL is off, with the ILO powered for it. Recalibrate after a rate
change.

## Power manager / CA decoder

`power_manager` has four states: `PM_IDLE`, `PM_FAST_BIAS`, `PM_FAST_LOCK` and `PM_READY`.

- Triggers are RD always, and ACT if `TRIG_ON_ACT` is set.
- It drives:
  - `bias_en` (fast bias onward);
  - `dll_en` (fast lock onward);
  - `link_ready` (ready);
  - a one-cycle `wake` pulse.
- The command encoding is the 3-bit enum `dll_pkg::ca_cmd_e`. It is this design's own encoding,
  not a JEDEC one.

## Hierarchy

```
burst_mem_if                 top (simulation model: contains behavioural parts)
├── power_manager            rtl
├── fast_lock_dll            behavioural wrapper
│   ├── clk_dist_model       replica of the distribution, clocks the TDC samplers
│   ├── tdc_frontend_model   delay line, samplers, blender (behavioural)
│   ├── dll_digital          rtl: all synthesizable DLL logic
│   │   ├── mode_counter, coarse_tdc_decode, fine_tdc_decode
│   │   ├── phase_accumulator, bbpd, decimator, injection_ctrl
│   ├── ilo_freq_cal         rtl
│   ├── ilo_demux_model      ILO + injectors (behavioural)
│   └── clk_dist_model       replica buffer in the tracking feedback
└── clk_dist_model           the real distribution: clk_dll -> dqs_clk
```

- `dll_pkg` holds the shared widths and the enums.
- `clk_dist_model` is a transport delay of `T_BUF_PS - KV_PS_PER_MV*dv_mv`, with
  `Kv = 1.1 ps/mV`. `dv_mv` is a signed supply deviation that the testbench drives. The same
  `dv_mv` feeds all three copies, so replica and distribution track each other.
- The distribution's nominal delay (930 ps) is this design's own choice. The original design specifies
  only its length, 1 mm. 930 ps puts the locked code near 31/32, so the tests cross the 180° point.

## What is modelled and what is not

- **Synthesizable:** `dll_digital` and everything below it, `ilo_freq_cal` and `power_manager`.
  - Clock domains: everything runs on the reference clock, except the edge counter in
    `ilo_freq_cal`.
  - The sampler words are taken directly on the reference clock. They are assumed stable for a
    cycle, as in the front end they come from.
- **Behavioural:** the delay lines, samplers, blender, ILO and buffers. These are ideal:
  - no jitter;
  - no blender nonlinearity;
  - the ILO output duty is fixed at 50 %, which stands in for its jitter and duty-cycle filtering;
  - there is no lock-range limit.
- **Not built:**
  - the fast-bias circuit itself (only its enable and settling time);
  - the DQ transmitters, receivers, equalizers and receive phase shifters of the two-lane link;
  - the controller-side clock transmitter;
  - the alternative of full duty correction with a pulse generator and a second ILO, which the
    scheme describes but does not use;
  - the one-time calibration code for the distribution's own duty-cycle distortion. Only its
    existence is specified, not how the code is found or applied;
  - programmable injection strength. In the real ILO it sets the jitter-filtering bandwidth.
    The ILO model has no jitter, so there is nothing for it to act on.

  Where the link would attach, `dqs_clk` and `link_ready` are the ports to use.

## Departures and own choices

- Thermometer rules (lowest transition wins, invalid on no transition) and the fine rule
  (leading ones − 1) are this design's own.
- Weights are 3-bit values 0..4 per stage. The original drives a wider thermometer-style weight
  bus, whose encoding is not specified. A one-hot `coarse_onehot` is provided alongside.
- Injection stays off during the first two fast-lock cycles, until the TDC code exists. Meanwhile
  the ILO free-runs.
- The decimator is a majority vote over 4 decisions.
- At the coarsest tracking gain the code dithers over 4 codes instead of 2 to 3. See Continuous
  tracking.
- `K_DPC` is selected by 2 bits that set how many fraction bits the accumulator uses.
- The fast-bias time of 2 ns is rounded up to 4 cycles at 1.6 GHz.
- Reset is asynchronous and active-low.
- The tune code is 8 bits, with a linear frequency law. The calibration window is 256 cycles.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| dll_pkg | PHASE_BITS / COARSE_TAPS / FINE_TAPS / ILO_STAGES | 6 / 16 / 4 / 8 | code width and tap counts |
| decimator | DECIM | 4 | `K_D = 1/DECIM` |
| phase_accumulator | FRAC_MAX | 3 | `K_DPC` down to 1/2^(6+FRAC_MAX) |
| mode_counter | CNT_BITS | 4 | preset width (preset input, default 3 in the tests) |
| power_manager | FAST_BIAS_CYCLES, TRIG_ON_ACT | 4, 1 | bias settle, ACT as trigger |
| ilo_freq_cal | TUNE_BITS, WIN, SETTLE | 8, 256, 6 | search width, count window, settle |
| tdc_frontend_model | TUNE_BITS, F_MIN_MHZ, F_MAX_MHZ | 8, 400, 1600 | delay-line tuning (shared with the ILO) |
| ilo_demux_model | TUNE_BITS, F_MIN_MHZ, F_MAX_MHZ | 8, 400, 1600 | free-running range |
| fast_lock_dll, burst_mem_if | TUNE_BITS, CAL_WIN | 8, 256 | passed to the calibration and models |
| clk_dist_model | T_BUF_PS, KV_PS_PER_MV | 930, 1.1 | distribution delay and supply gain |

## Simulating

Every block has a self-checking testbench in `tb/`, named `tb_<module>`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/dll_pkg.sv tb/tb_burst_mem_if.sv \
          --top-module tb_burst_mem_if -Mdir obj && ./obj/Vtb_burst_mem_if
```

All files use `timeunit 1ps; timeprecision 1fs;`. The delay models schedule edges with
`fork ... join_none` and automatic copies of the value, not intra-assignment delays, so that
overlapping edges are kept.

### `tb_burst_mem_if` (end to end, default parameters, 1.6 GHz)

The sequence:

1. Calibration.
2. Idle with no output clock.
3. ACT wake-up. The test checks:
   - 4 fast-bias cycles;
   - 3 lock cycles;
   - the TDC powered off afterwards;
   - the first DQS edge within one LSB of CK.
4. Tracking.
5. A −20 mV supply step, which walks the code across the 180° point. Then recovery.
6. PRE. No DQS is expected afterwards.
7. An RD wake with a 60/40 input clock. The DQS high time is checked as `T/2`.
8. The finest `K_DPC` with a 10 mV drift.
9. Power-down entry.

The test counts each mechanism and fails if one never happened:

- calibration;
- ACT and RD wake;
- fast bias;
- fast lock;
- mode switch;
- TDC power-off;
- inc/dec steps;
- polarity crossings in each direction;
- power-down;
- duty correction;
- fine gain.

### `tb_dll_workloads` (operating points)

This test runs the DLL alone at 400, 450, 800 and 1600 MHz, which is 0.8 to 3.2 Gb/s. At each
rate it:

- recalibrates the ILO;
- wakes the DLL at three supply offsets;
- checks the 3-cycle lock, a first edge within `T/64`, and tracking.

At 1.6 GHz it also checks two further things:

- the first locked edge comes less than 13 ns after enable. The worst case measured is 4.1 ns;
- the steady-state dither at each of the four gains.

At 1.6 GHz it then applies a ±110 mV triangular supply sweep with a 2.2 µs period. That is ±10 %
of a nominal 1.1 V supply, and the period is this test's own choice. Unfiltered, the sweep would
move the edge by 242 ps peak to peak. The loop holds it within 3 steps (29 ps), with the code
travelling from 17 to 45.

### Block tests

- `tb_fast_lock_dll` runs the DLL alone over eight supply offsets.
- `tb_dll_digital` drives the digital core from an idealized front end. It checks each element
  against an independent reference model:
  - the 3-cycle lock;
  - the TDC code for 24 random delays;
  - every accumulator step.
