# Light Rabbit: White Rabbit timing without VCXOs

A White Rabbit (WR) node reaches sub-nanosecond synchronisation by steering
two voltage-controlled crystal oscillators (VCXOs) from its SoftPLL, a control
loop that runs in the WR soft core:

* the **helper** oscillator runs at `f·N/(N+1)`. Its clock samples every other
  clock in DMTD phase detectors (DMTD: digital dual-mixer time difference);
* the **main** oscillator becomes the node's time base. It is locked to the
  clock recovered from the Ethernet link.

Many off-the-shelf FPGA boards (ZC706, ZCU102, the Ettus X310 USRP) have no
VCXOs, only fixed programmable oscillators (an Si570 at 156.25 MHz for the
MMCM variant, at 124.975605 MHz for the QPLL variant). Light Rabbit keeps the SoftPLL and its interface unchanged: it still
writes 16-bit DAC words and reads DMTD phase tags. Each VCXO is replaced by a
clocking resource inside the FPGA, fed from an ordinary free-running
oscillator:

| variant | device family | what replaces the VCXO | block here |
|---|---|---|---|
| MMCM | 7-series (ZC706, X310) | an MMCM whose output phase is shifted again and again; a fabric PLL behind it cleans the steps | `mmcm_ps_dac` |
| QPLL | UltraScale+ (ZCU102) | a transceiver QPLL whose sigma-delta fractional-N value is rewritten while it runs | `qpll_sdm_dac` |

This repository holds the fabric logic of such a node:

* the two "DAC replacements" listed above;
* the DMTD phase detector that feeds the SoftPLL;
* a D-DMTD meter, which compares the node's 10 MHz output with that of a
  reference WR switch inside the FPGA.

The SoftPLL, the WR MAC and PTP core, the MMCM/PLL/QPLL primitives,
transceivers and board oscillators are not included. Their signals are ports
of the top module.

```
                 SoftPLL (soft core, outside)
        tags ^                         | helper DAC, main DAC (16 bit)
             |                         v
   +---------+---------+     +-------------------------+
   | phase_detect      |     | ACT_MMCM: 2x mmcm_ps_dac | --> PSEN/PSINCDEC to helper & main MMCM
   |  ch0: clk_rx      |     | ACT_QPLL: 2x qpll_sdm_dac| --> SDM data to QPLL1 (helper),
   |  ch1: clk_main    |     +-------------------------+     QPLL2 (main) = QPLL3 (Ethernet)
   |  sampled by       |
   |  clk_dmtd (helper)|     +-------------------------+
   +-------------------+     | ddmtd_meter N=999 W=62  | <-- 10 MHz node, 10 MHz switch,
                             +-------------------------+     9.99 MHz offset clock
```

## Files

| file | module | role |
|---|---|---|
| `rtl/lr_pkg.sv` | package | shared widths and constants (16-bit DAC, 18-bit SDM, 12-cycle phase-shift interval, N = 999, W = 62); `actuator_e`, `mmcm_ps_t` |
| `rtl/mmcm_ps_dac.sv` | `mmcm_ps_dac` | DAC word to a stream of MMCM phase steps |
| `rtl/qpll_sdm_dac.sv` | `qpll_sdm_dac` | DAC word to QPLL fractional-N value |
| `rtl/dmtd_channel.sv` | `dmtd_channel` | sampler, deglitcher and tagger for one clock |
| `rtl/phase_detect.sv` | `phase_detect` | several DMTD channels on one time base (the SoftPLL's phase detector) |
| `rtl/ddmtd_meter.sv` | `ddmtd_meter` | 10 MHz comparison: phase difference, beat periods, time stamp |
| `rtl/light_rabbit_top.sv` | `light_rabbit_top` | everything wired together; parameter `ACTUATOR` selects the variant |

## Pulling a frequency with phase steps (MMCM variant)

A 7-series MMCM has a dynamic phase-shift port: a one-cycle `PSEN` moves the
output phase by 1/56 of a VCO period, in the direction given by `PSINCDEC`.
The MMCM acknowledges with `PSDONE` 12 `PSCLK` cycles later. A single step is
a phase jump. A regular stream of steps, one every `k` seconds, shortens or
lengthens every output period on average by `(T_vco/56)/k`. That is a
frequency offset, and the MMCM then behaves like a tunable oscillator. A
fabric PLL placed after the MMCM smooths the individual steps.

`mmcm_ps_dac` turns a DAC word into such a stream, in the manner of a
first-order sigma-delta modulator in time:

1. Every 12 `PSCLK` cycles the magnitude part of the DAC word (15 bits) is
   added to a 15-bit accumulator.
2. Each carry out of the accumulator asks for one phase step.
3. The sign bit of the DAC word sets the step direction. It goes straight to
   `PSINCDEC`.

The average rate is `magnitude / 2^15` steps per 12 cycles. The resulting
relative frequency offset is

```
  df/f = (magnitude / 2^15) · (T_vco / 56) / (12 · T_psclk)
```

For example, with a 1 GHz VCO and a 62.5 MHz `PSCLK` the full-scale offset is
about 93 ppm. At full scale the MMCM handshake limits it to 86 ppm (see
below).

Choices this implementation makes where the published description stops:

* **DAC coding.** The word is offset binary, like a VCXO DAC: `0x8000` means
  no shift. Bit 15 is the sign. Above mid-scale the magnitude is bits 14:0.
  Below mid-scale it is their complement, so the rate grows monotonically on
  both sides. The step rate is therefore about `|dac − 0x8000| / 2^15` per
  12 cycles.
* **Polarity.** `PSINCDEC` is the sign bit as it is. Whether "higher DAC"
  means "higher frequency" depends on where the MMCM sits in the clock path.
  The sign of the SoftPLL gains takes care of it. In the MMCM test the
  controller uses `dac = 0x8000 − u`. In the QPLL test it uses
  `dac = 0x8000 + u`.
* **Handshake.** A new `PSEN` is only issued after the previous step's
  `PSDONE` (asserted). Carries that arrive while a step is in flight wait in
  a 2-bit pending count with a direction. A carry in the opposite direction
  cancels a waiting one. When the count is full, the 12-cycle accumulation
  step is held and `stall` is high. No step is ever lost. At full scale one
  step takes 13 cycles (`PSEN` + 12), not 12, so the top 8% of the DAC range
  hits the handshake limit.

Timing: `dac_load` takes effect at the next 12-cycle step. `psen` is a
registered one-cycle pulse, and `psincdec` changes only together with it.
Everything runs in the `PSCLK` domain.

## Fractional-N tuning (QPLL variant)

UltraScale+ QPLLs divide their feedback by `N + SDMDATA/2^18`. They do this by
toggling between N and N+1 under a sigma-delta modulator. Rewriting `SDMDATA`
moves the output frequency without a phase jump. `qpll_sdm_dac` maps the
DAC word onto that value:

```
  offset   = (dac − 0x8000) >>> DAC_SHIFT          (signed)
  sdm_data = clip(CENTER_FRACN + offset, 0, 2^18 − 1)
```

The defaults follow from the ZCU102 clocking, which uses a fixed reference of
124.975605 MHz, just below 125 MHz. With a 10 GHz QPLL VCO, N = 80:

* `124.975605 MHz × (80 + 4096/2^18) = 10.000 GHz`. So `CENTER_FRACN = 4096`
  makes mid-scale DAC give exactly the nominal 125 MHz (within 0.1 ppm).
* One SDM step is `1/(80·2^18) = 4.77e-8`. `DAC_SHIFT = 4` spreads the full
  DAC range over 4096 steps, which is 195 ppm. That is the nearest power of
  two to the intended 200 ppm tuning range.

The range 2048…6143 stays well inside 18 bits, so `sat` never rises at the
defaults. It matters only for other centre or shift values. In the top, the
same value drives the main QPLL and the Ethernet transceiver's QPLL, so the
link runs from the tuned clock. Both change in the same cycle. `sdm_update`
pulses one cycle after `dac_load`.

## DMTD phase tags and the deglitcher

A clock of period T, sampled by an offset clock of period `Ts = T·(N+1)/N`,
turns into a slow square wave, the *beat*. The sampling instant slips by
`Ts − T = T/N` per sample. So the beat repeats every N samples, and one
sample step stands for `T/N` of input phase. The phase of every input
sampled by the same offset clock is thus magnified N times in time. Two
beats can be compared with a plain counter.

Near a beat edge the input edge and the sampling edge are almost aligned.
Jitter then makes the sampled bit toggle randomly for several samples.
`dmtd_channel` handles one input as follows:

* **Sampling.** The input is sampled and passed through one synchronizer
  stage, a latency of 2 cycles that is the same for every channel.
* **Arming.** The channel arms after W consecutive low samples (W = 62).
* **Candidate edge.** On the next high sample it records the value of a
  shared free-running counter as the candidate tag.
* **Confirming.** The tag is published (`tag_valid`) once W consecutive high
  samples have followed. A high run that ends earlier is reported as a
  `glitch`, and the channel waits for the next high sample, still armed.

The tag is therefore the counter value at the start of the first high run
that lasts W samples. The window size W = 62 comes from the published
design; this exact rule is this implementation's own choice. W must stay
below half a beat (499 samples here).

Sign convention: the offset clock is the slower one. An input whose edges
come later is crossed later, so **a later input gives a larger tag**. A delay
of d adds `d·N/T` counts.

`phase_detect` puts `NCH` channels (default 2) on one 16-bit counter. In the
top, channel 0 is the recovered RX clock and channel 1 the main clock, both
sampled by the helper clock. The SoftPLL derives its errors from the tags:

* main loop: `tag_main − tag_rx`;
* helper loop: the RX tags against a reference that advances by one
  nominal beat per tag. Holding that error at zero places the helper at
  exactly `f·N/(N+1)` of the RX clock.

## D-DMTD 10 MHz meter

`ddmtd_meter` compares two 10 MHz clocks inside the FPGA: the node's output
(`in_a`) and the reference switch's (`in_b`). They are sampled by
10 MHz · 999/1000 = 9.99 MHz, provided by an external jitter cleaner. With
N = 999 the beat is 999 samples and one count is 100 ns / 999 = 100.1 ps.
For each tag of `in_b` (once `in_a` has a tag) it outputs:

* `phase_diff`: `tag_b − tag_a` modulo N. It is positive when `in_b` lags.
* `period_a`, `period_b`: the distance between successive tags of each
  input. This is N for a nominal input. For an input with relative frequency
  error e against the offset clock, the period is about `N + N²·e`. One
  count of period therefore means about 1 ppm.
* `timestamp`: the 32-bit free-running counter. It wraps after 430 s, so
  longer records must be extended by whoever reads them.
* `glitch_count`: the number of rejected edges.

A single result resolves 100 ps. Finer phase figures need averaging over
many beats, which is left to whoever processes the results.

## Top module and clock domains

`light_rabbit_top #(parameter actuator_e ACTUATOR = ACT_MMCM)` has three
independent clock domains. Each has its own synchronous, active-high reset.

| domain | ports | contents |
|---|---|---|
| `clk_sys` | `helper_dac*`, `main_dac*`, `helper_ps`/`main_ps` (+`psdone`), `ps_stall`, `sdm_*` | the two DAC replacements. This clock is also the `PSCLK` of both MMCMs and the write clock of the SDM ports. The DAC words must arrive in this domain. |
| `clk_dmtd` (helper clock) | `clk_rx`, `clk_main`, `tag_*` | phase detector |
| `clk_ddmtd` (9.99 MHz) | `ten_mhz_node`, `ten_mhz_switch`, `meas_*` | D-DMTD meter |

With `ACTUATOR = ACT_MMCM` the `sdm_*` outputs are held at 0. With `ACT_QPLL`
the phase-shift outputs are held at 0 and the `*_psdone` inputs are unused.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Behavioural models in
`tb/` stand in for the hard blocks:

* `mmcm_ps_model`: `PSDONE` 12 cycles after `PSEN`; counts net steps and
  any `PSEN` sent while the MMCM is busy.
* `qpll_sdm_model`: a first-order N/N+1 sigma-delta divider.
* `tb_clock_source`: clocks with femtosecond period resolution, a run-time
  phase offset and random jitter.

| testbench | what it establishes |
|---|---|
| `mmcm_ps_dac_tb` | net MMCM steps equal an independent accumulator model across random DAC words of both signs; exact rates at ±half scale and small values; no steps at mid-scale; stall and no lost or early steps at full scale |
| `qpll_sdm_dac_tb` | mapping against integer arithmetic for corners and 200 random words; 195 ppm range; 125 MHz at mid-scale; clipping at both ends; sigma-delta average over 2^18 cycles |
| `dmtd_channel_tb` | exact deglitch rules (61 vs 62 samples, re-arming); tag = sampled transition + 2; 1000-sample beat; glitch rejection under ±400 ps jitter |
| `phase_detect_tb` | tag differences equal delay/100 ps for +12.3 ns, −25 ns and +4 ns (with jitter) |
| `ddmtd_meter_tb` | 999-sample periods; ±5 ns phase (50 / 949 counts); 10 ppm offset gives periods of 1009–1010 and a phase walk of about 10 counts per beat; jitter |
| `light_rabbit_top_tb` | MMCM variant at default parameters, both loops closed. A PI model of the SoftPLL runs two loops. The helper loop holds the RX tags on a reference that advances 1000 counts per beat; this pulls a 10 ppm fast helper oscillator to a 1000-sample beat (1010 before). The main loop locks a 20 ppm fast main oscillator to the RX clock through the main phase-shift DAC, within ±4 counts (±400 ps). It re-locks after a step to 20 ppm slow. The meter sees a beat of about 980 samples before lock and 999 after. Counted, each at least once: up and down steps, helper steps, stall, phase-detector and meter glitches, meter results. |
| `light_rabbit_qpll_tb` | the same two loops for the QPLL variant: helper 10 ppm fast, main ±15 ppm. Main and Ethernet SDM values are equal at every cycle and match the mapping. |

The top-level tests scale every clock to 10 MHz. The helper clock is
100100 ps, giving a 1000-sample beat; the meter's offset clock is
100100.1 ps, giving N = 999. This keeps the runs to a second or two. The RTL
itself runs at its default parameters in these tests.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ps/1ps \
          -y rtl -y tb rtl/lr_pkg.sv tb/light_rabbit_top_tb.sv \
          --top-module light_rabbit_top_tb
./obj_dir/Vlight_rabbit_top_tb
```

Swap in the name of any other testbench. The RTL files carry no
`` `timescale``; `--timescale` gives them the testbenches' 1 ps unit, and
`-Wno-fatal` keeps Verilator's style warnings from stopping the build.

## Where this RTL departs from, or goes beyond, the published design

* **Only numbers and structure are given.** The published description gives:
  * the 16-bit DAC, the add-every-12-cycles accumulation, sign to
    `PSINCDEC` and wrap-around to `PSEN`;
  * the 1/56-VCO step;
  * the 18-bit SDM value formed as centre plus offset, with a 200 ppm range;
  * main and Ethernet QPLLs tuned together;
  * the D-DMTD with N = 999 and W = 62, and the list of its outputs.

  Everything else is this implementation's own choice: DAC coding, pending
  and stall handling, the deglitch rule, counter widths, the SDM arithmetic
  and its defaults, clock-domain assignment, the shared phase-detector
  counter.
* **`CENTER_FRACN` and `DAC_SHIFT` assume N = 80** and a 10 GHz VCO. They are
  derived from the 124.975605 MHz reference rather than given outright.
* **Resolution.** With N = 999 one D-DMTD count is 100 ps. A 10 ps figure
  can only come from averaging.
* **No clock-domain crossing for the DAC words.** They must be written in
  the `clk_sys` domain.
* **The SoftPLL exists only as a testbench model.** Its two PI loops have
  simple fixed gains and no lock detection or start-up sequencing.
* **Not modelled:**
  * the cleaning PLL after the MMCM;
  * the phase-noise consequences of the step stream;
  * the PPS output and its measurement;
  * the clock chips of the FMC clocking card.
