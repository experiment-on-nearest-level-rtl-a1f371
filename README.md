# Nearest level modulation controller for a 13-level modular multilevel converter

A modular multilevel converter (MMC) builds its AC voltage from a stack of
identical half-bridge sub-modules (SMs), each holding a capacitor charged to
about V_DC/N. Every phase leg has an upper arm and a lower arm of N SMs in
series; an SM is either *inserted* (its capacitor is in the arm) or
*bypassed* (the arm current goes around it). The controller therefore has two
jobs, many thousands of times per second:

1. decide **how many** SMs each arm inserts, so that the leg midpoint follows
   a sine reference (nearest level modulation, NLM);
2. decide **which** SMs those are, so that all capacitors stay at the same
   voltage (capacitor voltage balancing).

This RTL does both for a three-phase converter with six SMs per arm (twelve
per phase), runs from a single 50 MHz clock, reads 36 capacitor voltages and 6
arm currents through six 12-bit SPI ADCs, and drives 36 gate signals (72 after
the complementary dead-time stage). It follows the structure of a published
FPGA experiment on such a converter; the parts that publication leaves open
were filled in here and are listed below.

```
 ref_sine_gen ──vref[3]──► nlm_level ×3 ──n_h,n_l──► cap_balance ×6 ──insert──► pwm_gen ──► dead_time_gen ──► S1/S2
 (DDS, 50 Hz)              (quarter-step                ▲  (sort, pick by          (duty full   (complementary
                            rounding)                   │   current sign)           or zero)     pair, dead time)
                                    adc_capture ────────┘
                                    (6 × MCP3208-type ADC, 100 kHz, SPI)
```

## The quarter-step rounding: 13 levels from 6 SMs per arm

With plain nearest-level rounding, each arm inserts `round(x)` SMs where

```
x_L = (N/2)(1 - m·r)     x_H = (N/2)(1 + m·r)      r = reference in [-1, 1]
```

Since `x_L + x_H = N`, the two arms switch at the same instants, the leg always
inserts exactly N SMs, and the phase voltage `v_e = (v_L - v_H)/2` has N+1
levels.

The modified rounding used here shifts both arms by a quarter level:

```
n = round025(x) = floor(x + 0.75)
```

Arm L now changes when `x_L` passes `k + 0.25`, and arm H when `x_H` passes
`k + 0.25`, i.e. when `x_L` passes `k + 0.75`. The two arms therefore switch
half a level apart, the total `n_L + n_H` alternates between N and N+1, and
the phase voltage moves in steps of V_C/2:

| interval | x_L | n_L | n_H | n_L + n_H | v_e / V_C |
|---|---|---|---|---|---|
| just after arm L steps down | M+0.25 → M-0.25 | M | N-M | N | M - N/2 |
| just after arm H steps up | M-0.25 → M-0.75 | M | N-M+1 | N+1 | M - N/2 - 1/2 |

Each arm still takes N+1 = 7 levels, but the phase voltage takes 2N+1 = 13,
which is what the hardware output calls `level = n_l - n_h + 6` (0..12).
The deviation of the phase voltage from its reference stays within V_C/4.

`nlm_level` computes this in integers: the 8-bit reference sample `vref`
(full scale 128) times the modulation index `m_q8` (Q8, 256 = 1.0) gives
`num = N·(2^15 ± m_q8·vref)`, which is `x` in units of 2^-16, and
`n = (num + 0.75·2^16) >> 16`, clamped to 0..N. The sign convention is
`n_l` falling while the reference rises; swapping it only shifts the
waveform by half a period.

## Choosing which SMs: sort, then pick by current direction

`cap_balance` (one per arm) ranks the six capacitor voltages in ascending
order (ties broken by SM number) with a parallel comparison: the rank of SM i
is the number of SMs that sort before it. `sorted_idx[r]` lists the SM of each
rank, the "sorted voltages plus index" list of the classic balancing scheme.

* Arm current ≥ 0 charges inserted capacitors, so the `n_ins` **lowest**
  voltages are inserted.
* Arm current < 0 discharges them, so the `n_ins` **highest** are inserted.

To keep the switching frequency low, the order is only renewed when some
capacitor leaves the band `Vavg ± DELTA_V` around the arm average (tested as
`6·V_i` against `sum ± 6·DELTA_V`, without a divider). While all stay inside,
the previous order is reused, so an unchanged `n_ins` keeps the same SMs
inserted. `resort` pulses when a new order was taken. In the end-to-end test
this keeps each arm's spread at about 2·DELTA_V, starting from a spread of up
to 200 codes.

The arm current arrives as an offset-binary ADC code; `I_ZERO = 2048` is taken
as zero current.

## Measurements

`adc_capture` starts an SPI frame every 500 clocks (100 kHz). The six ADCs
share chip select, clock and command line and each returns its result on its
own MISO, so one frame converts the same channel on all six chips
(`adc_spi_master`). The frame is the usual single-ended read of an MCP3208:
start, single-ended and three channel bits on rising edges 1–5, a null bit,
then 12 bits MSB first on rising edges 8–19, SPI mode 0, SCLK = 50 MHz/24.
A frame takes 457 clocks. The channel steps 0..7, so a full scan of all 48
inputs takes 80 µs and ends with `scan_done`.

Input `idx = 8·adc + channel` is mapped as follows:

| idx | meaning |
|---|---|
| 0–35 | capacitor voltage `vcap[arm][k]`, arm = idx/6, k = idx%6 |
| 36–41 | arm current `iarm[idx-36]` |
| 42–47 | unused |

Arm numbering everywhere is `arm = 2·phase + 0` (upper) or `+ 1` (lower).

## Reference generator

`ref_sine_gen` is a configuration register bank (`dds_config`) plus three DDS
channels (`dds_sine`). Each channel has a 32-bit phase accumulator and a
1024-entry, 8-bit signed sine table (±127). The table is computed when the
design is elaborated: entry k is `round(127·sin(2πk/1024))`, evaluated by an
integer Taylor series in Q28 and folded into the first quadrant. After reset
the increment is 4295 (2^32·50 Hz/50 MHz, giving 50.0004 Hz, a period of
999,992 clocks) and the phase offsets are 0, 1431655765 and 2863311531
(0°, 120°, 240°). `cfg_we/cfg_addr/cfg_wdata` can rewrite them: address 2k is
the increment of channel k and 2k+1 is its offset.

## Gate pulses and dead time

`pwm_gen` is an edge-aligned counter/compare PWM with a 500-clock period and
shadowed duties. Under NLM every duty is either the full period (inserted) or
zero (bypassed), so in practice it re-times the selection to its 10 µs period
grid. `dead_time_gen` turns each pulse into the half-bridge pair: S1 (upper
switch, inserted) = pwm and S2 (lower switch, bypassed) = NOT pwm. After
every change of pwm both switches stay off for `DEAD` = 50 clocks (1 µs).
After reset both are off for the dead time, then every SM is bypassed.

## Timing through the chain

| stage | latency |
|---|---|
| DDS accumulator → `vref` | 1 clock |
| `vref` → `n_h`, `n_l`, `level` | 1 clock |
| measurement → stored value | the frame that reads it; each input is refreshed every 80 µs |
| `scan_done` → SM selection | 1 clock (the selection uses `n_ins` and voltages of that moment) |
| selection → `gate_pwm` | next PWM period boundary, 2 to 502 clocks |
| `gate_pwm` edge → new switch on | DEAD + 2 clocks; the old switch is off after 1 clock |

Both `nlm_level` and the ADC run continuously. The balancing layer samples
the modulator only once per ADC scan (12.5 kHz). At 50 Hz a single arm level
lasts at least about 1 ms, so a level change reaches the gates at most about
90 µs late (one scan plus one PWM period).

## Top-level interface (`mmc_nlm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 50 MHz clock, asynchronous active-low reset |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | 1, 3, 32 | DDS settings (optional) |
| `m_q8` | in | 9 | modulation index, 256 = 1.0 |
| `adc_cs_n`, `adc_sclk`, `adc_mosi` | out | 1 | shared SPI bus |
| `adc_miso[6]` | in | 1 | one result line per ADC |
| `gate_pwm[6][6]` | out | 1 | per-SM pulse, 1 = inserted |
| `gate_s1[6][6]`, `gate_s2[6][6]` | out | 1 | upper/lower switch after dead time |
| `vref[3]` | out | 8 | reference samples |
| `n_h[3]`, `n_l[3]` | out | 3 | SMs to insert per arm |
| `level[3]` | out | 4 | phase output level 0..12 |
| `scan_done` | out | 1 | an ADC scan has finished |
| `bal_resort[6]` | out | 1 | the arm renewed its voltage order |

## What follows the original and what was chosen here

Taken from the published design:
* the block chain: configuration and DDS, NLM level discretisation, ADC
  block, sorting and balancing, PWM generator, gate outputs;
* the 50 MHz clock, the 32-bit DDS phase with 8-bit output, the increment 4295
  and the three phase offsets;
* six SMs per arm, 13 phase levels and 7 arm levels;
* the NLM formula with quarter-step rounding;
* six 8-channel 12-bit SPI ADCs at 100 kHz, reading 36 voltages and 6 currents;
* sorting by voltage and selecting by current direction, with a ±ΔV
  tolerance band;
* complementary switch signals made by a dead-time stage.

Chosen here, because the original gives no value or no detail:
* the exact rounding rule. `floor(x + 0.75)` is the rule that reproduces the
  original's worked switching instants and its 7- and 13-level waveforms.
* the modulation index as a Q8 input;
* the sine table depth (1024) and amplitude (127);
* the shared SPI bus with one MISO per ADC, the frame format, the SCLK rate,
  the round-robin channel order and the input map;
* ΔV = 16 codes, the zero-current code 2048, and renewing the order only
  outside the band;
* one selection per ADC scan;
* the PWM period (500 clocks) and the dead time (50 clocks);
* the run-time DDS write port, the reset values and the latencies.

Other departures:
* In the original experiment the dead-time stage is a separate circuit
  between the FPGA and the gate drivers. Here it is logic inside the top. The
  one-per-SM pulses that would go to such a circuit are still available on
  `gate_pwm`.
* The vendor DDS core is replaced by a plain accumulator and table.
* Not part of this RTL: the clock oscillator, the ADC chips, the opto-isolated
  gate drivers and the power stage. The testbenches contain a behavioural
  model of the ADC's SPI side (`tb/mcp3208_model.sv`).

## How far it has been checked

Each module has a self-checking testbench that compares it with an
independent model:
* `dds_sine` is checked against `$sin`, and the period of `ref_sine_gen`
  against 2^32/increment;
* `nlm_level` is checked against the real-valued formula for every sample
  and 9 modulation indices;
* `adc_spi_master` and `adc_capture` are run against the ADC model, including
  frame length and 100 kHz timing;
* `cap_balance` is checked against a sort model with the same band rule;
* `pwm_gen` is checked cycle by cycle;
* `dead_time_gen` is checked against a clocks-since-edge model.

`tb_mmc_nlm_top` runs the whole controller at its default parameters for two
50 Hz periods (about 2 M clocks, a few seconds). A crude charge model closes
the loop: the load is purely reactive, and each inserted capacitor changes by
the arm current at each scan. The test checks:
* all 13 phase levels and all 7 levels of every arm;
* `n_h + n_l` ∈ {6, 7};
* the inserted count per arm against the modulator;
* that a renewed selection picks SMs by voltage and current sign;
* that there is no shoot-through and there is a dead time after every edge;
* that each arm's capacitor spread settles within 2·ΔV plus one step.

Not checked: behaviour against real ADC timing limits, real power-stage
dynamics, and closed-loop quality figures (harmonic distortion, switching
frequency).

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/mmc_pkg.sv tb/tb_mmc_nlm_top.sv --top-module tb_mmc_nlm_top -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=F`. Replace the
testbench name to run another one (`tb_nlm_level`, `tb_cap_balance`,
`tb_adc_capture`, …). For lint: `verilator --lint-only -Wall -Irtl -y rtl
rtl/mmc_pkg.sv rtl/<module>.sv`.

## Changing it

* `nlm_level` and `cap_balance` take the number of SMs per arm as `N_SM`. The
  top, the package constant `N_ARM_SM` and the ADC input map assume 6. A
  different count needs a new map in `adc_capture` and, above 8 inputs per
  arm, more ADCs.
* Sampling rate, SPI clock, PWM period, dead time, ΔV and the zero-current
  code are parameters of `mmc_nlm_top`.
* The frame must fit the sampling period: 38·`SCLK_HALF`+1 < `SAMPLE_DIV`.
* The output frequency and phases can be changed at run time through the
  configuration port, and the amplitude through `m_q8`.
