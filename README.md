# Self-testing sigma-delta ADC: digital sine-wave fitting BIST

A sigma-delta audio ADC normally needs an ultra-clean analog sine source and
an FFT-capable tester to measure its SNDR. This design moves the whole test on
chip, and keeps it digital:

* The **stimulus** is a digital sigma-delta bitstream of a sine. The
  modulator under test has a test mode in which its input branch becomes a
  1-bit charge DAC. A 1-bit DAC is inherently linear, so the bitstream is a
  clean analog stimulus.
* The **analysis** needs no FFT. A second generator produces a *reference*
  bitstream with the same frequency and the same amplitude and phase that the
  converter's response should have. Subtracting it from the converter's
  output bitstream removes the test tone. The decimated offset-free remainder
  is the converter's THD+N, and its mean square is the THD+N power.

The only multiplication in the whole test is that final squaring. It runs
once per decimated sample, so a serial shift-and-add multiplier is enough.

The ADC itself is a second-order single-bit modulator running at
6.144 MHz with an oversampling ratio (OSR) of 128, so the output rate is
48 kHz, for a 20 kHz audio band. A 128:1 decimation filter follows the
modulator.

```
             a21, A_S                          T (test mode)
   +------------------+   y_SBSG   +--------------------+ y_MUT
   | stimulus BSG     |----------->| DfDT modulator     |-----+-----------+
   +------------------+            | (behavioural model)|     |           |
             a21, A_R              +--------------------+     |  +  (-)   |
   +------------------+  y_RBSG  +---------+  y_REF           +--(Σ)<--+  |
   | reference BSG    |--------->| z^-2    |-----------------------|---+  |
   +------------------+          +---------+                       |   |  |
                                                       MUXA: 1,2 y_MUT | 3 y_REF | 4 diff
                                                              v
                              +------------------------------------+
                              | decimation filter (CIC^4, 128:1)   |--> y_DEC
                              +------------------------------------+
   y_DEC --> offset estimator --> Y_OS ;  y_RES = y_DEC - Y_OS
   MUXB (step 2: y_RES, step 3: y_DEC) --> amplitude estimator --> Y_OA2, Y_OA3
   y_RES (step 4) --> power estimator (serial multiplier) --> P_THDN
   MUXC: A_S = A_T·π/4 (steps 1-3) or Y_OA3 (step 4)
         A_R = A_T·π/4 (step 3)    or Y_OA2 (step 4)
   serial I/O: scans in a21 and A_T·π/4, scans out Y_OS, Y_OA2, Y_OA3, P_THDN
   controller: Start -> steps 1..4 -> BIST_Done
```

## The four-step procedure

A test is defined by two numbers: the frequency word `a21` and the
amplitude word `A_T·π/4`, where `A_T` is the desired tone amplitude as a
fraction of full scale. Every step restarts both generators from the same
state, lets the filter settle for 4 output samples, and then analyses
N = 2048 decimated samples, which is 262144 modulator clocks. The frequency must
be *coherent*: the 2048 samples must hold a whole number of tone periods.
Then the mean of the tone is exactly zero and the mean of its magnitude is
exactly `2/π` of its amplitude.

| step | stimulus generator | reference generator | filter input (MUXA) | estimator | result |
|------|---------------------|---------------------|---------------------|-----------|--------|
| 1 | `A_T·π/4` | idle | modulator output | offset: `(1/N) Σ y_DEC` | `Y_OS` = offset |
| 2 | `A_T·π/4` | idle | modulator output | amplitude: `(2/N) Σ |y_DEC − Y_OS|` | `Y_OA2 = A_T·|STF|·|H_DEC|` |
| 3 | idle | `A_T·π/4` | delayed reference bits | amplitude: `(2/N) Σ |y_DEC|` | `Y_OA3 = A_T·|H_DEC|` |
| 4 | `Y_OA3` | `Y_OA2` | `D_MUT − D_REF` | power: `(1/N) Σ (y_DEC − Y_OS)²` | `P_THDN` |

Why it works:

* **Steps 2 and 3 need no multiplier.** The mean of `|A sin|` is `2A/π`, so
  `(2/N) Σ |y|` returns `(4/π)` times the amplitude. Driving the generator with
  `A_T·π/4` cancels that factor. It also keeps the stimulus 2.1 dB *below*
  `A_T` while amplitudes are measured, so neither the digital modulator nor
  the converter is pushed toward overload.
* **Step 3 measures the filter.** The reference bitstream goes through the
  same decimation filter, so `Y_OA3` is `A_T` times the filter's gain at the
  test frequency. Nothing about the filter has to be known in advance.
* **Step 4 cancels the tone.** The stimulus generator is set to `Y_OA3`, and
  the converter then adds its own signal gain `|STF|`. The reference is set to
  `Y_OA2`, which already contains `|STF|` and the filter gain. The modulator
  delays the signal by two clocks, and so does the two-flip-flop phase
  compensator on the reference. The two bitstreams therefore carry the same
  tone, and their difference holds only the converter's noise, distortion
  and offset. The filter removes the out-of-band part, `Y_OS` removes the
  offset, and the mean square is the THD+N power.

From the four results, computed off chip:

```
SNDR   = 10·log10( (Y_OA2² / 2) / P_THDN )   dB
offset = Y_OS                                (fraction of full scale)
gain   = Y_OA2 / Y_OA3  ( = |STF| at the test frequency)
dynamic range = SNDR at a -60 dBFS tone + 60 dB
```

The known limit of the method is phase. The compensator assumes a group
delay of exactly two clocks. A real modulator drifts away from that as the
frequency rises, and a phase error θ (in clocks) leaves a residual tone of
amplitude `2·A_T·sin(π·θ·f_in/f_clk)`. The test counts that residue as
THD+N. The behavioural modulator model has a delay of exactly two clocks
by default. The section on the residue tone below gives it a gain error
that brings the effect out.

## The bitstream generator

Each generator (`bsg`) is a digital resonator with a third-order sigma-delta
modulator *inside* its feedback loop. The resonator therefore needs no
multi-bit multiplier:

```
Register 1:  r1(n+1) = r1(n) − a21·y(n)            y(n) = ±1, the output bit
Register 2:  x(n+1)  = x(n) + 2^-6 · r1(n+1)        a12 = 2^-6, a shift
modulator:   y(n)    = sign-modulated x(n), STF = 1
```

Because the modulator's signal transfer function is exactly 1, the loop obeys
`x(n+2) − (2 − a12·a21)·x(n+1) + x(n) = 0`. That is an undamped oscillator at

```
f_in = f_clk · acos(1 − a12·a21/2) / (2π),      so   a21 = 2^6 · 2·(1 − cos(2π f_in / f_clk))
```

Starting from Register 1 = 0 and Register 2 = A gives a tone of amplitude A.
At high frequencies the start-up leaves the amplitude about 1 % larger, for
example at 18.7 kHz. The procedure measures amplitudes, so this does not
affect the result.

The embedded modulator (`crfb_sdm3`) is a third-order cascade of
resonators with distributed feedback. It has three delaying integrators, and
every coefficient is a power of two:

| input feed | a1 = 2^-4 | a2 = 2^-1 | a3 = 1 |
|---|---|---|---|
| output feedback | b1 = −2^-4 | b2 = −2^-1 | b3 = −1 |
| resonator (3rd → 2nd integrator) | g0 = −2^-12 | | |

The input is also fed straight to the quantiser. With `b = −a` that makes
the STF exactly 1. The resonator puts a pair of noise-transfer zeros at
`sqrt(2^-12) = 2^-6` rad/sample, about 15 kHz, which lowers the in-band
noise floor where a high test frequency needs it most. In simulation a
−6 dBFS 1 kHz tone comes out at 107 dB SNDR in a 24 kHz band (see the
results below).

The integrators saturate at ±8 (parameter `SAT_LOG2`). Without saturation
the loop lost stability for tones above about 0.69 of full scale, so a
−3 dBFS test (step 4 drives the stimulus generator at the full `A_T`) was
impossible. With saturation −3 dBFS runs cleanly, and −3 dBFS is the
intended ceiling of the method.

## Number formats

| quantity | format |
|---|---|
| `a21`, `A_T·π/4`, BSG amplitudes | 32-bit unsigned fraction, value = word / 2^32 |
| BSG datapath | 46-bit signed, 40 fraction bits |
| decimated samples `y_DEC`, `y_RES`, `Y_OS`, `Y_OA` | 24-bit, 21 fraction bits (2^21 = full scale) |
| `P_THDN` | 48-bit unsigned, 42 fraction bits |

The 64 setup bits per test hold two 32-bit words. `Y_OA2` and `Y_OA3` are
shifted left by 11 bits, saturating, to become generator amplitudes.

The decimation filter is a fourth-order CIC with gain 128⁴ = 2^28. Its
output is shifted right by 7 bits into the 21-fraction-bit format. The step-4 difference
`D_MUT − D_REF` fits the 2-bit filter input as −1, 0 or +1, which is half
of `Y_MUT − Y_REF`. The filter output is doubled in step 4 so that `Y_OS`
is subtracted at the right scale.

## Timing

* One modulator clock per system clock. The decimation filter emits one
  sample with a one-clock `valid` strobe every 128 clocks.
* A BIST run takes 4 × (4 + 2048) decimated samples, plus a few control cycles
  per step: about 1 050 600 clocks, or 171 ms at 6.144 MHz.
* The serial multiplier needs 24 clocks per sample. The controller waits for
  it (`busy`) before latching the power.
* The phase compensator is two flip-flops, matching the modulator's
  input-to-output delay of two clocks.

## Interfaces

`bist_sd_adc` (top), all synchronous to `clk`, active-low asynchronous
`rst_n`:

| port | dir | width | meaning |
|---|---|---|---|
| `bist_start` | in | 1 | a rising edge starts the four steps |
| `bist_done` | out | 1 | high from the end of step 4 until the next start |
| `step` | out | 3 | current step 1..4, 0 when idle (`bist_pkg::step_e`) |
| `v_asig` | in | 24 | analog input of the modulator model in normal mode (2^23 = full scale) |
| `dec_out`, `dec_valid` | out | 24, 1 | decimated converter output and its strobe |
| `sio_shift`, `sio_in`, `sio_out` | in, in, out | 1 | serial interface |

Parameters of the top:

| parameter | default | meaning |
|---|---|---|
| `N_SAMPLES` | 2048 | decimated samples analysed per step (a power of two) |
| `SETTLE` | 4 | decimated samples discarded after each generator restart |
| `L_A12` | 6 | resonator gain a12 = 2^-L_A12 |
| `MUT_ALPHA1` | 0.5 | first-integrator gain of the modulator model (0.5 = nominal) |

When idle, the test pin of the modulator is low, its digital stimulus input
is held at 1 and both generators are stopped. The chip is then an ordinary
ADC converting `v_asig`.

**Serial interface.** While `sio_shift` is high, both chains move one bit
per clock. The setup chain takes `sio_in` MSB first: 32 bits of `a21`, then
32 bits of `A_T·π/4`. The result chain is loaded in parallel when
`bist_done` rises. It then shifts out on `sio_out`, MSB first, 120 bits:
`Y_OS` (24, signed), `Y_OA2` (24), `Y_OA3` (24), `P_THDN` (48), the field
order of `bist_pkg::bist_results_t`.

**Setup words.** For a test with amplitude `A_T` at tone bin `k` of a
262144-clock record (`f_in = k·f_clk/262144`, with `k` odd for a fully
coherent record):

```
a21 word      = round( 2^32 · 2^6 · 2·(1 − cos(2π k / 262144)) )
amplitude word = round( 2^32 · A_T · π/4 )
```

## Modules

| file | role |
|---|---|
| `rtl/bist_pkg.sv` | constants (OSR, N, widths), `step_e`, `bist_results_t` |
| `rtl/bist_sd_adc.sv` | top: the generators, modulator, MUXA/B/C, filter, ORA, serial I/O and controller |
| `rtl/bsg.sv` | bitstream generator (resonator + `crfb_sdm3`); used twice |
| `rtl/crfb_sdm3.sv` | third-order CRFB digital sigma-delta modulator |
| `rtl/phase_compensator.sv` | z^-2 on the reference bitstream |
| `rtl/dfdt_sdm_model.sv` | **behavioural model** of the analog second-order modulator with its test mode |
| `rtl/decimation_filter.sv` | CIC^4 128:1 decimator |
| `rtl/offset_estimator.sv` | `Y_OS = (1/N) Σ y` |
| `rtl/amplitude_estimator.sv` | `Y_OA = (2/N) Σ |y|` |
| `rtl/power_estimator.sv`, `rtl/serial_multiplier.sv` | `P = (1/N) Σ y²` with a shift-and-add multiplier |
| `rtl/serial_io.sv` | setup scan-in, result scan-out |
| `rtl/bist_controller.sv` | step sequencer |

The modulator under test is an analog switched-capacitor circuit. In test
mode its first-integrator input branch is rewired into the 1-bit charge
DAC. `dfdt_sdm_model` reproduces its sampled behaviour with `real`
arithmetic: integrator gains 0.5 and 0.5, optional leakage for finite op-amp
gain, a cubic nonlinearity `K3`, and an input offset. The offset defaults to
6.6e-4 of full scale (−63.6 dBFS) so that the offset path is exercised.
The model is not synthesizable and stands in for the analog block in
simulation.

## Simulation results

With all parameters at their defaults (`tb/tb_bist_sd_adc.sv` and
`tb/tb_bist_workloads.sv`), the tone is at bin 41 (961 Hz) unless noted:

| test | Y_OS | Y_OA2 (expected) | BIST SNDR |
|---|---|---|---|
| −3 dBFS | 6.59e-4 | 0.70606 (0.70608) | 75.4 dB |
| −6 dBFS | 6.59e-4 | 0.49985 (0.49987) | 85.4 dB |
| −20 dBFS | 6.59e-4 | 0.09973 (0.09974) | 77.2 dB |
| −40 dBFS | 6.59e-4 | 0.009974 (0.009974) | 56.6 dB |
| −60 dBFS | 6.59e-4 | 0.000998 (0.000997) | 36.3 dB (dynamic range 96.3 dB) |
| −6 dBFS, 5.0 kHz | 6.59e-4 | 0.4661 (0.4666) | 83.1 dB |
| −6 dBFS, 12.2 kHz | 6.59e-4 | 0.3235 (0.3243) | 80.1 dB |
| −6 dBFS, 18.7 kHz | 6.59e-4 | 0.1768 (0.1751) | 75.6 dB |

The expected amplitude is `A_T` times the CIC gain at the test frequency.
In the full-size end-to-end test, the BIST power is 1.1 dB above an
independent least-squares sine fit to the converter's decimated output.
SNDR is lower at −3 dBFS than at −6 dBFS, which is expected of a single-bit
modulator fed with a sigma-delta stimulus near full scale. All
these figures come from the behavioural modulator, not from silicon. The
model has no thermal or op-amp noise, so it converts more cleanly than the
published chip, which measured a 75.5 dB peak SNDR and an 81.5 dB dynamic
range. What carries over is how closely the BIST result tracks an
independent measurement of the same output.

The stimulus itself (`tb/tb_bsg_purity.sv`) is far cleaner than the
converter. This is measured on one 262144-bit record at −6 dBFS, with a
four-term Blackman-Harris window:

| tone | SNDR, 20 kHz band | SNDR, 24 kHz band |
|---|---|---|
| 961 Hz | 114.5 dB | 107.0 dB |
| 12.2 kHz | 100.6 dB | 99.5 dB |
| 18.7 kHz | 90.7 dB | 89.9 dB |
| 20.0 kHz | 90.1 dB | 86.5 dB |

The generator is bit-exact logic, so these numbers are what the silicon
generator would produce too. They line up with the published chip:
107.8 dB at 1 kHz, 86 dB at 20 kHz, and above 90 dB up to 18.7 kHz.

The same converter can also be measured the conventional way: normal
mode, with a sampled sine on `v_asig` and the testbench fitting the tone
in the decimated output (`tb/tb_bist_analog_vs_digital.sv`, about 1 kHz):

| A_T | analog test | digital BIST |
|---|---|---|
| −3 dBFS | 93.9 dB | 70.1 dB |
| −6 dBFS | 93.5 dB | 85.6 dB |
| −20 dBFS | 82.0 dB | 76.9 dB |
| −40 dBFS | 60.1 dB | 56.4 dB |

The bitstream stimulus drives the modulator's first integrator with full
±1 steps. The digital results therefore sit below the analog ones, and
they bend down past −6 dBFS, where the extra swing overloads the
modulator. This is a property of the test-mode input structure, not of the
BIST arithmetic. So close to overload, the result also depends on the
state the modulator is in when the test starts. The −3 dBFS BIST gave
70.1 dB here, directly after an analog test, and 75.4 dB in the sweep
above. At low levels the gap is 4–5 dB; on silicon, thermal noise
common to both tests makes it smaller.

## The residue tone: where the two-clock delay assumption breaks

The phase compensator is just two flip-flops. This works because the
modulator's signal transfer function is close to a pure two-clock delay in
the audio band. A real switched-capacitor modulator drifts from that. A
first-integrator gain `α1` other than 1/2 (from capacitor ratios or finite
op-amp gain) makes the in-band delay about `1/α1` clocks. In step 4 the
reference then arrives `θ` clocks early or late, and a residue tone of
amplitude

```
2 · A · sin(π · θ · f_in / f_clk)
```

survives the subtraction, where `A` is the tone amplitude. The power
estimator cannot tell it from distortion, so the SNDR result is capped at
about `20·log10(Y_OA2 / residue)`. The phase error grows with frequency, so
only the upper part of the band suffers. The top exposes `MUT_ALPHA1`, the
model's first-integrator gain, so this can be reproduced. The default 0.5 is
the ideal modulator.

`tb_bist_phase_error` runs the nominal model and `MUT_ALPHA1 = 0.49` side by
side at −6 dBFS:

| | nominal | α1 = 0.49 |
|---|---|---|
| 1 kHz BIST SNDR | 85.7 dB | 83.9 dB |
| 18.7 kHz BIST SNDR | 77.9 dB | 68.4 dB |
| 18.7 kHz residue tone | −101.7 dBFS | −84.0 dBFS |

At 1 kHz the nominal model's step-4 residue holds the −63.6 dBFS offset
down to −146 dBFS and the tone down to −121 dBFS. The published chip
reached below −110 dBFS for both. The 0.042-clock delay error is measured
from the phases of the step-2 and step-3 tones. With the formula above it
predicts a −86.0 dBFS residue, 2 dB below the −84.0 dBFS observed. A
phase-calibration loop would remove the cap, at the hardware cost that the
two-flip-flop compensator is there to avoid.

## Where this RTL is this design's own

The block structure, the four steps, the estimator formulas, N = 2048,
OSR = 128, a12 = 2^-6, the CRFB coefficients, the two-flip-flop phase
compensator and the serial multiplier follow the published design. The
following are choices made here:

* **Decimation filter.** It is only specified as a 128:1 decimator with a
  roughly flat passband. A CIC^4 is used. Fourth order is one above the
  third-order shaped noise of the bitstream generators, which reaches the
  filter in test mode. A third-order CIC let enough of that noise alias
  into the band to cost 3–4 dB of SNDR. The CIC droops 2.5 dB at 10 kHz
  and 10.6 dB at 20 kHz. Step 3 cancels that droop in the BIST result, but
  the plain ADC output is not droop-compensated.
* **Amplitude selection (MUXC).** One selector output could not supply
  `Y_OA3` to the stimulus generator and `Y_OA2` to the reference at the same
  time in step 4. Here `A_S` and `A_R` are selected separately. The
  estimator's register holds `Y_OA3`, and a second register keeps `Y_OA2`.
* Saturating integrators in the CRFB modulator, the doubled filter output in
  step 4, and all word widths and number formats.
* The 4-sample settle interval per step, the controller and ORA handshakes,
  and the serial protocol.
* Step 3 always runs, although it is optional in the method. Without it the
  step-4 amplitude would have to be supplied from outside.
* A pass/fail comparison of the results against thresholds is not included.
  The results are read out through the serial interface.
* The modulator under test is a behavioural model. Its default component
  values are ideal, so its delay is exactly two clocks. Circuit-level
  effects (switch charge injection, op-amp slewing, comparator
  metastability) are not modelled.

## Simulating

Every testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`; a watchdog stops a
hung run. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/bist_pkg.sv \
          $(ls rtl/*.sv | grep -v bist_pkg) tb/tb_bist_sd_adc.sv \
          --top-module tb_bist_sd_adc -Mdir obj
obj/Vtb_bist_sd_adc
```

Substitute any other testbench: `tb_bsg`, `tb_crfb_sdm3`,
`tb_phase_compensator`, `tb_dfdt_sdm_model`, `tb_decimation_filter`,
`tb_offset_estimator`, `tb_amplitude_estimator`, `tb_power_estimator`,
`tb_serial_io`, `tb_bist_controller`, `tb_bist_workloads` (eight complete
BIST runs, a few seconds), `tb_bist_phase_error` (the residue tone),
`tb_bist_analog_vs_digital` (normal-mode test against the BIST) or
`tb_bsg_purity` (stimulus spectra, about five seconds). The full-size
end-to-end run takes about two seconds. Each block testbench compares the block with values computed
independently in the testbench:

* an integer model of the modulator and resonator;
* a direct-form sinc⁴ convolution;
* exact sums for the estimators;
* DFT amplitude and coherence of the generated tone.

To run a different test, change the setup words that the testbench scans
in; the formulas are above. To shorten a run, lower `N_SAMPLES` on the top;
it must stay a power of two.
