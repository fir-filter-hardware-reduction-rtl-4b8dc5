# Adaptive delta-modulation FIR filter (ADMF)

An N-tap FIR filter that takes a **one-bit adaptive delta-modulation stream** as
input instead of PCM words. It needs no multiplier. It stores one bit per input
sample instead of B bits.

The idea rests on two facts:

1. An FIR output can be updated from input *differences*:

       y_n = y_{n-1} + sum_{k=0}^{N-1} a_k * (x_{n-k} - x_{n-k-1})

2. An adaptive delta modulator describes its input only by differences, and each
   difference is a signed power of two:

       Delta_n = c_{n-1} * 2^{l_n} * D        c = +1/-1,  l = 0..3,  D = minimum step

Put the modulator's steps in place of the input differences and the filter becomes

    dy_n = sum_{k=0}^{N-1} a_k * c_{n-k-1} * 2^{l_{n-k}}       (in units of D)
    y_n  = y_{n-1} + dy_n

Each tap therefore costs one shift of the coefficient by l places, a sign change
selected by the stored bit, and one addition. The digital part delivers the
difference `dy_n` only. A D/A converter followed by an analog **lossy integrator**
(an RC low-pass with a 30 Hz cutoff) rebuilds y(t). A digital integrator with a
unity feedback coefficient would drift without bound. The leak of the RC stage
avoids that, and it needs no multiplier for a feedback coefficient below one.

The coefficients are those of an ordinary FIR filter of the same order, so any
standard FIR design method supplies them. They sit in a writable memory, so the
filter is programmable.

The intended use is small, low-power filters for speech, such as hearing aids.
Speech suits the scheme because its spectrum falls with frequency, which is what
a delta modulator tracks well.

## Block diagram

```
            +------------------------- admf_system (simulation top) ----------------------------+
            |                                                                                    |
 x(t) ----->| adm_analog_model        admf_core (synthesizable)                                  |
            |  comparator   comp  +-----------------------------------------------+              |
            |  x > xhat  ---------> adm: c delays, step_size_logic, integrator    |              |
            |     ^               |   |  c_out (1 bit/sample)        sample_tick  |              |
            |     | xhat_v        |   v                                   ^       |              |
            |  feedback D/A <-----|-- xhat_code   admf_processor ---------+       |              |
            |                     |   sample_store (N bits)                       |              |
            |                     |   coef_ram (N x B)                            |              |
            |                     |   step_size_logic (exponent regeneration)     |              |
            |                     |   shift / negate / 12-bit accumulate          |              |
            |                     +----------------------------- dac_code --------+              |
            |                                                       |                            |
            |                                          r2r_dac_model (8 bit) -> rc_integrator_model -> y(t)
            +------------------------------------------------------------------------------------+
```

| File | Kind | Role |
|---|---|---|
| `rtl/admf_pkg.sv` | package | default sizes, exponent width helper |
| `rtl/step_size_logic.sv` | RTL | exponent adaptation rule (combinational) |
| `rtl/adm.sv` | RTL | digital loop of the delta modulator |
| `rtl/sample_store.sv` | RTL | N-bit shift register of decisions |
| `rtl/coef_ram.sv` | RTL | N x B coefficient memory |
| `rtl/admf_processor.sv` | RTL | serial processor: timing, exponent regeneration, shift-add accumulate |
| `rtl/admf_core.sv` | RTL | digital core: `adm` + `admf_processor` |
| `rtl/adm_analog_model.sv` | behavioural | comparator and feedback D/A of the modulator |
| `rtl/r2r_dac_model.sv` | behavioural | 8-bit R-2R output D/A |
| `rtl/rc_integrator_model.sv` | behavioural | RC lossy integrator, 30 Hz |
| `rtl/admf_system.sv` | behavioural top | complete filter, analog in to analog out |

`admf_core` is the synthesizable part. `admf_system` wraps it with real-valued
models of the analog parts so that the filter can be simulated end to end. The
models use `real` ports and do not synthesize.

## The delta modulator (`adm`, `step_size_logic`)

The modulator compares x(t) with its own reconstruction xhat(t) and sends one
bit per sample, c_n = sgn(x_n - xhat_n). The comparator and the feedback D/A are
analog. The digital loop holds:

* two sample delays, c_{n-1} (the output bit) and c_{n-2};
* the step exponent l, adapted by the step size logic:

  | last two decisions | l_{n-1} | l_n |
  |---|---|---|
  | equal (`c_{n-1} == c_{n-2}`) | < LMAX | l_{n-1} + 1 |
  | equal | = LMAX | LMAX |
  | different | > 0 | l_{n-1} - 1 |
  | different | = 0 | 0 |

  So runs of equal decisions (slope overload) double the step, up to 8·D.
  Alternating decisions (idle or granular noise) halve it, down to 1·D.

* the integrator: xhat_n = xhat_{n-1} + c_{n-1}·2^{l_n}. The code goes to the
  feedback D/A straight from the adder, ahead of the integrator register.

Decisions are encoded 1 = +1, 0 = -1 everywhere. xhat is an 8-bit two's-complement
code that saturates at -128 and +127. Reset puts the loop in its idle state:
c_{n-1} = +1, c_{n-2} = -1, l = 0, xhat = 0.

## The serial processor (`admf_processor`)

This is the part that needs the most explanation.

### One tap per clock

Processing is word-serial: one tap per clock, so **one sample period is exactly N
clocks**. At N = 64 and 16 kHz sampling the clock runs at 1.024 MHz. The processor
owns the sample-period counter. Its `tick` (the last clock of each period) clocks
the modulator and shifts the newest modulator bit into the sample store. The
taps are visited from the oldest (k = N-1) to the newest (k = 0). On each clock:

    coef = a_k                       (coef_ram, combinational read)
    mag  = sign_extend(coef) << l    (l = 0..3)
    term = bit_k ? mag : -mag
    acc  = (first tap) ? term : acc + term     (12 bits, wraps)

On the tick clock the final sum is registered into `dy_out`. Accumulation
wraps modulo 2^12, so the result is exact whenever the final sum fits in 12 bits,
whatever the partial sums do.

### Regenerating the step exponents from one bit per sample

Each term needs the exponent l_{n-k} that the modulator used, not just the bit
c_{n-k-1}. Storing it would cost 2 more bits per sample and lose the one-bit storage
advantage. The exponent is instead **recomputed** from the bits. The rule
l_m = f(c_{m-1}, c_{m-2}, l_{m-1}) is deterministic, and the two bits it needs for
tap k are bit k and bit k+1 of the store. A second `step_size_logic` instance
therefore walks the window from oldest to newest:

    l(tap N-1) = lvl_tail                       (kept in a 2-bit register)
    l(tap k)   = f(bit_k, bit_{k+1}, l(tap k+1))   for k = N-2 .. 0

The only state beyond the N bits is `lvl_tail`, the exponent of the oldest tap.
After the next shift the current second-oldest tap becomes the oldest. So on the
second clock of each pass `lvl_tail` takes the value just regenerated for that tap.

This works only if the store and the modulator agree from the start. Reset loads
the store with the modulator's idle pattern (bit k = k mod 2, alternating), for
which every exponent is 0. From then on, the exponent regenerated for tap 0
equals the one the modulator used. Both testbenches of the core check this
against an independent model over thousands of samples.

### Timing

```
clock:        0   1   2  ...  N-2  N-1 | 0   1  ...
tap k:       N-1 N-2 N-3 ...   1    0  | N-1 ...
tick:         0   0   0  ...   0    1  | 0
                                     ^ modulator registers c_n, store shifts in c_{n-1}
dy_valid:                              1  (for one clock)
dy_out:       ------- previous ------- | new value, held for N clocks
```

The pass that runs during sample period n+1 sees bits c_{n-1} ... c_{n-N} and
produces dy for the steps up to xhat_n. That dy appears on the clock after the
tick that ends the pass, so the processor adds one sample of latency.

### Output to the D/A

`dy_out` is the full 12-bit sum in units of D times the coefficient LSB.
`dac_code` keeps the top 8 bits (`dy >>> DAC_SHIFT`, with DAC_SHIFT = 4),
saturated if the parameters make that necessary, in offset binary for the R-2R
ladder.

## Output reconstruction (models)

* `r2r_dac_model`: an ideal 8-bit ladder, v = code·VREF/256 - VREF/2.
* `rc_integrator_model`: the exact sampled response of a one-pole RC with a 30 Hz
  cutoff to the D/A staircase, v <= a·v + dy_v with a = exp(-2π·30/16000). Well
  above 30 Hz this acts as an integrator with unity gain per sample. Below 30 Hz
  it leaks, which removes the drift of the open recursion.
* `adm_analog_model`: xhat_v = 20 mV · code, comp = x > xhat_v. At this scale an
  input of 1 V peak is 50 minimum steps.

These are ideal models. They have no comparator offset or noise, no D/A mismatch
and no settling. The integrator gain and VREF are normalisations chosen here.

## Parameters

| Parameter | Default | Meaning | Origin |
|---|---|---|---|
| `N` | 64 | taps, and clocks per sample | published prototype |
| `B` | 8 | coefficient bits, sign included | published prototype |
| `ACC_W` | 12 | accumulator bits | published prototype |
| `LMAX` | 3 | largest exponent (steps 1, 2, 4, 8 · D) | published prototype |
| `DAC_W` | 8 | output D/A bits | published prototype |
| `XHAT_W` | 8 | modulator feedback code bits | chosen here |
| `DAC_SHIFT` | 4 | accumulator bits below the D/A LSB | chosen here |
| `DELTA0` | 0.02 V | minimum step (model) | 1 V peak = 50 D in the published measurement |
| `FC_HZ`, `FS_HZ` | 30, 16000 | integrator cutoff, sample rate (model) | published prototype |
| `VREF` | 1.0 V | output D/A full scale (model) | chosen here |

## How closely this follows the published design

Taken from the design: the equations, the structure of the modulator loop,
the four step sizes, serial processing at N clocks per sample, storage of N
B-bit coefficients and N single-bit samples, shift-and-negate arithmetic, the
12-bit accumulator, the 8-bit R-2R D/A and the 30 Hz RC integrator.

Chosen here, where the published description is silent:

* **Exponent regeneration** in the processor. The design stores one bit per
  sample but does not say how the per-tap exponents are obtained.
* The adaptation rule applies to both signs. The rule says the exponent rises
  when the last two decisions agree and falls when they differ.
* The 8-bit width of the modulator's feedback code, and saturation at its limits.
* Wrap-around accumulation. Overflow handling is not specified.
* Which 8 accumulator bits drive the output D/A.
* The reset state (the idle pattern), tap order, memory ports and handshake signals.

Left out: the automatic gain control, the anti-alias and output 3 kHz
low-pass filters, the notch filter and the bench instruments around the filter.
These are analog or test equipment with no logic to write.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with the line
`TB_RESULT checks=N failures=M`. `tb/admf_ref_pkg.sv` holds the reference
arithmetic: the adaptation rule written from its table, and two's-complement
wrapping.

| Testbench | What it checks |
|---|---|
| `step_size_logic_tb` | all decision pairs and exponents, LMAX = 3 and 5 |
| `adm_tb` | loop against a model: sine, square wave (overload, saturation), silence, noise; no change without tick |
| `sample_store_tb` | reset pattern, random shifts, both taps at every index |
| `coef_ram_tb` | fill, read back, random overwrite |
| `admf_processor_tb` | dy, D/A code, tick period = N, dy_valid timing, accumulator wrap, reprogramming |
| `admf_core_tb` | digital core with the testbench as comparator; dy against the exact FIR of the modulator steps |
| `admf_system_tb` | whole filter at default sizes, analog input; also the D/A voltage and the integrator recursion; counts and requires every mechanism: exponent up, down, held at 8·D and at 1·D, feedback saturation, accumulator wrap, reprogramming |
| `admf_response_tb` | frequency response of a 64-tap low-pass (see below) |
| `admf_voice_tb` | speech-like input: the filter's output SNR must beat the modulator's by 3 dB (see below) |
| `*_model_tb` | the three analog models against their formulas |

The **frequency-response test** repeats the published measurement setup: a 1 V
peak sine (50 D), 16 kHz sampling and a 64-tap low-pass. The original coefficients
are not published, so the test uses a Hamming-windowed sinc with a 400 Hz cutoff,
rounded to 8 bits and summing to 262. It measures the amplitude by correlation on
the digital y and on the integrator output. Typical output:

```
  f (Hz)   theory (dB)   y (dB)   analog out (dBV)   analog theory (dBV)
     100      -0.37      -0.42       9.36       9.41
     200      -1.48      -1.53       8.53       8.57
     250      -2.34      -2.25       7.84       7.75
     400      -6.29      -6.33       3.78       3.84
    1000     -35.93     -41.65     -31.53     -25.79
    2000     -37.79     -49.57     -39.56     -27.64
    4000     -45.36     -63.31     -54.13     -35.21
```

The pass band follows theory to within 0.1 dB. In the stop band the result
depends on how the modulator errors pass through the filter. At high frequencies
the 50-step sine overloads the modulator's largest step (8 D per sample is
enough only up to about 400 Hz). The test therefore requires only that the stop
band sits at least 15 dB below the pass band. It does not check the exact theory
there.

The **speech-like test** checks the claim behind the whole scheme. The
filter treats the modulator's error as part of its input, so it removes the part
of that error outside its pass band. The input is white noise through two
one-pole low-pass sections, which gives a falling spectrum like speech. It runs
at 15 steps rms for 6000 samples. The test measures the modulator's SNR (xhat
against x) and the filter's SNR (y against an ideal FIR of the true input).
Typical values are 14.5 dB and 30.0 dB.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/admf_pkg.sv tb/admf_ref_pkg.sv \
          tb/admf_system_tb.sv --top-module admf_system_tb
./obj_dir/Vadmf_system_tb
```

Replace `admf_system_tb` with any other testbench name. `admf_response_tb` needs
no reference package, but including it does no harm. Every testbench finishes in
about a second.

To use the filter, write the N coefficients through `coef_we`/`coef_waddr`/`coef_wdata`
(two's complement, a_0 at address 0 multiplies the newest sample). The memory has
no reset, so write it before relying on the output; writing during reset is fine.
Clock the core at N times the desired sample rate, connect `comp_in` to a
comparator between x(t) and the D/A of `xhat_code`, and feed `dac_code` to a D/A
followed by a lossy integrator whose cutoff lies well below the signal band.
