# Self-calibrating polynomial correction of ADC distortion with numerical PLLs

An ADC whose static transfer curve is slightly bent produces harmonics of
every tone it converts. If the curve is known, a polynomial applied to the
output codes

    z = y + θ2·y² + θ3·y³ + … + θN·y^N

can undo most of the bend. This RTL *finds* the coefficients θk on its own.
Apply a pure sine to the converter during a test phase and nothing else is
needed: no second converter, no DAC and no knowledge of the exact input
frequency or amplitude. The hardware rebuilds a clean copy of the test tone
from the distorted codes. It measures what is left over after the
correction, and it adjusts each θk until the k-th harmonic in the
corrected output is gone. When the test phase ends, the coefficients are
frozen and the corrector keeps running on normal traffic.

Each θk is tuned by watching only its own harmonic. So the result is not a
Taylor inverse of the ADC curve. It approximates the polynomial that
cancels harmonics 2…N at the test amplitude, and that polynomial works
well over a wide range of amplitudes (see *Results*).

Everything is plain synchronous logic, one sample per clock. The reference
configuration is a 12-bit ADC at 200 MHz with third-order correction.

## Signal flow

```
          y (12 b)   +----------------+  z (12+3 b)
 ADC ---------------->| poly_corrector |--------+------------------------> z, z12
                      +----------------+        |
                         ^ θ2..θN               |
                         |                      +--> a_npll --> x^ (replica of the tone)
                         |                      |                  |
                         |                      |        z - x^ = r (residue, 6 b)
                         |                      |                  |
                         |                      +--> m_npll k=2 --sign--> lms_coef k=2 --> θ2
                         |                      +--> m_npll k=3 --sign--> lms_coef k=3 --> θ3
                         +------------------------------------------------------------ ...
```

* **a_npll** locks a digital oscillator to the tone in `z`. It locks
  frequency, phase and amplitude, so `x^` is the undistorted
  fundamental.
* **residue_cmp** forms `r = z − x^`. This holds the harmonics still left
  in `z`, plus noise.
* For every order k there is one **m_npll** and one **lms_coef**. The
  m_npll is a PLL with a divide-by-k counter in its feedback path. It
  produces a tone at k times the test frequency, in phase with the input.
  The lms_coef multiplies the *sign* of `r` by the *sign* of that tone.
  Both factors are ±1, so the multiplier is one XOR. It then integrates the
  product into θk.
* **poly_corrector** applies the polynomial with the current θk.

In lock, the integrator for θk stops moving only when `r` has no
component at the k-th harmonic. Its DC gain is unbounded, so it keeps
moving until that component is zero.

## The oscillator (dwo_nco)

Every PLL here uses a digital waveguide oscillator. It has two state
registers and needs only two multipliers per sample:

    a    = w_a · x_I
    t    = w_f · (a + x_Q)
    x_I' = t − x_Q
    x_Q' = t + a

* `w_f = cos(ω)` sets the angular step ω = 2π f/f_s directly.
* `w_a` is an amplitude knob. With `w_a = 1` the recursion is lossless.
  Slightly above one, the tone grows; slightly below, it decays.

Three properties of this structure shape the rest of the design:

* **The two outputs differ in size.** `x_I` is a sine of amplitude A, and
  `x_Q` is `−A·cot(ω/2)·cos`. At low tones this is much larger (16× at
  f_s/50). `x_Q` therefore carries `Q_EXT = 5` extra integer bits. That is
  enough for tones down to about f_s/100.
* **Changing `w_f` moves the amplitude.** Each frequency correction also
  changes the amplitude of `x_I`, by roughly `cos²·Δw_f / sin²ω`. This
  effect grows quickly at low tones. It is the main source of residue noise,
  and it is why the test tone is best placed well above f_s/100. The
  tests use 211/4096 ≈ f_s/19.4.
* **Word formats.** `w_f` is signed Q1.15. `w_a` is unsigned Q1.15, so
  unity is 32768. Products are rounded to nearest, and the states
  saturate rather than wrap.

## Locking to the test tone (a_npll, npll_pfd, npll_dlf)

**Phase/frequency loop.** The sign bits of `z` and of `x_I` are two square
waves. `npll_pfd` is a classic tri-state phase-frequency detector driven by
their rising edges. It outputs +1 while the input leads, −1 while the
oscillator leads, and 0 otherwise. Because it remembers which edge came
first, it also pulls in frequency errors.

`npll_dlf` is a proportional-integral filter:

    ψ   += e                                   (16-bit, saturating)
    w_f  = w_f0 − 2^BETA_SH·e − ψ / 2^ALPHA_SH

* The minus signs are deliberate. A larger `cos ω` means a *lower*
  frequency.
* `w_f0` is the free-running word `cos(2π f0/f_s)` for the expected test
  frequency. It is an input, so one design serves any test tone. The loop
  tolerates an error of a few percent in it; the tests start 1 % off.

**Amplitude loop.** `w_a = 1 + (|z| − |x_I|)/2^GA_SH`, rounded. There is
no separate accumulator. The oscillator state already integrates
`w_a − 1`, so a second integrator would make the loop oscillate. The loop
settles where the mean of `|x_I|` equals the mean of `|z|`. Rounding
matters here: plain truncation biased the replica low, and the leftover
in-phase fundamental in `r` then biased θ3.

## Harmonic references (m_npll, edge_div)

`edge_div` counts both edges of the oscillator's square wave and toggles its
output every m edges. This gives f/m with 50 % duty even for odd m.

The **first edge after reset toggles the output**, and that edge is always
a rising one. As a result, every rising edge of the divided wave falls on a
rising edge of the oscillator, whatever m is. Once the PLL aligns those
edges with the rising zero crossings of `z`, `x_I` follows `+sin(kωn)` for
both even and odd k. A divider that toggles on the k-th edge instead would
lock even harmonics with inverted sign.

The divider output is registered, so it appears one clock after the
oscillator edge. The m_npll therefore delays its reference square wave by
one clock to match. Without this, the k-th tone leads by one sample, which
is 20–60° at the harmonic, and the coefficient loops settle in the wrong
place. The amplitude word of these oscillators is fixed at one, because
only their sign is used.

## Coefficient loops (lms_coef)

The mixer reference is `sign(x_Ik)` (a sine) for odd k and `sign(x_Qk)` for
even k. The paired harmonics have fixed phases: a static odd
non-linearity on a sine produces sine harmonics, and an even one produces
cosine harmonics. Each accumulator step is ±1:

    acc += DIR_k · sign(r) · sign(reference)      θk = acc / 2^GAMMA_SH

The sign `DIR_k` follows from two facts:

* The k-th harmonic of `sin^k` has the sign `(−1)^floor(k/2)`. So raising θk
  pushes that harmonic of `z` down for k = 2, 3 and up for k = 4, 5.
* The waveguide's quadrature output is `−cos`.

Together these give `DIR = −1, +1, +1, −1, …` for k = 2, 3, 4, 5
(`npll_pkg::lms_dir`). Getting this wrong makes a loop diverge, which is
what the top-level fault test shows.

With `est` low the accumulators hold. This is the foreground-calibration
mode.

The loop is sign-sign, so its speed depends on how large the harmonic is
relative to everything else in `r`. The residue is dominated by the
oscillator's phase and amplitude dither. During estimation this dither drives
the 6-bit residue into saturation in about one sample in ten, while the
harmonics being tracked are only 0.3–1.5 LSB. The second and third
harmonics converge in about 1 ms at 200 MHz. The weak 4th and 5th
harmonics take several times longer. `GAMMA_SH` trades
convergence time against the final wander of θk.

## Corrector arithmetic (poly_corrector)

Powers of y are normalised to full scale, `p_k = y^k / 2048^(k−1)`, and
kept with 12 fractional bits. Each term is `θk·p_k` with θk in Q1.15, so
θ = 1/2048 adds at most one LSB at full scale. The sum is rounded in two
ways:

* `z`: 12 integer + 3 fractional bits. The loops and the replica use this.
* `z12`: a plain 12-bit code.

Both saturate, and both are registered, one clock after `y`.

## Number formats and parameters

| Quantity | Width | Source |
|---|---|---|
| ADC code `y` | 12 | reference configuration |
| corrected output `z`, replica `x^` | 12 + 3 fractional | reference configuration |
| `w_f`, `w_a`, loop accumulator ψ | 16 | reference configuration |
| residue `r` | 6 (ADC LSBs, floor, saturating) | reference size; LSB weight chosen here |
| θk | 16, Q1.15 | chosen here |
| `x_Q` | 12 + 3 + 5 | chosen here (`Q_EXT`) |

These are the `orth_corr_top` parameters; every default is the tested
configuration:

| Parameter | Default | Meaning |
|---|---|---|
| `N_ORDER` | 3 | highest harmonic cancelled (5 also tested) |
| `GAMMA_SH` | 5 | θ step, γk = 2^−5 of a θ LSB per sample |
| `GA_SH` | 7 | amplitude-loop gain |
| `BETA_SH` | 6 | PLL proportional gain, 64 LSB of `w_f` |
| `ALPHA_SH` | 5 | PLL integral gain, 1/32 LSB of `w_f` per count; ψ range ±1024 LSB |

The loop gains were chosen here by simulation. The reference design names
the gains (α, β, γa, γk) but gives no values.

## Using it

Top module: `orth_corr_top`.

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | sample clock; asynchronous active-low reset |
| `est` | in | 1 = estimate coefficients (test tone applied), 0 = hold |
| `y[11:0]` | in | ADC code, two's complement |
| `w_f0[N_ORDER:1]` | in | `round(32768·cos(2π·k·f0/f_s))` for loop k (k = 1 is the A-NPLL) |
| `z[14:0]`, `z12[11:0]` | out | corrected output, 12+3 bits and 12 bits |
| `x_hat`, `r` | out | replica of the tone and residue |
| `theta`, `psi`, `w_f`, `w_a` | out | loop states, for monitoring or for storing θ |

A calibration goes like this:

1. Apply a sine of known approximate frequency f0. The tests use 0.9 of
   full scale.
2. Set `w_f0`, release reset, and hold `est` high for a few milliseconds
   of samples.
3. Drop `est`. The coefficients stay until the next reset.

The test tone needs `N_ORDER·f0 < f_s/2`. It should also be above about
f_s/100 (see *The oscillator*).

## Results

These were measured by the testbenches with the ADC model described below,
a 12-bit converter with −10/+12 LSB error at the ends of its range.

* **Third order, 1 ms of estimation** (`tb_orth_corr_top`, eight seeds):
  * θ2 ≈ −17, θ3 ≈ −130 (Q1.15).
  * HD3 drops from −61.8 dBc to between −90 and −103 dBc.
  * HD2 drops from −74 dBc to between −85 and −92 dBc. It is then the
    largest harmonic, about 20 dB below the raw HD3.
  * SINAD rises from 60.8 dB to 68.2 dB, which is 9.8 to 11.0 effective
    bits. The corrected value sits close to the noise floor set by
    12-bit quantisation and the model's dither.
  * The fundamental is kept within 0.3 %.
* **Amplitude sweep with the frozen coefficients** (`tb_orth_corr_sweep`):
  * The SFDR of the raw codes reaches 67 dB only up to 0.45 of full scale.
  * The corrected codes reach 67 dB up to 0.9, with no loss at any
    amplitude from 0.09 up.
* **Fifth order, 8 ms of estimation** (`tb_orth_corr_5th`):
  * HD5 improves by 7–10 dB, HD3 by 12–14 dB.
  * The extra orders cost some third-order accuracy, because θ5 also moves
    the third harmonic and the θ3 loop has to follow it.

## Files

| File | Contents |
|---|---|
| `rtl/npll_pkg.sv` | widths, the `lms_dir` table, saturation helper |
| `rtl/orth_corr_top.sv` | whole system |
| `rtl/poly_corrector.sv` | polynomial corrector |
| `rtl/a_npll.sv` | tone replica: PLL with amplitude loop |
| `rtl/m_npll.sv` | frequency-multiplying PLL |
| `rtl/dwo_nco.sv` | waveguide oscillator |
| `rtl/npll_pfd.sv` | phase-frequency detector |
| `rtl/npll_dlf.sv` | PI loop filter |
| `rtl/edge_div.sv` | edge-counting divider |
| `rtl/residue_cmp.sv` | residue subtractor |
| `rtl/lms_coef.sv` | sign-sign coefficient loop |
| `tb/adc_model.sv` | behavioural ADC: `y = x + βe·|x| + βo·x·|x|` with βe = 1/2048, βo = 11/2048, ±0.5 LSB dither |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the 5th-order and sweep tests |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/npll_pkg.sv tb/tb_orth_corr_top.sv --top-module tb_orth_corr_top -o sim
    obj_dir/sim

Replace `tb_orth_corr_top` with any other `tb_*` name.

* The system tests take a few seconds.
* `tb_orth_corr_top` runs the design at its default parameters.
* The block tests cover:
  * the oscillator against the ideal sine and cosine;
  * the detector against an edge-counter model;
  * the filter, divider, corrector, residue and coefficient loop against
    arithmetic models;
  * both PLLs for lock, phase and amplitude.

## Limits and departures

* **ADC model and test tone.** The reference gives the ADC's transfer
  shape and its −10/+12 LSB error, but not its coefficients or the test
  frequency. The values above are choices, and the measured gains depend
  on them. This converter's native distortion is milder than the
  reference's (about −62 dBc instead of a SINAD of 55 dB). The dB figures
  here are therefore not a reproduction of the reference's numbers.
* **Convergence time and spur reduction.** For third order this design
  converges in the reference's 1 ms. Fifth order is tested with 8 ms. The
  limit is the residue noise from the waveguide's amplitude-frequency
  coupling, described under *The oscillator*. The reference reports a
  dominant spur more than 30 dB lower and a SINAD 12 dB higher. Here the
  gains are about 20 dB and 7.5 dB, because this ADC model starts closer
  to the quantisation floor.
* **Amplitude loop without an accumulator.** The reference accumulates the
  amplitude error and scales it onto `w_a`. Here `w_a` is the scaled error
  itself, and the waveguide state does the integrating (see *Locking*).
  An accumulator on top of that would make a double integrator in the loop.
* **What the replica locks to.** The replica PLL and its amplitude loop
  follow the corrected output `z`, not the raw codes. The aim is that the
  replica matches the amplitude of the signal it is subtracted from. With
  θ = 0, as at the start, the two are the same.
* **Amplitude sweep.** The reference estimates at one amplitude and sweeps
  from a tenth of it to twice it, so it estimates at about half of full
  scale. With this ADC model the harmonics at 0.45 FS are too weak against
  the residue noise. After 2 ms of estimation at 0.45 FS, the corrected
  SFDR stays above 67 dB only up to 0.75 FS, against 0.45 FS raw. After
  4 ms the coefficients have drifted away, and the correction lowers the
  SFDR. The sweep test therefore estimates at 0.9 FS and sweeps from 0.09
  to 0.9 FS.
* **Design choices beyond the reference.** The following were all chosen
  here:
  * the divider phase rule and the one-clock reference delay in the
    M-NPLL;
  * rounding in the amplitude loop;
  * the `est` hold input;
  * the free-running words `w_f0`;
  * power-of-two gains;
  * every reset value.
* **Clock speed.** The oscillator recursion is two multipliers and two
  adders in one clock, and the corrector is a chain of multipliers in one
  clock. No pipelining was added. Closing timing at 200 MHz in a given
  technology may need a retimed corrector. The oscillator loop cannot be
  pipelined without changing the recursion.
* **Orders beyond five.** These are allowed by the parameters (`M_W = 4`
  gives k ≤ 15) but have not been simulated.
