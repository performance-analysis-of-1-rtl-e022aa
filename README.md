# Grid synchronization with single-phase T/4 PLLs and secondary control paths

A bridgeless PFC (power-factor-correction) rectifier has no current sensor.
It rebuilds the line current from a model of the converter. That works only
if the controller knows the phase of the grid voltage accurately: any phase
error turns directly into a current-estimation error. A zero-crossing
comparator is too noisy for this. A phase-locked loop (PLL) filters the noise
but follows a frequency change only slowly.

This RTL is the digital grid-synchronization subsystem of such a controller.
The sampled grid voltage passes through a CIC decimation filter and then feeds
three single-phase PLLs, all running on the same samples:

| PLL  | extra path                       | what the extra path does                                    |
|------|----------------------------------|-------------------------------------------------------------|
| T/4  | none                             | conventional PLL: PI loop filter around a fixed centre frequency |
| FFB  | frequency feedback (Fig. A)      | feeds back \|v_f·k_FB\|, saturated, to the loop-filter input |
| FFF  | frequency feedforward (Fig. B)   | measures the grid frequency from the voltage vector's angle and moves the centre frequency |

Running the three side by side allows them to be compared under identical
conditions. An input, `sel`, chooses which one drives the converter. The
chosen PLL supplies three outputs:

- the phase θ';
- the unit sinusoid cos θ', in phase with the grid voltage and used to rebuild the current;
- the grid polarity `zc_pll`, whose edges are the PLL's zero crossings.

All gains are those of the reference design's simulation:

- 50 Hz nominal frequency;
- k_p = 46 and 1/T_i = 23;
- k_FB = 80000;
- k_FF = 48828.125 s⁻¹;
- sample period Ts = 20.48 µs.

## The T/4 PLL

A single-phase grid provides one voltage, but a dq-frame phase detector needs
two signals in quadrature. The T/4 PLL builds the second signal by delay:

```
v ──┬──────────────────────── v_α ─┐
    └─ delay T/4 (244 samples) v_β ─┤ αβ→dq ──► v_d  (amplitude)
                                    │ (θ')  ──► v_q ─► e = v_q* − v_q (+v_FB) ─► PI ─► v_f
                                    │                                                │
            θ' ◄── 1/s ◄── ω' = ω_c + v_f (+ ω_FF) ◄─────────────────────────────────┘
```

- **Quadrature generator** (`qsg_t4`): v_α is the input sample. v_β is the
  sample from 244 samples earlier, which is a quarter period at 50 Hz
  (round(1/(4·50 Hz·20.48 µs)) = 244). The delay is a circular buffer.
  Off nominal frequency the delay is no longer exactly 90°. The resulting
  error shows up as a ripple at twice the grid frequency on v_q; at 49 Hz
  and 51 Hz this ripple is about 0.016 pu. This ripple limits the
  steady-state accuracy: the simulated PLLs stay within 0.017 rad (0.28 % of
  a turn) of the grid.
- **Phase detector** (`cordic_sincos`, `park_transform`):
  - v_d = v_α cos θ' + v_β sin θ'
  - v_q = v_α sin θ' − v_β cos θ'

  For a grid voltage v = V cos θ, the detector gives v_q = V sin(θ' − θ).
  This is zero when θ' = θ, and positive when the PLL leads. The PLL
  therefore locks with cos θ' in phase with the input, and v_d = V.
- **Loop filter** (`pi_filter`): v_f = k_p·(e + (1/T_i)·∫e dt), with the
  integral summed by backward Euler.
  - The gains follow from a 0.2 s settling time and damping 0.707:
    - k_p = 9.2/T_set = 46;
    - T_i = T_set·ξ²/2.3, so 1/T_i = 23.
  - The resulting loop has ω_n ≈ 32.5 rad/s (for V = 1 pu).
  - The integral is clamped to ±100 rad/s.
- **VCO** (`vco_nco`): ω' = 2π·50 rad/s + v_f (+ ω_FF), integrated into a
  32-bit phase accumulator.

## The secondary control paths

This is the part that needs the most care.

### Frequency feedback (FFB, `ffb_path`)

v_FB = min(|v_f·k_FB|, V_SAT) is added to the loop-filter input. The loop
filter therefore settles where v_q = v_FB, not where v_q = 0. A PLL that has
moved its frequency away from 50 Hz carries a deliberate phase offset of
asin(v_FB/V). This offset is what speeds up its reaction to frequency slopes.

Two consequences matter to a user:

- **Simulation gains (k_FB = 80000, V_SAT = 5; the defaults).** v_FB
  saturates at 5 pu for any frequency correction above 0.06 mrad/s. No phase
  error can produce a v_q that large, so the loop has no equilibrium: its
  integrator runs into its clamp. This matches the "amplified" feedback that
  the reference design observed on hardware with these values.
- **Retuned gains (k_FB = 50, V_SAT = 0.5).** The loop locks in frequency.
  Off 50 Hz the feedback saturates at 0.5 pu, which gives a constant 30°
  phase offset, as checked in `tb_t4_pll`. Set these values with the `KFB`
  and `FB_SAT` parameters.

The feedback uses the v_f of the previous sample, which avoids an algebraic
loop.

### Frequency feedforward (FFF, `cordic_atan`, `fff_path`)

The path works in four steps:

1. It takes the angle of the stationary-frame vector, θ_v = atan2(v_β, v_α).
2. It differentiates θ_v as a first difference times k_FF = 1/Ts. The result
   is the grid angular frequency.
3. It subtracts ω_c, then limits the result to ±31.4 rad/s (±5 Hz).
4. It averages the result over 512 samples (10.5 ms) with a moving-average
   FIR filter.

The output ω_FF is added to the VCO frequency, so the centre frequency jumps
to the measured grid frequency. The PI then only has to remove the remaining
phase error.

- **Ideal input.** After a 49 → 51 Hz step the FFF PLL is back within
  0.02 rad in 35 ms. The conventional PLL needs 132 ms.
- **Noisy input.** Differentiating a noisy angle at the full 48.8 kHz rate is
  rough. With 1 % noise and ripple on the input, the limiter is active in
  most samples and the averaged estimate is biased by about 0.05 rad/s. The
  PI loop absorbs this bias; the PLL still locks within 0.02 rad.

## Numbers and timing

| quantity            | format                                    |
|---------------------|-------------------------------------------|
| voltage (`volt_t`)  | signed 16 bit, 1.0 pu = 2¹⁴               |
| detector error (`err_t`) | signed 20 bit, same scale            |
| frequency (`omega_t`) | signed 32 bit, rad/s with 16 fraction bits |
| phase (`phase_t`)   | unsigned 32 bit, 2³² = one turn           |

The loop gains are real-valued parameters. Each is turned into a
fixed-point constant at elaboration; the formulas are in each module's header.
The loop expects the input amplitude to be about 1 pu, because the loop gain
scales with V.

**Sequencer.** Each PLL (`t4_pll`) processes one sample in a short sequence:

1. T/4 buffer read;
2. CORDIC for sin/cos θ' (16 rotations);
3. in the FFF PLL only, a second CORDIC for atan (20 rotations) in parallel;
4. dq rotation;
5. PI;
6. VCO step.

`out_valid` rises 24 clocks after `in_valid`, or 28 clocks in the FFF PLL.
Samples must be at least 30 clocks apart; an assertion flags an overrun.

**Real time.** In real time the samples are 2048 clocks apart: a 100 MHz
clock, ADC words every 64 clocks (1.5625 MHz), and CIC decimation by 32
give Ts = 20.48 µs. The CIC filter (`cic_decim`) has 3 stages and unity DC
gain. Its delay is about 50 ADC samples, which costs about 0.01 rad of phase
at 50 Hz.

The sample period in the gain formulas is the `TS` parameter. It is
independent of the clock rate, so a testbench can send samples faster than
real time without changing the loop dynamics.

## Top level: `sync_subsystem`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `adc_valid`, `adc_data[15:0]` | in | grid-voltage ADC word, signed, 1 pu = 2¹⁴, ≥ 2 clocks apart |
| `sel` | in | `SCP_NONE`, `SCP_FFB` or `SCP_FFF`: the PLL that drives the outputs below |
| `v_valid`, `v_filt` | out | filtered grid-voltage sample, one per Ts |
| `pll_valid[3]`, `pll[3]` | out | per PLL (0 T/4, 1 FFB, 2 FFF): θ', ω', cos/sin θ', v_d, v_q, loop-filter input and output, v_FB, ω_FF, saturation flag |
| `theta_sel`, `cos_sel` | out | θ' and cos θ' of the selected PLL |
| `zc_pll` | out | grid polarity (cos θ' ≥ 0) from the selected PLL |

## Where this design makes its own choices

The reference design gives the block structure and the gains. The following
points are this implementation's choices:

- The number formats, and the use of CORDICs for sin/cos and atan.
- The per-sample sequencing.
- The CIC order and ratio, and the ADC rate.
- The ±100 rad/s integrator clamp.
- The FFF limiter range and FIR filter. The reference design tunes its FIR
  filter by a procedure it does not give; here it is a 512-tap moving average.
- The subtraction of ω_c inside the FFF path. It makes ω_FF a deviation, so
  that ω_c + v_f + ω_FF stays at the grid frequency.
- The v_q sign convention. It gives negative feedback for the error
  v_q* − v_q.
- The lock point θ' = θ for v = V cos θ. The published block diagram labels
  the lock point θ' = θ + π/2; that label depends on how the input phase is
  defined.
- The output selector.

The rest of the PFC controller is not included: the voltage controller, the
carrier generator, the current-rebuilding modulator, the gate driver and the
power stage. The reference design only names these blocks.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_cordic_sincos`, `tb_cordic_atan` | CORDIC results against real-valued sin/cos/atan2 (≤ 3 LSB, ≤ 20000/2³² turn); latency |
| `tb_qsg_t4` | exact 244-sample delay, zero fill |
| `tb_park_transform` | dq rotation against a real model; locked and leading cases |
| `tb_pi_filter`, `tb_vco_nco`, `tb_ffb_path`, `tb_fff_path` | each control-law equation against a real-valued model, including clamp, saturation and limiter |
| `tb_cic_decim` | bit-exact against a cascaded moving-sum model |
| `tb_t4_pll` | the three PLLs on a 49 → 51 Hz step; see below |
| `tb_sync_subsystem` | the whole subsystem, end to end; see below |
| `tb_sync_full` | the whole subsystem at its default parameters in real time (90 M clocks, about 1 min) |

`tb_t4_pll` checks:

- lock within 2° and 0.2 rad/s before and after the step;
- the FFB offset equals asin(v_FB);
- ω_FF equals 2π·Δf;
- the FFF PLL settles before the conventional one.

`tb_sync_subsystem` drives noisy ADC words through the step and cycles the
selector. It counts every mechanism and requires each to occur: CIC
decimation, results, FFB saturation, FFF limiting, the step, selector
changes and zero crossings. It also checks that zero crossings fall within
0.06 pu of the grid's.

To run one, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pll_pkg.sv tb/tb_t4_pll.sv --top-module tb_t4_pll
./obj_dir/Vtb_t4_pll
```

Use `+verilator+rand+reset+2` to start uninitialised state at random values.
The design resets every register that is read.
