# Coherent envelope measurement with input-clocked DDS

This circuit measures the envelope `V_I (1 + m(t))` of a high-frequency carrier
`v_I(t) = V_I (1 + m(t)) sin(2π F_I t)`. It does not rectify or square the
signal. Instead it moves the envelope onto a low reference frequency and then
demodulates it coherently. The central idea is that the two direct digital
synthesizers (DDS) that make the local oscillators are **clocked by the input
wave itself**. A comparator squares up `v_I`, and every rising and every falling
edge of that square wave steps both phase accumulators. Every synthesized
frequency is therefore a fixed fraction of `F_I`. If the carrier drifts, the
oscillators drift with it, and the intermediate frequency and the demodulation
stay locked. No PLL and no square-root stage are needed.

The design follows the architecture published as *"Design of Coherent Envelope
Measurement Circuit Based on Direct Digital Frequency Synthesizer"*. The DDS
part is synthesizable SystemVerilog. The analog parts (comparator, D/A
converters, multipliers and Chebyshev filters) are real-valued behavioural
models, so the full chain can be simulated end to end with Verilator.

## Signal path and frequency plan

```
 v_in ──┬──► comparator ── CLK (both edges) ──┬──► DDS1 (FCW) ─► DAC ─► LPF ─ dds_out1 ─┐
        │                                      └──► DDS2 (2^(N-1)-FCW) ─► DAC ─► LPF ─┐  │
        │                                                                   dds_out2  │  │
        └──────────────────────────────► MUL1 ◄───────────────────────────────────────┼──┘
                                          │
                                   LPF1 (500 kHz) ── synch_out (F0, same envelope)
                                          │
                                         MUL2 ◄── dds_out2
                                          │
                                   LPF2 (10 kHz) ── env_out (envelope)
```

With `N = 16` and both clock edges active, the accumulators step `2·F_I`
times per second:

| signal | frequency | with FCW = 30000, F_I = 1 MHz |
|---|---|---|
| DDS1 | `f_s1 = 2·FCW/2^N · F_I` | 915.53 kHz |
| DDS2 (FCW2 = 2^(N-1) − FCW) | `f_s2 = F_I − f_s1 = F0` | 84.47 kHz |
| synch_out (MUL1 + LPF1) | `F0 = (1 − FCW/2^(N-1)) · F_I` | 84.47 kHz |
| env_out (MUL2 + LPF2) | DC + envelope | — |

- **MUL1/LPF1.** MUL1 forms `v_I · v_s1`. LPF1 keeps the difference term, a
  sine at `F0` whose amplitude is still `∝ V_I (1 + m(t))`.
- **MUL2/LPF2.** DDS2 runs at exactly `F0`, because its control word is the
  complement of DDS1's. MUL2 therefore gives a DC term plus a `2·F0` term, and
  LPF2 keeps the DC term, `∝ V_I (1 + m(t)) · sin(φ_s2 − φ_s1)`.
- **Tracking.** `F0` is a fixed fraction of `F_I`, so both stages stay tuned
  when the carrier moves.
- **FCW resolution.** One FCW step moves `f_s1` and `F0` by `2·F_I/2^16`. At
  1 MHz that is 30.5 Hz. For example, a 999 kHz reference is realised as
  998.993 kHz (FCW = 32735), which gives F0 = 1.007 kHz.

## The double-edge phase accumulator

The documented accumulator is "an adder activated on either the rising or the
falling clock edge". Standard flip-flops have one active edge, so
`phase_accumulator` uses two ordinary registers:

- `acc_rise` adds FCW on every rising edge of CLK while `enable` is high;
- `acc_fall` adds FCW on every falling edge while `enable` is high;
- the phase is `acc_rise + acc_fall + phi_in (mod 2^16)`.

Each edge changes exactly one register by FCW, so the sum advances by FCW per
edge. After `k` enabled edges the phase is `phi_in + k·FCW`. The adders are
combinational after the registers, so the phase and the sine sample settle one
adder-plus-memory delay after each CLK edge. `phi_in` is added after the
registers, so a change of `phi_in` shifts the output phase immediately.
Reset is asynchronous and active low. It clears both registers, so the phase
restarts at `phi_in`.

The 16-bit phase is split into `pa_15` (the MSB) and `pa` (bits 14:0). The
waveform memory holds one half period of `|sin|` in 1024 words of 11 bits,
addressed by `pa[14:5]`, and `pa_15` supplies the sign:

```
sample = (pa_15 ? −1 : +1) · round(2047 · sin(π (a + 0.5) / 1024)),  a = pa[14:5]
```

The table is computed at elaboration from this formula. The half-word offset
keeps the table odd-symmetric and means zero is never output. Dropping
`pa[4:0]` bounds the amplitude error to about 3 LSB.

## Why `phi_in` matters

The two synthesizers share `phi_in`. DDS1's phase enters `synch_out` with one
sign and DDS2's phase enters the product with the other. The demodulated level
is therefore proportional to `sin(2·φ + c)`, with `φ = 2π·phi_in/2^16`. The
constant `c` collects the phase shifts of the filters and of the DAC's
zero-order hold. Moving `phi_in` by 2^14 (a quarter turn) flips the sign of
`env_out`. In practice, `phi_in` is trimmed once for maximum `|env_out|`. With
the default models, `phi_in = 0` gives about 92 % of the maximum, or
−0.119 V of `env_out` per volt of envelope.

## Analog models

| model | behaviour |
|---|---|
| `comparator` | `clk_out = vin > VTH` (VTH = 0 V); ideal, no hysteresis |
| `dac` | `vout = VFS · code / 2^(DW−1)`, held until the next CLK edge |
| `analog_multiplier` | `y = K · a · b`, ideal |
| `chebyshev_lpf` | 8th-order Chebyshev type I, 0.1 dB ripple, band edge `BW_HZ` |

`chebyshev_lpf` builds the analog prototype poles from the ripple and order.
It pairs them into second-order sections, maps each section to discrete time
with a bilinear transform pre-warped at the band edge, and runs the cascade
every `TS_NS` (2 ns) in double precision. Its measured gain matches the
Chebyshev magnitude `1/sqrt(1 + ε² T8(f/fc)²)` to better than 0.1 % from DC
to twice the band edge.

The filters are used as follows:

- LPF1 has a 500 kHz band edge and LPF2 a 10 kHz band edge.
- Each DDS output also passes a 1 MHz reconstruction filter (the Nyquist band
  of the 2 MHz edge rate) before its multiplier.

The 10 kHz filter rings near its band edge. After a step, `env_out` needs
about 1 ms to settle to 0.1 %.

## Modules

| module | kind | contents |
|---|---|---|
| `envelope_meter_top` | simulation model | the whole chain of the diagram above |
| `coherent_dds_pair` | RTL | FCW complement + DDS1 + DDS2, clocked by CLK |
| `dds_unit` | RTL | phase accumulator + waveform memory |
| `phase_accumulator` | RTL | double-edge accumulator, offset adder, PA_15/PA split |
| `waveform_rom` | RTL | half-wave sine table with sign |
| `fcw_complement` | RTL | `FCW2 = 2^(N-1) − FCW` |
| `comparator`, `dac`, `analog_multiplier`, `chebyshev_lpf` | behavioural | analog parts |
| `dds_pkg` | package | `PHASE_W = 16`, `ROM_AW = 10`, `SAMPLE_W = 12` |

`coherent_dds_pair` is the part to take into an FPGA or ASIC flow. Its clock
is the comparator output, and its inputs `fcw`, `phi_in` and `enable` should
be stable or synchronized to that clock. The top uses `real` ports and `#`
delays and is for simulation only.

Top-level parameters, with defaults:

- **Documented values.** `N = 16`, `LPF1_BW_HZ = 500e3`, `LPF2_BW_HZ = 10e3`,
  `LPF_ORDER = 8`, `LPF_RIPPLE_DB = 0.1`.
- **Choices made for this RTL.** `ROM_AW = 10`, `DW = 12`, `VFS = 1.0`,
  `K1 = K2 = 1.0`, `DDS_LPF_BW_HZ = 1e6`, `TS_NS = 2.0`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dds_pkg.sv -y rtl \
          tb/tb_envelope_meter_top.sv --top-module tb_envelope_meter_top
./obj_dir/Vtb_envelope_meter_top
```

The model testbenches advance time in 1 ns steps, so use a `1ns/1ps`
timescale. Every file sets one.

| testbench | what it checks |
|---|---|
| `tb_phase_accumulator` | phase = phi_in + FCW × (enabled edges), random enable/FCW/phi_in, reset |
| `tb_waveform_rom` | full phase sweep against `2047·sin`, odd symmetry, peaks ±2047 |
| `tb_dds_unit` | sample after each edge, output frequency from zero crossings, hold when disabled |
| `tb_coherent_dds_pair` | both outputs per edge for four FCWs; crossings of DDS1 + DDS2 = CLK periods |
| `tb_fcw_complement`, `tb_comparator`, `tb_dac`, `tb_analog_multiplier` | the formulas above |
| `tb_chebyshev_lpf` | gain at DC and 100 kHz – 1 MHz against the Chebyshev magnitude |
| `tb_envelope_meter_top` | F0 = 84.47 kHz; sign flip with phi_in; linearity; tracking at 1.001 MHz; 1 kHz envelope modulation; enable freeze |
| `tb_workload_envelope_chirp` | 1 MHz carrier, envelope 2 ± 1 V swept 0 → 100 Hz over 100 ms (≈45 s run time) |
| `tb_workload_experiments` | 5.005 kHz and 1.007 kHz reference outputs; F0 following a 1 → 1.001 MHz sweep |

Results at default parameters:

- The reference frequency is within 0.01 % of `(1 − FCW/2^15)·F_I`.
- Halving the carrier amplitude halves `env_out` (ratio 0.50002).
- A 1 kHz, 50 % envelope modulation appears with extremes at 1.52 and 0.50
  of the unmodulated level.
- During the 0–100 Hz chirp, `env_out` stays within 0.035 V (input-referred)
  of the ideally filtered envelope.
- When the input sweeps from 1 MHz to 1.001 MHz, the synchronized output stays
  at 1.007–1.008 kHz. A fixed 999 kHz reference would drift towards 2 kHz.

## Limits and departures

- **Sizes chosen here.** The waveform memory size, sample width, DAC scale,
  multiplier gains, comparator threshold and the reconstruction filter are not
  specified by the original design. The values above are choices for this RTL.
- **Ideal analog models.** There is no noise, offset, comparator hysteresis or
  multiplier bandwidth limit. A real comparator needs hysteresis on a noisy
  input, or it produces extra edges that advance the phase.
- **LPF2 needs `2·F0` well above 10 kHz.** With the bench settings that give
  F0 = 1 kHz or 5 kHz, only the reference output (`synch_out`) is meaningful.
  The original bench measurements used only that stage.
- **The output scale depends on `phi_in` and the filter phases.** Calibrate it
  once, for example with a constant-envelope carrier as
  `tb_workload_envelope_chirp` does.
