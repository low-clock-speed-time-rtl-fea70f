# Time-interleaved polar delta-sigma transmitter baseband

A polar delta-sigma modulator (DSM) transmitter drives a switched-mode power
amplifier with a signal whose envelope has only two values, 0 and 1. It
gets there by splitting each complex baseband sample into envelope and phase.
It quantizes only the envelope with a 1-bit delta-sigma modulator and rotates
the resulting 0/1 envelope back to the original phase. After analog
up-conversion the amplifier only switches on and off. A band-pass filter
then removes the quantization noise.

The drawback is speed. Recombining the quantized envelope with the phase
spreads quantization noise into the signal band. The modulator therefore
needs a high oversampling ratio, and hence a fast clock. For a 7.68 MHz LTE
signal that is 245.76 MS/s (oversampling ratio 32) for about 41 dB SNDR.

This RTL removes most of that clock-speed requirement. The baseband input
arrives at only f_s/M (61.44 MS/s for M = 4) and is converted to polar form
once per input sample. The sample is then **held** and applied to M parallel
modulator branches. Together the branches produce the M output samples of a
frame in one frame period. A time-division multiplexer streams those samples
out at f_s. All arithmetic runs at f_s/M. Only a frame counter and the output
multiplexer run at f_s.

```
            f_s/M                                              f_s/M             f_s
 in_iq ──► cordic_vectoring ──env──► ti_envelope_dsm ──q[0..M-1]──► cordic_rotation x M ──► tdm_serializer ──► out_iq
  (I,Q)   (Cartesian→polar,          (M chained branches,           (bit k as level 0/1.0,   (branch 0 first,     out_env
           one for all branches)      held input)                    rotated by the phase)    one word / clock)
                     └──phase──► 1/2-frame delay ───────────────────────┘
```

## How the M branches replace a fast modulator

The modulator is a second-order low-pass loop with a 1-bit quantizer. In
full-rate form, one step is:

```
v[n]     = (i2[n] >= 0.5) ? 1 : 0                  1-bit quantizer (comparator + mux)
i1[n+1]  = i1[n] + u[n] - v[n]                      first integrator
i2[n+1]  = i2[n] + i1[n+1] - v[n]                   second integrator
V(z)     = z^-1 U(z) + (1 - z^-1)^2 E(z)
```

`dsm_branch` is exactly one such step, with the integrators taken out. The
state `(i1, i2)` comes in from the previous branch, and the updated state goes
out to the next. `ti_envelope_dsm` chains M of these branches. Only one state
register exists, the *frame register*. It holds the state leaving branch
M-1 and feeds branch 0 in the next frame. So the integrators of the fast
modulator live in the wiring between branches rather than in per-branch
registers. Hardware grows linearly with M, not with M².

The same envelope sample `u` enters every branch. That is the same as
upsampling the f_s/M input to f_s by repeating each sample M times (a
sample-and-hold). The result is therefore **bit-identical** to a single
modulator clocked at f_s and fed with the held input. The testbench of
`ti_envelope_dsm` checks this equivalence bit by bit.

Holding the input creates images of the input spectrum at multiples of
f_s/M. The hold's own frequency response is |sin(ωM/2)/sin(ω/2)|, and its
zeros sit exactly at those frequencies. The images are therefore pushed
below the modulator's noise floor without any interpolation filter. This is
the reason no input delay line, downsamplers or per-branch
Cartesian-to-polar converters are needed. Only one separator
(`cordic_vectoring`) serves all branches.

The cost is a long combinational path: M branches in series, each with two
adds, a subtract and a compare. That path is clocked only once per frame.
It has M clock periods to settle and should be constrained as a multicycle
path (see *Clocking*).

## Recombination and the output stream

Each branch's bit k becomes a level (0 or 1.0) and goes to its own
`cordic_rotation`. There it is rotated by the input phase. The result is
either exactly zero or a unit vector at the input phase.

Getting the phase right takes care. The modulator delays the envelope by
one full-rate sample, so bit k of frame F carries the envelope at full-rate
time F·M + k − 1:

- for k ≥ 1 that is the current input sample, so branches 1..M−1 use the
  phase delayed by one frame;
- for k = 0 it is the previous input sample, so branch 0 uses the phase
  delayed by two frames.

A mismatch of one sample between envelope and phase is a polar distortion
of its own. In the OFDM test below it cost about 5 dB of SNDR.

`tdm_serializer` captures the M branch words once per frame. It then emits
them one per clock, branch 0 first, so word k of a frame is full-rate time
step k. The envelope bit and a valid flag travel with each word as
`out_env` and `out_valid`.

Because the envelope is only 0 or 1, each rotator could be replaced by one
shared rotator of a unit vector plus M AND gates. This RTL keeps one CORDIC
per branch, following the structure it implements.

## Number formats

| Quantity | Format |
|---|---|
| I, Q, envelope, output I/Q | 16-bit two's complement, Q2.14 (1.0 = 16384) |
| phase | 16-bit unsigned binary angle, 65536 = one turn |
| modulator integrators | 20-bit Q6.14, saturating |
| CORDIC datapath | 21 bits (2 extra integer bits, 3 guard bits), 24-bit angle |

Types and constants are in `rtl/polar_dsm_pkg.sv`:

- `sample_t`, `phase_t`, `iq_t` and `polar_t`;
- `dsm_state_t` and the saturating `acc_sat`;
- the arctangent table `atan_tab(i) = round(atan(2^-i) / 2π · 2^32)`;
- the CORDIC gain correction `round(2^16 / K)`, where `K = Π sqrt(1 + 2^-2i)`.

The input should satisfy |in_iq| ≤ 1. A larger envelope overdrives the 0/1
modulator. The integrators then saturate, and `dsm_sat` reports it.

## Clocking and timing

There is one clock, `clk`, at the output rate f_s (245.76 MHz for the LTE
case). A counter raises the clock enable `ce` one cycle in M. `ce` is brought
out as `in_strobe`, and the input is sampled at the end of that cycle.

Every frame-rate register advances only when `ce` is high:

- separator, modulator, phase delay and rotators;
- the capture register of the multiplexer.

Only the frame counter and the output register of `tdm_serializer` toggle at
f_s. In an implementation, paths between `ce`-enabled registers can be
constrained as M-cycle multicycle paths. The modulator chain then closes at
f_s/M.

Latencies, in enabled (frame) cycles:

| Block | Latency |
|---|---|
| `cordic_vectoring` | ITER + 2 |
| `ti_envelope_dsm` | 1 |
| phase delay | 1, or 2 for branch 0 (parallel to the modulator) |
| `cordic_rotation` | ITER + 2 |
| capture in `tdm_serializer` | 1 |

End to end, the first word of a frame appears on `out_iq` right after the
(2·ITER + 5)·M-th rising edge that follows the sampling edge. For the
defaults that is 148 clocks. The words of a frame follow on consecutive
clocks, with no gaps.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `ti_polar_dsm_top` | `M` | 4 | branches, i.e. clock reduction factor (M = 1 is a plain polar DSM) |
| `ti_polar_dsm_top` | `ITER` | 16 | CORDIC iterations in both converters |
| `cordic_*` | `GUARD` | 3 | guard bits in the CORDIC datapath |
| `one_bit_quantizer` | `THRESH` | 8192 | decision threshold (0.5) |
| `tdm_serializer` | `W` | 34 | multiplexed word width |

## Files

| File | Content |
|---|---|
| `rtl/polar_dsm_pkg.sv` | shared types, formats, CORDIC constants |
| `rtl/ti_polar_dsm_top.sv` | top: frame counter, separator, modulator, phase delay, M rotators, multiplexer |
| `rtl/cordic_vectoring.sv` | pipelined Cartesian-to-polar CORDIC (signal component separator) |
| `rtl/ti_envelope_dsm.sv` | M chained branches and the frame register |
| `rtl/dsm_branch.sv` | one modulator time step (two integrators, quantizer) |
| `rtl/one_bit_quantizer.sv` | comparator plus level multiplexer |
| `rtl/cordic_rotation.sv` | pipelined polar-to-Cartesian CORDIC (recombiner) |
| `rtl/tdm_serializer.sv` | M-to-1 output time-division multiplexer |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ofdm_sndr_workload.sv` | in-band SNDR with an OFDM signal for M = 1, 2, 4 |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and stops itself.
Run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ti_polar_dsm_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/polar_dsm_pkg.sv tb/tb_ti_polar_dsm_top.sv \
    --Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. All of them finish in
seconds.

The testbenches are:

- **`tb_ti_polar_dsm_top`** runs the top at its default parameters. The
  input is 3000 frames of a two-tone complex signal whose phase turns
  through all quadrants and whose envelope swings between 0.15 and 0.85. A
  short burst at magnitude 1.6 follows. The testbench checks:
  - the latency, and that output words are gap-free;
  - that every word with `out_env = 1` is a unit vector at the phase of the
    input sample whose envelope it carries (the previous sample for word 0
    of a frame), and every word with `out_env = 0` is zero;
  - the in-band error: both the output stream and the held input pass
    through two cascaded 32-sample moving averages, and the
    signal-to-error ratio must be at least 30 dB (it measures 39.8 dB);
  - that each mechanism happens at least once: ones and zeros, a one from
    every branch position, all four output quadrants, and integrator
    saturation (during the overdrive only).
- **`tb_ofdm_sndr_workload`** is a channel-level quality test. Three tops
  with M = 1, 2 and 4 share one clock, standing for 245.76 MHz. Each samples
  the same OFDM signal at its own input rate: 245.76, 122.88 and
  61.44 MS/s. The signal has 38 QPSK subcarriers, 120 kHz apart, filling
  ±2.28 MHz of a 7.68 MHz channel, with peak magnitude 0.95. For each
  design, a 4096-point DFT over the ±3.84 MHz band is compared with the
  ideal spectrum, and the SNDR is computed after a least-squares gain fit.
  The results are 33.5–37 dB, depending on the random subcarrier phases,
  with no systematic loss from interleaving. The testbench requires at
  least 32 dB each and a spread of at most 3 dB.
- **`tb_ti_envelope_dsm`** compares the M output bits with an independent
  full-rate model stepped M times per frame. It uses slow, random, constant
  and overdriven envelopes. For constant levels the bit density must match
  the level.
- **`tb_dsm_branch` and `tb_one_bit_quantizer`** check exhaustively near the
  threshold and at the integrator limits.
- **`tb_cordic_vectoring` and `tb_cordic_rotation`** compare with `$sqrt`,
  `$atan2`, `$cos` and `$sin`:
  - tolerance is 3 LSB;
  - for the phase of very short vectors, the tolerance widens to the angle
    resolution their length allows.

  They also check the ITER + 2 latency with an irregular clock enable.
- **`tb_tdm_serializer`** checks slot order, timing and that captured words
  are held.

## What is assumed, and what is left out

The following are this implementation's choices, not fixed by the
architecture:

- **Loop filter.** The modulator is second order with unit coefficients,
  NTF (1-z⁻¹)² and threshold 0.5. The architecture only prescribes a
  low-pass DSM built from integrators and a comparator-plus-multiplexer
  quantizer. A different loop filter changes `dsm_branch` only.
- **CORDIC precision.** 16 iterations and 3 guard bits were picked for
  16-bit outputs. The gain correction is one constant multiplication at the
  output.
- **Alignment and clocking.** These are this design's own:
  - the per-branch phase delay;
  - the single clock with clock enable;
  - reset (asynchronous, active low, to zero);
  - integrator saturation.
- **Size.** Every CORDIC iteration is a pipeline stage. The flip-flop
  count is dominated by the five CORDICs at M = 4, about 1150 flip-flops
  each, for roughly 5200 in the whole design. Where area matters, fewer
  pipeline registers (the separator and rotators have M clock periods per
  stage) or a single shared rotator would cut this sharply.
- **Verification depth.** In-band quality was measured with an LTE-like
  OFDM test signal, not a standard LTE waveform. The second-order loop
  reaches 33.5–37 dB SNDR in a 7.68 MHz channel at 245.76 MS/s. The
  architecture was reported to reach about 41 dB with a real LTE signal.
  The gap is most likely the loop filter, which is an assumption here, or
  the test signal. Either way, the result does not change with M. No FPGA
  timing closure was attempted.

Not included, because they are not digital logic:

- the RF up-converter (850 MHz);
- the inverse class-F switched-mode power amplifier;
- the output band-pass filter.

The input delay line and zero-latency downsamplers of earlier
time-interleaved schemes are also absent. This architecture exists to
remove them.
