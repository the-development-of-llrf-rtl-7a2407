# Digital LLRF controller for a 500 MHz storage-ring cavity

This is the FPGA logic of a digital low-level RF (LLRF) system. It holds
the field in a 500 MHz accelerating cavity at a set amplitude and phase. The
analogue front end mixes the cavity pick-up and a reference signal down to a
50 MHz intermediate frequency (IF). The logic samples both IFs at 40 MHz and
measures their amplitude and phase. It compares the two and runs one PI
controller for amplitude and one for phase. It then synthesises a new 50 MHz
drive IF at 230 MHz for the DAC, which the front end mixes back up to
500 MHz. A soft processor reads and writes set-points, gains and monitoring
values through four shared block memories. A third receive chain measures
the forward power, for monitoring only.

The design targets field stability of ±0.75 % in amplitude and 0.35° in
phase. All of the datapath is 16-bit fixed point.

```
            40 MHz                                                     230 MHz
 adc_ref ─► iq_demod ─► cic_filter ─► cordic_vec ─┐                 ┌─► dac_out
                                   (amp, phase)   ▼                 │
                                             field_error ─► pi_ctrl (amp)  ─┐
                                   (amp, phase)   ▲         pi_ctrl (phase) ─┤
 adc_cav ─► iq_demod ─► cic_filter ─► cordic_vec ─┘                          │
                                                   cordic_rot ◄──────────────┘
                                                       │ (I, Q)
                                                       └─► iq_mod ─────────┘
 adc_fwd ─► iq_demod ─► cic_filter ─► cordic_vec ─► forward-power monitoring only
 host bus ◄─► block_memory (4 × 1024 × 32) ◄─► llrf_mem_if ◄─► set-points, gains, monitoring
```

## Number formats

Every sample, I, Q and amplitude is a 16-bit two's-complement word. A phase
is a 16-bit two's-complement angle in which 2^15 stands for π. With that
scale, 16-bit wrap-around is the same thing as angle wrap-around:
0x4000 = +90°, 0x8000 = ±180°, and adding two angles in 16 bits gives the
right angle modulo 360°. The I/Q convention is x(t) = I·cos ωt − Q·sin ωt,
so I = A·cos φ and Q = A·sin φ. All of this is in `rtl/llrf_pkg.sv`, along
with the shared structs (`iq_t`, `polar_t`, `ctrl_t`, `mon_t`, `mem_req_t`)
and the constant tables.

## Getting I and Q from one ADC: IQ sampling (`iq_demod`)

This part is the least obvious. The 50 MHz IF is sampled at 40 MHz, which
is below its frequency. Between two samples the IF phase advances by
2π·50/40 = 2.5π, which is +90° modulo a full turn. The sample stream
therefore repeats a four-sample pattern:

| sample n mod 4 | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| value | I | −Q | −I | Q |

The demodulator is a 2-bit counter and a sign flip; it has no mixer and no
filter. After each Q sample it outputs a complete pair and pulses
`iq_valid`, so pairs come at 20 MS/s, every second clock. Which sample is
called "I" only sets a constant phase offset. That offset is the same for
the reference and the cavity channel because both demodulators come out of
reset together, so it cancels in the comparison. Negating −32768 saturates
to +32767.

## Ripple filter (`cic_filter`)

ADC clock jitter shows up as ripple on I and Q. Each component goes through
a 3-tap CIC filter: an integrator S[n] = S[n−1] + x[n] followed by a comb
with a differential delay of three, y = S[n] − S[n−3]. That is the sum of
the last three samples. The integrator may wrap, because the comb takes its
difference in the same modulus. The sum is scaled back to unity DC gain by
multiplying with round(2^17/3) = 43691 and shifting right by 17 with
rounding. A constant input therefore comes out unchanged. White-noise power
drops by about 4.8 dB. There is no decimation, and the result is registered
one clock after the input.

## CORDIC, both ways (`cordic_vec`, `cordic_rot`)

Both directions use 12 CORDIC iterations split into three pipeline stages
of four. A result appears exactly three clocks after its input, and a new
input is accepted every clock.

- **Vectoring** (`cordic_vec`, I/Q → amplitude, phase). A vector in the
  left half-plane is first turned by ±90°, and that turn is added to the
  angle accumulator. Each iteration i then turns the vector towards the
  +x axis by ±atan(2^−i) using shifts and adds. The angle accumulator has
  4 extra fractional bits, and x and y have 2 guard bits and 2 bits of
  growth (20 bits). At the end, x holds K·A with K = 1.64676. One constant
  multiplication by round(2^16/K) = 39797 removes K. The amplitude
  saturates at 32767, because inputs up to √2·32768 are possible.
- **Rotation** (`cordic_rot`, amplitude, phase → I/Q). The amplitude is
  multiplied by 1/K first. For phases beyond ±90° the start vector is
  negated and 180° is taken off the angle. The iterations then drive the
  remaining angle to zero.

The arctangent table is round(atan(2^−i)/π·2^19) for i = 0..11, in
`llrf_pkg::cordic_atan`. Twelve iterations leave at most atan(2^−11) of
unresolved angle. The measured errors are:

- vectoring: ≤ 1.3 LSB in amplitude and ≤ 7 phase LSB (0.04°);
- rotation: ≤ 17 LSB at full scale (0.05 %).

## Comparison and PI control (`field_error`, `pi_ctrl`)

The errors are reference minus cavity. The processor's set-points are
offsets added to the reference:

```
amp_err   = sat16(ref_amp + set_amp − cav_amp)
phase_err = ref_phase + set_phase − cav_phase      (mod 360°, i.e. 16-bit wrap)
```

With zero set-points, the cavity is locked to the reference. Because the
phase error wraps, it always measures the short way round the circle.

Each PI controller computes, once per error sample (every second clock):

```
integ = clamp(integ + ki·err)
u     = sat16((kp·err + integ) >> 8)
```

The gains are unsigned, with 8 fractional bits, so 0x0100 is a gain of 1.0.
The integrator of the amplitude controller is clamped to the range that
maps onto the 16-bit output (anti-windup). When the set-point cannot be
reached, the output stays clipped and `amp_saturated` is high. The loop
recovers as soon as the error changes sign.

The phase controller is instantiated with `WRAP = 1`. Its integrator and
output are taken modulo one turn instead of clamped. Its output is the
absolute drive phase, which must be free to move through ±180°: the needed
drive phase depends on the phase shift of the RF path outside the FPGA.

The controller output is registered one clock after the error.

## Back to an IF at 230 MHz (`iq_mod`)

At 230 MHz a 50 MHz IF advances 2π·5/23 per sample. Twenty-three DAC
samples therefore hold exactly five IF periods, and a 23-entry cosine table
and sine table are enough: round(32767·cos(2π·5n/23)) and the sine
likewise, in `llrf_pkg`. Each DAC clock produces:

```
dac = sat16((I·cos[n] − Q·sin[n]) >> 15),   n = 0..22 cyclically
```

The DAC clock is locked to the ADC clock (23 DAC periods = 4 ADC periods).
The I/Q pair still crosses between the two clock domains with a toggle
handshake:

1. On `iq_valid` the pair is latched into a holding register in the 40 MHz
   domain, and a flag flips.
2. The flag passes through two flip-flops in the 230 MHz domain.
3. Its edge loads the held pair into the modulator.

A new pair arrives at most every 11.5 DAC clocks, and the crossing needs
three or four, so the held data is always stable when it is taken. The DAC
sample is two's complement.

## Processor exchange (`block_memory`, `bram_1k32`, `llrf_mem_if`)

There are four 1024 × 32 true dual-port block RAMs. Port A of each is on
the processor bus clock and port B on the LLRF clock. Reads take one clock
and are read-first. The contents start at zero, so the gains start at zero
and the loop is open until the processor writes them.

On the processor bus, `host_addr[11:10]` selects the memory and
`host_addr[9:0]` the word. Read data returns one bus clock after the
access. Only the low 16 bits of each word are used, and monitoring words
are sign-extended.

| memory | written by | word 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|---|
| 0 control | processor | set amplitude | set phase | Kp amplitude | Ki amplitude | Kp phase | Ki phase |
| 1 reference | LLRF | Ref_i | Ref_q | Ref_i_filtered | Ref_q_filtered | Amp_ref | Phase_ref |
| 2 cavity | LLRF | Cav_i | Cav_q | Cav_i_filtered | Cav_q_filtered | Amp_cav | Phase_cav |
| 3 controller | LLRF | Amp_error | Phase_error | Amp_pi | Phase_pi | Fdb_i | Fdb_q |
| 0, words 8–13 | LLRF | Fwd_i | Fwd_q | Fwd_i_filtered | Fwd_q_filtered | Amp_fwd | Phase_fwd |

"Fdb" is the I/Q pair sent to the modulator. "Fwd" is the forward-power
channel, which has no memory of its own. Its words sit above the six
control words in memory 0, so the processor must leave words 8–13 of that
memory alone. `llrf_mem_if` generates the
LLRF-side chip-select, read and write signals. It runs an endless 14-clock
refresh cycle:

1. **READ**: six reads of the control memory.
2. **WAIT**: one clock of read latency.
3. **COMMIT**: all six control words are loaded into the controllers at
   once, so gains never change halfway, and the monitoring values are
   frozen.
4. **WRITE**: the snapshot goes into memories 1–3 and into words 8–13 of
   memory 0, six words each, all four memories in parallel.

`ctrl_refresh` pulses at COMMIT. A value the processor writes takes effect
within two refreshes (28 clocks, 0.7 µs). The monitoring words are at most
two refreshes old.

## Top level (`llrf_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_adc` | in | 1 | 40 MHz ADC clock; the whole signal path and the LLRF memory ports |
| `clk_dac` | in | 1 | 230 MHz DAC clock, locked to `clk_adc` |
| `clk_host` | in | 1 | processor bus clock |
| `rst_n` | in | 1 | asynchronous active-low reset, all domains |
| `adc_ref`, `adc_cav` | in | 16 | reference and cavity IF samples |
| `adc_fwd` | in | 16 | forward-power IF samples, for monitoring only |
| `dac_out` | out | 16 | modulated IF samples |
| `host_en`, `host_we`, `host_addr[11:0]`, `host_wdata`, `host_rdata` | | | processor memory bus |
| `ctrl_refresh` | out | 1 | control words reloaded |
| `amp_saturated` | out | 1 | amplitude controller clipping |
| `pi_update` | out | 1 | new controller output (every second `clk_adc`) |

The loop latency from an ADC sample to a new I/Q in the DAC domain is about
11 ADC clocks plus 3–4 DAC clocks:

| stage | latency |
|---|---|
| demodulator | 1–2 clocks |
| CIC | 1 |
| CORDIC | 3 |
| comparison | 1 |
| PI | 1 |
| CORDIC | 3 |
| crossing into the DAC domain | 3–4 DAC clocks |

The CIC's three-sample average adds group delay on top of that. Keeping
this latency short is what allows high proportional gain.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_iq_demod` | I/Q recovered from an IF synthesised with real arithmetic; pair rate; negation clip |
| `tb_cic_filter` | moving average against a real model; DC passes unchanged; 1-clock latency; noise drop (about −4.9 dB measured) |
| `tb_cordic_vec`, `tb_cordic_rot` | 20 000 random vectors over all quadrants against `$sqrt`/`$atan2` and `$cos`/`$sin`; 3-clock latency; full throughput |
| `tb_field_error` | error arithmetic, clipping and phase wrap, one clock latency |
| `tb_pi_ctrl` | clamped and wrapping variants against a 64-bit model; closed loop reaches zero steady-state error |
| `tb_iq_mod` | every DAC sample against I·cos − Q·sin with locked 40/230 MHz clocks; crossing latency |
| `tb_bram_1k32`, `tb_block_memory` | dual-clock accesses, read-first, address decoding, concurrent use of all four LLRF ports |
| `tb_llrf_mem_if` | 14-clock refresh, atomic control update, monitoring snapshot contents, access directions |
| `tb_llrf_top` | the whole design at default parameters in a closed RF loop (below) |

`tb_llrf_top` closes the loop in the testbench:

- It demodulates the DAC output over a sliding window of 23 samples.
- It passes the drive through a first-order model cavity (gain 0.8, +60°
  phase shift, time constant 8 ADC clocks).
- It turns the cavity field and a fixed reference (18000 at 170°) back into
  noisy IF samples.

It then checks, in order:

1. Lock: amplitude within 0.5 % and phase within 0.3°. The measured result
   is 0.005 % and 0.005°.
2. Stability while locked, over 4000 ADC clocks with ±30 LSB of ADC noise:
   the field must stay within the ±0.75 % and ±0.35° requirement. The
   measured peak deviation is 0.06 % and 0.05°. This holds only for the
   model cavity, not for a real RF chain.
3. Monitoring values read over the host bus: reference, cavity and forward
   power (the drive seen through a model coupler of gain 0.5). The gain
   words next to the forward-power words must be left intact.
4. A set-point step that carries the cavity through 180°.
5. Saturation on an unreachable set-point, and recovery from it.

It also counts the control refreshes, the transfers into the DAC domain,
phase-error wraps, left-half-plane vectoring, rotation beyond ±90° and
controller saturation. Each of these must occur at least once.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb rtl/llrf_pkg.sv \
          tb/tb_llrf_top.sv --top-module tb_llrf_top -o sim
./obj_dir/sim
```

Replace `tb_llrf_top` with any other testbench name. The closed-loop run
takes well under a second of simulation time once built. `-Wno-fatal` keeps lint warnings (unused package constants, the two-process dual-port RAM) from stopping the build.

## Design choices and limits

The reference design fixes the overall structure, and this implementation
makes its own choices where it gives no more.

**Fixed by the reference design:**

- the signal chain;
- 40 MHz sampling of a 50 MHz IF;
- a 3-tap CIC filter;
- a 12-iteration CORDIC taking three clocks, in both directions;
- PI control of amplitude and phase;
- lookup-table IQ modulation for a 230 MHz DAC clocked synchronously with
  the ADC;
- four 1024 × 32 exchange memories, whose LLRF side is driven by the FPGA
  logic;
- the set of monitored quantities.

**This implementation's own choices:**

- the 16-bit word width and the phase scale;
- the I/Q sign convention;
- the single-stage CIC without decimation, and its normalisation;
- the CORDIC guard bits and gain correction;
- set-points as offsets on the reference;
- the PI arithmetic, gain format, anti-windup and phase wrap;
- the clock-crossing scheme;
- the memory address map and refresh sequence;
- the forward-power chain, a copy of the cavity chain, and its words in
  memory 0;
- the status outputs.

**Not included:**

- The soft processor and its peripherals (three UARTs, a timer, an
  interrupt controller, GPIO). They are vendor IP; their memory bus is the
  `host_*` port.
- The ADC and DAC chips and the clock generator.
- The analogue RF front end: the 500 MHz transmitter, the 450 MHz local
  oscillator and the receivers.

**Measured figures compared with the reference hardware:**

- The reference hardware reports about 6 dB of noise reduction from its
  CIC filter. A 3-sample moving sum removes 4.8 dB of white noise. The
  measured 6 dB probably includes noise that is not white, and this design
  makes no attempt to match it.
- The reference hardware reports 0.0895 % maximum CORDIC error. The CORDIC
  here stays within about 0.05 % (see the CORDIC section).

The model cavity in `tb_llrf_top` is a simple first-order low-pass. Loop
gains that suit a real cavity and RF chain have to be found on the
hardware.
