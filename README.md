# LRFSC: digital I/Q feedback for a linac RF cavity

This is SystemVerilog for the FPGA of a low-level RF controller. The controller holds
the amplitude and phase of the RF field in an accelerating cavity at programmed values.
It is modelled on the Linac RF Servo Control (LRFSC) card that was built for the energy-ramping
cavity of CERN's Linac 3. That cavity runs at 101.28 MHz and has a half-bandwidth of 19 kHz.

The field is handled as its in-phase and quadrature components (I, Q). Two independent PI
loops act on them. Three things make this workable in one FPGA:

* **The IF is sampled at four times its frequency.** The cavity pick-up is mixed down to
  20.256 MHz and sampled at 81.024 MHz. Each quarter period then holds one of I, Q, -I or -Q
  directly. The receive side needs no digital mixer, and the transmit side needs only an
  eight-entry sine table.
* **The set points are waveforms, not constants.** Set-point and feed-forward tables are played
  back at 40.512 Msamples/s during the RF pulse. This lets the cavity ramp its field during
  the pulse with no extra modulator.
* **The PI zero cancels the cavity pole.** This leaves an integrator-only open loop. Its gain is
  chosen to give 45 degrees of phase margin for the total transport delay of the loop.

## Signal flow

```
            81.024 MHz, 14 bit
adc_cav ──► iq_demod ──► iq_matrix ──► iq_lowpass ──► measured I/Q ─┐
adc_fwd ──► iq_demod ──► iq_matrix ──► iq_lowpass ──► (diagnostics) │
adc_ref ──► iq_demod ──► iq_matrix ──► iq_lowpass ──► (diagnostics) │
                                                                     ▼
 set-point table (waveform_ram) ─────────────────────────► pi_controller x2 (I, Q)
                                                                     │
 feed-forward table (waveform_ram) ───────────────────────► iq_sat_add
                                                                     │
                                          iq_matrix (output) ◄───────┘
                                                  │
                                          iq_modulator ──► dac_a, dac_b (2 x 14 bit per clock
                                                                         = 162.048 MS/s)
 lrfsc_timing: quarter-period counter, 40.512 MHz strobe, RF ON edges, table address
 diag_logger x4: select one of 8 test points, log during the pulse, front-panel DAC
 host_regs: settings, table loading, log read-out, end-of-pulse interrupt
```

`lrfsc_top` wires all of this together. It has one clock, 81.024 MHz, and an active-low asynchronous reset.
Each I/Q stream moves at 40.512 MS/s with a one-clock valid strobe every second clock. Every
stage registers its output and holds it between strobes.

## Sampling at four times the IF

Write the IF signal as `x(t) = I cos(wt) + Q sin(wt)`. Sample it at `wt = n*pi/2` and the
samples are `I, Q, -I, -Q, I, ...`. A free-running 2-bit counter in `lrfsc_timing` numbers
these quarter periods (0 means I). All three demodulators and the modulator use this counter,
so receive and transmit share one phase reference.

* `iq_demod` negates the samples of quarters 2 and 3. It pairs each I sample with the Q sample
  that follows and emits the pair on the clock after the Q sample.
* `iq_modulator` needs 8 DAC samples per IF period (162.048 / 20.256). The fabric runs at
  81.024 MHz, so it makes two per clock: `k = 2*phase` on `dac_a` and `k = 2*phase+1` on
  `dac_b`. Each is `I cos(2 pi k/8) + Q sin(2 pi k/8)`, with the table scaled so that 16384 is 1.0.
  The DAC is expected to interleave its two inputs (`dac_a` first).
  The output is rounded and saturated to 14-bit two's complement.

Which quarter is called "I" is arbitrary. An offset of whole quarters, or any other fixed phase
error from cables, is absorbed by the 2x2 matrices.

## Compensating cable phase with the 2x2 matrices

Cables and amplifiers outside the card rotate the I/Q vector by an angle theta between the DAC
and the cavity ADC. If nothing corrected it, driving I would partly come back as Q and the two
loops would be coupled. `iq_matrix` computes `I' = a I + b Q`, `Q' = c I + d Q`. The
coefficients are Q2.14 (16384 = 1.0), and the result is rounded and saturated to 16 bits. There
are four instances: one on each receive path and one on the output. To cancel a rotation theta
on the cavity path, load

```
a =  cos(theta) * 16384    b = sin(theta) * 16384
c = -sin(theta) * 16384    d = cos(theta) * 16384
```

The output matrix can carry the same correction instead, or a gain. All matrices reset to identity.

The receive paths then pass through `iq_lowpass`, a first-order filter
`y += (x - y) / 2^shift`. The source design names a "digital filter" here but does not give its
response; this filter is the simplest that fits. `shift` = 0 turns it into a plain register.
The default, 2, puts its corner near 1.5 MHz, far above the loop crossover.

## The PI controllers

The cavity driven at resonance behaves, per component, as a first-order low-pass with pole
sigma, the half-bandwidth: `H(s) = sigma / (s + sigma)` in units where the DAC-to-ADC gain is 1.
The PI controller `Kp + KI/s` puts its zero at `KI/Kp = sigma`, which leaves the open loop
`KI/s`. The loop has about 685 ns of transport delay in total: analog filters, ADC and DAC
pipelines, the amplifier, cables and the FPGA. Give that delay 45 degrees at the crossover,
after the integrator has taken 90, and you get

```
KI = 2 pi / (8 * 685.5 ns) = 1145730 rad/s       (crossover 182 kHz)
Kp = KI / sigma = 1145730 / 119380 = 9.6
```

`pi_controller` runs once per 40.512 MHz sample, with the error `e = set point - measured`:

```
u[n]   = Kp * e[n] + S[n]
S[n+1] = S[n] + Ki * e[n]          (rectangular rule, Ki = KI / 40.512e6 = 0.02828)
```

| register | format | default | value |
|---|---|---|---|
| `KP` | Q5.11 | 19661 | 9.6 |
| `KI` | units of 2^-20 per sample | 29655 | 1145730 rad/s |
| `LIMIT` | output clamp, +-LIMIT | 8191 | 14-bit DAC full scale |

**Anti-windup.** A sudden set-point change drives the output into its limit. While the output
is clamped, the integrator ignores any error that would push it further into the limit. The
integrator is also clamped to +-LIMIT. When the error reverses, the output leaves the limit on
the next sample.

This design chose that anti-windup scheme. Be aware of one property of pole-cancelling PI
control: when the loop leaves saturation, any difference between the integrator and the cavity
field decays with the cavity's own time constant, 1/sigma = 8.4 us, not with the fast loop. In
the closed-loop test the field is within 4 % of a new set point about 17 us after a saturating
step. It settles to 0.3 % later in the pulse. A beam-loading step that does not saturate the
output is corrected quickly.

With `loop_en` low, both integrators are cleared and the PI outputs are zero. Only the
feed-forward table then drives the cavity (open loop).

## Set-point and feed-forward tables

Each table (`waveform_ram`) holds 2^18 = 262,144 words of 18 bits. One word per 40.512 MHz
sample gives 6.47 ms of pulse. A word packs a 9-bit I (bits 17:9) and a 9-bit Q (bits 8:0),
both two's complement. On playback they are multiplied by 32, so the 9-bit range covers the
14-bit ADC range. `lrfsc_timing` restarts the table address at 0 on the rising edge of RF ON.
The address advances once per sample and stops at the last word. Outside the pulse both tables
contribute zero. The feed-forward samples are added after the PI controllers by `iq_sat_add`,
which saturates the sum.

In the card this design is modelled on, these tables are external 18x256k SRAM chips. Here they
are written as synchronous arrays with one write port (host) and one read port (playback). To
use external SRAM, replace `waveform_ram` with a controller for the chip; the interface stays
the same.

## Diagnostics

Each of the four `diag_logger` channels selects one of eight test points:

| sel | signal | sel | signal |
|---|---|---|---|
| 0 | reflected I/Q | 4 | error (set point - cavity) |
| 1 | forward I/Q | 5 | PI output |
| 2 | cavity I/Q | 6 | PI output + feed-forward |
| 3 | set point | 7 | after the output matrix |

During the pulse the channel logs `{I, Q}` (16 bits each) into 2048 words. It stores one word
every `DIAG_DECIM+1` samples and stops when the memory is full. The same signal, saturated to
14 bits, goes to `diag_dac_i/q` at 40.512 MHz for a front-panel DAC.

## Host interface

`host_regs` sits behind the VME slave of the card. It uses a plain synchronous bus: one read or
write per clock, and read data plus `h_rvalid` one clock after `h_rd`. The VME protocol engine
itself is not included. At the falling edge of RF ON an interrupt becomes pending. It drives
`irq` while `IRQ_EN` is set, until software writes 1 to STATUS bit 1. At that point software
reads the logs and loads new tables.

| addr | name | contents |
|---|---|---|
| 0x00 | CTRL | [0] loop enable, [1] set-point enable, [2] feed-forward enable |
| 0x01 | STATUS | R: [0] RF ON, [1] interrupt pending. W: 1 to [1] clears |
| 0x02 | IRQ_EN | [0] |
| 0x04-0x07 | reflected matrix a, b, c, d | Q2.14 |
| 0x08-0x0B | forward matrix | Q2.14 |
| 0x0C-0x0F | cavity matrix | Q2.14 |
| 0x10-0x13 | output matrix | Q2.14 |
| 0x14 / 0x15 / 0x16 | KP / KI / LIMIT | see above |
| 0x17 | FILT_SHIFT | receive filter, 0..8 |
| 0x18 | DIAG_SEL | channel n in bits [4n+2:4n] |
| 0x19 | DIAG_DECIM | log every DECIM+1 samples |
| 0x1A | DIAG_ADDR | read address for all logs |
| 0x1C-0x1F | DIAG_DATA 0..3 | R: `{I, Q}` at DIAG_ADDR |
| 0x20-0x23 | DIAG_COUNT 0..3 | R: words logged |
| 0x24 | MEM_ADDR | table address |
| 0x25 / 0x26 | SP_DATA / FF_DATA | W: 18-bit word written at MEM_ADDR, which then increments |
| 0x27 | SAMPLE_IDX | R: samples since the start of the pulse |

Writes to the tables are ignored while RF ON is high.

A typical pulse cycle goes like this:

1. Load the matrices and the gains.
2. Write MEM_ADDR = 0 and stream the set-point table into SP_DATA.
3. Write MEM_ADDR = 0 again and stream the feed-forward table into FF_DATA.
4. Set CTRL = 3 (closed loop with set points) and IRQ_EN = 1.
5. When the interrupt arrives, read DIAG_COUNT and the logs, then clear the interrupt.

## Timing

* A cavity I sample changes the DAC words 9 clocks (111 ns) after the clock edge that samples
  it. For a Q sample the figure is 8 clocks. The stages are:
  * demodulator: 2
  * matrix: 1
  * filter: 1
  * PI controller: 2
  * feed-forward adder: 1
  * output matrix: 1
  * modulator: 2 (minus one for a Q sample)
* RF ON passes through a two-flip-flop synchroniser. Pulse start and end are seen 2 clocks
  after the pin changes.

## How this relates to the original card

The following are taken from the LRFSC design:

* sampling at 4x the IF and the I, Q, -I, -Q interpretation
* the 2x2 cable-compensation matrices
* two PI controllers with rectangular integration and anti-windup
* set-point and feed-forward tables played at 40.512 MS/s from 18x256k memories
* the sine/cosine-table modulator at 162.048 MS/s
* four diagnostic channels that select, log and drive a DAC
* the interrupt at the end of RF ON
* the gains Kp = 9.6 and KI = 1145730 rad/s

The following are this design's own choices:

* all word widths and fixed-point formats
* the packing of I and Q into one 18-bit table word
* the receive filter
* the anti-windup method
* the test-point list, log depth and decimation
* the register map and host bus

Where it differs from the original or leaves parts out:

* **Latency.** The original budget has 222 ns of delay in the FPGA; this design has 111 ns.
  The gains are unchanged, so the phase margin is somewhat above 45 degrees.
* **Clocking.** One 81.024 MHz domain produces two DAC samples per clock. No separate
  162.048 MHz domain is used.
* **Not included.** The card also shows a resonance (tuning) control algorithm with its own
  DAC, amplitude/phase loops around the amplifier, and an adaptive feed-forward memory loop.
  Their function is not specified, so they are not included. The reflected and forward paths
  therefore end at the diagnostics.
* **Outside the FPGA.** The VME protocol engine, the converters, the RF chain and the clock
  generation are outside this RTL.

## Verification

Every block has a self-checking testbench in `tb/` against an independent model: integer
arithmetic, floating point or closed-form responses. `tb_lrfsc_top` runs the whole design at its
default sizes in closed loop with `cavity_model`. That model is a behavioural stand-in for the
DAC, cables with 40 degrees of rotation, 38 clocks (about 470 ns) of transport delay, the
sigma = 119380 rad/s cavity and the ADCs. The test checks:

* the cavity follows a two-level set-point table
* the step saturates the controllers, and they recover
* a beam-loading step is corrected
* the logs hold the set points and a small error
* the interrupt arrives at the end of the pulse and can be cleared
* open-loop feed-forward reaches its target
* a long pulse fills the logs
* the ADC-to-DAC latency is 9 clocks

It counts each of these mechanisms and fails if one never happens. It observes the design only
through its ports: the drive DAC, the host bus, and the diagnostic DAC outputs set to show the
cavity, the error, the PI output and the set point.

`tb_lrfsc_ramp_pulse` runs one full-length pulse, also at the default sizes. It fills the whole
set-point table with a linear amplitude ramp, the kind of ramp used to change beam energy during
the pulse, and plays 259,277 samples (6.4 ms). It checks:

* the cavity tracks the ramp within 2 % at 25 points along the pulse
* the sample index reaches the pulse length
* a log decimated by 128 covers the whole pulse and matches the table

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lrfsc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/lrfsc_pkg.sv tb/tb_lrfsc_top.sv
./obj_dir/Vtb_lrfsc_top
```

Substitute any other `tb_<block>` for a unit test. Each testbench ends with a line
`TB_RESULT checks=N failures=M`.

## Files

* `rtl/lrfsc_pkg.sv`: shared widths, the `iq_t` and `mat2_t` structs, gain defaults and test-point numbers.
* `rtl/lrfsc_top.sv`: the top level.
* `rtl/lrfsc_timing.sv`, `iq_demod.sv`, `iq_matrix.sv`, `iq_lowpass.sv`, `pi_controller.sv`,
  `iq_sat_add.sv`, `iq_modulator.sv`, `waveform_ram.sv`, `diag_logger.sv`, `host_regs.sv`: the blocks.
* `tb/tb_<block>.sv`: unit testbenches.
* `tb/tb_lrfsc_top.sv`: the end-to-end test.
* `tb/tb_lrfsc_ramp_pulse.sv`: the full-length ramped pulse.
* `tb/cavity_model.sv`: the plant model.
