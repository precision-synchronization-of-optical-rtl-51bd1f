# Digital laser-to-RF phase lock for MTCA.4 boards

This RTL locks the pulse train of a mode-locked optical laser to an RF
reference. A photodiode turns the laser pulses into a comb of harmonics of the
repetition rate (about 54.17 MHz). An analog front end picks the 25th harmonic
(about 1354 MHz) and mixes it with the 1.3 GHz reference down to an
intermediate frequency (IF) of about 54 MHz. A digitizer samples that IF
together with the laser's 54 MHz fundamental. FPGA logic measures the laser's
phase against the reference and computes a correction. The correction travels
over a backplane link to a second board. There it is written to the DAC of a
piezo driver, and the piezo stretches the laser's fiber resonator, which
changes the repetition rate and closes the loop.

The system follows a published proof-of-principle built from off-the-shelf
MTCA.4 modules:

- a SIS8300-L digitizer (16-bit ADCs, Virtex-6 FPGA);
- a DAMC-FMC20 FMC carrier (two Spartan-6 FPGAs);
- a DRTM-PZT4 four-channel piezo driver;
- a DRTM-DWC10 down-converter.

The published description names the processing steps and the boards. It does
not give the insides of any firmware block. Everything inside the blocks here
is a design of its own, made as simple as the function allows. Each choice is
marked below and in the header comment of each file.

## Signal chain

```
 adc_fine ─► iq_detector ─► cordic_vec ─┐ fine amplitude/phase
 adc_coarse► iq_detector ─► cordic_vec ─┤ coarse amplitude/phase
                                        ▼ (R_CTRL[4] selects)
                 setpoint ─► pi_controller ─► every DECIM+1 samples
                                              ─► notch_filter ─► (+) ◄─ ff_table
                                                                  │ actuator value
                     monitor_mux ◄────────────────────────────────┤
                     (2 monitoring DACs)                          ▼
   daq_buffer (I,Q,amp,phase)    reg_bank (host bus)           link_tx
   ─────────────────────────── sis8300_fpga ─────────────────────│──────
                                           transceiver/backplane (outside)
   ─────────────────────────── fmc20_fpga ───────────────────────│──────
                                                               link_rx
                                                                  ▼
                                         piezo_dac_ctrl ─► SPI to 4 span DACs
```

`laser_sync_top` instantiates `sis8300_fpga` and `fmc20_fpga`. It also holds
`clk_prescaler`, a behavioural model of the /16 divider that makes the
81.25 MHz ADC clock from the 1.3 GHz reference. The link word leaves the top on
`link_tx_*` and comes back on `link_rx_*`. Whatever sits between them stands
for the transceivers and the backplane, so a harness can add delay, corrupt
words or drop them.

## Frequency plan and phase detection

The hardest part to follow is why a three-sample window yields I and Q.

- Reference: 1300 MHz. ADC clock: 1300/16 = 81.25 MHz (12.3 ns per sample).
- A laser repetition rate of 1300/24 = 54.17 MHz puts the 25th harmonic at
  1354.17 MHz. The IF is then 1354.17 − 1300 = 54.17 MHz. The coarse channel
  samples the fundamental, which is also 54.17 MHz.
- IF / fs = (1300/24) / (1300/16) = 2/3. The IF advances by 240° per sample
  and repeats exactly after M = 3 samples, which hold N = 2 IF periods.

The published description gives only the rounded frequencies (54 MHz,
1354 MHz). The exact 2/3 ratio is derived here. `iq_detector` takes M and N as
parameters, so another ratio needs only different values.

`iq_detector` multiplies sample n by (2/M)·cos(2πNn/M) and by
−(2/M)·sin(2πNn/M). The coefficients are computed at elaboration in Q1.17. The
index n counts absolute samples modulo M. The detector then sums the last M
products. For an input A·cos(2πNn/M + φ) this gives I = A·cos φ and
Q = A·sin φ. A locked laser therefore gives constant I and Q. A laser off
frequency gives a vector that rotates at the beat frequency. The detector
outputs a new I/Q pair every clock, two clocks after the sample.

The absolute phase reading depends on where the modulo-M count started after
reset. The loop setpoint absorbs that offset.

`cordic_vec` turns I/Q into amplitude and phase with 16 pipelined
micro-rotations. Vectors with I < 0 are first folded through 180°. Four
fraction guard bits keep the error within about 1 LSB. The final multiply by
0.60725 removes the CORDIC gain. Phase is a signed 16-bit fraction of a turn
(0x4000 = 90°). Because of that format, the phase error wraps correctly in
plain two's-complement subtraction.

## Loop filter and actuator path

- **`pi_controller`** (own choice of PI). It forms e = setpoint − phase, then
  out = (kp·e + Σ ki·e) >>> shift, clamped to [lim_lo, lim_hi].
  - While the output is clamped, the integrator accepts only increments that
    move the output back inside the limits (anti-windup).
  - With the loop disabled, the output is 0 and the integrator is cleared.
  - The feedback acts on phase only. Amplitude is monitored, not controlled.
- **Strobe divider.** Every DECIM+1 controller outputs, one value goes on to
  the notch filter and the feed-forward table. DECIM = 0 passes every sample.
  A larger DECIM lets the notch work at a rate where mechanical resonances
  (kHz) are not a tiny fraction of the sample rate.
- **`notch_filter`.** A programmable direct-form-I biquad with Q2.16
  coefficients and a bypass switch. It suppresses piezo eigen-modes. For a
  notch at normalised frequency w0 with pole radius r:
  - b0 = b2 = g and b1 = −2g·cos w0;
  - a1 = −2r·cos w0 and a2 = r²;
  - g = (1 + a1 + a2) / (2 − 2cos w0), which gives unity gain at DC.
- **`ff_table`.** A RAM loaded from the host. When enabled, it plays out one
  entry per strobe and wraps after entry R_FF_LEN. Its output is added to the
  notch output with saturation to form the actuator value.

## Backplane link frame

`link_tx` sends one 32-bit word per actuator value (own format):

| bits  | field                                                 |
|-------|-------------------------------------------------------|
| 31:28 | sync, 4'hA                                            |
| 27:24 | sequence number, modulo 16                            |
| 23:8  | actuator value, signed                                |
| 7:0   | CRC-8, polynomial 0x07, init 0, over bits 27:8 (MSB first) |

`link_rx` handles three cases:

- **Bad sync or CRC.** The word is dropped and `crc_errs` counts it. The
  previous value stays on the output, so the piezo holds its position.
- **Unexpected sequence number.** `seq_errs` counts it and the receiver
  resynchronises. A dropped or corrupted word therefore also shows up as one
  sequence error at the next good word.
- **Counters.** Both counters saturate at 0xFFFF.

## Piezo DAC driver

The piezo driver has four power amplifiers with a fixed gain of 10 V/V. Each
is fed by a DAC with a programmable span and a rate of up to 500 kSPS.
`piezo_dac_ctrl` starts a 24-bit frame every UPDATE_DIV = 163 clocks, which is
498 kSPS at 81.25 MHz. The frame is `{cmd[3:0], addr[3:0], data[15:0]}`, sent
MSB first with SCLK = clk/4.

- **Bit timing.** SDI changes on the falling SCLK edge and is stable at the
  rising edge. `cs_n` is low for the whole frame.
- **cmd 6, write span.** data[1:0] selects the span: 0 = 0..5 V,
  1 = 0..10 V, 2 = ±5 V, 3 = ±10 V. A span frame is sent after reset for each
  enabled channel, and whenever a channel's requested span changes.
- **cmd 3, write and update code.** Otherwise the frame carries the code of
  the next enabled channel, round robin. The code is the signed channel value
  in offset binary, so 0 is mid-span.

The frame format and span codes are this design's own. A specific DAC part
would need its own command set. In `fmc20_fpga`, channel 0 carries the loop
output; channels 1..3 take static values from the carrier's registers.

## Register map (32-bit words, `llrf_pkg`)

Writes take effect on the clock edge where `bus_wr` is high. Read data and
`bus_rvalid` follow one clock after `bus_rd`.

| addr | name | contents |
|------|------|----------|
| 0x00 | ID | RO 0x4C530001 |
| 0x01 | CTRL | [0] loop enable, [1] notch bypass (1 after reset), [2] feed-forward enable, [3] DAQ arm (pulse), [4] loop input: 0 fine, 1 coarse |
| 0x02 | SETPOINT | [15:0] phase setpoint |
| 0x03/0x04 | KP / KI | [15:0] signed gains |
| 0x05 | SHIFT | [4:0] right shift of the controller sum |
| 0x06 | LIMITS | [15:0] lower, [31:16] upper output limit |
| 0x07–0x0B | NOTCH_B0,B1,B2,A1,A2 | [17:0] Q2.16 coefficients (b0 = 1.0 after reset) |
| 0x0C | DECIM | strobe divider minus one |
| 0x0D | FF_LEN | last table entry played |
| 0x0E / 0x0F | FF_WADDR / FF_WDATA | table write address; each write of WDATA stores and advances the address |
| 0x10 | MON_SEL | [2:0] DAC0, [6:4] DAC1 source: 0 actuator, 1 I, 2 Q, 3 amplitude, 4 phase, 5 error, 6 controller |
| 0x11 | DAQ_ADDR | read address of the capture buffer |
| 0x12 / 0x13 | DAQ_IQ / DAQ_AP | RO {Q, I} / {phase, amplitude} at DAQ_ADDR |
| 0x14–0x16 | STAT_IQ, STAT_AP, STAT_CO | RO live fine I/Q, fine amplitude/phase, coarse amplitude/phase |
| 0x17 | STAT_OUT | RO [15:0] phase error, [31:16] actuator value |
| 0x18 | STATUS | RO [0] controller saturated, [1] DAQ busy, [2] DAQ done |

The host reaches this bus through a PCIe endpoint, which is not part of the
RTL.

The carrier has its own bus (`fmc_bus_*` on the top, module `fmc20_regs`),
with the same protocol:

| addr | name | contents |
|------|------|----------|
| 0x00 | F_ID | RO 0x4C530002 |
| 0x01 | F_CH_ENABLE | [3:0] DAC channels written (after reset: channel 0 only) |
| 0x02 | F_SPAN | [2c+1:2c] span code of channel c (after reset: all 3, ±10 V) |
| 0x03–0x05 | F_AUX1..3 | [15:0] static value of channels 1..3 |
| 0x06 | F_LINK | RO [0] at least one good link word received |
| 0x07 | F_LINK_ERRS | RO [15:0] CRC errors, [31:16] sequence errors |
| 0x08 | F_PZT_VALUE | RO value on channel 0 |

## Monitoring

- **`monitor_mux`.** Puts two selectable loop signals on the digitizer's
  monitoring DACs, in offset binary. After reset these are the actuator value
  and the phase.
- **`daq_buffer`.** Records DAQ_DEPTH = 16384 consecutive samples of fine-channel
  I, Q, amplitude and phase after each arm. That is enough for records like the
  ones used to commission the loop: a rotating I/Q vector when unlocked,
  constants when locked.

## Timing

| path | clocks |
|------|--------|
| ADC sample → I/Q | 2 |
| I/Q → amplitude/phase | 18 |
| phase → controller output | 2 |
| controller → link word (strobe, notch, adder, framing) | 4 |
| **ADC sample → link word** | **26** |
| link word → DAC frame start | up to 163 (update period) + 1 |
| DAC frame length | 24 × 4 + 2 clocks |

Everything runs on one clock, the ADC sample clock. On real hardware the
carrier's transceiver and DAC logic would run on their own clock, and the
transceiver's elastic buffer would cross between the domains. This design
leaves that crossing out.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| laser_sync_top / sis8300_fpga | FF_DEPTH | 1024 | feed-forward entries (own choice) |
| laser_sync_top / sis8300_fpga | DAQ_DEPTH | 16384 | capture depth (own choice) |
| laser_sync_top / fmc20_fpga | DAC_UPDATE_DIV / UPDATE_DIV | 163 | clocks per DAC frame (≤ 500 kSPS) |
| iq_detector | M, N, CW | 3, 2, 18 | window, IF periods, coefficient width |
| cordic_vec | STAGES | 16 | micro-rotations |
| clk_prescaler | DIV | 16 | reference division |

## What the source fixes and what is chosen here

Taken from the published description:

- the blocks of the chain: I/Q detection, amplitude/phase by CORDIC, a
  feedback controller acting on phase, a feed-forward table and a notch filter
  against piezo eigen-modes;
- the controller output going to both the monitoring DACs and the backplane
  link;
- the piezo driver's four channels, its spans and 500 kSPS;
- the 16-bit ADCs, the 1.3 GHz reference, /16 = 81.25 MHz, 1354 MHz and 54 MHz;
- host control through FPGA registers.

Chosen here:

- the non-I/Q detection scheme and the exact 2/3 frequency ratio;
- all widths and number formats;
- the PI structure, limits and anti-windup;
- the order notch → feed-forward adder, and the strobe divider;
- the feed-forward addressing;
- the link frame and its error handling;
- the DAC serial protocol and span codes;
- the register map and bus;
- the DAQ buffer;
- the fine channel as the default loop input;
- a single clock domain.

Not included because they are analog parts, vendor IP or software:

- ADCs, mixer, RF front-end filters and amplifiers;
- the piezo power amplifiers;
- transceivers, the PCIe endpoint and the cross-point switch;
- the control software, including coarse tuning of the laser by temperature
  or stepper motor.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The RTL files carry no `timescale`; the system
testbenches use 1 ps steps for the 1.3 GHz reference, so give Verilator a
default timescale. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl +libext+.sv \
    rtl/llrf_pkg.sv tb/tb_laser_sync_top.sv --top-module tb_laser_sync_top
./obj_dir/Vtb_laser_sync_top
```

Some points about the testbenches:

- **Two-state simulator.** The testbenches work with Verilator's two-state
  simulation and random initial values.
- **Reference values.** These are computed in the testbench: real-valued
  trigonometry for the detector and CORDIC, and 64-bit integer models for the
  PI controller and biquad.
- **`tb_link`** covers `link_tx` and `link_rx` together. `tb_llrf_pkg` checks
  the package's saturation and CRC helpers.
- **`tb_sis8300_fpga`** checks the 26-clock latency. It also checks one word
  per DECIM+1 samples, notch gain, feed-forward play-out, the DAQ and
  coarse-channel selection.
- **`tb_laser_sync_top`** runs the complete system at its default sizes. A
  behavioural laser turns the decoded piezo DAC voltage into a frequency
  change. The test walks through these steps:
  1. record the free-running beat;
  2. acquire lock;
  3. saturate the controller, then recover;
  4. run with the notch filter in the path;
  5. run with the feed-forward table in the path;
  6. step the laser frequency;
  7. corrupt and drop link words;
  8. change the DAC span;
  9. lock on the coarse channel;
  10. record the locked state.

  It counts each of these events and fails if any never happens. It finishes in
  a few seconds.

`tb_lock_disturbance` shows how far the loop rejects a laser frequency
disturbance. It locks the same laser model, then modulates the laser frequency
at 500 Hz. Free running, that modulation would swing the phase by 0.79 turn.
Locked, the peak phase error stays at 215/65536 turn (1.2°) and the rms error
at about 144. The test requires a suppression of at least 20. The test takes
about 400,000 samples and a few seconds.

The loop gains used in both system tests were chosen for a loop delay of about 200 samples,
dominated by the DAC update period, and a piezo slope of full-scale
≈ 100/65536 turn per sample. They are kp = 8192, ki = 2, shift = 14 on the
fine channel, and 25600, 6, 10 on the coarse channel, whose phase slope is
25 times lower. Real gains depend on the piezo and have to be found on the
hardware.
