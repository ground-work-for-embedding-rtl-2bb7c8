# Fabric half of a resolver-based field-oriented motor drive

This RTL is the programmable-logic part of a permanent-magnet synchronous motor
drive built on one SoC FPGA. The drive senses the rotor with a resolver and two
phase currents. A microcontroller on the same chip runs the field-oriented speed
and current loops in software. The arithmetic that has to run at the sample rate
lives in the fabric:

- generating the resolver excitation;
- driving two dual-channel ADCs;
- the resolver-to-digital tracking loop;
- sine/cosine evaluation;
- the abc/dq frame transforms;
- the inverter PWM.

Once per 25 µs frame the fabric interrupts the microcontroller with speed, Id and
Iq, and gets Vd and Vq back.

Everything runs from one 60 MHz clock. Everything is timed from one counter, the
10 kHz excitation period (6000 clocks).

## One frame, in clocks

The excitation generator counts 0…5999 and is the time reference. Two more
signals come from this count:

- **FRAME_ADC**: low for 4 clocks ending at count 677, repeated every 1500
  clocks. The ADC sequencer re-aligns on it.
- **FRAME_CONTROL_MOD**: one clock at count 821. The motor PWM carrier restarts
  from it.

Within each 1500-clock (40 kHz) frame the ADC sequencer runs three transfers on
the shared CS/SCLK/DIN lines. SCLK is 15 MHz, 4 clocks per bit.

| transfer | SCLKs | what it does |
|---|---|---|
| S1 | 18 | writes the control word that selects channel 0 |
| S2 | 18 | converts channel 0 of both ADCs: resolver sine on A, cosine on B. CS falls at count 750 (+1500·k), i.e. 45° of each excitation quarter, where the excitation fundamental has magnitude 0.707 |
| S3 | 339 | converts channel 1: currents Ia on A, Ib on B. CS falls 72 clocks later, at count 822 (+1500·k); switches the mux back for the next frame |

The carrier is restarted by FRAME_CONTROL_MOD, so the four current samples per
PWM period fall on the carrier's zero, positive peak, zero and negative peak.
These are the centres of the switching pattern.

`frame_mc` pulses when the resolver codes are in; `i_ready` when the current
codes are in. The DSP sequencer then runs:

| clocks | step |
|---|---|
| 1 | age the histories, stage I of the resolver loop |
| 5 | sin/cos of the old position P2 (table interpolation) |
| 3 | stages II–IV: new speed ω and position P1 |
| 5 | sin/cos of the electrical angle n·P1 |
| — | wait for `i_ready` |
| 3 | currents into Id, Iq |
| 1 | load ω, Id, Iq into the bus registers, interrupt |
| — | wait for the microcontroller to read Iq and write Vq |
| 3 | Vd, Vq back to three phase voltages, applied by the PWM |

With I_ready already waiting, the interrupt comes 21 clocks after `frame_mc`. In
practice it is 4 clocks after `i_ready`, 76 clocks into the frame. The
sequencer remembers a `frame_mc` or `i_ready` that arrives while it is busy. A
stale `i_ready` from before the frame is dropped when `frame_mc` starts a pass.
Without that drop, the spare pulse that an ADC resynchronisation can produce
would make every later frame use the previous frame's currents. The new phase
voltages are there 3 clocks after the Vq write. That leaves about 1420 clocks
(23.7 µs) of every frame for the interrupt routine.

## Resolver-to-digital conversion (`rdc_dsp`)

This is the part that most needs explaining. The resolver windings give
`E·sin(P)` and `E·cos(P)`, where E is the excitation. Each sample is taken at a
±45° point, so E is ±0.707 of its peak, and the sign alternates every two
samples. The loop holds an estimate P2 and forms the error
`sin(P)cos(P2) − cos(P)sin(P2) = sin(P − P2)`. It multiplies the error by a
"mixer" of ±1.5. The mixer sign comes from the excitation polarity at the
sample, which removes the carrier. The product feeds a fixed fourth-order
filter/integrator whose output is the speed:

    V1 = 515.8·X1 + 1951.19·X2 + 116.985·X3 − 1809.49·X4 − 491.095·X5 + V2
    P1 = P2 + V1 / 40000        (wrapped to ±2π)

X2…X5 and V2 are the previous samples' values.

| signal | format |
|---|---|
| ADC codes | 12 bit; re-centred as `3·code/4096 − 1.5` V in Q1.12 |
| trig values | Q1.16 |
| filter coefficients | Q11.6 |
| speed | 18 bits with 3 fractional bits, range ±16384 rad/s; saturates rather than wraps, with a `v_sat` flag |
| position | Q3.35 |

The position is compared against ±2π and wrapped, with a `wrapped` flag. With
these coefficients the loop locks well within 10 ms. It tracks a
constant speed with a position error below 0.006 rad. The speed estimate ripples
by a few rad/s from ADC quantisation.

P1 is the position predicted for the *next* sample. That is the position at
which the new phase voltages will act, so the electrical angle for both frame
transforms is `n·P1`, with n = pole pairs (default 4). As a result the measured
current vector appears rotated back by `n·ω/40 kHz`. A rotor at 500 rad/s
mechanical shows this as 0.05 rad. This is a choice of this design: one trig
evaluation serves both transforms.

## Sine and cosine (`trig_eval`, `trig_lut`, `trig_table_ram`)

Two 1024 × 18 tables (sine and cosine, Q1.16) are loaded over the bus by the
microcontroller at start-up. Each table counts its own writes. After the 1024th
write it hands its port over to the DSP and refuses further writes with
PSLVERR. `ram_init_done` rises when both tables are full.

An angle is multiplied by n and by 1024/2π:

- the integer part, modulo 1024, is the address K;
- the next 16 bits are the interpolation factor f.

Both tables are read at K and K+1, and `S(K) + (S(K+1) − S(K))·f` is formed. One
evaluation takes 5 clocks. The error stays below 10⁻⁴ over the full circle.

## Frame transforms (`abc_dq`, `dq_abc`)

Currents: re-centred on code 2048 and kept in ADC counts with 5 fractional bits.

- Clarke: `Iα = Ia`, `Iβ = (Ia + 2·Ib)/√3`.
- Park: `Id = cos·Iα + sin·Iβ`, `Iq = cos·Iβ − sin·Iα`.

Voltages (Q1.16, full scale ±2):

- inverse Park, then `Va = Vα`, `Vb,c = −Vα/2 ± (√3/2)·Vβ`.

Every stage saturates.

## PWM (`motor_drive_pwm`, `resolver_excitation_pwm`)

Motor PWM:

- The carrier is an up/down count between −1500 and +1500 (10 kHz).
- Each phase compares `round(V·1500)` with the carrier. The high-side gate is on
  when the reference is above the carrier, and the low-side gate is its
  complement. No dead time is inserted here.
- Duty is `(1 + V)/2`.
- A FRAME_CONTROL_MOD that does not find the carrier just before zero restarts
  the carrier and pulses `resync`.

Resolver excitation:

- A two-level waveform with ten switching angles per quarter period, from a
  selective-harmonic-elimination solution: 8.53°, 14.97°, 25.62°, 30.10°, 42.79°,
  45.57°, 60.27°, 61.72°, 79.04° and 79.70°
  (0.1489 to 1.3911 rad).
- Harmonics 2 to 19 stay below 2% of the fundamental, and the fundamental is
  what the resolver sees.
- The angles are parameters, given in clocks (`round(α·6000/2π)`).

## Reset sequencing (`reset_controller`)

Four reset domains are released in order:

1. the bus interface and tables;
2. once the PLL is locked: excitation PWM and ADC sequencer;
3. once the tables are loaded and no FRAME_MC is in progress: the DSP;
4. at the next FRAME_CONTROL_MOD: the motor PWM.

Loss of PLL lock puts domains 2–4 back in reset and runs the sequence again. The
tables and the bus stay alive. POWER_ON_RESET or the microcontroller's reset
restarts everything.

## Microcontroller interface

There is one APB slave (PREADY always high). The slot is decoded from
PADDR[31:24]:

| PADDR | contents |
|---|---|
| `0x30xx_xxxx` | sine table, word k at `4·k` (read/write until full, then writes refused and reads 0) |
| `0x31xx_xxxx` | cosine table |
| `0x3200_0000` | ω (read) |
| `0x3200_0004` | Id (read) |
| `0x3200_0008` | Iq (read; completes the read side) |
| `0x3200_000C` | Vd (read/write) |
| `0x3200_0010` | Vq (read/write; the write completes the exchange) |

Reads are sign-extended to 32 bits. Any other address gives PSLVERR. The
interrupt is a one-clock pulse.

Table contents: `sin(2πk/1024)·65536` and `cos(2πk/1024)·65536`, rounded.

## Files

`rtl/` holds one module per file plus `foc_pkg.sv`, which has the types, widths,
bus structs, the control bundle and a saturation function.

| module | role |
|---|---|
| `foc_fabric_top` | everything wired together, bus decode, observation outputs (`events`, `resets_n`, `carrier`, …) |
| `resolver_excitation_pwm` | time base, excitation, FRAME signals |
| `adc_interface` | AD7912 sequencer |
| `motor_drive_pwm` | carrier and gates |
| `trig_lut`, `trig_table_ram` | the two bus-loaded tables |
| `dsp_component` | `dsp_control` + `trig_eval` + `rdc_dsp` + `abc_dq` + `dq_abc` + `fabric_transactions` |
| `reset_controller` | reset sequence |

Not part of this RTL:

- the microcontroller and its AHB-to-APB bridge;
- the FOC software loops;
- the PLL;
- the ADC chips. `tb/ad7912_model.sv` is a behavioural model for simulation.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
        rtl/foc_pkg.sv tb/tb_foc_fabric_top.sv --top-module tb_foc_fabric_top
    ./obj_dir/Vtb_foc_fabric_top

End-to-end testbenches (default parameters throughout):

- **`tb_foc_fabric_top`** simulates about 53 ms at 500 rad/s with:
  - resolver, motor-current and ADC models;
  - a microcontroller model that loads the tables and answers every interrupt;
  - a PLL-lock loss at 20 ms;
  - at 36 ms, a false FRAME_ADC drop and a false FRAME_CONTROL_MOD pulse that
    knock the ADC sequencer and the PWM carrier out of step. The true frame
    signals must pull them back without a reset;
  - at 42 ms, a RESET_N_M2F restart. The tables are cleared with the interface,
    the microcontroller model reloads them, and the whole sequence runs again.

  It checks the reset order, sample placement, speed/position tracking, Id/Iq,
  the phase voltages and the gates. It counts every mechanism (frames, trig
  evaluations, wraps, ADC and PWM resynchronisation, hand-over, bus errors,
  interrupt exchange, lock loss, regained synchronisation, restart) and fails if
  one never happens. It takes about 3 s.
- **`tb_foc_10krpm`** is the same at 10000 rpm.

Each module also has its own testbench, `tb/tb_<module>.sv`.

## How far to trust it, and what is this design's own

These parts follow the source design:

- the excitation angles;
- the sampling scheme (40 kHz, resolver samples tied to the excitation,
  currents aligned to the carrier's 0°/90°/180°/270° points);
- the RDC equations and coefficients;
- the fixed-point formats of the RDC stages;
- the 1024-entry interpolated tables;
- the transform equations;
- the register roles;
- the four-domain reset sequence.

These were chosen here:

- the exact state-by-state order of the DSP sequencer, its pending flags, and
  the dropping of a stale `i_ready`;
- placing the four resolver samples per period at 45°, 135°, 225° and 315°.
  The source design asks for samples at the excitation peaks, and four
  samples per period cannot all be at peaks; these points give equal
  magnitude with alternating sign;
- the mixer magnitude 1.5;
- the stage III internal widths;
- the use of the predicted position for the transforms;
- the pole-pair count of 4;
- the bus address decode;
- the PSLVERR rules;
- the carrier resync test;
- the control word sent to the ADC.

The ADC word layout follows the AD7912 datasheet.

The testbenches check against real-valued models and behavioural ADCs. They do
not check against a real motor. The microcontroller side is a bus model with a
trivial control law, not the FOC loops.
