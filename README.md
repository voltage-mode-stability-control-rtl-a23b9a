# Digital voltage-mode controller for a double boost DC-DC converter

A double (cascaded) boost converter reaches a high step-up ratio from a low
source, such as a PV panel, without pushing one switch to extreme duty
cycles: two boost stages in series give an ideal CCM gain of
`Vout/Vin = 1/((1-D1)(1-D2))`. The price is a fourth-order plant with two
switches to drive. This RTL is the digital half of such a system: it samples
the converter's output voltage, runs a discrete PID law, and produces the two
gate signals, all in one 50 MHz clock domain on a small FPGA.

```
            ADC board                        FPGA (dbc_ctrl_top)
 Vout ──►  (8-bit word)  ──► fb_capture ──► pid_ctrl ──┐
                               200 us        e = Vref-Vout, u = 0..255
                                                        │  mode
                             manual_duty (potentiometer)─┤──► duty ──┬─► pwm_gen ──► Q1
                                                                     └─► pwm_gen ──► Q2
                                             clk_div ──► count enable ─┘ (24 kHz)
```

The reference configuration: 50 MHz clock, one control sample every 200 us
(10,000 clocks), both switches at 24 kHz (2083 clocks per period), an 8-bit
control signal, and PID gains Kp = 2.892, Ki = 26.3, Kd = 0.0763 obtained by
Ziegler-Nichols tuning. The original system was tested with 3 V to 12 V in
and a 25 V target out.

## The control law and its datapath (`pid_ctrl`)

This is the part that takes the most care to read.

The controller uses the incremental (velocity) form of the PID:

```
e(k) = setpoint - feedback
u(k) = u(k-1) + K1*e(k) + K2*e(k-1) + K3*e(k-2)
```

so the hardware is one subtractor, three multipliers and three adders, with
registers for e(k), e(k-1), e(k-2), u(k-1) and the output. The law needs no
explicit integrator: the accumulation is in u(k-1).

**Where K1..K3 come from.** The gains Kp, Ki, Kd are continuous-time gains.
Discretising with a backward difference at sampling period Ts gives

```
K1 =  Kp + Ki*Ts + Kd/Ts
K2 = -(Kp + 2*Kd/Ts)
K3 =  Kd/Ts
```

With Ts = 200 us this makes K1 = 384.40, K2 = -765.89, K3 = 381.5. These are
the defaults, stored in `dbc_pkg` as signed Q12 fixed-point integers
(value x 4096). Two things follow, and anyone using the defaults should know
them:

* The derivative term dominates (Kd/Ts = 381.5, against an integral step of
  Ki*Ts = 0.0053). With 8-bit errors, almost any change of error drives u to
  one of its limits. In the testbench loop with a model plant, the defaults
  swing between the limits rather than settle. The tuned gains were found on
  real hardware, and the units they assume for error and control signal are
  not known. Treat K1..K3 as parameters to set for your own plant and ADC
  scaling. The end-to-end testbench regulates well with K1 = 0.25,
  K2 = -0.2, K3 = 0 (a PI law: Kp = 0.2, Ki*Ts = 0.05).
* Q12 keeps the small integral term: Ki*Ts is 21.5 LSB rather than 0.

**Saturation.** The control signal is limited to 0..255. The clamp is applied
to the stored u(k-1) itself, so the next step starts from the limit and not
from a wound-up value. Recovery after a long saturation, such as a lost
feedback signal, is therefore immediate. The 8-bit output is the integer
part of the Q12 value (truncation).

**Timing.** A `sample_valid` strobe registers e(k) and shifts the history
(cycle 1). The next cycle computes the sum, saturates it and registers u(k)
and `u_valid` (cycle 2). The latency is two clocks, far inside the
10,000-clock sampling period. Products are 33 bits; the sum is carried in 37.

## Taking the feedback (`fb_capture`)

An external microcontroller board acts as the ADC and puts an 8-bit code of
the output voltage on FPGA pins. Those pins change at times unrelated to the
FPGA clock. A pin may also change a clock or so before another, as when a
port is written in two steps. The block therefore:

1. passes each bit through a two-flop synchroniser;
2. runs a sampling timer that ticks every `SAMPLE_CYCLES` clocks;
3. on a tick, takes the synchronised word only once it has read the same on
   two consecutive clocks. While the pins are changing it waits, so a word
   mixed from an old and a new value is never taken.

With steady pins, `sample_valid` comes one clock after the tick. The transfer
is parallel. The original system also talks of serial links to the
microcontroller, but the 8-bit parallel word is what its controller
consumes, and eight pins fit its I/O count.

## Switch drive (`pwm_gen`, `clk_div`)

Each PWM module is a 13-bit counter running over 0..TOP and a comparator:

```
f_sw      = f_en / (TOP + 1)          50 MHz / 2083 = 24.0 kHz
threshold = floor(duty * (TOP+1) / 256)
pwm       = (count < threshold)
```

The resolution is one count, 1/2083 of the period (0.048 %), finer than the
8-bit duty command. Other settings from the same formula: TOP = 8191 gives
6.1 kHz; TOP = 6249 gives 8 kHz. The counter can be set to count up (pulse at
the start of the period) or down (pulse at the end), per module, through
`count_down`. The threshold and the direction are taken only at the end of a
period, so a duty change never shortens or doubles a pulse. The output is
registered and lags the counter by one clock. `period_start` marks the first
count of each period.

Both modules get the same duty command. Each has its own `TOP`, because
the two stages may need different switching frequencies: with equal
inductors they must differ, with unequal ones (200 uH and 500 uH here) the
same frequency works. Both default to 24 kHz.

`clk_div` sets how fast the counters advance. It is a clock enable, high one
clock in `DIV`, not a derived clock. The reference design feeds the PWM
counters the full 50 MHz, so `DIV = 1` and the enable is constantly high;
larger values slow both PWM modules together.

## Top level (`dbc_ctrl_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 50 MHz clock, synchronous active-low reset |
| `adc_data` | in | 8 | feedback code from the ADC board (asynchronous) |
| `setpoint` | in | 8 | reference, in ADC codes |
| `manual_duty` | in | 8 | potentiometer duty, used in open loop |
| `mode` | in | 1 | `MODE_OPEN_LOOP` / `MODE_CLOSED_LOOP` (`dbc_pkg::ctrl_mode_e`) |
| `pwm_count_down` | in | 2 | counter direction of PWM Q1 (bit 0) and Q2 (bit 1) |
| `pwm_q1`, `pwm_q2` | out | 1 | gate drive of the first- and second-stage switch |
| `pwm_q1_period`, `pwm_q2_period` | out | 1 | start-of-period pulses |
| `duty` | out | 8 | duty command in use |
| `sample_valid`, `ctrl_valid` | out | 1 | a sample was taken / the PID output was updated |

Parameters: `SAMPLE_CYCLES` (10000), `PWM_CLK_DIV` (1), `PWM1_TOP` and
`PWM2_TOP` (2082), `K1`, `K2`, `K3` (see above). In open loop the potentiometer
word drives both PWM modules directly. In closed loop the PID output does.
The PID keeps running in open loop, so switching modes is not bumpless. After
reset every register is zero: both switches start off and u(k-1) = 0.

Outside the FPGA, and not in this RTL: the power stage (two inductors, two
diodes, two MOSFETs, C1 = 100 uF, C2 = 220 uF, a 39 kOhm load), the ADC
board, the opto-couplers between the PWM pins and the switches, and the
potentiometer with whatever digitises it.

## How far to trust it, and where it departs from the original

Taken from the original design: the chain ADC word, then PID, then two PWM
modules; the velocity-form PID with three stored errors and a 0..255 clamp;
the 50 MHz clock, 200 us sampling, 13-bit counters, `f = f_div/(N+1)`, 24 kHz
on both switches; open and closed loop; up/down counting; the gain values.

Choices made here, where the original is silent:

* the mapping of Kp/Ki/Kd to K1..K3, the Q12 format and truncation to 8 bits;
* clamping u(k-1) as the anti-windup;
* the parallel pin transfer, the synchroniser and the stable-word check;
* duty scaling `duty*(TOP+1)/256`, output polarity (on while count <
  threshold), period-boundary updates and the registered output;
* the clock divider as an enable, and the mode and direction inputs;
* a synchronous, active-low reset to zero.

Known differences:

* The original gives 6250 as the count for 8 kHz. Under `f = f/(N+1)` that
  would be 6249. This design follows the formula.
* The original quotes sub-nanosecond execution times that no clocked
  circuit meets. Here a sample takes 1 to 4 clocks to capture and 2 more to
  compute.
* The original implementation used 258 logic elements, 89 registers and two
  9-bit embedded multipliers. This RTL has 163 flip-flop bits, mostly because
  of the wider Q12 coefficients and accumulator. Its three multipliers are by
  constants and can shrink to shift-and-add logic.
* The top brings the setpoint, the potentiometer word, the mode, the
  counter directions and several status signals out as ports: 44 pins in
  all. The original board used 21 I/O pins, so some of these were fixed
  inside the FPGA there.
* With the default gains the loop is not shown to regulate (see above). Output
  ripple and settling time belong to the analog hardware and were not
  evaluated.

## Simulating

All files are SystemVerilog-2017; `rtl/dbc_pkg.sv` must be read first.
Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dbc_pkg.sv tb/tb_dbc_ctrl_top.sv --top-module tb_dbc_ctrl_top -o sim
./obj_dir/sim
```

| Testbench | What it covers |
|---|---|
| `tb_clk_div` | enable period and phase for DIV = 5 and DIV = 1 |
| `tb_pwm_gen` | 2083-cycle period and on-time for duty 0..255, down counting, mid-period duty changes, a divided enable, the 6.1 kHz and 8 kHz settings |
| `tb_fb_capture` | sample timing at 20 and 10,000 cycles; words taken only after the pins settle |
| `tb_pid_ctrl` | 600+ samples against a 64-bit reference model at the default and moderate gains, hand-worked P-only values, both limits, 2-cycle latency |
| `tb_dbc_ctrl_top` | closed loop with a converter model, time-scaled (200-cycle samples, 100- and 80-cycle PWM periods, divide-by-2 enable): open loop; regulation to 25 V at Vin = 5, 12 and 3 V; lost feedback (saturation at 255, then recovery); setpoint 0 (saturation at 0); down counting; each mechanism counted |
| `tb_dbc_full` | the top with every default: 5 open-loop and 40 closed-loop samples at 50 MHz, 24 kHz PWM on both switches, every PID update and every PWM period checked |

`tb/dbc_converter_model.sv` is the plant used by the two top-level benches.
It is an averaged model: each gate signal is low-pass filtered to a duty
estimate, the target is `Vin/((1-D1)(1-D2))` with each D capped at 0.85, and
Vout follows that target with a first-order lag. The ADC board in the model
converts every `ADC_PERIOD` clocks (255 = 50 V). It writes the word as two
nibbles one clock apart, which exercises the capture logic. It is a stand-in
for checking the control chain, not a converter design.
