# Digital average-current-mode controller for a buck VRM

This is the digital core of a 12 V to 1.5 V synchronous buck regulator that
uses **average current-mode control (ACM)** without a fast ADC, without a fast
clock and without a large multiplier. An outer voltage loop computes a current
reference; an inner current loop turns the error between that reference and the
sensed inductor current into a duty ratio. Both loops run once per switching
period on shared hardware.

Everything analog-to-digital in it is done in the time domain, with chains of
identical delay elements (DEs, 200 ps each):

* a **one-shot timer** turns a sampled voltage into a pulse whose length falls
  logarithmically with the voltage;
* a **window delay-line ADC** measures how much that pulse differs from a
  reference pulse, in DEs, over a 64-DE (6-bit) window;
* a **hybrid DPWM** makes the PWM edge from a divided ring-oscillator clock
  (coarse) plus a 256-DE delay line (fine), for 12-bit duty resolution at about
  1.25 MHz, or 13 bits at about 620 kHz;
* a **dead-time unit** delays the PWM edge through a 200-DE line and derives
  non-overlapping high-side and low-side drive commands.

The hard problem is that a 6-bit window is far too narrow to measure the
inductor current over its whole range. The design solves it by **moving the
window**: the current reference is split into coarse bits, which set the width
of the reference pulse (where the window sits), and fine bits, which are
subtracted digitally from the ADC result (where inside the window the target
lies). This is described in detail below.

## How time is modelled

In silicon the delay lines are asynchronous buffer chains. Here every circuit
runs in a single clock domain whose period is one delay element, `clk` = 200 ps
(5 GHz in simulation). A delay line of N elements is an N-stage shift register
(`delay_line`), one flip-flop per element, and a tap k is the input delayed by
k elements. The ring oscillator is a Johnson ring of the same elements. This is
cycle-equivalent to the buffer chains as long as every element has the same
delay, which is what the original circuit relies on anyway. It is not a
netlist you would tape out as is: a real implementation replaces
`delay_line` and `ring_oscillator` with buffer chains, and keeps the remaining
logic.

Consequences:

* All widths and delays in the RTL are counts of elements. The switching period
  is 16 intervals x 256 elements = 4096 elements = 819.2 ns (1.221 MHz), or
  32 x 256 = 8192 elements (610 kHz) in the low-frequency mode.
* The one-shot timers are analog (an RC discharging to a threshold) and are
  written as a behavioural model with a real-valued input and a `#` delay.
  They are the only non-synthesizable module in `rtl/`.

## Block diagram

```
               +------------------------ acm_vrm_top ------------------------+
 v_sense ----->| one_shot_timer (V) --os_v--+                                 |
 i_sense ----->| one_shot_timer (I) --os_i--+                                 |
               |        ^trg_v ^trg_i       |                                 |
               |  +-------------------------v------- acm_controller ------+   |
               |  | system_governor --> trg, sel_i, pi_start, pwm_load    |   |
               |  | ref_pulse_gen ----> ref_v / ref_i (width from msb)    |   |
               |  | window_dl_adc ----> v_code / i_code                   |   |
               |  | voltage error  x_v = v_code - 32                      |   |
               |  | current_ref_segmenter: vc -> msb, lsb; x_i = i - lsb  |   |
               |  | pi_compensator (shared multiplier) -> vc, d, d_x      |   |
               |  | ring_oscillator -> hr_dpwm -> c -> dead_time -> hs,ls |--> hs, ls
 sclk/cs_n/mosi|->| spi_regs (configuration)                              |--> miso
               |  +-------------------------------------------------------+   |
               +-------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `acm_pkg` | widths, types (`cfg_t`, `loop_e`, `phase_e`), register map, reset values |
| `delay_line` | N-element delay chain with all taps |
| `ring_oscillator` | internal reference clock, 256 elements per period |
| `hr_dpwm` | 12/13-bit hybrid DPWM, interval counter |
| `dead_time` | 200-element line, 8 selectable dead times, hs/ls generation |
| `one_shot_timer` | behavioural voltage-to-pulse-width converter |
| `window_dl_adc` | two-channel 6-bit window delay-line ADC |
| `ref_pulse_gen` | voltage reference pulse and segmented current reference pulse |
| `current_ref_segmenter` | 12-to-9 bit cast of v_c, MSB/LSB split, current error |
| `pi_compensator` | both PI compensators on one multiplier |
| `system_governor` | per-period schedule of sampling, calculation and PWM update |
| `spi_regs` | serial port and preloaded configuration registers |
| `acm_controller` | the synthesizable controller, all of the above but the one-shots |
| `acm_vrm_top` | controller plus the two one-shot models; analog world as ports |

## One switching period

The governor counts intervals of the DPWM (16 per period, or 32 at 620 kHz;
one interval = 256 elements = 51.2 ns) and runs this sequence:

| Step | When (intervals from period start) | What happens |
|---|---|---|
| blanking | 0 .. t_blank-1 | nothing is sampled while the switch node rings |
| voltage conversion | t_blank, 2 intervals | one-shot V and the reference pulse V start together; the ADC measures their difference |
| voltage PI | next interval | `x_v = v_code - 32`; PI update gives the current reference `vc` |
| dead zone | 2 intervals | ADC switched to the current channel; `vc` MSBs move the current reference pulse |
| current conversion | 2 intervals | one-shot I against the segmented reference pulse |
| current PI | next interval | `x_i = i_code - vc_lsb`; PI update gives the duty `d` (and `d_x`) |
| PWM update | last interval | `d` is loaded into the DPWM for the next period |

`t_blank` (default 7 intervals) is programmable; it is clamped so that the
whole sequence still ends before the last interval. The conversion and dead-zone
lengths are parameters of `system_governor` (`CONV`, `DZ`).

## The window ADC and the moving current window

A one-shot pulse has length `T = RC ln(VDD / (V - Vth))`, so a larger input
gives a shorter pulse. The ADC gates the reference pulse with the inverted
one-shot pulse, `diff = ref & ~os`: `diff` is high for as long as the reference
pulse outlasts the one-shot pulse. `diff` enters a 64-element line; when it
falls, the line contents are latched into a status register, and a decoder
counts the run of ones from the line input. The count is the code, 0..63
elements; a longer difference saturates at 63 and raises `adc_sat`. The result
is ready two clocks after the reference pulse ends (a 320-element voltage
reference gives a conversion of about 65 ns; the conversion is as long as the
reference pulse).

Code 0 means the measured pulse is at least as long as the reference; large
codes mean a short pulse, i.e. a large input. The code therefore rises with
the measured quantity.

* **Voltage loop.** The reference pulse has a fixed width (`vref_w`, 320
  elements by default) and the regulation point is the window centre:
  `x_v = v_code - 32`. The set point is chosen by `vref_w` together with the
  external RC and sense divider.
* **Current loop.** The voltage PI output `vc` (12 bits) is cast to 9 bits by
  dropping its 3 LSBs. Its 3 MSBs `vc[8:6]` choose the reference pulse width
  `iref_base - 64 * msb` elements: each MSB step slides the window by exactly
  one window width (64 elements). Its 6 LSBs `vc[5:0]` are the target inside
  the window, so `x_i = i_code - vc[5:0]`. Together the 3 + 6 bits span 512
  steps of current with a 6-bit converter.

A configuration bit (`iref_fixed`, register 9) selects the simpler
**constant-window** current loop instead: the reference pulse stays at
`iref_base`, and the cast reference, saturated to 63, is the target:
`x_i = i_code - min(vc[11:3], 63)`. It measures the current only inside one
64-element window, so the base width must be placed at the operating point and
only load changes that stay inside the window are regulated. The closed-loop
test exercises it with a 1.5 A to 1.8 A step.

Because the step is one window, the segments join without gaps or overlap:
moving from the top of one segment to the bottom of the next changes both the
pulse width and the LSB target by one element-equivalent. The closed-loop
testbench checks that the MSBs actually change during a load step.

## The DPWM

`d[11]` chooses how the PWM is built from the time base `DCC0` (a 50 % square
wave at the switching frequency) and the delayed edge `DLY_fine`:

* `d[11] = 0` (D < 0.5): `c = DCC0 & ~DLY_fine`, the pulse ends at the delayed edge;
* `d[11] = 1` (D >= 0.5): `c = DCC0 | DLY_fine`, a half period plus the delay.

`DLY_fine` is `DCC0` delayed by `d[10:8]` whole intervals (a chain of interval
delayed copies and an 8:1 mux) and then by `d[7:0]` elements (256-element line
and 256:1 mux). The ON time is `d` elements, `D = d / 4096`. With `fsel = 1`
the period is 32 intervals, the coarse mux has 16 inputs (`d[10:7]`) and the
fine mux uses `{d[6:0], d_x}`, so the duty is `{d, d_x} / 8192`: the same
200 ps step at half the frequency gives one more bit. `d_x` is the first
fractional bit of the current compensator.

## PI compensators

Each loop is `u[n] = u[n-1] + a e[n] - b e[n-1]`, with `e = -x` (the ADC gives
measurement minus reference). Coefficients are unsigned Q6.10 (16 bits);
the state has 10 fractional bits and is clamped to [0, 4096). One multiplier
serves both loops; an update takes 3 clocks (a x e, then b x e_prev, then the
write) and `done` comes 4 clocks after `start`, far below one interval.
Reset values are the compensator design of the original work:
a_V = 39.27, b_V = 34.34, a_I = 0.24, b_I = 0.2069 (40212, 35164, 246, 212 in
Q6.10). Those numbers assume that work's sensing gains; the closed-loop
testbench loads its own set over the serial port.

## Dead time

`c` runs through a 200-element line; `sel` picks one of the taps 5, 25, 50, 75,
100, 125, 150, 200 (1, 5, 10, 15, 20, 25, 30, 40 ns). `hs = c & c_delayed`,
`ls = ~(c | c_delayed)`: both edges of each drive are delayed so that the two
are never on together. An assertion in `dead_time` checks this.

## Serial port

SPI mode 0, `cs_n` low for exactly 24 `sclk` bits, MSB first:
`{rw, addr[6:0], data[15:0]}`, `rw = 1` for read. A write takes effect when
`cs_n` rises after exactly 24 bits; a read returns the 16 data bits on `miso`.
Inputs are synchronised to `clk`, so `sclk` must be below `clk / 4`.

| Addr | Register | Reset |
|---|---|---|
| 0, 1 | a_V, b_V (Q6.10) | 40212, 35164 |
| 2, 3 | a_I, b_I (Q6.10) | 246, 212 |
| 4 | t_blank (intervals) | 7 |
| 5 | dead-time select | 2 (10 ns) |
| 6 | voltage reference width (elements) | 320 |
| 7 | current reference base width (elements) | 500 |
| 8 | fsel (0: 1.22 MHz, 1: 610 kHz) | 0 |
| 9 | iref_fixed (1: constant current window) | 0 |

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`. The closed-loop test runs the top at its
default parameters against `tb/buck_plant_model.sv`, a behavioural buck stage
(12 V in, L = 2.2 uH, C = 50 uF, 35 mOhm switches, sensing gains chosen so the
operating point sits inside the ADC windows). It starts up from 0 V, regulates
at 1.5 A, steps to 3 A and back, then switches to 620 kHz and a new dead time
over the serial port, and finally runs the constant-window mode with a 1.5 A
to 1.8 A step. In simulation the output holds 1.49..1.50 V in every phase,
and each mechanism (both samples, both PI updates, DPWM loads, window
moves, ADC saturation, dead-time gaps, both frequencies, constant window) is
counted and must occur.

A second closed-loop test, `tb_acm_vrm_load_step5a`, uses a larger filter
(L = 1.5 uH, C = 300 uF) and a lower current-sense gain (0.35 V/A) and steps
the load between 3 A and 8 A, so the current window travels over most of its
eight segments. In simulation the output deviates by at most about 115 mV and
is back within 20 mV of 1.5 V after about 67 us.

With plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl -y tb rtl/acm_pkg.sv tb/tb_acm_vrm_top.sv --top-module tb_acm_vrm_top
./obj_dir/Vtb_acm_vrm_top
```

Replace `tb_acm_vrm_top` by any other `tb_*` module to run a block test. The
closed-loop run takes a few seconds; it simulates about 1200 switching periods
at 5 G clock cycles per second of circuit time.

## Where this design departs from, or goes beyond, its source

* The equation for the D >= 0.5 case of the DPWM is written in one place with
  an inverted fine delay; the block diagram and the timing example use
  `DCC0 | DLY_fine`, which is what gives the stated duty cycles, and that is
  what is built.
* Not in the source, chosen here: the ring length (derived from 16 intervals
  of 256 elements), the dead-time tap positions between the stated 1 ns and
  40 ns, the conversion and dead-zone lengths, the voltage window centre (32),
  the reference pulse widths and formula, the coefficient format, the serial
  frame and register map, saturation of the ADC, the 16:1 coarse mux in the
  620 kHz mode.
* Blanking time is programmable only; adaptive trimming of the blanking window
  is not built.
* The constant-window mode uses saturation as its cast of the reference to
  6 bits; the source only names that cast.
* The analog parts of the chip are not in this RTL: the power switches, gate
  drivers and bootstrap, high-side level shifter, current-sense amplifier and
  the output filter. `hs`/`ls` and the real-valued sense inputs are the ports
  where they connect.
* Delay lines and the ring oscillator are clocked shift registers (see "How
  time is modelled").
