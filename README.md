# Three-phase PWM controller for a V/f induction motor drive

This is the digital control circuit of an adjustable-speed drive for a
three-phase induction motor. It makes the six gate signals of a MOSFET
voltage-source inverter. The user sets a supply frequency between 10 Hz and
50 Hz and a direction on a 4x4 keypad, then starts and stops the motor. The
present frequency and speed are shown on 7-segment LEDs.

The main idea is a pulse train whose pulses all have the same ON time, with
an OFF time that depends on the frequency. Each inverter device conducts for
180 degrees of the supply cycle, chopped into 9 pulses per half cycle. A
longer OFF time stretches the cycle, which lowers the frequency. It also lowers
the share of time the device is on, and so the mean voltage, in the same
proportion. So the voltage-to-frequency ratio (V/f) stays roughly constant.
That ratio sets the motor flux, and keeping it constant keeps the torque
available over the speed range. One table of OFF counts, indexed by frequency,
therefore controls both frequency and voltage.

Everything is synchronous to one clock. The defaults assume 1 MHz, slow
enough that the longest OFF time fits a 16-bit counter.

## Building one supply cycle

`pwm_wave_gen` makes the pulse train from two 16-bit down counters and a
T flip-flop:

- While Q = 0, counter-1 runs and the output (Q-bar) is high. This is the ON
  period, `on_count + 1` clocks.
- While Q = 1, counter-2 runs and the output is low. This is the OFF period,
  `off_count + 1` clocks.
- Each counter has a zero detector. When the running counter reaches zero, the
  flip-flop toggles and the other counter starts from a fresh load.
- Counter-2 loads its OFF count at the start of each OFF period, so a new
  frequency takes effect from the next pulse.

The rest of the circuit counts pulses. The "clock" of that pulse logic is a
clock-enable strobe, `pulse_adv`, which is high in the clock before the wave
rises. So everything that counts pulses changes exactly when a pulse starts.

`base_drive_gen` counts pulses modulo 18. Its signal OP-1 is high for pulses
0-8 (the positive half cycle) and low for pulses 9-17. Two AND gates give
device 0 = OP-1 · wave and device 3 = ¬OP-1 · wave.

`phase_shift_drive` shifts OP-1 into a 3-bit shift register and, in a second
instance, a 6-bit one. Three pulses are 60 degrees, so these hold OP-1 delayed
by 60 and 120 degrees. They make the other two legs in the same way:

| device | leg, side | conducts (degrees) | made from |
|---|---|---|---|
| 0 | R upper | 0-180 | OP-1 · wave |
| 1 | B lower | 60-240 | OP-1 delayed 3 pulses · wave |
| 2 | Y upper | 120-300 | OP-1 delayed 6 pulses · wave |
| 3 | R lower | 180-360 | ¬OP-1 · wave |
| 4 | B upper | 240-60 | ¬(OP-1 delayed 3) · wave |
| 5 | Y lower | 300-120 | ¬(OP-1 delayed 6) · wave |

The devices switch on in the order 0-1-2-3-4-5, 60 degrees apart. The output
of each leg is a six-step waveform chopped by the pulses. The pattern repeats
exactly every cycle, the three phases are 120 degrees apart, and each half
cycle is the mirror of the other. These properties suppress subharmonics, even
harmonics and, in the line voltages, the triplen harmonics.

`three_phase_pwm` puts these together and registers the six outputs. The
register delays them by one clock but keeps the gate signals free of glitches.
For reverse rotation (`dir = 1`) it swaps the Y and B legs, which gives the
order 0-5-4-3-2-1.

**Dead band.** The two devices of a leg are never on together, and they are
never switched over directly. OP-1 only changes at the start of a pulse, and
both devices are off during every OFF period. So each OFF period is a dead
band, and it can be changed at run time by rewriting the table. An assertion
in `three_phase_pwm` checks that no leg has both devices on. The shift
registers start at zero after reset. For the first six pulses, legs Y and B
drive their lower devices.

## The OFF-count table and V/f

`off_time_mem` holds one 16-bit word per frequency from 10 Hz to 50 Hz in
1 Hz steps, 41 words. `freq_decoder` maps a frequency `f` to word `f - 10`.
The table is filled at configuration time from

    off(f) = round(CLK_HZ / (18 · f)) − ON_COUNT − 2

so one pulse lasts `round(CLK_HZ / (18 f))` clocks, and 18 pulses make one
cycle of `f`. With the defaults (1 MHz clock, ON = 1000 clocks):

| f | OFF count | clocks per pulse | duty | supply period |
|---|---|---|---|---|
| 10 Hz | 4555 | 5556 | 18 % | 100.0 ms |
| 30 Hz | 851 | 1852 | 54 % | 33.3 ms |
| 50 Hz | 110 | 1111 | 90 % | 20.0 ms |

Across the table the duty stays within 0.05 % of 0.9 · f / 50 Hz, which is
the straight V/f line through 90 % at 50 Hz. The RAM has a write port
(`mem_we`, `mem_waddr`, `mem_wdata`), so the curve can be changed while the
drive runs. Examples are a voltage boost at
low speed, or other pulse timing. Reads are synchronous, one clock after the
address.

If you change `CLK_HZ` or `ON_COUNT`, the 10 Hz count must still fit 16 bits:
`CLK_HZ / 180 − ON_COUNT − 2 < 65536`, which means about 11.8 MHz at most
with the default ON time. For a faster board clock, feed the design through
a clock enable or a divided clock.

## Soft start, soft stop and reversal

The frequency never jumps. `start_stop_logic` holds the *current location*,
the table word in use. Two `loc_comparator` instances watch it:

- The **start comparator** compares the keypad location with the current
  location. Its flags are GTH1 (keypad > current), LTH1 (keypad < current)
  and ET1 (equal).
- The **stop comparator** compares the current location with the 10 Hz
  location. Its flags are GTH2 and ET2.

The controller takes one step per PWM pulse (or per `RAMP_TICKS` pulses). It
has three states:

| state | bridge | on each step | leaves on |
|---|---|---|---|
| IDLE | off | location held at 10 Hz | START → RUN |
| RUN | on | +1 if GTH1, −1 if LTH1, hold if ET1 | STOP, or the opposite direction key → STOP |
| STOP | on | −1 while GTH2 | ET2 → IDLE, or RUN with the direction flipped if a reversal is pending; START → RUN |

A start therefore begins at 10 Hz and climbs to the setting. A new setting is
reached by ramping. A stop ramps down to 10 Hz before switching the bridge
off. Pressing the opposite direction key while running does three things in
order: a soft stop to 10 Hz, a swap of the phase order, and a soft start back
up to the setting.

The ramp is fast: a step per pulse takes 40 pulses from 10 Hz to 50 Hz, about
0.1 s at the defaults. For a gentler ramp on a real motor, set `RAMP_TICKS`
higher. Direction keys pressed while IDLE only select the direction.

## Operator interface

`keypad_scanner` drives the four rows low one at a time, `SCAN_DIV` clocks
each, and samples the four columns through a synchronizer. A key counts once
it has been seen in `DEBOUNCE` consecutive scans; at the defaults that is
16 ms. Each press is reported once. `key_entry` decodes this layout:

    1 2 3 A      A forward    C start    * clear entry
    4 5 6 B      B reverse    D stop     # enter
    7 8 9 C
    * 0 # D

Frequencies are typed as two digits followed by `#` (for example `3 0 #`).
A value outside 10-50 is rejected: the setting is kept and the display reads
`Err` until the next valid entry or `*`.

`seg7_display` multiplexes six digits, `DIGIT_CYCLES` clocks each. Digits 0-1
show the present frequency in Hz. Digits 2-5 show the synchronous speed
`120 f / POLES` in rpm, with leading zeros blanked. Segments `seg[0..6]` are
a..g, and both segments and digit enables are active high. The speed shown
is computed from the frequency; the drive has no speed sensor.

## Top-level interface (`motor_ctrl_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (`CLK_HZ`), asynchronous active-low reset |
| `kp_col_n` / `kp_row_n` | in / out | 4 / 4 | keypad matrix, active low, columns pulled up off chip |
| `base_drive` | out | 6 | bit *i* drives inverter device *i* (through the isolated driver cards) |
| `seg`, `an` | out | 7, 6 | display segments and digit enables |
| `mem_we`, `mem_waddr`, `mem_wdata` | in | 1, 6, 16 | OFF-count table write port (tie `mem_we` low if unused) |
| `running`, `dir`, `state` | out | 1, 1, 2 | bridge on, 0 = forward, controller state |
| `pwm_wave` | out | 1 | the pulse train |
| `cur_freq` | out | 7 | present frequency in Hz, 0 when stopped |

Parameters: `CLK_HZ` (1 000 000), `ON_COUNT` (999, so ON lasts 1000 clocks),
`RAMP_TICKS` (1), `SCAN_DIV` (1000), `DEBOUNCE` (4), `DIGIT_CYCLES` (1000),
`POLES` (4). The shared constants are in `motor_pkg`: 16-bit counters,
3 pulses per sector, 9 per half cycle, and 10-50 Hz.

The rectifier, DC-link filter, MOSFET bridge, driver cards and motor are
outside this design. `base_drive` is meant for the driver cards, which
isolate the logic from the power stage.

## What is fixed by the design and what was chosen

These parts follow the design as described:

- the two-counter and T-flip-flop pulse generator, with 16-bit counters;
- 3 pulses per 60 degrees and 9 per half cycle;
- OP-1 and the AND/inverter gating of devices 0 and 3;
- the 3-bit and 6-bit shift registers for the other legs;
- the device numbering and the 0-1-2-3-4-5 order;
- the OFF-count RAM addressed through a frequency decoder;
- the start and stop comparators and their GTH, LTH and ET rules;
- stepping the location once per pulse;
- soft stop to 10 Hz, and reversal as stop, then reverse, then start;
- the 10-50 Hz range;
- keypad input, and 7-segment display of frequency, speed and errors.

These are this implementation's own choices:

- the 1 MHz clock and the 1000-clock ON time;
- the table formula, and 16-bit words at 1 Hz steps. That is 82 bytes, where
  the original called for an 80-byte RAM; the 41st word keeps both 10 Hz and
  50 Hz in the table;
- the synchronous read and the write port of the RAM;
- reversal by swapping the Y and B legs;
- the output register;
- the reset values: wave starting in OFF, IDLE, forward, 10 Hz setting;
- the keypad layout, scan timing and two-digit entry;
- the display format and the 4-pole speed;
- the `RAMP_TICKS` divider.

Where the original clocks logic directly from the flip-flop output, this
design uses a clock enable on the single system clock.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog:

| testbench | what it checks |
|---|---|
| `tb_pwm_wave_gen` | ON/OFF lengths against `data+1`, start in OFF, `pulse_adv` timing, when a new OFF count takes effect |
| `tb_base_drive_gen` | OP-1 = 1 for pulses 0-8, gating of devices 0/3, 9 pulses each per cycle, no overlap |
| `tb_phase_shift_drive` | random OP-1 stream delayed by exactly 3 and 6 pulses, gating |
| `tb_three_phase_pwm` | every clock against a model written from the pulse number; window order forward and reverse; 9 pulses per device per cycle; cycle length; enable |
| `tb_off_time_mem` | all 41 words against the formula computed in real arithmetic, V/f within ±0.5 %, read latency, write-back |
| `tb_freq_decoder`, `tb_loc_comparator` | exhaustive |
| `tb_start_stop_logic` | soft start one step per pulse, hold, ramp down, reversal sequence, soft stop to off, `RAMP_TICKS = 3` |
| `tb_keypad_scanner` | all 16 keys through a matrix model, one report per press, bounce and short-press rejection |
| `tb_key_entry` | accepted and rejected entries, clear, command strobes |
| `tb_seg7_display` | decoded digits for 0-50 Hz, `Err` |
| `tb_motor_ctrl_top` | full design at default parameters, driven through the keypad model |
| `tb_freq_sweep` | full design at default parameters: every frequency 10-50 Hz entered on the keypad; ON and OFF widths, supply period and displayed frequency at each |

`tb_motor_ctrl_top` takes the drive through this sequence:

1. enter 50 Hz and start;
2. make a rejected entry;
3. change to 30 Hz;
4. reverse;
5. rewrite a table word;
6. stop.

Along the way it checks the ON width and the supply period
(`18 · round(10⁶ / 18f)` clocks at 50, 30 and 25 Hz), the window order and
pulse counts, the display text, and that no leg is ever shot through. It also
counts each mechanism (ramp up and down, hold, reject, reversal, stop,
table write) and fails if any never happened. It simulates 1.1 s of drive
time in about a second.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/motor_pkg.sv tb/tb_motor_ctrl_top.sv --top-module tb_motor_ctrl_top
    ./obj_dir/Vtb_motor_ctrl_top

Replace the testbench file and top-module name to run any other testbench.
All of `rtl/` is synthesizable SystemVerilog.

## Limits

- The drive is open loop. The "speed" shown is the synchronous speed for the
  present frequency, not a measurement.
- Above 50 Hz (constant-power region) and below 10 Hz are not covered by the
  table. Widening the range needs more table words and, below about 10 Hz,
  wider counters or a slower clock.
- The pulse count per cycle is fixed at 18. It does not rise at low
  frequency, so the pulses get long at 10 Hz (5.6 ms per pulse).
- Output drive, isolation and protection (over-current, DC-link sensing) are
  left to the hardware around the FPGA.
