# Charge-injection compensation controller for MEMS electrostatic actuators

An electrostatic MEMS actuator holds a thin dielectric between its
electrodes. Each time it is driven, some charge is injected into that
dielectric and stays there. The trapped charge adds to the applied field,
shifts the actuator's pull-in behaviour and, over long operation, can make it
stick. Trapped charge of one sign is removed by driving the actuator with the
opposite supply polarity. Drive it too long that way, though, and charge of the
other sign builds up.

This controller closes that loop. It keeps measuring the actuator
capacitance, which rises with trapped charge, and chooses between two supply
polarities ("sequences"). From time to time it tries the other polarity. It
stays there only if the capacitance measured in the new polarity is clearly
lower than the last value measured in the old one. The result is that the
actuator is always driven in the polarity that reduces the trapped charge.

The RTL targets a small FPGA with a 100 MHz clock and external parts:
- a capacitance front-end chip that pulses a capacitive divider made of the
  actuator and a fixed capacitor;
- a 10-bit ADC that digitises the divider;
- analogue multiplexers that swap the actuator supplies;
- slide switches, push buttons, LEDs and a four-digit 7-segment display
  for the operator.

## How a measurement is made

The front-end chip is clocked by the actuator clock `clk_dacea` that this
design generates. In each pulse it raises three control signals:

- **H**: hold. The divider is being discharged.
- **R**: reset.
- **D**: discharge. This is when the polarity may be switched safely.

While H is low, the divider output is a voltage proportional to the actuator
capacitance. The ADC converts it at 100 MHz, or at 50 or 12.5 MHz if chosen.

Samples around H are useless, because the ADC shows the switching transient
for several clocks. The capture path therefore works like this:

1. **`hold_stretch`** builds a widened hold window. It opens `PREHOLD_TIME`
   clocks after H goes high and closes `HPOS_TIME` clocks after H goes low,
   which is 700 ns by default.
   - In "preventive" mode, a pulse that ends before the window has opened
     still gives the full closing delay.
   - The ADC pipeline delays its output by several clocks, and the closing
     delay covers that delay as well as the settling of the divider.
2. **`sample_hold`** passes the 11-bit (zero-extended) ADC code while the
   window is closed. While the window is open it holds the last good value,
   so downstream logic sees a continuous, glitch-free stream.
3. **`subsampler`** averages blocks of 2^SSFACTOR = 8 fast samples into one
   low-rate sample, giving one sample per 80 ns.
4. **`moving_average`** gives the mean of the last 2^AVGS = 32 low-rate
   samples (2.56 µs). It keeps a running sum that adds the newest sample and
   subtracts the oldest, and its registered output lags by one low-rate
   cycle.
5. **`cap_store`** copies the average into `cap_seq1` while the controller
   is settled in sequence I, and into `cap_seq2` while it is settled in
   sequence II. Each register therefore holds the last trustworthy value of
   its polarity.

## The polarity decision (`charge_fsm`, `seq_timer`, `avg_counter`)

The heart of the design is a five-state machine. It is binary-encoded in
three flip-flops (`mems_pkg::seq_state_t`):

| state | polarity `seq` | LED | leaves when |
|---|---|---|---|
| `ST_SEQ1` | I (0) | on | the timer expires → `PRE_SEQ2`; manual switch → `MANUAL` |
| `ST_PRE_SEQ2` | II (1) | off | averager refilled: new mean + `data_interval` < `cap_seq1` → `SEQ2`, otherwise back to `SEQ1` |
| `ST_SEQ2` | II (1) | on | the timer expires → `PRE_SEQ1`; manual switch → `MANUAL` |
| `ST_PRE_SEQ1` | I (0) | off | averager refilled: new mean + `data_interval` < `cap_seq2` → `SEQ1`, otherwise back to `SEQ2` |
| `ST_MANUAL` | push button 2 | blinking | manual switch released → `SEQ1` |

The state register only loads in low-rate cycles where the chip's D is high.
So the multiplexers are switched only while the divider is discharged, and
the sample-and-hold is frozen at that moment.

The following blocks run the state machine.

- **`seq_timer`** sets the trial period.
  - It is a counter of SEC_LSB+4 bits on the low-rate enable.
  - It expires when its top four bits equal the setting `sec_time`. One unit
    is 2^23 × 80 ns ≈ 0.67 s.
  - Once expired it holds until the next D, then starts again. Manual mode
    keeps it cleared.
- **`avg_counter`** says when the averager window holds only samples of the
  new polarity.
  - It has AVGS+1 bits and counts on the low-rate enable.
  - In sequence I it counts up and stops at all ones. In sequence II it
    counts down and stops at zero.
  - Its top bit flips 2^AVGS cycles after a polarity change. The PRE states
    wait for that flip: `PRE_SEQ2` waits for the bit to fall and `PRE_SEQ1`
    for it to rise.
- **`data_interval`** is the hysteresis.
  - With 0, a trial switch is kept whenever the new polarity measures lower
    at all. On a charging actuator that happens at every trial, so the
    polarity alternates every period. On an actuator that is not charging,
    both polarities measure the same, and every trial is reverted.
  - With a positive value, the machine stays in one polarity. It makes short
    trial switches of about 2.6 µs each, and keeps the new polarity only
    once the measurement there is clearly lower.

The comparison is made in 12 bits without wrap-around. A stored value below
`data_interval` is never taken for "much larger".

## Clocking

Everything runs on the single 100 MHz input clock, using one-cycle enables:

- The low-rate enable `lf_en` is high one cycle in 2^SSFACTOR, giving
  12.5 MHz. It drives the subsampler, the averager, the timers, the state
  machine and the pattern generators.
- **`prescaler`** is a 24-bit counter of `lf_en`. Its output `rise[k]`
  pulses in the cycle where counter bit k goes from 0 to 1. These pulses set
  the user-interface rates:

| pulse | rate | use |
|---|---|---|
| `rise[10]` | about every 82 µs | display digit scan |
| `rise[14]` | about every 1.3 ms | switch and button sampling |
| `rise[19]` | about every 42 ms | `sec_time` and `halfperiod` steps |
| `rise[20]` | about every 84 ms | duty and period steps |
| `rise[21]` | about every 168 ms | `data_interval` steps |

  Counter bit 20 also blinks the manual-mode LED.

The ADC clock output `clk_adc` is chosen by slide switches 5..4:

| switches 5..4 | `clk_adc` |
|---|---|
| `01` | 12.5 MHz (bit 2 of a free-running counter of the fast clock) |
| `10` | 50 MHz (bit 0 of that counter) |
| `00`, `11` | the 100 MHz clock itself |

This output is the only place where a clock passes through logic.

H and D are used without synchronisers, because the chip makes them from
`clk_dacea`, which this design drives. A version that takes them from an
unrelated clock should add two-flop synchronisers in front of `hold_stretch`
and `charge_fsm` and lengthen `PREHOLD_TIME` to match.

## Actuator clock generators

Slide switches 7..6 select which generator drives `clk_dacea`.

- **`00`, `out_pattern`**: normal operation.
  - The clock is high for `halfperiod` low-rate cycles (27 by default,
    2.16 µs). It then stays low until the comparator input `comp` goes
    high.
  - `comp` is ignored for the first `GRACE` = 25 cycles of the low phase.
  - If `comp` does not arrive within `MAXLOCK` = 15000 cycles, the generator
    drops lock and starts over.
  - The comparator itself is outside the design, so `comp` is a port and is
    repeated on `cmpout`.
- **`01`, `cyclic_pattern`**: a 1024-bit pattern with three ones. The
  actuator sees mostly the high-voltage phase.
- **`10`, `cyclic_pattern`**: a 256-bit pattern with 24 zeros. The actuator
  sees mostly the low-voltage phase.
- **`11`, `duty_pattern`**: a simple PWM that is high while a counter is
  below `duty_cycle`.
  - The counter runs from 0 to `pattern_period`, so the period is
    `pattern_period+1` low-rate cycles.
  - The default is 10 high cycles out of 251.
  - The period buttons step by 125. The setting 125, which is one step down
    from the default, gives 126 cycles: 10.08 µs, close to the usual 10 µs
    actuator drive.

## Operator interface (`control_panel`, `seg7_display`)

Switches and buttons are sampled every 1.3 ms by `rise[14]`, which also
debounces them. Until the first sample after reset, all switches read as 0.
So the design starts in normal mode with the comparator-locked actuator
clock. Slide switch 3 selects manual mode. Slide switches 2..0
select what the display shows:

| sw 2..0 | display | buttons 0 / 1 change it by | default |
|---|---|---|---|
| 000 | `cap_seq2[7:0]` and `cap_seq1[7:0]` in hex | - | - |
| 001 | `sec_time` (0..15, wraps) | 1 | 1 |
| 010 | `data_interval` (0..512) | 1 | 10 |
| 011 | `halfperiod` (1..8191) | accelerating step | 27 |
| 100 | `duty_cycle` (1..1023) | 10 | 10 |
| 101 | `pattern_period` (1..1023) | 125 | 250 |
| other | `E00E` | - | - |

- Push button 0 increases the value shown, and wins if both buttons are
  held.
- Settings stop at the ends of their ranges, except `sec_time`, which
  wraps.
- The `halfperiod` step grows by one on every adjustment pulse while a
  button is held, up to 2046, so large changes are quick.
- The display is active low. `seg7_display` scans the four digits one at a
  time using `rise[10]`, and `seg7_decoder` turns each hex digit into its
  segments.

The LEDs show:

| LED | meaning |
|---|---|
| 0 | polarity (`digs[4]`) |
| 1 | state LED |
| 5..2 | `seq_timer` bits SEC_LSB+1..SEC_LSB-2 (progress within one unit) |
| 6 | `seq_timer` bit SEC_LSB+2 |
| 7 | `avg_counter` top bit |

`digs[4]` is the multiplexer select. `digs[3:1]`, `man`, `h0` and `d0_c`
are chip mode pins and are held low. `capture` shows sampled push button 0.

## Parameters of `mems_charge_ctrl`

| parameter | default | meaning |
|---|---|---|
| `SSFACTOR` | 3 | low rate = 100 MHz / 2^SSFACTOR; fast samples per low-rate sample |
| `AVGS` | 5 | moving-average length 2^AVGS |
| `SEC_LSB` | 23 | position of the `sec_time` unit in the sequence timer |
| `PREHOLD_TIME` | 2 | hold-window opening delay, fast cycles |
| `HPOS_TIME` | 70 | hold-window closing delay, fast cycles |
| `MAXLOCK` | 15000 | main pattern lock time-out, low-rate cycles |
| `GRACE` | 200/2^SSFACTOR | main pattern comparator blanking, low-rate cycles |

`SEC_LSB` is the parameter to lower for simulation. With 12, one `sec_time`
unit is about 330 µs instead of 0.67 s.

## Files

- `rtl/mems_pkg.sv` holds the data width and the state and pattern-select
  enums.
- There is one module per file. `rtl/mems_charge_ctrl.sv` is the top.
- `tb/tb_<block>.sv` is a self-checking testbench for each block. Each one
  prints `TB_RESULT checks=N failures=M`.
- `tb/tb_mems_charge_ctrl.sv` is the end-to-end test at `SEC_LSB=12`.
- `tb/tb_mems_charge_ctrl_full.sv` runs the top at its default parameters
  through a full 0.67 s sequence period and one trial switch. It simulates
  about 0.7 s of operation, which takes roughly 40 s to run.
- `tb/tb_workload_charge.sv` runs the main task on a charging actuator at
  `SEC_LSB=12`. It uses hysteresis 0 and 40, and also adds a large charge of
  each sign to check that the controller recovers.
- `tb/delirium_model.sv` models the front-end chip's H/R/D sequence.
- `tb/mems_model.sv` models the actuator and the ADC. The actuator's charge
  grows in one polarity and decays in the other, and the model sends a
  full-scale code around H so that glitches are visible.

## Simulating

Verilator 5 builds any testbench with the package first, then the testbench,
and searches `rtl/` and `tb/` for the rest:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/mems_pkg.sv tb/tb_mems_charge_ctrl.sv --top-module tb_mems_charge_ctrl
./obj_dir/Vtb_mems_charge_ctrl
```

All files declare `timeunit 1ns`. Every testbench has a watchdog.
Initialising the registers with random values (`+verilator+rand+reset+2`)
does not change any result.

What the end-to-end test checks:

- With charging on, the machine keeps the polarities it switches to and the
  trapped charge stays bounded.
- With charging off, the trial switches are reverted.
- A button press changes the hysteresis, and the display shows the new
  value.
- Manual mode works: push button 2 sets the polarity.
- The three actuator-clock generators and the three ADC clocks are measured.
- Throughout, the state changes only while D is high, and no ADC glitch
  passes the hold window.

What the workload test shows, with the actuator charging by about 16 codes
per sequence period:

| hysteresis | what the controller does | largest trapped charge |
|---|---|---|
| 0 | alternates the polarity every period (sequence II 48 % of the time) | 15 codes |
| 40 | makes 14 short trial switches that are reverted, for 5 that are kept | 34 codes |
| 10, with ±150 codes added | works the added charge off in 7 to 9 periods, staying in the discharging polarity about 90 % of the time | - |

## Where this design departs from the original, and its limits

- **Clocking.** The original uses a clock manager and divider bits as clocks.
  Here there is one clock and everything else is an enable. Cycle timing is
  the same to within one fast cycle.
- **Averagers.** These use running sums in place of wide adder trees. The
  outputs are the same.
- **Decision.** The decision does not wrap around (see above). The original
  subtracts in 11 bits.
- **Averaging counter direction.** It counts up in sequence I and down in
  sequence II. The state conditions need this direction. One description of
  the original says the opposite.
- **Switches 7..6 = `11`.** This setting selects the simple duty/period
  pattern. It does not stop the actuator clock.
- **Reset.**
  - Reset is asynchronous and active high.
  - Every setting returns to its default on reset. The original only has
    power-up values.
- **Display.** The digit code for 7 also lights segment f, as in the
  original decoder.
- **Settings.** These stop at their range limits and never wrap, except
  `sec_time`.
- **`duty_pattern`.** The output is registered, so it comes one cycle later
  than a combinational decode would.
- **Left out.**
  - The chip's R output and the ADC over-range input, which have no function
    in the controller.
  - A serial port and VGA connector that the original ties off.
  - A min/max detector whose logic is disabled in the original.
  - A derivative-based detector that is not connected in the original.
- **Not built at all.**
  - The analogue parts: the front-end chip, the ADC, the multiplexers and the
    actuator board.
  - The FPGA clock manager.
  - The comparator that drives `comp`.
- **Models.** The testbench models are simple behavioural stand-ins. They
  check the logic, not the analogue behaviour of a real actuator.
