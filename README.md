# Modified leading-edge DPWM with early turn-OFF

A digital pulse width modulator (DPWM) turns the duty-cycle command of a
power converter's digital compensator into ON and OFF times for the power
switches. A conventional counter-based modulator takes a new command only at
one fixed instant in each switching period. Suppose a load step-down calls for
a shorter pulse after the pulse has already started. A leading-edge modulator
then keeps the output ON until the end of the period, so the reduction takes
effect one period late. That modulation delay adds to the loop delay and
enlarges the output-voltage overshoot.

The modified DPWM (MDPWM) here removes that delay. It adds a second counter
that measures how long the current pulse has been ON. A second comparator
turns the output OFF as soon as that ON time reaches the *current* command. A
command lowered in the middle of a pulse therefore takes effect almost at
once, and in steady state the output is identical to a conventional
leading-edge DPWM. The saving only appears if the compensator refreshes the
command several times per period, so the design also contains a
multisampling interface that asks for 16 updates per period.

With the default 10-bit counters, a switching period is 1024 clock cycles.
Take a command stepped from 0.8 to 0.2 of the period (819 to 205) in the
middle of a pulse. The end-to-end test measures the turn-OFF 84 cycles after
the step, where a conventional modulator would take 700.

## Structure

```
             duty_cmd, duty_valid          sample_req, sample_idx
                    |                              ^
             +------v------------------------------+------+
             | multisample_ctrl: duty register, 16 slots   |
             +------+---------------------------^----------+
                    | duty                      | count
   +----------------v---------------------------+-------------------------+
   | mdpwm                                                                |
   |  down_counter --count_next--> magnitude_comparator (next < duty)     |
   |       |                              | below_duty                    |
   |       |                       set_pulse_gen --set_pulse--+---> S     |
   |       v                                                  |           |
   |  zero_state_detector ------zero-------------------> OR -----> R  Q --+--> pwm
   |                                                    ^     |           |
   |  aux_up_counter (clear = set_pulse, enable = pwm)  |     | clear     |
   |       | count_next                                 |     |           |
   |       +--> magnitude_comparator (aux_next >= duty)-+  <--+           |
   |                                            sr_output_latch           |
   +----------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `mdpwm_top` | Top: `multisample_ctrl` plus `mdpwm`. |
| `mdpwm` | Modulator core (leading-edge MDPWM). |
| `down_counter` | Main W-bit down counter. Its wrap sets the period of 2**W cycles. |
| `zero_state_detector` | Count equals 0: the last cycle of the period. |
| `magnitude_comparator` | Unsigned `<` / `>=`. The core uses it twice. |
| `set_pulse_gen` | Gives one set pulse per period when the main count first falls below the command. |
| `aux_up_counter` | Counts the ON time. The set pulse clears it. It saturates. |
| `sr_output_latch` | Clocked SR flip-flop whose reset is the OR of the zero detector and the auxiliary comparator. |
| `multisample_ctrl` | Sample requests, SAMPLES per period, and the duty-command register. |
| `mdpwm_pkg` | Default sizes and the `mdpwm_events_t` strobe record. |

## How a pulse is formed, cycle by cycle

The main counter counts 2**W-1 down to 0. Both comparators look at the value
a counter will hold in the *next* cycle (`count_next`). The output `pwm` is a
flip-flop, so it changes in the same cycle in which the count crosses the
threshold. As a result:

* **Steady state.** `pwm` is high exactly while `count < duty`, i.e. for the
  last `duty` cycles of each period, the same as a conventional leading-edge
  DPWM. `duty = 0` gives no pulse. `duty = 2**W-1` gives a pulse of 2**W-1
  cycles. A full 100 % duty cycle cannot be expressed.
* **Turn-ON.** The first cycle in a period in which `count_next < duty` raises
  `set_pulse`. That sets the output and clears the auxiliary counter. Only
  one set pulse is given per period.
* **Normal turn-OFF.** The zero-state detector resets the output after the
  cycle with count 0.
* **Early turn-OFF.** While the output is ON, the auxiliary counter counts
  the ON cycles delivered. The output is reset once `aux_count_next >= duty`,
  i.e. as soon as the pulse has lasted as many cycles as the command now
  asks for. Lower the command in a cycle in which k ON cycles have been
  delivered, counting that cycle, and the pulse ends after `max(k, duty_new)`
  cycles: at once if it is already too long, otherwise exactly on time.
  During an unchanged pulse this condition coincides with the zero-state
  reset, so it is invisible in steady state.
* **Command lowered before the pulse began.** The pulse starts later, at the
  new crossing. This is ordinary leading-edge behaviour.
* **Command raised.** If the count is already below the new value and no
  pulse has started in this period, the output turns ON in the next cycle.
  Leading-edge modulation has no turn-ON delay. A raise during a pulse
  extends it to the end of the period.
* **A pulse cut short is not restarted** in the same period, even if the
  command rises again. The next period starts normally.

Latency: a command accepted by `multisample_ctrl` (`duty_valid` high at a
clock edge) is in the register one cycle later. It can change `pwm` one cycle
after that.

`mdpwm` exposes the one-cycle strobes `events.set`, `events.zero_off` and
`events.early_off`. Each is valid in the cycle before `pwm` changes. The core
also exposes `count` and `aux_count` for monitoring.

## Multisampling interface

`multisample_ctrl` splits each period into SAMPLES equal slots of
2**W/SAMPLES cycles. It pulses `sample_req` in the first cycle of each slot,
with `sample_idx` = 0..SAMPLES-1, to start an ADC conversion and a
compensator update. The compensator returns a command on `duty_cmd`, which
is loaded whenever `duty_valid` is high, at any cycle and with any latency.
The modulator reads the register every cycle. SAMPLES must be a power of two
no larger than 2**W; an elaboration-time check enforces this.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 10 | Bits of the main and of the auxiliary counter. The period is 2**W clocks. |
| `SAMPLES` | 16 | Duty-command updates requested per switching period. |

The defaults match a 10-bit modulator switching at 342 kHz with 16 compensator
updates per period. That needs a 342 kHz x 1024 = 350 MHz counter clock. The
RTL itself does not depend on the clock rate.

## Where this design makes its own choices

The scheme fixes the block structure: a main down counter, a zero-state
detector, two comparators, a set pulse that clears an auxiliary up counter,
an OR gate and an SR flip-flop. It also fixes the 10-bit counters and the
16 updates per period. The following are choices made here:

* **Auxiliary counter enable.** The scheme states that the auxiliary counter
  counts up while the command is above the main count. Here it counts while
  the output is ON. That is the same during an unchanged pulse. It also
  keeps measuring after a large reduction drops the command below the main
  count, which is exactly when the early turn-OFF is needed.
* **Early turn-OFF comparison.** The scheme turns the output OFF when the
  auxiliary count is larger than the command. Here the comparison is
  `>=` on the next count, so a cut pulse lasts exactly the new command.
* **Look-ahead comparisons and registered output.** These are chosen for a
  glitch-free output with exact pulse widths.
* **Single set pulse per period.** The form of the set pulse and the
  no-restart rule are this design's.
* **Saturation, reset and handshake.** The auxiliary counter saturates. Reset
  clears the command to 0, turns the output OFF and restarts the period at
  2**W-1. The `sample_req` / `duty_valid` handshake and the slot alignment
  are chosen here.
* **Assertion.** `sr_output_latch` asserts that set and reset never coincide.
  Verilator reports `SYNCASYNCNET` for `rst_n`, because the asynchronous
  reset also appears in the assertion's `disable iff`. That is intended.

## Not included

* **Trailing-edge MDPWM.** The mirror-image version, which cuts the turn-ON
  delay, is only mentioned as an option; no structure for it is given.
* **Delay-line MDPWM.** This variant uses tapped delay lines, multiplexers,
  an OR gate and an SR flip-flop. Its connections are not specified well
  enough to build it, and its delay cells are analog timing elements.
* **Rest of the converter loop.** The ADC, the digital compensator (no
  control law is specified), the gate drivers and the buck power stage are
  outside this RTL. Their signals are the top's ports.
* **Conventional DPWMs.** The leading-edge, trailing-edge and dual-edge
  baselines are not included. The testbenches compute the conventional
  leading-edge turn-OFF time for comparison.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_down_counter` | Reset value, `count_next`, wrap, and a period of 2**W cycles. |
| `tb_zero_state_detector` | All 1024 input values. |
| `tb_magnitude_comparator` | Corner and random operands. |
| `tb_set_pulse_gen` | One pulse per period, re-arming, random traffic. |
| `tb_aux_up_counter` | Clear priority, enable, saturation (W = 6). |
| `tb_sr_output_latch` | Set, both resets, hold, asynchronous reset. |
| `tb_multisample_ctrl` | Request positions and count per period, slot index, register load. |
| `tb_mdpwm` | Steady pulses for 8 commands, step-downs at 5 points of a pulse with exact widths, late start, immediate turn-ON, and 20 random periods against a behavioural model. |
| `tb_mdpwm_top` | End to end at default parameters: a compensator model answers every request. Covers a 0.8 to 0.2 step inside a pulse, a 0.2 to 0.8 step while OFF, then a random walk, with a cycle-by-cycle model check. Every mechanism must occur. |
| `tb_open_loop_steps` | Open-loop workload: the command toggles 0.8 / 0.2 at 60 instants spread over the period, at default parameters. Checks each turn-OFF and turn-ON time and compares the summed turn-OFF delay with a conventional modulator (609 against 9746 cycles). |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/mdpwm_pkg.sv tb/tb_mdpwm_top.sv \
          --top-module tb_mdpwm_top -Mdir obj_top
./obj_top/Vtb_mdpwm_top
```

Every testbench finishes in well under a second.
