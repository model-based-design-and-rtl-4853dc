# Integer PID temperature controller with an emulated oven

This is a digital temperature control loop for a small FPGA board. A PID
controller sets the power of an electric heater to hold an oven at a chosen
temperature. The oven itself is also built in logic, as a thermal model, so
the whole closed loop runs on the board with no real plant attached. The
user sets the target with push buttons and watches the set point,
environment temperature, oven temperature or heater power on a four-digit
seven-segment display.

All arithmetic uses integers. Temperatures are whole degrees Celsius and
power is whole watts. Every division truncates toward zero, except the
integral scaling, which is an arithmetic shift. The loop takes one sample
per second. The structure follows a published model-based design, in which
the loop was first written as an integer Simulink model and then carried
over to HDL. The constants that design prints are used unchanged. Where it
gives no value, this implementation chooses one; those choices are listed
under "Departures and own choices".

## The loop

```
          +-------------------+  power  +--------------------------+
 Ts ----->|  pid_control      |-------->|  ambience_emulation      |
          |  e = Ts - Tout    |         |   Te register (10..30)   |
          |  P + I + D, clip  |         |   oven_behavior          |
          +-------------------+         +--------------------------+
                   ^                                 |
                   +------------- Tout --------------+
```

`temperature_control` closes this loop. A sample takes three clocks:

| clock | event |
|---|---|
| 0 | `ce` pulse. The PID reads `Ts` and the present `Tout(k)`. |
| 1 | `power(k)` is registered and the PID's `valid` pulses. The oven takes one 1 s step using `power(k)`. |
| 2 | `Tout(k+1)` is on `tout`, and `sample_done` pulses. |

So the power worked out from `Tout(k)` heats the oven from sample k to
sample k+1. The oven's stored energy is the only state between the two
halves of the loop, so there is no combinational loop. `ce` must not come
again before `sample_done`. An assertion checks this rule.

### PID controller (`pid_control`)

```
e(k)   = Ts - Tout(k)                          11-bit signed
p_f    = KP * e(k)
int_f  = (KIS * S(k)) >>> 10                   S(k) = e(0) + ... + e(k-1)
der_f  = KD * (e(k) - e(k-1))                  0 on the first sample after reset
power  = clip(p_f + int_f + der_f, 0, 5000)
```

- **Integral scaling.** The integral gain is much smaller than one. It is
  therefore stored as `KIS = 1024 * I`, and the product is shifted right
  arithmetically by 10 bits. This keeps the fraction without any
  fixed-point format.
- **Integrator.** `S` is a forward-Euler sum: a sample's own error only
  counts from the next sample on.
- **Integrator width.** `S` is 24 bits wide and saturates instead of
  wrapping. Over a full heating run it reaches about 58,600.
- **No anti-windup.** The only limit is the clip on the output.
- **Timing.** All results are registered on `ce`. `power`, `valid` and the
  three components `p_f`, `int_f`, `der_f` (brought out for observation)
  appear one clock later.

Gains: `KP = 100`, `KIS = 20` (I ≈ 0.0195 W/(°C·s)), `KD = 1000`.

### Oven model (`oven_behavior`)

The oven is a two-node thermal circuit:

- The heater element has heat capacity CH = 500 J/°C.
- The heater is joined to the oven chamber through Rh0 = 0.143 °C/W.
- The chamber has heat capacity C0 = 1000 J/°C.
- The chamber loses heat through its insulation, R0 = 0.1 °C/W, to the
  environment at Te.
- The heater power is a current source into the heater node.

Each heat capacity is an energy accumulator in joules. Its temperature is
the energy divided by the capacity, truncated:

```
Th   = Eh / 500            Tout = E0 / 1000
q_h0 = 7  * (Th - Tout)    heater -> chamber   (1/0.143 ≈ 7 W/°C)
q_0e = 10 * (Tout - Te)    chamber -> outside  (1/0.1  = 10 W/°C)
Eh  += power - q_h0        E0  += q_h0 - q_0e  (per 1 s step)
```

Both heat flows use the temperatures from before the step. The
temperatures are combinational functions of the two 24-bit energy
registers, so each needs a division by a constant. Reset puts both nodes
at Te.

`ambience_emulation` wraps the oven model. It adds the environment
temperature Te, which starts at 25 °C and is moved by buttons within
10..30 °C.

### Resulting behaviour

With Ts = 140 °C and Te = 25 °C, starting cold:

- The heater runs at the 5000 W limit for the first 46 s.
- The oven passes 126 °C at 84 s and first reaches 140 °C at 108 s.
- It peaks at 141 °C, then dips to 129 °C at 206 s.
- It then creeps back as the integral term builds up.

In steady state the loop holds 140 °C with 1145 W. This is the integral
term alone, and it matches the insulation loss (140 − 25) / 0.1 = 1150 W to
within the controller's resolution. Because Tout is truncated to whole
degrees, the loop keeps switching between 139 and 140 °C in a small limit
cycle. Both effects also appear in the original design.

The original design reports a slower start: full power for about 250 s, a
rise time of 270–400 s, an overshoot to 146–147 °C and a dip to 137–138 °C.
The oven constants used here (the printed ones) give a plant whose time
constants are about 70–100 s. It therefore heats faster than those figures.
The PID gains were never published, so the transient cannot be matched
exactly. The steady state agrees.

## Number widths (`cs_pkg`)

| signal | range | type |
|---|---|---|
| set point Ts | 100..250 °C | 9-bit unsigned |
| environment Te | 10..30 °C | 6-bit unsigned |
| oven Tout | 0..1023 °C | 10-bit unsigned |
| heater Th | 0..2047 °C | 11-bit unsigned |
| heater power | 0..5000 W | 13-bit unsigned |
| error | −1023..511 | 11-bit signed |
| energies Eh, E0 | J | 24-bit signed |
| PID components | W | 24-bit signed |

Worst-case steady state is Ts = 250 °C with Te = 10 °C. It needs 2400 W, well
inside the 5000 W limit, and an integral sum of about 123,000. Both
fit. The range test below checks this corner.

## Board interface (`control_system_top`)

The board has a 50 MHz clock, push buttons, slide switches and a common-anode
four-digit display with active-low segments and anodes.

| pin | use |
|---|---|
| `btn[0]` | Reset of the control system: set point, Te, oven and controller. |
| `btn[1]` / `btn[2]` | Up / down by 1 °C. They change Te while the switches select Te, and the set point otherwise. |
| `sw[1:0]` | What the display shows: `00` Ts, `01` Te, `10` oven temperature, `11` heater power in W. |
| `seg_n[6:0]` | Segments a..g, active low. |
| `an_n[3:0]` | Digit anodes, active low. `an_n[0]` is the rightmost digit. |
| `tout`, `power`, `th`, `p_f`, `int_f`, `der_f`, `sample_done` | Observation outputs for a logic analyser or a testbench. |

Supporting blocks:

- **`clock_management`** keeps everything in the single clock domain. It
  makes one-clock enable pulses: `sample_ce` every 50,000,000 clocks (1 s),
  and `deb_ce` and `refresh_ce` every 50,000 clocks (1 kHz). It also makes
  a 16-clock power-on reset from a register that has an initial value.
- **`debouncer`** (one per button) synchronises the button and samples it
  at 1 kHz. The debounced level changes only after 4 samples in a row
  disagree with it. A press gives one clock-wide pulse.
- **`temperature_selection`** holds Ts. It resets to 140 °C and saturates
  at 100 and 250 °C.
- **`seven_segment_display`** converts the value (0..9999) to four decimal
  digits and blanks leading zeros. It lights one digit per refresh pulse.

## Departures and own choices

- **Gains.** The original tuned the PID with a named method but printed no
  gains. The gains here are chosen so that the loop settles at the
  published steady power. See "Resulting behaviour" for how the transient
  differs.
- **Number encoding.** The original reduced its signals to sign-magnitude
  values of the needed width. This design uses two's complement of reduced
  width. The arithmetic results are the same.
- **Conductances.** 1/Rh0 = 6.99 W/°C is rounded to 7, so the heat flows are
  whole watts.
- **Clocking.** The original's clock management generates clocks for the
  PID block. Here a single clock with enable pulses is used instead.
- **Own choices.** These are not taken from the original:
  - the 50 MHz clock
  - the 1 kHz button and display rates
  - the debounce method
  - the button and switch mapping and the four display modes
  - the 1 °C step per press
  - the reset values (Ts = 140 °C, Te = 25 °C, the operating point the
    controller is tuned for)
  - the derivative being zero on the first sample
  - the three-clock sample sequence
- **Synthesis results.** The original reports 214 flip-flops, 1050 LUTs and
  5 18×18 multipliers on a Spartan-3 XC3S1000. A generic synthesis of this
  design gives 280 flip-flop bits. It has not been mapped to that device.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cs_pkg.sv tb/control_system_top_tb.sv --top-module control_system_top_tb
./obj_dir/Vcontrol_system_top_tb
```

| testbench | what it checks |
|---|---|
| `pid_control_tb` | Every output against an integer reference over 500 samples. Both output limits are hit. `valid` comes one clock after `ce`. |
| `oven_behavior_tb` | Every step against a reference energy balance. Reset at Te. At 1150 W and Te = 25 °C it settles at 140 °C (oven) and 304 °C (heater). |
| `ambience_emulation_tb` | Te steps and limits. The oven drifts to Te when unheated. One full-power step gives the expected heater temperature. |
| `temperature_control_tb` | The closed loop for 36,000 samples, every sample against a reference model. Checks the three-clock sequence, the steady state at 140 °C and about 1150 W, a set-point step and a Te change. |
| `control_loop_range_tb` | The loop at the four corners of Ts ∈ {100, 250} and Te ∈ {10, 30}. It must settle at the set point, with mean power equal to the insulation loss. |
| `clock_management_tb` | Power-on reset length and the spacing of every enable. |
| `debouncer_tb` | Glitches are rejected. Clean and bouncing presses give one pulse each. |
| `temperature_selection_tb` | Steps, limits, and a random sequence against a reference counter. |
| `seven_segment_display_tb` | Digits read back through the segment shapes, one anode at a time, with leading-zero blanking. |
| `control_system_top_tb` | The whole design with shortened dividers, over 35,700 samples checked against a reference. Bouncing button presses, a rejected glitch, all display modes and the reset button. Each of these is counted. |
| `control_system_top_full_tb` | The whole design at full timing, about 80 s of simulation: three one-second samples from power-up, checked against hand-worked values, and the set point read from the display. |

## Changing it

- Gains, integral shift and output limit are parameters of `pid_control`,
  passed through `temperature_control`.
- Oven constants are parameters of `oven_behavior`.
- Ranges and reset values are parameters of `temperature_selection` and
  `ambience_emulation`, with defaults in `cs_pkg`.
- The sample time and display and button rates are the divider parameters
  of `control_system_top`. For faster-than-real-time emulation on the board,
  lower `SAMPLE_DIV`. The loop's behaviour in samples does not change.
- If you retune the gains, check the integrator with `control_loop_range_tb`.
  The worst-case integral sum is (10 · (Ts − Te)) · 1024 / KIS.
