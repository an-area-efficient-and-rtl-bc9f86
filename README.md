# Digital PI controller and DPWM for a buck converter, with one shared multiplier

A buck converter is regulated by a small digital loop. An ADC samples the
output voltage. A moving-average filter smooths the samples. A PI controller
turns each averaged sample into a new switch duty ratio. A counter-comparator
DPWM turns the duty ratio into the switch signal for the MOSFET drivers.

The controller is built for small area and low power. Every multiplication of
the control law goes through **one** multiplier. A six-state control unit feeds
it one pair of operands per clock. The PI update is also written in two
equivalent forms. The controller alternates between them from sample to
sample. One form needs three products and the other needs two, so the average
work per sample goes down.

The RTL covers the digital part only: filter, controller and DPWM. The ADC,
the gate drivers and the power stage are outside it. Their signals are the
ports of the top module.

## The control law and its two forms

The error is `e(k) = Vref - Vout(k)`. The incremental PI law is

    D(k) = D(k-1) + Kp*(e(k) - e(k-1)) + KI*e(k)
         = D(k-1) + Kp*(Vout(k-1) - Vout(k)) + KI*(Vref - Vout(k))        (A)

Form A needs three products per sample: `KI*e(k)`, `Kp*(Vout(k-1)-Vout(k))`,
and the final `D*Cycle` that turns the ratio into counter clocks.

Now suppose sample k used form A, so `KI*e(k)` is still in a register. Then
the next sample can use

    D(k+1) = D(k) + (Kp+KI)*(Vout(k) - Vout(k+1)) + KI*e(k)               (B)

Expand it and you get form A for sample k+1. But form B needs only two new
products: `(Kp+KI)*dV` and `D*Cycle`. The sum `Kp+KI` is formed once, when the
gains are loaded.

Form B depends on the `KI*e` that form A stored, so the two forms must
alternate: A, B, A, B, ... A one-bit register, `cycle_state`, selects the form
for the next sample and toggles after every update. The first sample after
set-up always uses form A.

Both forms build the sum at full width before clamping D. So they give
**bit-identical** results, and a plain reference model of form A checks either
form.

## Control unit and schedule

`control_fsm` is a Mealy machine with six states, one clock each:

| state          | multiplier computes             | register written at end of clock     |
|----------------|---------------------------------|--------------------------------------|
| `ST_INIT`      | –                               | set-up (on `cfg_valid`); D=0, Vout(k-1)=Vref, KI*e=0 |
| `ST_WAIT_MULTI`| –                               | Vout(k), on `adc_ready` (Mealy output `sample_load`) |
| `ST_MULTI_KI`  | `KI * (Vref - Vout(k))`         | stored KI*e                          |
| `ST_MULTI_KP`  | `Kp * (Vout(k-1) - Vout(k))`    | D = clamp(D + product + KI*e)        |
| `ST_MULTI_KIKP`| `(Kp+KI) * (Vout(k-1) - Vout(k))` | D = clamp(D + product + stored KI*e) |
| `ST_MULTI_DUTY`| `D * Cycle`                     | duty_count = product >> D_FRAC; Vout(k-1) = Vout(k) |

Form A: `WAIT -> MULTI_KI -> MULTI_KP -> MULTI_DUTY -> WAIT`.
Form B: `WAIT -> MULTI_KIKP -> MULTI_DUTY -> WAIT`.

Latency: `duty_valid` rises 4 clocks after the clock in which `adc_ready` is
accepted (form A), or 3 clocks after (form B). Add one clock for the averaging
filter. While the controller is busy (`busy = 1`) it ignores `adc_ready`. At
real converter rates, samples arrive thousands of clocks apart, so this does
not happen in practice.

The set-up (`Vref`, `Kp`, `KI`, `Cycle`) is taken once, in the clock where
`cfg_valid` is high in `ST_INIT`. It is held in `instruction_register`. To
load a new set-up, reset the controller.

## Number formats

The loop leaves the formats open. This design uses:

| quantity          | format                                                           |
|-------------------|------------------------------------------------------------------|
| `Vout`, `Vref`    | unsigned ADC codes, `ADC_W` = 12 bits                            |
| `Kp`, `KI`        | unsigned integers, `GAIN_W` = 16 bits, in units of one D LSB per ADC LSB |
| `D`               | unsigned, `D_FRAC` = 16 fraction bits; `2**16` means 100 %       |
| `Cycle` (N)       | PWM period in counter clocks, `CNT_W` = 10 bits (1..1023)        |
| duty count        | `floor(D * N / 2**D_FRAC)`, 0..N                                  |

A gain of 64 therefore moves D by 64/65536 ≈ 0.1 % for each ADC code of
error. To get fractional gains, widen `D_FRAC`. D is clamped to [0, 100 %]
after each update, which also keeps the integrator from winding up. The
multiplier is signed, 18 × 13 bits at the defaults. Its operand widths are
derived from the parameters inside `pi_datapath`.

## DPWM

`dpwm` counts 0 … N-1 and wraps. The DPWM clock is therefore N times the
switching frequency. `pwm` is high while the counter is below the active duty
count, so a period holds exactly `min(duty, N)` high clocks. A new duty count
is held as pending. It becomes active only when the counter wraps, so an update
never cuts a pulse short or adds an extra one. If several updates arrive
within one period, the last one wins. `pwm` and `period_start` are registered.
In this design the DPWM shares the controller's clock.

## Averaging filter

`averaging_filter` is a boxcar average over the last `2**AVG_LOG2` = 4
samples. It keeps a running sum and a shift register, and truncates the
result. After reset it stays silent until the window has filled once. From
then on it gives one averaged sample per ADC sample, one clock later. This is
the simplest filter that fits the job. Its length and form are this design's
choice.

## Files

| file                         | contents                                                  |
|------------------------------|-----------------------------------------------------------|
| `rtl/pi_pkg.sv`              | state enumeration shared by FSM and datapath               |
| `rtl/shared_multiplier.sv`   | the one signed multiplier                                  |
| `rtl/instruction_register.sv`| set-up register (Vref, Kp, KI, Cycle, Kp+KI)               |
| `rtl/control_fsm.sv`         | six-state control unit with the `cycle_state` register     |
| `rtl/pi_datapath.sv`         | operand muxes, registers, adder and clamp, with the multiplier |
| `rtl/digital_controller.sv`  | control unit + datapath                                    |
| `rtl/averaging_filter.sv`    | moving-average filter                                      |
| `rtl/dpwm.sv`                | counter-comparator DPWM                                    |
| `rtl/dpwm_controller_top.sv` | filter → controller → DPWM                                 |
| `tb/<module>_tb.sv`          | one self-checking testbench per module                     |

Top-level ports: `clk`, `rst_n` (asynchronous, active low), set-up
`cfg_valid/cfg_vref/cfg_kp/cfg_ki/cfg_cycle`, ADC input `adc_valid/adc_data`,
and outputs `pwm`, `period_start`, `duty_ratio`, `duty_count`, `duty_valid`,
`busy`, `cycle_state`.

## Simulating

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
ends with `$finish`. To run the end-to-end test with plain Verilator:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/pi_pkg.sv tb/dpwm_controller_top_tb.sv --top-module dpwm_controller_top_tb
    ./obj_dir/Vdpwm_controller_top_tb

Replace the testbench name to run the test of a single module. The testbenches
initialise or reset everything they read. They also pass with
`+verilator+rand+reset+2`.

What the tests cover:

- **Models.** Each testbench compares the block with its own integer model:
  a boxcar mean, exact products, the PI law with clamping, or a PWM counter
  model.
- **Timing.** They check cycle timing: the 4/3-clock controller latency, the
  one-clock filter delay, and that a new duty takes effect at the period
  boundary.
- **End-to-end.** `dpwm_controller_top_tb` runs the whole chain at the default
  parameters. The input is a sine of ±500 codes around 1000, with N = 250. It
  runs two set-ups:
  - large gains and one sample per PWM period, which drives D into both
    clamps;
  - small gains with samples faster than the PWM period, so some duty counts
    are superseded before they are used.

  It counts both update forms, both clamps, the filter fill, pulse-width
  changes and superseded updates. Any of these that never happens counts as a
  failure. It also checks the length and the high time of every PWM period.

## Where this design makes its own choices

The loop structure is fixed by the design: filter, incremental PI law,
alternation of the three-product and two-product forms under a one-bit state
register, one shared multiplier, and the six control states. So is the DPWM:
a counter 0…N-1 with output high while the counter is below the duty count.

The following are choices made here, not requirements of the method:

- all bit widths and the fixed-point meaning of the gains and of D;
- the clamp of D to [0, 100 %];
- one clock per control state and a purely combinational multiplier;
- the start-up values: D = 0 and `Vout(k-1) = Vref`;
- a new set-up only through reset, and `adc_ready` ignored while busy;
- a 4-sample boxcar filter;
- duty updates applied at the next period boundary, and a DPWM on the
  controller clock.

The conventional controller with a separate multiplier for every product was
used only as a point of comparison. It is not included.

The area and power savings claimed for the shared-multiplier scheme (about
half the area, about two-thirds less power) were measured on a particular
synthesis flow. This RTL does not reproduce them.
