# Multisensing control logic

A building or plant often has to act on several on/off sensors at once: turn on
a pump when the water level drops, sound a buzzer when something comes within
range of an ultrasonic sensor, and confirm a fire only when heat, smoke and
flame light are all present. This design does that decision-making in
dedicated logic instead of a processor. Six sensor signals enter and fourteen
action lines leave. Nothing is clocked, so an action follows its sensors
after a few gate delays. That is nanoseconds on an FPGA, while the sensors
themselves take 5 to 350 ms to respond. The speed of the whole control loop
is therefore set by the sensors and the output drivers, not by the logic.

The control strategy is fixed in the RTL. To change it, for example from
"each sensor acts on its own" to "three sensors must agree", you edit
`multisensing_control.sv` and program the FPGA again. The logic has no
run-time mode input.

## The two kinds of action

The six inputs are named after their pins: `a1 a2 c1 c2 e1 e2`. They form
three pairs.

**Individual actions: three 2-to-4 decoders.** Each pair drives one
decoder, and exactly one of the decoder's four lines is high:

| pair state (first, second) | line raised | meaning            |
|----------------------------|-------------|--------------------|
| 0, 0                       | 1           | neither sensor     |
| 0, 1                       | 2           | second sensor only |
| 1, 0                       | 3           | first sensor only  |
| 1, 1                       | 4           | both sensors       |

Decoder 1 maps (`a1`,`a2`) to `b[4:1]`. Decoder 2 maps (`c1`,`c2`) to
`d[4:1]`. Decoder 3 maps (`e1`,`e2`) to `f[4:1]`. A sensor that fires alone
therefore raises line 3 or line 2 of its group, and each of the six sensors
gets its own line. Line 4 of a group reports that both sensors of the pair
are active. Line 1 is high whenever the pair is idle. Do not wire line 1 to a
load unless that load should run while nothing is sensed.

**Combined actions: two 3-input AND gates.**

- `g1 = a1 & a2 & c1`. With the thermostat, smoke detector and light sensor
  on these three pins, `g1` confirms a fire. One or two of those sensors
  alone never raise it.
- `g2 = c2 & e1 & e2`. This is the same rule over the other three inputs.

The decoders and the gates all read the same inputs at the same time. With a
single configuration you get both the per-sensor lines and the agreement
lines.

## Modules

| file                       | what it is                                                           |
|----------------------------|----------------------------------------------------------------------|
| `rtl/multisensing_control.sv` | top: three decoders and two AND gates wired to the pins            |
| `rtl/decoder_2to4.sv`      | one-hot decoder, `y[i] = (sel == i)`. The `SEL_W` parameter defaults to 2 |
| `rtl/and_gate.sv`          | N-input AND gate. The `N` parameter defaults to 3                     |

Top-level ports (all 1-bit `logic` except the three 4-bit groups):

| port | dir | meaning |
|------|-----|---------|
| `a1`, `a2` | in | pair of decoder 1. Both also feed `g1` |
| `c1`, `c2` | in | pair of decoder 2. `c1` feeds `g1` and `c2` feeds `g2` |
| `e1`, `e2` | in | pair of decoder 3. Both also feed `g2` |
| `b[4:1]`, `d[4:1]`, `f[4:1]` | out | decoder lines. Index k is line k of the table above |
| `g1`, `g2` | out | combined actions |

The top module has no clock, no reset and no state.

## The system around the logic

On the original board the logic sits in a chain. Each sensor's DC output
goes through a resistive divider, which brings it to logic level. The
signals then pass through an octal transparent latch (74373) that protects
the inputs. The logic is next. Last, a seven-channel Darlington driver
(ULN2003) switches LEDs, buzzers, lamps and DC motors. The sensors are a
thermostat, a smoke detector, a float level switch, a light-dependent
resistor and two ultrasonic range modules.

None of these parts is digital design, and none is in `rtl/`. For board-level
simulation, `tb/` holds simple behavioural models of three of them:

- `sensor_model.sv`: delays an event by the sensor's response time.
- `sn74373_model.sv`: a transparent latch with output enable.
- `uln2003_model.sv`: delays each channel by the driver's switching time, 100 µs.

The board-level test assumes this pin assignment. The assignment is
a wiring choice, not something the logic depends on.

| pin | sensor | response time |
|-----|--------|---------------|
| `a1` | thermostat | 200 ms |
| `a2` | smoke detector | 100 ms |
| `c1` | light sensor (LDR) | 350 ms |
| `c2` | float level switch | 100 ms |
| `e1`, `e2` | ultrasonic sensors | 5 ms each |

With this assignment, `g1` is the fire confirmation.

### Where the time goes

The delay from a physical event to a load switching on is the sum of three
terms:

```
sensor response Ts  +  logic input-to-output delay Tio  +  driver time Tamp
```

The logic's share was measured at 6.4 to 6.5 ns on a Spartan-3A FPGA, against
milliseconds for Ts and 100 µs for Tamp. The RTL simulates with zero delay, so
in simulation the total is Ts + Tamp. The board-level test checks that this
total lies within 10 ns of the calculated Ts + Tio + Tamp. For example, the
thermostat gives 200.1 ms. A combined action waits for its slowest sensor:
the fire line comes on 350.1 ms after the event because the LDR is the
slowest. On hardware, a total of about 366 ms was measured.

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb/tb_decoder_2to4.sv` | all four codes against the written-out decoder equations, and that the output is one-hot |
| `tb/tb_and_gate.sv` | all eight input combinations |
| `tb/tb_multisensing_control.sv` | the top at its default configuration |
| `tb/tb_board_response.sv` | the board chain in simulated milliseconds. Runs in a fraction of a second |

`tb_multisensing_control` covers four cases:

- all 64 input combinations against per-output reference equations;
- each sensor alone, which must raise only its own line;
- the fire group, where all three sensors raise `g1` and any two do not;
- `g2`.

It also counts how often each mechanism occurred and fails if any never did.
The mechanisms are every decoder line being raised, each AND gate firing, and
a combined action being held off by a missing sensor.

`tb_board_response` triggers each sensor alone and checks the event-to-load
delay. It then runs the fire group with one sensor missing, which must not
confirm, and with all three, which must confirm after 350.1 ms.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb tb/tb_multisensing_control.sv \
          --top-module tb_multisensing_control
./obj_dir/Vtb_multisensing_control
```

Use the same command for the others, changing the file and the top module.

## How far to trust it, and where it departs from the original

- The logic itself is the original design:
  - three 2-to-4 decoders on the pairs (A1,A2), (C1,C2) and (E1,E2);
  - two 3-input AND gates `A1·A2·C1` and `C2·E1·E2`;
  - the same pin names.

  The equations of the second and third decoders are taken to repeat the
  first decoder's pattern on their own pair.
- The original has no clock, and neither does this RTL. If you need
  registered outputs, for example to filter sensor bounce, that is an
  addition of your own.
- The mapping from physical sensors to pins is an assumption. Only the fire
  group (`a1`, `a2`, `c1`) follows from the design's purpose. The same holds
  for the mapping from outputs to driver channels. The testbench uses lines
  3 and 2 of each group plus `g1`.
- The sensor, latch and driver models cover timing and logic level only.
  They model no voltages, currents or bounce. The two-state latch model
  drives 0 where the real part's outputs would float.

## Changing the control strategy

- For a new combined rule, add an `and_gate` instance with the inputs you
  want and bring out its output. Change `N` for more or fewer sensors.
- For wider decoders over more sensors, set `SEL_W`.
- When you change the logic, also change the reference equations in
  `tb_multisensing_control.sv`.
