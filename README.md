# Single-button garage door opener (FPGA controller)

A garage door is driven by a small bipolar stepper motor. It is controlled by
one button, which can be a remote RF key fob or a push button on the board.
Each press moves the door to the next state of a fixed cycle:

| state        | on a press   | otherwise                          |
|--------------|--------------|------------------------------------|
| `closed`     | `opening`    | stays                              |
| `opening`    | `upPaused`   | `opened` when the top is reached   |
| `upPaused`   | `closing`    | stays                              |
| `opened`     | `closing`    | stays                              |
| `closing`    | `downPaused` | `closed` when the bottom is reached|
| `downPaused` | `opening`    | stays                              |

So a press while the door moves stops it, and the next press sends it back
the way it came. The FPGA logic here turns a button level into presses, runs
that state machine, and makes the four-wire coil sequence that turns the motor
one 7.5° step per clock.

## Data flow and clocks

```
CLOCK_50 (50 MHz) -> pll (/25000) -> clk2kHz -> clk_divider (/42) -> clk48Hz (47.6 Hz)
                                                                        |
A (remote) --+                                                          |
KEY[1] (n) --+-> button_sync --PB_sync--> garage_door_fsm --motor_up/down--> stepper --> out[3:0]
KEY[0] (n) = reset
```

All the door logic runs on the slow step clock `clk48Hz`. One step-clock
cycle is one motor step. At 47.6 Hz a 48-step revolution takes about one
second (roughly 60 RPM), and the full door travel of 400 steps takes 8.4 s.
The PLL's divider range is limited, so a counter makes the last
division, from 2 kHz down to 47.6 Hz. The ideal ratio, 2000/48 = 41.66, is
rounded to 42 so the output can have an exact 50 % duty cycle (21 cycles
high, 21 low).

The PLL is an analog macro of the FPGA. `rtl/pll.sv` is a behavioural
stand-in that counts input edges. It is right for frequency and duty cycle
only. To build for hardware, replace it with the vendor PLL, set to
multiply by 1 and divide by 25000.

## The door state machine (`garage_door_fsm`)

It has seven states: `init` (one cycle after reset), `closed`, `opening`,
`upPaused`, `opened`, `closing` and `downPaused`. At power-up the door is
assumed to be closed: reset leads through `init` to `closed` with the
position at 0.

The door position is an up/down counter of motor steps, where 0 is closed
and `MAX_STEPS` (400) is open. Getting this counter exactly right is the
subtle part of the design:

* In `opening`, `motor_up` is high only while `position < MAX_STEPS`. Every
  cycle with `motor_up` high also adds one to the counter. `closing` works
  the same way downwards.
* So the counter always equals the number of net steps the motor was told
  to take. A full travel is exactly `MAX_STEPS` steps. A door that is paused
  and reversed comes back exactly to its end point.
* A press has priority over the end-of-travel test. The step ordered in the
  cycle of a pause press is still taken and counted.
* Timing: the state machine enters `opening` on the edge after the press
  pulse. Steps follow on the next `MAX_STEPS` edges. `opened` is entered one
  cycle later. So, from the state change, the door needs `MAX_STEPS + 1`
  cycles to reach the top.

Both motor requests are low in `closed`, `opened` and both paused states.
The outputs `at_top`, `at_bottom` and `paused` are high in `opened`,
`closed` and the paused states. Assertions check that `motor_up` and
`motor_down` are never high together, and that the position stays in range.

## Coil sequence (`stepper`)

The motor is a 4-lead bipolar stepper, driven in full steps through half-H
drivers. There are four coil patterns. Bit i of `out` drives one lead:
bit 0 black, bit 1 orange, bit 2 brown, bit 3 yellow.

| phase | out    | leads energised |
|-------|--------|-----------------|
| 0     | `1001` | black, yellow   |
| 1     | `0011` | black, orange   |
| 2     | `0110` | orange, brown   |
| 3     | `1100` | brown, yellow   |

On the motor as mounted, phases 0→1→2→3→0 turn it clockwise, which opens
the door. The reverse order closes it. The stepper keeps a 2-bit phase
index. It moves the index one place on each `motor_up` or `motor_down` and
registers the new phase's pattern onto `out`, so `out` changes on the same
edge as the door position. When no step is requested, all coils are switched
off (`out = 0`) and the index is kept, so the next move carries on from the
neighbouring phase. Reset sets the index so that the first opening step
drives phase 0.

## Button handling (`button_sync`)

The local key is active low, so it is inverted. The remote input `A` is
active high: it is the decoder's data output, and it stays high while the
remote's button is held. The top level ORs the two into one active-low
request. `button_sync` passes the request through two flip-flops on the step
clock. A third flip-flop detects the rising edge. The result is one
step-clock pulse per press, however long the button is held. Without this, a
held button would walk the state machine through several states.
A press must last at least one step-clock period (21 ms). It reaches the
state machine two step-clock edges after it starts. The first motor step
follows two edges after that.

## Reset

`KEY[0]` is an active-low reset. `clk_divider` samples it synchronously on
the 2 kHz clock and holds `clk48Hz` low while it is asserted. Because the
step clock stops, the other three blocks take the same signal as an
asynchronous reset. Lint tools warn about this mixed use of one net; it is intended.
Reset in the middle of a travel stops the motor at once. The door is then
taken to be closed, wherever it really is: there are no end-stop sensors.

## Where this RTL departs from the original design

* Step-clock divider: 42 (47.6 Hz). The original's divider counted 25
  cycles per half period (40 Hz), even though its stated goal was 48 Hz.
* The remote input `A` is ORed with the local key. The original top level
  declared `A` but used only the key.
* End of travel is gated by the position counter (see above). In the
  original, the motor request stayed high for one extra cycle at the end and
  in the cycle of a pause press. Those steps were not counted.
* The stepper switches the coils off when idle. The original held the last
  pattern. The original prose asks for output 0; its code held the pattern.
* The stepper and `button_sync` have a reset. The `paused` flag is driven.
  The position counter is 9 bits wide, not 32.
* In the original state diagram, the `count==0` arc is drawn from
  `downPaused` to `closed`. This RTL leaves `closing` on `position == 0`,
  which matches the written description.

The RF link is not part of this RTL: the HT12E encoder and HT12D decoder
chips, the 4800 bit/s RF transmitter and receiver modules, the optocouplers, the
L293D driver and the motor itself. The design sees the receiver only as the
input `A`, and drives the motor driver through `out`.

## Parameters

| module            | parameter     | default | meaning                                  |
|-------------------|---------------|---------|------------------------------------------|
| `garage_door_top` | `PLL_DIVIDE`  | 25000   | board clocks per `clk2kHz` period        |
| `garage_door_top` | `STEP_DIVIDE` | 42      | `clk2kHz` periods per step-clock period  |
| `garage_door_top` | `MAX_STEPS`   | 400     | motor steps for a full door travel       |
| `clk_divider`     | `DIVIDE`      | 42      | even; output period in input cycles      |
| `pll`             | `DIVIDE_BY`   | 25000   | even; only `MULTIPLY_BY = 1` is modelled |

Shared types are in `rtl/garage_pkg.sv`: the state enum `door_state_t` and
the coil table `STEP_TABLE`.

## Simulating

Every testbench checks its results itself. At the end it prints
`TB_RESULT checks=N failures=M`, and a watchdog ends runs that hang. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/garage_pkg.sv tb/tb_garage_door_top.sv --top-module tb_garage_door_top
./obj_dir/Vtb_garage_door_top
```

| testbench             | what it covers |
|-----------------------|----------------|
| `tb_button_sync`      | random button levels against a reference history; one pulse per long press; the two-edge latency |
| `tb_clk_divider`      | output low in reset; exactly 21 input cycles per half period |
| `tb_pll`              | 12500 input cycles and 250 µs per half period (2 kHz) |
| `tb_stepper`          | random up, down and idle runs against the written-out coil table |
| `tb_garage_door_fsm`  | reference model compared every cycle under random presses; full-travel timing; every arc of the state diagram taken |
| `tb_garage_door_top`  | end to end at reduced sizes (PLL/4, divider/4, 12 steps): remote and local presses, held button, full open and close, pause and reversal both ways, press-to-first-step latency of 4 step clocks, reset during travel |
| `tb_garage_door_full` | default sizes: a remote press and a full 400-step opening in 8.4 s of simulated time (about 4 minutes of simulation) |

`tb_garage_door_full` simulates only the opening, because each direction
costs about four minutes at full size. The closing direction is covered at
reduced size by `tb_garage_door_top`.
