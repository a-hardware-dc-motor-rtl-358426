# Brushed DC motor emulator in logic

A motor controller under development normally needs a real power driver, a
real motor and an encoder on its shaft to close its control loop. That setup
is slow to change, and a bug in the control law can easily destroy it. This
design replaces all three with a few registers in an FPGA. The controller
writes a digital torque value and reads back two-phase quadrature encoder
signals, exactly as it would from a real drive. In between, the
emulator integrates the motion of a frictionless inertia twice per clock.

The model is deliberately minimal. Two assumptions make it so:

* **The driver is a current source.** A brushed DC motor's torque is
  proportional to its current, so a current-controlled driver makes torque
  proportional to the commanded value. The coil inductance, the resistance
  and the back EMF then drop out of the mechanics.
* **There are no losses.** No friction, no electromagnetic losses and no
  external load are modelled, so acceleration is simply torque divided by
  inertia.

What remains is a chain of three registers and two adders. Because it runs at the
system clock (a few hundred MHz is reachable), the controller sees it as a
continuous-time plant. Delays and glitches in the controller's real-time
behaviour therefore show up in the emulated motion.

```
 torque ─►(×2^TORQUE_LSB)─► AR ──►(+)──► SR ──►(+)──► PR ──► encoder_output ─► enc {a,b}
                           accel  ▲  │   speed ▲  │  position
                                  └──┘         └──┘
```

## The integrator chain

All three registers are N bits wide (default 64) and update on every rising
edge:

| register | module | update | meaning of one LSB |
|---|---|---|---|
| AR, acceleration | `accel_register` | `AR <= torque · 2^TORQUE_LSB` | 2π·f_clk² / 2^N rad/s² |
| SR, speed | `speed_register` | `SR <= SR + AR` | 2π·f_clk / 2^N rad/s |
| PR, position | `position_register` | `PR <= PR + SR` | 2π / 2^N rad |

This is forward-Euler integration with a step of one clock period. The
step size folds into the units, so no multiplier is needed.

Each adder reads the *registered* value of the stage before it. A torque
applied before clock edge 0 therefore reaches AR at edge 1, SR at edge 2 and
PR at edge 3. For a constant torque T applied from reset, the state after k
edges is:

```
AR = T,   SR = (k-1)·T,   PR = T·(k-1)(k-2)/2      (modulo 2^N)
```

Number formats and wrap-around:

* **AR and SR** are two's complement.
* **PR** is an unsigned angle. Its full count 2^N is exactly one revolution,
  so the adder wrapping around is simply the shaft passing angle zero. A
  negative speed turns the shaft backwards through the same wrap.
* **SR** also wraps in two's complement if it is driven past
  ±2^(N-1). Nothing saturates. In physical terms ±2^(N-1) LSB is ±f_clk/2
  revolutions per second, far beyond any real motor.

`rst` is synchronous and active high. It clears all three registers, so
the motor starts at rest at angle zero. There is no port for preloading an
initial speed or angle.

### Choosing N

Most of the design effort is picking N for a given clock and inertia.
The acceleration step is 2π·f_clk²/2^N rad/s². Multiplied by the inertia I, it
gives the smallest torque the model can represent:

| f_clk | N = 16 | N = 32 | N = 64 |
|---|---|---|---|
| 1 MHz | 9.6e7 rad/s² | 1.5e3 rad/s² | 3.4e-7 rad/s² |
| 100 MHz | 9.6e11 rad/s² | 1.5e7 rad/s² | 3.4e-3 rad/s² |

Doubling the clock costs two bits of N to keep the same torque resolution.
For realistic clocks, N = 64 is the practical size. The synthesized logic is
two N-bit adders, 3N flip-flops and one XOR gate, so it grows linearly with N.

## Connecting the torque input

The input wiring of `accel_register` stands in for the DAC and the current
driver. The controller's
`TORQUE_BITS`-wide two's-complement torque word is placed into the N-bit acceleration word
with its LSB at bit `TORQUE_LSB`. The bits below it are zero and the bits
above it repeat the sign.

That placement is the motor constant. Each step up in `TORQUE_LSB` doubles
the torque that one input LSB represents (a smaller inertia or a stronger
motor). For large inertias or fast clocks, `TORQUE_BITS` is much smaller than N.

A typical connection is an 8-bit torque (-128…+127) on a 32-bit model,
placed at bit 5 (`N=32, TORQUE_BITS=8, TORQUE_LSB=5`):

| AR bits | source |
|---|---|
| 31..13 | torque bit 7 (sign extension, 19 bits) |
| 12..5 | torque bits 7..0 |
| 4..0 | 0 |

The defaults, for `accel_register` and `motor_emulator` alike, are a 64-bit
torque input at bit 0,
which drives the acceleration register directly. This is the setting used
to validate the model with raw acceleration values such as 2^40.

## Encoder output (`encoder_output`)

A quadrature encoder delivers two square waves 90° apart. Which one leads
tells the direction, and each edge of either wave is one count.

The emulator generates them from two adjacent bits of the position. The lower
bit is `N-ENC_BITS` and the upper bit is `N-ENC_BITS+1`. Those two bits count
0,1,2,3 repeatedly as the shaft turns, giving 2^ENC_BITS counts per
revolution. An XOR converts the count to Gray code, so exactly one output
changes per count:

```
b = PR[N-ENC_BITS+1]
a = PR[N-ENC_BITS+1] ^ PR[N-ENC_BITS]
```

With the default `ENC_BITS = 8` (bits 57 and 56 of a 64-bit PR), this is a
256-count encoder. The output is the packed struct `motor_pkg::quad_t`,
`{a, b}`. Turning forward it steps 00 → 10 → 11 → 01 → 00; turning backward
it runs through the same states in reverse.

The outputs are combinational from PR, so they change in the same clock as
the position. If the shaft moves more than one count per clock (|SR| ≥
2^(N-ENC_BITS)), states are skipped. That is what a real encoder would look
like to a sampling circuit that is too slow. At 1 MHz and 256 counts the
limit is about 3900 rev/s.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `motor_emulator` | `N` | 64 | width of AR, SR, PR |
| | `TORQUE_BITS` | 64 | width of the torque input |
| | `TORQUE_LSB` | 0 | AR bit that receives torque bit 0 (needs `TORQUE_LSB + TORQUE_BITS <= N`) |
| | `ENC_BITS` | 8 | encoder has 2^ENC_BITS counts per revolution (2 ≤ ENC_BITS ≤ N) |
| `accel_register` | `N`, `TORQUE_BITS`, `TORQUE_LSB` | 64, 64, 0 | as above |
| `speed_register`, `position_register` | `N` | 64 | |
| `encoder_output` | `N`, `ENC_BITS` | 64, 8 | |

`motor_emulator` ports: `clk`, `rst`, `torque[TORQUE_BITS-1:0]` (signed),
`position[N-1:0]`, `speed[N-1:0]` (signed; brought out for observation) and
`enc` (`quad_t`).

## Where this RTL departs from, or adds to, the model it implements

* **Speed output.** The `speed` output port is an addition; the
  architecture only exposes the position and the encoder.
* **Sign extension.** The torque is sign-extended into AR. A simpler
  connection with the upper bits tied to zero works only for non-negative
  torques and is not provided.
* **One clock of delay.** The position update uses the speed register's
  current output, as the register-and-adder structure implies. This lags
  the textbook recurrence θ_n = θ̇_n·h + θ_{n-1} by one clock.
* **Reset style.** Reset polarity, its synchronous timing and reset to
  zero are choices of this design.
* **One flip-flop fewer.** The reference implementation reports 3N+1
  flip-flops; this one has 3N. The extra flip-flop there is unexplained,
  and no output register was added.
* **Not modelled.** Friction, electrical dynamics, external load and a
  tunable torque gain finer than a power of two.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. Build and run one with plain Verilator.
The package must come first:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/motor_pkg.sv rtl/accel_register.sv \
  rtl/speed_register.sv rtl/position_register.sv rtl/encoder_output.sv \
  rtl/motor_emulator.sv tb/tb_motor_emulator.sv --top-module tb_motor_emulator
./obj_dir/Vtb_motor_emulator
```

| testbench | what it shows |
|---|---|
| `tb_accel_register` | 64-bit load; all 256 8-bit torques land at bit 5 of a 32-bit AR with sign extension; reset |
| `tb_speed_register`, `tb_position_register` | accumulation against a running sum, wrap in both directions, reset |
| `tb_encoder_output` | state table for random angles; 256 single-phase steps per revolution in each direction; a second size |
| `tb_motor_emulator` | full 64-bit design: torque step of 2^40 checked against the closed form every clock; first encoder change at the predicted clock (363) with state 10; braking, reversal, wrap through zero in both directions, reset in motion; a quadrature decoder's count always equals PR's top byte |
| `tb_torque_profile` | 10^6 clocks (1 s at 1 MHz) of cosine, pulse and square torque, 1000 samples held 1000 clocks each, at N = 64; position within 0.5 % of a real-valued integration at every sample |
| `tb_motor_emulator_configs` | N = 32 with an 8-bit torque at bit 5, and N = 16 with ENC_BITS = 4, under random torque |

All of them run in under a second. In `tb_torque_profile` the
breakpoints of the pulses and square waves and the 2^27 amplitude are
illustrative choices, not a reference trace; with them the shaft ends the
second just short of angle zero on the negative side, so PR has wrapped.
