# Iterative CORDIC unit for complex rotation

This unit multiplies a complex number by a unit-modulus complex number
e^{jθ}. That is the same as rotating the vector (x, y) in the plane by the
angle θ:

    x' = x·cos θ − y·sin θ
    y' = x·sin θ + y·cos θ

This operation is at the heart of FFT butterflies and many other DSP kernels.
The unit never evaluates a sine or a cosine, and it has no multiplier. It uses
the CORDIC method (COordinate Rotation DIgital Computer). The rotation by θ is
built from a sequence of small "microrotations" by ±atan(2^-n), for
n = 0, 1, 2, …. A rotation by atan(2^-n) needs only a shift by n places and an
addition, apart from a constant length factor. One microrotation is done per
clock cycle. The number of cycles follows the size of the input vector, not a
fixed count: a 16-bit full-scale vector takes 15 clocks and a vector of about
2^7 takes about 9.

The whole unit is 16 bits wide. After synthesis it has about 60 word-level
cells and 53 flip-flops.

## Number formats

* **Coordinates.** x and y are 16-bit two's-complement integers.
* **Angle.** z is a 16-bit two's-complement integer in units of π/2^15:

  | z (integer) | angle       |
  |-------------|-------------|
  | 32767       | 32767/32768·π |
  | 16384       | π/2         |
  | 0           | 0           |
  | −16384      | −π/2        |
  | −32768      | −π (= π)    |

  The 16-bit range covers exactly one turn [−π, π). Angle arithmetic that
  wraps modulo 2^16 is therefore also correct modulo 2π.

## The microrotation

Each microrotation updates the current point (x_n, y_n) and the residual
angle z_n. The residual angle is the part of θ that has not been rotated yet.
It starts at z_0 = θ.

    s_n     = +1 if z_n ≥ 0, −1 if z_n < 0
    x_{n+1} = x_n − s_n·(y_n >>> n)
    y_{n+1} = y_n + s_n·(x_n >>> n)
    z_{n+1} = z_n − s_n·LUT(n),      LUT(n) = round(2^15/π · atan(2^-n))

`>>>` is an arithmetic right shift: the sign bit fills the vacated positions.

The angles atan(2^-n) add up to about 99.9°. Each angle is no larger than the
sum of all the later ones. So choosing each direction from the sign of the
residual angle drives z toward 0 for any θ in [−π/2, π/2].

A rotation by atan(2^-n) done this way also stretches the vector by
sqrt(1 + 2^-2n). Over the whole sequence the vector grows by the constant
K ≈ 1.6468. The unit leaves this gain in the result:

    x_out + j·y_out = K · (x_in + j·y_in) · e^{jθ}

Multiplying by 1/K = 0.607253 is left to the user. Do it on the outputs, or
fold it into coefficients or inputs computed elsewhere.

The arctangent table holds these 15 values for n = 0..14:
8192, 4836, 2555, 1297, 651, 326, 163, 81, 41, 20, 10, 5, 3, 1, 1.
Entry 15 is 0 and is never used.

## When a computation ends

This is the least obvious part of the design. The unit does not run a fixed
number of steps. A step is useful only while it can still move the point, and
the unit stops as soon as it cannot.

* Microrotation n adds y_n >>> n to x and x_n >>> n to y. Once both shifted
  values are 0, the step changes nothing, and neither does any later step.
* An arithmetic shift never brings a negative number to 0. It stops at −1.
  For example, −1 >>> 1 = −1 and −12345 >>> 1 = −6173. So a shifted value of
  −1 is treated like 0. It only reflects the rounding toward −∞ of a negative
  number that is smaller than 2^n in magnitude.

In state n the control block looks at the outputs of the two shifters. If
either shifted value is neither 0 nor −1, the step is taken and the state
advances to n+1. Otherwise no step is taken and the machine returns to the
wait state.

The number of microrotations is therefore about log2 of the larger
coordinate, as that coordinate has grown by the end. The clock count is the
number of microrotations plus 1, because one clock finds that the point has
settled. It is at most 15: after the step in state 14 the machine goes
straight back to the wait state. Small vectors get fewer steps and so less
angular precision. Their result is accurate to a few LSBs either way, since
its magnitude is small.

The stopping rule looks only at the coordinates, never at the residual angle.

## Angles beyond ±π/2

For θ outside [−π/2, π/2] the unit rotates by θ' = θ − π and negates the
result. This works because e^{jθ} = −e^{jθ'}. In the π/2^15 scale,
subtracting π is the same as adding 2^15 modulo 2^16, so θ' is θ with its sign
bit inverted.

* **Test.** The angle is out of range when z_in > 16384 or z_in < −16384.
  This includes −32768, which is −π.
* **Reduction.** z_in is reduced before it enters the z accumulator.
* **Flag.** A flag stored at load time makes the outputs the negations of the
  x and y accumulators.

## Block structure

| Block | Module | What it does |
|-------|--------|--------------|
| Accumulators X and Y | `cordic_acc_xy` | Hold (x_n, y_n). They load the inputs on a start, load the ALU results on a step, and otherwise hold. |
| Accumulator Z | `cordic_acc_z` | Holds z_n. Outputs the operator: the direction bit, 1 when z_n ≥ 0. |
| Static shifters X and Y | `cordic_shifter` (×2) | Single-cycle barrel arithmetic right shift by the state number. |
| ALU-X, ALU-Y, ALU-Z | `cordic_alu` (×3) | Add/subtract. ALU-X subtracts when s = +1, ALU-Y when s = −1, ALU-Z when s = +1. |
| Look-up table | `cordic_atan_lut` | Combinational table of atan(2^-n), addressed by the state. |
| Control block | `cordic_control` | 16-state machine. States 0..14 are steps and state 15 waits. It decodes the load/step enables and END_CYCLE and applies the stopping rule. |
| Angle range stage | `cordic_quadrant` | Reduces the angle by π when needed, remembers that it did, and negates the outputs. |
| Top | `cordic` | Wires the blocks together. |

`cordic_pkg` holds the shared constants and types:

* the word width (16);
* the 4-bit state type;
* the wait state (15) and the last step state (14);
* the ±π/2 thresholds.

The machine state has three uses. It is the shift count of both shifters, the
address of the table, and the state of the controller.

## Interface and timing

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | Clock. Everything is on the rising edge. |
| `res` | in | 1 | Asynchronous reset, active high. Puts the controller in the wait state and clears all registers. |
| `load` | in | 1 | Start a rotation. Sampled only in the wait state. |
| `x_in`, `y_in` | in | 16 signed | Vector to rotate. |
| `z_in` | in | 16 signed | Angle, in units of π/2^15. |
| `x_out`, `y_out` | out | 16 signed | K × rotated vector. |
| `end_cycle` | out | 1 | High while idle. The outputs then hold the last result. |

A rotation runs like this:

1. While `end_cycle` is high, present the inputs and raise `load` for one
   clock edge. The inputs need to be valid only at that edge.
2. `end_cycle` falls after that edge. `load` is ignored until `end_cycle` is
   high again, even if it stays high.
3. One microrotation happens per clock.
4. `end_cycle` rises when the result is ready: steps + 1 clocks after the load
   edge, at most 15.
5. The result holds until the next load.

`end_cycle` is also high right after reset. The outputs are then 0.

## Limits and departures

* **No gain compensation.** The outputs carry the CORDIC gain K ≈ 1.6468.
* **No overflow protection.** Nothing saturates and there are no guard bits.
  For the result to fit in 16 bits, K·sqrt(x² + y²) must stay below 2^15. For
  any angle, |x_in| and |y_in| up to about 13,500 are safe. Larger inputs wrap
  silently.
* **Bounded accuracy.** The table entries are rounded, and there are at most
  15 steps. Over random vectors up to 2^13 and random angles, the largest error
  against the exact K·(x + jy)·e^{jθ} is under 8 LSB.
* **Angle range stage.** How to extend the range beyond ±π/2 is given by the
  method: rotate by θ − π and invert the signs. Where that sits in the
  hardware is this design's choice: a sign-bit inversion on the angle input,
  plus a negation on the outputs.
* **Reset.** The reset clears the data registers as well as the controller.
* **END_CYCLE.** It is a level, not a pulse.
* **LOAD while busy.** It is ignored.
* **Table scale.** The table follows the 2^15/π angle scale of the z
  register. It starts at n = 0 (π/4), which is consistent with a gain of
  1/0.607253.

Two throughput figures can be derived. Rotating a vector in general-purpose
arithmetic costs about 46 instruction-equivalents: 6 for the multiplies and
adds, and about 40 for sine and cosine. At a clock of 8.2 MHz, a 14-clock
rotation then matches about 27 MIPS, and a 7-clock rotation about 54 MIPS.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

`tb_cordic` is the end-to-end test at full size. It checks every result
bit-exactly against an integer model of the algorithm written in the
testbench. It also checks every result against the exact rotation computed in
real arithmetic, and checks the clock count of every operation. It counts each
behaviour it exercises and fails if any of them never occurs:

* range reduction, and angles that need none;
* early stop, and the full 15 steps;
* a stop with a coordinate settled at −1;
* `load` held during a computation;
* operations of about 14 and about 8 clocks.

With Verilator:

    verilator --binary --timing --assert -Irtl rtl/cordic_pkg.sv rtl/*.sv \
        tb/tb_cordic.sv --top-module tb_cordic
    ./obj_dir/Vtb_cordic

Other tests are run the same way with their own top module. For example, the
control block:

    verilator --binary --timing --assert -Irtl rtl/cordic_pkg.sv rtl/*.sv \
        tb/tb_cordic_control.sv --top-module tb_cordic_control

The width is fixed at 16 bits in `cordic_pkg`. The table, the angle scale and
the 16-state controller all depend on it. Widening the unit means regenerating
the table from the formula above and growing the state register.
