# FOC controller for three-phase PMSM/BLDC drives

This is a field-oriented controller for a three-phase permanent-magnet motor
(PMSM or BLDC) with an incremental encoder. It is written as synthesizable
SystemVerilog and aimed at a 100 MHz FPGA clock. Each control step reads three
phase currents, the rotor angle and a speed command. It then produces three
space-vector-modulated phase voltage references for a PWM stage. The design
is built for a short, fixed schedule rather than a general processor. One
step takes **84 clock cycles** from sampling to output, and a new step starts
every **72 cycles**, which is 1.39 M steps/s at 100 MHz. That rate supports PWM
switching frequencies above 1 MHz.

Area is kept small by sharing hardware:

* One **CORDIC** rotator does both the Park transform and the inverse Park
  transform. The two differ only in their operands and in the sign of the
  angle.
* One **PI datapath** runs the speed loop and both current loops in turn.
* Every multiply and divide-by-a-constant goes through one of four small
  registered **MAS** (multiply/add/subtract) units plus shifts. Clarke and
  inverse Clarke share one of them, since their requests never fall in the
  same cycle of the schedule.

## Signal flow

```
 ia,ib,ic (12-bit ADC codes)
   -> adc_scaler (5) -> clarke (4) -> Park on CORDIC (23) -> Id, Iq
 W_REF, W (encoder_if) -> speed PI (11, runs in parallel) -> Iq reference
 Id PI, ref 0 (11) -> Iq PI (11) -> Vd, Vq
   -> inverse Park on CORDIC (23) -> inv_clarke (4) -> svm (3) -> SVa, SVb, SVc
```

Numbers in brackets are latencies in cycles. Along the critical chain they
add up to 5 + 4 + 23 + 11 + 11 + 23 + 4 + 3 = 84. The speed PI starts
together with the ADC and finishes at cycle 11, long before the Iq loop needs
its output at cycle 43.

| module | role |
|---|---|
| `foc_top` | top level: wires the units, latches the angle and speed for each step, holds the outputs |
| `foc_sequencer` | step timer (default period 72 cycles); starts each unit in the cycle its predecessor finishes |
| `adc_scaler` | offset-binary 12-bit codes to 18-bit signed currents, `(code - 2048) * 64` |
| `clarke` | `alpha = a`, `beta = (a + 2b)/sqrt(3)`, 4-stage pipeline |
| `cordic_scheduler` | selects Park operands `(alpha, beta, -theta)` or inverse Park operands `(Vd, Vq, +theta)` |
| `cordic_rotate` | iterative rotation-mode CORDIC, 18 micro-rotations, arctangent table |
| `cordic_scale` | removes the CORDIC gain (multiplies by 0.607253) |
| `pi_scheduler` | routes `(W_REF, W)`, `(0, Id)`, `(speed output, Iq)` to the PI datapath and stores the results |
| `pi_controller` | PI with clamped (anti-windup) integrator, one integrator per loop, preload |
| `clarke_mas_share` | the MAS unit used by both `clarke` and `inv_clarke` |
| `inv_clarke` | `a = alpha`, `b,c = -alpha/2 +/- (sqrt(3)/2) beta`, 4-stage pipeline |
| `svm` | min-max SVM: subtracts `(max + min)/2` from each phase, 3-stage pipeline |
| `encoder_if` | quadrature decoder giving the angle `theta` and the speed `W` |
| `mas` | registered multiply-with-shift / add / subtract unit with saturation |
| `foc_pkg` | word types, structs, enums and Q16 constants |

## Number formats

All data words are 18 bits wide.

* **Currents, voltages and speeds** are signed integers, with full scale
  ±131071. The ADC's 12 bits are moved to the top of this range.
* **Angles** are unsigned fractions of one electrical turn, with
  2^18 = 360°. Adding or negating an angle wraps on its own.
* **Constants** are Q16: `1/sqrt(3)` = 37837, `sqrt(3)/2` = 56756. The PI
  gains are Kp = 6400 (0.097656) and Ki·Ts = 100 (0.001526).
* **Rounding:** a product is shifted right arithmetically, which rounds toward
  minus infinity.
* **Saturation:** every result that can overflow saturates instead of
  wrapping.

## The shared CORDIC (the part that needs the most care)

The Park transform
`d = α cosθ + β sinθ`, `q = −α sinθ + β cosθ`
is the vector (α, β) rotated by −θ. The inverse Park transform is (d, q)
rotated by +θ. `cordic_scheduler` therefore needs only one rotator. It latches
the operands for the request, negates the angle for Park, and starts
`cordic_rotate`.

**Pre-rotation.** CORDIC converges only for angles within about ±99.7°. Before
the micro-rotations, any angle in the second or third quadrant is turned by
180°: the vector is negated and half a turn is subtracted from the angle. This
leaves a residual angle in [−90°, +90°).

**Micro-rotations.** There are 18 steps, one per clock cycle. Step *i* turns the
vector by ±atan(2^−i), towards the sign of the residual angle, using only
shifts and adds.

**Guard bits.** The residual angle carries 2 guard bits, so its table is in
units of 2^−20 turn: `ATAN[i] = round(atan(2^−i) · 2^20 / 2π)`. The vector
carries 2 fraction bits and 3 bits of headroom (23 bits in all), so nothing
can overflow: the CORDIC gain 1.6468 times √2 stays below 4.

**Scaling.** `cordic_scale` multiplies both outputs by K = 0.607253
(`round(K·2^18)` = 159188, shifted right by 20). This removes the gain and
the guard bits in one multiplication.

**Timing.** The latency is 1 (operand register) + 19 (load and 18 steps)
+ 3 (scale) = 23 cycles. Measured against floating point over random vectors
and all quadrants, the error is at most about 3 LSB for magnitudes up to
~130,000.

## The shared PI datapath

`pi_controller` computes, for channel *c*:

```
E = ref − act                       (saturated to 18 bits)
P = Kp·E
I[c] = clamp(I[c] + Ki·Ts·E, ±LIMIT)   anti-windup: integrator clamped to the output limit
Y = clamp(P + I[c], ±LIMIT)
```

**Integrators.** Each integrator is kept with 16 extra fraction bits.
Ki·E is often smaller than one LSB, so without them the integral would never
move.

**Schedule.** One 36-bit MAS unit, stepped by a cycle counter, does all the
arithmetic:

| cycle | operation |
|---|---|
| 1 | subtract |
| 2 | Kp·E |
| 3 | Ki·E |
| 4 | integrator add |
| 5 | clamp and write back |
| 6 | P + I |
| 7 | output limit |

The arithmetic is finished after 8 cycles. The unit still reports `done` at
cycle 11, so that the whole step keeps its 84-cycle schedule. `LATENCY` can
be lowered to 8.

**Preload.** `init` loads a channel's integrator with a value. With zero
error, the loop's first output is then that value. This avoids a jump in the
command when the drive starts.

**Routing.** `pi_scheduler` chooses the operands of each loop:

| loop | reference | actual | result goes to |
|---|---|---|---|
| speed | `W_REF` | `W` | `iq_ref` |
| Id | 0 | `Id` | `Vd` |
| Iq | `iq_ref` | `Iq` | `Vq` |

Each result is kept in its own register.

**Bypass.** The inverse Park starts in the cycle the Iq result appears, so
`foc_top` passes that result straight to the CORDIC instead of waiting a cycle
for the register.

## Overlapping steps

With a 72-cycle period, the ADC and Clarke stages of step *n+1* (cycles
72–81) overlap the inverse Clarke and SVM stages of step *n* (cycles 77–84).
This is legal because those units are separate, and the shared units are free:

| shared unit | busy in step *n* (cycles) | first use in step *n+1* (cycle) |
|---|---|---|
| CORDIC | 9–32 and 54–77 | 81 |
| PI datapath | 0–11 and 32–54 | 72 |
| Clarke/inverse Clarke MAS | 7 and 78 | 79 |

A period shorter than 72 would make two CORDIC requests collide.
`cordic_scheduler` and `pi_scheduler` have assertions for that case.

## Encoder interface

`encoder_if` decodes A/B quadrature signals, counting every edge of either
channel (x4 decoding).

* **Direction:** A leading B is clockwise and counts up. B leading A counts
  down.
* **Angle:** `theta` moves by `ANGLE_FACTOR` (64) per count. That fills one
  18-bit turn with 4096 counts, i.e. a 1024-line encoder on one pole pair.
  For a machine with *p* pole pairs and *N* counts per mechanical turn, set
  `ANGLE_FACTOR = 2^18·p/N`.
* **Speed:** `W` is the signed count over `SPEED_WINDOW` cycles (1 ms at
  100 MHz) times `SPEED_FACTOR`, saturated.
* **Latency:** an edge reaches `theta` 3 cycles later, through two
  synchroniser flops and the counter.
* **Errors:** a step where both channels change at once is ignored and
  flagged on `err`.

`foc_top` latches `theta` and `W` when a step starts. Park and inverse Park
of that step therefore use the same angle.

## Top-level interface (`foc_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `enable` | in | run control steps every `SAMPLE_PERIOD` cycles |
| `ia`, `ib`, `ic` | in | 12-bit offset-binary current codes (2048 = 0 A), sampled in the `tick` cycle |
| `qa`, `qb` | in | encoder channels (asynchronous) |
| `w_ref` | in | speed command, in the units of `W` |
| `pi_init`, `pi_init_ch`, `pi_init_val` | in | preload a PI loop (`PI_SPEED`, `PI_ID`, `PI_IQ`); takes effect while the PI unit is idle |
| `sv_abc` | out | SVM references (struct of three signed 18-bit words), held |
| `sv_valid` | out | pulses in the cycle a new step's references are produced; `sv_abc` shows them from the next cycle |
| `tick`, `theta`, `w_act`, `i_ab`, `i_dq`, `v_dq`, `v_ab`, `iq_ref`, `pi_clamped`, `enc_dir_cw`, `enc_err` | out | status for observation |

Parameters with their defaults:

| parameter | default | meaning |
|---|---|---|
| `SAMPLE_PERIOD` | 72 | cycles between control steps |
| `CORDIC_ITER` | 18 | CORDIC micro-rotations |
| `ADC_GAIN` | 64 | ADC code to current scale |
| `KP` | 6400 | proportional gain, Q16 |
| `KI` | 100 | integral gain Ki·Ts, Q16 |
| `ANGLE_FACTOR` | 64 | angle step per encoder count |
| `SPEED_FACTOR` | 64 | speed scale |
| `SPEED_WINDOW` | 100000 | cycles per speed measurement |

The PWM generator that turns `sv_abc` into gate signals is not part of this
RTL, and neither is the power inverter. The on-chip ADC that produces the
12-bit codes is also outside it.

## Where this implementation makes its own choices

The structure, the transforms, the PI equations and gains, the min-max SVM,
the 18-bit word width, and every unit latency are those of the original
design. The following details are this implementation's own:

* **ADC coding:** offset binary with zero at 2048, and a gain of 64.
* **Encoder resolution:** 4096 counts per turn, a 1 ms speed window, and the
  speed scale.
* **Number formats:** Q16 constants, floor rounding, saturation everywhere,
  and the 2^18-per-turn angle.
* **CORDIC:** 18 iterations, 2 guard bits and the 180° pre-rotation, chosen
  so that Park takes 23 cycles.
* **Anti-windup:** clamping of the integrator. The gain Ki is used as the
  product Ki·Ts.
* **PI timing:** cycles 8–10 of the PI step are idle, to keep its 11-cycle
  slot.
* **MAS sharing:** four MAS units do all multiplications: one in the ADC
  stage, one shared by Clarke and inverse Clarke, one in the CORDIC scale
  stage and one in the PI datapath. The split between them is this
  implementation's. The SVM and the CORDIC micro-rotations use plain adders
  and shifts.
* **ADC pipelining:** the ADC stage uses a single multiplier for the three
  phases in turn, so it is not a per-cycle pipeline. It needs 5 cycles per
  conversion, well within the 72-cycle step.
* **Start-of-step latching:** the angle and speed are latched when a step
  starts, and the status ports are added for observation.

## Simulating

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/foc_pkg.sv tb/tb_foc_top.sv --top-module tb_foc_top -o sim
./obj_dir/sim
```

`-Wno-fatal` keeps Verilator's lint warnings (unused status bits and the
like) from stopping the build.

`tb_foc_top` runs the complete controller at its default parameters for
about 5,700 control steps (430,000 cycles, a few seconds). It checks each
step through the design:

* the 84-cycle latency and the 72-cycle spacing;
* the angle against the encoder count;
* Park against floating point, to 3 LSB;
* the three PI loops exactly, against an integer model;
* inverse Park against floating point, to 5 LSB;
* inverse Clarke and SVM exactly.

It also requires each mechanism to occur: overlapping steps, integrator
clamping, PI preload, both encoder directions, speed of both signs, all four
angle quadrants, the MAS unit shared by Clarke and inverse Clarke, and the
enable switch.

`tb_printed_vectors` applies the Clarke, inverse Clarke and SVM input values
of the original design's own simulation run to the three modules and compares
the results with the values printed for that run. SVM matches exactly. Clarke
matches within 1 LSB and inverse Clarke within 8 LSB, because the original
used shorter constants for 1/sqrt(3) and sqrt(3)/2 than the Q16 ones here.

The block testbenches check each unit's exact latency and its arithmetic
against independent models. The sequencer testbench checks every start time
inside a step.
