# TOXOS — a CORDIC coprocessor for nonlinear functions on a RISC-V core

Neural networks spend much of their time in nonlinear functions: activation
functions, softmax and similar. A small microcontroller core usually evaluates
these in software, either with its FPU or with a soft-float library. That takes
tens to thousands of cycles per call. TOXOS is a coprocessor that does the
work in hardware. A RISC-V core hands it a custom instruction, such as
`sin.q a0, a1`. TOXOS evaluates the function with one iterative engine, a
**unified CORDIC**, and returns an IEEE-754 single-precision result a few
cycles later.

Two ideas carry the design:

* **One engine, many functions.** The unified CORDIC recurrence uses only
  adds, subtracts and shifts. It can rotate or "vector" a point in circular,
  linear or hyperbolic coordinates. Picking one of these six modes and a
  suitable start vector yields sin, cos, atan, cosh, sinh, atanh, exp, atan2,
  hypot and division. With a second pass it also yields asin and acos.
* **Floating point only at the edges ("global floating point").** Operands
  are converted from float to fixed point once, before the engine. The result
  is converted back once, after it. The iterations themselves are plain
  fixed-point additions.

The RTL is written in SystemVerilog (IEEE 1800-2017) and is synthesizable. By
default it uses the published configuration: 20 CORDIC iterations, a latency
of 4 cycles per pass, and a 24-bit fixed-point word with 4 integer and
20 fraction bits.

## Instruction set

All instructions are R-type and use the custom opcode `0001011`. The `func7`
field selects the function. The `funct3` field is ignored. Operands and the
result are FP32 bit patterns held in integer registers (`rs1`, `rs2`, `rd`).

| func7 | mnemonic        | result              | valid input range (no argument reduction) |
|-------|-----------------|---------------------|-------------------------------------------|
| 1     | `sin.q`         | sin(rs1)            | \|x\| < 1.74                              |
| 2     | `cos.q`         | cos(rs1)            | \|x\| < 1.74                              |
| 3     | `atan.q`        | atan(rs1)           | any                                       |
| 4     | `asin.q`        | asin(rs1)           | \|x\| < 0.8                               |
| 5     | `acos.q`        | acos(rs1)           | \|x\| < 0.8                               |
| 6     | `cosh.q`        | cosh(rs1)           | \|x\| < 1.11                              |
| 7     | `sinh.q`        | sinh(rs1)           | \|x\| < 1.11                              |
| 8     | `atanh.q`       | atanh(rs1)          | \|x\| < 0.8                               |
| 9     | `exp.q`         | e^rs1               | \|x\| < 1.11                              |
| 10    | `atan2.qq`      | atan2(rs1, rs2)     | any, full circle (−π, π]                  |
| 11    | `hypotenuse.qq` | sqrt(rs1² + rs2²)   | any normal pair                           |
| 12    | `div.qq`        | rs1 / rs2           | any normal pair, rs2 ≠ 0                  |

The ranges are the CORDIC ranges of convergence. The hardware does not check
them: an input outside its range gives a wrong result, not an exception.

## How each function becomes a CORDIC pass

This is the part that needs the most care. Each micro-rotation *i* computes

```
x' = x − m·σ·(y >>> S_i)
y' = y +   σ·(x >>> S_i)
z' = z −   σ·α_i
```

Here *m* is +1 for circular, 0 for linear and −1 for hyperbolic coordinates.
σ = sign(z) in rotation mode, which drives z to 0. In vectoring mode
σ = −sign(x)·sign(y), which drives y to 0. A zero counts as positive. The
shift sequence and elementary angles are:

* circular: S_i = i, α_i = atan(2^−i)
* linear: S_i = i, α_i = 2^−i
* hyperbolic: S = 1, 2, 3, 4, 4, 5, …, 13, 13, 14, … (shifts 4, 13, 40, …
  repeated, which the hyperbolic system needs to converge), α = atanh(2^−S)

Circular iterations scale the vector by K = Π sqrt(1 + 2^−2S) ≈ 1.6468.
Hyperbolic iterations scale it by A_h = Π sqrt(1 − 2^−2S) ≈ 0.8282. Both
products are taken over the 20 iterations actually performed. The input
handler compensates by starting from 1/K or 1/A_h where that is possible.

In the table, `a` = rs1 and `b` = rs2. `ea` and `eb` are their unbiased
exponents.

| op          | system, mode        | start vector (x0, y0, z0)                  | result                     |
|-------------|---------------------|--------------------------------------------|----------------------------|
| sin, cos    | circular, rotation  | (1/K, 0, a)                                | y = sin a, x = cos a       |
| cosh, sinh  | hyperbolic, rotation| (1/A_h, 0, a)                              | x = cosh a, y = sinh a     |
| exp         | hyperbolic, rotation| (1/A_h, 1/A_h, a)                          | x = cosh a + sinh a        |
| atanh       | hyperbolic, vectoring| (1, a, 0)                                 | z                          |
| atan        | circular, vectoring | (1·2^−e, a·2^−e, 0), e = max(ea, 0)        | z                          |
| atan2       | circular, vectoring | (b·2^−e, a·2^−e, 0), e = max(ea, eb)       | z                          |
| hypot       | circular, vectoring | (\|b\|·2^−e, a·2^−e, 0)                    | x·(1/K)·2^e                |
| div         | linear, vectoring   | (b·2^−eb, a·2^−(ea+1), 0)                  | z·2^(ea+1−eb)              |
| asin pass 0 | hyperbolic, vectoring| (1/A_h, a/A_h, 0)                         | x = sqrt(1 − a²)           |
| asin pass 1 | circular, vectoring | (x of pass 0, a, 0)                        | z = asin a                 |
| acos        | as asin             |                                            | π/2 − z                    |

Some details the table does not show:

* **Common exponent.** atan, atan2 and hypot depend only on the ratio of
  their operands, or scale with it. Both operands are therefore converted
  with the same power of two, 2^−max(ea, eb). After that step both lie
  within ±2, so any pair of normal floats fits the Q4.20 word. Division scales
  each operand by its own exponent. The quotient of the two significands then
  lies in (0.25, 1], inside the linear range of convergence, and the output
  converter adds the exponent difference back. atan is computed as
  atan2(a, 1), so it accepts any magnitude.
* **atan2 on the left half-plane.** When b < 0, the input handler negates x
  and y and starts z at +π or −π (sign of a). The result then covers all
  four quadrants.
* **asin and acos take two passes.** The first pass computes sqrt(1 − a²) by
  hyperbolic vectoring. The second pass takes atan(a / sqrt(1 − a²)) by
  circular vectoring. This pass sequence is this design's own choice, and it
  doubles the latency of these two instructions.
* The controller holds rs1 and rs2 in registers for the whole operation.
  Pass 1 of asin therefore rereads `a`, and it reads `x` from the engine's
  loop register.

## The rolled CORDIC engine

`toxos_cordic_core` does not unroll all 20 iterations, and it does not run
them one per cycle either. It chains **UNITS = ITER / LATENCY** add-shift
units (5 by default) combinationally. A **loop register** feeds their output
back to their input:

```
            start                            every cycle of the pass
 (x0,y0,z0) --mux--> [add-shift]→[add-shift]→ … →[add-shift] --> loop reg --+
                ^          (UNITS units; S_i, α_i from the LUT)             |
                +-----------------------------------------------------------+
```

* In cycle *c* (0 … LATENCY−1) of a pass, the chain performs iterations
  c·UNITS … c·UNITS+UNITS−1.
* `toxos_latency_counter` supplies the base index c·UNITS.
* `toxos_cordic_lut` returns the shifts and angles of those UNITS iterations
  for the selected coordinate system.
* Shifts vary from cycle to cycle, so each unit has a barrel shifter.
* The LUT contents are computed at elaboration from the formulas above, using
  power series and rounding to FRAC_W bits. Changing ITER or FRAC_W
  regenerates them.

Raising LATENCY at a fixed ITER uses fewer units and more cycles, and accuracy
does not change. Raising ITER at a fixed LATENCY improves accuracy and costs
more units. ITER must be a multiple of LATENCY; elaboration stops with an
error otherwise.

## Number formats

* **Fixed point:** two's complement, INT_W integer bits including the sign,
  and FRAC_W fraction bits. The default Q4.20 word spans [−8, 8) in steps of
  2^−20.
* **Float to fixed** (`toxos_flp2fxp`) converts a·2^−shift. Bits below the LSB
  are truncated toward zero. Zero and subnormal inputs give 0. Magnitudes of
  8 or more, infinities and NaN saturate.
* **Fixed to float** (`toxos_fxp2flp`) converts q·2^adj. A leading-one search
  finds the exponent. The conversion is exact for words of 24 bits or fewer.
  Overflow gives ±∞ and underflow flushes to ±0.
* NaN and infinity operands are not propagated. They saturate like large
  numbers.

## Accuracy

Random operands were run through the complete coprocessor at its default
configuration and compared with double-precision math (`tb_toxos`). Every
function stayed within about 1·10⁻⁵ of the exact value: absolute error for
the bounded functions, relative error for hypot and div. Worst cases seen:

* about 1·10⁻⁵ for acos, exp and div;
* 3·10⁻⁶ to 9·10⁻⁶ for the others.

The error comes from the 20 iterations and 20 fraction bits together, which
gives about 17 correct bits.

### Iterations and word width

`tb_toxos_mse` builds the complete coprocessor at several configurations and
measures the mean squared error of the FP32 results of sin over 200 points in
[−1.5, 1.5]:

| iterations | fraction bits | LATENCY                  | MSE       |
|-----------:|--------------:|--------------------------|-----------|
| 8          | 24            | 4                        | 1.2·10⁻⁵  |
| 12         | 24            | 4                        | 4.1·10⁻⁸  |
| 16         | 24            | 4                        | 1.7·10⁻¹⁰ |
| 20         | 24            | 4                        | 8.0·10⁻¹³ |
| 24         | 24            | 4 and 6                  | 3.9·10⁻¹⁴ |
| 28         | 24            | 4                        | 3.9·10⁻¹⁴ |
| 28         | 28            | 4                        | 9.7·10⁻¹⁶ |
| 20         | 12            | 4                        | 3.1·10⁻⁷  |
| 20         | 16            | 4                        | 1.3·10⁻⁹  |
| 20         | 28            | 4                        | 7.4·10⁻¹³ |
| 20         | 20            | 1, 2, 4, 5, 10 and 20    | 6.8·10⁻¹² |

The table shows:

* Each extra iteration adds about one correct bit, until the fraction width
  limits the result.
* At 20 iterations, a wider fraction helps up to about 24 bits. Beyond
  that, the iteration count limits the result.
* With a 24-bit fraction, iterations past 24 change nothing. With 28
  fraction bits and 28 iterations the error reaches the rounding floor of
  single precision.
* LATENCY changes only how many passes the engine makes through its chain of
  units. Every LATENCY gives bit-identical results.
* Accuracy can therefore be bought with cycles instead of area. With four
  add-shift units, 16 iterations take 4 cycles and 24 iterations take 6
  cycles. The two extra cycles cut the MSE by a factor of about 4400.

The FP32 result format sets a floor of about 10⁻¹⁵.

Area grows almost linearly with the word width. A generic yosys synthesis at
20 iterations and LATENCY 4 (flattened, cell count with no technology
library) gives:

| fraction bits | 12    | 16     | 20     | 24     | 28     |
|---------------|-----:|-------:|-------:|-------:|-------:|
| cells         | 8 589 | 11 471 | 14 102 | 17 071 | 20 244 |

The default of 20 iterations and 20 fraction bits is the published trade-off
between this area and the accuracy in the table above.

### Activation functions

`tb_toxos_activations` computes tanh, sigmoid, GELU and softmax on arrays of
64 FP32 values, the way a program on the host would. TOXOS evaluates
sinh, cosh, exp and the divisions. The additions and multiplications are
modelled in FP32, standing in for the host FPU. Each result is checked against
double-precision math to within 1·10⁻⁴, relative for softmax. Every
operation takes 6 cycles. The coprocessor cycles per 64-element array are:

| function | TOXOS operations per element   | cycles for 64 elements |
|----------|--------------------------------|-----------------------:|
| tanh     | sinh, cosh, div                | 1152                   |
| sigmoid  | exp, div                       | 768                    |
| GELU     | sinh, cosh, div                | 1152                   |
| softmax  | exp, then div by the sum       | 768                    |

## Interface and timing

TOXOS is a CORE-V eXtension Interface (CV-X-IF) slave. The channel structs
are in `toxos_pkg`:

* **issue:** `x_issue_valid_i` / `x_issue_ready_o`. `x_issue_req_i` holds the
  instruction, a 4-bit id, rs1/rs2 and their `rs_valid` bits.
  `x_issue_resp_o` holds `accept` and `writeback`.
* **commit:** `x_commit_valid_i`, with `x_commit_i` = {id, commit_kill}.
* **result:** `x_result_valid_o` / `x_result_ready_i`. `x_result_o` holds
  {id, data, rd, we=1}.

The controller behaves as follows:

* Instructions that are not x-cordic are answered at once with `accept = 0`.
* An x-cordic instruction is accepted only once the source registers it needs
  are valid. Until then `x_issue_ready_o` stays low and `stall_o` is high,
  which stalls the core until its load completes.
* One operation is in flight at a time. `x_issue_ready_o` is low while TOXOS
  is busy.
* The result is offered only after the commit channel has committed the
  instruction. A `commit_kill` drops the operation.
* The result stays stable until `x_result_ready_i`. A concurrent assertion
  in `toxos_controller` checks this.

| cycle (0 = issue handshake) | what happens                                              |
|-----------------------------|-----------------------------------------------------------|
| 0                           | instruction and operands registered                       |
| 1 … LATENCY                 | input conversion + CORDIC pass (UNITS iterations/cycle)   |
| LATENCY+1                   | output conversion, result registered                      |
| LATENCY+2                   | `x_result_valid_o` (6 cycles by default)                  |
| 2·LATENCY+2                 | result of asin/acos (second pass starts at LATENCY+1)     |

Reset is asynchronous and active low (`rst_ni`).

## Parameters (top `toxos`)

| parameter | default  | meaning                                                          |
|-----------|----------|------------------------------------------------------------------|
| ITER      | 20       | CORDIC iterations per pass                                       |
| LATENCY   | 4        | cycles per pass; UNITS = ITER/LATENCY add-shift units            |
| INT_W     | 4        | integer bits of the fixed-point word (incl. sign)                |
| FRAC_W    | 20       | fraction bits                                                    |
| FUNC_EN   | 13'h1FFE | bit n enables the instruction with func7 = n                     |

### Reduced function sets

Clearing FUNC_EN bits does more than make the decoder refuse those
instructions:

* The input and output handlers treat a disabled operation as no operation,
  so its operand mapping and result selection disappear.
* The core builds only the coordinate systems that some enabled operation
  uses. It maps any other system onto one that is built. With a single
  system the choice is a constant, so synthesis drops the angle table and
  the cross terms of the unused systems.

For example, a division-only build keeps only the linear system, with no
angle constants at all. asin and acos need both the hyperbolic and the
circular system.

A generic yosys synthesis (flattened, cell count with no technology
library) gives:

| FUNC_EN  | functions                  | cells  |
|----------|----------------------------|-------:|
| 13'h1FFE | all twelve                 | 14 102 |
| 13'h1C08 | atan, atan2, hypot, div    | 13 274 |
| 13'h03C0 | cosh, sinh, atanh, exp     | 12 999 |
| 13'h0006 | sin, cos                   | 12 861 |
| 13'h1000 | div                        | 10 924 |

The float converters and the interface logic do not shrink, so the savings
are moderate. The division-only build is about 15 % smaller than the sin/cos
build. All twelve functions together cost about 10 % more than sin and cos
alone, because every function shares the same add-shift units. `tb_toxos_subset` checks several of these builds. Enabled operations
must still be correct at the usual latency, and disabled ones must be
refused.

## Departures from the published design, and what is not here

* **asin/acos latency.** The published design gives every function the same
  latency. Here asin and acos take two passes, 2·LATENCY+2 cycles, and
  accept only |x| < 0.8.
* **Cycle counts.** The published figures are 8 to 10 cycles per
  instruction, measured by software on the core. The split between core and
  coprocessor is not specified. This RTL delivers a result 6 cycles after
  the issue handshake.
* **Placement of the converters.** The published block diagram draws the
  float/fixed converters at the edges of the CORDIC core. Here they live in
  the input and output handlers, which keeps the core purely fixed point.
  The blocks and their order are the same.
* **Area split.** The published area breakdown gives the CORDIC engine
  about 85 % of the coprocessor. In a generic synthesis of this RTL the
  engine is about half. The input handler takes 28 % and the output handler
  20 %, because they carry two constant multipliers (a·1/A_h for asin,
  x·1/K for hypot) and the common-exponent scaling. Control and interface
  take under 2 %.
* **Mode convention.** The published text contradicts itself on which value
  of *m* means linear and which means hyperbolic. It also writes the z update
  with a factor *m*, which would stop linear mode from working. The RTL
  follows Walther's standard form shown above.
* **Functions.** tanh and log appear in the area discussion but have no
  instruction encoding, so they are not provided. tanh = sinh/cosh can be
  computed with three instructions.
* **Rest of the system.** The host core, FPU, SRAM banks, DMA and peripherals
  of the surrounding microcontroller are not included. The CV-X-IF side of
  TOXOS is brought out as ports, and the testbench plays the core.
* **Assumed interface details.** The CV-X-IF channel subset, its field
  widths, commit handling, rounding (truncation), saturation and the
  reset style are this design's choices.

## Files

| file                              | block                                                      |
|-----------------------------------|------------------------------------------------------------|
| `rtl/toxos_pkg.sv`                | encodings, enums, CV-X-IF structs, table/gain functions    |
| `rtl/toxos.sv`                    | top level                                                  |
| `rtl/toxos_op_decoder.sv`         | opcode/func7 decoding                                      |
| `rtl/toxos_controller.sv`         | CV-X-IF handshakes, operand registers, pass sequencing     |
| `rtl/toxos_input_handler.sv`      | mode selection, start vector, common-exponent scaling      |
| `rtl/toxos_flp2fxp.sv`            | float → fixed                                              |
| `rtl/toxos_cordic_core.sv`        | rolled CORDIC engine with loop register                    |
| `rtl/toxos_latency_counter.sv`    | cycle counter of a pass                                    |
| `rtl/toxos_cordic_lut.sv`         | shifts and angles                                          |
| `rtl/toxos_addshift.sv`           | one micro-rotation                                         |
| `rtl/toxos_output_handler.sv`     | result selection, fix-ups, result register                 |
| `rtl/toxos_fxp2flp.sv`            | fixed → float                                              |
| `tb/toxos_tb_pkg.sv`              | float/real helpers for the testbenches                     |
| `tb/tb_<module>.sv`               | one self-checking testbench per module                     |
| `tb/tb_toxos.sv`                  | end-to-end test at default parameters                      |
| `tb/tb_toxos_mse.sv`              | accuracy over iterations, fraction bits and LATENCY        |
| `tb/toxos_tb_sin_probe.sv`        | one configuration plus sin sweep, used by `tb_toxos_mse`   |
| `tb/tb_toxos_activations.sv`      | tanh, sigmoid, GELU, softmax on 64-element arrays          |
| `tb/tb_toxos_subset.sv`           | builds with reduced FUNC_EN masks                          |
| `tb/toxos_tb_subset_probe.sv`     | one reduced build plus its checks, used by `tb_toxos_subset` |

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the repository root:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_toxos -y rtl -y tb +libext+.sv -Irtl \
  rtl/toxos_pkg.sv tb/toxos_tb_pkg.sv tb/tb_toxos.sv -o sim
./obj_dir/sim
```

For another testbench, replace `tb_toxos` with its name, for example
`tb_toxos_cordic_core`. `tb_toxos` runs every instruction on random operands
and checks latency. It also exercises operand stalls, result back-pressure,
late commits, kills and refused instructions, and prints the worst error per
function. `tb_toxos_mse`, `tb_toxos_activations` and `tb_toxos_subset` are
built the same way.
Lint a module with
`verilator --lint-only -Wall -y rtl rtl/toxos_pkg.sv rtl/<module>.sv`.
