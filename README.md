# Multiplexer-based pipelined CORDIC with redundant-arithmetic adders

This is a sine/cosine generator for whole-degree angles. Its results are
8-bit integers scaled so that 1.0 reads as 100. It is a six-stage rotation-mode
CORDIC with two twists that save area and delay:

* **The first three micro-rotations of x and y are replaced by multiplexers.**
  The start vector is always the same, (61, 0). So after three rotations x and
  y can only hold one of four precomputed values. The signs of the residual
  angle after stages 1 and 2 pick the right pair through six 2:1
  multiplexers. Only stages 4, 5 and 6 compute anything on x and y.
* **Every add/subtract is a hybrid radix-2 signed-digit unit.** An adder
  built from plus-plus-minus (PPM) cells, or a subtractor built from
  minus-minus-plus (MMP) cells, adds an ordinary binary number to a
  redundant one. No carry or borrow travels more than one digit position.

Pipeline registers after stages 4 and 5, plus an output register, give a
3-clock latency. A new angle is accepted every clock. A small front end folds
0..359 degrees into the first quadrant, and a back end restores the signs. The
design follows a published FPGA design: it uses that design's word width,
angle constants, start value, multiplexer constants and register placement.
The points where it departs from that design are listed below.

## Number formats

| quantity | format | range |
|---|---|---|
| input angle `angle` | 9-bit unsigned, degrees | 0..359 |
| core angle / residual `z` | 8-bit two's complement, degrees | core input 0..90, residual within ±2 at the output |
| `x` (cosine), `y` (sine) | 8-bit two's complement, ×100 | −100..100 |
| stage arctangents | whole degrees, `round(atan(2^-i))`, i = 0..5 | 45, 27, 14, 7, 4, 2 |
| start vector | x0 = 61 (≈ 100 × 0.6073, the inverse CORDIC gain), y0 = 0 | |

The CORDIC gain is not corrected at the output. It is folded into x0, which is
why x0 is 61 rather than 100.

## The micro-rotation

Stage i (i = 0..5) applies

```
d      = +1 if z >= 0 else -1
x'     = x - d * (y >>> i)
y'     = y + d * (x >>> i)
z'     = z - d * atan_deg[i]
```

The right shifts are arithmetic, so they round toward minus infinity. x ends
as the cosine and y as the sine. The angle column (`angle_stage`) runs all six
stages. The x/y column runs only stages 4..6 (`cordic_stage` with shifts 3, 4
and 5).

## The multiplexer tree (stages 1–3 of x and y)

This is the least obvious part of the design.

The core's input angle is 0..90 degrees, so stage 1 always rotates forward,
and x1 = y1 = 61. Stage 2's direction depends on the sign of z1 = θ − 45.
Stage 3's direction depends on the sign of z2 = z1 ∓ 27. Working the two
rotations through exactly gives, with X = 61:

| z1 | z2 | x3 | y3 |
|---|---|---|---|
| ≥ 0 | ≥ 0 | P = X/8 | S = 13X/8 |
| ≥ 0 | < 0 | R = 7X/8 | Q = 11X/8 |
| < 0 | ≥ 0 | Q = 11X/8 | R = 7X/8 |
| < 0 | < 0 | S = 13X/8 | P = X/8 |

The constants are rounded down to integers: P = 7, Q = 83, R = 53 and S = 99.
`mux_rotator` builds this table from six 2:1 multiplexers. Four of them are
steered by `sgn2` (z2 < 0) and two by `sgn1` (z1 < 0). The constants are
computed from the parameter `X0` at elaboration time. Because the values are
exact rational multiples that are rounded only once, x3/y3 can differ by one
count from what three shift-and-add stages would give. For example, at 60
degrees the tree yields (53, 83), where a truncating adder chain gives
(53, 84).

The trick only works because x0 and y0 are constants. The core has no x/y
inputs. Replacing a fourth stage the same way would need 14 multiplexers and
eight constants, and a fifth stage 30 and sixteen. Beyond three stages a
small ROM indexed by the direction bits is the better choice. That
alternative is not built.

## Redundant (signed-digit) add/subtract units

A signed-digit number keeps two bit vectors, `p` and `n`. Its value is
Σ (p[i] − n[i])·2^i, so each digit is −1, 0 or +1.

* `ppm_cell` computes `x_p − x_n + y = 2·t_p − u_n`. It is a full adder with
  the minus input and the sum output inverted.
* `mmp_cell` computes `x_p − x_n − y = b − 2·t`, where b is the parity of
  the three inputs and t = majority(¬x_p, x_n, y).
* `rsd_hybrid_adder` and `rsd_hybrid_subtractor` place one cell per digit.
  The transfer digit of position i becomes part of digit i+1's result. The
  result has W+1 digits. Each output digit depends on at most two cells,
  whatever W is.
* `rsd_addsub` is the ± box of each stage, and it connects the redundant units
  to ordinary two's-complement data:
  * Operand a is *read* as a signed-digit number without any logic: its low
    bits are positive digits, and its sign bit is a negative digit of weight
    2^(W−1).
  * Operand b goes in as an unsigned number. Reading b as unsigned is off by
    b[W−1]·2^W, which disappears modulo 2^W.
  * Both an adder and a subtractor are instantiated, and `sub` picks one. The
    low W digits are converted back with a single subtraction `p − n`.

The conversion back to two's complement at every ± box is this design's own
choice. It keeps the stage-to-stage data in plain binary, which makes the sign
of z (the rotation direction) a single wire. The cost is that a
carry-propagate subtraction remains in every stage. A design that kept x, y
and z redundant across stages would need a signed-digit + signed-digit adder
and a sign-detection circuit. Neither is part of this design.

## Pipeline and timing

```
angle ─ quadrant_fold ─┬─ angle stages 1-3 ─ mux_rotator ─ stage 4 ─[reg]─ stage 5 ─[reg]─ stage 6 ─[out reg]─ quadrant_unfold ─ sin_o, cos_o
                       └───────────── quadrant delay line (3 clocks) ──────────────────────────────────┘
```

* `PIPELINED = 1` (default): registers after stages 4 and 5, plus the output
  register. The latency is 3 clocks and the throughput one result per clock.
* `PIPELINED = 0`: only the output register is kept, and the latency is 1
  clock. This is the unpipelined multiplexer variant.
* `in_valid` travels with the data to `out_valid`. There is no back-pressure.
* Reset is synchronous and active high. It clears only the valid bits; the
  data registers are not reset.
* The core asserts that its angle lies in 0..90. The top asserts that `angle`
  is below 360.

## Accuracy

Over every angle 0..359 the outputs are within 5.1 counts (of 100) of
100·sin and 100·cos. The residual angle `z_o` is always within ±2 degrees.
Sample results (cos, sin, z_o):

| angle | result | exact ×100 |
|---|---|---|
| 0 | 100, −2, 1 | 100, 0 |
| 30 | 86, 50, −1 | 86.6, 50 |
| 45 | 69, 72, 0 | 70.7, 70.7 |
| 60 | 50, 86, 1 | 50, 86.6 |
| 90 | −2, 100, −1 | 0, 100 |

The published multiplexer designs report 50 and 86 at 60 degrees, with a
residual of 1, which this design reproduces. At 45 degrees they report 63 and
67, which this design does not reproduce: it gives 69 and 72 (residual 0).
The 45-degree numbers published for the adder-based variants, 73/69, lie
close to these.

## Where this design departs from the published one

* **Sine on y, cosine on x, everywhere.** In the published multiplexer stage
  (the stage-2 equations and the stage-2 multiplexer drawing), x and y are
  swapped relative to the general micro-rotation equations. The published
  results accordingly list 50 as "sin 60" for the multiplexer variants. Here
  the multiplexer table is derived from the micro-rotation equations, so
  `sin_o` is the sine.
* **Constants rounded down** (7, 83, 53, 99), as shown in the published
  simulation waveform. The published text also lists nearest-rounded values
  (8, 84, 53, 99).
* **Word width 8 bits.** The design is also described once as 16-bit. All
  results and waveforms are 8-bit, and 8 is used here.
* **Own choices:**
  * the two's-complement interface of the ± boxes and the conversion back;
  * the output register;
  * the valid signal and reset;
  * the full-circle front and back end (the source only says that other
    quadrants follow from symmetry);
  * which sign steers which multiplexer level;
  * the gate equations of the MMP cell, derived from its defining relation.
* **Not built:** the plain unrolled and pipelined adder-based CORDICs, which
  serve only as comparison points; vectoring mode; and the ROM alternative for
  replacing more than three stages.

## Modules

| module | role |
|---|---|
| `cordic_pkg` | widths, x0, arctangent table, quadrant enum |
| `cordic_sincos` | top: fold → core → unfold, quadrant delay line |
| `cordic_mux_core` | six-stage core, `PIPELINED` parameter |
| `mux_rotator` | stages 1–3 of x/y as six multiplexers |
| `cordic_stage` | one micro-rotation of x, y, z |
| `angle_stage` | one angle-accumulator step, gives the direction bit |
| `rsd_addsub` | two's-complement ± built on the signed-digit units |
| `rsd_hybrid_adder` / `rsd_hybrid_subtractor` | W-digit carry-free / borrow-free units |
| `ppm_cell` / `mmp_cell` | digit cells |
| `quadrant_fold` / `quadrant_unfold` | full-circle reduction and sign restore |

Testbenches in `tb/` (`tb_<module>`) are self-checking. Each prints
`TB_RESULT checks=N failures=M`. `cordic_ref_pkg` is an independent integer
and real-number model of the whole design. `tb_cordic_sincos` runs the top at
its default parameters:
* the full circle back to back;
* random angles with idle cycles;
* a reset in mid-burst.

It also counts that every quadrant, every multiplexer selection, both rotation
directions, back-to-back results, idle gaps and a reset flush all occur.
`tb_table3_angles` runs 60 and 45 degrees through both configurations and
checks the latencies.

## Simulating

From the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/cordic_pkg.sv tb/cordic_ref_pkg.sv tb/tb_cordic_sincos.sv \
    --top-module tb_cordic_sincos
./obj_dir/Vtb_cordic_sincos
```

Replace the testbench name to run another one. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/cordic_pkg.sv rtl/<module>.sv`. Two
lint warnings remain, and both are expected. The top digit of each ± box's
redundant result is unused: its weight is 2^W, which a result taken modulo
2^W drops. The ninth bit of the folded angle is unused because the folded
angle never exceeds 90.

## Changing it

* `PIPELINED` on `cordic_sincos` or `cordic_mux_core` selects the 3-clock or
  1-clock version.
* `X0` sets the output scale (≈ 0.607 × full scale). The multiplexer
  constants follow it automatically. Check that 13·X0/8 still fits `DW`.
* For wider words, raise `DATA_W`/`ANGLE_W` in `cordic_pkg`. The
  signed-digit units are width-generic. With the angle in whole degrees,
  more than six stages gain little, because the arctangents shrink below
  one degree.
