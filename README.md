# CORDIC atan2 with a look-up-table angle path

This is a pipelined operator that computes `atan2(y, x)` for two W-bit
integers. It uses the CORDIC algorithm in vectoring mode, and it is built for
FPGAs whose logic cells pair a small look-up table with a fast carry chain.

A conventional CORDIC has three datapaths. Two of them, x and y, turn the
vector towards the x axis. The third, z, adds up the angles turned. The z
path costs one adder per iteration. In this design the z path has almost no
adders. The x/y iterations only record the direction of each turn, one bit
per iteration. Those bits are then used in groups of five or six as the
address of a table. Each table holds every angle sum its group can produce,
and only one adder per group adds the table outputs together. For W = 16 the
z path needs 4 tables instead of 17 adders. For W = 24 it needs 5 tables
instead of 25 adders. Each table plus adder still uses the carry chain, so
the design is as fast as the conventional one.

## Angles and numbers

- **Inputs.** `x_in` and `y_in` are W-bit two's complement integers.
- **Output.** `z_out` is the angle as an unsigned W-bit fraction of a full
  turn, in [0, 1):
  - `0` is the +x axis, `2^(W-2)` is +90 degrees and `2^(W-1)` is 180 degrees.
  - Negative angles wrap into the upper half. For example, -90 degrees is
    `3*2^(W-2)`.
- **Why turns.** Inside the design every angle is also held in turns. The
  first two angles, 90 degrees and atan(1) = 45 degrees, are then exactly
  1/4 and 1/8. Addition modulo 2^(W+ZG) gives the wrap-around for free.
- **Accuracy.** With the default word lengths, every result is within one
  LSB of the exact angle ("last-bit accurate"). This holds for every input
  except (0, 0), whose angle is undefined.

## How an operation flows

There are W+1 steps in a row. Each step produces one direction bit
`d[i]`. The bit is 1 when the y value the step looked at was negative.

1. **Pre-rotation** (`atan2_prerot`). CORDIC converges only for start angles
   of about +-100 degrees. So the vector is first turned by a quarter turn
   into the right half plane:
   - if y < 0: (x0, y0) = (-y, x), and the start angle is -90 degrees;
   - if y >= 0: (x0, y0) = (y, -x), and the start angle is +90 degrees.

   This yields `d[-1]`. The start angle itself is not added here. It goes
   into the first table.
2. **Iterations 0 .. W-2** (`atan2_xy_stage`). Iteration i looks at the sign
   of y_i and turns the vector towards the axis by atan(2^-i):
   `x' = x - d*y*2^-i` and `y' = y + d*x*2^-i`, where d = +1 if y < 0 and
   d = -1 otherwise.
3. **Final step.** `d[W-1]` is the sign of y_(W-1). No adder is needed for
   it, because the y it would produce is never used.
4. **Angle path** (`atan2_zlut`). The W+1 direction bits are split into
   groups:
   - The first group has N0 = 6 bits: `d[-1]` and iterations 0-4. Nothing
     has been added up before it, so it is a bare table.
   - Each later group has up to N = 5 bits. Its table output is added to the
     running angle.

   The number of tables is `1 + ceil((W+1-6)/5)`:

   | W  | directions per table | tables | adders |
   |----|----------------------|--------|--------|
   | 12 | 6, 5, 2              | 3      | 2      |
   | 16 | 6, 5, 5, 1           | 4      | 3      |
   | 24 | 6, 5, 5, 5, 4        | 5      | 4      |

   The sizes 6 and 5 suit devices where one 6-input LUT, or one 5-input LUT
   feeding the carry chain, makes one bit of the table. Setting `N = 6`
   gives groups of six, which suits devices with 6-input LUTs in front of
   the adder.

## The tables

The table for the directions `d[s] .. d[s+n-1]` holds, at address `a`:

    T(a) = round( -sum_k d[s+k] * A(s+k) * 2^(W+ZG) )  mod 2^(W+ZG)
    A(-1) = 1/4,   A(i) = atan(2^-i) / (2*pi)

In this formula, d = +1 where bit k of `a` is 1 and d = -1 where it is 0.

- **Rounding.** The first table also adds `2^(ZG-1)`, which is half an
  output LSB. The operator then only truncates the W+ZG-bit sum to its top
  W bits, and the result is rounded to nearest.
- **Where the contents come from.** The contents are computed during
  elaboration from this formula, with the `$atan` and `$floor` real-number
  functions. No data file is read. Synthesis tools turn the constant arrays
  into LUTs.
- **Error.** Each table entry is rounded once. The z-path rounding error
  therefore grows with the number of tables, not with the number of
  iterations. That is why the z path needs fewer guard bits than in a
  conventional CORDIC.

## Word lengths

All the x/y-path savings come from the fact that the angle is the only
output:

- **y narrows.** After iteration m, |y| <= x*2^-(m-1). So y_m keeps only
  `W+4+GY-m` bits (at most `W+2+GY`), one bit more than the bound needs.
  Two's complement arithmetic modulo that width stays exact.
- **x is frozen.** x keeps growing slightly in every iteration, but after
  XF iterations that growth no longer moves the result by a noticeable
  amount. So x has adders only in iterations 0 .. XF-1 and is passed on
  unchanged after that.
- **x is shorter.** x carries GX fraction bits, fewer than the GY of y. y
  needs the extra bits so that its sign, and therefore each direction, is
  right.
- **No adder at the end.** The last iteration has no y adder (step 3 above).

Defaults and what they give (maximum error in simulation, in output LSBs;
exhaustive for W = 12, about 200,000 vectors for W = 16 and 20,000 for
W = 24, in both cases including every vector with |x|, |y| <= 12):

| W  | GX | GY | ZG | XF | max error |
|----|----|----|----|----|-----------|
| 12 | 10 | 12 | 4  | 5  | 0.88      |
| 16 | 10 | 15 | 4  | 6  | 0.98      |
| 24 | 16 | 24 | 5  | 9  | 0.86      |

How these were chosen:

- **The x/y widths** were chosen to make even the smallest input vectors
  last-bit accurate, such as (1, 2) or (-3, 1). These vectors need far more
  fraction bits than large ones. If small inputs do not matter, GX and GY
  can be reduced a lot.
- **Two choices are one step more generous than the published figures**
  (see "Relation to the published method" below):
  - ZG = 3 guard bits for W = 16 gives up to 1.05 LSB in this design, so
    4 is used.
  - Freezing x after 4 iterations at W = 12 gives 1.3 LSB, so it is frozen
    after 5.

## Pipelining and timing

`CYC` sets the number of register stages, from 1 to W+1.

- **Register placement.** Step k (0 = pre-rotation, W = final sign) goes
  into stage `floor(k*CYC/(W+1))`. A register follows the last step of each
  stage. The last register is the output register. So:
  - `CYC = 1` is a combinational operator with registered outputs;
  - `CYC = W+1` (the default, 17) has a register after every step.
- **Latency and rate.** Latency is exactly CYC cycles from the clock edge
  that captures `in_valid` to `out_valid`. A new operation can start every
  cycle.
- **Late table additions.** Each table addition is placed as late as
  possible:
  - the last table goes in the last stage;
  - each earlier table goes one stage before the next one, unless its
    direction bits are not known until later.

  The running angle therefore exists, and is registered, only in the last
  few stages. The direction bits travel down the pipeline as single bits,
  and only until their table has used them. An FPGA packs such delay lines
  into shift-register LUTs.
- **Stages with several additions.** With few stages, several table
  additions can fall into the same stage and are then chained.

Interface of `atan2_cordic`:

| port        | dir | width | meaning                                            |
|-------------|-----|-------|----------------------------------------------------|
| `clk`       | in  | 1     | clock                                              |
| `rst_n`     | in  | 1     | asynchronous active-low reset of the valid flags   |
| `in_valid`  | in  | 1     | `x_in`/`y_in` carry an operation this cycle        |
| `x_in`      | in  | W     | x, two's complement                                |
| `y_in`      | in  | W     | y, two's complement                                |
| `out_valid` | out | 1     | `z_out` holds a result                             |
| `z_out`     | out | W     | angle in turns, unsigned, [0, 1)                   |

The data registers have no reset. Only the valid pipeline is cleared.

Parameters: `W` (16), `GX` (10), `GY` (15), `ZG` (4), `XF` (6), `N0` (6),
`N` (5), `CYC` (17). The constraints are checked at elaboration:
8 <= W <= 60, 1 <= CYC <= W+1, GY >= GX.

## Files

| file                      | contents                                                     |
|---------------------------|--------------------------------------------------------------|
| `rtl/atan2_pkg.sv`        | grouping, table contents, register placement (functions)     |
| `rtl/atan2_prerot.sv`     | quarter-turn pre-rotation                                    |
| `rtl/atan2_xy_stage.sv`   | one x/y CORDIC iteration                                     |
| `rtl/atan2_zlut.sv`       | one table, with or without its adder                         |
| `rtl/atan2_cordic.sv`     | the operator (top)                                           |
| `tb/atan2_tb_harness.sv`  | stimulus and scoreboard used by the operator testbenches     |
| `tb/tb_atan2_*.sv`        | self-checking testbenches                                    |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Examples:

    verilator --binary --timing --assert -Irtl -Itb rtl/atan2_pkg.sv \
        tb/tb_atan2_cordic.sv --top-module tb_atan2_cordic -o sim
    ./obj_dir/sim

    verilator --binary --timing --assert -Irtl -Itb rtl/atan2_pkg.sv \
        tb/tb_atan2_configs.sv --top-module tb_atan2_configs -o sim
    ./obj_dir/sim

What each testbench checks:

- **`tb_atan2_cordic`** runs the operator at its default parameters:
  - about 200,000 operations: directed vectors, every vector with
    |x|, |y| <= 20, and random vectors over the full input range;
  - random idle cycles between operations;
  - every result against a floating-point `atan2`, within one LSB;
  - every latency, against 17 cycles, and the order of the results;
  - that both pre-rotation directions, all quadrants, wrapped angles,
    back-to-back results and idle cycles inside the pipeline all occur.
- **`tb_atan2_configs`** runs the same checks on 17 configurations side by
  side:
  - W = 16 with 1, 2, 3, 4, 5, 9 and 17 stages;
  - W = 24 with 1, 2, 3, 4, 5, 13 and 25 stages;
  - both widths with 6-direction tables;
  - the 12-bit operator with its 6/5/2 tables.
- **`tb_atan2_w12_exhaustive`** feeds all 2^24 - 1 non-zero inputs through
  the 12-bit operator with 13 stages, one per cycle. The largest error is
  0.877 LSB. The run takes about 15 seconds.
- **`tb_atan2_pkg`, `tb_atan2_prerot`, `tb_atan2_xy_stage` and
  `tb_atan2_zlut`** check the blocks on their own. The reference values are
  computed independently: integer arithmetic for the x/y steps, real-number
  angle sums for the tables, and the table count formula together with the
  known groupings for the package.

## Relation to the published method

The method is that of V. Torres Carot, J. Valls Coquillat and M. J. Canet
Subiela, "Optimised CORDIC-based atan2 computation for FPGA
implementations", Electronics Letters 53(19), 2017.

**What the RTL follows.** It follows the publication in these points:

- the pre-rotation;
- the four word-length savings;
- the grouping into one 6-input table followed by 5-input tables with
  adders, and the number of tables;
- the table contents and the rounding constant;
- the output in turns, in [0, 1);
- the 16- and 24-bit operators with the latencies 1 to W+1 that the
  publication's results list.

**Where it departs.**

- **Guard bits on the angle.** The publication reduces them to one less
  than a conventional CORDIC needs: 3 for W = 16, 4 for W = 24. Here they
  are 4 and 5.
- **Freeze point.** The publication's 12-bit example freezes x after four
  iterations. Here it is five.
- **Word lengths of x and y.** The publication does not give them. Here
  they are chosen for last-bit accuracy on every input, small vectors
  included.
- **Sign of the pre-rotation.** The RTL applies the iteration rule to the
  pre-rotation as well (d = +1 for negative y). With this rule every vector
  lands in the right half plane.
- **Device results.** The publication reports LUT and register counts on a
  Kintex-7 and on a Stratix V. They were not reproduced here.

## Where this design makes its own choices

- **Sign convention of the pre-rotation.** `d[-1]` is +1 for negative y, the
  same rule as every other direction. This is the only choice for which the
  pre-rotation equations bring the vector into the right half plane. y = 0
  counts as positive.
- **Fixed-point details.** These are all this design's own:
  - the fixed-point formats;
  - shifts that truncate rather than round;
  - the y-width bound with one bit of margin;
  - GX, GY, ZG and XF.
- **Pipeline details.** Also this design's own:
  - the valid/reset handshake;
  - the even spreading of steps over stages;
  - the exact placement of the table additions.
- **What the RTL does not fix.** The RTL is written at the word level. The
  mapping of each table bit and its adder onto one LUT and one carry cell
  is left to FPGA synthesis. The LUT and register counts of a given device
  therefore depend on the synthesis tool. The RTL does not pin them down.
