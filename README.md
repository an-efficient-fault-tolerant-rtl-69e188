# Two-layer evolvable hardware for fault-tolerant GPS attitude search

This is synthesizable SystemVerilog for a platform that keeps working while its processing
elements fail. It is built after the architecture Stefatos and Arslan describe in "An Efficient
Fault-Tolerant VLSI Architecture Using Parallel Evolvable Hardware Technology". Everything this
README adds beyond that architecture is marked as this design's own choice.

The platform has two layers:

* The **computational layer (CPL)** is an 8x8 mesh of processing elements (PEs). Together they
  run one genetic algorithm (GA) with one individual per PE. This is a *fine-grained parallel GA*.
  The GA searches the azimuth, elevation and length of the baseline between two GPS antennas.
  Each PE breeds only with its north, east, south and west neighbours.
* The **control layer (CTL)** is a second 8x8 mesh running a second GA. It watches the 64 CPL
  fitness values and looks for eight *crosses*: a PE plus its four neighbours, all alive. Its
  64 `PE_Enable` lines let only the PEs of those crosses work. A PE that faulty neighbours have
  cut off can never pass its solution on, so it is put on stand-by and does not hold up
  convergence.

Faults are modelled the way the architecture is evaluated: as stuck-at-zero output registers. A
faulty PE shows chromosome 0 and fitness 0.

```
                 meas_x/y/z, start                       ctl_mode, ctl_fault[63:0]
                        |                                          |
          +-------------v--------------+   cpl_fit[64] x 5b  +-----v--------------------+
          | cpl_array (8x8 gps_pe)     |-------------------->| ctl_array (8x8           |
cpl_fault>|  N/E/S/W chromosome+fitness|                     |   ctl_controller)        |
          |  exchange, no wrap-around  |                     |  N/E/S/W exchange        |
          +-------------^--------------+                     +-----+--------------------+
                        | pe_enable[64]                          | 64 x (fitness, PE_Enable[64])
                        |                 +----------------+     |
                        +-----------------| enable_select  |<----+
                                          | fittest ctl    |
                                          +----------------+
```

## Files and hierarchy

| File | Role |
|---|---|
| `rtl/ehw_pkg.sv` | sizes, types (chromosome struct, cross gene), LFSR step, Gray decode, cross fitness / cross mask functions |
| `rtl/cordic.sv` | iterative shift-add CORDIC rotator, 16-entry arctangent ROM |
| `rtl/gps_eval.sv` | fitness of one CPL chromosome: two CORDIC passes, L1 error, 5-bit grade |
| `rtl/gps_pe.sv` | one CPL PE: GA generation loop, PE_Enable, fault input |
| `rtl/cpl_array.sv` | 8x8 mesh of `gps_pe` |
| `rtl/ctl_controller.sv` | one CTL controller: cross-selection GA, PE_Enable vector |
| `rtl/ctl_array.sv` | 8x8 mesh of `ctl_controller` |
| `rtl/enable_select.sv` | chooses the PE_Enable vector that reaches the CPL |
| `rtl/ehw_top.sv` | top: both layers, selection, convergence, attitude read-out |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_ehw_top` is the end-to-end test |
| `tb/tb_fault_sweep.sv` | fault-level sweep of the whole platform, both layers |

## The CPL processing element

### Chromosome

The 32-bit chromosome has the architecture's bit positions:

| bits | 31..24 | 23..14 | 13..0 |
|---|---|---|---|
| field | b (length) | beta (elevation) | phi (azimuth) |

The following are this design's own choices:

* **Gray code.** Each field holds its value in reflected Gray code, so neighbouring values are
  one bit flip apart. With plain binary, the population locked onto values just below a carry
  boundary (for example b = 127 when the answer was 150) and never converged.
* **Decoded ranges.**
  * phi covers 0..360 degrees in 2^14 steps.
  * beta covers -90..+90 degrees as `(beta - 512) * 180/1024` degrees.
  * b is an unsigned length of 0..255 units.
* **Attitude output.** `attitude_o` holds the chromosome itself, so its fields are still
  Gray-coded.

### Fitness (`gps_eval`)

The architecture defines its fitness through GPS attitude equations that it only cites. This
design substitutes a simple, checkable function. The PE rebuilds the baseline vector

```
x = b cos(beta) cos(phi),  y = b cos(beta) sin(phi),  z = b sin(beta)
```

It does this with two passes of one CORDIC core: first it rotates (b, 0) by beta, then it
rotates (b cos beta, 0) by phi. It then takes the L1 distance `err` to a measured baseline
vector, which enters the design at `meas_x_i/meas_y_i/meas_z_i`.

* **Number format.** All lengths are signed Q9.6, that is, in units of 1/64.
* **Fitness grades.** The fitness is 5 bits, read as n/32:
  * Fitness is 31 (0.96875, the convergence value) when `err >> ERR_SHIFT` is 0. With the
    default `ERR_SHIFT = 7`, that means err is below 2 length units.
  * Otherwise, let p be the leading-one position of `err >> ERR_SHIFT` and q the bit below it.
    The fitness is `31 - min(30, 1 + 2p + q)`, which is about two grades per doubling of the
    error.
* **Why 0 is reserved.** A healthy PE never scores below 1, so fitness 0 means a PE with
  stuck-at-zero outputs.

The CORDIC removes its gain K = 1.6468 by multiplying the input by round(2^16/K) = 39797. It
folds angles beyond +-90 degrees by 180 degrees. It carries 4 guard bits on x, y and the angle;
without them, rounding reached about 10 LSB. The ROM holds `round(atan(2^-i) * 2^20 / 2pi)` for
i = 0..15.

### Generation loop (`gps_pe`)

After `start_i`, the PE draws X1 from its LFSR and evaluates it. Each generation then runs:

1. **Neighbour.** Read the four neighbours' chromosomes and fitness, and take the fittest one,
   Xm. Ties go N, E, S, W. If all four read 0 (faulty, or outside the array), the PE crosses
   with itself and only mutation moves it.
2. **Crossover.** One-point crossover at a random cut between 1 and 31 gives two children,
   X' and X''.
3. **Mutation.** Each child gets one random bit flipped, with probability `MUT_THRESH/256`
   (default 1/2).
4. **Selection.** Both children are evaluated. The best of X1, X' and X'' becomes the new X1;
   children win ties. This is elitist, so fitness never falls.
5. **Convergence.** When the fitness reaches 31, the PE stops and holds its solution until the
   next `start_i`.

With `enable_i` (PE_Enable) low, the PE stands by between generations but still shows its
chromosome and fitness to its neighbours.

The architecture's flow chart does not show the children being evaluated, nor the elitist
choice; those steps, the crossover and mutation operators, and the LFSR
(x^32+x^22+x^2+x+1, one seed per PE) are this design's own.

**Timing.** An evaluation takes 37 cycles: 2 x (16 + 1) for the two CORDIC passes, plus 3. A
generation takes 81 cycles.

## The CTL controller

### Chromosome

The chromosome is 64 bits: eight 8-bit genes, with gene i in bits `8i+7..8i`. Each gene is a
cross centre, `{x[3:0], y[3:0]}`, meaning column and row. The architecture gives 8 bits per
coordinate pair; the split into 4 + 4 bits is this design's own.

### Cross validity

A cross is valid only when both of these hold:

* Its centre lies in rows and columns 1..6, so all four arms are inside the array.
* None of its five PEs reports fitness 0.

A valid cross is worth the sum of its five CPL fitness values; an invalid one is worth 0.

### Fitness and convergence

The chromosome's fitness is the sum over its eight crosses. Its maximum is
8 x 5 x 31 = 1240 LSBs = 38.75, which is also the convergence threshold. Repeated centres are
not penalised.

### Generation loop

The controller uses the same loop as the PE, with 64-bit crossover. Two things differ:

* **Re-evaluation.** The CPL keeps changing, so the current chromosome is evaluated again each
  generation, alongside both children.
* **Cross-by-cross evaluation.** Evaluation takes one cross per cycle. During it the controller
  builds the union mask of the valid crosses. The mask of the chromosome it keeps becomes
  `pe_enable_o`.

A generation takes 28 cycles. The controllers never stop; they keep tracking the CPL.

### Reducing the 64 enable vectors (`enable_select`)

Each of the 64 controllers produces a full 64-bit enable vector. The architecture does not say
how these are reduced to the one vector that reaches each PE. This design forwards, through one
register stage, the vector of the fittest controller (lowest index on ties). All PEs are enabled
in two cases: when `ctl_mode_i` is low (CTL out of operation), or while every controller reads 0.

## Convergence, modes and faults (`ehw_top`)

* **`ctl_mode_i = 0`.** The CTL is halted and all PEs are enabled. `system_converged_o` rises
  when every PE reporting non-zero fitness has converged. This rule is this design's own.
* **`ctl_mode_i = 1`.** `system_converged_o` needs two things:
  * the fittest controller is at 38.75;
  * every enabled PE has converged.

  The second condition also stops a controller's stale result from counting right after a
  restart.
* **Fault injection.** `cpl_fault_i[i]` and `ctl_fault_i[i]` force the output registers of
  PE i or controller i to zero. PE index is `row*8 + col`, with row 0 at the north edge. Border
  neighbours read as faulty, and the mesh has no wrap-around.
* **Read-out.** `attitude_o` is the chromosome of the lowest-numbered enabled, converged PE.
  `cycles_o` counts cycles since `start_i`. Per-PE and per-controller fitness, convergence and
  generation counts are all brought out.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/ehw_pkg.sv rtl/ehw_top.sv \
          tb/tb_ehw_top.sv --top-module tb_ehw_top -Mdir obj_top
obj_top/Vtb_ehw_top
```

For any other block, replace the top file and testbench, e.g. `rtl/cordic.sv tb/tb_cordic.sv
--top-module tb_cordic`. The package must come first on the command line.

`tb_ehw_top` uses the top's default parameters. It runs twelve scenarios:

* CPL faults at 0, 15, 30 and 40 % (10, 19 and 26 random faults, each map leaving at least one
  valid cross), with the CTL off and then on;
* a PE cut off on all four sides;
* CPL and CTL faults together.

For every scenario it checks convergence, the quality of the attitude read-out, and that no
faulty PE is enabled. It also checks that six mechanisms each occurred at least once: mode
switch, stand-by, isolated PE, CPL fault, CTL fault and CTL convergence. It compiles in about a
minute and runs in seconds.

`tb_fault_sweep` runs the evaluated fault levels over several random fault maps. It checks
that every run converges and that the CTL shortens convergence at 30 % and 40 % CPL faults. One
run (baseline b = 150, beta = 600, phi = 5000) gave these mean cycles to convergence, over four
fault maps per level:

| CPL faults | CTL off | CTL on |
|---|---|---|
| 0 % | 2 449 | 6 167 |
| 15 % | 10 124 | 5 345 |
| 30 % | 25 534 | 6 598 |
| 40 % | 37 482 | 7 753 |

This reproduces the architecture's main qualitative result. Without the CTL, time grows steeply
with the fault count, because PEs cut off by faults search alone. With the CTL, time stays
nearly flat. At 0 % faults the CTL costs time, because it must first find eight crosses.

The sweep also runs CTL faults of 0, 10, 20 and 30 % against CPL faults of 10, 20 and 35 %, two
maps each. Every run converged, in 3 400 to 14 200 cycles. At this sample size the spread
between fault maps hides any trend with the CTL fault level. The published slowdown as CTL
faults grow is therefore neither confirmed nor contradicted here.

The raw numbers are not comparable with the published iteration counts. This design uses a
different fitness function and its own convergence rule without the CTL. Also, the generation
counts of stand-by PEs are not comparable between the two modes, so compare cycles. The exact
fault maps of the published figures are drawn, not listed, so random maps of the same density
are used instead.

## How far to trust it

* **Block tests.** Every module has a self-checking testbench with an independent reference:
  * `cordic` and `gps_eval`: real-number trigonometry;
  * the PE and the controller: a fitness and enable-mask model;
  * both arrays: a reachability check that each new chromosome came from the right neighbour;
  * `enable_select`: an argmax model.
* **Timing checks.** Cycle counts (17, 37, 81 and 28 cycles) are checked where the design
  defines them.
* **Negative checks.** Each testbench was shown to fail on a deliberately broken copy of its
  module.
* **Not a reproduction.** The fitness function, encodings, GA operators, mutation rate and
  enable reduction are reasoned choices, not the original authors' design. The published area
  and timing figures (0.387 mm^2 per controller, 0.229 mm^2 per GPS PE, 50 ns clock, UMC
  0.18 um) come from the original implementation, not from this RTL.
* **Size.** Each controller evaluates crosses with five 64:1 multiplexers of 5-bit fitness
  values. Coarse synthesis of the whole top gives about 43 000 word-level cells and 60 000
  flip-flop bits; 20 480 further bits are the CORDIC arctangent ROMs, one per PE.
* **Assertions.** `gps_eval` asserts its start/busy handshake. Run with `--assert` to check it.

## Not included

* **GPS receivers and antennas.** The measured baseline vector comes in on ports. Turning
  carrier-phase measurements into that vector is outside this design.
* **Row/column migration network.** This was proposed for future work: an isolated PE would
  swap individuals with every PE in its row and column through multiplexers. It is not part of
  the presented architecture and is not built.
* **Stuck-at-one injection.** The fault ports model stuck-at-zero only, the case the
  architecture was evaluated with. A stuck-at-one bit in a fitness register is argued there to
  be far less harmful. Such a bit could make a controller believe a PE has converged, but the
  next reproduction step keeps the error from spreading. Injecting it would need a second set
  of fault ports.
