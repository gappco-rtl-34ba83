# GAPPCO I: a configurable dot-product coprocessor for Geometric Algebra

Geometric Algebra algorithms are expensive when evaluated directly, but once a
symbolic optimiser has expanded them they become a small set of
*sums of products*. Each coefficient of each result multivector is a dot product
of short vectors built from scalar inputs, constants, negated values and
earlier results. Such an optimised program is called a GAPP program (Geometric
Algebra Parallelism Program). GAPPCO I is fixed hardware that evaluates such
programs. It has `N` identical **DotVectors units** that read their operands
from a shared **register file** and write their results back to it. A
**configuration bitstream** sets, for each unit:

- which registers it multiplies, and with which signs;
- whether it forms one 4-term or two 2-term dot products;
- where each result goes, and whether that result is *intermediate* (read
  later by other units) or *final*.

Switching to a different algorithm means loading a new bitstream, not
rebuilding the hardware.

This repository holds synthesizable SystemVerilog for the whole coprocessor,
plus self-checking testbenches. The main test runs the reflection of a sphere
in a plane: it configures the coprocessor from its bitstream and compares
every result with a reference model.

## The worked example: reflection in a plane

A point or sphere `a = (a1, a2, a3, a4)` is reflected in a plane
`m = (m1, m2, m3, m4)`. Here `(m1, m2, m3)` is the plane's normal and `m4` is its
distance from the origin. After optimisation the program is:

```
Dotproduct = a1*m1 + a2*m2 + a3*m3 - m4*1.0            (intermediate)
a_Refl[i]  = 0.5*a_i - Dotproduct*m_i,   i = 1..4      (final)
a_Refl[5]  = 0.5                                       (a constant; the host provides it)
```

With the registers laid out as

| reg | 0-3 | 4-7 | 8 | 9 | 10 | 11-14 |
|-----|-----|-----|---|---|----|-------|
| holds | a1..a4 | m1..m4 | 1.0 | 0.5 | Dotproduct | a_Refl[1..4] |

the program takes three DotVectors units:

- Unit 1 is in 4-width mode. It computes `-(r7)*r8 + r2*r6 + r1*r5 + r0*r4`
  into r10, marked intermediate.
- Units 2 and 3 are in 2-width mode. Each computes two results of the form
  `r9*a_i + (-r10)*m_i` into r11..r14, marked final.

The test `tb/tb_gappco_top.sv` builds exactly this bitstream. With
`a = (1, 1, 1, 1.3)` and `m = (1, 0, 0, 0)` it reads back `Dotproduct = 1`
and `a_Refl[1..4] = (-0.5, 0.5, 0.5, 0.65)`.

## The DotVectors unit (`rtl/gappco_dotvectors.sv`)

```
 MULTx1 ─┐                         ┌──► RESULTx1 (2-width mode)
         ADDx1 ─► DEMUXx1 (EN1) ───┤
 MULTx2 ─┘                         └─┐
                                     ADDx3 ──► RESULTx1 (4-width mode)
 MULTx3 ─┐                         ┌─┘
         ADDx2 ─► DEMUXx2 (EN2) ───┤
 MULTx4 ─┘                         └──► RESULTx2 (2-width mode)
```

- **Multiplier units** (`gappco_mult`). Each operand is negated first if its
  sign bit in the configuration is 1. This is how a GAPP reference to a negated
  value such as `-m4` is carried out.
- **Demultiplexers** (`gappco_demux`). With `EN = 0` the first-level sum goes
  on to `ADDx3`. With `EN = 1` it leaves the unit as a result, and `ADDx3` gets
  0 from that side. `EN1 = EN2 = 0` gives one 4-width unit; `EN1 = EN2 = 1`
  gives two 2-width units.
- **Pipeline.** Multipliers, first-level adders and `ADDx3` each have one
  register stage. The 2-width results are held for one extra cycle, so every
  result is written in the same cycle: 3 cycles after issue (`DV_LAT` in the
  package). A unit accepts a new issue every cycle.
- **Register access.** The eight operand addresses go straight from the
  configuration to eight combinational read ports of the register file. The
  two results go to two write ports.
- **Phase filter.** A result is written only when its configured type matches
  the `phase` input of the current pass. Intermediate and final results can
  therefore come from the same unit, in different passes.

## Number format

Registers are 32 bits wide. Values are signed two's-complement fixed point with
16 fraction bits (Q16.16), set by `FRAC_W` in `rtl/gappco_pkg.sv`. The
multiplier shifts the 64-bit product right by `FRAC_W`, which rounds toward
minus infinity. Multipliers, adders and negation all **saturate** rather than
wrap. The 32-bit width is part of the design. The format, the rounding and the
saturation are choices made for this implementation.

## Configuration bitstream (`rtl/gappco_controller.sv`)

After a one-cycle `configure` pulse, the host sends the bitstream one bit per
cycle on `cfg_bit`, qualified by `cfg_valid`. `cfg_valid` may drop between
bits. Every field is sent most significant bit first:

```
number of GAPP units r                       4 bits
repeat r times:
    number of DotVectors units in this GAPP unit   4 bits
    one 62-bit record per DotVectors unit
```

A record has the following fields, in this order. This order is also the
declaration order of `dv_cfg_t` in the package.

| field | bits |
|-------|------|
| EN1, EN2 | 1 + 1 |
| MULTx1 addr1, sign1, addr2, sign2 | 5 + 1 + 5 + 1 |
| MULTx2 … MULTx4 (same layout) | 3 × 12 |
| RESULTx1 addr, type | 5 + 1 |
| RESULTx2 addr, type | 5 + 1 |

- A sign bit of 1 means the operand is negated. A type bit of 1 means an
  intermediate result; 0 means final.
- The RESULTx2 fields are always sent. In 4-width mode they are ignored, so
  send zeros.
- Counts are plain binary, so a stream can describe up to 15 GAPP units of up
  to 15 DotVectors units each.
- The records of all GAPP units go to physical units 0, 1, 2, … in stream
  order. A "GAPP unit" is therefore a group of neighbouring DotVectors units
  that pass values to each other through the register file; it has no
  hardware of its own.
- If the stream holds more records than the coprocessor has units (`N`), the
  extra records are dropped and `conf_error` is raised.
- `conf_end` rises after the last bit and stays high until the next
  `configure`.

## Running a program

1. The host writes inputs and constants through `host_we/host_addr/host_wdata`.
2. The host pulses `process`. This is accepted only when idle and configured.
3. The controller issues every configured unit once with
   `phase = intermediate`. It waits for the write-back, then issues them again
   with `phase = final`. If no unit has an intermediate result, the first pass
   is skipped.
4. `process_end` rises and stays high until the next `process`. The host
   reads the results on `host_rdata`, which is combinational.

Counting the rising edge that samples `process` as edge 1, `process_end` is
high after edge 9 with an intermediate pass, or after edge 5 without one.
While `busy` is high, host writes are dropped and further `configure` or
`process` pulses are ignored.

Only one level of intermediate results exists: an intermediate result may
depend only on inputs and constants. Deeper chains would need more type bits
and more passes; they are not implemented.

## Files

| file | contents |
|------|----------|
| `rtl/gappco_pkg.sv` | widths, `dv_cfg_t` record, result type, write-port struct, saturation |
| `rtl/gappco_mult.sv` | sign change + fixed-point multiplier, 1 stage |
| `rtl/gappco_add.sv` | saturating adder, 1 stage |
| `rtl/gappco_demux.sv` | result/chain demultiplexer |
| `rtl/gappco_dotvectors.sv` | one 4-width / 2×2-width DotVectors unit |
| `rtl/gappco_regfile.sv` | `M` × 32-bit register file, host port plus 8 read and 2 write ports per unit |
| `rtl/gappco_controller.sv` | bitstream parser, per-unit configuration registers, two-pass run sequencer |
| `rtl/gappco_top.sv` | the coprocessor (top module) |
| `tb/tb_gappco_ref_pkg.sv` | reference fixed-point arithmetic for the tests |
| `tb/tb_gappco_*.sv` | one self-checking testbench per module |

Parameters:

- `N` is the number of DotVectors units on `gappco_top` and
  `gappco_controller`. It defaults to 8; the reflector needs 3.
- `M_REGS = 32` and `ADDR_W = 5` are set in the package. Changing `M_REGS`
  also changes the address fields of the bitstream.
- `FRAC_W = 16` is set in the package.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each also
has a watchdog that counts a failure if the test hangs. Example with plain
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gappco_pkg.sv tb/tb_gappco_ref_pkg.sv tb/tb_gappco_top.sv \
    --top-module tb_gappco_top -o sim
./obj_dir/sim
```

`tb_gappco_top` runs the coprocessor at its default size. It covers:

- the reflector alone, on the worked example and on random inputs;
- two reflectors configured as two GAPP units and run together;
- a final-only configuration, which checks that the intermediate pass is
  skipped and that the run takes 5 cycles instead of 9;
- an oversize bitstream (`conf_error`);
- dropped host writes while busy;
- arithmetic saturation.

It counts each of these mechanisms and fails if one never happens. The unit
testbenches check:

- every multiplier and adder result against the reference, including the
  saturating cases;
- the DotVectors unit cycle by cycle, with back-to-back issues, both modes,
  the phase filter and inactive units;
- the register file against a shadow copy, with all 64 read ports checked
  every cycle;
- the controller's parsing of random bitstreams and its exact issue and
  `process_end` timing.

## How far this follows the published design, and where it departs

The following come from the published design:

- the block structure: controller, register file of 32 × 32-bit registers,
  and `N` DotVectors units;
- the inside of a DotVectors unit: four multipliers, three adders and two
  demultiplexers, with the EN-bit meaning;
- the configuration record: its fields, widths and order;
- the bitstream's unit-count fields;
- the operand sign change before the multiplier;
- the intermediate/final result types;
- the `configure`/`conf_end` and `process`/`process_end` handshakes.

These are choices of this implementation, where the design leaves the point
open:

- the Q16.16 number format, with saturation and rounding toward minus
  infinity;
- `N = 8`;
- bit-serial transport of the bitstream;
- RESULTx2 fields that are always present;
- plain-binary counts, so at most 15 units per field (the design's "up to 16"
  would need a count-minus-one encoding);
- assigning records to consecutive units;
- running intermediate and final results as two passes over all units;
- a 3-cycle pipeline;
- combinational register reads, and register write priority by port number
  (an assertion flags conflicts);
- holding `conf_end` and `process_end` as levels;
- the `busy` and `conf_error` outputs, and dropping host writes while busy.

What is not covered:

- Constant-only results such as `a_Refl[5] = 0.5` use no DotVectors unit. The
  host must write them.
- One run processes one set of inputs. Streaming several input vectors through
  the pipeline is not implemented.
- Division, square root and more than one level of intermediate results are
  not supported.
- Longer chains, such as a rotation built from two consecutive reflections,
  need one run per level. For example, the host can run one reflection,
  reconfigure so the second reflection reads the first one's result
  registers, and run again.
