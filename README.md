# Majority-gate adders and a serial-parallel multiplier for quantum-dot cellular automata

Quantum-dot cellular automata (QCA) compute with cells of four quantum dots whose two
electrons sit in one of two diagonal arrangements: polarization +1 (logic 1) or -1
(logic 0). Neighbouring cells copy each other's polarization, so a row of cells is a wire.
The logic primitives are only two: an **inverter** and a **three-input majority gate**

    M(a, b, c) = ab + bc + ca

with AND and OR obtained by tying one majority input to 0 or 1. QCA circuits are timed
by a four-phase clock: the layout is divided into clock zones 90 degrees apart, and each
zone holds its value like a latch while the next one computes. One full clock cycle therefore
spans four zones, and every wire longer than a zone is also a delay.

This RTL describes the arithmetic built on those primitives, at the logic level:

* a one-bit **full adder** of three majority gates and two inverters;
* three parallel adders, **ripple carry**, **carry lookahead** and **conditional sum**;
* a **bit-serial adder** (full adder with its carry looped back through a one-cycle delay);
* a **serial-parallel multiplier** (a carry delay multiplier) built from bit-serial adders,
  once at the level of whole clock cycles and once with its delays counted in clock zones.

Everything is synthesizable SystemVerilog. One clock edge of the RTL stands for one whole
QCA clock cycle (four clock zones), except in `cdm_zone_network`, where one edge is one
clock zone. The cells, clock zones and wire crossings themselves are
physical structures and are not modelled.

## The full adder

The whole family rests on one gate arrangement (`rtl/full_adder.sv`):

    co = M(a, b, ci)
    s  = M(~co, ci, M(a, b, ~ci))

The carry is a single majority gate. The sum needs no XOR: if the carry is 0, at most one
input is 1, and the middle gate with `~ci` together with `ci` decides whether that one is
present; if the carry is 1, `~co` = 0 turns the final gate into an AND of `ci` and the middle
gate, which is 1 exactly when all three inputs are 1. `maj3` and `qca_inv` are the two
primitives.

## The parallel adders

All three adders have the same ports (`a`, `b`, `cin`, `sum`, `cout`) and a `WIDTH`
parameter, default 4. They are purely combinational.

* **`ripple_carry_adder`**: a chain of `full_adder`s, carry in at bit 0, carry out of the top
  bit. This is the structure of the 4-bit QCA layout this design is based on, with ports
  A0..A3, B0..B3, C0, S0..S3 and C4.
* **`carry_lookahead_adder`**: bit generate `g = M(a,b,0)` and propagate `p = M(a,b,1)`;
  inside each `GROUP`-bit group (default 4) every carry is a flat two-level sum of products
  of the g, p bits and the group carry in; groups ripple their carry to the next group; each
  sum bit comes from a `full_adder` fed with the lookahead carry. `WIDTH` must be a multiple
  of `GROUP`.
* **`conditional_sum_adder`**: every bit first computes its sum and carry for both carry-in
  values; log2(WIDTH) levels then merge neighbouring blocks, the lower block's two carries
  choosing which version of the upper block applies; the real carry in makes the last
  choice. `WIDTH` must be a power of two.

Only the adder *types* of the lookahead and conditional sum adders are fixed by the
underlying design; their internal structure here (group size, rippling between groups, the
Sklansky-style merge tree, behavioural 2:1 selections) is a textbook choice. The same holds for
pipelining: QCA adders are naturally pipelined by their clock zones, but the zone assignment
is a layout matter and no pipeline registers are placed here.

## The serial-parallel multiplier

`serial_parallel_multiplier` multiplies an N-bit `a`, which arrives one bit per clock LSB
first on `a_serial`, by an N-bit `b` applied in parallel. It is the part that needs the most
care to use.

### Structure

Stage k (k = 0 .. N-1) forms the partial product `a & b[k]` each clock. Stages 0 .. N-2
each hold a `bit_serial_adder` that adds this partial product to the registered sum of
stage k+1 and keeps its own carry in a one-cycle loop. Stage N-1 has no adder: its partial
product is only registered. The registered sum of stage 0 is the output bit.

    a_serial ──┬───────────┬─────────── ... ──┬──────────┐
             AND b[N-1]  AND b[N-2]         AND b[1]   AND b[0]
               │           │                  │          │
               └─►[reg]──►(+)─►[reg]──► ... ─►(+)─►[reg]─►(+)─►[reg]──► p_serial
                          ↺carry             ↺carry      ↺carry

This row is a carry-save accumulator: each clock it adds `a_t * b` and shifts one place
right, emitting the lowest bit. No carry crosses a stage within a clock, so the clock period
is one full adder regardless of N.

The delays follow the QCA carry delay network, whose delays are counted in clock zones:
each carry loop is four zones (one clock); the multiplier bit moves one stage left in two
zones while the partial sum moves one stage right in two zones, a total skew of one clock
between neighbouring stages; and the product leaves four zones (one clock) after its input
slot. In this RTL the multiplier bit is broadcast to all stages in the same clock and the
whole one-clock skew sits in the register on each stage's sum output. The arithmetic and
the cycle timing at the ports are the same; the zone-by-zone timing is kept in
`cdm_zone_network`, below.

### The clock-zone version

`cdm_zone_network` is the same multiplier with every delay of the QCA network kept, one
register per clock zone, on a clock with one edge per zone:

| path | delay (zones) |
|------|---------------|
| `a_serial` to stage 0 | 1 |
| stage k to stage k+1 on the multiplier-bit path | 2 |
| partial product `a & b[k]` to its adder | 1 |
| adder sum of stage k to the adder of stage k-1 (and stage 0 to the output) | 2 + 2 |
| each adder's carry back to its own carry in | 4 |
| `a_serial` to `p_serial` | 4 |

The adders are `full_adder`s, combinational within their zone. The sum from stage k+1 reaches
stage k four zones after the partial product it meets, so it belongs to the previous bit,
exactly the one-clock skew of the cycle-level version. Every serial bit is held for four
zone clocks on `a_serial` and appears for four zone clocks on `p_serial`, four zones after
it went in; a product takes 8N zone clocks. Hold `b` for the whole frame here: the last
multiplier bit reaches stage N-1 only 2N-1 zones after it entered. Because every loop and skew is a multiple of a
zone and the inputs are held for four zones, the four zone phases compute four identical
copies of the stream. When initialising this version with zero bits instead of `rst_n`,
keep `b` at zero meanwhile: stale bits still travelling on the multiplier-bit path would
otherwise form partial products.

### Frame timing

A multiplication is a frame of 2N clocks:

| clock of frame | `a_serial`          | `b`      | `p_serial` (one clock later) |
|----------------|---------------------|----------|------------------------------|
| 0 .. N-1       | a[0] .. a[N-1]      | held     | p[0] .. p[N-1]               |
| N .. 2N-1      | 0                   | any      | p[N] .. p[2N-1]              |

Product bit t appears on `p_serial` in the clock after slot t, so the 2N-bit product
occupies clocks 1 .. 2N after the frame starts. The N zero slots flush the accumulator:
after them the state is zero again and the next frame may begin immediately, giving one
N-bit product every 2N clocks. In `serial_parallel_multiplier`, `b` only matters while the
N bits of `a` enter; frames of `cdm_zone_network` are the same with every clock four zone
clocks long.

### Initialisation

QCA has no reset; the circuit is initialised by feeding N zero slots, which shift out
whatever the accumulator held (the outputs during those slots are meaningless). That works
here too. In addition, `rst_n` (synchronous, active low) clears all stage and carry
registers in one clock; it is an addition of this RTL.

## Top level

`qca_top` places the units side by side, as separate designs. `rst_n` is synchronous to
`clk` for the cycle-level multiplier and to `zone_clk` for the clock-zone one.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | cycle clock and synchronous active-low reset (multipliers only) |
| `add_a`, `add_b`, `add_cin` | in | ADD_WIDTH, ADD_WIDTH, 1 | operands shared by all three adders |
| `rca_sum`/`rca_cout`, `cla_sum`/`cla_cout`, `csa_sum`/`csa_cout` | out | ADD_WIDTH, 1 | result of each adder |
| `mul_a_serial` | in | 1 | multiplier bit stream, LSB first |
| `mul_b` | in | MUL_WIDTH | parallel multiplicand |
| `mul_p_serial` | out | 1 | product bit stream, LSB first |
| `zone_clk` | in | 1 | clock of the clock-zone multiplier, one edge per zone |
| `zone_a_serial`, `zone_b`, `zone_p_serial` | in, in, out | 1, MUL_WIDTH, 1 | the clock-zone multiplier's bit stream, multiplicand and product stream |

Parameters `ADD_WIDTH` and `MUL_WIDTH` both default to 4 (`rtl/qca_pkg.sv`, which also holds
the lookahead group size). The adders and the multiplier are built for 4, 8 and 16 bits;
only 4 is the default, and the other sizes are reached by parameter.

## What is not here, and where this departs from the original design

* **Carry flow adder.** The source design introduces a "carry flow adder" as its new,
  faster adder, but does not give its logic, so it is not provided.
* **Clock-zone timing.** Cells, the four-phase clock, wires, coplanar (rotated-cell) and
  multilayer wire crossings are physical; their only logic effect is delay, which appears
  here as the one-clock registers of the bit-serial adder and the multiplier, and as the
  zone registers of `cdm_zone_network`. The adders carry no zone timing.
* **Adder internals** of the lookahead and conditional sum adders, and the absence of
  pipeline registers in the adders, are this RTL's choices (see above).
* **Multiplier input path** of the cycle-level version: broadcast instead of a per-stage
  delay line, as explained above; `cdm_zone_network` keeps the delay line. **Reset**: added.

## Verification

Each module has a self-checking testbench in `tb/`, ending with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_maj3`, `tb_qca_inv`, `tb_full_adder` | exhaustive truth tables |
| `tb_ripple_carry_adder`, `tb_carry_lookahead_adder`, `tb_conditional_sum_adder` | all input pairs at 4 bits; carry-propagate cases and 2000 random pairs at 8 and 16 bits (helper `adder_check`) |
| `tb_bit_serial_adder` | 203 streamed 16-bit additions, including the carry coming out in the slot after the word |
| `tb_serial_parallel_multiplier` | back-to-back frames at N = 4 (all 256 pairs, plus the exact clock count), N = 8 (starting from random state, initialised by zero slots only) and N = 16 (random pairs); every product bit is checked at its clock (helper `spm_check`) |
| `tb_cdm_zone_network` | the clock-zone version at N = 4 (all pairs, clock count), 8 (zero-bit initialisation) and 16; every product bit checked in each of its four zones (helper `cdm_check`) |
| `tb_qca_top` | the top at its default sizes: all adder inputs on all three adders; zero-slot initialisation, all 256 multiplications back to back, a reset in the middle of a frame, and further frames; products through the clock-zone network on its own clock; it counts each of these events and fails if one never happens |

To run one with Verilator:

    verilator --binary --timing --top-module tb_qca_top -y rtl -y tb +libext+.sv \
              rtl/qca_pkg.sv tb/tb_qca_top.sv
    ./obj_dir/Vtb_qca_top

The testbenches need only two-valued logic; they reset or initialise whatever they read.
