# A pipelined coprocessor for conformal geometric algebra

Conformal geometric algebra (CGA) models 3D geometry in a 5D space. It adds
a point at the origin and a point at infinity to the three Euclidean axes.
Points, spheres and planes become 5D vectors. Circles, lines and other
objects become higher-grade elements. Rotations, translations, reflections and
scalings all become "sandwich" products with one kind of operator. This is
attractive for robot kinematics and grasping. In software it is slow, though:
a 5D multivector has 32 coefficients, and a product of two multivectors has
up to 1024 terms.

This RTL is a streaming coprocessor for that algebra. A host writes
instructions into a FIFO and reads results from another FIFO. Between them,
four independent pipelines run in parallel:

| pipeline | opcodes | operands | latency |
|---|---|---|---|
| products | 00xx: geometric, outer, left contraction, right contraction | two quadruples | 3 clocks |
| sums/differences | 010x | two quadruples | 2 clocks |
| unary | 10xx: dual, reverse, conjugate, grade involution | one quadruple | 1 clock |
| motor unit | 11xx: reflection, rotation, translation, dilation | three 5D vectors | 14 clocks |

The first three pipelines form the *CGA ALU*. The motor unit does every
rigid body motion as two reflections in a row, using two identical reflector
pipelines. All arithmetic is IEEE 754 single precision.

The architecture follows the coprocessor in *"An Optimized Architecture for
CGA Operations and Its Application to a Simulated Robotic Arm"*. That
publication gives the block structure, the opcodes, the field widths of the
instruction and result words, and the FIFO sizes. It does not give the inside
of the arithmetic units. Those parts were designed for this RTL, and the
section "What is original and what is this design's own" lists them.

## Instruction and result words

The host interface consists of two plain FIFO ports, each 128 bits wide. An
instruction takes four words and a result takes three. The most significant
word goes first.

```
instruction (512 bits)
  [511:490] id        22-bit tag chosen by the host, returned with the result
  [489:487] tag1      quadruple type of operand A   (basic operations only)
  [486:484] tag2      quadruple type of operand B   (basic operations only)
  [483:480] opcode
  [479:0]   coefficient 0 .. 14, 32 bits each, coefficient 0 at [479:448]

result (384 bits)
  [383:380] 0
  [379:358] id
  [357:355] tag1      type of the first result quadruple
  [354:352] tag2      type of the second result quadruple
  [351:96]  coefficient 0 .. 7
  [95:0]    0
```

How each operation uses the coefficients:

| operation | input coefficients | result |
|---|---|---|
| products | A = 0..3 (type tag1), B = 4..7 (type tag2) | one quadruple in 0..3, type tag1 ^ tag2; tag2 = tag1; 4..7 zero |
| sum/difference, same type | A = 0..3, B = 4..7 | A ± B in 0..3; 4..7 zero |
| sum/difference, different types | as above | A in 0..3 (tag1), ±B in 4..7 (tag2) |
| unary | A = 0..3 | one quadruple in 0..3; 4..7 zero |
| motor | x = 0..4, first mirror = 5..9, second mirror = 10..14 | transformed vector in 0..4; tags and 5..7 zero |

The opcodes are those listed in the table above (`opcode_e` in `cga_pkg`).
The two most significant bits choose the pipeline, and the two low bits
choose the operation within it. Opcodes 0110 and 0111 are not defined. They
go to the sums pipeline and execute as a sum or a difference, chosen by
bit 0.

The pipelines have different latencies, so results can come back out of order.
The host matches each result to its instruction by the `id`.

## Quadruples: how the CGA ALU sees a multivector

The basic operations never see a full 32-coefficient multivector. The host
splits each operand into **quadruples**, which are groups of four
coefficients. Each quadruple has one of eight fixed types, given by a 3-bit
tag. One operation combines one quadruple with another. The host then adds up
the partial results.

The quadruple layout is the least obvious part of this design. A basis
blade is written as a 5-bit mask, where bit *i−1* stands for *e_i*. The group
S = {1, e12, e34, e1234} splits the 32 blades into eight cosets of four.
Type *t* holds these blades:

```
blade(t, k) = rep(t) XOR S[k]
rep(t): t[0] -> e1, t[1] -> e3, t[2] -> e5
S[k]:   k[0] -> e12, k[1] -> e34
```

| type | coefficients 0..3 |
|---|---|
| 0 | 1, e12, e34, e1234 |
| 1 | e1, e2, e134, e234 |
| 2 | e3, e123, e4, e124 |
| 3 | e13, e23, e14, e24 |
| 4 | e5, e125, e345, e12345 |
| 5 | e15, e25, e1345, e2345 |
| 6 | e35, e1235, e45, e1245 |
| 7 | e135, e235, e145, e245 |

Each blade's indices are written in ascending order. For example, coefficient
1 of type 4 multiplies e1∧e2∧e5.

This layout has one important property: S is closed under XOR. As a result,
the product of a type-t1 quadruple and a type-t2 quadruple always lands in the
single quadruple of type t1 ^ t2. Output coefficient *k* gathers exactly four
terms:

```
out[k] = Σ_i  s(i,k) · A[i] · B[i ^ k]
```

Here s is +1, −1 or 0. The sign comes from two sources: reordering the two
blades into canonical order, and the metric factor e5·e5 = −1. The value 0
drops a term that the selected product does not keep:

- **Outer product:** the two blades share no index.
- **Left contraction:** A's blade lies inside B's.
- **Right contraction:** B's blade lies inside A's.

Because of this rule, the products pipeline is a fixed structure: 16
multipliers and a two-level adder tree. The functions `quad_blade`,
`blade_gp_neg` and `blade_keep` in `cga_pkg` compute the signs and masks from
the tags. This happens at run time, so no tables are stored.

A sum of two quadruples of the same type adds them coefficient by
coefficient. Quadruples of different types share no blade, so their sum
simply contains both quadruples. This is why a result may hold two
quadruples.

The unary operations only move coefficients and flip sign bits:

- **Reverse** negates grades 2 and 3.
- **Clifford conjugate** negates grades 1, 2 and 5.
- **Grade involution** negates the odd grades.
- **Dual** is A·I⁻¹, where I = e12345 and I⁻¹ = −I. It maps coefficient k of
  type t to coefficient k ^ 3 of type t ^ 4.

## The motor unit: motions as pairs of reflections

The basis vectors are e1, e2 and e3 (Euclidean), e4 = e+ (square +1) and
e5 = e− (square −1). A reflector computes

```
y = −n x n⁻¹ = x − 2 (x·n)/(n·n) · n,     x·n = x1n1 + x2n2 + x3n3 + x4n4 − x5n5
```

It is a 7-stage pipeline with the following stages:

1. Ten products: x_i·n_i and n_i·n_i, with the e5 terms negated.
2. to 4. An adder tree that forms x·n and n·n.
5. f = 2(x·n)/(n·n).
6. t_i = f·n_i.
7. y_i = x_i − t_i.

Each vector carries a side-band word. The first reflector uses it to carry
the id, the second mirror and a "single reflection" flag. The second reflector
uses the flag to pass its input straight through.

The motor unit returns x reflected in n1 and then in n2. The operation
depends only on the two mirrors the host supplies. The conformal point of p
is P = p + ½|p|² e∞ + e0, where e∞ = e4 + e5 and e0 = (e5 − e4)/2.

- **Reflection (1100):** only n1 is used.
- **Translation (1110) by 2d along the unit vector u:** n1 = u and
  n2 = u + d·e∞. These are two parallel planes a distance d apart.
- **Rotation (1101) by θ about an axis through the origin:** two planes through
  the axis at angle θ/2. For example, n1 = e1 and
  n2 = cos(θ/2)·e1 + sin(θ/2)·e2 rotate about z.
- **Dilation (1111) by (r2/r1)² about the origin:** two spheres centred at the
  origin, n = e0 − ½r²e∞, so e4 = −½ − ½r² and e5 = ½ − ½r².

The result is a conformal point whose weight may have changed. Its
Euclidean part is (y1, y2, y3)/(y5 − y4).

## Controller: fetch, dispatch, issue, collect

`cga_controller` has four parts.

- **Fetch.** The controller reads one instruction-FIFO word per clock. It
  collects four words and moves the finished instruction into a dispatch
  register. This happens in the same clock as the fourth word arrives, so a
  steady stream uses one instruction per four clocks, i.e. 128 bits per clock.
  If the dispatch register cannot empty, at most one finished instruction is
  parked, and fetching stops.
- **Dispatch.** Opcode bits [3:2] select one of four input FIFOs. If that FIFO
  is full, the dispatch register waits. The `dispatch_stall` output is high
  during these clocks.
- **Issue.** The pipelines never stall. Instead, a pipeline starts an
  operation only if its output FIFO will have room for it. The check is:
  operations in flight + entries in the output FIFO < depth. Data read from an
  input FIFO reaches the pipeline one clock later.
- **Collect.** A round-robin pointer chooses a non-empty output FIFO. The
  controller reads one result and writes it to the result FIFO as three words.
  The read of the next result overlaps the last word of the current one, so
  results leave at one per three clocks. A result is read only when the result
  FIFO has room for all three of its words. Words of different results
  therefore never interleave.

Back-pressure works in one direction only. If the host stops reading results,
the following happens in order:

1. The result FIFO fills.
2. Collection stops, and the output FIFOs fill.
3. Issue stops, and the input FIFOs fill.
4. Dispatch stalls, and the instruction FIFO fills. `instr_full` then rises.

No data is lost at any stage.

## Floating point

`fp_add`, `fp_mul` and `fp_div` are combinational IEEE 754 single-precision
units. Each pipeline places registers around them. All three units follow
these rules:

- Rounding is to nearest even.
- Subnormal inputs and results are flushed to zero.
- Overflow gives infinity.
- Invalid operations give the quiet NaN 7fc00000.

The divider divides the integer significands, `(ma << 25) / mb`, and uses the
remainder as the sticky bit.

The published coprocessor used FPGA vendor floating-point cores. Those cores
round to nearest and flush subnormals, so the results should agree. However,
no vendor model was simulated against these units.

## Files and parameters

| file | contents |
|---|---|
| `rtl/cga_pkg.sv` | opcodes, instruction/result structs, word (un)packing, quadruple helpers |
| `rtl/cga_coprocessor.sv` | top level |
| `rtl/cga_controller.sv` | fetch/dispatch/issue/collect |
| `rtl/sync_fifo.sv` | FIFO with synchronous read (block-RAM style) |
| `rtl/cga_alu.sv` | products + sums + unary pipelines |
| `rtl/products_unit.sv`, `rtl/sums_unit.sv`, `rtl/unary_unit.sv` | the CGA ALU pipelines |
| `rtl/motor_unit.sv`, `rtl/reflector.sv` | rigid body motions |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv` | floating point |

The top-level parameters are:

- `IFQ_DEPTH` = `RFQ_DEPTH` = 16384: instruction and result FIFOs, 128-bit
  words. This is the published size.
- `PIPE_DEPTH` = 512: the eight per-pipeline FIFOs, counted in whole
  instructions or results. This depth is this design's choice.

The top's outputs are:

- the two FIFO ports;
- `dispatch_stall`;
- `pipe_start[3:0]`, which pulses when a pipeline starts an operation.

`rst_n` is an asynchronous active-low reset. It clears the control state
only.

## Simulating

Each testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line. The references are in `tb_fp_pkg` and
`tb_ga_pkg`:

- **Single-precision rounding of double-precision results.** This rounding is
  exact for single add, multiply and divide operations.
- **A full 32-coefficient multivector product.** It is built one basis vector
  at a time, and it takes the outer product and the contractions by grade
  selection. The result is therefore checked independently of the quadruple
  shortcut.

For example:

```
verilator --binary --timing --assert -Wno-fatal --top tb_cga_coprocessor \
  rtl/cga_pkg.sv tb/tb_fp_pkg.sv tb/tb_ga_pkg.sv rtl/*.sv tb/tb_cga_coprocessor.sv
./obj_dir/Vtb_cga_coprocessor
```

`tb_cga_coprocessor` runs the top at its default sizes, with three phases:

1. **Mixed.** 400 random instructions covering all 14 opcodes.
2. **Burst.** 200 unary instructions. These must stream at one 128-bit word
   per clock.
3. **Fill.** About 10,500 sums are sent while the results are not read. This
   continues until the instruction FIFO reports full. All results are then
   drained and checked.

The testbench counts each mechanism and fails if any of them never occurs:

- every pipeline starts operations;
- several pipelines are busy at once;
- results come back out of order;
- dispatch stalls;
- the instruction FIFO becomes full.

It takes less than a second in Verilator.

`tb_cga_workloads` also drives the top at its default sizes, but it works on
whole multivectors, the way a host library would. The host model does four
things:

1. It splits random scalars, vectors, bivectors, trivectors and
   pseudovectors into their non-zero quadruples.
2. It sends one instruction per pair of quadruples.
3. It adds the partial results.
4. It compares the sum with the full product.

It runs the same operations as the published evaluation:

- the products, contractions, sums and differences between these grades;
- the operand pairs that the grasping and inverse-kinematics algorithms use;
- the dual;
- the four rigid body motions of a point.

It also rotates one point in two ways and checks that they agree with the
expected rotation:

- on the CGA ALU, as the sandwich R·X·R̃, which takes two rounds of geometric
  products;
- on the motor unit, as one instruction.

For each operation it prints how many hardware clocks the whole batch took.
For example, a bivector-bivector geometric product takes 81 clocks
(16 quadruple instructions). A rotation takes 58 clocks on the CGA ALU and
32 on the motor unit.

The block testbenches cover the remaining checks:

- rounding corner cases of the floating-point units;
- all 64 tag pairs and all four products;
- bit-exact unary and sum results;
- geometric motor-unit cases: a translation by 2 along z, a 90° rotation and
  a dilation by 4;
- each pipeline's latency.

## What is original and what is this design's own

The following follow the published design:

- a controller plus four parallel pipelines with their own input and output
  FIFOs;
- routing by the two opcode MSBs;
- the opcode values 0000–1110;
- the instruction and result field widths;
- the 128 × 16384 instruction and result FIFOs;
- IEEE single-precision coefficients;
- rigid body motions as two cascaded reflections, with the vector and both
  mirrors in one instruction.

The following are this design's own choices, because the publication refers
to earlier work for them or leaves them open:

- **The quadruple layout and the product rule.** The earlier CliffordALU5
  quadruple format may differ. If it does, only `quad_blade` and the tests
  change; the datapath does not.
- **The metric and basis order** e1, e2, e3, e+, e−.
- **The conventions for dual and conjugate.**
- **The reflection formula and the metric it uses.**
- **Opcode 1111 for dilation.** The published opcode table stops at 1110, but
  dilations are a supported operation.
- **How a single reflection is executed.** The second reflector is bypassed.
- **The encoding of sums over two different quadruple types.**
- **The word order on the 128-bit stream.**
- **The three-word result** with 96 zero bits at the end.
- **All latencies, the per-pipeline FIFO depth, the credit-based issue and the
  round-robin collection.**
- **The floating-point units themselves**, including the divider.

The following are not built:

- the host processor;
- its bus interface (burst transfers into the FIFOs);
- the serial console.

The top's FIFO ports are where a bus slave would connect.

The published cycle counts for whole operations include host software time.
That time is spent building quadruples and mirror vectors and moving data
over the bus. The latencies here cover only the hardware pipelines, so the
two sets of numbers cannot be compared.

## Capacity for the robotic workloads

Both target algorithms need only operations that this design provides:

- **Grasping:** geometric and outer products, left contraction, dual and
  translation.
- **Inverse kinematics:** geometric and outer products, left contraction and
  subtraction.

The instruction FIFO holds 4096 instructions. The published run times are
41,250 and 47,500 clocks. At the peak rate of four clocks per instruction,
these times cap each algorithm at about 10,000–12,000 instructions.
Instructions and results stream through the FIFOs, so the FIFO depth does
not limit the length of a program.
