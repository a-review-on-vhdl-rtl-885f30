# Interlock collapsing ALU (ICALU) in a two-issue execution unit

A machine that issues two instructions per cycle to two ALUs loses that second
ALU whenever the second instruction needs the result of the first:

    ADD R2, R1     ; R2 <- R2 + R1
    ADD R3, R2     ; R3 <- R3 + R2   (needs the new R2)

An ordinary pair of 2-1 ALUs (two operands in, one result out) must run such an
*interlocked* pair in two cycles. The interlock collapsing ALU removes this
stall. It is a **3-1 ALU**: three operands in, one result out. It computes the
two dependent operations as one combined operation,

    R3 <- R3 + R2 + R1                (collapsed: (R2 + R1) + R3)

in the same cycle in which the first ALU computes `R2 <- R2 + R1`. The
interlocked pair then completes in one cycle, just like an independent pair.

This repository holds synthesizable SystemVerilog for:
- the 32-bit ICALU and its parts: the carry save adder, the 8- and 32-bit
  carry lookahead adders, the pre- and post-adder logic blocks and the control
  unit;
- the two-issue unit built around it: a register array, ALU1 (a conventional
  2-1 ALU), the ICALU in place of the second ALU, and the pair decoder that
  detects interlocks.

Collapsing covers add and subtract on 32-bit two's complement numbers, and the
bit-wise operations AND, OR and XOR together with their inverted forms NAND,
NOR and XNOR.

## What the ICALU computes

For operands `a`, `b`, `c`, operations `op1`, `op2` and two mode bits:

| `interlock` | `rev` | result `o`              | use                                   |
|-------------|-------|-------------------------|---------------------------------------|
| 1           | 0     | `(a op1 b) op2 c`       | 2nd instruction's destination is the 1st's |
| 1           | 1     | `c op2 (a op1 b)`       | 2nd instruction's source is the 1st's      |
| 0           | x     | `a op1 b`               | no interlock: plain 2-1 operation     |

The non-interlocked mode adds no hardware of its own. The third operand is
forced to zero and `op2` is taken as ADD, so `a op1 b` is the 3-1 operation
`(a op1 b) + 0`.

Each interlocked pair falls into one of four categories:

| category           | form                  |
|--------------------|-----------------------|
| arith, then arith  | `a ± b ± c`           |
| logic, then arith  | `(a LOP b) ± c`       |
| arith, then logic  | `(a ± b) LOP c`       |
| logic, then logic  | `(a LOP b) LOP c`     |

These four forms shape the datapath:
- A three-operand sum needs a carry save adder (CSA) in front of a carry
  lookahead adder (CLA).
- A logic operation that comes first needs a logic block before the adder.
- A logic operation that comes second needs a logic block after the adder.

## Data path

```
        a   b   c            (each optionally complemented: inv_a, inv_b, inv_c)
        |   |   |
   +----+---+---+----+   +-----------------+
   |   3-1 CSA       |   | Pre-CLA logic   |  L = a LOP b
   |  S = a^b^c      |   |  (a, b)         |
   |  λ = K-controlled carry                |
   +---+--------+----+   +--------+--------+
       S        λ  (hot0 in bit 0) |
       |        |                  |
   M1: S or L --+---------+--------+
       |        |
     INP1     INP2 = λ
       +---+----+
           | 32-bit CLA (+ cin)
           R
     +-----+-----------------+
     |                 Post-CLA logic: P = R LOP c
   M3: R or P
     |
     o
```

**The CSA carry vector replaces a separate second-input multiplexer.** Each
carry cell computes

    λ(i+1) = K2·a(i)·b(i) + K1·b(i)·c(i) + K1·a(i)·c(i) + K3·c(i+1)

The K bits select what the CLA's second input carries:

| K1 K2 K3 | λ                                | used for                   |
|----------|----------------------------------|----------------------------|
| 1  1  0  | full carry of a+b+c, shifted     | arith, then arith          |
| 0  1  0  | `(a & b) << 1`, the carry of a+b | arith, then logic          |
| 0  0  1  | `c`, not shifted                 | logic, then arith          |
| 0  0  0  | 0                                | logic, then logic          |

Bit 0 of λ has no carry to hold in the shifted forms. It takes a *hot one*
(`hot0`) instead.

**Subtraction** uses two's complement: `x − y = x + ~y + 1`. Operands are
complemented ahead of the CSA and the pre-adder logic. A collapsed operation
can hold two subtractions, so it can need two added ones. One goes into λ
bit 0 and the other into the CLA carry input.

**Arith, then logic: `(a ± b) LOP c`.** Here `c` must not enter the adder.
The pre-adder logic block therefore forms the half sum `a ^ b` for INP1, and
K2 alone puts `(a & b) << 1` on INP2. The CLA then produces `a ± b`, and the
post-adder block applies `LOP` with `c`.

**Reversed subtraction: `c − (a op1 b)`.** The 2nd instruction subtracts the
1st result (`SUB Rx, Ry` with Ry being the 1st destination). This is handled in
the control unit:
- if `op1` is arithmetic, `a` is complemented too: `c − a − b` or `c − a + b`;
- if `op1` is logical, the pre-adder block's FINV bit is flipped, so the adder
  sees `~(a LOP b) + c + 1`.

**Logic block control.** Both logic blocks use the same control word:
`FADD FAND FOR FXOR FINV`. After the adder it gives:

| FADD FAND FOR FXOR FINV | P          |
|-------------------------|------------|
| 1 0 0 0 0               | R          |
| 0 1 0 0 0               | R & c      |
| 0 0 1 0 0               | R \| c     |
| 0 0 0 1 0               | R ^ c      |
| 0 1 0 0 1               | ~(R & c)   |
| 0 0 1 0 1               | ~(R \| c)  |
| 0 0 0 1 1               | ~(R ^ c)   |

The pre-adder block works the same way on `a` and `b`. Its FADD row passes
`a`. The post-adder block never sees a complemented `c`.

**The CLA.** It is built from four 8-bit lookahead slices. A second lookahead
level forms the slice carries C8, C16 and C24 from the slices' group generate
and propagate signals. C32 is discarded.

The whole ICALU is combinational: one pass through the CSA, one CLA and the
two logic levels.

## The two-issue unit

Instructions use two addresses: `op rd, rs` means `rd <- rd op rs`, with
16 registers. The unit takes a pair per cycle. `pair_decode` compares
registers to sort each pair into one of three kinds:

| kind       | condition                  | ALU1          | ICALU                                   | cycles |
|------------|----------------------------|---------------|-----------------------------------------|--------|
| parallel   | no dependency              | instruction 1 | instruction 2, `interlock=0`            | 1      |
| collapse   | `rd2==rd1`, `rs2!=rd1`     | instruction 1 | `(R[rd1] op1 R[rs1]) op2 R[rs2]`        | 1      |
| collapse   | `rs2==rd1`, `rd2!=rd1`     | instruction 1 | `R[rd2] op2 (R[rd1] op1 R[rs1])`, `rev` | 1      |
| serial     | `rd2==rs2==rd1`            | 1, then 2     | idle                                    | 2      |

The serial kind covers pairs such as `ADD R1,R2 ; ADD R1,R1`. These need the
first result twice: four source operands, which a 3-1 ALU cannot take. ALU1
runs them one after the other.

**Writes.** Both units write back at the end of the cycle. When both write
the same register, the ICALU wins, because its value is the pair's final
result.

**Handshake.**
- A pair is accepted at a rising clock edge when `pair_valid` and
  `pair_ready` are both high.
- `pair_ready` is low only in the first cycle of a serial pair.
- A pair that has not been accepted must be held unchanged. An assertion
  checks this.

**Other ports.**
- `load_*` writes a register; it has the lowest write priority.
- `dbg_addr`/`dbg_data` read any register combinationally.
- `retired`, `collapsed` and `serialized` report the accepted pair.

**Reset** is synchronous and active low. It clears the registers.

## Parameters and sizes

| item                      | value | origin              |
|---------------------------|-------|---------------------|
| data width                | 32    | original design     |
| CLA slice width           | 8     | original design     |
| registers                 | 16    | chosen here         |
| opcode                    | 3 bits: ADD, SUB, AND, OR, XOR, NAND, NOR, XNOR | chosen here |

Shared types live in `icalu_pkg`: opcodes, the instruction struct and the
control words. `WIDTH` parameters on the blocks default to 32.

## Where this design departs from the original description

These choices were made here; the original description of the ICALU leaves
them open or differs:

- **CLA carry input.** In the original, the lowest 8-bit CLA slice has no carry
  input. Two subtractions in one collapsed operation need two hot ones, and λ
  bit 0 holds only one. So the 32-bit CLA here has a carry input.
- **No separate M2 multiplexer.** The original data flow draws a multiplexer
  choosing among the CSA carry, `c`, an `a·b` term and 0 for the second CLA
  input. Here that choice is made by the K1/K2/K3 carry controls, which the
  original also specifies.
- **How subtraction gets its ones.** The operand complementing and where the
  hot ones enter are not specified in the original; they are this design's.
- **The control unit.** The original names it and its output signals, but not
  how it derives them. The mapping from operations to control signals is this
  design's.
- **Choices for the two-issue unit:**
  - the instruction encoding;
  - the register count;
  - the interlock rule (a dependency through `rd` or `rs`);
  - the reversed-operand form;
  - the serial fallback for four-operand pairs;
  - the load and debug ports.
- **Timing is not modelled.** The original reports that the machine with the
  ICALU only gains when more than about 3% of pairs are interlocked, because
  the ICALU's longer path lengthens the cycle. The RTL has no timing, so that
  break-even point is outside what simulation here can show.

## Verification

Assertions:
- The control unit asserts that λ bit 0 never receives both `c(0)` and a hot
  one.
- It also asserts that each logic block gets at most one function.
- The top asserts the pair-hold rule of the handshake.

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench                 | what it checks |
|---------------------------|----------------|
| `tb_cla8`                 | all 131072 input combinations: sum, carry out, group generate/propagate |
| `tb_cla32`                | carries across slice borders plus 20000 random additions |
| `tb_csa32`                | each K setting: sum, carry identity `S + λ = a + b + c`, `a·b` carry, `c` pass, zero; plus the 4-bit example 0101 + 0011 + 0100 (partial sum 0010, saved carry 1010, total 1100) |
| `tb_pre_cla_logic`, `tb_post_cla_logic` | every control word against bit-wise operators |
| `tb_alu21`                | all eight operations |
| `tb_icalu_ctrl`           | per-category structure of the control word, plus its result through an operator-level model of the data path |
| `tb_icalu`                | all 64 operation pairs × {normal, reversed, non-interlocked} on corner and random operands against in-order execution (288000 checks) |
| `tb_reg_array`            | random multi-port traffic with write collisions, and reset |
| `tb_pair_decode`          | kind, routing and enables for random pairs in both phases |
| `tb_icalu_parallel_unit`  | full unit at default size (see below) |
| `tb_interlock_sweep`      | streams with a fixed share of interlocked pairs (see below) |

**`tb_icalu_parallel_unit`** runs about 3000 random pairs and compares all
16 registers with in-order execution after every pair. It checks one cycle
per pair, and two for a serial pair. It requires each of these to occur at
least once:
- parallel pairs, collapsed pairs and serial pairs;
- each of the four categories;
- both collapse forms;
- reversed subtraction.

**`tb_interlock_sweep`** varies the share of interlocked pairs from 0% to
100%. The unit always takes 200 cycles for 200 pairs. Two plain 2-1 ALUs would
take 200 + (number of interlocked pairs) cycles: 206 at 3%, 300 at 50% and 400
at 100%.

The testbenches need no special flags. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_icalu_parallel_unit \
    -y rtl -y tb +libext+.sv rtl/icalu_pkg.sv tb/tb_icalu_parallel_unit.sv
./obj_dir/Vtb_icalu_parallel_unit
```

Replace the top module and file to run another testbench. Every testbench and
block runs at its default size, and each simulation takes well under a second.

## Files

| file                         | content |
|------------------------------|---------|
| `rtl/icalu_pkg.sv`           | opcodes, instruction and control-word types, reference operation (used by testbenches only) |
| `rtl/icalu_parallel_unit.sv` | top: the two-issue unit |
| `rtl/pair_decode.sv`         | interlock detection and operand routing |
| `rtl/reg_array.sv`           | multi-port register array |
| `rtl/alu21.sv`               | ALU1: 2-1 ALU (CLA + logic stage) |
| `rtl/icalu.sv`               | the 3-1 ALU data path with M1 and M3 |
| `rtl/icalu_ctrl.sv`          | ICALU control unit |
| `rtl/csa32.sv`, `rtl/sum3_1.sv`, `rtl/csa_cary.sv` | carry save adder and its bit cells |
| `rtl/cla32.sv`, `rtl/cla8.sv` | carry lookahead adder |
| `rtl/pre_cla_logic.sv`, `rtl/post_cla_logic.sv` | logic blocks before and after the adder |
