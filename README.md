# ASPE B: a two-lane SIMD VLIW processor for small Hermitian matrix inversion

A linear MMSE detector for an M_R x M_T MIMO-OFDM receiver computes, once
per subcarrier and packet, the estimator matrix

    G = (H^H H + M_T sigma^2 I)^-1 H^H

Its hardest step is inverting J = H^H H + M_T sigma^2 I. This M_T x M_T
matrix is Hermitian positive-definite (HPD). This repository holds
SystemVerilog RTL for a small programmable stream processor, called ASPE B,
whose datapath is sized for that inversion. It also holds testbenches that
run inversion programs, and programs that compute all of G from H, on it.

The processor is a VLIW machine. A sequencer issues one very long
instruction per cycle. The instruction is sliced into 16-bit control words,
one per unit. Units talk through a crossbar (the D-Net) that is
reconfigured every cycle, so a program chains storage and arithmetic units
directly, without a large register file. All units except the input and
output buffers are two-way SIMD, so one program inverts two matrices at
once, one per lane.

## The inversion method

Inversion is **divide and conquer**. Partition the HPD matrix as

    F = [ A    B ]     A: p x p,  C: (M-p) x (M-p)
        [ B^H  C ]

Then A and its Schur complement S = C - B^H A^-1 B are both HPD, and

    F^-1 = [ A^-1 + A^-1 B S^-1 B^H A^-1    -A^-1 B S^-1 ]
           [ -S^-1 B^H A^-1                  S^-1        ]

A^-1 and S^-1 are obtained the same way, recursively, until the blocks are
2x2 or scalar. A 2x2 block is inverted directly:

    [ a   b ]^-1       1      [  c   -b ]
    [ b*  c ]     = -------- ·[ -b*   a ]
                    ac - bb*

This needs only real divisions 1/x, complex multiply-accumulates and
complex subtractions. With p = 2 the 3x3 and 4x4 cases become the
following sequence (R1..R4 are temporaries):

| step | operation             | unit            | ops 3x3 | ops 4x4 |
|------|-----------------------|-----------------|---------|---------|
| 1    | R1 = A^-1 (2x2 direct)| CMAC, DIV       | 6       | 6       |
| 2    | R2 = B^H R1           | CMAC            | 4       | 8       |
| 3    | R3 = R2 B             | CMAC            | 2       | 8       |
| 4    | S = C - R3            | CALU            | 1       | 4       |
| 5    | Z = S^-1              | DIV (3x3), 2x2 direct (4x4) | 1 | 6 |
| 6    | Y = -R2^H Z           | CMAC            | 2       | 8       |
| 7    | R4 = Y R2             | CMAC            | 4       | 8       |
| 8    | X = R1 - R4           | CALU            | 4       | 4       |
|      | F^-1 = [X Y; Y^H Z]   |                 | 24      | 52      |

The 2x2 direct inversion takes six operations:

1. r1 = a·c
2. r2 = r1 - b·b*
3. r3 = 1/r2
4. x = r3·c
5. y = -r3·b
6. z = r3·a

The result is [x y; y* z]. Note that the sign of z is positive, as the
closed-form inverse above requires.

## The machine

| unit | module | count | what it does | issue-to-use latency |
|------|--------|-------|--------------|----------------------|
| SEQ  | `aspe_seq` | 1 | program counter, loop counter, index + dictionary memories, issue/stall | fetch is combinational |
| D-Net | `aspe_dnet` | 1 | crossbar, 11 sources x 13 sinks, new setting each cycle | 0 (combinational) |
| CMAC0, CMAC1 | `aspe_cmac` | 2 | complex multiply / multiply-accumulate, optional conj(a), conj(b), subtract | 2 |
| DIV | `aspe_div` | 1 | real reciprocal 1/re(x) | 4 (`DIV_LAT`) |
| CALU | `aspe_calu` | 1 | complex add, subtract, negate, conjugate, pass | 1 |
| REG | `aspe_regfile` | 1 | 8 registers, one write port, one combinational read port | 0 |
| RAM0-3 | `aspe_ram` | 4 | 256 words each, single port, registered read | 1 |
| I-BUF | `aspe_ibuf` | 1 | 32-word input FIFO, valid/ready | 0 |
| O-BUF | `aspe_obuf` | 1 | 32-word output FIFO, valid/ready | - |

`aspe_b` is the top level, `aspe_pkg` holds the shared types and constants,
and `aspe_fifo` is the FIFO inside the two buffers.

**Data format.** A complex sample is one 32-bit word (`cplx_t`): the real
part is in bits 15:0 and the imaginary part in bits 31:16. Each part is a
16-bit two's-complement fixed-point number with `FRAC` = 12 fractional
bits, so it covers -8 to +8 in steps of 1/4096. A SIMD word (`simd_t`)
holds two samples, lane 0 and lane 1. Every unit except the buffers
applies the same operation to both lanes. Each RAM word and each register
holds one SIMD word.

**Arithmetic.**

- **CMAC.** Accumulates exact products in a 36-bit accumulator per
  component. Its output register holds the accumulator rounded to nearest
  (by adding half an LSB, then shifting right by `FRAC`) and saturated to
  16 bits. A chain such as a·c - b·b* is therefore rounded only once.
- **DIV.** Returns floor(2^24 / x), which is 1/x in the same format. Zero,
  negative and too-small divisors saturate to 0x7FFF. The result's
  imaginary part is zero, so it can feed a CMAC as a real scale factor.
- **CALU.** Saturates its results to 16 bits.

## Writing a program: the instruction word

A VLIW (`vliw_t`) has 16 control words of 16 bits each. An all-zero word
is a no-operation for every unit.

| field | bits | content |
|-------|------|---------|
| `seq` | 16 | `op` (NEXT, JUMP, LOOP, DJNZ, HALT), 8-bit `imm` |
| `dnet` | 64 | 13 four-bit source selects (sink order in `aspe_pkg`: CMAC0 a/b, CMAC1 a/b, DIV, CALU a/b, RAM0-3 write data, REG write data, O-BUF) |
| `cmac0`, `cmac1` | 16 each | `en`, `acc` (add to the accumulator), `neg` (subtract the product), `conj_a`, `conj_b` |
| `div` | 16 | `en` |
| `calu` | 16 | `en`, `op` |
| `ram[0..3]` | 16 each | `we`, `lane_we[1:0]`, `re`, 8-bit `addr` (the same address serves the read and the write) |
| `rf` | 16 | `we`, `lane_we`, `waddr`, `raddr` |
| `ibuf` | 16 | `pop` |
| `obuf` | 16 | `push`, `lane` |

The D-Net sources are zero, I-BUF, REG, RAM0 to RAM3, CMAC0, CMAC1, DIV
and CALU. They are encoded 0 to 10, as listed in `src_e`.

The following rules are what make hand scheduling work. Every program
must respect them.

- An operand is taken from the D-Net in the cycle of the instruction that
  issues the operation.
- A result becomes visible on its unit's output a fixed number of
  instructions later (the latency column above). It **stays there until
  the unit's next result**, so it may be consumed several times, and
  stored later.
- In a CMAC, an operation with `acc` = 1 adds to the accumulator left by
  the previous operation of that unit. A MAC chain can therefore be issued
  back to back, one term per cycle.
- The I-BUF offers its head word on both lanes. A RAM or register write
  picks the lane with `lane_we`, so a sequence of pops can fill lane 0
  with one matrix and lane 1 with another.
- O-BUF `push` stores one lane, so two pushes output both lanes of a
  result.
- **Stalls.** If an instruction pops an empty I-BUF or pushes into a full
  O-BUF, the top raises `stall`. The sequencer then holds the instruction
  and every unit's pipeline is frozen (clock enable `ce` low). Stalls
  therefore never change the relative timing a program was scheduled for.

Example: the inner loop for two 2x2 inversions (23 instructions, from
`tb/tb_aspe_b.sv`). The matrix entries are a, b, c. Time t counts
instructions from the start of the loop body.

| t | action |
|---|--------|
| 0-5 | pop a0, b0, c0, a1, b1, c1 into RAM0/RAM2/RAM1 address 0, lane 0 then lane 1 |
| 6 | read RAM0, RAM1, RAM2 |
| 7 | CMAC0: a·c |
| 8 | CMAC0: acc - b·conj(b) |
| 10 | DIV: 1/CMAC0 |
| 14 | CMAC0: DIV·c; CMAC1: -DIV·b |
| 15 | CMAC0: DIV·a |
| 16, 17 | REG r0 = x, r1 = z |
| 17-22 | push x0 x1 y0 y1 z0 z1; DJNZ back to t = 0 |

**Code compression.** The program is a list of indices (index memory, 256
entries). Each index names a full VLIW in the dictionary (256 entries), so
an instruction that repeats is stored once. The hand-written 2x2 program
has 25 instructions and 22 distinct words. The scheduled programs repeat
few words: the 4x4 inversion has about 95 instructions and 91 distinct
words, and the 4x4 G program about 218 instructions and 211 distinct words
(the exact figures depend on the RAM assignment the scheduler picks). A
dictionary as deep as the index memory holds any program. Both memories are written through the
`idx_*`/`dict_*` ports while the core is idle.

**Running.** A `start` pulse runs the program from address 0 until it
reaches HALT. `busy` is high while it runs, and `done` pulses once at the
end. LOOP n sets the loop counter, and DJNZ jumps while the counter is
nonzero (decrementing it), so "LOOP n-1, body with DJNZ" runs the body n
times. Branches take effect in the next cycle; there is no delay slot.

## What is verified

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`.

| testbench | covers |
|-----------|--------|
| `tb_aspe_cmac` | 20,000 random operations with random options and clock-enable gaps, against a 64-bit model; 2-cycle latency |
| `tb_aspe_div` | 4,000 pipelined reciprocals including saturation cases; freeze under `ce` |
| `tb_aspe_calu` | all operations with saturating operands |
| `tb_aspe_regfile`, `tb_aspe_ram` | lane-masked writes, read timing and hold, against shadow arrays |
| `tb_aspe_ibuf`, `tb_aspe_obuf` | FIFO order, full/empty, lane handling under random traffic |
| `tb_aspe_dnet` | every sink against the source its select names |
| `tb_aspe_seq` | LOOP/DJNZ/JUMP/HALT trace, shared dictionary words, stalls, cycle count |
| `tb_aspe_b` | the whole processor at default parameters running 2x2 direct inversion (see below) |
| `tb_aspe_b_dc` | five programs, 16 random matrices each: 3x3 and 4x4 inversion by divide and conquer with 2x2 blocks (all eight steps above), and G = (H^H H + s I)^-1 H^H from 2x2, 3x3 and 4x4 channels H; bit-exact, F·F^-1 ≈ I or J·G ≈ H^H, cycle count 2 + body length per pair; the programs come from a small list scheduler in the testbench (see below) |

`tb_aspe_b` inverts 26 random 2x2 HPD matrices. Every result word is
checked against a bit-exact model, and F·F^-1 is checked to be close to
I. The testbench also checks:

- the cycle count: 2 + 23 cycles per pair of matrices when nothing
  stalls;
- that input stalls, output stalls (the O-BUF fills up), loop iterations
  and shared dictionary words all occurred.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/aspe_pkg.sv rtl/*.sv tb/tb_aspe_b.sv --top-module tb_aspe_b
    ./obj_dir/Vtb_aspe_b

Each testbench needs only the modules it instantiates plus `aspe_pkg.sv`.
The programs are assembled inside the testbenches by small functions
(`route`, `mac`, `push`, ...). They are the place to start when writing a
new program.

The 2x2 inversion schedule is written by hand. The others are not:
`tb_aspe_b_dc` describes each algorithm as a list of operations on named
values (CMAC chains of one to four products, CALU additions and
subtractions, DIV reciprocals), and a scheduler in the testbench turns
that list into VLIWs. It first gives every value its own RAM address. It
then chooses RAMs by graph colouring, so that the two operands of an
operation never share a RAM port. For G this needs one trick: H is used
row against row in J = H^H H and column against J^-1 in G = J^-1 H^H, so
each word of H is written to two RAMs in the cycle it arrives (the D-Net
can send one source to several sinks), one copy for each use. Finally it places each operation, in list order, at the earliest
cycle at which its operands are stored and its RAM ports and unit slots
are free. It tries 200 random RAM assignments and keeps the one with the
shortest body. The same operation list, run through an integer model,
gives the expected outputs. Its stream formats, per matrix pair, each
word for lane 0 then lane 1: inversion inputs in the order A (a, b, c), B
row by row, upper triangle of C, and outputs in the order Z (upper
triangle), Y row by row, X (upper triangle); G-program inputs H row by
row then s = M_T sigma^2, outputs G row by row.

| program | body cycles per pair | per matrix | published, per matrix |
|---------|---------------------|------------|-----------------------|
| 2x2 inversion (hand) | 23 | 11.5 | 5 |
| 3x3 inversion | about 62 | 31 | - |
| 4x4 inversion | about 93 | 47 | - |
| 2x2 G from H | about 47 | 24 | 11 |
| 3x3 G from H | about 120 | 60 | 59 |
| 4x4 G from H | about 216 | 108 | 83 |

For 52 subcarriers at 250 MHz the G programs take about 4.9 µs (2x2),
12.5 µs (3x3) and 22.5 µs (4x4). A 15 µs budget (10 OFDM symbols of
4 µs, each needing 2.5 µs of decoding) is met for 2x2 and 3x3 but not for
4x4, as is also the case for the published figures (17.3 µs).

## Where this design is its own, and what it lacks

The following follow the source design:

- the unit mix: two CMACs, one DIV, one CALU, 8 registers, four 256-word
  RAMs, the I-BUF and the O-BUF;
- two SIMD lanes in all units except the buffers;
- 16-bit complex data packed real-low/imaginary-high in 32 bits;
- 16-bit control words per unit;
- a sequencer with dictionary-based code compression;
- a data network reconfigured every cycle.

These are this design's own choices, because no source for them was
available:

- the instruction encoding;
- the pipeline depths (CMAC 2, DIV 4, CALU 1, RAM 1);
- the fixed-point format (12 fractional bits), the rounding and the
  saturation;
- the FIFO depths (32) and the stream handshakes;
- the index and dictionary memory sizes (256 and 256);
- the flow-control operations and the single loop counter;
- the stall-freezes-everything rule;
- the program load port;
- the full-crossbar D-Net.

Known gaps:

- **Software.** The programs live in the testbenches. There is no
  assembler outside them.
- **Throughput.** The schedules are straightforward rather than
  software-pipelined (table above). The scheduler keeps operations in
  list order and does not overlap one matrix pair with the next, and
  operands always go through a RAM (no direct unit-to-unit forwarding).
  The published 2x2 figure is reached by interleaving four matrices over
  the two lanes and the pipelines.
- **Precision.** With 16-bit data, 4x4 inversion of 64-QAM channels is
  known to lose about 3 dB against floating point. Pre-scaling of J to
  keep its determinant inside the ±8 range is left to the program.
- **Physical design.** Nothing is specific to a process. The RAMs are
  inferred arrays, not SRAM macros. No clock-frequency or area target is
  built in; the reference implementation ran at 250 MHz in 0.18 µm CMOS,
  on 3.7 mm².
