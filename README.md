# A 20-bit-instruction RISC processor with DSP operations

This is a small 8-bit processor. Each instruction is a fixed 20-bit word that
carries its two operands inside it. Eleven opcodes are arithmetic and logic
operations. Three are signal processing operations: a 4-point DCT, a 4-point
DFT and a radix-2 FFT butterfly. Every instruction finishes in one clock. Two
arithmetic datapaths stand beside the processor: a four-operand carry save
adder and a 4x4 two-dimensional DCT. Everything is synthesizable
SystemVerilog, and every module has a self-checking testbench.

## The instruction word

```
 19           12 11            4 3        0
+---------------+---------------+----------+
|   y (8 bits)  |   x (8 bits)  |  opcode  |
+---------------+---------------+----------+
```

`x` and `y` are operand **values**, not register numbers. The 8-bit result
goes to the OUTPUT register.

| code | operation | result                  | updates SR |
|------|-----------|-------------------------|------------|
| 0000 | OR        | x \| y                  | yes |
| 0001 | AND       | x & y                   | yes |
| 0010 | NAND      | ~(x & y)                | yes |
| 0011 | NOR       | ~(x \| y)               | yes |
| 0100 | XOR       | x ^ y                   | yes |
| 0101 | XNOR      | ~(x ^ y)                | yes |
| 0110 | ADD       | x + y                   | yes (C, V meaningful) |
| 0111 | SUBTRACT  | x - y                   | yes (C = no borrow, V) |
| 1000 | NOT       | ~x                      | no |
| 1001 | INCREMENT | x + 1                   | no |
| 1010 | DECREMENT | x - 1                   | no |
| 1011 | DCT       | one coefficient of the 4-point DCT | no |
| 1100 | DFT       | one real or imaginary part of the 4-point DFT | no |
| 1101 | FFT       | one output of the butterfly | no |
| 1110, 1111 | unassigned | OUTPUT and SR keep their values | no |

A worked example is `00110011_00001111_0111`: SUBTRACT with x = 00001111 (15)
and y = 00110011 (51). OUTPUT becomes 11011100 (-36) and SR = {N=1, Z=0, V=0,
C=0}.

The status register `status` is `{N, Z, V, C}` (`risc_pkg::status_t`). The
eight two-operand operations load it. N and Z describe the result. V and C
come from the adder for ADD and SUBTRACT and are 0 for the logic operations.

## Timing of the processor

```
edge 1: IR <= mem[0], PC <= 1
edge 2: IR <= mem[1], PC <= 2, OUTPUT <= result of mem[0]
edge 3: IR <= mem[2], PC <= 3, OUTPUT <= result of mem[1]
...
```

* **Fetch.** The PC is a 3-bit up counter with an active-low asynchronous
  reset, so a program is eight words long and repeats after the eighth. The
  PC drives `imem_addr`. The memory must return the word combinationally on
  `imem_data`, and that word is latched into IR at the next rising edge.
* **Decode and execute.** These happen in the cycle where the word sits in
  IR. The result is written to OUTPUT at the next edge.
* One instruction completes every clock. A result appears two rising edges
  after its address was presented.

The instruction memory is not part of the RTL: `imem_addr` and `imem_data`
are top-level ports.

## The DSP operations

All three DSP operations read four 4-bit unsigned samples from the operand
fields: `s0 = x[3:0]`, `s1 = x[7:4]`, `s2 = y[3:0]`, `s3 = y[7:4]`. Each one
produces several results but writes only one 8-bit OUTPUT. Which result gets
written depends on a free-running phase counter. That counter counts clock
edges from reset.

### FFT butterfly (`fft_butterfly`)

This is the hardest part to follow. With `a = s0`, `b = s1`, `e = s2`,
`f = s3` and the fixed twiddle factor `c + jd = 6 + 4j`, the butterfly
computes

```
y0 = (e + jf) + (a + jb)(c + jd)
y1 = (e + jf) - (a + jb)(c + jd)
```

It uses three multipliers instead of four:

| stage | values (width) |
|-------|----------------|
| 1 | s1 = a + b, s2 = d + c, s3 = d - c (4 bits, wrap mod 16) |
| 2 | s4 = a*s3, s5 = c*s1, s6 = b*s2 (4x4 unsigned -> 8 bits) |
| 3 | s7 = s4 + s5 = bc + ad, s8 = s5 - s6 = ac - bd; y0_re = e + s8, y0_im = f + s7, y1_re = e - s8, y1_im = f - s7 (8 bits, wrap mod 256) |

The three stages are combinational, so the whole butterfly fits in one clock.
The stage-1 sums are only 4 bits wide, so the result is the exact complex
product only when nothing wraps. The worked example x = 00110000, y = 0
(a=0, b=3) gives the exact values y0 = -12 + 18j and y1 = 12 - 18j. For
x = 00001111, y = 00110011, `a*s3` becomes 15 * 14 and not 15 * (-2), and
the outputs are 93, 47, -87 and -41 (01011101, 00101111, 10101001, 11010111).

The module streams its four results on `dout` (top-level port `fft_stream`),
one per clock, in the repeating order **y0_re, y1_im, y1_re, y0_im**. Output
`cur` shows the value that will be streamed at the next edge. An FFT
instruction writes `cur` to OUTPUT, so OUTPUT and `fft_stream` agree in that
cycle. After reset, the first value streamed is y0_re. The twiddle value is
set by the parameters `TW_C` and `TW_D`.

### DFT (`dft4`)

`X_k = sum_n s_n exp(-i 2 pi k n / 4)`. For four points the twiddles are
1, -j, -1 and j, so the transform needs only adders and is exact. A DFT
instruction writes, as the 3-bit phase `p` runs from 0 to 7, in order: re(X0),
im(X0), re(X1), im(X1), re(X2), im(X2), re(X3), im(X3). The entry written is
`p[0] ? im(X[p[2:1]]) : re(X[p[2:1]])`.

### DCT (`dct4`)

`F(u) = sqrt(2/N) C(u) sum_x f(x) cos((2x+1) u pi / 2N)`, with N = 4,
C(0) = 1/sqrt(2) and C(u) = 1 otherwise. The coefficients are the exact
values scaled by 256 and rounded:

| value  | constant |
|--------|----------|
| 0.5    | 128 |
| 0.6533 | 167 |
| 0.2706 | 69  |

Each output is a four-term dot product, rounded half up to `OUT_FRAC`
fraction bits. The result is within one unit of the exact value. A DCT
instruction writes `F(p[1:0])`.

A program that needs all results of a transform issues the instruction on
consecutive cycles. The phase is `dsp_phase`, a top-level output, so the
results can be matched to their index.

## Stand-alone datapaths

**Carry save adder (`carry_save_adder`, WIDTH = 4).** This adds four numbers
`a + b + e + f` into a WIDTH+2-bit sum. A full adder takes three bits and
gives two, so a row of full adders turns three words into a sum word and a
carry word, and no carry runs along the row. Three rows of full adders do the
job:

* Row 1 adds `a`, `b` and `e`.
* Row 2 adds the row-1 sum, `f` and the row-1 carries (shifted one bit).
* Row 3 is a ripple row that merges the row-2 sum and carry words.

One extra cell on the left adds the two top carries and produces the two top
sum bits.

**Ripple carry adder (`ripple_carry_adder`, WIDTH = 8).** This is a chain of
full adders. Besides the sum and carry out, it exposes each cell's carry as
`c`. The ALU builds ADD, SUBTRACT, INCREMENT and DECREMENT from this one adder
by choosing its B input and carry in:

| operation | B input | carry in |
|-----------|---------|----------|
| ADD       | y       | 0 |
| SUBTRACT  | ~y      | 1 |
| INCREMENT | 0       | 1 |
| DECREMENT | all ones | 0 |

**2-D DCT (`dct2d`).** This computes the 4x4 transform
`F(u,v) = (2/N) C(u) C(v) sum_x sum_y f(x,y) cos(..x..u) cos(..y..v)` of
signed 8-bit samples. It uses eight `dct4` instances: four on the rows, then
four on the transposed row results. Two fraction bits are kept between the
passes. The 12-bit output stays within 1.5 units of the exact value. It
is combinational and has no instruction. Its ports are `dct_in[x][y]` and
`dct_out[u][v]` at the top.

## Module map

| module | role |
|--------|------|
| `risc_pkg` | opcodes (`opcode_e`), instruction fields struct, status struct |
| `risc_dsp_top` | top: processor plus stand-alone datapaths |
| `instruction_fetch` | 3-bit PC, IR, `ir_valid` |
| `decoder` | field split, one-hot select of 16 operations, operation classes |
| `alu` | eleven arithmetic/logic operations, carry and overflow |
| `register_set` | OUTPUT and SR registers |
| `fft_butterfly` | three-multiplier butterfly with output stream |
| `dft4`, `dct4` | 4-point transforms |
| `dct2d` | 4x4 2-D DCT from eight `dct4` |
| `carry_save_adder`, `ripple_carry_adder`, `full_adder` | adders |

## How far to trust it, and where it departs from the original description

These parts follow the original description:

* the instruction format and opcode table
* the 3-bit PC with active-low reset
* the 8-bit output
* the full-adder structure of both adders
* the butterfly's three stages, operand split and stream order
* the DCT/DFT definitions and the 4x4 DCT built from 1-D DCT blocks

Checked reference values include:

* SUBTRACT and all eleven ALU results for x = 00001111, y = 00110011
* the butterfly's intermediate and final values for two operand sets
* the ripple adder's 01010101 + 11110000 = 1_01000101, with carry vector
  11110000

These are this design's own choices:

* **Operands.** They are immediate fields. There is no general-purpose
  register file, no load/store registers and no move operation, because no
  instruction could address them.
* **Status flags.** The `{N,Z,V,C}` layout and flag definitions.
* **Unassigned opcodes.** 1110 and 1111 act as no-operations.
* **Fetch timing.** One fetch per clock, with an asynchronous memory read.
* **Twiddle factor.** 6 + 4j, recovered from the butterfly's intermediate
  values. Which stream phase follows reset is also this design's choice.
* **DFT and DCT in the processor.** The size N = 4, the choice of samples,
  and the phase-indexed write of one result per instruction.
* **Fixed-point precision.** The precision of the DCT coefficients and
  intermediate results.
* **Carry routing in the carry save adder.** The row-to-row carry wiring.
* **Second DCT dimension.** The second dimension of the 2-D DCT is computed
  with four more 1-D DCTs rather than a dedicated butterfly network. The
  results are the same.
* **Opcode table.** The opcodes follow the instruction table, where 0000 is OR
  and 0001 is AND. One published results table lists these two names the
  other way round.

The serial peripheral bus mentioned for the original system is not
implemented, because its protocol is unspecified.

## Simulating

Each module `rtl/<m>.sv` has a testbench `tb/tb_<m>.sv`. Each testbench
prints one line `TB_RESULT checks=N failures=F` and stops itself through a
watchdog if anything hangs. With verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_risc_dsp_top rtl/risc_pkg.sv tb/tb_risc_dsp_top.sv
./obj_dir/Vtb_risc_dsp_top
```

What the testbenches check:

* **Arithmetic blocks.** These are checked exhaustively (full adder, carry
  save adder, DFT) or with thousands of random vectors. The references are
  integer sums, or the transform formulas evaluated in `real` arithmetic.
* **`tb_risc_dsp_top`.** This runs the whole design at its default parameters
  for about 6000 instructions. It plays the instruction memory and checks the
  PC sequence. It predicts OUTPUT and SR with its own model and checks the two
  stand-alone datapaths. It also resets the processor mid-program, and it
  counts each mechanism: every opcode, every DSP phase, SR update and hold,
  unassigned-code hold, PC wrap, carry, overflow and reset. A mechanism that
  never occurs counts as a failure.

To change the design:

* **Program length.** Set `PC_W` on `risc_dsp_top`.
* **2-D DCT input width.** Set `DCT_IN_W`.
* **Carry save adder width.** Set `CSA_W`.
* **Butterfly twiddle.** Set `TW_C` and `TW_D` on `fft_butterfly`.
* **Operand width.** The processor's operand width is `risc_pkg::DATA_W`.
  The DSP sample split assumes it is 8.
