# A DSP core with 16-bit floating point storage for MP3 decoding

An MP3 decoder on a fixed point DSP usually spends two 16-bit memory words
on each intermediate sample, because 16 bits of fixed point give too little
range and precision. This core stores every intermediate value as one
**16-bit float** in data memory. It computes in **23-bit floats** held in its
registers. Values are widened on load and rounded on store. Data memory per
value is halved, and the firmware needs no scaling code.

The RTL follows the design in *Using Low Precision Floating Point Numbers to
Reduce Memory Cost for MP3 Decoding*. That paper fixes the number formats,
register count, memories, pipeline depths and instruction classes. It leaves
out the instruction encoding, the stage boundaries and many smaller points;
this RTL fills those in with its own choices. The last section lists them.

## The two float formats

Both formats use the same exponent bias of 11. A memory exponent therefore
turns into a register exponent by sign extension alone.

| format | bits | sign | exponent (two's complement) | mantissa | value | zero code |
|---|---|---|---|---|---|---|
| register float | 23 | [22] | [21:16], -32..31 | [15:0] | (-1)^s · 2^(e-11) · (1 + m/65536) | e = -32 |
| memory float | 16 | [15] | [14:10], -16..15 | [9:0] | (-1)^s · 2^(e-11) · (1 + m/1024) | e = -16 |
| register integer | 16 used | – | – | [15:0] | integer, bits [22:16] written as 0 | – |

This gives about 2^-42 .. 2^21 in registers and 2^-26 .. 2^5 in memory.
There are no denormals, infinities or NaNs.

The integer part of a register sits exactly where a float's mantissa is.
Firmware can use this: put exponent 27 on top of an integer n with `LDH`,
then subtract 2^16 (exponent 27, mantissa 0). The result is n converted to a
float. The same trick, with another exponent, gives a shift.

### Arithmetic rules

All floating point results are rounded **to nearest, ties away from zero**.
They **saturate** to the largest magnitude of their format on overflow. They
**flush to zero** (sign 0) on underflow. These rules are this design's own.

| operation | unit | notes |
|---|---|---|
| add / subtract | `fp_addsub` | aligned in a 38-bit field with a sticky bit, so rounding is exact for cancellation too |
| multiply | `fp_mul` | 17x17-bit significand product; exponent ea+eb-11, +1 when the product is 2 or more |
| round register → memory | `fp_round` | rounds the mantissa at bit 5; exponent > 15 saturates, < -15 flushes to zero |
| expand memory → register | `fp_expand` | exact: sign-extend the exponent, append six zero bits to the mantissa |
| float → integer | `fp_to_int` | round to nearest, saturate to -32768..32767 |

## Organisation

```
            +-------------+   24-bit instr   +------------------------------------+
            | prog_mem    |----------------->|  dsp_core                          |
            | 6800 x 24   |<-----------------|   IF ID EX MEM WB        (integer) |
            +-------------+      pc          |   IF ID EX MEM F1 F2 F3 WB (float) |
            +-------------+  port A r/w      |   regfile 16 x 23, 3R/1W           |
            | data_mem    |<================>|   int_alu, fp_pipe, addr_gen (AR), |
            | 6100 x 16   |<-----------------|   bit_access, pc_stack, decoder    |
            +-------------+  port B read     |                                    |
            +-------------+                  |                                    |
            | const_mem   |<---------------->|                                    |
            | 900 x 23    |                  +------------------------------------+
            +-------------+                          |  IN / OUT ports
   loader port (while in reset) -> all three memories
```

`dsp_top` holds the core and the three memories. Their default depths are
the firmware footprint of an MP3 decoder on this architecture: 6800 program,
6100 data and 900 constant words. While `rst_n` is low the core is held.
The loader port (`ld_we`, `ld_sel` 0/1/2 for program/data/constant,
`ld_addr`, `ld_data`) then writes one word per clock. Execution starts at
address 0 when reset is released.

### Pipelines and the rules software must follow

The core is a load-store machine with two pipelines. They share fetch,
decode and the register write port:

| cycle | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| integer, loads, GETB, IN | IF | ID | EX | MEM | WB | | | |
| floating point | IF | ID | EX | MEM | F1 mul | F2 add | F3 round/convert | WB |

- **IF**: the program counter addresses the program memory (synchronous read).
- **ID**: decode, read up to three registers, and resolve branches.
- **EX**: integer ALU, effective address, AR and bit-pointer updates, stores and I/O.
- **MEM**: load data arrives. LDF widens it, GETB extracts bits, FMACA widens its memory operand.

Like the design it follows, this core has **no dependency checking,
forwarding or stalls**. It always issues one instruction per clock. The
program must be scheduled so that:

1. an integer, load, GETB or IN result is read no earlier than the third
   instruction after it, leaving two in between. An earlier read gets the
   old value, which the end-to-end test checks on purpose;
2. a floating point result is read no earlier than the sixth instruction
   after it;
3. no instruction that writes a register through the integer pipe sits
   exactly three slots after a floating point instruction. Both would write
   back in the same cycle. The float result wins, `wb_conflict` rises, and
   an assertion reports it in simulation;
4. every branch, call and return has one **delay slot**: the next
   instruction always runs. `CALL` pushes the address after its delay slot.
   `BTREE` is the exception (see below).

The register file is write-through. A value written back in a cycle is seen
by the instruction decoding in that cycle. Rules 1 and 2 already count this.

The MAC adds onto its destination register, which it reads in ID like any
other operand. Back-to-back MACs into the same register therefore do not
chain. Spread a sum over six accumulators, or leave five instructions
between MACs into one register.

### Address register, modulo addressing and bit access

There is one dedicated address register, **AR**, in `addr_gen`. Loads and
stores can use it (mode 2 post-increments it, mode 3 does not). So can the
MAC with a memory operand (`FMACA`, which always post-increments) and the
bit access instruction. With `LEN` nonzero, AR runs round the circular
buffer [`BASE`, `BASE+LEN`) and wraps from `BASE+LEN-1` back to `BASE`.
With `LEN = 0` it simply counts up.

`GETB rd, n` returns the next n bits (1..16) of a bit stream stored most
significant bit first in data memory. The position is word AR plus bit
offset BP. The instruction reads words AR and AR+1 together, one on each
data memory port, so a field may straddle a word boundary. BP advances by n.
When BP passes 15 it wraps and AR moves on a word (with modulo, so the
stream can sit in a circular buffer). `SETBP` and `RDBP` write and read BP.

**Huffman trees in program memory.** The Huffman decoder walks its code tree
one bit at a time, with each tree node a single instruction:
`BTREE target` takes the next stream bit. If the bit is 0, execution falls
through to the next instruction; if it is 1, it jumps to `target`. A tree is
therefore laid out as in this example (code a = 0, b = 10, c = 110):

```
root:   BTREE n1        ; bit 0 -> leaf a follows
        OUT   ra, 4     ; leaf a ...
        JMP   root
        NOP
n1:     BTREE n2
        OUT   rb, 4     ; leaf b ...
        ...
```

The bit is only known in MEM, so fetch carries on down the fall-through
path. A fall-through costs nothing. A taken BTREE flushes the three younger
instructions and costs three cycles. Unlike the other branches, BTREE has no
delay slot. The one rule: the instruction right after a BTREE must not be a
`CALL` or `RET`, because its stack action would happen before the BTREE
resolves.

## Instruction encoding

The encoding is this design's own. It uses 24-bit words, `[23:20]` major
opcode and `[19:16]` rd, and is decoded in `instr_decoder`. Names are in
`dsp_pkg`.

| op | mnemonic | fields | effect |
|---|---|---|---|
| 0 | NOP / BTREE target | [19:18] = 0: NOP (all-zero word); 1: BTREE, target [12:0] | no operation / branch to target if the next stream bit is 1 |
| 1 | LDI rd, imm16 | [15:0] | rd = {0, imm16} |
| 2 | LDH rd, imm7 | [6:0] | rd[22:16] = imm7, rd[15:0] kept |
| 3 | ALU rd, ra, rb, fn | ra [15:12], rb [11:8], fn [3:0] | ADD SUB AND OR XOR SHL SHR SRA MOVB on 16 bits |
| 4 | ALUI rd, ra, fn, imm8 | ra [15:12], fn [11:8], imm [7:0] signed | same with an immediate |
| 5 | FPU rd, ra, rb, fn | as ALU | FADD, FSUB, FMUL, FMAC (rd += ra·rb), FMACA (rd += ra·mem[AR], AR++), FRND (rd = round(ra) as a memory word), FINT |
| 6 / 7 | LD / LDF rd, ea | mode [15:14], addr [12:0] or ra [3:0] | integer load / load with widening |
| 8 | ST rd, ea | same | data memory = rd[15:0] |
| 9 | LDC rd, ea | same | rd = constant memory word |
| A | AR ra, sel / rd | ra [15:12], sel [1:0] | sel 0/1/2 writes AR/BASE/LEN from ra, sel 3 reads AR into rd |
| B | GETB rd, n / SETBP ra / RDBP rd | sub [13:12], ra [11:8], n-1 [3:0] | bit access |
| C | JMP / BZ / BNZ / CALL | cond [19:18], ra [17:14], target [12:0] | BZ/BNZ test ra[15:0] |
| D | RET | – | return through the hardware stack |
| E / F | IN rd, port / OUT ra, port | ra [15:12], port [3:0] | I/O ports of `dsp_top` |

Addressing modes: 0 absolute, 1 register indirect (`ra[12:0]`), 2 AR with
post-increment, 3 AR. To store a float, round it first (`FRND`), then `ST`
the result.

The return-address stack (`pc_stack`) is 16 entries deep. Overflow or
underflow sets the sticky output `stack_error`.

## Modules

| file | what it is |
|---|---|
| `dsp_pkg.sv` | formats, opcodes, decoded-instruction struct |
| `dsp_top.sv` | core + memories + loader (top level) |
| `dsp_core.sv` | pipeline, hazard-free by software rules |
| `instr_decoder.sv`, `regfile.sv`, `int_alu.sv` | decode, 16 x 23 register file, integer ALU |
| `fp_pipe.sv` | F1–F3: multiply, add, round/convert |
| `fp_addsub.sv`, `fp_mul.sv`, `fp_round.sv`, `fp_expand.sv`, `fp_to_int.sv` | the float units |
| `addr_gen.sv`, `bit_access.sv`, `pc_stack.sv` | AR with modulo, bit extraction, return stack |
| `prog_mem.sv`, `data_mem.sv`, `const_mem.sv` | memories written as arrays (synchronous read) |

Every module has a self-checking testbench, `tb/tb_<module>.sv`; `dsp_core`
is tested through `tb_dsp_top`. The float testbenches compare the hardware
bit for bit with `tb/fp_ref_pkg.sv`, a model of the formats built on the
simulator's `real` numbers. `tb_dsp_top` runs at the default memory sizes.
It assembles and runs a short program that covers every instruction class:
MAC over a wrapping circular buffer, bit reads across word boundaries,
BTREE, loop, call/return, I/O and the missing interlock. It then compares
every OUT with values computed by the reference model.
`tb_dsp_kernels` runs six small firmware kernels, each a piece of an MP3
decoder:

- integer-to-float conversion with the FSUB trick;
- a 24-tap windowing dot product over a wrapping circular buffer with two
  interleaved accumulators;
- a 12-point IMDCT, y[i] = sum over k of X[k]·cos(pi/24·(2i+7)(2k+1)),
  as 36 memory-operand MACs. It computes six outputs; the other six follow
  by symmetry. The six inputs sit in a six-word circular buffer, so AR
  returns to X[0] by itself after every output;
- dequantisation of small values, sign(v)·|v|^(4/3) times a gain for
  v in [-15, 15], from a 31-entry constant table read by register-indirect
  LDC;
- |m|^(4/3) for mantissas m in [1, 2) as a fifth-order polynomial in
  t = m − 1.5 (Taylor coefficients, Horner's rule). Three evaluations are
  interleaved so that each float result is used exactly six slots later;
- Huffman decoding with a BTREE tree.

Each result is compared bit for bit with the reference model. The
arithmetic results are also held against exact real arithmetic: they must
lie within 2^-10 of it, relative to the size of the value. In practice
the error stays below 3·10^-4. The test also checks that straight-line
code issues one instruction per clock.

## Simulating

With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal rtl/dsp_pkg.sv tb/fp_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v dsp_pkg) tb/tb_dsp_top.sv --top-module tb_dsp_top -o sim
obj_dir/sim
```

A unit test needs only the package, the reference package (for the float
tests) and the files the module instantiates. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. To run your own program,
copy the small assembler functions (`LDI`, `FPU`, `MEMOP`, `BR`, …) at the
top of `tb_dsp_top.sv` and follow the scheduling rules above.

## Capacity against MP3 decoding

The reference firmware figures below come from the published design, not
from running firmware on this RTL: no MP3 decoder firmware is part of it.
With one instruction per clock, the core gives 20 MIPS at 20 MHz. A typical
stream needs 14.6 MIPS and the worst-case stream 19.6 MIPS (48 kHz, short
blocks only, joint stereo), so the worst case fits with a 2% margin. The
default memory depths match the firmware's size exactly. The chosen mantissa
widths, 16 bits in registers and 10 in memory, are the point that the
original compliance study places in the "limited accuracy" class. No
compliance run was possible here.

## Where this RTL departs from, or adds to, the source

Taken from the source: the two formats bit for bit; 16 registers; separate
program, data and constant memories of the given widths and depths;
five- and eight-stage pipelines sharing fetch, decode and write-back; no
dependency checking; a hardware PC stack; branch-if-zero and
branch-if-not-zero; bit access and MAC instructions using one address
register with auto-increment and modulo addressing; round-before-store and
widen-on-load; I/O instructions.

This design's own choices:

- the whole instruction encoding, and the ALU operation set;
- which work sits in which stage, and the one-cycle delay slot;
- rounding mode, saturation and flush-to-zero;
- MAC operand sources: the register form and the memory form through AR;
- a base/length circular buffer for modulo addressing;
- the two-word window of GETB, and BTREE as the one-instruction tree node
  with its flush;
- a second read port on data memory;
- three register read ports;
- a stack depth of 16;
- the loader port;
- IN/OUT without handshakes;
- an active-low asynchronous reset that clears the registers and pipeline,
  but not the memories.

Not included: the MP3 firmware itself. Only the small kernels in
`tb_dsp_kernels` exist, not a full decoder with its Huffman tables, the
exponent table of the x^(4/3) routine, the 36-point IMDCT and the
32-point DCT; the I/O devices on the ports; and
anything board-specific.
