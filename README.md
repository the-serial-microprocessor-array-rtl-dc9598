# SMA — a bit-serial SIMD array for radar signal processing

The Serial Microprocessor Array (SMA) is a SIMD machine for radar filtering.
Each radar sweep gives a vector of range cells. The array gives every range
cell its own tiny processor:

- processing element *n* holds component *n* of every sweep in its private
  memory;
- all processing elements obey the same instruction stream;
- each element works on one bit per step.

Many very small processors, each bit-serial, trade per-element speed for
a huge element count (around a thousand) and very simple logic. A
processing element (PE) is a one-bit full adder, a few one-bit registers
and a 2048-bit memory.

This repository holds synthesizable SystemVerilog for the array side of the
machine:

- the PE and its parts;
- the PE array with its nearest-neighbour links;
- the Array Function Buffer (AFB), which carries instructions from the host
  clock domain to the array clock domain;
- the microprogrammed Array Control Unit (ACU);
- the stage that turns host instructions into AFB words.

It also has a testbench per block and an end-to-end testbench that runs
two radar filters: an MTI double canceller and a 13-element Barker pulse
compressor.

## System view

```
 host ("Master Computer")        |      array side ("Slave Computer")
                                 |
 instr + R0..R4 --> mc_dispatch --+--> afb (dual clock FIFO) --> acu --> pe_array (N_PE x pe)
   (relocate / index addresses)  |                              |        |   ^
                                 |                   microorders + MAR   |   | par_in  (1 bit / PE)
                                 |                   broadcast each clk  v   | par_out (1 bit / PE)
```

The host is a conventional minicomputer. It is not part of this RTL, and
the top module exposes its side as ports. The host does two things:

- It runs the scalar program.
- When it meets an array instruction, it hands the instruction to the
  array side together with five of its registers:
  - R0: the base of a sliding working area;
  - R1: an index register;
  - R2: a constant operand;
  - R3: operand length L1;
  - R4: operand length L2.

`mc_dispatch` completes the addresses and builds one AFB word. The address
calculation is:

```
logical  = Y            (X = 0)     or   Y + R1   (X = 1)
physical = (logical + R0) mod 128
```

R0 makes circular buffers cheap: advance R0 by the size of one sample after
each sweep, and the same program then finds "this sweep", "last sweep" and
"the sweep before" at fixed logical addresses.

The host and the array run on separate clocks (`mc_clk` and `sc_clk`). The
AFB is a Gray-coded asynchronous FIFO, 8 words deep by default. When it is
full, `instr_ready` drops and the host waits. While the AFB is not empty, the
ACU executes words back to back.

## Memory layout and bit-serial operands

Each PE memory is 2048 bits. It is addressed by an 11-bit MAR:

```
MAR = { word[6:0], bit[3:0] }      128 words x 16 bits
```

Bit 0 of a word is its leftmost bit, the sign. An operand of length L
(4-bit L1 or L2) is bits 0..L of a word: a two's-complement number of L+1
bits with its sign at bit 0. The unused bits L+1..15 are neither read nor
written. Arithmetic runs from bit L (least significant) down to bit 0, so
the carry ripples through time.

## The processing element

```
           +-----------------------------+
 M(MAR) -->| L |--------------+          |
 M(MAR) -->| X |--+           v          |
 SRC ----->|   |  +-> KN --> AND Y --> (b ^ Z) --+
 X(n+-1) ->|   |     select                       \
 X(n+-3) ->|   |                      L or 0 --> full adder --> A --> M(MAR) (write)
           +---+                            R (carry) <-'  '--> par_out
  par_in ------------------------------------------------> A (IN)
  TAG ---- disables the PE when 0, unless the instruction's T bit is 1
```

Registers, all one bit: X, L, A, Y, Z, R and TAG.

- **Adder.** `sum = a ^ (b ^ Z) ^ R`. The carry goes back into R.
  - Subtraction sets Z = 1 and presets R = 1, which forms a − b as
    a + ~b + 1.
  - Z and R can also be loaded from the adder output. Each PE can then
    choose add or subtract from its own data; division uses this.
- **KN network.** It picks the second operand from one of:
  - the PE's own X;
  - the broadcast constant bit SRC;
  - the X register of neighbour n−1, n+1, n−3 or n+3.

  The result is ANDed with Y. This gives "add a neighbour", "add a
  constant" and "pass only the first operand" (Y = 0). PEs beyond the ends
  of the array read 0.
- **TAG.** TAG = 0 freezes every register of the PE, and blocks its memory
  write, for the whole instruction. The only exception is an instruction
  with T = 1, which runs in every PE. This is how data-dependent `if`s are
  done in SIMD.
  - The gating is a clock enable (`en = T | TAG`), not a gated clock.
  - TAG resets to 1 (all PEs enabled).
- **Memory.** Read is combinational from MAR. Write is synchronous and
  happens in the clock in which RW = 1. It writes A.

`par_in` and `par_out` are one bit per PE. In `IN` and `OUT` instructions,
`io_strobe` marks each clock in which a bit moves, and `io_idx` tells which
bit it is, least significant first.

## Array Control Unit and its microprograms

This is the part that needs the most care to read. The ACU has:

- copies of the AFB word fields (SOP, ST, SF1, SF2, SF3, SCO, SL1, SL2);
- two counters, I and J;
- MAR and RW;
- a microprogram counter.

Every clock it broadcasts one bundle of microorders (`pe_ctrl_t`) to all
PEs.

**Microinstruction timing.** Everything below is a fixed convention of this
design:

- All register transfers in one microinstruction use the values from the
  start of the clock. For example, `(SF1,I) -> MAR` and `I-1 -> I` in the
  same word address with the old I.
- A memory read in a clock uses the MAR that the previous microinstruction
  loaded. A write happens in the clock after the microinstruction that set
  RW = 1, and stores the current A.
- Each microinstruction has a condition and two successor addresses. The
  condition tests the old I or J (`I>=0`, `I>0`, `J>0`, `J<=L1`, …).
- Address 0 (the fetch state) waits for a non-empty AFB, takes one word,
  latches it and jumps to the opcode's entry point.
- I and J are 6-bit signed, so "I went below 0" ends a loop.
- SRC, the constant bit for the KN network, is loaded with
  `SCO[15 - MAR[3:0]]` whenever X is loaded from memory. The constant
  therefore stays aligned with the operand bit being read.

Because the memory has one port, one bit of an addition needs three clocks:
read operand 1, read operand 2, write the result. The add loop overlaps
these so that the memory is busy every clock.

| Instruction(s) | Microprogram | Clocks per instruction, fetch clock included |
|---|---|---|
| ADD, SB, ADC, SBC, ADU1, SBU1, ADD1, SBD1 | add loop; KN picks own X, SRC (constant) or neighbour ±1 | 4 + 3·(L1+1) |
| MADU3, MSBU3, MADD3, MSBD3 | two passes: F2 ± nbr±3(F1) → F2, then nbr±3(F1) → F3 | about 6·(L1+1) + 10 |
| TRAN | copy F1 → F3 | about 3·(L1+1) + 3 |
| SHL, SHR | arithmetic shift by N1, read index I, write index J | about 3·(L1+1) + 3 |
| TST, TRT | compare F1 with F2, sign bit → TAG (TRT stores the inverse) | about 2·(L1+1) + 4 |
| TCST, TCRT | compare F1 with R2 | about 2·(L1+1) + 3 |
| TQ, TCQ | compare, then write the result into bit N3 of F3 | about 2·(L1+1) + 7 |
| LOT, COT | bit N1 of F1 → TAG; complement TAG | 4; 2 |
| MUL, MULC | copy the multiplier to IL; clear P in IR; one shift-and-add pass per multiplier bit; the sign bit is subtracted last | 9 + 3·(L2+1) + max(L1,1) + L2·(3·L1+10) + 3·(L1+1) |
| DIV | copy F1 to IL; per quotient bit: a sign compare, then 2P ∓ F2 in place; fix the first and last quotient bits | 9 + 3·(L1+1) + max(L2,1)·(3·(L1+1)+6) |
| ANDB, ORB, CMB | one-bit logic between bit N1 of F1 and bit N3 of F3 | 5–7 |
| IN, OUT | serial word in from `par_in` / out to `par_out` | 2 + 3·(L1+1); 3 + 2·(L1+1) |

### Instruction words

The host-side instruction (`instr_t`, 32 bits) is:

```
 bits 0-6  OP | 7 T | 8 X1 | 9-15 Y1 | 16 X2 | 17-23 Y2 | 24 X3 | 25-31 Y3
```

Shift and bit instructions (opcodes 32–44) reuse bits 16–19 as N1 and bits
20–23 as N3. The AFB word (`afb_word_t`, 54 bits) is:

```
 OP 7 | T 1 | F1 7 | F2 8 | F3 7 | CO 16 | L1 4 | L2 4
```

F2 has 8 bits so that, for the N-format instructions, it can carry
{N1, N3}.

Opcodes:

| Group | Instructions and opcodes |
|---|---|
| No operation | NOP = 0 |
| Arithmetic | ADD 1, SB 2, ADC 3, SBC 4, ADU1 5, SBU1 6, ADD1 7, SBD1 8, MADU3 9, MSBU3 10, MADD3 11, MSBD3 12, MUL 13, MULC 14, DIV 15, TRAN 16 |
| Logic and test | SHL 32, SHR 33, TQ 34, TCQ 35, TST 36, TRT 37, TCST 38, TCRT 39, LOT 40, COT 41, ANDB 42, ORB 43, CMB 44 |
| I/O | IN 64, OUT 65 |

Any other code is dropped at fetch.

Meaning of the arithmetic instructions:

- "U1"/"D1" take the second operand from PE n+1 or n−1.
- "U3"/"D3" take it from PE n+3 or n−3.
- The C forms (ADC, SBC) use the constant R2 in place of F2.
- The move-and-add forms copy the neighbour's F1 into F3 and also add it
  to, or subtract it from, F2.

## Where this design departs from, or fills in, the original description

- **Comparisons.** The tests are defined as "greater or equal". The
  compare loops therefore compute F1 − F2 with the borrow preset so that
  equality counts as true.
  - The result is the sign of an (L1+1)-bit difference. Operands whose
    difference overflows L1+1 bits give the wrong answer. Keep one guard
    bit.
- **Move-and-add.** It is done in two passes, so that the move never
  disturbs the carry of the addition.
- **Microprograms.** The add/subtract microprogram is taken directly from
  the original, together with the test-and-set structure. Multiply and
  divide follow the original's scheme, as described below. The others
  (shifts, moves, bit logic, TQ, IN and OUT) are this design's own.
  - `IN` and `OUT` are timed by the `io_strobe` / `io_idx` handshake,
    which is this design's own.
- **Multiply.** MUL and MULC keep the original scheme:
  - word IR holds a partial product P;
  - each multiplier bit, least significant first, adds F1 or 0 to P and
    halves it;
  - the multiplier's sign bit is subtracted at the end.

  Two things are this design's own:
  - The carry is preset for that last subtraction. The result is exactly
    floor(F1·F2 / 2^L2), kept to L1+1 bits.
  - The multiplier is first copied into word IL (from F2 for MUL, from R2
    for MULC), so both share one loop.
- **Divide.** DIV is a non-restoring division. The remainder P starts as
  F1 in word IL. For each quotient bit:
  - every PE compares the signs of P and F2;
  - the outcome goes into Z and into the quotient;
  - P becomes 2P − F2 or 2P + F2.

  At the end, the first quotient bit is complemented and the last one is
  set to 1. This turns the ±1 digits into two's complement. For
  |F1| < |F2|, the L2+1-bit quotient is within one unit of F1·2^L2/F2. No
  final correction step is applied. F3 must not be the same word as F2.
- **Scratch words.** MUL, MULC and DIV overwrite words 126 (IR) and 127
  (IL), so programs using them must keep data out of those two words.
- **MTI example.** The T bit is 0, so only PEs with TAG = 1 run the filter.
- **Barker example.**
  - The program writes its output to words 122/123.
  - With the published weights, it forms Σ w_s·x(n+s): the code is applied
    mirrored in range. The testbench checks exactly that.
- **Fixed values.** The AFB depth (8), the ACU work words IR = 126 and
  IL = 127, the TAG reset value and the zero padding at the array ends are
  all choices of this design.

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| `sma_top`, `pe_array` | `N_PE` | 1024 | number of PEs |
| `sma_top`, `pe_array`, `pe`, `pe_memory` | `MEM_BITS` | 2048 | bits per PE; must stay 2048 with the 11-bit MAR |
| `sma_top`, `afb` | `AFB_DEPTH` / `DEPTH` | 8 | power of two |
| `acu` | `IR_WORD`, `IL_WORD` | 126, 127 | scratch words |

At the defaults, the array holds 2 Mbit of PE memory and about 7 k
flip-flops.

## Files

| File | What it is |
|---|---|
| `rtl/sma_pkg.sv` | widths, opcodes, instruction and AFB word structs, microorder enums, opcode decode |
| `rtl/pe_alu.sv`, `rtl/pe_kn.sv`, `rtl/pe_memory.sv` | adder, operand select network, bit memory |
| `rtl/pe.sv`, `rtl/pe_array.sv` | one PE; the array with its ±1 and ±3 links |
| `rtl/afb.sv` | dual-clock FIFO with first-word fall-through |
| `rtl/acu.sv` | control store (a `case` function) and ACU registers |
| `rtl/mc_dispatch.sv` | address completion, valid/ready stage |
| `rtl/sma_top.sv` | everything wired together |
| `tb/sma_ref_pkg.sv` | instruction-level reference model (a class) used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_sma_top.sv` | 16-PE end-to-end run: MTI over 8 sweeps, Barker-13, indexed and constant addressing, an AFB-full burst, one MUL, MULC and DIV each |
| `tb/tb_sma_full.sv` | the same machine at its full default size of 1024 PEs |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. A watchdog bounds the run time.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  rtl/sma_pkg.sv tb/sma_ref_pkg.sv rtl/*.sv tb/tb_sma_top.sv \
  --top-module tb_sma_top -o tb
./obj_dir/tb
```

Replace `tb_sma_top` with any other testbench to test one module. The
full-size run (`tb_sma_full`) builds and runs in under a minute.

To write a program:

- Drive `instr`, `r0`–`r4` and `instr_valid` on `mc_clk`, with a valid/ready
  handshake.
- Present input bits on `par_in` when `io_strobe` is high.
- Sample `par_out` when `io_strobe` is high during an `OUT`.

`sc_idle` goes high when the array has finished everything it was sent.
