# A microprogrammed bit-slice arithmetics processor

This is SystemVerilog RTL for a small microprogrammed arithmetic engine of
the early-1980s bit-slice kind. A graphics terminal uses it to turn
floating-point normalized device coordinates and text and marker attributes
into the 16-bit fixed-point values that a vector display processor takes.
An 8-bit host microcomputer (an I8080) keeps the data structures. It hands
the arithmetic to this processor through two shared memories:

- the **buffer memory** (BM, 1 KB) holds the transformation parameters and
  blocks of coordinates;
- the **control register file** (CR file, 16 x 8) carries the commands and
  the results.

The processor has no fixed instruction set that the host can see. Every
function (floating-point add, multiply, a window-to-viewport transformation,
clipping) is a microprogram in its control memory. The host starts one by
writing a code into a CR register.

The RTL covers the processor itself: the slices, the configuration control,
the microprogram control unit, the condition flags, the iteration counter,
the BM and the CR file. It does not cover the host computer, its memories,
its DMA unit or its bus interfaces. It also holds no microcode: the
testbenches write their own small microprograms.

## Datapath: three slices, one, two or three bytes wide

The execution unit has three 8-bit slices (`am2901_slice`). Each slice models
a pair of Am2901 4-bit elements:

- a 16-word register file with two read ports (A and B) and one write port
  (B);
- a Q register;
- an ALU with eight functions;
- shifters on the RAM (register-file) write path and on Q.

Slice 1 is the least significant byte and slice 3 the most significant.

Each processor microinstruction carries a 3-bit **slice control** field
(SC), one bit per slice. Only the selected slices take part in the
operation. `config_ctrl` turns off the others and chains the selected ones
into a single wider unit: the carry and the shift lines pass from each
active slice to the next active one above it. The number formats use this
as follows:

| format | slices | SC |
|---|---|---|
| exponent of a float (8 bits) | 1 | `001` |
| integer (16 bits) | 1+2 | `011` |
| float mantissa (24 bits) | 1+2+3 | `111` |

The floats are 32-bit, PDP-11 style: a 24-bit mantissa and an 8-bit
exponent.

The shift linkage has these rules:

- On a down shift, the SI bit of the microinstruction enters at the top.
- On an up shift, SI enters Q at the bottom.
- The two double-length shifts treat {RAM, Q} as one register. RAMQD (down)
  passes the bit leaving the RAM at the bottom into Q at the top. RAMQU (up)
  passes the bit leaving Q at the top into the RAM at the bottom.

The double-length shifts are the linkage that shift-and-add multiplication
and shift-and-subtract division need.

All data moves over one 8-bit **AP-bus** (`ap_top`). Its sources are:

- the BM;
- the iteration counter;
- the CR file;
- the lowest active slice's Y output.

Every slice's D input sees only the first three, so no slice output loops
back into a slice within a cycle.

## Microprogram control unit

`mcu` fetches and executes one 32-bit microinstruction per clock. It holds:

- the sequencer (`sequencer`): a 12-bit address, a microprogram counter, a
  4-deep return stack and a loop entry register;
- a 4K x 32 control memory (`control_memory`);
- a pipeline register;
- the condition multiplexer (`cond_mux`);
- the iteration counter (`iter_counter`);
- the decoding of the 4-bit operation code.

The word at the next address is loaded into the pipeline register at the same
clock edge at which the current instruction finishes. A taken jump therefore
costs no extra cycle.

### Instruction formats

| bits | PROC | SEQC | FETCH | AUX |
|---|---|---|---|---|
| 31-28 | OPC | OPC | OPC | OPC |
| 27-19 | S/F/D (Am2901 I8..I0) | 0 | 0 | 0 |
| 18-14 | CNR (bit 18 inverts) | CNR | 0 | 0 |
| 13-12 | SI, CI | 0 | 0 | 0 |
| 11-9 | SC (slices 3,2,1) | JMPADDR 11-9 | 0 (11-10), OFFSET 9-4 | CC (no effect) |
| 8 | unused | JMPADDR 8 | OFFSET | unused |
| 7-4 | RAMB | JMPADDR 7-4 | OFFSET | CONST 7-4 |
| 3-0 | RAMA = CR number | JMPADDR 3-0 | CR number | CONST 3-0 |

The three places where this layout goes beyond the published format chart:

- RAMB sits in bits 7-4.
- RAMA sits in bits 3-0 and doubles as the CR-file address. This works
  because a CR transfer never needs the A port: RDCR writes register B from
  D, and WRCR puts F = 0 OR B on the bus.
- The opcode values in `ap_pkg` are this implementation's own.

The S/F/D codes are the standard Am2901 ones:

- source: AQ AB ZQ ZB ZA DA DQ DZ;
- function: R+S, S-R, R-S, OR, AND, ~R&S, XOR, XNOR;
- destination: QREG NOP RAMA RAMF RAMQD RAMD RAMQU RAMU.

### Instructions

| OPC | mnemonic | effect |
|---|---|---|
| 0 | JOC | jump to JMPADDR if the condition is true (JMP = JOC with CNR `10000`) |
| 1 | COC | call if true; pushes the return address *and the iteration count* (CALL) |
| 2 | ROC | return if true; pops both (RET) |
| 3 | JEXT | jump to {OFFSET, low 6 bits of CR[n]}: macrofunction dispatch |
| 4 | DO | slice operation, continue |
| 5 | DOW | slice operation *while* the condition is true, then continue |
| 6 | LSU | slice operation; the next address becomes the loop entry |
| 7 | LOC | slice operation; jump to the loop entry if the condition is true |
| 8 | LABM | BM address := CONST x 4 |
| 9 | LDCTR | counter := CONST |
| 10 | LABMP | slice operation; BM address := Y x 4 |
| 11 | WRCTR | slice operation; counter := Y |
| 12 | RDMEM | slices load the BM byte (D input); BM address + 1 |
| 13 | RDCTR | slices load the counter |
| 14 | RDCR | slices load CR[n] |
| 15 | WRCR | slice operation; CR[n] := Y |

### Conditions

CNR[3:0] selects a condition and CNR[4] inverts it. In number order:

0. FALSE
1. SIGN1
2. SIGN2
3. SIGN3
4. CARRY3
5. OFL1
6. OFL2
7. ZERO1
8. ZERO2
9. ZERO3
10. NOZERO21 (slices 1 and 2 not both zero)
11. NOZERO (the three slices not all zero)
12. RAM0
13. RAM23
14. CTROFL (counter overflow)
15. DMABUSY

`cond_flags` stores the slice flags (conditions 1-13) at the end of every
cycle in which the slices execute. Only the active slices' flags change.
RAM0 and RAM23 are bits 0 and 23 of the value written back, that is, after
the shift. CTROFL and DMABUSY are live signals. **A condition therefore tests
the result of the previous processor operation.**

## Loops and the iteration counter

This is the part that makes the processor fast at normalization, alignment,
multiplication and division. It is also the part to read carefully.

**DOW** works like a `DO WHILE` statement, one test per clock. In each cycle
it tests its condition first:

- While the condition is true, the DOW executes its slice operation,
  increments the counter and stays at the same address. The pipeline
  register and the microprogram counter are held.
- In the first cycle in which the condition is false, it executes nothing
  and moves on. This costs one cycle.

A loop whose condition starts false therefore runs zero times.

Normalization is a single instruction. After a `DO` that sets the flags from
the mantissa:

```
LDCTR 0
DO   R0 := R0              (SC=111, sets RAM23 = bit 23)
DOW  R0 := R0 << 1 while not RAM23   (SC=111)
RDCTR into R2 (slice 1)    -> number of shifts
DO   R1 := R1 - R2 (slice 1, exponent correction)
```

The DOW takes L+1 cycles for L leading zeros and leaves exactly L in the
counter.

**LSU/LOC** build loops longer than one instruction. LSU records the address
after itself. LOC executes, increments the counter, and jumps back when its
condition is true.

**Counted loops.** The counter is 8 bits wide and CTROFL means "count is
255":

- For LOC, load the counter with 256-N and loop while CTROFL is false. The
  body then runs N times.
- For a DOW with the same condition, load 255-N. A DOW does not count its
  final, false test.

**Subroutines.** A call pushes the counter together with the return address,
and a return restores it. A subroutine may therefore use the counter freely
inside a counted loop of its caller.

## Memories and the host interface

**Buffer memory (`buffer_memory`).** 1024 bytes.

- The host port writes at the clock edge and reads with one cycle of
  latency.
- The processor only reads, through an address register that increments on
  every RDMEM.
- LABM and LABMP load the address register from an 8-bit value scaled by
  four. A base address is therefore always a multiple of one 32-bit float.

**CR file (`cr_file`).** Sixteen registers, each readable and writable from
both sides in the same cycle. When both sides write the same register in
one cycle, the processor's write wins.

Register 15 (`CR_OUT`) is the output buffer. Each processor write to it
raises `dma_req`, which stays high until `dma_ack`. An assertion checks that
`dma_ack` arrives only while a request is pending. The microprogram waits
for a transfer with `JOC DMABUSY` to itself before it writes the next byte.

**Command protocol.** This is the one the testbench microprograms use; it is
microcode convention, not hardware:

1. The host writes parameters into the BM and the CR file.
2. The host writes a command code into CR0.
3. The processor, polling CR0, dispatches with `JEXT`.
4. The processor writes its results and clears CR0.

**Top-level ports (`ap_top`).**

| port group | signals |
|---|---|
| clock and reset | `clk`; `rst` (synchronous, active high; execution restarts at address 0) |
| control memory load | `cm_we`, `cm_waddr`, `cm_wdata` |
| host side of the BM | `bm_host_*` |
| host side of the CR file | `cr_host_*` |
| DMA | `dma_req`, `dma_ack`, `dma_busy` |
| observation | `uaddr` (the microprogram address being fetched) |

Parameters: `CS_DEPTH` = 4096, `BM_DEPTH` = 1024, `CR_OUT` = 15.

## What is taken from the source design and what is not

**Follows the published design:**

- the block structure;
- the three 8-bit Am2901-type slices and their use for the 8, 16 and 24-bit
  formats;
- the 12-bit sequencer built from three 4-bit elements;
- the 32-bit microword with the field positions listed above for OPC,
  S/F/D, CNR, SI/CI, SC/CC, JMPADDR, OFFSET and CONST;
- the instruction list and its meanings;
- the sixteen conditions, each also available inverted;
- the iteration counter: loaded from the MCU or a slice, counting on
  DOW/LOC, readable by the slices, stacked on call;
- the LSU/LOC loop register;
- JEXT dispatch from a CR register;
- the 1 KB BM with its autoincrementing address register;
- the 16 x 8 dual-port CR file with one output register that requests a DMA
  transfer for each byte.

**Choices of this implementation:**

- the opcode values;
- RAMA/RAMB placement, and RAMA shared with the CR number;
- the chaining rules between slices;
- stored flags, so a condition sees the previous operation;
- DOW testing before it executes;
- CTROFL = count 255;
- an 8-bit counter;
- stack depth 4;
- BM address = value x 4;
- CR15 as the output register and its request/acknowledge handshake;
- a writable control memory with a load port;
- the lowest active slice driving the bus;
- carry and overflow 0 for logic functions;
- synchronous reset.

**Not built:**

- **The two-condition cycle** (`DO WHILE Ci; IF Cj THEN op1 ELSE op2`). The
  source describes this as executing in one clock. The word format has only
  one condition field, and how the second condition and the second
  operation are encoded is not known.
- **Multiply/divide hardware beyond the double-length shift linkage.** The
  source mentions special hardware for these without describing it. In
  particular, SI and CI are constant bits of the microword. The carry of an
  addition therefore cannot be shifted into the top of the register in the
  same cycle, nor carried into a second addition.
- **The CC field of the AUX format.** It is decoded by nothing: no AUX
  instruction operates the slices.
- **The microcode.** The original firmware is not available. The
  floating-point routines and the point transformation in the testbenches
  are microcode written for this RTL, so their algorithms and cycle counts
  are not the original's. Only marker clipping (a point test against a viewport),
  the matrix calculations and the clipping boundaries are written. Line
  clipping and text and marker attribute handling are not written. For
  line clipping the original refers to a published algorithm that it does
  not reproduce.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each testbench stops itself with a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_am2901_slice` | random operations against an independent model of the Am2901 tables; every output each cycle and the register file at the end |
| `tb_config_ctrl` | the chaining for every slice selection and destination |
| `tb_cond_flags`, `tb_cond_mux` | the condition table, with random data and exhaustive selection |
| `tb_iter_counter`, `tb_sequencer` | random operation sequences against models; a preset count giving N steps |
| `tb_control_memory`, `tb_buffer_memory`, `tb_cr_file` | contents, address scaling and autoincrement, dual-port priority, DMA request |
| `tb_mcu` | a microprogram covering DOW, call/return with counter restore, conditional jump, JEXT and an LSU/LOC loop; checked against the expected address sequence |
| `tb_ap_top` | end to end at the default sizes (see below) |

`tb_ap_top` loads two microprogrammed macrofunctions, dispatched from CR0
through a jump table:

- **Macro 1** normalizes 24-bit mantissas and corrects the exponent, over 24
  leading-zero counts. It checks the bytes received through the modelled
  DMA channel, the shift count in CR1, and that the DOW took shifts + 1
  cycles.
- **Macro 2** sums up to twenty 16-bit integers in an LSU/LOC loop. A
  subroutine called from the loop overwrites the counter. The test checks
  the sum and, for the case that overflows, the overflow path.

It counts every mechanism and fails if any of them never occurs: DOW repeat,
LOC loop-back, call/return, JEXT, DMA transfer, DMA-busy wait, each of the
8/16/24-bit configurations, overflow and BM reads.

### Workloads run as microprograms

`tb_ap_fp_workload` runs floating-point operations of the kind the
processor is built for. They are written as microprograms:

- **FADD and FSUB:** alignment by a counted DOW; add, or subtract with
  negation; normalization by a DOW on RAM23 with exponent correction from
  the counter.
- **FMUL:** exponent sum on slice 1; a 24-pass shift-and-add mantissa loop
  run by LSU/LOC and the counter.

The test runs 300 random operations. Each result is compared bit for bit
with a model of the same algorithms. It is also compared with real
arithmetic, to a relative error of 2^-20.

The mantissas are truncated, with no guard bits. FMUL pre-shifts its
multiplicand by one place, because SI cannot carry the sum's overflow into
the shift.

The cycle counts run from the command to the last of the four result bytes,
including the DMA handshakes:

| operation | cycles |
|---|---|
| FADD/FSUB | 64-135 |
| FMUL | 147-158 |

The original design's one-cycle conditional add/shift step would make
multiplication considerably faster.

`tb_ap_transform_workload` runs the processor's main job as a
microprogram: transforming POLYLINE points from floating-point normalized
device coordinates to 16-bit device coordinates.

- Each point goes through X1 = A*X + B*Y + C and Y1 = D*X + E*Y + F. That
  is four FMUL and four FADD subroutine calls per point.
- The results are truncated toward zero to 16-bit two's complement by a
  counted DOW. They go out as four bytes through CR15 and the DMA channel.
- The six matrix values sit in the BM. The host writes the points in
  portions, alternately into two BM areas: while the processor transforms
  one portion, the host writes the next into the other area.
- The point address is loaded into the BM address register from a slice
  with LABMP.
- A POLYMARKER command does the same, but outputs a point only if it lies
  inside a marker clipping viewport held in the BM. The bounds are checked
  on the floating-point results, before conversion, by subtracting each
  bound with FADD and testing the sign.
- Zero operands, subtraction with opposite signs, negative outputs, and
  markers both clipped and accepted are counted. The test fails if any of
  them never occurs.

Results are compared bit for bit with a model. They are also compared with
real arithmetic, to within 2 units. The mean is 592 cycles per POLYLINE point.

The MCU has one loop-entry register. The multiply subroutine uses LSU/LOC,
so the point loop cannot: it counts down in a slice register and closes
with a conditional jump.

`tb/ap_fplib_pkg.sv` holds the floating-point subroutine library that the
transform, FDIV/FSQRT, FSIN/FCOS and matrix tests share, together with an integer
model of each routine. Values are kept unpacked in register pairs: the
mantissa in one register across all three slices, and the exponent (slice 1)
and sign (slice 3) in a second register. The library routines are:

| routine | method |
|---|---|
| FADD, FMUL | as in `tb_ap_fp_workload`, with zero operands handled |
| FDIV | restoring division, one quotient bit per LSU/LOC pass |
| FSQRT | five Newton steps s := (a/s + s)/2, each a call of FDIV and FADD |
| FSIN, FCOS | Horner polynomials in a*a (Taylor terms to the 11th/12th power), coefficients in the BM, valid for \|a\| <= pi/2 |
| CONV, OUTF | conversion to 16 bits, packing, output through CR15 |

`tb_ap_fdiv_fsqrt_workload` and `tb_ap_fsin_fcos_workload` run these from a
CR0 command, like the other workloads. Each result is compared bit for bit
with the model and with real arithmetic.

| operation | cycles, command to last result byte | compared with real arithmetic to |
|---|---|---|
| FDIV | 188-242 | 2^-22 relative |
| FSQRT | 860-1028 | 2^-21 relative |
| FSIN | up to 1156 | 2^-20 absolute |
| FCOS | up to 1221 | 2^-20 absolute |

Arguments of FSIN/FCOS outside [-pi/2, pi/2] would need an argument
reduction, which is not written.

`tb_ap_matrix_workload` runs the matrix calculations that precede a
transformation, from the same library:

- the workstation transformation (scale and offset per axis) from a
  window and a viewport;
- its inverse;
- the accumulation of two transformations [A B C; D E F] into one;
- the clipping boundaries. Each side of the clipping rectangle is compared
  with the same side of the workstation window. The compare subtracts the two
  and tests the sign. The inner value of each pair is kept and taken to
  device coordinates with the workstation transformation.

The processor cannot write the BM, so results go out through CR15 like
every other result. The host would store them back. Mean cycle counts are
947 for the workstation matrix, 728 for the inverse, 1940 for the
six-element accumulation and 988 for the four clipping boundaries.

### Running the testbenches

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ap_pkg.sv tb/ap_asm_pkg.sv tb/tb_ap_top.sv --top-module tb_ap_top
./obj_dir/Vtb_ap_top
```

For the unit testbenches, leave out `tb/ap_asm_pkg.sv` and name the unit
testbench instead. Only `tb_mcu`, `tb_ap_top` and the `*_workload`
testbenches use that package. The transform, FDIV/FSQRT, FSIN/FCOS and
matrix workloads also need `tb/ap_fplib_pkg.sv`, named after it.

`tb/ap_asm_pkg.sv` has small functions (`proc`, `seqc`, `fetch`, `aux`) that
assemble microinstructions. They are the quickest way to write new
microcode for experiments.
