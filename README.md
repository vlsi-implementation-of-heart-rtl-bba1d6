# MESA: a 16-bit maximum-entropy spectral-analysis processor

MESA is a small special-purpose DSP. It computes the all-pole (autoregressive)
model of a short record of heart-sound samples with Burg's maximum-entropy
method. The host loads up to about 120 16-bit samples into the chip's data RAM,
releases RESET and waits for READY. The predictor coefficients are then left in
that RAM. The spectrum is the inverse of the predictor filter's squared frequency
response, and it is computed off-chip, for example with an FFT of the
coefficients.

The Burg recursion needs three kinds of arithmetic:
- long multiply-accumulate sums (the numerator and denominator of each
  reflection coefficient, and the mean value of the data);
- one division per model order, to form the reflection coefficient;
- multiply-and-add updates of the data and coefficient arrays.

So the chip is built around three pieces:
- a pipelined 16x16 Booth multiplier whose carry-save output feeds a 32-bit
  accumulator;
- a non-restoring divider that reuses the accumulator's adder;
- a hardwired control unit that runs a fixed 512-word program from ROM.

The machine has a Harvard layout: a 512 x 9 program ROM, and a 256 x 16 data
RAM split into two pages of 128 words. It runs one instruction per clock. The
intended clock is 20 MHz, so an instruction takes 50 ns.

This RTL implements the whole digital part of the chip. Not included are the pad
drivers and supplies, and the off-chip spectrum computation. See
"Departures and limitations" before relying on the shipped program: the
arithmetic, the control and the division subroutine are verified, but the full
analysis program does not run to completion in this model.

## Block map

```
mesa_processor                  top: pins, reset-time pin mux, A1, RAM, ROM
 ├─ program_rom                 512 x 9, read on the falling edge (image: mesa_program.hex)
 ├─ control_unit                PC, stack, flags, branch logic, control word (falling edge)
 ├─ addr_counter  (A1)          7-bit RAM address register/counter, host or program driven
 ├─ data_ram                    256 x 16 with output latch ML
 └─ processing_unit             registers, accumulator, divider control (rising edge)
     ├─ addr_counter (A2)       second 7-bit counter
     ├─ mac_unit                MU1, MU2 operand shift register and 63-bit MU3
     │   └─ multiplier16        Booth recoding + 4-2 compressor tree, carry-save result
     │       ├─ booth_encoder   8 partial-product rows, add-one sign extension
     │       └─ compressor_row  rows of compressor_4_2 cells
     ├─ cla_adder32             shared 32-bit carry-look-ahead adder, split mode at bit 16
     │   ├─ cla4_slice
     │   └─ cla_carry_gen
     ├─ div_control             add/subtract choice and quotient bit
     └─ div_ovf_detect          division overflow from the first step
mesa_pkg                        opcodes and the control-word struct cur_t
```

## Pins and the host protocol

While **RESET = 1** the processor is stopped with PC = 0, and the host owns the
RAM and the address register A1. Each pin action takes effect on a rising clock
edge.

| Pin | Meaning while RESET = 1 |
|---|---|
| AEN | enables A1 for a load or count |
| L/C | 1: load A1 from AD6-AD0, or preset it to 1111111 if SET = 0. 0: count |
| SET (active low) | preset A1 to all ones, when L/C = 1 |
| U/D | count direction: 0 up, 1 down |
| MS | selects the RAM |
| R/W | 1: write {D15-D7, AD6-AD0} at (page, A1). 0: read into the output latch |
| P1/0 | RAM page |

A write and a count of A1 can happen in the same cycle. This is how an array is
streamed in.

The data pins are bidirectional on the real chip. Here they are split into:
- `ad_in`/`d_in`, driven by the host;
- `data_out` with the enable `data_oe`, driven by the chip.

`data_oe` is high only for a host read: RESET = 1, MS = 1 and R/W = 0.

When **RESET = 0** the program runs from address 0, and the host inputs are
ignored.
- **READY** rises when the program executes HLT.
- **OVF** rises on an ADD/SUB overflow, or when the program runs `SET OVF` after
  a division that overflowed. It stays high until the next reset.

`tb/mesa_tb_host.svh` contains ready-made tasks for these pin sequences.

## Clocking and pipeline timing

This section matters most if you change the control unit or write programs.

The control unit and the ROM work on the **falling** edge. The processing unit
and the RAM work on the **rising** edge.

1. The ROM is addressed by the *next* program counter, and its registered
   output is the instruction register. After every falling edge, `ir` holds the
   word at `pc`.
2. During the following half cycles the word is decoded. At the next falling
   edge its control word `cur` (a `cur_t` struct) is latched, and the PC steps
   on.
3. At the rising edge half a cycle later, the processing unit executes `cur`.
   All register transfers in one control word read the values from before that
   edge. This includes A1: a RAM access uses A1 before the same instruction's
   increment.

The consequences for programs:

- **Branches test the instruction just before them.** A branch is decided at a
  falling edge. At that point, only instructions up to the previous one have
  been executed. The flags (BG, compare results, A1 = CO1) are registered on the
  rising edge, so they are always stable half a cycle before they are needed.
- **Two-word instructions.** BNCH, JMP, JNE, JBG, JLE, JLT, JEQ, JF1-JF4 and MVI
  carry a second word: a 9-bit target or a 7-bit address. Flag F6 marks that
  word so it is not decoded as an instruction. A taken branch loads the PC from
  that word. A branch that is not taken steps over it. In both cases the branch
  costs two cycles.
- **MVI A1,n** sets F5. Its second word is copied into the immediate-address
  register C.A.R. and loaded into A1.
- **BNCH / RTN** form a one-level stack. BNCH saves PC + 2 in ST, and RTN
  returns to it. There is no nesting, and the program has only one subroutine,
  the divider.
- **RAM reads are latched.** A read fills the output latch ML at a rising edge.
  The value can be moved to a register by a later instruction, while that
  instruction starts the next read. Several `MVn ..,ML` opcodes therefore
  combine "use the previous word" with "read the next one".

### The multiply-accumulate pipeline

MU1 and MU2 form a two-stage operand shift register. The instruction that
shifts a new operand into MU1 also does three other things:
- it moves the old MU1 into MU2;
- it loads MU3 with the product of the *old* MU1 and MU2;
- it adds the *old* MU3 into the accumulator.

A product therefore reaches the accumulator two instructions after its second
operand. A sum of n products needs a short tail of instructions at the end that
only move data, to flush the last products through. `tb/tb_mesa_processor.sv`
contains a worked example: a 6-term dot product in a loop.

MU3 holds the product in carry-save form. It is 63 bits: a 32-bit sum row and a
31-bit carry row of weight 2. The carry-propagate addition is shared with the
accumulation. One row of full adders merges the accumulator, the sum row and the
carry row into two words, and the shared 32-bit CLA adds them.

## The stored-complement accumulator

Z (upper half) and W (lower half) form the 32-bit accumulator. The registers
hold the **one's complement** of the value, and they drive the bus through
inverters. So the value seen by the rest of the machine is `~{Z,W}`. This has
three effects that programs depend on:

- **Clearing stores zeros, which is the value −1.** The program cancels this
  −1 by first leaving the product 1 × 1 in MU3. The next accumulation then adds
  +1. The instruction that clears the accumulator and the constant 1 kept in
  TEMP and in RAM are arranged for this.
- **A left shift (SHL) shifts the stored word with a 0 in.** The value
  therefore becomes 2v + 1. The divider uses this: the last shift supplies the
  1 that non-restoring division forces into the quotient's LSB.
- **SHD** shifts in the complement of the last quotient bit, so the true value
  gets that bit in W(0). This opcode is decoded but not used by the shipped
  program.

If you add an instruction that writes Z or W, write the complement.

ADD and SUB compute Y ± X into Z, and leave W alone. They use the upper half of
the shared adder in split mode. ADD/SUB overflow is a signed 16-bit overflow,
and it sets OVF. BG is refreshed by every accumulation. It is 1 when the 32-bit
result does not fit a signed 16-bit word. The program uses it through JBG to
decide whether the numerator and denominator need scaling.

## Multiplier: Booth recoding, add-one sign extension, 4-2 tree

`booth_encoder` recodes the 16-bit multiplier in eight overlapping 3-bit groups
(radix-4 Booth). Each group gives three controls: x1 (select the multiplicand),
x2 (select twice the multiplicand) and N (negate). Each partial-product bit is
`((a[n] & x1) | (a[n-1] & x2)) ^ N`, taken over 17 bits.

Negating a row gives only the one's complement. The missing +1 is placed in the
next row at bit 2i, a position the sign extension leaves empty. The +1 of the
last row (weight 2^14) has no free slot. It is output as `neg_last` and merged by
a final row of full adders in `multiplier16`.

Sign extension uses the add-one method:
- each row's sign bit is inverted;
- a 1 is placed above it;
- a 1 is added at row 0's sign position.

These constants are pre-added into row 0, whose bits 16, 17 and 18 become
s0, s0, ~s0. This keeps every row 32 bits wide with no long runs of sign
copies.

The eight rows are reduced by two levels of 4-2 compressors:
- level 1 compresses rows 0-3 and rows 4-7 side by side;
- level 2 compresses the four outputs of level 1.

Each 4-2 cell is two full adders. The result stays in carry-save form for MU3.

`cla_adder32` is a two-level carry-look-ahead adder/subtractor. It has eight
4-bit slices and two first-level carry generators, and a second-level generator
gives the carry into bit 16 and the carry out. In **split mode** the carry into
bit 16 is replaced by the subtract control. Bits 31..16 then act as an
independent 16-bit adder/subtractor, which is how ADD, SUB and the division
steps use it.

## Division

Each model order needs the reflection coefficient −2·NOM/DEN. The program first
scales NOM by 4000h (2^14), so the quotient is a fixed-point number with 14
fraction bits. It then calls the division subroutine at 1F0h.

The dividend is a 32-bit value in Z:W, and the divisor is in X. The algorithm is
non-restoring division. Each step shifts the partial remainder left and adds or
subtracts the divisor:

- **DIV1** (the first step) subtracts when the dividend and the divisor have the
  same sign. Otherwise it adds: `sub = ~(DSR ^ X[15])`. DSR holds the sign of
  the dividend. It is loaded by `MV Y,Z`.
- **DIV2** (every later step) subtracts when the previous quotient bit was 1,
  and adds when it was 0.
- After each step, the new remainder goes to Z. The quotient bit
  `q = ~(R[15] ^ X[15])` (1 when the remainder has the divisor's sign) goes to
  the true W(0).

The subroutine is a fixed sequence:

1. Set A1 to 7Fh and increment it to 0. Read the loop count (15, from page 1,
   address 0) into CO1.
2. Run SHL, `MV Y,Z`, DIV1 and `SET OVF`, then a second SHL.
3. Loop 15 times over `MV Y,Z`, DIV2, SHL and `INR A1`, with `JNE` back while
   A1 ≠ CO1.
4. RTN.

This takes 9 + 15 × 6 + 1 = **100 clock cycles** from the first word to the
return address. The testbenches check this count. The shifts leave
**W = (2·D / X) | 1**: the quotient with one more fraction bit than the
dividend, and its LSB forced to 1 (the usual non-restoring correction). For
example, D = 2FD8000h and X = 24F3h give W = 296Fh, which is
0.010100101101111 in binary. Its first 14 fraction bits are the exact quotient.

**Overflow.** The quotient fits only if its first bit matches the signs of the
dividend and the divisor. `div_ovf_detect` decides this from four bits at the
first step: the zero flag of the partial remainder, DSR, X[15] and the first
quotient bit. `SET OVF`, placed just after DIV1, copies the result into the
sticky OVF pin. The quotient bit is derived from the remainder's sign here,
rather than from the adder's carry. The two agree whenever the step does not
overflow.

## Control unit

`control_unit` is hardwired logic with these parts:
- a 9-bit PC;
- the 9-bit stack register ST;
- the user flags F1-F4, set and cleared by `SET/RST Fn` and tested by `JFn`;
- F5 and F6 for MVI and for second words;
- the registered branch decision JUMP;
- the sticky OVF.

The branch conditions are:
- **JNE**: A1 ≠ CO1[6:0] (the loop counter test);
- **JBG**: the BG flag;
- **JLE, JLT, JEQ**: signed 16-bit compares of CO1 with CO2;
- **JFn**: flag Fn set;
- **JMP**: always taken.

HLT freezes the PC and raises READY.

The opcodes are 9-bit values from 00h to 44h, listed in `rtl/mesa_pkg.sv`. They
fall into four groups:
- data moves between Z, W, TEMP, ML, X, Y, CO1, CO2, A1, A2, MU1 and memory.
  Many have numbered variants (MV1..MV7) that differ in page, direction of the
  A1 count, and whether a product is started or accumulated;
- arithmetic: ADD, SUB, DIV1, DIV2, SHL, SHD;
- program control: branches, BNCH/RTN, HLT, NOP;
- flag and address operations: SET/RST Fn, SET/INR/DCR A1, INR/DCR A2,
  MVI A1, SET OVF.

The control word is an internal struct with one field per resource: bus source,
destination, MU shift, MU3 load, accumulator operation, RAM read/write and page,
A1/A2 operation, and DSR load. Its layout is this design's own.

## Memories

- **data_ram**: a 256 x 16 synchronous single-port array. The address is
  {page, A1}. The output latch holds the last word read, and it is the
  processor's ML register. The array is not reset. The host loads it.
- **program_rom**: 512 x 9, initialised from `rtl/mesa_program.hex` (one hex word
  per line). The main program fills locations 000h-153h, the division subroutine
  fills 1F0h-1FFh, and the rest is NOP. The parameter `ROM_FILE` of
  `mesa_processor` selects another image. The end-to-end test uses this to run
  its own program.

The shipped program expects this memory layout:
- page 0: the sample count at address 0, the samples from address 1, and the
  scaling constant 4000h at 7Fh;
- page 1: the division loop count 15 at address 0, the constant 1 at 7Fh, and
  the model order at 7Dh.

It uses the top few words of each page for its variables. That leaves about
120 words per page for data. Each Burg recursion frees one data word for the new
coefficient, so a 100-sample record fits at any model order.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.
- The arithmetic blocks are checked against reference arithmetic, both
  exhaustively on small ranges and with random operands. This includes
  products of the Booth tree, CLA sums in both modes, 4-2 cells, the overflow
  table and the division rules.
- The memories, counters, control unit and processing unit are checked
  cycle by cycle against independently computed expectations.

`tb_mesa_processor` is the end-to-end test. It loads data through the pins, runs
a test program (`tb/mesa_e2e.hex`), and reads the results back through the pins.
It makes three runs:
- a normal run, where the results are checked and OVF must stay low;
- a run whose divisor makes the division overflow, where OVF must rise;
- a run that takes an ADD-overflow path, where OVF must rise.

It counts 46 mechanisms and fails if any of them never occurs. They include:
- every accumulator operation;
- every A1/A2 operation;
- MVI, BNCH/RTN and JMP;
- each conditional branch, both taken and not taken;
- the F1-F4 flags, BG, both OVF causes and HLT;
- host reads, writes and counts.

The test program calls the same division subroutine words as the shipped ROM, at
1F0h. It checks the 100-cycle timing and the `(2D/X) | 1` result.

`tb_mesa_full` is the full-size test. It uses the processor with every
parameter at its default, including the shipped ROM image. It loads a
100-sample record: an offset of 100 plus sinusoids at 1/20, 1/10 and 1/5 of the
sampling rate, with amplitudes of 1000, 500 and 250. It runs the program's
first stage, the mean value of the samples, up to the return from the first
division. It then checks four things:
- the dividend passed to the divider is the sample sum;
- the divisor is the sample count;
- the quotient is (2·sum/100) | 1;
- the call takes 100 cycles and OVF stays low.

### Running a testbench with Verilator

Run from the repository root, because the ROM images are opened by relative
paths (`rtl/...`, `tb/...`):

```
verilator --binary --timing -y rtl -Itb rtl/mesa_pkg.sv tb/tb_mesa_full.sv --top-module tb_mesa_full
./obj_dir/Vtb_mesa_full
```

Replace `tb_mesa_full` with any other `tb_*` module. The package must come
first on the command line. The other modules are found through `-y rtl`. Every
testbench finishes within seconds.

## Departures and limitations

- **The shipped analysis program does not reach HLT in this model.** The
  program is reproduced word for word from the original ROM listing. With the
  instruction effects as implemented here, its data-copy loop (around address
  029h) advances A1 by two per sample. The loop's exit test, A1 = CO1, is
  therefore stepped over, and the loop never ends. The mean-value stage and the
  division subroutine before it run correctly, and they are what the full-size
  test checks. The arithmetic for the whole Burg recursion (MAC, BG scaling
  test, division, ADD/SUB updates) is exercised by the end-to-end test
  program instead. Treat the program image as a reference, not as a working
  product.
- **Quotient bit from the sign.** The divider takes the quotient bit from the
  sign of the new remainder, not from the adder's carry out. This gives the
  same bit for every step that does not overflow.
- **Division overflow range.** Overflow follows the four-input first-step test.
  A quotient up to 16 bits, with 2D/X < 65536, is accepted.
- **Control-word encoding** is this design's own struct. The original decoded
  control lines are not reproduced bit for bit.
- **Falling-edge ROM read.** The ROM output register is clocked on the falling
  edge, together with the control unit, so that the instruction register
  always holds the word at PC.
- **Details chosen here:**
  - JLE and JLT compare signed;
  - BG is refreshed by every accumulation;
  - DSR is loaded by `MV Y,Z`;
  - SHD is decoded as described above;
  - A1 and A2 wrap modulo 128;
  - the RAM gives a write priority over a read in the same cycle.
- **Not in the RTL:**
  - pad drivers and power supply pins, so the bidirectional pins are split
    into in/out/enable;
  - the precharge and sense circuits of the full-custom RAM and ROM, which are
    ordinary arrays here;
  - the spectrum computation, which is done off-chip from the coefficients.
- **Precision.** Data updates keep only the upper 16 bits (Z) of each product,
  as the original program does. With badly scaled input this loses accuracy in
  later recursions. The design has no double-precision or floating-point mode.
