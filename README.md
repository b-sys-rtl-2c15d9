# B-SYS: a programmable linear systolic array in SystemVerilog

B-SYS is a SIMD array of very small 8-bit processors in a line, built for
combinatorial work such as DNA sequence comparison. What sets it apart is how
its processors talk to each other. Functional units hold no data registers.
All storage sits in **register banks between neighbouring units**: each
16 x 8 bank is shared by the unit to its west and the unit to its east. Every
unit executes the same broadcast instruction, and operands and results are
named *relative* to the unit: "W3" is register 3 of the bank to my west, "E3"
is register 3 of the bank to my east. An instruction such as

    E2 <- min(W0, W1)

therefore computes in every unit at once and, in the same step, moves data one
position east through the array. Because every unit addresses the same side in
the same phase, no bank is ever used by two units at a time, so banks need only
one port. This scheme is called the Systolic Shared Register (SSR) architecture.

The RTL describes the prototype configuration: 10 chips of 47 units (470
processors) behind a host interface board.

```
 host I/O (16-bit words)
        |
   +----v-----+   init_n, instr (38 bits, broadcast)
   | bsys_    |------------------------------------------------+
   | board    |                                                |
   +----------+                                                |
                 chip 0                 chip 1                 v        chip 9
 west_in  --> [R0 F1 R1 F2 ... F47 R47'] [R0 F1 ... F47 R47'] ... [R0 ... F47 R47'] --> east_out
 west_out <--                                                                       <-- east_in
             R = register bank (16 x 8), F = functional unit, R47' = shadow of next chip's R0
```

## Files

| Module | Role |
|---|---|
| `rtl/bsys_pkg.sv` | Instruction struct, phase enum, constants, function-table constants for common operations |
| `rtl/bsys_system.sv` | Top: host board + array |
| `rtl/bsys_board.sv` | Host interface: three 16-bit writes per instruction, instruction buffer, init strobe |
| `rtl/bsys_array.sv` | `NCHIPS` chips chained east-west |
| `rtl/bsys_chip.sv` | One chip: `NFU` units, `NFU` + 1 banks, one control block per row, edge ports |
| `rtl/bsys_row_ctrl.sv` | Per-row control: instruction register, FSA, 4:16 register decoder, 3:8 flag decoder |
| `rtl/bsys_fsa.sv` | Phase automaton (CA, CB, CRI) |
| `rtl/bsys_decoder.sv` | Binary to one-hot decoder |
| `rtl/bsys_fu.sv` | Functional unit: operand latches, ALU, 8 flags, context masking |
| `rtl/bsys_alu.sv` | Table-driven ALU with a generate/propagate carry chain |
| `rtl/bsys_regbank.sv` | 16 x 8 single-port register bank with one-hot word lines |

## The instruction word

One 38-bit instruction is broadcast to every unit. Bit 0 is the least
significant bit of `instr_t`.

| Bits | Field | Meaning |
|---|---|---|
| 0 | `!` (`obey`) | 1: the unit writes only if its context flag is set |
| 8:1 | `CR` | result function of (a, b, carry): an 8-entry truth table |
| 13:9 | `A` | operand A register: side bit + register number |
| 18:14 | `B` | operand B register |
| 23:19 | `R` | result register |
| 27:24 | `CG` | generate function of (a, b): a 4-entry truth table |
| 31:28 | `CP` | propagate function of (a, b) |
| 34:32 | `C` | flag read as carry into bit 0 |
| 37:35 | `Z` | flag that receives the carry out of bit 7 |

A 5-bit register address is `{west, num}`: bit 4 set means the bank to the west
(left), clear means the bank to the east; bits 3:0 pick one of 16 registers.
Helpers `west_reg(n)`, `east_reg(n)` and `make_instr(...)` in `bsys_pkg` build
addresses and instructions.

## The ALU: three truth tables instead of an opcode

There is no opcode. For each bit position *k*:

- `g = CG[{a_k, b_k}]` and `p = CP[{a_k, b_k}]` come from two 2-input tables;
- the carry chain passes the incoming carry where `p = 1` and drives `g`
  elsewhere: `c_{k+1} = p ? c_k : g` (no generate, no propagate kills the carry);
- the result bit is `r_k = CR[{a_k, b_k, c_k}]`, a 3-input table.

The carry into bit 0 is flag `C`; the carry out of bit 7 is written to flag `Z`.
This covers arithmetic, logic and tests with the same hardware. Constants in
`bsys_pkg` (table index `{a,b,c}` for CR, `{a,b}` for CG/CP):

| Operation | CR | CG | CP | Carry in | Z gets |
|---|---|---|---|---|---|
| a + b + c | `CR_SUM` 10010110 | `CG_ADD` 1000 | `CP_ADD` 0110 | flag C | carry out |
| a - b (a + ~b + 1) | `CR_DIFF` 01101001 | `CG_SUB` 0100 | `CP_SUB` 1001 | a flag holding 1 | 1 if a >= b (unsigned) |
| move a | `CR_A` 11110000 | any | any | - | depends on CG/CP |
| a + c (increment by the carry flag) | 01011010 | 0000 | 1100 | flag C | carry out |
| a != b test | any | 0110 | 1001 | a flag holding 0 | 1 if a differs from b |
| copy a[7] to a flag | any | 1100 | 0000 | - | a[7] |
| set a flag to 1 / 0 | any | 1111 / 0000 | 0000 | - | 1 / 0 |

Every instruction writes a result register. When only the flag matters,
programs send the result to a scratch register.

## Executing one instruction: CA, CB, CRI

A unit has only latches, so an instruction runs in three phases, one clock
cycle each:

1. **CA**: the row's 4:16 decoder selects register `A.num`. Each unit reads the
   bank on side `A.west` and latches operand A.
2. **CB**: the decoder selects `B.num` and the unit latches operand B. The 3:8
   flag decoder selects flag `C`, which is latched as the carry in.
3. **CRI**: the ALU evaluates. The decoder selects `R.num`, and the flag
   decoder selects `Z`. At the end of the cycle each enabled unit writes the
   result into the bank on side `R.west` and the carry out into flag `Z`.

`init_n` low while `rdy` is high starts an instruction; `rdy` is high when idle
and during CRI, so instructions can follow each other at **one per three
cycles**. All reads of an instruction happen before any of its writes, so
`E0 <- W0` shifts register 0 one step east along the whole array.

Each row of 8 units has its own copy of this control (FSA, decoders and the
instruction register). All rows see the same pins and run in lock step. An
assertion in `bsys_chip` checks this.

## Conditional execution: the context flag

When the instruction's `!` bit is set, a unit writes its result and its Z flag
only if its **context flag** (flag 0, `CONTEXT_FLAG` in the package) is 1.
A masked unit changes nothing. The usual pattern is a test that writes its
carry into flag 0, then a conditional instruction. For example,
`E2 <- min(W0, W1)`:

```
flag7 <- 1                            (CG=1111, CP=0000, Z=7)
flag0 <- carry(W0 - W1)   = W0 >= W1  (sub, C=7, Z=0, result to a scratch register)
E2    <- W0                           (move)
E2    <- W1  if flag0                 (move, ! set)
```

## Chip boundaries: the shadow bank and the mask lines

A chip holds 47 units and the 47 banks to their west. It also holds a 48th
bank east of unit 47, which is a **shadow copy of the next chip's first
bank**. All operand reads therefore stay on chip. Only results cross chips,
and they do so during CRI:

- **Writing east** (`R.west = 0`): unit 47 writes the shadow bank and drives
  `east_out`. At the same time the chip's first bank takes `west_in`, the value
  the previous chip's unit 47 is sending. The two copies of every boundary bank
  are therefore written together.
- **Writing west** works the same way in the other direction: unit 1 writes
  bank 0 and drives `west_out`, and the shadow bank takes `east_in`.

Each side has 8 data lines and a ninth **mask line** (`*_out_wr` / `*_in_wr`).
The mask line is high when the sending unit really wrote. If that unit was
masked by its context flag, the copy on the neighbouring chip is not written
either. At the ends of the array, the same ports are the **data streams**: the
host feeds `west_in` (with `west_in_wr`) and collects `east_out` when
`east_out_wr` is high, or the other way round.

## The host board

`bsys_board` takes one instruction as three 16-bit I/O writes:

| `io_addr` | Data |
|---|---|
| 0 | instruction bits 15:0 |
| 1 | instruction bits 31:16 |
| 2 | instruction bits 37:32 in bits 5:0; completes the instruction |
| 3 | ignored |

Words 0 and 1 are kept, so a host repeating similar instructions may skip them.
A completed instruction waits as pending (`busy` = 1) until the array is
ready. The board then lowers `init_n` for one cycle. The host must not write
address 2 while `busy` is high; an assertion checks this.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `NCHIPS` | 10 | system, array | chips in the line (32 gives the 1504-unit board) |
| `NFU` | 47 | system, array, chip | units per chip |
| `ROW_FUS` | 8 | system, array, chip | units per row control block |
| `DATA_W`, `NREGS`, `NFLAGS` | 8, 16, 8 | package | unit width, bank depth, flags per unit |
| `CONTEXT_FLAG` | 0 | package | flag that gates `!` instructions |

## Programming example: sequence comparison

`tb/tb_bsys_seqcmp.sv` holds a complete one-against-many edit-distance program
for the full 470-unit board. The "one" sequence of 470 characters is loaded one
character per unit by streaming it in from the west. Each target sequence then
streams through as a wavefront, one column of the dynamic-programming table per
step. Unit *i* computes

    D[i][j] = min(D[i-1][j-1] + (s_i != t_j), D[i-1][j] + 1, D[i][j-1] + 1)

Distances reach 470 and more, so they are held as 16-bit register pairs. The
low-byte instruction leaves its carry in a flag, and the high-byte instruction
takes it as its carry in. A step takes 28 instructions:

| Instructions | Work |
|---|---|
| 1 | mismatch test of own character against the arriving one, into flag 1 |
| 2 | X = Q + mismatch (Q = previous distance from the west) |
| 2 | Yd = distance from the west + 1 |
| 2 + 2 | compare X with Yd (flag 0), conditional move |
| 2 | Y = P + 1 (P = own previous result) |
| 2 + 2 | compare X with Y, conditional move |
| 1 + 2 | start-of-sequence marker into flag 0; if set, X = Yd (D[i][0] = i) |
| 1 + 4 | valid marker into flag 0; if set, Q = distance from west, P = X |
| 2 | send X east (conditional) |
| 3 | move character, valid marker and start marker east |

A valid marker travels with the data. Units that have no column yet are
masked by it, so several targets can follow each other without the array
being cleared. An instruction whose result is not needed writes its A register
back unchanged (result table "a"), so the flag-only steps need no scratch
register. The program uses all 16 registers. Each `D[n][j]` that leaves the
east end is checked against a software reference. The targets are a copy of
the sequence with about one character in eight substituted, deleted or
inserted, and a 150-character random sequence. The test issues about 31,000
instructions.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_bsys_chip rtl/bsys_pkg.sv tb/bsys_ref_pkg.sv tb/tb_bsys_chip.sv
./obj_dir/Vtb_bsys_chip
```

The packages are listed by hand; `-y` lets Verilator find every module by its
file name. Drop `tb/bsys_ref_pkg.sv` for testbenches that do not import it.

| Testbench | What it checks |
|---|---|
| `tb_bsys_alu` | add, subtract, move and logic tables against integer arithmetic, including the carry out |
| `tb_bsys_regbank` | random reads and writes against an array |
| `tb_bsys_decoder` | both decoders, exhaustively |
| `tb_bsys_fsa` | phase sequence, `rdy`, back-to-back start, 3 cycles per instruction |
| `tb_bsys_row_ctrl` | word line, side, and flag line in each phase; function bits held after the pins change |
| `tb_bsys_fu` | operand side selection, add/sub result, write side, Z flag, context masking |
| `tb_bsys_board` | word assembly, one init per instruction and only when ready, in order, with stalls |
| `tb_bsys_chip` | east and west streams through all 47 units, 600 random instructions against a reference model, all registers drained, 3 cycles per instruction |
| `tb_bsys_array` | the same on 4 chips of 6 units (rows of 4), so every stream crosses chip boundaries |
| `tb_bsys_system` | the full 470-unit board through the host port: operand streams, `min` in every unit checked against directly computed minima, a westward stream, 800 random instructions against the model; counts boundary crossings, masked writes, host stalls and back-to-back issues |
| `tb_bsys_seqcmp` | the edit-distance program above, on the full 470-unit board |

`tb/bsys_ref_pkg.sv` is the instruction-level reference model that the chip,
array and system testbenches share. The full 470-unit testbench needs a few
minutes to compile with Verilator and seconds to run.

## Where this RTL departs from the original chip, and choices it makes

- **Clocking.** The silicon is dynamic logic driven by three external clocks
  (K1-K3) per phase. Here there is one synchronous clock and one cycle per
  phase. The original needed about 320-400 ns per instruction. Here an
  instruction takes 3 cycles.
- **Reset.** An asynchronous active-low reset clears banks, flags and latches.
  The original has no reset pin. Its `init` pin starts an instruction, as
  `init_n` does here.
- **Chip-to-chip transfer** completes within the write cycle. All chips write
  their boundary banks at the same clock edge.
- **Bidirectional pins** are split into separate in and out ports.
- **Chosen without guidance from the original:** the position of the side
  bit in a register address and its polarity; the bit order of the
  truth-table indices; C as a carry-in flag latched in phase CB and Z as the
  carry out; flag 0 as the context flag; that a masked unit writes neither
  result nor flag; the meaning of the mask line; writing west as the mirror
  of writing east; the capture of the whole instruction in each row; back-to-back
  issue in CRI; and the board's word order, addresses and busy handshake.
- **Status outputs.** `ca`, `cb`, `cri` and `rdy` are brought out. The chip's
  remaining diagnostic pins have no defined function here.

## Not included

- The analog side of the chip: the three-phase clock timing, the precharged
  memories, the Manchester chain's pass transistors, pads and supplies. The
  carry chain is modelled logically.
- The host computer. Testbenches act as the host.
- The hexagonal and octagonal mesh forms of the SSR idea. In these, each bank
  is shared by more than two units. No unit or instruction design exists for
  them.
- The 500-unit redesigned chip and the 32-chip boards. These are parameter
  settings (`NFU`, `NCHIPS`) and have not been simulated.
