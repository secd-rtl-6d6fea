# SECD chip in SystemVerilog

Landin's SECD machine runs compiled functional (Lisp-like) programs. It is the
target of Henderson's LispKit compiler. The machine has four stacks: S (the
evaluation stack), E (the environment), C (the code) and D (the dump, for saved
states). All four are lists built from cons cells in one heap.

This RTL implements the machine as a microcoded co-processor. The chip is
attached to an external 16K × 32-bit memory. A host writes a compiled program
and its arguments into that memory and presses a button. The chip then runs the
program to its STOP instruction. It allocates cells as it goes and reclaims
them with an in-place mark-and-sweep garbage collector. When it finishes, it
leaves a pointer to the result in a reserved memory cell.

Everything is in `rtl/`, and the top module is `secd_chip`. The testbenches in
`tb/` check each block and the whole chip.

## Records in memory

Every memory word is a record of 32 bits:

| bits  | 31   | 30    | 29:28 | 27:14 | 13:0 |
|-------|------|-------|-------|-------|------|
| field | mark | field | type  | car   | cdr  |

- **Type** is `00` for a cons, `01` for an integer and `10` for a symbol.
- **Cons cells** hold two 14-bit pointers, so the memory holds 2^14 words.
- **Integers** are 28-bit two's complement numbers in bits 27:0.
- **Symbols** carry an identification number in bits 27:0.
- **Bits 31 and 30** belong to the garbage collector. Everywhere else they are zero.

Four cells have fixed addresses:

| address | content |
|---------|---------|
| 0 | the symbol NIL |
| 1 | the symbol TRUE |
| 2 | the symbol FALSE |
| 16383 (`NUM`) | the problem going in and the result coming out; also where the sweep starts |

The host must write the three symbols into cells 0–2. Cells 3 to 16382 form
the heap, which is 16380 cells.

## Datapath (`secd_datapath`)

All transfers use one 32-bit bus. The bus is an OR of gated sources; the
assertions in the datapath check that at most one source drives it. A
microinstruction names one bus source and one destination, plus an optional
ALU operation. Everything happens in a single clock cycle.

The registers:

- **14-bit registers:** `S E C D X1 X2 MAR FREE PARENT ROOT Y1 Y2`. Each is
  written from the cdr field (bits 13:0) of the bus. When read, it drives bits
  13:0 and the upper bits are zero.
- **`CAR`:** loads bits 27:14 of the bus and drives them back in bits 13:0.
  Fetching a cell's car therefore takes two cycles: memory→CAR, then CAR→destination.
- **`ARG`, `BUF1`, `BUF2`:** full 32-bit registers. ARG is the first ALU
  operand, and the status flags are computed from it. BUF1 and BUF2 load
  only from the ALU output, never from the bus. BUF1 holds arithmetic
  results. BUF2 is the garbage collector's scratch register.
- **Constant sources:** `NIL`, `TRUE` and `FALSE` put their cell addresses on
  the bus. `NUM` puts 16383 there.
- **Consunit (`cons` source):** builds a cons record with car = X1 and cdr = X2.
- **Memory:** `MAR` addresses memory. Reading `mem` gates the data pins onto the
  bus, and `rmem` is high only then. Writing `mem` raises `wmem`, and the memory
  stores the bus value at the end of the cycle.
- **Clearing the car field:** reading `MAR` or `NUM` sends the address with bits
  27:14 cleared. This is how an address becomes an integer that the ALU can
  decrement.

**ALU (`secd_alu`).** The ALU combines ARG with the value on the bus. Its
result is written into BUF1 or BUF2 in the same cycle, for example
`rfree wbuf2 replcdr`, which sets `BUF2 = ARG` with its cdr replaced by
FREE. The ALU result can also be read onto the bus as the `alu` source, so
that it reaches any register directly. The sweep uses this to step its address
with `ralu wmar dec`. In that case the ALU's bus operand is the bus with no
other source, which leaves no combinational loop.

| group | operations | result bits 31:28 |
|-------|------------|-------------------|
| arithmetic | `add` and `sub` (ARG op bus), `dec` (ARG−1) | type integer; mark and field cleared |
| gc bits | `setm`, `clrm`, `setf`, `clrf` on ARG | other bits kept |
| pointer replace | `replcar` and `replcdr`: replace one pointer field of ARG with the bus cdr field | other bits kept |

`mul`, `div` and `rem` keep their operation codes but compute `dec`. The real
chip did the same to save area. A program that uses MUL, DIV or REM therefore
gets the first operand minus one.

**Flags (`secd_flagsunit`).** These are combinational.

- **From ARG alone:**
  - `atom`: type is not cons.
  - `nil` and `true`: the pointer in ARG's cdr field is 0 or 1.
  - `mark` and `field`: bits 31 and 30.
- **ARG against the bus, in the same cycle:**
  - `eq`: bits 29:0 are equal.
  - `leq`: ARG ≤ bus as signed 28-bit numbers.

A microinstruction can load ARG in one cycle and branch on a comparison in the
next, while it reads the second operand onto the bus.

## Control unit

**Microword.** It is 27 bits, held as the packed struct `uinstr_t` in `secd_pkg`:

```
 26   22 21   17 16  13 12   9 8        0
| read  | write | alu  | test | address  |
```

The read, write and alu fields are encoded. `secd_decode` expands them into
23 read lines, 17 write lines and 12 ALU lines.

**Test field.** It selects one of 13 ways to form the next address:

- fall through (`inc`)
- `jump`
- `call` (push the return address) and `ret`
- `dispatch`
- conditional jumps: `jbutton`, `jatom`, `jeq`, `jleq`, `jnil`, `jtrue`,
  `jmark`, `jfield`

A conditional jump goes to the address field when its condition is true and
falls through otherwise.

**Dispatch** loads the mpc with the 9-bit instruction code. The code is taken
from the bus in the cycle that loads ARG with the instruction. Microcode
addresses 1–21 hold a jump table to the instruction routines.

**Instruction codes.** They follow Henderson's numbering:

| code | instructions |
|------|--------------|
| 1–5 | LD, LDC, LDF, AP, RTN |
| 6–9 | DUM, RAP, SEL, JOIN |
| 10–14 | CAR, CDR, ATOM, CONS, EQ |
| 15–21 | ADD, SUB, MUL, DIV, REM, LEQ, STOP |

**`secd_mpc`.** It holds the mpc, a four-way next-address multiplexer (mpc+1,
address field, opcode, stack top) and a 4-deep return stack. When the stack
overflows, the deepest entry is lost. The microcode nests at most three deep.
`reset` clears the mpc to 0 at the next clock edge.

**`secd_ucode_rom`.** It is a 338-word case table in a 512-word address space.
Unused addresses jump to the first error state.

## Microprogram

The microprogram has four parts.

- **Top-level loops.** Address 0 jumps to the idle loop, which waits for
  `button`. There are two error loops as well.
- **Start-up.** With `N` the record in cell 16383:
  - `S = cdr(car N)`
  - `C = car(cdr N)`
  - E, D, X1, X2 and the free list are set to NIL.
- **Instruction fetch** (4 cycles), then one routine per instruction. Shared
  subroutines:
  - `BIN`: unstack two numbers for ADD…LEQ.
  - `PUSHT`/`PUSHF`: push a boolean.
  - `PUSHNUM`: allocate a cell for BUF1 and push it.
  - `CONS`/`ALLOC`: allocate a cell.
- **STOP.** Writes `cons(S, NIL)` into cell 16383 and returns to idle. The
  answer is `car(S)`, the top of the stack.

`ALLOC` takes the head of the free list. When the list is empty (NIL), it runs
the garbage collector first. The free list starts empty, so every run begins
with a full collection of the 16K memory. That takes about 147,000 cycles.
A short program adds a few hundred cycles to that.

## Garbage collector

The collector needs no stack in memory. It marks by pointer reversal, in the
style of Deutsch–Schorr–Waite, and then sweeps.

**Mark.** `MARK` is called once for each of the six roots: S, E, C, D, X1 and
X2. The registers have these roles:

- `ROOT`: the cell being visited.
- `PARENT`: the head of the reversed path back to the root. NIL means the
  path is empty.
- `Y1`, `Y2`: hold pointers while they are swapped.
- `BUF2`: holds the record being rewritten.

The walk has three moves:

1. **Descend.** Read the cell at ROOT.
   - If it is already marked, retreat.
   - Otherwise set its mark bit and write it back.
   - If it is an atom, retreat.
   - If it is a cons, clear its field bit. Replace its car with PARENT, make
     ROOT the new PARENT, and continue with the old car as ROOT.
2. **Retreat, field bit 0.** The car side of PARENT is finished. In PARENT's
   cell:
   - put ROOT back into the car;
   - store the grandparent (held in the car until now) in the cdr;
   - set the field bit;
   - descend into the old cdr.
3. **Retreat, field bit 1.** Both sides of PARENT are finished. Put ROOT back
   into PARENT's cdr. PARENT becomes ROOT, and the grandparent from the cdr
   becomes PARENT. Retreat again.

The walk stops when PARENT is NIL. Every pointer is then back where it was.
The field bit tells, at each cell on the path, which of its two fields holds
the back pointer. This is why each record carries a field bit as well as a
mark bit.

**Sweep.** The sweep loads ARG with 16383 and steps down with the ALU's `dec`
(`alu → MAR`), stopping above cell 2.

- **Marked cell:** the sweep clears the mark and field bits.
- **Unmarked cell:** the sweep links it into the free list through its cdr
  field. The rest of the record is kept.

If the free list is still empty after the sweep, memory is exhausted. The
chip then enters the first error state.

**What is not swept:**

- Cells 0–2 are never swept. After the first collection they stay marked,
  which is harmless: they are atoms.
- Cell 16383 is not a root and is never swept. The host's problem record stays
  valid until STOP overwrites it.

**Cost.** A collection costs about 9 cycles per heap cell for the sweep. The
mark phase adds 15–30 cycles per live cell.

## States and host protocol

`{flag1, flag0}` show the major state, decoded from the mpc:

| `{flag1, flag0}` | state |
|------------------|-------|
| 0 | idle |
| 1 | first error state |
| 2 | second error state |
| 3 | running |

To run a program, the host does the following:

1. Hold `reset` for a clock, which puts the chip in idle.
2. Write NIL, TRUE and FALSE into cells 0–2, and build the program and its
   arguments in cells 3 upward.
3. Write into cell 16383 a cons whose car points to a cell with cdr = the
   initial S, and whose cdr points to a cell with car = the code list.
4. Raise `button` until the flags leave idle, then drop it.
5. Wait for idle. The result is `car(car(mem[16383]))`.

**Errors.** Running out of memory gives the first error state.

- In that state, `button` moves the chip to the second error state.
- From there, releasing `button` returns it to idle.

Each state therefore needs a change of the button before it is left again. The
chip checks no instruction arguments: a wrong type gives a wrong result, not
an error.

**Memory interface.** The memory must return data combinationally for the
current `mar` (asynchronous read). It is written at the clock edge that ends a
cycle with `wmem` high. `data_oe` equals `wmem`.

## Scan block (`secd_scan`)

All 72 signals that pass between the control unit and the datapath go through
a scan register:

- mpc → ROM (9)
- the decoded read, write and alu lines (52)
- flags → DECODE (7)
- next-address select and push/pop (4)

The instruction code is the one signal that bypasses the block.

The block has its own clock, `sr_clk`. Pulse it only while the system clock is
stopped.

| control | effect |
|---------|--------|
| `sr_shift = 0` | an `sr_clk` edge captures all 72 values |
| `sr_shift = 1` | an `sr_clk` edge shifts the chain one place toward the MSB; `sr_in` enters at bit 0 and `sr_out` is the MSB |
| `sr_drive = 1` | every trapped signal is replaced by the register's bit, so a vector can be forced into the datapath or the control unit |
| `sr_drive = 0` | the block is transparent |

In the RTL the chain is four registers in series, in this order: sequencer
controls (first after `sr_in`), flags, control lines, mpc (last, ending at
`sr_out`). With this split no combinational path appears to run through the
block.

## Departures from the original chip

- **Clocking.** The original used a two-phase non-overlapping clock with
  latches, and the scan block had two clock pins. Here there is one
  rising-edge clock, and one `sr_clk` for the scan block.
- **Microcode.** The microcode is new: 338 words against the original's
  roughly 400. It follows the published register roles and the 27-bit format,
  but the field encodings, the addresses and the collector are this design's
  own.
- **Choices of this design:**
  - the encoding of the record type bits;
  - the addresses of the fixed cells;
  - the NIL and TRUE flags, which compare pointers rather than symbol values;
  - the state encoding on `flag0`/`flag1`;
  - the scan control pins.
- **No MUL, DIV or REM.** These compute ARG−1, like the original.
- **Upper bus bits.** 14-bit registers drive zeros in the upper bus bits,
  where the original left them undriven.
- **Y2.** The original register-transfer diagram draws a line between Y2 and
  the ALU, but its use is not described. Y2 is a plain bus register here.
- **BUF2 in the sweep.** In the original, BUF2 served only the marking
  phase. Here the sweep also rewrites records through it. The reason is the
  same: BUF1 may hold an arithmetic result that is waiting for a free cell.
- **Not modelled:** the pad frame, the clock generator and the external RAM.
  The RAM has a behavioural model, `tb/secd_ram_model.sv`.

## Verification

Each block has a self-checking testbench that prints
`TB_RESULT checks=… failures=…`:

| testbench | what it checks |
|-----------|----------------|
| `tb_secd_alu`, `tb_secd_flagsunit` | random operands against reference expressions |
| `tb_secd_mpc` | random sequences against a queue model of the stack |
| `tb_secd_decode` | every field value and every test/flag combination |
| `tb_secd_ucode_rom` | jump table, top-level loops, every jump target inside the program |
| `tb_secd_datapath` | register transfers, memory gating, car clearing, ALU and flag paths |
| `tb_secd_scan` | capture, shift and drive |

`tb_secd_chip` runs the full chip at its default sizes. It has a small
S-expression loader and 23 compiled programs:

- every instruction;
- a recursive sum written with DUM/RAP (1 + … + 900 = 405450, with collections
  in the middle of the run);
- three mutually recursive functions in one LETREC (n mod 3 for n = 200);
- Takeuchi's function `tak(18, 12, 6)` = 7, a classic Lisp benchmark that
  needs only LEQ and SUB: 63,609 calls, 47.3 million cycles and 90 garbage
  collections;
- a runaway recursion that exhausts memory and leads through both error
  states;
- a scan capture/shift/drive sequence.

It counts the collections, retreats through the cdr side, swept cells, error
states, subroutine depth and scan operations. It takes about 63 million
cycles, a little over a minute in Verilator.

The measured costs give a feel for speed. An instruction fetch takes 4
cycles, and a function call with its return takes a few hundred. `tak`
averages about 740 cycles per call, with collections included.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/secd_pkg.sv rtl/secd_ucode_pkg.sv tb/tb_secd_chip.sv \
  --top-module tb_secd_chip -o sim
./obj_dir/sim
```

The two packages are named first. `-y` lets Verilator find every module by
its file name. To run a unit testbench, replace `tb_secd_chip` with that
testbench's name. The remaining lint warnings are unused bits:

- the upper bus bits, which some units ignore;
- the address field, which the decoder does not use;
- unused constants in the packages.

## Changing the microcode

The ROM is a plain `case` table in `rtl/secd_ucode_rom.sv`. Each entry is a
`uinstr_t` literal `'{read, write, alu, test, address}` built from the
enumerations in `secd_pkg` (`R_*`, `W_*`, `A_*`, `U_*`). Its comment gives the
symbolic form.

Two rules apply to the layout:

- Addresses 1–21 must stay the instruction jump table.
- The idle and error loops and the other entry points are named in
  `rtl/secd_ucode_pkg.sv`. `secd_decode` uses the idle and error addresses to
  drive `flag0`/`flag1`, and the testbenches use the entry points. Keep the
  package in step with the table.
