# TISP: a microprogrammed 32-bit teaching processor

TISP is a small processor built to teach how an instruction set is carried
out in hardware. Every instruction is executed by a short microprogram. A
32-word control ROM holds one 32-bit control word per micro-step. A
control address register (CAR) walks through that ROM. Every field of a
control word drives one wire in the datapath or the sequencer, so a student
can trace each bit.

The datapath has 32-bit registers. It contains a barrel shifter, a
carry-lookahead adder, a logic unit, a data memory, a sequential multiplier
and a pipelined floating point adder. The last two take many cycles. The
processor waits for them with hidden control words that branch to
themselves until the unit reports that it is done. Conditional branches use
the same branch-control hardware, driven by carry and zero flags.

The RTL follows the structure of a VHDL teaching design:

- a control unit;
- a datapath with a register file and a functional unit (ALU);
- a board wrapper with a clock divider and a reset counter.

Where that design's tables contradict each other or leave something out,
this implementation makes a choice. Each choice is listed under
[Departures and choices](#departures-and-choices).

## Hierarchy

```
tisp_board                    board wrapper (top)
├── clock_divider             board clock -> processor clock
├── reset_counter             power-up / periodic processor reset
└── microprocessor
    ├── control_unit          PC load gating
    │   ├── program_counter
    │   ├── instruction_memory
    │   ├── instruction_register      IR and its field split
    │   ├── control_address_register  CAR + branch mux + MUXC
    │   ├── control_rom
    │   ├── branch_control
    │   └── delay_register
    └── datapath              MUX B, C/Z flag register
        ├── register_file     R0..R7 + temp register
        └── alu               8:1 output mux on CONTINS[5:3]
            ├── barrel_shifter
            ├── cla_adder
            ├── logic_unit
            ├── fp_adder
            ├── main_memory
            └── multiplier
```

`rtl/tisp_pkg.sv` holds the shared types:

- the control word as a packed struct (`ctrl_word_t`);
- enums for opcodes, functional-unit selects, logic operations and branch
  conditions;
- `make_instr()`, which builds instruction words for testbenches.

## How an instruction runs

The CAR is 5 bits wide and addresses the control ROM. On reset the CAR and
the PC are both 0. Every instruction goes through three kinds of control
words:

| CAR | Word | What it does |
|-----|------|--------------|
| `00000` | IF  | Loads IR from instruction memory at PC (IL=1), increments PC (PI=1), asserts BRANCH RESET, next address `00001`. |
| `00001` | EXO | MC=1: the next CAR is the opcode field of IR. This is the dispatch step. |
| opcode | execute word | Drives the datapath for one cycle. Its NASEQ field (normally `00000`) returns to IF. |

So an ordinary instruction takes **3 clock cycles**. The opcode of an
instruction *is* the control-ROM address of its execute word. Words that no
instruction can reach this way are "hidden" words, used only by the
microprogram.

Each cycle the next CAR value is chosen as follows:

```
next_car = MC          ? IR.opcode
         : branch_out  ? NABRA
         :               NASEQ
```

This is the two-level multiplexer of the original control unit. The first
mux chooses between NABRA and NASEQ by `branch_out`. The second mux (MUXC)
chooses the opcode when MC=1.

### Instruction format

| Bits | Field | Use |
|------|-------|-----|
| 23:19 | opcode | control-ROM address of the execute word |
| 18:16 | DA | destination register |
| 10:8  | AA | register on bus A |
| 2:0   | BA | register on bus B |
| 7:0   | imm | immediate, memory address, or branch/jump target (overlaps BA) |

All other bits are ignored. The immediate is zero-extended.

### Instruction set

| Opcode | Mnemonic | Action | Cycles |
|--------|----------|--------|--------|
| 00010 | AND   | Rd ← Ra & Rb | 3 |
| 00011 | OR    | Rd ← Ra \| Rb | 3 |
| 00100 | NOT   | Rd ← ~Rb | 3 |
| 00110 | XOR   | Rd ← Ra ^ Rb | 3 |
| 00111 | SHL   | Rd ← Ra << Rb[4:0] | 3 |
| 10111 | SHR   | Rd ← Ra >> Rb[4:0] (logical) | 3 |
| 01000 | STORE | M[imm] ← Ra | 3 |
| 01001 | LOAD  | Rd ← M[imm] | 3 |
| 01010 | ADDI  | Rd ← Ra + imm | 3 |
| 01011 | NOTI  | Rd ← ~imm | 3 |
| 01100 | ADD   | Rd ← Ra + Rb | 3 |
| 01101 | SUB   | Rd ← Ra − Rb | 3 |
| 10101 | MOVE  | Rd ← Rb | 3 |
| 01110 | NOP   | nothing | 3 |
| 01111 | JMP   | PC ← imm | 3 |
| 10000 | HALT  | loops between EXO and this word forever | – |
| 10100 | MULT  | Rd ← low word of Ra × Rb, temp ← high word | 3 + 65 |
| 10011 | FPADD | Rd ← Ra + Rb (IEEE-754 single) | 3 + 7 |
| 11001 | BHI   | PC ← imm if C=0 and Z=0 | 3 |
| 11010 | BHE   | PC ← imm if C=0 | 3 |
| 11011 | BLT   | PC ← imm if C=1 | 3 |
| 11100 | BLE   | PC ← imm if C=1 or Z=1 | 3 |
| 11101 | BEQ   | PC ← imm if Z=1 | 3 |
| 11110 | BNE   | PC ← imm if Z=0 | 3 |
| 11000 | (MULTNOP) | hidden: wait for the multiplier | – |
| 10110 | (FPNOP)   | hidden: wait for the FP adder | – |

Opcodes 00101, 10001, 10010 and 11111 execute as NOP.

## The control word

| Bits | Field | Meaning in this design |
|------|-------|------------------------|
| 31:29 | BRA_INS | branch condition: 000 BHI, 001 BHE, 010 BLT, 011 BLE, 100 BEQ, 101 BNE, 110 "multiplier busy", 111 "FP adder busy" |
| 28 | ENABLE | 1 in every word except IF; informational only |
| 27:23 | NABRA | next CAR when `branch_out` = 1 |
| 22 | DELAY | loaded into the delay register; also marks a conditional branch for the PC-load rule |
| 21 | DC | unused (0) |
| 20 | RW | 0 = write the register file (and update the flags) |
| 19 | BRA_RST | forces `branch_out` low |
| 18 | CIN | 1 = subtract in the CLA |
| 17, 16 | MW, MR | unused (0); memory direction comes from CONTINS |
| 15 | MB | MUX B: 1 = register Rb, 0 = immediate |
| 14:9 | CONTINS | functional-unit select and operation, see below |
| 8 | PI | increment PC |
| 7 | PL | load PC from imm (see branches) |
| 6:2 | NASEQ | next CAR when `branch_out` = 0 |
| 1 | MC | next CAR is the opcode in IR |
| 0 | IL | load IR |

CONTINS[5:3] selects the input of the ALU's output multiplexer. CONTINS[2:0]
is the operation for that unit.

| CONTINS[5:3] | Unit | CONTINS[2:0] |
|------|------|-------------|
| 000 | barrel shifter | [2] 0 = left, 1 = right |
| 001 | logic unit | [1:0] 00 AND, 01 OR, 10 XOR, 11 NOT B |
| 010 | CLA adder | – (CIN picks add/subtract) |
| 011 | FP adder | [2] = start |
| 100 | data memory | [1:0] 11 load, 10 store |
| 101 | multiplier (low word) | [2] = start |
| 110 | MOVE (passes bus B) | – |
| 111 | none (outputs 0) | – |

## Multi-cycle instructions: waiting with self-looping control words

The multiplier and the FP adder are the hard part of the design. The
sequencer knows nothing about latency. Instead, each unit reports a done
signal, and `branch_control` turns "not done" into a branch taken back to
the same control word.

**MULT.** The execute word pulses the multiplier's start. It writes a
don't-care value into Rd, and its NASEQ points to MULTNOP (11000).
MULTNOP has `BRA_INS=110` and `NABRA=11000`. While the multiplier is busy,
`branch_out` is 1 and the CAR stays at MULTNOP.

The multiplier is Mano-style: it alternates between an ADD state and a SHIFT
state 32 times each, so it is busy for 64 cycles. In the 65th cycle after
start, done reads 1 and `branch_out` falls. In that same last cycle:

- MULTNOP writes the low product word into Rd (RW=0);
- the temp register loads the high word, because its enable is the
  multiplier's done signal;
- NASEQ returns the CAR to IF.

A MULT therefore takes 3 + 65 cycles.

**FPADD.** The execute word pulses the FP adder's start and goes to FPNOP
(10110), which waits on `BRA_INS=111`. The adder is a 7-stage pipeline. A
valid bit travels beside the data, so the start pulse reappears as done
7 cycles later. FPNOP writes the result in that cycle. An FPADD takes
3 + 7 cycles.

Done has a different meaning for each unit:

- The multiplier's done is a level: it means "idle". The `110` condition
  is therefore false whenever no multiply is running. That is why `110` also
  serves as the don't-care condition in every non-branch word.
- The FP adder's done is a one-cycle pulse.

## Conditional branches, branch reset and the delay register

The flags C and Z are registered whenever the register file is written
(RW=0). Z is "result == 0". C is the CLA carry XOR CIN, which makes it a
*borrow* for SUB. C is 0 for non-adder results. So after `SUB Ra, Rb`:

- C=1 means Ra < Rb (unsigned);
- Z=1 means Ra = Rb.

The conditions then read naturally, as in the instruction table.

A branch's execute word has `PL=1` and `DELAY=1`. The PC load is
`PL & (branch_out | ~DELAY)`:

- a conditional branch loads the PC only when it is taken;
- JMP (DELAY=0) always loads.

NABRA and NASEQ of a branch word both point to IF, so the microprogram
continues the same way whether or not the branch is taken.

`branch_out` is combinational. `BRA_RST` (set in IF) forces it low, and so
does the delay register. The delay register holds the previous word's DELAY
bit for one cycle and clears `branch_out` in the word after a conditional
branch. In this implementation that word is always IF, which asserts
BRA_RST anyway. The delay register is kept because it is part of the
original control unit. It makes sure that no branch condition can carry over
into the next instruction.

## Datapath units

- **Register file.** 8 × 32-bit registers, synchronously reset to 0. DA is
  decoded into write enables. Two 8:1 read multiplexers drive buses A and B.
  A separate 32-bit temp register has its own enable and holds the upper
  product word. Writes happen at the clock edge and reads are combinational.
- **MUX B** (in `datapath`). Chooses Rb or the zero-extended immediate.
  Memory instructions use the immediate as the address.
- **Barrel shifter.** Five logarithmic stages (1, 2, 4, 8, 16). Shifts
  left or right by B[4:0], with zero fill.
- **CLA adder.** Generate/propagate per bit, lookahead inside 4-bit groups,
  and a second lookahead level across the eight groups. Subtraction is
  A + ~B + 1.
- **Logic unit.** AND, OR, XOR and NOT-B through a 4:1 mux.
- **Data memory.** 256 × 32 bits. Preloaded from `rtl/tisp_data.hex`; other
  words are 0. Synchronous write and asynchronous read. Store writes bus A to
  the address on bus B.
- **Multiplier.** 32 × 32 → 64 unsigned, shift-and-add, 64 busy cycles, as
  described above.
- **FP adder.** IEEE-754 single precision in seven stages:
  1. unpack;
  2. compare and swap;
  3. align with sticky bit;
  4. add or subtract;
  5. normalise;
  6. round to nearest even;
  7. pack.

  Denormal inputs and results are flushed to zero. NaN and infinity inputs
  give a quiet NaN or the infinity. Overflow gives infinity.
- **Program counter** (8 bits). Load has priority over increment.
- **Instruction memory.** 256 words, read combinationally at the PC, loaded
  from `rtl/tisp_program.hex`. Unused words read as 0, which is the IF
  opcode, so an empty location behaves like an empty instruction.

## Board wrapper (`tisp_board`)

The original board had no usable reset button, and its clock was too fast
to watch the LEDs. The wrapper adds two blocks:

- `clock_divider` (default ÷16) makes the processor clock from the board
  clock.
- `reset_counter` (default period 65 536 processor clocks) holds the
  processor's active-low reset for the first two counts. It then releases it
  and asserts it again every time the counter wraps. The stored program
  therefore runs repeatedly.

`board_rst` is only a power-on reset for these two counters. `leds` shows
`data[7:0]`. All processor observation signals (PC, CAR, IR, control word,
flags, done signals, temp register) are brought out as ports. The divide
ratio and the reset period are this design's choices: the original only asks
for "a sufficient count" and "a huge number of clock pulses".

## Departures and choices

The original control-word tables contradict each other in places, and some
of their entries cannot work with the rest of the design. This
implementation differs from them as follows:

- **XOR / NOT codes.** The final table gives NOT and XOR the same CONTINS.
  This design follows the field description instead: XOR = 001x10 and
  NOT = 001x11. NOTI uses the NOT code with MB=0.
- **BLE / BNE codes.** The branch-condition list gives BLE=011 and BNE=101.
  The field description gives 011 for BNE. The branch list is followed.
- **BEQ address.** The table places BEQ at the same address as BHI.
  BEQ is placed at 11101, the free slot between BLE and BNE.
- **Branch NABRA.** Branch words use NABRA=00000 instead of 00100. The
  target comes from the instruction's immediate through PL, and both
  successors return to IF.
- **Wait words write the register file.** MULTNOP and FPNOP have RW=0, so
  the result is written when done arrives. The original words disable the
  write, which leaves no step where the result reaches a register.
- **STORE** does not write the register file. **LOAD/STORE** take their
  address from the immediate (MB=0), matching the original test program's
  `LOAD R0 ← M[01]` style.
- **EXO** has DELAY=0. Only IF keeps DELAY=1.
- **Multiplier start.** MULT starts the multiplier with CONTINS bit 2
  (1011xx). MULTNOP selects the multiplier without starting it (1010xx).
  This mirrors the FP adder's "start" and "FP add" codes.
- **Not built.** The two unfinished words BRAC1/BRAC2 are left out; their
  addresses execute NOP. The ENABLE field drives nothing.
- **No tri-state bus.** The original memory code "output high impedance"
  (CONTINS 100x0x) puts 0 on the memory's mux input instead.
- **Instruction format.** The field positions are this design's reading of
  the original test-program words (second byte = opcode and DA, last byte =
  address). The original branch encodings cannot be decoded with the same
  layout, so branch targets use imm[7:0].
- **Sizes.** Memory depths (256 words each), the 8-bit PC and the
  multiplier's exact 65-cycle done timing are not given by the original;
  they are this design's choices.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The reference values are
worked out independently of the RTL:

- **Arithmetic blocks** are compared with SystemVerilog arithmetic.
  `tb_fp_ref_pkg` rounds a double-precision sum to single precision, so the
  FP adder is checked against an independent IEEE model.
- **The sequencer.** `tb_control_unit` drives random flags and checks the
  next-CAR, PC and IR behaviour against its own model of the rules above.
- **Whole-processor testbenches** (`tb_microprocessor`, `tb_tisp_board`)
  compare against `tb_isa_model_pkg`, an instruction-level model. It runs
  the same program and data files and predicts every register, the temp
  register, the flags, the memory contents, the PC trace and the cycle count
  (203 cycles for the default program).

The default program in `rtl/tisp_program.hex` (43 words) does the following:

- loads R0–R7 from data memory;
- shifts;
- multiplies and FP-adds the values 1.5 and 2.75;
- stores and reloads a word;
- runs every logic and arithmetic instruction;
- runs a count-down loop;
- takes or skips every branch condition at least once;
- jumps, then halts.

Each word is `opcode<<19 | DA<<16 | AA<<8 | imm_or_BA`. The end-to-end
testbenches count each mechanism and fail if any of them never happens:
taken and not-taken branches, jumps, multiplier and FP wait cycles,
delay-register activity, temp-register loads, loads, stores, and (on the
board) reset release and periodic re-reset.

`tb_tisp_board` runs the top with every parameter at its default. It runs
two full passes of the program and one reset in between, about 2 ms of
simulated time.

`tb_sample_programs` runs the processor's two classic test programs, one
copy of the processor for each. Their images are the `tb/sample_*.hex`
files.

- **Initial program:** LOAD, LOAD, NOP, NOT, SHL, SHR, MOVE, with a HALT
  added so the run stops.
- **Final program:** eight LOADs, SHL, BEQ, SHR, MULT, FPADD, then a BNE
  back to address 0, so it repeats for ever. Each pass takes
  14 × 3 + 65 + 7 = 114 cycles.

For both programs the testbench works out every fetch address and its
cycle, and the register values, from the instruction set alone. It follows
the final program for three passes.

### Simulating

Run from the repository root; the hex files are opened by relative paths
such as `rtl/tisp_program.hex`.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -Itb \
    rtl/tisp_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_isa_model_pkg.sv \
    tb/tb_tisp_board.sv --top-module tb_tisp_board -Mdir obj_board -o sim
./obj_board/sim
```

Replace `tb_tisp_board` with any other testbench name to run a single
block. To run your own program, write 32-bit hex words (one per line) to a
file under `rtl/` or `tb/` and pass it with the `IM_INIT` and `MEM_INIT`
parameters. The whole-processor testbenches pass the default file names to
their instruction-level model (`model_run(...)` in `tb_microprocessor`).
Change those names too, and the register, memory, trace and cycle checks
follow any program that ends in HALT. The mechanism counts expect a program
that uses every mechanism.

## Limitations

- Integer arithmetic is unsigned; there is no overflow or negative flag.
- Branch and jump targets are absolute 8-bit addresses; there is no call or
  return and no indirect addressing.
- Memory addresses are 8 bits (immediate only for LOAD/STORE).
- The FP adder flushes denormals to zero and does not signal exceptions.
- There is no external bus: the ENABLE field, MR, MW and DC are carried in
  the control word but drive nothing.
- Both memories get their contents from `$readmemh` in an `initial` block.
  FPGA flows and simulators honour this, but a synthesis front end that
  ignores it builds an empty instruction memory.
- The reset counter restarts the program every 65 536 processor clocks. A
  program that needs longer than that is cut short on the board, unless
  `RESET_PERIOD` is raised.
