# A 32-bit stack processor with packed byte-code instructions

A stack machine's instructions are short. Most have no operand at all (`add`,
`dup`, `ld`), some carry one small operand byte (`lit 5`, `get 2`), and only a
few need a wide one (a long jump, a call, a big constant). If every
instruction gets a 32-bit word to itself, as in the simple word-fetching stack
processor this design builds on, most of each word is wasted and every
instruction costs a memory fetch.

This processor packs up to four such instructions into one 32-bit word. Each
opcode byte carries a 2-bit **entry type** that says how long the instruction
is. A **byte pointer (BP)** walks through the current word. A new word is
fetched only when the word is used up or the program jumps. Jumps carry a
byte number next to the word offset, so a jump can land in the middle of a
word. Only the control unit and a few registers change. The data path (ALU,
register bank, memory interface) is the usual one for this kind of memory-based
stack machine.

On the four benchmark programs in `tb/` the packed code is 29–48 % smaller
than one word per instruction, and 33–50 % fewer words are fetched (see
[Measured behaviour](#measured-behaviour)).

## The packed instruction word

```
 byte 0 = IR[31:24]    byte 1 = IR[23:16]    byte 2 = IR[15:8]    byte 3 = IR[7:0]
+--+--------+         +--+--------+         +--+--------+         +--+--------+
|e1| opcode |         |e2| opcode |         |e3| opcode |         |e4| opcode |
+--+--------+         +--+--------+         +--+--------+         +--+--------+
 2     6               or an operand byte    or an operand byte    or an operand byte
```

| entry type | meaning | length |
|---|---|---|
| 0 | no more instructions in this word: clear BP and fetch the next word | – |
| 1 | S-format: opcode only | 1 byte |
| 2 | M-format: opcode + one operand byte | 2 bytes |
| 3 | L-format: opcode + three operand bytes (`IR[23:0]`) | the whole word |

An L-format instruction can only start at byte 0. An M-format instruction
cannot start at byte 3, because its operand would fall outside the word. The
decoder treats both misplacements as **HALT**; the processor stops and stays
stopped until reset. So exactly twelve word layouts are legal:

```
L        M-M      M        M-S-S    M-S      S-S-S-S
S-S-S    S-S      S        S-S-M    S-M-S    S-M
```

A layout shorter than four bytes is padded with a zero byte, whose entry
type 0 ends the word. The byte after a full word is not decoded at all: BP
wraps to 0 and a fetch follows.

Operands are unsigned: the operand byte of an M-format instruction is
zero-extended, and so is the 24-bit operand of an L-format instruction.

### Jump and call operands

```
jmps (M-format):      | jmps opcode (8) | NW (6) | NB (2) |
jmp / jt / jf (L):    | opcode (8) |       NW (22)       | NB (2) |
call (L):             | call opcode (8) | target word (22) | NB (2) |
```

* **NW** is the word offset of the target, counted from the word after the
  jump (PC has already been incremented by the fetch). It enters the PC
  adder as `arg[23:2]` sign-extended. A long jump can therefore go backwards.
  A short `jmps` has a zero-extended 6-bit offset, so it reaches at most 63
  words forward.
* **NB** is the target byte. A taken jump loads NB into BP, fetches the target
  word and starts decoding at byte NB.
* `call` carries an **absolute** word address. That word is a function header,
  not code: `{8'h00, frame size K (22 bits), start byte (2 bits)}`. Code
  begins in the next word, at the start byte.

## Decoding, step by step

The control unit (`sx_control`) is a micro-sequencer. It emits one control
word per clock cycle.

```
START --> IF --> ID0 --+--> PRE_IF --> IF                    (entry type 0)
                       +--> HALT                             (misplaced L or M)
                       +--> ID1 --> EX step 0 .. n --+--> ID0   (BP != 0, no jump)
                                                     +--> IF    (BP == 0, or jump/call/return)
```

| state | what it does | cycles |
|---|---|---|
| START | `PC <- 1` (the constant input of mux j), `BP <- 0` | once after reset |
| IF | `IR <- M[PC]`, `PC <- PC+1` | 1 per word |
| ID0 | first decode state: look at the byte at BP. Entry type 0 goes to PRE_IF. A misplaced format goes to HALT. For M and L, also `ARG <-` the operand through mux i. | 1 per instruction |
| ID1 | second decode state: `BP <- BP+1` (S), `BP+2` (M) or `0` (L) | 1 per instruction |
| PRE_IF | `BP <- 0` | 1 |
| EX | the instruction's control steps | see the table below |

The published decode flow chart has one ID1 state per format and byte
position (ID1_S0…S3, ID1_M0…M2, ID1_L0). Here these are one state that
remembers the decoded class and the next BP.

After the last step of an instruction, the next state is **ID0** when BP is
not 0 and nothing redirected the stream. In that case the next instruction
comes from the same word without touching memory; this is what saves fetches.
Otherwise the next state is **IF**. Each instruction costs two decode cycles
on top of its execute steps. This is where the packed processor loses time
against a word-per-instruction design: it fetches less but decodes longer.

## Data path

`sx_datapath` follows the published data-path drawing. All register and
multiplexer names come from it.

| element | sources |
|---|---|
| TS, SP, FP, NX, FF, AA | bus = mux **b**: memory output (dbus), PC, tbus |
| ALU p1 = mux **x** | TS, SP, FP, NX |
| ALU p2 = mux **y** | FF, arg, arg[23:2], AA |
| ALU result | **tbus** |
| memory address = mux **a** | PC, tbus |
| memory write data = mux **d** (the BIU) | TS, FP |
| BP = mux **c** | constants 0, 1, 2, 3, arg[1:0] |
| ARG = mux **i** | `{0,IR[23:16]}`, `{0,IR[15:8]}`, `{0,IR[7:0]}`, `IR[23:0]` |
| PC = mux **j** (`sx_pc_unit`) | npc = PC + ebus, tbus, constant 1 |
| ebus = mux **e** | 1, arg[23:2] |

* TS is the top of the evaluation stack.
* SP points at the second element, which lives in memory.
* FP is the frame pointer.
* NX and FF are temporaries.
* AA is the allocation pointer for `new`.

Memory (`sx_memory`) holds both code and data. It is word-addressed and reads
combinationally, so one control step can put an address on tbus and capture
the word (`alu(FP+1)->tbus, mR(tbus)->FF`). Writes happen at the clock edge.

There is only one register-bank bus. A published step that loads two
registers from different sources in the same cycle ("`mR(sp)->ts, sp-1`")
therefore takes two cycles here.

## Instruction set

The published design is a superset of a 36-instruction reference set, and
that set is not reproduced here. The opcodes below are this design's own.
They cover what the benchmarks need and every path in the data path. Format
is whatever the entry type says. `lit`, for example, can be M-format (8-bit
constant) or L-format (24-bit constant). "second" is the stack element below
TS.

| op | name | effect | EX steps |
|---|---|---|---|
| 0 | nop | – | 1 |
| 1 | lit a | push a | 3 |
| 2 | get a | push M[FP−a] | 3 |
| 3 | put a | M[FP−a] ← TS, pop | 3 |
| 4 | ld | TS ← M[TS] | 1 |
| 5 | st | M[TS] ← second, pop two | 6 |
| 6–16 | add sub mul and or xor shl shr eq lt gt | TS ← second op TS, pop (lt/gt signed; eq/lt/gt give 0/1) | 3 |
| 17 | not | TS ← ~TS | 1 |
| 18 | dup | push TS | 2 |
| 19 | drop | pop | 2 |
| 20 | swap | exchange TS and second | 3 |
| 21 | jmps NW,NB | short jump | 1 |
| 22 | jmp NW,NB | long jump | 1 |
| 23 / 24 | jt / jf NW,NB | jump if TS ≠ 0 / = 0; pop | 3 |
| 25 | call W,NB | call the function whose header is at word W | 7 |
| 26 | ret a | return; drop a words from the frame | 7, or 6 with a value |
| 27 | new | TS ← AA, AA ← AA + TS | 3 |

Any opcode without an entry in this table executes as `nop`.

### Calls and returns

The call and return sequences follow the published register-transfer steps.

```
call:  SP+1 ; TS->M[SP] ; PC->TS                      (return address in TS)
       W->tbus->NX,PC ; NB->BP ; M[W]->IR             (read the header)
       IR[23:0]->ARG ; PC+1                           (code starts after the header)
       alu(SP+K)->tbus, FP->M[tbus] ; ARG[1:0]->BP    (save FP above the frame)
       alu(SP+K)->SP,FP                               -> IF
ret a: SP->FF ; alu(FP==FF)
       equal     (no value):  TS->PC ; FP-a->SP ; M[SP]->TS ; SP-1 ; M[FP]->FP, 0->BP -> IF
       not equal (value in TS): M[FP+1]->FF ; FF->PC ; FP-a->SP ; M[FP]->FP, 0->BP -> IF
```

A frame built by `call` with frame size K looks like this (addresses grow
upward):

```
FP+1        return address    (pushed by the callee's first push)
FP          caller's FP
FP-1 .. FP-(K-1)   locals
FP-K        last argument (the caller's TS at the call)
FP-K-1 ..   earlier arguments
```

`ret` with `a = K + number of arguments` removes the arguments. A returned
value replaces them on the caller's stack. Without a return value, the caller
sees the stack exactly as it was before it pushed the arguments. Whether a
value is returned is decided at run time: the callee has pushed something
exactly when SP ≠ FP. So `ret` needs no separate "return value" opcode.

The test of FP == SP, and the TS tests of `jt`/`jf`, use the ALU zero flag
registered at the end of the step that computed it. The control word never
depends combinationally on the ALU result.

Two assertions in `sx_control` guard the sequencer. HALT is left only through
reset, and a fetch cycle never writes memory.

## Top level and memory map

`sx_packed_top` joins the control unit, the data path and the memory.

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| load_we, load_addr, load_data | in | 1/32/32 | writes a memory word; takes the memory while high (use while in reset) |
| halted | out | 1 | decoder reached HALT |
| dbg_ts, dbg_sp, dbg_fp, dbg_pc, dbg_aa | out | 32 | register values |
| dbg_fetches, dbg_instrs, dbg_cycles | out | 32 | word fetches, executed instructions and cycles since reset (cycles stop at HALT) |

| parameter | default | meaning |
|---|---|---|
| MEM_WORDS | 16384 | memory size in 32-bit words |
| STACK_BASE | 0x2000 | reset value of SP and FP |
| HEAP_BASE | 0x3000 | reset value of AA |

Code starts at word 1. The stack grows upward from STACK_BASE, and locals of
the outermost code lie just below it.

To end a program, place an L-format entry type (`8'hC0`) at byte 1, 2 or 3;
the decoder then halts.

## Measured behaviour

These numbers come from the programs in `tb/`, written for the instruction
set above and run on the default-size design. The "unpacked" columns count
one word per instruction, the layout of a word-per-instruction processor.

| program | packed code | unpacked code | reduction | word fetches | executed instructions | fewer fetches | cycles |
|---|---|---|---|---|---|---|---|
| bubble sort, 20 descending integers | 112 B | 200 B | 44 % | 4258 | 7755 | 45 % | 44724 |
| quicksort, 20 descending integers | 200 B | 316 B | 37 % | 3776 | 5780 | 35 % | 34936 |
| Towers of Hanoi, 7 disks | 116 B | 164 B | 29 % | 3058 | 4584 | 33 % | 30315 |
| 4×4 matrix multiply | 128 B | 244 B | 48 % | 1094 | 2171 | 50 % | 12401 |

The original evaluation of this packing scheme used its own, larger
instruction set. It reports about 30 % smaller code, about 34 % fewer
instruction fetches and about 14 % more cycles than the unpacked processor.
The code and fetch reductions here are of the same order. Cycle counts cannot
be compared, because the instruction set and its control steps differ, and
no unpacked processor is built here. The original FPGA implementation was
about 20.7 k equivalent gates.

## What is taken from the published design, and what is not

Taken from the published design:

* the entry-type encoding and its placement in the top two bits of an opcode
  byte;
* the byte order (byte 0 = `IR[31:24]`), the twelve layouts, and HALT for
  misplaced formats;
* the BP update rule;
* the NW/NB jump formats and "a taken jump loads NB into BP";
* the register set and every multiplexer with its inputs;
* the call, return and return-with-value step sequences.

This design's own choices:

* **Instruction set and opcodes.** The original set is not reproduced. The
  control steps of all instructions other than jumps, call and return are
  written here in the same register-transfer style.
* **Call target header.** The call target word is a header holding the frame
  size in bits [23:2] and a start byte in bits [1:0]. The published call
  sequence reads a word at the target into IR and takes ARG and BP from it,
  but does not give the field positions. The published `PC++` of the call
  is placed after PC is loaded with the target, so that execution continues
  after the header.
* **Jump offsets.** NW counts from the word after the jump and is
  sign-extended.
* **Start address.** The constant 1 on mux j is used as the start address.
* **Reset values.** SP/FP start at STACK_BASE and AA at HEAP_BASE. All other
  registers reset to 0.
* **Memory.** The memory size and its single-cycle combinational read are
  this design's choice. So are the load port and the debug counters.
* **Extra cycles.** Steps that need two sources on the single register bus
  are split over two cycles. Condition tests use a registered zero flag.

## Simulating

Every file in `rtl/` holds one module or package; `sx_pkg.sv` must be read
first. Each testbench prints `TB_RESULT checks=N failures=M` and finishes.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sx_pkg.sv \
          tb/tb_sx_packed_top.sv --top-module tb_sx_packed_top -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| tb_sx_packed_top | whole processor at default size. Covers: all twelve layouts; PRE_IF; mid-word decoding; jumps landing inside a word; short/long/conditional jumps; call and both returns; `new`; HALT; bubble sort. Checks fetch counts on straight-line code, and that each mechanism occurred. |
| tb_sx_workloads | quicksort, Towers of Hanoi (every move checked), 4×4 matrix multiply; prints code size and fetch statistics |
| tb_sx_control | control unit alone: state sequence, decode states, step count of every instruction, taken/not-taken jumps, both return paths, HALT |
| tb_sx_datapath | data path driven by hand-written control words, with every multiplexer input |
| tb_sx_pack_decode | exhaustive: every BP value and every byte value |
| tb_sx_pc_unit, tb_sx_alu, tb_sx_memory | the remaining units against reference models |

The end-to-end testbenches contain a small two-pass assembler. It lays
instructions into words under the packing rules and resolves labels to
(word, byte). It is the quickest way to write new programs for the
processor.

To add an instruction:

1. Give it an opcode in `sx_pkg`.
2. Write its steps as a new case in the EX state of `sx_control`, using the
   helper functions there (`sp_inc`, `ts_to_msp`, `msp_to_ts`, …).
3. Set `done` on its last step, and `take` on the step that redirects the
   instruction stream, if any.
