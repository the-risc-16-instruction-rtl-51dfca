# RiSC-16: a single-cycle 16-bit teaching processor

The RiSC-16 ("Ridiculously Simple Computer") is a deliberately small instruction
set: eight 16-bit registers, eight instructions, three instruction formats, and
word addressing throughout (address *n* names the *n*-th 16-bit word, not a
byte). The point of this RTL is the simplest possible hardware for that ISA: a
**single-cycle datapath** in which every instruction is fetched, decoded,
executed and retired between two rising clock edges. There is no pipeline, so no
hazards, stalls or forwarding. The only decisions the hardware makes are the
settings of a handful of multiplexers and two write enables. A small decoder
derives them from the 3-bit opcode alone, plus the ALU's equality flag for
branches.

## Instruction set

| opcode | mnemonic | format | effect |
|---|---|---|---|
| `000` | `add rA, rB, rC`  | RRR | rA ← rB + rC |
| `001` | `addi rA, rB, imm`| RRI | rA ← rB + sext(imm7) |
| `010` | `nand rA, rB, rC` | RRR | rA ← ~(rB & rC) |
| `011` | `lui rA, imm`     | RI  | rA ← imm10 << 6 (low six bits zero) |
| `100` | `sw rA, rB, imm`  | RRI | Mem[rB + sext(imm7)] ← rA |
| `101` | `lw rA, rB, imm`  | RRI | rA ← Mem[rB + sext(imm7)] |
| `110` | `bne rA, rB, imm` | RRI | if rA ≠ rB: PC ← PC + 1 + sext(imm7) |
| `111` | `jalr rA, rB`     | RRI, imm = 0 | PC ← rB, rA ← PC + 1 |

Bit layout (bit 15 on the left):

```
RRR:  [15:13] opcode | [12:10] rA | [9:7] rB | [6:3] 0000 | [2:0] rC
RRI:  [15:13] opcode | [12:10] rA | [9:7] rB | [6:0] signed imm7 (-64..63)
RI :  [15:13] opcode | [12:10] rA | [9:0] unsigned imm10 (0..1023)
```

Register r0 always reads as zero. Writes to it are allowed but have no visible
effect. Assembler pseudo-instructions need no hardware. `nop` is `add r0,r0,r0`
(all zeros). `lli` is an `addi` of the low six bits. `movi` is `lui` followed by
`lli`. `.fill` and `.space` only lay out data.

`halt` has no encoding of its own in the ISA's instruction list. **In this
design, a `jalr` whose low seven bits are not all zero is a halt.** See
"Halt" below.

## How one instruction flows through the datapath

Within one clock cycle, from the moment the PC changes:

1. The PC addresses the **instruction memory**, which returns the instruction
   word combinationally.
2. The opcode goes to **CONTROL**. The register fields go to the **register
   file**. rB always drives the SRC1 read specifier and rA always drives the
   TGT (write) specifier. The SRC2 read specifier comes from **MUX_rf**. It is
   rC for `add`/`nand`, and rA for `sw` (the register to store) and `bne` (the
   register to compare).
3. Two immediate generators run on every instruction. **Sign-Extend-7** copies
   bit 6 into bits 15..7. **Left-Shift-6** places the 10-bit field in bits 15..6
   and zeros bits 5..0.
4. **MUX_alu1** feeds the ALU's first input with register SRC1 or the shifted
   `lui` immediate. **MUX_alu2** feeds the second input with register SRC2 or
   the sign-extended immediate.
5. The **ALU** does ADD, NAND, PASS1 (first operand straight through) or the
   equality test. Its EQ! flag is high whenever the two operands are equal.
6. The ALU output addresses the **data memory** (`lw`/`sw`). The data written
   by `sw` is register SRC2, and the read data is available in the same cycle.
7. **MUX_tgt** chooses what is written to rA: the ALU output, the data-memory
   output (`lw`) or PC+1 (`jalr`).
8. The **PC unit** computes PC+1 and the branch target PC+1+sext(imm7) every
   cycle. **MUX_pc** chooses between those two and the ALU output (the `jalr`
   target).

At the rising edge the PC, the register file (if WE_rf) and the data memory (if
WE_dmem) all latch at once. The next instruction then appears.

### Control settings per instruction

Produced by `risc16_control` (a `–` means the value is unused, and the decoder
drives a fixed default):

| instr | FUNC_alu | MUX_alu1 | MUX_alu2 | MUX_rf | MUX_tgt | MUX_pc | WE_rf | WE_dmem |
|---|---|---|---|---|---|---|---|---|
| add  | ADD   | reg | reg  | rC | ALU  | PC+1 | 1 | 0 |
| addi | ADD   | reg | imm  | –  | ALU  | PC+1 | 1 | 0 |
| nand | NAND  | reg | reg  | rC | ALU  | PC+1 | 1 | 0 |
| lui  | PASS1 | imm<<6 | – | –  | ALU  | PC+1 | 1 | 0 |
| sw   | ADD   | reg | imm  | rA | –    | PC+1 | 0 | 1 |
| lw   | ADD   | reg | imm  | –  | DMEM | PC+1 | 1 | 0 |
| bne  | EQ    | reg | reg  | rA | –    | EQ! ? PC+1 : PC+1+imm | 0 | 0 |
| jalr | PASS1 | reg | –    | –  | PC+1 | ALU  | 1 | 0 |

The branch decision is the AND of "opcode is bne" and "NOT EQ!". It is folded
into the decoder, which is the only place that sees EQ!.

Two cases are worth spelling out:

- **`lui` goes through the ALU.** The shifted immediate enters on the first
  ALU input and PASS1 sends it through unchanged, so no extra mux is needed in
  front of the register file. The same PASS1 carries rB to the PC for `jalr`.
- **`jalr rA, rB` with rA = rB** jumps to the old value of the register. The
  read is combinational and the write happens only at the clock edge.

## Halt

A `jalr` with a non-zero immediate field is decoded as a halt, and the `halted`
output goes high as soon as that word is at the PC. While halted, the PC does not
advance and both write enables are forced low, so the machine sits on the halt
word indefinitely. Two things end a halt. A reset restarts the machine at
address 0. Replacing the halt word through the instruction-memory load port
makes the machine carry on from that address with the new instruction. "Print the machine
state" at a halt is left to the environment. The testbench does it.

## Memories and the outside world

Both memories default to the full 16-bit word address space: 64K words of 16
bits each (1 Mbit apiece). Both read combinationally, as the single-cycle timing
requires, and write at the rising edge. They are written as plain arrays. A
synthesis flow for an FPGA or ASIC would map them onto RAM macros with
asynchronous read, or would need the design retimed for synchronous-read RAMs.

The processor itself has no I/O. To make it usable, the top level adds:

- an **instruction-memory load port** (`imem_we`, `imem_waddr`, `imem_wdata`)
  that writes one word per clock;
- a **second data-memory port** (`dmem_ext_addr`, `dmem_ext_we`,
  `dmem_ext_wdata`, `dmem_ext_rdata`) for preloading data and reading results.
  Reads are combinational. If this port and a `sw` write the same word in the
  same cycle, the `sw` wins.

`IMEM_AW` and `DMEM_AW` (default 16) shrink the memories. The PC and the ALU
address are then truncated to the low bits.

## Reset

`rst` is synchronous and active high. It sets the PC to 0, clears all eight
registers, and blocks `sw` writes while it is asserted. Memory contents are
kept. Load programs and data with `rst` held high (or before releasing it), then
release it. The first instruction executes on the next rising edge.

## Choices made in this implementation

Beyond the datapath itself, the following are decisions of this RTL rather than
part of the architecture:

- the binary encodings of the mux selects and ALU functions (in `risc16_pkg`);
  only the widths of the mux selects are architectural;
- the opcode assignment sw = `100`, lw = `101`, following the order of the
  instruction list (some drawings of this ISA show the two swapped);
- the halt encoding and its freeze behaviour;
- synchronous reset, and the reset value of zero for the PC and registers;
- the memory sizes, the load port and the second data-memory port;
- the value the ALU outputs for its EQ function (the 0/1 result of the test;
  nothing reads it).

The equality test is a direct 16-bit compare. A subtract plus zero detection
would serve equally well.

## Files

| file | contents |
|---|---|
| `rtl/risc16_pkg.sv` | opcode, ALU-function and mux-select enums; `ctrl_t`; instruction-field struct; `sext7` and `lshift6` |
| `rtl/risc16_cpu.sv` | top level: immediate logic, MUX_rf/alu1/alu2/tgt, wiring, halt decode, two assertions |
| `rtl/risc16_pc.sv` | PC register, +1 adder, branch adder, MUX_pc |
| `rtl/risc16_imem.sv` | instruction memory with load port |
| `rtl/risc16_control.sv` | opcode + EQ! → control signals |
| `rtl/risc16_regfile.sv` | 8 × 16 register file, 2 read ports and 1 write port, r0 reads zero |
| `rtl/risc16_alu.sv` | ADD / NAND / PASS1 / EQ, EQ! flag |
| `rtl/risc16_dmem.sv` | two-port data memory |
| `tb/tb_risc16_*.sv` | one self-checking testbench per module |

After synthesis the top level holds 16 flip-flops (the PC), a 128-bit register
array and 2 × 1 Mbit of memory, plus three 16-bit adders and a few dozen
word-level muxes and gates.

The top level carries two concurrent assertions, checked in simulation. No
instruction enables both writes, and a halted machine keeps its PC.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/risc16_pkg.sv rtl/risc16_*.sv tb/tb_risc16_cpu.sv \
    --top-module tb_risc16_cpu -Mdir obj_cpu
./obj_cpu/Vtb_risc16_cpu
```

To run a unit testbench, pass the package, the one module and `tb/tb_risc16_<name>.sv`
instead of the full list above.

### What the testbenches check

- **`tb_risc16_cpu`** runs the processor at its default size. It keeps its own
  instruction-level model of the ISA, written independently of the RTL, and
  compares it with the hardware after every clock edge: the PC, r1..r7, the
  halted flag and every stored word. This also shows that each instruction
  takes exactly one cycle.
  - **Phase 1** runs a hand-assembled program. It sums an array with a `lw`/`bne`
    loop, multiplies by repeated addition, builds 0xBEEF with `lui`+`addi`,
    calls a subroutine with `jalr` and returns, writes to r0, loads a word it
    stored, branches not-taken, and halts. The stored results (1041, 143,
    0xBEEF, 0xFF70, the link value 23, 0) and the cycle count (81 instructions
    before the halt) were worked out by hand and are checked.
  - **Phase 2** fills both 64K memories with random instructions and data. It
    then runs 200,000 cycles of random code, restarting every 400 cycles from
    random register values at a random address.
  - Coverage: every opcode, taken and not-taken branches in both directions,
    r0 writes, jalr links, halts and loads of stored words must each occur, or
    the test fails. A run takes well under a second.
- **Unit testbenches**:
  - `tb_risc16_alu`: all four functions on random operands.
  - `tb_risc16_regfile`: reset, r0 and random traffic against a shadow copy.
  - `tb_risc16_control`: every opcode with EQ! low and high against the table
    above.
  - `tb_risc16_pc`: each MUX_pc choice with positive and negative offsets,
    plus the hold input.
  - `tb_risc16_imem` and `tb_risc16_dmem`: scattered writes and reads, port
    collisions included.

## Changing the design

- New instructions need an opcode, which the 3-bit field has none left for. The
  usual route is to reuse the spare immediate bits of `jalr`, as halt does here.
- To see how the datapath is steered, read `risc16_control.sv` alongside the
  table above. Every select is a named enum from `risc16_pkg`, so a waveform
  viewer shows `ALU_PASS1`, `TGT_PC1` and so on.
- Smaller memories: set `IMEM_AW`/`DMEM_AW`. The testbench `tb_risc16_cpu`
  assumes the 16-bit default (its `AW` localparam) and must be changed with them.
