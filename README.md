# risc16: a small single-cycle 16-bit load/store RISC

This is a minimal RISC processor built around one idea: every instruction is a
single 16-bit word, and the word is split so that a 4-bit opcode, three 2-bit
register addresses and a 7-bit signed immediate all fit. Arithmetic and logic
work only on registers and immediates; memory is reached only by `LD` and `ST`.
The instruction set is modelled loosely on SPARC: two condition flags (C, Z),
`SETHI` to set the upper bits of a register, and `BAL`/`JMPL` that leave a
return address in a link register.

The core executes one instruction per clock cycle, with no pipeline. It is
written in synthesizable SystemVerilog and comes with a unified 2^16-word
memory and a loader port, so a testbench can place a program in memory and run it.

## Registers and words

* Data words, instruction words and addresses are 16 bits. Memory is addressed
  in 16-bit words. Instructions and data share one address space.
* There are four registers. R1, R2 and R3 are general-purpose registers. R0 always reads as zero, and
  writes to it are discarded. R0 is the "don't care" destination: `ADD R0,...` only sets
  flags, and `BAL` with R0 as link is a plain branch.
* There are two flags. **Z** is set when an arithmetic/logic result is zero. **C** is the carry of an
  addition, the *borrow* of a subtraction (set when `Rs1 < Op2 + C`, unsigned),
  or the bit shifted out by `LSR`. `AND`, `OR` and `XOR` clear C.
  Only the eight arithmetic/logic instructions change the flags.

## Instruction formats

```
        15   12 11 10 9  8  7  6  5  4        0
  A0  | opcode | rd  | rs1 | 0 | rs2 |  00000   |   Op2 = Rs2
  A1  | opcode | rd  | rs1 | 1 |     simm7      |   Op2 = sign-extended simm7
  B   | opcode | rd  |         simm10           |   SETHI, BAL
  C   | 1011   | cond|         simm10           |   BEQ/BNE/BCS/BCC
```

The field widths follow from two rules. A format A word has x + 2n + 1 + s = 16 bits and a
format B word has x + n + l = 16 bits. Here x is the opcode width, n the register
address width, s the short immediate width and l the long immediate width. This core uses
n = 2 and s = 7, which gives x = 4 and l = 10. Both immediates are two's
complement. For `SETHI` followed by `ADD` to reach every 16-bit value, s + l must be at least 16; here it is 17.
The widths are the constants `NREG`, `SIMM_S`, `SIMM_L` and `OPC_W` in
`rtl/risc16_pkg.sv`. The opcode map below only makes sense with x = 4.

## Opcode map

| Op[3:2] \ Op[1:0] | 00    | 01   | 11  | 10   |
|-------------------|-------|------|-----|------|
| 00                | ADD   | ADDX | AND | OR   |
| 01                | SUB   | SUBX | XOR | LSR  |
| 11                | LD    | ST   | –   | JMPL |
| 10                | SETHI | –    | Bcond | BAL |

The rows with Op[3] = 0 are exactly the eight flag-setting ALU instructions.
Their Op[2:0] is passed to the ALU unchanged. Op[3:2] = 11 is format A with
an address Rs1 + Op2. Op[3:2] = 10 is format B/C. In a `Bcond` word, the `rd` field is the
condition: 00 `BEQ` (Z=1), 01 `BNE` (Z=0), 10 `BCS` (C=1), 11 `BCC` (C=0).
The two unassigned opcodes (1001, 1111) do nothing except advance the PC.

## Semantics

Assembly operand order is SPARC's: sources first, destination last.

| Instruction          | Effect                                   | Flags |
|----------------------|------------------------------------------|-------|
| `ADD Rs1,Op2,Rd`     | Rd ← Rs1 + Op2                            | C, Z  |
| `ADDX Rs1,Op2,Rd`    | Rd ← Rs1 + Op2 + C                        | C, Z  |
| `SUB Rs1,Op2,Rd`     | Rd ← Rs1 − Op2                            | C (borrow), Z |
| `SUBX Rs1,Op2,Rd`    | Rd ← Rs1 − Op2 − C                        | C (borrow), Z |
| `AND`/`OR`/`XOR`     | Rd ← Rs1 op Op2                           | C ← 0, Z |
| `LSR Rs1,Rd`         | Rd ← Rs1 >> 1 (zero in)                   | C ← Rs1[0], Z |
| `LD [Rs1+Op2],Rd`    | Rd ← mem(Rs1 + Op2)                       | –     |
| `ST Rd,[Rs1+Op2]`    | mem(Rs1 + Op2) ← Rd                       | –     |
| `SETHI simm10,Rd`    | Rd ← simm10 << 6                          | –     |
| `Bcond simm10`       | if cond: PC ← PC + simm10                 | –     |
| `BAL simm10,Rd`      | Rd ← PC; PC ← PC + simm10                 | –     |
| `JMPL Rs1+Op2,Rd`    | Rd ← PC; PC ← Rs1 + Op2                   | –     |

There is no shift-left instruction: add a register to itself. Multi-word
arithmetic chains through C with `ADDX`/`SUBX`.

**What "PC" means.** In all three control transfers, PC is the address
of the control-transfer instruction itself. This holds both for the branch base and for the
link value. Branches therefore reach −512…+511 words around the branch. A
subroutine called with `BAL sub,R2` returns with `JMPL R2+1,R0`. Placing a
full 16-bit address in a register (`SETHI` + `ADD`) and then `JMPL` to it
reaches any address. This reading follows SPARC. Taking the address of the
next instruction would be equally consistent with the instruction table. If you
change it, change `WB_LINK` in `risc16_top` and `pc_rel` in `risc16_pc`.

## Datapath and timing

Everything happens in one clock cycle:

1. The memory fetch port reads the word at PC. Reads are asynchronous.
2. `risc16_decoder` splits the word, sign-extends the immediates and produces
   a control word (`ctrl_t` in the package).
3. `risc16_regfile` reads Rs1, Rs2 and Rd. Rd is read because `ST` stores it.
4. `risc16_alu` computes Rs1 op Op2. For `LD`, `ST` and `JMPL`, it computes the address Rs1 + Op2 with
   `ADD`, and the flags are not written.
5. A load reads the memory data port, which is also asynchronous.
6. On the rising edge, all state updates together: the PC (`risc16_pc`), Rd, the C/Z flags
   (`risc16_flags`) and the stored memory word.

A conditional branch tests the flags as they stood *before* the current
instruction. The result is CPI = 1, with a critical path from fetch through
decode, register read, ALU and load to the register write.

The memory has 2^16 words (`MEM_AW` on the top, `AW` on `risc16_mem`). Its
asynchronous reads suit simulation or distributed RAM. A block-RAM
implementation would need a multi-cycle or pipelined control unit, which this
core does not have.

## Top-level interface (`risc16_top`)

| Port | Dir | Width | Use |
|------|-----|-------|-----|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high. Sets PC = 0 and clears R1–R3, C and Z |
| `ext_we`, `ext_addr`, `ext_wdata` | in | 1/16/16 | memory loader. Writes on the rising edge while `rst` is high |
| `ext_rdata` | out | 16 | word at `ext_addr` while `rst` is high |
| `pc`, `instr` | out | 16 | address and word of the executing instruction |
| `flag_c`, `flag_z` | out | 1 | flags |

To use it: hold `rst`, write the program from address 0, then release `rst`. There is
no halt instruction. By convention a program ends in `BAL 0,R0`, a branch to itself. To
read results, assert `rst` again and read memory through `ext_*`. Asserting `rst` clears the registers but not memory.

## Files

| File | Contents |
|------|----------|
| `rtl/risc16_pkg.sv` | widths, opcode/condition/ALU enums, control word struct |
| `rtl/risc16_decoder.sv` | field split, immediates, control decode |
| `rtl/risc16_alu.sv` | the eight ALU functions and the C/Z results |
| `rtl/risc16_regfile.sv` | R0..R3, three read ports and one write port |
| `rtl/risc16_flags.sv` | C/Z register and branch-condition test, with an assertion that the flags hold unless loaded |
| `rtl/risc16_pc.sv` | PC and next-PC selection |
| `rtl/risc16_mem.sv` | unified memory, fetch port and load/store port |
| `rtl/risc16_top.sv` | the processor: all of the above wired together |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Each has a watchdog.

* `risc16_decoder_tb` checks all 65536 instruction words against an opcode table.
* `risc16_alu_tb` runs corner cases and 20000 random vectors against an integer reference.
* `risc16_regfile_tb`, `risc16_flags_tb`, `risc16_pc_tb` and `risc16_mem_tb`
  run random stimulus against behavioural models. The memory test uses the full 2^16 words.
* `risc16_top_tb` runs the default-size processor in lock-step with an
  instruction-level model inside the testbench. It compares the PC, instruction, flags and
  registers every cycle, and all of memory after each run. It first runs a
  directed program and checks results worked out by hand. The program covers:
  - a `SETHI`/`ADD` constant
  - 32-bit add and subtract through `ADDX`/`SUBX`
  - shift left by adding a register to itself
  - a `BAL`/`JMPL` subroutine called in a loop
  - every branch condition, taken and not taken
  - writes to R0
  - a store over a later instruction, which is then executed

  It then fills memory with random words eight times and runs each image for 4000
  cycles. It counts each mechanism (every opcode, each condition taken and not taken,
  carry/borrow in, discarded R0 write, store-then-fetch, call/return) and fails if any
  never occurred.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          rtl/risc16_pkg.sv tb/risc16_top_tb.sv --top-module risc16_top_tb
./obj_dir/Vrisc16_top_tb +verilator+rand+reset+2
```

Run it with random initial values (`+verilator+rand+reset+2`). This shows that nothing depends on
uninitialised state: the testbenches load all of memory before they read it.

## What is specified and what is chosen here

The following come from the instruction set definition:
* the formats
* the field widths
* the opcode and condition encodings
* the instruction list and its register-transfer semantics
* which instructions update the flags, and the Z rule
* C cleared by the logic instructions
* R0 fixed at zero
* the ±512 branch range

The following are design choices, since the definition leaves them open:
* the single-cycle organisation and all internal datapath structure
* the unified, word-addressed 2^16-word memory with asynchronous reads
* C as borrow on subtraction, and C as the shifted-out bit for `LSR`
* PC meaning the address of the control-transfer instruction, for both the branch base and the link
* reset values (PC = 0, registers and flags cleared)
* the loader port
* unassigned opcodes acting as no-operations

The instruction set definition also mentions, without specifying them, a set of
CISC-style extensions: variable-length instructions, memory operands,
dedicated address registers, auto-increment/decrement addressing, and
stack-based `CALL`/`RETURN`. None of them is implemented.
