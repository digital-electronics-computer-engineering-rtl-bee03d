# Single-cycle MIPS processor

A 32-bit MIPS processor that finishes every instruction in one clock cycle.
It fetches an instruction, reads its operands, computes in the ALU, touches
data memory, and writes back, all between two rising clock edges. The
machine is split into four "boxes":

| box       | module    | contents |
|-----------|-----------|----------|
| ibox      | `ibox`    | program counter, PC+4 and branch-target adders, next-PC mux, instruction memory |
| cbox      | `control` | main decoder and ALU decoder |
| ebox      | `ebox`    | register file, sign extension, ALU, the three datapath muxes |
| dbox      | `dbox`    | 16 x 32-bit data memory |

The top is `mips`. Out of reset it runs a short Fibonacci program from
instruction memory. The program leaves 13 (`0x0000000D`) in `$t2`, then sits
in a one-instruction loop at address `0x24`.

Instructions executed: `add`, `sub`, `and`, `or`, `slt`, `addi`, `lw`, `sw`
and `beq`. The controller also decodes `j`, but the datapath has no jump
path, so a `j` does nothing but advance the PC. Loops are written with
`beq $0,$0,target`.

## How the pieces connect

```
            +------------------- ibox -------------------+
  reset --> | flopr_32 PC --> imem[PC[5:2]] --> Instr    |
            |   ^   adder_32 PC+4                        |
            |   +-- mux2_32 <-- adder_32 PC+4+(imm<<2)   |
            |        sel = branch & zero                 |
            +--------------------------------------------+
   Instr[31:26], Instr[3:0] --> control --> regwrite regdst alusrc
                                            branch memwrite memtoreg alucontrol
   Instr[25:0] --> ebox:
        regfile rd1 = SrcA ------------------> alu_32 --> ALUResult, zero
        regfile rd2 --> mux2_32(alusrc) -> SrcB -^
        sgnext(Instr[15:0]) -----^
        mux2_5(regdst): rt / rd  --> write register
        mux2_32(memtoreg): ALUResult / ReadData --> write data
   dbox: dmem[ALUResult[5:2]] <- WriteData (memwrite), -> ReadData
```

Only slices of the instruction bus go to each box. The ebox gets
`Instruction[25:0]` (rs, rt, rd and the immediate). The controller gets
`Instruction[31:26]` and `Instruction[3:0]`. Four funct bits are enough to
tell `add` (0000), `sub` (0010), `and` (0100), `or` (0101) and `slt` (1010)
apart. The controller's `jump` and `memread` outputs stay unconnected. No
jump path exists, and the data memory always drives its read port.

## Timing

All state changes on the rising edge of `clk`:

- the PC loads the next PC;
- the register file writes when `regwrite` is high;
- the data memory writes when `memwrite` is high.

Everything between the edges is combinational. This covers instruction
fetch, register reads, the ALU and the data-memory read. The clock period
must therefore cover the longest path: PC → instruction memory → register
file → ALU → data memory → write-back mux.

`reset` is active high. It clears the PC asynchronously and holds it at 0
for as long as it is high. Nothing else is reset. The register file and the
data memory start with unknown contents. An instruction that shows up while
reset is high still runs through the datapath, and its register write still
happens. The program's first instruction, `addi $t0,$0,8`, therefore writes
`$t0` once under reset and again after reset is released. That does no harm.

## The register file: two dual-port copies

The FPGA target this design was drawn for has RAM with one write port and
one extra read port, and no RAM with three ports. The MIPS register file
needs two reads and one write per cycle, so `regfile` holds **two**
`regarray` instances:

- every write goes to both copies at once, so their contents always match;
- copy 1 answers read port 1 (`rs`);
- copy 2 answers read port 2 (`rt`).

The cost is twice the storage: 2 x 32 x 32 bits for 32 registers. Each
`regarray` writes synchronously and reads asynchronously, as distributed
RAM does. Register `$0` reads as zero because `regfile` forces the read
data to 0 for address 0. A write to `$0` lands in the arrays but can never
be seen.

## The ALU

`alu_32` is built as a ripple chain of eight `alu_4` slices. Each `alu_4`
holds four `alu_1` bit slices, and each `alu_1` contains a `fulladd`.
`alucontrol` is split into two parts (the encoding is in `mips_pkg`):

- `f[2]` inverts B and also serves as the carry into bit 0, which turns
  addition into subtraction;
- `f[1:0]` picks AND, OR, the sum, or "less".

| alucontrol | operation |
|------------|-----------|
| 010 | add |
| 110 | subtract |
| 000 | and |
| 001 | or |
| 111 | set less than |

For `slt`, each slice's `less` input is 0 except bit 0. Bit 0 gets the sum
bit of bit 31, which is the sign of A−B. This is a plain sign test with no
overflow correction. It gives the wrong answer only when A−B overflows, for
example `0x80000000 slt 0x7fffffff`. `zero` is high when the result is all
zeros, and `beq` uses it to decide whether to branch.

## Controller

| instruction | regwrite | regdst | alusrc | branch | memwrite | memtoreg | memread | jump | ALU |
|-------------|---|---|---|---|---|---|---|---|-----|
| R-type      | 1 | 1 | 0 | 0 | 0 | 0 | 0 | 0 | by funct |
| lw          | 1 | 0 | 1 | 0 | 0 | 1 | 1 | 0 | add |
| sw          | 0 | 0 | 1 | 0 | 1 | 0 | 0 | 0 | add |
| beq         | 0 | 0 | 0 | 1 | 0 | 0 | 0 | 0 | subtract |
| addi        | 1 | 0 | 1 | 0 | 0 | 0 | 0 | 0 | add |
| j           | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | – |

An unknown opcode drives every control low. An R-type instruction with an
unknown funct does not write a register.

## Memories

- **Instruction memory** (`imem`): 16 words, read at `PC[5:2]`, so the PC
  wraps every 64 bytes. Its contents are loaded at elaboration from the
  parameter `INIT_FILE`, a hex file with one word per line. The default is
  `rtl/fib.hex`, and the path is relative to the directory the simulator
  runs in. Words the file does not list read as 0, which is a `nop`
  (`sll $0,$0,0` decodes as an R-type add that writes `$0`).
- **Data memory** (`dmem` inside `dbox`): 16 words of 32 bits. The write is
  synchronous. The read is asynchronous and always enabled. Only
  `ALUResult[5:2]` is decoded, so byte addresses wrap every 64 bytes and the
  two low bits are ignored.

## The Fibonacci program

```
00  20080008  addi $t0,$0,8        # loop count
04  2009ffff  addi $t1,$0,-1
08  200a0001  addi $t2,$0,1
0C  11000005  loop: beq $t0,$0,done
10  012a5820  add  $t3,$t1,$t2
14  01404820  add  $t1,$t2,$0
18  01605020  add  $t2,$t3,$0
1C  2108ffff  addi $t0,$t0,-1
20  1000fffa  beq  $0,$0,loop
24  1000ffff  done: beq $0,$0,done
```

With a 10 ns clock, reset high for the first cycle, and cycle 1 as the
reset cycle:

| cycle | PC | instruction | SrcA | SrcB | ALUResult |
|-------|----|-------------|------|------|-----------|
| 1 (reset) | 00 | addi $t0,$0,8  | 0 | 8 | 8 |
| 2  | 00 | addi $t0,$0,8  | 0 | 8 | 8 |
| 3  | 04 | addi $t1,$0,-1 | 0 | FFFFFFFF | FFFFFFFF |
| 4  | 08 | addi $t2,$0,1  | 0 | 1 | 1 |
| 5  | 0C | beq $t0,$0     | 8 | 0 | 8 |
| 6  | 10 | add $t3,$t1,$t2 | FFFFFFFF | 1 | 0 |
| 24 | 10 | add $t3,$t1,$t2 | 1 | 1 | 2 |
| 50 | 18 | add $t2,$t3,$0 | D | 0 | D |
| 54 → | 24 | beq $0,$0,done | 0 | 0 | 0 |

The loop body takes six cycles per pass, and the program runs eight passes.
`0x0000000D` appears on ALUResult in cycle 50, between 490 and 500 ns. The
PC reaches `0x24` in cycle 54 and stays there.

## Simulating

Every file in `rtl/` and `tb/` holds exactly one module or package, named
after the file. Run from the directory that contains `rtl/` and `tb/`,
because the memory files are opened by the relative paths `rtl/fib.hex` and
`tb/memtest.hex`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mips_pkg.sv tb/mips_tb.sv --top-module mips_tb
./obj_dir/Vmips_tb
```

Replace `mips_tb` with the name of any other testbench. Every testbench
checks itself and ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|-----------|---------------|
| `mips_tb` | Fibonacci program at default parameters. Compares PC, instruction, SrcA, SrcB, ALUResult, Zero and MemWrite every cycle with an instruction-level reference model in the testbench, plus the trace rows above, the result D in cycle 50, and the self-loop from cycle 54. Counts taken and untaken branches, R-type and addi write-backs, and the self-loop. |
| `mips_mem_tb` | The same checks on `tb/memtest.hex`, which covers sub/and/or/slt, two `sw`, two `lw` whose results are added, and an untaken `beq`. Only the instruction-memory file is overridden. |
| `ebox_tb` | addi, R-type, lw, sw and beq driven as the controller would drive them, against a register model; writes to `$0` |
| `ibox_tb` | reset, PC+4, branches forward, backward and to itself, no redirect without both branch and zero |
| `control_tb` | every control word, unknown codes |
| `regfile_tb`, `regarray_tb` | both ports see every write, independent reads, `$0`, write timing |
| `dbox_tb`, `dmem_tb` | address decoding and wrap, write enable, write timing |
| `alu_32_tb`, `alu_4_tb`, `alu_1_tb`, `fulladd_tb` | exhaustive below 32 bits; corners and random operands at 32 |
| `adder_32_tb`, `flopr_32_tb`, `mux2_32_tb`, `mux2_5_tb`, `sgnext_tb`, `imem_tb` | the small parts |

To run your own program, write its words as hex into a file and pass it as
`mips #(.IMEM_FILE("path/prog.hex"))`. The program must fit in 16 words. To
grow the instruction memory, change `DEPTH` in `imem` and widen the PC slice
in `ibox` to match. The data memory can be resized the same way with
`dmem`'s `DEPTH` and the address slice in `dbox`.

## What is fixed by the design and what is chosen here

These points come from the design itself:

- the four-box split;
- the single-cycle organisation;
- the duplicated dual-port register file;
- a 16 x 32 data memory on `ALUResult[5:2]` that reads whenever it is not
  written;
- the controller seeing only `Instruction[31:26]` and `Instruction[3:0]`;
- `jump` and `memread` left unused;
- the first five instructions of the program and the trace values listed
  above.

These points are this implementation's own choices:

- **Ports of `mips`.** The processor itself has only `clk` and `reset`.
  This version also outputs PC, the instruction, SrcA, SrcB, ALUResult,
  WriteData, MemWrite and Zero, so the design can be watched and is not
  optimised away in synthesis.
- **Program instructions at 0x14–0x20.** These four were reconstructed.
  They reproduce every known fact: a six-cycle loop, `add $t3` with
  SrcA = SrcB = 1 in cycle 24, the value D in cycle 50, and the self-loop at
  `0x24`. The order of the two register moves and the use of `beq` for the
  backward branch are choices.
- **Instruction memory depth** of 16 words.
- **ALU.** The ALU slice structure, the `alucontrol` encoding, and `slt`
  without overflow correction.
- **PCSrc.** The branch decision `branch & zero` is formed inside the ibox.
- **Reset.** The PC reset is asynchronous.
- **`$0`.** Register zero reads as zero by masking the read data.
- **Unknown instructions** write nothing.
