# Single-cycle MIPS32-subset CPU

A small 32-bit processor that runs every instruction in one clock cycle. Each
cycle it fetches from a combinational ROM at the program counter, decodes,
reads two registers, runs the ALU and, for loads, reads the data memory. At
the rising edge that ends the cycle it writes the result back and loads the
next PC. Nothing is pipelined, so the clock period must cover the slowest
instruction. That is a load: it goes ROM → register file → ALU → data memory →
write-back multiplexer → register file.

The design is a textbook single-cycle datapath for a subset of MIPS32. The
RTL is plain, synthesizable SystemVerilog. It was written for an FPGA flow in
which only synthesis options, such as the optimisation goal, fan-out limits and
I/O-register packing, were varied to raise the clock rate. The reference
implementation on a Xilinx Artix-7 reported these clock rates:

- about 143 MHz with default synthesis settings;
- about 151 MHz with the optimisation goal set to speed.

Those figures belong to that tool and device. Nothing here reproduces or
constrains them.

## Instruction set

All encodings are the standard MIPS32 ones.

| instruction | op / funct | operation |
|---|---|---|
| `add rd, rs, rt` | 000000 / 100000 | rd = rs + rt (no overflow trap) |
| `sub rd, rs, rt` | 000000 / 100010 | rd = rs − rt |
| `and rd, rs, rt` | 000000 / 100100 | rd = rs & rt |
| `or rd, rs, rt` | 000000 / 100101 | rd = rs \| rt |
| `sll rd, rt, sa` | 000000 / 000000 | rd = rt << sa |
| `jr rs` | 000000 / 001000 | PC = rs |
| `addi rt, rs, imm` | 001000 | rt = rs + sext(imm) |
| `ori rt, rs, imm` | 001101 | rt = rs \| zext(imm) |
| `lui rt, imm` | 001111 | rt = imm << 16 |
| `lw rt, off(rs)` | 100011 | rt = M[rs + sext(off)] |
| `sw rt, off(rs)` | 101011 | M[rs + sext(off)] = rt |
| `beq rs, rt, off` | 000100 | if equal, PC = PC+4 + sext(off)·4 |
| `bne rs, rt, off` | 000101 | if not equal, PC = PC+4 + sext(off)·4 |
| `j target` | 000010 | PC = {PC+4[31:28], target, 00} |
| `jal target` | 000011 | r31 = PC+4, then jump as `j` |

The core set is `add`, `sub`, `and`, `or`, `sll`, `addi`, `lw`, `sw`, `lui`
and `jal`. The other five rows, `jr`, `ori`, `beq`, `bne` and `j`, come from
the datapath itself:

- The next-PC multiplexer has branch, register and jump inputs.
- The ALU zero flag goes to the decoder.
- The reference test program uses `ori`.

In some listings of this instruction set `addi` appears with opcode 100000.
That is the MIPS `lb` opcode. This design uses the real `addi` opcode,
001000, which is also the one the reference program's machine code uses.

Any other encoding is a no-op: nothing is written and the PC advances by 4.
There are no exceptions, no delay slots and no interrupts. A branch or jump
takes effect in the next cycle.

## Datapath

```
            +-------------------------------------------------------------+
            |                    next-PC mux (mux4)                       |
            |  0: PC+4   1: PC+4+(sext(imm)<<2)   2: qa   3: {PC+4[31:28],addr,00}
            v                                                             |
  PC reg -> inst_mem -> fields -> control_unit (op, func, z)              |
    |                      |                                              |
    +-> +4 = p4            +-> regfile rna=rs, rnb=rt -> qa, qb           |
                           |                                              |
     shift ? sa : qa  --> ALU a      aluimm ? ext(imm) : qb --> ALU b     |
                                  ALU -> r, z ----------------------------+
                    r --> data_mem address, qb --> data_mem write data
     m2reg ? mem : r --> jal ? p4 : (that)  --> regfile d
     wn = jal ? 31 : (regrt ? rt : rd)
```

The six multiplexers are the ones the datapath is built from:

- one 4:1 for the next PC;
- five 2:1: ALU a (`shift`), ALU b (`aluimm`), memory-or-ALU (`m2reg`),
  return-address-or-result (`jal`) and destination register (`regrt`).

The `jal` override of the destination number to 31 is a small function block
on the `wn` path. The immediate extender sign-extends when `sext` is high and
zero-extends otherwise.

### Control signals (`control_unit`)

| instr | wreg | regrt | jal | m2reg | shift | aluimm | sext | wmem | aluc | pcsrc |
|---|---|---|---|---|---|---|---|---|---|---|
| add/sub/and/or | 1 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | ADD/SUB/AND/OR | 0 |
| sll | 1 | 0 | 0 | 0 | 1 | 0 | 0 | 0 | SLL | 0 |
| jr | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | – | 2 |
| addi | 1 | 1 | 0 | 0 | 0 | 1 | 1 | 0 | ADD | 0 |
| ori | 1 | 1 | 0 | 0 | 0 | 1 | 0 | 0 | OR | 0 |
| lui | 1 | 1 | 0 | 0 | 0 | 1 | 0 | 0 | LUI | 0 |
| lw | 1 | 1 | 0 | 1 | 0 | 1 | 1 | 0 | ADD | 0 |
| sw | 0 | 0 | 0 | 0 | 0 | 1 | 1 | 1 | ADD | 0 |
| beq | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 0 | SUB | z ? 1 : 0 |
| bne | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 0 | SUB | z ? 0 : 1 |
| j | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | – | 3 |
| jal | 1 | 0 | 1 | 0 | 0 | 0 | 0 | 0 | – | 3 |

`aluc` is 4 bits wide. Its codes (`sccpu_pkg::aluc_e`) are ADD 0, SUB 1,
AND 2, OR 3, SLL 4 and LUI 5, and unused codes act as ADD. For `sll` the ALU
shifts b by a[4:0]; the shift amount reaches input a through the `shift`
multiplexer. For `lui` the ALU returns b[15:0] in the upper half.

### The branch decision loop

`z` comes from the ALU, and the ALU result depends on the decoded controls.
The decoder then uses `z` to pick `pcsrc`. No combinational loop results,
because `z` only changes `pcsrc` and `pcsrc` feeds nothing before the PC
register. This z → pcsrc → next-PC chain is also the design's critical path:
PC → ROM → register file → ALU subtract → zero detect → decoder → next-PC
mux → PC.

## Timing and reset

- **One instruction per clock cycle.** The PC, the register file and the
  data memory change only at the rising edge of `clk`.
- **Reads are combinational.** The instruction ROM, both register-file ports
  and the data memory read port have no clock. A load's data reaches the
  register file in the same cycle.
- **`clrn` is an active-high, synchronous reset,** despite its name. It sets
  the PC to 0 and clears all 32 registers. The name and the polarity match
  the reference waveforms, in which `clrn` is high first and then low while
  the program runs.
- **The data memory is not reset.** During the reset cycle the instruction at
  the old PC still drives `wmem`, so a store there still happens. Load
  nothing you have not stored, or initialise the RAM.
- **Register 0** always reads 0 and ignores writes.

## Memories and sizes

| parameter | default | where |
|---|---|---|
| `IM_WORDS` | 64 | instruction ROM depth (`sccomp`, `inst_mem.WORDS`) |
| `DM_WORDS` | 32 | data RAM depth (`sccomp`, `data_mem.WORDS`) |
| `PROG_LEN`, `PROG` | 13 words | ROM contents from address 0 |
| `regfile.NREGS`, `WIDTH` | 32, 32 | fixed by the architecture |

Both memory depths are this design's choice. Both memories index words with
address bits [log2(depth)+1 : 2], so addresses wrap around. ROM words past
`PROG_LEN` read as 0, which is `sll $0,$0,0`, the MIPS nop.

The default `PROG` is the reference program:

```
00: lui  $1, 0            -> r = 0
04: addi $2, $2, 0x30     -> r = 0x30
08: addi $5, $1, 0x20     -> r = 0x20
0c: sll  $2, $2, 2        -> r = 0xc0
10: sw   $5, 0($0)        -> M[0] = 0x20          (wmem)
14: jal  0x1c             -> $31 = 0x18
1c: add  $2, $2, $2       -> r = 0x180
20: lw   $4, 0($0)        -> $4 = 0x20            (m2reg)
24: ori  $2, $2, 0x32     -> r = 0x1b2
28: sw   $4, 4($0)        -> M[1] = 0x20          (wmem)
2c, 30: nop
```

To run your own code, override `PROG_LEN` and `PROG` on `sccomp`. The
testbench package `tb/sccpu_tb_pkg.sv` has encoder functions (`addi_`,
`lw_`, `beq_`, …) that let a program be written as an assembly-like
parameter list; `tb/tb_sccomp.sv` shows how.

## Files

| file | content |
|---|---|
| `rtl/sccpu_pkg.sv` | opcodes, function codes, ALU and next-PC encodings |
| `rtl/sccomp.sv` | **top**: core, instruction ROM and data RAM |
| `rtl/sccpu.sv` | core: PC, adders, extender, multiplexers, register file, ALU, decoder |
| `rtl/control_unit.sv` | decoder |
| `rtl/alu.sv` | ALU with zero flag |
| `rtl/regfile.sv` | 32×32 register file, 2 read ports and 1 write port |
| `rtl/inst_mem.sv` | combinational ROM, contents from a parameter |
| `rtl/data_mem.sv` | RAM with combinational read and clocked write |
| `rtl/mux2.sv`, `rtl/mux4.sv` | multiplexers |

The top-level ports of `sccomp` are `clk`, `clrn`, and the observation
outputs `pc`, `inst`, `r` (ALU result), `mem_do` (data-memory read data),
`m2reg` and `wmem`.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

- `tb_alu`, `tb_regfile`, `tb_mux2`, `tb_mux4`, `tb_inst_mem`, `tb_data_mem`
  and `tb_control_unit` compare each unit against reference values computed
  in the testbench. They use random operands and addresses, and a full
  control-word table for the decoder.
- `tb_sccpu` runs 12 random 64-instruction programs on the core, 1500 cycles
  each. The testbench plays both memories. A reference instruction-set model
  in `tb/sccpu_tb_pkg.sv` runs in lock step: the PC and every store are
  compared each cycle, and all registers and memory words after each program.
  It also checks that every instruction kind ran, with both outcomes of each
  branch.
- `tb_sccomp` runs the complete computer end to end on a directed program.
  The program covers:
  - every instruction;
  - taken and untaken `beq` and `bne`;
  - a counted loop;
  - `j`, `jal` and a `jr` back through the link register;
  - a reset in the middle of a run.

  It counts each of these mechanisms from the hardware's own signals. A
  mechanism that never happens counts as a failure.
- `tb_sccomp_figure` runs `sccomp` with all parameters at their defaults. It
  checks, cycle by cycle, the reference waveform values of `pc`, `inst`, `r`,
  `m2reg` and `wmem`, then the final registers and memory.

To simulate one, for example the full-size test:

```
verilator --binary --timing --assert --top-module tb_sccomp_figure \
  rtl/sccpu_pkg.sv rtl/alu.sv rtl/regfile.sv rtl/control_unit.sv \
  rtl/mux2.sv rtl/mux4.sv rtl/inst_mem.sv rtl/data_mem.sv \
  rtl/sccpu.sv rtl/sccomp.sv tb/sccpu_tb_pkg.sv tb/tb_sccomp_figure.sv
./obj_dir/Vtb_sccomp_figure
```

Put the packages first. The unit testbenches that do not import
`sccpu_tb_pkg` need only `sccpu_pkg.sv` and the module under test.

## Where this design makes its own choices

The reference description gives the block structure, the signal names, the
instruction table and a sample program with its results. It does not give
the following, which are choices made here:

- the ALU operation codes;
- the memory depths;
- the reset style: synchronous, clearing the registers, not the RAM;
- register 0 hard-wired to zero;
- no-op behaviour for unknown instructions;
- no arithmetic overflow trap.

The extra instructions `jr`, `ori`, `beq`, `bne` and `j` are inferred from the
datapath and the sample program, as explained above. Clock rates and the FPGA
synthesis-option study are outside the RTL.
