# MIPS-lite single-cycle CPU

This CPU runs every instruction in one clock cycle. The clock period is made
long enough for an instruction to go through all five steps of execution:

1. instruction fetch
2. decode and register read
3. execute (ALU)
4. data memory access
5. register write

Nothing is pipelined and nothing lasts more than one cycle. The cycle is
one big combinational path from the program counter to the inputs of the
state elements. State changes only at the rising clock edge. At that edge
the PC, at most one register and at most one data memory word are written
together. So the CPI is exactly 1. The cost is that the clock must cover the
slowest instruction, even for instructions that need less.

The CPU runs a six-instruction subset of MIPS:

| instruction        | format | register transfer                                          |
|--------------------|--------|------------------------------------------------------------|
| `addu rd,rs,rt`    | R      | R[rd] ← R[rs] + R[rt]; PC ← PC + 4                          |
| `subu rd,rs,rt`    | R      | R[rd] ← R[rs] − R[rt]; PC ← PC + 4                          |
| `ori rt,rs,imm16`  | I      | R[rt] ← R[rs] \| zero_ext(imm16); PC ← PC + 4               |
| `lw rt,imm16(rs)`  | I      | R[rt] ← MEM[R[rs] + sign_ext(imm16)]; PC ← PC + 4           |
| `sw rt,imm16(rs)`  | I      | MEM[R[rs] + sign_ext(imm16)] ← R[rt]; PC ← PC + 4           |
| `beq rs,rt,imm16`  | I      | if R[rs] = R[rt]: PC ← PC + 4 + (sign_ext(imm16) ‖ 00), else PC ← PC + 4 |

All instructions are 32 bits long. The fields are:

- R-type: `op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]`
- I-type: `op[31:26] rs[25:21] rt[20:16] imm16[15:0]`

The encodings are the standard MIPS32 ones:

- `addu` and `subu` have opcode `0x00`, with funct `0x21` and `0x23`.
- `ori` is `0x0d`, `lw` is `0x23`, `sw` is `0x2b` and `beq` is `0x04`.

## Datapath

```
          +------------------------- ifetch --------------------------+
          |  PC reg --> instruction memory --> instr[31:0]            |
          |    ^                                                      |
          |    +-- next_pc: PC+4  or  PC+4+(sext(imm16)<<2)           |
          +------------------------------^----------------------------+
                                         | npc_sel & zero
 instr: op,funct --> mips_control --> ctrl (RegDst ALUSrc MemtoReg RegWr MemWr nPC_sel ExtOp ALUctr)
        rs ------> RA  +---------+ busA ---------------------> +-----+
        rt ------> RB  | regfile | busB --+--> mux ALUSrc ---> | ALU |--> result, zero
 rt/rd (RegDst) -> RW  +---------+        |        ^           +-----+
                        ^  busW           |   extender(imm16, ExtOp)     |
                        |                 +-------------> Data In        v
                        +-- mux MemtoReg <---- Data Out <-- data memory (address = result)
                                   ^---------------------- result
```

Read the datapath one instruction at a time:

- **ADDU/SUBU.** The register file reads rs and rt. The ALU adds or
  subtracts. The result goes back to register rd.
- **ORI.** The immediate is *zero*-extended. It replaces busB at the ALU,
  which ORs it with R[rs]. The result goes to register rt, not rd. This is
  the reason for the RegDst multiplexer.
- **LW.** The ALU adds R[rs] and the *sign*-extended offset to form the
  address. The data memory reads that word combinationally, and the MemtoReg
  multiplexer sends it to register rt. This is the longest path in the
  design: instruction memory → register file → ALU → data memory →
  register-file input.
- **SW.** The address is formed as for LW. busB (R[rt]) drives Data In, and
  the word is written at the clock edge.
- **BEQ.** The ALU subtracts R[rt] from R[rs], and its `zero` output is the
  equality test. A separate adder forms the branch target from PC + 4 and the
  offset shifted left by two. The main ALU does no PC arithmetic, because it
  is busy with the comparison in the same cycle.

Reading in the register file and in both memories is combinational: the
output follows the address after an access time. The clock plays a part only
in writes. This is why a register can be read and written in the same cycle.
The instruction `addu r1,r1,r2` reads the old r1 for the whole cycle, and the
new value lands at the edge. No bypass or hazard logic is needed.

## Control

`mips_control` decodes `op` and `funct` into one control word (`mips_pkg::ctrl_t`):

| instr | RegDst | ALUSrc | MemtoReg | RegWr | MemWr | nPC_sel | ExtOp | ALUctr |
|-------|--------|--------|----------|-------|-------|---------|-------|--------|
| ADDU  | 1 (rd) | 0      | 0        | 1     | 0     | 0       | –     | ADD    |
| SUBU  | 1 (rd) | 0      | 0        | 1     | 0     | 0       | –     | SUB    |
| ORI   | 0 (rt) | 1      | 0        | 1     | 0     | 0       | 0     | OR     |
| LW    | 0 (rt) | 1      | 1        | 1     | 0     | 0       | 1     | ADD    |
| SW    | –      | 1      | –        | 0     | 1     | 0       | 1     | ADD    |
| BEQ   | –      | 0      | –        | 0     | 0     | 1       | 1     | SUB    |

Opcodes or funct codes outside the subset raise the `illegal` output. They
write nothing and do not branch, so they act as no-ops.

The ALU also provides AND and signed set-less-than (SLT), the two further
functions of the full MIPS ALU. No instruction of the subset selects them.

## Arithmetic

- `full_adder` is the one-bit cell.
- `adder` is a ripple chain of N of these cells, with carry in and carry out.
- `addsub` builds an adder-subtractor on top of `adder`. The `sub` signal is
  XORed into every bit of B, so the XOR gates act as conditional inverters.
  `sub` is also the carry in. So A − B is computed as A + ~B + 1.

The ALU uses `addsub` for ADD, SUB and SLT. SLT takes the sign of A − B and
corrects it with the overflow flag. The next-PC logic uses two plain `adder`
instances.

## Module map

| file                  | role |
|-----------------------|------|
| `mips_pkg.sv`         | opcode/funct/ALU enums, control-word struct, field struct |
| `mips_single_cycle.sv`| top: the complete CPU |
| `ifetch.sv`           | PC register, next-PC logic, instruction memory, program-load port |
| `next_pc.sv`          | PC + 4 and branch-target adders, PC multiplexer |
| `mips_control.sv`     | main decoder |
| `regfile.sv`          | 32 × 32-bit registers, two read ports, one write port |
| `alu.sv`              | ADD/SUB/OR/AND/SLT and the zero flag |
| `addsub.sv`, `adder.sv`, `full_adder.sv` | arithmetic, as described above |
| `extender.sv`         | 16→32-bit zero or sign extension |
| `mux2.sv`             | 2:1 word multiplexer |
| `register.sv`         | N-bit register with write enable and reset (used for the PC) |
| `memory.sv`           | word memory: combinational read, clocked write (instruction and data memory) |

## Top-level interface and timing

`mips_single_cycle` has these parameters:

- `IMEM_WORDS` (default 1024): size of the instruction memory in words.
- `DMEM_WORDS` (default 1024): size of the data memory in words.
- `RESET_PC` (default 0): address the PC takes at reset.

Its ports:

- `clk`: all state changes happen at its rising edge.
- `rst`: synchronous and active high. It loads `RESET_PC` into the PC. It
  also blocks register-file and data-memory writes.
- `imem_load_we`, `imem_load_addr`, `imem_load_data`: the program-load port.
  While `imem_load_we` is 1, the instruction memory is addressed by
  `imem_load_addr` instead of the PC. `imem_load_data` is written into it at
  the clock edge. Load the program with `rst` held, one word per clock.
  Then release `rst`. The first instruction executes in the cycle after the
  release.
- Observation outputs: `pc` and `instr` show the current instruction. The
  `reg_*` outputs show the register write that this instruction will commit
  at the next edge, and the `mem_*` outputs show its data-memory write.
  `branch_taken` and `illegal` are also outputs. They are all combinational
  functions of the current cycle.

Memory addresses are byte addresses, and bits 1:0 are ignored. Address bits
above the memory size wrap around. The data memory is not reset and cannot be
preloaded: a program initialises it with stores. Two assertions in the top
check that no instruction writes both a register and a memory word, and that
the PC stays word aligned. Register 0 always reads as
zero. The other registers are not reset.

## Where this design makes its own choices

The structure follows the classic single-cycle MIPS-lite datapath. These
points are choices of this implementation:

- The numeric opcode and funct values are the standard MIPS32 ones.
- The names of the control signals other than RegWr and ALUctr are this
  design's own. So is the ALU operation encoding.
- Register 0 is hardwired to zero. The `regfile` parameter `R0_ZERO = 0`
  turns this off.
- Memory size (1024 words each), byte addressing with word alignment, reset,
  and the program-load port.
- Behaviour on instructions outside the subset (no-op, plus the `illegal`
  output).
- AND and SLT are in the ALU but unused by the decoder.
- Adders are written as ripple chains of full adders. A synthesis tool is
  free to restructure them.

The instruction and data memories are ideal, combinational-read arrays. They
model memories whose access fits inside the cycle. A real implementation
would need caches or on-chip RAM fast enough for that, and would synthesize
to asynchronous-read memory.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and stops itself after a
fixed number of cycles if it hangs.

`tb_mips_single_cycle` runs the whole CPU at its default sizes against an
instruction-set model written in the testbench. The program it builds does
the following:

- seeds all registers;
- fills 128 data words;
- runs 600 pseudo-random ADDU/SUBU/ORI/LW/SW/forward-BEQ instructions;
- runs a countdown loop with a backward branch;
- stores all registers and reloads the data words;
- stops on `beq r0,r0,-1`.

Every cycle it checks the PC, the instruction word, and the enable, address
and data of the register write and of the memory write. So it also checks
that each instruction takes exactly one cycle. Before it stops, the program
stores every register and loads back every data word it used. This checks
the final state through the same write ports. It fails if any of these never happened:

- each instruction kind;
- a taken, a not-taken and a backward branch;
- a write to r0;
- an instruction whose destination is also a source;
- a load of a word stored earlier;
- a negative load offset.

To simulate with Verilator, name the package first:

```
verilator --binary --timing -Irtl rtl/mips_pkg.sv tb/tb_mips_single_cycle.sv \
          --top-module tb_mips_single_cycle
./obj_dir/Vtb_mips_single_cycle
```

Use the same command for any other testbench, with its name in place of
`tb_mips_single_cycle`. `-Irtl` lets Verilator find the modules a testbench
uses.

## Extending it

- **Adding an instruction:**
  1. Add its opcode or funct to `mips_pkg`.
  2. Add a row to the case statement in `mips_control`.
  3. If it needs a new datapath path, add a multiplexer in the top, with a
     new field in `ctrl_t` to select it.
- **Adding a jump:** this needs another input to the PC multiplexer in
  `next_pc`.
- **Larger memories:** set `IMEM_WORDS` and `DMEM_WORDS`. Word selection
  uses address bits `[log2(WORDS)+1:2]`.
