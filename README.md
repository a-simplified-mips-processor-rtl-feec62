# Single-cycle MIPS subset processor

A teaching-sized MIPS processor in which every instruction completes in a
single clock cycle. There is no pipeline, so there are no hazards, stalls or
forwarding paths. Each cycle, one combinational path runs from the program
counter through instruction memory, the decoder, the register file, the ALU
and data memory. The next rising edge commits the results: the register write,
the memory write and the new PC. The design runs seven instructions, which is
enough for small programs with arithmetic, memory traffic and conditional
branches:

| instruction | encoding | effect |
|---|---|---|
| `add rd, rs, rt` | R-type, funct 32 | rd = rs + rt |
| `sub rd, rs, rt` | R-type, funct 34 | rd = rs - rt |
| `addi rt, rs, imm` | opcode 001000 | rt = rs + sext(imm) |
| `lw rt, imm(rs)` | opcode 100011 | rt = DM[rs + sext(imm)] |
| `sw rt, imm(rs)` | opcode 101011 | DM[rs + sext(imm)] = rt |
| `beq rs, rt, off` | opcode 000100 | if rs == rt: PC = PC + 1 + off |
| `lwr rd, rs, rt` | opcode 000001, R-type fields | rd = DM[rs - rt] |

`lwr` ("load with register offset") is not a standard MIPS instruction. It
reuses the R-type field layout, computes the address rs - rt in the ALU and
writes the loaded word to rd.

## Word addressing

Standard MIPS counts bytes; this design counts **words** everywhere:

* The PC is 8 bits wide and steps by 1. Instruction memory holds 256 words of
  32 bits.
* A branch offset is in words and is added to PC + 1. Only the low 8 bits of
  the immediate are used, and the sum wraps modulo 256, so an offset of 0xFF
  goes back one word.
* Data memory holds 256 words of 32 bits. Its address is the low 8 bits of
  the ALU result. `lw $5, 0($4)` with `$4 = 4` therefore reads word 4, not
  byte 4.

A program written for a byte-addressed MIPS needs its branch offsets and its
load/store offsets divided by four.

## The datapath in one cycle

```
        +----+   pc   +-------+ instr  +----------+
   +--->| PC |------->| instr |------->| mips_ctrl|--> RegDst ALUSrc MemToReg
   |    +----+   |    |  mem  |   |    +----------+    RegWrite MemRead MemWrite
   |             |    +-------+   |                     branch ALUctrl
   |             |                |-- rs,rt --> register file --> A, rt value
   |             |                |-- rt/rd (RegDst mux) --> write index
   |             |                '-- imm --> sign_extend
   |             |    B = ALUSrc ? sext(imm) : rt value
   |             |    ALU(A, B) --> result --> data memory address (low 8 bits)
   |             |                         '-> write-back mux (MemToReg)
   |             v
   '------ next_pc: PC + 1, or PC + 1 + off when branch & zero
```

Three 2:1 multiplexers (`mux2`) make the datapath's decisions:

* **RegDst** chooses the destination register. It is rt for addi and lw, and
  rd for R-type and lwr.
* **ALUSrc** chooses the ALU's B operand. It is the sign-extended immediate
  for addi, lw and sw, and the rt register otherwise.
* **MemToReg** chooses the value written back. It is the data-memory word for
  lw and lwr, and the ALU result otherwise.

A branch is taken when the decoder flags `branch` **and** the ALU's zero
output is high. beq subtracts, so zero means rs == rt. This AND is the only
logic outside the named blocks.

The register file and data memory read combinationally and write on the
rising clock edge. A value written by one instruction is therefore visible to
the very next one. This includes a load followed by a use of the loaded
register, with no delay slot.

## The decoder

`mips_ctrl` is a single combinational table:

| instr | RegDst | ALUSrc | MemToReg | RegWrite | MemRead | MemWrite | branch | ALU |
|---|---|---|---|---|---|---|---|---|
| R-type | 1 | 0 | 0 | 1 | 0 | 0 | 0 | add (32), sub (34), else and |
| lw | 0 | 1 | 1 | 1 | 1 | 0 | 0 | add |
| sw | 0 | 1 | 0 | 0 | 0 | 1 | 0 | add |
| beq | 0 | 0 | 0 | 0 | 0 | 0 | 1 | sub |
| addi | 0 | 1 | 0 | 1 | 0 | 0 | 0 | add |
| lwr | 1 | 0 | 1 | 1 | 1 | 0 | 0 | sub |
| other | 0 | 0 | 0 | 0 | 0 | 0 | 0 | and |

Two consequences are easy to miss:

* An R-type instruction with a funct other than 32 or 34 still writes rd,
  with the value rs AND rt. The all-zero word, the usual `nop`, therefore
  writes `$0 & $0` back into `$0`. It is harmless only while `$0` holds 0.
* Register 0 is **not** hard-wired to zero. It is a normal register that
  resets to 0. `addi $0, $0, 5` really changes it.

The ALU (`mips_alu`) implements more operations than the decoder can select:
and (0), or (1), add (2), sub (6), set-less-than (7) and nor (12). Any other
code gives 0. The decoder reaches only and, add and sub. Set-less-than
compares unsigned values, unlike MIPS `slt`. Add and sub wrap and have no
overflow trap.

## Reset, program loading and the demo program

`rst_n` is active low and synchronous. While it is low:

* the PC is 0;
* all 32 registers are 0;
* data-memory word *i* is set to *i*·10 + 1, a pattern that makes each loaded
  value show where it came from;
* register and memory writes are blocked.

Instruction memory is not touched by reset. At power-up it holds the demo
program from `mips_pkg::demo_program`, and all other words are 0:

```
 0..5   addi $k, $k, k       (k = 0..5)
 6..9   nop
10      beq  $4, $3, 2       not taken (4 != 3)
11      sw   $2, 1($3)       DM[4] = 2
12      lw   $5, 0($4)       $5 = DM[4] = 2
13      add  $3, $4, $5      $3 = 6
14..    nop (zeros); the PC wraps at 256 and the program runs again
```

To run another program, hold `rst_n` low and write one word per clock through
`prog_we` / `prog_addr` / `prog_data`. While `prog_we` is high during reset,
the instruction memory's address bus is switched from the PC to `prog_addr`.
When `rst_n` is high, `prog_we` is ignored. Release `rst_n`, and execution starts
at word 0 one edge later.

## Ports of `mips_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 8, 32 | program load, only during reset |
| `pc`, `instr` | out | 8, 32 | address and word of the instruction executing this cycle |
| `rf_we`, `rf_waddr`, `rf_wdata` | out | 1, 5, 32 | register write committed at the next edge |
| `dm_we`, `dm_addr`, `dm_wdata` | out | 1, 8, 32 | memory write committed at the next edge |
| `branch_taken` | out | 1 | beq taken this cycle |

The outputs form an execution trace. Each is valid during the cycle of the
instruction it describes, before the edge that commits it. The only
parameter is `ADDR_W` (default 8), the width of the PC and of both memory
addresses.

## Blocks

Each file in `rtl/` holds one unit and opens with a comment that describes
its interface and timing:

| file | unit |
|---|---|
| `mips_pkg.sv` | widths, opcode/ALU enums, field helpers, instruction encoders, demo program |
| `mips_pc.sv` | PC register |
| `next_pc.sv` | PC + 1 / PC + 1 + offset |
| `instr_mem.sv` | 256 x 32 instruction memory with active-low chip select and write strobe |
| `mips_ctrl.sv` | main decoder |
| `mips_reg.sv` | 32 x 32 register file, 2 read ports, 1 write port |
| `sign_extend.sv` | 16 to 32 bit sign extension |
| `mips_alu.sv` | ALU with zero flag |
| `data_mem.sv` | 256 x 32 data memory, combinational read, clocked write |
| `mux2.sv` | parameterised 2:1 multiplexer (used at 5, 8 and 32 bits) |
| `mips_top.sv` | the processor |

## Choices this implementation makes

The design is a synthesizable restatement of a classroom Verilog model. The
structure, the instruction encodings, the decoder table, the widths and the
start-up contents come from that model. This implementation adds or changes
the following:

* **Reset.** The original relies on simulation start-up initialisation.
  Here a synchronous reset sets the PC, the registers and the data memory to
  the same start-up values. Instruction memory is still initialised at
  start-up.
* **No delays.** The original spreads `#` delays through the model, for
  example a data-memory write that lands 30 time units after the write
  strobe rises. Here all state changes on the rising clock edge.
* **Instruction-memory write port.** The original memory has a write strobe
  but only implements reads, and its bus is tri-state. Here writes (chip
  select and strobe low) are clocked, and a deselected memory outputs 0
  instead of high impedance.
* **MemRead gates the data-memory output.** The output is 0 when MemRead is
  low. The original ignores MemRead. The processor's behaviour is the same
  either way, because the loaded word is only used when MemRead is 1.
* **Load port and trace outputs.** These are added so that programs can be
  loaded and checked without a waveform viewer.
* **One `mux2`.** A single parameterised multiplexer replaces the separate
  5-bit and 32-bit ones.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
with a reference written independently inside the testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_mips_top` tests the whole processor at its default size. It does two
things:

1. It runs the built-in demo program from reset and checks the hand-derived
   results: beq not taken, `DM[4] = 2`, `$5 = 2`, `$3 = 6`.
2. It loads 30 random programs and runs each for 300 cycles. The programs use
   all seven instructions, random R-type functs and undefined opcodes, on
   registers 0 to 7 so that branches often find equal operands. Every
   cycle, it compares the PC, the instruction, the register write, the memory
   write and the branch flag with an instruction-level model. This also
   confirms one instruction per cycle. While the programs run, the test also
   raises the load strobe at random, and the strobe must have no effect.

The test counts each mechanism: taken and untaken beq, lw, lwr, sw, addi,
add, sub, other R-type, undefined opcode, program load and the load strobe
raised while running. It fails if any
mechanism never occurs.

Run with plain Verilator from the project root, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
          rtl/mips_pkg.sv tb/tb_mips_top.sv --top-module tb_mips_top
./obj_dir/Vtb_mips_top
```

Replace `tb_mips_top` with any other testbench name to test a single block.
Simulations run in well under a second.

## Limits

* No jumps, no other ALU instructions, no exceptions and no byte or halfword
  accesses.
* Memories are 256 words each. Data addresses wrap modulo 256 and PC
  overflow wraps to 0.
* Instruction and data memory are separate arrays. A program cannot read or
  modify its own code.
