# A single-cycle MIPS-subset processor

This is a minimal processor that runs a subset of the 32-bit MIPS instruction
set and executes **one whole instruction per clock cycle**. It has no pipeline,
no cache and no stalls. Each cycle the program counter fetches an instruction.
The control unit decodes it and the register file supplies two operands. The
ALU computes a result or an address, the data memory is read or written, and the
result goes back to the register file. Meanwhile the next pc is computed. The
design is meant to be read: every block is small, and the datapath matches the
textbook drawing of a single-cycle machine.

```
          +-----+      +-------------+  inst  +---------+  ra,rb,rw  +---------------+
  +------>| pc  |----->| instruction |------->| control |----------->| register file |
  |       +-----+ addr |   memory    |        +---------+            +---------------+
  |          |         |  (mc = 00)  |          |  |  |                A |       | B
  |          v         +-------------+          |  |  |   imm[15:0]     |    +--+--+
  |    +-----------+                            |  |  +--> sign extend -+--->| mux |
  +----| new pc    |<--- jump, target ----------+  |                     |    +--+--+
       | pc+4/jump |                               |                     v       v
       +-----------+                               |                    +---------+
                                                   +------ alu_op ----->|   ALU   |
                                                                        +---------+
                  register write (falling edge) <-- wb mux <-- load      |  addr
                        ALU result / load data / pc+4          extend <-- data memory <- B (d in)
```

## Instruction formats and the implemented instructions

All instructions are 32 bits wide and come in three formats:

| format | fields (MSB to LSB)                                                           |
|--------|-------------------------------------------------------------------------------|
| R      | op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] func[5:0]                  |
| I      | op[31:26] rs[25:21] rd[20:16] immediate[15:0]                                  |
| J      | op[31:26] target[25:0]                                                        |

| class           | instruction (op / func, hex)                 | effect                                           |
|-----------------|----------------------------------------------|--------------------------------------------------|
| R-type ALU      | ADD 00/20, ADDU 00/21                        | R[rd] = R[rs] + R[rt] (wraps, no trap)           |
|                 | SUB 00/22                                    | R[rd] = R[rs] - R[rt]                            |
|                 | AND 00/23 and 00/24                          | R[rd] = R[rs] & R[rt]                            |
|                 | NOR 00/25 and 00/27                          | R[rd] = ~(R[rs] \| R[rt])                        |
|                 | SLL 00/00, SRL 00/02                         | R[rd] = R[rt] shifted by shamt (logical)         |
|                 | SLT 00/2A                                    | R[rd] = (R[rs] < R[rt], signed) ? 1 : 0          |
| ALU immediate   | ADDI 08, ADDIU 09                            | R[rd] = R[rs] + sign_extend(imm)                 |
|                 | ANDI 0C, ORI 0D                              | R[rd] = R[rs] & / \| zero_extend(imm)            |
| load            | LB 20, LBU 24, LH 21, LHU 25, LW 23          | R[rd] = memory at R[rs] + sign_extend(imm)       |
| store           | SB 28, SH 29, SW 2B                          | memory at R[rs] + sign_extend(imm) = R[rd]       |
| jump            | J 02, JAL 03                                 | pc = pc[31:28] \|\| target \|\| 00; JAL: r31 = pc + 4 |

**Function codes 0x23 and 0x25 are not the standard MIPS ones.** In this
processor's specification, func 0x23 is AND and func 0x25 is NOR. Standard MIPS
uses them for SUBU and OR. The RTL follows the specification, and it also
decodes the standard AND (0x24) and NOR (0x27) codes. As a result there is **no
R-type OR**: use ORI, or NOR followed by NOR with r0. All codes live in
`rtl/mips_pkg.sv`, so the standard mapping is a two-line change there and in
`rtl/control.sv`.

Any other opcode or function code runs as a no-op: nothing is written, the pc
advances, and `illegal_o` goes high for that cycle.

**Not implemented:** conditional branches (BEQ/BNE), JR and subroutine
return, multiply and divide, overflow traps, exceptions and the branch delay
slot. Conditional branches are only named in the material the design follows,
with no encoding and no datapath for them. Without branches a program cannot
loop on a condition, so a program ends with a jump to itself.

## Clocking: two edges per cycle

This is the least obvious part of the design, and it affects anyone who drives
the processor:

* The **pc** (`pc_unit`) and the **memories** update on the **rising** edge.
* The **register file** writes on the **falling** edge.

An instruction starts at a rising edge. Its fetch, decode, ALU and memory read
are combinational and must settle within the first half of the cycle. The
falling edge then stores its result. The next rising edge commits any store and
moves the pc on. A value written at the falling edge is readable by the next
instruction. No forwarding is needed because only one instruction is in flight.

The critical path is about half a clock period: instruction memory read, then
decode, register read, ALU, data memory read and load extension, reaching the
register file by the falling edge.

**Reset:** `rst_n` is asynchronous and active low. It holds the pc at 0. It
clears the registers only when they see it, and since they are clocked on the
falling edge, keep `rst_n` low across at least one falling edge. Release it
between a rising and a falling edge. If it is released after the falling edge,
the first instruction loses its register write, because the next rising edge
comes before any falling edge. The testbench releases reset one time step
after a rising edge.

## Blocks

| file                  | block                                                                            |
|-----------------------|----------------------------------------------------------------------------------|
| `rtl/mips_pkg.sv`     | opcodes, function codes, ALU op, memory control, load kind, control-word struct |
| `rtl/mips_cpu.sv`     | top: wires the datapath; program-loading and observation ports                  |
| `rtl/pc_unit.sv`      | pc register, pc + 4 adder, absolute-jump target                                 |
| `rtl/memory.sv`       | byte-addressed memory; used for instructions and for data                       |
| `rtl/control.sv`      | decoder producing one `ctrl_t` word                                             |
| `rtl/regfile.sv`      | 32 x 32 registers, r0 = 0, 2 read ports, falling-edge write                      |
| `rtl/sign_extend.sv`  | 16 to 32 bit immediate extension (sign or zero)                                 |
| `rtl/alu.sv`          | adder/subtractor, AND, OR, NOR, shifter, set-less-than, output mux               |
| `rtl/load_extend.sv`  | byte/halfword selection and extension for LB/LBU/LH/LHU                         |

### Memory

The memory has a 32-bit byte address, 32-bit `data_in` and `data_out`, and a
2-bit control `mc`:

| mc | action                                              |
|----|-----------------------------------------------------|
| 00 | read only                                           |
| 01 | write byte `data_in[7:0]` at `addr`                 |
| 10 | write halfword `data_in[15:0]` at `addr & ~1`       |
| 11 | write word `data_in` at `addr & ~3`                 |

`data_out` is combinational and always returns the aligned word holding `addr`.
Bytes are stored little-endian: address 4k+i is bits [8i+7:8i] of word k. The
low address bits below the access size are ignored, so a misaligned access is
silently aligned rather than trapped. Storage is `2**DEPTH_LOG2` words. Upper
address bits are ignored, so the contents repeat every `4 * 2**DEPTH_LOG2`
bytes. The processor uses two instances (a Harvard organisation): the instruction
memory and the data memory. The fetch path reads the instruction memory with
`mc` = 00. The memories have no reset.

A program goes in through the top's loading port. While `imem_load_en` is high,
the instruction memory is disconnected from the pc. Each rising edge then writes
`imem_load_data` as a word at `imem_load_addr`. Use the port while `rst_n` is
low; an assertion in the top reports any use while the processor runs. The
data memory has no such port: preset it through the hierarchy in
simulation (`dut.u_dmem.mem[i]`), or let the program write it with stores.

### ALU

One adder serves both add and subtract. Its B input is B or ~B, and its carry
in is 1 for subtraction. Set-less-than takes the sign of A - B, corrected for
signed overflow. AND, OR, NOR and the shifter work in parallel, and a final mux
picks the result. Shifts act on B (register rt) by the instruction's shamt
field.

### Control word

`control` turns the instruction into `ctrl_t`:

* `ra`, `rb`, `rw`: register selects. For R-type these are rs, rt and rd. For
  I-type they are rs, bits 20:16 and bits 20:16. JAL writes r31.
* `we`: register write enable.
* `alu_op`: the ALU operation.
* `alu_src`: picks B from the register file or the extended immediate.
* `ext_sign`: sign- or zero-extend the immediate.
* `mc`: data memory control.
* `ld`: load kind.
* `wb_sel`: write-back source (ALU, load data or pc + 4).
* `jump`: take the absolute jump.
* `illegal`: the instruction is not implemented.

## Parameters

| module     | parameter                            | default | meaning                                  |
|------------|--------------------------------------|---------|------------------------------------------|
| `mips_cpu` | `IMEM_DEPTH_LOG2`, `DMEM_DEPTH_LOG2` | 12      | memory sizes, 2**N 32-bit words (16 KiB) |
| `regfile`  | `NREGS`, `WIDTH`                     | 32, 32  | register count and width                 |
| `pc_unit`  | `RESET_PC`                           | 0       | pc after reset                           |

The 32 x 32-bit register file, the 32-bit address and data widths and the
16-bit immediate are fixed by the architecture. The memory capacity is not: any
depth that fits the 32-bit address space works, and 16 KiB is this design's
default.

## Where the design makes its own choices

The datapath blocks and their connections, the register file behaviour
(including the falling-edge write and the hard-wired r0), the memory control
encoding, the jump-target rule, sign extension and the meaning of op 0/8/12
and func 0x21/0x23/0x25 follow the specification. The following are this
design's own choices:

* All other opcode and function values, taken from standard MIPS.
* JAL linking pc + 4 into r31. There is no delay slot, so the link is pc + 4
  rather than MIPS's pc + 8.
* Zero extension for ANDI and ORI.
* Little-endian byte order and the memory capacity.
* Rising-edge memory writes and combinational memory reads.
* The load-extension unit and the pc + 4 input of the write-back mux.
* The asynchronous reset and treating unknown instructions as no-ops.
* The program-loading port and the observation ports of the top.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

* `tb_regfile`: random traffic against a model. It checks that a write is
  invisible before the falling edge and visible after it, that r0 stays 0, that
  WE blocks writes, and that reset clears the registers.
* `tb_memory`: random reads and byte/halfword/word writes over the full 32-bit
  address range, so aliasing is exercised, against a byte-array model.
* `tb_alu`: corner operands and 20,000 random cases for every operation.
* `tb_sign_extend`: all 65,536 immediates in both modes.
* `tb_load_extend`: every byte offset and load kind.
* `tb_pc_unit`: reset, pc + 4, jump targets, and crossing into the next
  256 MiB region.
* `tb_control`: every instruction's full control word, plus unknown codes.
* `tb_mips_cpu`: end to end, at the default parameters. First a directed
  program uses every instruction, with results worked out by hand. Then about
  3,000 random instructions run: ALU, loads and stores around a base pointer,
  and forward j/jal. An independent instruction-level model runs the same
  program. Every cycle the testbench compares the pc, the register write and
  the data memory write. At the end it compares all registers and the whole
  data memory. It also checks that one instruction retires per cycle. It counts
  how often each behaviour happened and fails if any never did: R-type,
  immediate, load, each store size, j, jal, write to r0, sign and zero
  extension, unknown instruction, and an address above the memory size. The run
  takes well under a second.
* `tb_mips_examples`: the two small example programs the instruction set is
  usually introduced with, at the default parameters. The first is array
  access (`lw r3,0(r4)`, `lw r3,16(r4)`, `sw r3,0(r4)` on `int array[32]`).
  The second is the start of a counted loop (`li r2,10; li r1,0;
  slt r3,r1,r2`). That loop's closing `bne` is a conditional branch, so the
  second program stops after the compare. The testbench checks the results
  after each instruction and one instruction per cycle.

Build and run a testbench with plain Verilator (the package must be read first):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mips_pkg.sv tb/tb_mips_cpu.sv --top-module tb_mips_cpu -o sim
./obj_dir/sim
```

Replace `tb_mips_cpu` with any other testbench name to run that one.
