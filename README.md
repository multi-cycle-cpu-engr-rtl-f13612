# A multi-cycle CPU for a MIPS subset

A single-cycle processor must fit the slowest instruction into one clock
cycle. That path runs through instruction memory, the register file, the ALU
and data memory. This design cuts that path with registers and runs each
instruction over several short cycles instead. The same cuts also let
hardware be shared: one memory holds both instructions and data, and one ALU
does both the instruction's arithmetic and the program-counter arithmetic.

The CPU executes four MIPS instructions, each taking only the cycles it needs:

| instruction           | opcode | cycles | what it does                       |
|-----------------------|--------|--------|------------------------------------|
| `beq rs, rt, off`     | 4      | 3      | if `rs == rt`, PC = PC + 4 + off·4 |
| `add rd, rs, rt`      | 0      | 4      | funct 0x20                         |
| `sub rd, rs, rt`      | 0      | 4      | funct 0x22                         |
| `sw rt, off(rs)`      | 43     | 4      | Mem[rs + off] = rt                 |
| `lw rt, off(rs)`      | 35     | 5      | rt = Mem[rs + off]                 |

Instruction formats are the MIPS ones: R-type
`{op[31:26], rs[25:21], rt[20:16], rd[15:11], shamt[10:6], funct[5:0]}` and
I-type `{op, rs, rt, imm16[15:0]}`.

## Datapath

```
          +--MemIn--+                     +------------- PCSrc <------------+
 PC ----->|0        |   +--------+        |                                 |
 ALUOut ->|1  mux   |-->| Memory |--Dout--+--> IR ---> rs,rt,rd,imm16       |
          +---------+   |  (one) |        +--> MDR                          |
 B ------------------Din|        |                                          |
                        +--------+    Registers: Aa=rs Ab=rt Aw=Dst(rt|rd)  |
                                      Dw = RegIn(MDR|ALUOut)                |
                                      Da -> A     Db -> B                   |
 ALUSrcA: A | PC ----------------+                                          |
 ALUSrcB: SE(imm)<<2 | SE(imm) | B | 4 --> ALU --+--> ALUOut               |
                                                 +--------------------------+
```

These registers sit between the combinational parts:

* **PC**, with write enable PC_WE.
* **IR**, the instruction register, with write enable IR_WE.
* **MDR**, the memory data register.
* **A** and **B**, the two register-file outputs.
* **ALUOut**, the ALU result.

MDR, A, B and ALUOut have no enable: they load every cycle. That is safe
because each is read only in the cycle right after it is written. IR holds
the instruction steady for the whole instruction, so A and B reload the same
registers again and again until a write-back changes one.

The six multiplexers and their select encodings (`mc_pkg`) are:

| select  | drives               | 0             | 1            | 2   | 3   |
|---------|----------------------|---------------|--------------|-----|-----|
| MemIn   | memory address       | PC            | ALUOut       |     |     |
| Dst     | register write index | rt [20:16]    | rd [15:11]   |     |     |
| RegIn   | register write data  | MDR           | ALUOut       |     |     |
| ALUSrcA | ALU input a          | A             | PC           |     |     |
| ALUSrcB | ALU input b          | SE(imm16)<<2  | SE(imm16)    | B   | 4   |
| PCSrc   | next PC              | ALU output    | ALUOut       |     |     |

PCSrc has two sources, and this is the key to sharing one ALU:

* In the fetch cycle the ALU computes PC + 4, and that goes straight into PC
  (input 0).
* A branch target is computed one cycle *before* the branch is decided, so it
  is already waiting in ALUOut (input 1) while the ALU compares A and B.

## The cycle schedule

Every instruction starts with the same two cycles. Decode always computes
the branch target, because the ALU will be busy comparing in the next cycle
if the instruction does turn out to be a branch.

| state (number) | register transfer                                           |
|----------------|-------------------------------------------------------------|
| IF (0)         | IR = Mem[PC]; PC = PC + 4                                   |
| Decode (1)     | A = Reg[rs]; B = Reg[rt]; ALUOut = PC + (SE(imm16) << 2)    |
| Branch (2)     | Zero = (A − B == 0); if Zero, PC = ALUOut                   |
| R1 (3)         | ALUOut = A op B                                             |
| R2 (6)         | Reg[rd] = ALUOut                                            |
| SW1 (4) / LW1 (5) | ALUOut = A + SE(imm16)                                   |
| SW2 (7)        | Mem[ALUOut] = B                                             |
| LW2 (8)        | MDR = Mem[ALUOut]                                           |
| LW3 (9)        | Reg[rt] = MDR                                               |

The control (`mc_control`) is a Moore FSM over these states:

* IF → Decode.
* From Decode, the opcode picks the next state: 4 → Branch, 0 → R1,
  43 → SW1, 35 → LW1.
* R1 → R2, SW1 → SW2, and LW1 → LW2 → LW3.
* Branch, R2, SW2 and LW3 go back to IF.

There is one exception to the Moore style: in Branch, PC_WE is the ALU's
Zero flag itself, so the branch is decided and taken within its own cycle.
The FSM's outputs are packed in the struct `ctrl_t`: PC_WE, Mem_WE, Reg_WE,
IR_WE, ALUSrcA, ALUSrcB, ALUOp, Dst, MemIn, RegIn and PCSrc. Fields that do
not matter in a state are driven to 0.

## Timing

* The memory and the register file read combinationally and write at the
  rising clock edge.
* A memory read completes in the cycle that presents the address. So does a
  register read. The result is captured into IR, MDR, A or B at the end of
  that cycle.
* One instruction therefore takes exactly 3, 4 or 5 clock cycles, with no
  wait states.

## Performance

With 4/5/4/3 cycles for ALU/load/store/branch, CPI is the mix-weighted mean.
Take a mix of 50 % ALU, 20 % load, 10 % store and 20 % branch:
CPI = 0.5·4 + 0.2·5 + 0.1·4 + 0.2·3 = **4.0**. The end-to-end testbench runs
ten instructions in exactly that mix and checks that they take 40 cycles.
The cycle can be much shorter than a single-cycle machine's, since each
cycle holds only one memory access, one register-file access or one ALU
operation.

## Using the top (`mc_cpu`)

| port        | dir | width | meaning                                               |
|-------------|-----|-------|-------------------------------------------------------|
| `clk`       | in  | 1     | clock, everything on the rising edge                  |
| `rst`       | in  | 1     | synchronous, active high                              |
| `load_we`   | in  | 1     | write `load_data` to `load_addr`, honoured only in reset |
| `load_addr` | in  | 32    | byte address for loading and read-back in reset       |
| `load_data` | in  | 32    | word to write                                         |
| `mem_rdata` | out | 32    | memory word at the address currently presented        |
| `pc`        | out | 32    | program counter                                       |
| `state`     | out | 4     | FSM state number (table above)                        |

While `rst` is high:

* PC and IR are 0 and the FSM is in IF.
* The single memory port belongs to the load port, so a program and its data
  can be written in, and results read back, one word per cycle.

When `rst` falls, the CPU fetches its first instruction from address 0.
Parameters: `XLEN` = 32 and `MEM_WORDS` = 256. Addresses are byte addresses
of 32-bit words. The two low bits are ignored, and addresses wrap modulo the
memory size.

## Module hierarchy

```
mc_cpu                       top: control + datapath + memory + load-port mux
├── mc_control               10-state FSM, control word
├── mc_datapath              registers, muxes, ALU, register file
│   ├── mc_reg  ×6           PC, IR, MDR, A, B, ALUOut
│   ├── mc_mux  ×6           MemIn, Dst, RegIn, ALUSrcA, ALUSrcB (4-input), PCSrc
│   ├── mc_regfile           32 × 32, 2 read ports + 1 write port
│   ├── mc_sign_extend       16 → 32 bits
│   ├── mc_shl2              × 4
│   └── mc_alu               add / sub / by funct, Zero flag
└── mc_memory                256 × 32, shared instructions and data
mc_pkg                       opcodes, states, select encodings, ctrl_t
```

## Simulating

Each module has a self-checking testbench, `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/mc_pkg.sv tb/tb_mc_cpu.sv --top-module tb_mc_cpu
./obj_dir/Vtb_mc_cpu
```

`tb_mc_cpu` runs the whole CPU at its default size in two parts:

1. The 10-instruction CPI mix, with one beq taken and one not taken.
2. A reload of a stored word, a counted loop closed by a backward branch, a
   store, and a final branch-to-self that ends the test.

It checks three things:

* each instruction's cycle count against its type;
* the 40-cycle total of the mix;
* the memory and register results.

It also counts how often each mechanism occurred: every instruction type,
taken and untaken branches, and the ALU's reuse for PC + 4 and the branch
target. `tb_mc_cpu_random` generates 30 random programs of about 60 instructions of
the subset. The branches in them jump forward only. It runs each program on
the CPU and on an instruction-level model inside the testbench. Then it
compares the registers, the data area and the total cycle count.

The other testbenches check one unit each against a model written in
the testbench. `tb_mc_datapath` plays the FSM by hand, so it tests the
datapath's register transfers independently of `mc_control`.

## Design choices and limits

These points are this implementation's own choices, not part of the original
design:

* **Function codes.** The original names only the R-type opcode for add/sub.
  Here funct 0x22 subtracts and every other funct adds (MIPS add is 0x20).
  There is no overflow detection.
* **Unknown opcodes** return from Decode to IF. The instruction is skipped,
  since PC has already advanced.
* **Register 0** reads as zero and ignores writes, as in MIPS.
* **Sizes.** There are 32 registers, as the 5-bit register fields imply. The
  memory holds 256 words.
* **Reset and loading.** Reset is synchronous and clears PC and IR. It also
  clears MDR, A, B and ALUOut. The register file and memory are not reset.
  The load port exists only to get programs in and results out.
* **State numbering.** States are numbered from a hand-drawn state diagram.
  The numbers of LW2 and LW3 (8 and 9) are a best reading of it.
* **Beyond the subset.** Anything other than these five instructions is out
  of scope. That includes other ALU operations, jumps, immediates, byte and
  half-word accesses, exceptions and interrupts. So is the single-cycle
  baseline the design is derived from.
