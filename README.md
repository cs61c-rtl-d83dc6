# Single-cycle MIPS-subset processor

This is a processor that runs every instruction in exactly one clock cycle. In one
cycle it fetches the instruction, reads the registers, computes, reads or writes data
memory, and writes the register file back. Nothing is pipelined and nothing is shared
between cycles except the architectural state: the PC, 32 registers and data memory.
This makes the machine easy to reason about. The cost is that the clock period must
cover the slowest instruction.

The processor runs seven MIPS instructions: `add`, `sub`, `ori`, `lw`, `sw`, `beq` and `j`.
The interesting part is the **control**. It is a purely combinational decoder that turns
the opcode (and, for R-type, the function field) into nine control points. Those control
points steer a fixed datapath of multiplexers, an extender, an ALU and two memories.

## Instruction formats

| format | 31..26 | 25..21 | 20..16 | 15..11 | 10..6 | 5..0  | used by |
|--------|--------|--------|--------|--------|-------|-------|---------|
| R      | op     | rs     | rt     | rd     | shamt | funct | add, sub |
| I      | op     | rs     | rt     | immediate (15..0) ||| ori, lw, sw, beq |
| J      | op     | target address (25..0) ||||| j |

| instruction | op        | funct     | effect |
|-------------|-----------|-----------|--------|
| add         | 00 0000   | 10 0000   | R[rd] = R[rs] + R[rt] |
| sub         | 00 0000   | 10 0010   | R[rd] = R[rs] - R[rt] |
| ori         | 00 1101   | –         | R[rt] = R[rs] OR ZeroExt(imm16) |
| lw          | 10 0011   | –         | R[rt] = MEM[R[rs] + SignExt(imm16)] |
| sw          | 10 1011   | –         | MEM[R[rs] + SignExt(imm16)] = R[rt] |
| beq         | 00 0100   | –         | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)·4 |
| j           | 00 0010   | –         | PC = {(PC+4)[31:28], target, 00} |

All instructions except the two branches also do PC = PC + 4.

## The datapath

```
             +--------------------------+  Instruction[31:0]
 nPC_sel --> | instruction fetch unit   |-------+--> op, funct --> main_control --> ctrl
 Jump    --> | PC, +4 adder, branch     |       |
 Zero    --> | adder, next-PC mux, IMEM |       +--> rs, rt, rd, imm16
             +--------------------------+                 |
                                                          v
   RegDst mux (rt|rd) --> Rw     rs --> Ra   rt --> Rb
                     register file (32 x 32)
                  busA |            | busB
                       |   ALUSrc mux (busB | Ext(imm16))
                       v            v
                          ALU (ALUctr) ----> Zero
                            |  result
                            +--> data memory Adr      busB --> Data In, MemWr --> WrEn
                            |            | data out
                       MemtoReg mux (ALU | memory) --> busW --> register file
```

The three two-input multiplexers number their inputs the same way throughout:

| mux       | input 0        | input 1                 |
|-----------|----------------|-------------------------|
| RegDst    | rt             | rd                      |
| ALUSrc    | busB           | extended immediate      |
| MemtoReg  | ALU result     | data memory output      |

Here is how the instructions use this path:

* **add / sub**: busA and busB go into the ALU, which adds or subtracts. The result
  goes to busW and is written to `rd`.
* **ori**: the immediate is zero-extended and ORed with busA. The result is written to `rt`.
* **lw**: the immediate is sign-extended and added to busA to form the address. The
  memory word at that address goes to busW and is written to `rt`.
* **sw**: the address is formed as for `lw`, and busB (R[rt]) is written to memory.
  No register is written.
* **beq**: the ALU subtracts busB from busA. Its `Zero` output goes back to the fetch
  unit. Nothing is written.
* **j**: the datapath does nothing. The fetch unit loads the jump target.

## Control

`main_control` implements this table. "x" means the signal does not matter for that
instruction; the RTL drives it as 0.

|           | add | sub | ori  | lw   | sw   | beq | j |
|-----------|-----|-----|------|------|------|-----|---|
| RegDst    | 1   | 1   | 0    | 0    | x    | x   | x |
| ALUSrc    | 0   | 0   | 1    | 1    | 1    | 0   | x |
| MemtoReg  | 0   | 0   | 0    | 1    | x    | x   | x |
| RegWrite  | 1   | 1   | 1    | 1    | 0    | 0   | 0 |
| MemWrite  | 0   | 0   | 0    | 0    | 1    | 0   | 0 |
| nPC_sel   | 0   | 0   | 0    | 0    | 0    | 1   | 0 |
| Jump      | 0   | 0   | 0    | 0    | 0    | 0   | 1 |
| ExtOp     | x   | x   | zero | sign | sign | x   | x |
| ALUctr    | add | sub | or   | add  | add  | sub | x |

All the control points travel together as one packed struct, `cpu_pkg::ctrl_t`.

An opcode outside this set does nothing: it writes no register and no memory, and the
PC moves on to PC + 4. The same holds for an R-type instruction whose funct is not
`add` or `sub`.

## Next-PC logic and branches

The fetch unit has two adders that run in parallel:

* one computes `PC + 4`;
* the other adds `{SignExt(imm16), 00}` to `PC + 4`. The block that builds that value
  is the "PC extender".

A two-input mux picks between them under `nPC_MUX_sel`.

Control does not drive that select directly. Instead it gives a *branch / no branch*
signal, `nPC_sel`, and the fetch unit combines it with the ALU's `Zero`:

| nPC_sel | Zero | nPC_MUX_sel |
|---------|------|-------------|
| 0       | x    | 0           |
| 1       | 0    | 0           |
| 1       | 1    | 1           |

This is an AND gate. The branch decision therefore needs the ALU's compare result in
the same cycle, which places the ALU on the path to the PC.

The jump target overrides the mux output when `Jump` is 1. The PC register holds only
bits 31..2; its two low bits are always `00`.

## Timing

All state changes at the same rising clock edge: the PC, the register file write, and
the data memory write. Both memories and the register file read combinationally. The
fetch of instruction *n + 1* starts as soon as the PC changes, and instruction *n*'s
result is already in the register file by then. Therefore there are no hazards.
CPI is exactly 1.

The slowest instruction is `lw`. Its path is:

1. PC clock-to-output
2. instruction memory read
3. register file read
4. 32-bit add
5. data memory read
6. register file setup

The clock period must cover this sum.

## Choices made in this implementation

Where the reference design is silent or inconsistent, this implementation chooses as
follows:

* **Reset.** `rst_n` is active-low and synchronous. It loads the PC with `RESET_PC`
  (default 0). While `rst_n` is low, register and memory writes are blocked at the top
  level. Without that, the instruction at the reset address would keep executing
  during a long reset. The registers and memories themselves are not cleared.
* **Register 0** always reads as zero and ignores writes, as in MIPS.
* **Memories.** Instruction and data memory each default to 1024 words
  (`IMEM_WORDS`, `DMEM_WORDS`). Addresses are byte addresses of aligned words: bits
  1..0 are ignored, and higher bits wrap modulo the depth. Only word access is
  supported. The memories are "ideal": they read asynchronously, so an FPGA or ASIC
  build maps them to distributed RAM or flops, not to synchronous block RAM.
* **Program loading.** The instruction memory has a synchronous, word-addressed load
  port (`prog_we`, `prog_addr`, `prog_data`) that is brought out at the top. Use it
  while the processor is held in reset.
* **ALUctr encoding** is 3 bits: add = `010`, sub = `110`, or = `001`. Only the width
  and the three operations are given; the codes are this design's choice. The ALU does
  not detect overflow, so `add` and `sub` behave like MIPS `addu` and `subu`.
* **Jump.** The control table has a `Jump` signal, but the jump path is not drawn. Here
  the standard MIPS target is used: `{(PC+4)[31:28], target, 00}`.
* **Field positions** follow the MIPS instruction formats: rs = 25..21,
  rt = 20..16. Some drawings of this datapath label the two the other way round.
* **Observation ports.** `pc`, `instruction`, `alu_out` and `bus_w` are outputs for
  test and debug.

## Module hierarchy

```
single_cycle_cpu            top; gates writes during reset
├── instr_fetch_unit        PC, two adders, next-PC mux, nPC_sel AND Zero, jump
│   ├── inst_memory         combinational read, load port
│   └── mux2                next-PC mux
├── main_control            op/funct -> ctrl_t
└── datapath
    ├── mux2 (x3)           RegDst, ALUSrc, MemtoReg
    ├── register_file       32 x 32, 2 read / 1 write, $0 = 0
    ├── extender            zero / sign extension
    ├── alu                 add, sub, or, Zero
    └── data_memory         combinational read, clocked write
cpu_pkg                     field helpers, opcodes, ALUctr/ExtOp enums, ctrl_t
```

Parameters of the top: `IMEM_WORDS` = 1024, `DMEM_WORDS` = 1024, `RESET_PC` = 0.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Build and run one with verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cpu_pkg.sv \
          tb/tb_single_cycle_cpu.sv --top-module tb_single_cycle_cpu
./obj_dir/Vtb_single_cycle_cpu
```

Replace the testbench name to run another one. The available testbenches are
`tb_alu`, `tb_extender`, `tb_mux2`, `tb_register_file`, `tb_data_memory`,
`tb_inst_memory`, `tb_main_control`, `tb_instr_fetch_unit`, `tb_datapath` and
`tb_single_cycle_cpu`. Each one finishes in seconds.

The tests do not depend on initial values. Storage that a test reads is always
written first, so the tests also pass when the simulator starts every variable at
random.

## How the design is verified

* **Unit tests** compare each block with a reference written separately in the
  testbench. Operands are random, and corner cases are added: the extender at
  0x7fff/0x8000, the ALU subtracting a value from itself, writes to register 0, and
  memory writes with the enable low. The decoder test checks every table entry that
  is not "x", and checks that unknown encodings write nothing.
* **`tb_datapath`** applies the control settings for each instruction, written out
  by hand, and predicts the ALU result, Zero and busW with a model of the registers
  and memory.
* **`tb_instr_fetch_unit`** drives `nPC_sel`, `Zero` and `Jump` at random and checks
  every next PC and every fetched word.
* **`tb_single_cycle_cpu`** runs the whole processor at its default sizes, in
  lockstep with an instruction-level model, comparing the PC, the fetched word and
  busW on every clock. It runs several programs:
  * a clearing program;
  * a hand-written loop that sums 5..1, stores the sum, loads it back, and tests zero
    extension and negative offsets (the final values are also checked against hand
    calculation);
  * ten programs of 2000 random instructions that fill the whole instruction memory.

  Finally, a dump program streams every register and memory word over busW. The test
  counts each mechanism: every opcode, beq taken and not taken, jumps, negative
  offsets, ori with immediate bit 15 set, and writes to `$0`. It fails if any of them
  never occurred. The lockstep comparison also confirms one instruction per clock.

## Limitations

* Only the seven instructions above are supported. There are no shifts, `slt`,
  byte or halfword memory access, exceptions or interrupts.
* There is no input/output system beyond the two memories.
* The single-cycle organisation is chosen for clarity, not speed. The clock is set
  by `lw`, even when most instructions would need far less time.
