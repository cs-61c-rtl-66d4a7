# MIPS-lite: a single-cycle processor

This is a 32-bit processor for a six-instruction subset of MIPS. Every
instruction completes in one clock cycle. At a rising edge the program counter
(PC) takes a new value. From there a single combinational path reaches to the
next rising edge: it fetches the instruction word, decodes it, reads two
registers, computes in the ALU, and reads or writes the data memory. At that
next edge the result is written to the register file or data memory, and the
PC is loaded again. No instruction overlaps with another, so the design needs
no pipeline registers, no hazard logic and no multi-cycle control. The cost
is a clock period as long as the slowest instruction, which is the load.

The design is the textbook one: control and datapath are kept apart, and
there are separate instruction and data memories. It is written in
synthesizable SystemVerilog (IEEE 1800-2017).

## Instructions

| Instruction | Register transfer                                             | Format |
|-------------|---------------------------------------------------------------|--------|
| `addu rd, rs, rt` | `R[rd] <- R[rs] + R[rt]`                                | R      |
| `subu rd, rs, rt` | `R[rd] <- R[rs] - R[rt]`                                | R      |
| `ori rt, rs, imm` | `R[rt] <- R[rs] \| zero_ext(imm16)`                     | I      |
| `lw rt, imm(rs)`  | `R[rt] <- MEM[R[rs] + sign_ext(imm16)]`                 | I      |
| `sw rt, imm(rs)`  | `MEM[R[rs] + sign_ext(imm16)] <- R[rt]`                 | I      |
| `beq rs, rt, imm` | `if R[rs] == R[rt]: PC <- PC + 4 + sign_ext(imm16)*4`   | I      |

Every instruction also performs `PC <- PC + 4`, except a BEQ whose branch is
taken.

Instruction formats use the MIPS bit fields:

```
R:  op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
I:  op[31:26] rs[25:21] rt[20:16] imm16[15:0]
```

The encodings are the standard MIPS-I values, defined in `mips_lite_pkg`:

| Instruction | op   | funct |
|-------------|------|-------|
| ADDU        | 0x00 | 0x21  |
| SUBU        | 0x00 | 0x23  |
| ORI         | 0x0D | –     |
| LW          | 0x23 | –     |
| SW          | 0x2B | –     |
| BEQ         | 0x04 | –     |

Any other word is executed as a no-op: no state is written and the PC
advances by 4. This includes R-format words with another funct code, and the
all-zero word. The processor has no jumps, no overflow detection and no
exceptions. ADDU and SUBU wrap modulo 2^32.

## How one datapath serves six instructions

The hardest part to follow is how one fixed set of wires carries six
different register transfers. Four multiplexor-like choices, plus three
enables, make the difference:

```
             +--------------------------------------------------------------+
             |                                                              |
 PC --> instruction memory --> instr                                        |
 ^                              | rs -> RA --+                              |
 |                              | rt -> RB   |   busA ----------> ALU a     |
 |                              | rt,rd -> [RegDst] -> RW        ALU b <-- [ALUSrc] <- busB
 |                              |          register file                    ^ <- extender(imm16, ExtOp)
 |                              |                                 result -> data memory Adr
 |                              |          busB ----------------------------> data memory Data In
 |                              |        busW <- [MemtoReg] <- result | data memory Data Out
 +-- next-address logic <-- imm16, Branch, ALU zero
```

| Control point | Meaning                                 | ADDU | SUBU | ORI | LW  | SW  | BEQ |
|---------------|-----------------------------------------|------|------|-----|-----|-----|-----|
| RegDst        | 1 = write register `rd`, 0 = `rt`       | 1    | 1    | 0   | 0   | –   | –   |
| RegWr         | write the register file                 | 1    | 1    | 1   | 1   | 0   | 0   |
| ALUSrc        | 1 = ALU `b` is the immediate, 0 = busB  | 0    | 0    | 1   | 1   | 1   | 0   |
| ALUctr        | ALU operation                           | ADD  | SUB  | OR  | ADD | ADD | SUB |
| ExtOp         | 1 = sign-extend imm16, 0 = zero-extend  | –    | –    | 0   | 1   | 1   | 1   |
| MemWr         | write the data memory                   | 0    | 0    | 0   | 0   | 1   | 0   |
| MemtoReg      | 1 = busW from memory, 0 = from ALU      | 0    | 0    | 0   | 1   | 0   | 0   |
| Branch        | instruction is BEQ                      | 0    | 0    | 0   | 0   | 0   | 1   |

A "–" means the value does not matter. The RTL drives 0 there.

Some points in the table are easy to miss:

* **Which register is written.** R-format instructions write `rd`. I-format
  instructions write `rt`, which for R-format is a source. Hence the RegDst
  multiplexor in front of the write address.
* **Where the second operand comes from.** ORI, LW and SW take the 16-bit
  immediate instead of busB. ORI zero-extends it: `ori` with `0x8000`
  gives `0x00008000`. LW and SW sign-extend it, so offsets can be negative.
  One extender does both, and ExtOp chooses.
* **The store path.** For SW, busB (`R[rt]`) goes to the data memory's
  Data In. The ALU result (`R[rs] + offset`) is the address. For LW the same
  address is used, and the memory's output goes back to the register file
  through MemtoReg.
* **Equality without a comparator.** BEQ makes the ALU subtract `R[rt]` from
  `R[rs]`. The ALU's `zero` output is then exactly the equality test. The
  next-address logic takes the branch target when Branch and zero are both 1.
  The branch offset counts instructions from the one after the branch:
  `PC + 4 + sign_ext(imm16) << 2`.
* **Register 0** always reads as zero, and writes to it are dropped.

`control` computes this table from `op` and `funct` and outputs one packed
struct, `ctrl_t`. An immediate assertion in `control` checks that no
instruction writes both the register file and the memory, and that a branch
writes neither.

## Timing

Every state element updates on the rising edge of `clk`. These are the PC,
the 31 writable registers and the data memory. All reads are combinational:
the register file and both memories return data an access time after their
address changes, without waiting for the clock.

So the clock period must cover the whole chain, from PC clock-to-q, through
instruction memory access, control decode, register file read, extender and
multiplexor, ALU, data memory read (for LW) and the MemtoReg multiplexor, to
the register file's setup time. A register written in one cycle can be read
in the next. A register that is read and written in the same cycle gives the
old value during the cycle, because the write happens at the closing edge.

## Memories and program loading

Both memories are instances of `ideal_memory`. Its read is combinational and
its write is synchronous, with one address port. Addresses are byte
addresses. The word index is `addr[AW+1:2]`, so the two low bits are ignored
(all accesses are word accesses), and addresses wrap past the end of the
array. Neither memory is reset.

`mips_lite_cpu` gives the instruction memory a write port for loading
programs: `imem_we`, `imem_addr` (a byte address) and `imem_wdata`. While
`imem_we` is 1, the loader's address drives the instruction memory's single
port instead of the PC. Load with `rst` held, then release `rst`. You can
also pass a `$readmemh` image through the `IMEM_INIT` parameter.

`rst` is synchronous and active high, and it clears only the PC (to 0).
Registers and data memory start with whatever they hold, so a program must
initialise what it reads.

## Modules

```
mips_lite_cpu              top: processor + instruction memory + data memory
├── mux2 (32)              instruction-memory address: PC or loader
├── ideal_memory           instruction memory (IMEM_WORDS, default 1024)
├── control                op/funct -> ctrl_t
├── datapath
│   ├── we_register (32)   PC, written every cycle
│   ├── next_address_logic PC+4 or branch target
│   ├── mux2 (5)           RegDst
│   ├── register_file      32 x 32, 2 read ports, 1 write port
│   ├── extender           zero/sign extension
│   ├── mux2 (32)          ALUSrc
│   ├── alu                ADD / SUB / OR, zero flag
│   └── mux2 (32)          MemtoReg
└── ideal_memory           data memory (DMEM_WORDS, default 1024)
```

`mips_lite_pkg` holds the opcodes, the instruction-format structs, the
`alu_op_t` enum and `ctrl_t`.

Top-level ports:

| Port         | Dir | Width | Meaning                                      |
|--------------|-----|-------|----------------------------------------------|
| `clk`        | in  | 1     | clock                                        |
| `rst`        | in  | 1     | synchronous reset of the PC to 0             |
| `imem_we`    | in  | 1     | write `imem_wdata` into instruction memory   |
| `imem_addr`  | in  | 32    | byte address for that write                  |
| `imem_wdata` | in  | 32    | instruction word to write                    |
| `pc`         | out | 32    | address of the instruction executing now     |
| `instr`      | out | 32    | the instruction executing now                |

## What is given and what is chosen

These parts follow the classic single-cycle MIPS design:
* the instruction subset and its register transfers;
* the 32 x 32 register file with two combinational read ports and a
  clocked write port;
* the idealised memory with a combinational read and a clocked write;
* the write-enabled register used as the PC;
* the datapath connections and the input assignment of each multiplexor;
* the use of the ALU's zero output for BEQ;
* one clock edge for all state.

These are choices made for this RTL:
* the opcode and funct values (standard MIPS-I);
* the ALUctr encoding (`ADD=0, SUB=1, OR=2`);
* the polarity of ExtOp (1 = sign extension);
* the Branch control point, and the insides of the next-address logic;
* register 0 hard-wired to zero;
* undecoded words executing as no-ops;
* the memory sizes (1024 words each);
* address wrap, and ignoring the two low address bits;
* the synchronous PC reset to 0;
* the instruction-memory load port and the `pc`/`instr` observation outputs.

The ALU is the minimal one for the subset. A fuller MIPS ALU would also
have AND and set-less-than; this one does not. Input/output devices are
not modelled.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, this builds and runs the full processor test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/mips_lite_pkg.sv tb/tb_mips_lite_cpu.sv --top-module tb_mips_lite_cpu
./obj_dir/Vtb_mips_lite_cpu
```

To run a unit test, replace `tb_mips_lite_cpu` with that test's name,
`tb_<module>`.

| Testbench               | What it checks |
|-------------------------|----------------|
| `tb_mips_lite_cpu`      | The whole CPU at default sizes. It runs an instruction-set model written from the register transfers in lock step with the CPU. Every cycle it compares the PC and the instruction. After every edge it compares all registers, and at the end the whole data memory. Program 1 swaps two array words with `lw $t0,0($2); lw $t1,4($2); sw $t1,0($2); sw $t0,4($2)`, loads with a negative offset, sums 5..1 in a BEQ loop, writes to register 0 and runs two undecoded words. Program 2 is 700 random instructions. The test counts each mechanism: every instruction, BEQ taken/not taken/backward, RegDst both ways, negative offset, ORI with bit 15 set, r0 write, no-op. A mechanism that never happened is a failure. |
| `tb_datapath`           | The datapath with control points driven by hand, and the memories modelled in the testbench. |
| `tb_control`            | All 4096 `op`/`funct` combinations against the control table above. |
| `tb_register_file`      | Random traffic against an array model. Read-before-write and register 0. |
| `tb_ideal_memory`       | Combinational read, write only at the edge with `we`, and the low address bits ignored. |
| `tb_alu`                | Corner and random operands for each operation, and the zero flag. |
| `tb_extender`           | All 65536 immediates, in both modes. |
| `tb_next_address_logic` | PC+4 and branch targets, forward and backward. |
| `tb_we_register`        | Reset, load, hold. |
| `tb_mux2`               | Both widths, both selects. |

Verilator has two states and starts uninitialised variables at random
values. The CPU testbench therefore starts its model from the register and
data-memory contents the CPU holds when reset ends.

## Changing the design

* **Another instruction** needs three changes. Add its opcode to
  `mips_lite_pkg`. Add its control points to `control`. Add any new datapath
  element (for example a jump target in `next_address_logic`, or an AND in
  `alu`, with a new `alu_op_t` value).
* **Memory size** is set by the `IMEM_WORDS` and `DMEM_WORDS` parameters of
  `mips_lite_cpu`. The CPU testbench assumes 1024 words for both.
* **Register 0** behaviour is in `register_file`: both the write guard and
  the read multiplexors.
