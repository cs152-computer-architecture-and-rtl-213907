# Single-cycle MIPS-subset processor with a two-level hardwired control

This is a processor that executes every instruction in exactly one clock
cycle (CPI = 1). It runs a small subset of the 32-bit MIPS instruction set:
`add`, `sub`, `ori`, `lw`, `sw`, `beq` and `j`. The ALU decoder also handles the
R-type `and`, `or` and `slt`. The datapath is a plain single-cycle one. The
interesting part is the control. It is built in two levels:

* a **main control** that looks only at the 6-bit opcode and is laid out as
  a PLA: one AND term per instruction, and an OR plane that forms each control
  point;
* a **local ALU control** that turns a 3-bit ALU class (`ALUop`) from the
  main control, plus the instruction's `func` field, into the 3-bit ALU
  operation code `ALUctr`. Each `ALUctr` bit is a small sum of products.

The two-level split keeps the main decoder narrow. It needs the opcode only,
never the 6-bit function field. The ALU decoder is small and local to the ALU.

## Instruction formats and subset

```
          31    26 25   21 20   16 15   11 10    6 5      0
R-type   |  op    |  rs   |  rt   |  rd   | shamt | funct  |   add sub (and or slt)
I-type   |  op    |  rs   |  rt   |       immediate        |   ori lw sw beq
J-type   |  op    |            target address              |   j
```

| instruction | op     | funct  | register transfer (PC <- PC+4 unless stated)        |
|-------------|--------|--------|-----------------------------------------------------|
| add rd,rs,rt| 000000 | 100000 | R[rd] <- R[rs] + R[rt]                              |
| sub rd,rs,rt| 000000 | 100010 | R[rd] <- R[rs] - R[rt]                              |
| and / or / slt | 000000 | 100100 / 100101 / 101010 | R[rd] <- R[rs] op R[rt] (slt is signed)|
| ori rt,rs,imm | 001101 | –    | R[rt] <- R[rs] or ZeroExt(imm16)                    |
| lw rt,imm(rs) | 100011 | –    | R[rt] <- MEM[R[rs] + SignExt(imm16)]                |
| sw rt,imm(rs) | 101011 | –    | MEM[R[rs] + SignExt(imm16)] <- R[rt]                |
| beq rs,rt,imm | 000100 | –    | if R[rs] == R[rt]: PC <- PC + 4 + SignExt(imm16)*4  |
| j target    | 000010 | –      | PC <- {(PC+4)[31:28], target, 00}                   |

## The datapath

```
             +-----------------------+   Instruction<31:0>
 nPC_sel --->| instruction fetch unit|------+--> op, func --> control
 Jump    --->|  PC, +4 adder, branch |      |  rs<25:21> rt<20:16> rd<15:11> imm16<15:0>
 Zero  +---->|  adder, next-PC mux,  |      |
       |     |  instruction memory   |      v
       |     +-----------------------+   RegDst mux (1: rd, 0: rt) --> Rw
       |                                 +----------------+
       |              busW ------------->| 32 x 32-bit    |--busA----------------+
       |                                 | register file  |--busB--+             v
       |                                 +----------------+        |  ALUSrc  +-----+
       |                imm16 --> extender (ExtOp) ----------------+->mux---->| ALU |--+
       |                                                           |          +-----+  |
       +---------------------------------------------------------- Zero <------+     |
                                                                   |   result        |
                                   Data In = busB <----------------+                 v
                                   data memory (WrEn = MemWr, Adr = ALU result)
                                                |
                  MemtoReg mux (0: ALU result, 1: memory) --> busW
```

Everything between two rising clock edges is combinational. The instruction
memory, the register-file read ports and the data-memory read port have no
clock. The PC, the register file and the data memory change state only at
the rising edge that ends the cycle. So the clock period must cover the
slowest instruction, the load. Its path is: PC clock-to-Q, instruction
memory access, register-file read, ALU address add, data-memory access, and
register-file setup, plus clock skew. Every other instruction finishes early
and waits for the edge. This is the main drawback of a single-cycle design.

### Next-PC logic

The fetch unit has two adders. One forms PC+4. The other adds
`SignExt(imm16) * 4` to PC+4 to form the branch target. The next-PC mux is
not selected by `nPC_sel` directly. `nPC_sel` only says "this is a branch";
the mux takes the branch target when `nPC_sel` **and** the ALU's `Zero` are
both 1. For `beq` the ALU subtracts the two registers, so `Zero` means
"equal". A jump overrides both and loads `{(PC+4)[31:28], target, 00}`. PC
bits 1:0 are always zero.

## The control

### Main control (`main_control`)

| op       | R-type 000000 | ori 001101 | lw 100011 | sw 101011 | beq 000100 | j 000010 |
|----------|:---:|:---:|:---:|:---:|:---:|:---:|
| RegDst   | 1 | 0 | 0 | x→0 | x→0 | x→0 |
| ALUSrc   | 0 | 1 | 1 | 1 | 0 | x→0 |
| MemtoReg | 0 | 0 | 1 | x→0 | x→0 | x→0 |
| RegWrite | 1 | 1 | 1 | 0 | 0 | 0 |
| MemWrite | 0 | 0 | 0 | 1 | 0 | 0 |
| nPC_sel (Branch) | 0 | 0 | 0 | 0 | 1 | 0 |
| Jump     | 0 | 0 | 0 | 0 | 0 | 1 |
| ExtOp (1 = sign) | x→0 | 0 | 1 | 1 | x→0 | x→0 |
| ALUop<2:0> | 100 (R-type) | 010 (or) | 000 (add) | 000 (add) | 001 (sub) | x→000 |

The RTL has six AND terms, `is_rtype` … `is_j`, and each of them matches all
six opcode bits. The OR plane is:

```
RegWrite = R-type + ori + lw        ALUSrc   = ori + lw + sw
RegDst   = R-type                   MemtoReg = lw
MemWrite = sw                       nPC_sel  = beq
Jump     = j                        ExtOp    = lw + sw
ALUop<2> = R-type   ALUop<1> = ori   ALUop<0> = beq
```

The PLA fills every don't-care ("x") entry with 0, as shown in the table.
An opcode outside the subset matches no AND term. All outputs are then 0, so
the instruction acts as a no-op: it writes nothing and the PC advances by 4.

A reader who writes the control points one by one as if-then rules (for
example "RegWrite unless store or branch") gets a 1 for `j`. The table above
is what the RTL implements: a jump writes no register.

### Local ALU control (`alu_control`)

`ALUctr` codes: **010 add, 110 subtract, 000 and, 001 or, 111
set-on-less-than**. When the class is R-type (`ALUop<2>` = 1), only
`func<3:0>` matters: add xx0000, sub xx0010, and xx0100, or xx0101, slt
xx1010.

| ALUop | func<3:0> | operation | ALUctr |
|-------|-----------|-----------|--------|
| 000   | xxxx | add      | 010 |
| 0x1   | xxxx | subtract | 110 |
| 01x   | xxxx | or       | 001 |
| 1xx   | 0000 | add      | 010 |
| 1xx   | 0010 | subtract | 110 |
| 1xx   | 0100 | and      | 000 |
| 1xx   | 0101 | or       | 001 |
| 1xx   | 1010 | slt      | 111 |

Minimised, with `f` = func:

```
ALUctr<2> = !ALUop<2> &  ALUop<0>  +  ALUop<2> & !f<2> &  f<1> & !f<0>
ALUctr<1> = !ALUop<2> & !ALUop<1>  +  ALUop<2> & !f<2> & !f<0>
ALUctr<0> = !ALUop<2> &  ALUop<1>  +  ALUop<2> & !f<3> &  f<2> & !f<1> &  f<0>
                                   +  ALUop<2> &  f<3> & !f<2> &  f<1> & !f<0>
```

The equations give results for `ALUop` = 011 and for function codes outside
the five above, but no instruction produces those inputs. Two bits of
`ALUop` would be enough for this subset. Three bits leave room for more
immediate ALU instructions, such as `andi`.

## What is specified and what was chosen here

The instruction subset, the datapath structure, the mux orientations, the
control truth table, the PLA form of the main control, the `ALUop` and
`ALUctr` encodings, the ALU-control equations and the branch rule come from
the reference design. These were added or chosen here:

* **Jump path.** The reference control produces `Jump`, but its fetch unit
  has no jump input. The standard MIPS pseudo-direct target is used.
* **Register 0** always reads as zero and ignores writes (the MIPS rule).
* **`slt` is signed.** The ALU gives 0 for the unused codes 011, 100 and 101.
  It has no overflow output.
* **Memories**: 1024 words of instruction memory and 1024 words of data
  memory (parameters `IMEM_WORDS`, `DMEM_WORDS`). Both are word addressed by
  byte-address bits `[AW+1:2]`, and higher address bits wrap. Reads are
  combinational and writes happen at the clock edge.
* **Reset**: synchronous and active high. It sets PC to 0 and clears all
  registers. The data memory is not cleared.
* **Program loading**: a write port on the instruction memory (`prog_we`,
  `prog_addr`, `prog_data`). Use it while reset is held.
* **Observation outputs** on the top: `pc`, `instr`, and this cycle's
  register write (`reg_we`, `reg_waddr`, `reg_wdata`) and memory write
  (`mem_we`, `mem_addr`, `mem_wdata`). Each takes effect at the next rising
  edge.
* All state elements use the rising clock edge.

## Top-level interface (`single_cycle_cpu`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock, rising edge |
| rst | in | 1 | synchronous reset |
| prog_we, prog_addr, prog_data | in | 1, 32, 32 | instruction-memory load port |
| pc, instr | out | 32, 32 | current PC and instruction |
| reg_we, reg_waddr, reg_wdata | out | 1, 5, 32 | register write of this cycle |
| mem_we, mem_addr, mem_wdata | out | 1, 32, 32 | data-memory write of this cycle |

To use it, hold `rst`, write the program word by word at byte addresses 0,
4, 8, … and release `rst`. The first instruction executes in the cycle that
follows. A `j .` (a jump to itself) is a convenient way to halt.

## Files

`rtl/`: `sc_pkg` (opcodes, function codes, the `aluctr_e` enum and the
`ctrl_t` control-point struct), `single_cycle_cpu` (top), `control`,
`main_control`, `alu_control`, `datapath`, `ifetch`, `inst_memory`,
`register_file`, `extender`, `alu`, `data_memory`.

`tb/`: one self-checking testbench per module (`tb_<module>`), plus
`mips_ref_pkg`. That package holds instruction encoders and an
instruction-level reference model used by the datapath and processor tests.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if it hangs.

* Decoders: `tb_main_control` checks all 64 opcodes. `tb_alu_control`
  checks every `ALUop` class against every `func` value. `tb_control`
  checks the per-instruction control summary.
* Units: the ALU, extender, register file and both memories are checked
  against models with random stimulus. The fetch unit is checked for
  sequential, branch taken, branch not taken and jump cases.
* `tb_datapath` runs a hand-written program. The testbench supplies the
  control points from its own table, not from the control RTL.
* `tb_single_cycle_cpu` tests the whole processor at its default sizes. It
  generates four random programs of about 660 instructions each. Each
  program has a data-initialisation prologue, a random body over the whole
  subset and a counted loop closed by a backward `beq`. Every cycle it
  compares the PC, the register write and the memory write with the
  reference model. It also checks that each instruction takes one clock. It
  counts how often each instruction, taken, not-taken and backward branch,
  jump and write to register 0 occurs, and fails if any count is zero.

Run one testbench with plain Verilator from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sc_pkg.sv tb/mips_ref_pkg.sv tb/tb_single_cycle_cpu.sv \
    --top-module tb_single_cycle_cpu -o sim
./obj_dir/sim
```

The testbenches run in well under a second.

The limits of this verification: timing is not modelled, so the load
critical path is described above but not measured. The programs only use
data addresses 0–252. Unknown opcodes are checked at the decoder only.
