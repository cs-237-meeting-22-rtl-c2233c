# Mini-MIPS: a single-cycle processor for a MIPS subset

This is a small 32-bit processor that runs a handful of MIPS instructions, one per clock
cycle. It was built the way a data path is usually derived by hand. First, work out the
connections each instruction type needs on its own (store, load, register-to-register,
branch). Then merge those circuits into one, putting a two-input multiplexer wherever two
of them would drive the same input. The result is the classic single-cycle MIPS data path
with a small combinational control unit.

Supported instructions:

| instruction | format | effect |
|---|---|---|
| `lw rt, off(rs)`  | I | `rt = MEM[rs + sext(off)]` |
| `sw rt, off(rs)`  | I | `MEM[rs + sext(off)] = rt` |
| `beq rs, rt, off` | I | `if (rs == rt) PC = PC + 4 + 4*sext(off)` |
| `add rd, rs, rt`  | R | `rd = rs + rt` (wraps, no overflow trap) |
| `sub rd, rs, rt`  | R | `rd = rs - rt` |
| `and rd, rs, rt`  | R | `rd = rs & rt` |
| `or rd, rs, rt`   | R | `rd = rs \| rt` |
| `slt rd, rs, rt`  | R | `rd = (rs < rt, signed) ? 1 : 0` |

Encodings are the standard MIPS32 ones. The opcode is 0 for R-type, `0x04` for beq,
`0x23` for lw and `0x2B` for sw. The R-type function codes are add `0x20`, sub `0x22`,
and `0x24`, or `0x25` and slt `0x2A`. Any other opcode or function code is executed as a
no-op: the PC advances and nothing is written.

## Instruction formats and the decoder

Only two formats are needed, most significant bits first:

```
I-type:  opcode[31:26] rs[25:21] rt[20:16] offset[15:0]
R-type:  opcode[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
```

`instr_decode` is nothing but wiring plus sign extension. It hands out every field of
every instruction, with the 16-bit offset sign-extended to 32 bits. It is up to the
control unit to use the right ones. Note the roles of `rt`:

* `sw` and R-type instructions read `rt` as a source register.
* `lw` writes `rt` as its destination register.

## The data path

```
        +-----+  pc   +-----------+ instr +--------------+
   +--->| PC  |------>| instr_mem |------>| instr_decode |--> opcode/funct --> control_unit
   |    +-----+   |   +-----------+       +--------------+
   |              |                         rs  rt  rd  imm
   |          +4 / branch target             |   |   |   |
   |              |                          v   v   |   |
   +--[next-PC mux]<-- take = branch & Z   +---------+ |   |
                                           |reg_file |<-[rt/rd mux] (write address)
                                           +---------+ |   |
                                            rs_val rt_val  |
                                              |     |      |
                                              |  [rt/imm mux] (ALU operand B)
                                              v     v
                                             +-------+  Z
                                             |  ALU  |----> branch decision
                                             +-------+
                                                 | result = address / value
                                                 v
                                           +----------+
                                 rt_val -->| data_mem |--> load data
                                           +----------+
                          [ALU/memory mux] --> register write data
```

Four multiplexers resolve the conflicts that appear when the per-instruction circuits are
merged:

| multiplexer | select | 0 | 1 | why it is needed |
|---|---|---|---|---|
| register write address | `reg_dst` | `rt` | `rd` | lw writes `rt`; R-type writes `rd` |
| ALU operand B | `alu_src` | `rt` value | sign-extended offset | R-type and beq compare or combine two registers; lw/sw add an offset to a base |
| register write data | `mem_to_reg` | ALU result | memory data | R-type writes the ALU result; lw writes the loaded word |
| next PC | `branch & Z` | PC + 4 | branch target | beq that finds its registers equal |

beq works through the ALU. The control unit selects subtract, and the ALU's zero flag `Z`
says whether the two registers are equal. `Z` ANDed with the decoder's `branch` signal
drives the next-PC multiplexer.

### Control

`control_unit` is a purely combinational decode of the opcode and, for R-type, the
function field:

| instruction | reg_dst | alu_src | mem_to_reg | reg_write | mem_write | branch | ALU |
|---|---|---|---|---|---|---|---|
| R-type | 1 | 0 | 0 | 1 | 0 | 0 | from funct |
| lw     | 0 | 1 | 1 | 1 | 0 | 0 | add |
| sw     | 0 | 1 | 0 | 0 | 1 | 0 | add |
| beq    | 0 | 0 | 0 | 0 | 0 | 1 | subtract |

The control bundle is the packed struct `mips_pkg::ctrl_t`. The ALU operation is the enum
`alu_op_e`, encoded as AND=0, OR=1, ADD=2, SUB=6, SLT=7.

## Timing

Everything between the PC register and the state elements is combinational. In each clock
cycle:

1. The PC addresses the instruction memory, which has a combinational read.
2. The instruction is decoded.
3. Two registers are read (combinational read ports).
4. The ALU computes its result.
5. The data memory is read at the ALU result (also combinational).
6. The write-back multiplexer settles.

Then, on the rising edge, three things happen together:

* the register bank writes its result;
* the data memory stores, if the instruction is sw;
* the PC loads PC + 4 or the branch target.

Every instruction therefore takes exactly one cycle. This includes taken branches: there
are no stalls, no delay slot and no pipeline hazards. The price is a long critical path,
running from the PC through the instruction memory, register read, ALU and data memory to
the register write port.

A register read in the same cycle as a write to that register returns the old value. This
is what a single-cycle machine needs. Register 0 always reads zero and ignores writes, as in
MIPS.

## Memories and loading a program

The instruction and data memories are separate arrays of 32-bit words. Each has 256 words
by default (`IMEM_WORDS`, `DMEM_WORDS` on `mini_mips`). Addresses are byte addresses: the
low two bits are ignored, so accesses are always whole aligned words. An address beyond the
memory wraps around to the start.

To run a program:

1. Hold `rst_n` low. Reset is synchronous and active low. It sets the PC to 0 and clears all
   registers.
2. Write the program through `imem_we`, `imem_waddr` and `imem_wdata`, one word per clock.
3. Release reset.

Memory contents are not reset. The data memory has no load port. Data can be stored by the
program itself, or a testbench can preload it through the hierarchy (`u_dmem.mem[i]`).

Observation ports:

* `pc` and `instr` show the instruction executing in the current cycle.
* `dmem_we`, `dmem_addr` and `dmem_wdata` show the store it will make at the next edge.
* `dbg_raddr` and `dbg_rdata` read any register combinationally, through a third read port
  of the register bank.

## Files

| file | contents |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, function codes, ALU operation enum, field and control structs |
| `rtl/mini_mips.sv` | top level: the merged data path |
| `rtl/pc_unit.sv` | PC register, +4 adder, branch-target adder, next-PC multiplexer |
| `rtl/instr_mem.sv` | instruction memory with a program load port |
| `rtl/instr_decode.sv` | field splitter and sign extension |
| `rtl/control_unit.sv` | main decoder |
| `rtl/reg_file.sv` | 32 x 32-bit register bank, two read ports plus an observation port, one write port |
| `rtl/alu.sv` | add, subtract, and, or, set-less-than, zero flag |
| `rtl/data_mem.sv` | data memory |
| `rtl/mux2.sv` | two-input multiplexer used for all four data-path selects |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. It also has
a watchdog that ends the run as a failure if it hangs. The package must come first on the
command line. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mips_pkg.sv tb/tb_mini_mips.sv \
          --top-module tb_mini_mips
./obj_dir/Vtb_mini_mips
```

`tb_mini_mips` runs the processor at its default sizes, in two phases:

* **Array sum.** A hand-written program sums a five-word array in a loop. It then stores
  the sum and exercises sub, slt (true and false), and, or and a write to register 0. The
  final registers and memory word are compared with hand-computed values. The test also
  checks that the loop takes exactly 28 cycles, one per instruction.
* **Random programs.** Four random 256-instruction programs run for 600 cycles each, in
  lockstep with a reference model in the testbench. This includes backward branches,
  branches to self and undefined function codes. After every edge the test compares the PC
  and all 32 registers, and it compares every store as it is made.

The test counts lw, sw, taken and not-taken beq, backward branches, each ALU operation,
writes to register 0 and no-ops. A mechanism that never happened counts as a failure. The
whole test takes well under a second.

The block testbenches:

* check the ALU against its arithmetic definition, including signed slt corner cases;
* check the register bank against a shadow array, including old-value-on-write and
  register 0;
* check the PC loop with positive, zero and negative branch offsets;
* check the decoder on random fields;
* check the control unit on every opcode;
* check the two memories against reference arrays.

## Design choices

These are this design's own decisions:

* **Encodings.** The standard MIPS32 opcode and function values are used.
* **Signed slt.** slt compares signed numbers, as in MIPS.
* **Branch target.** It is PC + 4 + 4 × sign-extended offset, the MIPS rule.
* **No traps.** add and sub wrap silently. There is no overflow exception and no handling
  of unaligned addresses.
* **Unknown instructions.** An unrecognised opcode or function code does nothing.
* **Memory sizes.** 256 words each. Change them with the parameters. Any power of two
  works.
* **Extra ports.** The program load port, the register observation port and synchronous
  reset were added for usability.
* **Hard-wired register 0.** It reads zero and ignores writes, following the MIPS
  architecture.

The R-type shift-amount field is decoded but no supported instruction uses it.
