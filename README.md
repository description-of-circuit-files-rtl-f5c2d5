# A single-cycle LEGv8 processor, 32-bit

This is a small processor that runs one instruction in each clock cycle.
It implements a subset of LEGv8, the teaching form of the ARMv8 instruction
set: loads and stores, four register-to-register ALU operations, a
compare-and-branch-on-zero and an unconditional branch. It has no pipeline,
no stalls and no hazards. Every instruction reads its operands, computes,
touches memory and writes its result within one cycle. The state (PC,
registers, data memory) is updated together on the next rising clock edge.

The datapath is 32 bits wide: registers, ALU, addresses and instructions.
Standard LEGv8 is 64-bit. There are 32 registers, and register 31 always
reads zero. Each memory holds 256 words of 32 bits.

The design follows a lab's breakdown of the textbook single-cycle datapath
into components: branch address, branch control, register file (built from
banks of four), instruction and data memory interfaces, sign extend, ALU,
main control and ALU control. The lab fixed those components' pins, the ALU
operation codes and a few details, all noted below. The opcode values, the
control truth table and the timing and reset details are this design's
choices.

## Instructions

| Instruction       | Format | Opcode (bits 31:21)  | Effect                                  |
|-------------------|--------|----------------------|-----------------------------------------|
| `ADD Rd, Rn, Rm`  | R      | `10001011000`        | Rd = Rn + Rm                            |
| `SUB Rd, Rn, Rm`  | R      | `11001011000`        | Rd = Rn - Rm                            |
| `AND Rd, Rn, Rm`  | R      | `10001010000`        | Rd = Rn & Rm                            |
| `ORR Rd, Rn, Rm`  | R      | `10101010000`        | Rd = Rn \| Rm                           |
| `LDUR Rt, [Rn,#d]`| D      | `11111000010`        | Rt = mem[Rn + d]                        |
| `STUR Rt, [Rn,#d]`| D      | `11111000000`        | mem[Rn + d] = Rt                        |
| `CBZ Rt, #o`      | CB     | `10110100` + 3 bits  | if Rt == 0: PC = PC + 4 + 4·o           |
| `B #o`            | B      | `000101` + 5 bits    | PC = PC + 4 + 4·o                       |

Field positions: Rd/Rt in bits 4:0, Rn in 9:5 and Rm in 20:16. The D-format
byte offset `d` is in bits 20:12 (9 bits, signed). The CB word offset is in
bits 23:5 (19 bits) and the B word offset in bits 25:0 (26 bits). The shift
amount field (15:10) is not used.

Any other opcode, including an all-zero word, does nothing: no register or
memory write, and the PC advances by 4.

There is no add-immediate instruction. Registers start at zero after reset,
so a program gets its constants by loading them from data memory.
Register 31 can stand for zero anywhere. For example, `LDUR X1, [X31, #8]`
loads word 2.

### Branch offsets count from PC+4

The branch-address unit adds four times the offset to **PC+4**, not to the
address of the branch itself. The lab's pin description for this unit says
so, and this design follows it. Standard LEGv8 adds the offset to the
branch's own PC. As a result, every branch offset here is one less than in
standard LEGv8 code:

* `B #-1` branches to itself. The testbench uses it as a halt.
* `CBZ X2, #1` skips the next instruction when X2 is zero.

To get standard LEGv8 branch targets, change the `.pc_plus4` connection of
`u_baddr` in `single_cycle_cpu.sv` to `pc`.

## One cycle, step by step

1. **Fetch.** The PC is a byte address. Bits 9:2 select one of 256 words in
   the instruction memory, and the read is combinational. Higher address
   bits are ignored, so the program space wraps every 1 KiB.
2. **Decode.** The opcode goes to `control` and to `alu_control`. The
   register file reads Rn on port A. Port B reads Rm, or Rt when **Reg2Loc**
   is 1. STUR needs Rt on port B as the value to store, and CBZ needs it as
   the value to test.
   `sign_extend` picks the immediate field from instruction bits 26 and 31:
   * bit 26 = 0: D format.
   * bits 26 and 31 both 1: CB format.
   * bit 26 = 1 and bit 31 = 0: B format.
3. **Execute.** The ALU's A operand is register A. Its B operand is register
   B, or the immediate when **ALUSrc** is 1. In parallel, `branch_address`
   computes PC+4 + 4·immediate.
4. **Memory.** The ALU result is the byte address, and its bits 9:2 select
   the data word. **MemRead** returns the word in the same cycle.
   **MemWrite** stores register B at the next rising edge.
5. **Write-back.** **MemToReg** picks the loaded word or the ALU result.
   **RegWrite** writes it to Rd at the rising edge. A write to register 31
   is dropped.
6. **Next PC.** `branch_control` sets PCSrc = UncondBranch | (CondBranch &
   Zero). The PC then loads the branch address or PC+4.

CBZ uses no comparator. For CBZ the ALU is told to *pass B*, which here is
the value of Rt. The ALU's zero flag then answers "is Rt zero?".

### Control lines

| Instruction   | Reg2Loc | UncondBr | CondBr | MemRead | MemToReg | MemWrite | ALUSrc | RegWrite | ALU op       |
|---------------|:-------:|:--------:|:------:|:-------:|:--------:|:--------:|:------:|:--------:|--------------|
| ADD/SUB/AND/ORR | 0     | 0        | 0      | 0       | 0        | 0        | 0      | 1        | add/sub/and/or |
| LDUR          | 0       | 0        | 0      | 1       | 1        | 0        | 1      | 1        | add          |
| STUR          | 1       | 0        | 0      | 0       | 0        | 1        | 1      | 0        | add          |
| CBZ           | 1       | 0        | 1      | 0       | 0        | 0        | 0      | 0        | pass B       |
| B             | 0       | 1        | 0      | 0       | 0        | 0        | 0      | 0        | (add, unused)|

Entries that the textbook leaves as "don't care" are 0 here. The eight lines
travel together as the packed struct `ctrl_t` in `legv8_pkg`.

`alu_control` decodes the full 11-bit opcode itself. There is no 2-bit
ALUOp from the main control.

## ALU

| Code   | Operation            |
|--------|----------------------|
| `0000` | A and B              |
| `0001` | A or B               |
| `0010` | A + B                |
| `0110` | A − B                |
| `0011` | pass B               |
| `1100` | nor: reserved code, gives 0 |

Every unused code gives a zero result. Add and subtract share one adder.
Control bit 2 inverts B and supplies the carry-in, so A − B is computed as
A + ~B + 1.

The ALU has four flag outputs:

* **zero**: the result is 0.
* **sign**: bit 31 of the result.
* **overflow**: signed overflow, worked out from the sign bits of the two
  adder operands and of the sum.
* **carry**: the adder's carry out. For subtraction it is 1 when A ≥ B
  unsigned.

Overflow and carry are raised only when the low two control bits are `10`,
which marks add and subtract.

Only the zero flag is used, by CBZ. The other three would feed a condition
register, which this design does not have. They are brought out of the top
level as `dbg_alu_*` outputs.

## Register file

`registers` holds 32 registers of 32 bits. It has two combinational read
ports and one write port that writes on the rising clock edge.

It is built from eight four-register banks:

* Register-number bits 4:2 choose the bank, and bits 1:0 choose the register
  within it.
* The write enable goes only to the addressed bank.
* Each read port selects the output of the addressed bank.
* Banks 0–6 are `registers4`. Bank 7 (registers 28–31) is `registers4z`,
  whose fourth register is a constant zero that ignores writes. That is how
  register 31 becomes the zero register.

Reset is asynchronous and active high, and it clears every register.

## Memories and the host ports

The memories have no initial contents, so the top level has two host-side
ports:

* **Instruction memory load port** (`imem_load_we/addr/data`): writes one
  word per rising edge. The processor never writes instruction memory.
* **Data memory host port** (`dmem_host_addr/wdata/we/rdata`): reads
  combinationally and writes on the rising edge, to preload data and read
  results. If it writes the same word in the same cycle as a processor
  store, the host's data wins.

Host addresses are word addresses. Processor addresses are byte addresses.
The two low bits are ignored, so accesses are always whole, aligned words.

`data_mem_interface` contains `memory_data` and the `data_memory` array:

* The processor's write data and write enable reach the RAM only while
  MemWrite is 1.
* The RAM's word reaches the processor only while MemRead is 1 and MemWrite
  is 0. Otherwise the processor sees 0.

In a schematic with a shared data pin this gating would be done with
tri-state buffers.

## Reset and timing

* **Clock:** a single clock, `clk`. All state changes on its rising edge.
* **Reset:** `rst` is active high and asynchronous. It sets the PC and all
  registers to zero. While it is high, processor stores are blocked.
* **Operating sequence:** hold `rst`, load the program and data through the
  host ports, then release `rst`. The instruction at address 0 executes in
  the first cycle.
* **Inspecting results:** assert `rst` again to freeze the processor before
  reading memory through the host port.
* **Critical path:** instruction memory → register file → ALU → data memory →
  write-back mux.

## Files

| File | What it is |
|------|------------|
| `rtl/legv8_pkg.sv` | widths, opcodes, `alu_op_e`, `ctrl_t` |
| `rtl/single_cycle_cpu.sv` | top level: PC, muxes, and instances of everything below |
| `rtl/control.sv`, `rtl/alu_control.sv` | main control and ALU control |
| `rtl/registers.sv`, `rtl/registers4.sv`, `rtl/registers4z.sv` | register file and its banks |
| `rtl/sign_extend.sv` | immediate selection and sign extension |
| `rtl/alu.sv`, `rtl/zero_detect.sv`, `rtl/overflow_detect.sv` | ALU and its flag logic |
| `rtl/branch_address.sv`, `rtl/branch_control.sv` | branch target and PC-source decision |
| `rtl/inst_mem_interface.sv`, `rtl/instruction_memory.sv` | instruction fetch |
| `rtl/data_mem_interface.sv`, `rtl/memory_data.sv`, `rtl/data_memory.sv` | load/store path and data RAM |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

The only parameter is `MEM_ADDR_BITS`, default 8: the number of word-address
bits of both memories. Raising it enlarges both memories, and the
byte-address bits used become `MEM_ADDR_BITS+1:2`.

## Simulating

Every testbench ends by printing `TB_RESULT checks=N failures=M`. With
Verilator 5:

```sh
verilator --binary --timing -Irtl -y rtl rtl/legv8_pkg.sv \
    tb/tb_single_cycle_cpu.sv --top-module tb_single_cycle_cpu
./obj_dir/Vtb_single_cycle_cpu
```

To run another block's test, substitute `tb_alu`, `tb_registers`, and so on.
The whole-processor test takes well under a second.

### What the tests establish

* **`tb_single_cycle_cpu`** runs the processor at its default size, in
  lockstep with an instruction-set model written in the testbench.
  * Every cycle, it compares the PC, the register write-back (enable,
    register, value) and the branch decision. For ADD and SUB it also
    compares the four ALU flags.
  * It runs a hand-written program, which ends by checking two stored
    results:
    * loads;
    * an ADD that overflows;
    * a SUB with carry;
    * AND and ORR;
    * a write to register 31;
    * a ten-pass countdown loop closed by CBZ and B;
    * stores and a reload;
    * CBZ on register 31;
    * a halt.
  * It then runs three random programs that fill the whole instruction
    memory, 3000 cycles each. One of them is interrupted by an asynchronous
    reset.
  * After each program, it compares the whole data memory with the model.
  * It fails if any of these never happened: one of the eight instructions,
    CBZ taken, CBZ not taken, a write to the zero register, overflow, carry,
    or reset.
* **Block testbenches** compare each module with values the testbench
  computes on its own:
  * 64-bit arithmetic for the ALU, overflow detector and branch adder;
  * the control tables written as bit patterns, checked against all 2048
    opcodes;
  * model arrays for the register banks and memories;
  * directed and random cases.

## Where this design makes its own choices

The lab gives the component breakdown, the pin lists, 32-bit registers with
register 31 as zero, 8-bit word addresses for the memories, the ALU
operation codes (including pass B = `0011` and a reserved nor code), the
ALU flags, the bits 26/31 rule for immediates, and branch address = PC+4 +
offset·4. Everything below is this design's own:

* **Encodings and control:**
  * Opcode values and the control truth table, from standard LEGv8.
  * Don't-care control outputs are 0.
  * Unknown opcodes do nothing.
* **Storage timing:**
  * Writes happen on the rising edge.
  * Register and memory reads are combinational.
  * Reset is asynchronous and active high, and it also clears the PC.
  * Stores are blocked during reset.
* **Host access:** the program load port and the data host port.
* **Read gating:** a load reads 0 when MemRead is low, where a tri-state
  bus would float.
* **Flags:**
  * Carry out uses the same add/subtract gating as overflow.
  * An unused ALU code whose low bits are `10` (`1010`, `1110`) still
    raises overflow and carry, with a zero result.
* **Unused immediates:** R-format instructions get a sign-extended bits
  20:12 as their immediate, which nothing uses.

## Not included

* **Condition register and flag-setting instructions:** absent. The flags
  are observable only.
* **nor:** its code is reserved and gives a zero result.
* **Extra LEGv8 instructions:** none beyond the eight listed. In particular
  there are no immediates, no shifts and no byte or halfword accesses.
* **Lab test fixtures:** the fixtures that replace the control units with
  manual switches are not included. Testbenches drive those inputs
  directly.
