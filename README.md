# HW: a 16-bit single-cycle teaching processor

This is a small processor that runs one instruction per clock cycle. It has
eight instructions (load, store, add, subtract, AND, OR, branch-if-equal, jump),
a 16-bit data path, an 8-bit address space and sixteen registers, two of which
are constants. There is no pipeline and no multi-cycle control. The control
unit is a lookup from opcode to control lines, and three 2:1 multiplexers
steered by one signal (`MemLoad`) change the datapath from register-register
form to memory form. Around the CPU is the bench setup used to run it: an
external instruction memory that is filled from address/data switches, then
handed over to the CPU.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It has no parameters
that need changing: every size is the architecture's own.

## Instruction set

Every instruction is one 16-bit word:

| bits   | 15..12 | 11..8 | 7..4 | 3..0        |
|--------|--------|-------|------|-------------|
| field  | opcode | Rs    | Rt   | Rd / offset |

| opcode | instruction         | effect                                          |
|--------|---------------------|-------------------------------------------------|
| 0000   | `LW Rt, off(Rs)`    | Rt ← M[Rs + sext(off)]                          |
| 0001   | `SW Rt, off(Rs)`    | M[Rs + sext(off)] ← Rt                          |
| 0010   | `ADD Rs, Rt, Rd`    | Rd ← Rs + Rt                                    |
| 0011   | `SUB Rs, Rt, Rd`    | Rd ← Rs − Rt                                    |
| 0100   | `AND Rs, Rt, Rd`    | Rd ← Rs & Rt                                    |
| 0101   | `OR Rs, Rt, Rd`     | Rd ← Rs \| Rt                                   |
| 0111   | `BEQ Rs, Rt, off`   | if Rs = Rt: PC ← PC + 2 + 2·sext(off), else PC + 2 |
| 1000   | `JMP off12`         | PC ← 2·off12 (bits 11..0), truncated to 8 bits  |

Offsets are 4-bit two's-complement numbers, so they range from −8 to +7.
R0 always reads 0 and R1 always reads 1. Writes to them are discarded. R1 is
the only way to make a constant: `ADD R1,R1,R2` puts 2 in R2.
Opcodes 0110 and 1001–1111 are not defined. This implementation treats them as
no-ops: nothing is written and the PC advances by 2.

## Addresses, words and the "+2"

This is the part that most often confuses people. The PC advances by 2, and
branch and jump offsets count instructions, so they are doubled. Yet each
memory address holds a whole 16-bit word. The instruction memory has 256
16-bit words at addresses A7..A0. A program therefore sits on the even
addresses 0, 2, 4, …, and the odd addresses are never fetched. The data memory
is organised the same way, with 256 words of 16 bits. A load or store uses the
low 8 bits of `Rs + sext(off)` as a word address, so stores to 0, 2 and 4 land
in three separate words, and so would stores to 1 and 3.

The branch target is computed on 8 bits. The offset is sign-extended from 4 to
8 bits, shifted left by one and added to PC + 2. All PC arithmetic wraps
modulo 256. A jump can only reach the first 128 instruction slots, because
only bits 6..0 of its 12-bit offset survive the doubling into an 8-bit PC.

## Datapath

`cpu` connects the parts as follows. Bracketed numbers are instruction bits, and the names are the modules in `rtl/`:

```
            +--------- pc_unit: PC, PC+2, branch adder, next-PC mux, jump
instr ------+
 [15:12] -> control_unit -> ALUop, RegWrite, MemLoad, MemStore, Branch, Jump
 [11:8]  -> register_file read port 1 ---------------> ALU A
 [7:4]   -> register_file read port 2 --+--> mux(MemLoad=0) -> ALU B
 [3:0]   -> sign_extend 4->16 ----------+--> mux(MemLoad=1) -^
                                                   ALU result -> data_memory address
           read port 2 -> data_memory write data (MemStore = write enable)
           write-back  = MemLoad ? memory read data : ALU result
           write addr  = MemLoad ? Rt : Rd
```

`MemLoad` is 1 for both LW and SW, which is why one signal can steer all three
muxes. For SW, the write-address and write-back muxes choose values that are
never used, because `RegWrite` is 0. BEQ runs a subtraction through the ALU,
and the ALU's `Zero` output, ANDed with `Branch`, selects the branch target.
The ALU encodes its operations as AND = 0000, OR = 0001, add = 0010 and
subtract = 0110. Any other code gives 0.

Control lines per instruction (from `control_unit`):

| instr | ALUop | RegWrite | MemLoad | MemStore | Branch | Jump |
|-------|-------|----------|---------|----------|--------|------|
| LW    | 0010  | 1 | 1 | 0 | 0 | 0 |
| SW    | 0010  | 0 | 1 | 1 | 0 | 0 |
| ADD   | 0010  | 1 | 0 | 0 | 0 | 0 |
| SUB   | 0110  | 1 | 0 | 0 | 0 | 0 |
| AND   | 0000  | 1 | 0 | 0 | 0 | 0 |
| OR    | 0001  | 1 | 0 | 0 | 0 | 0 |
| BEQ   | 0110  | 0 | 0 | 0 | 1 | 0 |
| JMP   | 0010* | 0 | 0 | 0 | 0 | 1 |

\* The ALU operation for JMP does not matter. Add is driven.

## Timing and reset

- Everything in the CPU is combinational from `instr` to the next state.
- The PC, the register file and the data memory all update on the rising edge
  of `clk`. So one instruction completes per clock.
- Reset is active high and asynchronous. It clears the PC to 0 and R2–R15 to 0.
- The data and instruction memories are not cleared by reset. Programs must
  store before they load.

## The bench setup (`lab6_system`)

The top level joins four parts: the CPU, the instruction memory (`instr_mem`),
the address selector (`imem_addr_select`) and the signals that come from
switches. Its outputs are the values shown on the bench displays: PC,
instruction, Read Data 1/2, ALU result and Zero.

To load and run a program:

1. Hold `reset` = 1 and set `load` = 0. The memory address now comes from
   `sw_addr`.
2. For each instruction, put its address on `sw_addr` and the word on
   `sw_data`, and drive `wr_n` low for at least one rising edge of `clk`.
3. Set `load` = 1. The memory address now comes from the CPU's PC. Writes are
   blocked in this mode.
4. Release `reset`. Each rising edge of `clk` executes one instruction.

The write strobe is sampled on the clock. It is not a level-sensitive SRAM
write. On the original bench the address bus is switched by a tri-state buffer
and a manual disconnect. Here a 2:1 multiplexer does that job.

## Example program

The test bench runs this program. Register contents are shown after each
instruction:

| addr | instruction      | word   | effect |
|------|------------------|--------|--------|
| 00   | ADD R1,R1,R2     | 2112   | R2 = 2 |
| 02   | ADD R2,R2,R3     | 2223   | R3 = 4 |
| 04   | ADD R3,R3,R3     | 2333   | R3 = 8 |
| 06   | SW R3,0(R0)      | 1030   | M[0] = 8 |
| 08   | SW R2,2(R0)      | 1022   | M[2] = 2 |
| 0A   | LW R5,0(R0)      | 0050   | R5 = 8 (label LOOP) |
| 0C   | LW R4,2(R0)      | 0042   | R4 = 2 |
| 0E   | SUB R5,R4,R5     | 3545   | R5 = 6 |
| 10   | SW R5,4(R0)      | 1054   | M[4] = 6 |
| 12   | LW R15,4(R0)     | 00F4   | R15 = 6 |
| 14   | OR R15,R15,R15   | 5FFF   | ALU shows 6 |
| 16   | BEQ R2,R15,LOOP  | 72F9   | offset −7; 2 ≠ 6, so not taken |
| 18   | JMP 0x0F         | 800F   | PC = 1E (END) |

Nothing is defined at END. The test bench puts `JMP 0x0F` there (a jump to
itself) so the CPU stops at 1E. Right after reset the displays show PC 00,
instruction 2112, Read Data 1/2 = 0001, ALU 0002 and Zero 0. As written, the
branch back to LOOP is never taken.

## Where this implementation makes its own choices

- **Branch target.** The short form of the instruction-set summary reads
  `PC ← PC + offset·2`. The detailed branch datapath adds the offset to PC + 2.
  This RTL uses PC + 2 + 2·offset, so the offset counts instructions from the
  next one.
- **Jump path.** The next-PC logic is drawn only as far as the branch mux. A
  jump mux placed after it gives JMP priority.
- **Register reset.** R2–R15 are cleared on reset. Writes to R0 and R1 are
  ignored.
- **Memory organisation.** The data memory size is not given. It is assumed to
  match the instruction memory: 256 × 16, one word per address.
- **Undefined encodings.** Undefined opcodes are no-ops. Undefined ALU codes
  give 0.
- **Clocked program loading.** Loading is clocked, and the output enable is
  modelled as "read 0 when disabled" because there are no tri-state nets.

## Verification

Each module has a self-checking test bench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_alu`, `tb_sign_extend`, `tb_control_unit`, `tb_register_file`,
  `tb_data_memory`, `tb_instr_mem`, `tb_imem_addr_select` and `tb_pc_unit`
  check the units on their own. Expected values are computed independently:
  shadow arrays, integer arithmetic and the control table typed in as data.
- `tb_cpu` feeds instructions straight into the CPU. It first stores each
  address's own value into all 256 data words, then runs 5000 random
  instructions, with BEQ Rs,Rs mixed in so that some branches are taken. Every
  cycle it compares the PC, both read ports, the ALU result and Zero with
  `hw_ref_pkg`, an instruction-level reference model that shares no code with
  the RTL.
- `tb_lab6_system` goes through the load procedure with the top level at its
  default sizes. It runs the example program, checking the ALU values listed
  above, then runs a second program that covers AND, forward and backward
  taken branches and writes to R0/R1. It also checks every cycle against the
  reference model. It counts each mechanism (load writes, each ALU
  instruction, LW, SW, taken and untaken BEQ, JMP, ignored writes to constant
  registers) and fails if any of them never happened.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hw_pkg.sv tb/hw_ref_pkg.sv tb/tb_lab6_system.sv --top-module tb_lab6_system
./obj_dir/Vtb_lab6_system
```

The same command builds every other bench: swap in its `tb_*.sv` file and
module name.

## Files

| file | content |
|------|---------|
| `rtl/hw_pkg.sv` | widths, opcode and ALUop enums, control-word struct |
| `rtl/lab6_system.sv` | top level: CPU, instruction memory, load path |
| `rtl/cpu.sv` | single-cycle datapath |
| `rtl/pc_unit.sv` | PC register and next-PC logic |
| `rtl/control_unit.sv` | opcode decoder |
| `rtl/register_file.sv` | 16 × 16 registers, R0 = 0, R1 = 1 |
| `rtl/alu.sv` | AND / OR / add / subtract, Zero flag |
| `rtl/sign_extend.sv` | parameterised sign extension |
| `rtl/data_memory.sv` | 256 × 16 data RAM |
| `rtl/instr_mem.sv` | 256 × 16 instruction RAM with load port |
| `rtl/imem_addr_select.sv` | switch/PC address selection |
| `tb/hw_ref_pkg.sv` | instruction-level reference model |
| `tb/tb_*.sv` | test benches |
