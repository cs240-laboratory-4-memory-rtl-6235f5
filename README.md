# Memory and datapath: from a NOR latch to a 16-bit single-cycle CPU

This design builds a small processor from the bottom up. One stored bit
comes from two cross-coupled NOR gates. A clock turns that into a latch, two
latches make a flip-flop, flip-flops make a register, and registers with a
decoder and multiplexers make a register file and a RAM. At the top sits a
16-bit processor with a 9-instruction set. It executes every instruction in
one clock cycle, using a register file, an ALU, an instruction memory and a
256 x 16 data memory.

All of it is synthesizable SystemVerilog (IEEE 1800-2017). The top level,
`lab4_top`, holds the CPU and, next to it, one instance of each stand-alone
storage circuit. They share no signals. Each has its own group of ports, so
each can be driven and watched on its own.

## The processor

### Programmer's model

| Item | Value |
|---|---|
| Data bus, registers, ALU | 16 bits |
| Address bus, PC | 8 bits |
| Registers | R0..R15; R0 is always 0, R1 is always 1, R2..R15 general purpose |
| Reset | PC := 0 (every program starts at address 0), R2..R15 := 0 |
| Sequencing | PC := PC + 2 after each instruction (16-bit instruction words, byte addresses) |

Instruction word: `op[15:12] rs[11:8] rt[7:4] rd[3:0]`. For loads, stores and
branches the low field is a 4-bit signed offset instead of `rd`. For `JMP`,
bits 11:0 are a 12-bit offset.

| Instruction | op | Effect |
|---|---|---|
| `LW rs,rt,off`  | 0000 | rt := DMEM[rs + sext(off)] |
| `SW rs,rt,off`  | 0001 | DMEM[rs + sext(off)] := rt |
| `ADD rs,rt,rd`  | 0010 | rd := rs + rt |
| `SUB rs,rt,rd`  | 0011 | rd := rs - rt |
| `AND rs,rt,rd`  | 0100 | rd := rs & rt |
| `OR rs,rt,rd`   | 0101 | rd := rs \| rt |
| `SLT rs,rt,rd`  | 0110 | rd := (rs < rt, signed) ? 1 : 0 |
| `BEQ rs,rt,off` | 0111 | if rs = rt then PC := PC + 2 + sext(off)*2 else PC := PC + 2 |
| `JMP off12`     | 1000 | PC := off12*2 (cut to 8 bits) |
| 1001..1111      | —    | no operation; PC := PC + 2 |

Arithmetic wraps modulo 2^16, and addresses wrap modulo 256. Writes that
name R0 or R1 are dropped.

### Datapath

In one clock cycle the datapath does the following:

1. **Fetch** (`fetch`). The PC addresses the instruction memory, and an adder
   forms PC + 2.
2. **Decode** (`control`). The opcode produces `reg_dst`, `alu_src`,
   `reg_write`, `mem_write`, `mem_to_reg`, `branch`, `jump` and a 4-bit
   `alu_op`, packed in the struct `cpu_pkg::ctrl_t`.
3. **Register read** (`regfile`). Port 1 reads Rs and port 2 reads Rt, with no
   clock.
4. **Execute** (`alu`). ALU input A is always Rs. The **ALUSrc** mux makes
   input B either Rt (0) or the sign-extended 4-bit offset (1). Loads and
   stores add. BEQ subtracts and uses the ALU's `zero` output.
5. **Memory** (`ram`, 256 x 16). The address is the low 8 bits of the ALU
   result. SW writes Rt there.
6. **Write-back**. The **RegDst** mux picks the destination register: Rt for
   LW (0), Rd for R-type instructions (1). The **MemToReg** mux picks the value
   to write: the memory word for LW, the ALU result for everything else.
7. **Next PC**. The next PC is the jump target if `jump` is set. Otherwise it
   is the branch target if `branch & zero`, and PC + 2 in every other case.

| op | reg_dst | alu_src | reg_write | mem_write | mem_to_reg | branch | jump | alu_op |
|---|---|---|---|---|---|---|---|---|
| LW | 0 | 1 | 1 | 0 | 1 | 0 | 0 | add |
| SW | – | 1 | 0 | 1 | – | 0 | 0 | add |
| ADD/SUB/AND/OR/SLT | 1 | 0 | 1 | 0 | 0 | 0 | 0 | = opcode |
| BEQ | – | 0 | 0 | 0 | – | 1 | 0 | sub |
| JMP | – | – | 0 | 0 | – | 0 | 1 | – |

### Timing

The CPU has one clock. The PC, the register file and the data memory all
update on its rising edge. Everything between those edges is combinational:
the instruction read, the register reads, the ALU, the memory read and the
next-PC logic. So the clock period must cover the path
PC → instruction memory → register read → ALU → data memory → write-back mux.
There is no pipeline, so there are no stalls and no forwarding. One cycle
always retires one instruction. A register read in the cycle that writes the
same register sees the old value. That is correct here, because the write
belongs to the instruction currently executing.

`reset` is asynchronous and active high. It holds the PC at 0 and clears
R2..R15. It also blocks register and memory writes.

### Loading a program

The instruction memory holds 128 words, one for each even byte address. It is
written through the CPU's `imem_we` / `imem_addr` / `imem_data` port: give a
byte address and a 16-bit word, one word per clock, while `reset` is high.
Then release `reset`, and execution starts at address 0. An assertion in
`cpu` flags any instruction-memory write made while `reset` is low. The data memory
starts with unknown contents. Programs should store a word before they load
it.

### Observation ports

The CPU brings out its `pc`, the current `instr` and `branch_taken`. It also
brings out the register write of the current cycle (`rf_we`, `rf_waddr`,
`rf_wdata`) and the data-memory write (`dm_we`, `dm_addr`, `dm_wdata`).
Together these are enough to trace execution from outside.

## The storage circuits

These circuits follow a latch → flip-flop → register progression. Several of
them are written as real latches (`always_latch` storage), because
level-sensitive behaviour is what they demonstrate. A synthesis tool reports
those latches; they are intended.

| Module | What it is | Behaviour |
|---|---|---|
| `sr_latch` | NOR SR latch | S sets, R resets, S=R=0 holds. S=R=1 gives Q = Q' = 0. |
| `clocked_sr_latch` | S and R ANDed with CK, then the NOR latch | Follows S/R while CK = 1 and holds while CK = 0. |
| `d_latch` | Clocked SR latch with S = D and R = not D | Transparent while C = 1 and holds while C = 0. There is no forbidden input. |
| `dff_ms` | Master latch on CK, slave latch on inverted CK | Q takes D at the **falling** edge of CK. |
| `sr_flipflop` | Edge-triggered SR flip-flop | At a **rising** edge: S sets, R resets, S=R=0 or S=R=1 holds. |
| `nbit_register` | WIDTH flip-flops with shared clock and clear | Loads on the rising edge when `en`=1. `clr` is asynchronous and active high. |
| `regfile` (4 x 4 instance) | The small register file in `lab4_top` | R0 = 0000 and R1 = 0001 are fixed. R2 and R3 are written through a 2x4 decoder. |
| `latch_ram` | 4 words x 4 bits of D latches | A `clock` pulse writes `data_in` into the addressed word. |

### The S = R = 1 case

With both inputs of a NOR latch high, both outputs are 0, and `sr_latch`
shows exactly that. What a real latch does when both inputs drop together
depends on which gate wins a race, so it cannot be predicted. This model is
two-valued and cannot show that race. It returns instead to the bit that was
stored before S=R=1. Do not rely on that value in a real circuit.

### Which edge?

The master-slave flip-flop `dff_ms` is built the classical way. A first latch is
open while the clock is high, and a second latch is open while the clock is low.
So the flip-flop takes its input on the high-to-low transition. An
edge-triggered SR flip-flop is also described, one that changes only on a
rising edge. Both are provided as described. The rest of the design (register,
register file, PC, memories) uses ordinary rising-edge flip-flops.

### How the register file is built

`regfile` is structural. A `decoder` turns the write-register number into a
one-hot select. That select, ANDed with `write`, is the load enable of each
`nbit_register`. Each read port is an NREGS-input `mux`. The first NCONST
registers are constants equal to their own number. The classic gate-level
version of this circuit gates each register's *clock* with the write select.
This design uses a load enable instead. The result at the clock edge is the
same, and the design keeps a single clock.

### The two RAMs

* `ram` is the 256 x 16 part: address, separate data-in and data-out, and
  active-low `we_n` / `oe_n`. It is a plain array with combinational read. It
  writes at the rising clock edge while `we_n` = 0. The part it models writes
  while /WE is low with no clock; the clock is this design's choice. With
  `oe_n` = 1 the output reads 0, standing in for the released bus. The CPU uses
  it for both memories.
* `latch_ram` is the gate-level version. Each bit is a `d_latch`. The
  latch-enable of each word is `clock & select[word]`. The output of the
  original circuit is a tri-state bus; here it is an AND-OR of each word with
  its select.

## Where this design chooses for itself

The following points are this design's own choices, not taken from a
specification:

* **SLT opcode 0110.** SLT is named as an R-type instruction but has no
  opcode. 0110 is the only free code between OR and BEQ. Its compare is
  signed.
* **ALU op encoding.** The ALU op reuses the R-type opcodes.
* **Memory organisation.** Data memory has one 16-bit word per address.
  Instruction memory is byte-addressed through the PC and holds one word per
  even address. The branch offset is sign-extended like the load/store
  offset, and the 12-bit jump offset is cut to 8 bits after doubling.
* **Write-back.** The write-back mux for LW is added; only the ALU result path
  to the register file is drawn.
* **Unused opcodes.** Opcodes 1001..1111 do nothing.
* **Single cycle.** The CPU takes one cycle per instruction. No cycle count is
  stated; the datapath has no registers between its stages.
* **Polarities.** Clear and reset are active high and asynchronous. Decoders
  are active high, where the drawn parts use active-low outputs.
* **Added ports.** The program-load port and the observation outputs are
  additions.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<name>.sv`). Each one
compares the module against values it works out on its own, has a watchdog,
and ends with a line of the form `TB_RESULT checks=N failures=M`.

* `tb_cpu` runs the CPU against an instruction-level model of the instruction
  set written inside the testbench. Every cycle it compares the PC, the
  instruction, the register write and the memory write, so it also checks
  that each instruction takes exactly one cycle. It runs a directed program
  and then 20 random programs of 400 cycles each. The directed program
  computes the sums 1..10 with a loop into memory, exercises every ALU
  operation, and uses negative load/store offsets that wrap the address, a
  write to R0, and taken and not-taken branches. It fails if any opcode,
  branch outcome or constant-register write never occurred.
* `tb_lab4_top` is the end-to-end test of the complete top level at its
  default sizes. It runs the same CPU checks through `lab4_top` and drives
  every stand-alone circuit through its own ports. It also counts latch
  holds, transparency, edge captures and clears, and fails if any of them
  never happened.

Each testbench has been shown to fail on a deliberately broken copy of its
module, for example an unsigned SLT, a zero-extended branch offset, or an
ignored load enable.

## Simulating

Verilator 5 with `--timing` runs everything. Run from the directory that holds
`rtl/` and `tb/`:

```sh
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/cpu_pkg.sv tb/tb_lab4_top.sv --top-module tb_lab4_top
./obj_dir/Vtb_lab4_top
```

To run another testbench, swap in its name. `cpu_pkg.sv` must come first,
because the CPU blocks import it.

## Files

| File | Contents |
|---|---|
| `rtl/cpu_pkg.sv` | opcodes, ALU ops, control struct, instruction struct, bus widths |
| `rtl/lab4_top.sv` | top level: CPU plus the stand-alone circuits |
| `rtl/cpu.sv`, `fetch.sv`, `control.sv`, `alu.sv` | processor |
| `rtl/regfile.sv`, `nbit_register.sv`, `decoder.sv`, `mux.sv` | register file and its parts |
| `rtl/ram.sv`, `latch_ram.sv` | memories |
| `rtl/sr_latch.sv`, `clocked_sr_latch.sv`, `d_latch.sv`, `dff_ms.sv`, `sr_flipflop.sv` | latches and flip-flops |
| `tb/tb_*.sv` | one self-checking testbench per module |
