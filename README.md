# A multi-cycle R2000-subset processor, and the datapath parts it is built from

This is a small 32-bit processor that runs a subset of the MIPS R2000
instruction set: `add`, `sub`, `and`, `or`, `slt`, `lw`, `sw`, `beq`, `addi`,
`j` and `halt`. It is a teaching machine. Instructions and data share one
memory (a Princeton organisation). There is only one ALU, and it also
increments the PC. Each instruction therefore takes several clock cycles:
fetch, decode, and one to three execute cycles. A Moore state machine steps
through them and drives every multiplexer select and register load in the
datapath.

The processor follows a published course design: its datapath schematic, ALU,
PC, register file, memory, controller state codes and control-signal
encodings. That design leaves the controller unfinished. It gives the execute
sequences for the ALU instructions, `slt` and `lw`, and leaves `sw`, `beq`,
`addi`, `j` and `halt` as exercises. This RTL completes them. The section
[Departures](#departures-from-the-published-design) lists every place where
the RTL differs from the published material or fills a gap in it.

Alongside the processor are the simpler building blocks from which such a
datapath is explained. They are separate designs and do not connect to the
processor:

- a register with load and output enables;
- three ways of wiring four registers for register transfers;
- a 4 x 4 register file;
- a 1024 x 4 static RAM;
- a ripple-carry adder made from full-adder bit slices.

## Instruction set

All instructions are 32 bits. Register 31 always reads as zero and ignores
writes; it plays the role of MIPS `$zero`.

| format | fields (bits) |
|---|---|
| R | op[31:26] rs[25:21] rt[20:16] rd[15:11] shft[10:6] funct[5:0] |
| I | op[31:26] rs[25:21] rt[20:16] imm[15:0] |
| J | op[31:26] target[25:0] |

| instruction | op | funct | effect | cycles |
|---|---|---|---|---|
| add | 0 | 32 | rd = rs + rt | 3 |
| sub | 0 | 34 | rd = rs - rt | 3 |
| and | 0 | 36 | rd = rs & rt | 3 |
| or  | 0 | 37 | rd = rs \| rt | 3 |
| slt | 0 | 42 | rd = 1 if rs - rt is negative, else 0 | 4 |
| lw  | 35 | - | rt = mem[rs + sext(imm)] | 5 |
| sw  | 43 | - | mem[rs + sext(imm)] = rt | 4 |
| beq | 4 | - | if rs == rt: pc = pc + sext(imm) | 3 not taken, 4 taken |
| addi | 8 | - | rt = rs + sext(imm) | 3 |
| j   | 2 | - | pc = {6'b0, target} | 3 |
| halt | 63 | - | stop until reset | - |

Addresses count 32-bit words, not bytes. The PC advances by 1, and only the low
8 bits of an address select one of the 256 memory words. `beq` adds its offset
to the PC after the increment, so an offset of 0 falls through to the next
instruction. `sext` is sign extension of the 16-bit immediate.

## Datapath

```
              memory data bus (32)                 memory address bus (32)
   +-------------+------+-------------+         +-----------+-----------+
   |             |      |             |         |           |           |
  IR (ld)      MBR (ld) |  RegB ->[RegBmdEN]   [PCmaEN]<- PC  [ALUmaEN]<- ALUout reg
   |             |      |                                              ^ (loads
   v             v      v                                              |  every cycle)
controller   register file --RegA/RegB--> ALU (A: RegA|PC, B: RegB|0|imm|1) --+
                  ^                         |                              |
                  +------ ALU result -------+---> PC (ALU result or jump target)
```

- **PC** (`r2000_pc`). Reset clears it to 0. When `PCld` is high it loads
  either the ALU result (`PCsel` = 1: PC + 1 in fetch, PC + offset for a taken
  branch) or the jump target `{6'b0, IR[25:0]}`.
- **IR and MBR** (`r2000_reg32`). Both load from the memory data bus when
  `IRld` or `MBRld` is high.
- **Register file** (`r2000_regfile`). The read ports are registered. At every
  clock edge it copies registers rs = IR[25:21] and rt = IR[20:16] into RegA
  and RegB, whatever the controller is doing. An instruction's operands are
  therefore ready one cycle after the instruction reaches IR. The decode cycle
  exists to provide that cycle. The write port writes the ALU result or the MBR
  (`wrDataSel`) to rd or rt (`wrRegSel`) when `regWrite` is high. A read at
  the same edge as a write returns the old value.
- **ALU** (`r2000_alu`). It is combinational. Input A is RegA or the PC
  (`srcA`). Input B is RegB, 0, the sign-extended immediate or 1 (`srcB`). The
  6-bit one-hot `op` selects add, sub, and, or, pass A or pass B. The flags
  `zero` (result is 0) and `neg` (result bit 31) go back to the controller.
- **ALU output register** (`r2000_reg32`, load enable tied high). It captures
  the ALU result at every edge. `lw` and `sw` compute their address in
  execute1, and this register holds it on the address bus during execute2.
- **Memory** (`r2000_memory`). 256 words of 32 bits. A read is combinational
  while `mr` is high, so IR or MBR can capture the word at the end of the same
  cycle. A write happens at the clock edge that ends a cycle with `mw` high.
- **Two buses.** The address bus carries the PC (`PCmaEN`) or the ALU output
  register (`ALUmaEN`). The data bus carries the memory's read data (`mr`) or
  RegB (`RegBmdEN`). The original uses three-state drivers. Here each bus is a
  multiplexer on the same enables and reads zero when nothing drives it. The
  controller asserts that at most one source drives each bus.

## The controller

`r2000_controller` is a Moore machine with five states. Its state codes match
the original: fetch `000`, decode `100`, execute1 `001`, execute2 `010`,
execute3 `011`. The outputs depend only on the state and the instruction
register. IR changes only at the end of fetch, so the outputs are stable for
the whole of every other cycle. The ALU flags affect only the next state: they
choose between execute2 and execute3 for `slt`, and decide whether a `beq`
goes on to execute2.

| state | what happens (register transfers) |
|---|---|
| fetch | IR <- mem[PC]; PC <- PC + 1 (the ALU adds 1 to the PC) |
| decode | nothing is driven; RegA/RegB <- regs[rs], regs[rt] at the end of the cycle |
| execute1 | add/sub/and/or: rd <- RegA op RegB, then fetch |
| | slt: compute RegA - RegB; go to execute2 if `neg`, else execute3 |
| | lw, sw: ALUout register <- RegA + sext(imm) |
| | beq: compute RegA - RegB; go to execute2 if `zero`, else fetch |
| | addi: rt <- RegA + sext(imm), then fetch |
| | j: PC <- {6'b0, IR[25:0]}, then fetch |
| | halt or any unknown instruction: stay here, `halted` = 1 |
| execute2 | slt: rd <- 1 (the ALU passes the constant 1) |
| | lw: MBR <- mem[ALUout register] |
| | sw: mem[ALUout register] <- RegB, then fetch |
| | beq (taken): PC <- PC + sext(imm) |
| execute3 | slt: rd <- 0 |
| | lw: rt <- MBR |

Some sequences need more than one execute cycle:

- **Loads and stores** take an extra cycle because memory can be addressed
  only from the PC or the ALU output register. The address must be computed
  and registered first.
- **A taken branch** takes an extra cycle because the one ALU cannot compare
  rs with rt and add the offset to the PC in the same cycle.
- **`slt`** uses the sign of rs - rt, as the original does. If the subtraction
  overflows, the result is wrong: for example, `slt` of 0x7fffffff and
  0xffffffff gives 1.

Setting a register transfer in one cycle takes all of that cycle's signals. In
execute1 of an `add`, for example: `srcA` = RegA, `srcB` = RegB, `op` = add,
`wrDataSel` = ALU, `wrRegSel` = rd and `regWrite` = 1. Every other enable is
0. The full set for each state is the output `always_comb` in
`rtl/r2000_controller.sv`. It is grouped by state and is meant to be read as a
table.

### Clock period

The cycle time is set by the longest path between flip-flops. In fetch and
decode the candidates are:

- bus driver + memory read (into IR);
- A multiplexer + ALU + PC multiplexer (into PC);
- register-file read (into RegA/RegB);
- the controller's output logic.

In execute there are two more:

- bus driver + memory write;
- B multiplexer + ALU + the controller's next-state logic, through `zero` and
  `neg`.

The last is likely to be the longest, because it adds the ALU delay to the
controller delay. This RTL keeps that path, as the original does. Registering
the flags would shorten it, at the cost of one more cycle for `slt` and `beq`.

## Running a program

The memory has no load port. A testbench writes the program straight into the
array `u_mem.mem` (in the top level, `u_cpu.u_mem.mem`), resets the machine
for at least one clock, releases reset, and waits for `halted`.

`tb/tb_r2000.sv` and `tb/tb_comp_org_top.sv` both run a Fibonacci program.
It reads n from word 254, computes F(n) with a loop of `add`, `addi` and
`beq`, stores the result in word 255 and halts. It uses 16 instruction words,
the 2 data words and registers r0 to r3. With n = 4 it stores 3 and reaches
`halt` after 77 clock cycles. For n = 0 it stores its starting value 1.

## Building blocks

Each of these has its own ports in the top level:

- `reg8_ld_oe`: an 8-bit register. LD loads it at a rising edge, and OE puts
  its contents on the outputs. When the outputs are off, `q_en` is 0 and `q`
  reads 0; this stands in for high impedance in two-valued logic.
- Three ways of connecting four 8-bit registers for register transfers:
  - `rt_common_bus`: one shared bus. Each register has a load enable and an
    output enable. Each register is a `reg8_ld_oe`.
  - `rt_mux_bus`: a multiplexer picks one source, and its output is the common
    input bus of every register.
  - `rt_point_to_point`: every register has its own multiplexer, so several
    transfers, even a swap, happen in one clock.

  Each of the three has an extra external data input so that values can be
  loaded. One transfer takes one clock.
- `regfile4x4`: four 4-bit words with separate read and write addresses. The
  write is clocked. The read is combinational while REn is high.
- `sram1024x4`: 1024 words of 4 bits with RD (chip select), WR and 10 address
  lines. The bidirectional data pins are split into `io_in`, `io_out` and
  `io_oe`. Writes are clocked here, although the real part is asynchronous.
- `half_adder` -> `full_adder` (two half adders and an OR of their carries) ->
  `ripple_adder`. The adder is WIDTH full-adder slices, 32 by default, with the
  carry rippling from slice to slice. Its delay grows linearly with WIDTH.

## Departures from the published design

- **Three-state buses become multiplexers** on the same enable signals.
  Outputs with an output enable report the enable on a separate signal.
- **Memory write timing.** The original memory writes a fixed delay after the
  write strobe rises. Here the write happens at the clock edge that ends the
  cycle, so the same word is stored at the end of the same cycle.
- **Completed controller.** The `sw`, `beq`, `addi`, `j` and `halt` sequences
  are this design's own. The published state diagram shows `sw` and `beq`
  with a single execute state. Its partial next-state code sends `sw` on to
  execute2, and this datapath cannot do either instruction in one cycle, so
  both use two execute cycles (`beq` only when taken).
- **`slt` in execute1.** The original also writes the difference rs - rt to
  rd in execute1; here `slt` writes rd only in execute2 or execute3. The final
  result is the same.
- **Unknown instructions** halt the machine. The original leaves the state
  undefined.
- **Reset.** Reset also clears IR, MBR, the ALU output register, RegA and
  RegB. Register 31 is a constant zero rather than an initialised word. An ALU
  operation code that is not one-hot gives 0 rather than an undefined value.
- **PC increment.** One control table of the original gives the increment as
  "4". This design adds 1, like the rest of the original, because memory is
  addressed by word.
- **Parts not built.** These appear only as sketches and have no operation
  set or control given: the generic ALU with an overflow flag, the
  accumulator datapath, the bit-slice accumulator datapath, and the Harvard and
  Princeton accumulator processors. Carry-lookahead and carry-select adders are
  mentioned but not built.

## Files

- `rtl/r2000_pkg.sv`: opcodes, function codes, state and select enums, the
  `ctrl_t` control struct and instruction encoders.
- `rtl/r2000*.sv`: the processor. `r2000.sv` wires it together.
- `rtl/comp_org_top.sv`: the top level. It holds the processor and the
  building blocks side by side, sharing only `clk` and `rst`. Its parameters
  are `MEM_DEPTH` (256), `RT_WIDTH` (8) and `ADD_WIDTH` (32).
- `rtl/reg8_ld_oe.sv`, `rtl/rt_*.sv`, `rtl/regfile4x4.sv`,
  `rtl/sram1024x4.sv`, `rtl/*adder.sv`: the building blocks.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

To simulate with Verilator, for example the whole design:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/r2000_pkg.sv tb/tb_comp_org_top.sv --top-module tb_comp_org_top
./obj_dir/Vtb_comp_org_top
```

Replace the testbench name to run another one. To lint a module:
`verilator --lint-only -Wall -y rtl rtl/r2000_pkg.sv rtl/<module>.sv`. The
only warnings it gives are for package constants a module does not use and for
instruction bits a unit does not read.

## How far it is verified

Every module passes its own testbench. Each testbench compares the module
with a model written independently in the testbench, and fails when the module
is replaced by a copy with a deliberate bug.

- **Processor (`tb_r2000`).** Runs the Fibonacci program for n = 0 to 12 and
  40 random programs, mixing every instruction with forward branches and jumps.
  It also runs a bubble sort of 8 signed words on 6 arrays. Its inner loop
  closes with a backward `beq` and its outer loop with a backward `j`. The
  sorted words are compared with a copy sorted in the testbench.
  After each program it compares all registers, all 256 memory words and the
  exact cycle count with an instruction-level reference model.
- **Top level (`tb_comp_org_top`).** Runs at the default sizes. It checks the
  cycle count of every executed instruction against the table above, and
  requires each control sequence to have run at least once: both `slt`
  outcomes, a taken and an untaken `beq`, `lw`, `sw`, `j` and `halt`. It also
  exercises each building block once.

Timing has not been analysed beyond the path discussion above. The random
programs branch only forward, so that each is sure to reach its `halt`.
Backward branches are covered only by the Fibonacci and sort loops.
