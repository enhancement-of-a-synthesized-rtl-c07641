# Single-cycle MIPS with ANDI, NOR and LH on a DE2-class FPGA board

This is a small 32-bit MIPS soft processor that runs one instruction per clock
cycle. It is the classic single-cycle teaching core (controller plus datapath,
no pipeline, no hazards) with three instructions added: `andi`, `nor` and the
load-half instruction `lh`. Around the core sits a minimal board system: one
memory that holds program and data, an address decoder, and memory-mapped
registers for the eight seven-segment displays of an Altera DE2 board. The
published design it follows was measured at up to 25 MHz on that board.

Its default program writes the segment patterns of the number `00917785` to the
displays and then loops. This shows the whole path: fetch, decode, ALU,
stores through the address decoder, and the display registers.

## Instruction set

| class  | instructions                                    | notes |
|--------|-------------------------------------------------|-------|
| R-type | `add addu sub subu and or slt nor`              | `nor` is new; no overflow trap (`add` = `addu`) |
| I-type | `addi addiu andi ori lui`                       | `andi` is new and zero-extends its immediate |
| memory | `lw sw lh`                                      | `lh` is new; word-only stores |
| branch | `beq j`                                         | no delay slot |

Anything else decodes to "do nothing" (no register or memory write, PC+4). There
are no shifts, `jal`, `jr`, `bne` or byte accesses, because the design does not
list them.

## How one instruction flows

`mips` = `controller` + `datapath`. In one cycle:

1. `pc` addresses port A of the memory (`ram2port`), which returns `instr`
   combinationally.
2. `controller` decodes it. `maindec` turns the opcode into a 12-bit control
   word and a separate `lh` bit. `aludec` turns `aluop` (plus `funct` for
   R-type) into a 3-bit ALU code.
3. `regfile` reads `rs` and `rt`. `immext` sign-extends or zero-extends the
   16-bit immediate, or shifts it into the upper half for `lui`. The ALU gets
   `rs` and either `rt` or the immediate.
4. The ALU result is the data address. Port B of the memory, or the GPIO
   block, answers a load combinationally. A store is committed at the next
   rising edge.
5. The write-back value is the ALU result or the load data. It then goes
   through `lhw` into the register file's write port.
6. The next PC is PC+4, the `beq` target or the `j` target.

### Control word

`maindec` produces `{signext, shiftl16, regwrite, regdst, alusrc, branch,
memwrite, memtoreg, jump, aluop[2:0]}`:

| instr         | word             | lh |
|---------------|------------------|----|
| R-type        | `0011_0000_0100` | 0 |
| `lw`          | `1010_1001_0000` | 0 |
| `lh`          | `1010_1001_0000` | 1 |
| `sw`          | `1000_1010_0000` | 0 |
| `beq`         | `1000_0100_0001` | 0 |
| `addi/addiu`  | `1010_1000_0000` | 0 |
| `andi`        | `0010_1000_0011` | 0 |
| `ori`         | `0010_1000_0010` | 0 |
| `lui`         | `0110_1000_0000` | 0 |
| `j`           | `0000_0000_1000` | 0 |

`aluop` 000 = add, 001 = sub, 010 = or, 011 = and, 1xx = use `funct`. The ALU
codes are 000 and, 001 or, 010 add, 110 sub and 111 slt, as in the original
core. NOR takes 011, the one code that core left free. So adding `nor`
changes only one `funct` entry in `aludec` and one case in the ALU. Adding
`andi` is a new opcode row that zero-extends and asks for AND.

### The load-half path (the subtle part)

`lhw` does not sit on the memory output. It sits **after** the
memory/ALU result multiplexer, right in front of the register write port.
With `lh` low it passes the word through unchanged, so every other instruction
writes back as before. With `lh` high it keeps one 16-bit half and sign-extends
it:

* `lhcontrol = 0`: bits [15:0]. Lower half of `0xA5A52008` gives `0x00002008`.
* `lhcontrol = 1`: bits [31:16]. Upper half of `0xA5A52013` gives `0xFFFFA5A5`.

`lhcontrol` is bit 1 of the effective address (`aluout[1]`). So `lh` at word
offset 0 reads the low half, and at offset 2 (or 3) the high half. This is
little-endian half-word order, not the big-endian order of the MIPS
specification. The published design says only that the half is chosen "from
the instruction". Address bit 1 is this design's reading: it fits both
published examples (offset 0 gives the lower half, offset `0xB` the upper
half). `lh` ignores address bit 0 and never traps on misalignment.

`lh` reuses the `lw` control word. The decoder gives the extra `lh` bit as its
own output rather than widening the control word.

## Memory map

| address                  | target |
|--------------------------|--------|
| `0xFFFF2000`–`0xFFFF2FFF` | GPIO page. HEX*i* at `0xFFFF2010 + 4*i`, bits [6:0] |
| everything else           | memory: word index `addr[12:2]` (8 KB, aliases) |

* **Memory (`ram2port`).** 2048 × 32 bits, shared by program and data. It has
  two asynchronous read ports and one synchronous write port. At start-up it is
  loaded from a hex file (`INIT_FILE`, one word per line). Because every
  non-GPIO address maps to memory modulo 8 KB, a data address such as
  `0xA5A52008` lands on word 2. A program must keep its data clear of code it
  will still execute.
* **Displays (`gpio`).** Software writes raw segment patterns: bit 0 is
  segment a, bit 6 is segment g, and a segment lights when its bit is low. For
  example `0x40` shows "0", `0x79` "1", `0x12` "5", `0x78` "7", `0x00` "8" and
  `0x10` "9". The registers read back. Reset blanks all displays (`0x7F`).
  Other offsets read zero and ignore writes.

The GPIO page and the register offsets come from the display program. The page
size, the read-back and the reset value are this design's choices.

## Files

| file | module | role |
|------|--------|------|
| `rtl/mips_pkg.sv` | package | opcodes, funct codes, ALU codes (enum), control-word struct, GPIO map |
| `rtl/maindec.sv` | `maindec` | opcode to control word + `lh` |
| `rtl/aludec.sv` | `aludec` | `aluop`/`funct` to ALU code |
| `rtl/controller.sv` | `controller` | both decoders + `pcsrc = branch & zero` |
| `rtl/alu.sv` | `alu` | and/or/add/nor/sub/slt, zero flag |
| `rtl/regfile.sv` | `regfile` | 32×32, 2 read + 1 write, `$0` = 0 |
| `rtl/immext.sv` | `immext` | sign/zero extension, `lui` shift |
| `rtl/lhw.sv` | `lhw` | half-word select and sign extension |
| `rtl/datapath.sv` | `datapath` | PC, muxes, register file, ALU, `lhw` |
| `rtl/mips.sv` | `mips` | the core |
| `rtl/ram2port.sv` | `ram2port` | unified memory |
| `rtl/addr_decoder.sv` | `addr_decoder` | GPIO page vs memory |
| `rtl/gpio.sv` | `gpio` | eight display registers |
| `rtl/mips_de2.sv` | `mips_de2` | **top**: core + memory + decoder + GPIO |
| `rtl/id_display.hex` | – | default program (18 words) |

Top ports: `clk`, `reset` (synchronous, active high), `HEX0`–`HEX7` (7 bits
each), and `pc`/`instr` for watching with an on-chip logic analyser.
Parameters: `MEM_AW` (default 11, i.e. 2048 words) and `INIT_FILE` (default
`"rtl/id_display.hex"`, relative to the directory the simulator runs in).

No PLL or clock divider is included. Drive `clk` at the processor frequency.

## Timing

* CPI is exactly 1. The PC, the register file, the memory write port and the
  display registers all update on the same rising edge. Everything else is
  combinational.
* The critical path is: PC → memory read → decode → register read → ALU →
  memory read → result mux → `lhw` → register-file setup. On an FPGA this
  needs memory with asynchronous reads. Block RAM with registered reads would
  need a different clocking scheme (for example, the memory clocked on the
  opposite edge).
* The register file has no reset. Software must write a register before it
  reads it.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a cycle watchdog.

* `tb/mips_asm_pkg.sv` holds a small assembler (encoder functions) and an
  instruction-set reference model written from the instruction definitions.
  Its test program repeats the three experiments with the published operand
  values, runs a counted loop (`beq` taken and not taken, `j`), exercises the
  other ALU operations and stores every result.
* `tb_datapath`, `tb_mips` and `tb_mips_de2_ops` compare the RTL with the model
  every cycle: the PC, which also checks one instruction per cycle, plus every
  store's address and data. They also check the key results by hand value.
  `tb_mips_de2_ops` also writes and reads back display registers. It counts
  how often each mechanism happens (andi, nor, lh low/high, lw, sw to memory
  and GPIO, lw from GPIO, beq taken/not taken, j, slt, lui) and fails if one
  never does.
* `tb_mips_de2` runs the top with all defaults and its default program. It
  checks that the display reads `00917785` (HEX7…HEX0 = `40 40 10 79 78 78 00
  12`) after exactly 17 cycles, and that the program then loops between `0x40`
  and `0x44`.
* `tb_paper_programs` runs the published andi, nor and lh machine code. For
  each instruction it checks the ALU output and the write-back value.

To run one, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_mips_de2_ops \
  -y rtl -y tb +libext+.sv rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/tb_mips_de2_ops.sv
./obj_dir/Vtb_mips_de2_ops
```

All of them finish in well under a second.

## Where this departs from, or goes beyond, the published design

* `lh` picks the half from address bit 1, in little-endian order (see above).
* Unknown opcodes and function codes decode to defined values (no write; ALU
  add) instead of "don't care".
* `slt` is a true signed compare. Codes 100 and 101 of the ALU output zero.
* `lh` has its own decoder output instead of a 13th control-word bit.
* The memory size (8 KB), its unified organisation, asynchronous reads, the
  address map outside the display registers, the GPIO read-back and reset
  value, and synchronous active-high reset are all this design's choices.
* The published `lh` test stores a different register from the one its
  description reads back. `tb_paper_programs` stores the base register, which
  reproduces the described words `0xA5A52008` and `0xA5A52013`. Between the
  two half-word loads it uses `addiu $2,$3,0xB` to form the second word, and
  it puts a no-op before the last `addiu` of the nor test.
* No other DE2 I/O (switches, keys, LEDs, UART) and no clock generation are
  modelled.
