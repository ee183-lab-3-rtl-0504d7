# RISC12: a four-stage pipelined 12-bit processor with a memory-mapped VGA display

RISC12 is a small teaching processor built to show the usual pipeline problems
and their fixes in hardware you can read in an afternoon. Its datapath is 12
bits wide. It has eight general-purpose registers and 16-bit instructions, and
runs an I / R / E / W pipeline at one instruction per clock. It never stalls:

* **Data hazards** are removed by forwarding every result into the E stage.
  Results come from the W stage and from one extra register behind W, so
  dependent instructions, loads included, can follow each other with no NOPs.
* **Control hazards** are left to the program. A jump is decided in the R
  stage, so the instruction after it, the *delay slot*, always executes.
  Programs put a NOP there, or a useful instruction.

Around the processor sits a small system: an instruction ROM and a data RAM,
each with one cycle of read latency. The data port is shared with a VGA frame
buffer and a bank of 12 switches. A free-running counter supplies the external
jump condition.

The design follows a published lab specification: its instruction set, its
pipeline organisation and the timing of its memories. Parts that the
specification leaves open, mainly the I/O devices, are this implementation's
own choices. The section *Where this implementation decides* lists them.

## Instruction set

Every instruction is 16 bits. The top bits select one of three classes:

| Class | Bits 15..0 | Meaning |
|---|---|---|
| Literal | `1 L WC[2:0] LIT[10:0]` | `LOADLIT WC, {L,LIT}`: 12-bit constant, its MSB in bit 14 |
| ALU / memory | `0 1 WC[2:0] OP[4:0] RA[2:0] RB[2:0]` | `WC = A op B`, plus `LOAD` and `STORE` |
| Jump (conditional) | `0 0 OP[1:0] COND[3:0] ADDR[7:0]` | `JF.cond` (OP 0), `JT.cond` (OP 1) |
| Jump (unconditional) | `0 0 1 0 ADDR[11:0]` | `J` (OP 2) |

ALU operations, OP in hexadecimal:

| OP | Operation | OP | Operation |
|---|---|---|---|
| 00 ADD | A + B | 10 ZEROES | 0 |
| 01 ADDINC | A + B + 1 | 11 AND | A & B |
| 02 PASSA | A | 12 ANDNOTA | ~A & B |
| 03 INCA | A + 1 | 13 PASSB | B |
| 04 SUBDEC | A − B − 1 | 14 ANDNOTB | A & ~B |
| 05 SUB | A − B | 15 PASSA | A |
| 06 DECA | A − 1 | 16 XOR | A ^ B |
| 07 PASSA | A | 17 OR | A \| B |
| 08 LSL | A << 1 | 18 NOR | ~(A \| B) |
| 09 ASR | A >>> 1 (arithmetic) | 19 XNOR | A ^ ~B |
| 0A LOAD | WC = Mem[A] | 1A PASSNOTA | ~A |
| 0B STORE | Mem[A] = B | 1B ORNOTA | ~A \| B |
| | | 1C PASSNOTB | ~B |
| | | 1D ORNOTB | A \| ~B |
| | | 1E NAND | ~(A & B) |
| | | 1F ONES | all ones |

The logic half of the table has a regular structure. OP[3:0] is the truth
table of the operation: result bit *i* is `OP[{~B[i], ~A[i]}]`. `risc12_alu`
builds all sixteen logic operations from this one expression. The six add and
subtract operations share one adder, computing A + {B, ~B, 0 or all ones} +
carry-in.

The jump conditions test the flags of the ALU operation just before the jump:

| COND | Name | True when |
|---|---|---|
| 0 | .TRUE | always |
| 4 | .NEG | result < 0 (bit 11 set) |
| 5 | .ZERO | result = 0 |
| 6 | .CARRY | carry out of the adder |
| 7 | .NEGZERO | result ≤ 0 |
| 8 | .EXT | the external condition input is 1 |

`JF.TRUE` never jumps. Its encoding is the all-zero word, which serves as the
NOP.

### Programming rules

1. **One delay slot.** The instruction after any jump executes whether or not
   the jump is taken.
2. **Flags are not stored.** A jump testing NEG, ZERO, CARRY or NEGZERO must
   directly follow an ALU instruction, meaning neither LOADLIT, LOAD, STORE
   nor a jump. `risc12_cpu` contains a simulation assertion for this rule.
3. A conditional jump reaches only its own 256-word page: its 8-bit address
   replaces bits 7..0 of the jump's own address. `J` reaches all 4096 words.

## The pipeline

```
 cycle:      1   2   3   4   5   6
 i           I   R   E   W
 i+1             I   R   E   W
 i+2                 I   R   E   W
```

* **I**: the PC addresses the instruction ROM. The ROM registers its output,
  so the ROM's output register is the I/R pipeline register.
* **R**: `risc12_control` decodes the instruction and the register file is
  read (combinational reads). In the same cycle the control resolves jumps,
  using the flags the ALU is producing right now for instruction i−1 in E.
  A taken jump loads the PC at the end of R, and the instruction fetched
  meanwhile (the delay slot) continues down the pipe.
* **E**: `risc12_forward` picks each operand and `risc12_alu` computes.
  Operand A is also the data address and operand B the store data, so the data
  RAM receives the address and write enable in E.
* **W**: the result is the ALU output or, for LOAD, the word the RAM returns
  one cycle after E. It is written to the register file at the end of W. It is
  also copied into the **post-W register**, which exists only to feed the
  forwarding muxes one more cycle.

### Why forwarding needs exactly two sources

Suppose instruction i writes register r at the end of its W cycle (cycle 4
above). The instructions that might read the old value are:

| Reader | R-stage cycle | E-stage cycle | Where the new value is in its E cycle |
|---|---|---|---|
| i+1 | 3 | 4 | W stage of i: forward from W |
| i+2 | 4 | 5 | post-W register: forward from there |
| i+3 | 5 | 6 | already in the register file when i+3 read it |

The W-stage source sits after the W-stage mux, so a LOAD result read from RAM
is forwarded to the very next instruction too. When both sources match, the
W stage wins because it is newer. The register file needs no write-through
path.

### Reset

`reset` is synchronous and active high. It sets the PC to 0 and clears every
pipeline register, and no store is issued while it is high. The register file
and the memories keep their contents. The ROM's output register is not part of
the processor, so a `fetch_valid` flag turns the R-stage instruction into a
NOP for the first cycle after reset. Without it, instruction 0 would run
twice.

## The system

```
            +-----------+  addr   +------+
            |           |-------->| IROM |  4096 x 16, 1-cycle read
            |  risc12   |<--------|      |
  counter ->|   _cpu    |         +------+
  bit 23    |           |  addr/data/we    +--------------+   +------------+
 (EXT_COND) |           |----------------->| risc12_iomap |-->| data RAM   |
            |           |<-----------------|  (decoder)   |<--| 2048 x 12  |
            +-----------+   read data (W)  |              |-->| VGA frame  |--> RGB, syncs
                               switches -->|              |   | buffer     |
                                           +--------------+   +------------+
```

Data memory map:

| Address | Device | Access |
|---|---|---|
| 0x000–0x7FF | data RAM | read / write |
| 0x800–0xCAF | VGA frame buffer, cell = address − 0x800 | write only; reads return 0 |
| 0xFFF | switches `sw_data[11:0]` | read only |
| anything else | nothing | reads return 0, writes are ignored |

The decoder registers which device an E-stage address selected. It also
samples the switches at that edge. This way every read, from RAM or from the
switches, arrives in W, where the processor expects it.

### VGA device

The screen is 640×480 at 60 Hz. The pixel clock is the system clock divided
by `CLK_DIV`, which is 2 and assumes a 50 MHz clock. The screen is a grid of
40×30 cells of 16×16 pixels. Each cell holds one 12-bit colour, `{R[3:0],
G[3:0], B[3:0]}`, so cell (column c, row r) is at address `0x800 + 40·r + c`.
A program draws by storing colours. The scan side reads the frame buffer
through a second port. Colour and both syncs, which are active low, leave the
device one clock after the sync generator's counters, aligned with each other.

### External condition

`free_counter` counts every clock. Bit `EXT_BIT` (23 of 24 bits by default)
drives the processor's `.EXT` condition, so a program can time itself by
waiting on it. At 50 MHz that bit toggles about three times per second.

## Source files

| File | Contents |
|---|---|
| `rtl/risc12_pkg.sv` | widths, opcode/condition enums, the decoded control struct |
| `rtl/risc12_system.sv` | top level: CPU, ROM, decoder, RAM, counter, VGA |
| `rtl/risc12_cpu.sv` | the pipeline: registers between stages, W mux, post-W register |
| `rtl/risc12_pc.sv` | program counter and fetch-valid flag |
| `rtl/risc12_control.sv` | decoder and jump resolution (R stage) |
| `rtl/risc12_regfile.sv` | 8 × 12 register file, 2 read ports, 1 write port |
| `rtl/risc12_forward.sv` | operand source selection for E |
| `rtl/risc12_alu.sv` | ALU and flags |
| `rtl/risc12_irom.sv` | instruction ROM, loaded from a hex file |
| `rtl/risc12_dram.sv` | data RAM |
| `rtl/risc12_iomap.sv` | data address decoder and read mux |
| `rtl/free_counter.sv` | free-running counter for EXT_COND |
| `rtl/vga_timing.sv` | 640×480 sync generator |
| `rtl/vga_display.sv` | frame buffer and pixel output |
| `rtl/risc12_demo.hex` | default program: paints every cell with the switch colour |

Top-level parameters of `risc12_system`:

* `IROM_INIT`: the program file, default `"rtl/risc12_demo.hex"`, relative to
  the simulator's working directory.
* `IROM_DEPTH`: ROM depth, default 4096.
* `RAM_WORDS`: RAM size, default 2048.
* `CNT_WIDTH` and `EXT_BIT`: counter width and the bit used as EXT_COND,
  default 24 and 23.
* `VGA_CLK_DIV`: system clocks per pixel, default 2.

### Program files

A program is a text file with one 16-bit instruction in hex per line, read
with `$readmemh`. `//` comments are allowed. The shipped programs carry the
address and assembly of each word as a comment. To assemble by hand:

* ALU/memory: `0x4000 | WC<<11 | OP<<6 | RA<<3 | RB`
* LOADLIT: `0x8000 | lit[11]<<14 | WC<<11 | lit[10:0]`
* JF / JT: `(0 or 1)<<12 | COND<<8 | addr[7:0]`
* J: `0x2000 | addr[11:0]`

For STORE the address register goes in RA and the data register in RB. For
PASSB and PASSNOTB the source goes in RB.

## Simulation

All testbenches print one line `TB_RESULT checks=N failures=M` and stop
themselves; a watchdog ends any that hang. Run them from the directory that
holds `rtl/` and `tb/`, because the program files are opened by relative path.
Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/risc12_pkg.sv tb/risc12_ref_pkg.sv tb/risc12_system_tb.sv \
    --top-module risc12_system_tb -Mdir obj_sys
./obj_sys/Vrisc12_system_tb
```

Verilator finds the other modules through `-Irtl`, which works because each
file is named after its module. Only the packages must be listed explicitly.

| Testbench | What it shows |
|---|---|
| `risc12_system_tb` | End to end. `tb/cpu_test.hex` runs on the full system (EXT on counter bit 5). A reference model checks every PC, store and register write in lockstep, then the final registers and RAM, the switch read, the painted cells and their pixels on the VGA pins. It counts each mechanism (both forwarding paths on both operands, LOAD forwarding, taken and not-taken jumps, a jump on EXT, RAM and frame-buffer stores, switch reads) and fails if any never happened. |
| `risc12_system_full_tb` | The system with all defaults and the demonstration program. Two whole frames are checked pixel by pixel on the VGA pins, before and after the switches change. |
| `risc12_cpu_tb` | The processor alone with a testbench memory and a square-wave EXT. Same lockstep reference check; also checks one instruction per cycle. |
| `risc12_cpu_random_tb` | The processor on 200 generated random programs. Each mixes ALU operations, loads and stores to overlapping addresses, and forward jumps of every kind. All follow the programming rules. Every program is checked in lockstep against the reference model. |
| `risc12_hazards_tb` | The classic hazard sequences, cycle by cycle (see below). |
| `risc12_alu_tb`, `risc12_control_tb`, `risc12_forward_tb`, `risc12_regfile_tb`, `risc12_pc_tb`, `risc12_irom_tb`, `risc12_dram_tb`, `risc12_iomap_tb`, `free_counter_tb`, `vga_timing_tb`, `vga_display_tb` | Unit tests against models written out in each testbench. |

`tb/risc12_ref_pkg.sv` is the instruction-level reference model. It is written
from the instruction set, not from the RTL: one expression per ALU operation,
a PC/next-PC pair for the delay slot, and the same memory map.

`risc12_hazards_tb` runs `tb/hazards.hex`. This is the sequence
`ADD R1,R2,R3; SUB R4,R1,R5; NOR R6,R1,R7` followed by
`ADD; JT.ZERO; SUB; AND; NOR`, with the jump once not taken and once taken.
The test checks that SUB takes R1 from W and NOR takes it from the post-W
register. It also checks that the taken jump lets exactly one instruction, the
SUB, through before the target. The textbook form of this sequence names a
register R8, which does not exist with three-bit register fields, so R0 takes
its place.

The register file is not reset, so testbenches clear it before a program
runs. Programs should initialise every register they read.

## Where this implementation decides

The lab specification fixes the instruction set, the pipeline and the memory
latencies. The points below are not fixed by it, or are ambiguous, and are
settled here as follows:

* **Conditional jump target**: the 8-bit address stays in the jump's own
  256-word page.
* **Carry flag**: the carry out of the 12-bit adder for ADD, ADDINC, INCA,
  SUBDEC, SUB and DECA. Subtraction is computed as A + ~B + 1, so after SUB
  the carry means A ≥ B as unsigned numbers. The flag is 0 for every other
  operation.
* **Undefined codes**: ALU codes 0C–0F produce 0. Jump OP 3 and COND values
  other than 0 and 4–8 never jump.
* **EXT_COND** comes from the counter and is not a pin of the top level.
  The specification also lists it as a system input. To drive it from outside,
  replace the counter output in `risc12_system`.
* **Memory map, RAM size (2048 words), frame-buffer format and VGA mode** are
  all this implementation's choices. The specification asks only for a
  memory-mapped VGA device and switch input.
* **Reset**: synchronous and active high. The register file is not cleared.
  `fetch_valid` masks the first ROM word after reset.
* **Memories** are inferred arrays, not vendor-generated blocks: the ROM is
  loaded from a hex file and the RAM starts at zero. A RAM access that reads
  and writes the same address returns the old word.
* **Observation ports** `fwd_sel_a`, `fwd_sel_b` and `jump_taken` on
  `risc12_cpu` exist for tests and debugging. The top level leaves them
  open.

## Changing the design

* **A different program**: assemble it to hex and pass `IROM_INIT`.
* **A smaller or larger RAM**: change `RAM_WORDS`. Keep it at or below 0x800
  words, or move `VGA_BASE` in `risc12_iomap` so the regions do not overlap.
* **Other ALU operations**: the arithmetic list is a single `case` in
  `risc12_alu`. The encoding and flag rules are mirrored in
  `tb/risc12_ref_pkg.sv`, which must be changed too.
* **Removing the delay slot**: this would need a flush of the R-stage
  instruction when `jump_en` is high (turn it into a NOP in the I/R path).
  Programs written for the delay slot would then break.
