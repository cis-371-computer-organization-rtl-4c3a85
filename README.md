# LC4 single-cycle processor on clock-edge memories

This is a complete, non-pipelined LC4 system in SystemVerilog. LC4 is a
16-bit teaching ISA with eight registers and a 64K-word address space. Every
instruction finishes in one processor cycle. The design follows the
structure of the CIS 371 lab hints for the LC4 non-pipelined datapath.

The hard part is the memory. FPGA block RAM only returns data on a clock
edge. A single-cycle processor, though, must fetch an instruction and load
its data within the same cycle. The design fixes this by giving each
instruction **four fast clock cycles**. The memory sees every fast edge.
Architectural state changes only on the fourth edge.

```
            +-----------+  imem_addr/imem_out  +--------------------------+  vga_addr/vga_data
  run,step->| lc4_clkgen|--fetch_en----------->|        lc4_memory        |<------------------> display
            |           |--load_en------------>| 64K x 16 array           |                     controller
            |           |--gwe--------+------->| device registers:        |
            +-----------+             |        |  KBSR KBDR TSR  (in)     |<--- keyboard, timer
                                      v        |  TIR LED SEVSEG (out)    |---> timer, board
                               +---------------+  SWITCH         (in)     |<--- switches
                               | lc4_processor |--dmem_addr/in/we-------->|
                               |               |<-dmem_out----------------|
                               +---------------+  +--------------------------+
                                       test_*, seven_segment_data, led_data
```

`lc4_system` is the top. The keyboard, timer and display controller are not
part of this RTL. Their register signals are ports of the top.

## Big clock, little clock and gwe

There is one physical clock, `clk`: the fast "little" clock. `lc4_clkgen`
counts a phase 0..3 and raises three enables:

| clk edge, counted from the last gwe edge | enable     | what happens                                             |
|------------------------------------------|------------|----------------------------------------------------------|
| +1 (end of phase 0)                      | `fetch_en` | instruction port samples the PC and returns the instruction |
| +2 (end of phase 1)                      | –          | decode, register read and ALU settle; data address is valid |
| +3 (end of phase 2)                      | `load_en`  | data port samples the data address and returns load data   |
| +4 (end of phase 3)                      | `gwe`      | PC, registers and NZP update; a store commits             |

`gwe` is the "global write enable". Every state element is an `nbit_reg`.
Such a register loads only when its own `we` **and** `gwe` are high, so the
fourth edge acts as the slow "big clock". The clock itself is never gated:
all logic uses plain `clk`, and only the enables change.

Consequences:

- **CPI = 4 clocks.** With `run` high, gwe comes every 4 clocks. The
  processor's critical path (fetch → ALU → data address → load → write-back)
  gets up to 2 clock periods between memory samples.
- **Stores are synchronous to gwe.** The memory writes on `d_we && gwe`, so
  a store lands on the same edge as the register writes.
- **Single-step.** With `run` low the phase counter stops and nothing
  happens. A one-clock pulse on `step` runs one full 4-phase cycle (fetch,
  load, commit), then stops again. While halted, `imem_out` still holds the
  previous instruction. The PC and `test_pc` are already correct.
- **Reset** (`rst`, synchronous, active high) sets the PC to 0x8200, clears
  R0–R7, NZP and the device registers, and restarts at phase 0.

## The datapath

`lc4_processor` is one combinational path between state registers:

```
PC --> imem --> insn --+--> decoder --> mux controls, write enables
 |                     +--> r1sel mux (insn[8:6] | insn[11:9] | 7)  --+
 +--> +1 --------+     +--> r2sel mux (insn[2:0] | insn[11:9])      --+--> regfile
 |               |                                                    |
 +---------------|-------------> ALU <-- r1data, r2data, insn <-------+
                 |                |
                 +--> result mux (ALU | PC+1) --> dmem_addr ; dmem_in = r2data
                                  |
               write-back mux (result | dmem_out) --> regfile wdata (wsel: insn[11:9] | 7)
                                  |
                                n/z/p --> NZP register --> branch logic --> next PC (PC+1 | ALU)
```

There is a single ALU (`lc4_alu`). It computes data results and also
addresses and branch targets: PC+1+offset, JSR targets and TRAP vectors. The
branch logic only picks between PC+1 and the ALU output. The result mux
selects PC+1 for JSR, JSRR and TRAP, because they write the return address
into R7. The condition codes are taken from the write-back value, so loads
set NZP from the loaded data.

| opcode | instructions | ALU output | writes |
|--------|--------------|------------|--------|
| 0000 | BR(n,z,p), NOP | PC+1+sext(imm9) | — (taken if insn[11:9] & NZP ≠ 0) |
| 0001 | ADD, MUL, SUB, DIV, ADDI | result | Rd, NZP |
| 0010 | CMP, CMPU, CMPI, CMPIU (Rs in insn[11:9]) | −1 / 0 / +1 | NZP only |
| 0100 | JSR imm11, JSRR Rs | (PC & 0x8000) \| imm11<<4, or Rs | R7 = PC+1, NZP |
| 0101 | AND, NOT, OR, XOR, ANDI | result | Rd, NZP |
| 0110 | LDR Rd, Rs, imm6 | Rs+sext(imm6) = address | Rd = mem, NZP |
| 0111 | STR Rt, Rs, imm6 (Rt in insn[11:9]) | address | memory |
| 1000 | RTI | R7 (r1sel = 7) | — |
| 1001 | CONST Rd, imm9 | sext(imm9) | Rd, NZP |
| 1010 | SLL, SRA, SRL (uimm4), MOD | result | Rd, NZP |
| 1100 | JMPR Rs, JMP imm11 | Rs, or PC+1+sext(imm11) | — |
| 1101 | HICONST Rd, uimm8 (Rd read on port 1) | (Rd & 0xFF) \| uimm8<<8 | Rd, NZP |
| 1111 | TRAP uimm8 | 0x8000 \| uimm8 | R7 = PC+1, NZP |

Opcodes 0011, 1011 and 1110 are undefined. They execute as no-ops.

`lc4_decoder` produces an `lc4_pkg::ctrl_t` struct with these fields:
register-select choices, `wsel_r7`, `regfile_we`, `nzp_we`, `sel_pc_inc`,
`is_load` and `is_store`. The register file (`lc4_regfile`) has two
combinational read ports and one write port, built from eight `nbit_reg`s.

## Memory map and devices

`lc4_memory` holds 2^16 words × 16 bits. It has three ports, and each
samples on a `clk` edge:

- **instruction**: `i_addr` → `i_dout`, sampled when `fetch_en` is high
- **data**: sampled on `load_en`. It writes on `d_we && gwe`.
- **video**: `vga_addr` is a pixel index, row × 128 + column. The pixel
  comes back on `vga_data` one clock later.

| address          | meaning                                                       |
|------------------|---------------------------------------------------------------|
| 0x0000–0xFFFF    | RAM, except the device words below                            |
| 0x8200           | reset PC                                                      |
| 0x8000–0x80FF    | TRAP vectors (TRAP jumps to 0x8000 + uimm8)                   |
| 0xC000–0xFBFF    | frame buffer, 128 × 120 words (the display reads it)          |
| 0xFE00 / 0xFE02  | KBSR / KBDR, keyboard status and data (read)                  |
| 0xFE08 / 0xFE0A  | TSR timer status (read) / TIR timer interval (read, write; a write pulses `tir_we`) |
| 0xFE0C           | switches (read, low 8 bits)                                   |
| 0xFE0E / 0xFE10  | LED register (8 bits) / seven-segment register (16 bits), read and write |

Device words never reach the array. The keyboard and timer handle read side
effects themselves, such as a status bit that clears on read. This RTL does
not model those devices.

The array is cleared at start-up. If the `MEM_INIT_FILE` parameter of
`lc4_system` names a `$readmemh` image, the array is then loaded from it. A
`@8200` address line puts code at the reset PC. See `tb/lc4_test1.hex`.

## Debug and trace outputs

The processor has the usual lab trace outputs: `test_pc`, `test_insn`,
`test_regfile_we/reg/in`, `test_nzp_we/in`, `test_dmem_we/addr/value`, and
`test_stall`, which is always 0 in this design. They describe the
instruction that commits at the next gwe edge. `test_dmem_value` is the
value loaded or stored. `dmem_addr` and `test_dmem_value` are 0 for
instructions that do not access memory.

The board outputs are set by `switch_data[6:0]`. `seven_segment_data` shows
the PC at 0, the instruction at 1, `dmem_addr` at 2, `dmem_out` at 3 and
`dmem_in` at 4. Any other setting shows 0xDEAD. `led_data` mirrors the
switches. The memory-mapped LED and seven-segment registers are separate
outputs: `mmio_leds` and `mmio_sevseg`.

## The MIPS-style control decoder

`mips_ctrl` is a separate example. It is the control of a four-instruction,
32-bit MIPS-like machine: add, addi, lw and sw. Each control is an OR of
instruction matches:

- ALUinB = addi | lw | sw
- Rwe = add | addi | lw
- Rwd = lw
- Rdst = ¬add
- DMwe = sw

It has nothing to do with LC4. It sits beside the LC4 system in
`lc4_system`, with its own `mips_*` ports.

## How far to trust it, and where it departs from the lab design

Taken from the lab design:

- the datapath structure and its mux inputs
- the processor port list and trace outputs
- PC reset to 0x8200
- the debug display selection
- the register module with `we`, `gwe` and a reset value
- the 4:1 little/big clock scheme and the fetch, load and store edges
- the 64K × 16 memory, the 128 × 120 display, and the list of devices

This design's own choices:

- **ISA details.** The encodings and semantics in the table come from the
  LC4 instruction set definition. They are not from the lab hints.
  - DIV and MOD are unsigned.
  - Division or modulo by zero gives 0.
  - Undefined opcodes are no-ops.
  - There is no privilege bit (PSR). TRAP and RTI only redirect control.
- **Addresses.** The device register addresses and the frame-buffer base are
  chosen in the LC-3/LC4 style. They are collected in `lc4_pkg`.
- **Clocking.** One clock plus enables replaces two physical clocks.
- **Controls.** The `run`/`step` single-step control is original to this
  design, and so are the separate video read port and the `tir_we` pulse.
- **Delay.** The register's modelled output delay is dropped.
- **Not included.** The keyboard, timer and display controllers are not
  included, and neither is the original 64K-word program image.

Verification, all self-checking:

- `lc4_processor_tb` runs 30,000 random instructions against an
  instruction-level reference model (`tb/lc4_ref_pkg.sv`). All of memory
  holds random code. gwe is held low at random to check that state holds.
- `lc4_system_tb` runs the full system at default size: 50,000
  free-running and 40 single-stepped instructions against the model. It
  checks 4 clocks per instruction, halting, device reads and writes, and the
  video port.
- `lc4_program_tb` runs the sample program from its hex image.
- Each leaf module has its own testbench.

The design has not been run on an FPGA or through timing analysis.

## Files

`rtl/`:

- `lc4_pkg.sv`: opcodes, memory map and `ctrl_t`
- `lc4_system.sv`: the top
- `lc4_clkgen.sv`
- `lc4_memory.sv`
- `lc4_processor.sv`, which uses `lc4_decoder`, `lc4_regfile`, `lc4_alu`,
  `lc4_nzp`, `lc4_branch_logic` and `nbit_reg`
- `mips_ctrl.sv`

`tb/`:

- one `<module>_tb.sv` per module
- `lc4_ref_pkg.sv`: the reference model and random-instruction generator
- `lc4_program_tb.sv` with `lc4_test1.hex`

## Simulating

From the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lc4_pkg.sv tb/lc4_ref_pkg.sv \
    tb/lc4_system_tb.sv --top-module lc4_system_tb -o sim
./obj_dir/sim
```

Substitute any other `tb/*_tb.sv` and its module name. Files are found via
`-Irtl -Itb` because each module lives in a file of its own name. Each
testbench ends with a line `TB_RESULT checks=N failures=M`.
`lc4_program_tb` reads `tb/lc4_test1.hex` by a path relative to the
repository root. The simulations take well under a second each.

To run your own program, assemble it to a `$readmemh` image. Pass the image
as `lc4_system #(.MEM_INIT_FILE("path/to/image.hex"))`, drive `run` high
after reset, and watch the `test_*` outputs on gwe edges. You can also
watch `mmio_leds`, `mmio_sevseg` and the frame buffer through the video
port.
