# Hack computer on an FPGA

The Hack computer is a teaching machine. It has a 16-bit CPU with two
registers and a small ALU, a 32K-word program memory, and a 32K-word data
space. Part of the data space is a 512 × 256 monochrome screen and part is a
keyboard. Software sees no I/O instructions: it draws by writing screen words
and reads the keyboard by loading one memory word.

This RTL builds the whole machine for a board with these parts:

- a 50 MHz clock;
- an external 16-bit asynchronous SRAM that holds the program;
- a VGA DAC;
- a PS/2 keyboard socket.

The CPU, the data memory, the VGA controller and the keyboard controller are
written in synthesizable SystemVerilog. The clock PLL is a behavioural model.

```
             +------------------------------- FPGA ----------------------------+
 SRAM  <---- | pc --> sram_addr           hack_cpu         data_memory          |
 (program)-->| sram_dq --> instruction   (A, D, PC, ALU)   +- ram16k   0..16383  |
             |                            addressM/outM --> +- screen_ram 16384.. | --> vga_sync + vga_pixel --> VGA DAC
             |                            inM <------------ +- kbd_reg   24576    | <-- ps2_keymap <-- ps2_rx <-- PS/2
             |  vga_pll: 50 MHz -> 25 MHz pixel clock                             |
             +-------------------------------------------------------------------+
```

## The instruction set

Every instruction is one 16-bit word. Each takes one clock.

- **A-instruction** `0vvv vvvv vvvv vvvv` (`@v`): loads the 15-bit
  literal into A.
- **C-instruction** `111a cccc ccdd djjj`:
  - the ALU computes a function of D and a second operand. That operand is A
    when `a` = 0, or M (the data word at address A) when `a` = 1;
  - the result goes to any mix of A, D and M (`ddd` = A, D, M);
  - the PC jumps to A if the result is `<0`, `=0` and/or `>0` (`jjj`). All
    three bits set is an unconditional jump.

The ALU (`hack_alu`) has six control bits, `zx nx zy ny f no`, applied in
this order:

1. zero x;
2. invert x;
3. zero y;
4. invert y;
5. add the operands (`f` = 1) or AND them (`f` = 0);
6. invert the result.

Those 64 combinations give the 18 Hack operations:

    0  1  -1  D  A  !D  !A  -D  -A  D+1  A+1  D-1  A-1  D+A  D-A  A-D  D&A  D|A

For example, `-D` is `!(D + (-1))` and `D|A` is `!(!D & !A)`. The ALU also
gives zero and negative flags, and the control unit (`hack_control`) uses
them to decide jumps.

## The CPU datapath and its one-cycle memory access

`hack_cpu` has the following parts:

- D, which is always the ALU's first operand;
- A, which is loaded from the instruction or from the ALU;
- a multiplexer that picks A or inM as the second operand;
- a 15-bit PC. The PC resets to 0, loads A when a jump is taken, and
  otherwise adds one.

`hack_control` decodes the instruction into a `cpu_ctrl_t` struct. The
struct is defined in `hack_pkg`.

The difficult part is memory timing. A single-cycle CPU must read M, compute
on it and write the result back in the same clock (`M=M+1`, or even
`AM=M+1`, which also changes A). FPGA block RAM reads synchronously. This
design uses the fact that the data address is the A register. A is a
register output, so it is stable for the whole cycle. Each data memory
therefore does two things in one cycle:

- **read** `mem[addressM]` on the **falling** clock edge. inM is valid for the
  second half of the cycle, in time for the ALU;
- **write** `outM` to `mem[addressM]` on the **rising** edge that ends the
  cycle.

One address per cycle is enough, so the 16K RAM is a single-port memory.
The screen memory needs only one port for the CPU, and its second port is
left free for the display. The cost is a half-cycle path: the falling-edge
read, then the ALU, then the rising-edge write. At 50 MHz that is 10 ns.

The program memory is asynchronous, so the instruction at `pc` arrives in
the same cycle. The SRAM model in the testbench has a 10 ns access time.

## Data memory map

| Address      | Device                         | Module       |
|--------------|--------------------------------|--------------|
| 0–16383      | RAM, 16K × 16                  | `ram16k`     |
| 16384–24575  | screen, 8K × 16, dual port     | `screen_ram` |
| 24576        | keyboard word (read only)      | `kbd_reg`    |

`dmem_decoder` is two 1-to-2 demultiplexers:

- the first looks at address bit 14 and selects the RAM when the bit is 0;
- the second looks at bit 13 and selects the screen (0) or the keyboard (1).

So every address from 24576 up reads the keyboard, and CPU writes there are
dropped. `data_memory` wires the three memories to the decoder and picks the
read word.

## Display path

The screen memory stores the image as 32 words per row, 16 pixels per word.
Pixel (row, col) is bit `col % 16` of word `16384 + row*32 + col/16`, with
bit 0 leftmost.

- `vga_sync` generates 640 × 480 timing on a 25 MHz pixel clock: 800 × 525
  clocks per frame, so 59.5 frames per second. It gives active-low syncs, a
  video-on flag and the beam position.
- `vga_pixel` puts the 512 × 256 Hack screen at the top-left of the frame.
  For each position it reads the screen word through the screen memory's
  second port and picks the pixel's bit. A set bit is drawn blue and a clear
  bit white. Everything outside the 512 × 256 zone is black, and so is the
  blanking interval.
- The lookup is a two-stage pipeline. Sync and blank signals are delayed by
  the same two clocks, so the DAC sees aligned signals.

The pixel clock comes from `vga_pll`. On the board this is the vendor's PLL,
which turns 50 MHz into 25 MHz. The model here divides the input clock by
two and asserts `locked` after 16 input clocks. The VGA logic is held in
reset through a two-flop synchroniser until the PLL locks.

## Keyboard path

- `ps2_rx` receives PS/2 frames. Each frame is a start bit, 8 data bits LSB
  first, odd parity and a stop bit, sampled on the falling edge of the
  keyboard clock. Both lines are synchronised first. Bad frames raise `err`
  and are dropped. A 1 ms time-out discards a frame that stops part-way.
- `ps2_keymap` tracks the `E0` (extended) and `F0` (break) prefixes of scan
  code set 2 and translates keys into Hack codes:
  - letters give upper-case ASCII (there is no Shift handling);
  - digits, space and common punctuation give their ASCII codes;
  - Enter = 128, Backspace = 129, ← ↑ → ↓ = 130–133;
  - Home, End, PgUp, PgDn, Insert, Delete = 134–139;
  - Esc = 140, F1–F12 = 141–152.
- A make code sets the keyboard word. The break code of the key being held
  sets it back to 0. The keyboard word is `kbd_reg`: the keyboard side writes
  it and the CPU reads it.

## Program memory

The top drives the SRAM as a ROM: address `{3'b000, pc}`, chip and output
enabled, both byte lanes on, write disabled. The program has to be in the
SRAM before `reset` is released, put there by whatever loader the board
provides. Only 64 KB of a 512 KB part are used.

## Top level

`hack_computer` has these ports:

- `clk_50` and `reset` (synchronous, active high);
- the SRAM pins;
- `ps2_clk` and `ps2_dat`;
- the VGA DAC signals: `vga_clk`, `vga_hs`, `vga_vs`, `vga_blank_n`, and
  `vga_r`, `vga_g`, `vga_b` at 10 bits each;
- `pc`, for debugging.

The design contains the following memory:

- 393,216 bits in three arrays. That is 96 Cyclone II M4K blocks, if an M4K
  is counted as 4 Kbit.
- about 200 flip-flops.

## Files

| File | Contents |
|------|----------|
| `rtl/hack_pkg.sv` | instruction fields, control struct, memory map, key codes |
| `rtl/hack_alu.sv`, `hack_pc.sv`, `hack_control.sv`, `hack_cpu.sv` | CPU |
| `rtl/ram16k.sv`, `screen_ram.sv`, `kbd_reg.sv`, `dmem_decoder.sv`, `data_memory.sv` | data memory |
| `rtl/vga_sync.sv`, `vga_pixel.sv`, `vga_pll.sv` | display path (`vga_pll` is a behavioural model) |
| `rtl/ps2_rx.sv`, `ps2_keymap.sv` | keyboard path |
| `rtl/hack_computer.sv` | top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/hack_asm_pkg.sv` | a small Hack assembler (`asm_a`, `asm_c`) for building programs in testbenches |
| `tb/sram_model.sv` | asynchronous SRAM model |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
stops it if it hangs. To build and run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Wno-lint -Wno-style \
  --top-module tb_hack_computer -Irtl -Itb \
  rtl/hack_pkg.sv tb/hack_asm_pkg.sv rtl/*.sv tb/sram_model.sv tb/tb_hack_computer.sv
./obj_dir/Vtb_hack_computer
```

To run another testbench, change the top module name and the last file.
Every testbench simulates in seconds.

`tb_hack_computer` runs the whole computer at its default size. The program
it runs is a screen test. It keeps a pointer in RAM[16] and sweeps it over
screen words 20480–24575, the lower half of the screen. Each word gets −1
(16 blue pixels) when no key is held and 0 when one is. After the last word
it starts over.

The testbench checks the following:

- the length of one pass over the 4096 words, in clocks:
  - 4 + 4096 × 20 + 6 = 81,930 with no key held;
  - 4 + 4096 × 18 + 6 = 73,738 with a key held;
- whole VGA frames, decoded from the sync outputs alone:
  - the lower half blue and the upper half white before any key;
  - all white while 'A' is held (typed through a PS/2 keyboard model);
  - blue again after the key is released;
- a frame period of 420,000 pixel clocks.

It counts taken jumps, passes of each kind, key presses and releases, blue,
white and black pixels, and frames, and it fails if any of them never
happened.

The smaller testbenches cover the following:

- `tb_hack_alu`: all 18 operations on edge-case and random operands;
- `tb_hack_control`: every jump condition against zero, negative and
  positive results;
- `tb_hack_cpu`: a looping program with exact clock counts, then 20,000
  clocks of random programs compared every clock with an instruction-level
  reference model;
- the memories: against reference arrays;
- the decoder: every address;
- `vga_sync`: two full frames;
- `vga_pixel`: a whole frame of a random image;
- `ps2_rx`: parity errors and truncated frames;
- `ps2_keymap`: make and break sequences.

Assertions in the RTL check three more rules:

- the decoder selects exactly one device;
- the PC either advances by one or takes a jump to A;
- the PS/2 receiver never flags a frame as both good and bad.

## Departures and design choices

These points are choices made here, not part of the Hack definition:

- **Memory timing.** Reads happen on the falling edge and writes on the
  rising edge (see above).
- **Clocks.** The CPU runs on the 50 MHz clock.
- **Reset.** Reset clears A, D, the PC and the keyboard word. Memory
  contents start at zero.
- **VGA timing.** The porch and sync widths are the usual 640 × 480 values:
  16/96/48 pixels and 10/2/33 lines. The 512 × 256 zone is placed at the
  top-left corner.
- **Keyboard.** The PS/2 time-out, the choice of mapped keys and the
  upper-case-only letters are this design's own.
- **Keyboard protocol.** The keyboard interface uses the PS/2 protocol,
  which is what a PS/2 keyboard speaks. It does not use I²C.
- **VGA DAC sync input.** The DAC's composite-sync input is not driven.
- **PLL.** `vga_pll` is a model. For synthesis, replace it with the FPGA
  vendor's PLL configured for 50 MHz in and 25 MHz out; the ports are
  already named `inclk0`, `areset`, `c0`, `locked`.
- **Lint warnings.** Verilator reports a few unused-signal warnings that are
  intended:
  - the ps2 error flag is unused at the top;
  - instruction bits 14:13 are unused;
  - the frame's start-bit slot is unused.
