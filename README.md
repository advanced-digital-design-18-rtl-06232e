# Centipede arcade board in SystemVerilog

Atari's *Centipede* (1981) ran on a small board. A MOS 6502 executes 8 KB of game code and writes
the screen into a 1 KB playfield RAM. A tile-and-sprite renderer turns that RAM into video while
the beam scans; nothing is ever drawn into a frame buffer. An Atari POKEY makes the sound. Two
counter chips turn the pulses of the trackball into small signed deltas for the program to read.

This RTL rebuilds that board for an FPGA. Everything around the CPU is here: the address decoder
and memories, the playfield and motion-object renderer with VGA output, the POKEY, the trackball
counters and button ports, and the interrupt timer. The 6502 itself is not included. Its bus comes
out as ports of the top module, `centipede_top`, so any 6502 core with separate read and write
data buses can be attached.

```
            cpu_addr/cpu_dout/cpu_we            cpu_din       cpu_irq_n
 6502 core ───────────────┬────────────────────────▲─────────────▲
 (external)               │                        │ read mux    │
                   address_decoder ──sel──► RAM, ROM, playfield, palette,
                                            inputs, switches, POKEY, IRQ reset
 graphics_pipeline: vga_timing → compute_tile → playfield_ram ─┐
                                          └→ motion_object ─────┴→ pixel_lookup → color_lookup → VGA
 pokey → audio[5:0]      trackball_input → player_inputs      irq_timer ← vga_row
```

## Clocking and the CPU bus

The whole design runs on one 50 MHz clock, `clk`. Slower parts advance on clock enables, not on
clocks of their own:

* `clock_enable` pulses `cpu_ce` once every `CPU_DIV` = 33 clocks. That gives 1.515 MHz, close to
  the original 1.512 MHz CPU clock. The POKEY also uses this enable as its chip clock.
* `vga_timing` makes a 25 MHz pixel enable by halving `clk`.

A bus cycle runs from one `cpu_ce` to the next. The attached CPU must hold `cpu_addr`, `cpu_dout`
and `cpu_we` for the whole cycle.

* **Writes** take effect on the clock that carries the `cpu_ce` ending the cycle.
* **Reads**: `cpu_din` shows the addressed byte one clock after the address appears. It stays
  there while the address holds, so it is long settled when the cycle ends.
* **Trackball reads** at 0x0C00 and 0x0C02 clear the counter that was read, at the end of the read
  cycle.

All memories are synchronous block-RAM style. The original board's parts were asynchronous. A
6502 core written for asynchronous memory may therefore need its data-in latched at the end of the
cycle, as `cpu_ce` allows, and not in the middle of it.

The original board put every device on one tri-state data bus. Here each device drives its own
output, and a multiplexer picks one output using the registered chip selects. An assertion in the
top checks that exactly one select is active.

## Memory map

`address_decoder` decodes `cpu_addr[13:10]`. A15 and A14 are not decoded, so the map repeats every
16 KB, and the 6502's reset and interrupt vectors at 0xFFFA-0xFFFF read the top of the ROM.

| Address        | Device                                      | Read                  | Write            |
|----------------|---------------------------------------------|-----------------------|------------------|
| 0x0000-0x03FF  | work RAM, 1 KB (`work_ram`)                 | byte                  | byte             |
| 0x0400-0x07FF  | playfield RAM (`playfield_ram`)             | byte                  | byte             |
| 0x0800-0x0BFF  | option switches (A0 picks bank 1 or 2)      | `dsw1` / `dsw2`       | —                |
| 0x0C00-0x0FFF  | player inputs, A1:A0 (`player_inputs`)      | IN0, IN1, IN2, 0xFF   | —                |
| 0x1000-0x13FF  | POKEY, A3:A0 (`pokey`)                      | POT0-7, ALLPOT, RANDOM| AUDF/AUDC, ...   |
| 0x1400-0x17FF  | colour palette, A3:A0 (`color_lookup`)      | 0xFF                  | RGB 3-3-2 entry  |
| 0x1800-0x1BFF  | IRQ reset (`irq_timer`)                     | 0xFF                  | clears IRQ       |
| 0x1C00-0x1FFF  | not used                                    | 0xFF                  | ignored          |
| 0x2000-0x3FFF  | program ROM, 8 KB (`program_rom`)           | byte                  | ignored          |

The ROM is loaded from `ROM_FILE` (`$readmemh`, 8192 bytes). Left empty, it is filled with 0xEA,
the 6502 NOP.

## Graphics pipeline

This part takes the most care to understand. The renderer never keeps a picture. For every VGA
pixel it works out again which tile and which motion object lie under that pixel, fetches that
sprite's pixel, and looks up its colour. It does this in raster order, one pixel per 25 MHz pixel
enable.

**Screen geometry.** The game picture is 256x240 pixels, a grid of 32x30 tiles of 8x8 pixels each.
`vga_timing` produces standard 640x480 at 60 Hz: 800x525 total, negative syncs. `compute_tile`
shows each game pixel as a 2x2 block of VGA pixels, with the picture centred horizontally. It
occupies VGA columns 64-575 and all 480 rows; the bars at the sides are black. The game pixel is
(gx, gy) = ((col-64)/2, row/2).

**Playfield RAM layout** (CPU offsets within 0x0400-0x07FF):

| Offset        | Contents                                                        |
|---------------|-----------------------------------------------------------------|
| 0x000-0x3BF   | 960 background tiles, row-major: byte = sprite ID of tile (row*32+col) |
| 0x3C0-0x3CF   | motion object 0-15 picture number (bits 6:0)                    |
| 0x3D0-0x3DF   | motion object X (left edge, game pixels)                        |
| 0x3E0-0x3EF   | motion object Y (top edge, game pixels)                         |
| 0x3F0-0x3FF   | motion object colour (bit 0 picks the palette half)             |

The tile bytes are in a block RAM with a CPU port and a video port. The 64 motion-object bytes are
in flip-flops, so that all 16 objects can be compared with the current pixel at once.

**Motion objects.** Each object is 8 pixels wide and 16 tall, drawn as two stacked 8x8 sprites.
Sprite ID {picture[6:0], 0} is the top half and {picture[6:0], 1} the bottom half. `motion_object`
computes gx-X and gy-Y for all 16 objects in 8-bit wrap-around arithmetic. An object is hit when
the first is 0-7 and the second 0-15. The lowest-numbered hit object wins. For the winner the
block outputs the sprite ID and the pixel inside the 8x8 half.

**Sprite ROM.** `pixel_lookup` selects the motion object's sprite ID and pixel when there is a
hit, and the tile's otherwise. It reads a 2048 x 16-bit sprite ROM: 256 sprites x 8 rows, 2 bits
per pixel, with pixel c at bits 2c+1:2c. The ROM is loaded from `SPRITE_FILE`. Without a file it
holds the test pattern pixel(id, row, col) = (id + row + col) mod 4. The real artwork is not
included. To display the game, produce a `SPRITE_FILE` in this format from the original graphics.

**Colour codes and palette.** Tiles use palette entries {0,0,pix}, that is 0-3. Motion objects use
{1,colour[0],pix}, that is 8-11 or 12-15. The 16-entry palette (`color_lookup`) stores one RGB
3-3-2 byte per entry and widens it to 4-bit VGA channels: R = {r,r[2]}, G = {g,g[2]},
B = {b,b}. Outside the active picture the output is black.

**Pipeline timing.** There are three stages, each advancing on a pixel enable:

1. The tile byte and the motion-object result are registered.
2. The sprite ROM word is read.
3. The palette output is registered.

`vga_hsync` and `vga_vsync` are delayed by the same three enables, so they line up with the
colour.

## POKEY

`pokey` models the parts of the POKEY the game uses: four sound channels and the potentiometer
scanner. The serial port and the keyboard scanner are left out. It sits at 0x1000, register
number = A3:A0.

**Sound.**

* Each channel divides a base clock by its AUDF value. On every divider pulse it updates a 1-bit
  output.
* AUDC bits 7:5 choose how that bit is updated:
  * bit 5 = 1: the bit toggles, giving a pure tone;
  * bit 5 = 0: the bit is loaded from the 4-bit polynomial counter (bit 6 = 1) or from the
    17-bit one (bit 6 = 0);
  * bit 7 = 0: the update also needs the 5-bit polynomial's output to be 1.
* AUDC bits 3:0 are the volume. Bit 4 selects volume-only mode, where the volume is output
  directly.
* `audio` is the sum of the four channel levels, 0-60 on 6 bits. The DAC is outside this design.
* AUDCTL selects:
  * the 15 kHz base clock (chip clock / 114) instead of 64 kHz (chip clock / 28);
  * the full chip clock for channels 1 and 3;
  * joined 16-bit channel pairs;
  * high-pass flip-flops on channels 1 and 2;
  * a 9-bit instead of a 17-bit polynomial.
* STIMER reloads the dividers. RANDOM returns 8 bits of the long polynomial.

**Pots.** Writing POTGO releases the dump output `pot_dump` and starts a counter that steps once
per 15 kHz line. When pot line i reads high, the count is latched into POTi. At 228 the scan ends;
lines that never rose read 228, and the dump is applied again. ALLPOT shows which pots are still
counting. `pot_in` is the comparator output of each line; the RC networks are off-chip.

## Trackball and player inputs

A trackball gives two lines per axis: a clock and a direction, 90° apart. `trackball_counter`
decodes every edge of the pair:

* The sequence (clk,dir) 00→10→11→01, with the direction line 90° behind the clock line, counts
  up; the reverse counts down. A jump over two states is treated as a glitch and ignored.
* Every `EDGES_PER_COUNT` = 4 edges change the 4-bit count by one. A modern trackball resolves
  four times finer than the original, so this restores the original speed.
* The count is a delta: reading it clears it.
* `dir` holds the direction of the last step (1 = counting down), like the original direction
  flip-flop.

`trackball_input` holds two counters. `flip` chooses between player 1's and player 2's trackball
(the cocktail cabinet's second player). Counter A takes the horizontal lines and counter B the
vertical ones. `player_inputs` packs these with the buttons into the bytes the CPU reads:

| Address | Bit 7 | Bit 6  | Bit 5     | Bit 4    | Bits 3:0 |
|---------|-------|--------|-----------|----------|----------|
| 0x0C00  | DIR1  | VBLANK | SELF TEST | COCKTAIL | TRA      |
| 0x0C01  | COIN R, COIN C, COIN L, SLAM, FIRE2, FIRE1, START2, START1 (bits 7..0) ||||
| 0x0C02  | DIR2  | 0      | 0         | 0        | TRB      |

The buttons are active low and pass through unchanged.

## Interrupt

`irq_timer` copies the board's IRQ flip-flop. On each rising edge of the 16V bit of the line count
it loads the 32V bit. A write to 0x1800 clears it. With V = VGA row / 2:

* the IRQ goes active at V = 48, 112, 176 and 240, four times per frame;
* if the program does not clear it, it drops by itself at the next 16V edge.

## Departures and what is not built

* **Not built:**
  * the 6502 core. Attach one to the `cpu_*` ports.
  * the analog parts: the audio DAC and amplifier, the pot RC networks, the level shifting of the
    12 V trackball lines, and the VGA resistor DAC.
  * the original's watchdog, its EAROM for high scores, and its coin-counter and LED output
    latches.
* **Bus:** a read multiplexer replaces the tri-state data bus. Synchronous memories replace the
  asynchronous originals.
* **Clocks:** clock enables on one clock replace separate clocks.
* **Graphics:**
  * The layout of the playfield RAM and the motion-object tables follows the original board.
  * Motion objects are 8x16, the lowest index wins, and the picture number's bit 7 is ignored.
    The original hardware can also flip sprites and uses more colours; neither is modelled.
  * The sprite ROM is uncompressed, one word per sprite row. Its default content is a test
    pattern, not the game's artwork.
  * The palette has 16 entries of RGB 3-3-2.
* **POKEY:** register numbers, the AUDCTL bits, the polynomial taps and the 28/114 base divisors
  follow the POKEY data sheet. SKCTL is ignored.
* **Inputs:** the placement of the START/FIRE bits, the IN2 byte and the option-switch bytes are
  this design's own choice.

## Files and simulation

Each file in `rtl/` holds one module: `centipede_pkg.sv` has the shared constants and types. Each
file in `tb/` is a self-checking testbench. It prints `TB_RESULT checks=N failures=M` and stops.
Run them from the project root, because `tb_program_rom` loads `tb/rom_test.hex`.

```
verilator --binary --timing -y rtl rtl/centipede_pkg.sv tb/tb_centipede_top.sv \
          --top-module tb_centipede_top -o sim && ./obj_dir/sim
```

The same pattern, with another `tb/tb_<block>.sv` and its module name, runs any block
testbench. `-y rtl` lets Verilator find the modules it instantiates.

`tb_centipede_top` runs the top with every parameter at its default. It acts as the CPU through a
bus task and exercises each mechanism at least once:

* ROM reads (including the reset vector through the mirror), RAM reads and writes, and the
  mirrored map;
* palette writes and playfield read-back;
* a motion object and a tile drawn on the VGA output, and the frame syncs;
* buttons, option switches and VBLANK;
* trackball counting, clear-on-read, and player select;
* POKEY tone, RANDOM and pot scan;
* IRQ raised and acknowledged, and reads of the unused range.

It prints a count for each mechanism, and a mechanism that never happened counts as a failure.
Motion-object priority, IRQ self-drop, volume-only sound and the other POKEY modes are checked
in the block testbenches (`tb_motion_object`, `tb_irq_timer`, `tb_pokey`). Those compare each
block with a small reference model over exhaustive or random stimulus.
