# 1942 arcade platform in SystemVerilog

Capcom's 1942 (1984) ran on a board with a Z80 main CPU and custom video
hardware that had no frame buffer. Each scanline was put together while the
beam drew it, from a character tilemap, a scrolling background tilemap and a
handful of 16x16 sprites, and looked up in colour tables. This RTL rebuilds
that board for a Virtex-5 class FPGA. All ROM and RAM is block memory. The
video pipelines run at the VGA pixel clock and drive a 640x480 / 60 Hz monitor
directly, with the 224x256 game picture in the middle of the screen. Sound does
not come from the original sound CPU and AY-8910 chips. The game's sound codes
start recorded samples instead, and the background music plays on a second
board.

The Z80 core and the AC97 codec interfaces are not part of this RTL. Their
signals are ports of the top module, `arcade1942_top`.

## Block map

```
 Z80 bus ──► memory_map ──► program ROMs (32K, 3 banks 16K/8K/16K), work RAM 4K
               │   │  └───► fg RAM 2K / bg RAM 1K / sprite RAM 128  (dual-port, CPU side)
               │   └──────► scroll, palette bank, ROM bank, sound code registers
               ▼
 joystick_if (inputs)      sound_controller ─► 6 effect ROMs ─► fg_sample
                                 └─ bg_link ─► bg_music_player ─► music ROM ─► bg_sample
 vga_controller ─ hcount/vcount ─► fg_pipeline ─┐
                                   bg_pipeline ─┼─► pixel_pipeline ─► palette ROM ─► VGA pins
                                   sprite_pipeline ┘
 vblank_irq: vsync ─► Z80 INT, RST 10h on acknowledge
```

Two clocks are used. `clk_cpu` (6.25 MHz) runs the CPU side and sound.
`clk_vid` (25.175 MHz) runs the video. Each video RAM is a true dual-port block
RAM with one port in each domain, so the CPU and the video pipelines never
have to arbitrate for it.

## Memory map (CPU view)

| Address | Contents |
|---|---|
| 0000-7FFF | main program ROM |
| 8000-BFFF | banked ROM. Bank register 0 selects ROM 10000-13FFF, 1 selects 14000-15FFF (8 KiB, mirrored), 2 selects 18000-1BFFF, 3 reads FF |
| C000-C004 | inputs: system, player 1, player 2, DIP A, DIP B (active low) |
| C800 (w) | sound code |
| C802/C803 (w) | background scroll, low 8 bits and bit 8 |
| C805 (w) | background palette bank (2 bits) |
| C806 (w) | ROM bank (2 bits) |
| CC00-CC7F | sprite RAM |
| D000-D7FF | character (foreground) tilemap |
| D800-DBFF | background tilemap |
| E000-EFFF | work RAM |

Read data is valid one `clk_cpu` cycle after the address. A write happens once,
on the rising edge of `cpu_wr`. The I/O register addresses other than C800
follow the original board.

## How a scanline is drawn

The raster is 800x525 clocks. A VGA line and a game line are the same thing:
game row `y` is VGA row `112 + y`, and game column `x` is VGA column `208 + x`.
Work is spread over three time scales.

**One line ahead: background and sprites.** At `hcount == 0` of each VGA line,
`bg_pipeline` and `sprite_pipeline` start building buffers for the next game
row. At the next `hcount == 0` those buffers swap in for display. Both are
double buffered.

* Background. The map is 16x32 tiles of 16x16 pixels, 256x512 pixels in all.
  The source row is `(row + scroll) mod 512`, so scrolling is exact to one
  pixel. The pipeline builds all 256 pixels of the row into a line buffer, in
  32 groups of 8 pixels at 8 cycles per group (256 cycles). For each group it
  reads the code byte and then the attribute byte, reads all three bit-plane
  ROMs at once, applies x/y flip and writes 8 entries of
  `{colourbase[4:0], pixel[2:0]}`. Attribute bits: 4:0 colour base, 5 x-flip,
  6 y-flip, 7 tile-code bit 8.
* Sprites. The pipeline takes the 32 sprite RAM entries (x, y, code,
  attribute) in order. For each one it makes four RAM reads and tests
  `row = line - y < 16`. A sprite on the line costs four more reads, each
  fetching one byte from both sprite ROMs: 8 bytes, 16 pixels of 4 bits. Its
  pixels, colour base and x go into the next free one of **8 sprite line
  buffers**. Each buffer has its own x register. A ninth or later sprite on a
  line is dropped, and `sprite_overflow` pulses. A full line takes at most
  about 384 cycles.

**Eight pixels ahead: characters.** The 32x32 character map (8x8 tiles, 2 bits
per pixel) is fetched just in time. `fg_pipeline` runs 8 columns ahead of the
beam and spends 8 cycles per tile: code read, attribute read, two ROM reads,
then a load into an 8-pixel buffer just as the beam reaches the tile. Colour
offset 0 is transparent.

**Every pixel: choose and colour.** `pixel_pipeline` takes 3 cycles:

1. It takes the first non-transparent source in the order sprite, character,
   background, and forms a palette address.
2. The palette ROM is read.
3. The 12-bit colour is registered.

`vga_controller` delays its syncs by the same 3 cycles, so colour and sync
reach the pins together.

Sprite priority goes to the lowest sprite-RAM index among the buffers that
cover the column and are not transparent there (colour 15).

For bringing up the monitor, the `test_screen` input replaces the game picture
with `vga_test_pattern`. That pattern is ten 64-pixel bars whose number selects
the lit R/G/B channels, with the intensity stepping every 32 rows. It has the
same 3-cycle delay.

## Palette

The original board builds colours from several layers of small colour PROMs
and lookup tables. Here that is done once, offline, into one 1536 x 16 ROM:

| Region | Address | Index |
|---|---|---|
| characters | 0x000-0x0FF | `colourbase[5:0]*4 + offset[1:0]` |
| background | 0x100-0x4FF | `bank[1:0]*256 + colourbase[4:0]*8 + pixel[2:0]` |
| sprites    | 0x500-0x5FF | `colourbase[3:0]*16 + pixel[3:0]` |

A word holds R in bits 11:8, G in 7:4 and B in 3:0. Off-chip, each 4-bit colour
goes through a 220/470/1k/2.2k ohm ladder (bit 3 on 220 ohm) to the monitor.

To fill the table from the original PROMs, entry `i` of a region is the RGB
colour-PROM entry selected by that region's lookup-table entry `i`:

* characters: lookup-table entry + 128
* background: lookup-table entry + 16 × bank
* sprites: lookup-table entry + 64

## Interrupt and sound

`vblank_irq` synchronises VSYNC into the CPU domain and pulls `cpu_int_n` low
once per frame. When the Z80 acknowledges (M1 and IORQ low), the block puts
RST 10h (D7) on `cpu_rdata` and clears the request.

| Code | Sound |
|---|---|
| 04 | fire |
| 06 | flip |
| 02 | explosion |
| 0D | take-off |
| 12 | retry |
| 07 | coin / power-up |
| 11 / 10 | music start / stop |

Each effect has its own ROM. A new code restarts playback from sample 0. Every
`fg_sample_req` from the codec interface moves the next word to `fg_sample`.
Codes 11 and 10 drive the one-bit `bg_link` to the second board. There,
`bg_music_player` loops its ROM while the link is high.

## Where this design makes its own choices

Nobody has published the original hardware at cycle level. These points are
this design's own, mostly following the original board's known layout:

* Tilemap byte layout, ROM bit-plane packing and attribute bit positions.
* Character tiles are 2 bits per pixel with a 9-bit code. This is what the
  8 KiB character ROM and two ROM reads per 8 pixels require.
* Both sprite ROMs are 32 KiB.
* Transparent colours: character 0, sprite 15.
* Sprite priority by RAM order.
* Palette region order.
* Porch and sync widths (the standard 640x480 numbers) and the centred game
  window.
* The RST 10h vector.
* The I/O addresses other than C800, and the bank encoding.
* Sound ROM size (16384 x 16 bits), restart and loop behaviour.

Not built:

* sprite flipping, tall sprites and the x bit 8 of the original board
* horizontal background scrolling
* a second interrupt per frame
* the screen-flip register

Scroll and palette-bank values cross into the video clock without a
synchroniser. They are quasi-static, but a write can take effect in the middle
of a line.

## Memory contents

No game data is included. Each `sp_rom` has an `INIT_FILE` parameter for
`$readmemh` contents; with no file the array is left empty for whatever
configures the FPGA. The testbenches write generated patterns straight into
the ROM arrays.

## Files and simulation

`rtl/` holds one module per file plus `arcade_pkg.sv` (constants, memory map,
sound codes). `tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  --top-module tb_arcade1942_top rtl/arcade_pkg.sv tb/tb_arcade1942_top.sv -o sim
./obj_dir/sim
```

`tb_arcade1942_top` runs everything at full size. It acts as the Z80 and loads
all RAMs through the bus. It checks ROM banking, the inputs, the interrupt
acknowledge and sound playback. It also captures one whole frame from the VGA
pins and compares every game pixel with a reference renderer built from the
same memory contents. It counts sprite overflow, sprite transparency overlap,
transparent characters, background x and y flips, scroll wrap-around and the
switch to the test screen, and fails if any of them never happens. It takes a
few seconds.
