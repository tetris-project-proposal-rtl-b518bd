# A tile-and-sprite PPU for 640x480 VGA

This is a picture processing unit (PPU) in the style of the 8-bit game consoles, sized for a
Cyclone V FPGA board with a VGA DAC and a dual-core ARM hard processor, and meant to show a
Tetris game. A 24-bit frame buffer of 640x480 needs 921,600 bytes. That is about twice the
block RAM of the device, and four screens for smooth scrolling would need 3.6 MB. So the PPU
keeps no frame buffer. It keeps small pictures (16x16 tiles), a map of which tile goes where,
colour palettes and a sprite table. It builds every pixel on the fly, one per pixel clock, while
the beam scans.

The CPU only writes these tables, through a memory-mapped register window. It should do so
during vertical blanking (VBLANK), which the PPU signals.

## What is stored (about 410 KB)

| memory | contents | size | module |
|---|---|---|---|
| palettes | 64 palettes x 64 colours x 24-bit RGB | 12,288 B | `palette_ram` |
| background tiles | 1024 tiles x 16x16 pixels x 6-bit colour index | 196,608 B | `tile_gfx_ram` |
| tile buffer | 80x60 entries (2x2 screens), each `{palette[5:0], tile[9:0]}` | 9,600 B | `tile_map_ram` |
| sprite tiles | 1024 tiles x 16x16 x 6-bit colour index | 196,608 B | `sprite_gfx_ram` |
| OAM | 256 sprites x 7 bytes | 1,792 B | `oam_ram` |
| sprite line buffers | 2 x 640 x 13 bits | 2,080 B | `linebuf_bank` x 32 |

Each pixel in a tile is an index into a palette, not a colour. Each tile-buffer entry and each
sprite names its own palette. So one tile drawn with different palettes looks quite different.
In total the memories hold 3,351,808 bits.

An OAM entry has seven bytes, with 16-bit fields stored little endian:

| byte | meaning |
|---|---|
| 0-1 | `{palette[5:0], tile[9:0]}` |
| 2-3 | X of the top-left pixel, signed, in screen pixels |
| 4-5 | Y of the top-left pixel, signed, in screen lines |
| 6 | bit 0 vertical flip, bit 1 horizontal flip, bit 2 behind background |

## The pixel pipeline

```
vga_timing --(x,y)--> bg_renderer ----pix----\
          \                                    pixel_mixer --> palette_ram --> vga_r/g/b
           \--------> sprite_engine ---spix---/
```

`vga_timing` counts the standard 800x525 raster of 640x480 at 60 Hz (25.175 MHz nominal
clock). It gives the next pixel's position, the negative sync pulses and the `vblank` flag for
lines 480-524. The whole PPU runs on this one clock.

**Background** (`bg_renderer`, 2 clocks). The screen is a 640x480 window onto the 1280x960
world of the tile buffer. The window's origin is `(scroll_x, scroll_y)` and it wraps at the
world edges. In cycle 0 the world position is formed, `((x+scroll_x) mod 1280,
(y+scroll_y) mod 960)`, and the tile-buffer entry is read. In cycle 1 the tile ID from that
entry and the pixel's position inside the tile address the tile graphics. In cycle 2 the result
is `{palette, colour index}`.

**Mixing** (`pixel_mixer`, then `palette_ram`, 1 clock). Sprite colour index 0 is transparent.
An opaque sprite pixel wins over the background unless its *behind* bit is set. A *behind*
sprite shows only where the background colour index is 0. The winner's `{palette, index}`
addresses the palette memory, whose registered output is the 24-bit colour.

The colour therefore leaves three clocks after the raster counters. `ppu_top` delays hsync,
vsync and blank by the same three clocks, so all the VGA pins describe the same pixel. Outside
the visible area the colour pins are forced to zero.

## The sprite engine

This is the least obvious part of the design. All 256 sprites may be on screen at once, and
there is no per-line sprite limit. Testing 256 sprites at every pixel is not practical.
Instead, while line *v* is displayed, the engine draws line *v+1* into a line buffer.

**Walk.** At the start of each line, the engine reads one OAM entry per clock, from sprite 255
down to sprite 0. The walk is a three-stage pipeline:

1. Read the OAM entry.
2. Compute the sprite row as (next line − Y). If it lies in 0..15, the sprite is on the line.
   With vertical flip the row is mirrored. Then the sprite tile's row is read. `sprite_gfx_ram`
   stores each row as one 96-bit word, so all 16 pixels arrive in one read.
3. Write the 16 pixels, mirrored for horizontal flip, into the line buffer.

**Writing a row in one clock.** The line buffer is split into 16 banks: pixel *x* lives in bank
*x mod 16*, entry *x / 16*. Sixteen adjacent pixels therefore fall into 16 different banks,
whatever X is, and the whole sprite row is written in one clock. Bank *b* takes pixel
*i = (b − X) mod 16* of the row, at entry *(X + i) / 16*. Transparent pixels are not written,
and neither are pixels left of 0 or right of 639.

**Timing and priority.** The walk takes 258 of the 800 clocks in a line. Lower-numbered sprites
are written later, so they end up in front. Each buffer entry holds `{behind, palette, index}`.
Where sprites overlap, only the frontmost opaque sprite pixel is kept, even if it is marked
*behind* and the background then hides it.

**Double buffering.** There are two buffers, chosen by bit 0 of the line number. Line *v* is
read from one while the walk fills the other for line *v+1*. Each pixel is cleared in the clock
after it is read, so the buffer is empty again before it is filled two lines later. After reset
both buffers are cleared in 40 clocks. The raster also starts at the first VBLANK line, so a
whole blanking period passes before the first visible line.

## CPU register window (`ppu_regs`)

The bus is a word-addressed 32-bit slave in Avalon-MM style. Reads return data one clock after
`avs_read`. It must run on the pixel clock: any crossing from the CPU's bus clock belongs in the
board wrapper.

| # | name | access | function |
|---|---|---|---|
| 0 | CTRL | r/w | bit 0 = auto increment |
| 1 | VADDR | r/w | VRAM address `{region[2:0], offset[17:0]}` |
| 2 | VDATA | w | store one entry at VADDR; with auto increment, VADDR += 1 |
| 3 | SCROLL_X | r/w | 0..1279 (larger values are reduced by 1280) |
| 4 | SCROLL_Y | r/w | 0..959 (larger values are reduced by 960) |
| 5 | STATUS | r | bit 0 VBLANK, bits 31:16 frame counter |

Each VDATA write stores one entry. What an entry is depends on the region:

| region | offset | data bits used |
|---|---|---|
| 0 background tiles | `{tile, row, col}` | 5:0 |
| 1 sprite tiles | `{tile, row, col}` | 5:0 |
| 2 tile buffer | `row*80 + col`, 0..4799 | 15:0 |
| 3 palettes | `{palette, index}` | 23:0 = R,G,B |
| 4 OAM | `{sprite, byte[2:0]}` | 7:0 |

Byte number 7 of an OAM slot is ignored. With auto increment, one sprite is therefore 8
consecutive writes. A whole tile is one VADDR write followed by 256 VDATA writes.

VRAM cannot be read back. Nothing blocks writes during the visible area: they take effect at
once and may tear the picture, but corrupt nothing. A driver should wait for `vblank`, either
the pin or STATUS bit 0. In the intended system, one CPU thread runs the game, and a second
thread does all the table updates and controller polling once per VBLANK.

## Files

- `rtl/ppu_pkg.sv`: sizes, the struct types (`tile_ref_t`, `oam_entry_t`, `pix_t`, `spix_t`
  and `vram_wr_t`, the write bundle shared by all memories), and the register and region
  numbers.
- `rtl/ppu_top.sv`: the top, with the CPU port, the `vblank` pin and the VGA DAC pins.
- The other files in `rtl/` each hold one of the blocks above.
- `tb/tb_<module>.sv`: a self-checking testbench per module.

Each testbench prints `TB_RESULT checks=N failures=M` and ends by itself. A watchdog ends it
with a failure if it hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ppu_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/ppu_pkg.sv tb/tb_ppu_top.sv -o sim
./obj_dir/sim
```

`tb_ppu_top` runs the full-size design, with no parameter overrides, in a few seconds:

- It loads every table through the register port using auto-increment bursts, within the first
  VBLANK.
- It checks two whole frames at the VGA pins, every pixel, against its own model of the
  picture. Between the frames it changes the scroll and moves sprites.
- It checks line and frame timing, sync widths, the back porch, black during blanking, the
  VBLANK length and the frame counter.
- It counts that each mechanism happened: scroll wrap in x and y, front, behind-hidden and
  behind-shown sprites, transparency, both flips, overlap, clipping at both edges, auto
  increment and VBLANK.

`tb_sprite_engine` checks every clock of a frame with 256 sprites, 100 of them on one line.

`tb_tetris_frames` uses the PPU as the game would, for seven frames. The board is drawn from
tiles in the tile buffer, and the falling piece is four sprites. In each VBLANK the testbench
moves the piece down one cell. It then locks the piece into the tile buffer, and finally
clears the full row by shifting the board down. Every frame is checked pixel by pixel.

## How far to trust it, and what is this design's own

These points come from the proposal: the sizes in the tables above, 6-bit colour indices,
per-tile palettes, 16x16 tiles and sprites, the 4-screen scrolling tile buffer, 256 sprites of
7 bytes with flip and front/behind attributes, memory-mapped access with auto increment, a
VBLANK flag, and 640x480 at 60 Hz with 24-bit colour.

The proposal leaves the following open, and they are this design's choices:

- the register map and VRAM address map, and one entry per write
- the field packing and byte order, and the attribute bit positions
- signed screen coordinates for sprites
- colour index 0 as sprite transparency, and a *behind* sprite showing through background
  index 0
- lower sprite number in front
- the line-buffer sprite engine and the pipeline latencies
- scroll wrap-around, and starting the raster in VBLANK after reset
- a single clock domain, with porch timings from the standard VESA mode

Not included: the hard processor, the USB game controller, the audio codec (driven by the
processor) and the VGA DAC itself. The top brings out the signals that connect to the processor
and the DAC.

The memories total about 3.35 Mbit. Background and sprite tiles are 6 bits wide, which does not
pack perfectly into 10-Kbit block RAMs. Split as 5+1 bits (2Kx5 plus 8Kx1 blocks), each tile
memory takes about 160 blocks. With the palettes (about 12), the tile buffer (about 16) and OAM
(2), the design needs roughly 350 blocks if the 32 small line-buffer banks go into logic RAM.
A Cyclone V 5CSEMA5 has 397 blocks, so check the fit before adding memory.

The proposal planned a simulation testbench that writes each frame out as an image file. The
testbenches here compare every pixel with a reference model instead, and write no files.
