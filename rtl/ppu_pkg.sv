// ppu_pkg: sizes, types and the register/VRAM address map shared by the
// tile-and-sprite picture processing unit (PPU).
//
// Sizes follow the design: a 640x480 screen made of 16x16 tiles, a 4-screen
// (80x60 tile) background buffer, 6-bit colour indices, 64 palettes of 64
// 24-bit colours, 1024 background tiles, 1024 sprite tiles and 256 sprites of
// 7 bytes each.  The packing of fields inside the 16-bit tile-buffer and OAM
// words, the attribute bit positions and the register/VRAM address map are
// this implementation's own choices.
package ppu_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int unsigned SCREEN_W   = 640;
  localparam int unsigned SCREEN_H   = 480;
  localparam int unsigned TILE_PX    = 16;            // tiles are 16x16 pixels
  localparam int unsigned MAP_W      = 80;            // tiles across 2 screens
  localparam int unsigned MAP_H      = 60;            // tiles down 2 screens
  localparam int unsigned MAP_ENTRIES= MAP_W * MAP_H; // 4800
  localparam int unsigned WORLD_W    = MAP_W * TILE_PX; // 1280 pixels
  localparam int unsigned WORLD_H    = MAP_H * TILE_PX; // 960 pixels

  // ---------------------------------------------------------------- colour
  localparam int unsigned CIDX_W   = 6;   // colour index within a palette
  localparam int unsigned PAL_W    = 6;   // palette ID (64 palettes)
  localparam int unsigned TILE_W   = 10;  // tile ID (1024 tiles)
  localparam int unsigned RGB_W    = 24;  // 8 bits each of red, green, blue
  localparam int unsigned NSPRITES = 256;

  typedef logic [CIDX_W-1:0] cidx_t;
  typedef logic [PAL_W-1:0]  pal_t;
  typedef logic [TILE_W-1:0] tile_t;
  typedef logic [RGB_W-1:0]  rgb_t;

  // 16-bit tile-buffer entry and OAM bytes 0..1: {palette, tile}
  typedef struct packed {
    pal_t  pal;
    tile_t tile;
  } tile_ref_t;

  // One pixel as it leaves a renderer: palette and colour index.
  // Colour index 0 of a sprite is transparent.
  typedef struct packed {
    pal_t  pal;
    cidx_t cidx;
  } pix_t;

  // One pixel of the sprite line buffer.
  typedef struct packed {
    logic  behind;   // 1: shown only where the background colour index is 0
    pal_t  pal;
    cidx_t cidx;     // 0 = no sprite here
  } spix_t;

  // OAM byte 6 attribute bits
  localparam int unsigned ATTR_VFLIP  = 0;
  localparam int unsigned ATTR_HFLIP  = 1;
  localparam int unsigned ATTR_BEHIND = 2;

  // One OAM entry, 7 bytes, byte 0 in the low bits.  16-bit fields are
  // little endian (byte 0/2/4 low).  X and Y are signed screen coordinates
  // of the sprite's top-left pixel.
  typedef struct packed {
    logic [7:0]        attr;  // byte 6
    logic signed [15:0] y;    // bytes 5:4
    logic signed [15:0] x;    // bytes 3:2
    tile_ref_t         ref_;  // bytes 1:0
  } oam_entry_t;

  // ---------------------------------------------------------------- VRAM map
  // VADDR = {region[2:0], offset[17:0]}; one VDATA write fills one entry.
  localparam int unsigned VADDR_W = 21;
  typedef enum logic [2:0] {
    REG_TILE_GFX   = 3'd0,  // offset {tile[9:0], row[3:0], col[3:0]}, data[5:0]
    REG_SPRITE_GFX = 3'd1,  // offset {tile[9:0], row[3:0], col[3:0]}, data[5:0]
    REG_TILE_MAP   = 3'd2,  // offset row*80+col (0..4799), data[15:0]
    REG_PALETTE    = 3'd3,  // offset {palette[5:0], index[5:0]}, data[23:0]
    REG_OAM        = 3'd4   // offset {sprite[7:0], byte[2:0]} (byte 7 unused), data[7:0]
  } region_e;

  // One write towards a VRAM region or OAM.
  typedef struct packed {
    logic        we;
    region_e     region;
    logic [17:0] offset;
    logic [23:0] data;
  } vram_wr_t;

  // ---------------------------------------------------------------- registers
  // 32-bit registers on a word-addressed port.
  localparam logic [2:0] R_CTRL     = 3'd0; // bit0 auto increment
  localparam logic [2:0] R_VADDR    = 3'd1; // VRAM address
  localparam logic [2:0] R_VDATA    = 3'd2; // write: store at VADDR
  localparam logic [2:0] R_SCROLL_X = 3'd3; // 0..1279
  localparam logic [2:0] R_SCROLL_Y = 3'd4; // 0..959
  localparam logic [2:0] R_STATUS   = 3'd5; // bit0 VBLANK, [31:16] frame count

endpackage
