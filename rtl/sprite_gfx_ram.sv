// sprite_gfx_ram: sprite graphics, 1024 sprite tiles of 16x16 pixels with a
// 6-bit colour index per pixel.
//
// The memory is organised as one 96-bit word per tile row (16 pixels x 6
// bits, column c in bits [6c+5:6c]) so the sprite engine can fetch a whole
// sprite row in one clock.  Write port: the CPU's VRAM write bundle; a write
// whose region is REG_SPRITE_GFX stores data[5:0] into one pixel lane at
// offset {tile[9:0], row[3:0], col[3:0]}.  Read port: rd_addr = {tile, row},
// rd_row one clock later.  The 1024-tile capacity and pixel format are the
// design's; the row-wide organisation is this implementation's choice.
module sprite_gfx_ram
  import ppu_pkg::*;
#(
  parameter int unsigned N_TILES = 1024
) (
  input  logic                          clk,
  input  vram_wr_t                      wr,
  input  logic [$clog2(N_TILES)+3:0]    rd_addr,
  output logic [16*CIDX_W-1:0]          rd_row
);
  localparam int unsigned AW = $clog2(N_TILES) + 4;  // + 4 row bits
  logic [16*CIDX_W-1:0] mem [N_TILES*16];

  always_ff @(posedge clk) begin
    if (wr.we && wr.region == REG_SPRITE_GFX)
      mem[wr.offset[AW+3:4]][wr.offset[3:0]*CIDX_W +: CIDX_W] <= wr.data[CIDX_W-1:0];
    rd_row <= mem[rd_addr];
  end
endmodule
