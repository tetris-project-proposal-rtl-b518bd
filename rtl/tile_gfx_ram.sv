// tile_gfx_ram: background tile graphics, 1024 tiles of 16x16 pixels with a
// 6-bit colour index per pixel (196,608 bytes of 6-bit cells).
//
// Write port: the CPU's VRAM write bundle; a write whose region is
// REG_TILE_GFX stores data[5:0] at offset {tile[9:0], row[3:0], col[3:0]}.
// Read port: one pixel per clock at rd_addr = {tile, row, col}, rd_data
// valid one clock later.  Tile size, tile count and index width are the
// design's; the row-major pixel order is this implementation's choice.
module tile_gfx_ram
  import ppu_pkg::*;
#(
  parameter int unsigned N_TILES = 1024
) (
  input  logic                            clk,
  input  vram_wr_t                        wr,
  input  logic [$clog2(N_TILES)+7:0]      rd_addr,
  output cidx_t                           rd_data
);
  localparam int unsigned AW = $clog2(N_TILES) + 8;  // + 4 row + 4 col bits
  cidx_t mem [N_TILES*256];

  always_ff @(posedge clk) begin
    if (wr.we && wr.region == REG_TILE_GFX)
      mem[wr.offset[AW-1:0]] <= wr.data[CIDX_W-1:0];
    rd_data <= mem[rd_addr];
  end
endmodule
