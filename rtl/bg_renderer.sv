// bg_renderer: background pixel pipeline of the PPU.
//
// The background is an 80x60 map of 16x16 tiles (1280x960 pixels, four
// screens) seen through a 640x480 window at (scroll_x, scroll_y) that wraps
// around at the map edges, so the picture can scroll smoothly in any
// direction.  For each screen pixel (x, y) presented in cycle 0 it:
//   cycle 0: forms the world position ((x+scroll_x) mod 1280,
//            (y+scroll_y) mod 960) and reads the tile-buffer entry of the
//            tile that holds it;
//   cycle 1: with that entry's tile ID and the pixel's position inside the
//            tile, reads the 6-bit colour index from the tile graphics;
//   cycle 2: presents {palette ID, colour index} on pix.
// Latency is therefore exactly 2 clocks; one pixel per clock.
// The memories sit outside (tile_map_ram, tile_gfx_ram), both with a
// registered read.  Map/tile sizes and scrolling over four screens are the
// design's; the pipeline itself is this implementation's.
module bg_renderer
  import ppu_pkg::*;
(
  input  logic        clk,
  input  logic [9:0]  x,          // screen pixel, cycle 0
  input  logic [9:0]  y,
  input  logic [10:0] scroll_x,   // 0..1279
  input  logic [9:0]  scroll_y,   // 0..959
  // tile buffer read port
  output logic [12:0] map_addr,
  input  tile_ref_t   map_data,
  // tile graphics read port
  output logic [17:0] gfx_addr,
  input  cidx_t       gfx_data,
  // result, cycle 2
  output pix_t        pix
);
  logic [11:0] wx, wy;          // world position
  logic [3:0]  fx1, fy1;        // position inside the tile, cycle 1
  pal_t        pal2;

  always_comb begin
    wx = 12'(x) + 12'(scroll_x);
    if (wx >= 12'(WORLD_W)) wx = wx - 12'(WORLD_W);
    wy = 12'(y) + 12'(scroll_y);
    if (wy >= 12'(WORLD_H)) wy = wy - 12'(WORLD_H);
    map_addr = 13'(wy[11:4] * 13'(MAP_W)) + 13'(wx[11:4]);
  end

  always_ff @(posedge clk) begin
    fx1 <= wx[3:0];
    fy1 <= wy[3:0];
    pal2 <= map_data.pal;
  end

  assign gfx_addr = {map_data.tile, fy1, fx1};
  assign pix      = '{pal: pal2, cidx: gfx_data};
endmodule
