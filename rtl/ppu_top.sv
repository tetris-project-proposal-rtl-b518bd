// ppu_top: a tile-and-sprite picture processing unit (PPU) driving a
// 640x480, 60 Hz VGA picture with 24-bit colour.
//
// Instead of a frame buffer the PPU keeps, in on-chip RAM, 1024 background
// tiles and 1024 sprite tiles of 16x16 pixels with 6-bit colour indices,
// a four-screen 80x60 tile buffer (palette + tile per entry), 64 palettes of
// 64 RGB colours and a 256-sprite OAM, about 410 KB in all.  The picture is
// built on the fly each pixel clock:
//   vga_timing   -> (x, y) of the next pixel, sync, VBLANK
//   bg_renderer  -> scrolled background {palette, index}      (2 clocks)
//   sprite_engine-> sprite line buffer {behind, palette, index} (2 clocks)
//   pixel_mixer  -> palette address; palette_ram -> RGB          (+1 clock)
// Sync and blank are delayed to match, so vga_* all belong to the same pixel,
// three clocks after the raster counters.
//
// The CPU writes VRAM and OAM through ppu_regs (address register with auto
// increment, data port, scroll registers, status) and should do so while
// vblank is high.  Memories are written and read at the same time without
// arbitration; a write during the visible area takes effect at once, which
// may tear the picture but corrupts nothing.
//
// Everything runs on one clock, the pixel clock (25.175 MHz nominal); the
// CPU bus is assumed to be bridged into that clock outside this module.
module ppu_top
  import ppu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU register port (word addressed, read latency 1)
  input  logic [2:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  output logic        vblank,
  // VGA DAC
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n
);
  localparam int unsigned PIPE = 3;   // counters -> RGB

  // raster
  logic [9:0] hcount, vcount;
  logic       active, hsync_n, vsync_n, line_start, frame_start;
  vga_timing u_timing (
    .clk, .rst_n, .hcount, .vcount, .active, .vblank,
    .hsync_n, .vsync_n, .line_start, .frame_start
  );

  // CPU side
  vram_wr_t    vram_wr;
  logic [10:0] scroll_x;
  logic [9:0]  scroll_y;
  ppu_regs u_regs (
    .clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read,
    .avs_readdata, .vblank, .frame_start, .vram_wr, .scroll_x, .scroll_y
  );

  // background
  logic [12:0] map_addr;
  tile_ref_t   map_data;
  logic [17:0] gfx_addr;
  cidx_t       gfx_data;
  pix_t        bg_pix;
  tile_map_ram u_map (.clk, .wr(vram_wr), .rd_addr(map_addr), .rd_data(map_data));
  tile_gfx_ram u_tgfx (.clk, .wr(vram_wr), .rd_addr(gfx_addr), .rd_data(gfx_data));
  bg_renderer u_bg (
    .clk, .x(hcount), .y(vcount), .scroll_x, .scroll_y,
    .map_addr, .map_data, .gfx_addr, .gfx_data, .pix(bg_pix)
  );

  // sprites
  logic [7:0]           oam_addr;
  oam_entry_t           oam_data;
  logic [13:0]          sgfx_addr;
  logic [16*CIDX_W-1:0] sgfx_row;
  spix_t                spr_pix;
  oam_ram        u_oam  (.clk, .wr(vram_wr), .rd_addr(oam_addr), .rd_data(oam_data));
  sprite_gfx_ram u_sgfx (.clk, .wr(vram_wr), .rd_addr(sgfx_addr), .rd_row(sgfx_row));
  sprite_engine u_spr (
    .clk, .rst_n, .line_start, .vcount, .x(hcount), .active,
    .oam_addr, .oam_data, .sgfx_addr, .sgfx_row, .spix(spr_pix), .busy()
  );

  // mix and colour
  logic [11:0] pal_addr;
  rgb_t        rgb;
  pixel_mixer u_mix (.bg(bg_pix), .spr(spr_pix), .pal_addr, .sprite_won());
  palette_ram u_pal (.clk, .wr(vram_wr), .rd_addr(pal_addr), .rd_data(rgb));

  // delay sync and blank to the colour
  logic [PIPE-1:0] act_d, hs_d, vs_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_d <= '0;
      hs_d  <= '1;
      vs_d  <= '1;
    end else begin
      act_d <= {act_d[PIPE-2:0], active};
      hs_d  <= {hs_d[PIPE-2:0],  hsync_n};
      vs_d  <= {vs_d[PIPE-2:0],  vsync_n};
    end
  end

  always_comb begin
    vga_blank_n = act_d[PIPE-1];
    vga_hs      = hs_d[PIPE-1];
    vga_vs      = vs_d[PIPE-1];
    {vga_r, vga_g, vga_b} = vga_blank_n ? rgb : '0;
  end
endmodule
