// palette_ram: colour palettes, 64 palettes of 64 entries of 24-bit RGB
// (12,288 bytes), as on-chip block RAM.
//
// Write port: the CPU's VRAM write bundle; a write whose region is
// REG_PALETTE stores data[23:0] ({R,G,B}, 8 bits each) at offset
// {palette[5:0], index[5:0]}.  Read port: rd_addr = {palette, index},
// rd_data valid one clock later (registered read).  Palette count and size
// are the design's; the RGB bit order is this implementation's choice.
module palette_ram
  import ppu_pkg::*;
#(
  parameter int unsigned N_PAL = 64,  // palettes
  parameter int unsigned N_COL = 64   // colours per palette (6-bit index)
) (
  input  logic                             clk,
  input  vram_wr_t                         wr,
  input  logic [$clog2(N_PAL*N_COL)-1:0]   rd_addr,
  output rgb_t                             rd_data
);
  localparam int unsigned AW = $clog2(N_PAL*N_COL);
  rgb_t mem [N_PAL*N_COL];

  always_ff @(posedge clk) begin
    if (wr.we && wr.region == REG_PALETTE)
      mem[wr.offset[AW-1:0]] <= wr.data[RGB_W-1:0];
    rd_data <= mem[rd_addr];
  end
endmodule
