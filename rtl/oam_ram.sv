// oam_ram: Object Attribute Memory, 256 sprites of 7 bytes (1,792 bytes).
//
// Byte 0-1: palette ID and tile ID, byte 2-3: X, byte 4-5: Y, byte 6:
// attributes (vertical flip, horizontal flip, behind background).  Each
// sprite is one 56-bit word written a byte at a time.  Write port: the
// CPU's VRAM write bundle; a write whose region is REG_OAM stores data[7:0]
// into byte offset[2:0] of sprite offset[10:3] (byte number 7 is ignored).
// Read port: rd_addr = sprite number, rd_data the whole entry one clock
// later.  Entry layout is the design's; little-endian field order, bit
// packing and the address form are this implementation's choices.
module oam_ram
  import ppu_pkg::*;
#(
  parameter int unsigned N_SPRITES = NSPRITES
) (
  input  logic                          clk,
  input  vram_wr_t                      wr,
  input  logic [$clog2(N_SPRITES)-1:0]  rd_addr,
  output oam_entry_t                    rd_data
);
  localparam int unsigned AW = $clog2(N_SPRITES);
  logic [55:0] mem [N_SPRITES];

  always_ff @(posedge clk) begin
    if (wr.we && wr.region == REG_OAM && wr.offset[2:0] != 3'd7)
      mem[wr.offset[AW+2:3]][wr.offset[2:0]*8 +: 8] <= wr.data[7:0];
    rd_data <= oam_entry_t'(mem[rd_addr]);
  end
endmodule
