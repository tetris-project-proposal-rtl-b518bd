// tile_map_ram: the background tile buffer, 80x60 entries covering four
// screens, each entry a 6-bit palette ID and a 10-bit tile ID (9,600 bytes).
//
// Write port: the CPU's VRAM write bundle; a write whose region is
// REG_TILE_MAP stores data[15:0] = {palette[5:0], tile[9:0]} at offset
// row*80 + column; offsets past the last entry are ignored.  Read port:
// rd_addr in the same numbering, rd_data one clock later.  Buffer size and
// entry contents are the design's; the row-major order and field packing
// are this implementation's choice.
module tile_map_ram
  import ppu_pkg::*;
#(
  parameter int unsigned N_ENTRIES = MAP_ENTRIES  // 80 x 60
) (
  input  logic                           clk,
  input  vram_wr_t                       wr,
  input  logic [$clog2(N_ENTRIES)-1:0]   rd_addr,
  output tile_ref_t                      rd_data
);
  localparam int unsigned AW = $clog2(N_ENTRIES);
  tile_ref_t mem [N_ENTRIES];

  always_ff @(posedge clk) begin
    if (wr.we && wr.region == REG_TILE_MAP && wr.offset < 18'(N_ENTRIES))
      mem[wr.offset[AW-1:0]] <= wr.data[15:0];
    rd_data <= mem[rd_addr];
  end
endmodule
