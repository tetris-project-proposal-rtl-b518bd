// sprite_engine: draws up to 256 16x16 sprites, all of which may share a
// line, into a double-buffered line buffer one line ahead of the display.
//
// Fill side.  At the start of display line v (line_start), if line
// t = v+1 (or 0 after the last raster line) is visible, the engine walks
// OAM from sprite 255 down to sprite 0, one sprite per clock:
//   F0: read OAM entry i;
//   F1: the sprite covers line t if 0 <= t - Y < 16; the row (mirrored for
//       a vertical flip) is read from sprite_gfx_ram as one 96-bit word;
//   F2: the 16 pixels (mirrored for a horizontal flip) are written into
//       the fill buffer, pixel X+i going to bank (X+i) mod 16, entry
//       (X+i)/16.  Transparent pixels (colour index 0) and pixels left of 0
//       or right of 639 are not written.
// Because lower-numbered sprites are written later they end up in front.
// A walk takes 258 clocks of the 800-clock line.
//
// Display side.  Line v is played from buffer v mod 2: pixel x is read in
// cycle 0, selected in cycle 1 (when its entry is also cleared for reuse two
// lines later) and presented on spix in cycle 2, matching the background
// pipeline's latency.  After reset both buffers are cleared (40 clocks).
//
// The sprite count, size, OAM layout and flip/priority attributes are the
// design's.  The line-buffer architecture, the one-sprite-per-clock walk and
// the rule that a lower sprite number wins are this implementation's.
module sprite_engine
  import ppu_pkg::*;
#(
  parameter int unsigned N_SPRITES = NSPRITES
) (
  input  logic         clk,
  input  logic         rst_n,
  // raster, cycle 0
  input  logic         line_start,
  input  logic [9:0]   vcount,
  input  logic [9:0]   x,
  input  logic         active,
  // OAM read port
  output logic [$clog2(N_SPRITES)-1:0] oam_addr,
  input  oam_entry_t   oam_data,
  // sprite graphics read port: {tile, row} -> 16-pixel row
  output logic [13:0]  sgfx_addr,
  input  logic [16*CIDX_W-1:0] sgfx_row,
  // result, cycle 2
  output spix_t        spix,
  // status
  output logic         busy
);
  localparam int unsigned IW    = $clog2(N_SPRITES);
  localparam int unsigned DEPTH = SCREEN_W / 16;          // 40 entries
  localparam int unsigned EW    = $clog2(DEPTH);          // 6
  localparam int unsigned SW    = $bits(spix_t);          // 13
  localparam logic [9:0]  V_LAST = 10'd524;               // last raster line

  // ------------------------------------------------------------ fill walk
  logic [IW-1:0] idx;
  logic [9:0]    tgt_y;
  logic          walk;

  logic          v1;            // F1 valid
  logic [9:0]    tgt_y1;
  logic          hit2;          // F2 valid and sprite on the line
  logic signed [15:0] x2;
  pal_t          pal2;
  logic          hflip2, behind2, buf2;

  logic [9:0]    next_line;
  assign next_line = (vcount == V_LAST) ? 10'd0 : vcount + 10'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      walk  <= 1'b0;
      idx   <= '0;
      tgt_y <= '0;
    end else if (line_start && next_line < 10'(SCREEN_H)) begin
      walk  <= 1'b1;
      idx   <= IW'(N_SPRITES - 1);
      tgt_y <= next_line;
    end else if (walk) begin
      idx <= idx - 1'b1;
      if (idx == '0) walk <= 1'b0;
    end
  end
  assign oam_addr = idx;

  // F1: is the sprite on the line?
  logic signed [16:0] row_s;
  logic [3:0]         row;
  logic               on_line;
  always_comb begin
    row_s   = 17'(signed'({7'd0, tgt_y1})) - 17'(oam_data.y);
    on_line = v1 && (row_s >= 0) && (row_s < 17'sd16);
    row     = oam_data.attr[ATTR_VFLIP] ? 4'd15 - row_s[3:0] : row_s[3:0];
    sgfx_addr = {oam_data.ref_.tile, row};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      hit2 <= 1'b0;
    end else begin
      v1   <= walk;
      hit2 <= on_line;
    end
  end

  always_ff @(posedge clk) begin
    tgt_y1  <= tgt_y;
    x2      <= oam_data.x;
    pal2    <= oam_data.ref_.pal;
    hflip2  <= oam_data.attr[ATTR_HFLIP];
    behind2 <= oam_data.attr[ATTR_BEHIND];
    buf2    <= tgt_y1[0];
  end

  // F2: scatter the row over the 16 banks
  logic [15:0]    fill_we;
  logic [EW-1:0]  fill_addr [16];
  spix_t          fill_data [16];
  always_comb begin
    for (int b = 0; b < 16; b++) begin
      logic [3:0]         i, col;
      logic signed [16:0] px;
      i   = 4'(b) - x2[3:0];
      col = hflip2 ? 4'd15 - i : i;
      px  = 17'(x2) + 17'(i);
      fill_data[b] = '{behind: behind2, pal: pal2,
                       cidx: sgfx_row[col*CIDX_W +: CIDX_W]};
      fill_addr[b] = px[EW+3:4];
      fill_we[b]   = hit2 && (fill_data[b].cidx != '0) &&
                     (px >= 0) && (px < 17'sd640);
    end
  end

  // ------------------------------------------------------------ reset clear
  logic [EW:0] init_cnt;
  logic        init;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    init_cnt <= '0;
    else if (init) init_cnt <= init_cnt + 1'b1;
  end
  assign init = (init_cnt < (EW+1)'(DEPTH));

  // ------------------------------------------------------------ display
  logic       disp_buf;
  logic [9:0] x1;
  logic       act1, act1_buf;
  assign disp_buf = vcount[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act1 <= 1'b0;
      x1   <= '0;
      act1_buf <= 1'b0;
    end else begin
      act1 <= active;
      x1   <= x;
      act1_buf <= disp_buf;
    end
  end

  // ------------------------------------------------------------ banks
  logic [SW-1:0] rd_data [2][16];
  for (genvar g = 0; g < 2; g++) begin : g_buf
    for (genvar b = 0; b < 16; b++) begin : g_bank
      logic          we;
      logic [EW-1:0] wa;
      logic [SW-1:0] wd;
      always_comb begin
        if (init) begin                                   // reset clear
          we = 1'b1;  wa = init_cnt[EW-1:0];  wd = '0;
        end else if (act1 && act1_buf == 1'(g) && x1[3:0] == 4'(b)) begin
          we = 1'b1;  wa = x1[EW+3:4];        wd = '0;    // clear after read
        end else begin
          we = fill_we[b] && buf2 == 1'(g);
          wa = fill_addr[b];
          wd = fill_data[b];
        end
      end
      linebuf_bank #(.DEPTH(DEPTH), .WIDTH(SW)) u_bank (
        .clk, .we, .wr_addr(wa), .wr_data(wd),
        .rd_addr(x[EW+3:4]), .rd_data(rd_data[g][b])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) spix <= '0;
    else        spix <= act1 ? spix_t'(rd_data[act1_buf][x1[3:0]]) : '0;
  end

  assign busy = walk || v1 || hit2;
endmodule
