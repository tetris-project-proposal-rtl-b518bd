// tb_sprite_engine: the sprite engine with OAM, sprite graphics and the
// raster generator.  Loads 256 sprites covering the cases that matter:
// overlap (lower sprite number in front), horizontal and vertical flip,
// clipping at all four screen edges, sprites wholly off screen, the
// "behind" attribute carried through, and 100 sprites sharing one line.
// Then checks every clock of one full frame: the sprite pixel presented two
// clocks after each raster position must equal the reference, computed by
// scanning all 256 sprites per line in the testbench, and must be empty
// outside the visible area.  Also checks that each line's OAM walk ends
// within 258 clocks.  Each case above is counted and must occur.
module tb_sprite_engine;
  import ppu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  vram_wr_t wr = '0;
  logic [9:0] hcount, vcount;
  logic active, vblank, hsync_n, vsync_n, line_start, frame_start;
  logic [7:0]  oam_addr;
  oam_entry_t  oam_data;
  logic [13:0] sgfx_addr;
  logic [95:0] sgfx_row;
  spix_t       spix;
  logic        busy;
  int checks = 0, failures = 0;

  vga_timing u_tim (.clk, .rst_n, .hcount, .vcount, .active, .vblank,
                    .hsync_n, .vsync_n, .line_start, .frame_start);
  oam_ram        u_oam  (.clk, .wr, .rd_addr(oam_addr), .rd_data(oam_data));
  sprite_gfx_ram u_sgfx (.clk, .wr, .rd_addr(sgfx_addr), .rd_row(sgfx_row));
  sprite_engine  dut (.clk, .rst_n, .line_start, .vcount, .x(hcount), .active,
                      .oam_addr, .oam_data, .sgfx_addr, .sgfx_row, .spix, .busy);
  always #5 clk = ~clk;

  // shadow state
  int          sx [256], sy [256], st [256], sp [256];
  logic [7:0]  sa [256];
  logic [5:0]  gfx [1024][16][16];
  spix_t       exp_line [640];
  // mechanism counters
  int n_overlap, n_hflip, n_vflip, n_clip_l, n_clip_r, n_clip_t, n_clip_b, n_behind, n_crowd;

  task automatic put(input region_e r, input int off, input logic [23:0] d);
    @(negedge clk);
    wr = '{we: 1'b1, region: r, offset: 18'(off), data: d};
    @(negedge clk);
    wr.we = 1'b0;
  endtask

  task automatic set_sprite(input int s, input int x, input int y, input int t,
                            input int p, input logic [7:0] a);
    sx[s] = x; sy[s] = y; st[s] = t; sp[s] = p; sa[s] = a;
  endtask

  // reference line: all sprites, lower number in front
  task automatic build_line(input int ly);
    int covered [640];
    for (int i = 0; i < 640; i++) begin exp_line[i] = '0; covered[i] = 0; end
    for (int s = 255; s >= 0; s--) begin
      int r;
      r = ly - sy[s];
      if (r < 0 || r > 15) continue;
      if (sy[s] < 0 && ly == 0) n_clip_t++;
      if (sy[s] > 464 && ly == 479) n_clip_b++;
      if (sa[s][ATTR_VFLIP]) begin r = 15 - r; if (r != ly - sy[s]) n_vflip++; end
      for (int i = 0; i < 16; i++) begin
        int px, c;
        logic [5:0] col;
        px = sx[s] + i;
        c  = sa[s][ATTR_HFLIP] ? 15 - i : i;
        col = gfx[st[s]][r][c];
        if (col == 0) continue;
        if (px < 0)    begin n_clip_l++; continue; end
        if (px >= 640) begin n_clip_r++; continue; end
        if (sa[s][ATTR_HFLIP] && c != i) n_hflip++;
        if (covered[px] != 0) n_overlap++;
        covered[px]++;
        exp_line[px] = '{behind: sa[s][ATTR_BEHIND], pal: 6'(sp[s]), cidx: col};
      end
    end
    for (int i = 0; i < 640; i++) if (exp_line[i].behind && exp_line[i].cidx != 0) n_behind++;
  endtask

  int tiles [16];
  int hh [2], hv [2];
  bit ha [2];
  int busy_len, max_busy;

  initial begin
    n_overlap = 0; n_hflip = 0; n_vflip = 0; n_clip_l = 0; n_clip_r = 0;
    n_clip_t = 0; n_clip_b = 0; n_behind = 0; n_crowd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // sprite graphics: 16 tiles, a quarter of the pixels transparent
    for (int k = 0; k < 16; k++) begin
      tiles[k] = k * 64 + 3;
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          logic [5:0] v;
          v = ($urandom_range(3) == 0) ? 6'd0 : 6'($urandom_range(63, 1));
          gfx[tiles[k]][r][c] = v;
          put(REG_SPRITE_GFX, tiles[k] * 256 + r * 16 + c, {18'd0, v});
        end
    end
    // sprite table
    set_sprite(0, 100, 100, tiles[1], 1, 8'h00);
    set_sprite(1, 108, 104, tiles[2], 2, 8'h00);          // under sprite 0
    set_sprite(2, -5, 200, tiles[3], 3, 8'h02);           // left edge, h-flip
    set_sprite(3, 630, 200, tiles[4], 4, 8'h01);          // right edge, v-flip
    set_sprite(4, 300, -6, tiles[5], 5, 8'h00);           // top edge
    set_sprite(5, 300, 470, tiles[6], 6, 8'h00);          // bottom edge
    set_sprite(6, 400, 300, tiles[7], 7, 8'h04);          // behind background
    set_sprite(7, 500, 50, tiles[8], 8, 8'h03);           // both flips
    set_sprite(8, -16, 60, tiles[9], 9, 8'h00);           // fully off left
    set_sprite(9, 640, 60, tiles[9], 9, 8'h00);           // fully off right
    for (int s = 10; s < 100; s++)
      set_sprite(s, int'($urandom_range(660)) - 20, int'($urandom_range(510)) - 20,
                 tiles[$urandom_range(15)], int'($urandom_range(63)), 8'($urandom_range(7)));
    for (int s = 100; s < 200; s++)                       // a crowded line
      set_sprite(s, (s - 100) * 6 - 10, 240, tiles[s % 16], s % 64, 8'(s % 8));
    for (int s = 200; s < 256; s++)                       // far away
      set_sprite(s, int'($urandom_range(2000)) - 1000, (s % 2) ? 3000 : -3000,
                 tiles[s % 16], 0, 8'h00);
    for (int s = 0; s < 256; s++) begin
      logic [55:0] e;
      e = {sa[s], 16'(sy[s]), 16'(sx[s]), 6'(sp[s]), 10'(st[s])};
      for (int b = 0; b < 7; b++) put(REG_OAM, s * 8 + b, {16'd0, e[b*8 +: 8]});
    end
    checks++;
    if (!(vblank && vcount < 10'd524)) begin
      failures++;
      $display("FAIL set-up did not finish within the first blanking period");
    end
    // one frame, every clock
    wait (frame_start);
    ha = '{0, 0};
    busy_len = 0; max_busy = 0;
    for (int c = 0; c < 800 * 525; c++) begin
      @(negedge clk);
      if (hcount == 0 && vcount < 480) begin
        build_line(int'(vcount));
        if (vcount >= 240 && vcount < 256) n_crowd++;
      end
      // output belongs to the raster position two clocks back
      checks++;
      if (ha[1]) begin
        if (spix !== exp_line[hh[1]]) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %h exp %h", hh[1], hv[1], spix, exp_line[hh[1]]);
        end
      end else if (spix !== '0) begin
        failures++;
        if (failures < 10) $display("FAIL sprite pixel outside the visible area");
      end
      hh[1] = hh[0]; hv[1] = hv[0]; ha[1] = ha[0];
      hh[0] = int'(hcount); hv[0] = int'(vcount); ha[0] = active;
      busy_len = busy ? busy_len + 1 : 0;
      if (busy_len > max_busy) max_busy = busy_len;
    end
    checks++;
    if (max_busy == 0 || max_busy > 258) begin
      failures++;
      $display("FAIL OAM walk took %0d clocks", max_busy);
    end
    $display("overlap=%0d hflip=%0d vflip=%0d clipL=%0d clipR=%0d clipT=%0d clipB=%0d behind=%0d crowd=%0d walk=%0d",
             n_overlap, n_hflip, n_vflip, n_clip_l, n_clip_r, n_clip_t, n_clip_b, n_behind, n_crowd, max_busy);
    checks++;
    if (n_overlap == 0 || n_hflip == 0 || n_vflip == 0 || n_clip_l == 0 || n_clip_r == 0 ||
        n_clip_t == 0 || n_clip_b == 0 || n_behind == 0 || n_crowd == 0) begin
      failures++;
      $display("FAIL a sprite case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
