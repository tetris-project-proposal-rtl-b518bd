// tb_tetris_frames: the PPU used the way a Tetris game uses it, at full
// size, for seven frames.
//
// The board (10x20 cells inside a wall, one 16x16 tile per cell) lives in
// the tile buffer; the falling piece is four sprites.  Once per VBLANK the
// testbench does what the game's VBLANK routine would: it moves the piece
// down one cell by rewriting the sprites' Y bytes in OAM, then locks the
// piece into the tile buffer and hides the sprites, then clears the
// completed bottom row by shifting the board rows down.  Every frame is
// compared pixel by pixel at the VGA pins with the testbench's own model of
// the picture.  Each step (move, lock, row clear) must happen.
module tb_tetris_frames;
  import ppu_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [2:0]  avs_address = '0;
  logic        avs_write = 1'b0, avs_read = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic        vblank;
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_hs, vga_vs, vga_blank_n;
  int checks = 0, failures = 0;
  int n_move = 0, n_lock = 0, n_clear = 0, n_frames = 0;

  ppu_top dut (.*);
  always #20 clk = ~clk;

  localparam int BX = 15, BY = 5;          // board origin in tiles
  localparam int T_EMPTY = 0, T_WALL = 1, T_BLOCK = 2;
  localparam int S_BLOCK = 7;              // sprite tile

  tile_ref_t  map_s [MAP_ENTRIES];
  logic [5:0] bgfx [3][256];
  logic [5:0] sgfx [256];
  rgb_t       pal_s [4096];
  int         sx [256], sy [256];
  rgb_t       frame_exp [640*480];
  int         piece_c [4], piece_r [4];    // piece cells, board coordinates
  int         drop;                        // rows fallen so far

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
  endtask
  task automatic idle();
    @(negedge clk);
    avs_write = 1'b0;
  endtask
  function automatic logic [31:0] va(input region_e r, input int off);
    return {11'd0, 3'(r), 18'(off)};
  endfunction

  task automatic set_cell(input int c, input int r, input int tile, input int pal);
    int i;
    i = (BY + r) * 80 + BX + c;
    map_s[i] = '{pal: 6'(pal), tile: 10'(tile)};
    wr(R_VADDR, va(REG_TILE_MAP, i));
    wr(R_VDATA, {16'd0, map_s[i]});
  endtask

  task automatic put_sprite(input int s, input int x, input int y);
    sx[s] = x; sy[s] = y;
    wr(R_VADDR, va(REG_OAM, s * 8));
    wr(R_VDATA, 32'(S_BLOCK & 8'hFF));
    wr(R_VDATA, {24'd0, 6'd5, 2'(S_BLOCK >> 8)});           // palette 5
    wr(R_VDATA, 32'(x & 8'hFF)); wr(R_VDATA, 32'((x >> 8) & 8'hFF));
    wr(R_VDATA, 32'(y & 8'hFF)); wr(R_VDATA, 32'((y >> 8) & 8'hFF));
    wr(R_VDATA, 32'h0);
  endtask

  task automatic show_piece();
    for (int k = 0; k < 4; k++)
      put_sprite(k, (BX + piece_c[k]) * 16, (BY + piece_r[k] + drop) * 16);
  endtask

  // reference picture (scroll 0, only sprites 0..3 can be on screen)
  task automatic build_frame();
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x++) begin
        tile_ref_t e;
        logic [11:0] a;
        logic [5:0] bc;
        e  = map_s[(y / 16) * 80 + x / 16];
        bc = bgfx[e.tile][(y % 16) * 16 + x % 16];
        a  = {e.pal, bc};
        for (int s = 3; s >= 0; s--)
          if (x >= sx[s] && x < sx[s] + 16 && y >= sy[s] && y < sy[s] + 16 &&
              sgfx[(y - sy[s]) * 16 + (x - sx[s])] != 0)
            a = {6'd5, sgfx[(y - sy[s]) * 16 + (x - sx[s])]};
        frame_exp[y * 640 + x] = pal_s[a];
      end
  endtask

  task automatic check_frame();
    int k, bad;
    k = 0; bad = 0;
    while (k < 640 * 480) begin
      @(negedge clk);
      if (vga_blank_n) begin
        checks++;
        if ({vga_r, vga_g, vga_b} !== frame_exp[k]) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL frame %0d pixel (%0d,%0d)", n_frames, k % 640, k / 640);
        end
        k++;
      end
    end
    n_frames++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wr(R_CTRL, 32'h1);
    // palettes: random colours everywhere
    wr(R_VADDR, va(REG_PALETTE, 0));
    for (int i = 0; i < 4096; i++) begin
      pal_s[i] = 24'($urandom);
      wr(R_VDATA, {8'd0, pal_s[i]});
    end
    // tiles: empty, wall, block with a border; sprite block with a clear corner
    for (int t = 0; t < 3; t++) begin
      wr(R_VADDR, va(REG_TILE_GFX, t * 256));
      for (int p = 0; p < 256; p++) begin
        int r, c;
        r = p / 16; c = p % 16;
        case (t)
          T_EMPTY: bgfx[t][p] = 6'd0;
          T_WALL:  bgfx[t][p] = 6'(((r / 4 + c / 8) % 2) + 1);
          default: bgfx[t][p] = (r == 0 || c == 0 || r == 15 || c == 15) ? 6'd1 : 6'd2;
        endcase
        wr(R_VDATA, {26'd0, bgfx[t][p]});
      end
    end
    wr(R_VADDR, va(REG_SPRITE_GFX, S_BLOCK * 256));
    for (int p = 0; p < 256; p++) begin
      sgfx[p] = (p == 0) ? 6'd0 : ((p / 16 == 0 || p % 16 == 0) ? 6'd3 : 6'd4);
      wr(R_VDATA, {26'd0, sgfx[p]});
    end
    // tile buffer: empty everywhere, then the wall and a nearly full bottom row
    wr(R_VADDR, va(REG_TILE_MAP, 0));
    for (int i = 0; i < MAP_ENTRIES; i++) begin
      map_s[i] = '{pal: 6'd0, tile: 10'(T_EMPTY)};
      wr(R_VDATA, 32'(map_s[i]));
    end
    for (int r = 0; r <= 20; r++) begin
      set_cell(-1, r, T_WALL, 1);
      set_cell(10, r, T_WALL, 1);
    end
    for (int c = -1; c <= 10; c++) set_cell(c, 20, T_WALL, 1);
    for (int c = 0; c < 10; c++) if (c != 4 && c != 5) set_cell(c, 19, T_BLOCK, 2 + c % 3);
    set_cell(3, 18, T_BLOCK, 2);
    // every sprite parked off screen; the piece is an O above the gap
    for (int s = 0; s < 256; s++) put_sprite(s, 0, -64);
    piece_c = '{4, 5, 4, 5}; piece_r = '{14, 14, 15, 15};   // O piece
    drop = 0;
    show_piece();
    idle();
    checks++;
    if (!vblank) begin failures++; $display("FAIL set-up overran the first VBLANK"); end

    // frames: the piece falls 4 rows, then locks, then the full row clears
    for (int f = 0; f < 7; f++) begin
      build_frame();
      check_frame();
      wait (vblank);
      if (f < 4) begin                                // move down one cell
        drop++;
        show_piece();
        n_move++;
      end else if (f == 4) begin                      // lock into the board
        for (int k = 0; k < 4; k++) begin
          set_cell(piece_c[k], piece_r[k] + drop, T_BLOCK, 5);
          put_sprite(k, 0, -64);
        end
        n_lock++;
      end else if (f == 5) begin                      // clear row 19
        for (int r = 19; r > 0; r--)
          for (int c = 0; c < 10; c++) begin
            tile_ref_t e;
            e = map_s[(BY + r - 1) * 80 + BX + c];
            set_cell(c, r, int'(e.tile), int'(e.pal));
          end
        for (int c = 0; c < 10; c++) set_cell(c, 0, T_EMPTY, 0);
        n_clear++;
      end
      idle();
      checks++;
      if (!vblank) begin failures++; $display("FAIL update overran VBLANK"); end
    end
    checks++;
    if (n_move == 0 || n_lock == 0 || n_clear == 0 || n_frames != 7) begin
      failures++; $display("FAIL a game step never happened");
    end
    $display("frames=%0d moves=%0d locks=%0d clears=%0d", n_frames, n_move, n_lock, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9 * 420000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
