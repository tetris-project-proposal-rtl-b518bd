// tb_ppu_top: end-to-end test of the whole PPU at its full size, driven only
// through the CPU register port and observed only at the VGA pins.
//
// The testbench loads the 80x60 tile buffer, 32 background tiles, all 64
// palettes, 8 sprite tiles and all 256 OAM entries with auto-increment
// bursts during the first VBLANK, then checks two complete frames pixel by
// pixel against its own model of the picture (scrolled, wrapped background;
// sprites with flips, clipping, overlap and front/behind priority; palette
// lookup).  Between the frames, during VBLANK, it changes the scroll and
// moves and re-attributes sprites.  It also checks the VGA timing at the
// pins (800-clock lines, 96-clock hsync, 48-clock back porch, 640 pixels per
// line, 525-line frames, 2-line vsync, black during blanking), the VBLANK
// output and the frame counter in STATUS.  Every mechanism is counted and
// must occur at least once.
module tb_ppu_top;
  import ppu_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [2:0]  avs_address = '0;
  logic        avs_write = 1'b0, avs_read = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic        vblank;
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_hs, vga_vs, vga_blank_n;
  int checks = 0, failures = 0;

  ppu_top dut (.*);
  always #20 clk = ~clk;   // 25 MHz

  // ---------------------------------------------------------------- shadow
  tile_ref_t  map_s [MAP_ENTRIES];
  logic [5:0] bgfx [int];
  logic [5:0] sgfx [int];
  rgb_t       pal_s [4096];
  int         sx [256], sy [256], st [256], sp [256];
  logic [7:0] sa [256];
  int         scx, scy;
  rgb_t       frame_exp [640*480];

  // mechanism counters
  int n_autoinc, n_wrap_x, n_wrap_y, n_front, n_behind_hidden, n_behind_shown,
      n_transparent, n_hflip, n_vflip, n_overlap, n_clip_l, n_clip_r,
      n_vblank_seen, n_scroll_change;

  // ---------------------------------------------------------------- bus
  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1'b1; avs_read = 1'b0;
  endtask
  task automatic idle();
    @(negedge clk);
    avs_write = 1'b0; avs_read = 1'b0;
  endtask
  task automatic rd(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1'b1; avs_write = 1'b0;
    @(negedge clk);
    avs_read = 1'b0;
    d = avs_readdata;
  endtask
  function automatic logic [31:0] va(input region_e r, input int off);
    return {11'd0, 3'(r), 18'(off)};
  endfunction

  task automatic write_oam(input int s);
    logic [55:0] e;
    e = {sa[s], 16'(sy[s]), 16'(sx[s]), 6'(sp[s]), 10'(st[s])};
    wr(R_VADDR, va(REG_OAM, s * 8));
    for (int b = 0; b < 8; b++) begin
      wr(R_VDATA, (b < 7) ? {24'd0, e[b*8 +: 8]} : 32'hFF);
      n_autoinc++;
    end
  endtask

  // ---------------------------------------------------------------- model
  task automatic build_frame();
    for (int y = 0; y < 480; y++) begin
      spix_t line [640];
      int covered [640];
      for (int i = 0; i < 640; i++) begin line[i] = '0; covered[i] = 0; end
      for (int s = 255; s >= 0; s--) begin
        int r;
        r = y - sy[s];
        if (r < 0 || r > 15) continue;
        if (sa[s][ATTR_VFLIP]) begin r = 15 - r; n_vflip++; end
        for (int i = 0; i < 16; i++) begin
          int px, c;
          logic [5:0] col;
          px  = sx[s] + i;
          c   = sa[s][ATTR_HFLIP] ? 15 - i : i;
          col = sgfx[st[s] * 256 + r * 16 + c];
          if (col == 0) begin
            if (px >= 0 && px < 640) n_transparent++;
            continue;
          end
          if (px < 0)    begin n_clip_l++; continue; end
          if (px >= 640) begin n_clip_r++; continue; end
          if (sa[s][ATTR_HFLIP]) n_hflip++;
          if (covered[px] != 0) n_overlap++;
          covered[px]++;
          line[px] = '{behind: sa[s][ATTR_BEHIND], pal: 6'(sp[s]), cidx: col};
        end
      end
      for (int x = 0; x < 640; x++) begin
        int wx, wy;
        tile_ref_t e;
        logic [5:0] bc;
        logic [11:0] a;
        wx = x + scx; if (wx >= 1280) begin wx -= 1280; n_wrap_x++; end
        wy = y + scy; if (wy >= 960)  begin wy -= 960;  n_wrap_y++; end
        e  = map_s[(wy / 16) * 80 + wx / 16];
        bc = bgfx[int'(e.tile) * 256 + (wy % 16) * 16 + wx % 16];
        if (line[x].cidx == 0) begin
          a = {e.pal, bc};
        end else if (!line[x].behind) begin
          a = {line[x].pal, line[x].cidx}; n_front++;
        end else if (bc == 0) begin
          a = {line[x].pal, line[x].cidx}; n_behind_shown++;
        end else begin
          a = {e.pal, bc}; n_behind_hidden++;
        end
        frame_exp[y * 640 + x] = pal_s[a];
      end
    end
  endtask

  // ---------------------------------------------------------------- pins
  // timing at the pins, checked all the time once set-up has begun
  int cyc_since_hs, hs_low, vs_low_cycles, act_in_line, cyc_since_vs;
  bit timing_on = 0, seen_hs = 0, seen_vs = 0;
  logic hs_q = 1, vs_q = 1, bl_q = 0;
  int vb_cycles;
  always @(negedge clk) if (timing_on) begin
    if (!vga_blank_n) begin
      checks++;
      if ({vga_r, vga_g, vga_b} != 0) begin failures++; $display("FAIL colour during blanking"); end
    end
    if (vga_hs && !hs_q) begin                       // end of hsync pulse
      checks++;
      if (hs_low != 96) begin failures++; $display("FAIL hsync width %0d", hs_low); end
    end
    if (!vga_hs && hs_q) begin                       // start of hsync pulse
      if (seen_hs) begin
        checks += 2;
        if (cyc_since_hs != 800) begin failures++; $display("FAIL line length %0d", cyc_since_hs); end
        if (act_in_line != 0 && act_in_line != 640) begin failures++; $display("FAIL %0d pixels in a line", act_in_line); end
      end
      seen_hs = 1; cyc_since_hs = 0; hs_low = 0; act_in_line = 0;
    end
    if (vga_blank_n && !bl_q) begin                  // first pixel of a line
      checks++;
      if (cyc_since_hs != 96 + 48) begin failures++; $display("FAIL back porch %0d", cyc_since_hs - 96); end
    end
    if (!vga_vs && vs_q) begin                       // start of vsync
      if (seen_vs) begin
        checks += 2;
        if (cyc_since_vs != 800 * 525) begin failures++; $display("FAIL frame length %0d", cyc_since_vs); end
        if (vb_cycles != 800 * 45) begin failures++; $display("FAIL VBLANK for %0d clocks", vb_cycles); end
      end
      seen_vs = 1; cyc_since_vs = 0; vs_low_cycles = 0; vb_cycles = 0;
    end
    if (vga_vs && !vs_q && seen_vs) begin
      checks++;
      if (vs_low_cycles != 1600) begin failures++; $display("FAIL vsync width %0d", vs_low_cycles); end
    end
    if (!vga_hs) hs_low++;
    if (!vga_vs) vs_low_cycles++;
    if (vga_blank_n) act_in_line++;
    if (vblank) begin vb_cycles++; n_vblank_seen++; end
    cyc_since_hs++; cyc_since_vs++;
    hs_q = vga_hs; vs_q = vga_vs; bl_q = vga_blank_n;
  end

  // compare one whole frame of pixels as they leave the pins
  task automatic check_frame(input int f);
    int k, bad;
    k = 0; bad = 0;
    while (k < 640 * 480) begin
      @(negedge clk);
      if (vga_blank_n) begin
        checks++;
        if ({vga_r, vga_g, vga_b} !== frame_exp[k]) begin
          failures++; bad++;
          if (bad < 6) $display("FAIL frame %0d pixel (%0d,%0d) got %h exp %h",
                                f, k % 640, k / 640, {vga_r, vga_g, vga_b}, frame_exp[k]);
        end
        k++;
      end
    end
  endtask

  // ---------------------------------------------------------------- set-up
  int btiles [32];
  int stiles [8];
  logic [31:0] d;
  int frames0;

  initial begin
    n_autoinc = 0; n_wrap_x = 0; n_wrap_y = 0; n_front = 0; n_behind_hidden = 0;
    n_behind_shown = 0; n_transparent = 0; n_hflip = 0; n_vflip = 0; n_overlap = 0;
    n_clip_l = 0; n_clip_r = 0; n_vblank_seen = 0; n_scroll_change = 0;
    for (int k = 0; k < 32; k++) btiles[k] = k * 32 + 5;
    for (int k = 0; k < 8; k++)  stiles[k] = k * 128 + 9;
    for (int s = 0; s < 256; s++) begin
      if (s < 200) begin
        sx[s] = int'($urandom_range(670)) - 20;
        sy[s] = int'($urandom_range(510)) - 20;
      end else begin
        sx[s] = int'($urandom_range(640));
        sy[s] = 2000 + s;                               // parked off screen
      end
      st[s] = stiles[s % 8]; sp[s] = int'($urandom_range(63)); sa[s] = 8'($urandom_range(7));
    end
    sx[0] = -7;  sy[0] = 10;  sa[0] = 8'h02;            // left edge, h-flip
    sx[1] = 633; sy[1] = 10;  sa[1] = 8'h01;            // right edge, v-flip
    sx[2] = 100; sy[2] = 100; sa[2] = 8'h00;            // front, over sprite 3
    sx[3] = 104; sy[3] = 104; sa[3] = 8'h04;            // behind
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    timing_on = 1;
    rd(R_STATUS, d);
    checks++;
    if (!d[0]) begin failures++; $display("FAIL PPU does not start in VBLANK"); end
    wr(R_CTRL, 32'h1);
    // tile buffer
    wr(R_VADDR, va(REG_TILE_MAP, 0));
    for (int i = 0; i < MAP_ENTRIES; i++) begin
      map_s[i] = '{pal: 6'($urandom), tile: 10'(btiles[$urandom_range(31)])};
      wr(R_VDATA, {16'd0, map_s[i]}); n_autoinc++;
    end
    // background tiles, a quarter of the pixels colour 0
    foreach (btiles[k]) begin
      wr(R_VADDR, va(REG_TILE_GFX, btiles[k] * 256));
      for (int p = 0; p < 256; p++) begin
        logic [5:0] v;
        v = ($urandom_range(3) == 0) ? 6'd0 : 6'($urandom);
        bgfx[btiles[k] * 256 + p] = v;
        wr(R_VDATA, {26'd0, v}); n_autoinc++;
      end
    end
    // palettes
    wr(R_VADDR, va(REG_PALETTE, 0));
    for (int i = 0; i < 4096; i++) begin
      pal_s[i] = 24'($urandom);
      wr(R_VDATA, {8'd0, pal_s[i]}); n_autoinc++;
    end
    // sprite tiles
    foreach (stiles[k]) begin
      wr(R_VADDR, va(REG_SPRITE_GFX, stiles[k] * 256));
      for (int p = 0; p < 256; p++) begin
        logic [5:0] v;
        v = ($urandom_range(2) == 0) ? 6'd0 : 6'($urandom);
        sgfx[stiles[k] * 256 + p] = v;
        wr(R_VDATA, {26'd0, v}); n_autoinc++;
      end
    end
    for (int s = 0; s < 256; s++) write_oam(s);
    scx = 1000; scy = 700;
    wr(R_SCROLL_X, 32'(scx));
    wr(R_SCROLL_Y, 32'(scy));
    idle();
    rd(R_STATUS, d);
    checks++;
    if (!d[0]) begin failures++; $display("FAIL set-up overran the first VBLANK"); end
    frames0 = int'(d[31:16]);

    // frame 1: the first visible frame, right after set-up
    build_frame();
    check_frame(1);

    // during VBLANK: new scroll, move and change sprites
    @(negedge vga_vs);
    rd(R_STATUS, d);
    checks++;
    if (!d[0]) begin failures++; $display("FAIL VBLANK not reported at vsync"); end
    scx = 1279; scy = 13; n_scroll_change++;
    wr(R_SCROLL_X, 32'(scx));
    wr(R_SCROLL_Y, 32'(scy));
    sx[2] = 300; sy[2] = 470; sa[2] = 8'h03; write_oam(2);
    sx[3] = 0;   sy[3] = 0;   sa[3] = 8'h06; write_oam(3);
    idle();
    build_frame();
    check_frame(2);
    rd(R_STATUS, d);
    checks++;
    if (int'(d[31:16]) != frames0 + 2) begin
      failures++; $display("FAIL frame counter %0d, expected %0d", d[31:16], frames0 + 2);
    end

    $display("autoinc=%0d wrapx=%0d wrapy=%0d front=%0d behind_hidden=%0d behind_shown=%0d transparent=%0d",
             n_autoinc, n_wrap_x, n_wrap_y, n_front, n_behind_hidden, n_behind_shown, n_transparent);
    $display("hflip=%0d vflip=%0d overlap=%0d clipL=%0d clipR=%0d vblank=%0d scroll_change=%0d",
             n_hflip, n_vflip, n_overlap, n_clip_l, n_clip_r, n_vblank_seen, n_scroll_change);
    checks++;
    if (n_autoinc == 0 || n_wrap_x == 0 || n_wrap_y == 0 || n_front == 0 ||
        n_behind_hidden == 0 || n_behind_shown == 0 || n_transparent == 0 ||
        n_hflip == 0 || n_vflip == 0 || n_overlap == 0 || n_clip_l == 0 ||
        n_clip_r == 0 || n_vblank_seen == 0 || n_scroll_change == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 420000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
