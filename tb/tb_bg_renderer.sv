// tb_bg_renderer: background pipeline with its two memories.  Fills the
// whole 80x60 tile buffer with random palette/tile pairs drawn from 64
// tiles, gives those tiles random pixels, then streams one random
// (x, y, scroll_x, scroll_y) per clock and checks each result two clocks
// later against a model that applies the world wrap at 1280 x 960.  Also
// scans two complete screen lines at a fixed scroll.  Counts how often the
// wrap in x and in y was exercised and fails if either never happened.
module tb_bg_renderer;
  import ppu_pkg::*;
  logic clk = 1'b0;
  vram_wr_t wr = '0;
  logic [9:0]  x = '0, y = '0;
  logic [10:0] scroll_x = '0;
  logic [9:0]  scroll_y = '0;
  logic [12:0] map_addr;
  tile_ref_t   map_data;
  logic [17:0] gfx_addr;
  cidx_t       gfx_data;
  pix_t        pix;
  int checks = 0, failures = 0, n_wrap_x = 0, n_wrap_y = 0;

  tile_ref_t map_s [MAP_ENTRIES];
  cidx_t     gfx_s [int];

  tile_map_ram u_map (.clk, .wr, .rd_addr(map_addr), .rd_data(map_data));
  tile_gfx_ram u_gfx (.clk, .wr, .rd_addr(gfx_addr), .rd_data(gfx_data));
  bg_renderer  dut (.clk, .x, .y, .scroll_x, .scroll_y,
                    .map_addr, .map_data, .gfx_addr, .gfx_data, .pix);
  always #5 clk = ~clk;

  task automatic put(input region_e r, input int off, input logic [23:0] d);
    @(negedge clk);
    wr = '{we: 1'b1, region: r, offset: 18'(off), data: d};
    @(negedge clk);
    wr.we = 1'b0;
  endtask

  function automatic pix_t model(input int px, input int py, input int sx, input int sy);
    int wx, wy;
    tile_ref_t e;
    wx = (px + sx) % 1280;
    wy = (py + sy) % 960;
    e  = map_s[(wy / 16) * 80 + wx / 16];
    return '{pal: e.pal, cidx: gfx_s[int'(e.tile) * 256 + (wy % 16) * 16 + wx % 16]};
  endfunction

  // inputs of the last two cycles
  int hx[2], hy[2], hsx[2], hsy[2];
  bit hv[2];

  task automatic step(input int px, input int py, input int sx, input int sy, input bit v);
    @(negedge clk);
    if (hv[1]) begin
      pix_t e;
      e = model(hx[1], hy[1], hsx[1], hsy[1]);
      checks++;
      if (pix !== e) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) scroll (%0d,%0d) got %h exp %h",
                                    hx[1], hy[1], hsx[1], hsy[1], pix, e);
      end
    end
    hx[1] = hx[0]; hy[1] = hy[0]; hsx[1] = hsx[0]; hsy[1] = hsy[0]; hv[1] = hv[0];
    hx[0] = px; hy[0] = py; hsx[0] = sx; hsy[0] = sy; hv[0] = v;
    x = 10'(px); y = 10'(py); scroll_x = 11'(sx); scroll_y = 10'(sy);
    if (v && px + sx >= 1280) n_wrap_x++;
    if (v && py + sy >= 960)  n_wrap_y++;
  endtask

  initial begin
    hv = '{0, 0};
    for (int i = 0; i < MAP_ENTRIES; i++) begin
      tile_ref_t e;
      int k;
      k = int'($urandom_range(63));
      e = '{pal: 6'($urandom), tile: 10'(k * 16 + k % 16)};
      map_s[i] = e;
      put(REG_TILE_MAP, i, {8'd0, e});
    end
    for (int k = 0; k < 64; k++)
      for (int p = 0; p < 256; p++) begin
        cidx_t c;
        c = 6'($urandom);
        gfx_s[(k * 16 + k % 16) * 256 + p] = c;
        put(REG_TILE_GFX, (k * 16 + k % 16) * 256 + p, {18'd0, c});
      end
    // random pixels and scrolls, one per clock
    for (int i = 0; i < 20000; i++)
      step(int'($urandom_range(639)), int'($urandom_range(479)),
           int'($urandom_range(1279)), int'($urandom_range(959)), 1'b1);
    // two full lines at a scroll that wraps in both directions
    for (int py = 470; py < 472; py++)
      for (int px = 0; px < 640; px++) step(px, py, 1000, 700, 1'b1);
    step(0, 0, 0, 0, 1'b0);
    step(0, 0, 0, 0, 1'b0);
    checks++;
    if (n_wrap_x == 0 || n_wrap_y == 0) begin
      failures++;
      $display("FAIL wrap never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
