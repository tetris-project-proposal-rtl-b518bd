// tb_sprite_gfx_ram: fills a set of sprite tiles pixel by pixel through the
// VRAM write bundle (with decoy writes to other regions), then reads each
// 16-pixel row back as one word and checks every lane against a shadow
// copy: this proves that a pixel write touches only its own lane.
module tb_sprite_gfx_ram;
  import ppu_pkg::*;
  logic clk = 1'b0;
  vram_wr_t wr = '0;
  logic [13:0] rd_addr = '0;
  logic [95:0] rd_row;
  int checks = 0, failures = 0;
  logic [5:0] shadow [int];   // key: pixel address {tile,row,col}

  sprite_gfx_ram dut (.clk, .wr, .rd_addr, .rd_row);
  always #5 clk = ~clk;

  task automatic put(input region_e r, input logic [17:0] off, input logic [23:0] d);
    @(negedge clk);
    wr = '{we: 1'b1, region: r, offset: off, data: d};
    @(negedge clk);
    wr.we = 1'b0;
  endtask

  int tiles [8] = '{0, 1, 77, 300, 511, 512, 900, 1023};

  initial begin
    // every pixel of eight tiles, in a scrambled order
    foreach (tiles[t]) begin
      for (int p = 0; p < 256; p++) begin
        int q; logic [5:0] d;
        q = (p * 97) % 256;
        d = 6'($urandom);
        put(REG_SPRITE_GFX, 18'(tiles[t] * 256 + q), {18'd0, d});
        shadow[tiles[t] * 256 + q] = d;
        if (p % 8 == 0) put(REG_TILE_GFX, 18'(tiles[t] * 256 + q), {18'd0, ~d});
      end
    end
    // rewrite a few single pixels: their neighbours must not move
    for (int i = 0; i < 200; i++) begin
      int a; logic [5:0] d;
      a = tiles[i % 8] * 256 + int'($urandom_range(255));
      d = 6'($urandom);
      put(REG_SPRITE_GFX, 18'(a), {18'd0, d});
      shadow[a] = d;
    end
    foreach (tiles[t]) begin
      for (int r = 0; r < 16; r++) begin
        @(negedge clk) rd_addr = 14'(tiles[t] * 16 + r);
        @(negedge clk);
        for (int c = 0; c < 16; c++) begin
          checks++;
          if (rd_row[c*6 +: 6] !== shadow[tiles[t]*256 + r*16 + c]) begin
            failures++;
            if (failures < 10) $display("FAIL tile %0d row %0d col %0d", tiles[t], r, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
