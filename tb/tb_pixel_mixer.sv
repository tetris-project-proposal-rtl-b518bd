// tb_pixel_mixer: drives random and corner-case background/sprite pixels
// into the mixer and checks the chosen palette address against the rule:
// an opaque sprite pixel wins unless it is marked "behind" and the
// background colour index is non-zero; colour index 0 of a sprite is
// transparent.
module tb_pixel_mixer;
  import ppu_pkg::*;
  pix_t        bg;
  spix_t       spr;
  logic [11:0] pal_addr;
  logic        sprite_won;
  int checks = 0, failures = 0;
  int n_front = 0, n_behind_hidden = 0, n_behind_shown = 0, n_transp = 0;

  pixel_mixer dut (.bg, .spr, .pal_addr, .sprite_won);

  task automatic one(input pix_t b, input spix_t s);
    logic        exp_won;
    logic [11:0] exp_addr;
    bg = b; spr = s;
    #1;
    if (s.cidx == 0) begin exp_won = 0; n_transp++; end
    else if (!s.behind) begin exp_won = 1; n_front++; end
    else if (b.cidx == 0) begin exp_won = 1; n_behind_shown++; end
    else begin exp_won = 0; n_behind_hidden++; end
    exp_addr = exp_won ? {s.pal, s.cidx} : {b.pal, b.cidx};
    checks++;
    if (sprite_won !== exp_won || pal_addr !== exp_addr) begin
      failures++;
      $display("FAIL bg=%h spr=%h got %h/%b exp %h/%b", b, s, pal_addr, sprite_won, exp_addr, exp_won);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      pix_t b; spix_t s;
      b = pix_t'($urandom);
      s = spix_t'($urandom);
      if (i % 4 == 0) b.cidx = '0;
      if (i % 5 == 0) s.cidx = '0;
      one(b, s);
    end
    checks++;
    if (n_front == 0 || n_behind_hidden == 0 || n_behind_shown == 0 || n_transp == 0) begin
      failures++;
      $display("FAIL a priority case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
