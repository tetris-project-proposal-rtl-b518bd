// pixel_mixer: chooses between the background and the sprite pixel and
// forms the palette address of the result.
//
// A sprite pixel with colour index 0 is transparent.  A visible sprite pixel
// with its "behind" attribute clear is drawn in front of the background; one
// with "behind" set shows only where the background colour index is 0.
// Otherwise the background pixel is used.  pal_addr = {palette, index}
// addresses palette_ram; sprite_won tells which source was chosen.
// Purely combinational.  Front/behind priority is the design's; treating
// colour index 0 as transparent is this implementation's choice.
module pixel_mixer
  import ppu_pkg::*;
(
  input  pix_t        bg,
  input  spix_t       spr,
  output logic [11:0] pal_addr,
  output logic        sprite_won
);
  always_comb begin
    sprite_won = (spr.cidx != '0) && (!spr.behind || bg.cidx == '0);
    pal_addr   = sprite_won ? {spr.pal, spr.cidx} : {bg.pal, bg.cidx};
  end
endmodule
