// vga_timing: raster generator for a 640x480, 60 Hz VGA picture.
//
// Two counters walk the 800x525 total raster, one count per pixel clock
// (nominally 25.175 MHz).  hcount/vcount name the pixel about to be drawn;
// active is high in the 640x480 visible area, vblank from line 480 to the
// end of the frame, hsync_n/vsync_n are the negative sync pulses of the
// standard 640x480 mode, all combinational from the counters so they line
// up with hcount/vcount in the same cycle.  line_start pulses at hcount 0,
// frame_start at (0,0).
//
// Resolution and 60 Hz rate are the design's; porch and sync lengths are the
// usual VESA values.  Reset starts the raster at the first VBLANK line so
// the CPU and the sprite line buffer get a full blanking period before the
// first visible line.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [9:0]  hcount,
  output logic [9:0]  vcount,
  output logic        active,
  output logic        vblank,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        line_start,
  output logic        frame_start
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= 10'(V_ACTIVE);
    end else if (hcount == 10'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
    end else begin
      hcount <= hcount + 10'd1;
    end
  end

  always_comb begin
    active      = (hcount < 10'(H_ACTIVE)) && (vcount < 10'(V_ACTIVE));
    vblank      = (vcount >= 10'(V_ACTIVE));
    hsync_n     = !((hcount >= 10'(H_ACTIVE + H_FP)) &&
                    (hcount <  10'(H_ACTIVE + H_FP + H_SYNC)));
    vsync_n     = !((vcount >= 10'(V_ACTIVE + V_FP)) &&
                    (vcount <  10'(V_ACTIVE + V_FP + V_SYNC)));
    line_start  = (hcount == '0);
    frame_start = (hcount == '0) && (vcount == '0);
  end
endmodule
