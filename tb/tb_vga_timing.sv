// tb_vga_timing: checks the 640x480 60 Hz raster against the standard mode
// numbers: 800 clocks per line, 525 lines per frame, 640x480 active pixels,
// a 96-clock hsync starting 16 clocks after the active area, a 2-line vsync
// starting 10 lines after it, and VBLANK covering lines 480..524.  After
// reset the raster must start on line 480.  Runs a little over one frame.
module tb_vga_timing;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] hcount, vcount;
  logic active, vblank, hsync_n, vsync_n, line_start, frame_start;
  int checks = 0, failures = 0;

  vga_timing dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (h=%0d v=%0d)", what, hcount, vcount);
    end
  endtask

  // independent model of the raster position
  int mh, mv;
  int n_active, n_hs_low, n_vs_low_lines, n_frames, n_lines;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    mh = 0; mv = 480;
    n_active = 0; n_hs_low = 0; n_frames = 0; n_lines = 0;
    // walk one full frame plus a bit, cycle by cycle
    for (int c = 0; c < 800*525 + 1700; c++) begin
      check(hcount == 10'(mh) && vcount == 10'(mv), "counter position");
      check(active  == (mh < 640 && mv < 480), "active");
      check(vblank  == (mv >= 480), "vblank");
      check(hsync_n == !(mh >= 656 && mh < 752), "hsync");
      check(vsync_n == !(mv >= 490 && mv < 492), "vsync");
      check(line_start == (mh == 0), "line_start");
      check(frame_start == (mh == 0 && mv == 0), "frame_start");
      if (c < 800*525) begin
        if (active) n_active++;
        if (!hsync_n) n_hs_low++;
        if (frame_start) n_frames++;
        if (line_start) n_lines++;
      end
      mh++;
      if (mh == 800) begin mh = 0; mv = (mv == 524) ? 0 : mv + 1; end
      @(negedge clk);
    end
    check(n_active == 640*480, "active pixels per frame");
    check(n_hs_low == 96*525,  "hsync low clocks per frame");
    check(n_frames == 1,       "one frame start per 420000 clocks");
    check(n_lines  == 525,     "525 lines per frame");
    // 25.175 MHz / 420000 clocks = 59.94 Hz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
