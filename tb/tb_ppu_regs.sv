// tb_ppu_regs: exercises the CPU register port.  Checks that
//  - VADDR/CTRL/SCROLL read back what was written (read latency 1);
//  - each VDATA write produces exactly one vram_wr cycle with the region,
//    offset and data of the current VADDR, the cycle after the bus write;
//  - with auto increment on, VADDR steps by one per VDATA write (also
//    across a region boundary), and stays put with it off;
//  - scroll values past the 4-screen world wrap (1280 / 960);
//  - STATUS shows VBLANK and counts frame_start pulses.
module tb_ppu_regs;
  import ppu_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [2:0]  avs_address = '0;
  logic        avs_write = 1'b0, avs_read = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic        vblank = 1'b0, frame_start = 1'b0;
  vram_wr_t    vram_wr;
  logic [10:0] scroll_x;
  logic [9:0]  scroll_y;
  int checks = 0, failures = 0, n_wr = 0;

  ppu_regs dut (.*);
  always #5 clk = ~clk;

  // count write strobes independently
  always @(posedge clk) if (rst_n && vram_wr.we) n_wr++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_write(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic bus_read(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1'b1;
    @(negedge clk);
    avs_read = 1'b0;
    d = avs_readdata;
  endtask

  // write VDATA and check the strobe that follows
  task automatic vdata(input logic [31:0] d, input logic [20:0] exp_addr);
    @(negedge clk);
    avs_address = R_VDATA; avs_writedata = d; avs_write = 1'b1;
    @(negedge clk);
    avs_write = 1'b0;
    check(vram_wr.we == 1'b1, "write strobe after VDATA");
    check(vram_wr.region == region_e'(exp_addr[20:18]), "strobe region");
    check(vram_wr.offset == exp_addr[17:0], "strobe offset");
    check(vram_wr.data == d[23:0], "strobe data");
    @(negedge clk);
    check(vram_wr.we == 1'b0, "strobe lasts one cycle");
  endtask

  logic [31:0] rd;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reset values
    bus_read(R_VADDR, rd);    check(rd == 0, "VADDR reset");
    bus_read(R_SCROLL_X, rd); check(rd == 0, "SCROLL_X reset");
    // no auto increment: VADDR stays
    bus_write(R_VADDR, {11'd0, 3'(REG_PALETTE), 18'd5});
    bus_read(R_VADDR, rd);    check(rd == {11'd0, 3'(REG_PALETTE), 18'd5}, "VADDR readback");
    vdata(32'h00A1B2C3, {3'(REG_PALETTE), 18'd5});
    vdata(32'h00112233, {3'(REG_PALETTE), 18'd5});
    bus_read(R_VADDR, rd);    check(rd[20:0] == {3'(REG_PALETTE), 18'd5}, "VADDR unchanged w/o auto increment");
    // auto increment
    bus_write(R_CTRL, 32'h1);
    bus_read(R_CTRL, rd);     check(rd == 32'h1, "CTRL readback");
    bus_write(R_VADDR, {11'd0, 3'(REG_TILE_GFX), 18'h3FFFE});
    for (int i = 0; i < 4; i++) begin
      logic [20:0] a;
      a = {3'(REG_TILE_GFX), 18'h3FFFE} + 21'(i);   // crosses into region 1
      vdata($urandom, a);
    end
    bus_read(R_VADDR, rd);    check(rd[20:0] == {3'(REG_TILE_GFX), 18'h3FFFE} + 21'd4, "VADDR after 4 auto increments");
    // a burst of writes back to back
    bus_write(R_VADDR, {11'd0, 3'(REG_OAM), 18'd0});
    for (int i = 0; i < 16; i++) bus_write(R_VDATA, 32'(i));
    bus_read(R_VADDR, rd);    check(rd[20:0] == {3'(REG_OAM), 18'd16}, "VADDR after burst");
    check(n_wr == 2 + 4 + 16, "one strobe per VDATA write");
    // VDATA reads as zero
    bus_read(R_VDATA, rd);    check(rd == 0, "VDATA reads zero");
    // scroll
    bus_write(R_SCROLL_X, 32'd1279); check(scroll_x == 11'd1279, "scroll_x 1279");
    bus_write(R_SCROLL_X, 32'd1300); check(scroll_x == 11'd20,   "scroll_x wraps 1300");
    bus_write(R_SCROLL_Y, 32'd959);  check(scroll_y == 10'd959,  "scroll_y 959");
    bus_write(R_SCROLL_Y, 32'd1000); check(scroll_y == 10'd40,   "scroll_y wraps 1000");
    bus_read(R_SCROLL_Y, rd);        check(rd == 32'd40, "SCROLL_Y readback");
    // status
    vblank = 1'b1;
    bus_read(R_STATUS, rd); check(rd[0] == 1'b1, "VBLANK visible");
    vblank = 1'b0;
    bus_read(R_STATUS, rd); check(rd[0] == 1'b0, "VBLANK clear");
    for (int i = 0; i < 3; i++) begin
      @(negedge clk) frame_start = 1'b1;
      @(negedge clk) frame_start = 1'b0;
    end
    bus_read(R_STATUS, rd); check(rd[31:16] == 16'd3, "frame counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
