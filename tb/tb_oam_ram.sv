// tb_oam_ram: writes all 256 sprite entries byte by byte (bytes 0..6 of
// each, plus a write to the unused byte 7 that must change nothing and
// decoy writes to other regions), reads every entry back and checks the
// decoded fields: palette ID, tile ID, signed X and Y, attributes.
module tb_oam_ram;
  import ppu_pkg::*;
  logic clk = 1'b0;
  vram_wr_t wr = '0;
  logic [7:0] rd_addr = '0;
  oam_entry_t rd_data;
  int checks = 0, failures = 0;
  logic [7:0] bytes_ [256][7];

  oam_ram dut (.clk, .wr, .rd_addr, .rd_data);
  always #5 clk = ~clk;

  task automatic put(input region_e r, input logic [17:0] off, input logic [23:0] d);
    @(negedge clk);
    wr = '{we: 1'b1, region: r, offset: off, data: d};
    @(negedge clk);
    wr.we = 1'b0;
  endtask

  task automatic check(input bit ok, input string what, input int s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL sprite %0d: %s", s, what);
    end
  endtask

  initial begin
    for (int s = 0; s < 256; s++) begin
      for (int b = 0; b < 7; b++) begin
        bytes_[s][b] = 8'($urandom);
        put(REG_OAM, 18'(s * 8 + b), {16'd0, bytes_[s][b]});
      end
      put(REG_OAM, 18'(s * 8 + 7), 24'hFFFFFF);           // unused byte
      put(REG_PALETTE, 18'(s * 8), 24'h5A5A5A);           // other region
    end
    for (int s = 0; s < 256; s++) begin
      @(negedge clk) rd_addr = 8'(s);
      @(negedge clk);
      check(rd_data.ref_.tile == {bytes_[s][1][1:0], bytes_[s][0]}, "tile ID", s);
      check(rd_data.ref_.pal  == bytes_[s][1][7:2], "palette ID", s);
      check(rd_data.x == signed'({bytes_[s][3], bytes_[s][2]}), "X", s);
      check(rd_data.y == signed'({bytes_[s][5], bytes_[s][4]}), "Y", s);
      check(rd_data.attr == bytes_[s][6], "attributes", s);
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
