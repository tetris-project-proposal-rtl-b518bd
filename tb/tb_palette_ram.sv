// tb_palette_ram: writes random entries into palette_ram through the VRAM write bundle,
// interleaved with writes to other regions at the same offsets (which must
// be ignored), then reads every written entry back and compares it with a
// shadow copy kept by the testbench.  Also checks the one-clock read
// latency: the read data must change only on the clock after the address.
module tb_palette_ram;
  import ppu_pkg::*;
  logic clk = 1'b0;
  vram_wr_t wr = '0;
  logic [12-1:0] rd_addr = '0;
  rgb_t rd_data;
  int checks = 0, failures = 0;
  rgb_t shadow [int];

  palette_ram dut (.clk, .wr, .rd_addr, .rd_data(rd_data));
  always #5 clk = ~clk;

  task automatic put(input region_e r, input logic [17:0] off, input logic [23:0] d);
    @(negedge clk);
    wr = '{we: 1'b1, region: r, offset: off, data: d};
    @(negedge clk);
    wr.we = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int a; logic [23:0] d;
      a = int'($urandom_range(4096 - 1));
      d = 24'($urandom);
      put(REG_PALETTE, 18'(a), d);
      shadow[a] = d;
      // same offset, other region: must not land here
      put(region_e'((3'(REG_PALETTE) + 3'(1 + i % 4)) % 5), 18'(a), ~d);
    end
    foreach (shadow[a]) begin
      @(negedge clk);
      rd_addr = 12'(a);
      @(negedge clk);
      checks++;
      if (rd_data !== shadow[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, rd_data, shadow[a]);
      end
    end
    // latency: new address, data unchanged before the clock edge
    begin
      int a0, a1;
      a0 = -1; a1 = -1;
      foreach (shadow[a]) begin
        if (a0 < 0) a0 = a;
        else if (a1 < 0 && shadow[a] != shadow[a0]) a1 = a;
      end
      @(negedge clk) rd_addr = 12'(a0);
      @(negedge clk) rd_addr = 12'(a1);
      #1 checks++;
      if (rd_data !== shadow[a0]) failures++;
      @(negedge clk) checks++;
      if (rd_data !== shadow[a1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
