// ppu_regs: the CPU's memory-mapped window into the PPU.
//
// A word-addressed 32-bit slave port (Avalon-MM style: address, write,
// writedata, read, readdata with a fixed read latency of one cycle) holds six
// registers:
//   0 CTRL      bit0 = auto increment
//   1 VADDR     VRAM address {region[2:0], offset[17:0]} (see ppu_pkg)
//   2 VDATA     write only: the data is stored at VADDR; with auto increment
//               on, VADDR then steps by one so a stream of VDATA writes
//               fills consecutive entries without touching VADDR
//   3 SCROLL_X  background scroll, 0..1279 (larger values are reduced by 1280)
//   4 SCROLL_Y  background scroll, 0..959  (larger values are reduced by 960)
//   5 STATUS    read only: bit0 = VBLANK, bits 31:16 = frame counter
// A VDATA write leaves as one vram_wr cycle in the cycle after the bus write.
// Reading VDATA returns 0: VRAM is write only from the CPU.
//
// Memory-mapped access, the auto-increment option and a VBLANK flag the CPU
// can see are the design's; the register layout, the one-entry-per-write
// data port and the frame counter are this implementation's choices.
module ppu_regs
  import ppu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU port
  input  logic [2:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  // raster state
  input  logic        vblank,
  input  logic        frame_start,
  // to the memories and renderers
  output vram_wr_t    vram_wr,
  output logic [10:0] scroll_x,
  output logic [9:0]  scroll_y
);
  logic               autoinc;
  logic [VADDR_W-1:0] vaddr;
  logic [15:0]        frame_cnt;

  // reduce a written scroll value into the 4-screen world
  function automatic logic [10:0] wrap_x(input logic [10:0] v);
    return (v >= 11'(WORLD_W)) ? v - 11'(WORLD_W) : v;
  endfunction
  function automatic logic [9:0] wrap_y(input logic [9:0] v);
    return (v >= 10'(WORLD_H)) ? v - 10'(WORLD_H) : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      autoinc   <= 1'b0;
      vaddr     <= '0;
      scroll_x  <= '0;
      scroll_y  <= '0;
      frame_cnt <= '0;
      vram_wr   <= '0;
    end else begin
      vram_wr.we <= 1'b0;
      if (frame_start) frame_cnt <= frame_cnt + 16'd1;
      if (avs_write) begin
        unique case (avs_address)
          R_CTRL:     autoinc  <= avs_writedata[0];
          R_VADDR:    vaddr    <= avs_writedata[VADDR_W-1:0];
          R_VDATA: begin
            vram_wr.we     <= 1'b1;
            vram_wr.region <= region_e'(vaddr[VADDR_W-1 -: 3]);
            vram_wr.offset <= vaddr[17:0];
            vram_wr.data   <= avs_writedata[23:0];
            if (autoinc) vaddr <= vaddr + 1'b1;
          end
          R_SCROLL_X: scroll_x <= wrap_x(avs_writedata[10:0]);
          R_SCROLL_Y: scroll_y <= wrap_y(avs_writedata[9:0]);
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) avs_readdata <= '0;
    else if (avs_read) begin
      unique case (avs_address)
        R_CTRL:     avs_readdata <= {31'd0, autoinc};
        R_VADDR:    avs_readdata <= 32'(vaddr);
        R_SCROLL_X: avs_readdata <= 32'(scroll_x);
        R_SCROLL_Y: avs_readdata <= 32'(scroll_y);
        R_STATUS:   avs_readdata <= {frame_cnt, 15'd0, vblank};
        default:    avs_readdata <= '0;
      endcase
    end
  end

  // a bus cycle is either a read or a write
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
                             !(avs_read && avs_write))
    else $error("ppu_regs: read and write in the same cycle");
endmodule
