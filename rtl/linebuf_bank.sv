// linebuf_bank: one bank of the sprite line buffer, a small simple
// dual-port RAM (one write port, one registered read port).
//
// The sprite engine splits each 640-pixel line into 16 such banks (bank =
// x mod 16, entry = x / 16) so that a 16-pixel sprite row at any X touches
// every bank exactly once and is written in a single clock.  Reads return
// the entry one clock after rd_addr; a read and a write of the same entry in
// one clock return the old value.  The banked line buffer is this
// implementation's own way of meeting the 256-sprite requirement; depth
// and width follow from the 640-pixel line and the 13-bit sprite pixel.
module linebuf_bank #(
  parameter int unsigned DEPTH = 40,
  parameter int unsigned WIDTH = 13
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
