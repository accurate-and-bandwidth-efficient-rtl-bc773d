// feature_sram: one bank of the on-chip feature-map buffer.
//
// Simple dual-port memory: one write port and one read port with a registered
// (one-cycle) read, the usual behaviour of an SRAM macro.  A word holds WORD_CH
// activations of one pixel (one channel group).  The engine uses two banks as a
// ping-pong pair: a layer reads its input from one bank and writes its output to
// the other, so fused layers never leave the chip.  Written as an array so that
// synthesis maps it to a memory.  The published design places an SRAM in the
// architecture; the bank count, word shape and depth (one 20x20 tile's largest
// intermediate map, 16x16 pixels x 56 channels) are this design's choices.
module feature_sram
  import fsrcnn_pkg::*;
#(
  parameter int unsigned WORD_CH = 4,
  parameter int unsigned DEPTH   = 3584,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we_i,
  input  logic [AW-1:0]     waddr_i,
  input  logic [WORD_CH*DW-1:0] wdata_i,
  input  logic              re_i,
  input  logic [AW-1:0]     raddr_i,
  output logic [WORD_CH*DW-1:0] rdata_o
);
  logic [WORD_CH*DW-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    if (re_i) rdata_o <= mem[raddr_i];
  end
endmodule
