// feature_reg: the feature register that feeds the multiplier array.
//
// Holds one convolution window: NT taps, each a word of CH channels as read from
// the feature SRAM.  The controller writes one tap per cycle (we_i, slot_i,
// data_i) while it walks the window; the whole window is presented in parallel
// on win_o and stays stable until overwritten.  clr_i zeroes every slot (used at
// reset and when a new layer starts, so that unused taps of a smaller window
// hold zero).  The published design names this register; its organisation is this
// design's choice.
module feature_reg
  import fsrcnn_pkg::*;
#(
  parameter int unsigned CH = 4,
  parameter int unsigned NT = TAPS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr_i,
  input  logic                      we_i,
  input  logic [$clog2(NT)-1:0]     slot_i,
  input  data_t                     data_i [CH],
  output data_t                     win_o  [CH][NT]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < CH; c++)
        for (int t = 0; t < NT; t++) win_o[c][t] <= '0;
    end else if (clr_i) begin
      for (int c = 0; c < CH; c++)
        for (int t = 0; t < NT; t++) win_o[c][t] <= '0;
    end else if (we_i) begin
      for (int c = 0; c < CH; c++) win_o[c][slot_i] <= data_i[c];
    end
  end
endmodule
