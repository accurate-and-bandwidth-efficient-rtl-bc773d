// mult_array: first pipeline stage of the computation unit.
//
// LANES x CH x NT signed multipliers.  The feature window (CH channels x NT taps)
// is broadcast to every output lane; each lane has its own weights.  All products
// are captured in the intermediate data register on the clock edge after
// valid_i, together with the valid flag and an opaque sideband tag.  The
// broadcast of features and the register after the multipliers follow the
// published computation unit; the array shape is this design's choice.
module mult_array
  import fsrcnn_pkg::*;
#(
  parameter int unsigned LANES = 4,
  parameter int unsigned CH    = 4,
  parameter int unsigned NT    = TAPS,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  logic [TAG_W-1:0] tag_i,
  input  data_t            feat_i [CH][NT],
  input  wgt_t             wgt_i  [LANES][CH][NT],
  output logic             valid_o,
  output logic [TAG_W-1:0] tag_o,
  output prod_t            prod_o [LANES][CH][NT]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      tag_o   <= '0;
    end else begin
      valid_o <= valid_i;
      tag_o   <= tag_i;
    end
  end

  // Intermediate data register (no reset needed: qualified by valid_o).
  always_ff @(posedge clk) begin
    if (valid_i) begin
      for (int l = 0; l < LANES; l++)
        for (int c = 0; c < CH; c++)
          for (int t = 0; t < NT; t++)
            prod_o[l][c][t] <= prod_t'(feat_i[c][t]) * prod_t'(wgt_i[l][c][t]);
    end
  end
endmodule
