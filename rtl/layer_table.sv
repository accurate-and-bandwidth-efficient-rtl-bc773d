// layer_table: descriptors of the FSRCNN(d,s,m) layers for the two fused groups.
//
// The network is split as in the published 6-2 fusion: group 0 runs
// feature extraction Conv(5,d,1), shrinking Conv(1,s,d) and m mapping layers
// Conv(3,s,s) (6 layers for m=4); group 1 runs expanding Conv(1,d,s) and the
// DeConv(9,1,scale), the latter as scale^2 sub-pixel convolutions of size
// ceil(9/scale).  Every layer but the deconvolution ends in PReLU.  Given the
// group, the layer index inside it and the scale, it returns the descriptor and
// the group's layer count.  Combinational.
module layer_table
  import fsrcnn_pkg::*;
#(
  parameter int unsigned D = 56,
  parameter int unsigned S = 12,
  parameter int unsigned M = 4
) (
  input  logic        group_i,
  input  logic [3:0]  idx_i,
  input  logic [2:0]  scale_i,
  output layer_desc_t desc_o,
  output logic [3:0]  nlayers_o
);
  always_comb begin
    desc_o = '0;
    if (!group_i) begin
      nlayers_o = 4'(M + 2);
      if (idx_i == 4'd0)      desc_o = '{kind: L_FEATURE, k: 3'd5, cin: 7'd1,    cout: 7'(D), prelu: 1'b1};
      else if (idx_i == 4'd1) desc_o = '{kind: L_SHRINK,  k: 3'd1, cin: 7'(D),   cout: 7'(S), prelu: 1'b1};
      else                    desc_o = '{kind: L_MAP,     k: 3'd3, cin: 7'(S),   cout: 7'(S), prelu: 1'b1};
    end else begin
      nlayers_o = 4'd2;
      if (idx_i == 4'd0) desc_o = '{kind: L_EXPAND, k: 3'd1, cin: 7'(S), cout: 7'(D), prelu: 1'b1};
      else               desc_o = '{kind: L_DECONV, k: deconv_k(scale_i), cin: 7'(D),
                                    cout: 7'(scale_i * scale_i), prelu: 1'b0};
    end
  end
endmodule
