// compute_unit: the pipelined computation unit.
//
// Stage 1 (mult_array): LANES x CH x NT multipliers, the feature window broadcast
// to all lanes, products held in the intermediate data register.
// Stage 2: per lane, a filter-wise adder tree per input channel (NT products)
// and a channel-wise adder tree over the CH channels; the lane sum is added to
// the lane's accumulator (cleared when first_i was set), which carries the sum
// across the input-channel groups of one output pixel.
// Output stage: when the pass flagged last_i reaches the accumulator, each lane
// goes through the weight-factor shift adder (quant_shift) and the PReLU shift
// adder (prelu_shift) and the result is registered on out_o with out_valid_o.
// Latency: out_valid_o rises 3 cycles after the in_valid_i of a last pass.  A
// new pass may be issued every cycle.  tag_i travels with each pass (the
// controller uses it for the write address).  busy_o is high while any pass is
// in flight.  The two-stage multiplier/adder-tree pipeline and the two shift
// adders follow the published design; the accumulator across channel groups is this
// design's addition, needed because one pass covers only CH input channels.
module compute_unit
  import fsrcnn_pkg::*;
#(
  parameter int unsigned LANES = 4,
  parameter int unsigned CH    = 4,
  parameter int unsigned NT    = TAPS,
  parameter int unsigned TAG_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid_i,
  input  logic             first_i,
  input  logic             last_i,
  input  logic [TAG_W-1:0] tag_i,
  input  data_t            feat_i [CH][NT],
  input  wgt_t             wgt_i  [LANES][CH][NT],
  input  logic [5:0]       shift_i,
  input  logic             prelu_en_i,
  input  chan_param_t      chp_i [LANES],
  output logic             out_valid_o,
  output logic [TAG_W-1:0] tag_o,
  output data_t            out_o [LANES],
  output logic             busy_o
);
  localparam int unsigned FW = $bits(prod_t) + $clog2(NT) + 1;   // filter-wise sum
  localparam int unsigned CW = FW + $clog2(CH) + 1;              // channel-wise sum

  // ---- stage 1 ----
  logic             s1_valid;
  logic [TAG_W+1:0] s1_tag;
  prod_t            prod [LANES][CH][NT];

  mult_array #(.LANES(LANES), .CH(CH), .NT(NT), .TAG_W(TAG_W+2)) u_mul (
    .clk, .rst_n,
    .valid_i(in_valid_i), .tag_i({first_i, last_i, tag_i}),
    .feat_i, .wgt_i,
    .valid_o(s1_valid), .tag_o(s1_tag), .prod_o(prod)
  );

  // ---- stage 2: adder trees and accumulation ----
  logic signed [FW-1:0] fsum [LANES][CH];
  logic signed [CW-1:0] csum [LANES];
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    for (genvar c = 0; c < CH; c++) begin : g_ch
      adder_tree #(.N(NT), .IW($bits(prod_t)), .OW(FW)) u_ftree (
        .in_i(prod[l][c]), .sum_o(fsum[l][c]));
    end
    adder_tree #(.N(CH), .IW(FW), .OW(CW)) u_ctree (.in_i(fsum[l]), .sum_o(csum[l]));
  end

  acc_t             acc [LANES];
  logic             s2_valid, s2_last;
  logic [TAG_W-1:0] s2_tag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_last  <= 1'b0;
      s2_tag   <= '0;
      for (int l = 0; l < LANES; l++) acc[l] <= '0;
    end else begin
      s2_valid <= s1_valid;
      s2_last  <= s1_valid & s1_tag[TAG_W];
      if (s1_valid) begin
        s2_tag <= s1_tag[TAG_W-1:0];
        for (int l = 0; l < LANES; l++)
          acc[l] <= (s1_tag[TAG_W+1] ? '0 : acc[l]) + acc_t'(csum[l]);
      end
    end
  end

  // ---- output stage: weight-factor shift adder, PReLU shift adder ----
  data_t q [LANES];
  data_t r [LANES];
  for (genvar l = 0; l < LANES; l++) begin : g_post
    quant_shift u_q (.acc_i(acc[l]), .shift_i, .bias_i(chp_i[l].bias), .q_o(q[l]));
    prelu_shift u_p (.x_i(q[l]), .en_i(prelu_en_i), .slope_i(chp_i[l].slope), .y_o(r[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      tag_o       <= '0;
      for (int l = 0; l < LANES; l++) out_o[l] <= '0;
    end else begin
      out_valid_o <= s2_last;
      if (s2_last) begin
        tag_o <= s2_tag;
        for (int l = 0; l < LANES; l++) out_o[l] <= r[l];
      end
    end
  end

  assign busy_o = in_valid_i | s1_valid | s2_valid | s2_last;
endmodule
