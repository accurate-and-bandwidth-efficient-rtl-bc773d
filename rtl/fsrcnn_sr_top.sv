// fsrcnn_sr_top: FSRCNN super-resolution engine with layer fusion, dynamic
// quantization and deconvolution-as-convolution.
//
// The FSRCNN(d,s,m) network (defaults d=56, s=12, m=4, upscaling x2/x3/x4) is run
// as two fused groups, the 6-2 split: group 0 = feature extraction, shrinking and
// the four mapping layers; group 1 = expanding and the deconvolution.  A run
// (start_i) processes one tile of one group: the tile's pixels arrive on the
// 128-bit input bus, the intermediate maps of the group stay in the two on-chip
// feature SRAM banks, the weights and per-layer parameters stream in over the
// same bus as each output-channel group is computed, and the group's result
// leaves on the 128-bit output bus.  The host stores group 0's 12-channel output
// (one beat per pixel) and feeds it back as group 1's input tile.
//
// Blocks: fusion_ctrl (sequencing), two feature_sram banks, feature_reg,
// weight_reg (with deconv_remap), param_reg and compute_unit (mult_array,
// adder_tree, quant_shift, prelu_shift; output_pack sits in the controller).
//
// Input stream order for one run: tile_h*tile_w pixel beats (row-major); then for
// every layer of the group and every output-channel group of G channels: one
// parameter beat followed by that group's weight beats (see weight_reg).
// Output: one beat per output pixel (row-major); for group 1 each beat is an
// s x s block of 8-bit high-resolution pixels.  done_o pulses at the end.
// All inputs are registered on the rising clock edge; rst_n is asynchronous,
// active low.
// Lint notes: weight_reg's busy_o is left unused (the controller waits on done_o
// instead); rst_n is sampled synchronously only by assertions in fusion_ctrl.
module fsrcnn_sr_top
  import fsrcnn_pkg::*;
#(
  parameter int unsigned D     = 56,    // feature-extraction / expanding channels
  parameter int unsigned S     = 12,    // shrunk channels
  parameter int unsigned M     = 4,     // mapping layers
  parameter int unsigned G     = 4,     // channels per pass and output lanes
  parameter int unsigned DEPTH = 3584   // words per feature SRAM bank
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  logic             group_i,     // 0: first six layers, 1: last two
  input  logic [2:0]       scale_i,     // upscaling factor 2, 3 or 4
  input  logic [6:0]       tile_h_i,    // input tile height incl. halo
  input  logic [6:0]       tile_w_i,    // input tile width incl. halo
  output logic             busy_o,
  output logic             done_o,
  input  logic             in_valid_i,
  output logic             in_ready_o,
  input  logic [BUS_W-1:0] in_data_i,
  output logic             out_valid_o,
  input  logic             out_ready_i,
  output logic [BUS_W-1:0] out_data_o,
  output logic [31:0]      n_passes_o,  // computation-unit passes issued
  output logic [31:0]      n_layers_o   // layers completed
);
  localparam int unsigned CIN_MAX = (D > S) ? D : S;
  localparam int unsigned NIGM    = (CIN_MAX + G - 1) / G;
  localparam int unsigned AW      = $clog2(DEPTH);

  logic        prm_load, w_start, w_in_valid, w_in_ready, w_done, w_busy;
  layer_desc_t w_desc;
  logic [4:0]  w_og;
  logic [2:0]  w_scale;
  logic [$clog2(NIGM+1)-1:0] w_ig;
  logic        fr_clr, fr_we;
  logic [$clog2(TAPS)-1:0] fr_slot;
  data_t       fr_data [G];
  data_t       win [G][TAPS];
  wgt_t        wgt [G][G][TAPS];
  logic        cu_valid, cu_first, cu_last, cu_prelu, cu_out_valid, cu_busy;
  logic [AW-1:0] cu_tag, cu_tag_out;
  data_t       cu_out [G];
  logic [5:0]  shift;
  chan_param_t chp [G];
  logic [1:0]  sr_we, sr_re;
  logic [AW-1:0] sr_waddr, sr_raddr;
  logic [G*DW-1:0] sr_wdata;
  logic [G*DW-1:0] sr_rdata [2];

  fusion_ctrl #(.D(D), .S(S), .M(M), .G(G), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n,
    .start_i, .group_i, .scale_i, .tile_h_i, .tile_w_i, .busy_o, .done_o,
    .in_valid_i, .in_ready_o, .in_data_i, .out_valid_o, .out_ready_i, .out_data_o,
    .prm_load_o(prm_load),
    .w_start_o(w_start), .w_desc_o(w_desc), .w_og_o(w_og), .w_scale_o(w_scale), .w_in_valid_o(w_in_valid),
    .w_in_ready_i(w_in_ready), .w_done_i(w_done), .w_ig_o(w_ig),
    .fr_clr_o(fr_clr), .fr_we_o(fr_we), .fr_slot_o(fr_slot), .fr_data_o(fr_data),
    .cu_valid_o(cu_valid), .cu_first_o(cu_first), .cu_last_o(cu_last), .cu_tag_o(cu_tag),
    .cu_prelu_o(cu_prelu), .cu_out_valid_i(cu_out_valid), .cu_tag_i(cu_tag_out),
    .cu_out_i(cu_out), .cu_busy_i(cu_busy),
    .sr_we_o(sr_we), .sr_waddr_o(sr_waddr), .sr_wdata_o(sr_wdata),
    .sr_re_o(sr_re), .sr_raddr_o(sr_raddr), .sr_rdata_i(sr_rdata),
    .n_passes_o, .n_layers_o
  );

  for (genvar b = 0; b < 2; b++) begin : g_bank
    feature_sram #(.WORD_CH(G), .DEPTH(DEPTH)) u_sram (
      .clk, .we_i(sr_we[b]), .waddr_i(sr_waddr), .wdata_i(sr_wdata),
      .re_i(sr_re[b]), .raddr_i(sr_raddr), .rdata_o(sr_rdata[b]));
  end

  feature_reg #(.CH(G), .NT(TAPS)) u_freg (
    .clk, .rst_n, .clr_i(fr_clr), .we_i(fr_we), .slot_i(fr_slot), .data_i(fr_data),
    .win_o(win));

  weight_reg #(.LANES(G), .CH(G), .CIN_MAX(CIN_MAX), .NT(TAPS)) u_wreg (
    .clk, .rst_n, .start_i(w_start), .desc_i(w_desc), .og_i(w_og), .scale_i(w_scale),
    .in_valid_i(w_in_valid), .in_ready_o(w_in_ready), .in_data_i(in_data_i),
    .busy_o(w_busy), .done_o(w_done), .ig_i(w_ig), .wgt_o(wgt));

  param_reg #(.LANES(G)) u_preg (
    .clk, .rst_n, .load_i(prm_load), .beat_i(in_data_i), .shift_o(shift), .chp_o(chp));

  compute_unit #(.LANES(G), .CH(G), .NT(TAPS), .TAG_W(AW)) u_cu (
    .clk, .rst_n, .in_valid_i(cu_valid), .first_i(cu_first), .last_i(cu_last),
    .tag_i(cu_tag), .feat_i(win), .wgt_i(wgt), .shift_i(shift), .prelu_en_i(cu_prelu),
    .chp_i(chp), .out_valid_o(cu_out_valid), .tag_o(cu_tag_out), .out_o(cu_out),
    .busy_o(cu_busy));
endmodule
