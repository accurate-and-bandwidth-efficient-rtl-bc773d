// weight_reg: the weight register, loaded from the bus one output-channel group
// at a time.
//
// start_i (with the layer descriptor, the output-channel group og_i and the
// scale) clears the register and begins a load.  Weights then arrive as 128-bit
// beats of twelve 10-bit weights (weight j in bits [10j+9:10j]); the block
// unpacks one weight per cycle.  For an ordinary layer the order is lane, then
// input channel, then the K*K taps row-major, for the lanes og*LANES.. that exist
// (fewer in a last, partial group).  For the deconvolution every input channel's
// original 9x9 kernel is sent (row-major); deconv_remap places each tap into the
// sub-pixel kernel of its phase, and taps of phases outside the current group are
// dropped, so the same kernels are sent once per group.  Each group's weights
// start on a fresh beat; the unused tail of its last beat is discarded.  done_o
// pulses when the last weight is stored.  The compute side reads the weights of
// input-channel group ig_i as wgt_o[lane][ch][tap].  Loading one weight per cycle
// and the remapping at load time are this design's choices; the published design states
// that weights come over the bus and that the deconvolution is remapped.
// Lint note: the layer descriptor is stored whole; its kind, cout and prelu fields
// are not needed after the start of a load (deconv is kept as its own flag).
module weight_reg
  import fsrcnn_pkg::*;
#(
  parameter int unsigned LANES   = 4,
  parameter int unsigned CH      = 4,
  parameter int unsigned CIN_MAX = 56,
  parameter int unsigned NT      = TAPS,
  localparam int unsigned NIG    = (CIN_MAX + CH - 1) / CH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  layer_desc_t        desc_i,
  input  logic [4:0]         og_i,
  input  logic [2:0]         scale_i,
  input  logic               in_valid_i,
  output logic               in_ready_o,
  input  logic [BUS_W-1:0]   in_data_i,
  output logic               busy_o,
  output logic               done_o,
  input  logic [$clog2(NIG+1)-1:0] ig_i,
  output wgt_t               wgt_o [LANES][CH][NT]
);
  wgt_t wreg [LANES][NIG*CH][NT];
  localparam int unsigned LIW = (LANES > 1) ? $clog2(LANES) : 1;     // lane index bits
  localparam int unsigned CIW = (NIG*CH > 1) ? $clog2(NIG*CH) : 1;   // channel index bits

  // load state
  logic               loading, deconv;
  layer_desc_t        desc;
  logic [4:0]         og;
  logic [2:0]         scale;
  logic [BUS_W-1:0]   beat;
  logic [3:0]         bcnt;          // weights left in the beat buffer
  logic [3:0]         bidx;          // next weight in the beat buffer
  logic [2:0]         lane;
  logic [6:0]         ic;
  logic [4:0]         ky, kx;        // window position (ordinary) or u, v (deconv)
  logic [2:0]         nlanes;

  logic [4:0] r_phase, r_tap;
  deconv_remap u_remap (.scale_i(scale), .u_i(ky[3:0]), .v_i(kx[3:0]),
                        .phase_o(r_phase), .tap_o(r_tap));

  wgt_t       w_cur;
  logic       last_w;
  logic [4:0] kmax;
  always_comb begin
    w_cur  = wgt_t'(beat[bidx*WW +: WW]);
    kmax   = deconv ? 5'(DK) : 5'(desc.k);
    last_w = (kx == kmax - 5'd1) && (ky == kmax - 5'd1) && (ic == desc.cin - 7'd1) &&
             (deconv || lane == nlanes - 3'd1);
  end

  assign in_ready_o = loading && (bcnt == 4'd0);
  assign busy_o     = loading;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loading <= 1'b0;
      deconv  <= 1'b0;
      desc    <= '0;
      og      <= '0;
      scale   <= 3'd2;
      beat    <= '0;
      bcnt    <= '0;
      bidx    <= '0;
      lane    <= '0;
      ic      <= '0;
      ky      <= '0;
      kx      <= '0;
      nlanes  <= '0;
      done_o  <= 1'b0;
      for (int l = 0; l < LANES; l++)
        for (int c = 0; c < NIG*CH; c++)
          for (int t = 0; t < NT; t++) wreg[l][c][t] <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_i) begin
        loading <= 1'b1;
        desc    <= desc_i;
        deconv  <= (desc_i.kind == L_DECONV);
        og      <= og_i;
        scale   <= scale_i;
        bcnt    <= '0;
        bidx    <= '0;
        lane    <= '0;
        ic      <= '0;
        ky      <= '0;
        kx      <= '0;
        nlanes  <= (int'(desc_i.cout) - int'(og_i) * LANES >= LANES) ? 3'(LANES)
                   : 3'(int'(desc_i.cout) - int'(og_i) * LANES);
        for (int l = 0; l < LANES; l++)
          for (int c = 0; c < NIG*CH; c++)
            for (int t = 0; t < NT; t++) wreg[l][c][t] <= '0;
      end else if (loading) begin
        if (bcnt == 4'd0) begin
          if (in_valid_i) begin
            beat <= in_data_i;
            bcnt <= 4'(BEAT_WTS);
            bidx <= '0;
          end
        end else begin
          // store the current weight
          if (deconv) begin
            if (r_phase >= og * 5'(LANES) && r_phase < (og + 5'd1) * 5'(LANES))
              wreg[LIW'(r_phase - og * 5'(LANES))][CIW'(ic)][r_tap] <= w_cur;
          end else begin
            wreg[LIW'(lane)][CIW'(ic)][ky * 5'(desc.k) + kx] <= w_cur;
          end
          bcnt <= bcnt - 4'd1;
          bidx <= bidx + 4'd1;
          // advance: column, row, input channel, lane
          if (kx != kmax - 5'd1) kx <= kx + 5'd1;
          else begin
            kx <= '0;
            if (ky != kmax - 5'd1) ky <= ky + 5'd1;
            else begin
              ky <= '0;
              if (ic != desc.cin - 7'd1) ic <= ic + 7'd1;
              else begin
                ic   <= '0;
                lane <= lane + 3'd1;
              end
            end
          end
          if (last_w) begin
            loading <= 1'b0;
            bcnt    <= '0;
            done_o  <= 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++)
      for (int c = 0; c < CH; c++)
        for (int t = 0; t < NT; t++)
          wgt_o[l][c][t] = (int'(ig_i) * CH + c < NIG * CH) ? wreg[l][int'(ig_i) * CH + c][t] : '0;
  end
endmodule
