// fusion_ctrl: controller of the layer-fused engine.
//
// One run processes one tile through one fused layer group (group 0: feature
// extraction, shrinking and the mapping layers; group 1: expanding and the
// deconvolution).  Everything between the first and last layer of a group stays
// in the two on-chip feature SRAM banks, which alternate as source and
// destination from layer to layer; only the tile's input and the group's output
// cross the bus.  Sequence of a run, started by start_i:
//   1. load   tile_h x tile_w input pixels, one 128-bit beat per pixel holding
//             its channels (10 bits each, channel c at bits 10c+9:10c), into bank 0;
//   2. per layer and per output-channel group og (LANES output channels):
//             take one parameter beat (param_reg), load the group's weights from
//             the bus (weight_reg), then for every output pixel and every input
//             channel group gather the KxK window from the source bank into the
//             feature register (one tap per cycle) and issue a pass to the
//             computation unit; its results are written to the destination bank;
//             the pipeline is drained before the next group's parameters load;
//   3. stream the last layer's map out, one beat per pixel, via output_pack.
// Convolutions are "valid": a layer with a KxK window shrinks the map by K-1, so
// the host supplies tiles with their halo.  SRAM word address of channel group g,
// row y, column x of an h x w map: (g*h + y)*w + x.
// The fusion split, the bus traffic pattern and the per-layer quantisation
// follow the published design; the loop order, the one-tap-per-cycle gather and the
// beat formats are this design's choices.
// Lint notes: rst_n is also sampled synchronously, but only by the two
// simulation assertions at the end (disable iff), never by logic.  The unused
// upper bits of the gather pipeline tag p2 (addr, ig) are consumed at stage p1.
module fusion_ctrl
  import fsrcnn_pkg::*;
#(
  parameter int unsigned D     = 56,
  parameter int unsigned S     = 12,
  parameter int unsigned M     = 4,
  parameter int unsigned G     = 4,
  parameter int unsigned DEPTH = 3584,
  parameter int unsigned NV    = 16,
  localparam int unsigned CIN_MAX = (D > S) ? D : S,
  localparam int unsigned NIGM = (CIN_MAX + G - 1) / G,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // run control
  input  logic               start_i,
  input  logic               group_i,
  input  logic [2:0]         scale_i,
  input  logic [6:0]         tile_h_i,
  input  logic [6:0]         tile_w_i,
  output logic               busy_o,
  output logic               done_o,
  // bus: read (into the chip) and write (out of the chip)
  input  logic               in_valid_i,
  output logic               in_ready_o,
  input  logic [BUS_W-1:0]   in_data_i,
  output logic               out_valid_o,
  input  logic               out_ready_i,
  output logic [BUS_W-1:0]   out_data_o,
  // parameter register
  output logic               prm_load_o,
  // weight register
  output logic               w_start_o,
  output layer_desc_t        w_desc_o,
  output logic [4:0]         w_og_o,
  output logic [2:0]         w_scale_o,
  output logic               w_in_valid_o,
  input  logic               w_in_ready_i,
  input  logic               w_done_i,
  output logic [$clog2(NIGM+1)-1:0] w_ig_o,
  // feature register
  output logic               fr_clr_o,
  output logic               fr_we_o,
  output logic [$clog2(TAPS)-1:0] fr_slot_o,
  output data_t              fr_data_o [G],
  // computation unit
  output logic               cu_valid_o,
  output logic               cu_first_o,
  output logic               cu_last_o,
  output logic [AW-1:0]      cu_tag_o,
  output logic               cu_prelu_o,
  input  logic               cu_out_valid_i,
  input  logic [AW-1:0]      cu_tag_i,
  input  data_t              cu_out_i [G],
  input  logic               cu_busy_i,
  // feature SRAM banks
  output logic [1:0]         sr_we_o,
  output logic [AW-1:0]      sr_waddr_o,
  output logic [G*DW-1:0]    sr_wdata_o,
  output logic [1:0]         sr_re_o,
  output logic [AW-1:0]      sr_raddr_o,
  input  logic [G*DW-1:0]    sr_rdata_i [2],
  // event counters for observation
  output logic [31:0]        n_passes_o,
  output logic [31:0]        n_layers_o
);
  typedef enum logic [3:0] {
    S_IDLE, S_LDPIX, S_LAYER, S_PARAM, S_WSTART, S_WLOAD, S_GATHER, S_DRAIN,
    S_OUT_RD, S_OUT_WAIT, S_OUT_SEND, S_DONE
  } state_e;
  state_e state;

  logic        grp;
  logic [2:0]  scale;
  logic [6:0]  h, w, ho, wo;
  logic [3:0]  lidx, nlay;
  layer_desc_t desc;
  logic [4:0]  og, nog;
  logic [4:0]  ig, nig;
  logic [6:0]  y, x;
  logic [2:0]  ky, kx;
  logic        src;             // bank holding the current layer's input
  logic [12:0] p;               // pixel counter (load / output)
  logic [4:0]  g;               // word counter within a pixel
  logic        have_beat;
  logic [BUS_W-1:0] beat;

  layer_desc_t tdesc;
  logic [3:0]  tnlay;
  layer_table #(.D(D), .S(S), .M(M)) u_tab (
    .group_i(grp), .idx_i(lidx), .scale_i(scale), .desc_o(tdesc), .nlayers_o(tnlay));

  // ---- gather pipeline: p1 = read issued, p2 = window complete ----
  typedef struct packed {
    logic          v;
    logic [4:0]    slot;
    logic          last_tap;
    logic          first;
    logic          last;
    logic [AW-1:0] addr;
    logic [4:0]    ig;
  } gtag_t;
  gtag_t gi, p1, p2;

  logic last_tap, last_ig, last_x, last_y;
  always_comb begin
    last_tap = (kx == desc.k - 3'd1) && (ky == desc.k - 3'd1);
    last_ig  = (ig == nig - 5'd1);
    last_x   = (x == wo - 7'd1);
    last_y   = (y == ho - 7'd1);
    gi.v        = (state == S_GATHER);
    gi.slot     = 5'(int'(ky) * int'(desc.k) + int'(kx));
    gi.last_tap = last_tap;
    gi.first    = (ig == 5'd0);
    gi.last     = last_ig;
    gi.addr     = AW'((int'(og) * int'(ho) + int'(y)) * int'(wo) + int'(x));
    gi.ig       = ig;
  end

  // ---- output collection ----
  data_t       vals [NV];
  logic        orv;
  logic [4:0]  org;
  logic [BUS_W-1:0] packed_beat;
  output_pack #(.NV(NV)) u_pack (
    .vals_i(vals), .deconv_i(desc.kind == L_DECONV), .scale_i(scale), .beat_o(packed_beat));

  // ---- combinational outputs ----
  always_comb begin
    busy_o       = (state != S_IDLE);
    in_ready_o   = 1'b0;
    w_in_valid_o = 1'b0;
    prm_load_o   = 1'b0;
    case (state)
      S_LDPIX: in_ready_o = !have_beat;
      S_PARAM: begin in_ready_o = 1'b1; prm_load_o = in_valid_i; end
      S_WLOAD: begin in_ready_o = w_in_ready_i; w_in_valid_o = in_valid_i; end
      default: ;
    endcase
    w_start_o = (state == S_WSTART);
    w_desc_o  = desc;
    w_og_o    = og;
    w_scale_o = scale;
    w_ig_o    = ($clog2(NIGM+1))'(p2.ig);
    fr_clr_o  = (state == S_LAYER);
    fr_we_o   = p1.v;
    fr_slot_o = ($clog2(TAPS))'(p1.slot);
    for (int c = 0; c < G; c++) fr_data_o[c] = data_t'(sr_rdata_i[src][c*DW +: DW]);
    cu_valid_o = p2.v;
    cu_first_o = p2.first;
    cu_last_o  = p2.last;
    cu_tag_o   = p2.addr;
    cu_prelu_o = desc.prelu;
    // SRAM write: pixel load into bank 0, results into the destination bank
    sr_we_o    = '0;
    sr_waddr_o = '0;
    sr_wdata_o = '0;
    if (state == S_LDPIX && have_beat) begin
      sr_we_o[0] = 1'b1;
      sr_waddr_o = AW'(int'(g) * int'(h) * int'(w) + int'(p));
      for (int c = 0; c < G; c++)
        if (int'(g) * G + c < int'(desc.cin) && int'(g) * G + c < BUS_W / DW)
          sr_wdata_o[c*DW +: DW] = beat[(int'(g) * G + c) * DW +: DW];
    end else if (cu_out_valid_i) begin
      sr_we_o[!src] = 1'b1;
      sr_waddr_o    = cu_tag_i;
      for (int c = 0; c < G; c++) sr_wdata_o[c*DW +: DW] = cu_out_i[c];
    end
    // SRAM read: window gather or output streaming
    sr_re_o    = '0;
    sr_raddr_o = '0;
    if (state == S_GATHER) begin
      sr_re_o[src] = 1'b1;
      sr_raddr_o   = AW'((int'(ig) * int'(h) + int'(y) + int'(ky)) * int'(w) + int'(x) + int'(kx));
    end else if (state == S_OUT_RD) begin
      sr_re_o[src] = 1'b1;
      sr_raddr_o   = AW'(int'(g) * int'(h) * int'(w) + int'(p));
    end
    out_valid_o = (state == S_OUT_SEND);
    out_data_o  = packed_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      grp <= 1'b0; scale <= 3'd2; h <= '0; w <= '0; ho <= '0; wo <= '0;
      lidx <= '0; nlay <= '0; desc <= '0; og <= '0; nog <= '0; ig <= '0; nig <= '0;
      y <= '0; x <= '0; ky <= '0; kx <= '0; src <= 1'b0; p <= '0; g <= '0;
      have_beat <= 1'b0; beat <= '0; p1 <= '0; p2 <= '0; orv <= 1'b0; org <= '0;
      done_o <= 1'b0; n_passes_o <= '0; n_layers_o <= '0;
      for (int i = 0; i < NV; i++) vals[i] <= '0;
    end else begin
      done_o <= 1'b0;
      p1 <= gi;
      p2 <= '0;
      p2.v     <= p1.v & p1.last_tap;
      p2.first <= p1.first;
      p2.last  <= p1.last;
      p2.addr  <= p1.addr;
      p2.ig    <= p1.ig;
      if (p2.v) n_passes_o <= n_passes_o + 32'd1;
      // output word capture (one cycle after the read)
      orv <= (state == S_OUT_RD);
      org <= g;
      if (orv)
        for (int c = 0; c < G; c++)
          if (int'(org) * G + c < NV) vals[int'(org) * G + c] <= data_t'(sr_rdata_i[src][c*DW +: DW]);

      case (state)
        S_IDLE: if (start_i) begin
          grp   <= group_i;
          scale <= scale_i;
          h     <= tile_h_i;
          w     <= tile_w_i;
          lidx  <= '0;
          src   <= 1'b0;
          p     <= '0;
          g     <= '0;
          have_beat <= 1'b0;
          state <= S_LDPIX;
        end
        S_LDPIX: begin
          desc <= tdesc;    // layer 0 descriptor: its cin sets the word count
          nig  <= 5'((int'(tdesc.cin) + G - 1) / G);
          if (!have_beat) begin
            g <= '0;
            if (in_valid_i) begin
              beat      <= in_data_i;
              have_beat <= 1'b1;
            end
          end else begin
            if (g == nig - 5'd1) begin
              g         <= '0;
              have_beat <= 1'b0;
              p         <= p + 13'd1;
              if (int'(p) == int'(h) * int'(w) - 1) state <= S_LAYER;
            end else g <= g + 5'd1;
          end
        end
        S_LAYER: begin
          desc  <= tdesc;
          nlay  <= tnlay;
          ho    <= h - 7'(tdesc.k) + 7'd1;
          wo    <= w - 7'(tdesc.k) + 7'd1;
          nog   <= 5'((int'(tdesc.cout) + G - 1) / G);
          nig   <= 5'((int'(tdesc.cin) + G - 1) / G);
          og    <= '0;
          state <= S_PARAM;
        end
        S_PARAM: if (in_valid_i) state <= S_WSTART;
        S_WSTART: state <= S_WLOAD;
        S_WLOAD: if (w_done_i) begin
          y <= '0; x <= '0; ig <= '0; ky <= '0; kx <= '0;
          state <= S_GATHER;
        end
        S_GATHER: begin
          if (kx != desc.k - 3'd1) kx <= kx + 3'd1;
          else begin
            kx <= '0;
            if (ky != desc.k - 3'd1) ky <= ky + 3'd1;
            else begin
              ky <= '0;
              if (!last_ig) ig <= ig + 5'd1;
              else begin
                ig <= '0;
                if (!last_x) x <= x + 7'd1;
                else begin
                  x <= '0;
                  if (!last_y) y <= y + 7'd1;
                  else begin
                    y <= '0;
                    state <= S_DRAIN;
                  end
                end
              end
            end
          end
        end
        S_DRAIN: if (!p1.v && !p2.v && !cu_busy_i && !cu_out_valid_i) begin
          if (og != nog - 5'd1) begin
            og    <= og + 5'd1;
            state <= S_PARAM;
          end else begin
            n_layers_o <= n_layers_o + 32'd1;
            src  <= !src;
            h    <= ho;
            w    <= wo;
            p    <= '0;
            g    <= '0;
            if (lidx == nlay - 4'd1) state <= S_OUT_RD;
            else begin
              lidx  <= lidx + 4'd1;
              state <= S_LAYER;
            end
          end
        end
        S_OUT_RD: begin
          if (g == nog - 5'd1) state <= S_OUT_WAIT;
          else g <= g + 5'd1;
        end
        S_OUT_WAIT: state <= S_OUT_SEND;
        S_OUT_SEND: if (out_ready_i) begin
          g <= '0;
          if (int'(p) == int'(h) * int'(w) - 1) state <= S_DONE;
          else begin
            p     <= p + 13'd1;
            state <= S_OUT_RD;
          end
        end
        S_DONE: begin
          done_o <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A write of a result and a pixel load never coincide: results only flow
  // while layers run.
  assert property (@(posedge clk) disable iff (!rst_n) !(state == S_LDPIX && cu_out_valid_i));
  assert property (@(posedge clk) disable iff (!rst_n) out_valid_o && !out_ready_i |=> out_valid_o && $stable(out_data_o));
endmodule
