// tb_fsrcnn_sr_top: end-to-end test of the super-resolution engine at its
// default size (d=56, s=12, m=4, 4 lanes).
//
// Run 1 pushes a 20x20 low-resolution tile through the first fused group (six
// layers) and checks the 8x8x12 result.  That result is then fed back as the
// input tile of the second group (expanding + deconvolution) at x2, x3 and x4,
// and each high-resolution block is checked.  Weights, biases and PReLU slopes
// come from a hash function, so the stream and the reference agree without
// stored tables.  The reference computes every layer with plain loops, and the
// deconvolution as a true transposed convolution (scatter form), independent of
// the sub-pixel remapping the hardware uses.  Random input gaps and output
// back-pressure are applied; the count of computation passes is checked against
// the schedule's formula; saturation, negative PReLU inputs, multi-group
// accumulation and a partial last output group are counted and must occur.
`timescale 1ns/1ps
module tb_fsrcnn_sr_top;
  import fsrcnn_pkg::*;
  localparam int D = 56, S = 12, M = 4, G = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             start, group, busy, done;
  logic [2:0]       scale;
  logic [6:0]       th, tw;
  logic             in_valid, in_ready, out_valid, out_ready;
  logic [BUS_W-1:0] in_data, out_data;
  logic [31:0]      n_passes, n_layers;

  fsrcnn_sr_top dut (
    .clk, .rst_n, .start_i(start), .group_i(group), .scale_i(scale),
    .tile_h_i(th), .tile_w_i(tw), .busy_o(busy), .done_o(done),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_data_i(in_data),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_data_o(out_data),
    .n_passes_o(n_passes), .n_layers_o(n_layers));

  int checks = 0, failures = 0;
  int n_sat = 0, n_prelu_neg = 0, n_in_stall = 0, n_out_bp = 0, n_acc = 0, n_partial = 0;
  int n_group0 = 0, n_group1 = 0, n_x2 = 0, n_x3 = 0, n_x4 = 0;

  // ---------------- deterministic pseudo-random parameters ----------------
  function automatic int unsigned hsh(input int unsigned a);
    int unsigned h = a * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    return h;
  endfunction
  // layer numbers: 0..5 group 0, 6 expand, 7 deconv
  function automatic int wfun(int l, int oc, int ic, int ky, int kx);
    return int'(hsh(((l * 64 + oc) * 64 + ic) * 100 + ky * 10 + kx + 12345) % 127) - 63;
  endfunction
  function automatic int bfun(int l, int oc);
    return int'(hsh(l * 1000 + oc + 777) % 61) - 30;
  endfunction
  function automatic slope_t sfun(int l, int oc);
    int unsigned h = hsh(l * 1000 + oc + 999);
    slope_t s;
    s.e1 = h[0]; s.p1 = 4'(1 + h[3:1]); s.e2 = h[4]; s.p2 = 4'(2 + h[7:5]);
    return s;
  endfunction
  function automatic int shfun(int l);
    case (l)
      0: return 8;   1: return 10;  3: return 5;   6: return 7;   7: return 9;
      default: return 9;
    endcase
  endfunction
  function automatic int kfun(int l, int sc);
    if (l == 0) return 5;
    if (l == 1 || l == 6) return 1;
    if (l == 7) return 0;
    return 3;
  endfunction
  function automatic int cinf(int l);  return (l == 0) ? 1 : (l == 1 || l == 7) ? D : S; endfunction
  function automatic int coutf(int l, int sc); return (l == 0 || l == 6) ? D : (l == 7) ? sc*sc : S; endfunction

  // ---------------- reference arithmetic ----------------
  function automatic int quant(longint acc, int sh, int bias);
    longint r = (sh == 0) ? acc : ((acc + (longint'(1) <<< (sh - 1))) >>> sh);
    r = r + bias;
    if (r > 511) begin n_sat++; return 511; end
    if (r < -512) begin n_sat++; return -512; end
    return int'(r);
  endfunction
  function automatic int prelu(int x, slope_t s);
    int t;
    if (x >= 0) return x;
    n_prelu_neg++;
    t = (s.e1 ? (x >>> s.p1) : 0) + (s.e2 ? (x >>> s.p2) : 0);
    return (t < -512) ? -512 : t;
  endfunction

  int fa [D][20][20];   // reference maps (ping-pong)
  int fb [D][20][20];
  int g0out [S][20][20];
  int hr [64][64];

  // one convolution layer, fa -> fb, "valid" window
  task automatic ref_conv(input int l, input int h, input int w);
    int k = kfun(l, 0), cin = cinf(l), cout = coutf(l, 0);
    for (int oc = 0; oc < cout; oc++)
      for (int y = 0; y <= h - k; y++)
        for (int x = 0; x <= w - k; x++) begin
          longint acc = 0;
          for (int ic = 0; ic < cin; ic++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++)
                acc += longint'(fa[ic][y+ky][x+kx]) * wfun(l, oc, ic, ky, kx);
          fb[oc][y][x] = prelu(quant(acc, shfun(l), bfun(l, oc)), sfun(l, oc));
        end
    for (int oc = 0; oc < cout; oc++)
      for (int y = 0; y <= h - k; y++)
        for (int x = 0; x <= w - k; x++) fa[oc][y][x] = fb[oc][y][x];
  endtask

  // deconvolution as scatter: HR(Y,X) = sum in(iy,ix) W(u,v), s*iy+u = Y+9-s
  task automatic ref_deconv(input int sc, input int h, input int w);
    int k = (9 + sc - 1) / sc;
    int ho = h - k + 1, wo = w - k + 1;
    for (int Y = 0; Y < sc*ho; Y++)
      for (int X = 0; X < sc*wo; X++) begin
        longint acc = 0;
        int q;
        for (int c = 0; c < D; c++)
          for (int iy = 0; iy < h; iy++)
            for (int ix = 0; ix < w; ix++) begin
              int u = Y + 9 - sc - sc*iy, v = X + 9 - sc - sc*ix;
              if (u >= 0 && u <= 8 && v >= 0 && v <= 8)
                acc += longint'(fa[c][iy][ix]) * wfun(7, 0, c, u, v);
            end
        q = quant(acc, shfun(7), bfun(7, 0));
        hr[Y][X] = (q < 0) ? 0 : (q > 255) ? 255 : q;
      end
  endtask

  // ---------------- stream construction ----------------
  logic [BUS_W-1:0] q_in [$];
  int wcnt;
  logic [BUS_W-1:0] wbeat;
  task automatic push_w(input int val);
    wbeat[wcnt*10 +: 10] = 10'(val);
    wcnt++;
    if (wcnt == 12) begin q_in.push_back(wbeat); wbeat = '0; wcnt = 0; end
  endtask
  task automatic flush_w();
    if (wcnt != 0) begin q_in.push_back(wbeat); wbeat = '0; wcnt = 0; end
  endtask

  task automatic build_layer_stream(input int l, input int sc);
    int cout = coutf(l, sc), cin = cinf(l), k = kfun(l, sc);
    int nog = (cout + G - 1) / G;
    for (int og = 0; og < nog; og++) begin
      logic [BUS_W-1:0] pb = '0;
      pb[5:0] = 6'(shfun(l));
      for (int ln = 0; ln < G; ln++) begin
        int oc = og*G + ln;
        chan_param_t cp;
        cp.bias  = (l == 7) ? data_t'(bfun(7, 0)) : (oc < cout) ? data_t'(bfun(l, oc)) : '0;
        cp.slope = (oc < cout && l != 7) ? sfun(l, oc) : '0;
        pb[PB_LANE_OFS + ln*PB_LANE_W +: CHP_W] = cp;
      end
      q_in.push_back(pb);
      wcnt = 0; wbeat = '0;
      if (l == 7) begin
        for (int c = 0; c < cin; c++)
          for (int u = 0; u < 9; u++)
            for (int v = 0; v < 9; v++) push_w(wfun(7, 0, c, u, v));
      end else begin
        for (int ln = 0; ln < G && og*G + ln < cout; ln++)
          for (int ic = 0; ic < cin; ic++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) push_w(wfun(l, og*G + ln, ic, ky, kx));
      end
      flush_w();
      if (cout % G != 0 && og == nog - 1) n_partial++;
    end
  endtask

  // ---------------- bus driver and monitor ----------------
  logic [BUS_W-1:0] q_out [$];
  always @(negedge clk) begin
    in_valid  <= (q_in.size() > 0) && ($urandom_range(0, 9) < 8);
    in_data   <= (q_in.size() > 0) ? q_in[0] : '0;
    out_ready <= ($urandom_range(0, 9) < 7);
  end
  always @(posedge clk) begin
    if (in_valid && in_ready) void'(q_in.pop_front());
    if (in_ready && !in_valid && busy) n_in_stall++;
    if (out_valid && !out_ready) n_out_bp++;
    if (out_valid && out_ready) q_out.push_back(out_data);
    if (dut.u_cu.in_valid_i && !dut.u_cu.first_i) n_acc++;
  end

  task automatic run(input logic grp, input int sc, input int h, input int w);
    @(negedge clk);
    group = grp; scale = 3'(sc); th = 7'(h); tw = 7'(w); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  function automatic int expect_passes(input logic grp, input int sc, input int h, input int w);
    int n = 0, k, nog, nig;
    if (!grp) begin
      for (int l = 0; l < M + 2; l++) begin
        k = kfun(l, sc); h -= k - 1; w -= k - 1;
        nog = (coutf(l, sc) + G - 1) / G; nig = (cinf(l) + G - 1) / G;
        n += nog * nig * h * w;
      end
    end else begin
      nog = (D + G - 1) / G; nig = (S + G - 1) / G; n += nog * nig * h * w;
      k = (9 + sc - 1) / sc; h -= k - 1; w -= k - 1;
      nog = (sc*sc + G - 1) / G; nig = (D + G - 1) / G; n += nog * nig * h * w;
    end
    return n;
  endfunction

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p0, c0;
    start = 0; group = 0; scale = 3'd2; th = '0; tw = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- group 0: 20x20 tile, six fused layers, 8x8x12 out ----
    for (int y = 0; y < 20; y++)
      for (int x = 0; x < 20; x++) begin
        automatic logic [BUS_W-1:0] b = '0;
        fa[0][y][x] = int'(hsh(y * 20 + x + 4242) % 256);
        b[9:0] = 10'(fa[0][y][x]);
        q_in.push_back(b);
      end
    begin
      automatic int h = 20;
      for (int l = 0; l < M + 2; l++) begin
        build_layer_stream(l, 2);
        ref_conv(l, h, h);
        h -= kfun(l, 2) - 1;
      end
    end
    for (int c = 0; c < S; c++)
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) g0out[c][y][x] = fa[c][y][x];
    p0 = int'(n_passes); c0 = 0;
    fork
      run(1'b0, 2, 20, 20);
      begin while (!done) begin @(posedge clk); c0++; end end
    join
    n_group0++;
    $display("after g0: layers=%0d qout=%0d", n_layers, q_out.size());
    checks++;
    if (int'(n_passes) - p0 != expect_passes(1'b0, 2, 20, 20)) begin
      failures++; $display("group0 passes %0d expected %0d", int'(n_passes) - p0, expect_passes(1'b0, 2, 20, 20));
    end
    $display("group 0 run: %0d cycles, %0d passes", c0, int'(n_passes) - p0);
    checks++;
    if (q_out.size() != 64) begin failures++; $display("group0: %0d beats", q_out.size()); end
    for (int i = 0; i < 64 && q_out.size() > 0; i++) begin
      automatic logic [BUS_W-1:0] b = q_out.pop_front();
      for (int c = 0; c < S; c++) begin
        checks++;
        if (int'(data_t'(b[c*10 +: 10])) != g0out[c][i/8][i%8]) begin
          failures++;
          if (failures < 10) $display("g0 px %0d ch %0d got %0d exp %0d", i, c, int'(data_t'(b[c*10 +: 10])), g0out[c][i/8][i%8]);
        end
      end
    end

    // ---- group 1: the 8x8x12 map at x2, x3, x4 ----
    for (int sc = 2; sc <= 4; sc++) begin
      automatic int k = (9 + sc - 1) / sc;
      automatic int lo = 8 - k + 1;
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          automatic logic [BUS_W-1:0] b = '0;
          for (int c = 0; c < S; c++) begin
            fa[c][y][x] = g0out[c][y][x];
            b[c*10 +: 10] = 10'(g0out[c][y][x]);
          end
          q_in.push_back(b);
        end
      build_layer_stream(6, sc);
      build_layer_stream(7, sc);
      ref_conv(6, 8, 8);
      ref_deconv(sc, 8, 8);
      p0 = int'(n_passes);
      run(1'b1, sc, 8, 8);
      $display("after x%0d: layers=%0d qout=%0d", sc, n_layers, q_out.size());
      n_group1++;
      if (sc == 2) n_x2++; else if (sc == 3) n_x3++; else n_x4++;
      checks++;
      if (int'(n_passes) - p0 != expect_passes(1'b1, sc, 8, 8)) begin
        failures++; $display("group1 x%0d passes %0d expected %0d", sc, int'(n_passes) - p0, expect_passes(1'b1, sc, 8, 8));
      end
      checks++;
      if (q_out.size() != lo*lo) begin failures++; $display("x%0d: %0d beats", sc, q_out.size()); end
      for (int i = 0; i < lo*lo && q_out.size() > 0; i++) begin
        automatic logic [BUS_W-1:0] b = q_out.pop_front();
        for (int ry = 0; ry < sc; ry++)
          for (int rx = 0; rx < sc; rx++) begin
            automatic int got = int'(b[(ry*sc+rx)*8 +: 8]);
            automatic int ex  = hr[(i/lo)*sc + ry][(i%lo)*sc + rx];
            checks++;
            if (got != ex) begin
              failures++;
              if (failures < 20) $display("x%0d lr %0d (%0d,%0d) got %0d exp %0d", sc, i, ry, rx, got, ex);
            end
          end
      end
    end

    // every mechanism must have happened
    $display("events: group0=%0d group1=%0d x2=%0d x3=%0d x4=%0d sat=%0d prelu_neg=%0d acc=%0d partial=%0d in_stall=%0d out_bp=%0d",
             n_group0, n_group1, n_x2, n_x3, n_x4, n_sat, n_prelu_neg, n_acc, n_partial, n_in_stall, n_out_bp);
    checks++; if (n_group0 == 0 || n_group1 == 0) failures++;
    checks++; if (n_x2 == 0 || n_x3 == 0 || n_x4 == 0) failures++;
    checks++; if (n_sat == 0) failures++;
    checks++; if (n_prelu_neg == 0) failures++;
    checks++; if (n_acc == 0) failures++;
    checks++; if (n_partial == 0) failures++;
    checks++; if (n_in_stall == 0) failures++;
    checks++; if (n_out_bp == 0) failures++;
    checks++; if (int'(n_layers) != (M + 2) + 3 * 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
