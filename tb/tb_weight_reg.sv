// tb_weight_reg: loads weights as bus beats with random gaps and compares the
// register, read through every input-channel group, with the intended layout:
//  - a 3x3 layer with 12 inputs and 10 outputs, groups 0 and 2 (group 2 is a
//    partial group of two lanes; the other lanes must read zero);
//  - the 9x9 deconvolution with 8 input channels at x2, x3 and x4, all phase
//    groups; sub-kernel tap (ky,kx) of phase (qy,qx) must hold kernel element
//    (8-qy-s*ky, 8-qx-s*kx) or zero where that falls outside the kernel.
// Also checks that a load takes one cycle per weight plus one per beat.
`timescale 1ns/1ps
module tb_weight_reg;
  import fsrcnn_pkg::*;
  localparam int L = 4, C = 4, CIN = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, iv, ir, busy, done;
  layer_desc_t desc;
  logic [4:0] og;
  logic [2:0] s;
  logic [127:0] id;
  logic [2:0] ig;
  wgt_t w [L][C][TAPS];
  weight_reg #(.LANES(L), .CH(C), .CIN_MAX(CIN), .NT(TAPS)) dut (
    .clk, .rst_n, .start_i(start), .desc_i(desc), .og_i(og), .scale_i(s),
    .in_valid_i(iv), .in_ready_o(ir), .in_data_i(id), .busy_o(busy), .done_o(done),
    .ig_i(ig), .wgt_o(w));
  int checks = 0, failures = 0;
  logic [127:0] q [$];

  function automatic int wf(int oc, int ic, int a, int b);
    return ((oc * 131 + ic * 17 + a * 9 + b) % 1000) - 500;
  endfunction

  always @(negedge clk) begin
    iv <= (q.size() > 0) && ($urandom_range(0, 3) != 0);
    id <= (q.size() > 0) ? q[0] : '0;
  end
  always @(posedge clk) if (iv && ir) void'(q.pop_front());

  task automatic send(input int vals [$]);
    logic [127:0] b = '0;
    int n = 0;
    foreach (vals[i]) begin
      b[n*10 +: 10] = 10'(vals[i]);
      n++;
      if (n == 12) begin q.push_back(b); b = '0; n = 0; end
    end
    if (n != 0) q.push_back(b);
  endtask

  task automatic load(input layer_desc_t d, input int g, input int sc, output int cyc);
    @(negedge clk);
    desc = d; og = 5'(g); s = 3'(sc); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
  endtask

  task automatic compare(input int exp_w [L][CIN][TAPS], input string what);
    for (int gi = 0; gi < CIN / C; gi++) begin
      ig = 3'(gi);
      #1;
      for (int l = 0; l < L; l++)
        for (int c = 0; c < C; c++)
          for (int t = 0; t < TAPS; t++) begin
            checks++;
            if (int'(w[l][c][t]) != exp_w[l][gi*C + c][t]) begin
              failures++;
              if (failures < 10) $display("%s lane %0d ic %0d tap %0d got %0d exp %0d", what, l, gi*C+c, t, w[l][c][t], exp_w[l][gi*C+c][t]);
            end
          end
    end
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int e [L][CIN][TAPS];
    int vals [$];
    int cyc;
    start = 0; desc = '0; og = 0; s = 2; ig = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ordinary 3x3 layer, cin 12, cout 10
    for (int g = 0; g <= 2; g += 2) begin
      vals.delete();
      foreach (e[l, c, t]) e[l][c][t] = 0;
      for (int l = 0; l < L && g*L + l < 10; l++)
        for (int ic = 0; ic < CIN; ic++)
          for (int t = 0; t < 9; t++) begin
            vals.push_back(wf(g*L + l, ic, t / 3, t % 3));
            e[l][ic][t] = wf(g*L + l, ic, t / 3, t % 3);
          end
      send(vals);
      load('{kind: L_MAP, k: 3'd3, cin: 7'd12, cout: 7'd10, prelu: 1'b1}, g, 2, cyc);
      compare(e, "conv");
      checks++;
      if (cyc < vals.size() + (vals.size() + 11) / 12) begin failures++; $display("load too fast: %0d", cyc); end
    end
    // deconvolution
    for (int sc = 2; sc <= 4; sc++) begin
      automatic int k = (9 + sc - 1) / sc;
      for (int g = 0; g < (sc * sc + L - 1) / L; g++) begin
        vals.delete();
        foreach (e[l, c, t]) e[l][c][t] = 0;
        for (int ic = 0; ic < 8; ic++)
          for (int u = 0; u < 9; u++)
            for (int v = 0; v < 9; v++) vals.push_back(wf(0, ic, u, v));
        for (int l = 0; l < L; l++) begin
          automatic int p = g*L + l;
          if (p < sc * sc)
            for (int ic = 0; ic < 8; ic++)
              for (int ky = 0; ky < k; ky++)
                for (int kx = 0; kx < k; kx++) begin
                  automatic int u = 8 - p / sc - sc * ky, v = 8 - p % sc - sc * kx;
                  if (u >= 0 && v >= 0) e[l][ic][ky*k + kx] = wf(0, ic, u, v);
                end
        end
        send(vals);
        load('{kind: L_DECONV, k: 3'(k), cin: 7'd8, cout: 7'(sc*sc), prelu: 1'b0}, g, sc, cyc);
        compare(e, $sformatf("deconv x%0d g%0d", sc, g));
      end
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d beats left", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
