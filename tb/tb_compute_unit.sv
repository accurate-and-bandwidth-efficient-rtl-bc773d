// tb_compute_unit: checks the pipelined computation unit against a direct
// reference: random windows and weights, dot products accumulated over a random
// number of passes (first/last flags), rescale shift with rounding, bias,
// saturation and the PReLU shift code.  Checks that results appear exactly 3
// cycles after the last pass and that passes can be issued every cycle.
`timescale 1ns/1ps
module tb_compute_unit;
  import fsrcnn_pkg::*;
  localparam int L = 4, C = 4, NT = TAPS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, first, last, prelu_en, out_valid, busy;
  logic [11:0] tag, tag_o;
  data_t feat [C][NT];
  wgt_t  wgt  [L][C][NT];
  logic [5:0] shift;
  chan_param_t chp [L];
  data_t outv [L];

  compute_unit #(.LANES(L), .CH(C), .NT(NT), .TAG_W(12)) dut (
    .clk, .rst_n, .in_valid_i(in_valid), .first_i(first), .last_i(last), .tag_i(tag),
    .feat_i(feat), .wgt_i(wgt), .shift_i(shift), .prelu_en_i(prelu_en), .chp_i(chp),
    .out_valid_o(out_valid), .tag_o(tag_o), .out_o(outv), .busy_o(busy));

  int checks = 0, failures = 0, n_sat = 0, n_neg = 0;
  longint racc [L];
  int exp_q [$];    // expected values, L per result
  int exp_tag [$];
  int exp_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int ref_post(longint acc, int sh, chan_param_t p, logic en);
    longint r = (sh == 0) ? acc : ((acc + (longint'(1) <<< (sh - 1))) >>> sh);
    int x, t;
    r += p.bias;
    if (r > 511) begin r = 511; n_sat++; end
    if (r < -512) begin r = -512; n_sat++; end
    x = int'(r);
    if (!en || x >= 0) return x;
    n_neg++;
    t = (p.slope.e1 ? (x >>> p.slope.p1) : 0) + (p.slope.e2 ? (x >>> p.slope.p2) : 0);
    return (t < -512) ? -512 : t;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_tag.size() == 0) begin failures++; $display("unexpected output at %0t tag %0d", $time, tag_o); end
    else begin
      automatic int et = exp_tag.pop_front();
      automatic int ec = exp_cyc.pop_front();
      if (tag_o != 12'(et)) begin failures++; $display("tag %0d exp %0d", tag_o, et); end
      checks++;
      if ($time - ec != 35) begin failures++; $display("latency %0t", $time - ec); end
      for (int l = 0; l < L; l++) begin
        automatic int e = exp_q.pop_front();
        checks++;
        if (int'(outv[l]) != e) begin failures++; $display("lane %0d got %0d exp %0d", l, outv[l], e); end
      end
    end
  end

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; first = 0; last = 0; tag = 0; prelu_en = 0; shift = 0;
    foreach (feat[c, t]) feat[c][t] = '0;
    foreach (wgt[l, c, t]) wgt[l][c][t] = '0;
    foreach (chp[l]) chp[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      automatic int npass = $urandom_range(1, 4);
      // parameters stay fixed while a result is in flight
      in_valid = 0;
      repeat (4) @(negedge clk);
      shift = 6'($urandom_range(4, 14));
      prelu_en = 1'($urandom_range(0, 1));
      foreach (chp[l]) begin
        chp[l].bias = data_t'($urandom_range(0, 200) - 100);
        chp[l].slope = slope_t'($urandom);
      end
      foreach (racc[l]) racc[l] = 0;
      for (int p = 0; p < npass; p++) begin
        foreach (feat[c, t]) feat[c][t] = data_t'($urandom_range(0, 1023) - 512);
        foreach (wgt[l, c, t]) wgt[l][c][t] = wgt_t'($urandom_range(0, 1023) - 512);
        foreach (racc[l]) for (int c = 0; c < C; c++) for (int t = 0; t < NT; t++)
          racc[l] += longint'(feat[c][t]) * longint'(wgt[l][c][t]);
        in_valid = 1; first = (p == 0); last = (p == npass - 1); tag = 12'(r);
        if (p == npass - 1) begin
          exp_tag.push_back(r);
          exp_cyc.push_back(int'($time));
          for (int l = 0; l < L; l++) exp_q.push_back(ref_post(racc[l], int'(shift), chp[l], prelu_en));
        end
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (exp_tag.size() != 0) begin failures++; $display("missing outputs"); end
    checks++; if (n_sat == 0 || n_neg == 0) begin failures++; $display("sat=%0d neg=%0d", n_sat, n_neg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
