// tb_mult_array: random windows and weights; each product must appear in the
// intermediate register one clock after valid, with valid and tag delayed by
// one cycle, and must hold while valid is low.
`timescale 1ns/1ps
module tb_mult_array;
  import fsrcnn_pkg::*;
  localparam int L = 3, C = 2, NT = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic v, vo;
  logic [7:0] tag, tago;
  data_t f [C][NT];
  wgt_t  w [L][C][NT];
  prod_t p [L][C][NT];
  mult_array #(.LANES(L), .CH(C), .NT(NT), .TAG_W(8)) dut (
    .clk, .rst_n, .valid_i(v), .tag_i(tag), .feat_i(f), .wgt_i(w),
    .valid_o(vo), .tag_o(tago), .prod_o(p));
  int checks = 0, failures = 0;
  longint ex [L][C][NT];
  logic ev;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    v = 0; tag = 0;
    foreach (f[c, t]) f[c][t] = '0;
    foreach (w[l, c, t]) w[l][c][t] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ev = vo;
      // check what the previous cycle captured
      if (i > 0) begin
        checks++;
        if (vo != v) begin failures++; $display("valid delay"); end
        if (v) begin
          checks++;
          if (tago != tag) begin failures++; $display("tag"); end
        end
        foreach (ex[l, c, t]) begin
          checks++;
          if (longint'(p[l][c][t]) != ex[l][c][t]) begin
            failures++;
            if (failures < 10) $display("p[%0d][%0d][%0d] got %0d exp %0d", l, c, t, p[l][c][t], ex[l][c][t]);
          end
        end
      end
      v = 1'($urandom_range(0, 3) != 0);
      tag = 8'(i);
      foreach (f[c, t]) f[c][t] = data_t'($urandom);
      foreach (w[l, c, t]) w[l][c][t] = wgt_t'($urandom);
      if (i == 5) begin foreach (f[c, t]) f[c][t] = -512; foreach (w[l, c, t]) w[l][c][t] = -512; end
      if (v) foreach (ex[l, c, t]) ex[l][c][t] = longint'(f[c][t]) * longint'(w[l][c][t]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
