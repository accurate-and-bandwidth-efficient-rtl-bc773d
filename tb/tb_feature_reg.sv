// tb_feature_reg: random slot writes against a shadow copy, holding when not
// written, and clearing.
`timescale 1ns/1ps
module tb_feature_reg;
  import fsrcnn_pkg::*;
  localparam int C = 4, NT = 25;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr, we;
  logic [4:0] slot;
  data_t d [C];
  data_t win [C][NT];
  int shadow [C][NT];
  feature_reg #(.CH(C), .NT(NT)) dut (.clk, .rst_n, .clr_i(clr), .we_i(we), .slot_i(slot), .data_i(d), .win_o(win));
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    clr = 0; we = 0; slot = 0;
    foreach (d[c]) d[c] = '0;
    foreach (shadow[c, t]) shadow[c][t] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      clr = 1'(i % 200 == 199);
      we = 1'($urandom_range(0, 1));
      slot = 5'($urandom_range(0, NT - 1));
      foreach (d[c]) d[c] = data_t'($urandom);
      @(negedge clk);
      if (clr) foreach (shadow[c, t]) shadow[c][t] = 0;
      else if (we) foreach (d[c]) shadow[c][slot] = int'(d[c]);
      foreach (shadow[c, t]) begin
        checks++;
        if (int'(win[c][t]) != shadow[c][t]) begin
          failures++;
          if (failures < 10) $display("win[%0d][%0d] got %0d exp %0d", c, t, win[c][t], shadow[c][t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
