// tb_layer_table: the eight FSRCNN(56,12,4) layers in the 6-2 grouping, with the
// deconvolution sub-kernel size 5/3/3 and s^2 phases for x2/x3/x4.
`timescale 1ns/1ps
module tb_layer_table;
  import fsrcnn_pkg::*;
  logic grp;
  logic [3:0] idx, nl;
  logic [2:0] s;
  layer_desc_t d;
  layer_table dut (.group_i(grp), .idx_i(idx), .scale_i(s), .desc_o(d), .nlayers_o(nl));
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic g, input int i, input int sc, input layer_kind_e kd,
                     input int k, input int ci, input int co, input logic pr, input int n);
    grp = g; idx = 4'(i); s = 3'(sc); #1;
    checks++;
    if (d.kind != kd || int'(d.k) != k || int'(d.cin) != ci || int'(d.cout) != co ||
        d.prelu != pr || int'(nl) != n) begin
      failures++;
      $display("g%0d l%0d x%0d: kind %0d k %0d cin %0d cout %0d prelu %0d n %0d", g, i, sc,
               d.kind, d.k, d.cin, d.cout, d.prelu, nl);
    end
  endtask
  initial begin
    chk(0, 0, 2, L_FEATURE, 5, 1, 56, 1, 6);
    chk(0, 1, 2, L_SHRINK, 1, 56, 12, 1, 6);
    for (int i = 2; i < 6; i++) chk(0, i, 3, L_MAP, 3, 12, 12, 1, 6);
    for (int sc = 2; sc <= 4; sc++) begin
      chk(1, 0, sc, L_EXPAND, 1, 12, 56, 1, 2);
      chk(1, 1, sc, L_DECONV, (sc == 2) ? 5 : 3, 56, sc * sc, 0, 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
