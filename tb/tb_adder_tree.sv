// tb_adder_tree: sums of 25 and of 4 signed inputs (the two tree shapes the
// computation unit uses) against a loop, on random and extreme values.
`timescale 1ns/1ps
module tb_adder_tree;
  logic signed [19:0] a [25];
  logic signed [24:0] sa;
  logic signed [25:0] b [4];
  logic signed [27:0] sb;
  adder_tree #(.N(25), .IW(20), .OW(25)) dut_a (.in_i(a), .sum_o(sa));
  adder_tree #(.N(4),  .IW(26), .OW(28)) dut_b (.in_i(b), .sum_o(sb));
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      automatic longint ea = 0, eb = 0;
      foreach (a[j]) begin
        a[j] = (i < 2) ? (i == 0 ? 20'sh80000 : 20'sh7FFFF) : 20'($urandom);
        ea += a[j];
      end
      foreach (b[j]) begin b[j] = 26'($urandom); eb += b[j]; end
      #1;
      checks += 2;
      if (longint'(sa) != ea) begin failures++; $display("25-sum got %0d exp %0d", sa, ea); end
      if (longint'(sb) != eb) begin failures++; $display("4-sum got %0d exp %0d", sb, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
