// tb_feature_sram: random writes and reads against a shadow array at the
// default depth; read data must appear one clock after the read and hold
// while no read is issued.
`timescale 1ns/1ps
module tb_feature_sram;
  localparam int DEPTH = 3584, WB = 40;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [11:0] wa, ra;
  logic [WB-1:0] wd, rd;
  feature_sram dut (.clk, .we_i(we), .waddr_i(wa), .wdata_i(wd), .re_i(re), .raddr_i(ra), .rdata_o(rd));
  logic [WB-1:0] shadow [DEPTH];
  logic [WB-1:0] expq;
  logic exp_valid;
  int checks = 0, failures = 0;
  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; re = 0; wa = 0; ra = 0; wd = 0; exp_valid = 0;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wa = 12'(a); wd = {8'($urandom), 32'($urandom)}; shadow[a] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (rd != expq) begin failures++; if (failures < 10) $display("read got %h exp %h", rd, expq); end
      end
      we = 1'($urandom_range(0, 1));
      re = 1'($urandom_range(0, 2) != 0);
      wa = 12'($urandom_range(0, DEPTH - 1));
      ra = 12'($urandom_range(0, DEPTH - 1));
      wd = {8'($urandom), 32'($urandom)};
      if (re) begin expq = shadow[ra]; exp_valid = 1; end
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
