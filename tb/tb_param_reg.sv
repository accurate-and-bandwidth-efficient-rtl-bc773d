// tb_param_reg: random parameter beats; after a load the shift and every
// lane's bias and slope fields must match the beat, and must hold without load.
`timescale 1ns/1ps
module tb_param_reg;
  import fsrcnn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ld;
  logic [127:0] beat, held;
  logic [5:0] sh;
  chan_param_t chp [4];
  param_reg #(.LANES(4)) dut (.clk, .rst_n, .load_i(ld), .beat_i(beat), .shift_o(sh), .chp_o(chp));
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ld = 0; beat = '0; held = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      ld = 1'($urandom_range(0, 1));
      beat = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      if (ld) held = beat;
      checks++;
      if (sh != held[5:0]) begin failures++; $display("shift"); end
      for (int l = 0; l < 4; l++) begin
        checks += 2;
        if (chp[l].bias != data_t'(held[8 + 24*l + 10 +: 10])) begin failures++; $display("bias %0d", l); end
        if (chp[l].slope != slope_t'(held[8 + 24*l +: 10])) begin failures++; $display("slope %0d", l); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
