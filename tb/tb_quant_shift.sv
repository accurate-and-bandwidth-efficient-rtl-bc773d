// tb_quant_shift: checks the rescale shift adder (round half up, bias, 10-bit
// saturation) on random and corner-case accumulator values, against a
// reference computed with real-number rounding.
`timescale 1ns/1ps
module tb_quant_shift;
  import fsrcnn_pkg::*;
  acc_t acc;
  logic [5:0] sh;
  data_t bias, q;
  quant_shift dut (.acc_i(acc), .shift_i(sh), .bias_i(bias), .q_o(q));
  int checks = 0, failures = 0, n_sat = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint e;
      acc  = (i < 100) ? acc_t'(i - 50) : acc_t'($urandom_range(0, 32'h3FFFFF)) - acc_t'(32'h200000);
      sh   = 6'((i < 100) ? i % 4 : $urandom_range(0, 16));
      bias = data_t'($urandom_range(0, 1023) - 512);
      e = longint'($floor(real'(acc) / real'(2.0 ** sh) + 0.5)) + bias;
      if (e > 511) begin e = 511; n_sat++; end
      if (e < -512) begin e = -512; n_sat++; end
      #1;
      checks++;
      if (longint'(q) != e) begin
        failures++;
        if (failures < 10) $display("acc=%0d sh=%0d bias=%0d got %0d exp %0d", acc, sh, bias, q, e);
      end
    end
    checks++; if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
