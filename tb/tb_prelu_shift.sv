// tb_prelu_shift: exhaustive check of the PReLU shift adder over every 10-bit
// input and a set of slope codes, against x*slope computed with integer shifts.
`timescale 1ns/1ps
module tb_prelu_shift;
  import fsrcnn_pkg::*;
  data_t x, y;
  logic en;
  slope_t s;
  prelu_shift dut (.x_i(x), .en_i(en), .slope_i(s), .y_o(y));
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int code = 0; code < 1024; code += 7) begin
      s = slope_t'(code);
      for (int v = -512; v < 512; v++) begin
        int e;
        x = data_t'(v);
        en = 1'(code % 3 != 0);
        if (!en || v >= 0) e = v;
        else begin
          e = (s.e1 ? int'($floor(real'(v) / real'(2 ** s.p1))) : 0) +
              (s.e2 ? int'($floor(real'(v) / real'(2 ** s.p2))) : 0);
          if (e < -512) e = -512;
        end
        #1;
        checks++;
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("x=%0d code=%h en=%0d got %0d exp %0d", v, code, en, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
