// tb_output_pack: feature beats carry twelve 10-bit channels; deconvolution
// beats carry an s x s block of clamped 8-bit pixels with the phase order
// reversed (pixel (ry,rx) from phase (s-1-ry)*s+(s-1-rx)).
`timescale 1ns/1ps
module tb_output_pack;
  import fsrcnn_pkg::*;
  data_t vals [16];
  logic dc;
  logic [2:0] s;
  logic [127:0] beat;
  output_pack #(.NV(16)) dut (.vals_i(vals), .deconv_i(dc), .scale_i(s), .beat_o(beat));
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 600; i++) begin
      foreach (vals[j]) vals[j] = data_t'($urandom);
      dc = 1'(i % 2);
      s = 3'(2 + i % 3);
      #1;
      if (!dc) begin
        for (int c = 0; c < 12; c++) begin
          checks++;
          if (beat[c*10 +: 10] != vals[c]) failures++;
        end
        checks++;
        if (beat[127:120] != 0) failures++;
      end else begin
        for (int ry = 0; ry < s; ry++)
          for (int rx = 0; rx < s; rx++) begin
            automatic int v = int'(vals[(s - 1 - ry) * s + (s - 1 - rx)]);
            automatic int e = (v < 0) ? 0 : (v > 255) ? 255 : v;
            checks++;
            if (int'(beat[(ry * s + rx) * 8 +: 8]) != e) begin
              failures++;
              if (failures < 10) $display("x%0d (%0d,%0d) got %0d exp %0d", s, ry, rx, beat[(ry*s+rx)*8 +: 8], e);
            end
          end
        checks++;
        if ((beat >> (8 * s * s)) != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
