// tb_deconv_remap: for x2, x3 and x4 every tap of the 9x9 kernel must land in a
// distinct (phase, tap) slot inside the sub-kernel window, the phase must be
// the one for which stepping the window by one row moves s rows back in the
// kernel, and the x2 sub-kernels must have 25, 20, 20 and 16 taps.  Spot checks
// from the x2 example: the top-left window tap uses kernel element (9,9)
// (1-based), the next column (9,7), and the second phase starts at (9,8).
`timescale 1ns/1ps
module tb_deconv_remap;
  logic [2:0] s;
  logic [3:0] u, v;
  logic [4:0] ph, tap;
  deconv_remap dut (.scale_i(s), .u_i(u), .v_i(v), .phase_o(ph), .tap_o(tap));
  int checks = 0, failures = 0;
  int hits [16][25];
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input int sc, input int uu, input int vv, input int eph, input int etap);
    s = 3'(sc); u = 4'(uu); v = 4'(vv); #1;
    checks++;
    if (ph != 5'(eph) || tap != 5'(etap)) begin
      failures++;
      $display("x%0d (%0d,%0d): got phase %0d tap %0d exp %0d %0d", sc, uu, vv, ph, tap, eph, etap);
    end
  endtask
  initial begin
    for (int sc = 2; sc <= 4; sc++) begin
      automatic int k = (9 + sc - 1) / sc;
      foreach (hits[a, b]) hits[a][b] = 0;
      // forward enumeration of each phase's window
      for (int qy = 0; qy < sc; qy++)
        for (int qx = 0; qx < sc; qx++)
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++) begin
              automatic int uu = 8 - qy - sc * ky, vv = 8 - qx - sc * kx;
              if (uu >= 0 && vv >= 0) begin
                chk(sc, uu, vv, qy * sc + qx, ky * k + kx);
                hits[qy * sc + qx][ky * k + kx]++;
              end
            end
      // every kernel element covered exactly once
      begin
        automatic int total = 0;
        foreach (hits[a, b]) begin
          if (hits[a][b] > 1) failures++;
          total += hits[a][b];
        end
        checks++;
        if (total != 81) begin failures++; $display("x%0d covers %0d taps", sc, total); end
      end
      if (sc == 2) begin
        int n [4];
        foreach (n[i]) begin
          n[i] = 0;
          for (int t = 0; t < 25; t++) n[i] += hits[i][t];
        end
        checks++;
        if (n[0] != 25 || n[1] != 20 || n[2] != 20 || n[3] != 16) begin
          failures++; $display("x2 sizes %0d %0d %0d %0d", n[0], n[1], n[2], n[3]);
        end
      end
    end
    chk(2, 8, 8, 0, 0);   // a * W99
    chk(2, 8, 6, 0, 1);   // b * W97
    chk(2, 8, 7, 1, 0);   // first tap of the 5x4 kernel, W98
    chk(2, 0, 0, 0, 24);  // y * W11
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
