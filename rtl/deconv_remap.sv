// deconv_remap: maps one tap of the 9x9 deconvolution kernel to the sub-pixel
// convolution kernel that uses it.
//
// A stride-s deconvolution is equivalent to s*s ordinary convolutions on the
// low-resolution map, one per output phase, each with a ceil(9/s)-wide kernel
// made of every s-th deconvolution tap, taken in reverse order.  For row index u
// (0..8) the phase is qy = (8-u) mod s and the window row is ky = (8-u) div s;
// likewise for columns.  For x2 this turns the 9x9 kernel into 5x5, 5x4, 4x5 and
// 4x4 kernels.  Outputs: phase = qy*s+qx (output channel of the sub-pixel layer)
// and tap = ky*K+kx with K = ceil(9/s).  Combinational.  The reversal and
// decomposition follow the published x2 example; the phase numbering is this
// design's (phase qy lands on high-resolution row s-1-qy of its block, see
// output_pack).
module deconv_remap
  import fsrcnn_pkg::*;
(
  input  logic [2:0] scale_i,  // 2, 3 or 4
  input  logic [3:0] u_i,      // deconvolution kernel row 0..8
  input  logic [3:0] v_i,      // deconvolution kernel column 0..8
  output logic [4:0] phase_o,
  output logic [4:0] tap_o
);
  logic [3:0] ru, rv, qy, qx, ky, kx;
  logic [2:0] k;
  always_comb begin
    ru = 4'(DK - 1) - u_i;
    rv = 4'(DK - 1) - v_i;
    qy = ru % 4'(scale_i);
    qx = rv % 4'(scale_i);
    ky = ru / 4'(scale_i);
    kx = rv / 4'(scale_i);
    k  = deconv_k(scale_i);
    phase_o = 5'(qy * scale_i + qx);
    tap_o   = 5'(ky * k + kx);
  end
endmodule
