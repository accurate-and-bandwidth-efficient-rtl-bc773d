// quant_shift: the "weight factor" shift adder of the computation unit.
//
// Dynamic quantization gives every layer its own binary-point position for
// activations and weights, so the accumulated dot product carries
// (data fraction + weight fraction) fractional bits.  This block shifts it right
// by the per-layer amount that brings it to the next layer's 10-bit format,
// rounding half up, adds the channel bias (already in the output format) and
// saturates to 10 bits.  Combinational.  Rounding, the bias and saturation are
// this design's choices; the published design names the block and its purpose only.
module quant_shift
  import fsrcnn_pkg::*;
(
  input  acc_t       acc_i,
  input  logic [5:0] shift_i,
  input  data_t      bias_i,
  output data_t      q_o
);
  localparam acc_t MAXV = acc_t'((1 <<< (DW-1)) - 1);
  localparam acc_t MINV = -acc_t'(1 <<< (DW-1));
  acc_t rnd, shifted, sum;
  always_comb begin
    rnd     = (shift_i == 6'd0) ? '0 : (acc_t'(1) <<< (shift_i - 6'd1));
    shifted = (acc_i + rnd) >>> shift_i;
    sum     = shifted + acc_t'(bias_i);
    if (sum > MAXV)      q_o = data_t'(MAXV);
    else if (sum < MINV) q_o = data_t'(MINV);
    else                 q_o = data_t'(sum);
  end
endmodule
