// prelu_shift: PReLU realised with shifters and an adder.
//
// Non-negative inputs, and every input when the layer has no PReLU, pass
// unchanged.  A negative input x is multiplied by the channel's slope, which is
// coded as up to two negative powers of two: x*a = (e1 ? x>>>p1 : 0) +
// (e2 ? x>>>p2 : 0), with arithmetic (floor) shifts, saturated to 10 bits.
// A slope of zero (both terms off) gives a plain ReLU.  The published design states that
// PReLU is done by shift adders; the two-term slope code is this design's choice.
// Combinational.
module prelu_shift
  import fsrcnn_pkg::*;
(
  input  data_t  x_i,
  input  logic   en_i,
  input  slope_t slope_i,
  output data_t  y_o
);
  localparam logic signed [DW+1:0] MINV = -(DW+2)'(signed'(1 <<< (DW-1)));
  logic signed [DW+1:0] xe, t1, t2, s;
  always_comb begin
    xe = (DW+2)'(x_i);   // sign-extended
    // Each term is a separate assignment so that the shift stays arithmetic.
    t1 = '0;
    t2 = '0;
    if (slope_i.e1) t1 = xe >>> slope_i.p1;
    if (slope_i.e2) t2 = xe >>> slope_i.p2;
    s  = t1 + t2;
    if (!en_i || !x_i[DW-1]) y_o = x_i;
    else if (s < MINV) y_o = data_t'(MINV);
    else y_o = data_t'(s);
  end
endmodule
