// output_pack: formats one low-resolution pixel position's results as a 128-bit
// bus beat.
//
// Feature mode (the last layer of the first fused group): channel c occupies
// bits [10c+9:10c], up to 12 channels.  Deconvolution mode: the s*s sub-pixel
// phases become an s x s block of 8-bit high-resolution pixels, row-major, pixel
// (ry,rx) in byte ry*s+rx, taken from phase (s-1-ry)*s+(s-1-rx) and clamped to
// 0..255.  Unused bits are zero.  Combinational.  The published design names the output
// stage; the beat layouts are this design's choices.
// Lint note: the phase index q is an int of which only the low bits are used.
module output_pack
  import fsrcnn_pkg::*;
#(
  parameter int unsigned NV = 16
) (
  input  data_t              vals_i [NV],
  input  logic               deconv_i,
  input  logic [2:0]         scale_i,
  output logic [BUS_W-1:0]   beat_o
);
  always_comb begin
    beat_o = '0;
    if (!deconv_i) begin
      for (int c = 0; c < NV && c < BUS_W/DW; c++) beat_o[c*DW +: DW] = vals_i[c];
    end else begin
      for (int ry = 0; ry < 4; ry++)
        for (int rx = 0; rx < 4; rx++)
          if (ry < int'(scale_i) && rx < int'(scale_i)) begin
            automatic int q = (int'(scale_i) - 1 - ry) * int'(scale_i) + (int'(scale_i) - 1 - rx);
            automatic data_t v = vals_i[q];
            automatic logic [7:0] px = v[DW-1] ? 8'd0 : (v > data_t'(255)) ? 8'd255 : v[7:0];
            beat_o[(ry*int'(scale_i)+rx)*8 +: 8] = px;
          end
    end
  end
endmodule
