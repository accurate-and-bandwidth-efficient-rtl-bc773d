// param_reg: the parameter register of the computation unit.
//
// Captures one 128-bit parameter beat from the bus when load_i is high and holds
// it for the current output-channel group: the layer's rescale shift (bits 5:0)
// and, for each of the LANES output lanes, a 24-bit field at bit 8+24*lane that
// carries the bias (bits 19:10 of the field) and the PReLU slope code (bits 9:0:
// e1, p1[3:0], e2, p2[3:0]).  The published design shows the register feeding both shift
// adders; the beat layout is this design's choice.
module param_reg
  import fsrcnn_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_i,
  input  logic [BUS_W-1:0]   beat_i,
  output logic [5:0]         shift_o,
  output chan_param_t        chp_o [LANES]
);
  initial assert (PB_LANE_OFS + LANES * PB_LANE_W <= BUS_W)
    else $fatal(1, "param_reg: too many lanes for one parameter beat");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_o <= '0;
      for (int l = 0; l < LANES; l++) chp_o[l] <= '0;
    end else if (load_i) begin
      shift_o <= beat_i[5:0];
      for (int l = 0; l < LANES; l++)
        chp_o[l] <= chan_param_t'(beat_i[PB_LANE_OFS + l*PB_LANE_W +: CHP_W]);
    end
  end
endmodule
