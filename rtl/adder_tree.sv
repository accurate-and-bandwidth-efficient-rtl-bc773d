// adder_tree: balanced binary tree that sums N signed inputs.
//
// The computation unit uses two levels of these trees: one per input channel to
// sum the products of a filter window (filter-wise sum) and one per output lane
// to sum the per-channel results (channel-wise sum).  The inputs are padded with
// zeros to the next power of two P and then summed pairwise level by level, so
// the tree has ceil(log2(N)) adder levels.  It is purely combinational; the
// pipeline registers sit around it in compute_unit.  Inputs are IW bits, the sum
// OW bits (OW must cover IW + ceil(log2(N)) to avoid overflow).
module adder_tree #(
  parameter int unsigned N  = 25,
  parameter int unsigned IW = 20,
  parameter int unsigned OW = 25
) (
  input  logic signed [IW-1:0] in_i [N],
  output logic signed [OW-1:0] sum_o
);
  localparam int unsigned P = 1 << $clog2(N);
  logic signed [OW-1:0] node [P];
  always_comb begin
    for (int i = 0; i < P; i++) begin
      if (i < N) node[i] = OW'(in_i[i]);
      else       node[i] = '0;
    end
    // level w holds w partial sums in node[0..w-1]
    for (int w = P / 2; w >= 1; w = w / 2) begin
      for (int i = 0; i < w; i++) node[i] = node[2*i] + node[2*i+1];
    end
    sum_o = node[0];
  end
endmodule
