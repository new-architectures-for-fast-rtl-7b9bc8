// threshold_comparator: the majority decision of a threshold decoder.
//
// Compares the sum of orthogonal check syndromes A with a programmable
// threshold B and outputs A > B, the estimate of the noise digit being
// decoded. Both operands are unsigned W-bit numbers. Purely combinational.
module threshold_comparator #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a_i,     // sum of syndromes
  input  logic [W-1:0] b_i,     // threshold value
  output logic         gt_o     // noise estimate: a_i > b_i
);
  assign gt_o = (a_i > b_i);
endmodule
