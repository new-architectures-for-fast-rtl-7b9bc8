// sigma_processor: one column processor of the SOS pipeline with feedback.
//
// Adds sigma to the W-bit partial sum, where
//   sigma = i + (k ? (j ? -1 : +1) : 0)
// i is the syndrome added by this column (syndrome AND connection), j the
// current value of the column's target syndrome and k the noise estimate
// fed back. When k = 1 the target syndrome is complemented by the feedback,
// so its contribution to the sum changes by +1 (0 -> 1) or -1 (1 -> 0).
// This is exactly the published eight-row truth table (sigma in
// {-1, 0, +1, +2}). The sum wraps modulo 2^W. Purely combinational.
module sigma_processor #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] sum_i,  // partial sum input
  input  logic         i_i,    // syndrome entering at this column (0 if unconnected)
  input  logic         j_i,    // target-syndrome value
  input  logic         k_i,    // noise estimate
  output logic [W-1:0] sum_o   // partial sum output
);
  always_comb begin
    sum_o = sum_i + W'(i_i);
    if (k_i) begin
      if (j_i) sum_o = sum_o - W'(1);
      else     sum_o = sum_o + W'(1);
    end
  end
endmodule
