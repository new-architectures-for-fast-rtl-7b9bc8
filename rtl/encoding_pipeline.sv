// encoding_pipeline: one programmable pipeline (transposed) encoder row.
//
// Instead of shifting information bits past a modulo-2 adder, the register
// shifts partially computed parity digits: every cell ANDs the current
// information bit with its connection bit and XORs it into the partial
// parity that moves one cell to the right per clock. The parity leaving the
// last cell therefore equals XOR over lags e of conn_i[e] & info(t-e), and
// the critical path is one AND and one XOR whatever L is.
// Column c (0 = leftmost) holds lag L-1-c, so the connections appear in the
// reverse order of a conventional shift-register encoder.
// part_i feeds the first delay unit: 0 for a stand-alone pipeline, or the
// partial parity of a preceding segment when several pipelines are chained
// (the earlier segment then holds the larger lags).
// Timing: part_o is combinational in info_i (lag-0 term) and registered state.
module encoding_pipeline #(
  parameter int unsigned L = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         info_i,   // information digit of the current clock
  input  logic [L-1:0] conn_i,   // conn_i[e]: lag e is connected
  input  logic         part_i,   // partial parity entering the first cell
  output logic         part_o    // parity (or partial parity for the next segment)
);
  logic [L:0] chain;
  assign chain[0] = part_i;

  for (genvar c = 0; c < L; c++) begin : g_col
    logic unused_a, unused_b;
    pipe_cell u_cell (
      .clk     (clk),
      .rst_n   (rst_n),
      .left_i  (chain[c]),
      .top_a_i (info_i),
      .top_b_i (conn_i[L-1-c]),
      .right_o (chain[c+1]),
      .down_a_o(unused_a),
      .down_b_o(unused_b)
    );
  end

  assign part_o = chain[L];
endmodule
