// sos_pipeline: sum-of-syndromes pipeline of the pipelined majority logic.
//
// L columns, each W cells high. A partial sum of syndromes (W-bit binary,
// bit 0 in the top row) moves one column to the right per clock. In a
// connected column the top cell adds the current syndrome s_i to it: the
// column is a bit-serial incrementer built from pipe_cell, the carry rippling
// down. The sum leaving the last column is therefore the sum over lags e of
// conn_i[e] & s(t-e), wrapped to W bits, so W must satisfy 2^W > number of
// connected columns. Column c (0 = leftmost) holds lag L-1-c.
// sum_i enters the first column's delay units: zero for a stand-alone
// pipeline, or the partial sum of a preceding segment when chained.
// Timing: sum_o is combinational in s_i (lag-0 term) and registered state.
module sos_pipeline #(
  parameter int unsigned L = 7,
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_i,      // syndrome digit of the current clock
  input  logic [L-1:0] conn_i,   // conn_i[e]: syndrome lag e is a check
  input  logic [W-1:0] sum_i,    // partial sum entering the first column
  output logic [W-1:0] sum_o     // sum of syndromes (or partial sum for the next segment)
);
  logic [L:0][W-1:0] col;
  assign col[0] = sum_i;

  for (genvar c = 0; c < L; c++) begin : g_col
    logic [W:0] a, b;   // vertical links: a = delayed bit, b = carry
    assign a[0] = s_i;
    assign b[0] = conn_i[L-1-c];
    for (genvar r = 0; r < W; r++) begin : g_row
      pipe_cell u_cell (
        .clk     (clk),
        .rst_n   (rst_n),
        .left_i  (col[c][r]),
        .top_a_i (a[r]),
        .top_b_i (b[r]),
        .right_o (col[c+1][r]),
        .down_a_o(a[r+1]),
        .down_b_o(b[r+1])
      );
    end
    // a[W], b[W]: the carry out of the top bit is dropped (sum wraps).
    logic unused_top;
    assign unused_top = a[W] ^ b[W];
  end

  assign sum_o = col[L];
endmodule
