// majority_pipeline: pipelined majority logic of a threshold decoder.
//
// NS sum-of-syndromes pipelines, one per syndrome stream that feeds this
// decision (1 for a rate 1/2 or (V-1)/V code, V-1 for rate 1/V, times the
// parallelism Y in a parallel decoder), an adder that totals their outputs,
// and a comparator against the threshold value: noise estimate = total > thr.
// Each SOS pipeline has L columns (lags 0..L-1, see sos_pipeline) and its own
// connection vector. The sum_i / sum_o ports carry the partial sums in and out
// for building a longer pipeline from segments; tie sum_i to zero when alone.
// All sums are W bits and wrap, so 2^W must exceed the number of connections.
// Timing: nhat_o and sum_o are combinational in s_i and registered state.
module majority_pipeline #(
  parameter int unsigned L  = 7,
  parameter int unsigned W  = 3,
  parameter int unsigned NS = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NS-1:0]           s_i,      // current syndrome of each stream
  input  logic [NS-1:0][L-1:0]    conn_i,   // connections of each SOS pipeline
  input  logic [NS-1:0][W-1:0]    sum_i,    // partial sums from a previous segment
  input  logic [W-1:0]            thr_i,    // threshold value
  output logic [NS-1:0][W-1:0]    sum_o,    // sums leaving each SOS pipeline
  output logic [W-1:0]            total_o,  // total sum of syndromes
  output logic                    nhat_o    // noise estimate
);
  for (genvar n = 0; n < NS; n++) begin : g_sos
    sos_pipeline #(.L(L), .W(W)) u_sos (
      .clk   (clk),
      .rst_n (rst_n),
      .s_i   (s_i[n]),
      .conn_i(conn_i[n]),
      .sum_i (sum_i[n]),
      .sum_o (sum_o[n])
    );
  end

  always_comb begin
    total_o = '0;
    for (int n = 0; n < NS; n++) total_o = total_o + sum_o[n];
  end

  threshold_comparator #(.W(W)) u_cmp (
    .a_i (total_o),
    .b_i (thr_i),
    .gt_o(nhat_o)
  );
endmodule
