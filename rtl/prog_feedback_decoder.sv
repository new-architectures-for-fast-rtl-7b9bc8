// prog_feedback_decoder: pipeline feedback threshold decoder for systematic
// rate 1/2 self-orthogonal codes whose code, majority connections, threshold
// and target-syndrome network are all set at run time.
//
// It works like feedback_threshold_decoder (local encoding pipeline,
// syndrome, feedback syndrome register, feedback SOS pipeline of
// sigma_processor columns, comparator, delay and correction). The difference
// is that nothing is wired from the code at elaboration:
//  - the local encoder takes its connections from code_i[d] (information lag d);
//  - the SOS column c (syndrome lag L-1-c) adds the syndrome when
//    maj_i[L-1-c] is set, and every stored syndrome at lag e with maj_i[e] set
//    is corrected by the noise estimate as the register shifts (for a
//    rate 1/2 code the syndromes that check the decided digit are exactly
//    the majority-connected ones);
//  - each column has a target-select field: tgt_en_i[c] lets the fed-back
//    estimate into column c, and tgt_sel_i[c] is the lag of its target
//    syndrome, read through a multiplexer from the syndrome register.
// This is the programmable target network, in which every column can pick
// its own target syndrome. A multiplexer over all lags is the simplest form
// of it. For a fixed code, tcodec_pkg::fb_target gives the settings:
// target lag T >= 0 means tgt_en = 1, tgt_sel = T. The last column never has
// a target, so tgt_en_i[L-1] is ignored (lint lists that bit as unused).
// The configuration must stay constant while decoding; reset clears the data
// state only. Sums are W bits and wrap, so 2^W must exceed the number of
// majority connections.
// Timing: syn_o, nhat_o and dec_o are combinational in the inputs and the
// registered state; dec_o is the decoded digit received L-1 clocks earlier.
module prog_feedback_decoder #(
  parameter int unsigned L  = tcodec_pkg::EX_L,
  parameter int unsigned W  = tcodec_pkg::EX_W,
  parameter int unsigned SW = $clog2(L)          // target-select width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [L-1:0]          code_i,     // code connections by information lag
  input  logic [L-1:0]          maj_i,      // majority connections by syndrome lag
  input  logic [W-1:0]          thr_i,      // threshold: estimate = sum > thr_i
  input  logic [L-1:0]          tgt_en_i,   // per SOS column: column has a target syndrome
  input  logic [L-1:0][SW-1:0]  tgt_sel_i,  // per SOS column: lag of its target syndrome
  input  logic                  info_r_i,   // received information digit
  input  logic                  par_r_i,    // received parity digit
  output logic                  syn_o,      // syndrome
  output logic                  nhat_o,     // noise estimate of the digit of time t-(L-1)
  output logic                  dec_o       // decoded information digit of time t-(L-1)
);
  localparam int unsigned D = L - 1;

  logic              phat;
  logic [L-1:0]      sstar;    // corrected syndromes by lag, [0] = current
  logic [L-1:1]      r;
  logic [L:0][W-1:0] col;
  logic              info_dly;

  encoding_pipeline #(.L(L)) u_enc (
    .clk   (clk),
    .rst_n (rst_n),
    .info_i(info_r_i),
    .conn_i(code_i),
    .part_i(1'b0),
    .part_o(phat)
  );
  assign syn_o = par_r_i ^ phat;

  // Syndrome register with programmable feedback positions.
  assign sstar = {r, syn_o};
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r <= '0;
    else
      for (int e = 0; e < D; e++)
        r[e+1] <= sstar[e] ^ (nhat_o & maj_i[e]);

  // Feedback SOS pipeline with a target multiplexer per column.
  assign col[0] = '0;
  for (genvar c = 0; c < L; c++) begin : g_col
    logic [W-1:0] q;
    logic         j, k;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) q <= '0;
      else        q <= col[c];
    assign j = (int'(tgt_sel_i[c]) < L) ? sstar[tgt_sel_i[c]] : 1'b0;
    // The last column's sum is the one being decided: it never gets the
    // feedback, which also keeps nhat_o free of a combinational loop.
    if (c == L - 1) begin : g_last
      assign k = 1'b0;
    end else begin : g_fb
      assign k = nhat_o & tgt_en_i[c];
    end
    sigma_processor #(.W(W)) u_sigma (
      .sum_i(q),
      .i_i  (syn_o & maj_i[D-c]),
      .j_i  (j),
      .k_i  (k),
      .sum_o(col[c+1])
    );
  end

  threshold_comparator #(.W(W)) u_cmp (
    .a_i (col[L]),
    .b_i (thr_i),
    .gt_o(nhat_o)
  );

  shift_delay #(.N(D)) u_dly (
    .clk  (clk),
    .rst_n(rst_n),
    .d_i  (info_r_i),
    .q_o  (info_dly)
  );
  assign dec_o = info_dly ^ nhat_o;
endmodule
