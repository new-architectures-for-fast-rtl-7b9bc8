// decoder_chip: one-chip programmable definite threshold decoder for
// systematic rate 1/2 codes of basic length up to L = 40, with a W = 5 bit
// wide SOS pipeline, cascadable end to end for longer codes.
//
// Contents: an L-cell encoding pipeline (the local encoder), an L-column SOS
// pipeline, a threshold comparator, the information shift register and one
// scan chain that holds the configuration, loaded before operation:
//   cfg[L-1:0]      code connections, [e] = information lag e
//   cfg[2L-1:L]     majority connections, [e] = syndrome lag e
//   cfg[2L+W-1:2L]  threshold value (noise estimate = sum > threshold)
// The first bit shifted in ends in cfg[0] (see scan_register).
// Stand-alone use: info_i and sr_i both take the received information
// digit, part_i = 0, sum_i = 0, syn_i = syn_o; dec_o is then the decoded digit
// of time t-(L-1). Cascading N chips (chip 1 holds the largest lags): info_i,
// par_r_i and syn_i are common; part_o -> part_i and sum_o -> sum_i go from
// chip n to chip n+1; sr_o -> sr_i goes the same way; the syndrome is syn_o
// of the last chip, and nhat_o/dec_o of the last chip are valid. The whole
// SOS structure must have at most 2^W-1 = 31 connections.
// The chip's published description says only that chips chain end to end
// and that the configuration is scan-loaded; the chaining and scan ports
// here are this design's choices.
// Timing: syn_o, nhat_o and dec_o are combinational in the current inputs and
// registered state; sr_o is sr_i delayed by L clocks. With one SOS pipeline
// the majority pipeline's total equals sum_o, so that output stays unread
// and lint lists it as unused.
module decoder_chip #(
  parameter int unsigned L = 40,
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         scan_en_i,  // shift the configuration scan chain
  input  logic         scan_i,     // scan data in
  output logic         scan_o,     // scan data out
  input  logic         info_i,     // received information digit (to the local encoder)
  input  logic         sr_i,       // information shift register input
  output logic         sr_o,       // information shift register output (delay L)
  input  logic         par_r_i,    // received parity digit
  input  logic         part_i,     // partial parity from the previous chip
  output logic         part_o,     // (partial) re-encoded parity
  output logic         syn_o,      // syndrome: par_r_i ^ part_o
  input  logic         syn_i,      // syndrome driving the SOS pipeline
  input  logic [W-1:0] sum_i,      // partial sum from the previous chip
  output logic [W-1:0] sum_o,      // (partial) sum of syndromes
  output logic         nhat_o,     // noise estimate: sum_o > threshold
  output logic         dec_o       // decoded information digit
);
  localparam int unsigned NCFG = 2 * L + W;
  logic [NCFG-1:0] cfg;
  logic [W-1:0]    sum_total;  // equals sum_o for a single SOS pipeline

  scan_register #(.N(NCFG)) u_scan (
    .clk  (clk),
    .rst_n(rst_n),
    .en_i (scan_en_i),
    .d_i  (scan_i),
    .q_o  (scan_o),
    .cfg_o(cfg)
  );

  encoding_pipeline #(.L(L)) u_enc (
    .clk   (clk),
    .rst_n (rst_n),
    .info_i(info_i),
    .conn_i(cfg[L-1:0]),
    .part_i(part_i),
    .part_o(part_o)
  );
  assign syn_o = par_r_i ^ part_o;

  majority_pipeline #(.L(L), .W(W), .NS(1)) u_maj (
    .clk    (clk),
    .rst_n  (rst_n),
    .s_i    (syn_i),
    .conn_i (cfg[2*L-1:L]),
    .sum_i  (sum_i),
    .thr_i  (cfg[2*L+W-1:2*L]),
    .sum_o  (sum_o),
    .total_o(sum_total),
    .nhat_o (nhat_o)
  );

  logic info_dly, sr_last;
  shift_delay #(.N(L - 1)) u_dly (
    .clk  (clk),
    .rst_n(rst_n),
    .d_i  (sr_i),
    .q_o  (info_dly)
  );
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sr_last <= 1'b0;
    else        sr_last <= info_dly;
  assign sr_o  = sr_last;
  assign dec_o = info_dly ^ nhat_o;
endmodule
