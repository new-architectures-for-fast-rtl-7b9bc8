// fec_codec_top: the complete set of encoders and threshold decoders.
//
// Side by side, each with its own ports:
//  - A programmable parallel-pipeline encoder (pp_encoder) and a matching
//    programmable parallel-pipeline definite threshold decoder
//    (pp_threshold_decoder), each with its own scan-loaded configuration,
//    as at the two ends of a channel. The defaults give the running example:
//    systematic rate 1/2, memory 6 code, Y = 2 codewords per clock.
//    Encoder scan chain (P*U*L bits): generator bits, gen[p][u][d] at
//    position (p*U + u)*L + d. Decoder scan chain: the same generator field,
//    then majority connections maj[u][p][e] at P*U*L + (u*P + p)*L + e, then
//    the U thresholds, W bits each. The first bit shifted in lands at
//    position 0.
//  - A parallel (shift register and XOR tree) encoder for the fixed example
//    code with the same Y, which produces the same parities as the
//    parallel-pipeline encoder loaded with that code.
//  - A pipeline feedback threshold decoder for the fixed example code.
//  - A programmable pipeline feedback decoder (prog_feedback_decoder, length
//    PF_L, W = PF_W) behind its own scan chain of 3*PF_L + PF_W +
//    PF_L*ceil(log2 PF_L) bits: code [PF_L-1:0], majority connections next,
//    then the threshold, the PF_L target enables, and the target selects
//    (column c at 3*PF_L + PF_W + c*ceil(log2 PF_L)).
//  - The cascadable encoder chip (six cells, parallel-loaded connections)
//    and the decoder chip (L = 40, 5-bit SOS pipeline, scan-loaded), with
//    their chaining ports brought out.
// The channel (multiplexing onto a serial line, noise) is outside.
// Timing: see the blocks; every output is combinational in the current
// inputs and registered state; all share one clock and an asynchronous
// active-low reset.
module fec_codec_top #(
  parameter int unsigned U  = 1,
  parameter int unsigned P  = 1,
  parameter int unsigned Y  = 2,
  parameter int unsigned L  = 7,
  parameter int unsigned W  = 3,
  parameter int unsigned FB_L      = tcodec_pkg::EX_L,
  parameter bit [FB_L-1:0] FB_CODE = tcodec_pkg::EX_CODE,
  parameter int unsigned FB_W      = tcodec_pkg::EX_W,
  parameter int unsigned FB_THRESH = tcodec_pkg::EX_THRESH,
  parameter int unsigned PF_L = tcodec_pkg::EX_L,
  parameter int unsigned PF_W = tcodec_pkg::EX_W,
  parameter int unsigned EC_L = 6,
  parameter int unsigned DC_L = 40,
  parameter int unsigned DC_W = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  // parallel-pipeline encoder
  input  logic                enc_scan_en_i,
  input  logic                enc_scan_i,
  output logic                enc_scan_o,
  input  logic [Y-1:0][U-1:0] enc_info_i,
  output logic [Y-1:0][P-1:0] enc_par_o,
  // parallel-pipeline definite decoder
  input  logic                dec_scan_en_i,
  input  logic                dec_scan_i,
  output logic                dec_scan_o,
  input  logic [Y-1:0][U-1:0] dec_info_r_i,
  input  logic [Y-1:0][P-1:0] dec_par_r_i,
  output logic [Y-1:0][P-1:0] dec_syn_o,
  output logic [Y-1:0][U-1:0] dec_nhat_o,
  output logic [Y-1:0][U-1:0] dec_o,
  // feedback decoder
  input  logic                fb_info_r_i,
  input  logic                fb_par_r_i,
  output logic                fb_syn_o,
  output logic                fb_nhat_o,
  output logic                fb_dec_o,
  // encoder chip
  // parallel (non-pipelined) encoder, fixed example code
  input  logic [Y-1:0]        pe_info_i,
  output logic [Y-1:0]        pe_par_o,
  // programmable feedback decoder
  input  logic                pf_scan_en_i,
  input  logic                pf_scan_i,
  output logic                pf_scan_o,
  input  logic                pf_info_r_i,
  input  logic                pf_par_r_i,
  output logic                pf_syn_o,
  output logic                pf_nhat_o,
  output logic                pf_dec_o,
  // encoder chip
  input  logic                ec_load_i,
  input  logic [EC_L-1:0]     ec_conn_i,
  input  logic                ec_info_i,
  input  logic                ec_part_i,
  output logic                ec_info_o,
  output logic                ec_part_o,
  // decoder chip
  input  logic                dc_scan_en_i,
  input  logic                dc_scan_i,
  output logic                dc_scan_o,
  input  logic                dc_info_i,
  input  logic                dc_sr_i,
  output logic                dc_sr_o,
  input  logic                dc_par_r_i,
  input  logic                dc_part_i,
  output logic                dc_part_o,
  output logic                dc_syn_o,
  input  logic                dc_syn_i,
  input  logic [DC_W-1:0]     dc_sum_i,
  output logic [DC_W-1:0]     dc_sum_o,
  output logic                dc_nhat_o,
  output logic                dc_dec_o
);
  localparam int unsigned NGEN = P * U * L;
  localparam int unsigned NMAJ = U * P * L;
  localparam int unsigned NDEC = NGEN + NMAJ + U * W;

  // ---------------- parallel-pipeline encoder ----------------
  logic [NGEN-1:0] enc_cfg;
  scan_register #(.N(NGEN)) u_enc_scan (
    .clk  (clk),
    .rst_n(rst_n),
    .en_i (enc_scan_en_i),
    .d_i  (enc_scan_i),
    .q_o  (enc_scan_o),
    .cfg_o(enc_cfg)
  );

  pp_encoder #(.U(U), .P(P), .Y(Y), .L(L)) u_pp_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .info_i  (enc_info_i),
    .gen_i   (enc_cfg),
    .parity_o(enc_par_o)
  );

  // ---------------- parallel-pipeline definite decoder ----------------
  logic [NDEC-1:0] dec_cfg;
  scan_register #(.N(NDEC)) u_dec_scan (
    .clk  (clk),
    .rst_n(rst_n),
    .en_i (dec_scan_en_i),
    .d_i  (dec_scan_i),
    .q_o  (dec_scan_o),
    .cfg_o(dec_cfg)
  );

  pp_threshold_decoder #(.U(U), .P(P), .Y(Y), .L(L), .W(W)) u_pp_dec (
    .clk     (clk),
    .rst_n   (rst_n),
    .info_r_i(dec_info_r_i),
    .par_r_i (dec_par_r_i),
    .gen_i   (dec_cfg[NGEN-1:0]),
    .maj_i   (dec_cfg[NGEN+NMAJ-1:NGEN]),
    .thr_i   (dec_cfg[NDEC-1:NGEN+NMAJ]),
    .syn_o   (dec_syn_o),
    .nhat_o  (dec_nhat_o),
    .dec_o   (dec_o)
  );

  // ---------------- parallel encoder, fixed code ----------------
  parallel_encoder #(.Y(Y), .L(FB_L), .CODE(FB_CODE)) u_par_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .info_i  (pe_info_i),
    .parity_o(pe_par_o)
  );

  // ---------------- feedback decoder ----------------
  feedback_threshold_decoder #(
    .L(FB_L), .CODE(FB_CODE), .W(FB_W), .THRESH(FB_THRESH)
  ) u_fb_dec (
    .clk     (clk),
    .rst_n   (rst_n),
    .info_r_i(fb_info_r_i),
    .par_r_i (fb_par_r_i),
    .syn_o   (fb_syn_o),
    .nhat_o  (fb_nhat_o),
    .dec_o   (fb_dec_o)
  );

  // ---------------- programmable feedback decoder ----------------
  localparam int unsigned PF_SW  = $clog2(PF_L);
  localparam int unsigned PF_CFG = 3 * PF_L + PF_W + PF_L * PF_SW;
  logic [PF_CFG-1:0] pf_cfg;
  scan_register #(.N(PF_CFG)) u_pf_scan (
    .clk  (clk),
    .rst_n(rst_n),
    .en_i (pf_scan_en_i),
    .d_i  (pf_scan_i),
    .q_o  (pf_scan_o),
    .cfg_o(pf_cfg)
  );

  prog_feedback_decoder #(.L(PF_L), .W(PF_W)) u_pf_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .code_i   (pf_cfg[PF_L-1:0]),
    .maj_i    (pf_cfg[2*PF_L-1:PF_L]),
    .thr_i    (pf_cfg[2*PF_L+PF_W-1:2*PF_L]),
    .tgt_en_i (pf_cfg[3*PF_L+PF_W-1:2*PF_L+PF_W]),
    .tgt_sel_i(pf_cfg[PF_CFG-1:3*PF_L+PF_W]),
    .info_r_i (pf_info_r_i),
    .par_r_i  (pf_par_r_i),
    .syn_o    (pf_syn_o),
    .nhat_o   (pf_nhat_o),
    .dec_o    (pf_dec_o)
  );

  // ---------------- encoder chip ----------------
  encoder_chip #(.L(EC_L)) u_enc_chip (
    .clk   (clk),
    .rst_n (rst_n),
    .load_i(ec_load_i),
    .conn_i(ec_conn_i),
    .info_i(ec_info_i),
    .part_i(ec_part_i),
    .info_o(ec_info_o),
    .part_o(ec_part_o)
  );

  // ---------------- decoder chip ----------------
  decoder_chip #(.L(DC_L), .W(DC_W)) u_dec_chip (
    .clk      (clk),
    .rst_n    (rst_n),
    .scan_en_i(dc_scan_en_i),
    .scan_i   (dc_scan_i),
    .scan_o   (dc_scan_o),
    .info_i   (dc_info_i),
    .sr_i     (dc_sr_i),
    .sr_o     (dc_sr_o),
    .par_r_i  (dc_par_r_i),
    .part_i   (dc_part_i),
    .part_o   (dc_part_o),
    .syn_o    (dc_syn_o),
    .syn_i    (dc_syn_i),
    .sum_i    (dc_sum_i),
    .sum_o    (dc_sum_o),
    .nhat_o   (dc_nhat_o),
    .dec_o    (dc_dec_o)
  );
endmodule
