// feedback_threshold_decoder: pipeline feedback threshold decoder for a fixed
// systematic rate 1/2 self-orthogonal code (one codeword per clock).
//
// A pipeline encoder (connections CODE) re-encodes the received information
// digit; XOR with the received parity gives the syndrome. The syndrome feeds
// the feedback SOS pipeline, whose total is compared with THRESH; the result
// is the noise estimate of the information digit received D = L-1 clocks
// earlier, which corrects that digit (taken from a D-stage shift register)
// and is fed back both into the syndrome register (correcting every stored
// syndrome that checked that digit) and into the SOS pipeline columns that hold an
// affected syndrome. For the same received sequence it decides exactly like
// a conventional feedback decoder with a syndrome register and a J-input
// majority gate. CODE must be self-orthogonal (distinct tap differences),
// and 2^W must exceed the number of taps J.
// Timing: dec_o and nhat_o are combinational in the current inputs and
// registered state; dec_o in clock t is the decoded digit of time t-D.
module feedback_threshold_decoder #(
  parameter int unsigned L      = tcodec_pkg::EX_L,
  parameter bit [L-1:0]  CODE   = tcodec_pkg::EX_CODE,
  parameter int unsigned W      = tcodec_pkg::EX_W,
  parameter int unsigned THRESH = tcodec_pkg::EX_THRESH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic info_r_i,   // received information digit
  input  logic par_r_i,    // received parity digit
  output logic syn_o,      // syndrome
  output logic nhat_o,     // noise estimate of the digit of time t-(L-1)
  output logic dec_o       // decoded information digit of time t-(L-1)
);
  logic         phat;
  logic [L-1:0] sstar;
  logic [W-1:0] sum;
  logic         info_dly;

  encoding_pipeline #(.L(L)) u_enc (
    .clk   (clk),
    .rst_n (rst_n),
    .info_i(info_r_i),
    .conn_i(CODE),
    .part_i(1'b0),
    .part_o(phat)
  );
  assign syn_o = par_r_i ^ phat;

  fb_syndrome_register #(.L(L), .CODE(CODE)) u_sreg (
    .clk    (clk),
    .rst_n  (rst_n),
    .s_i    (syn_o),
    .nhat_i (nhat_o),
    .sstar_o(sstar)
  );

  fb_sos_pipeline #(.L(L), .CODE(CODE), .W(W)) u_sos (
    .clk    (clk),
    .rst_n  (rst_n),
    .s_i    (syn_o),
    .sstar_i(sstar),
    .nhat_i (nhat_o),
    .sum_o  (sum)
  );

  threshold_comparator #(.W(W)) u_cmp (
    .a_i (sum),
    .b_i (W'(THRESH)),
    .gt_o(nhat_o)
  );

  shift_delay #(.N(L - 1)) u_dly (
    .clk  (clk),
    .rst_n(rst_n),
    .d_i  (info_r_i),
    .q_o  (info_dly)
  );
  assign dec_o = info_dly ^ nhat_o;
endmodule
