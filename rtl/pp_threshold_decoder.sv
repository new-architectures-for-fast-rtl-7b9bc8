// pp_threshold_decoder: programmable definite threshold decoder with the
// parallel-pipeline architecture, for systematic rate U/V codes
// (P = V-U parity streams), taking Y codewords per clock.
//
// Structure, per clock (block k, lane y = time k*Y + y):
//  1. A replica of the encoder (pp_encoder, same generator bits) re-encodes
//     the received information digits; XORing with the received parities
//     gives the syndromes s[y][p].
//  2. For every information stream u and output lane y, a majority_pipeline
//     sums P*Y SOS pipelines, one per syndrome stream p and syndrome lane x.
//     Cell q of the pipeline from lane x covers syndrome lag e = q*Y + y - x
//     and takes majority connection maj_i[u][p][e]. The total is compared
//     with thr_i[u]; the result is the noise estimate of the information
//     digit received D = L-1 times earlier.
//  3. That digit, taken from a shift register (lane (y-D) mod Y, delayed the
//     matching number of blocks), is XORed with the estimate.
// Lane y of dec_o in block k is therefore the decoded digit of time
// k*Y + y - (L-1). With Y = 1, U = P = 1 this is the pipeline decoder of the
// running example; U = 3 gives the rate 3/4 decoder (three majority
// pipelines sharing one syndrome), P = 2 the rate 1/3 decoder (two SOS
// pipelines summed before one comparator).
// maj_i[u][p][e] = 1 makes the syndrome of parity stream p at lag e a check on
// the information digit of stream u at lag L-1. W must satisfy 2^W > J.
// Timing: dec_o and nhat_o are combinational in the inputs and registered state.
// The per-pipeline sums and the total of each majority pipeline are left
// unread here (only its decision is used), so lint lists them as unused.
module pp_threshold_decoder #(
  parameter int unsigned U = 1,
  parameter int unsigned P = 1,
  parameter int unsigned Y = 2,
  parameter int unsigned L = 7,
  parameter int unsigned W = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [Y-1:0][U-1:0]           info_r_i,  // received information digits [lane][stream]
  input  logic [Y-1:0][P-1:0]           par_r_i,   // received parity digits [lane][stream]
  input  logic [P-1:0][U-1:0][L-1:0]    gen_i,     // code (generator) connections
  input  logic [U-1:0][P-1:0][L-1:0]    maj_i,     // majority connections
  input  logic [U-1:0][W-1:0]           thr_i,     // threshold value per information stream
  output logic [Y-1:0][P-1:0]           syn_o,     // syndromes
  output logic [Y-1:0][U-1:0]           nhat_o,    // noise estimates
  output logic [Y-1:0][U-1:0]           dec_o      // decoded information digits
);
  import tcodec_pkg::*;
  localparam int unsigned NQ = n_cells(L, Y);
  localparam int unsigned DL = L - 1;             // decoding delay in digits
  localparam int unsigned NS = P * Y;

  // 1. replica of the encoder and syndrome formation
  logic [Y-1:0][P-1:0] phat;
  pp_encoder #(.U(U), .P(P), .Y(Y), .L(L)) u_replica (
    .clk     (clk),
    .rst_n   (rst_n),
    .info_i  (info_r_i),
    .gen_i   (gen_i),
    .parity_o(phat)
  );
  assign syn_o = par_r_i ^ phat;

  // syndromes flattened as majority-pipeline inputs: index n = x*P + p
  logic [NS-1:0] syn_flat;
  for (genvar x = 0; x < Y; x++) begin : g_sf
    for (genvar p = 0; p < P; p++) begin : g_sfp
      assign syn_flat[x*P + p] = syn_o[x][p];
    end
  end

  for (genvar y = 0; y < Y; y++) begin : g_y
    for (genvar u = 0; u < U; u++) begin : g_u
      // 2. majority logic for stream u, lane y
      logic [NS-1:0][NQ-1:0] conn;
      logic [NS-1:0][W-1:0]  sums;
      logic [W-1:0]          total;
      for (genvar x = 0; x < Y; x++) begin : g_x
        for (genvar p = 0; p < P; p++) begin : g_p
          for (genvar q = 0; q < NQ; q++) begin : g_q
            localparam int E = lane_lag(q, Y, y, x);
            if (E >= 0 && E < L) begin : g_on
              assign conn[x*P + p][q] = maj_i[u][p][E];
            end else begin : g_off
              assign conn[x*P + p][q] = 1'b0;
            end
          end
        end
      end
      majority_pipeline #(.L(NQ), .W(W), .NS(NS)) u_maj (
        .clk    (clk),
        .rst_n  (rst_n),
        .s_i    (syn_flat),
        .conn_i (conn),
        .sum_i  ('0),
        .thr_i  (thr_i[u]),
        .sum_o  (sums),
        .total_o(total),
        .nhat_o (nhat_o[y][u])
      );

      // 3. information shift register and correction
      localparam int XS = ((int'(y) - int'(DL)) % int'(Y) + int'(Y)) % int'(Y);
      localparam int NB = (int'(DL) - int'(y) + XS) / int'(Y);
      logic info_dly;
      shift_delay #(.N(NB)) u_dly (
        .clk  (clk),
        .rst_n(rst_n),
        .d_i  (info_r_i[XS][u]),
        .q_o  (info_dly)
      );
      assign dec_o[y][u] = info_dly ^ nhat_o[y][u];
    end
  end
endmodule
