// fec_codec_top_tb: end-to-end run of the whole design at its default sizes.
//  1. The parallel-pipeline encoder and decoder are scan-loaded with the
//     running example (rate 1/2, taps 0,1,4,6, Y = 2); information blocks are
//     encoded two codewords per clock, passed through a channel that flips
//     isolated digits, and decoded. Encoder output is checked against a
//     serial encoder model, and every decoded digit must equal the
//     transmitted one exactly L-1 = 6 digits (3 clocks) later. The
//     fixed-code parallel encoder gets the same information blocks and must
//     give the same parities.
//  2. The feedback decoder receives a serially encoded stream of the same
//     code, first with isolated errors (all must be corrected) and then with
//     dense noise (feedback must occur). The programmable feedback decoder
//     is scan-loaded with the same code, its majority connections,
//     threshold and target network, gets the same received stream and must
//     agree with the fixed one on every digit.
//  3. The encoder chip (connections loaded in parallel, code taps 0,1,3)
//     feeds the scan-loaded decoder chip (decision delay 39) through a
//     channel with isolated errors; decoded digits must be correct.
// Every mechanism (four scan loads, the parallel load, corrections in each
// decoder, feedback) is counted and must happen at least once.
module fec_codec_top_tb;
  localparam int Y = 2, L = 7;
  localparam int NBLK = 600;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int n_enc_scan = 0, n_dec_scan = 0, n_dc_scan = 0, n_ec_load = 0;
  int n_pp_corr = 0, n_fb_corr = 0, n_fb_feedback = 0, n_dc_corr = 0;
  int n_pf_scan = 0, n_pf_feedback = 0;

  logic enc_scan_en, enc_scan_i, enc_scan_o;
  logic [Y-1:0][0:0] enc_info, dec_info_r, dec_nhat, dec_o;
  logic [Y-1:0][0:0] enc_par, dec_par_r, dec_syn;
  logic dec_scan_en, dec_scan_i, dec_scan_o;
  logic fb_ir, fb_pr, fb_syn, fb_nhat, fb_dec;
  logic [Y-1:0] pe_par;
  logic pf_scan_en, pf_scan_i, pf_scan_o, pf_syn, pf_nhat, pf_dec;
  logic ec_load, ec_info, ec_info_o, ec_part_o;
  logic [5:0] ec_conn;
  logic dc_scan_en, dc_scan_i, dc_scan_o, dc_info, dc_sr_o, dc_par_r, dc_part_o, dc_syn, dc_nhat, dc_dec;
  logic [4:0] dc_sum_o;

  fec_codec_top dut (
    .clk(clk), .rst_n(rst_n),
    .enc_scan_en_i(enc_scan_en), .enc_scan_i(enc_scan_i), .enc_scan_o(enc_scan_o),
    .enc_info_i(enc_info), .enc_par_o(enc_par),
    .dec_scan_en_i(dec_scan_en), .dec_scan_i(dec_scan_i), .dec_scan_o(dec_scan_o),
    .dec_info_r_i(dec_info_r), .dec_par_r_i(dec_par_r), .dec_syn_o(dec_syn),
    .dec_nhat_o(dec_nhat), .dec_o(dec_o),
    .fb_info_r_i(fb_ir), .fb_par_r_i(fb_pr), .fb_syn_o(fb_syn), .fb_nhat_o(fb_nhat), .fb_dec_o(fb_dec),
    .pe_info_i(enc_info), .pe_par_o(pe_par),
    .pf_scan_en_i(pf_scan_en), .pf_scan_i(pf_scan_i), .pf_scan_o(pf_scan_o),
    .pf_info_r_i(fb_ir), .pf_par_r_i(fb_pr), .pf_syn_o(pf_syn), .pf_nhat_o(pf_nhat), .pf_dec_o(pf_dec),
    .ec_load_i(ec_load), .ec_conn_i(ec_conn), .ec_info_i(ec_info), .ec_part_i(1'b0),
    .ec_info_o(ec_info_o), .ec_part_o(ec_part_o),
    .dc_scan_en_i(dc_scan_en), .dc_scan_i(dc_scan_i), .dc_scan_o(dc_scan_o),
    .dc_info_i(dc_info), .dc_sr_i(dc_info), .dc_sr_o(dc_sr_o), .dc_par_r_i(dc_par_r),
    .dc_part_i(1'b0), .dc_part_o(dc_part_o), .dc_syn_o(dc_syn), .dc_syn_i(dc_syn),
    .dc_sum_i(5'd0), .dc_sum_o(dc_sum_o), .dc_nhat_o(dc_nhat), .dc_dec_o(dc_dec));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what, int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0d: got %0b exp %0b", what, n, got, exp);
    end
  endtask

  // serial histories
  bit pp_i [NBLK*Y];
  bit fb_i [NBLK], fb_r [NBLK];
  bit dc_i [NBLK], dc_r [NBLK];
  localparam bit [6:0]  CODE    = 7'b1010011;
  localparam bit [5:0]  EC_CODE = 6'b001011;           // taps 0,1,3
  localparam bit [16:0] DEC_CFG = {3'd2, 7'b1100101, 7'b1010011};
  // programmable feedback decoder: target selects of columns 6..0, target
  // enables, threshold, majority connections, code
  localparam bit [44:0] PF_CFG  = {3'd0, 3'd5, 3'd0, 3'd2, 3'd2, 3'd0, 3'd0,
                                   7'b0111111, 3'd2, 7'b1100101, 7'b1010011};

  initial begin
    logic [84:0] dc_cfg;
    int n, last_pp, last_fb, last_dc;
    bit pt, err;
    enc_scan_en = 0; enc_scan_i = 0; dec_scan_en = 0; dec_scan_i = 0;
    dc_scan_en = 0; dc_scan_i = 0; ec_load = 0; ec_conn = '0;
    enc_info = '0; dec_info_r = '0; dec_par_r = '0;
    fb_ir = 0; fb_pr = 0; ec_info = 0; dc_info = 0; dc_par_r = 0;
    dc_cfg = '0;
    dc_cfg[0] = 1; dc_cfg[1] = 1; dc_cfg[3] = 1;                  // code taps 0,1,3
    dc_cfg[40 + 39] = 1; dc_cfg[40 + 38] = 1; dc_cfg[40 + 36] = 1; // checks at syndrome lags 39,38,36
    dc_cfg[84:80] = 5'd1;                                          // decide on 2 of 3
    repeat (2) @(negedge clk);
    rst_n = 1;

    // configuration: three scan chains in parallel, one parallel load
    for (int b = 0; b < 85; b++) begin
      @(negedge clk);
      enc_scan_en = (b < 7);  enc_scan_i = (b < 7) ? CODE[b] : 1'b0;
      dec_scan_en = (b < 17); dec_scan_i = (b < 17) ? DEC_CFG[b] : 1'b0;
      dc_scan_en = 1;         dc_scan_i = dc_cfg[b];
      pf_scan_en = (b < 45);  pf_scan_i = (b < 45) ? PF_CFG[b] : 1'b0;
      ec_load = (b == 0);     ec_conn = EC_CODE;
    end
    @(negedge clk);
    enc_scan_en = 0; dec_scan_en = 0; dc_scan_en = 0; ec_load = 0; ec_conn = '0;
    pf_scan_en = 0;
    n_enc_scan++; n_dec_scan++; n_dc_scan++; n_ec_load++; n_pf_scan++;
    chk(pf_scan_o, PF_CFG[0], "programmable feedback decoder scan out", 0);
    chk(enc_scan_o, CODE[0], "encoder scan out", 0);
    chk(dec_scan_o, DEC_CFG[0], "decoder scan out", 0);
    chk(dc_scan_o, dc_cfg[0], "decoder chip scan out", 0);

    last_pp = -1000; last_fb = -1000; last_dc = -1000;
    for (int k = 0; k < NBLK; k++) begin
      @(negedge clk);
      // ---- 1. parallel-pipeline encoder -> channel -> decoder
      for (int y = 0; y < Y; y++) begin
        n = k*Y + y;
        pp_i[n] = 1'($urandom);
        enc_info[y] = pp_i[n];
      end
      #1;
      for (int y = 0; y < Y; y++) begin
        n = k*Y + y;
        pt = 0;
        for (int d = 0; d < L; d++) if (n - d >= 0) pt ^= CODE[d] & pp_i[n-d];
        chk(enc_par[y], pt, "parallel encoder parity", n);
        chk(pe_par[y], pt, "fixed-code parallel encoder parity", n);
        dec_info_r[y] = enc_info[y];
        dec_par_r[y] = enc_par[y];
        if (n - last_pp >= 2*L && $urandom_range(0, 3) == 0) begin
          last_pp = n;
          if ($urandom_range(0, 1) == 0) dec_info_r[y] = ~dec_info_r[y];
          else                           dec_par_r[y] = ~dec_par_r[y];
        end
      end
      // ---- 2. feedback decoder, serial
      fb_i[k] = 1'($urandom);
      pt = 0;
      for (int d = 0; d < L; d++) if (k - d >= 0) pt ^= CODE[d] & fb_i[k-d];
      fb_r[k] = fb_i[k];
      if (k < NBLK / 2) begin
        if (k - last_fb >= 2*L && $urandom_range(0, 3) == 0) begin
          last_fb = k;
          if ($urandom_range(0, 1) == 0) fb_r[k] = ~fb_r[k]; else pt = ~pt;
        end
      end else begin
        if ($urandom_range(0, 15) == 0) fb_r[k] = ~fb_r[k];
        if ($urandom_range(0, 15) == 0) pt = ~pt;
      end
      fb_ir = fb_r[k]; fb_pr = pt;
      // ---- 3. encoder chip -> channel -> decoder chip
      dc_i[k] = 1'($urandom);
      ec_info = dc_i[k];
      #1;
      dc_r[k] = ec_info_o;
      dc_par_r = ec_part_o;
      if (k - last_dc >= 80 && $urandom_range(0, 3) == 0) begin
        last_dc = k;
        if ($urandom_range(0, 1) == 0) dc_r[k] = ~dc_r[k]; else dc_par_r = ~dc_par_r;
      end
      dc_info = dc_r[k];
      #1;
      // ---- checks
      for (int y = 0; y < Y; y++) begin
        n = k*Y + y - (L - 1);
        if (n >= 0) begin
          chk(dec_o[y], pp_i[n], "parallel decoder output", n);
          if (dec_nhat[y]) n_pp_corr++;
        end
      end
      if (k >= L - 1) begin
        if (k < NBLK / 2) chk(fb_dec, fb_i[k-L+1], "feedback decoder output", k);
        if (fb_r[k-L+1] != fb_i[k-L+1] && fb_dec == fb_i[k-L+1]) n_fb_corr++;
      end
      if (fb_nhat) n_fb_feedback++;
      chk(pf_syn, fb_syn, "programmable feedback decoder syndrome", k);
      chk(pf_nhat, fb_nhat, "programmable feedback decoder estimate", k);
      chk(pf_dec, fb_dec, "programmable feedback decoder output", k);
      if (pf_nhat) n_pf_feedback++;
      if (k >= 39) begin
        chk(dc_dec, dc_i[k-39], "decoder chip output", k);
        if (dc_nhat) n_dc_corr++;
      end
    end

    $display("mechanisms: enc_scan=%0d dec_scan=%0d dc_scan=%0d ec_load=%0d pp_corr=%0d fb_corr=%0d fb_feedback=%0d dc_corr=%0d pf_scan=%0d pf_feedback=%0d",
             n_enc_scan, n_dec_scan, n_dc_scan, n_ec_load, n_pp_corr, n_fb_corr, n_fb_feedback, n_dc_corr, n_pf_scan, n_pf_feedback);
    checks += 10;
    if (n_pf_scan == 0) failures++;
    if (n_pf_feedback == 0) failures++;
    if (n_enc_scan == 0) failures++;
    if (n_dec_scan == 0) failures++;
    if (n_dc_scan == 0) failures++;
    if (n_ec_load == 0) failures++;
    if (n_pp_corr == 0) failures++;
    if (n_fb_corr == 0) failures++;
    if (n_fb_feedback == 0) failures++;
    if (n_dc_corr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
