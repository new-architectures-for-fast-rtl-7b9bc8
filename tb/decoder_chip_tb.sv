// decoder_chip_tb: the L = 40 decoder chip, loaded through its scan chain.
// Part 1: one chip alone, programmed with the self-orthogonal code with taps
// 0,1,4,9,15,22,32,34 (J = 8, threshold 4); isolated channel errors must be
// corrected and every clock must agree with a serial definite-decoder model
// (decoding delay 39). Part 2: two chips chained end to end (length 80,
// delay 79) with the same code, the code connections in the second chip and
// the checks in the first, so partial parity, partial sums and the
// information shift register all cross the chip boundary. Dense noise; the
// output must agree with the model.
module decoder_chip_tb;
  localparam int L = 40, W = 5, NCFG = 2*L + W;
  localparam int NB = 1200;
  localparam int TAPS [8] = '{0, 1, 4, 9, 15, 22, 32, 34};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, corrected = 0;

  // single chip, own scan chain
  logic s1_en, s1_in, s1_out, ir, pr, sr_o, part_o, syn, nhat, dec;
  logic [W-1:0] sum_o;
  decoder_chip #(.L(L), .W(W)) u1 (.clk(clk), .rst_n(rst_n), .scan_en_i(s1_en), .scan_i(s1_in), .scan_o(s1_out),
    .info_i(ir), .sr_i(ir), .sr_o(sr_o), .par_r_i(pr), .part_i(1'b0), .part_o(part_o), .syn_o(syn),
    .syn_i(syn), .sum_i('0), .sum_o(sum_o), .nhat_o(nhat), .dec_o(dec));

  // two chained chips (one scan chain through a then b):
  // a holds lags 40..79, b holds lags 0..39
  logic s2_en, s2_in, ca_scan_o, cb_scan_o, a_sr_o, b_sr_o, a_part, b_part, a_syn, b_syn;
  logic a_nhat, b_nhat, a_dec, b_dec;
  logic [W-1:0] a_sum, b_sum;
  decoder_chip #(.L(L), .W(W)) ua (.clk(clk), .rst_n(rst_n), .scan_en_i(s2_en), .scan_i(s2_in), .scan_o(ca_scan_o),
    .info_i(ir), .sr_i(ir), .sr_o(a_sr_o), .par_r_i(pr), .part_i(1'b0), .part_o(a_part), .syn_o(a_syn),
    .syn_i(b_syn), .sum_i('0), .sum_o(a_sum), .nhat_o(a_nhat), .dec_o(a_dec));
  decoder_chip #(.L(L), .W(W)) ub (.clk(clk), .rst_n(rst_n), .scan_en_i(s2_en), .scan_i(ca_scan_o), .scan_o(cb_scan_o),
    .info_i(ir), .sr_i(a_sr_o), .sr_o(b_sr_o), .par_r_i(pr), .part_i(a_part), .part_o(b_part), .syn_o(b_syn),
    .syn_i(b_syn), .sum_i(a_sum), .sum_o(b_sum), .nhat_o(b_nhat), .dec_o(b_dec));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ib [NB], irb [NB], sb [NB];
  logic [79:0] gen, maj1, maj2;
  logic [NCFG-1:0] cfg1, cfg_a, cfg_b;
  logic [2*NCFG-1:0] chain;

  function automatic bit model_dec(input logic [79:0] m, input int n, input int dly,
                                   input int thr, output bit nh);
    int sum = 0;
    for (int e = 0; e < 80; e++) if (m[e] && n - e >= 0) sum += int'(sb[n-e]);
    nh = (sum > thr);
    return ((n - dly >= 0) ? irb[n-dly] : 1'b0) ^ nh;
  endfunction

  initial begin
    int last_err, n_outputs;
    bit pt, e_d, e_n;
    s1_en = 0; s1_in = 0; s2_en = 0; s2_in = 0; ir = 0; pr = 0;
    gen = '0; maj1 = '0; maj2 = '0;
    foreach (TAPS[t]) begin
      gen[TAPS[t]] = 1'b1;
      maj1[39 - TAPS[t]] = 1'b1;
      maj2[79 - TAPS[t]] = 1'b1;
    end
    cfg1  = {5'd4, maj1[39:0], gen[39:0]};
    cfg_a = {5'd0, maj2[79:40], gen[79:40]};
    cfg_b = {5'd4, maj2[39:0], gen[39:0]};
    chain = {cfg_a, cfg_b};   // b's word is sent first, it passes through a
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 2*NCFG; b++) begin
      @(negedge clk);
      s2_en = 1; s2_in = chain[b];
      s1_en = (b < NCFG); s1_in = (b < NCFG) ? cfg1[b] : 1'b0;
    end
    @(negedge clk);
    s1_en = 0; s2_en = 0;
    checks += 3;
    if (u1.cfg !== cfg1)  begin failures++; $display("FAIL scan: single chip"); end
    if (ua.cfg !== cfg_a) begin failures++; $display("FAIL scan: chip a"); end
    if (ub.cfg !== cfg_b) begin failures++; $display("FAIL scan: chip b"); end
    checks++;
    if (cb_scan_o !== cfg_b[0]) begin failures++; $display("FAIL scan out"); end

    last_err = -1000;
    for (int n = 0; n < NB; n++) begin
      @(negedge clk);
      ib[n] = 1'($urandom);
      irb[n] = ib[n];
      pt = 0;
      for (int d = 0; d < 80; d++) if (n - d >= 0) pt ^= gen[d] & ib[n-d];
      if (n < NB / 2) begin
        if (n - last_err >= 80 && $urandom_range(0, 3) == 0) begin
          last_err = n;
          if ($urandom_range(0, 1) == 0) irb[n] = ~irb[n]; else pt = ~pt;
        end
      end else begin
        if ($urandom_range(0, 15) == 0) irb[n] = ~irb[n];
        if ($urandom_range(0, 15) == 0) pt = ~pt;
      end
      ir = irb[n]; pr = pt;
      sb[n] = pt;
      for (int d = 0; d < 80; d++) if (n - d >= 0) sb[n] ^= gen[d] & irb[n-d];
      #1;
      // single chip
      e_d = model_dec(maj1, n, 39, 4, e_n);
      checks += 3;
      if (syn !== sb[n]) begin failures++; $display("FAIL single: syndrome at %0d", n); end
      if (nhat !== e_n)  begin failures++; $display("FAIL single: nhat at %0d", n); end
      if (dec !== e_d)   begin failures++; $display("FAIL single: dec at %0d", n); end
      if (n >= 39 && irb[n-39] != ib[n-39] && dec == ib[n-39]) corrected++;
      if (n < NB / 2 && n >= 39) begin
        checks++;
        if (dec !== ib[n-39]) begin failures++; $display("FAIL single: error not corrected at %0d", n-39); end
      end
      // chained pair
      e_d = model_dec(maj2, n, 79, 4, e_n);
      checks += 3;
      if (b_syn !== sb[n]) begin failures++; $display("FAIL chain: syndrome at %0d", n); end
      if (b_nhat !== e_n)  begin failures++; $display("FAIL chain: nhat at %0d", n); end
      if (b_dec !== e_d)   begin failures++; $display("FAIL chain: dec at %0d", n); end
    end
    $display("corrected digits (single chip): %0d", corrected);
    checks++;
    if (corrected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
