// decoder_chip_chain_tb: a long-code decoder built from 22 decoder chips
// chained end to end (22 * 40 = 880 stages, decoding delay 879), the
// number of chips a rate 1/2 code of length 841 needs. The code is generated
// here as the greedy set of taps with all pairwise differences distinct
// (0, 1, 3, 7, 12, 20, ...), which makes it self-orthogonal; every tap up to
// 840 is kept, giving J = 25 checks (at most 2^5-1 = 31 are allowed for the
// 5-bit SOS pipeline) and threshold 12. All chips share one scan chain;
// chip m (m = 0 first) holds lags (21-m)*40 .. (21-m)*40+39 of both the code
// and the majority connections, and only the last chip's threshold is used.
// Random channel errors (about one digit in 128) are added; every clock is
// compared with a serial definite-decoder model and every decoded digit must
// equal the transmitted one.
module decoder_chip_chain_tb;
  localparam int L = 40, W = 5, NCH = 22, LT = L * NCH, D = LT - 1;
  localparam int NCFG = 2*L + W;
  localparam int NB = 3000;
  localparam int MAXTAP = 840;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, corrected = 0, n_err = 0;

  logic scan_en, scan_in, ir, pr;
  logic [NCH:0] scan, sr, part;
  logic [NCH:0][W-1:0] sum;
  logic [NCH-1:0] syn, nhat, dec;
  logic syn_last;
  logic [NCH-1:0][2*L-1:0] cfgs;   // code and majority fields of each chip

  assign scan[0] = scan_in;
  assign sr[0]   = ir;
  assign part[0] = 1'b0;
  assign sum[0]  = '0;
  assign syn_last = syn[NCH-1];

  for (genvar m = 0; m < NCH; m++) begin : g_chip
    decoder_chip #(.L(L), .W(W)) u (
      .clk(clk), .rst_n(rst_n), .scan_en_i(scan_en), .scan_i(scan[m]), .scan_o(scan[m+1]),
      .info_i(ir), .sr_i(sr[m]), .sr_o(sr[m+1]), .par_r_i(pr),
      .part_i(part[m]), .part_o(part[m+1]), .syn_o(syn[m]), .syn_i(syn_last),
      .sum_i(sum[m]), .sum_o(sum[m+1]), .nhat_o(nhat[m]), .dec_o(dec[m]));
    assign cfgs[m] = u.cfg[2*L-1:0];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ib [NB], irb [NB], sb [NB];
  logic [LT-1:0] gen, maj;
  int taps [$];
  int J;

  initial begin
    int pos, sumv;
    bit pt, e_n, e_d, ok;
    bit used [MAXTAP+1];
    logic [NCFG-1:0] cfg;
    // greedy self-orthogonal tap set
    foreach (used[i]) used[i] = 0;
    taps.push_back(0);
    for (int cand = 1; cand <= MAXTAP; cand++) begin
      ok = 1;
      foreach (taps[t]) if (used[cand - taps[t]]) ok = 0;
      if (ok) begin
        foreach (taps[t]) used[cand - taps[t]] = 1;
        taps.push_back(cand);
      end
    end
    J = taps.size();
    gen = '0; maj = '0;
    foreach (taps[t]) begin gen[taps[t]] = 1'b1; maj[D - taps[t]] = 1'b1; end
    $display("code: J = %0d taps, largest tap %0d, chain length %0d", J, taps[J-1], LT);
    checks++;
    if (J > 31 || J < 20) begin failures++; $display("FAIL unexpected tap count"); end

    scan_en = 0; scan_in = 0; ir = 0; pr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the last chip's word is sent first; it passes through all the others
    for (int m = NCH - 1; m >= 0; m--) begin
      pos = (NCH - 1 - m) * L;
      cfg = {((m == NCH - 1) ? 5'(J / 2) : 5'd0), maj[pos +: L], gen[pos +: L]};
      for (int b = 0; b < NCFG; b++) begin
        @(negedge clk);
        scan_en = 1; scan_in = cfg[b];
      end
    end
    @(negedge clk);
    scan_en = 0;
    for (int m = 0; m < NCH; m++) begin
      pos = (NCH - 1 - m) * L;
      checks++;
      if (cfgs[m] !== {maj[pos +: L], gen[pos +: L]}) begin
        failures++; $display("FAIL scan: chip %0d", m);
      end
    end

    for (int n = 0; n < NB; n++) begin
      @(negedge clk);
      ib[n] = 1'($urandom);
      irb[n] = ib[n];
      pt = 0;
      foreach (taps[t]) if (n - taps[t] >= 0) pt ^= ib[n - taps[t]];
      if ($urandom_range(0, 127) == 0) begin irb[n] = ~irb[n]; n_err++; end
      if ($urandom_range(0, 127) == 0) begin pt = ~pt; n_err++; end
      ir = irb[n]; pr = pt;
      sb[n] = pt;
      foreach (taps[t]) if (n - taps[t] >= 0) sb[n] ^= irb[n - taps[t]];
      sumv = 0;
      foreach (taps[t]) if (n - (D - taps[t]) >= 0) sumv += int'(sb[n - (D - taps[t])]);
      e_n = (sumv > J / 2);
      e_d = ((n - D >= 0) ? irb[n-D] : 1'b0) ^ e_n;
      #1;
      checks += 3;
      if (syn_last !== sb[n])   begin failures++; $display("FAIL syndrome at %0d", n); end
      if (nhat[NCH-1] !== e_n)  begin failures++; $display("FAIL nhat at %0d", n); end
      if (dec[NCH-1] !== e_d)   begin failures++; $display("FAIL dec at %0d", n); end
      if (n >= D) begin
        checks++;
        if (dec[NCH-1] !== ib[n-D]) begin failures++; $display("FAIL digit %0d not corrected", n-D); end
        if (irb[n-D] != ib[n-D] && dec[NCH-1] == ib[n-D]) corrected++;
      end
    end
    $display("channel errors: %0d, information digits corrected: %0d", n_err, corrected);
    checks++;
    if (corrected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
