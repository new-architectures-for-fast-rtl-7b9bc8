// fb_dec_check: drives one feedback_threshold_decoder and compares it clock
// by clock with a conventional feedback decoder model: a syndrome register
// of corrected syndromes s*, a majority decision over the J checking
// syndromes (sum > THRESH), and the decision XORed back into every stored
// syndrome that also checks the decided digit. The channel is a model
// encoder plus noise: first a stretch of isolated errors (at least 2L digits
// apart), which must all be corrected, then a stretch of dense random noise
// where only agreement with the model is required.
module fb_dec_check #(
  parameter int L = 7,
  parameter bit [L-1:0] CODE = 7'b1010011,
  parameter int W = 3,
  parameter int THRESH = 2,
  parameter int NBITS = 1500
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   feedbacks,   // clocks with a noise estimate of 1 fed back
  output logic done
);
  localparam int D = L - 1;
  logic ir, pr, syn, nhat, dec;
  bit ib [NBITS];
  bit irb [NBITS];
  bit sr [L];

  feedback_threshold_decoder #(.L(L), .CODE(CODE), .W(W), .THRESH(THRESH)) dut (
    .clk(clk), .rst_n(rst_n), .info_r_i(ir), .par_r_i(pr), .syn_o(syn), .nhat_o(nhat), .dec_o(dec));

  initial begin
    int last_err, sum;
    bit s, pt, e_n, e_d;
    bit cur [L];
    checks = 0; failures = 0; feedbacks = 0; done = 0;
    ir = 0; pr = 0; last_err = -1000;
    foreach (sr[e]) sr[e] = 0;
    @(posedge rst_n);
    for (int n = 0; n < NBITS; n++) begin
      @(negedge clk);
      ib[n] = 1'($urandom);
      irb[n] = ib[n];
      pt = 0;
      for (int d = 0; d < L; d++) if (n - d >= 0) pt ^= CODE[d] & ib[n-d];
      if (n < NBITS / 2) begin
        if (n - last_err >= 2*L && $urandom_range(0, 3) == 0) begin
          last_err = n;
          if ($urandom_range(0, 1) == 0) irb[n] = ~irb[n]; else pt = ~pt;
        end
      end else begin
        if ($urandom_range(0, 15) == 0) irb[n] = ~irb[n];
        if ($urandom_range(0, 15) == 0) pt = ~pt;
      end
      ir = irb[n]; pr = pt;
      // model
      s = pt;
      for (int d = 0; d < L; d++) if (n - d >= 0) s ^= CODE[d] & irb[n-d];
      cur[0] = s;
      for (int e = 1; e < L; e++) cur[e] = sr[e];
      sum = 0;
      for (int e = 0; e < L; e++) if (CODE[D-e]) sum += int'(cur[e]);
      e_n = (sum > THRESH);
      e_d = ((n - D >= 0) ? irb[n-D] : 1'b0) ^ e_n;
      for (int e = 0; e < D; e++) sr[e+1] = cur[e] ^ (e_n & CODE[D-e]);
      #1;
      checks += 3;
      if (syn !== s)    begin failures++; $display("FAIL L%0d syndrome at %0d", L, n); end
      if (nhat !== e_n) begin failures++; $display("FAIL L%0d nhat at %0d", L, n); end
      if (dec !== e_d)  begin failures++; $display("FAIL L%0d dec at %0d", L, n); end
      if (e_n) feedbacks++;
      if (n < NBITS / 2 && n - D >= 0) begin
        checks++;
        if (dec !== ib[n-D]) begin failures++; $display("FAIL L%0d: isolated error not corrected at %0d", L, n-D); end
      end
    end
    done = 1;
  end
endmodule
