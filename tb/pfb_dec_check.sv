// pfb_dec_check: drives one prog_feedback_decoder through two configurations
// in turn (code A with threshold A, then code B with threshold B, with a
// reset in between) and compares it clock by clock with a conventional
// feedback decoder model whose code is also chosen at run time: a register
// of corrected syndromes s*, a majority decision over the syndromes that
// check the digit of time t-(L-1), and that decision XORed back into every
// stored syndrome that also checks it. The decoder's target network is set
// from a per-column search: a syndrome added at connected column c2 <= c is
// c-c2 clocks old and is the column's target when it checks the digit being
// decided. If HAND_A is set, the targets of code A must also equal
// HAND_TGT_A (-1 = none). Each phase sends isolated errors first, which must
// all be corrected, then dense random noise.
module pfb_dec_check #(
  parameter int L = 7,
  parameter int W = 3,
  parameter bit [L-1:0] CODE_A = 7'b1010011,
  parameter int THR_A = 2,
  parameter bit [L-1:0] CODE_B = 7'b1010011,
  parameter int THR_B = 2,
  parameter bit HAND_A = 0,
  parameter int HAND_TGT_A [L] = '{default: -1},
  parameter int NBITS = 1200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   feedbacks,
  output logic done
);
  localparam int D  = L - 1;
  localparam int SW = $clog2(L);
  logic lrst_n;
  logic [L-1:0] code, maj, ten;
  logic [W-1:0] thr;
  logic [L-1:0][SW-1:0] tsel;
  logic ir, pr, syn, nhat, dec;

  prog_feedback_decoder #(.L(L), .W(W)) dut (
    .clk(clk), .rst_n(lrst_n), .code_i(code), .maj_i(maj), .thr_i(thr),
    .tgt_en_i(ten), .tgt_sel_i(tsel), .info_r_i(ir), .par_r_i(pr),
    .syn_o(syn), .nhat_o(nhat), .dec_o(dec));

  function automatic int target(bit [L-1:0] cd, int c);
    if (c >= D) return -1;
    for (int c2 = 0; c2 <= c; c2++)
      if (cd[c2] && cd[D - (c - c2)]) return c - c2;
    return -1;
  endfunction

  task automatic run_phase(bit [L-1:0] cd, int th, bit hand);
    bit ib [NBITS];
    bit irb [NBITS];
    bit sr [L];
    bit cur [L];
    bit s, pt, e_n, e_d;
    int last_err, sum, t;
    // configure
    code = cd;
    for (int e = 0; e < L; e++) maj[e] = cd[D-e];
    thr = W'(th);
    for (int c = 0; c < L; c++) begin
      t = target(cd, c);
      if (hand) begin
        checks++;
        if (t != HAND_TGT_A[c]) begin failures++; $display("FAIL L%0d target of column %0d", L, c); end
      end
      ten[c] = (t >= 0);
      tsel[c] = (t >= 0) ? SW'(t) : '0;
    end
    foreach (sr[e]) sr[e] = 0;
    last_err = -1000;
    ir = 0; pr = 0;
    @(negedge clk); lrst_n = 0;
    @(negedge clk); lrst_n = 1;
    for (int n = 0; n < NBITS; n++) begin
      @(negedge clk);
      ib[n] = 1'($urandom);
      irb[n] = ib[n];
      pt = 0;
      for (int d = 0; d < L; d++) if (n - d >= 0) pt ^= cd[d] & ib[n-d];
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
      s = pt;
      for (int d = 0; d < L; d++) if (n - d >= 0) s ^= cd[d] & irb[n-d];
      cur[0] = s;
      for (int e = 1; e < L; e++) cur[e] = sr[e];
      sum = 0;
      for (int e = 0; e < L; e++) if (cd[D-e]) sum += int'(cur[e]);
      e_n = (sum > th);
      e_d = ((n - D >= 0) ? irb[n-D] : 1'b0) ^ e_n;
      for (int e = 0; e < D; e++) sr[e+1] = cur[e] ^ (e_n & cd[D-e]);
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
  endtask

  initial begin
    checks = 0; failures = 0; feedbacks = 0; done = 0;
    lrst_n = 0; code = '0; maj = '0; thr = '0; ten = '0; tsel = '0; ir = 0; pr = 0;
    @(posedge rst_n);
    run_phase(CODE_A, THR_A, HAND_A);
    run_phase(CODE_B, THR_B, 1'b0);
    done = 1;
  end
endmodule
