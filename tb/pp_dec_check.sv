// pp_dec_check: drives one pp_threshold_decoder configuration and compares
// it, lane by lane and clock by clock, with a serial model of a definite
// threshold decoder:
//   s_p[n]      = r_p[n] ^ XOR_{u,d} gen[p][u][d] & ir_u[n-d]
//   nhat_u[n-D] = (sum_{p,e} maj[u][p][e] * s_p[n-e]) > thr[u],  D = L-1
//   dec_u[n-D]  = ir_u[n-D] ^ nhat_u[n-D]
// The channel digits come from a model encoder plus noise.
// EXAMPLE = 1: the running example code (gen taps 0,1,4,6, checks at
// syndrome lags 0,2,5,6, threshold 2) with isolated errors at least 2L
// digits apart, which must all be corrected: the decoded digits must equal
// the transmitted ones. EXAMPLE = 0: random connections and thresholds and
// dense noise; only agreement with the model is required.
module pp_dec_check #(
  parameter int U = 1, P = 1, Y = 2, L = 7, W = 3,
  parameter bit EXAMPLE = 1,
  parameter int NBLK = 400
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   corrected,   // decoded digits whose received value was wrong
  output logic done
);
  localparam int NMAX = NBLK * Y + 8;
  localparam int D = L - 1;
  logic [Y-1:0][U-1:0] ir;
  logic [Y-1:0][P-1:0] pr, syn;
  logic [Y-1:0][U-1:0] nhat, dec;
  logic [P-1:0][U-1:0][L-1:0] gen;
  logic [U-1:0][P-1:0][L-1:0] maj;
  logic [U-1:0][W-1:0] thr;
  bit ib [U][NMAX];    // transmitted information
  bit irb [U][NMAX];   // received information
  bit sb [P][NMAX];    // model syndromes

  pp_threshold_decoder #(.U(U), .P(P), .Y(Y), .L(L), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .info_r_i(ir), .par_r_i(pr), .gen_i(gen), .maj_i(maj),
    .thr_i(thr), .syn_o(syn), .nhat_o(nhat), .dec_o(dec));

  initial begin
    int n, last_err, cnt;
    bit pt, e_n, e_d;
    checks = 0; failures = 0; corrected = 0; done = 0;
    ir = '0; pr = '0;
    last_err = -1000;
    for (int u = 0; u < U; u++) begin
      thr[u] = EXAMPLE ? W'(2) : W'($urandom_range(1, 3));
      for (int p = 0; p < P; p++) begin
        gen[p][u] = EXAMPLE ? L'(7'b1010011) : L'($urandom);
        maj[u][p] = EXAMPLE ? L'(7'b1100101) : L'($urandom);
      end
    end
    // keep the number of checks per decision below 2^W
    for (int u = 0; u < U; u++) begin
      cnt = 0;
      for (int p = 0; p < P; p++)
        for (int e = 0; e < L; e++)
          if (maj[u][p][e]) begin
            if (cnt >= (1 << W) - 1) maj[u][p][e] = 1'b0;
            else cnt++;
          end
    end
    @(posedge rst_n);
    for (int k = 0; k < NBLK; k++) begin
      @(negedge clk);
      for (int y = 0; y < Y; y++) begin
        n = k*Y + y;
        for (int u = 0; u < U; u++) begin
          ib[u][n] = 1'($urandom);
          irb[u][n] = ib[u][n];
        end
        for (int p = 0; p < P; p++) begin
          pt = 0;
          for (int u = 0; u < U; u++)
            for (int d = 0; d < L; d++)
              if (n - d >= 0) pt ^= gen[p][u][d] & ib[u][n-d];
          pr[y][p] = pt;
        end
        // channel noise
        if (EXAMPLE) begin
          if (n - last_err >= 2*L && $urandom_range(0, 3) == 0) begin
            last_err = n;
            if ($urandom_range(0, 1) == 0) begin
              int uu; uu = $urandom_range(0, U-1); irb[uu][n] = ~irb[uu][n];
            end else begin
              int pp; pp = $urandom_range(0, P-1); pr[y][pp] = ~pr[y][pp];
            end
          end
        end else begin
          for (int u = 0; u < U; u++) if ($urandom_range(0, 7) == 0) irb[u][n] = ~irb[u][n];
          for (int p = 0; p < P; p++) if ($urandom_range(0, 7) == 0) pr[y][p] = ~pr[y][p];
        end
        for (int u = 0; u < U; u++) ir[y][u] = irb[u][n];
        // model syndromes
        for (int p = 0; p < P; p++) begin
          pt = pr[y][p];
          for (int u = 0; u < U; u++)
            for (int d = 0; d < L; d++)
              if (n - d >= 0) pt ^= gen[p][u][d] & irb[u][n-d];
          sb[p][n] = pt;
        end
      end
      #1;
      for (int y = 0; y < Y; y++) begin
        n = k*Y + y;
        for (int p = 0; p < P; p++) begin
          checks++;
          if (syn[y][p] !== sb[p][n]) begin failures++; $display("FAIL syndrome blk %0d lane %0d", k, y); end
        end
        for (int u = 0; u < U; u++) begin
          int sum;
          sum = 0;
          for (int p = 0; p < P; p++)
            for (int e = 0; e < L; e++)
              if (n - e >= 0 && maj[u][p][e]) sum += int'(sb[p][n-e]);
          e_n = (sum > int'(thr[u]));
          e_d = ((n - D >= 0) ? irb[u][n-D] : 1'b0) ^ e_n;
          checks += 2;
          if (nhat[y][u] !== e_n) begin
            failures++; $display("FAIL U%0d P%0d Y%0d: nhat blk %0d lane %0d stream %0d", U, P, Y, k, y, u);
          end
          if (dec[y][u] !== e_d) begin
            failures++; $display("FAIL U%0d P%0d Y%0d: dec blk %0d lane %0d stream %0d", U, P, Y, k, y, u);
          end
          if (n - D >= 0 && irb[u][n-D] != ib[u][n-D] && dec[y][u] == ib[u][n-D]) corrected++;
          if (EXAMPLE && n - D >= 0) begin
            checks++;
            if (dec[y][u] !== ib[u][n-D]) begin
              failures++; $display("FAIL: isolated error not corrected, digit %0d", n - D);
            end
          end
        end
      end
    end
    done = 1;
  end
endmodule
