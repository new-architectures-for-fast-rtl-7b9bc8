// pp_enc_check: drives one pp_encoder configuration with random information
// blocks and compares every output lane with a serial (one digit per clock)
// model of the same rate U/V encoder: p[n] = XOR over u, d of
// gen[p][u][d] & i_u[n-d]. With EXAMPLE set, the generator is the running
// example (taps 0,1,4,6); otherwise it is random.
module pp_enc_check #(
  parameter int U = 1, P = 1, Y = 2, L = 7,
  parameter bit EXAMPLE = 1,
  parameter int NBLK = 300
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int NMAX = NBLK * Y + 8;
  logic [Y-1:0][U-1:0] info;
  logic [P-1:0][U-1:0][L-1:0] gen;
  logic [Y-1:0][P-1:0] par;
  bit ib [U][NMAX];

  pp_encoder #(.U(U), .P(P), .Y(Y), .L(L)) dut (
    .clk(clk), .rst_n(rst_n), .info_i(info), .gen_i(gen), .parity_o(par));

  initial begin
    logic exp;
    int n;
    checks = 0; failures = 0; done = 0; info = '0;
    for (int p = 0; p < P; p++)
      for (int u = 0; u < U; u++)
        gen[p][u] = EXAMPLE ? L'(7'b1010011) : L'($urandom);
    @(posedge rst_n);
    for (int k = 0; k < NBLK; k++) begin
      @(negedge clk);
      for (int y = 0; y < Y; y++)
        for (int u = 0; u < U; u++) begin
          info[y][u] = 1'($urandom);
          ib[u][k*Y + y] = info[y][u];
        end
      #1;
      for (int y = 0; y < Y; y++)
        for (int p = 0; p < P; p++) begin
          n = k*Y + y;
          exp = 0;
          for (int u = 0; u < U; u++)
            for (int d = 0; d < L; d++)
              if (n - d >= 0) exp ^= gen[p][u][d] & ib[u][n-d];
          checks++;
          if (par[y][p] !== exp) begin
            failures++;
            $display("FAIL U%0d P%0d Y%0d L%0d: block %0d lane %0d out %0d", U, P, Y, L, k, y, p);
          end
        end
    end
    done = 1;
  end
endmodule
