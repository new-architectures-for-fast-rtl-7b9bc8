// chip_pp_enc_check: a systematic rate U/(U+1) parallel-pipeline encoder of
// parallelism Y and basic length L assembled only from encoder_chip parts
// and external XOR gates, compared clock by clock with a serial encoder.
// Each of the Y*Y*U lane-to-lane pipelines (from input lane x of stream u to
// parity lane y) needs NQ = floor((L+Y-2)/Y)+1 cells; cell q covers lag
// q*Y + y - x. A pipeline is a chain of NCH = ceil(NQ/6) chips: the last
// chip of the chain holds cells 0..5, the one before it cells 6..11, and so
// on, each chip's partial parity feeding the next. Parity lane y is the XOR
// of the U*Y chain outputs. Every chip's connections are loaded in parallel
// in one clock. Each clock takes U*Y information digits and gives Y parity
// digits; the throughput is counted and checked.
module chip_pp_enc_check #(
  parameter int U = 2,
  parameter int Y = 3,
  parameter int L = 16,
  parameter int NBLK = 300
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   info_digits,   // information digits encoded
  output logic done
);
  localparam int CL  = 6;                      // cells per chip
  localparam int NQ  = (L + Y - 2) / Y + 1;
  localparam int NCH = (NQ + CL - 1) / CL;
  localparam int NMAX = NBLK * Y + 8;

  logic load;
  logic [U-1:0][L-1:0] gen;                    // [stream][lag]
  logic [Y-1:0][U-1:0] info;                   // [lane][stream]
  logic [Y-1:0] par;
  logic [Y-1:0][U-1:0][Y-1:0] chain_out;       // [y][u][x]
  bit ib [U][NMAX];

  for (genvar y = 0; y < Y; y++) begin : g_y
    for (genvar u = 0; u < U; u++) begin : g_u
      for (genvar x = 0; x < Y; x++) begin : g_x
        logic [NCH:0] link;
        assign link[0] = 1'b0;
        for (genvar m = 0; m < NCH; m++) begin : g_chip
          // chip m of the chain (m = 0 first) holds cells (NCH-1-m)*6 .. +5
          logic [CL-1:0] conn;
          always_comb
            for (int e = 0; e < CL; e++) begin
              int q, d;
              q = (NCH - 1 - m) * CL + e;
              d = q * Y + y - x;
              conn[e] = (q < NQ && d >= 0 && d < L) ? gen[u][d] : 1'b0;
            end
          logic info_unused;
          encoder_chip #(.L(CL)) u_chip (
            .clk(clk), .rst_n(rst_n), .load_i(load), .conn_i(conn),
            .info_i(info[x][u]), .part_i(link[m]), .info_o(info_unused), .part_o(link[m+1]));
        end
        assign chain_out[y][u][x] = link[NCH];
      end
    end
    assign par[y] = ^chain_out[y];
  end

  initial begin
    int n;
    bit pt;
    checks = 0; failures = 0; info_digits = 0; done = 0;
    load = 0; info = '0;
    for (int u = 0; u < U; u++) gen[u] = L'({$urandom, $urandom});
    for (int u = 0; u < U; u++) gen[u][0] = 1'b1;
    @(posedge rst_n);
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    for (int k = 0; k < NBLK; k++) begin
      @(negedge clk);
      for (int y = 0; y < Y; y++)
        for (int u = 0; u < U; u++) begin
          ib[u][k*Y+y] = 1'($urandom);
          info[y][u] = ib[u][k*Y+y];
        end
      #1;
      info_digits += U * Y;
      for (int y = 0; y < Y; y++) begin
        n = k*Y + y;
        pt = 0;
        for (int u = 0; u < U; u++)
          for (int d = 0; d < L; d++) if (n - d >= 0) pt ^= gen[u][d] & ib[u][n-d];
        checks++;
        if (par[y] !== pt) begin
          failures++;
          if (failures < 10) $display("FAIL U%0d Y%0d L%0d parity at %0d", U, Y, L, n);
        end
      end
    end
    done = 1;
  end
endmodule
