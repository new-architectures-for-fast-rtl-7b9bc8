// majority_pipeline_tb: two SOS pipelines summed and compared, as in the
// rate 1/3 decoder. Connections, threshold and the chained partial sums are
// random per phase; the model computes both pipeline sums, the total and
// the decision total > threshold. Both decision values must occur.
module majority_pipeline_tb;
  localparam int L = 7, W = 4, NS = 2;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] s;
  logic [NS-1:0][L-1:0] conn;
  logic [NS-1:0][W-1:0] sum_in, sum_out;
  logic [W-1:0] thr, total;
  logic nhat;
  int checks = 0, failures = 0, ones = 0, zeros = 0;
  logic [63:0] sh [NS];
  logic [W-1:0] inh [NS][64];

  majority_pipeline #(.L(L), .W(W), .NS(NS)) dut (
    .clk(clk), .rst_n(rst_n), .s_i(s), .conn_i(conn), .sum_i(sum_in), .thr_i(thr),
    .sum_o(sum_out), .total_o(total), .nhat_o(nhat));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e_s [NS];
    logic [W-1:0] e_tot;
    s = '0; sum_in = '0; thr = 4'd2;
    conn[0] = 7'b1100101; conn[1] = 7'b0011001;
    for (int m = 0; m < NS; m++) begin
      sh[m] = '0;
      for (int k = 0; k < 64; k++) inh[m][k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 8; phase++) begin
      if (phase > 0) begin
        conn[0] = L'($urandom); conn[1] = L'($urandom);
        thr = W'($urandom_range(1, 6));
      end
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        s = NS'($urandom);
        for (int m = 0; m < NS; m++) sum_in[m] = (phase >= 5) ? W'($urandom_range(0, 1)) : '0;
        #1;
        e_tot = '0;
        for (int m = 0; m < NS; m++) begin
          e_s[m] = W'(conn[m][0] & s[m]);
          for (int e = 1; e < L; e++) e_s[m] += W'(conn[m][e] & sh[m][e-1]);
          e_s[m] += inh[m][L-1];
          e_tot += e_s[m];
        end
        if (n >= L || phase == 0) begin
          for (int m = 0; m < NS; m++) begin
            checks++;
            if (sum_out[m] !== e_s[m]) begin failures++; $display("FAIL sum %0d", m); end
          end
          checks += 2;
          if (total !== e_tot) begin failures++; $display("FAIL total %0d exp %0d", total, e_tot); end
          if (nhat !== (e_tot > thr)) begin failures++; $display("FAIL decision"); end
          if (nhat) ones++; else zeros++;
        end
        for (int m = 0; m < NS; m++) begin
          sh[m] = {sh[m][62:0], s[m]};
          for (int k = 63; k > 0; k--) inh[m][k] = inh[m][k-1];
          inh[m][0] = sum_in[m];
        end
      end
    end
    checks++;
    if (ones == 0 || zeros == 0) begin failures++; $display("FAIL: one decision value never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
