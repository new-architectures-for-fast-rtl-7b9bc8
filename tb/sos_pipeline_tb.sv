// sos_pipeline_tb: compares the SOS pipeline with an arithmetic model,
// sum = (sum over lags e of conn[e] * s(t-e)) + sum_in(t-L), modulo 2^W.
// The first phase uses the running example's majority connections
// (lags 0, 2, 5, 6); later phases use random connections and a random chained
// partial sum.
module sos_pipeline_tb;
  localparam int L = 7, W = 3;
  logic clk = 0, rst_n = 0;
  logic s;
  logic [L-1:0] conn;
  logic [W-1:0] sum_in, sum_out;
  int checks = 0, failures = 0;
  logic [63:0] sh;
  logic [W-1:0] inh [64];

  sos_pipeline #(.L(L), .W(W)) dut (.clk(clk), .rst_n(rst_n), .s_i(s), .conn_i(conn),
                                    .sum_i(sum_in), .sum_o(sum_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    int maxsum;
    s = 0; conn = 7'b1100101; sum_in = '0; sh = '0;
    foreach (inh[k]) inh[k] = '0;
    maxsum = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 8; phase++) begin
      if (phase > 0) conn = L'($urandom);
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        s = 1'($urandom);
        sum_in = (phase >= 4) ? W'($urandom) : '0;
        #1;
        exp = W'(conn[0] & s);
        for (int e = 1; e < L; e++) exp += W'(conn[e] & sh[e-1]);
        exp += inh[L-1];
        if (n >= L || phase == 0) begin
          checks++;
          if (sum_out !== exp) begin
            failures++;
            $display("FAIL phase %0d n %0d: got %0d exp %0d", phase, n, sum_out, exp);
          end
          if (int'(sum_out) > maxsum) maxsum = int'(sum_out);
        end
        sh = {sh[62:0], s};
        for (int k = 63; k > 0; k--) inh[k] = inh[k-1];
        inh[0] = sum_in;
      end
    end
    // the carry chain must have been exercised up to the top bit
    checks++;
    if (maxsum < 4) begin
      failures++;
      $display("FAIL: the sum never reached 4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
