// long_encoder_tb: a programmable pipeline encoder of basic length
// L = 2000 (a single encoding_pipeline of 2000 cells), loaded with 30
// random connections including lags 0 and 1999, and compared digit by digit
// with a serial encoder over 5000 clocks. The critical path of the pipeline
// is the same as for L = 7: one AND and one XOR per cell.
module long_encoder_tb;
  localparam int L = 2000, NB = 5000, NT = 30;
  logic clk = 0, rst_n = 0;
  logic info, part_out;
  logic [L-1:0] conn;
  int checks = 0, failures = 0;
  bit ib [NB];
  int taps [NT];

  encoding_pipeline #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .info_i(info), .conn_i(conn),
                                  .part_i(1'b0), .part_o(part_out));

  always #5 clk = ~clk;

  initial begin
    repeat (NB + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    conn = '0;
    taps[0] = 0; taps[1] = L - 1;
    for (int t = 2; t < NT; t++) taps[t] = $urandom_range(1, L - 2);
    foreach (taps[t]) conn[taps[t]] = 1'b1;
    info = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NB; n++) begin
      @(negedge clk);
      ib[n] = 1'($urandom);
      info = ib[n];
      #1;
      exp = 0;
      for (int d = 0; d < L; d++) if (conn[d] && n - d >= 0) exp ^= ib[n-d];
      checks++;
      if (part_out !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL parity at %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
