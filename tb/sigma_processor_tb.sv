// sigma_processor_tb: exhaustive check against the eight-row truth table of
// the feedback column processor (sigma in {-1,0,+1,+2}), for every partial
// sum that cannot overflow, W = 3.
module sigma_processor_tb;
  localparam int W = 3;
  // sigma indexed by {i, j, k}
  localparam int SIGMA [8] = '{0, 1, 0, -1, 1, 2, 1, 0};
  logic [W-1:0] sin, sout;
  logic i, j, k;
  int checks = 0, failures = 0;

  sigma_processor #(.W(W)) dut (.sum_i(sin), .i_i(i), .j_i(j), .k_i(k), .sum_o(sout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 1; v < 6; v++)
      for (int t = 0; t < 8; t++) begin
        sin = W'(v); {i, j, k} = 3'(t);
        #1;
        checks++;
        if (int'(sout) != v + SIGMA[t]) begin
          failures++;
          $display("FAIL sum %0d ijk %03b: got %0d exp %0d", v, t, sout, v + SIGMA[t]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
