// threshold_comparator_tb: exhaustive check of A > B for W = 3 and W = 5.
module threshold_comparator_tb;
  logic [2:0] a3, b3;
  logic [4:0] a5, b5;
  logic g3, g5;
  int checks = 0, failures = 0;

  threshold_comparator #(.W(3)) dut3 (.a_i(a3), .b_i(b3), .gt_o(g3));
  threshold_comparator #(.W(5)) dut5 (.a_i(a5), .b_i(b5), .gt_o(g5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        a3 = 3'(a); b3 = 3'(b); #1;
        checks++;
        if (g3 !== (a > b)) begin failures++; $display("FAIL W=3 %0d>%0d", a, b); end
      end
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        a5 = 5'(a); b5 = 5'(b); #1;
        checks++;
        if (g5 !== (a > b)) begin failures++; $display("FAIL W=5 %0d>%0d", a, b); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
