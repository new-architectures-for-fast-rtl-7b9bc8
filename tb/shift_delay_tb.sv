// shift_delay_tb: checks delays of 6 (the running example), 1 and 0 clocks
// against a history of the random input.
module shift_delay_tb;
  logic clk = 0, rst_n = 0;
  logic d, q6, q1, q0;
  logic [63:0] h;
  int checks = 0, failures = 0;

  shift_delay #(.N(6)) dut6 (.clk(clk), .rst_n(rst_n), .d_i(d), .q_o(q6));
  shift_delay #(.N(1)) dut1 (.clk(clk), .rst_n(rst_n), .d_i(d), .q_o(q1));
  shift_delay #(.N(0)) dut0 (.clk(clk), .rst_n(rst_n), .d_i(d), .q_o(q0));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    d = 0; h = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      d = 1'($urandom);
      #1;
      chk(q6, h[5], "delay 6");
      chk(q1, h[0], "delay 1");
      chk(q0, d, "delay 0");
      h = {h[62:0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
