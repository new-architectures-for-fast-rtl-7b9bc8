// pipe_cell_tb: drives the basic cell with random inputs and checks, each
// clock, the carry (AND of the top inputs), the delayed bit (left input of
// the previous clock) and the right output (their XOR).
module pipe_cell_tb;
  logic clk = 0, rst_n = 0;
  logic left, ta, tb_, right, da, db;
  int checks = 0, failures = 0;
  logic prev_left;

  pipe_cell dut (.clk(clk), .rst_n(rst_n), .left_i(left), .top_a_i(ta), .top_b_i(tb_),
                 .right_o(right), .down_a_o(da), .down_b_o(db));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    left = 0; ta = 0; tb_ = 0;
    prev_left = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      left = 1'($urandom); ta = 1'($urandom); tb_ = 1'($urandom);
      #1;
      check(db, ta & tb_, "carry");
      check(da, prev_left, "delayed bit");
      check(right, prev_left ^ (ta & tb_), "right output");
      prev_left = left;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
