// scan_register_tb: shifts random words into the configuration register and
// checks the parallel contents (first bit sent ends at position 0), the
// serial output, and that the contents hold while the enable is low.
module scan_register_tb;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic en, d, q;
  logic [N-1:0] cfg, word;
  int checks = 0, failures = 0;

  scan_register #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .en_i(en), .d_i(d), .q_o(q), .cfg_o(cfg));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    en = 0; d = 0;
    repeat (2) @(negedge clk);
    chk(cfg, '0, "reset");
    rst_n = 1;
    for (int w = 0; w < 20; w++) begin
      word = N'($urandom);
      for (int b = 0; b < N; b++) begin
        @(negedge clk);
        en = 1; d = word[b];
      end
      @(negedge clk);
      en = 0; d = 1'($urandom);
      chk(cfg, word, "loaded word");
      chk(N'(q), N'(word[0]), "serial out");
      repeat (3) @(negedge clk);
      d = ~d;
      chk(cfg, word, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
