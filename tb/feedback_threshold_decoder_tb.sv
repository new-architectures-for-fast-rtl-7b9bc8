// feedback_threshold_decoder_tb: the pipeline feedback decoder for the
// running example code (L = 7, J = 4) and for a longer self-orthogonal code
// (taps 0,1,4,10,12,17: L = 18, J = 6, threshold 3), each compared clock by
// clock with a conventional feedback decoder model. Feedback must happen.
// It also checks the target-syndrome lag chosen for each SOS column of the
// example code against the hand-derived list: s*_t, s*_t, s*_(t-2),
// s*_(t-2), s*_t, s*_(t-5) and none for the last column.
module feedback_threshold_decoder_tb;
  logic clk = 0, rst_n = 0;
  int c [2], f [2], fb [2];
  logic d [2];
  localparam int EX_TARGET [7] = '{0, 0, 2, 2, 0, 5, -1};

  always #5 clk = ~clk;

  fb_dec_check #(.L(7), .CODE(7'b1010011), .W(3), .THRESH(2)) k0 (
    .clk(clk), .rst_n(rst_n), .checks(c[0]), .failures(f[0]), .feedbacks(fb[0]), .done(d[0]));
  fb_dec_check #(.L(18), .CODE(18'h21413), .W(3), .THRESH(3)) k1 (
    .clk(clk), .rst_n(rst_n), .checks(c[1]), .failures(f[1]), .feedbacks(fb[1]), .done(d[1]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1]);
    checks = c[0] + c[1] + 2;
    failures = f[0] + f[1];
    foreach (EX_TARGET[col]) begin
      checks++;
      if (tcodec_pkg::fb_target(256'(7'b1010011), 7, col) != EX_TARGET[col]) begin
        failures++;
        $display("FAIL target of column %0d", col);
      end
    end
    if (fb[0] == 0) failures++;
    if (fb[1] == 0) failures++;
    $display("feedback events: %0d %0d", fb[0], fb[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
