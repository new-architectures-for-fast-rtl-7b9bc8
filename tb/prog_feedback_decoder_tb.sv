// prog_feedback_decoder_tb: the run-time programmable feedback decoder.
// At its default size (L = 7, W = 3) it is loaded with the running example
// code (taps 0,1,4,6, threshold 2, targets s*_t, s*_t, s*_(t-2), s*_(t-2),
// s*_t, s*_(t-5), none, checked against that hand-derived list) and then
// with a second self-orthogonal code (taps 0,1,3, threshold 1). A second
// decoder of length 18 is loaded first with taps 0,1,4,10,12,17
// (threshold 3) and then, without any change to the hardware, with the
// example code (threshold 2). Every phase is compared clock by clock with a
// conventional feedback decoder model; feedback must happen in each decoder.
module prog_feedback_decoder_tb;
  logic clk = 0, rst_n = 0;
  int c [2], f [2], fb [2];
  logic d [2];

  always #5 clk = ~clk;

  pfb_dec_check #(.L(7), .W(3), .CODE_A(7'b1010011), .THR_A(2),
                  .CODE_B(7'b0001011), .THR_B(1),
                  .HAND_A(1), .HAND_TGT_A('{0, 0, 2, 2, 0, 5, -1})) k0 (
    .clk(clk), .rst_n(rst_n), .checks(c[0]), .failures(f[0]), .feedbacks(fb[0]), .done(d[0]));
  pfb_dec_check #(.L(18), .W(3), .CODE_A(18'h21413), .THR_A(3),
                  .CODE_B(18'h00053), .THR_B(2)) k1 (
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
    if (fb[0] == 0) failures++;
    if (fb[1] == 0) failures++;
    $display("feedback events: %0d %0d", fb[0], fb[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
