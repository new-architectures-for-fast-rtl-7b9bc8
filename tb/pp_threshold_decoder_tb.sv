// pp_threshold_decoder_tb: the definite threshold decoder in the
// configurations the architecture covers: the running example with Y = 2
// (two decoded digits per clock) and Y = 1, a rate 3/4 decoder (three
// majority pipelines sharing one syndrome), a rate 1/3 decoder (two SOS
// pipelines summed), a rate 2/3 decoder with Y = 3, and a rate 3/4 decoder
// with Y = 2 (six decoded digits per clock). Every lane of every
// clock is compared with a serial definite-decoder model, which also checks
// the decoding delay of L-1 digits. The example configurations must correct
// every isolated channel error, and corrections must occur.
module pp_threshold_decoder_tb;
  logic clk = 0, rst_n = 0;
  int c [6], f [6], r [6];
  logic d [6];

  always #5 clk = ~clk;

  pp_dec_check #(.U(1), .P(1), .Y(2), .L(7), .W(3), .EXAMPLE(1)) k0 (.clk(clk), .rst_n(rst_n), .checks(c[0]), .failures(f[0]), .corrected(r[0]), .done(d[0]));
  pp_dec_check #(.U(1), .P(1), .Y(1), .L(7), .W(3), .EXAMPLE(1)) k1 (.clk(clk), .rst_n(rst_n), .checks(c[1]), .failures(f[1]), .corrected(r[1]), .done(d[1]));
  pp_dec_check #(.U(3), .P(1), .Y(1), .L(7), .W(3), .EXAMPLE(0)) k2 (.clk(clk), .rst_n(rst_n), .checks(c[2]), .failures(f[2]), .corrected(r[2]), .done(d[2]));
  pp_dec_check #(.U(1), .P(2), .Y(1), .L(7), .W(4), .EXAMPLE(0)) k3 (.clk(clk), .rst_n(rst_n), .checks(c[3]), .failures(f[3]), .corrected(r[3]), .done(d[3]));
  pp_dec_check #(.U(2), .P(1), .Y(3), .L(8), .W(4), .EXAMPLE(0)) k4 (.clk(clk), .rst_n(rst_n), .checks(c[4]), .failures(f[4]), .corrected(r[4]), .done(d[4]));
  pp_dec_check #(.U(3), .P(1), .Y(2), .L(7), .W(3), .EXAMPLE(0)) k5 (.clk(clk), .rst_n(rst_n), .checks(c[5]), .failures(f[5]), .corrected(r[5]), .done(d[5]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    for (int m = 0; m < 6; m++) begin checks += c[m]; failures += f[m]; end
    $display("corrected digits per configuration: %0d %0d %0d %0d %0d %0d", r[0], r[1], r[2], r[3], r[4], r[5]);
    checks += 2;
    if (r[0] == 0) failures++;
    if (r[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
