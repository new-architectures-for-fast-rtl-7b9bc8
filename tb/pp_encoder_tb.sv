// pp_encoder_tb: the parallel-pipeline encoder in five configurations:
// the two-codeword encoder of the running example (Y=2), the plain pipeline
// encoder (Y=1), Y=3 for the same code, a random rate 2/4 non-systematic
// style encoder with Y=3 and a rate 3/4 parity generator. Each output lane
// of each clock is compared with a serial encoder model; since every block
// is checked, this also shows Y codewords leave per clock.
module pp_encoder_tb;
  logic clk = 0, rst_n = 0;
  int c [5], f [5];
  logic d [5];
  int checks, failures;

  always #5 clk = ~clk;

  pp_enc_check #(.U(1), .P(1), .Y(2), .L(7), .EXAMPLE(1)) k0 (.clk(clk), .rst_n(rst_n), .checks(c[0]), .failures(f[0]), .done(d[0]));
  pp_enc_check #(.U(1), .P(1), .Y(1), .L(7), .EXAMPLE(1)) k1 (.clk(clk), .rst_n(rst_n), .checks(c[1]), .failures(f[1]), .done(d[1]));
  pp_enc_check #(.U(1), .P(1), .Y(3), .L(7), .EXAMPLE(1)) k2 (.clk(clk), .rst_n(rst_n), .checks(c[2]), .failures(f[2]), .done(d[2]));
  pp_enc_check #(.U(2), .P(2), .Y(3), .L(5), .EXAMPLE(0)) k3 (.clk(clk), .rst_n(rst_n), .checks(c[3]), .failures(f[3]), .done(d[3]));
  pp_enc_check #(.U(3), .P(1), .Y(2), .L(6), .EXAMPLE(0)) k4 (.clk(clk), .rst_n(rst_n), .checks(c[4]), .failures(f[4]), .done(d[4]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    checks = 0; failures = 0;
    for (int m = 0; m < 5; m++) begin checks += c[m]; failures += f[m]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
