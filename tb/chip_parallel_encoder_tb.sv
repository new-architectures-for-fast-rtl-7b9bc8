// chip_parallel_encoder_tb: parallel-pipeline encoders built from the
// six-cell encoder chip. With Y = 3 codewords per clock: a rate 2/3 encoder
// (6 information digits per clock, 150 Mbit/s at a 25 MHz clock) of basic
// length 16, one chip per lane-to-lane pipeline (18 chips), and a rate 3/4
// encoder (9 information digits per clock, 225 Mbit/s at 25 MHz) of basic
// length 20, two chained chips per pipeline (54 chips). Every parity digit
// is compared with a serial encoder, and the information digits taken per
// clock are counted.
module chip_parallel_encoder_tb;
  localparam int NBLK = 300;
  logic clk = 0, rst_n = 0;
  int c [2], f [2], n [2];
  logic d [2];

  always #20 clk = ~clk;   // 25 MHz

  chip_pp_enc_check #(.U(2), .Y(3), .L(16), .NBLK(NBLK)) k0 (
    .clk(clk), .rst_n(rst_n), .checks(c[0]), .failures(f[0]), .info_digits(n[0]), .done(d[0]));
  chip_pp_enc_check #(.U(3), .Y(3), .L(20), .NBLK(NBLK)) k1 (
    .clk(clk), .rst_n(rst_n), .checks(c[1]), .failures(f[1]), .info_digits(n[1]), .done(d[1]));

  initial begin
    repeat (20000) @(posedge clk);
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
    // information digits per clock: U*Y
    if (n[0] != 6 * NBLK) failures++;
    if (n[1] != 9 * NBLK) failures++;
    $display("rate 2/3: %0d digits per clock, %0d Mbit/s at 25 MHz", n[0] / NBLK, n[0] / NBLK * 25);
    $display("rate 3/4: %0d digits per clock, %0d Mbit/s at 25 MHz", n[1] / NBLK, n[1] / NBLK * 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
