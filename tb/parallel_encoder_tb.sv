// parallel_encoder_tb: the parallel (shift register and XOR tree) encoder
// for the running example code with Y = 2 (two codewords per clock), and
// for a longer random code with Y = 3 and with Y = 8 (Y > L: one block of
// history per lane). Each output lane is compared with a serial encoder of
// the same code; lane y of block k must carry the parity of time kY + y.
module parallel_encoder_tb;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  localparam int NB = 400;

  localparam bit [6:0]  C0 = 7'b1010011;
  localparam bit [12:0] C1 = 13'b1_0010_1100_0111;
  localparam bit [4:0]  C2 = 5'b10111;
  logic [1:0] i0, p0;
  logic [2:0] i1, p1;
  logic [7:0] i2, p2;
  parallel_encoder #(.Y(2), .L(7),  .CODE(C0)) d0 (.clk(clk), .rst_n(rst_n), .info_i(i0), .parity_o(p0));
  parallel_encoder #(.Y(3), .L(13), .CODE(C1)) d1 (.clk(clk), .rst_n(rst_n), .info_i(i1), .parity_o(p1));
  parallel_encoder #(.Y(8), .L(5),  .CODE(C2)) d2 (.clk(clk), .rst_n(rst_n), .info_i(i2), .parity_o(p2));

  always #5 clk = ~clk;

  initial begin
    repeat (NB + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit h0 [NB*2], h1 [NB*3], h2 [NB*8];

  function automatic bit par(input bit h [], input int n, input int L, input logic [15:0] code);
    bit p = 0;
    for (int d = 0; d < L; d++) if (code[d] && n - d >= 0) p ^= h[n-d];
    return p;
  endfunction

  initial begin
    bit e;
    i0 = '0; i1 = '0; i2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NB; k++) begin
      @(negedge clk);
      for (int y = 0; y < 2; y++) begin h0[k*2+y] = 1'($urandom); i0[y] = h0[k*2+y]; end
      for (int y = 0; y < 3; y++) begin h1[k*3+y] = 1'($urandom); i1[y] = h1[k*3+y]; end
      for (int y = 0; y < 8; y++) begin h2[k*8+y] = 1'($urandom); i2[y] = h2[k*8+y]; end
      #1;
      for (int y = 0; y < 2; y++) begin
        e = par(h0, k*2+y, 7, 16'(C0)); checks++;
        if (p0[y] !== e) begin failures++; $display("FAIL Y2 lane %0d block %0d", y, k); end
      end
      for (int y = 0; y < 3; y++) begin
        e = par(h1, k*3+y, 13, 16'(C1)); checks++;
        if (p1[y] !== e) begin failures++; $display("FAIL Y3 lane %0d block %0d", y, k); end
      end
      for (int y = 0; y < 8; y++) begin
        e = par(h2, k*8+y, 5, 16'(C2)); checks++;
        if (p2[y] !== e) begin failures++; $display("FAIL Y8 lane %0d block %0d", y, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
