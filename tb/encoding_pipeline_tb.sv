// encoding_pipeline_tb: compares the pipeline encoder with a conventional
// shift-register encoder model. Connections are random per phase (the first
// phase is the running example, taps 0,1,4,6); the partial-parity input is
// random, and must reappear in the output L clocks later.
module encoding_pipeline_tb;
  localparam int L = 7;
  logic clk = 0, rst_n = 0;
  logic info, part_in, part_out;
  logic [L-1:0] conn;
  int checks = 0, failures = 0;
  logic [63:0] ih, ph;   // histories: bit k = value k clocks ago (before this one)

  encoding_pipeline #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .info_i(info), .conn_i(conn),
                                  .part_i(part_in), .part_o(part_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    info = 0; part_in = 0; conn = 7'b1010011; ih = '0; ph = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 8; phase++) begin
      if (phase > 0) conn = L'($urandom);
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        info = 1'($urandom);
        part_in = (phase >= 4) ? 1'($urandom) : 1'b0;
        #1;
        exp = conn[0] & info;
        for (int e = 1; e < L; e++) exp ^= conn[e] & ih[e-1];
        exp ^= ph[L-1];
        // the first L clocks of a phase still hold terms of the old connections
        if (n >= L || phase == 0) begin
          checks++;
          if (part_out !== exp) begin
            failures++;
            $display("FAIL phase %0d n %0d: got %0b exp %0b", phase, n, part_out, exp);
          end
        end
        ih = {ih[62:0], info};
        ph = {ph[62:0], part_in};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
