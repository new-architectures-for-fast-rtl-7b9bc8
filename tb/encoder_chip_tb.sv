// encoder_chip_tb: two six-cell encoder chips chained into a 12-stage
// encoder (chip A holds lags 6..11, chip B lags 0..5). Connections are
// loaded in parallel, random per phase (first phase: the running example,
// taps 0,1,4,6, split over the two chips). The chained output must equal a
// conventional encoder; a single chip alone is checked at the same time.
module encoder_chip_tb;
  localparam int L = 6;
  logic clk = 0, rst_n = 0;
  logic load;
  logic [L-1:0] conn_a, conn_b;
  logic info, info_a, info_b, part_ab, part_b;
  logic [2*L-1:0] code;
  logic [63:0] ih;
  int checks = 0, failures = 0;

  encoder_chip #(.L(L)) chip_a (.clk(clk), .rst_n(rst_n), .load_i(load), .conn_i(conn_a),
    .info_i(info), .part_i(1'b0), .info_o(info_a), .part_o(part_ab));
  encoder_chip #(.L(L)) chip_b (.clk(clk), .rst_n(rst_n), .load_i(load), .conn_i(conn_b),
    .info_i(info_a), .part_i(part_ab), .info_o(info_b), .part_o(part_b));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    load = 0; conn_a = '0; conn_b = '0; info = 0; ih = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 6; phase++) begin
      code = (phase == 0) ? 12'b000001010011 : 12'($urandom);
      @(negedge clk);
      load = 1; conn_a = code[2*L-1:L]; conn_b = code[L-1:0];
      @(negedge clk);
      load = 0; conn_a = '0; conn_b = '0;  // the chips must keep the loaded bits
      repeat (2*L) begin
        @(negedge clk);
        info = 1'($urandom);
        ih = {ih[62:0], info};
      end
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        info = 1'($urandom);
        #1;
        exp = code[0] & info;
        for (int e = 1; e < 2*L; e++) exp ^= code[e] & ih[e-1];
        checks += 2;
        if (part_b !== exp) begin failures++; $display("FAIL chained parity phase %0d n %0d", phase, n); end
        if (info_b !== info) begin failures++; $display("FAIL information pass-through"); end
        ih = {ih[62:0], info};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
