// shift_delay: the information shift register of a threshold decoder.
//
// A pipeline encoder does not keep delayed information digits, so the decoder
// keeps a plain shift register that delays each received information digit
// by N clocks, to meet the noise estimate of the same digit. N = 0 is a wire.
// Timing: q_o = d_i delayed by N rising clock edges; cleared by reset.
module shift_delay #(
  parameter int unsigned N = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d_i,
  output logic q_o
);
  if (N == 0) begin : g_wire
    assign q_o = d_i;
  end else begin : g_sr
    logic [N-1:0] sr;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) sr <= '0;
      else begin
        sr[0] <= d_i;
        for (int k = 1; k < N; k++) sr[k] <= sr[k-1];
      end
    assign q_o = sr[N-1];
  end
endmodule
