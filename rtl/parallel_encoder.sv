// parallel_encoder: parallel (not pipelined) encoder for a fixed systematic
// rate 1/2 code, generating Y codewords per clock.
//
// Each of the Y input lanes has its own shift register of information
// digits; lane x, clocked once per block of Y digits, therefore holds the
// digits of times kY + x - qY for q = 1, 2, ... The parity of output lane y
// is one XOR tree over the taps of the code: the digit at lag d comes from
// lane x = (y - d) mod Y, q = (d - y + x)/Y blocks back (q = 0 is the lane
// input itself). For the running example with Y = 2, lane 0 stores
// i(t-2), i(t-4), i(t-6) and lane 1 stores i(t-1), i(t-3), i(t-5), and
//   p(t)   = i(t) ^ i(t-1) ^ i(t-4) ^ i(t-6)
//   p(t+1) = i(t+1) ^ i(t) ^ i(t-3) ^ i(t-5).
// The information digits are sent as they are (systematic code). The XOR
// tree grows with the number of taps; the parallel-pipeline encoder
// (pp_encoder) removes that by combining this lane structure with pipeline
// encoding. The code is fixed by the CODE parameter (bit d = lag d), as the
// taps are plain wires.
// Timing: parity_o is combinational in info_i and the lane registers.
module parallel_encoder #(
  parameter int unsigned Y    = 2,
  parameter int unsigned L    = tcodec_pkg::EX_L,
  parameter bit [L-1:0]  CODE = tcodec_pkg::EX_CODE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [Y-1:0] info_i,    // [lane]: information digit of time kY + lane
  output logic [Y-1:0] parity_o   // [lane]: parity digit of time kY + lane
);
  import tcodec_pkg::*;
  localparam int unsigned NQ = n_cells(L, Y);   // blocks of history per lane, plus the input

  // hist[x][q]: lane x, q blocks back (q = 0 is the current input)
  logic [Y-1:0][NQ-1:0] hist;

  for (genvar x = 0; x < Y; x++) begin : g_lane
    logic [NQ-1:1] sr;
    if (NQ > 2) begin : g_shift
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) sr <= '0;
        else        sr <= {sr[NQ-2:1], info_i[x]};
    end else begin : g_one
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) sr <= '0;
        else        sr <= info_i[x];
    end
    assign hist[x] = {sr, info_i[x]};
  end

  always_comb
    for (int y = 0; y < Y; y++) begin
      parity_o[y] = 1'b0;
      for (int x = 0; x < Y; x++)
        for (int q = 0; q < NQ; q++) begin
          int d;
          d = lane_lag(q, Y, y, x);
          if (d >= 0 && d < L && CODE[d]) parity_o[y] ^= hist[x][q];
        end
    end
endmodule
