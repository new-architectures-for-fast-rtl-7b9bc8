// pp_encoder: programmable parallel-pipeline convolutional encoder.
//
// Encodes U information streams into P generated streams (P = V-U parity
// streams for a systematic rate U/V code, whose information digits are sent
// as they are; P = V for a non-systematic code) and takes Y consecutive
// codewords per clock (the parallelism coefficient). Lane y of the inputs
// and outputs carries time k*Y + y of block k.
// Output stream p of lane y is the XOR, over input streams u and input lanes
// x, of one encoding pipeline each (Y*Y*U*P pipelines). Cell q of the
// pipeline from lane x to lane y covers bit lag d = q*Y + y - x, so it takes
// generator bit gen_i[p][u][d] (0 when d is outside 0..L-1); each pipeline
// is about L/Y cells long. With Y = 1 this is the general rate U/V pipeline
// encoder; with U = P = 1 and Y = 2 it is the two-codeword parallel encoder
// of the running example. The data rate per clock grows with Y while the
// critical path stays one AND, one XOR and the final XOR tree over U*Y
// pipeline outputs.
// gen_i[p][u][d] = 1 connects information stream u, delayed by d, to output p.
// Timing: parity_o is combinational in info_i and registered state: output
// block k holds the parities of the information block presented in clock k.
module pp_encoder #(
  parameter int unsigned U = 1,
  parameter int unsigned P = 1,
  parameter int unsigned Y = 2,
  parameter int unsigned L = 7
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [Y-1:0][U-1:0]           info_i,    // [lane][stream]
  input  logic [P-1:0][U-1:0][L-1:0]    gen_i,     // [output][input][lag]
  output logic [Y-1:0][P-1:0]           parity_o   // [lane][output]
);
  import tcodec_pkg::*;
  localparam int unsigned NQ = n_cells(L, Y);

  logic [Y-1:0][P-1:0][U-1:0][Y-1:0] pipe_out;   // [y][p][u][x]

  for (genvar y = 0; y < Y; y++) begin : g_y
    for (genvar p = 0; p < P; p++) begin : g_p
      for (genvar u = 0; u < U; u++) begin : g_u
        for (genvar x = 0; x < Y; x++) begin : g_x
          logic [NQ-1:0] conn;
          for (genvar q = 0; q < NQ; q++) begin : g_q
            localparam int D = lane_lag(q, Y, y, x);
            if (D >= 0 && D < L) begin : g_on
              assign conn[q] = gen_i[p][u][D];
            end else begin : g_off
              assign conn[q] = 1'b0;
            end
          end
          encoding_pipeline #(.L(NQ)) u_pipe (
            .clk   (clk),
            .rst_n (rst_n),
            .info_i(info_i[x][u]),
            .conn_i(conn),
            .part_i(1'b0),
            .part_o(pipe_out[y][p][u][x])
          );
        end
      end
      assign parity_o[y][p] = ^pipe_out[y][p];
    end
  end
endmodule
