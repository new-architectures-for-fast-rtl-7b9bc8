// encoder_chip: one-chip programmable pipeline encoder, a cascadable
// building block of L = 6 encoding cells.
//
// The connection register is loaded in parallel from conn_i while load_i is
// high (the published chip loads it in parallel, at the cost of pins); it
// then holds the six connection bits, conn[e] for lag e. The cells form an
// encoding_pipeline: part_i enters the first cell and part_o leaves the last.
// Chips are chained by feeding part_o of one chip to part_i of the next and
// broadcasting the same information digit to all; the chip nearer the input
// of the chain then holds the larger lags. A rate 1/V encoder uses V-1 such
// chains; rate U/V needs external XORs of U chains per parity (see pp_encoder).
// info_o repeats info_i for the next chip or the systematic output.
// Timing: part_o and info_o are combinational in info_i, part_i's effect
// appears one clock later; the connection register loads on the clock edge.
module encoder_chip #(
  parameter int unsigned L = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,   // load the connection register
  input  logic [L-1:0] conn_i,   // connection bits, [e] = lag e
  input  logic         info_i,   // information digit
  input  logic         part_i,   // partial parity from the previous chip (0 for the first)
  output logic         info_o,   // information digit, passed on
  output logic         part_o    // (partial) parity digit
);
  logic [L-1:0] conn_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      conn_q <= '0;
    else if (load_i) conn_q <= conn_i;

  encoding_pipeline #(.L(L)) u_pipe (
    .clk   (clk),
    .rst_n (rst_n),
    .info_i(info_i),
    .conn_i(conn_q),
    .part_i(part_i),
    .part_o(part_o)
  );
  assign info_o = info_i;
endmodule
