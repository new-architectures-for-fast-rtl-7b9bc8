// pipe_cell: the basic cell shared by the encoding pipeline and the
// sum-of-syndromes (SOS) pipeline.
//
// The cell holds one delay unit. Its two top inputs are ANDed; the AND is
// XORed with the delayed bit to give the bit passed to the next column, and
// both the delayed bit and the AND are passed down to the cell below.
//  - One row high (encoding cell): top_a = information bit, top_b = connection
//    bit, left = partial parity from the previous cell.
//  - Stacked W high (SOS column): the top cell gets the syndrome and the
//    connection bit, so its AND is the increment; each lower cell ANDs the
//    delayed bit and the carry of the cell above, which is its own carry in.
//    The column is then a bit-serial incrementer of the partial sum.
// The logic follows the published cell (delay unit, AND, XOR). The
// asynchronous active-low reset, which clears the delay unit, is a choice of
// this design; the original used an unreset dynamic flip-flop.
// Timing: right_o, down_a_o and down_b_o are combinational in the top inputs
// and the delay unit; the delay unit loads left_i on each rising clock edge.
module pipe_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic left_i,    // bit from the previous column
  input  logic top_a_i,   // syndrome/information bit, or delayed bit of the cell above
  input  logic top_b_i,   // connection bit, or carry of the cell above
  output logic right_o,   // bit to the next column
  output logic down_a_o,  // delayed bit, to the cell below
  output logic down_b_o   // carry, to the cell below
);
  logic q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= 1'b0;
    else        q <= left_i;

  assign down_b_o = top_a_i & top_b_i;
  assign down_a_o = q;
  assign right_o  = q ^ down_b_o;
endmodule
