// fb_sos_pipeline: sum-of-syndromes pipeline with feedback, for a fixed
// (non-programmable) systematic rate 1/2 self-orthogonal code.
//
// L columns, each a W-bit delay unit followed by a sigma_processor; the first
// delay unit is fed zero. Column c holds syndrome lag L-1-c and adds the
// current syndrome when CODE[c] is set. The noise estimate decided from the
// last column's sum is fed back to every other column whose partial sum
// contains a syndrome that checks the same noise digit (its target syndrome);
// the processor then adds +1 or -1 according to the target's current value,
// read from the feedback syndrome register. Which lag is the target of which
// column follows from the code and is wired at elaboration (tcodec_pkg::
// fb_target), standing for the fixed target-syndrome bus of a non-programmable
// implementation. Columns without a target get k = 0.
// Timing: sum_o is combinational in s_i and registered state; nhat_i may
// depend combinationally on sum_o (the last column never uses it).
module fb_sos_pipeline #(
  parameter int unsigned L    = 7,
  parameter bit [L-1:0]  CODE = 7'b1010011,
  parameter int unsigned W    = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_i,      // syndrome of the current clock
  input  logic [L-1:0] sstar_i,  // corrected syndromes by lag, from the syndrome register
  input  logic         nhat_i,   // noise estimate fed back
  output logic [W-1:0] sum_o     // sum of corrected syndromes
);
  import tcodec_pkg::*;

  logic [L:0][W-1:0] col;   // col[c]: input of column c's delay unit
  assign col[0] = '0;

  for (genvar c = 0; c < L; c++) begin : g_col
    localparam int T = fb_target(256'(CODE), L, c);
    logic [W-1:0] q;
    logic j, k;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) q <= '0;
      else        q <= col[c];
    if (T >= 0) begin : g_fb
      assign j = sstar_i[T];
      assign k = nhat_i;
    end else begin : g_nofb
      assign j = 1'b0;
      assign k = 1'b0;
    end
    sigma_processor #(.W(W)) u_sigma (
      .sum_i(q),
      .i_i  (s_i & CODE[c]),
      .j_i  (j),
      .k_i  (k),
      .sum_o(col[c+1])
    );
  end

  assign sum_o = col[L];
endmodule
