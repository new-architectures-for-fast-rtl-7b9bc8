// fb_syndrome_register: syndrome register with the feedback link of a
// feedback threshold decoder, for a fixed systematic rate 1/2 code.
//
// Stores the corrected syndromes s*(t-1) .. s*(t-L+1). The noise estimate
// nhat_i of the digit received D = L-1 clocks ago is XORed into every stored
// syndrome that also checks that digit (lag e with CODE[D-e] set, e < D)
// as the register shifts, so that later decisions see corrected syndromes.
// sstar_o[e] is s*(t-e) before the correction of the current clock, with
// sstar_o[0] = s_i; the feedback SOS pipeline reads its target syndromes here.
// CODE[d] = 1 when the parity includes the information digit delayed by d.
// Timing: one shift per rising clock edge; cleared by reset.
module fb_syndrome_register #(
  parameter int unsigned L    = 7,
  parameter bit [L-1:0]  CODE = 7'b1010011
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_i,      // syndrome of the current clock
  input  logic         nhat_i,   // noise estimate of the digit at lag L-1
  output logic [L-1:0] sstar_o   // corrected syndromes by lag (before this clock's update)
);
  localparam int unsigned D = L - 1;
  logic [L-1:1] r;

  assign sstar_o = {r, s_i};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) r <= '0;
    else
      for (int e = 0; e < D; e++)
        r[e+1] <= sstar_o[e] ^ (nhat_i & CODE[D-e]);
endmodule
