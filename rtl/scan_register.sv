// scan_register: serially loaded configuration register.
//
// Holds the connection bits of programmable encoders and decoders, and the
// threshold values of decoders, which are shifted in one bit per clock before
// operation. While en_i is high, each clock shifts d_i in at the top
// (cfg_o[N-1]) and everything else down one place; cfg_o[0] leaves on q_o, so
// registers chain into one long scan chain. After N shifts the first bit sent
// sits in cfg_o[0]. While en_i is low the contents are held.
// Serial loading follows the published designs; the shift direction, the
// enable and the reset to all zeros are choices of this design.
module scan_register #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en_i,    // shift enable
  input  logic         d_i,     // serial data in
  output logic         q_o,     // serial data out (to the next register of the chain)
  output logic [N-1:0] cfg_o    // parallel contents
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    cfg_o <= '0;
    else if (en_i) begin
      cfg_o[N-1] <= d_i;
      for (int k = 0; k < N - 1; k++) cfg_o[k] <= cfg_o[k+1];
    end

  assign q_o = cfg_o[0];
endmodule
