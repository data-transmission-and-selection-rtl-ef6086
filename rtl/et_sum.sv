// Sum of the candidate energies of all channels (combinational).
//
// On calorimeter boards this is the energy sum of the board; on the SPD
// board the same field holds the hit count of each input, so the sum is the
// multiplicity. Result width SUM_W (16 bit) holds 28 x 255 without overflow.
module et_sum
  import sb_pkg::*;
#(
  parameter int unsigned N = N_CH_SB
) (
  input  logic [ET_W-1:0]  et [N],
  output logic [SUM_W-1:0] sum
);
  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum = sum + SUM_W'(et[i]);
  end
endmodule
