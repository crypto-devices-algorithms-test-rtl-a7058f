// des_final_op: the "Final Op." of the DES crypto-core, between register R and R-out.
// It swaps the two 32-bit halves of the round state ({L16, R16} becomes {R16, L16}) and
// applies the final permutation IP^-1 of FIPS 46. Pure wiring. It is applied in every
// mode, so TPG patterns and ORA signatures in R-out are permuted round states.
module des_final_op (
  input  logic [63:0] data_in,
  output logic [63:0] data_out
);
  import des_pkg::*;

  always_comb data_out = fp({data_in[31:0], data_in[63:32]});
endmodule
