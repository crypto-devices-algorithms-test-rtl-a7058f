// des_sbox: one of the eight DES S-boxes, a 6-input, 4-output table selected by the
// BOX parameter (0 for S1 .. 7 for S8). The outer input bits pick the row, the inner
// four the column (FIPS 46). Combinational; des_round holds all eight.
module des_sbox #(
  parameter int unsigned BOX = 0
) (
  input  logic [5:0] a,
  output logic [3:0] y
);
  import des_pkg::*;

  always_comb y = sbox(3'(BOX), a);

endmodule
