// des_initial_op: the "Initial Op." of the DES crypto-core, the initial permutation IP
// of FIPS 46 applied to the 64-bit plaintext (or seed, or first response). Pure wiring;
// its output feeds input 0 of the Select mux.
module des_initial_op (
  input  logic [63:0] data_in,
  output logic [63:0] data_out
);
  import des_pkg::*;

  always_comb data_out = ip(data_in);
endmodule
