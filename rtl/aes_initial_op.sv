// aes_initial_op: the "Initial Op." of the AES crypto-core, the AddRoundKey that
// precedes the first round: the 128-bit plaintext (or seed, or first response) XORed
// with the primary key. Combinational; its output feeds input 0 of the Select mux.
module aes_initial_op (
  input  logic [127:0] data_in,
  input  logic [127:0] key,
  output logic [127:0] data_out
);
  always_comb data_out = data_in ^ key;
endmodule
