// aes_sbox: one AES S-box (SubBytes on one byte), purely combinational. It computes the
// GF(2^8) inverse and the affine map of the standard (see aes_pkg) instead of holding a
// 256-entry table; the test scheme leaves the S-box implementation open and notes that its
// self-test length depends on it. Zero latency; the 16 state S-boxes sit in aes_round
// and 4 more in aes_key_gen.
module aes_sbox (
  input  logic [7:0] a,
  output logic [7:0] y
);
  import aes_pkg::*;

  always_comb y = sbox(a);

endmodule
