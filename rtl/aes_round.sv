// aes_round: one full AES round in combinational logic, so the crypto-core completes a
// round per clock cycle (a fully parallel round, as the test scheme assumes). It applies
// SubBytes (16 aes_sbox instances), ShiftRows, MixColumns and AddRoundKey in the order
// of FIPS 197. When last is high MixColumns is skipped, which is the tenth round of an
// encryption. The round key comes from aes_key_gen in the same cycle.
module aes_round (
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  input  logic         last,
  output logic [127:0] state_out
);
  import aes_pkg::*;

  logic [7:0] sb  [16];
  logic [7:0] sr  [16];
  logic [7:0] mc  [16];
  logic [127:0] mixed;

  for (genvar n = 0; n < 16; n++) begin : g_sub
    aes_sbox u_sbox (.a(state_in[127-8*n -: 8]), .y(sb[n]));
  end

  always_comb begin
    // ShiftRows: row r rotates left by r columns.
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[4*c + r] = sb[4*((c + r) % 4) + r];
    // MixColumns on each column.
    for (int c = 0; c < 4; c++) begin
      mc[4*c+0] = xtime(sr[4*c+0]) ^ xtime(sr[4*c+1]) ^ sr[4*c+1] ^ sr[4*c+2] ^ sr[4*c+3];
      mc[4*c+1] = sr[4*c+0] ^ xtime(sr[4*c+1]) ^ xtime(sr[4*c+2]) ^ sr[4*c+2] ^ sr[4*c+3];
      mc[4*c+2] = sr[4*c+0] ^ sr[4*c+1] ^ xtime(sr[4*c+2]) ^ xtime(sr[4*c+3]) ^ sr[4*c+3];
      mc[4*c+3] = xtime(sr[4*c+0]) ^ sr[4*c+0] ^ sr[4*c+1] ^ sr[4*c+2] ^ xtime(sr[4*c+3]);
    end
    for (int n = 0; n < 16; n++) mixed[127-8*n -: 8] = last ? sr[n] : mc[n];
    state_out = mixed ^ round_key;
  end

endmodule
