// des_round: one DES Feistel round in combinational logic, one round per clock cycle in
// the crypto-core. The 64-bit state is {L, R}. The output is {R, L ^ f(R, K)} where f
// expands R to 48 bits (E), XORs the 48-bit round key, passes the eight 6-bit groups
// through the S-boxes and permutes the 32-bit result (P), as in FIPS 46. Every round of
// an encryption has this form; the final swap belongs to des_final_op.
module des_round (
  input  logic [63:0] state_in,
  input  logic [47:0] round_key,
  output logic [63:0] state_out
);
  import des_pkg::*;

  logic [31:0] l, r, s_out;
  logic [47:0] x;

  always_comb begin
    l = state_in[63:32];
    r = state_in[31:0];
    x = expand(r) ^ round_key;
  end

  for (genvar k = 0; k < 8; k++) begin : g_sbox
    des_sbox #(.BOX(k)) u_sbox (.a(x[47-6*k -: 6]), .y(s_out[31-4*k -: 4]));
  end

  always_comb state_out = {r, l ^ pperm(s_out)};

endmodule
