// aes_key_gen: on-the-fly AES-128 round-key generation, one round key per clock cycle.
// The register key_q holds the previous round key. In the cycle where load is high the
// expansion starts from key_in (the primary key) instead. The round key of round rnd
// (0..9, round rnd+1 of the standard) is expand(previous key, rcon(rnd)), driven
// combinationally to the round and stored in key_q when en is high.
// Because key_q is not reloaded at the start of later encryptions, a run that loops
// through several encryptions (SELF_TEST, TPG, ORA) uses the tenth round key of one
// encryption as the primary key of the next, as the published test scheme prescribes
// for these modes.
// In MISSION mode the controller raises load at the first round of every encryption.
module aes_key_gen (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [127:0] key_in,
  input  logic [3:0]   rnd,
  output logic [127:0] round_key
);
  import aes_pkg::*;

  logic [127:0] key_q, cur;
  logic [31:0]  rot, sub;

  always_comb begin
    cur = load ? key_in : key_q;
    rot = {cur[23:0], cur[31:24]};  // RotWord of the last word
  end

  for (genvar b = 0; b < 4; b++) begin : g_sub
    aes_sbox u_sbox (.a(rot[31-8*b -: 8]), .y(sub[31-8*b -: 8]));
  end

  always_comb begin
    logic [31:0] w;
    w = sub ^ {rcon(rnd), 24'h0};
    for (int i = 0; i < 4; i++) begin
      w = w ^ cur[127-32*i -: 32];
      round_key[127-32*i -: 32] = w;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  key_q <= '0;
    else if (en) key_q <= round_key;

endmodule
