// des_key_gen: DES round-key generation, one 48-bit round key per clock cycle. At the
// first round of each encryption (load high) the 56 key bits chosen by PC-1 from key_in
// are taken; otherwise the C and D halves held in cd_q are. Both halves rotate left by
// the round's shift (1 or 2, index rnd = 0..15), PC-2 selects the round key, and the
// rotated halves are stored when en is high. The rotations of one encryption add up to
// 28, so the halves return to PC-1(key) after 16 rounds. As the test scheme notes, this
// module is wiring apart from the C/D register and the rotation choice.
module des_key_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        load,
  input  logic [63:0] key_in,
  input  logic [3:0]  rnd,
  output logic [47:0] round_key
);
  import des_pkg::*;

  logic [55:0] cd_q, cd_cur, cd_rot;
  logic [27:0] c, d;

  always_comb begin
    cd_cur = load ? pc1(key_in) : cd_q;
    c = cd_cur[55:28];
    d = cd_cur[27:0];
    if (SHIFT_T[rnd] == 2'd2) cd_rot = {c[25:0], c[27:26], d[25:0], d[27:26]};
    else                      cd_rot = {c[26:0], c[27],    d[26:0], d[27]};
    round_key = pc2(cd_rot);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  cd_q <= '0;
    else if (en) cd_q <= cd_rot;

endmodule
