// aes_pkg: arithmetic of the Advanced Encryption Standard (FIPS 197) shared by the AES
// crypto-core blocks. Bytes are elements of GF(2^8) modulo x^8+x^4+x^3+x+1. The S-box
// is computed here rather than stored: the multiplicative inverse (a^254, 0 maps to 0)
// followed by the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
// The 128-bit state holds byte 0 in bits 127:120, byte 15 in bits 7:0, and byte n
// sits in row n%4 and column n/4, as in the standard.
package aes_pkg;

  localparam int unsigned AES_ROUNDS = 10;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 by square-and-multiply: 254 = 11111110b.
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] sq, r;
    r  = 8'h01;
    sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);  // a^(2^i)
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // Round constant of key-expansion step idx (0..9): x^idx in GF(2^8).
  function automatic logic [7:0] rcon(input logic [3:0] idx);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < 10; i++) if (i < int'(idx)) r = xtime(r);
    return r;
  endfunction

endpackage
