// aes_pkg: shared types, constants and GF(2^8) arithmetic for the byte-serial
// AES-128 core.
//
// The AES field is GF(2^8) with the reduction polynomial x^8+x^4+x^3+x+1
// (0x11b). The functions below are written as plain loops so that every table
// of the design (S-box contents, round constants) is computed from its formula
// instead of being pasted in as numbers. All functions are pure and
// synthesizable; with constant arguments the tools fold them at elaboration.
//
// State byte numbering follows the usual AES convention: byte i of the
// 128-bit block is row (i mod 4), column (i div 4), and byte 0 is the first
// byte sent on the 8-bit ports.
package aes_pkg;

  typedef logic [7:0] byte_t;
  typedef byte_t      col_t [4];

  localparam int unsigned NBYTES  = 16;  // bytes in a block and in a round key
  localparam int unsigned NROUNDS = 10;  // AES-128

  // Multiply by x (0x02) modulo 0x11b.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Divide by x: the inverse of xtime.
  function automatic byte_t inv_xtime(input byte_t a);
    return a[0] ? (((a ^ 8'h1b) >> 1) | 8'h80) : (a >> 1);
  endfunction

  // General GF(2^8) product by shift-and-add.
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t gf_inv(input byte_t a);
    byte_t r, sq;
    r  = 8'h01;
    sq = a;
    // 254 = 0b11111110: multiply together a^2, a^4, ..., a^128
    for (int i = 0; i < 7; i++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  // The S-box affine map: b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 0x63.
  function automatic byte_t affine(input byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // Inverse of the affine map: b_(i+2) ^ b_(i+5) ^ b_(i+7) ^ d_i, d = 0x05.
  function automatic byte_t inv_affine(input byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

  function automatic byte_t sbox_f(input byte_t a);
    return affine(gf_inv(a));
  endfunction

  // Round constant of round r (1..10): x^(r-1).
  function automatic byte_t rcon(input logic [3:0] r);
    byte_t c;
    c = 8'h01;
    for (int i = 2; i <= 10; i++)
      if (r >= 4'(i)) c = xtime(c);
    return c;
  endfunction

  // MixColumns of one column (circulant 02 03 01 01).
  function automatic col_t mix_col(input col_t a);
    col_t r;
    for (int i = 0; i < 4; i++)
      r[i] = xtime(a[i]) ^ (xtime(a[(i+1)%4]) ^ a[(i+1)%4]) ^ a[(i+2)%4] ^ a[(i+3)%4];
    return r;
  endfunction

  // InvMixColumns of one column (circulant 0e 0b 0d 09).
  function automatic col_t inv_mix_col(input col_t a);
    col_t r;
    for (int i = 0; i < 4; i++)
      r[i] = gf_mul(a[i], 8'h0e) ^ gf_mul(a[(i+1)%4], 8'h0b)
           ^ gf_mul(a[(i+2)%4], 8'h0d) ^ gf_mul(a[(i+3)%4], 8'h09);
    return r;
  endfunction

endpackage
