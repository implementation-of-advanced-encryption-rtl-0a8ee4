// aes_ref_pkg: behavioural AES-128 reference used by the testbenches.
//
// It is written independently of the RTL: the S-box is built from exp/log
// tables over the generator 0x03 (not from x^254 as in the RTL), the key
// schedule works on 32-bit words as in FIPS-197, and the cipher works on a
// whole 4x4 state at a time. Blocks are byte arrays, byte 0 first.
package aes_ref_pkg;

  typedef logic [7:0] blk_t [16];

  function automatic logic [7:0] mul2(input logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0;
    while (b != 0) begin
      if (b[0]) p ^= a;
      a = mul2(a);
      b = b >> 1;
    end
    return p;
  endfunction

  // S-box and its inverse from exp/log tables.
  function automatic void build_sbox(output logic [7:0] s [256], output logic [7:0] si [256]);
    logic [7:0] ex [256];
    logic [7:0] lg [256];
    logic [7:0] x, inv, b;
    x = 8'h01;
    for (int i = 0; i < 255; i++) begin
      ex[i] = x;
      lg[x] = 8'(i);
      x = mul2(x) ^ x;   // times 0x03
    end
    for (int a = 0; a < 256; a++) begin
      inv = (a == 0) ? 8'h00 : ex[(255 - lg[a]) % 255];
      b = inv;
      s[a] = b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
    end
    for (int a = 0; a < 256; a++) si[s[a]] = 8'(a);
  endfunction

  // All 11 round keys, rk[r][i] = byte i of round key r.
  function automatic void expand(input blk_t key, input logic [7:0] s [256],
                                 output logic [7:0] rk [11][16]);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = {key[4*i], key[4*i+1], key[4*i+2], key[4*i+3]};
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {s[t[23:16]], s[t[15:8]], s[t[7:0]], s[t[31:24]]} ^ {rc, 24'h0};
        rc = mul2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++)
      for (int i = 0; i < 16; i++)
        rk[r][i] = w[4*r + i/4][31 - 8*(i%4) -: 8];
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t key);
    logic [7:0] s [256], si [256];
    logic [7:0] rk [11][16];
    blk_t st, t;
    build_sbox(s, si);
    expand(key, s, rk);
    for (int i = 0; i < 16; i++) st[i] = pt[i] ^ rk[0][i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = s[st[i]];
      for (int c = 0; c < 4; c++)
        for (int w = 0; w < 4; w++) st[4*c+w] = t[4*((c+w)%4)+w];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          for (int w = 0; w < 4; w++) t[w] = st[4*c+w];
          for (int w = 0; w < 4; w++)
            st[4*c+w] = mul(t[w], 2) ^ mul(t[(w+1)%4], 3) ^ t[(w+2)%4] ^ t[(w+3)%4];
        end
      for (int i = 0; i < 16; i++) st[i] ^= rk[r][i];
    end
    return st;
  endfunction

  function automatic blk_t decrypt(input blk_t ct, input blk_t key);
    logic [7:0] s [256], si [256];
    logic [7:0] rk [11][16];
    blk_t st, t;
    build_sbox(s, si);
    expand(key, s, rk);
    for (int i = 0; i < 16; i++) st[i] = ct[i] ^ rk[10][i];
    for (int r = 9; r >= 0; r--) begin
      for (int c = 0; c < 4; c++)
        for (int w = 0; w < 4; w++) t[4*((c+w)%4)+w] = st[4*c+w];
      for (int i = 0; i < 16; i++) st[i] = si[t[i]] ^ rk[r][i];
      if (r != 0)
        for (int c = 0; c < 4; c++) begin
          for (int w = 0; w < 4; w++) t[w] = st[4*c+w];
          for (int w = 0; w < 4; w++)
            st[4*c+w] = mul(t[w], 14) ^ mul(t[(w+1)%4], 11) ^ mul(t[(w+2)%4], 13) ^ mul(t[(w+3)%4], 9);
        end
    end
    return st;
  endfunction

endpackage
