// aes_ref_pkg - software reference of AES-128 encryption for the testbenches.
//
// Written independently of the RTL: the S-box is found by searching for the multiplicative
// inverse (not by exponentiation), the state is a plain 16-byte array in AES byte order
// (byte 4*c + r is row r of column c), and the key schedule is the word-wise FIPS-197 one.
package aes_ref_pkg;

  typedef logic [7:0] blk_t [16];

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv, y;
    inv = 0;
    if (x != 0)
      for (int i = 1; i < 256; i++)
        if (ref_mul(x, 8'(i)) == 8'h01) inv = 8'(i);
    // affine: y = inv ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 63
    y = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^
        {inv[3:0], inv[7:4]} ^ 8'h63;
    return y;
  endfunction

  // round keys: rk[i] is round key i as 16 bytes
  function automatic void ref_key_schedule(input blk_t key, output blk_t rk [11]);
    logic [7:0] w [44][4];
    logic [7:0] t [4];
    logic [7:0] rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) w[i][j] = key[4*i+j];
    for (int i = 4; i < 44; i++) begin
      for (int j = 0; j < 4; j++) t[j] = w[i-1][j];
      if (i % 4 == 0) begin
        t = '{ref_sbox(w[i-1][1]) ^ rc, ref_sbox(w[i-1][2]), ref_sbox(w[i-1][3]), ref_sbox(w[i-1][0])};
        rc = ref_mul(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) w[i][j] = w[i-4][j] ^ t[j];
    end
    for (int r = 0; r < 11; r++)
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) rk[r][4*i+j] = w[4*r+i][j];
  endfunction

  function automatic blk_t ref_sub_shift(input blk_t s);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) o[4*c+r] = ref_sbox(s[4*((c+r)%4)+r]);
    return o;
  endfunction

  function automatic blk_t ref_mix(input blk_t s);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[4*c+r] = ref_mul(s[4*c+r], 2) ^ ref_mul(s[4*c+(r+1)%4], 3) ^
                   s[4*c+(r+2)%4] ^ s[4*c+(r+3)%4];
    return o;
  endfunction

  function automatic blk_t ref_xor(input blk_t a, input blk_t b);
    blk_t o;
    for (int i = 0; i < 16; i++) o[i] = a[i] ^ b[i];
    return o;
  endfunction

  function automatic blk_t ref_encrypt(input blk_t pt, input blk_t key);
    blk_t rk [11];
    blk_t s;
    ref_key_schedule(key, rk);
    s = ref_xor(pt, rk[0]);
    for (int r = 1; r <= 10; r++) begin
      s = ref_sub_shift(s);
      if (r != 10) s = ref_mix(s);
      s = ref_xor(s, rk[r]);
    end
    return s;
  endfunction

  function automatic blk_t from_hex(input logic [127:0] h);
    blk_t o;
    for (int i = 0; i < 16; i++) o[i] = h[127-8*i -: 8];
    return o;
  endfunction

endpackage
