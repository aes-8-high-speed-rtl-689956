// aes8_pkg - shared types, constants and GF(2^8) arithmetic of the 8-bit AES-128 encryptor.
//
// The state and the cipher key are each kept as 16 bytes in an 8x16 RAM. A byte address is
// {column, row} (address = 4*column + row), the usual AES byte order, so byte 0 of the
// plaintext/key is row 0 of column 0. The S-box table is not stored as a list of numbers:
// it is computed at elaboration from its definition (multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the AES affine transform), so synthesis still
// sees a 256-entry look-up table.
//
// Command encoding for the encryption block and the RAM address layout are choices of this
// design; the algorithm constants follow the AES standard.
package aes8_pkg;

  typedef logic [7:0] byte_t;
  typedef logic [3:0] addr_t;   // {col[1:0], row[1:0]}

  // Operation the top asks of the encryption block.
  typedef enum logic [1:0] {
    CMD_ARK_SB_SR = 2'd0,  // AddRoundKey, SubBytes and ShiftRows in one pass (36 cycles)
    CMD_MIXCOL    = 2'd1,  // MixColumns over the four columns
    CMD_FINAL_ARK = 2'd2   // last AddRoundKey, ciphertext streamed out (16 bytes)
  } enc_cmd_e;

  localparam int unsigned NUM_ROUNDS = 10;   // AES-128

  function automatic addr_t mk_addr(input logic [1:0] row, input logic [1:0] col);
    return {col, row};
  endfunction

  // multiply by x (02) in GF(2^8)
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 (0 maps to 0)
  function automatic byte_t gf_inv(input byte_t a);
    byte_t r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // exponent 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t sbox_calc(input byte_t a);
    byte_t b, s;
    b = gf_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  typedef byte_t sbox_table_t [256];

  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

endpackage
