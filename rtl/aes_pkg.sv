// aes_pkg: types, sizes and constant functions shared by the AES crypto-chip.
//
// The 128-bit state travels as one vector with state byte 0 in bits [127:120]
// and the bytes filling the 4x4 state matrix column by column, so byte n sits
// in row n%4 and column n/4 (the FIPS-197 convention). GF(2^8) arithmetic uses
// the AES polynomial x^8+x^4+x^3+x+1. The S-box tables are built here by
// constant functions at elaboration time (multiplicative inverse followed by
// the affine map) and then used as plain 256-entry lookup tables by aes_sbox,
// so no table has to be typed in by hand.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  // 256 bytes, entry i in bits [8*i +: 8]
  typedef logic [255:0][7:0] sbox_table_t;

  // Round-key index width: enough for Nr = 14
  localparam int unsigned RK_IDX_W = 4;

  // Number of rounds for a key of nk 32-bit words (Table: 4->10, 6->12, 8->14)
  function automatic int unsigned num_rounds(int unsigned nk);
    return nk + 6;
  endfunction

  // Multiply by x in GF(2^8)
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Forward S-box. The multiplicative inverse comes from exponent and log
  // tables of the generator {03}: inv(g^k) = g^(255-k), inv(0) = 0. The
  // affine map is then applied bit by bit with the constant 0x63.
  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    byte_t       exp_t [256];
    byte_t       log_t [256];
    byte_t       p, b, s;
    p = 8'h01;
    log_t[0] = 8'h00;
    for (int k = 0; k < 255; k++) begin
      exp_t[k] = p;
      log_t[p] = byte_t'(k);
      p = p ^ xtime(p);            // p * {03}
    end
    exp_t[255] = 8'h01;
    for (int i = 0; i < 256; i++) begin
      b = (i == 0) ? 8'h00 : exp_t[255 - int'(log_t[i])];
      for (int j = 0; j < 8; j++)
        s[j] = b[j] ^ b[(j + 4) % 8] ^ b[(j + 5) % 8] ^ b[(j + 6) % 8] ^ b[(j + 7) % 8];
      t[i] = s ^ 8'h63;
    end
    return t;
  endfunction

  // Inverse table: the position of each value in the forward table
  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t f;
    sbox_table_t t;
    f = gen_sbox();
    t = '0;
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

endpackage
