// aes_ref_pkg: reference AES model used by the testbenches.
//
// Written independently of the RTL: the S-box is found by brute-force search
// for the multiplicative inverse followed by the rotate-and-XOR form of the
// affine map, the state is handled as an array of 16 bytes, and the key
// schedule and cipher follow the FIPS-197 pseudo code step by step. Byte 0 of
// a 128-bit block is bits [127:120]; byte n is row n%4, column n/4.
package aes_ref_pkg;

  typedef logic [7:0] rbyte_t;
  typedef rbyte_t     rstate_t [16];

  rbyte_t sb_tab  [256];
  rbyte_t isb_tab [256];
  bit     tab_ok = 1'b0;

  function automatic rbyte_t rmul(rbyte_t a, rbyte_t b);
    logic [15:0] acc;
    acc = '0;
    for (int i = 0; i < 8; i++) if (b[i]) acc ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (acc[i]) acc ^= (16'h11b << (i - 8));
    return acc[7:0];
  endfunction

  function automatic rbyte_t rotl8(rbyte_t x, int n);
    return rbyte_t'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void build_tables();
    rbyte_t inv, s;
    for (int x = 0; x < 256; x++) begin
      inv = 8'h00;
      for (int y = 1; y < 256; y++) if (rmul(rbyte_t'(x), rbyte_t'(y)) == 8'h01) inv = rbyte_t'(y);
      s = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
      sb_tab[x]  = s;
      isb_tab[s] = rbyte_t'(x);
    end
    tab_ok = 1'b1;
  endfunction

  function automatic rbyte_t ref_sbox(rbyte_t x);
    if (!tab_ok) build_tables();
    return sb_tab[x];
  endfunction

  function automatic rbyte_t ref_inv_sbox(rbyte_t x);
    if (!tab_ok) build_tables();
    return isb_tab[x];
  endfunction

  function automatic void to_state(logic [127:0] b, output rstate_t s);
    for (int n = 0; n < 16; n++) s[n] = b[127 - 8*n -: 8];
  endfunction

  function automatic logic [127:0] from_state(rstate_t s);
    logic [127:0] b;
    for (int n = 0; n < 16; n++) b[127 - 8*n -: 8] = s[n];
    return b;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] b, bit inverse);
    rstate_t s;
    to_state(b, s);
    for (int n = 0; n < 16; n++) s[n] = inverse ? ref_inv_sbox(s[n]) : ref_sbox(s[n]);
    return from_state(s);
  endfunction

  // s'[r][c] = s[r][(c + r) mod 4] (left), s[r][(c - r) mod 4] (right)
  function automatic logic [127:0] ref_shift_rows(logic [127:0] b, bit inverse);
    rstate_t s, t;
    to_state(b, s);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        t[r + 4*c] = inverse ? s[r + 4*((c + 4 - r) % 4)] : s[r + 4*((c + r) % 4)];
    return from_state(t);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] b, bit inverse);
    rstate_t s, t;
    rbyte_t  m [4];
    to_state(b, s);
    if (inverse) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else         m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[r + 4*c] = 8'h00;
        for (int k = 0; k < 4; k++) t[r + 4*c] ^= rmul(m[(k - r + 4) % 4], s[k + 4*c]);
      end
    return from_state(t);
  endfunction

  // Key schedule: all words w[0 .. 4*(nr+1)-1]
  function automatic void ref_expand(logic [255:0] key, int nk, output logic [31:0] w [60]);
    int nr;
    logic [31:0] temp;
    rbyte_t rc;
    nr = nk + 6;
    for (int i = 0; i < 60; i++) w[i] = '0;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    rc = 8'h01;
    for (int i = nk; i < 4*(nr + 1); i++) begin
      temp = w[i-1];
      if (i % nk == 0) begin
        temp = {temp[23:0], temp[31:24]};
        temp = {ref_sbox(temp[31:24]), ref_sbox(temp[23:16]), ref_sbox(temp[15:8]), ref_sbox(temp[7:0])};
        temp ^= {rc, 24'h0};
        rc = rmul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        temp = {ref_sbox(temp[31:24]), ref_sbox(temp[23:16]), ref_sbox(temp[15:8]), ref_sbox(temp[7:0])};
      end
      w[i] = w[i-nk] ^ temp;
    end
  endfunction

  function automatic logic [127:0] ref_round_key(logic [31:0] w [60], int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // key is left-aligned in 256 bits (a 128-bit key in [255:128])
  function automatic logic [127:0] ref_encrypt(logic [255:0] key, int nk, logic [127:0] pt);
    logic [31:0]  w [60];
    logic [127:0] s;
    int nr;
    nr = nk + 6;
    ref_expand(key, nk, w);
    s = pt ^ ref_round_key(w, 0);
    for (int r = 1; r <= nr; r++) begin
      s = ref_sub_bytes(s, 0);
      s = ref_shift_rows(s, 0);
      if (r != nr) s = ref_mix_columns(s, 0);
      s ^= ref_round_key(w, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [255:0] key, int nk, logic [127:0] ct);
    logic [31:0]  w [60];
    logic [127:0] s;
    int nr;
    nr = nk + 6;
    ref_expand(key, nk, w);
    s = ct ^ ref_round_key(w, nr);
    for (int r = nr - 1; r >= 0; r--) begin
      s = ref_shift_rows(s, 1);
      s = ref_sub_bytes(s, 1);
      s ^= ref_round_key(w, r);
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
