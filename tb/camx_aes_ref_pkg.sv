// camx_aes_ref_pkg: reference AES-128 (FIPS-197) for the CAMX testbenches.
// Everything is computed, no tables are stored: the S-box is the inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1 (as x^254) followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
// A block is a 128-bit vector whose byte k (bits 8k+7..8k) is input byte k of
// FIPS-197, i.e. state row k%4, column k/4.
package camx_aes_ref_pkg;

  typedef logic [127:0] block_t;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv, sq, b;
    // x^254 = inverse (0 maps to 0)
    inv = 8'h01;
    sq  = x;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) inv = gmul(inv, sq);
      sq = gmul(sq, sq);
    end
    b = inv;
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^
           {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // byte k of a block given as a FIPS-197 hex string literal (byte 0 first)
  function automatic block_t from_fips(logic [127:0] lit);
    block_t b;
    for (int k = 0; k < 16; k++) b[8*k +: 8] = lit[127-8*k -: 8];
    return b;
  endfunction

  function automatic logic [127:0] to_fips(block_t b);
    logic [127:0] lit;
    for (int k = 0; k < 16; k++) lit[127-8*k -: 8] = b[8*k +: 8];
    return lit;
  endfunction

  // round keys 0..10, in block layout
  typedef block_t rkeys_t [11];

  function automatic rkeys_t key_expand(block_t key);
    rkeys_t rk;
    logic [31:0] w [44];
    logic [7:0] rcon;
    rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[32*i +: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % 4 == 0) begin
        // RotWord then SubWord; byte 0 of the word is bits 7..0
        t = {t[7:0], t[31:8]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[7:0] ^= rcon;
        rcon = gmul(rcon, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++)
      for (int c = 0; c < 4; c++) rk[r][32*c +: 32] = w[4*r + c];
    return rk;
  endfunction

  function automatic block_t sub_shift(block_t s);
    block_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[8*(r + 4*c) +: 8] = sbox(s[8*(r + 4*((c + r) % 4)) +: 8]);
    return o;
  endfunction

  function automatic block_t mix(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[8*(r + 4*c) +: 8] = gmul(s[8*(r + 4*c) +: 8], 8'h02) ^
                              gmul(s[8*((r + 1) % 4 + 4*c) +: 8], 8'h03) ^
                              s[8*((r + 2) % 4 + 4*c) +: 8] ^
                              s[8*((r + 3) % 4 + 4*c) +: 8];
    return o;
  endfunction

  function automatic block_t encrypt(block_t pt, block_t key);
    rkeys_t rk;
    block_t s;
    rk = key_expand(key);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = sub_shift(s);
      if (r != 10) s = mix(s);
      s = s ^ rk[r];
    end
    return s;
  endfunction

endpackage
