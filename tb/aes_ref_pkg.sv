// aes_ref_pkg: reference model of AES-128 (FIPS-197) for the testbenches.
//
// Written independently of the design: the state is kept as an array of 16
// bytes, the S-box is found by searching for the multiplicative inverse and
// applying the affine map with byte rotations, the inverse S-box by
// inverting that table, and GF(2^8) products by carry-less multiplication
// followed by polynomial reduction. Call ref_init() once before use.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0]   u8;

  u8  sb  [256];
  u8  isb [256];

  function automatic u8 rmul(u8 a, u8 b);
    logic [14:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(9'h11b) << (i - 8);
    return p[7:0];
  endfunction

  function automatic u8 rotl8(u8 x, int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic void ref_init();
    for (int x = 0; x < 256; x++) begin
      u8 inv = 8'h00;
      for (int y = 1; y < 256; y++) if (rmul(u8'(x), u8'(y)) == 8'h01) inv = u8'(y);
      sb[x] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    for (int x = 0; x < 256; x++) isb[sb[x]] = u8'(x);
  endfunction

  typedef u8 st_t [16];

  function automatic st_t to_st(blk_t b);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127 - 8*i -: 8];
    return s;
  endfunction

  function automatic blk_t from_st(st_t s);
    blk_t b;
    for (int i = 0; i < 16; i++) b[127 - 8*i -: 8] = s[i];
    return b;
  endfunction

  function automatic blk_t ref_sub(blk_t b, bit inv);
    st_t s = to_st(b);
    for (int i = 0; i < 16; i++) s[i] = inv ? isb[s[i]] : sb[s[i]];
    return from_st(s);
  endfunction

  function automatic blk_t ref_shift(blk_t b, bit inv);
    st_t s = to_st(b);
    st_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inv) o[4*((c + r) % 4) + r] = s[4*c + r];
        else     o[4*c + r]             = s[4*((c + r) % 4) + r];
    return from_st(o);
  endfunction

  function automatic blk_t ref_mix(blk_t b, bit inv);
    st_t s = to_st(b);
    st_t o;
    for (int c = 0; c < 4; c++) begin
      u8 a0 = s[4*c], a1 = s[4*c+1], a2 = s[4*c+2], a3 = s[4*c+3];
      if (!inv) begin
        o[4*c]   = rmul(a0,2) ^ rmul(a1,3) ^ a2 ^ a3;
        o[4*c+1] = a0 ^ rmul(a1,2) ^ rmul(a2,3) ^ a3;
        o[4*c+2] = a0 ^ a1 ^ rmul(a2,2) ^ rmul(a3,3);
        o[4*c+3] = rmul(a0,3) ^ a1 ^ a2 ^ rmul(a3,2);
      end else begin
        o[4*c]   = rmul(a0,14) ^ rmul(a1,11) ^ rmul(a2,13) ^ rmul(a3,9);
        o[4*c+1] = rmul(a0,9)  ^ rmul(a1,14) ^ rmul(a2,11) ^ rmul(a3,13);
        o[4*c+2] = rmul(a0,13) ^ rmul(a1,9)  ^ rmul(a2,14) ^ rmul(a3,11);
        o[4*c+3] = rmul(a0,11) ^ rmul(a1,13) ^ rmul(a2,9)  ^ rmul(a3,14);
      end
    end
    return from_st(o);
  endfunction

  // round key r (0..10) of the cipher key
  function automatic blk_t ref_rk(blk_t key, int r);
    logic [31:0] w [44];
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]} ^ {rc, 24'h0};
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // state after encryption round r (1..10) given the state before it
  function automatic blk_t ref_enc_round(blk_t s, blk_t key, int r);
    s = ref_shift(ref_sub(s, 0), 0);
    if (r != 10) s = ref_mix(s, 0);
    return s ^ ref_rk(key, r);
  endfunction

  // decryption round using round key r-1 (r = 10..1), as in the design
  function automatic blk_t ref_dec_round(blk_t s, blk_t key, int r);
    s = ref_sub(ref_shift(s, 1), 1) ^ ref_rk(key, r - 1);
    if (r != 1) s = ref_mix(s, 1);
    return s;
  endfunction

  function automatic blk_t ref_encrypt(blk_t pt, blk_t key);
    blk_t s = pt ^ key;
    for (int r = 1; r <= 10; r++) s = ref_enc_round(s, key, r);
    return s;
  endfunction

  function automatic blk_t ref_decrypt(blk_t ct, blk_t key);
    blk_t s = ct ^ ref_rk(key, 10);
    for (int r = 10; r >= 1; r--) s = ref_dec_round(s, key, r);
    return s;
  endfunction

  function automatic blk_t rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
