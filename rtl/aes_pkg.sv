// aes_pkg: types, constants and byte-level arithmetic shared by the AES-128 units.
//
// The state is a 128-bit vector holding a 4x4 byte matrix in column-major
// order, as in FIPS-197: byte i sits at bits [127-8i -: 8] and belongs to row
// i%4, column i/4. The S-box and its inverse are not typed in: they are built
// at elaboration from their definition (multiplicative inverse in GF(2^8)
// modulo x^8+x^4+x^3+x+1, then the affine map with constant 8'h63), so the
// tables cannot carry a typing error. Everything here is combinational.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   rnd_t;

  localparam int NR = 10;  // rounds of AES-128

  // Multiply by x modulo the AES polynomial.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiplication in GF(2^8).
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic byte_t gf_inv(byte_t a);
    byte_t sq = a;
    byte_t r  = 8'h01;
    for (int k = 1; k < 8; k++) begin
      sq = gf_mul(sq, sq);      // a^(2^k)
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t sbox_calc(byte_t x);
    byte_t b = gf_inv(x);
    byte_t s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [255:0][7:0] gen_sbox();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  function automatic logic [255:0][7:0] gen_inv_sbox();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[sbox_calc(byte_t'(i))] = byte_t'(i);
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX     = gen_sbox();
  localparam logic [255:0][7:0] INV_SBOX = gen_inv_sbox();

  function automatic byte_t sub_byte(byte_t x, bit inverse);
    return inverse ? INV_SBOX[x] : SBOX[x];
  endfunction

  function automatic word_t sub_word(word_t w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  // Round constant used when deriving round key r (r = 1..10).
  function automatic byte_t rcon(rnd_t r);
    byte_t c = 8'h01;
    for (int i = 1; i < 16; i++)
      if (i < int'(r)) c = xtime(c);
    return c;
  endfunction

  function automatic byte_t get_byte(block_t s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  // Row r is rotated left by r (inverse: right by r).
  function automatic block_t shift_rows(block_t s, bit inverse);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] =
          get_byte(s, 4*(inverse ? (c + 4 - r) % 4 : (c + r) % 4) + r);
    return o;
  endfunction

endpackage
