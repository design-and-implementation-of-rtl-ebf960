// aes_pkg: types, constants and GF(2^8) arithmetic shared by the AES-128 blocks.
//
// The 128-bit AES state uses the FIPS-197 byte order: byte i of the block sits in
// bits [127-8*i -: 8], and the 4x4 state is filled column by column, so state row r,
// column c is byte r + 4*c. The S-box and inverse S-box tables are not typed in: they
// are computed while the design is elaborated from their definition (multiplicative
// inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, then the affine transform with constant
// 0x63), and the blocks use them as 256-entry look-up tables.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [255:0][7:0] sbox_t;

  localparam int unsigned NB_ROUNDS = 10;   // AES-128
  localparam int unsigned NB_BYTES  = 16;

  // Multiply by x (i.e. by {02}) modulo the AES polynomial.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product (shift-and-add).
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as b^254 (0 maps to 0).
  function automatic byte_t gf_inv(byte_t b);
    byte_t r = 8'h01;
    byte_t s = b;
    for (int i = 1; i < 8; i++) begin  // 254 = 0b11111110
      s = gf_mul(s, s);
      r = gf_mul(r, s);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic sbox_t make_sbox();
    sbox_t t;
    for (int i = 0; i < 256; i++) begin
      byte_t v = gf_inv(byte_t'(i));
      t[i] = v ^ rotl8(v, 1) ^ rotl8(v, 2) ^ rotl8(v, 3) ^ rotl8(v, 4) ^ 8'h63;
    end
    return t;
  endfunction

  function automatic sbox_t make_inv_sbox();
    sbox_t f = make_sbox();
    sbox_t t;
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

  localparam sbox_t SBOX     = make_sbox();
  localparam sbox_t INV_SBOX = make_inv_sbox();

  // Byte i of a block (0 = most significant).
  function automatic byte_t get_byte(block_t s, int i);
    return s[127 - 8*i -: 8];
  endfunction

endpackage
