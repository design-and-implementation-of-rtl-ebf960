// aes_ref_pkg: reference model used by the testbenches, written independently of the
// RTL. The S-box is built from exponent/logarithm tables with generator {03} and the
// affine transform is applied bit by bit; the cipher works on a 16-byte array. It also
// models the 12-stage byte-wide PRBS of the randomizer as a plain recurrence
// a[t+12] = a[t] ^ a[t+1] ^ a[t+4] ^ a[t+6], where a[0..11] are the key3 bytes
// from the last (bits 7:0) to the first (bits 95:88), the order in which they leave.
package aes_ref_pkg;

  typedef logic [7:0] b8;
  typedef b8 st_t [16];

  function automatic b8 rmul(b8 a, b8 b);
    b8 r = 0;
    for (int i = 7; i >= 0; i--) begin
      r = (r[7] ? ({r[6:0], 1'b0} ^ 8'h1b) : {r[6:0], 1'b0});
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic b8 rsbox(b8 x);
    b8 ex [256];
    int lg [256];
    b8 inv, y;
    ex[0] = 1;
    for (int i = 1; i < 256; i++) ex[i] = rmul(ex[i-1], 8'h03);
    for (int i = 0; i < 255; i++) lg[ex[i]] = i;
    inv = (x == 0) ? 8'h00 : ex[(255 - lg[x]) % 255];
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return y;
  endfunction

  function automatic b8 rinvsbox(b8 y);
    for (int i = 0; i < 256; i++) if (rsbox(b8'(i)) == y) return b8'(i);
    return 0;
  endfunction

  function automatic st_t to_st(logic [127:0] v);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = v[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = s[i];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub(logic [127:0] v, bit inverse);
    st_t s = to_st(v);
    foreach (s[i]) s[i] = inverse ? rinvsbox(s[i]) : rsbox(s[i]);
    return from_st(s);
  endfunction

  function automatic logic [127:0] ref_shift(logic [127:0] v, bit inverse);
    st_t s = to_st(v), o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inverse) o[r + 4*c] = s[r + 4*((c + r) % 4)];
        else          o[r + 4*((c + r) % 4)] = s[r + 4*c];
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_mix(logic [127:0] v, bit inverse);
    st_t s = to_st(v), o;
    b8 m [4] = inverse ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r + 4*c] = 0;
        for (int k = 0; k < 4; k++) o[r + 4*c] ^= rmul(m[(k - r + 4) % 4], s[k + 4*c]);
      end
    return from_st(o);
  endfunction

  typedef logic [127:0] rk_t [11];

  function automatic rk_t ref_expand(logic [127:0] key);
    logic [31:0] w [44];
    rk_t rk;
    b8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {rsbox(t[31:24]) ^ rc, rsbox(t[23:16]), rsbox(t[15:8]), rsbox(t[7:0])};
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    rk_t rk = ref_expand(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift(ref_sub(s, 0), 0);
      if (r != 10) s = ref_mix(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [127:0] ct, logic [127:0] key);
    rk_t rk = ref_expand(key);
    logic [127:0] s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub(ref_shift(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = ref_mix(s, 1);
    end
    return s;
  endfunction

  // 16 keystream bytes of the randomizer, first byte in bits 127:120
  function automatic logic [127:0] ref_keystream(logic [95:0] key3);
    b8 a [28];
    logic [127:0] ks;
    for (int i = 0; i < 12; i++) a[i] = key3[8*i+7 -: 8];  // last stage (key3 byte 11) leaves first
    for (int t = 0; t < 16; t++) a[t+12] = a[t] ^ a[t+1] ^ a[t+4] ^ a[t+6];
    for (int t = 0; t < 16; t++) ks[127-8*t -: 8] = a[t];
    return ks;
  endfunction

endpackage
