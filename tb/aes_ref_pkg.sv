// aes_ref_pkg: reference AES-128 model for the testbenches.
//
// Written independently of the RTL: GF(2^8) multiplication uses log and
// antilog tables built from the generator 3, the S-box is tabulated from
// those at start-up (init()), and whole-block encryption and decryption
// follow FIPS-197 on 128-bit values with byte 0 in bits [127:120].
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] blk_t;

  u8 exp_t [0:255];
  u8 log_t [0:255];
  u8 sb [0:255];
  u8 isb [0:255];

  function automatic u8 mul_slow(u8 a, u8 b);
    u8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic void init();
    u8 x = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = x;
      log_t[x] = u8'(i);
      x = mul_slow(x, 8'h03);
    end
    exp_t[255] = exp_t[0];
    for (int a = 0; a < 256; a++) begin
      u8 inv, s;
      inv = (a == 0) ? 8'h00 : exp_t[(255 - log_t[a]) % 255];
      s = 8'h63;
      for (int bit_i = 0; bit_i < 8; bit_i++)
        s[bit_i] = s[bit_i] ^ inv[bit_i] ^ inv[(bit_i+4)%8] ^ inv[(bit_i+5)%8]
                 ^ inv[(bit_i+6)%8] ^ inv[(bit_i+7)%8];
      sb[a] = s;
      isb[s] = u8'(a);
    end
  endfunction

  function automatic u8 mul(u8 a, u8 b);
    if (a == 0 || b == 0) return 0;
    return exp_t[(int'(log_t[a]) + int'(log_t[b])) % 255];
  endfunction

  function automatic u8 get(blk_t s, int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic blk_t put(blk_t s, int i, u8 v);
    s[127-8*i -: 8] = v;
    return s;
  endfunction

  function automatic logic [31:0] mix_col(logic [31:0] c, bit inverse);
    u8 a [4];
    u8 m [4];
    logic [31:0] r;
    for (int i = 0; i < 4; i++) a[i] = c[31-8*i -: 8];
    if (inverse) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else         m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int i = 0; i < 4; i++)
      r[31-8*i -: 8] = mul(m[0], a[i]) ^ mul(m[1], a[(i+1)%4])
                     ^ mul(m[2], a[(i+2)%4]) ^ mul(m[3], a[(i+3)%4]);
    return r;
  endfunction

  // Round keys 0..10 of a 128-bit key.
  function automatic void expand(blk_t key, output blk_t rk [11]);
    logic [31:0] w [44];
    u8 rc = 1;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {sb[t[23:16]], sb[t[15:8]], sb[t[7:0]], sb[t[31:24]]};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic blk_t sub_bytes(blk_t s, bit inverse);
    for (int i = 0; i < 16; i++) s = put(s, i, inverse ? isb[get(s, i)] : sb[get(s, i)]);
    return s;
  endfunction

  function automatic blk_t shift_rows(blk_t s, bit inverse);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o = put(o, 4*c+r, get(s, 4*((inverse ? c - r + 4 : c + r) % 4) + r));
    return o;
  endfunction

  function automatic blk_t mix_columns(blk_t s, bit inverse);
    for (int c = 0; c < 4; c++) s[127-32*c -: 32] = mix_col(s[127-32*c -: 32], inverse);
    return s;
  endfunction

  function automatic blk_t encrypt(blk_t pt, blk_t key);
    blk_t rk [11];
    blk_t s;
    expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t ct, blk_t key);
    blk_t rk [11];
    blk_t s;
    expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
