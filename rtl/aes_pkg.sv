// aes_pkg: types, constants and GF(2^8) functions shared by the byte-serial
// AES-128 encryption and decryption units.
//
// The state and the round key are held as 16 bytes in FIPS-197 order: byte
// 4*c+r is row r of column c, and byte 0 is the first byte on the serial
// interface.  A 32-bit column word carries row 0 in bits [31:24].
//
// SubBytes and InvSubBytes are not stored as tables.  sbox_fwd() takes the
// multiplicative inverse in GF(2^8) (x^254, modulus x^8+x^4+x^3+x+1) and
// applies the FIPS-197 affine map; sbox_inv() applies the inverse affine map
// first and then the inverse.  Both are pure combinational functions.
//
// The control word ctrl_t carries the signals the global counter of the
// controller produces every cycle (DATA_IN_SEL, KEY_IN_SEL, RND_SIG,
// LAST_RND_SIG and the register-bank operations).  Their names follow the
// design description; their encodings are this design's own.
package aes_pkg;

  typedef logic [7:0]  byte_t;
  typedef logic [31:0] word_t;

  localparam int unsigned AES_NB    = 16;  // bytes per block
  localparam int unsigned AES_NR    = 10;  // rounds of AES-128
  localparam byte_t       AES_RCON1 = 8'h01;

  // Operation of the state register bank in one cycle.
  typedef enum logic [1:0] {
    ST_HOLD      = 2'd0,  // keep contents
    ST_SHIFT     = 2'd1,  // serial path: s[0] leaves, byte_in enters at s[15]
    ST_SHIFTROWS = 2'd2,  // (Inv)ShiftRows permutation inside the register
    ST_COLUMN    = 2'd3   // s[0..3] leave, col_in enters at s[12..15]
  } state_op_e;

  // Operation of the key register bank in one cycle.
  typedef enum logic [2:0] {
    KEY_HOLD = 3'd0,  // keep contents
    KEY_LOAD = 3'd1,  // serial load: key_in enters at k[15]
    KEY_FWD  = 3'd2,  // one byte of the forward key expansion step
    KEY_BWD  = 3'd3,  // one byte of the backward key expansion step
    KEY_ROT4 = 3'd4   // rotate by one column to present the next key column
  } key_op_e;

  typedef struct packed {
    state_op_e  state_op;
    key_op_e    key_op;
    logic [3:0] byte_idx;      // position inside the current 16-cycle pass
    logic       data_in_sel;   // DATA_IN_SEL: 1 = external byte, 0 = SubBytes output
    logic       key_in_sel;    // KEY_IN_SEL : 1 = external key byte, 0 = expanded key
    logic       rnd_sig;       // RND_SIG    : a cipher round is in progress
    logic       last_rnd_sig;  // LAST_RND_SIG: final round, MixColumns bypassed
    logic       mix_bypass;    // column path adds the round key only
  } ctrl_t;

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Inverse of xtime: divides by x in GF(2^8).
  function automatic byte_t inv_xtime(byte_t a);
    return a[0] ? ((a ^ 8'h1b) >> 1) | 8'h80 : a >> 1;
  endfunction

  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0), by an addition chain:
  // a^3, a^12, a^15, a^240, then a^240 * a^12 * a^2.
  function automatic byte_t gf_inv(byte_t a);
    byte_t a2   = gmul(a, a);
    byte_t a3   = gmul(a2, a);
    byte_t a6   = gmul(a3, a3);
    byte_t a12  = gmul(a6, a6);
    byte_t a15  = gmul(a12, a3);
    byte_t a30  = gmul(a15, a15);
    byte_t a60  = gmul(a30, a30);
    byte_t a120 = gmul(a60, a60);
    byte_t a240 = gmul(a120, a120);
    byte_t a14  = gmul(a12, a2);
    return gmul(a240, a14);
  endfunction

  function automatic byte_t rotl8(byte_t a, int unsigned n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic byte_t sbox_fwd(byte_t a);
    byte_t b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t sbox_inv(byte_t a);
    byte_t b = rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05;
    return gf_inv(b);
  endfunction

endpackage
