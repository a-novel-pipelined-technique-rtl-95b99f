// aes_inv_mixcol: AES InvMixColumns on one 32-bit state column.
//
// Each output byte is 14*a_r ^ 11*a_(r+1) ^ 13*a_(r+2) ^ 9*a_(r+3) in
// GF(2^8), indices mod 4.  The multiples are built from xtime chains (2a,
// 4a, 8a) and XOR.  Combinational, one column (row 0 in bits [31:24]) per
// evaluation, mirroring aes_mixcol.
//
// Interface: col_in, col_out (32 bits each), no clock.
module aes_inv_mixcol
  import aes_pkg::byte_t, aes_pkg::word_t, aes_pkg::xtime;
(
  input  word_t col_in,
  output word_t col_out
);
  byte_t a [4];
  byte_t x2 [4];
  byte_t x4 [4];
  byte_t x8 [4];
  byte_t y [4];

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      a[r]  = col_in[31-8*r -: 8];
      x2[r] = xtime(a[r]);
      x4[r] = xtime(x2[r]);
      x8[r] = xtime(x4[r]);
    end
    for (int r = 0; r < 4; r++) begin
      y[r] = (x8[r] ^ x4[r] ^ x2[r])                  // 14
           ^ (x8[(r+1)%4] ^ x2[(r+1)%4] ^ a[(r+1)%4])  // 11
           ^ (x8[(r+2)%4] ^ x4[(r+2)%4] ^ a[(r+2)%4])  // 13
           ^ (x8[(r+3)%4] ^ a[(r+3)%4]);               // 9
    end
    col_out = {y[0], y[1], y[2], y[3]};
  end
endmodule
