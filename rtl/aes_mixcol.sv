// aes_mixcol: AES MixColumns on one 32-bit state column.
//
// Each output byte is 2*a_r ^ 3*a_(r+1) ^ a_(r+2) ^ a_(r+3) in GF(2^8),
// indices mod 4, built from xtime and XOR only.  Combinational; the column
// is taken as one word (row 0 in bits [31:24]), so a full state is mixed in
// four cycles by the round module.  Processing a whole column per cycle,
// rather than one byte, is this design's choice.
//
// Interface: col_in, col_out (32 bits each), no clock.
module aes_mixcol
  import aes_pkg::byte_t, aes_pkg::word_t, aes_pkg::xtime;
(
  input  word_t col_in,
  output word_t col_out
);
  byte_t a [4];
  byte_t y [4];

  always_comb begin
    for (int r = 0; r < 4; r++) a[r] = col_in[31-8*r -: 8];
    for (int r = 0; r < 4; r++) begin
      y[r] = xtime(a[r]) ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4]
           ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
    col_out = {y[0], y[1], y[2], y[3]};
  end
endmodule
