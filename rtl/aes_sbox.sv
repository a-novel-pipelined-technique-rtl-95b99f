// aes_sbox: AES SubBytes for one byte, the 8-bit substitution unit of the
// byte-serial datapath.
//
// Purely combinational.  The output is the multiplicative inverse of the
// input in GF(2^8) followed by the FIPS-197 affine transformation, both
// evaluated as logic (aes_pkg::sbox_fwd) instead of a 256-entry table.  That
// the datapath substitutes one byte per cycle follows the design
// description; computing the S-box as logic rather than storing it is this
// design's choice.
//
// Interface: din (byte in), dout (substituted byte), no clock.
module aes_sbox
  import aes_pkg::byte_t, aes_pkg::sbox_fwd;
(
  input  byte_t din,
  output byte_t dout
);
  assign dout = sbox_fwd(din);
endmodule
