// aes_inv_sbox: AES InvSubBytes for one byte, used by the decryption unit.
//
// Purely combinational: the inverse FIPS-197 affine map followed by the
// multiplicative inverse in GF(2^8) (aes_pkg::sbox_inv).  It is the mirror
// of aes_sbox, in line with the description of a decryption unit that
// reverses each transformation of the encryption round.
//
// Interface: din (byte in), dout (inverse-substituted byte), no clock.
module aes_inv_sbox
  import aes_pkg::byte_t, aes_pkg::sbox_inv;
(
  input  byte_t din,
  output byte_t dout
);
  assign dout = sbox_inv(din);
endmodule
