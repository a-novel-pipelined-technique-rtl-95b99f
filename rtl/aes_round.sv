// aes_round: the round module of the byte-serial AES datapath.
//
// Two independent combinational paths work side by side every cycle:
//   * the byte path substitutes the byte leaving the state register
//     (SubBytes, or InvSubBytes when DECRYPT is set);
//   * the column path combines one state column with one round-key column.
//     Encryption: MixColumns, then AddRoundKey.  Decryption: AddRoundKey,
//     then InvMixColumns.  With mix_bypass set (the LAST_RND_SIG round, or
//     the initial key addition of decryption) only the key is added.
// ShiftRows is not here: it is done inside the state register bank.
// Grouping SubBytes, MixColumns and AddRoundKey into one parallel round
// module follows the design description; the split into a byte path and a
// 32-bit column path is this design's choice.
//
// Interface: sub_in/sub_out (bytes), state_col/key_col/col_out (32-bit
// columns, row 0 in [31:24]), mix_bypass.  No clock.
module aes_round
  import aes_pkg::byte_t, aes_pkg::word_t;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  byte_t sub_in,
  output byte_t sub_out,
  input  word_t state_col,
  input  word_t key_col,
  input  logic  mix_bypass,
  output word_t col_out
);
  word_t mixed;

  if (DECRYPT) begin : g_dec
    word_t added;
    assign added = state_col ^ key_col;
    aes_inv_sbox u_sbox (.din(sub_in), .dout(sub_out));
    aes_inv_mixcol u_mix (.col_in(added), .col_out(mixed));
    assign col_out = mix_bypass ? added : mixed;
  end else begin : g_enc
    aes_sbox u_sbox (.din(sub_in), .dout(sub_out));
    aes_mixcol u_mix (.col_in(state_col), .col_out(mixed));
    assign col_out = (mix_bypass ? state_col : mixed) ^ key_col;
  end
endmodule
