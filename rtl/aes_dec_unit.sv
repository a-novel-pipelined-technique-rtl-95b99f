// aes_dec_unit: byte-serial AES-128 decryption unit, the mirror of
// aes_enc_unit.
//
// Same structure as the encryption unit, with the inverse transformations:
// aes_state_reg does InvShiftRows, aes_round does InvSubBytes and
// AddRoundKey followed by InvMixColumns, and aes_key_reg runs the key
// expansion backwards, one round key per round.
//
// Operation: pulse start while idle; for the next 16 cycles with en high
// (io_active high) drive ciphertext byte i on din and the cipher key (the
// same key used to encrypt) byte i on key_in.  The unit then expands the key
// forward to the last round key (160 cycles), adds it (4 cycles) and runs
// ten inverse rounds of 21 cycles, each computing the previous round key
// while InvSubBytes runs.  done pulses 390 enabled cycles after the first
// I/O cycle.  The plaintext leaves on dout during the next I/O pass (start
// or flush), marked by dout_valid.  After a block the key register again
// holds the cipher key.  That decryption mirrors encryption with inverse
// transformations follows the design description; taking the cipher key and
// expanding it inside the unit is this design's choice.
module aes_dec_unit
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  start,
  input  logic  flush,
  input  byte_t din,
  input  byte_t key_in,
  output byte_t dout,
  output logic  dout_valid,
  output logic  io_active,
  output logic  busy,
  output logic  done,
  output logic  result_valid,
  output ctrl_t ctrl
);
  byte_t head, sub_out, st_byte_in;
  word_t st_col, key_col, rnd_col;

  aes_ctrl #(.DECRYPT(1'b1)) u_ctrl (
    .clk, .rst_n, .en_sig(en), .start, .flush, .ctrl, .io_active,
    .dout_valid, .busy, .done, .result_valid
  );

  aes_state_reg #(.INVERSE(1'b1)) u_state (
    .clk, .rst_n, .op(ctrl.state_op), .byte_in(st_byte_in),
    .col_in(rnd_col), .head, .col(st_col)
  );

  aes_key_reg #(.DECRYPT(1'b1)) u_key (
    .clk, .rst_n, .op(ctrl.key_op), .byte_idx(ctrl.byte_idx),
    .key_in, .col(key_col)
  );

  aes_round #(.DECRYPT(1'b1)) u_round (
    .sub_in(head), .sub_out, .state_col(st_col), .key_col,
    .mix_bypass(ctrl.mix_bypass), .col_out(rnd_col)
  );

  // DATA_IN_SEL: new ciphertext block, or InvSubBytes feedback.
  assign st_byte_in = ctrl.data_in_sel ? din : sub_out;
  assign dout       = head;
endmodule
