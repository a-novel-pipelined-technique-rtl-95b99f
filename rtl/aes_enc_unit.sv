// aes_enc_unit: byte-serial AES-128 encryption unit.
//
// Built from the controller (aes_ctrl), the state register bank with
// built-in ShiftRows (aes_state_reg), the key register bank with on-the-fly
// key expansion (aes_key_reg) and the forward round module (aes_round).
// The datapath into and out of the unit is 8 bits wide.
//
// Operation: pulse start while idle; for the next 16 cycles with en high
// (io_active high) drive plaintext byte i on din and cipher key byte i on
// key_in, byte 0 first.  DATA_IN_SEL routes din ^ key_in (the initial
// AddRoundKey) into the state register.  Ten rounds follow, each 16 cycles
// of SubBytes, 1 of ShiftRows and 4 of MixColumns/AddRoundKey; done pulses
// 226 enabled cycles after the first I/O cycle.  The ciphertext leaves on
// dout, byte 0 first, during the I/O pass of the next block (start) or of a
// flush, marked by dout_valid.  en low stalls the unit.  Architecture after
// the design description; interface and timing are this design's choices.
module aes_enc_unit
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

  aes_ctrl #(.DECRYPT(1'b0)) u_ctrl (
    .clk, .rst_n, .en_sig(en), .start, .flush, .ctrl, .io_active,
    .dout_valid, .busy, .done, .result_valid
  );

  aes_state_reg #(.INVERSE(1'b0)) u_state (
    .clk, .rst_n, .op(ctrl.state_op), .byte_in(st_byte_in),
    .col_in(rnd_col), .head, .col(st_col)
  );

  aes_key_reg #(.DECRYPT(1'b0)) u_key (
    .clk, .rst_n, .op(ctrl.key_op), .byte_idx(ctrl.byte_idx),
    .key_in, .col(key_col)
  );

  aes_round #(.DECRYPT(1'b0)) u_round (
    .sub_in(head), .sub_out, .state_col(st_col), .key_col,
    .mix_bypass(ctrl.mix_bypass), .col_out(rnd_col)
  );

  // DATA_IN_SEL: new block with initial AddRoundKey, or SubBytes feedback.
  assign st_byte_in = ctrl.data_in_sel ? (din ^ key_in) : sub_out;
  assign dout       = head;
endmodule
