// aes_image_top: AES-128 image encryption/decryption accelerator.
//
// An image is processed as a stream of 16-byte blocks over one byte-wide
// port.  The top holds an encryption unit (aes_enc_unit) and a decryption
// unit (aes_dec_unit) of the same byte-serial structure, and a mode select
// that routes the shared serial port to one of them:
//   mode = 0  encrypt,  mode = 1  decrypt.
// mode is taken together with start or flush while the accelerator is ready
// (neither unit busy) and then held in sel_q; din and key_in feed both
// units, but only the selected one is in its I/O pass.  dout, dout_valid,
// io_active and the control signals shown on the ports (DATA_IN_SEL,
// KEY_IN_SEL, RND_SIG, LAST_RND_SIG) come from the selected unit.  Each unit
// keeps its last result until it is shifted out, so switching mode never
// loses a result.  en (EN_SIG) stalls both units while low.
//
// Timing: an encryption completes 226 enabled cycles after its first I/O
// cycle, a decryption 390; the result leaves during the next I/O pass of
// the same unit.  Separate encryption and decryption units follow the
// design description; the shared port and mode select are this design's.
//
// Only four fields of each unit's control word are brought out, so lint
// reports the other fields as unused here; they drive the units internally.
module aes_image_top
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  mode,
  input  logic  start,
  input  logic  flush,
  input  byte_t din,
  input  byte_t key_in,
  output logic  ready,
  output logic  io_active,
  output byte_t dout,
  output logic  dout_valid,
  output logic  done,
  output logic  sel,
  output logic  enc_result_valid,
  output logic  dec_result_valid,
  output logic  data_in_sel,
  output logic  key_in_sel,
  output logic  rnd_sig,
  output logic  last_rnd_sig
);
  logic  sel_q;
  logic  go;
  logic  enc_busy, dec_busy, enc_done, dec_done;
  logic  enc_io, dec_io, enc_dv, dec_dv;
  byte_t enc_dout, dec_dout;
  ctrl_t enc_ctrl, dec_ctrl;

  assign ready = !enc_busy && !dec_busy;
  assign go    = ready && en && (start || flush);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sel_q <= 1'b0;
    else if (go) sel_q <= mode;
  end

  aes_enc_unit u_enc (
    .clk, .rst_n, .en,
    .start(ready && start && !mode), .flush(ready && flush && !start && !mode),
    .din, .key_in, .dout(enc_dout), .dout_valid(enc_dv), .io_active(enc_io),
    .busy(enc_busy), .done(enc_done), .result_valid(enc_result_valid),
    .ctrl(enc_ctrl)
  );

  aes_dec_unit u_dec (
    .clk, .rst_n, .en,
    .start(ready && start && mode), .flush(ready && flush && !start && mode),
    .din, .key_in, .dout(dec_dout), .dout_valid(dec_dv), .io_active(dec_io),
    .busy(dec_busy), .done(dec_done), .result_valid(dec_result_valid),
    .ctrl(dec_ctrl)
  );

  assign sel          = sel_q;
  assign io_active    = sel_q ? dec_io : enc_io;
  assign dout         = sel_q ? dec_dout : enc_dout;
  assign dout_valid   = sel_q ? dec_dv : enc_dv;
  assign done         = enc_done || dec_done;
  assign data_in_sel  = sel_q ? dec_ctrl.data_in_sel : enc_ctrl.data_in_sel;
  assign key_in_sel   = sel_q ? dec_ctrl.key_in_sel : enc_ctrl.key_in_sel;
  assign rnd_sig      = sel_q ? dec_ctrl.rnd_sig : enc_ctrl.rnd_sig;
  assign last_rnd_sig = sel_q ? dec_ctrl.last_rnd_sig : enc_ctrl.last_rnd_sig;

  // The shared serial port is used by one unit at a time.
  a_one_io: assert property (@(posedge clk) disable iff (!rst_n) !(enc_io && dec_io));
endmodule
