// aes_ctrl: the controller of one AES unit, a global counter that sequences
// the byte-serial datapath.
//
// A 4-bit position counter (byte_idx) and a 4-bit round counter advance only
// while en_sig (EN_SIG) is high; with en_sig low every register bank holds
// and the unit stalls.  From the counters the controller derives, every
// cycle, the control word ctrl_t: DATA_IN_SEL (external byte or SubBytes
// output into the state register), KEY_IN_SEL (external key byte or key
// expansion), RND_SIG (a round is running), LAST_RND_SIG (round 10: no
// MixColumns) and the operations of the two register banks.
//
// Schedule (cycles with en_sig high):
//   IO    16  serial I/O: the previous result leaves on dout, the next block
//             (and, for start, its key) enters.  Encryption adds the cipher
//             key to each byte as it enters (initial AddRoundKey).
//   KEYX 160  decryption only: ten forward key-expansion passes to reach the
//             last round key.
//   ARK0   4  decryption only: initial AddRoundKey with the last round key.
//   then 10 rounds of
//   SUB   16  (Inv)SubBytes one byte per cycle; the key register computes
//             the next (encryption) or previous (decryption) round key.
//   SHR    1  (Inv)ShiftRows inside the state register.
//   MIX    4  one column per cycle through (Inv)MixColumns and AddRoundKey.
// Encryption takes 16 + 10*21 = 226 cycles from the first I/O cycle to
// done, decryption 16 + 160 + 4 + 210 = 390.  The signal names come from
// the design description; the schedule and cycle counts are this design's.
//
// Handshake: in IDLE, start (takes priority) or flush begins an IO pass.
// During IO io_active is high and din/key_in are taken on every cycle with
// en_sig high; dout_valid marks the cycles where a finished result is on
// dout.  flush only shifts a finished result out and returns to IDLE.  done
// pulses for one cycle when a result is complete; result_valid stays high
// until that result has been shifted out.
//
// The assertions at the end use rst_n in their disable condition; lint
// reports this as a mixed synchronous/asynchronous use of rst_n, which does
// not affect the logic.
module aes_ctrl
  import aes_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en_sig,
  input  logic  start,
  input  logic  flush,
  output ctrl_t ctrl,
  output logic  io_active,
  output logic  dout_valid,
  output logic  busy,
  output logic  done,
  output logic  result_valid
);
  typedef enum logic [2:0] {
    S_IDLE = 3'd0,
    S_IO   = 3'd1,
    S_KEYX = 3'd2,
    S_ARK0 = 3'd3,
    S_SUB  = 3'd4,
    S_SHR  = 3'd5,
    S_MIX  = 3'd6
  } phase_e;

  phase_e     phase;
  logic [3:0] cnt;
  logic [3:0] rnd;
  logic       io_load;
  logic       last_rnd;

  assign last_rnd = (rnd == 4'(AES_NR));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= S_IDLE;
      cnt          <= '0;
      rnd          <= '0;
      io_load      <= 1'b0;
      done         <= 1'b0;
      result_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      if (en_sig) begin
        unique case (phase)
          S_IDLE: begin
            cnt <= '0;
            if (start || flush) begin
              phase   <= S_IO;
              io_load <= start;
            end
          end
          S_IO: begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd15) begin
              result_valid <= 1'b0;
              rnd          <= 4'd1;
              if (!io_load)    phase <= S_IDLE;
              else if (DECRYPT) phase <= S_KEYX;
              else             phase <= S_SUB;
            end
          end
          S_KEYX: begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd15) begin
              if (last_rnd) begin
                phase <= S_ARK0;
                rnd   <= 4'd1;
              end else begin
                rnd <= rnd + 4'd1;
              end
            end
          end
          S_ARK0: begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd3) begin
              phase <= S_SUB;
              cnt   <= '0;
            end
          end
          S_SUB: begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd15) phase <= S_SHR;
          end
          S_SHR: begin
            cnt   <= '0;
            phase <= S_MIX;
          end
          S_MIX: begin
            cnt <= cnt + 4'd1;
            if (cnt == 4'd3) begin
              cnt <= '0;
              if (last_rnd) begin
                phase        <= S_IDLE;
                done         <= 1'b1;
                result_valid <= 1'b1;
              end else begin
                phase <= S_SUB;
                rnd   <= rnd + 4'd1;
              end
            end
          end
          default: phase <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    ctrl = '{state_op: ST_HOLD, key_op: KEY_HOLD, byte_idx: cnt,
             data_in_sel: 1'b0, key_in_sel: 1'b0, rnd_sig: 1'b0,
             last_rnd_sig: 1'b0, mix_bypass: 1'b0};
    unique case (phase)
      S_IO: begin
        ctrl.state_op    = ST_SHIFT;
        ctrl.key_op      = io_load ? KEY_LOAD : KEY_HOLD;
        ctrl.data_in_sel = 1'b1;
        ctrl.key_in_sel  = 1'b1;
      end
      S_KEYX: ctrl.key_op = KEY_FWD;
      S_ARK0: begin
        ctrl.state_op   = ST_COLUMN;
        ctrl.key_op     = KEY_ROT4;
        ctrl.mix_bypass = 1'b1;
      end
      S_SUB: begin
        ctrl.state_op     = ST_SHIFT;
        ctrl.key_op       = DECRYPT ? KEY_BWD : KEY_FWD;
        ctrl.rnd_sig      = 1'b1;
        ctrl.last_rnd_sig = last_rnd;
      end
      S_SHR: begin
        ctrl.state_op     = ST_SHIFTROWS;
        ctrl.rnd_sig      = 1'b1;
        ctrl.last_rnd_sig = last_rnd;
      end
      S_MIX: begin
        ctrl.state_op     = ST_COLUMN;
        ctrl.key_op       = KEY_ROT4;
        ctrl.rnd_sig      = 1'b1;
        ctrl.last_rnd_sig = last_rnd;
        ctrl.mix_bypass   = last_rnd;
      end
      default: ;
    endcase
    if (!en_sig) begin
      ctrl.state_op = ST_HOLD;
      ctrl.key_op   = KEY_HOLD;
    end
  end

  assign io_active  = (phase == S_IO);
  assign dout_valid = io_active && result_valid && en_sig;
  assign busy       = (phase != S_IDLE);

  // A column pass lasts four cycles, and the serial ports are only in use
  // during IO.
  a_column_pass: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == S_MIX || phase == S_ARK0) |-> cnt < 4'd4);
  a_io_only: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.data_in_sel || ctrl.key_op == KEY_LOAD) |-> io_active);
endmodule
