// aes_state_reg: the 16-byte state register bank with serial I/O and
// built-in (Inv)ShiftRows.
//
// The bank is a byte-wide shift register s[0..15] in FIPS-197 order (byte
// 4*c+r = row r, column c).  Operations, one per cycle, chosen by op:
//   ST_SHIFT     s[0] leaves on head, byte_in enters at s[15].  This single
//                serial path is used both for block I/O (the previous result
//                leaves while the next block enters) and for SubBytes, where
//                byte_in is the substituted head byte.
//   ST_SHIFTROWS the permutation s'[4c+r] = s[4((c+r) mod 4)+r] (ShiftRows),
//                or s[4((c-r) mod 4)+r] when INVERSE is set, done as a
//                parallel load of the register itself, so no extra logic
//                besides wiring and the input multiplexer is needed.
//   ST_COLUMN    column 0 (s[0..3]) leaves on col, col_in enters as column 3.
//                Four such cycles pass every column once through the round
//                module and leave the columns in their original order.
//   ST_HOLD      no change.
// That ShiftRows happens inside the state register with a serial I/O path
// follows the design description; the exact operation set is this design's.
//
// Interface: clk, rst_n (asynchronous, active low, clears the state), op,
// byte_in, col_in; head = s[0], col = {s[0],s[1],s[2],s[3]}.  Outputs are
// the register contents, valid in the cycle the operation is applied.
module aes_state_reg
  import aes_pkg::byte_t, aes_pkg::word_t, aes_pkg::AES_NB, aes_pkg::state_op_e,
         aes_pkg::ST_SHIFT, aes_pkg::ST_SHIFTROWS, aes_pkg::ST_COLUMN;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  state_op_e op,
  input  byte_t     byte_in,
  input  word_t     col_in,
  output byte_t     head,
  output word_t     col
);
  byte_t s [AES_NB];
  byte_t s_next [AES_NB];

  always_comb begin
    for (int i = 0; i < AES_NB; i++) s_next[i] = s[i];
    unique case (op)
      ST_SHIFT: begin
        for (int i = 0; i < AES_NB - 1; i++) s_next[i] = s[i+1];
        s_next[AES_NB-1] = byte_in;
      end
      ST_SHIFTROWS: begin
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            s_next[4*c+r] = INVERSE ? s[4*((c+4-r)%4)+r] : s[4*((c+r)%4)+r];
      end
      ST_COLUMN: begin
        for (int i = 0; i < AES_NB - 4; i++) s_next[i] = s[i+4];
        for (int r = 0; r < 4; r++) s_next[AES_NB-4+r] = col_in[31-8*r -: 8];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < AES_NB; i++) s[i] <= '0;
    end else begin
      for (int i = 0; i < AES_NB; i++) s[i] <= s_next[i];
    end
  end

  assign head = s[0];
  assign col  = {s[0], s[1], s[2], s[3]};
endmodule
