// aes_key_reg: the 16-byte key register bank with byte-serial AES-128 key
// expansion.
//
// k[0..15] is a byte-wide shift register holding the current round key in
// FIPS-197 order.  One operation per cycle, chosen by op; byte_idx is the
// position (0..15) inside a 16-cycle expansion pass, supplied by the
// controller.
//   KEY_LOAD  k[0] leaves, key_in enters at k[15] (serial key load).
//   KEY_FWD   computes round key i+1 from round key i, one byte per cycle,
//             shifting left.  With j = byte_idx the new byte is
//               k[0] ^ S(k[13]) ^ rcon   for j = 0
//               k[0] ^ S(k[13])          for j = 1, 2
//               k[0] ^ S(k[9])           for j = 3
//               k[0] ^ k[12]             for j = 4..15
//             (the register positions that hold the needed original or
//             freshly computed bytes at that moment).  rcon advances by
//             xtime at j = 15.
//   KEY_BWD   (DECRYPT only) computes round key i-1 from round key i, one
//             byte per cycle, shifting right so the bytes are produced from
//             15 down to 0.  With t = byte_idx the new byte entering k[0] is
//               k[15] ^ k[11]                        for t = 0..11
//               k[15] ^ S(k[8])                      for t = 12
//               k[15] ^ S(k[12])                     for t = 13, 14
//               k[15] ^ S(k[12]) ^ rcon/x            for t = 15
//             and rcon steps back (division by x) at t = 15.
//   KEY_ROT4  rotates left by one column; col = k[0..3] is the round-key
//             column the round module adds this cycle.
// A single S-box is shared by both expansion directions.  Keeping the key
// in a register bank of its own follows the design description; on-the-fly
// byte-serial expansion and the backward step are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), op, byte_idx, key_in;
// col = {k[0],k[1],k[2],k[3]}.  rcon is reset to 01 by KEY_LOAD at
// byte_idx 0.
module aes_key_reg
  import aes_pkg::byte_t, aes_pkg::word_t, aes_pkg::AES_NB, aes_pkg::AES_RCON1,
         aes_pkg::key_op_e, aes_pkg::KEY_LOAD, aes_pkg::KEY_FWD, aes_pkg::KEY_BWD,
         aes_pkg::KEY_ROT4, aes_pkg::xtime, aes_pkg::inv_xtime;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  key_op_e    op,
  input  logic [3:0] byte_idx,
  input  byte_t      key_in,
  output word_t      col
);
  byte_t k [AES_NB];
  byte_t k_next [AES_NB];
  byte_t rcon, rcon_next, rcon_back;
  byte_t sb_in, sb_out;

  aes_sbox u_ksbox (.din(sb_in), .dout(sb_out));

  assign rcon_back = inv_xtime(rcon);

  always_comb begin
    for (int i = 0; i < AES_NB; i++) k_next[i] = k[i];
    rcon_next = rcon;
    sb_in     = (byte_idx == 4'd3) ? k[9] : k[13];
    unique case (op)
      KEY_LOAD: begin
        for (int i = 0; i < AES_NB - 1; i++) k_next[i] = k[i+1];
        k_next[AES_NB-1] = key_in;
        if (byte_idx == 4'd0) rcon_next = AES_RCON1;
      end
      KEY_FWD: begin
        for (int i = 0; i < AES_NB - 1; i++) k_next[i] = k[i+1];
        if (byte_idx < 4'd4)
          k_next[AES_NB-1] = k[0] ^ sb_out ^ ((byte_idx == 4'd0) ? rcon : 8'h00);
        else
          k_next[AES_NB-1] = k[0] ^ k[12];
        if (byte_idx == 4'd15) rcon_next = xtime(rcon);
      end
      KEY_BWD: begin
        if (DECRYPT) begin
          sb_in = (byte_idx == 4'd12) ? k[8] : k[12];
          for (int i = 1; i < AES_NB; i++) k_next[i] = k[i-1];
          if (byte_idx < 4'd12)
            k_next[0] = k[15] ^ k[11];
          else
            k_next[0] = k[15] ^ sb_out ^ ((byte_idx == 4'd15) ? rcon_back : 8'h00);
          if (byte_idx == 4'd15) rcon_next = rcon_back;
        end
      end
      KEY_ROT4: begin
        for (int i = 0; i < AES_NB; i++) k_next[i] = k[(i+4)%AES_NB];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < AES_NB; i++) k[i] <= '0;
      rcon <= AES_RCON1;
    end else begin
      for (int i = 0; i < AES_NB; i++) k[i] <= k_next[i];
      rcon <= rcon_next;
    end
  end

  assign col = {k[0], k[1], k[2], k[3]};
endmodule
