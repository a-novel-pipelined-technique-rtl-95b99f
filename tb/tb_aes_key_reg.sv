// tb_aes_key_reg: loads random keys (and the FIPS-197 key) serially into the
// forward and the bidirectional key register banks, runs ten forward
// expansion passes and reads every round key back through four column
// rotations, comparing with the reference key expansion.  The
// bidirectional bank then runs ten backward passes, which must reproduce
// round keys 9 down to 0.
module tb_aes_key_reg;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  key_op_e op;
  logic [3:0]  byte_idx;
  logic [7:0]  key_in;
  logic [31:0] col_f, col_d;

  aes_key_reg #(.DECRYPT(1'b0)) dut_f (.clk, .rst_n, .op, .byte_idx, .key_in, .col(col_f));
  aes_key_reg #(.DECRYPT(1'b1)) dut_d (.clk, .rst_n, .op, .byte_idx, .key_in, .col(col_d));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic pass(key_op_e o, int n);
    for (int j = 0; j < n; j++) begin
      @(negedge clk);
      op = o; byte_idx = 4'(j);
    end
    @(negedge clk);
    op = KEY_HOLD;
  endtask

  // Reads the whole round key with four column rotations.
  task automatic read_key(output blk_t kf, output blk_t kd);
    for (int c = 0; c < 4; c++) begin
      @(negedge clk);
      kf[127-32*c -: 32] = col_f;
      kd[127-32*c -: 32] = col_d;
      op = KEY_ROT4;
    end
    @(negedge clk);
    op = KEY_HOLD;
  endtask

  initial begin
    blk_t key, kf, kd;
    blk_t rk [11];
    aes_ref_pkg::init();
    op = KEY_HOLD; byte_idx = 0; key_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      key = (t == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand_blk();
      expand(key, rk);
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        op = KEY_LOAD; byte_idx = 4'(j); key_in = get(key, j);
      end
      @(negedge clk);
      op = KEY_HOLD;
      read_key(kf, kd);
      check(kf == rk[0] && kd == rk[0], "loaded key");
      for (int r = 1; r <= 10; r++) begin
        pass(KEY_FWD, 16);
        read_key(kf, kd);
        check(kf == rk[r], $sformatf("fwd round key %0d: %032x exp %032x", r, kf, rk[r]));
        check(kd == rk[r], $sformatf("dec-bank fwd round key %0d", r));
      end
      if (t == 0) check(kf == 128'h13111d7fe3944a17f307a78b4d2b30c5, "FIPS-197 round key 10");
      for (int r = 9; r >= 0; r--) begin
        pass(KEY_BWD, 16);
        read_key(kf, kd);
        check(kd == rk[r], $sformatf("bwd round key %0d: %032x exp %032x", r, kd, rk[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
