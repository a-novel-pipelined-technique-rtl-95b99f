// tb_aes_round: checks both variants of the round module (DECRYPT = 0 and 1)
// on random bytes and columns: the byte path against the reference S-boxes,
// the column path against MixColumns/InvMixColumns and key addition, with
// and without mix_bypass.
module tb_aes_round;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0]  sub_in, sub_e, sub_d;
  logic [31:0] scol, kcol, col_e, col_d;
  logic        bypass;

  aes_round #(.DECRYPT(1'b0)) dut_e (.sub_in, .sub_out(sub_e), .state_col(scol),
    .key_col(kcol), .mix_bypass(bypass), .col_out(col_e));
  aes_round #(.DECRYPT(1'b1)) dut_d (.sub_in, .sub_out(sub_d), .state_col(scol),
    .key_col(kcol), .mix_bypass(bypass), .col_out(col_d));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    aes_ref_pkg::init();
    for (int i = 0; i < 1000; i++) begin
      sub_in = 8'($urandom);
      scol   = $urandom;
      kcol   = $urandom;
      bypass = (i % 3 == 0);
      #1;
      check(sub_e == sb[sub_in], "enc sbox");
      check(sub_d == isb[sub_in], "dec sbox");
      check(col_e == ((bypass ? scol : mix_col(scol, 0)) ^ kcol), "enc column");
      check(col_d == (bypass ? (scol ^ kcol) : mix_col(scol ^ kcol, 1)), "dec column");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
