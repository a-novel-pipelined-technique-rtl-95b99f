// tb_aes_pkg: checks the GF(2^8) helpers and S-box functions of aes_pkg
// against the independent reference model, for every byte value.
module tb_aes_pkg;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    aes_ref_pkg::init();
    for (int a = 0; a < 256; a++) begin
      check(aes_pkg::xtime(8'(a)) == aes_ref_pkg::mul(8'(a), 8'h02), $sformatf("xtime %02x", a));
      check(inv_xtime(aes_pkg::xtime(8'(a))) == 8'(a), $sformatf("inv_xtime %02x", a));
      check(sbox_fwd(8'(a)) == sb[a], $sformatf("sbox %02x", a));
      check(sbox_inv(8'(a)) == isb[a], $sformatf("isbox %02x", a));
      check(gmul(8'(a), 8'(255 - a)) == aes_ref_pkg::mul(8'(a), 8'(255 - a)), $sformatf("gmul %02x", a));
    end
    check(sbox_fwd(8'h53) == 8'hed, "FIPS-197 S(53)=ed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
