// tb_aes_mixcol: checks aes_mixcol on the FIPS-197 / well-known column example
// and on 2000 random columns against the reference model.
module tb_aes_mixcol;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] col_in, col_out, exp_col;

  aes_mixcol dut (.col_in, .col_out);

  task automatic apply(logic [31:0] c, logic [31:0] e);
    col_in = c;
    #1;
    checks++;
    if (col_out !== e) begin
      failures++;
      if (failures < 10) $display("FAIL in=%08x out=%08x exp=%08x", c, col_out, e);
    end
  endtask

  initial begin
    aes_ref_pkg::init();
    apply(32'hdb135345, 32'h8e4da1bc);
    apply(32'h01010101, 32'h01010101);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] c = $urandom;
      apply(c, mix_col(c, 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
