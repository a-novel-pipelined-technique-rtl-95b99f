// tb_aes_inv_sbox: applies all 256 input bytes to aes_inv_sbox and compares each
// output with the reference table of the independent model.
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] din, dout;

  aes_inv_sbox dut (.din, .dout);

  initial begin
    aes_ref_pkg::init();
    for (int a = 0; a < 256; a++) begin
      din = 8'(a);
      #1;
      checks++;
      if (dout !== isb[a]) begin
        failures++;
        $display("FAIL in=%02x out=%02x exp=%02x", din, dout, isb[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
