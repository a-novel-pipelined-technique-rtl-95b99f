// tb_aes_state_reg: drives the forward and inverse state register banks with
// random sequences of operations and compares their head byte and column
// after every cycle with a behavioural 16-byte model.  The ShiftRows
// permutation of the model is taken from the reference package.
module tb_aes_state_reg;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_op [4];
  logic clk = 0, rst_n = 0;
  state_op_e op;
  logic [7:0]  byte_in, head_f, head_i;
  logic [31:0] col_in, col_f, col_i;
  blk_t mf, mi;

  aes_state_reg #(.INVERSE(1'b0)) dut_f (.clk, .rst_n, .op, .byte_in, .col_in, .head(head_f), .col(col_f));
  aes_state_reg #(.INVERSE(1'b1)) dut_i (.clk, .rst_n, .op, .byte_in, .col_in, .head(head_i), .col(col_i));

  always #5 clk = ~clk;

  function automatic blk_t model(blk_t s, state_op_e o, logic [7:0] b, logic [31:0] c, bit inv);
    unique case (o)
      ST_SHIFT:     return {s[119:0], b};
      ST_SHIFTROWS: return shift_rows(s, inv);
      ST_COLUMN:    return {s[95:0], c};
      default:      return s;
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    aes_ref_pkg::init();
    op = ST_HOLD; byte_in = 0; col_in = 0;
    mf = '0; mi = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      op      = (i < 16) ? ST_SHIFT : state_op_e'($urandom_range(0, 3));
      byte_in = 8'($urandom);
      col_in  = $urandom;
      n_op[op]++;
      mf = model(mf, op, byte_in, col_in, 0);
      mi = model(mi, op, byte_in, col_in, 1);
      @(posedge clk);
      #1;
      check(head_f == mf[127:120] && col_f == mf[127:96], $sformatf("fwd cycle %0d", i));
      check(head_i == mi[127:120] && col_i == mi[127:96], $sformatf("inv cycle %0d", i));
    end
    for (int k = 0; k < 4; k++) check(n_op[k] > 0, "every operation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
