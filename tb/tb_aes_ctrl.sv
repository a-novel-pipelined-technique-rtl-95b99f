// tb_aes_ctrl: checks the control word of the encryption and decryption
// controllers cycle by cycle against the expected schedule, written here as
// a function of the enabled-cycle index since the first I/O cycle:
//   encryption: 16 I/O, then 10 x (16 SubBytes, 1 ShiftRows, 4 columns);
//   decryption: 16 I/O, 160 key expansion, 4 initial key addition, then
//               the same 10 rounds with backward key steps.
// en is dropped at random: a stalled cycle must show HOLD operations and
// must not advance the schedule.  Also checks done, result_valid, busy,
// dout_valid during the following I/O pass, flush, and that ten rounds
// (ten ShiftRows cycles) and one last round occur per block.
module tb_aes_ctrl;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  int n_stall = 0;
  logic clk = 0, rst_n = 0;
  logic en;
  logic start [2], flush [2];
  ctrl_t ctrl [2];
  logic io_active [2], dout_valid [2], busy [2], done [2], result_valid [2];

  for (genvar d = 0; d < 2; d++) begin : g_dut
    aes_ctrl #(.DECRYPT(d == 1)) dut (.clk, .rst_n, .en_sig(en), .start(start[d]), .flush(flush[d]),
      .ctrl(ctrl[d]), .io_active(io_active[d]), .dout_valid(dout_valid[d]),
      .busy(busy[d]), .done(done[d]), .result_valid(result_valid[d]));
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic ctrl_t expected(bit dec, int k, bit load);
    ctrl_t c = '0;
    int pre = dec ? 180 : 16;
    c.state_op = ST_HOLD; c.key_op = KEY_HOLD;
    if (k < 16) begin
      c.state_op = ST_SHIFT; c.key_op = load ? KEY_LOAD : KEY_HOLD;
      c.data_in_sel = 1; c.key_in_sel = 1; c.byte_idx = 4'(k);
    end else if (dec && k < 176) begin
      c.key_op = KEY_FWD; c.byte_idx = 4'(k - 16);
    end else if (dec && k < 180) begin
      c.state_op = ST_COLUMN; c.key_op = KEY_ROT4; c.mix_bypass = 1;
      c.byte_idx = 4'(k - 176);
    end else begin
      int r = (k - pre) / 21 + 1;
      int o = (k - pre) % 21;
      c.rnd_sig = 1; c.last_rnd_sig = (r == 10);
      if (o < 16) begin
        c.state_op = ST_SHIFT; c.key_op = dec ? KEY_BWD : KEY_FWD; c.byte_idx = 4'(o);
      end else if (o == 16) begin
        c.state_op = ST_SHIFTROWS; c.byte_idx = 4'd0;
      end else begin
        c.state_op = ST_COLUMN; c.key_op = KEY_ROT4; c.mix_bypass = (r == 10);
        c.byte_idx = 4'(o - 17);
      end
    end
    return c;
  endfunction

  // Runs one pass on unit d; total = enabled cycles until done (or the end
  // of I/O for a flush).  Returns how many cycles had dout_valid.
  task automatic run(int d, bit load, bit stall, bit had_result, output int nvalid);
    int k = 0;
    int total = load ? (d == 1 ? 390 : 226) : 16;
    int n_shr = 0, n_last = 0;
    bit rv_seen = 0;
    nvalid = 0;
    @(negedge clk);
    en = 1; start[d] = load; flush[d] = !load;
    @(negedge clk);
    start[d] = 0; flush[d] = 0;
    while (k < total) begin
      ctrl_t e;
      en = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      if (en) begin
        e = expected(d == 1, k, load);
        check(ctrl[d] == e, $sformatf("unit %0d cycle %0d ctrl %h exp %h", d, k, ctrl[d], e));
        check(io_active[d] == (k < 16), "io_active");
        if (dout_valid[d]) nvalid++;
        if (ctrl[d].state_op == ST_SHIFTROWS) n_shr++;
        if (ctrl[d].last_rnd_sig && ctrl[d].state_op == ST_SHIFTROWS) n_last++;
        check(busy[d], "busy while running");
        check(!done[d], "no early done");
        k++;
      end else begin
        n_stall++;
        check(ctrl[d].state_op == ST_HOLD && ctrl[d].key_op == KEY_HOLD, "hold while stalled");
      end
      @(negedge clk);
    end
    en = 1;
    #1;
    if (load) begin
      check(done[d] && result_valid[d] && !busy[d], "done after last cycle");
      check(n_shr == 10 && n_last == 1, "ten rounds, one last round");
    end else begin
      check(!busy[d] && !result_valid[d], "idle and empty after flush");
    end
    if (had_result) check(nvalid == 16, "result shifted out during I/O");
    else            check(nvalid == 0, "nothing shifted out without a result");
  endtask

  initial begin
    int nv;
    en = 1; start = '{0, 0}; flush = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 2; d++) begin
      run(d, 1, 0, 0, nv);
      run(d, 1, 1, 1, nv);
      run(d, 0, 1, 1, nv);
      run(d, 0, 0, 0, nv);
    end
    check(n_stall > 0, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
