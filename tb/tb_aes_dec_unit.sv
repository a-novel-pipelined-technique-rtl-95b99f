// tb_aes_dec_unit: end-to-end test of the byte-serial decryption unit.
//
// Decrypts the FIPS-197 example ciphertext and then random blocks with random
// keys, back to back: each new block's I/O pass carries the previous
// plaintext out, and a final flush empties the unit.  Every plaintext is
// compared with the reference model.  The latency from the first I/O cycle
// to done is checked to be 390 enabled cycles; some blocks run with en
// dropped at random (stall), which must not change the result or the count
// of enabled cycles.
module tb_aes_dec_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int LATENCY = 390;
  localparam int NBLK    = 12;
  int checks = 0, failures = 0;
  int stalls = 0, overlaps = 0;
  logic clk = 0, rst_n = 0;
  logic en, start, flush, dout_valid, io_active, busy, done, result_valid;
  logic [7:0] din, key_in, dout;
  ctrl_t ctrl;

  aes_dec_unit dut (.clk, .rst_n, .en, .start, .flush, .din, .key_in, .dout,
    .dout_valid, .io_active, .busy, .done, .result_valid, .ctrl);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // One I/O pass: sends blk/key (start) or nothing (flush), returns the
  // bytes seen on dout while dout_valid was high.
  task automatic io_pass(bit is_start, blk_t blk, blk_t key, bit stall,
                         output blk_t got, output int nvalid);
    int j = 0;
    nvalid = 0;
    got = '0;
    @(negedge clk);
    en = 1; start = is_start; flush = !is_start;
    @(negedge clk);
    start = 0; flush = 0;
    while (j < 16) begin
      en = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (!en) stalls++;
      din = get(blk, j); key_in = get(key, j);
      @(posedge clk);
      if (en) begin
        check(io_active, "io_active during I/O pass");
        if (dout_valid) begin
          got = put(got, j, dout);
          nvalid++;
        end
        j++;
      end
      @(negedge clk);
    end
  endtask

  task automatic wait_done(bit stall, output int lat);
    lat = 16;
    while (1) begin
      en = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (!en) stalls++;
      @(posedge clk);
      #1;
      if (en) lat++;
      if (done) break;
      @(negedge clk);
    end
  endtask

  initial begin
    blk_t pt [NBLK];
    blk_t key [NBLK];
    blk_t exp_ct, got;
    int nv, lat;
    aes_ref_pkg::init();
    en = 1; start = 0; flush = 0; din = 0; key_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      pt[b]  = (b == 0) ? 128'h69c4e0d86a7b0430d8cdb78070b4c55a : rand_blk();
      key[b] = (b == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand_blk();
    end
    check(decrypt(pt[0], key[0]) == 128'h00112233445566778899aabbccddeeff, "reference model FIPS-197");
    for (int b = 0; b < NBLK; b++) begin
      bit stall;
      stall = (b % 3 == 2);
      io_pass(1, pt[b], key[b], stall, got, nv);
      if (b > 0) begin
        exp_ct = decrypt(pt[b-1], key[b-1]);
        check(nv == 16, "previous plaintext shifted out during next load");
        check(got == exp_ct, $sformatf("block %0d pt %032x exp %032x", b - 1, got, exp_ct));
        overlaps++;
      end else begin
        check(nv == 0, "no output before the first result");
      end
      wait_done(stall, lat);
      check(lat == LATENCY, $sformatf("latency %0d exp %0d", lat, LATENCY));
      check(result_valid && !busy, "result pending after done");
    end
    io_pass(0, '0, '0, 0, got, nv);
    exp_ct = decrypt(pt[NBLK-1], key[NBLK-1]);
    check(nv == 16 && got == exp_ct, "flush returns last plaintext");
    @(negedge clk);
    check(!busy && !result_valid, "idle after flush");
    check(stalls > 0, "stall exercised");
    check(overlaps > 0, "overlapped I/O exercised");
    $display("stalls=%0d overlapped_io=%0d", stalls, overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
