// tb_aes_image_top: encrypts and decrypts a synthetic image through the
// accelerator top at its default configuration.
//
// The image is a 256 x 256 8-bit grey-scale picture (a diagonal gradient
// with a white square, 65536 bytes = 4096 AES blocks) generated here.  It is encrypted
// block by block (ECB) in mode 0, back to back, so each block's I/O pass
// returns the previous ciphertext; a flush returns the last one.  The
// ciphertext is then decrypted in mode 1 the same way and must give the
// image back.  Ciphertext blocks are also compared with the reference
// model, and one decryption is interleaved between two encryptions to
// switch mode while the encryption unit still holds a result.  Stalls
// (en low) are inserted in some blocks.
//
// Mechanisms counted, each of which must occur: stalled cycles, overlapped
// I/O (result out while next block in), flushes, mode switches, start
// requests refused while busy, cycles with DATA_IN_SEL, KEY_IN_SEL, RND_SIG
// and LAST_RND_SIG high.  Latencies of 226 (encrypt) and 390 (decrypt)
// enabled cycles are checked for every block.
module tb_aes_image_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int W = 256, H = 256, NBLK = W * H / 16;
  int checks = 0, failures = 0;
  int n_stall = 0, n_overlap = 0, n_flush = 0, n_switch = 0, n_refused = 0;
  int n_dis = 0, n_kis = 0, n_rnd = 0, n_last = 0;
  logic clk = 0, rst_n = 0;
  logic en, mode, start, flush, ready, io_active, dout_valid, done, sel;
  logic enc_rv, dec_rv, data_in_sel, key_in_sel, rnd_sig, last_rnd_sig;
  logic [7:0] din, key_in, dout;
  logic prev_sel = 0;
  longint cyc = 0, t0, enc_cycles, dec_cycles;
  always @(posedge clk) cyc++;

  aes_image_top dut (.clk, .rst_n, .en, .mode, .start, .flush, .din, .key_in,
    .ready, .io_active, .dout, .dout_valid, .done, .sel,
    .enc_result_valid(enc_rv), .dec_result_valid(dec_rv),
    .data_in_sel, .key_in_sel, .rnd_sig, .last_rnd_sig);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && en) begin
    if (data_in_sel)  n_dis++;
    if (key_in_sel)   n_kis++;
    if (rnd_sig)      n_rnd++;
    if (last_rnd_sig) n_last++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic io_pass(bit m, bit is_start, blk_t blk, blk_t key, bit stall,
                         output blk_t got, output int nvalid);
    int j = 0;
    nvalid = 0;
    got = '0;
    @(negedge clk);
    en = 1; mode = m; start = is_start; flush = !is_start;
    @(negedge clk);
    start = 0; flush = 0;
    if (!is_start) n_flush++;
    if (sel != prev_sel) n_switch++;
    prev_sel = sel;
    while (j < 16) begin
      en = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (!en) n_stall++;
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

  task automatic wait_done(bit stall, int expect_lat);
    int lat = 16;
    bit tried = 0;
    while (1) begin
      en = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (!en) n_stall++;
      // A start while busy must be refused.
      start = !tried;
      @(posedge clk);
      #1;
      if (!tried) begin
        check(!ready && !io_active, "start refused while busy");
        if (!io_active) n_refused++;
        tried = 1;
      end
      start = 0;
      if (en) lat++;
      if (done) break;
      @(negedge clk);
    end
    check(lat == expect_lat, $sformatf("latency %0d exp %0d", lat, expect_lat));
  endtask

  // Runs a list of blocks through one unit back to back and flushes it.
  task automatic stream(bit m, blk_t key, input blk_t in_b [NBLK], output blk_t out_b [NBLK]);
    blk_t got;
    int nv;
    for (int b = 0; b <= NBLK; b++) begin
      bit stall;
      stall = (b % 5 == 3);
      io_pass(m, b < NBLK, (b < NBLK) ? in_b[b] : '0, key, stall, got, nv);
      if (b > 0) begin
        check(nv == 16, "previous result shifted out");
        out_b[b-1] = got;
        if (b < NBLK) n_overlap++;
      end else begin
        check(nv == 0, "no stale output on first block");
      end
      if (b < NBLK) wait_done(stall, m ? 390 : 226);
    end
  endtask

  initial begin
    logic [7:0] img [H][W];
    blk_t key, pt_b [NBLK], ct_b [NBLK], rt_b [NBLK], x, y, got;
    int nv;
    aes_ref_pkg::init();
    en = 1; mode = 0; start = 0; flush = 0; din = 0; key_in = 0;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = (r >= 64 && r < 160 && c >= 80 && c < 176) ? 8'hff : 8'(r + c);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 16; i++) pt_b[b] = put(pt_b[b], i, img[(16*b+i)/W][(16*b+i)%W]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ready && !dout_valid, "ready after reset");

    t0 = cyc;
    stream(0, key, pt_b, ct_b);
    enc_cycles = cyc - t0;
    for (int b = 0; b < NBLK; b++)
      check(ct_b[b] == encrypt(pt_b[b], key), $sformatf("ciphertext block %0d", b));
    t0 = cyc;
    stream(1, key, ct_b, rt_b);
    dec_cycles = cyc - t0;
    for (int b = 0; b < NBLK; b++)
      check(rt_b[b] == pt_b[b], $sformatf("recovered image block %0d", b));

    // Mode switch with a result pending in the encryption unit.
    x = rand_blk(); y = rand_blk();
    io_pass(0, 1, x, key, 0, got, nv);
    wait_done(0, 226);
    io_pass(1, 1, encrypt(y, key), key, 0, got, nv);
    wait_done(0, 390);
    check(enc_rv && dec_rv, "both units hold a result");
    io_pass(0, 0, '0, '0, 0, got, nv);
    check(nv == 16 && got == encrypt(x, key), "encryption result kept across mode switch");
    io_pass(1, 0, '0, '0, 0, got, nv);
    check(nv == 16 && got == y, "decryption result after switching back");

    check(n_stall > 0, "stall");
    check(n_overlap > 0, "overlapped I/O");
    check(n_flush > 0, "flush");
    check(n_switch > 0, "mode switch");
    check(n_refused > 0, "refused start");
    check(n_dis > 0 && n_kis > 0 && n_rnd > 0 && n_last > 0, "control signals active");
    $display("stall=%0d overlap=%0d flush=%0d switch=%0d refused=%0d data_in_sel=%0d key_in_sel=%0d rnd_sig=%0d last_rnd_sig=%0d",
             n_stall, n_overlap, n_flush, n_switch, n_refused, n_dis, n_kis, n_rnd, n_last);
    $display("cycles: encrypt image %0d, decrypt image %0d", enc_cycles, dec_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
