// tb_aes_key_expansion: checks the AES-128 key schedule.
// For the FIPS-197 Appendix A.1 key it checks round key 10 against the
// published value, then for that key and random keys compares all eleven
// encryption keys and all eleven decryption keys (reversed, InvMixColumns on
// the middle nine) with aes_ref_pkg. It checks that ready rises exactly 10
// clocks after start, and that a start during a running expansion restarts it.
module tb_aes_key_expansion;
  import aes_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, busy, ready;
  block_t key;
  round_keys_t enc_keys, dec_keys;

  int checks = 0, failures = 0;

  aes_key_expansion dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic expand_and_check(block_t k, bit restart);
    aes_ref_pkg::keys_t r;
    int n = 0;
    r = aes_ref_pkg::expand(k);
    if (restart) begin
      // begin with a different key and interrupt it half way
      start <= 1;
      key   <= ~k;
      @(posedge clk);
      start <= 0;
      repeat (4) @(posedge clk);
    end
    start <= 1;
    key   <= k;
    @(posedge clk);
    start <= 0;
    @(posedge clk) #1;
    while (!ready && n < 50) begin
      check(busy, "busy low while expanding");
      n++;
      @(posedge clk) #1;
    end
    check(n == 9, $sformatf("ready after %0d cycles, expected 10", n + 1));
    @(negedge clk);
    for (int i = 0; i <= 10; i++) begin
      block_t d = (i == 0 || i == 10) ? r[10-i] : aes_ref_pkg::mix(r[10-i], 1);
      check(enc_keys[i] === r[i], $sformatf("enc key %0d %h vs %h", i, enc_keys[i], r[i]));
      check(dec_keys[i] === d, $sformatf("dec key %0d %h vs %h", i, dec_keys[i], d));
    end
  endtask

  initial begin
    start = 0;
    key = '0;
    repeat (2) @(posedge clk);
    check(!ready && !busy, "ready or busy after reset");
    rst_n = 1;
    expand_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c, 0);
    check(enc_keys[10] === 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 A.1 round key 10");
    for (int t = 0; t < 10; t++) expand_and_check(aes_ref_pkg::rand_blk(), t % 3 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
