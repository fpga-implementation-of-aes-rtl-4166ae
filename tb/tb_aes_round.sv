// tb_aes_round: checks the four kinds of pipelined AES round (encrypt or
// decrypt, middle or last) against the behavioural reference in aes_ref_pkg.
// Random blocks and keys are fed one per clock; each output must equal the
// reference composition of the round steps and appear 3 clocks after its
// input was sampled.
module tb_aes_round;
  import aes_pkg::*;

  localparam int N = 50;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  block_t in_block, round_key;
  logic   ov [4];
  block_t ob [4];

  int checks = 0, failures = 0, cycle = 0;
  block_t hist_in [$], hist_key [$];
  int     hist_t [$];

  aes_round #(.INV(1'b0), .LAST(1'b0)) u_enc      (.clk, .rst_n, .in_valid, .in_block, .round_key, .out_valid(ov[0]), .out_block(ob[0]));
  aes_round #(.INV(1'b0), .LAST(1'b1)) u_enc_last (.clk, .rst_n, .in_valid, .in_block, .round_key, .out_valid(ov[1]), .out_block(ob[1]));
  aes_round #(.INV(1'b1), .LAST(1'b0)) u_dec      (.clk, .rst_n, .in_valid, .in_block, .round_key, .out_valid(ov[2]), .out_block(ob[2]));
  aes_round #(.INV(1'b1), .LAST(1'b1)) u_dec_last (.clk, .rst_n, .in_valid, .in_block, .round_key, .out_valid(ov[3]), .out_block(ob[3]));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // the round key must be stable while a block is in flight, so each block's
  // key is held for the 3 cycles of its passage: feed a block every 3rd cycle
  initial begin
    aes_ref_pkg::init();
    in_valid = 0;
    in_block = '0;
    round_key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      in_valid  <= 1;
      in_block  <= aes_ref_pkg::rand_blk();
      round_key <= aes_ref_pkg::rand_blk();
      @(posedge clk);
      in_valid <= 0;
      repeat (2) @(posedge clk);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (hist_in.size() != 0) begin
      failures++;
      $display("FAIL: %0d blocks never came out", hist_in.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      hist_in.push_back(in_block);
      hist_key.push_back(round_key);
      hist_t.push_back(cycle);
    end
    if (rst_n && ov[0]) begin
      block_t x, k, e [4];
      int t;
      x = hist_in.pop_front();
      k = hist_key.pop_front();
      t = hist_t.pop_front();
      e[0] = aes_ref_pkg::mix(aes_ref_pkg::shift(aes_ref_pkg::sub(x, 0), 0), 0) ^ k;
      e[1] = aes_ref_pkg::shift(aes_ref_pkg::sub(x, 0), 0) ^ k;
      e[2] = aes_ref_pkg::mix(aes_ref_pkg::shift(aes_ref_pkg::sub(x, 1), 1), 1) ^ k;
      e[3] = aes_ref_pkg::shift(aes_ref_pkg::sub(x, 1), 1) ^ k;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (!ov[i] || ob[i] !== e[i]) begin
          failures++;
          $display("FAIL: variant %0d got %h expected %h", i, ob[i], e[i]);
        end
      end
      checks++;
      if (cycle - t != 3) begin
        failures++;
        $display("FAIL: latency %0d, expected 3", cycle - t);
      end
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
