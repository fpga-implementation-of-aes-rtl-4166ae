// tb_aes_decrypter: self-checking test of the pipelined AES-128 decrypter.
//
// With the FIPS-197 Appendix C.1 key it first checks the published vector,
// then streams NBLK random blocks back to back (one per clock, with a gap in
// the middle) and compares every output with the behavioural reference in
// aes_ref_pkg. It also checks the pipeline latency of 31 clocks per block and
// that the outputs come out in order at one block per clock.
module tb_aes_decrypter;
  import aes_pkg::*;

  localparam int NBLK = 40;
  localparam int LAT  = 31;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  block_t in_block, out_block;
  round_keys_t round_keys;

  int checks = 0, failures = 0;
  int cycle = 0;
  block_t din [NBLK];
  block_t exp_kat;
  int     t_in [NBLK];
  int     nout = 0, nin = 0;
  block_t key = 128'h000102030405060708090a0b0c0d0e0f;

  aes_decrypter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    aes_ref_pkg::keys_t k;
    k = aes_ref_pkg::expand(key);
    for (int i = 0; i < 11; i++) round_keys[i] = (i == 0 || i == 10) ? k[10-i] : aes_ref_pkg::mix(k[10-i], 1);
    din[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a; exp_kat = 128'h00112233445566778899aabbccddeeff;
    for (int n = 1; n < NBLK; n++) din[n] = aes_ref_pkg::rand_blk();
    in_valid = 0;
    in_block = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < NBLK; n++) begin
      if (n == NBLK / 2) begin
        in_valid <= 0;
        repeat (5) @(posedge clk);
      end
      in_valid <= 1;
      in_block <= din[n];
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 10) @(posedge clk);
    checks++;
    if (nout != NBLK) begin
      failures++;
      $display("FAIL: %0d of %0d blocks came out", nout, NBLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input sampled and output seen at clock edges: the difference is the latency
  always @(posedge clk) if (rst_n && in_valid && nin < NBLK) t_in[nin++] = cycle;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      block_t e;
      if (nout < NBLK) begin
        e = (nout == 0) ? exp_kat : aes_ref_pkg::decrypt(key, din[nout]);
        checks += 2;
        if (out_block !== e) begin
          failures++;
          $display("FAIL: block %0d got %h expected %h", nout, out_block, e);
        end
        if (cycle - t_in[nout] != LAT) begin
          failures++;
          $display("FAIL: block %0d latency %0d, expected %0d", nout, cycle - t_in[nout], LAT);
        end
      end else begin
        checks++;
        failures++;
        $display("FAIL: unexpected extra output");
      end
      nout++;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
