// tb_aes_throughput: the throughput and latency workload. A stream of NBLK
// random blocks is fed back to back into the encrypter and, in parallel,
// their cipher texts into the decrypter; every output is checked against
// aes_ref_pkg and the round trip must give back the plain text. From the
// measured clocks it reports bits per clock and what that means at the
// clock frequencies of the published sweep (50 to 553 MHz). It checks one
// block per clock sustained (128 bits per clock, at least the 104.9 bits per
// clock that 58 Gbps at 553 MHz requires) and a 31-clock latency.
module tb_aes_throughput;
  import aes_pkg::*;

  localparam int NBLK = 1000;
  localparam int LAT  = 31;

  logic clk = 0, rst_n = 0;
  logic e_in_v = 0, d_in_v = 0, e_out_v, d_out_v;
  block_t e_in, d_in, e_out, d_out;
  round_keys_t ek, dk;

  int checks = 0, failures = 0, cycle = 0;
  block_t key, pt [NBLK], ct [NBLK];
  int ne = 0, nd = 0, t_first_in = -1, t_first_out = -1, t_last_out = 0;

  aes_encrypter u_enc (.clk, .rst_n, .in_valid(e_in_v), .in_block(e_in), .round_keys(ek), .out_valid(e_out_v), .out_block(e_out));
  aes_decrypter u_dec (.clk, .rst_n, .in_valid(d_in_v), .in_block(d_in), .round_keys(dk), .out_valid(d_out_v), .out_block(d_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    aes_ref_pkg::keys_t k;
    int mhz [11] = '{50, 100, 150, 200, 250, 300, 350, 400, 450, 500, 553};
    real bpc;
    key = aes_ref_pkg::rand_blk();
    k = aes_ref_pkg::expand(key);
    for (int i = 0; i < 11; i++) begin
      ek[i] = k[i];
      dk[i] = (i == 0 || i == 10) ? k[10-i] : aes_ref_pkg::mix(k[10-i], 1);
    end
    for (int n = 0; n < NBLK; n++) begin
      pt[n] = aes_ref_pkg::rand_blk();
      ct[n] = aes_ref_pkg::encrypt(key, pt[n]);
    end
    e_in = '0;
    d_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NBLK; n++) begin
      e_in_v <= 1; e_in <= pt[n];
      d_in_v <= 1; d_in <= ct[n];
      @(posedge clk);
    end
    e_in_v <= 0;
    d_in_v <= 0;
    repeat (LAT + 5) @(posedge clk);
    check(ne == NBLK && nd == NBLK, $sformatf("%0d/%0d blocks out of %0d", ne, nd, NBLK));
    check(t_first_out - t_first_in == LAT, $sformatf("latency %0d clocks", t_first_out - t_first_in));
    bpc = 128.0 * NBLK / (t_last_out - t_first_out + 1);
    check(bpc >= 58.0e3 / 553.0, $sformatf("%.1f bits per clock below 104.9", bpc));
    $display("sustained %.1f bits per clock; latency %0d clocks", bpc, t_first_out - t_first_in);
    foreach (mhz[i])
      $display("  at %0d MHz: %.1f Gbps, latency %.0f ns", mhz[i], bpc * mhz[i] / 1000.0, 1000.0 * LAT / mhz[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (e_in_v && t_first_in < 0) t_first_in = cycle;
    if (e_out_v) begin
      if (t_first_out < 0) t_first_out = cycle;
      t_last_out = cycle;
      if (ne < NBLK) check(e_out === ct[ne], $sformatf("cipher %0d", ne));
      ne++;
    end
    if (d_out_v) begin
      if (nd < NBLK) check(d_out === pt[nd], $sformatf("plain %0d", nd));
      nd++;
    end
  end

  initial begin
    repeat (NBLK + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
