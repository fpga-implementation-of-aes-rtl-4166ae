// tb_aes_coprocessor: drives the co-processor command port directly, with
// an aes_register in front of it as in the full design.
//   - AESENC before any key: refused, error flag; AESST clear works;
//   - AESKX: key_busy for 10 clocks, then key_ready;
//   - a random mix of encryptions and decryptions of random blocks, each
//     with its own data writes, then a burst of back-to-back AESENC (one per
//     clock) of one block; AESKX during the burst: refused, error flag;
//   - every result is read word by word with AESRD (pop on the last word)
//     and compared with aes_ref_pkg, in issue order; each block must reach
//     the queue 31 clocks after its command;
//   - RESULT_DEPTH + 3 AESENC without reading: 3 refused, overflow flag.
module tb_aes_coprocessor;
  import aes_pkg::*;
  import mac_pkg::*;

  localparam int DEPTH = 32;
  localparam int NMIX = 12, NBURST = 10;

  logic clk = 0, rst_n = 0;
  crypto_cmd_t cmd;
  block_t key, data;
  logic [31:0] rd_data;
  aes_status_t status;
  int checks = 0, failures = 0, cycle = 0;
  block_t the_key;
  block_t expect_q [$];
  int issue_t [$];

  aes_register u_reg (.clk, .rst_n, .cmd, .key, .data);
  aes_coprocessor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // present one command for one clock
  task automatic send(crypto_op_e op, logic [4:0] sel = 0, logic [31:0] a = 0, logic [31:0] b = 0);
    cmd = '{valid: 1'b1, op: op, sel: sel, a: a, b: b};
    @(posedge clk);
    #1;
    cmd = '0;
  endtask

  task automatic write_block(crypto_op_e op, block_t v);
    send(op, 5'd1, v[127:96], v[95:64]);
    send(op, 5'd0, v[63:32], v[31:0]);
  endtask

  // read a status word: rd_data is combinational in the command cycle
  task automatic read_status(output aes_status_t s, input bit clear = 0);
    cmd = '{valid: 1'b1, op: CR_STAT, sel: 5'(clear), a: 0, b: 0};
    #1;
    s = aes_status_t'(rd_data);
    @(posedge clk);
    #1;
    cmd = '0;
  endtask

  task automatic read_result(output block_t r);
    for (int w = 0; w < 4; w++) begin
      cmd = '{valid: 1'b1, op: CR_RD, sel: 5'((w == 3 ? 4 : 0) | w), a: 0, b: 0};
      #1;
      r[127-32*w -: 32] = rd_data;
      @(posedge clk);
      #1;
    end
    cmd = '0;
  endtask

  // latency: command cycle to the cycle the block is pushed into the queue
  always @(posedge clk) if (rst_n) begin
    if (dut.enc_in || dut.dec_in) issue_t.push_back(cycle);
    if (dut.push) begin
      int t0;
      t0 = issue_t.pop_front();
      check(cycle - t0 == 31, $sformatf("latency %0d, expected 31", cycle - t0));
    end
  end

  initial begin
    aes_status_t s;
    block_t v, r;
    int n;
    cmd = '0;
    the_key = aes_ref_pkg::rand_blk();
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    write_block(CR_WKEY, the_key);
    send(CR_ENC);
    read_status(s);
    check(s.error && !s.key_ready && s.count == 0 && s.inflight == 0, "AESENC without key refused");
    read_status(s, 1);
    read_status(s);
    check(!s.error, "AESST clears the error flag");
    send(CR_KEYX);
    n = 0;
    do begin
      read_status(s);
      n++;
    end while (s.key_busy && n < 100);
    // busy is seen by 10 reads, the 11th sees ready
    check(n == 11 && s.key_ready, $sformatf("key busy for %0d clocks, expected 10", n - 1));

    for (int i = 0; i < NMIX; i++) begin
      bit dec;
      dec = 1'($urandom % 2);
      v = aes_ref_pkg::rand_blk();
      write_block(CR_WDATA, v);
      send(dec ? CR_DEC : CR_ENC);
      expect_q.push_back(dec ? aes_ref_pkg::decrypt(the_key, v) : aes_ref_pkg::encrypt(the_key, v));
    end
    v = aes_ref_pkg::rand_blk();
    write_block(CR_WDATA, v);
    for (int i = 0; i < NBURST; i++) begin
      send(CR_ENC);
      expect_q.push_back(aes_ref_pkg::encrypt(the_key, v));
      if (i == 3) send(CR_KEYX);
    end
    read_status(s, 1);
    check(s.error && s.pipe_busy, "AESKX with blocks in flight refused");
    repeat (40) @(posedge clk);
    #1;
    read_status(s);
    check(!s.pipe_busy && s.count == 8'(NMIX + NBURST) && !s.error && !s.overflow,
          $sformatf("all %0d results queued (count %0d)", NMIX + NBURST, s.count));
    while (expect_q.size() != 0) begin
      block_t e;
      e = expect_q.pop_front();
      read_result(r);
      check(r === e, $sformatf("result %h expected %h", r, e));
    end
    read_status(s);
    check(s.count == 0 && !s.result_valid, "queue drained");

    for (int i = 0; i < DEPTH + 3; i++) send(CR_ENC);
    read_status(s);
    check(s.overflow && int'(s.count) + int'(s.inflight) == DEPTH, "overflow refused the extra blocks");
    repeat (40) @(posedge clk);
    #1;
    read_status(s);
    check(s.count == 8'(DEPTH), "queue full with accepted blocks only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
